// fp_hash: fingerprint accumulator of one processor.
//
// Every cycle in which an instruction retires (upd.valid), its state updates
// (register result, effective address, store data) are folded into a 16-bit
// CRC register with fp_pkg::crc_update; up to three 64-bit words are hashed
// combinationally in that one cycle, so the unit never stalls retirement.
// A second input, cmp_valid/cmp_result, takes one result word per cycle
// from the execution units as it completes; it is folded in before the
// retiring update of the same cycle. The committed-state design leaves it
// idle; the speculative-state design (see fp_node, SPEC_FP) feeds every
// completing result there instead of the retiring result.
// `clear` restarts the fingerprint from the seed when a checkpoint is taken
// or after a rollback; updates that come in the same cycle as clear are
// folded into the fresh seed, so they belong to the new interval.
//
// Timing: fp shows the fingerprint including every update accepted up to
// the previous clock edge. Reset loads the seed.
//
// Hashing committed updates taken from the reorder buffer and the
// load-store queue, or results as they complete, are the two options of
// the design; the one-instruction-per-cycle ports and the order of the
// two inputs within a cycle are this implementation's choice.
module fp_hash
  import fp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clear,
  input  logic    cmp_valid,
  input  word_t   cmp_result,
  input  retire_t upd,
  output fp_t     fp
);

  fp_t base, mid;

  always_comb begin
    base = clear ? CRC_SEED : fp;
    mid  = cmp_valid ? crc_word(base, cmp_result) : base;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          fp <= CRC_SEED;
    else if (upd.valid)  fp <= crc_update(mid, upd);
    else                 fp <= mid;
  end

endmodule
