// fp_node: fingerprint error detection and checkpointing for one processor
// of a DMR pair.
//
// The processor offers one instruction per cycle for retirement on `ret`
// (valid/ready: an offered instruction is held until `ret_ready`). Every
// retired instruction's state updates are hashed into the fingerprint
// (fp_hash); every retired store that is the first write to its cache line
// in the interval has the line's old contents logged (cow_log). At the end
// of a checkpoint interval, before an irreversible operation, or when the
// log fills, the controller (ckpt_ctrl) stalls retirement and exchanges
// fingerprints with the mirror over the link (fp_exchange). On a match the
// register file is copied (reg_ckpt), the log and fingerprint are cleared,
// and a waiting I/O operation is released. On a mismatch the register copy
// is restored (`arf_restore_valid`), the log is replayed into memory
// (`mem_rst_*`), and `restart` tells the processor to resume from the
// checkpoint.
//
// Interface: `st_first_wr` and `st_old_line` accompany a retiring store;
// `arf` is the processor's architectural register file, read when a
// checkpoint is taken. The link carries LINK_W bits per beat with a valid
// strobe. Status outputs: current fingerprint, controller state, pulses
// for a checkpoint taken and an error detected.
//
// Two fingerprint sources are offered, selected by SPEC_FP:
// - SPEC_FP = 0 (default): committed state. Register results are hashed
//   as the instructions retire, so only architectural updates count and
//   the mirrors' fingerprints agree whatever their speculation did.
// - SPEC_FP = 1: committed plus speculative state. Each result is hashed
//   when it completes (`cmp_valid`/`cmp_result`, one per cycle, including
//   results of wrong-path instructions that are later squashed), so the
//   reorder buffer need not carry results; addresses and store data are
//   still hashed at retirement, and so is the result of a released I/O
//   operation, which only exists once the operation is performed. Results
//   keep completing while retirement is stalled for a comparison, so in
//   this mode the fingerprint restarts when the comparison starts (the
//   exchanger has latched the finished value); every completion belongs
//   to exactly one interval. Both processors must then run in cycle
//   lockstep, or their fingerprints differ.
// With SPEC_FP = 0 the cmp_* inputs are ignored.
//
// The structure (fingerprint of committed updates, or of results as they
// complete; comparison at each checkpoint; register copy plus
// copy-on-write memory log; rollback on a mismatch) follows the design;
// the port-level protocol and the point where the speculative fingerprint
// restarts are this implementation's.
module fp_node
  import fp_pkg::*;
#(
  parameter int unsigned CKPT_INTERVAL = 32768,
  parameter int unsigned NREGS         = 64,
  parameter int unsigned LINE_W        = LINE_BYTES * 8,
  parameter int unsigned LOG_DEPTH     = 256,
  parameter int unsigned LINK_W        = 8,
  parameter bit          SPEC_FP       = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // retirement from the processor
  input  retire_t                      ret,
  input  logic                         st_first_wr,
  input  logic [LINE_W-1:0]            st_old_line,
  output logic                         ret_ready,
  // results as they complete (SPEC_FP = 1 only)
  input  logic                         cmp_valid,
  input  word_t                        cmp_result,
  // architectural registers
  input  logic [NREGS-1:0][DATA_W-1:0] arf,
  output logic                         arf_restore_valid,
  output logic [NREGS-1:0][DATA_W-1:0] arf_restore,
  output logic                         restart,
  // memory restore on rollback
  output logic                         mem_rst_valid,
  output laddr_t                       mem_rst_addr,
  output logic [LINE_W-1:0]            mem_rst_data,
  // link to the mirror
  output logic                         tx_valid,
  output logic [LINK_W-1:0]            tx_data,
  input  logic                         rx_valid,
  input  logic [LINK_W-1:0]            rx_data,
  // status
  output fp_t                          fp,
  output ck_state_e                    state,
  output logic                         ckpt_taken,
  output logic                         error_detected
);

  logic    ret_allow, io_allow, ret_fire, io_head;
  logic    log_full, log_clear, rollback, replay_done;
  logic    fp_clear, exch_start, exch_done, exch_match;
  logic    hash_clear, hash_cmp;
  retire_t upd;

  assign io_head   = ret.valid && ret.is_io;
  assign ret_ready = ret.is_io ? io_allow : ret_allow;
  assign ret_fire  = ret.valid && ret_ready;

  always_comb begin
    upd       = ret;
    upd.valid = ret_fire;
    if (SPEC_FP) begin
      // results were hashed at completion, except an I/O operation's
      upd.wr_reg = ret.wr_reg && ret.is_io;
      hash_clear = exch_start || (fp_clear && state == CK_ROLLBACK);
      hash_cmp   = cmp_valid;
    end else begin
      hash_clear = fp_clear;
      hash_cmp   = 1'b0;
    end
  end

  fp_hash u_hash (
    .clk, .rst_n,
    .clear      (hash_clear),
    .cmp_valid  (hash_cmp),
    .cmp_result (cmp_result),
    .upd        (upd),
    .fp    (fp)
  );

  fp_exchange #(.LINK_W(LINK_W)) u_exch (
    .clk, .rst_n,
    .start    (exch_start),
    .local_fp (fp),
    .done     (exch_done),
    .match    (exch_match),
    .tx_valid, .tx_data, .rx_valid, .rx_data
  );

  ckpt_ctrl #(.CKPT_INTERVAL(CKPT_INTERVAL)) u_ctrl (
    .clk, .rst_n,
    .ret_fire, .io_head, .ret_allow, .io_allow,
    .log_full, .log_clear, .rollback, .replay_done,
    .fp_clear, .exch_start, .exch_done, .exch_match,
    .ckpt_take (ckpt_taken),
    .restart, .state, .error_detected
  );

  reg_ckpt #(.NREGS(NREGS)) u_regs (
    .clk, .rst_n,
    .take          (ckpt_taken),
    .arf           (arf),
    .restore       (rollback),
    .restore_valid (arf_restore_valid),
    .arf_restore   (arf_restore)
  );

  cow_log #(.LINE_W(LINE_W), .DEPTH(LOG_DEPTH)) u_log (
    .clk, .rst_n,
    .wr          (ret_fire && ret.is_store && st_first_wr),
    .wr_addr     (ret.addr[DATA_W-1:LINE_OFS_W]),
    .wr_data     (st_old_line),
    .clear       (log_clear),
    .full        (log_full),
    .replay      (rollback),
    .rst_valid   (mem_rst_valid),
    .rst_addr    (mem_rst_addr),
    .rst_data    (mem_rst_data),
    .replay_done (replay_done)
  );

  // An offered instruction stays offered, unchanged, until it retires.
  a_ret_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (ret.valid && !ret_ready && !restart) |=> ret.valid)
    else $error("fp_node: retiring instruction withdrawn before it was accepted");

endmodule
