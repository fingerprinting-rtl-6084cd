// fp_pkg: types, constants and the hash function shared by the fingerprinting
// logic of a dual-modular-redundant (DMR) processor pair.
//
// A fingerprint is a 16-bit CRC accumulated over the architectural state
// updates of every retiring instruction: its new register value, the
// effective address of a load or store, and the data of a store. The CRC
// width of 16 bits follows the design; the generator polynomial (the
// classic CRC-16, x^16 + x^15 + x^2 + 1, 0x8005), the all-ones seed, the
// 64-bit word width and the order in which the words of one instruction are
// folded in are this implementation's choices.
package fp_pkg;

  // Architectural data and address width (64-bit ISA).
  localparam int unsigned DATA_W = 64;
  // Fingerprint width.
  localparam int unsigned FP_W = 16;
  // CRC-16 generator polynomial (x^16 is implicit) and starting value.
  localparam logic [FP_W-1:0] CRC_POLY = 16'h8005;
  localparam logic [FP_W-1:0] CRC_SEED = 16'hFFFF;
  // Cache-line size in bytes; a line address drops the offset bits.
  localparam int unsigned LINE_BYTES = 64;
  localparam int unsigned LINE_OFS_W = $clog2(LINE_BYTES);
  localparam int unsigned LADDR_W = DATA_W - LINE_OFS_W;

  typedef logic [FP_W-1:0]    fp_t;
  typedef logic [DATA_W-1:0]  word_t;
  typedef logic [LADDR_W-1:0] laddr_t;

  // State updates of one instruction leaving the reorder buffer and
  // load-store queue. The reorder buffer carries the instruction result.
  typedef struct packed {
    logic  valid;     // an instruction is offered for retirement
    logic  is_io;     // irreversible operation (uncached load or store)
    logic  wr_reg;    // writes a register: result is valid
    word_t result;    // new register value
    logic  is_mem;    // load or store: addr is valid
    word_t addr;      // effective address
    logic  is_store;  // store: st_data is valid
    word_t st_data;   // new memory value
  } retire_t;

  // Checkpoint controller states.
  typedef enum logic [2:0] {
    CK_COMMIT   = 3'd0,  // take a checkpoint (also the state after reset)
    CK_RUN      = 3'd1,  // instructions retire and are fingerprinted
    CK_COMPARE  = 3'd2,  // fingerprints exchanged, retirement stalled
    CK_IO       = 3'd3,  // comparison matched: release the I/O operation
    CK_ROLLBACK = 3'd4   // comparison failed: restore the last checkpoint
  } ck_state_e;

  // Fold one data word into the CRC, most significant bit first.
  function automatic fp_t crc_word(input fp_t crc, input word_t d);
    fp_t c;
    logic fb;
    c = crc;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb = c[FP_W-1] ^ d[i];
      c  = {c[FP_W-2:0], 1'b0} ^ (fb ? CRC_POLY : '0);
    end
    return c;
  endfunction

  // Fold all state updates of one retiring instruction into the CRC:
  // register result, then effective address, then store data.
  function automatic fp_t crc_update(input fp_t crc, input retire_t u);
    fp_t c;
    c = crc;
    if (u.wr_reg)   c = crc_word(c, u.result);
    if (u.is_mem)   c = crc_word(c, u.addr);
    if (u.is_store) c = crc_word(c, u.st_data);
    return c;
  endfunction

endpackage
