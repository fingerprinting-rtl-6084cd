// ckpt_ctrl: checkpoint and comparison sequencer of one processor.
//
// A checkpoint interval ends when CKPT_INTERVAL instructions have retired
// since the last checkpoint, when an irreversible operation (uncached load
// or store) reaches retirement, or when the copy-on-write log is full. The
// controller then stalls retirement and starts a fingerprint comparison
// with the mirror. If the fingerprints agree, all instructions of the
// interval are known good: a pending I/O operation is released (it retires
// in CK_IO and is hashed into the new interval's fingerprint) and a new
// checkpoint is taken (CK_COMMIT: register copy, log cleared). If they
// differ, the controller rolls back (CK_ROLLBACK): the register copy is
// restored, the log is replayed into memory, the fingerprint restarts and
// the processor is told to restart from the checkpoint.
//
// Interface: ret_fire marks an instruction that retired this cycle;
// io_head an irreversible operation waiting at retirement. ret_allow /
// io_allow grant retirement of ordinary instructions / of the waiting I/O
// operation. exch_start / exch_done / exch_match talk to fp_exchange,
// replay_done comes from the log. Output strobes are combinational from
// the registered state.
//
// Timing: after reset the controller spends one cycle in CK_COMMIT, taking
// the initial checkpoint. A comparison stalls retirement from the cycle the
// trigger is seen until the exchange finishes; a successful interval end
// costs the exchange latency plus one commit cycle (plus one cycle to
// release an I/O operation).
//
// Forcing a comparison at each interval end and before each irreversible
// operation, releasing the operation only after a match and then taking a
// new checkpoint, and rolling back on a mismatch follow the design. The
// default interval of 32K instructions is the design's worked example.
// Stalling retirement during the comparison, ending an interval early when
// the log fills, and hashing the released I/O operation into the next
// interval are this implementation's choices.
module ckpt_ctrl
  import fp_pkg::*;
#(
  parameter int unsigned CKPT_INTERVAL = 32768
) (
  input  logic      clk,
  input  logic      rst_n,
  // retirement
  input  logic      ret_fire,
  input  logic      io_head,
  output logic      ret_allow,
  output logic      io_allow,
  // copy-on-write log
  input  logic      log_full,
  output logic      log_clear,
  output logic      rollback,
  input  logic      replay_done,
  // fingerprint
  output logic      fp_clear,
  output logic      exch_start,
  input  logic      exch_done,
  input  logic      exch_match,
  // checkpoint
  output logic      ckpt_take,
  output logic      restart,
  output ck_state_e state,
  output logic      error_detected
);

  localparam int unsigned CW = $clog2(CKPT_INTERVAL + 1);

  logic [CW-1:0] icount;
  logic          via_io;
  logic          rb_started;
  logic          trigger;

  assign trigger = (state == CK_RUN) &&
                   (icount >= CW'(CKPT_INTERVAL) || io_head || log_full);

  always_comb begin
    ret_allow      = (state == CK_RUN) && !trigger;
    io_allow       = (state == CK_IO);
    exch_start     = trigger;
    ckpt_take      = (state == CK_COMMIT);
    log_clear      = (state == CK_COMMIT);
    // The fingerprint restarts when the new interval starts: at the I/O
    // release, at a commit not preceded by one, and after a rollback.
    fp_clear       = (state == CK_IO) || ((state == CK_COMMIT) && !via_io) ||
                     ((state == CK_ROLLBACK) && replay_done);
    rollback       = (state == CK_ROLLBACK) && !rb_started;
    restart        = (state == CK_ROLLBACK) && replay_done;
    error_detected = (state == CK_COMPARE) && exch_done && !exch_match;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CK_COMMIT;
      icount     <= '0;
      via_io     <= 1'b0;
      rb_started <= 1'b0;
    end else begin
      if (fp_clear) icount <= ret_fire ? CW'(1) : '0;
      else if (ret_fire) icount <= icount + 1'b1;

      unique case (state)
        CK_COMMIT: begin
          via_io <= 1'b0;
          state  <= CK_RUN;
        end
        CK_RUN: begin
          if (trigger) begin
            via_io <= io_head;
            state  <= CK_COMPARE;
          end
        end
        CK_COMPARE: begin
          if (exch_done) begin
            if (!exch_match)  state <= CK_ROLLBACK;
            else if (via_io)  state <= CK_IO;
            else              state <= CK_COMMIT;
          end
        end
        CK_IO: begin
          state <= CK_COMMIT;
        end
        CK_ROLLBACK: begin
          rb_started <= 1'b1;
          if (replay_done) begin
            rb_started <= 1'b0;
            via_io     <= 1'b0;
            state      <= CK_RUN;
          end
        end
        default: state <= CK_COMMIT;
      endcase
    end
  end

  // The released I/O operation must actually retire in CK_IO.
  a_io_retires: assert property (@(posedge clk) disable iff (!rst_n)
                                 io_allow |-> ret_fire)
    else $error("ckpt_ctrl: released I/O operation did not retire");
  // Nothing retires while a comparison is pending.
  a_stall: assert property (@(posedge clk) disable iff (!rst_n)
                            (state == CK_COMPARE) |-> !ret_fire)
    else $error("ckpt_ctrl: retirement during a comparison");

endmodule
