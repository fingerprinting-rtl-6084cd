// cow_log: copy-on-write undo log of the memory state of a checkpoint.
//
// The first time a cache line is written in a checkpoint interval, the
// cache hands its old contents to the log (`wr`, with the line address and
// the old line). The log keeps them in arrival order. When a new checkpoint
// is taken (`clear`) the log is emptied: the old values are no longer
// needed. On a rollback (`replay`, one cycle) the log is read back newest
// first, one entry per cycle, on rst_valid / rst_addr / rst_data, for the
// memory system to write back; restoring newest first leaves each line with
// its value from the checkpoint. `replay_done` pulses in the cycle the last
// entry is presented (or in the cycle after `replay` if the log was empty),
// after which the log is empty.
//
// `full` is high when DEPTH entries are held; the checkpoint controller
// then ends the interval early, so the log never overflows.
//
// Keeping old line values on the first write of each line in an interval
// and restoring from them on rollback follows the design. Which writes are
// first writes is decided by the cache (one bit per line, as in a
// per-line checkpoint tag), outside this block. The depth, the
// one-entry-per-cycle replay and the absence of back-pressure on the
// restore port are this implementation's choices.
module cow_log
  import fp_pkg::*;
#(
  parameter int unsigned LINE_W = LINE_BYTES * 8,
  parameter int unsigned DEPTH  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // logging
  input  logic              wr,
  input  laddr_t            wr_addr,
  input  logic [LINE_W-1:0] wr_data,
  input  logic              clear,
  output logic              full,
  // rollback
  input  logic              replay,
  output logic              rst_valid,
  output laddr_t            rst_addr,
  output logic [LINE_W-1:0] rst_data,
  output logic              replay_done
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  laddr_t            addr_mem [DEPTH];
  logic [LINE_W-1:0] data_mem [DEPTH];

  logic [CW-1:0] count;
  logic          busy;
  logic [AW-1:0] rd_idx;

  assign full = (count == CW'(DEPTH));

  // Log storage: written on a logging request, read during replay.
  always_ff @(posedge clk) begin
    if (wr && !full && !busy) begin
      addr_mem[AW'(count)] <= wr_addr;
      data_mem[AW'(count)] <= wr_data;
    end
    if (busy) begin
      rst_addr <= addr_mem[rd_idx];
      rst_data <= data_mem[rd_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count       <= '0;
      busy        <= 1'b0;
      rd_idx      <= '0;
      rst_valid   <= 1'b0;
      replay_done <= 1'b0;
    end else begin
      rst_valid   <= 1'b0;
      replay_done <= 1'b0;
      if (busy) begin
        rst_valid <= 1'b1;
        if (rd_idx == '0) begin
          busy        <= 1'b0;
          count       <= '0;
          replay_done <= 1'b1;
        end else begin
          rd_idx <= rd_idx - 1'b1;
        end
      end else if (replay) begin
        if (count == '0) replay_done <= 1'b1;
        else begin
          busy   <= 1'b1;
          rd_idx <= AW'(count - 1'b1);
        end
      end else if (clear) begin
        count <= '0;
      end else if (wr && !full) begin
        count <= count + 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full)
    else $error("cow_log: write to a full log");
  a_no_wr_in_replay: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !busy)
    else $error("cow_log: write during replay");

endmodule
