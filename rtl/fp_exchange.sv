// fp_exchange: sends the local fingerprint to the mirrored processor,
// receives the mirror's fingerprint and compares the two.
//
// A comparison costs only the fingerprint itself on the link: FP_W bits per
// checkpoint interval, sent as FP_W/LINK_W beats, most significant beat
// first. `start` (one cycle, only while idle) latches the local fingerprint
// and begins sending it; the receiver assembles incoming beats into a
// one-entry buffer, so the mirror's fingerprint may arrive before or after
// the local one is ready. Once both are present, `done` pulses for one
// cycle with `match` telling whether they agree, and both are consumed.
//
// Timing: the first beat leaves in the cycle after `start`. If the remote
// fingerprint is already buffered, `done` is high FP_W/LINK_W + 2 cycles
// after the cycle of `start`; otherwise it is high two cycles after the
// cycle of the last remote beat (and never before the local send ends).
// Reset empties both sides.
//
// Exchanging one 16-bit fingerprint per checkpoint interval follows the
// design; the link width, the beat order and the absence of flow control
// (each side holds at most one outstanding fingerprint, so the receiver
// always has room) are this implementation's choices.
module fp_exchange
  import fp_pkg::*;
#(
  parameter int unsigned LINK_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // local side
  input  logic              start,
  input  fp_t               local_fp,
  output logic              done,
  output logic              match,
  // link to the mirror
  output logic              tx_valid,
  output logic [LINK_W-1:0] tx_data,
  input  logic              rx_valid,
  input  logic [LINK_W-1:0] rx_data
);

  localparam int unsigned BEATS = FP_W / LINK_W;
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  // transmit side
  fp_t           tx_shift;
  logic [BW-1:0] tx_cnt;
  logic          tx_active;
  fp_t           loc_q;
  logic          loc_valid;
  // receive side
  fp_t           rx_shift;
  logic [BW-1:0] rx_cnt;
  fp_t           rem_q;
  logic          rem_valid;

  logic both;
  assign both     = loc_valid && rem_valid && !tx_active;
  assign tx_valid = tx_active;
  assign tx_data  = tx_shift[FP_W-1 -: LINK_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_shift  <= '0;
      tx_cnt    <= '0;
      tx_active <= 1'b0;
      loc_q     <= '0;
      loc_valid <= 1'b0;
      rx_shift  <= '0;
      rx_cnt    <= '0;
      rem_q     <= '0;
      rem_valid <= 1'b0;
      done      <= 1'b0;
      match     <= 1'b0;
    end else begin
      done <= 1'b0;
      // send
      if (start && !loc_valid) begin
        loc_q     <= local_fp;
        loc_valid <= 1'b1;
        tx_shift  <= local_fp;
        tx_cnt    <= '0;
        tx_active <= 1'b1;
      end else if (tx_active) begin
        tx_shift <= tx_shift << LINK_W;
        if (tx_cnt == BW'(BEATS - 1)) tx_active <= 1'b0;
        else                          tx_cnt    <= tx_cnt + 1'b1;
      end
      // receive
      if (rx_valid) begin
        rx_shift <= (rx_shift << LINK_W) | fp_t'(rx_data);
        if (rx_cnt == BW'(BEATS - 1)) begin
          rx_cnt    <= '0;
          rem_q     <= (rx_shift << LINK_W) | fp_t'(rx_data);
          rem_valid <= 1'b1;
        end else begin
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
      // compare
      if (both) begin
        done      <= 1'b1;
        match     <= (loc_q == rem_q);
        loc_valid <= 1'b0;
        rem_valid <= 1'b0;
      end
    end
  end

  // A new comparison may only start when the previous one has finished.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !loc_valid)
    else $error("fp_exchange: start while a comparison is pending");
  // The mirror sends one fingerprint per comparison.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (rx_valid && rx_cnt == BW'(BEATS - 1)) |-> !rem_valid || both)
    else $error("fp_exchange: second remote fingerprint before the first was used");

  initial begin
    if (FP_W % LINK_W != 0) $error("fp_exchange: LINK_W must divide FP_W");
  end

endmodule
