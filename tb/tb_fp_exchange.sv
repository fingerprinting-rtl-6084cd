// tb_fp_exchange: self-checking testbench for fp_exchange.
//
// Two instances are connected back to back through a link with a fixed
// delay (LAT cycles), as the mirrored processors would be. Each round both
// sides start a comparison, at random offsets from each other, with equal
// or (one time in three) different fingerprints; the test checks that both
// sides report done with the right match result, that the fingerprint on
// the wire is exactly FP_W/LINK_W beats carrying the local value, and that
// each side's done comes one cycle after both its own send and the
// mirror's fingerprint (FP_W/LINK_W beats plus LAT) have completed.
module tb_fp_exchange;
  import fp_pkg::*;

  localparam int unsigned LINK_W = 8;
  localparam int unsigned BEATS  = FP_W / LINK_W;
  localparam int unsigned LAT    = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] start, done, match, tx_valid, rx_valid;
  fp_t  [1:0] lfp;
  logic [1:0][LINK_W-1:0] tx_data, rx_data;
  logic [LAT-1:0][1:0] dv;
  logic [LAT-1:0][1:0][LINK_W-1:0] dd;
  int checks = 0, failures = 0;

  for (genvar n = 0; n < 2; n++) begin : g_side
    fp_exchange #(.LINK_W(LINK_W)) dut (
      .clk, .rst_n, .start(start[n]), .local_fp(lfp[n]),
      .done(done[n]), .match(match[n]),
      .tx_valid(tx_valid[n]), .tx_data(tx_data[n]),
      .rx_valid(rx_valid[n]), .rx_data(rx_data[n]));
  end

  // crossed link with LAT register stages
  always_ff @(posedge clk) begin
    if (!rst_n) dv <= '0;
    else        dv <= {dv[LAT-2:0], {tx_valid[0], tx_valid[1]}};
    dd <= {dd[LAT-2:0], {tx_data[0], tx_data[1]}};
  end
  assign rx_valid = dv[LAT-1];
  assign rx_data  = dd[LAT-1];

  always #5 clk = ~clk;

  function automatic int max2(input int x, input int y);
    return (x > y) ? x : y;
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record what side 0 puts on the wire
  fp_t wire0;
  int  beats0;
  always @(posedge clk) if (tx_valid[0]) begin
    wire0  <= (wire0 << LINK_W) | fp_t'(tx_data[0]);
    beats0 <= beats0 + 1;
  end

  initial begin
    start = '0; lfp = '0; wire0 = '0; beats0 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 300; r++) begin
      fp_t a, b;
      int off, t_done0, t_done1, cyc;
      logic m0, m1;
      a   = fp_t'($urandom);
      b   = ($urandom_range(0, 2) == 0) ? fp_t'(a ^ (16'h1 << $urandom_range(0, 15))) : a;
      off = $urandom_range(0, 12);
      beats0 = 0;
      t_done0 = -1; t_done1 = -1; cyc = 0;
      @(negedge clk);
      // side 0 starts first, side 1 'off' cycles later
      for (cyc = 0; cyc < 100 && (t_done0 < 0 || t_done1 < 0); cyc++) begin
        start[0] = (cyc == 0);
        start[1] = (cyc == off);
        lfp[0] = a; lfp[1] = b;
        @(posedge clk);
        #1;
        if (done[0] && t_done0 < 0) begin t_done0 = cyc; m0 = match[0]; end
        if (done[1] && t_done1 < 0) begin t_done1 = cyc; m1 = match[1]; end
        @(negedge clk);
      end
      start = '0;
      checks++;
      if (m0 !== (a == b) || m1 !== (a == b)) begin
        failures++;
        $display("FAIL round %0d match %b %b expected %b", r, m0, m1, a == b);
      end
      // each side finishes one cycle after both its own send and the
      // other side's fingerprint (sent plus link latency) are complete
      checks++;
      if (t_done0 != max2(BEATS, off + BEATS + LAT) + 1 ||
          t_done1 != max2(off + BEATS, BEATS + LAT) + 1) begin
        failures++;
        $display("FAIL round %0d latency %0d %0d (start offset %0d)", r, t_done0, t_done1, off);
      end
      checks++;
      if (beats0 != BEATS || wire0 != a) begin
        failures++;
        $display("FAIL round %0d wire carried %h in %0d beats", r, wire0, beats0);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
