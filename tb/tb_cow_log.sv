// tb_cow_log: self-checking testbench for cow_log.
//
// Logs random (address, old line) pairs, sometimes up to a full log, and
// either clears the log (checkpoint taken) or replays it (rollback). A
// queue kept here models the log. A replay must present the entries newest
// first, one per cycle starting two cycles after the request, with
// replay_done on the last one (in the cycle right after the request for an
// empty log), and leave the log empty. `full` must rise at exactly DEPTH entries.
module tb_cow_log;
  import fp_pkg::*;

  localparam int unsigned LINE_W = 512;
  localparam int unsigned DEPTH  = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr, clear, full, replay, rst_valid, replay_done;
  laddr_t wr_addr, rst_addr;
  logic [LINE_W-1:0] wr_data, rst_data;
  int checks = 0, failures = 0;

  typedef struct { laddr_t a; logic [LINE_W-1:0] d; } entry_t;
  entry_t model[$];

  cow_log #(.LINE_W(LINE_W), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr, .wr_addr, .wr_data, .clear, .full,
    .replay, .rst_valid, .rst_addr, .rst_data, .replay_done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  initial begin
    wr = 0; clear = 0; replay = 0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 200; round++) begin
      int n;
      n = $urandom_range(0, DEPTH + 2);
      // fill with n entries (stopping at full)
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        checks++;
        if (full !== (model.size() == DEPTH)) fail($sformatf("full=%b with %0d entries", full, model.size()));
        if (full) break;
        wr = 1'b1;
        wr_addr = laddr_t'({$urandom, $urandom});
        for (int w = 0; w < LINE_W / 32; w++) wr_data[w*32 +: 32] = $urandom;
        model.push_back('{wr_addr, wr_data});
        @(posedge clk);
        #1 wr = 1'b0;
      end
      @(negedge clk);
      checks++;
      if (full !== (model.size() == DEPTH)) fail($sformatf("full=%b with %0d entries", full, model.size()));
      if ($urandom_range(0, 1) == 0) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        model.delete();
      end else begin
        int cyc, got;
        replay = 1'b1;
        @(posedge clk);
        #1 replay = 1'b0;
        got = 0;
        for (cyc = 0; cyc < DEPTH + 5; cyc++) begin
          if (cyc > 0) @(posedge clk);
          #1;
          if (rst_valid) begin
            entry_t e;
            checks++;
            if (model.size() == 0) fail("restore beyond the logged entries");
            else begin
              e = model.pop_back();
              if (rst_addr !== e.a || rst_data !== e.d)
                fail($sformatf("restore %0d: addr %h expected %h", got, rst_addr, e.a));
              if (cyc != got + 1) fail($sformatf("restore %0d came in cycle %0d", got, cyc));
            end
            got++;
          end
          if (replay_done) begin
            checks++;
            if (model.size() != 0) fail($sformatf("replay_done with %0d entries left", model.size()));
            if (got == 0 && cyc != 0) fail("empty replay not done in the cycle after the request");
            if (got > 0 && !rst_valid) fail("replay_done not on the last entry");
            break;
          end
        end
        checks++;
        if (cyc >= DEPTH + 5) fail($sformatf("replay never finished (%0d restored)", got));
        model.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
