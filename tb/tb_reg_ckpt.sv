// tb_reg_ckpt: self-checking testbench for reg_ckpt.
//
// Presents a changing random register file, takes checkpoints and requests
// restores at random times, and checks that every restore shows, one cycle
// later, exactly the register file of the latest checkpoint (a copy kept
// here), including repeated restores to the same checkpoint.
module tb_reg_ckpt;
  import fp_pkg::*;

  localparam int unsigned NREGS = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic take, restore, restore_valid;
  logic [NREGS-1:0][DATA_W-1:0] arf, arf_restore, expect_q;
  int checks = 0, failures = 0;

  reg_ckpt #(.NREGS(NREGS)) dut (.clk, .rst_n, .take, .arf, .restore,
                                 .restore_valid, .arf_restore);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    take = 1'b0; restore = 1'b0; arf = '0; expect_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int r = 0; r < NREGS; r++)
        if ($urandom_range(0, 7) == 0) arf[r] = {$urandom, $urandom};
      take    = ($urandom_range(0, 9) == 0);
      restore = !take && ($urandom_range(0, 9) == 0);
      @(posedge clk);
      if (take) expect_q = arf;
      #1;
      checks++;
      if (restore_valid !== restore) begin
        failures++;
        $display("FAIL cycle %0d restore_valid %b expected %b", i, restore_valid, restore);
      end
      if (restore) begin
        checks++;
        if (arf_restore !== expect_q) begin
          failures++;
          for (int r = 0; r < NREGS; r++)
            if (arf_restore[r] !== expect_q[r])
              $display("FAIL cycle %0d reg %0d restored %h expected %h", i, r,
                       arf_restore[r], expect_q[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
