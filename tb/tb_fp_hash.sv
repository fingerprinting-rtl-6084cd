// tb_fp_hash: self-checking testbench for fp_hash.
//
// Drives random retirement streams (random mix of register results, loads,
// stores, idle cycles and fingerprint clears) and compares the fingerprint
// every cycle with a reference CRC computed here byte by byte (the usual
// byte-wise formulation of a non-reflected CRC-16, poly 0x8005), which is
// independent of the bit-serial function in the design. A known-answer
// check pins the polynomial and seed: the word "12345678" hashed from the
// seed gives 0x972D (CRC-16/CMS family). Also checks that one update costs
// exactly one cycle, and that a completing result (cmp_valid) given in the
// same cycle as a retirement is hashed first, after any clear.
module tb_fp_hash;
  import fp_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    clear;
  logic    cmp_valid;
  word_t   cmp_result;
  retire_t upd;
  fp_t     fp;
  int      checks = 0, failures = 0;

  fp_hash dut (.clk, .rst_n, .clear, .cmp_valid, .cmp_result, .upd, .fp);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_bytes(input logic [15:0] c, input logic [63:0] w);
    for (int b = 7; b >= 0; b--) begin
      c = c ^ {w[b*8 +: 8], 8'h00};
      for (int k = 0; k < 8; k++) c = c[15] ? ((c << 1) ^ 16'h8005) : (c << 1);
    end
    return c;
  endfunction

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model;

  initial begin
    clear = 1'b0;
    cmp_valid = 1'b0;
    cmp_result = '0;
    upd   = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset seed", fp, 16'hFFFF);
    // known answer: "12345678" as one register result
    upd.valid = 1'b1; upd.wr_reg = 1'b1; upd.result = 64'h3132333435363738;
    @(negedge clk);
    check("known answer", fp, 16'h972D);
    upd = '0;
    @(negedge clk);
    check("hold when idle", fp, 16'h972D);
    model = 16'h972D;
    // random stream
    for (int i = 0; i < 3000; i++) begin
      clear        = ($urandom_range(0, 99) < 3);
      upd.valid    = ($urandom_range(0, 99) < 80);
      upd.is_io    = 1'b0;
      upd.wr_reg   = $urandom_range(0, 1);
      upd.is_mem   = $urandom_range(0, 1);
      upd.is_store = upd.is_mem && $urandom_range(0, 1);
      upd.result   = {$urandom, $urandom};
      upd.addr     = {$urandom, $urandom};
      upd.st_data  = {$urandom, $urandom};
      cmp_valid    = (i >= 1500) && ($urandom_range(0, 99) < 50);
      cmp_result   = {$urandom, $urandom};
      if (clear) model = 16'hFFFF;
      if (cmp_valid) model = ref_bytes(model, cmp_result);
      if (upd.valid) begin
        if (upd.wr_reg)   model = ref_bytes(model, upd.result);
        if (upd.is_mem)   model = ref_bytes(model, upd.addr);
        if (upd.is_store) model = ref_bytes(model, upd.st_data);
      end
      @(negedge clk);
      check("random stream", fp, model);
    end
    // a single flipped bit anywhere changes the fingerprint
    clear = 1'b0;
    cmp_valid = 1'b0;
    upd = '0; upd.valid = 1'b1; upd.is_mem = 1'b1; upd.is_store = 1'b1;
    upd.addr = 64'h1000; upd.st_data = 64'hDEAD_BEEF_0000_0001;
    model = ref_bytes(ref_bytes(fp, upd.addr), upd.st_data ^ 64'h10);
    @(negedge clk);
    checks++;
    if (fp == model) begin failures++; $display("FAIL bit flip undetected"); end
    upd = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
