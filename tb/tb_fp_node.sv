// tb_fp_node: self-checking testbench for fp_node.
//
// One node is driven by a processor model (proc_model); the testbench
// plays the mirrored node on the link. It computes here, byte by byte, the
// CRC-16 of the updates it sees retiring, and checks that every
// fingerprint the node sends equals it. It answers with that same value or,
// one time in four, a corrupted one, after LAT cycles. After a match the
// node must take a checkpoint, and the testbench saves the processor's
// registers, memory and instruction count at that moment; after a
// mismatch the node must roll back, and once it restarts the processor's
// registers, memory and instruction count must equal the saved ones.
// Interval ends, I/O releases, log-full ends and rollbacks are counted and
// must each happen.
module tb_fp_node;
  import fp_pkg::*;

  localparam int unsigned INTERVAL  = 40;
  localparam int unsigned NREGS     = 64;
  localparam int unsigned LINE_W    = 512;
  localparam int unsigned LOG_DEPTH = 12;
  localparam int unsigned LINK_W    = 8;
  localparam int unsigned MEM_LINES = 16;
  localparam int unsigned LAT       = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  retire_t ret;
  logic st_first_wr, ret_ready, arf_restore_valid, restart, mem_rst_valid;
  logic [LINE_W-1:0] st_old_line, mem_rst_data;
  logic [NREGS-1:0][DATA_W-1:0] arf, arf_restore;
  laddr_t mem_rst_addr;
  logic tx_valid, rx_valid;
  logic [LINK_W-1:0] tx_data, rx_data;
  fp_t fp;
  ck_state_e state;
  logic ckpt_taken, error_detected;
  int icount, n_injected;
  logic [MEM_LINES-1:0][LINE_W-1:0] mem;
  int checks = 0, failures = 0;
  logic  cmp_valid = 1'b0;   // committed-state fingerprint: unused
  word_t cmp_result = '0;

  fp_node #(.CKPT_INTERVAL(INTERVAL), .NREGS(NREGS), .LINE_W(LINE_W),
            .LOG_DEPTH(LOG_DEPTH), .LINK_W(LINK_W)) dut (.*);

  proc_model #(.NREGS(NREGS), .LINE_W(LINE_W), .MEM_LINES(MEM_LINES),
               .IO_PERMILLE(4)) cpu (
    .clk, .rst_n, .run(1'b1), .inject(1'b0), .inject_at(0),
    .ret, .st_first_wr, .st_old_line, .ret_ready, .arf,
    .arf_restore_valid, .arf_restore, .restart,
    .mem_rst_valid, .mem_rst_addr, .mem_rst_data,
    .ckpt_taken, .icount, .mem, .n_injected,
    .cmp_valid(), .cmp_result(), .n_wrong_path());

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_word(input logic [15:0] c, input logic [63:0] w);
    for (int b = 7; b >= 0; b--) begin
      c = c ^ {w[b*8 +: 8], 8'h00};
      for (int k = 0; k < 8; k++) c = c[15] ? ((c << 1) ^ 16'h8005) : (c << 1);
    end
    return c;
  endfunction

  task automatic expect_true(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  // reference fingerprint and mirror
  logic [15:0] ref_fp, exp_fp, sent_fp, reply_fp;
  int   tx_beats, reply_at, cyc;
  logic reply_pending, corrupt, waiting_rb;
  int   retired_since;
  // saved checkpoint
  logic [NREGS-1:0][DATA_W-1:0] saved_arf;
  logic [MEM_LINES-1:0][LINE_W-1:0] saved_mem;
  int   saved_icount;
  int   n_interval, n_io, n_full, n_rollback, n_match;

  assign rx_valid = reply_pending && (cyc >= reply_at) && (cyc < reply_at + 2);
  assign rx_data  = (cyc == reply_at) ? reply_fp[15:8] : reply_fp[7:0];

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0; ref_fp = 16'hFFFF; tx_beats = 0; reply_pending = 0; waiting_rb = 0;
      retired_since = 0; saved_arf = '0; saved_mem = mem; saved_icount = 0;
      n_interval = 0; n_io = 0; n_full = 0; n_rollback = 0; n_match = 0;
      corrupt = 0; sent_fp = '0; exp_fp = '0; reply_fp = '0; reply_at = 0;
    end else begin
      cyc++;
      if (reply_pending && cyc == reply_at + 2) reply_pending = 0;
      // what the node sends
      // the comparison closes the interval: the fingerprint to be sent is
      // the hash so far and the next interval's hash starts over (nothing
      // retires between the request and the first beat)
      if (tx_valid && tx_beats == 0) begin
        exp_fp = ref_fp;
        ref_fp = 16'hFFFF;
      end
      if (tx_valid) begin
        sent_fp = {sent_fp[7:0], tx_data};
        tx_beats++;
        if (tx_beats == 2) begin
          tx_beats = 0;
          expect_true(sent_fp == exp_fp,
                      $sformatf("sent fingerprint %h, expected %h", sent_fp, exp_fp));
          corrupt  = ($urandom_range(0, 3) == 0);
          reply_fp = corrupt ? (exp_fp ^ 16'h0100) : exp_fp;
          reply_at = cyc + LAT;
          reply_pending = 1;
        end
      end
      // interval classification at the comparison request
      if (state == CK_RUN && ret.valid && ret.is_io && !ret_ready) n_io++;
      else if (state == CK_RUN && !ret_ready && retired_since < INTERVAL) n_full++;
      else if (state == CK_RUN && !ret_ready && retired_since == INTERVAL) n_interval++;
      // reference hash of what retires
      if (ret.valid && ret_ready) begin
        if (ret.wr_reg)   ref_fp = ref_word(ref_fp, ret.result);
        if (ret.is_mem)   ref_fp = ref_word(ref_fp, ret.addr);
        if (ret.is_store) ref_fp = ref_word(ref_fp, ret.st_data);
        retired_since++;
      end
      if (ckpt_taken) begin
        if (cyc > 2) begin
          expect_true(!corrupt, "checkpoint taken after a mismatch");
          n_match++;
        end
        saved_arf = arf; saved_mem = mem; saved_icount = icount;
        retired_since = 0;
      end
      if (error_detected) begin
        expect_true(corrupt, "error detected after a match");
        waiting_rb = 1;
        n_rollback++;
      end
      if (restart) begin
        expect_true(waiting_rb, "restart without an error");
        waiting_rb = 0;
        retired_since = 0;
      end
    end
  end

  // one cycle after a restart the processor state must be the checkpoint's
  logic restart_q;
  always @(posedge clk) begin
    restart_q <= rst_n && restart;
    if (rst_n && restart_q) begin
      expect_true(arf == saved_arf, "registers not restored");
      expect_true(mem == saved_mem, "memory not restored");
      expect_true(icount == saved_icount, "instruction count not restored");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_rollback >= 10 && n_io >= 5 && n_full >= 5 && n_interval >= 10 && n_match >= 60);
    repeat (100) @(posedge clk);
    $display("interval ends %0d, I/O releases %0d, log-full ends %0d, checkpoints %0d, rollbacks %0d",
             n_interval, n_io, n_full, n_match, n_rollback);
    expect_true(n_interval > 0 && n_io > 0 && n_full > 0 && n_rollback > 0,
                "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
