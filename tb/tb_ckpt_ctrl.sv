// tb_ckpt_ctrl: self-checking testbench for ckpt_ctrl.
//
// A processor model offers one instruction per cycle, now and then an
// irreversible I/O operation; an exchange model answers each comparison
// request after EXLAT cycles with a planned match or mismatch; a log model
// raises log_full at chosen times and answers a replay after RLAT cycles.
// The test checks, cycle by cycle:
//  - a comparison starts exactly when CKPT_INTERVAL instructions have
//    retired, or at once when an I/O operation or a full log is waiting;
//  - nothing retires while a comparison is pending;
//  - after a match the checkpoint is taken EXLAT+1 cycles after the
//    request (EXLAT+2 with an I/O operation, which is released in between
//    and retires in that cycle);
//  - after a mismatch, error_detected, then rollback the next cycle, then
//    restart with the replay's end, and the fingerprint is cleared;
//  - each mechanism (interval end, I/O release, log-full end, rollback)
//    happened at least once.
module tb_ckpt_ctrl;
  import fp_pkg::*;

  localparam int unsigned INTERVAL = 20;
  localparam int unsigned EXLAT    = 4;
  localparam int unsigned RLAT     = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ret_fire, io_head, ret_allow, io_allow;
  logic log_full, log_clear, rollback, replay_done;
  logic fp_clear, exch_start, exch_done, exch_match;
  logic ckpt_take, restart, error_detected;
  ck_state_e state;
  int checks = 0, failures = 0;

  ckpt_ctrl #(.CKPT_INTERVAL(INTERVAL)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor model
  logic p_valid, p_io;
  assign io_head  = p_valid && p_io;
  assign ret_fire = p_valid && (p_io ? io_allow : ret_allow);

  // exchange and log models
  int   ex_timer, rb_timer;
  logic plan_match;
  logic full_req;
  assign exch_done   = (ex_timer == 1);
  assign exch_match  = plan_match;
  assign replay_done = (rb_timer == 1);
  assign log_full    = full_req;

  task automatic expect_true(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  // bookkeeping
  int since_ckpt;       // instructions retired since the fingerprint was cleared
  int cyc, t_start, t_done;
  logic via_io, mism, pending, waiting_rb;
  int n_interval, n_io, n_full, n_rollback, n_commit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_timer <= 0; rb_timer <= 0;
    end else begin
      if (exch_start)       ex_timer <= EXLAT;
      else if (ex_timer > 0) ex_timer <= ex_timer - 1;
      if (rollback)         rb_timer <= RLAT;
      else if (rb_timer > 0) rb_timer <= rb_timer - 1;
    end
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    expect_true(!(ret_fire && !io_allow && since_ckpt >= INTERVAL), "interval overran");
    if (ret_fire) since_ckpt = since_ckpt + 1;
    if (fp_clear) since_ckpt = ret_fire ? 1 : 0;
    if (exch_start) begin
      expect_true(!pending, "comparison started while one is pending");
      if (!io_head && !log_full) begin
        expect_true(since_ckpt == INTERVAL,
                    $sformatf("interval ended after %0d instructions", since_ckpt));
        n_interval++;
      end
      if (!io_head && log_full) n_full++;
      pending = 1; via_io = io_head; mism = !plan_match; t_start = cyc;
    end else if (state == CK_RUN && !pending && !waiting_rb) begin
      expect_true(!io_head, "I/O operation waiting without a comparison");
    end
    if (pending) expect_true(!(ret_fire && !io_allow) || cyc == t_start,
                             "instruction retired during a comparison");
    if (exch_done) begin
      expect_true(cyc == t_start + EXLAT, "exchange model timing");
      expect_true(error_detected == mism, "error_detected wrong");
      t_done = cyc;
    end
    if (io_allow) begin
      expect_true(pending && via_io && !mism && cyc == t_start + EXLAT + 1,
                  "I/O released at the wrong time");
      expect_true(ret_fire, "released I/O operation did not retire");
      expect_true(fp_clear, "fingerprint not restarted at the I/O release");
      n_io++;
    end
    if (ckpt_take) begin
      expect_true(log_clear, "log not cleared with the checkpoint");
      if (cyc > 1) begin
        expect_true(pending && !mism &&
                    cyc == t_start + EXLAT + 1 + (via_io ? 1 : 0),
                    "checkpoint taken at the wrong time");
        expect_true(fp_clear == !via_io, "fingerprint clear at commit");
        pending = 0;
        n_commit++;
      end
    end
    if (rollback) begin
      expect_true(pending && mism && cyc == t_start + EXLAT + 1, "rollback at the wrong time");
      pending = 0; waiting_rb = 1;
      n_rollback++;
    end
    if (restart) begin
      expect_true(waiting_rb && replay_done && fp_clear, "restart without finished replay");
      waiting_rb = 0;
    end
  end

  initial begin
    p_valid = 0; p_io = 0; plan_match = 1; full_req = 0;
    since_ckpt = 0; cyc = 0; pending = 0; waiting_rb = 0; via_io = 0; mism = 0;
    t_start = 0; t_done = 0;
    n_interval = 0; n_io = 0; n_full = 0; n_rollback = 0; n_commit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // keep an offered instruction until it retires
      if (!p_valid || ret_fire_q) begin
        p_valid = ($urandom_range(0, 9) < 8);
        p_io    = p_valid && ($urandom_range(0, 99) < 2);
      end
      if (!pending) plan_match = ($urandom_range(0, 9) != 0);
      full_req = (state == CK_RUN) && ($urandom_range(0, 199) == 0);
    end
    expect_true(n_interval > 0, "no interval end");
    expect_true(n_io > 0, "no I/O release");
    expect_true(n_full > 0, "no log-full interval end");
    expect_true(n_rollback > 0, "no rollback");
    $display("interval ends %0d, I/O releases %0d, log-full ends %0d, rollbacks %0d, checkpoints %0d",
             n_interval, n_io, n_full, n_rollback, n_commit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ret_fire_q;
  always_ff @(posedge clk) ret_fire_q <= ret_fire;
endmodule
