// tb_fp_dmr_spec: end-to-end testbench of the DMR pair fingerprinting
// committed plus speculative state (fp_dmr_top with SPEC_FP = 1).
//
// As tb_fp_dmr_top, but each processor model also reports every result as
// it completes, including results of squashed wrong-path instructions,
// and the nodes hash those completions instead of the retiring results.
// The two processors run in cycle lockstep (identical stall patterns) over
// a symmetric network of LAT cycles, as this variant requires. Transient
// faults flip a result bit in one processor; half of them are aimed at an
// instruction that first executes while a comparison is in progress, whose
// result must count in the next interval. A third, unchecked model runs
// the program fault-free as the golden reference.
//
// Checked: every fault is detected by both nodes at the same comparison,
// before any checkpoint is taken after the faulty instruction retires,
// and rolled back; a faulty result is reported by exactly the comparison
// whose interval its completion fell in (the interval boundary being the
// cycle in which the comparison starts); every fingerprint sent equals a
// reference computed here from the completions and retirements observed
// with that boundary rule; no comparison fails without a fault; both processors
// end with the golden registers and memory; fingerprints agree at every
// comparison that ends in a checkpoint; the two nodes stay in the same
// controller state every cycle. Counted, and required at least once:
// completions hashed, wrong-path completions, completions that arrive
// while a comparison is in progress (hashed into the next interval),
// interval ends, I/O releases, log-full ends, detections, line and
// register restores.
module tb_fp_dmr_spec;
  import fp_pkg::*;

  localparam int unsigned INTERVAL    = 64;
  localparam int unsigned NREGS       = 64;
  localparam int unsigned LINE_W      = 512;
  localparam int unsigned LOG_DEPTH   = 16;
  localparam int unsigned LINK_W      = 8;
  localparam int unsigned MEM_LINES   = 24;
  localparam int unsigned IO_PERMILLE = 3;
  localparam int          N_INSTR     = 6000;
  localparam int          N_FAULTS    = 8;
  localparam int unsigned LAT         = 6;
  localparam int          MAX_CYCLES  = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  retire_t [1:0] ret;
  logic [1:0] st_first_wr, ret_ready, arf_restore_valid, restart, mem_rst_valid;
  logic [1:0][LINE_W-1:0] st_old_line, mem_rst_data;
  logic [1:0][NREGS-1:0][DATA_W-1:0] arf, arf_restore;
  laddr_t [1:0] mem_rst_addr;
  logic [1:0] tx_valid, rx_valid;
  logic [1:0][LINK_W-1:0] tx_data, rx_data;
  fp_t [1:0] fp;
  ck_state_e [1:0] state;
  logic [1:0] ckpt_taken, error_detected;
  int icount [2], n_inj [2];
  logic [MEM_LINES-1:0][LINE_W-1:0] mem [2];
  logic [1:0] inject;
  int inject_at [2];
  int checks = 0, failures = 0;
  logic [1:0] cmp_valid;
  word_t [1:0] cmp_result;
  int n_wp [2];

  fp_dmr_top #(.CKPT_INTERVAL(INTERVAL), .NREGS(NREGS), .LINE_W(LINE_W),
               .LOG_DEPTH(LOG_DEPTH), .LINK_W(LINK_W), .SPEC_FP(1'b1)) dut (.*);

  for (genvar n = 0; n < 2; n++) begin : g_cpu
    proc_model #(.NREGS(NREGS), .LINE_W(LINE_W), .MEM_LINES(MEM_LINES),
                 .IO_PERMILLE(IO_PERMILLE), .LOCKSTEP(1'b1), .WRONG_PATH(1'b1)) cpu (
      .clk, .rst_n, .run(icount[n] < N_INSTR),
      .inject(inject[n]), .inject_at(inject_at[n]),
      .ret(ret[n]), .st_first_wr(st_first_wr[n]), .st_old_line(st_old_line[n]),
      .ret_ready(ret_ready[n]), .arf(arf[n]),
      .arf_restore_valid(arf_restore_valid[n]), .arf_restore(arf_restore[n]),
      .restart(restart[n]), .mem_rst_valid(mem_rst_valid[n]),
      .mem_rst_addr(mem_rst_addr[n]), .mem_rst_data(mem_rst_data[n]),
      .ckpt_taken(ckpt_taken[n]), .icount(icount[n]), .mem(mem[n]),
      .n_injected(n_inj[n]), .cmp_valid(cmp_valid[n]), .cmp_result(cmp_result[n]),
      .n_wrong_path(n_wp[n]));
  end

  // golden reference: same program, no checking, no faults
  retire_t g_ret;
  logic g_fw;
  logic [LINE_W-1:0] g_old;
  logic [NREGS-1:0][DATA_W-1:0] g_arf;
  logic [MEM_LINES-1:0][LINE_W-1:0] g_mem;
  int g_icount, g_inj;
  proc_model #(.NREGS(NREGS), .LINE_W(LINE_W), .MEM_LINES(MEM_LINES),
               .IO_PERMILLE(IO_PERMILLE)) golden (
    .clk, .rst_n, .run(g_icount < N_INSTR), .inject(1'b0), .inject_at(0),
    .ret(g_ret), .st_first_wr(g_fw), .st_old_line(g_old), .ret_ready(1'b1),
    .arf(g_arf), .arf_restore_valid(1'b0), .arf_restore('0), .restart(1'b0),
    .mem_rst_valid(1'b0), .mem_rst_addr('0), .mem_rst_data('0),
    .ckpt_taken(1'b0), .icount(g_icount), .mem(g_mem), .n_injected(g_inj),
    .cmp_valid(), .cmp_result(), .n_wrong_path());

  // network model: crossed links with LAT cycles of latency
  logic [LAT-1:0][1:0] nv;
  logic [LAT-1:0][1:0][LINK_W-1:0] nd;
  always_ff @(posedge clk) begin
    if (!rst_n) nv <= '0;
    else        nv <= {nv[LAT-2:0], {tx_valid[0], tx_valid[1]}};
    nd <= {nd[LAT-2:0], {tx_data[0], tx_data[1]}};
  end
  assign rx_valid = nv[LAT-1];
  assign rx_data  = nd[LAT-1];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL t=%0t %s", $time, msg);
    end
  endtask

  // mechanism counters
  int n_interval, n_io, n_full, n_err [2], n_memrst, n_regrst, n_stall, n_ckpt [2];
  int since [2];
  logic [1:0] io_last;
  fp_t ckpt_fp [2][$];
  fp_t sent [2];
  bit  err_idx [int];   // comparisons of node 0 that ended in a detection
  int  beats [2];
  int  n_cmp, n_cmp_in_compare, n_state_diff, n_fault_in_compare;
  int  fault_ckpt [2];
  bit  fault_live [2];
  // interval assignment of a faulty completion: comparisons started so far,
  // the comparison expected to report the fault, and whether it completed
  // in the cycle that could turn out to be a comparison's trigger cycle
  int  n_started [2], exp_det [2];
  bit  cmp_armed [2], have_exp [2], pend_trig [2];
  ck_state_e prev_state [2];
  int  n_assigned;
  // reference fingerprint per node: acc holds every item up to the last
  // cycle, acc_prev every item before it; the last cycle's items are kept
  // until it is known whether that cycle started a comparison
  fp_t acc [2], acc_prev [2];
  bit  l_cmp [2];
  word_t l_res [2];
  retire_t l_upd [2];
  fp_t exp_q [2][$];

  function automatic fp_t fold(input fp_t b, input bit cv, input word_t cr, input retire_t u);
    if (cv) b = crc_word(b, cr);
    if (u.valid) b = crc_update(b, u);
    return b;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < 2; n++) begin
      if (tx_valid[n]) begin
        sent[n] = {sent[n][7:0], tx_data[n]};
        beats[n]++;
        if (beats[n] == 2) begin
          beats[n] = 0;
          ckpt_fp[n].push_back(sent[n]);
        end
      end
      if (ret[n].valid && !ret_ready[n]) n_stall++;
      if (prev_state[n] == CK_RUN && state[n] == CK_COMPARE) begin
        n_started[n]++;
        if (pend_trig[n]) exp_det[n]++;
        // the last cycle started this comparison: it closed the interval
        exp_q[n].push_back(acc_prev[n]);
        acc[n] = fold(CRC_SEED, l_cmp[n], l_res[n], l_upd[n]);
      end
      begin
        retire_t u;
        u = ret[n];
        u.valid  = ret[n].valid && ret_ready[n];
        u.wr_reg = ret[n].wr_reg && ret[n].is_io;
        acc_prev[n] = acc[n];
        acc[n]   = fold(restart[n] ? CRC_SEED : acc[n], cmp_valid[n], cmp_result[n], u);
        l_cmp[n] = cmp_valid[n];
        l_res[n] = cmp_result[n];
        l_upd[n] = u;
        if (restart[n]) acc_prev[n] = CRC_SEED;
      end
      pend_trig[n] = 1'b0;
      if (cmp_armed[n] && cmp_valid[n] && icount[n] == inject_at[n] && ret[n].valid &&
          ret[n].wr_reg && !ret[n].is_io && cmp_result[n] == ret[n].result) begin
        exp_det[n]   = n_started[n] + 1;
        pend_trig[n] = (state[n] == CK_RUN);
        have_exp[n]  = 1'b1;
        cmp_armed[n] = 1'b0;
      end
      if (error_detected[n] && have_exp[n]) begin
        expect_true(n_started[n] == exp_det[n],
                    $sformatf("node %0d: fault reported at comparison %0d, expected %0d",
                              n, n_started[n], exp_det[n]));
        have_exp[n] = 1'b0;
        n_assigned++;
      end
      if (error_detected[n]) cmp_armed[n] = 1'b0;
      prev_state[n] = state[n];
      // bounded detection: no checkpoint may be taken between the faulty
      // instruction's retirement and the detection of its error
      if (ret[n].valid && ret_ready[n] && inject[n] && icount[n] == inject_at[n] && !fault_live[n]) begin
        fault_ckpt[n] = n_ckpt[n];
        fault_live[n] = 1'b1;
      end
      if (error_detected[n] && fault_live[n]) begin
        expect_true(n_ckpt[n] == fault_ckpt[n],
                    $sformatf("node %0d took %0d checkpoints between a fault and its detection",
                              n, n_ckpt[n] - fault_ckpt[n]));
        fault_live[n] = 1'b0;
      end
      if (error_detected[n]) begin
        n_err[n]++;
        if (n == 0) err_idx[ckpt_fp[0].size() - 1] = 1'b1;
      end
      if (mem_rst_valid[n]) n_memrst++;
      if (arf_restore_valid[n]) n_regrst++;
      if (ckpt_taken[n]) n_ckpt[n]++;
    end
    if (cmp_valid[0]) n_cmp++;
    if (cmp_valid[0] && state[0] == CK_COMPARE) n_cmp_in_compare++;
    if (state[0] != state[1]) n_state_diff++;
    for (int n = 0; n < 2; n++)
      if (cmp_valid[n] && state[n] == CK_COMPARE && inject[n] && icount[n] == inject_at[n] &&
          cmp_result[n] == ret[n].result)
        n_fault_in_compare++;
    // classify interval ends seen by node 0 at its comparison request
    if (state[0] == CK_RUN && !ret_ready[0] && ret[0].valid) begin
      if (ret[0].is_io)                 n_io++;
      else if (since[0] >= INTERVAL)    n_interval++;
      else                              n_full++;
    end
    // instructions in the current interval; a released I/O operation is
    // the first instruction of the interval that its checkpoint starts
    for (int n = 0; n < 2; n++) begin
      if (ret[n].valid && ret_ready[n]) since[n]++;
      if (ret[n].valid && ret_ready[n] && ret[n].is_io) since[n] = 1;
      else if ((ckpt_taken[n] && !io_last[n]) || restart[n]) since[n] = 0;
      io_last[n] = ret[n].valid && ret_ready[n] && ret[n].is_io;
    end
  end

  initial begin
    n_interval = 0; n_io = 0; n_full = 0; n_err = '{0, 0}; n_memrst = 0; n_regrst = 0;
    fault_live = '{0, 0}; fault_ckpt = '{0, 0};
    acc = '{CRC_SEED, CRC_SEED}; acc_prev = '{CRC_SEED, CRC_SEED};
    l_cmp = '{0, 0}; l_res = '{0, 0}; l_upd = '{default: '0};
    n_started = '{0, 0}; exp_det = '{0, 0}; cmp_armed = '{0, 0}; have_exp = '{0, 0};
    pend_trig = '{0, 0}; prev_state = '{CK_COMMIT, CK_COMMIT}; n_assigned = 0;
    n_cmp = 0; n_cmp_in_compare = 0; n_state_diff = 0; n_fault_in_compare = 0;
    n_stall = 0; n_ckpt = '{0, 0}; since = '{0, 0}; io_last = '0; sent = '{0, 0}; beats = '{0, 0};
    inject = '0; inject_at = '{0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // inject N_FAULTS transients, alternating between the processors, each
    // only after the previous one has been detected
    for (int f = 0; f < N_FAULTS; f++) begin
      int n, at, errs_before;
      n  = f % 2;
      errs_before = n_err[0];
      if (f % 4 < 2) begin
        at = icount[n] + 5 + $urandom_range(0, INTERVAL);
        @(negedge clk);
      end else begin
        // target the instruction that will first execute while the
        // comparison that ends the interval before it is in progress
        do @(negedge clk);
        while (!(!ret[n].valid && (state[n] == CK_COMPARE ||
                                   (state[n] == CK_RUN && since[n] >= INTERVAL))) &&
               icount[n] < N_INSTR);
        at = icount[n];
      end
      if (at > N_INSTR - 2 * int'(INTERVAL)) break;
      inject_at[n] = at;
      inject[n] = 1'b1;
      cmp_armed[n] = 1'b1;
      // a fresh injection arms the model again
      wait (n_inj[n] == (f / 2) + 1);
      wait (n_err[0] == errs_before + 1 && n_err[1] == errs_before + 1);
      @(negedge clk);
      inject[n] = 1'b0;
      repeat (2) @(posedge clk);
      expect_true(n_err[1] == n_err[0], "nodes disagree on a detection");
    end
    wait (icount[0] == N_INSTR && icount[1] == N_INSTR && g_icount == N_INSTR);
    repeat (LAT + 20) @(posedge clk);
    expect_true(icount[0] == N_INSTR && icount[1] == N_INSTR, "processors did not finish");
    expect_true(arf[0] == g_arf, "processor 0 registers differ from the golden run");
    expect_true(arf[1] == g_arf, "processor 1 registers differ from the golden run");
    expect_true(mem[0] == g_mem, "processor 0 memory differs from the golden run");
    expect_true(mem[1] == g_mem, "processor 1 memory differs from the golden run");
    expect_true(n_err[0] == n_inj[0] + n_inj[1], $sformatf("%0d errors detected for %0d faults",
                n_err[0], n_inj[0] + n_inj[1]));
    expect_true(n_ckpt[0] == n_ckpt[1], "nodes took different numbers of checkpoints");
    expect_true(ckpt_fp[0].size() == ckpt_fp[1].size(), "different numbers of comparisons");
    // the two nodes' fingerprints agree exactly at the comparisons that
    // did not detect an error
    for (int i = 0; i < ckpt_fp[0].size() && i < ckpt_fp[1].size(); i++)
      expect_true((ckpt_fp[0][i] == ckpt_fp[1][i]) == !err_idx.exists(i),
                  $sformatf("comparison %0d: fingerprints %h / %h", i, ckpt_fp[0][i], ckpt_fp[1][i]));
    // every fingerprint sent equals the reference built from the
    // completions and retirements seen, with the boundaries above
    for (int n = 0; n < 2; n++) begin
      expect_true(exp_q[n].size() == ckpt_fp[n].size(),
                  $sformatf("node %0d: %0d comparisons started, %0d fingerprints sent",
                            n, exp_q[n].size(), ckpt_fp[n].size()));
      for (int i = 0; i < exp_q[n].size() && i < ckpt_fp[n].size(); i++)
        expect_true(exp_q[n][i] == ckpt_fp[n][i],
                    $sformatf("node %0d comparison %0d: sent %h, reference %h",
                              n, i, ckpt_fp[n][i], exp_q[n][i]));
    end
    $display("comparisons %0d, checkpoints %0d, interval ends %0d, I/O releases %0d, log-full ends %0d,",
             ckpt_fp[0].size(), n_ckpt[0], n_interval, n_io, n_full);
    $display("faults %0d, errors detected %0d/%0d, line restores %0d, register restores %0d, stall cycles %0d",
             n_inj[0] + n_inj[1], n_err[0], n_err[1], n_memrst, n_regrst, n_stall);
    expect_true(n_interval > 0, "no interval end happened");
    expect_true(n_io > 0, "no I/O release happened");
    expect_true(n_full > 0, "no log-full interval end happened");
    expect_true(n_err[0] > 0, "no error detected");
    expect_true(n_memrst > 0, "no memory line restored");
    expect_true(n_regrst > 0, "no register restore");
    expect_true(n_stall > 0, "no retirement stall");
    $display("completions hashed %0d, wrong-path %0d, during a comparison %0d (%0d of them faulty)",
             n_cmp, n_wp[0], n_cmp_in_compare, n_fault_in_compare);
    expect_true(n_state_diff == 0, $sformatf("nodes left lockstep in %0d cycles", n_state_diff));
    expect_true(n_wp[0] > 0 && n_wp[0] == n_wp[1], "wrong-path completions missing or unequal");
    expect_true(n_cmp_in_compare > 0, "no completion during a comparison");
    expect_true(n_fault_in_compare > 0, "no faulty result completed during a comparison");
    expect_true(n_assigned > 0, "no fault's reporting comparison was checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
