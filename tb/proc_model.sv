// proc_model: behavioural model of one processor of the DMR pair, for
// testbenches only (not synthesizable, not part of the design).
//
// It executes a deterministic pseudo-random program: instruction i is
// chosen by a hash of i and is an ALU operation, a load or a store on a
// small memory of MEM_LINES cache lines, or an irreversible I/O read
// (randomly, IO_PERMILLE per thousand, and/or in scheduled bursts). It offers one instruction per cycle for
// retirement (valid/ready) with all its state updates, flags the first
// store to each line in a checkpoint interval and supplies that line's old
// contents, and follows the checkpoint protocol: it remembers its
// instruction count when a checkpoint is taken, loads the saved registers
// and the replayed memory lines on a rollback, and on `restart` resumes
// at the checkpointed instruction. A transient fault can be injected: the
// result (or store data) of instruction `inject_at` has one bit flipped,
// the first time it executes while `inject` is held high.
//
// For the speculative-state fingerprint it also reports results as they
// complete (cmp_valid/cmp_result): each instruction's result in the first
// cycle it is offered (not for I/O reads, which only execute when
// released), and, when WRONG_PATH is set, for one instruction in eight a
// further result of a wrong-path instruction that is squashed, while the
// instruction still waits. With LOCKSTEP set, stalls are a function of the
// cycle count, so two models started together stall identically, as
// processors in cycle lockstep do; otherwise they are random.
module proc_model
  import fp_pkg::*;
#(
  parameter int unsigned NREGS       = 64,
  parameter int unsigned LINE_W      = 512,
  parameter int unsigned MEM_LINES   = 8,
  parameter int unsigned IO_PERMILLE = 5,
  parameter int unsigned STALL_PCT   = 10,
  // Optional scheduled I/O: when IO_SPACING > 0, a burst of IO_BURST I/O
  // reads, IO_GAP instructions apart, starts every IO_SPACING instructions.
  parameter int unsigned IO_SPACING  = 0,
  parameter int unsigned IO_BURST    = 4,
  parameter int unsigned IO_GAP      = 1000,
  parameter bit          LOCKSTEP    = 1'b0,
  parameter bit          WRONG_PATH  = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         run,
  input  logic                         inject,
  input  int                           inject_at,
  output retire_t                      ret,
  output logic                         st_first_wr,
  output logic [LINE_W-1:0]            st_old_line,
  input  logic                         ret_ready,
  output logic                         cmp_valid,
  output word_t                        cmp_result,
  output int                           n_wrong_path,
  output logic [NREGS-1:0][DATA_W-1:0] arf,
  input  logic                         arf_restore_valid,
  input  logic [NREGS-1:0][DATA_W-1:0] arf_restore,
  input  logic                         restart,
  input  logic                         mem_rst_valid,
  input  laddr_t                       mem_rst_addr,
  input  logic [LINE_W-1:0]            mem_rst_data,
  input  logic                         ckpt_taken,
  output int                           icount,
  output logic [MEM_LINES-1:0][LINE_W-1:0] mem,
  output int                           n_injected
);
  localparam int unsigned WPL = LINE_W / DATA_W;

  int   ckpt_icount;
  logic [MEM_LINES-1:0] written;
  logic injected;
  logic offer;
  logic cmp_done, wp_done;
  int   cyc;

  function automatic logic [63:0] mix(input logic [63:0] x);
    x = x ^ (x >> 31);
    x = x * 64'h7FB5_D329_728E_A185;
    x = x ^ (x >> 27);
    x = x * 64'h81DA_DEF4_BC2D_D44D;
    return x ^ (x >> 33);
  endfunction

  function automatic logic scheduled_io(input int i);
    int unsigned r;
    if (IO_SPACING == 0 || i == 0) return 1'b0;
    r = i % IO_SPACING;
    return (r % IO_GAP == 0) && (r / IO_GAP < IO_BURST);
  endfunction

  logic [63:0] h;
  int unsigned op, rd, rs, ln, wd;

  always_comb begin
    h  = mix(64'(icount) + 64'h1234_5678);
    op = h[9:0] % 1000;
    rd = h[21:16] % NREGS;
    rs = h[29:24] % NREGS;
    ln = h[47:32] % MEM_LINES;
    wd = h[43:40] % WPL;
    ret = '0;
    ret.valid = offer && run;
    st_first_wr = 1'b0;
    st_old_line = mem[ln];
    if (op < IO_PERMILLE || scheduled_io(icount)) begin  // uncached I/O read
      ret.is_io  = 1'b1;
      ret.wr_reg = 1'b1;
      ret.result = h ^ 64'h10;
    end else if (op < 300) begin                // store
      ret.is_mem   = 1'b1;
      ret.is_store = 1'b1;
      ret.addr     = 64'(ln * (LINE_W / 8) + wd * 8);
      ret.st_data  = arf[rs] ^ h;
      st_first_wr  = !written[ln];
    end else if (op < 600) begin                // load
      ret.is_mem = 1'b1;
      ret.wr_reg = 1'b1;
      ret.addr   = 64'(ln * (LINE_W / 8) + wd * 8);
      ret.result = mem[ln][wd*DATA_W +: DATA_W];
    end else begin                              // ALU
      ret.wr_reg = 1'b1;
      ret.result = arf[rs] + h;
    end
    if (inject && !injected && icount == inject_at) begin
      if (ret.wr_reg) ret.result[h[50:45]]  = ~ret.result[h[50:45]];
      else            ret.st_data[h[50:45]] = ~ret.st_data[h[50:45]];
    end
    cmp_valid  = 1'b0;
    cmp_result = '0;
    if (ret.valid && ret.wr_reg && !ret.is_io && !cmp_done) begin
      cmp_valid  = 1'b1;
      cmp_result = ret.result;
    end else if (WRONG_PATH && ret.valid && h[62:60] == 3'd0 && !wp_done) begin
      cmp_valid  = 1'b1;
      cmp_result = mix(h ^ 64'h5EC0_0000_0000_0000);
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      icount      <= 0;
      ckpt_icount <= 0;
      written     <= '0;
      injected    <= 1'b0;
      n_injected  <= 0;
      offer       <= 1'b0;
      cmp_done    <= 1'b0;
      wp_done     <= 1'b0;
      cyc         <= 0;
      n_wrong_path <= 0;
      arf         <= '0;
      for (int l = 0; l < MEM_LINES; l++)
        for (int w = 0; w < WPL; w++) mem[l][w*DATA_W +: DATA_W] <= mix(64'(l * 16 + w));
    end else begin
      if (!inject) injected <= 1'b0;
      cyc <= cyc + 1;
      if (!ret.valid || ret_ready)
        offer <= LOCKSTEP ? (mix(64'(cyc) ^ 64'hC0FF_EE00) % 100 >= 64'(STALL_PCT))
                          : ($urandom_range(0, 99) >= STALL_PCT);
      if (cmp_valid && !(ret.wr_reg && !ret.is_io && !cmp_done)) begin
        wp_done      <= 1'b1;
        n_wrong_path <= n_wrong_path + 1;
      end
      if (cmp_valid && ret.wr_reg && !ret.is_io) cmp_done <= 1'b1;
      if (ret.valid && ret_ready) begin
        icount   <= icount + 1;
        cmp_done <= 1'b0;
        wp_done  <= 1'b0;
        if (ret.wr_reg) arf[rd] <= ret.result;
        if (ret.is_store) begin
          mem[ln][wd*DATA_W +: DATA_W] <= ret.st_data;
          written[ln] <= 1'b1;
        end
        if (inject && !injected && icount == inject_at) begin
          injected   <= 1'b1;
          n_injected <= n_injected + 1;
        end
      end
      if (ckpt_taken) begin
        ckpt_icount <= icount;
        written     <= '0;
      end
      if (arf_restore_valid) arf <= arf_restore;
      if (mem_rst_valid) mem[mem_rst_addr % MEM_LINES] <= mem_rst_data;
      if (restart) begin
        cmp_done <= 1'b0;
        wp_done  <= 1'b0;
        icount  <= ckpt_icount;
        written <= '0;
      end
    end
  end
endmodule
