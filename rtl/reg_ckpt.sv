// reg_ckpt: checkpoint copy of the architectural register file.
//
// When a checkpoint is taken (`take`, one cycle) the whole architectural
// register file, presented flat on `arf`, is copied into a shadow array in
// that clock edge. On a rollback (`restore`, one cycle) the shadow copy is
// driven back on `arf_restore` with `restore_valid` high in the following
// cycle, for the processor to load into its register file. The copy stays
// valid until the next `take`, so several rollbacks to the same checkpoint
// restore the same values.
//
// Copying the register file at checkpoint creation follows the design. The
// register count (32 integer + 32 floating-point registers of a 64-bit
// RISC ISA, program counter and other control state to be included by the
// processor among them), the flat port and the one-cycle copy and restore
// are this implementation's choices. Reset clears the copy to zero, the
// register state the processor is assumed to reset to.
module reg_ckpt
  import fp_pkg::*;
#(
  parameter int unsigned NREGS = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   take,
  input  logic [NREGS-1:0][DATA_W-1:0] arf,
  input  logic                   restore,
  output logic                   restore_valid,
  output logic [NREGS-1:0][DATA_W-1:0] arf_restore
);

  logic [NREGS-1:0][DATA_W-1:0] shadow;

  assign arf_restore = shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow        <= '0;
      restore_valid <= 1'b0;
    end else begin
      restore_valid <= restore;
      if (take) shadow <= arf;
    end
  end

  a_not_both: assert property (@(posedge clk) disable iff (!rst_n) !(take && restore))
    else $error("reg_ckpt: take and restore in the same cycle");

endmodule
