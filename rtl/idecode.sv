// idecode: instruction decode / operand fetch unit.
//
// Splits the instruction into its fields, reads RF[rs] and RF[rt], extends
// the 7-bit immediate to 16 bits (sign extension when ExtOp = 1, zero
// extension when ExtOp = 0) and chooses the register written back: rt when
// RegDst = 0, rd when RegDst = 1. The write itself (write data wd from the
// write-back unit) happens on the rising clock edge when RegWrite and the
// step enable en are both high. Everything else is combinational.
module idecode
  import mips16_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  word_t      instr,
  input  word_t      wd,
  input  logic       reg_write,
  input  logic       reg_dst,
  input  logic       ext_op,
  output word_t      rd1,
  output word_t      rd2,
  output word_t      ext_imm,
  output logic [2:0] func,
  output logic       sa
);
  reg_idx_t   wa;
  logic [6:0] imm;

  assign imm     = f_imm(instr);
  assign wa      = reg_dst ? f_rd(instr) : f_rt(instr);
  assign func    = f_funct(instr);
  assign sa      = f_sa(instr);

  ext_unit u_ext (
    .imm     (imm),
    .ext_op  (ext_op),
    .ext_imm (ext_imm)
  );

  reg_file #(.N_REGS(8), .W(XLEN)) u_rf (
    .clk (clk),
    .rst (rst),
    .we  (reg_write & en),
    .ra1 (f_rs(instr)),
    .ra2 (f_rt(instr)),
    .wa  (wa),
    .wd  (wd),
    .rd1 (rd1),
    .rd2 (rd2)
  );
endmodule
