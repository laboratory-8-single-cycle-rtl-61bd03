// ex_unit: execute unit.
//
// Wires together the ALU control, the ALUSrc multiplexer, the ALU and the
// branch-target adder. The ALU control turns ALUOp (and, for R-type instructions, the function
// field) into one of eight ALU operations. Operand A is RD1; operand B is RD2
// or Ext_Imm as ALUSrc selects. Shifts move RD2 (register rt) left, right
// logically or right arithmetically by the 1-bit sa field. The zero flag is
// set when the result is 0 (beq subtracts, so zero means RF[rs] == RF[rt]).
// The branch target is PC + 1 + Ext_Imm: the PC counts 16-bit words, so the
// offset is not shifted. All combinational.
module ex_unit
  import mips16_pkg::*;
(
  input  word_t      pc_plus1,
  input  word_t      rd1,
  input  word_t      rd2,
  input  word_t      ext_imm,
  input  logic [2:0] func,
  input  logic       sa,
  input  logic       alu_src,
  input  aluop_e     alu_op,
  output word_t      alu_res,
  output logic       zero,
  output word_t      branch_addr
);
  alu_ctrl_e alu_ctrl;
  word_t     b;

  alu_control u_aluc (
    .alu_op   (alu_op),
    .func     (func),
    .alu_ctrl (alu_ctrl)
  );

  assign b = alu_src ? ext_imm : rd2;

  alu u_alu (
    .alu_ctrl (alu_ctrl),
    .a        (rd1),
    .b        (b),
    .rt_val   (rd2),
    .sa       (sa),
    .res      (alu_res),
    .zero     (zero)
  );

  assign branch_addr = pc_plus1 + ext_imm;
endmodule
