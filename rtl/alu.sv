// alu: the 16-bit arithmetic-logic unit.
//
// Performs the operation chosen by the ALU control on operands a (RD1) and
// b (RD2 or the immediate): add, subtract, and, or, xor, and the three
// shifts, which move the register operand rt (input rt_val) left, right
// logically or right arithmetically by the 1-bit shift amount sa, as MIPS
// shifts do. zero is 1 when the result is 0. Combinational.
module alu
  import mips16_pkg::*;
(
  input  alu_ctrl_e alu_ctrl,
  input  word_t     a,
  input  word_t     b,
  input  word_t     rt_val,
  input  logic      sa,
  output word_t     res,
  output logic      zero
);
  always_comb begin
    case (alu_ctrl)
      ALU_ADD: res = a + b;
      ALU_SUB: res = a - b;
      ALU_SLL: res = rt_val << sa;
      ALU_SRL: res = rt_val >> sa;
      ALU_AND: res = a & b;
      ALU_OR:  res = a | b;
      ALU_XOR: res = a ^ b;
      ALU_SRA: res = word_t'($signed(rt_val) >>> sa);
      default: res = '0;
    endcase
  end

  assign zero = (res == '0);
endmodule
