// pc_control: branch decision and jump address.
//
// PCSrc = Branch AND Zero: a beq is taken when the ALU's subtraction of its
// two registers gives zero. The jump address keeps the top three bits of
// PC + 1 and takes the low 13 bits from the J-type target field; this is the
// word-addressed 16-bit form of the 32-bit rule PC+4[31:28] || target || 00.
// Combinational.
module pc_control
  import mips16_pkg::*;
(
  input  logic        branch,
  input  logic        zero,
  input  word_t       pc_plus1,
  input  logic [12:0] target,
  output logic        pcsrc,
  output word_t       jump_addr
);
  assign pcsrc     = branch & zero;
  assign jump_addr = {pc_plus1[15:13], target};
endmodule
