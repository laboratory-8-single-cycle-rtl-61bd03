// ext_unit: immediate extension unit.
//
// Extends the 7-bit immediate of an I-type instruction to 16 bits: sign
// extension (copies of bit 6) when ExtOp = 1, zero extension when ExtOp = 0.
// Combinational.
module ext_unit
  import mips16_pkg::*;
(
  input  logic [6:0] imm,
  input  logic       ext_op,
  output word_t      ext_imm
);
  assign ext_imm = {{(XLEN-7){ext_op & imm[6]}}, imm};
endmodule
