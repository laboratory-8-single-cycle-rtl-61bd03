// wb_unit: write-back multiplexer.
//
// Chooses the value written into the register file: ALURes when MemtoReg = 0
// (arithmetic and logic instructions), MemData when MemtoReg = 1 (lw).
// Combinational.
module wb_unit
  import mips16_pkg::*;
(
  input  logic  mem_to_reg,
  input  word_t alu_res,
  input  word_t mem_data,
  output word_t wd
);
  assign wd = mem_to_reg ? mem_data : alu_res;
endmodule
