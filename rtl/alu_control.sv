// alu_control: ALU control of the execute unit.
//
// Turns the 3-bit ALUOp from the main control into the operation the ALU
// performs. For R-type instructions (ALUOp = 000) the function field gives
// the operation directly; otherwise ALUOp fixes it: add (addi, lw, sw),
// subtract (beq), and (andi), or (ori). Combinational. The split of decoding
// between the main control and an ALU control driven by ALUOp and the
// function field is the reference datapath's; the codes are this design's.
module alu_control
  import mips16_pkg::*;
(
  input  aluop_e     alu_op,
  input  logic [2:0] func,
  output alu_ctrl_e  alu_ctrl
);
  always_comb begin
    case (alu_op)
      ALUOP_RTYPE: alu_ctrl = alu_ctrl_e'(func);
      ALUOP_ADD:   alu_ctrl = ALU_ADD;
      ALUOP_SUB:   alu_ctrl = ALU_SUB;
      ALUOP_AND:   alu_ctrl = ALU_AND;
      ALUOP_OR:    alu_ctrl = ALU_OR;
      default:     alu_ctrl = ALU_ADD;
    endcase
  end
endmodule
