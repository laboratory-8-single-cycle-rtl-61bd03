// main_control: main control unit of the single-cycle processor.
//
// Purely combinational decode of the 3-bit opcode into the eight 1-bit
// control signals (RegDst, ExtOp, ALUSrc, Branch, Jump, MemWrite, MemtoReg,
// RegWrite) and the 3-bit ALUOp. The signal set follows the reference
// datapath; the opcode assignment (R-type, addi, lw, sw, beq, andi, ori, j)
// and the ALUOp coding are this design's own.
module main_control
  import mips16_pkg::*;
(
  input  logic [2:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{default: '0, alu_op: ALUOP_RTYPE};
    case (opcode_e'(opcode))
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_RTYPE;
      end
      OP_ADDI: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_ADD;
      end
      OP_LW: begin
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
        ctrl.alu_op     = ALUOP_ADD;
      end
      OP_SW: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
        ctrl.alu_op    = ALUOP_ADD;
      end
      OP_BEQ: begin
        ctrl.ext_op = 1'b1;
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_ANDI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_AND;
      end
      OP_ORI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_OR;
      end
      OP_J: begin
        ctrl.jump   = 1'b1;
        ctrl.alu_op = ALUOP_ADD;  // result unused
      end
      default: ;
    endcase
  end
endmodule
