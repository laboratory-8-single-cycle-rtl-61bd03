// mips16_ref_pkg: instruction-level reference model of the 16-bit MIPS, for
// testbenches.
//
// mips16_ref::exec() executes one instruction word on its own copy of the
// registers, data memory and PC, and returns the values the processor's
// datapath should show for it (RD1, RD2, Ext_Imm, ALURes, MemData, WD, PC+1,
// control signals). It decodes the instruction bits directly and shares no
// code with the RTL beyond the instruction encoding; it also counts how often
// each instruction and branch outcome occurred.
package mips16_ref_pkg;

  typedef struct {
    bit [15:0] instr, pc_plus1, rd1, rd2, ext_imm, alu_res, mem_data, wd;
    bit [7:0]  ctrl_bits;  // RegDst ExtOp ALUSrc Branch Jump MemWrite MemtoReg RegWrite
    bit [2:0]  alu_op;
    bit        taken;
  } expect_t;

  class mips16_ref;
    bit [15:0] regs [8];
    bit [15:0] mem [256];
    bit [15:0] pc;
    int        n_op [8];      // executed count per opcode
    int        n_fn [8];      // executed count per R-type function
    int        n_taken, n_not_taken;

    function new();
      reset();
      foreach (mem[i]) mem[i] = '0;
      foreach (n_op[i]) begin n_op[i] = 0; n_fn[i] = 0; end
      n_taken = 0; n_not_taken = 0;
    endfunction

    function void reset();
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function expect_t exec(bit [15:0] i);
      expect_t e;
      bit [2:0]  op = i[15:13], rs = i[12:10], rt = i[9:7], rd = i[6:4], fn = i[2:0];
      bit        sa = i[3];
      bit [15:0] a, b, sext, zext;
      e.instr    = i;
      e.pc_plus1 = pc + 1;
      a          = regs[rs];
      b          = regs[rt];
      e.rd1      = a;
      e.rd2      = b;
      sext       = {{9{i[6]}}, i[6:0]};
      zext       = {9'b0, i[6:0]};
      e.taken    = 0;
      n_op[op]++;
      case (op)
        3'd0: begin
          e.ext_imm = zext;  // ExtOp = 0 for R-type
          n_fn[fn]++;
          case (fn)
            3'd0: e.alu_res = a + b;
            3'd1: e.alu_res = a - b;
            3'd2: e.alu_res = b << sa;
            3'd3: e.alu_res = b >> sa;
            3'd4: e.alu_res = a & b;
            3'd5: e.alu_res = a | b;
            3'd6: e.alu_res = a ^ b;
            3'd7: e.alu_res = sa ? {b[15], b[15:1]} : b;
          endcase
          e.ctrl_bits = 8'b1000_0001; e.alu_op = 3'd0;
        end
        3'd1: begin e.ext_imm = sext; e.alu_res = a + sext; e.ctrl_bits = 8'b0110_0001; e.alu_op = 3'd1; end
        3'd2: begin e.ext_imm = sext; e.alu_res = a + sext; e.ctrl_bits = 8'b0110_0011; e.alu_op = 3'd1; end
        3'd3: begin e.ext_imm = sext; e.alu_res = a + sext; e.ctrl_bits = 8'b0110_0100; e.alu_op = 3'd1; end
        3'd4: begin e.ext_imm = sext; e.alu_res = a - b;    e.ctrl_bits = 8'b0101_0000; e.alu_op = 3'd2; end
        3'd5: begin e.ext_imm = zext; e.alu_res = a & zext; e.ctrl_bits = 8'b0010_0001; e.alu_op = 3'd3; end
        3'd6: begin e.ext_imm = zext; e.alu_res = a | zext; e.ctrl_bits = 8'b0010_0001; e.alu_op = 3'd4; end
        default: begin e.ext_imm = zext; e.alu_res = a + b; e.ctrl_bits = 8'b0000_1000; e.alu_op = 3'd1; end
      endcase
      e.mem_data = mem[e.alu_res[7:0]];
      e.wd       = (op == 3'd2) ? e.mem_data : e.alu_res;
      // state update
      if (op == 3'd3) mem[e.alu_res[7:0]] = b;
      if (e.ctrl_bits[0]) begin
        bit [2:0] wa = (op == 3'd0) ? rd : rt;
        if (wa != 0) regs[wa] = e.wd;
      end
      if (op == 3'd4) begin
        if (a == b) begin e.taken = 1; n_taken++; end
        else n_not_taken++;
      end
      if (op == 3'd7)      pc = {e.pc_plus1[15:13], i[12:0]};
      else if (e.taken)    pc = e.pc_plus1 + sext;
      else                 pc = e.pc_plus1;
      return e;
    endfunction
  endclass

endpackage
