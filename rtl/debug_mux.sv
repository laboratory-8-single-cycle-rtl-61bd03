// debug_mux: chooses what the board's display and LEDs show.
//
// sel (switches 7..5) picks the 16-bit value for the seven-segment display:
//   000 instruction, 001 PC + 1, 010 RD1, 011 RD2, 100 Ext_Imm,
//   101 ALURes, 110 MemData, 111 WD (write-back data).
// led_sel (switch 0) picks the LED pattern: 0 shows the eight 1-bit control
// signals, led[7:0] = RegDst, ExtOp, ALUSrc, Branch, Jump, MemWrite,
// MemtoReg, RegWrite (bit 7 first); 1 shows ALUOp on led[2:0]. Unused LEDs
// are 0. The two selection lists are the reference design's; the LED order
// is this design's choice. Combinational.
module debug_mux
  import mips16_pkg::*;
(
  input  logic [2:0]  sel,
  input  logic        led_sel,
  input  dbg_t        dbg,
  output word_t       ssd_val,
  output logic [15:0] led
);
  always_comb begin
    case (sel)
      3'd0: ssd_val = dbg.instr;
      3'd1: ssd_val = dbg.pc_plus1;
      3'd2: ssd_val = dbg.rd1;
      3'd3: ssd_val = dbg.rd2;
      3'd4: ssd_val = dbg.ext_imm;
      3'd5: ssd_val = dbg.alu_res;
      3'd6: ssd_val = dbg.mem_data;
      default: ssd_val = dbg.wd;
    endcase
  end

  always_comb begin
    led = '0;
    if (led_sel) begin
      led[2:0] = dbg.ctrl.alu_op;
    end else begin
      led[7:0] = {dbg.ctrl.reg_dst, dbg.ctrl.ext_op, dbg.ctrl.alu_src,
                  dbg.ctrl.branch, dbg.ctrl.jump, dbg.ctrl.mem_write,
                  dbg.ctrl.mem_to_reg, dbg.ctrl.reg_write};
    end
  end
endmodule
