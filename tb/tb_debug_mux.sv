// tb_debug_mux: random datapath values; checks the display value for every
// switch setting 7..5 and the LED pattern for both settings of switch 0.
module tb_debug_mux;
  import mips16_pkg::*;
  logic [2:0]  sel;
  logic        led_sel;
  dbg_t        dbg;
  logic [15:0] ssd_val, led;
  int checks = 0, failures = 0;

  debug_mux dut (.sel(sel), .led_sel(led_sel), .dbg(dbg), .ssd_val(ssd_val), .led(led));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] vals [8];
    for (int i = 0; i < 100; i++) begin
      foreach (vals[k]) vals[k] = 16'($urandom);
      dbg = dbg_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      dbg.instr = vals[0]; dbg.pc_plus1 = vals[1]; dbg.rd1 = vals[2]; dbg.rd2 = vals[3];
      dbg.ext_imm = vals[4]; dbg.alu_res = vals[5]; dbg.mem_data = vals[6]; dbg.wd = vals[7];
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s); led_sel = 1'(s);
        #1;
        checks += 2;
        if (ssd_val !== vals[s]) begin failures++; $display("FAIL sel %0d", s); end
        if (led_sel) begin
          if (led !== {13'd0, 3'(dbg.ctrl.alu_op)}) begin failures++; $display("FAIL led aluop"); end
        end else if (led !== {8'd0, dbg.ctrl.reg_dst, dbg.ctrl.ext_op, dbg.ctrl.alu_src, dbg.ctrl.branch,
                              dbg.ctrl.jump, dbg.ctrl.mem_write, dbg.ctrl.mem_to_reg, dbg.ctrl.reg_write}) begin
          failures++; $display("FAIL led ctrl");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
