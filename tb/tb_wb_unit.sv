// tb_wb_unit: checks the write-back multiplexer with random operands:
// MemtoReg = 0 must give ALURes, MemtoReg = 1 must give MemData.
module tb_wb_unit;
  logic        m2r;
  logic [15:0] alu, mem, wd;
  int checks = 0, failures = 0;

  wb_unit dut (.mem_to_reg(m2r), .alu_res(alu), .mem_data(mem), .wd(wd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      alu = 16'($urandom); mem = 16'($urandom); m2r = 1'($urandom);
      #1;
      checks++;
      if (wd !== (m2r ? mem : alu)) begin
        failures++;
        $display("FAIL m2r=%b alu=%h mem=%h wd=%h", m2r, alu, mem, wd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
