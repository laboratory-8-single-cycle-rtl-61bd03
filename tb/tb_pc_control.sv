// tb_pc_control: checks PCSrc = Branch AND Zero for all four input pairs and
// the jump address PC+1[15:13] || target on random values.
module tb_pc_control;
  logic        branch, zero, pcsrc;
  logic [15:0] pc1, ja;
  logic [12:0] tgt;
  int checks = 0, failures = 0;

  pc_control dut (.branch(branch), .zero(zero), .pc_plus1(pc1), .target(tgt),
                  .pcsrc(pcsrc), .jump_addr(ja));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      {branch, zero} = 2'(i);
      pc1 = 16'($urandom); tgt = 13'($urandom);
      #1;
      checks++;
      if (pcsrc !== (i % 4 == 3)) begin failures++; $display("FAIL pcsrc b=%b z=%b", branch, zero); end
      checks++;
      if (ja[15:13] !== pc1[15:13] || ja[12:0] !== tgt) begin
        failures++; $display("FAIL jump pc1=%h tgt=%h ja=%h", pc1, tgt, ja);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
