// tb_ext_unit: all 128 immediates with both ExtOp values; sign extension
// must copy bit 6 into bits 15..7, zero extension must clear them.
module tb_ext_unit;
  logic [6:0]  imm;
  logic        eop;
  logic [15:0] ext;
  int checks = 0, failures = 0;

  ext_unit dut (.imm(imm), .ext_op(eop), .ext_imm(ext));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      imm = 7'(i); eop = 1'(i >> 7);
      #1;
      checks++;
      // signed value: imm - 128 when bit 6 is set
      if (ext !== (eop ? 16'(int'(i % 128) - ((i % 128) >= 64 ? 128 : 0)) : 16'(i % 128))) begin
        failures++;
        $display("FAIL imm %h ext_op %b -> %h", imm, eop, ext);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
