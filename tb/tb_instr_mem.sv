// tb_instr_mem: reads every word of the instruction memory and compares it
// with the test program encoded here by hand, field by field, and checks
// that the words after the program are zero.
module tb_instr_mem;
  logic [7:0]  addr;
  logic [15:0] instr;
  logic [15:0] exp [30];
  int checks = 0, failures = 0;

  instr_mem dut (.addr(addr), .instr(instr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // opcode rs rt imm / opcode rs rt rd sa funct / opcode target
  function automatic logic [15:0] i_(int op, int rs, int rt, int imm);
    return {3'(op), 3'(rs), 3'(rt), 7'(imm)};
  endfunction
  function automatic logic [15:0] r_(int rs, int rt, int rd, int sa, int fn);
    return {3'b000, 3'(rs), 3'(rt), 3'(rd), 1'(sa), 3'(fn)};
  endfunction

  initial begin
    exp = '{i_(1,0,1,0), i_(1,0,2,0), i_(1,0,3,1), i_(1,0,4,8), i_(4,1,4,6),
            i_(3,1,2,0), r_(2,3,5,0,0), r_(3,0,2,0,5), r_(5,0,3,0,5), i_(1,1,1,1),
            {3'b111, 13'd4}, i_(1,0,1,0), i_(1,0,6,0), i_(4,1,4,4), i_(2,1,5,0),
            r_(6,5,6,0,0), i_(1,1,1,1), {3'b111, 13'd13}, i_(3,4,6,2), i_(2,4,7,2),
            r_(7,3,5,0,1), r_(0,7,2,1,2), r_(0,5,3,1,3), r_(0,5,4,1,7), r_(3,4,6,0,6),
            r_(7,6,1,0,4), i_(5,5,1,127), i_(6,0,2,85), i_(1,0,3,127), i_(4,0,0,127)};
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a);
      #1;
      checks++;
      if (instr !== (a < 30 ? exp[a] : 16'h0000)) begin
        failures++;
        $display("FAIL word %0d: %h", a, instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
