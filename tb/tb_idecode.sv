// tb_idecode: writes random values into the registers through the decode
// unit (R-type instructions write rd, I-type write rt, as RegDst selects) and
// checks RD1/RD2 for random rs/rt, the immediate extension for both ExtOp
// values, the func and sa fields, and that no write happens when RegWrite or
// the step enable is low.
module tb_idecode;
  logic        clk = 0, rst = 1, en = 0, rw = 0, rdst = 0, eop = 0;
  logic [15:0] instr = 0, wd = 0, rd1, rd2, ext;
  logic [2:0]  func;
  logic        sa;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  idecode dut (.clk(clk), .rst(rst), .en(en), .instr(instr), .wd(wd), .reg_write(rw),
               .reg_dst(rdst), .ext_op(eop), .rd1(rd1), .rd2(rd2), .ext_imm(ext),
               .func(func), .sa(sa));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] rs, rt, wa;
    foreach (model[i]) model[i] = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      instr = 16'($urandom); wd = 16'($urandom);
      rw = 1'($urandom); en = ($urandom % 4 != 0); rdst = 1'($urandom); eop = 1'($urandom);
      rs = instr[12:10]; rt = instr[9:7];
      #1;
      checks += 5;
      if (rd1 !== model[rs]) begin failures++; $display("FAIL rd1"); end
      if (rd2 !== model[rt]) begin failures++; $display("FAIL rd2"); end
      if (ext !== (eop ? {{9{instr[6]}}, instr[6:0]} : {9'd0, instr[6:0]})) begin failures++; $display("FAIL ext %h", ext); end
      if (func !== instr[2:0]) begin failures++; $display("FAIL func"); end
      if (sa !== instr[3])     begin failures++; $display("FAIL sa"); end
      @(posedge clk);
      wa = rdst ? instr[6:4] : instr[9:7];
      if (rw && en && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
