// tb_ifetch: drives random branch/jump decisions and targets into the fetch
// unit and follows the PC with a model: PC+1 after a step with neither,
// the branch target when PCSrc is 1, the jump address when Jump is 1 (Jump
// wins), no change when the enable is low, 0 after reset. The instruction
// must be the program word at the PC.
module tb_ifetch;
  import mips16_program_pkg::*;
  logic        clk = 0, rst = 1, en = 0, pcsrc = 0, jump = 0;
  logic [15:0] ba = 0, ja = 0, instr, pc1;
  logic [15:0] pc;
  int checks = 0, failures = 0;

  ifetch dut (.clk(clk), .rst(rst), .en(en), .branch_addr(ba), .jump_addr(ja),
              .pcsrc(pcsrc), .jump(jump), .instr(instr), .pc_plus1(pc1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0; pc = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ba = 16'($urandom_range(0, 40)); ja = 16'($urandom_range(0, 40));
      pcsrc = ($urandom % 3 == 0); jump = ($urandom % 4 == 0); en = ($urandom % 5 != 0);
      rst = (i % 97 == 96);
      #1;
      checks += 2;
      if (pc1 !== 16'(pc + 1)) begin failures++; $display("FAIL pc+1 %h exp %h", pc1, pc + 1); end
      if (instr !== prog_word(int'(pc[7:0]))) begin failures++; $display("FAIL instr at %h", pc); end
      @(posedge clk);
      if (rst)        pc = 0;
      else if (en)    pc = jump ? ja : (pcsrc ? ba : pc + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
