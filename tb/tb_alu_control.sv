// tb_alu_control: checks the ALU operation for every ALUOp value and, for
// R-type, every function code, against a table written here.
module tb_alu_control;
  import mips16_pkg::*;
  logic [2:0] aop, func;
  alu_ctrl_e  ctrl;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op(aluop_e'(aop)), .func(func), .alu_ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ALU operation codes: 0 add 1 sub 2 sll 3 srl 4 and 5 or 6 xor 7 sra
    automatic logic [2:0] fixed [1:4] = '{3'd0, 3'd1, 3'd4, 3'd5};  // add sub and or
    for (int a = 0; a <= 4; a++)
      for (int f = 0; f < 8; f++) begin
        aop = 3'(a); func = 3'(f);
        #1;
        checks++;
        if (3'(ctrl) !== (a == 0 ? 3'(f) : fixed[a])) begin
          failures++;
          $display("FAIL aluop %0d func %0d -> %0d", a, f, ctrl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
