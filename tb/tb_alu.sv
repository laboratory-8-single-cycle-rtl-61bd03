// tb_alu: random operands for every ALU operation, with frequent equal
// operands for the zero flag; results are computed here independently
// (shifts bit by bit).
module tb_alu;
  import mips16_pkg::*;
  logic [2:0]  op;
  logic [15:0] a, b, rt, res;
  logic        sa, zero;
  int checks = 0, failures = 0;

  alu dut (.alu_ctrl(alu_ctrl_e'(op)), .a(a), .b(b), .rt_val(rt), .sa(sa), .res(res), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    for (int i = 0; i < 3000; i++) begin
      op = 3'(i % 8); a = 16'($urandom); b = (i % 5 == 0) ? a : 16'($urandom);
      rt = 16'($urandom); sa = 1'($urandom);
      if (i % 50 == 7) rt = 16'h0001;
      #1;
      case (op)
        3'd0: exp = a + b;
        3'd1: exp = a + ~b + 16'd1;
        3'd2: exp = sa ? {rt[14:0], 1'b0} : rt;
        3'd3: exp = sa ? {1'b0, rt[15:1]} : rt;
        3'd4: exp = a & b;
        3'd5: exp = a | b;
        3'd6: exp = a ^ b;
        default: exp = sa ? {rt[15], rt[15:1]} : rt;
      endcase
      checks += 2;
      if (res !== exp) begin failures++; $display("FAIL op %0d: %h %h %h sa=%b -> %h exp %h", op, a, b, rt, sa, res, exp); end
      if (zero !== (exp == 0)) begin failures++; $display("FAIL zero op %0d", op); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
