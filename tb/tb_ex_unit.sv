// tb_ex_unit: random operands for every ALUOp and, for R-type, every
// function code; the result, the zero flag and the branch target are
// compared with values computed here. Equal operands are forced often so
// that the zero flag is exercised.
module tb_ex_unit;
  logic [15:0] pc1, rd1, rd2, imm, res, ba;
  logic [2:0]  func, aop;
  logic        sa, src, zero;
  int checks = 0, failures = 0;

  ex_unit dut (.pc_plus1(pc1), .rd1(rd1), .rd2(rd2), .ext_imm(imm), .func(func),
               .sa(sa), .alu_src(src), .alu_op(mips16_pkg::aluop_e'(aop)),
               .alu_res(res), .zero(zero), .branch_addr(ba));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] model();
    logic [15:0] b = src ? imm : rd2;
    logic signed [15:0] s = rd2;
    case (aop)
      3'd1: return rd1 + b;
      3'd2: return rd1 - b;
      3'd3: return rd1 & b;
      3'd4: return rd1 | b;
      default:
        case (func)
          3'd0: return rd1 + b;
          3'd1: return rd1 - b;
          3'd2: return sa ? {rd2[14:0], 1'b0} : rd2;
          3'd3: return sa ? {1'b0, rd2[15:1]} : rd2;
          3'd4: return rd1 & b;
          3'd5: return rd1 | b;
          3'd6: return rd1 ^ b;
          default: return sa ? 16'(s >>> 1) : rd2;
        endcase
    endcase
  endfunction

  initial begin
    logic [15:0] exp;
    for (int i = 0; i < 2000; i++) begin
      pc1 = 16'($urandom); rd1 = 16'($urandom); rd2 = 16'($urandom);
      imm = 16'($urandom); func = 3'($urandom); sa = 1'($urandom);
      src = 1'($urandom);
      aop = 3'($urandom_range(0, 4));
      if (i % 4 == 0) rd2 = rd1;
      if (i % 8 == 1) imm = rd1;
      #1;
      exp = model();
      checks += 3;
      if (res !== exp)              begin failures++; $display("FAIL aop=%0d f=%0d sa=%b %h %h %h -> %h exp %h", aop, func, sa, rd1, rd2, imm, res, exp); end
      if (zero !== (exp == 16'd0))  begin failures++; $display("FAIL zero"); end
      if (ba !== 16'(pc1 + imm))    begin failures++; $display("FAIL branch addr"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
