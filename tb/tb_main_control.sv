// tb_main_control: checks the control signals of every opcode against an
// independently written truth table.
// Columns: RegDst ExtOp ALUSrc Branch Jump MemWrite MemtoReg RegWrite, ALUOp.
module tb_main_control;
  import mips16_pkg::*;
  logic [2:0] opcode;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  main_control dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [10:0] table_ [8];
    table_[0] = {8'b1000_0001, 3'd0};  // R-type
    table_[1] = {8'b0110_0001, 3'd1};  // addi
    table_[2] = {8'b0110_0011, 3'd1};  // lw
    table_[3] = {8'b0110_0100, 3'd1};  // sw
    table_[4] = {8'b0101_0000, 3'd2};  // beq
    table_[5] = {8'b0010_0001, 3'd3};  // andi
    table_[6] = {8'b0010_0001, 3'd4};  // ori
    table_[7] = {8'b0000_1000, 3'd1};  // j
    for (int op = 0; op < 8; op++) begin
      opcode = 3'(op);
      #1;
      checks++;
      if ({ctrl.reg_dst, ctrl.ext_op, ctrl.alu_src, ctrl.branch, ctrl.jump,
           ctrl.mem_write, ctrl.mem_to_reg, ctrl.reg_write, 3'(ctrl.alu_op)} !== table_[op]) begin
        failures++;
        $display("FAIL opcode %0d: %b", op, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
