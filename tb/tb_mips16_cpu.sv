// tb_mips16_cpu: self-checking testbench of the single-cycle processor.
//
// Runs the built-in program with the step enable mostly high and sometimes
// low (to check that nothing changes while it is low). Before every enabled
// clock edge the datapath values are compared with the reference model's;
// at the end the data memory and registers are compared with the program's
// known results. One instruction must complete per enabled cycle: the PC
// must reach the halt loop after exactly the reference number of steps.
module tb_mips16_cpu;
  import mips16_pkg::*;
  import mips16_program_pkg::*;
  import mips16_ref_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  dbg_t dbg;
  int   checks = 0, failures = 0;

  mips16_cpu dut (.clk(clk), .rst(rst), .en(en), .dbg(dbg));

  always #5 clk = ~clk;

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic mips16_ref ref_m = new();
    expect_t   e;
    automatic int steps = 0, halt_seen = 0, cyc = 0, first_halt = 0;
    bit [7:0]  cb;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (halt_seen < 3 && steps < 400) begin
      // a disabled cycle every 7 steps: state must hold
      en = (cyc % 7 != 3);
      cyc++;
      #1;
      if (en) begin
        e = ref_m.exec(prog_word(int'(ref_m.pc)));
        chk("instr",    dbg.instr,    e.instr);
        chk("pc_plus1", dbg.pc_plus1, e.pc_plus1);
        chk("rd1",      dbg.rd1,      e.rd1);
        chk("rd2",      dbg.rd2,      e.rd2);
        chk("ext_imm",  dbg.ext_imm,  e.ext_imm);
        chk("alu_res",  dbg.alu_res,  e.alu_res);
        chk("mem_data", dbg.mem_data, e.mem_data);
        chk("wd",       dbg.wd,       e.wd);
        cb = {dbg.ctrl.reg_dst, dbg.ctrl.ext_op, dbg.ctrl.alu_src, dbg.ctrl.branch,
              dbg.ctrl.jump, dbg.ctrl.mem_write, dbg.ctrl.mem_to_reg, dbg.ctrl.reg_write};
        chk("ctrl",     16'(cb),      16'(e.ctrl_bits));
        chk("alu_op",   16'(dbg.ctrl.alu_op), 16'(e.alu_op));
        chk("pcsrc",    16'(dbg.pcsrc), 16'(e.taken));
        steps++;
        if (e.pc_plus1 - 1 == 16'(HALT_PC)) begin
          halt_seen++;
          if (first_halt == 0) first_halt = steps;
        end
      end
      @(posedge clk);
    end
    #1;
    chk("halt pc", dbg.pc_plus1 - 16'd1, 16'(HALT_PC));
    // one instruction per enabled cycle: the halt instruction is the 116th
    // executed (4 + 8*7 + 1 + 2 + 8*5 + 1 + 11 + 1)
    checks++;
    if (first_halt != 116) begin
      failures++;
      $display("FAIL halt reached at step %0d", first_halt);
    end
    for (int a = 0; a < 11; a++) chk($sformatf("mem[%0d]", a), dut.u_mem.ram[a], ref_m.mem[a]);
    for (int r = 1; r < 8; r++)  chk($sformatf("reg %0d", r), dut.u_id.u_rf.regs[r], ref_m.regs[r]);
    // fixed expected results of the program
    chk("mem[7] = 13", dut.u_mem.ram[7], 16'd13);
    chk("mem[10] = 33", dut.u_mem.ram[10], 16'd33);
    chk("$6", dut.u_id.u_rf.regs[6], 16'h8000);
    chk("$1", dut.u_id.u_rf.regs[1], 16'h007F);
    // every instruction and both branch outcomes happened
    for (int k = 0; k < 8; k++) begin
      checks++; if (ref_m.n_op[k] == 0) begin failures++; $display("FAIL opcode %0d never ran", k); end
      checks++; if (ref_m.n_fn[k] == 0) begin failures++; $display("FAIL function %0d never ran", k); end
    end
    checks++; if (ref_m.n_taken == 0 || ref_m.n_not_taken == 0) failures++;
    $display("steps=%0d taken=%0d not_taken=%0d", steps, ref_m.n_taken, ref_m.n_not_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
