// test_env_harness: end-to-end test of the board-level design, shared by
// tb_test_env (short counters) and tb_test_env_full (all defaults).
//
// It uses the design only through its board pins. It presses btn[1] to
// reset, then runs the whole built-in program one btn[0] press at a time,
// plus a few instructions after a second reset. Before each press it sets
// switches 7..5 to every value in turn, reads the four hexadecimal digits
// back from the multiplexed seven-segment outputs and compares them with the
// reference model (instruction, PC+1, RD1, RD2, Ext_Imm, ALURes, MemData,
// WD); it also checks the LEDs in both switch-0 modes. Each press must
// advance the program by exactly one instruction. It counts how often each
// mechanism happened (step, reset, each opcode and R-type function, branch
// taken and not taken, each display and LED selection) and counts a failure
// for any that never did.
module test_env_harness #(
  parameter bit          FULL      = 1'b0,  // 1: test_env with its default parameters
  parameter int unsigned MPG_CNT_W = 4,     // used when FULL = 0
  parameter int unsigned SSD_CNT_W = 4
);
  import mips16_program_pkg::*;
  import mips16_ref_pkg::*;

  localparam int unsigned MPG_W = FULL ? 16 : MPG_CNT_W;  // test_env defaults
  localparam int unsigned SSD_W = FULL ? 16 : SSD_CNT_W;
  localparam int unsigned MPG_PERIOD = 1 << MPG_W;

  logic        clk = 0;
  logic [4:0]  btn = '0;
  logic [15:0] sw = '0;
  logic [15:0] led;
  logic [3:0]  an;
  logic [6:0]  cat;
  int checks = 0, failures = 0;

  if (FULL) begin : g_full
    test_env dut (.clk(clk), .btn(btn), .sw(sw), .led(led), .an(an), .cat(cat));
  end else begin : g_small
    test_env #(.MPG_CNT_W(MPG_CNT_W), .SSD_CNT_W(SSD_CNT_W)) dut (
      .clk(clk), .btn(btn), .sw(sw), .led(led), .an(an), .cat(cat));
  end

  always #5 clk = ~clk;

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // active-low segment pattern -> hex digit; 16 = not a digit
  function automatic int unsigned seg2hex(logic [6:0] c);
    logic [6:0] s [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    for (int n = 0; n < 16; n++) if (s[n] == ~c) return n;
    return 16;
  endfunction

  // Read the 16-bit value on the display: watch one full refresh period.
  task automatic read_display(output logic [15:0] v, output bit ok);
    bit [3:0] seen = 0;
    int unsigned h;
    ok = 1;
    v  = '0;
    @(negedge clk);  // let the new switch setting through
    for (int k = 0; k < 4 && seen != 4'hF; k++) begin
      @(negedge clk);
      if (!$onehot(~an)) ok = 0;
      for (int d = 0; d < 4; d++) if (!an[d]) begin
        h = seg2hex(cat);
        if (h > 15) ok = 0;
        v[d*4 +: 4] = 4'(h);
        seen[d] = 1;
      end
      if (seen != 4'hF) @(an);
    end
    if (seen != 4'hF) ok = 0;
  endtask

  task automatic press(int b);
    btn[b] = 1'b1;
    repeat (3 * MPG_PERIOD) @(posedge clk);
    btn[b] = 1'b0;
    repeat (3 * MPG_PERIOD) @(posedge clk);
  endtask

  int n_sel [8];
  int n_led [2];
  int n_step = 0, n_reset = 0;

  task automatic check_instr(expect_t e);
    logic [15:0] v, want;
    bit          ok;
    for (int s = 0; s < 8; s++) begin
      sw[7:5] = 3'(s);
      read_display(v, ok);
      case (s)
        0: want = e.instr;   1: want = e.pc_plus1; 2: want = e.rd1;      3: want = e.rd2;
        4: want = e.ext_imm; 5: want = e.alu_res;  6: want = e.mem_data; default: want = e.wd;
      endcase
      checks++;
      if (!ok) begin failures++; $display("FAIL display scan, select %0d", s); end
      chk($sformatf("display select %0d at instr %h", s, e.instr), v, want);
      n_sel[s]++;
    end
    sw[0] = 1'b0; #1;
    chk("LEDs: control signals", led, {8'd0, e.ctrl_bits});
    n_led[0]++;
    sw[0] = 1'b1; #1;
    chk("LEDs: ALUOp", led, {13'd0, e.alu_op});
    n_led[1]++;
    sw[0] = 1'b0;
  endtask

  initial begin
    automatic mips16_ref ref_m = new();
    expect_t e;
    automatic int halt_steps = 0;
    repeat (4 * MPG_PERIOD) @(posedge clk);
    press(1);
    n_reset++;
    // run the program to its halt loop and two turns around it
    while (halt_steps < 2 && n_step < 200) begin
      e = ref_m.exec(prog_word(int'(ref_m.pc)));
      check_instr(e);
      if (e.pc_plus1 == 16'(HALT_PC + 1)) halt_steps++;
      press(0);
      n_step++;
    end
    // reset in the middle of a run, then execute a few instructions again
    press(1);
    n_reset++;
    ref_m.reset();
    for (int k = 0; k < 12; k++) begin
      e = ref_m.exec(prog_word(int'(ref_m.pc)));
      check_instr(e);
      press(0);
      n_step++;
    end
    // one press is one instruction: the halt instruction is the 116th, run
    // twice, then 12 more after the reset
    checks++;
    if (n_step != 117 + 12) begin failures++; $display("FAIL %0d steps", n_step); end
    // every mechanism happened
    for (int k = 0; k < 8; k++) begin
      checks++; if (ref_m.n_op[k] == 0) begin failures++; $display("FAIL opcode %0d never ran", k); end
      checks++; if (ref_m.n_fn[k] == 0) begin failures++; $display("FAIL function %0d never ran", k); end
      checks++; if (n_sel[k] == 0)      begin failures++; $display("FAIL display select %0d unused", k); end
    end
    checks++; if (ref_m.n_taken == 0)     begin failures++; $display("FAIL no branch taken"); end
    checks++; if (ref_m.n_not_taken == 0) begin failures++; $display("FAIL no branch not taken"); end
    checks++; if (n_led[0] == 0 || n_led[1] == 0) begin failures++; $display("FAIL LED mode unused"); end
    checks++; if (n_reset < 2) failures++;
    $display("steps=%0d resets=%0d taken=%0d not_taken=%0d lw=%0d sw=%0d j=%0d",
             n_step, n_reset, ref_m.n_taken, ref_m.n_not_taken, ref_m.n_op[2], ref_m.n_op[3], ref_m.n_op[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
