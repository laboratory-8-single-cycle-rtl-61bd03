// tb_mpg: presses a bouncing button a number of times (bounces shorter than
// the sampling period) and checks that the generator emits exactly one
// one-clock pulse per press, and none while the button is held or released.
module tb_mpg;
  localparam int CNT_W = 4;
  localparam int PERIOD = 1 << CNT_W;
  logic clk = 0, btn = 0, pulse;
  int   checks = 0, failures = 0, pulses = 0, wide = 0;
  logic last = 0;

  mpg #(.CNT_W(CNT_W)) dut (.clk(clk), .btn(btn), .pulse(pulse));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (pulse) pulses++;
    if (pulse && last) wide++;
    last <= pulse;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bounce(logic level);
    for (int k = 0; k < 5; k++) begin
      btn = 1'($urandom);
      repeat ($urandom_range(1, 2)) @(posedge clk);
    end
    btn = level;
  endtask

  initial begin
    repeat (3 * PERIOD) @(posedge clk);
    pulses = 0;
    for (int p = 1; p <= 20; p++) begin
      bounce(1);
      repeat ($urandom_range(3, 8) * PERIOD) @(posedge clk);
      bounce(0);
      repeat ($urandom_range(3, 8) * PERIOD) @(posedge clk);
      checks++;
      if (pulses != p) begin failures++; $display("FAIL press %0d: %0d pulses", p, pulses); end
    end
    checks++;
    if (wide != 0) begin failures++; $display("FAIL pulse longer than one clock"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
