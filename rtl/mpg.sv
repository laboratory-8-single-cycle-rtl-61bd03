// mpg: mono pulse generator for a push button.
//
// A free-running CNT_W-bit counter sets the sampling rate: each time it
// reaches all ones the button level is taken into a first flop, which removes
// contact bounce shorter than 2**CNT_W clocks. Two more flops delay that
// sample by one clock each, and pulse = second AND NOT third is high for
// exactly one clock after each press is seen. The button input is assumed
// already synchronous to clk or slow enough that the sampling flop settles.
// The MPG's role (validating register and memory writes one press at a time)
// is the reference design's; its construction here is a common one.
module mpg #(
  parameter int unsigned CNT_W = 16
) (
  input  logic clk,
  input  logic btn,
  output logic pulse
);
  // Declaration initial values are the power-up state after FPGA
  // configuration, so no reset input is needed.
  logic [CNT_W-1:0] cnt = '0;
  logic             q1 = 1'b0, q2 = 1'b0, q3 = 1'b0;

  always_ff @(posedge clk) begin
    cnt <= cnt + 1'b1;
    if (&cnt) q1 <= btn;
    q2 <= q1;
    q3 <= q2;
  end

  assign pulse = q2 & ~q3;
endmodule
