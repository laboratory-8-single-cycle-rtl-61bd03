// test_env: board-level top of the 16-bit single-cycle MIPS.
//
// The processor runs one instruction per press of btn[0]: a mono pulse
// generator turns the press into a one-clock enable that advances the PC and
// validates the register-file and data-memory writes. btn[1], through a
// second pulse generator, resets the PC and the registers. Switches 7..5
// choose which datapath value the four-digit seven-segment display shows
// (instruction, PC + 1, RD1, RD2, Ext_Imm, ALURes, MemData, WD) and switch 0
// chooses whether the LEDs show the 1-bit control signals or ALUOp. Ports
// match a Digilent Basys 3 board: 5 buttons, 16 switches, 16 LEDs, a
// 4-digit display with active-low anodes and cathodes. The pulse-generator
// and display counters (MPG_CNT_W, SSD_CNT_W) set the debounce time and the
// digit refresh period in clock cycles.
module test_env
  import mips16_pkg::*;
#(
  parameter int unsigned MPG_CNT_W = 16,
  parameter int unsigned SSD_CNT_W = 16,
  parameter int unsigned IMEM_AW   = 8,
  parameter int unsigned DMEM_AW   = 8
) (
  input  logic        clk,
  input  logic [4:0]  btn,
  input  logic [15:0] sw,
  output logic [15:0] led,
  output logic [3:0]  an,
  output logic [6:0]  cat
);
  logic  step, rst;
  dbg_t  dbg;
  word_t ssd_val;

  mpg #(.CNT_W(MPG_CNT_W)) u_mpg_step (.clk(clk), .btn(btn[0]), .pulse(step));
  mpg #(.CNT_W(MPG_CNT_W)) u_mpg_rst  (.clk(clk), .btn(btn[1]), .pulse(rst));

  mips16_cpu #(.IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW)) u_cpu (
    .clk (clk),
    .rst (rst),
    .en  (step),
    .dbg (dbg)
  );

  debug_mux u_dmux (
    .sel     (sw[7:5]),
    .led_sel (sw[0]),
    .dbg     (dbg),
    .ssd_val (ssd_val),
    .led     (led)
  );

  ssd #(.CNT_W(SSD_CNT_W)) u_ssd (
    .clk    (clk),
    .digits (ssd_val),
    .an     (an),
    .cat    (cat)
  );
endmodule
