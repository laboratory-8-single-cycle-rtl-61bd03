// reg_file: the processor's register file, N_REGS x W bits.
//
// Two asynchronous read ports (rs and rt) and one write port written on the
// rising clock edge when we is high. Register 0 always reads as zero, as in
// MIPS, and a synchronous reset clears every register. Eight registers follow
// from the 3-bit register fields of the instruction formats; register 0
// being zero and the reset are this design's choices.
module reg_file #(
  parameter int unsigned N_REGS = 8,
  parameter int unsigned W      = 16,
  localparam int unsigned IW    = $clog2(N_REGS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [IW-1:0] ra1,
  input  logic [IW-1:0] ra2,
  input  logic [IW-1:0] wa,
  input  logic [W-1:0]  wd,
  output logic [W-1:0]  rd1,
  output logic [W-1:0]  rd2
);
  logic [W-1:0] regs [N_REGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_REGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
endmodule
