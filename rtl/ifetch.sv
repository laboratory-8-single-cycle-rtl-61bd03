// ifetch: instruction fetch unit.
//
// Holds the program counter, reads the instruction memory at PC and forms
// PC + 1 (instructions are 16-bit words and the PC counts words). The next PC
// is chosen by two multiplexers in series, as in the reference datapath:
// PCSrc picks the branch target over PC + 1, then Jump picks the jump address
// over that. The PC loads on a rising clock edge when en is high (one
// instruction per step) and clears to 0 on a synchronous reset. Instruction
// and PC + 1 are combinational from the PC. The multiplexer order follows the
// reference datapath; word addressing (PC + 1) is the 16-bit reduction of
// its byte-addressed PC + 4, and the enable and reset are this design's.
module ifetch
  import mips16_pkg::*;
#(
  parameter int unsigned IMEM_AW = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  word_t branch_addr,
  input  word_t jump_addr,
  input  logic  pcsrc,
  input  logic  jump,
  output word_t instr,
  output word_t pc_plus1
);
  word_t pc, pc_branch, pc_next;

  assign pc_plus1  = pc + word_t'(1);
  assign pc_branch = pcsrc ? branch_addr : pc_plus1;
  assign pc_next   = jump  ? jump_addr   : pc_branch;

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pc_next;
  end

  instr_mem #(.AW(IMEM_AW)) u_imem (
    .addr  (pc[IMEM_AW-1:0]),
    .instr (instr)
  );
endmodule
