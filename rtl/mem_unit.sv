// mem_unit: memory unit of the single-cycle processor.
//
// A data memory of 2**AW 16-bit words with asynchronous read and synchronous
// write. ALURes is the address (its low AW bits), RD2 the write data. When
// MemWrite is 1 and the step enable en is high, RD2 is written at the rising
// clock edge; when MemWrite is 0 nothing is written. MemData is the word at
// the address, available in the same cycle. ALURes is also passed on
// unchanged towards the write-back unit. The read/write timing and the
// signals follow the reference design; the depth and the all-zero start
// contents are this design's choice.
module mem_unit
  import mips16_pkg::*;
#(
  parameter int unsigned AW = 8  // 2**AW words
) (
  input  logic  clk,
  input  logic  en,
  input  logic  mem_write,
  input  word_t alu_res_in,
  input  word_t rd2,
  output word_t mem_data,
  output word_t alu_res_out
);
  localparam int unsigned DEPTH = 1 << AW;

  word_t ram [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) ram[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en && mem_write) ram[alu_res_in[AW-1:0]] <= rd2;
  end

  assign mem_data    = ram[alu_res_in[AW-1:0]];
  assign alu_res_out = alu_res_in;
endmodule
