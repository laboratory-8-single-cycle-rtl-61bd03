// instr_mem: read-only instruction memory of the single-cycle processor.
//
// An asynchronous-read ROM of 2**AW 16-bit words, addressed by word. Its
// contents are the test program of mips16_program_pkg, built into a constant
// table at elaboration; words beyond the program read as 0, which decodes as
// add $0,$0,$0 (no effect). The memory's existence and its place in the
// datapath follow the reference single-cycle datapath; its size and contents
// are this design's choice.
module instr_mem
  import mips16_pkg::*;
  import mips16_program_pkg::*;
#(
  parameter int unsigned AW = 8  // address width: 2**AW words
) (
  input  logic [AW-1:0] addr,
  output word_t         instr
);
  localparam int unsigned DEPTH = 1 << AW;

  word_t rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = prog_word(i);
  end

  assign instr = rom[addr];
endmodule
