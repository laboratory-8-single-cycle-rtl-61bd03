// mips16_cpu: 16-bit single-cycle MIPS processor.
//
// Each instruction is fetched, decoded, executed, given its memory access and
// written back within one clock cycle. The units are wired as in the classic
// single-cycle MIPS datapath, reduced to 16 bits and word addressing:
//   ifetch      PC, instruction memory, PC + 1, branch/jump next-PC muxes
//   idecode     register file, RegDst mux, immediate extension
//   main_control  opcode -> control signals
//   ex_unit     ALU control, ALUSrc mux, ALU, zero flag, branch target
//   mem_unit    data memory (asynchronous read, synchronous write)
//   wb_unit     MemtoReg multiplexer
//   pc_control  PCSrc = Branch AND Zero, jump address
// en is the step enable: the PC, register write and memory write all act on
// the rising clock edge only when en is high, so the processor can run one
// instruction per cycle (en tied high) or one per button press. rst clears
// the PC and the registers synchronously. dbg exposes the datapath signals
// for display.
module mips16_cpu
  import mips16_pkg::*;
#(
  parameter int unsigned IMEM_AW = 8,
  parameter int unsigned DMEM_AW = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output dbg_t dbg
);
  word_t      instr, pc_plus1, rd1, rd2, ext_imm, alu_res, alu_res_m;
  word_t      mem_data, wd, branch_addr, jump_addr;
  logic [2:0] func;
  logic       sa, zero, pcsrc;
  ctrl_t      ctrl;

  ifetch #(.IMEM_AW(IMEM_AW)) u_if (
    .clk         (clk),
    .rst         (rst),
    .en          (en),
    .branch_addr (branch_addr),
    .jump_addr   (jump_addr),
    .pcsrc       (pcsrc),
    .jump        (ctrl.jump),
    .instr       (instr),
    .pc_plus1    (pc_plus1)
  );

  main_control u_mc (
    .opcode (instr[15:13]),
    .ctrl   (ctrl)
  );

  idecode u_id (
    .clk       (clk),
    .rst       (rst),
    .en        (en),
    .instr     (instr),
    .wd        (wd),
    .reg_write (ctrl.reg_write),
    .reg_dst   (ctrl.reg_dst),
    .ext_op    (ctrl.ext_op),
    .rd1       (rd1),
    .rd2       (rd2),
    .ext_imm   (ext_imm),
    .func      (func),
    .sa        (sa)
  );

  ex_unit u_ex (
    .pc_plus1    (pc_plus1),
    .rd1         (rd1),
    .rd2         (rd2),
    .ext_imm     (ext_imm),
    .func        (func),
    .sa          (sa),
    .alu_src     (ctrl.alu_src),
    .alu_op      (ctrl.alu_op),
    .alu_res     (alu_res),
    .zero        (zero),
    .branch_addr (branch_addr)
  );

  mem_unit #(.AW(DMEM_AW)) u_mem (
    .clk         (clk),
    .en          (en),
    .mem_write   (ctrl.mem_write),
    .alu_res_in  (alu_res),
    .rd2         (rd2),
    .mem_data    (mem_data),
    .alu_res_out (alu_res_m)
  );

  wb_unit u_wb (
    .mem_to_reg (ctrl.mem_to_reg),
    .alu_res    (alu_res_m),
    .mem_data   (mem_data),
    .wd         (wd)
  );

  pc_control u_pcc (
    .branch    (ctrl.branch),
    .zero      (zero),
    .pc_plus1  (pc_plus1),
    .target    (instr[12:0]),
    .pcsrc     (pcsrc),
    .jump_addr (jump_addr)
  );

  always_comb begin
    dbg.instr       = instr;
    dbg.pc_plus1    = pc_plus1;
    dbg.rd1         = rd1;
    dbg.rd2         = rd2;
    dbg.ext_imm     = ext_imm;
    dbg.alu_res     = alu_res;
    dbg.mem_data    = mem_data;
    dbg.wd          = wd;
    dbg.branch_addr = branch_addr;
    dbg.jump_addr   = jump_addr;
    dbg.pcsrc       = pcsrc;
    dbg.zero        = zero;
    dbg.ctrl        = ctrl;
  end
endmodule
