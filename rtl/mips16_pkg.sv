// mips16_pkg: shared types and constants of the 16-bit single-cycle MIPS.
//
// Instruction formats (16 bits, fixed by the design):
//   R: opcode[15:13] rs[12:10] rt[9:7] rd[6:4] sa[3] function[2:0]
//   I: opcode[15:13] rs[12:10] rt[9:7] immediate[6:0]
//   J: opcode[15:13] target[12:0]
// The opcode and function encodings below are this design's own choice; the
// formats, the 8-register file and the set of control signals follow the
// reference datapath.
package mips16_pkg;

  localparam int unsigned XLEN = 16;  // data and instruction width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [2:0]      reg_idx_t;

  typedef enum logic [2:0] {
    OP_RTYPE = 3'b000,
    OP_ADDI  = 3'b001,
    OP_LW    = 3'b010,
    OP_SW    = 3'b011,
    OP_BEQ   = 3'b100,
    OP_ANDI  = 3'b101,
    OP_ORI   = 3'b110,
    OP_J     = 3'b111
  } opcode_e;

  typedef enum logic [2:0] {
    FN_ADD = 3'b000,
    FN_SUB = 3'b001,
    FN_SLL = 3'b010,
    FN_SRL = 3'b011,
    FN_AND = 3'b100,
    FN_OR  = 3'b101,
    FN_XOR = 3'b110,
    FN_SRA = 3'b111
  } funct_e;

  // ALUOp from the main control to the ALU control.
  typedef enum logic [2:0] {
    ALUOP_RTYPE = 3'b000,  // operation given by the function field
    ALUOP_ADD   = 3'b001,  // addi, lw, sw
    ALUOP_SUB   = 3'b010,  // beq
    ALUOP_AND   = 3'b011,  // andi
    ALUOP_OR    = 3'b100   // ori
  } aluop_e;

  // Operation actually performed by the ALU.
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_SLL = 3'b010,
    ALU_SRL = 3'b011,
    ALU_AND = 3'b100,
    ALU_OR  = 3'b101,
    ALU_XOR = 3'b110,
    ALU_SRA = 3'b111
  } alu_ctrl_e;

  // Outputs of the main control unit: eight 1-bit signals and ALUOp.
  typedef struct packed {
    logic   reg_dst;    // 1: write register is rd, 0: rt
    logic   ext_op;     // 1: sign-extend the immediate, 0: zero-extend
    logic   alu_src;    // 1: ALU operand B is Ext_Imm, 0: RD2
    logic   branch;     // beq
    logic   jump;       // j
    logic   mem_write;  // sw
    logic   mem_to_reg; // 1: write back MemData, 0: ALURes
    logic   reg_write;  // register file write
    aluop_e alu_op;
  } ctrl_t;

  // Everything the board shows: the SSD and LED selection works from this.
  typedef struct packed {
    word_t instr;
    word_t pc_plus1;
    word_t rd1;
    word_t rd2;
    word_t ext_imm;
    word_t alu_res;
    word_t mem_data;
    word_t wd;
    word_t branch_addr;
    word_t jump_addr;
    logic  pcsrc;
    logic  zero;
    ctrl_t ctrl;
  } dbg_t;

  // Instruction field helpers.
  function automatic opcode_e f_opcode(word_t i); return opcode_e'(i[15:13]); endfunction
  function automatic reg_idx_t f_rs(word_t i);    return i[12:10];            endfunction
  function automatic reg_idx_t f_rt(word_t i);    return i[9:7];              endfunction
  function automatic reg_idx_t f_rd(word_t i);    return i[6:4];              endfunction
  function automatic logic     f_sa(word_t i);    return i[3];                endfunction
  function automatic logic [2:0] f_funct(word_t i); return i[2:0];            endfunction
  function automatic logic [6:0] f_imm(word_t i); return i[6:0];              endfunction
  function automatic logic [12:0] f_target(word_t i); return i[12:0];         endfunction

endpackage
