// mips16_program_pkg: the test program held by the instruction memory.
//
// The program exercises every instruction of the processor. It writes the
// first eight Fibonacci numbers to data memory words 0..7 (sw, add, or, addi,
// a forward beq that is not taken seven times and taken once, j back), reads
// them back and adds them (lw), stores the sum 33 at word 10 with a non-zero
// offset and loads it again, runs the shift and logic instructions on the
// results, and finally parks in a "beq $0,$0,-1" loop at word 29.
//
// Expected end state: mem[0..7] = 0,1,1,2,3,5,8,13; mem[10] = 33;
// $1 = 0x007F, $2 = 0x0055, $3 = 0xFFFF, $4 = 0xFFFF, $5 = 0xFFFF,
// $6 = 0x8000, $7 = 0x0021.
package mips16_program_pkg;
  import mips16_pkg::*;

  localparam int unsigned PROG_LEN = 30;
  localparam int unsigned HALT_PC  = 29;

  function automatic word_t enc_r(funct_e fn, reg_idx_t rd, reg_idx_t rs, reg_idx_t rt, logic sa);
    return {OP_RTYPE, rs, rt, rd, sa, fn};
  endfunction

  function automatic word_t enc_i(opcode_e op, reg_idx_t rt, reg_idx_t rs, logic [6:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic word_t enc_j(logic [12:0] target);
    return {OP_J, target};
  endfunction

  // Word at instruction address a; 0 (add $0,$0,$0) past the program.
  function automatic word_t prog_word(int unsigned a);
    case (a)
      0:  return enc_i(OP_ADDI, 1, 0, 0);     // addi $1,$0,0    address
      1:  return enc_i(OP_ADDI, 2, 0, 0);     // addi $2,$0,0    f(n)
      2:  return enc_i(OP_ADDI, 3, 0, 1);     // addi $3,$0,1    f(n+1)
      3:  return enc_i(OP_ADDI, 4, 0, 8);     // addi $4,$0,8    count
      4:  return enc_i(OP_BEQ,  4, 1, 6);     // beq  $1,$4,+6   -> 11
      5:  return enc_i(OP_SW,   2, 1, 0);     // sw   $2,0($1)
      6:  return enc_r(FN_ADD, 5, 2, 3, 0);   // add  $5,$2,$3
      7:  return enc_r(FN_OR,  2, 3, 0, 0);   // or   $2,$3,$0
      8:  return enc_r(FN_OR,  3, 5, 0, 0);   // or   $3,$5,$0
      9:  return enc_i(OP_ADDI, 1, 1, 1);     // addi $1,$1,1
      10: return enc_j(4);                    // j    4
      11: return enc_i(OP_ADDI, 1, 0, 0);     // addi $1,$0,0
      12: return enc_i(OP_ADDI, 6, 0, 0);     // addi $6,$0,0    sum
      13: return enc_i(OP_BEQ,  4, 1, 4);     // beq  $1,$4,+4   -> 18
      14: return enc_i(OP_LW,   5, 1, 0);     // lw   $5,0($1)
      15: return enc_r(FN_ADD, 6, 6, 5, 0);   // add  $6,$6,$5
      16: return enc_i(OP_ADDI, 1, 1, 1);     // addi $1,$1,1
      17: return enc_j(13);                   // j    13
      18: return enc_i(OP_SW,   6, 4, 2);     // sw   $6,2($4)   mem[10] = 33
      19: return enc_i(OP_LW,   7, 4, 2);     // lw   $7,2($4)
      20: return enc_r(FN_SUB, 5, 7, 3, 0);   // sub  $5,$7,$3   33-34 = -1
      21: return enc_r(FN_SLL, 2, 0, 7, 1);   // sll  $2,$7,1    66
      22: return enc_r(FN_SRL, 3, 0, 5, 1);   // srl  $3,$5,1    0x7FFF
      23: return enc_r(FN_SRA, 4, 0, 5, 1);   // sra  $4,$5,1    0xFFFF
      24: return enc_r(FN_XOR, 6, 3, 4, 0);   // xor  $6,$3,$4   0x8000
      25: return enc_r(FN_AND, 1, 7, 6, 0);   // and  $1,$7,$6   0
      26: return enc_i(OP_ANDI, 1, 5, 7'h7F); // andi $1,$5,0x7F (zero-extended)
      27: return enc_i(OP_ORI,  2, 0, 7'h55); // ori  $2,$0,0x55
      28: return enc_i(OP_ADDI, 3, 0, 7'h7F);    // addi $3,$0,-1   (sign-extended)
      29: return enc_i(OP_BEQ,  0, 0, 7'h7F);    // beq  $0,$0,-1   stay here
      default: return '0;
    endcase
  endfunction
endpackage
