// scp_program_pkg: the default contents of the instruction ROM.
//
// The ROM is a constant array, so its contents are fixed when the design is
// elaborated. default_program() builds the 4 Kb image (256 words of 16 bits,
// word i in bits [16*i +: 16]) with the instruction encoders of scp_pkg;
// every word not listed is nop. The program is a demonstration of the
// instruction set, in two blocks:
//   words 0-24 (byte 0x00): builds A=12, B=23, C=35 (add RA,RB,RC), loads
//     D=F5 with a negative immediate, then or RB,RD,RB (B=F7) and
//     sub RC,RA,RD (D=23); slt with both outcomes and with a negative
//     operand; and, nor, nand; st to 0x02 and 0xFE, ld back, one nop.
//   words 32-42 (byte 0x40): negative immediates, add/sub, st/ld through a
//     computed address, nand, or, an unassigned opcode (executes as nop).
// Replace it, or pass another image to scp_top's PROGRAM parameter, to run
// other code.
package scp_program_pkg;
  import scp_pkg::*;

  localparam int unsigned ROM_WORDS = 256;
  localparam int unsigned ROM_BITS  = ROM_WORDS * INSTR_W;   // 4 Kb

  function automatic logic [ROM_BITS-1:0] default_program();
    logic [INSTR_W-1:0] w [ROM_WORDS];
    logic [ROM_BITS-1:0] img;
    for (int i = 0; i < int'(ROM_WORDS); i++) w[i] = NOP_WORD;
    // Block 1, byte address 0x00.
    w[0]  = enc_ldi(REG_A, 6'h12);                 // A = 12
    w[1]  = enc_ldi(REG_B, 6'h11);                 // B = 11
    w[2]  = enc_ldi(REG_C, 6'h01);                 // C = 01
    w[3]  = enc_rrr(OP_ADD, REG_B, REG_B, REG_D);  // D = 22
    w[4]  = enc_rrr(OP_ADD, REG_D, REG_C, REG_B);  // B = 23
    w[5]  = enc_rrr(OP_ADD, REG_A, REG_B, REG_C);  // C = 35
    w[6]  = enc_ldi(REG_D, 6'h35);                 // D = F5 (-11)
    w[7]  = enc_rrr(OP_OR,  REG_B, REG_D, REG_B);  // B = F7
    w[8]  = enc_rrr(OP_SUB, REG_C, REG_A, REG_D);  // D = 23
    w[9]  = enc_rrr(OP_SLT, REG_C, REG_A, REG_B);  // B = 0 (35 < 12 false)
    w[10] = enc_rrr(OP_SLT, REG_A, REG_C, REG_B);  // B = 1
    w[11] = enc_ldi(REG_D, 6'h20);                 // D = E0 (-32)
    w[12] = enc_rrr(OP_SLT, REG_D, REG_A, REG_C);  // C = 1 (signed)
    w[13] = enc_rrr(OP_AND, REG_A, REG_D, REG_B);  // B = 00
    w[14] = enc_rrr(OP_NOR, REG_A, REG_D, REG_B);  // B = 0D
    w[15] = enc_rrr(OP_NAND, REG_A, REG_D, REG_C); // C = FF
    w[16] = enc_ldi(REG_A, 6'h02);                 // A = 02
    w[17] = enc_ldi(REG_B, 6'h1C);                 // B = 1C
    w[18] = enc_st(REG_A, REG_B);                  // MEM(02) = 1C
    w[19] = enc_ldi(REG_D, 6'h3E);                 // D = FE
    w[20] = enc_st(REG_D, REG_B);                  // MEM(FE) = 1C
    w[21] = enc_ld(REG_A, REG_C);                  // C = MEM(02)
    w[22] = NOP_WORD;
    w[23] = enc_ld(REG_D, REG_A);                  // A = MEM(FE)
    w[24] = enc_rrr(OP_SUB, REG_A, REG_D, REG_B);  // B = 1C - FE = 1E
    // Block 2, byte address 0x40.
    w[32] = enc_ldi(REG_A, 6'h05);                 // A = 05
    w[33] = enc_ldi(REG_B, 6'h3F);                 // B = FF (-1)
    w[34] = enc_rrr(OP_ADD, REG_A, REG_B, REG_C);  // C = 04
    w[35] = enc_rrr(OP_SUB, REG_B, REG_A, REG_D);  // D = FA
    w[36] = enc_st(REG_C, REG_D);                  // MEM(04) = FA
    w[37] = enc_ld(REG_C, REG_A);                  // A = FA
    w[38] = NOP_WORD;
    w[39] = enc_rrr(OP_NAND, REG_A, REG_B, REG_A); // A = 05
    w[40] = enc_rrr(OP_OR, REG_C, REG_D, REG_B);   // B = FE
    w[41] = 16'h7000;                              // unassigned opcode
    w[42] = enc_st(REG_B, REG_A);                  // MEM(FE) = 05
    for (int i = 0; i < int'(ROM_WORDS); i++) img[i*INSTR_W +: INSTR_W] = w[i];
    return img;
  endfunction

endpackage
