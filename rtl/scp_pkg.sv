// scp_pkg: types and constants shared by the single-cycle processor.
//
// The processor executes 16-bit instructions laid out as five fields, from the
// most significant bit down:
//   [15:12] opcode   [11:10] Reg 1   [9:8] Reg 2   [7:6] W Reg   [5:0] immediate
// Register codes are 00 = A, 01 = B, 10 = C, 11 = D. The opcode values and the
// field order are those of the instruction set; fields an instruction does not
// use are coded as zeros by the assembler and ignored by the hardware. Opcodes
// that the instruction set leaves unassigned (0111, 1010, 1011, 1101, 1110) are
// this design's choice to execute as nop.
package scp_pkg;

  localparam int unsigned INSTR_W  = 16;  // instruction word width
  localparam int unsigned DATA_W   = 8;   // data register width
  localparam int unsigned REG_AW   = 2;   // register select width (A-D)
  localparam int unsigned IMM_W    = 6;   // immediate field width

  typedef enum logic [3:0] {
    OP_OR   = 4'b0000,
    OP_AND  = 4'b0001,
    OP_NOR  = 4'b0010,
    OP_NAND = 4'b0011,
    OP_ADD  = 4'b0100,
    OP_SUB  = 4'b0101,
    OP_SLT  = 4'b0110,
    OP_LD   = 4'b1000,
    OP_ST   = 4'b1001,
    OP_LDI  = 4'b1100,
    OP_NOP  = 4'b1111
  } opcode_e;

  typedef enum logic [1:0] {
    REG_A = 2'b00,
    REG_B = 2'b01,
    REG_C = 2'b10,
    REG_D = 2'b11
  } reg_e;

  typedef struct packed {
    logic [3:0]       op;
    logic [REG_AW-1:0] reg1;
    logic [REG_AW-1:0] reg2;
    logic [REG_AW-1:0] wreg;
    logic [IMM_W-1:0]  imm;
  } instr_t;

  // Operation the ALU carries out.
  typedef enum logic [2:0] {
    ALU_OR   = 3'd0,
    ALU_AND  = 3'd1,
    ALU_NOR  = 3'd2,
    ALU_NAND = 3'd3,
    ALU_ADD  = 3'd4,
    ALU_SUB  = 3'd5,
    ALU_SLT  = 3'd6
  } alu_op_e;

  // Source of the value written back to the register file.
  typedef enum logic [1:0] {
    WB_ALU = 2'd0,
    WB_MEM = 2'd1,
    WB_IMM = 2'd2
  } wb_sel_e;

  typedef struct packed {
    logic    reg_we;   // write W Reg at the end of the cycle
    logic    mem_we;   // write data memory at the end of the cycle
    alu_op_e alu_op;
    wb_sel_e wb_sel;
  } ctrl_t;

  // Instruction builders, for assemblers and testbenches.
  function automatic logic [INSTR_W-1:0] enc_rrr(opcode_e op, reg_e r1, reg_e r2, reg_e w);
    return {op, r1, r2, w, 6'b0};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_ld(reg_e addr_r, reg_e w);
    return {OP_LD, addr_r, 2'b00, w, 6'b0};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_st(reg_e addr_r, reg_e src);
    return {OP_ST, addr_r, src, 2'b00, 6'b0};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_ldi(reg_e w, logic [IMM_W-1:0] imm);
    return {OP_LDI, 2'b00, 2'b00, w, imm};
  endfunction

  localparam logic [INSTR_W-1:0] NOP_WORD = {OP_NOP, 12'h000};

endpackage
