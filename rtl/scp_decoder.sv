// scp_decoder: instruction decoder and control unit.
//
// Purely combinational. It splits the 16-bit instruction into its fields
// (opcode, Reg 1, Reg 2, W Reg, immediate) and derives the control of the
// single-cycle datapath:
//   or/and/nor/nand/add/sub/slt  W Reg <- Reg1 fn Reg2          (reg_we, WB_ALU)
//   ld                           W Reg <- MEM(Reg1)              (reg_we, WB_MEM)
//   st                           MEM(Reg1) <- Reg2               (mem_we)
//   ldi                          W Reg <- immediate              (reg_we, WB_IMM)
//   nop                          nothing is written
// The encodings follow the instruction set. The immediate is a 6-bit two's
// complement value (-32 to 31); with IMM_SIGNED = 1 it is sign-extended to the
// 8-bit data width, with IMM_SIGNED = 0 it is zero-extended. Unassigned
// opcodes decode as nop; that, and the ALU operation code, are this design's
// choices. The field outputs are plain slices of the instruction, so
// synthesis reports them as wired straight to the input.
module scp_decoder
  import scp_pkg::*;
#(
  parameter bit IMM_SIGNED = 1'b1
) (
  input  logic [INSTR_W-1:0] instr,
  output opcode_e            op,
  output logic [REG_AW-1:0]  reg1,
  output logic [REG_AW-1:0]  reg2,
  output logic [REG_AW-1:0]  wreg,
  output logic [DATA_W-1:0]  imm_ext,
  output ctrl_t              ctrl
);

  instr_t fields;

  assign fields = instr_t'(instr);
  assign reg1   = fields.reg1;
  assign reg2   = fields.reg2;
  assign wreg   = fields.wreg;

  always_comb begin
    if (IMM_SIGNED) imm_ext = {{(DATA_W-IMM_W){fields.imm[IMM_W-1]}}, fields.imm};
    else            imm_ext = {{(DATA_W-IMM_W){1'b0}}, fields.imm};
  end

  always_comb begin
    ctrl = '{reg_we: 1'b0, mem_we: 1'b0, alu_op: ALU_OR, wb_sel: WB_ALU};
    op   = OP_NOP;
    unique case (fields.op)
      OP_OR:   begin op = OP_OR;   ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_OR;   end
      OP_AND:  begin op = OP_AND;  ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_AND;  end
      OP_NOR:  begin op = OP_NOR;  ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_NOR;  end
      OP_NAND: begin op = OP_NAND; ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_NAND; end
      OP_ADD:  begin op = OP_ADD;  ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_ADD;  end
      OP_SUB:  begin op = OP_SUB;  ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SUB;  end
      OP_SLT:  begin op = OP_SLT;  ctrl.reg_we = 1'b1; ctrl.alu_op = ALU_SLT;  end
      OP_LD:   begin op = OP_LD;   ctrl.reg_we = 1'b1; ctrl.wb_sel = WB_MEM;   end
      OP_ST:   begin op = OP_ST;   ctrl.mem_we = 1'b1;                         end
      OP_LDI:  begin op = OP_LDI;  ctrl.reg_we = 1'b1; ctrl.wb_sel = WB_IMM;   end
      default: begin op = OP_NOP;                                              end
    endcase
  end

endmodule
