// tb_scp_decoder: self-checking test of scp_decoder.
//
// Checks the bit patterns of the instruction-set examples (sub RA,RB,RC;
// ld RB,RC; st RB,RC; ldi RD,0x24; nop) field by field, then sweeps all 16
// opcode values with random fields and compares the control word with a
// table written in the testbench. Also checks sign extension of the 6-bit
// immediate at both ends of its range (-32 and 31) and, on a second
// instance, zero extension.
module tb_scp_decoder;
  import scp_pkg::*;

  logic [15:0] instr;
  opcode_e     op, op_z;
  logic [1:0]  reg1, reg2, wreg, r1z, r2z, wz;
  logic [7:0]  imm_ext, imm_z;
  ctrl_t       ctrl, ctrl_z;
  int checks = 0, failures = 0;

  scp_decoder #(.IMM_SIGNED(1'b1)) dut (
    .instr(instr), .op(op), .reg1(reg1), .reg2(reg2), .wreg(wreg),
    .imm_ext(imm_ext), .ctrl(ctrl));
  scp_decoder #(.IMM_SIGNED(1'b0)) dut_z (
    .instr(instr), .op(op_z), .reg1(r1z), .reg2(r2z), .wreg(wz),
    .imm_ext(imm_z), .ctrl(ctrl_z));

  task automatic expect_eq(int got, int want, string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: instr=%h got %h expected %h", what, instr, got, want);
    end
  endtask

  // Reference control: {reg_we, mem_we, alu_op, wb_sel} per opcode value.
  function automatic void ref_ctrl(int opv, output bit rwe, output bit mwe,
                                   output int aop, output int wsel, output int opo);
    rwe = 0; mwe = 0; aop = 0; wsel = 0; opo = 15;
    case (opv)
      0, 1, 2, 3, 4, 5, 6: begin rwe = 1; aop = opv; wsel = 0; opo = opv; end
      8:  begin rwe = 1; wsel = 1; opo = 8;  end
      9:  begin mwe = 1; opo = 9;            end
      12: begin rwe = 1; wsel = 2; opo = 12; end
      default: ;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // sub RA, RB, RC = 0101 00 01 10 000000
    instr = 16'b0101_00_01_10_000000; #1;
    expect_eq(op, OP_SUB, "sub op"); expect_eq(reg1, 0, "sub reg1");
    expect_eq(reg2, 1, "sub reg2");  expect_eq(wreg, 2, "sub wreg");
    expect_eq(ctrl.alu_op, ALU_SUB, "sub alu"); expect_eq(ctrl.reg_we, 1, "sub we");
    // ld RB, RC = 1000 01 00 10 000000
    instr = 16'b1000_01_00_10_000000; #1;
    expect_eq(op, OP_LD, "ld op"); expect_eq(reg1, 1, "ld reg1"); expect_eq(wreg, 2, "ld wreg");
    expect_eq(ctrl.wb_sel, WB_MEM, "ld wb"); expect_eq(ctrl.mem_we, 0, "ld mem_we");
    // st RB, RC = 1001 01 10 00 000000
    instr = 16'b1001_01_10_00_000000; #1;
    expect_eq(op, OP_ST, "st op"); expect_eq(reg1, 1, "st reg1"); expect_eq(reg2, 2, "st reg2");
    expect_eq(ctrl.mem_we, 1, "st mem_we"); expect_eq(ctrl.reg_we, 0, "st reg_we");
    // ldi RD, 0x24 = 1100 00 00 11 100100
    instr = 16'b1100_00_00_11_100100; #1;
    expect_eq(op, OP_LDI, "ldi op"); expect_eq(wreg, 3, "ldi wreg");
    expect_eq(ctrl.wb_sel, WB_IMM, "ldi wb");
    expect_eq(imm_ext, 8'hE4, "ldi 0x24 sign-extended");
    expect_eq(imm_z, 8'h24, "ldi 0x24 zero-extended");
    // ldi RA, 0x12
    instr = 16'b1100_00_00_00_010010; #1;
    expect_eq(imm_ext, 8'h12, "ldi 0x12"); expect_eq(wreg, 0, "ldi RA");
    instr = {OP_LDI, 6'b0, 6'b100000}; #1; expect_eq(imm_ext, 8'hE0, "imm -32");
    instr = {OP_LDI, 6'b0, 6'b011111}; #1; expect_eq(imm_ext, 8'h1F, "imm 31");
    // nop = 1111 xxxx xx 000000
    instr = 16'hF3C0; #1;
    expect_eq(op, OP_NOP, "nop op"); expect_eq(ctrl.reg_we, 0, "nop reg_we");
    expect_eq(ctrl.mem_we, 0, "nop mem_we");
    // Encoder helpers of the package agree with the printed patterns.
    expect_eq(enc_rrr(OP_SUB, REG_A, REG_B, REG_C), 16'b0101_00_01_10_000000, "enc sub");
    expect_eq(enc_ldi(REG_D, 6'h24), 16'b1100_00_00_11_100100, "enc ldi");

    for (int i = 0; i < 2000; i++) begin
      bit rwe, mwe;
      int aop, wsel, opo;
      int opv;
      opv = i % 16;
      instr = {4'(opv), 12'($urandom)};
      #1;
      ref_ctrl(opv, rwe, mwe, aop, wsel, opo);
      expect_eq(op, opo, "op");
      expect_eq(ctrl.reg_we, rwe, "reg_we");
      expect_eq(ctrl.mem_we, mwe, "mem_we");
      if (rwe && wsel == 0) expect_eq(ctrl.alu_op, aop, "alu_op");
      if (rwe) expect_eq(ctrl.wb_sel, wsel, "wb_sel");
      expect_eq(reg1, int'(instr[11:10]), "reg1 field");
      expect_eq(reg2, int'(instr[9:8]), "reg2 field");
      expect_eq(wreg, int'(instr[7:6]), "wreg field");
      expect_eq(imm_ext, int'({{2{instr[5]}}, instr[5:0]}), "imm field");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
