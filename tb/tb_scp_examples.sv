// tb_scp_examples: the worked examples of the instruction set, run on the
// whole processor.
//
// A program built here first sets up the register and memory states the
// examples start from, then executes the example instructions themselves,
// and the testbench checks the printed register and memory tables:
//   add RA,RB,RC -> A=12 B=23 C=35 D=F5; or RB,RD,RB -> B=F7;
//   sub RC,RA,RD -> D=23;
//   ld RA,RC and st RD,RB with A=02 B=23 D=FE -> C=44, MEM(FE)=23, memory
//   00=C3 01=85 02=44 FF=2B;
//   ldi RA,0x12 -> A=12; ldi RD with field 0x24 -> D=E4 (the 6-bit field is
//   sign-extended).
// Bytes outside the immediate range are built as 4*k + j with ldi and add.
// Each example is a separate run of the sequencer, stopped where the table
// applies; every run must take exactly one cycle per instruction.
module tb_scp_examples;
  import scp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, start, run, done;
  logic [8:0]  st_addr, inst_cnt, fetch_addr;
  logic [15:0] instr;
  logic [7:0]  regs [4];
  int checks = 0, failures = 0;

  // Builds the program. With which < 0 it returns the ROM image; otherwise
  // it returns the word index at which checked segment 'which' ends.
  function automatic logic [4095:0] build(int which);
    logic [4095:0] img;
    int ends [8];
    int n;
    n = 0;
    img = '1;   // all nop
    // Load an arbitrary byte v into r, using s as scratch: r = 4*k + j.
    // (written inline as a nested task is not allowed in a function)
    `define LDB(r, s, v) \
      begin int vv, k, j; vv = int'($signed(8'(v))); j = vv & 3; k = (vv - j) / 4; \
        img[16*n +: 16] = enc_ldi(r, 6'(k)); n++; \
        img[16*n +: 16] = enc_rrr(OP_ADD, r, r, r); n++; \
        img[16*n +: 16] = enc_rrr(OP_ADD, r, r, r); n++; \
        img[16*n +: 16] = enc_ldi(s, 6'(j)); n++; \
        img[16*n +: 16] = enc_rrr(OP_ADD, r, s, r); n++; end
    `define W(x) begin img[16*n +: 16] = x; n++; end
    // Segment 0: A=12, B=23, D=F5.
    `W(enc_ldi(REG_A, 6'h12))
    `LDB(REG_B, REG_C, 8'h23)
    `LDB(REG_D, REG_C, 8'hF5)
    ends[0] = n;
    `W(enc_rrr(OP_ADD, REG_A, REG_B, REG_C))  ends[1] = n;
    `W(enc_rrr(OP_OR,  REG_B, REG_D, REG_B))  ends[2] = n;
    `W(enc_rrr(OP_SUB, REG_C, REG_A, REG_D))  ends[3] = n;
    // Memory contents of the memory example.
    `LDB(REG_A, REG_C, 8'h00) `LDB(REG_B, REG_C, 8'hC3) `W(enc_st(REG_A, REG_B))
    `LDB(REG_A, REG_C, 8'h01) `LDB(REG_B, REG_C, 8'h85) `W(enc_st(REG_A, REG_B))
    `LDB(REG_A, REG_C, 8'h02) `LDB(REG_B, REG_C, 8'h44) `W(enc_st(REG_A, REG_B))
    `LDB(REG_A, REG_C, 8'hFF) `LDB(REG_B, REG_C, 8'h2B) `W(enc_st(REG_A, REG_B))
    // Registers of the memory example: A=02 B=23 C=00 D=FE.
    `LDB(REG_A, REG_C, 8'h02) `LDB(REG_B, REG_C, 8'h23) `LDB(REG_D, REG_C, 8'hFE)
    `W(enc_ldi(REG_C, 6'h00))
    ends[4] = n;
    `W(enc_ld(REG_A, REG_C))
    `W(enc_st(REG_D, REG_B))                  ends[5] = n;
    `W(enc_ldi(REG_A, 6'h12))
    `W(16'b1100_00_00_11_100100)              ends[6] = n;
    `undef LDB
    `undef W
    if (which < 0) return img;
    return 4096'(ends[which]);
  endfunction

  localparam logic [4095:0] IMG = build(-1);
  int ends [8];

  scp_top #(.PROGRAM(IMG)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .st_addr(st_addr),
    .inst_cnt(inst_cnt), .run(run), .done(done), .fetch_addr(fetch_addr),
    .instr(instr), .regs(regs));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (A=%h B=%h C=%h D=%h)", what, regs[0], regs[1], regs[2], regs[3]);
    end
  endtask

  task automatic run_words(int from, int to);
    int cycles;
    @(negedge clk);
    start = 1'b1; st_addr = 9'(2 * from); inst_cnt = 9'(to - from);
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (run && cycles < 600) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == to - from, $sformatf("%0d instructions took %0d cycles", to - from, cycles));
  endtask

  task automatic check_regs(logic [7:0] a, logic [7:0] b, logic [7:0] c, logic [7:0] d,
                            string what);
    check(regs[0] == a && regs[1] == b && regs[2] == c && regs[3] == d, what);
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) ends[i] = int'(build(i));
    rst_n = 1'b0; start = 1'b0; st_addr = '0; inst_cnt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_words(0, ends[0]);
    check(regs[0] == 8'h12 && regs[1] == 8'h23 && regs[3] == 8'hF5, "setup A=12 B=23 D=F5");
    run_words(ends[0], ends[1]);
    check_regs(8'h12, 8'h23, 8'h35, 8'hF5, "add RA,RB,RC table");
    run_words(ends[1], ends[2]);
    check_regs(8'h12, 8'hF7, 8'h35, 8'hF5, "or RB,RD,RB table");
    run_words(ends[2], ends[3]);
    check_regs(8'h12, 8'hF7, 8'h35, 8'h23, "sub RC,RA,RD table");
    run_words(ends[3], ends[4]);
    check_regs(8'h02, 8'h23, 8'h00, 8'hFE, "memory example setup");
    run_words(ends[4], ends[5]);
    check_regs(8'h02, 8'h23, 8'h44, 8'hFE, "ld RA,RC table");
    check(dut.u_dmem.mem[8'h00] == 8'hC3 && dut.u_dmem.mem[8'h01] == 8'h85 &&
          dut.u_dmem.mem[8'h02] == 8'h44 && dut.u_dmem.mem[8'hFE] == 8'h23 &&
          dut.u_dmem.mem[8'hFF] == 8'h2B, "memory table after st RD,RB");
    run_words(ends[5], ends[6]);
    check(regs[0] == 8'h12, "ldi RA,0x12");
    check(regs[3] == 8'hE4, "ldi RD field 0x24 sign-extended to E4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
