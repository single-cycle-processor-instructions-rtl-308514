// tb_scp_top: end-to-end test of the single-cycle processor at its default
// parameters (256-word ROM holding the default program, 256-byte data memory).
//
// The testbench keeps its own instruction-set model: it takes the same
// program image, and for every cycle in which the processor runs it fetches
// the word at the sequencer's address, executes it on model registers and
// model memory, and after the clock edge compares all four registers. After
// each run it compares the whole data memory. It checks that every run
// executes exactly inst_cnt instructions, one per cycle, and that done
// pulses once at the end.
//
// Runs: the first program block (the worked register examples of the
// instruction set, slt both ways, ld/st), the second block at byte address
// 0x40 (negative immediates, an unassigned opcode), a run started while
// another is in progress (the start must be ignored), an idle period, and
// random runs over the program and the nop-filled rest of the ROM. Each
// mechanism is counted; one that never happened counts as a failure.
module tb_scp_top;
  import scp_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               start;
  logic [8:0]         st_addr;
  logic [8:0]         inst_cnt;
  logic               run, done;
  logic [8:0]         fetch_addr;
  logic [15:0]        instr;
  logic [7:0]         regs [4];

  logic [15:0] rom [256];
  logic [7:0]  m_regs [4];
  logic [7:0]  m_mem [256];
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_op [16];
  int n_slt_true = 0, n_slt_false = 0, n_ldi_neg = 0, n_ldi_pos = 0;
  int n_done = 0, n_start_ignored = 0, n_idle_hold = 0, n_wrap_runs = 0;

  scp_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .st_addr(st_addr),
    .inst_cnt(inst_cnt), .run(run), .done(done), .fetch_addr(fetch_addr),
    .instr(instr), .regs(regs));

  always #5 clk = ~clk;

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL %s at %0t", what, $time);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) fail(what);
  endtask

  // Execute one instruction on the model.
  task automatic model_exec(logic [15:0] w);
    logic [3:0] opv;
    logic [1:0] r1, r2, wr;
    logic [7:0] a, b, imm;
    opv = w[15:12]; r1 = w[11:10]; r2 = w[9:8]; wr = w[7:6];
    a = m_regs[r1]; b = m_regs[r2];
    imm = {{2{w[5]}}, w[5:0]};
    n_op[opv]++;
    case (opv)
      4'h0: m_regs[wr] = a | b;
      4'h1: m_regs[wr] = a & b;
      4'h2: m_regs[wr] = ~(a | b);
      4'h3: m_regs[wr] = ~(a & b);
      4'h4: m_regs[wr] = 8'(int'(a) + int'(b));
      4'h5: m_regs[wr] = 8'(int'(a) - int'(b));
      4'h6: begin
        if ($signed(a) < $signed(b)) begin m_regs[wr] = 8'd1; n_slt_true++; end
        else begin m_regs[wr] = 8'd0; n_slt_false++; end
      end
      4'h8: m_regs[wr] = m_mem[a];
      4'h9: m_mem[a] = b;
      4'hC: begin
        m_regs[wr] = imm;
        if (w[5]) n_ldi_neg++; else n_ldi_pos++;
      end
      default: ;   // nop and unassigned opcodes
    endcase
  endtask

  task automatic compare_regs(string what);
    for (int i = 0; i < 4; i++)
      check(regs[i] == m_regs[i],
            $sformatf("%s: reg %0d is %h, model %h", what, i, regs[i], m_regs[i]));
  endtask

  task automatic compare_mem();
    for (int i = 0; i < 256; i++)
      check(dut.u_dmem.mem[i] == m_mem[i],
            $sformatf("data memory %h is %h, model %h", i, dut.u_dmem.mem[i], m_mem[i]));
  endtask

  // Start a run and follow it to the end. With poke, start is raised again
  // in the middle of the run with other values, which must be ignored.
  task automatic do_run(int unsigned sa, int unsigned n, bit poke);
    int cycles;
    int unsigned exp_addr;
    @(negedge clk);
    start = 1'b1; st_addr = 9'(sa); inst_cnt = 9'(n);
    @(negedge clk);
    start = 1'b0; st_addr = '0; inst_cnt = '0;
    cycles = 0;
    exp_addr = sa;
    if ((sa + 2 * n) > 512) n_wrap_runs++;
    while (run) begin
      check(fetch_addr == 9'(exp_addr), "fetch address steps by 2");
      check(instr == rom[fetch_addr[8:1]], "fetched word matches the program");
      if (poke && cycles == 1) begin
        start = 1'b1; st_addr = 9'h100; inst_cnt = 9'd2;
        n_start_ignored++;
      end else begin
        start = 1'b0;
      end
      check(!done, "done low while running");
      model_exec(rom[fetch_addr[8:1]]);
      @(posedge clk);
      #1;
      compare_regs($sformatf("after word %h", exp_addr));
      exp_addr = (exp_addr + 2) % 512;
      cycles++;
      @(negedge clk);
      if (cycles > 600) break;
    end
    start = 1'b0;
    check(cycles == int'(n), $sformatf("run of %0d took %0d cycles", n, cycles));
    check(done, "done pulse at the end of the run");
    if (done) n_done++;
    compare_mem();
  endtask

  initial begin
    #2000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    begin
      logic [4095:0] img;
      img = scp_program_pkg::default_program();
      for (int i = 0; i < 256; i++) rom[i] = img[16*i +: 16];
    end
    for (int i = 0; i < 16; i++) n_op[i] = 0;
    for (int i = 0; i < 4; i++) m_regs[i] = 8'h00;
    for (int i = 0; i < 256; i++) m_mem[i] = 8'h00;

    rst_n = 1'b0; start = 1'b0; st_addr = '0; inst_cnt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare_regs("after reset");

    // First block, stopping after the worked examples to check them.
    do_run(9'h000, 6, 0);
    check(regs[0] == 8'h12 && regs[1] == 8'h23 && regs[2] == 8'h35,
          "add RA,RB,RC example: A=12 B=23 C=35");
    do_run(9'h00C, 3, 0);
    check(regs[1] == 8'hF7 && regs[3] == 8'h23,
          "or RB,RD,RB and sub RC,RA,RD examples: B=F7 D=23");
    do_run(9'h012, 19, 0);
    check(dut.u_dmem.mem[8'h02] == 8'h1C && dut.u_dmem.mem[8'hFE] == 8'h1C,
          "st to 0x02 and 0xFE");
    // Second block, with a start raised mid-run.
    do_run(9'h040, 11, 1);
    // Idle: nothing changes for a while.
    begin
      logic [7:0] held [4];
      held = regs;
      repeat (10) @(negedge clk);
      check(regs == held && !run, "state holds while idle");
      n_idle_hold++;
    end
    // Random runs, some of them through the nop-filled part of the ROM and
    // across the top of the address space.
    for (int k = 0; k < 60; k++) begin
      int unsigned sa, n;
      sa = (k % 5 == 4) ? 2 * $urandom_range(200, 255) : 2 * $urandom_range(0, 42);
      n  = $urandom_range(1, 60);
      do_run(sa, n, k % 7 == 3);
    end

    // Every mechanism must have happened.
    foreach (n_op[i]) if (i inside {0, 1, 2, 3, 4, 5, 6, 8, 9, 12, 15, 7})
      check(n_op[i] > 0, $sformatf("opcode %h never executed", i));
    check(n_slt_true > 0 && n_slt_false > 0, "slt both outcomes");
    check(n_ldi_neg > 0 && n_ldi_pos > 0, "ldi negative and positive immediates");
    check(n_done > 0, "done pulses");
    check(n_start_ignored > 0, "start ignored while running");
    check(n_idle_hold > 0, "idle hold");
    check(n_wrap_runs > 0, "fetch address wrap");
    $display("mechanisms: or=%0d and=%0d nor=%0d nand=%0d add=%0d sub=%0d slt=%0d/%0d ld=%0d st=%0d ldi=%0d/%0d nop=%0d unassigned=%0d done=%0d ignored_start=%0d wrap=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_slt_true, n_slt_false,
             n_op[8], n_op[9], n_ldi_pos, n_ldi_neg, n_op[15], n_op[7], n_done,
             n_start_ignored, n_wrap_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
