// tb_scp_sequencer: self-checking test of scp_sequencer.
//
// Starts runs with random start addresses and instruction counts (including
// a zero count and a run that wraps the address) and checks, cycle by cycle,
// that run is high for exactly inst_cnt cycles, that the fetch address starts
// at st_addr and advances by 2 per instruction, that done pulses once in the
// cycle after the last instruction, and that start is ignored while running.
module tb_scp_sequencer;

  localparam int AW = 9;
  localparam int CW = 9;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  logic [AW-1:0] st_addr;
  logic [CW-1:0] inst_cnt;
  logic [AW-1:0] addr;
  logic          run, done;
  int checks = 0, failures = 0;

  scp_sequencer #(.ADDR_W(AW), .CNT_W(CW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .st_addr(st_addr),
    .inst_cnt(inst_cnt), .addr(addr), .run(run), .done(done));

  always #5 clk = ~clk;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t (addr=%h run=%b done=%b)", what, $time, addr, run, done);
    end
  endtask

  // One run: pulse start, then follow it to the end.
  task automatic do_run(int unsigned sa, int unsigned n, bit poke_start);
    int unsigned exp_addr;
    int cycles;
    @(negedge clk);
    start = 1'b1; st_addr = AW'(sa); inst_cnt = CW'(n);
    @(negedge clk);
    start = 1'b0; st_addr = '0; inst_cnt = '0;
    if (n == 0) begin
      expect_true(!run && !done, "zero count stays idle");
      return;
    end
    exp_addr = sa;
    cycles = 0;
    while (run) begin
      expect_true(addr == AW'(exp_addr), "fetch address sequence");
      expect_true(!done, "done low while running");
      if (poke_start && cycles == 1) begin
        start = 1'b1; st_addr = 9'h1F0; inst_cnt = 9'd3;
      end else begin
        start = 1'b0;
      end
      exp_addr = (exp_addr + 2) % (1 << AW);
      cycles++;
      @(negedge clk);
      if (cycles > 600) break;
    end
    start = 1'b0;
    expect_true(cycles == int'(n), $sformatf("run lasted %0d cycles, expected %0d", cycles, n));
    expect_true(done, "done pulses after the last instruction");
    @(negedge clk);
    expect_true(!done && !run, "done is a single-cycle pulse");
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 1'b0; st_addr = '0; inst_cnt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_true(!run && !done && addr == '0, "idle after reset");
    do_run(0, 5, 0);
    do_run(9'h040, 1, 0);
    do_run(9'h010, 0, 0);
    do_run(9'h1FC, 6, 0);       // wraps past the top of the address space
    do_run(9'h020, 8, 1);       // start asserted mid-run is ignored
    for (int i = 0; i < 20; i++) begin
      do_run($urandom_range(0, 255) * 2, $urandom_range(1, 40), 0);
    end
    // Idle: the address holds.
    begin
      logic [AW-1:0] held;
      held = addr;
      repeat (4) @(negedge clk);
      expect_true(addr == held && !run, "address holds while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
