// tb_scp_pc: self-checking test of scp_pc.
//
// Applies random sequences of load, increment and hold on a 9-bit, step-2
// program counter and compares the address with a model kept in the
// testbench after every clock edge, including load taking priority over
// increment, wrap-around at the top of the address space, and reset.
module tb_scp_pc;

  logic       clk = 1'b0;
  logic       rst_n, load, inc;
  logic [8:0] load_addr, addr;
  int unsigned model;
  int checks = 0, failures = 0;

  scp_pc dut (.clk(clk), .rst_n(rst_n), .load(load), .load_addr(load_addr),
              .inc(inc), .addr(addr));

  always #5 clk = ~clk;

  task automatic step(bit l, int unsigned la, bit i);
    @(negedge clk);
    load = l; load_addr = 9'(la); inc = i;
    @(posedge clk);
    if (l) model = la % 512;
    else if (i) model = (model + 2) % 512;
    #1;
    checks++;
    if (addr !== 9'(model)) begin
      failures++;
      $display("FAIL load=%b inc=%b: addr %h expected %h", l, i, addr, model);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; inc = 1'b1; load_addr = '0;
    repeat (2) @(negedge clk);
    #1;
    checks++;
    if (addr !== '0) begin failures++; $display("FAIL reset"); end
    inc = 1'b0;
    rst_n = 1'b1;
    model = 0;
    step(0, 0, 1); step(0, 0, 1); step(0, 0, 0);
    step(1, 9'h1FC, 0); step(0, 0, 1); step(0, 0, 1); step(0, 0, 1);   // wraps
    step(1, 9'h140, 1);                                                 // load wins
    for (int k = 0; k < 500; k++) step($urandom_range(0, 9) == 0, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
