// tb_scp_dmem: self-checking test of scp_dmem.
//
// Reproduces the memory example of the instruction set (bytes C3, 85, 44 at
// 0x00-0x02 and 23, 2B at 0xFE-0xFF; ld from 0x02 returns 44, st of 23 to
// 0xFE), then writes every address with a value derived from the address and
// random data, checking reads against a model array in the testbench, that
// reads are asynchronous and that we low leaves memory unchanged.
module tb_scp_dmem;

  logic       clk = 1'b0;
  logic [7:0] addr, rdata, wdata;
  logic       we;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  scp_dmem #(.ADDR_W(8), .WIDTH(8)) dut (
    .clk(clk), .addr(addr), .rdata(rdata), .we(we), .wdata(wdata));

  always #5 clk = ~clk;

  task automatic wr(int a, logic [7:0] d, bit en);
    @(negedge clk);
    addr = 8'(a); wdata = d; we = en;
    @(posedge clk);
    if (en) model[a] = d;
    #1 we = 1'b0;
  endtask

  task automatic rd(int a);
    addr = 8'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL read %h got %h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) model[i] = 8'h00;
    rd(8'h10); rd(8'hFF);
    wr(8'h00, 8'hC3, 1); wr(8'h01, 8'h85, 1); wr(8'h02, 8'h44, 1);
    wr(8'hFE, 8'h23, 1); wr(8'hFF, 8'h2B, 1);
    rd(8'h02);
    wr(8'hFE, 8'h23, 1);
    rd(8'hFE); rd(8'h00); rd(8'h01); rd(8'hFF);
    wr(8'h01, 8'h00, 0);
    rd(8'h01);
    for (int i = 0; i < 256; i++) wr(i, 8'(i * 13 + 7), 1);
    for (int i = 0; i < 256; i++) rd(i);
    for (int i = 0; i < 500; i++) begin
      wr($urandom_range(0, 255), 8'($urandom), 1'($urandom));
      rd($urandom_range(0, 255));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
