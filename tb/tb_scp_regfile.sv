// tb_scp_regfile: self-checking test of scp_regfile.
//
// Resets the file, loads the A-D values of the instruction-set example
// (12, 23, 35, F5), then performs random writes and reads, checking both
// read ports and the observation outputs against a register model kept in
// the testbench. Also checks that a write appears only after the clock edge
// and that nothing changes while we is low.
module tb_scp_regfile;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] ra1, ra2, wa;
  logic [7:0] rd1, rd2, wd;
  logic       we;
  logic [7:0] regs [4];
  logic [7:0] model [4];
  int checks = 0, failures = 0;

  scp_regfile dut (
    .clk(clk), .rst_n(rst_n), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2),
    .we(we), .wa(wa), .wd(wd), .regs(regs));

  always #5 clk = ~clk;

  task automatic check_all(string what);
    for (int i = 0; i < 4; i++) begin
      ra1 = 2'(i); ra2 = 2'(3 - i);
      #1;
      checks++;
      if (rd1 !== model[i] || rd2 !== model[3-i] || regs[i] !== model[i]) begin
        failures++;
        $display("FAIL %s reg %0d: rd1=%h rd2=%h regs=%h model=%h/%h",
                 what, i, rd1, rd2, regs[i], model[i], model[3-i]);
      end
    end
  endtask

  task automatic write(int a, logic [7:0] d, bit en);
    @(negedge clk);
    wa = 2'(a); wd = d; we = en;
    ra1 = 2'(a); #1;
    checks++;
    if (rd1 !== model[a]) begin
      failures++;
      $display("FAIL write visible before the clock edge");
    end
    @(posedge clk);
    if (en) model[a] = d;
    #1;
    we = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) model[i] = 8'h00;
    check_all("after reset");
    write(0, 8'h12, 1); write(1, 8'h23, 1); write(2, 8'h35, 1); write(3, 8'hF5, 1);
    check_all("example values");
    write(2, 8'hAA, 0);
    check_all("we low");
    for (int i = 0; i < 300; i++) begin
      write($urandom_range(0, 3), 8'($urandom), 1'($urandom));
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
