// tb_scp_adder: self-checking test of scp_adder.
//
// Drives an 8-bit and a 9-bit instance with exhaustive corner values and
// random operands, and compares sum and carry out with integer arithmetic
// done in the testbench.
module tb_scp_adder;

  logic [7:0] a8, b8, s8;
  logic       c8_in, c8_out;
  logic [8:0] a9, b9, s9;
  logic       c9_in, c9_out;
  int checks = 0, failures = 0;

  scp_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(c8_in), .sum(s8), .cout(c8_out));
  scp_adder #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .cin(c9_in), .sum(s9), .cout(c9_out));

  task automatic check8(int unsigned x, int unsigned y, int unsigned c);
    int unsigned exp;
    a8 = 8'(x); b8 = 8'(y); c8_in = 1'(c);
    #1;
    exp = (x & 255) + (y & 255) + (c & 1);
    checks++;
    if (s8 !== 8'(exp) || c8_out !== 1'(exp >> 8)) begin
      failures++;
      $display("FAIL adder8 %0d+%0d+%0d got %0d c%0d", x & 255, y & 255, c & 1, s8, c8_out);
    end
  endtask

  task automatic check9(int unsigned x, int unsigned y, int unsigned c);
    int unsigned exp;
    a9 = 9'(x); b9 = 9'(y); c9_in = 1'(c);
    #1;
    exp = (x & 511) + (y & 511) + (c & 1);
    checks++;
    if (s9 !== 9'(exp) || c9_out !== 1'(exp >> 9)) begin
      failures++;
      $display("FAIL adder9 %0d+%0d+%0d got %0d c%0d", x & 511, y & 511, c & 1, s9, c9_out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check8(0, 0, 0); check8(255, 1, 0); check8(255, 0, 1); check8(255, 255, 1);
    check8(8'h12, 8'h23, 0); check8(8'h35, 8'hED, 1);
    check9(510, 2, 0); check9(511, 2, 0); check9(0, 2, 0);
    for (int i = 0; i < 2000; i++) begin
      check8($urandom, $urandom, $urandom);
      check9($urandom, $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
