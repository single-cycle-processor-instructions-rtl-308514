// tb_scp_alu: self-checking test of scp_alu.
//
// Applies the operand pairs of the instruction-set examples and random
// operands to every operation, and compares the result with a reference
// computed here with integer arithmetic (slt as a signed comparison).
module tb_scp_alu;
  import scp_pkg::*;

  logic [7:0] a, b, y;
  alu_op_e    op;
  int checks = 0, failures = 0;

  scp_alu dut (.a(a), .b(b), .op(op), .y(y));

  function automatic logic [7:0] model(alu_op_e o, logic [7:0] x, logic [7:0] z);
    int sx, sz;
    sx = int'($signed(x));
    sz = int'($signed(z));
    case (o)
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      ALU_NOR:  return ~(x | z);
      ALU_NAND: return ~(x & z);
      ALU_ADD:  return 8'(int'(x) + int'(z));
      ALU_SUB:  return 8'(int'(x) - int'(z));
      ALU_SLT:  return (sx < sz) ? 8'd1 : 8'd0;
      default:  return 8'd0;
    endcase
  endfunction

  task automatic apply(alu_op_e o, logic [7:0] x, logic [7:0] z, logic [7:0] expect_y);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h expected %h", o.name(), x, z, y, expect_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked examples: add RA,RB,RC with A=12 B=23; or RB,RD with B=23 D=F5;
    // sub RC,RA with C=35 A=12.
    apply(ALU_ADD, 8'h12, 8'h23, 8'h35);
    apply(ALU_OR,  8'h23, 8'hF5, 8'hF7);
    apply(ALU_SUB, 8'h35, 8'h12, 8'h23);
    apply(ALU_SLT, 8'h35, 8'h12, 8'h00);
    apply(ALU_SLT, 8'h12, 8'h35, 8'h01);
    apply(ALU_SLT, 8'hE0, 8'h12, 8'h01);   // -32 < 18
    apply(ALU_SLT, 8'h7F, 8'h80, 8'h00);   // 127 > -128 (overflowing difference)
    apply(ALU_SLT, 8'h80, 8'h7F, 8'h01);
    apply(ALU_SLT, 8'h44, 8'h44, 8'h00);
    apply(ALU_NAND, 8'h12, 8'hE0, 8'hFF);
    apply(ALU_NOR,  8'h12, 8'hE0, 8'h0D);
    apply(ALU_AND,  8'hF5, 8'h23, 8'h21);
    for (int i = 0; i < 3000; i++) begin
      alu_op_e o;
      logic [7:0] x, z;
      o = alu_op_e'($urandom_range(0, 6));
      x = 8'($urandom);
      z = 8'($urandom);
      apply(o, x, z, model(o, x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
