// scp_alu: the processor's arithmetic and logic unit.
//
// Combinational; y = a fn b for the seven register-register operations:
// or, and, nor, nand, add, sub (a - b) and slt (y = 1 when a < b, else 0).
// add, sub and slt share one adder: sub and slt compute a + ~b + 1. slt
// compares the operands as signed two's complement numbers, taking the sign
// of the difference corrected by the overflow. Results wrap modulo 2**WIDTH;
// no flags are produced. The operation set follows the instruction set; the
// shared adder, the signed compare and the absence of flags are this design's
// choices.
module scp_alu
  import scp_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_op_e          op,
  output logic [WIDTH-1:0] y
);

  logic             subtract;
  logic [WIDTH-1:0] b_in;
  logic [WIDTH-1:0] sum;
  logic             unused_cout;
  logic             overflow;
  logic             less;

  assign subtract = (op == ALU_SUB) || (op == ALU_SLT);
  assign b_in     = subtract ? ~b : b;

  scp_adder #(.WIDTH(WIDTH)) u_add (
    .a    (a),
    .b    (b_in),
    .cin  (subtract),
    .sum  (sum),
    .cout (unused_cout)
  );

  // Signed overflow of a + b_in; a < b exactly when sign(a-b) differs from it.
  assign overflow = (a[WIDTH-1] == b_in[WIDTH-1]) && (sum[WIDTH-1] != a[WIDTH-1]);
  assign less     = sum[WIDTH-1] ^ overflow;

  always_comb begin
    unique case (op)
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      ALU_NOR:  y = ~(a | b);
      ALU_NAND: y = ~(a & b);
      ALU_ADD:  y = sum;
      ALU_SUB:  y = sum;
      ALU_SLT:  y = {{(WIDTH-1){1'b0}}, less};
      default:  y = '0;
    endcase
  end

endmodule
