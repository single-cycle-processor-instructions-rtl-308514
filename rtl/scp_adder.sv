// scp_adder: WIDTH-bit binary adder with carry in and carry out.
//
// sum = a + b + cin, with the carry out of the top bit on cout. It is purely
// combinational. The processor uses one for the fetch address increment (the
// "+2" adder of the fetch path) and one inside the ALU for add, sub and slt.
// The fetch path is drawn with an ALU symbol, standing for an optimised adder
// whose structure is not given; this design writes it as a plain '+' and leaves
// the adder architecture to synthesis. WIDTH is this design's choice per use.
module scp_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    {cout, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, cin};
  end

endmodule
