// scp_regfile: the four 8-bit data registers A, B, C and D.
//
// Two asynchronous read ports (Reg 1 and Reg 2 of the instruction) and one
// synchronous write port (W Reg), so an instruction reads its operands and
// writes its result in the same clock cycle; a register read and written in
// one cycle gives its old value and takes the new one at the rising edge.
// Register codes: 00 = A, 01 = B, 10 = C, 11 = D. The register count and width
// follow the instruction set; the port structure and the synchronous
// active-low reset to zero are this design's choices. All four registers are
// also brought out on regs for observation.
module scp_regfile
  import scp_pkg::*;
#(
  parameter int unsigned NREGS = 4,
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [WIDTH-1:0]         wd,
  output logic [WIDTH-1:0]         regs [NREGS]
);

  logic [WIDTH-1:0] r [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) r[i] <= '0;
    end else if (we) begin
      r[wa] <= wd;
    end
  end

  assign rd1  = r[ra1];
  assign rd2  = r[ra2];
  assign regs = r;

endmodule
