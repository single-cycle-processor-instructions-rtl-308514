// scp_dmem: data memory, one byte per address.
//
// Kept apart from the instruction memory (Harvard organisation). The address
// comes from a data register, so 8 address bits reach 256 bytes. Reads are
// asynchronous, so ld returns its byte in the same cycle; writes take effect
// at the rising clock edge when we is high. In simulation the contents start
// as all zeros. The separate memory, the byte
// width and the register addressing follow the instruction set; the depth of
// 256, the asynchronous read, the synchronous write and the initial contents
// are this design's choices.
module scp_dmem #(
  parameter int unsigned ADDR_W    = 8,
  parameter int unsigned WIDTH     = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  rdata,
  input  logic              we,
  input  logic [WIDTH-1:0]  wdata
);

  logic [WIDTH-1:0] mem [2**ADDR_W];

  initial begin
    for (int i = 0; i < 2**ADDR_W; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
