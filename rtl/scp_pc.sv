// scp_pc: program counter, the address register of the instruction memory.
//
// Holds the byte address of the instruction being executed. On a clock edge
// with load high it takes load_addr; with inc high it advances to
// addr + STEP through an scp_adder; otherwise it holds. load wins over inc.
// Instructions are two bytes wide in a byte-addressed memory, hence the
// default STEP of 2. The register and its "+2" adder follow the fetch path;
// the load port (used by the sequencer to set a start address), the hold
// state and the synchronous active-low reset to 0 are this design's choices.
module scp_pc #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned STEP   = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic              inc,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] addr_next;
  logic              unused_cout;

  scp_adder #(.WIDTH(ADDR_W)) u_inc (
    .a    (addr),
    .b    (ADDR_W'(STEP)),
    .cin  (1'b0),
    .sum  (addr_next),
    .cout (unused_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    addr <= '0;
    else if (load) addr <= load_addr;
    else if (inc)  addr <= addr_next;
  end

endmodule
