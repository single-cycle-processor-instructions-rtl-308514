// scp_imem: instruction memory, an array-based ROM of constants.
//
// 4 Kb organised as 256 words of 16 bits (the x16 configuration), with an
// asynchronous address and an asynchronous read: the word appears on instr in
// the same cycle as its address, which a single-cycle processor needs. The
// address is a byte address, as produced by the fetch sequencer; bit 0 would
// select a byte inside a word and is ignored, so addr[ADDR_W-1:1] picks the
// word. The contents are the constant parameter CONTENTS, word i in bits
// [16*i +: 16]; being a constant, it survives synthesis as ROM logic. Size and
// asynchronous behaviour follow the fetch description; passing the contents
// as a parameter is this design's choice.
module scp_imem #(
  parameter int unsigned                         WORDS    = 256,
  parameter int unsigned                         ADDR_W   = 9,
  parameter logic [WORDS*scp_pkg::INSTR_W-1:0]  CONTENTS = scp_program_pkg::default_program()
) (
  input  logic [ADDR_W-1:0]           addr,
  output logic [scp_pkg::INSTR_W-1:0] instr
);

  localparam int unsigned W = scp_pkg::INSTR_W;

  logic [W-1:0] rom [WORDS];
  logic         unused_byte_sel;

  always_comb begin
    for (int i = 0; i < int'(WORDS); i++) rom[i] = CONTENTS[i*W +: W];
  end

  assign unused_byte_sel = addr[0];
  assign instr           = rom[addr[ADDR_W-1:1]];

endmodule
