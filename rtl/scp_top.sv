// scp_top: single-cycle Harvard load/store processor with 8-bit data.
//
// Every clock cycle in which the sequencer is running executes one complete
// 16-bit instruction: the sequencer's byte address selects a word of the
// instruction ROM, the decoder splits it into fields and control, the
// register file delivers Reg 1 and Reg 2, the ALU combines them, and at the
// rising edge the result (ALU output, data memory byte or immediate) is
// written to W Reg, or for st the Reg 2 value is written to the data memory
// at the address held in Reg 1. There is no pipeline and no stall: CPI is 1.
// Register and memory writes are enabled only while run is high, so an idle
// processor holds its state.
//
// Operation: pulse start for one cycle with st_addr (a byte address, even)
// and inst_cnt (number of instructions). The first instruction executes in
// the next cycle; run stays high for exactly inst_cnt cycles and done pulses
// in the cycle after the last one. The program is the ROM's constant contents,
// given by the PROGRAM parameter (by default the demonstration program of
// scp_program_pkg). The structure (sequencer, instruction ROM, four
// registers, ALU, separate data memory) and the instruction set follow the
// design description; the start/run/done handshake and the observation
// ports (regs, fetch_addr, instr) are this design's choices.
module scp_top
  import scp_pkg::*;
#(
  parameter int unsigned IMEM_WORDS   = 256,  // 4 Kb as 256 x 16
  parameter int unsigned PC_W         = 9,    // byte address of the instruction ROM
  parameter int unsigned CNT_W        = 9,
  parameter logic [IMEM_WORDS*INSTR_W-1:0] PROGRAM = scp_program_pkg::default_program()
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [PC_W-1:0]    st_addr,
  input  logic [CNT_W-1:0]   inst_cnt,
  output logic               run,
  output logic               done,
  output logic [PC_W-1:0]    fetch_addr,
  output logic [INSTR_W-1:0] instr,
  output logic [DATA_W-1:0]  regs [4]
);

  opcode_e             op;
  logic [REG_AW-1:0]   reg1, reg2, wreg;
  logic [DATA_W-1:0]   imm_ext;
  ctrl_t               ctrl;
  logic [DATA_W-1:0]   rd1, rd2, alu_y, mem_rdata, wb_data;
  logic                unused_op;

  scp_sequencer #(.ADDR_W(PC_W), .CNT_W(CNT_W)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .st_addr  (st_addr),
    .inst_cnt (inst_cnt),
    .addr     (fetch_addr),
    .run      (run),
    .done     (done)
  );

  scp_imem #(.WORDS(IMEM_WORDS), .ADDR_W(PC_W), .CONTENTS(PROGRAM)) u_imem (
    .addr  (fetch_addr),
    .instr (instr)
  );

  scp_decoder u_dec (
    .instr   (instr),
    .op      (op),
    .reg1    (reg1),
    .reg2    (reg2),
    .wreg    (wreg),
    .imm_ext (imm_ext),
    .ctrl    (ctrl)
  );

  assign unused_op = ^op;

  scp_regfile u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .ra1   (reg1),
    .ra2   (reg2),
    .rd1   (rd1),
    .rd2   (rd2),
    .we    (run && ctrl.reg_we),
    .wa    (wreg),
    .wd    (wb_data),
    .regs  (regs)
  );

  scp_alu u_alu (
    .a  (rd1),
    .b  (rd2),
    .op (ctrl.alu_op),
    .y  (alu_y)
  );

  scp_dmem #(.ADDR_W(DATA_W), .WIDTH(DATA_W)) u_dmem (
    .clk   (clk),
    .addr  (rd1),
    .rdata (mem_rdata),
    .we    (run && ctrl.mem_we),
    .wdata (rd2)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = mem_rdata;
      WB_IMM:  wb_data = imm_ext;
      default: wb_data = alu_y;
    endcase
  end

endmodule
