// scp_sequencer: instruction fetch sequencer (address register of the
// instruction memory).
//
// It takes the place of a free-running program counter. While idle it waits
// for start; on a start with a non-zero inst_cnt it loads st_addr as the
// fetch address and enters RUN. In RUN the instruction at addr is executed in
// the current cycle (run = 1) and at the clock edge the address steps by 2,
// since instruction memory is byte addressed and instructions are two bytes
// wide. After inst_cnt instructions it returns to IDLE and pulses done for one
// cycle. The address register itself is an scp_pc (register plus "+2"
// adder) that this FSM loads and steps. The Start, St_addr and inst_cnt
// inputs, the byte addressing and the step of 2 follow the fetch
// description; the two-state FSM, the active-low synchronous reset,
// ignoring start while running, and the address and count widths are this
// design's choices.
//
// Timing: start is sampled at a rising edge; the first instruction executes in
// the following cycle, and a run of N instructions occupies exactly N cycles
// with run high. The address wraps modulo 2**ADDR_W.
module scp_sequencer #(
  parameter int unsigned ADDR_W = 9,   // byte address: 256 words x 2 bytes
  parameter int unsigned CNT_W  = 9    // up to 2**CNT_W - 1 instructions per run
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] st_addr,
  input  logic [CNT_W-1:0]  inst_cnt,
  output logic [ADDR_W-1:0] addr,
  output logic              run,
  output logic              done
);

  typedef enum logic {S_IDLE = 1'b0, S_RUN = 1'b1} state_e;

  state_e           state;
  logic [CNT_W-1:0] remaining;
  logic             load, inc;

  // Load the start address when a run begins; step by 2 while running.
  assign load = (state == S_IDLE) && start && (inst_cnt != '0);
  assign inc  = (state == S_RUN);

  scp_pc #(.ADDR_W(ADDR_W), .STEP(2)) u_pc (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (load),
    .load_addr (st_addr),
    .inc       (inc),
    .addr      (addr)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      remaining <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (load) begin
            remaining <= inst_cnt;
            state     <= S_RUN;
          end
        end
        S_RUN: begin
          remaining <= remaining - 1'b1;
          if (remaining == CNT_W'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign run = (state == S_RUN);

  // Handshake rules: done follows the last instruction, never during a run;
  // a run never starts with a zero count.
  a_done_not_running: assert property (@(posedge clk) disable iff (!rst_n) done |-> !run);
  a_count_nonzero:    assert property (@(posedge clk) disable iff (!rst_n) run |-> remaining != '0);

endmodule
