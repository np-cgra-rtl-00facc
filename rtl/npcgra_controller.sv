// npcgra_controller: context sequencer of NP-CGRA.
//
// A kernel is a software-pipelined loop: prologue contexts 0 .. loop_start-1
// run once, the loop body loop_start .. loop_end runs loop_cnt times (one
// iteration per II cycles, II being the body length), and the epilogue
// loop_end+1 .. last_pc runs once. The controller issues one context address
// per cycle to the configuration memory, with no gap between contexts.
// Timing: start (a pulse while idle) issues context 0 in the same cycle and
// pulses agu_restart; the context word executes one cycle after it is issued
// (ctx_valid marks those cycles). done pulses in the cycle after the last
// context executed, and busy is high from start until done. loop_cnt = 0 is
// treated as 1. The architecture only calls this unit the CGRA controller;
// this loop scheme is this design's choice.
module npcgra_controller #(
  parameter int unsigned PCW = 5,
  parameter int unsigned LCW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [PCW-1:0] loop_start,
  input  logic [PCW-1:0] loop_end,
  input  logic [PCW-1:0] last_pc,
  input  logic [LCW-1:0] loop_cnt,
  output logic           cfg_rd,
  output logic [PCW-1:0] cfg_addr,
  output logic           ctx_valid,
  output logic           agu_restart,
  output logic           busy,
  output logic           done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e         state;
  logic [PCW-1:0] pc;
  logic [LCW-1:0] iter;
  logic [PCW-1:0] next_pc;
  logic           last_issue;
  logic [LCW-1:0] iter_cur;     // iteration count seen by the issue logic
  logic           wrap;

  // Issue address: start issues context 0 immediately.
  assign cfg_rd     = (state == S_IDLE && start) || state == S_RUN;
  assign cfg_addr   = (state == S_RUN) ? pc : '0;
  assign agu_restart= (state == S_IDLE && start);
  assign busy       = (state != S_IDLE);

  assign iter_cur = (state == S_RUN) ? iter : '0;
  assign wrap     = (cfg_addr == loop_end) && ((iter_cur + 1'b1) < loop_cnt);

  always_comb begin
    last_issue = 1'b0;
    next_pc    = cfg_addr + 1'b1;
    if (wrap)
      next_pc = loop_start;
    else if (cfg_addr == last_pc)
      last_issue = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pc        <= '0;
      iter      <= '0;
      ctx_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      ctx_valid <= cfg_rd;
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          iter  <= wrap ? LCW'(1) : '0;
          pc    <= next_pc;
          state <= last_issue ? S_DRAIN : S_RUN;
        end
        S_RUN: begin
          if (wrap) iter <= iter + 1'b1;
          pc <= next_pc;
          if (last_issue) state <= S_DRAIN;
        end
        S_DRAIN: begin   // last context executing this cycle
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
