// par_fsm - controller of the parallel compile-time-reconfiguration (CTR)
// hardware block.
//
// All faults are built into separate CUT copies, so the controller injects
// nothing: after start_i it applies one test pattern per clock to all copies
// at once until the pattern generator reports the last one. A test takes as
// many RUN cycles as there are patterns (the published 4 cycles for c17 with
// 4 deterministic patterns). The flow is the published one.
module par_fsm (
  input  logic clk,
  input  logic rst_n,
  input  logic start_i,
  input  logic pat_last_i,
  output logic eval_o,
  output logic tpg_restart_o,
  output logic tpg_advance_o,
  output logic init_o,
  output logic busy_o,
  output logic done_o
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e state_q;
  logic   accept;

  assign accept = start_i && (state_q != S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  state_q <= S_IDLE;
    else if (accept)                             state_q <= S_RUN;
    else if (state_q == S_RUN && pat_last_i)     state_q <= S_DONE;
  end

  always_comb begin
    eval_o        = (state_q == S_RUN);
    init_o        = accept;
    tpg_restart_o = accept;
    tpg_advance_o = eval_o && !pat_last_i;
    busy_o        = (state_q == S_RUN);
    done_o        = (state_q == S_DONE);
  end
endmodule
