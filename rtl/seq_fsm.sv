// seq_fsm - controller of the sequential compile-time-reconfiguration (CTR)
// hardware block.
//
// After start_i it injects fault 1, then applies every test pattern to the
// faulty CUT, one pattern per clock; when the pattern generator reports the
// last pattern it injects the next fault and restarts the pattern sequence in
// the same cycle, so no cycle is lost between faults. After the last pattern of
// fault N_FAULT it stops. A full test therefore takes N_FAULT x patterns
// cycles in RUN, the published 88 cycles for c17 with 4 patterns.
// The loop order (faults outside, patterns inside) is the published flow.
//
// Outputs: fault_idx_o is the current fault index (1..N_FAULT) of the
// one-hot fault vector; eval_o marks a cycle whose comparison counts;
// tpg_restart_o / tpg_advance_o drive the pattern generator; flag_clr_o tells
// the counters a new fault follows; init_o pulses when a test starts.
module seq_fsm #(
  parameter int unsigned N_FAULT = 22,
  localparam int unsigned FW     = $clog2(N_FAULT + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic          pat_last_i,
  output logic [FW-1:0] fault_idx_o,
  output logic          eval_o,
  output logic          tpg_restart_o,
  output logic          tpg_advance_o,
  output logic          flag_clr_o,
  output logic          init_o,
  output logic          busy_o,
  output logic          done_o
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e        state_q;
  logic [FW-1:0] fault_q;
  logic          accept;
  logic          last_fault;

  assign accept     = start_i && (state_q != S_RUN);
  assign last_fault = (fault_q == FW'(N_FAULT));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      fault_q <= '0;
    end else if (accept) begin
      state_q <= S_RUN;
      fault_q <= FW'(1);
    end else if (state_q == S_RUN && pat_last_i) begin
      if (last_fault) state_q <= S_DONE;
      else            fault_q <= fault_q + 1'b1;
    end
  end

  always_comb begin
    eval_o        = (state_q == S_RUN);
    init_o        = accept;
    tpg_restart_o = accept || (eval_o && pat_last_i && !last_fault);
    tpg_advance_o = eval_o && !pat_last_i;
    flag_clr_o    = eval_o && pat_last_i;
    busy_o        = (state_q == S_RUN);
    done_o        = (state_q == S_DONE);
  end

  assign fault_idx_o = fault_q;

  // A running test only ever injects faults 1..N_FAULT.
  a_fault_range: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == S_RUN |-> (fault_q >= FW'(1) && fault_q <= FW'(N_FAULT)));
endmodule
