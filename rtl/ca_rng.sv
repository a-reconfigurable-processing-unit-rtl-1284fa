// ca_rng - pseudo-random number generator built as a one-dimensional hybrid
// cellular automaton (CA) of W cells with null (constant-0) boundaries.
//
// Each cell i follows one of two rules, chosen by bit i of RULE150:
//   rule 90 : y_i(t+1) = y_{i-1}(t) ^ y_{i+1}(t)
//   rule 150: y_i(t+1) = y_{i-1}(t) ^ y_i(t) ^ y_{i+1}(t)
// The two rules are the published ones; the rule of each cell is this design's
// choice. With W = 16 and RULE150 = 16'h0015 (rule 150 in cells 0, 2 and 4,
// rule 90 elsewhere) the automaton runs through all 65535 non-zero states
// before repeating. The all-zero state would stay at zero, so a zero seed is
// replaced by 1.
//
// Timing: load_i copies the seed into the cells at the next clock edge; step_i
// advances the automaton by one generation per clock edge. load_i wins.
module ca_rng #(
  parameter int unsigned   W       = 16,
  parameter logic [W-1:0]  RULE150 = 16'h0015
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [W-1:0] seed_i,
  input  logic         step_i,
  output logic [W-1:0] state_o
);
  logic [W-1:0] state_q;
  logic [W-1:0] next_state;

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      logic left, right;
      left  = (i > 0)     ? state_q[i-1] : 1'b0;
      right = (i < W - 1) ? state_q[i+1] : 1'b0;
      next_state[i] = left ^ right ^ (RULE150[i] & state_q[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= W'(1);
    end else if (load_i) begin
      state_q <= (seed_i == '0) ? W'(1) : seed_i;
    end else if (step_i) begin
      state_q <= next_state;
    end
  end

  assign state_o = state_q;
endmodule
