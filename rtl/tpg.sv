// tpg - test pattern generator for one circuit under test.
//
// Two sources, chosen by mode_i when restart_i is given:
//   deterministic - a ROM of pre-computed patterns (bist_pkg::det_pattern),
//                   det_count(CUT) patterns long;
//   pseudo-random - the 16-cell cellular automaton ca_rng, n_rand_i patterns
//                   long. A CUT with fewer inputs takes the top bits of the
//                   automaton; a CUT with more would take the state repeated.
// Both pattern sources and the pattern counts used follow the published test
// sessions; the seed input and the bit mapping are this design's choices.
//
// Timing: restart_i (start of a pattern sequence) loads pattern 0 at the next
// clock edge; advance_i moves to the following pattern at the next edge.
// pattern_o and last_o describe the current pattern and are registered, so the
// consumer sees one new pattern every clock cycle. restart_i wins over
// advance_i. n_rand_i = 0 is treated as 1.
module tpg
  import bist_pkg::*;
#(
  parameter cut_e        CUT  = CUT_C17,
  localparam int unsigned N_IN = cut_n_in(CUT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  tpg_mode_e       mode_i,
  input  logic [15:0]     n_rand_i,  // pseudo-random test length
  input  logic [15:0]     seed_i,    // automaton seed
  input  logic            restart_i,
  input  logic            advance_i,
  output logic [N_IN-1:0] pattern_o,
  output logic [15:0]     index_o,   // position of the current pattern
  output logic            last_o     // current pattern is the last one
);
  localparam int unsigned REP = (N_IN + RNG_W - 1) / RNG_W;

  tpg_mode_e   mode_q;
  logic [15:0] idx_q;
  logic [15:0] length;
  logic [RNG_W-1:0] rng_state;
  logic [REP*RNG_W-1:0] rng_rep;
  logic [N_IN-1:0] rom_word;
  logic [N_IN-1:0] rng_word;

  ca_rng #(.W(RNG_W)) u_rng (
    .clk    (clk),
    .rst_n  (rst_n),
    .load_i (restart_i),
    .seed_i (seed_i),
    .step_i (advance_i && !restart_i),
    .state_o(rng_state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= TPG_DETERMINISTIC;
      idx_q  <= '0;
    end else if (restart_i) begin
      mode_q <= mode_i;
      idx_q  <= '0;
    end else if (advance_i) begin
      idx_q  <= idx_q + 16'd1;
    end
  end

  always_comb begin
    if (mode_q == TPG_DETERMINISTIC) length = 16'(det_count(CUT));
    else if (n_rand_i == '0)         length = 16'd1;
    else                             length = n_rand_i;
  end

  assign rng_rep  = {REP{rng_state}};
  assign rom_word = N_IN'(det_pattern(CUT, 32'(idx_q)));
  assign rng_word = N_IN'(rng_rep >> (REP * RNG_W - N_IN));

  assign pattern_o = (mode_q == TPG_DETERMINISTIC) ? rom_word : rng_word;
  assign index_o   = idx_q;
  assign last_o    = (idx_q == length - 16'd1);
endmodule
