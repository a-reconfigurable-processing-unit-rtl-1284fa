// fault_counters - counters #1..#4: the number of distinct faults detected by
// each of the four comparators of a hardware block.
//
// The block evaluates LANES faults per clock (1 in the sequential block, one
// per CUT copy in the parallel block). For every lane and comparator a flag
// remembers that this lane's fault has already been detected, so a fault is
// counted once, by the first pattern that exposes it; later patterns that also
// expose it are not counted again. new_o marks the detections being counted in
// the current cycle and drives the fault memory.
//
// Timing: clear_i zeroes counts and flags at the next edge. flag_clr_i zeroes
// only the flags (the sequential block moves to another fault) after the
// current cycle has been counted. valid_i qualifies detect_i. Counting flags
// and a fault total of 2*lines follow the published results tables; per-fault
// de-duplication by flags is this design's realisation.
module fault_counters
  import bist_pkg::*;
#(
  parameter int unsigned LANES = 1,
  parameter int unsigned CW    = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear_i,
  input  logic                         flag_clr_i,
  input  logic                         valid_i,
  input  logic [LANES-1:0][N_CMP-1:0]  detect_i,
  output logic [LANES-1:0][N_CMP-1:0]  new_o,
  output logic [N_CMP-1:0][CW-1:0]     count_o
);
  logic [LANES-1:0][N_CMP-1:0] seen_q;
  logic [N_CMP-1:0][CW-1:0]    count_q;
  logic [N_CMP-1:0][CW-1:0]    add;

  assign new_o = valid_i ? (detect_i & ~seen_q) : '0;

  always_comb begin
    for (int unsigned k = 0; k < N_CMP; k++) begin
      add[k] = '0;
      for (int unsigned l = 0; l < LANES; l++) add[k] = add[k] + CW'(new_o[l][k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q  <= '0;
      count_q <= '0;
    end else if (clear_i) begin
      seen_q  <= '0;
      count_q <= '0;
    end else begin
      for (int unsigned k = 0; k < N_CMP; k++) count_q[k] <= count_q[k] + add[k];
      seen_q <= flag_clr_i ? '0 : (seen_q | new_o);
    end
  end

  assign count_o = count_q;
endmodule
