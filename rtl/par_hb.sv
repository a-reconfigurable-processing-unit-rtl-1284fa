// par_hb - parallel compile-time-reconfiguration (CTR) hardware block: the
// built-in self-test of one circuit under test with every stuck-at fault
// evaluated at once.
//
// The CUT is instantiated N_FAULT = 2 x lines times, copy g with fault g+1
// fixed in its fault vector (a constant, so synthesis folds each FIM into the
// hard-wired fault). Each copy has its own compressors and comparators
// #1-#4 and is compared with one shared fault-free copy. One test pattern is
// applied to all copies per clock, so a test takes as many cycles as there
// are patterns: 4 for c17 deterministic, 63 for 63 random patterns, i.e.
// N_FAULT times fewer than the sequential block.
//
// Counters #1-#4 count each fault once, on its first detection. Several faults
// may be detected in one cycle, so a log word is written per pattern that
// detects at least one new fault: {pattern, fault-free response, bit mask of
// newly detected faults}; mask bit g is fault index g+1 (line (g/2)+1,
// stuck-at-0 for even g, stuck-at-1 for odd g). The read port has one cycle
// of latency. The replicated structure follows the published design; the log
// word layout is this design's.
module par_hb
  import bist_pkg::*;
#(
  parameter cut_e         CUT     = CUT_C17,
  parameter int unsigned  CW      = 16,
  localparam int unsigned N_IN    = cut_n_in(CUT),
  localparam int unsigned N_OUT   = cut_n_out(CUT),
  localparam int unsigned N_FAULT = cut_n_fault(CUT),
  localparam int unsigned LW      = N_IN + N_OUT + N_FAULT,
  localparam int unsigned AW      = $clog2(N_FAULT)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start_i,
  input  tpg_mode_e                mode_i,
  input  logic [15:0]              n_rand_i,
  input  logic [15:0]              seed_i,
  output logic                     busy_o,
  output logic                     done_o,
  output logic [N_CMP-1:0][CW-1:0] count_o,
  output logic [31:0]              cycles_o,
  output logic [AW:0]              log_count_o,
  input  logic [AW-1:0]            log_rd_addr_i,
  output logic [31:0]              log_rd_data_o
);
  logic                             eval, restart, advance, init;
  logic [N_IN-1:0]                  pattern;
  logic [15:0]                      pat_index;
  logic                             pat_last;
  logic [N_OUT-1:0]                 resp_good;
  logic [N_FAULT-1:0][N_CMP-1:0]    detect;
  logic [N_FAULT-1:0][N_CMP-1:0]    new_det;
  logic [N_FAULT-1:0]               new_mask;
  logic [LW-1:0]                    log_word;
  logic [LW-1:0]                    log_rd_word;
  logic [31:0]                      cycles_q;
  logic                             overflow;

  par_fsm u_fsm (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (start_i),
    .pat_last_i   (pat_last),
    .eval_o       (eval),
    .tpg_restart_o(restart),
    .tpg_advance_o(advance),
    .init_o       (init),
    .busy_o       (busy_o),
    .done_o       (done_o)
  );

  tpg #(.CUT(CUT)) u_tpg (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode_i   (mode_i),
    .n_rand_i (n_rand_i),
    .seed_i   (seed_i),
    .restart_i(restart),
    .advance_i(advance),
    .pattern_o(pattern),
    .index_o  (pat_index),
    .last_o   (pat_last)
  );

  cut_fim #(.CUT(CUT)) u_cut_good (
    .pattern_i  (pattern),
    .fault_sel_i((N_FAULT+1)'(1)),
    .response_o (resp_good)
  );

  for (genvar g = 0; g < N_FAULT; g++) begin : g_lane
    logic [N_OUT-1:0] resp_faulty;

    cut_fim #(.CUT(CUT)) u_cut (
      .pattern_i  (pattern),
      .fault_sel_i((N_FAULT+1)'(1) << (g + 1)),
      .response_o (resp_faulty)
    );

    output_evaluator #(.N_OUT(N_OUT)) u_eval (
      .faulty_i(resp_faulty),
      .good_i  (resp_good),
      .detect_o(detect[g])
    );

    assign new_mask[g] = new_det[g][N_CMP-1];
  end

  fault_counters #(.LANES(N_FAULT), .CW(CW)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear_i   (init),
    .flag_clr_i(1'b0),
    .valid_i   (eval),
    .detect_i  (detect),
    .new_o     (new_det),
    .count_o   (count_o)
  );

  assign log_word = {pattern, resp_good, new_mask};

  fault_log_mem #(.W(LW), .DEPTH(N_FAULT)) u_log (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear_i   (init),
    .we_i      (|new_mask),
    .wdata_i   (log_word),
    .rd_addr_i (log_rd_addr_i),
    .rd_data_o (log_rd_word),
    .count_o   (log_count_o),
    .overflow_o(overflow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cycles_q <= '0;
    else if (init) cycles_q <= '0;
    else if (eval) cycles_q <= cycles_q + 32'd1;
  end

  assign cycles_o      = cycles_q;
  assign log_rd_data_o = 32'(log_rd_word);

  // Every logged pattern detects at least one new fault, so at most N_FAULT.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !overflow);

  logic unused;
  assign unused = ^pat_index;
endmodule
