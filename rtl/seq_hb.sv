// seq_hb - sequential compile-time-reconfiguration (CTR) hardware block: a
// complete built-in self-test of one circuit under test (CUT) that injects
// its stuck-at faults one after the other.
//
// Datapath, one (fault, pattern) pair per clock:
//   tpg -> faulty CUT (fault vector = one-hot of the current fault)
//       -> fault-free CUT copy (fault-free signature of the same pattern)
//       -> output_evaluator (compressors #1-#3, comparators #1-#4)
//       -> fault_counters (counters #1-#4, each fault counted once)
//       -> fault_log_mem (one word per fault on its first detection by the
//          uncompressed comparator #4)
// seq_fsm runs faults in the outer loop and patterns in the inner loop. A
// clock counter counts the cycles of the test: 2 x lines x patterns, e.g. 88
// for c17 with its 4 deterministic patterns, 1386 with 63 random patterns.
//
// Log word, MSB first: {pattern, fault index, faulty response, fault-free
// response}; fault index 2j-1 is line j stuck-at-0, 2j line j stuck-at-1.
// The read port (log_rd_addr_i -> log_rd_data_o, zero-extended) has one cycle
// of latency. The block structure and loop order follow the published design;
// the log word layout and the port list are this design's.
module seq_hb
  import bist_pkg::*;
#(
  parameter cut_e         CUT     = CUT_C17,
  parameter int unsigned  CW      = 16,
  localparam int unsigned N_IN    = cut_n_in(CUT),
  localparam int unsigned N_OUT   = cut_n_out(CUT),
  localparam int unsigned N_FAULT = cut_n_fault(CUT),
  localparam int unsigned FW      = $clog2(N_FAULT + 1),
  localparam int unsigned LW      = N_IN + FW + 2 * N_OUT,
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
  logic [FW-1:0]      fault_idx;
  logic               eval, restart, advance, flag_clr, init;
  logic [N_IN-1:0]    pattern;
  logic [15:0]        pat_index;
  logic               pat_last;
  logic [N_FAULT:0]   fault_sel;
  logic [N_OUT-1:0]   resp_faulty, resp_good;
  logic [N_CMP-1:0]   detect;
  logic [N_CMP-1:0]   new_det;
  logic [LW-1:0]      log_word;
  logic [LW-1:0]      log_rd_word;
  logic [31:0]        cycles_q;
  logic               overflow;

  seq_fsm #(.N_FAULT(N_FAULT)) u_fsm (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_i      (start_i),
    .pat_last_i   (pat_last),
    .fault_idx_o  (fault_idx),
    .eval_o       (eval),
    .tpg_restart_o(restart),
    .tpg_advance_o(advance),
    .flag_clr_o   (flag_clr),
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

  // One-hot fault vector: only the current fault's FIM select bit is set.
  assign fault_sel = (N_FAULT+1)'(1) << fault_idx;

  cut_fim #(.CUT(CUT)) u_cut_faulty (
    .pattern_i  (pattern),
    .fault_sel_i(fault_sel),
    .response_o (resp_faulty)
  );

  cut_fim #(.CUT(CUT)) u_cut_good (
    .pattern_i  (pattern),
    .fault_sel_i((N_FAULT+1)'(1)),
    .response_o (resp_good)
  );

  output_evaluator #(.N_OUT(N_OUT)) u_eval (
    .faulty_i(resp_faulty),
    .good_i  (resp_good),
    .detect_o(detect)
  );

  fault_counters #(.LANES(1), .CW(CW)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear_i   (init),
    .flag_clr_i(flag_clr),
    .valid_i   (eval),
    .detect_i  (detect),
    .new_o     (new_det),
    .count_o   (count_o)
  );

  assign log_word = {pattern, fault_idx, resp_faulty, resp_good};

  fault_log_mem #(.W(LW), .DEPTH(N_FAULT)) u_log (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear_i   (init),
    .we_i      (new_det[N_CMP-1]),
    .wdata_i   (log_word),
    .rd_addr_i (log_rd_addr_i),
    .rd_data_o (log_rd_word),
    .count_o   (log_count_o),
    .overflow_o(overflow)
  );

  // Clock counter: cycles spent testing.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cycles_q <= '0;
    else if (init) cycles_q <= '0;
    else if (eval) cycles_q <= cycles_q + 32'd1;
  end

  assign cycles_o      = cycles_q;
  assign log_rd_data_o = 32'(log_rd_word);

  // Each fault is logged at most once, so the log can never overflow.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !overflow);

  logic unused;
  assign unused = ^pat_index;
endmodule
