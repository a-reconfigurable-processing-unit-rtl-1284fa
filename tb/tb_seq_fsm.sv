// tb_seq_fsm - runs the sequential controller with a modelled pattern source
// of 4 patterns and 6 faults and checks the visit order (faults outer,
// patterns inner, faults 1..6), the number of evaluation cycles (6 x 4 = 24),
// the restarts between faults and the done state.
module tb_seq_fsm;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic start, pat_last;
  logic [2:0] fault_idx;
  logic eval, restart, advance, flag_clr, init, busy, done;
  int pidx;

  seq_fsm #(.N_FAULT(6)) dut (.clk(clk), .rst_n(rst_n), .start_i(start), .pat_last_i(pat_last),
    .fault_idx_o(fault_idx), .eval_o(eval), .tpg_restart_o(restart), .tpg_advance_o(advance),
    .flag_clr_o(flag_clr), .init_o(init), .busy_o(busy), .done_o(done));

  always #5 clk = ~clk;

  // Pattern source model: 4 patterns per sequence.
  always_ff @(posedge clk) begin
    if (restart) pidx <= 0;
    else if (advance) pidx <= pidx + 1;
  end
  assign pat_last = (pidx === 3);

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n;
    start = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    chk(!busy && !done, "idle");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      #1 chk(init && restart, "start pulse");
      @(posedge clk); #1 start = 0;
      n = 0;
      while (eval) begin
        chk(fault_idx === 3'(n / 4 + 1), $sformatf("fault %0d at step %0d", fault_idx, n));
        chk(pidx === n % 4, $sformatf("pattern %0d at step %0d", pidx, n));
        chk(flag_clr === (n % 4 === 3), "flag clear");
        n++;
        @(posedge clk); #1;
      end
      chk(n === 24, $sformatf("cycles %0d", n));
      chk(done && !busy, "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
