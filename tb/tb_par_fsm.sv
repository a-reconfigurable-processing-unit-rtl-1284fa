// tb_par_fsm - runs the parallel controller with a modelled pattern source of
// 5 patterns and checks one evaluation cycle per pattern, no restart in the
// middle, and the done state.
module tb_par_fsm;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic start, pat_last;
  logic eval, restart, advance, init, busy, done;
  int pidx;

  par_fsm dut (.clk(clk), .rst_n(rst_n), .start_i(start), .pat_last_i(pat_last),
    .eval_o(eval), .tpg_restart_o(restart), .tpg_advance_o(advance), .init_o(init),
    .busy_o(busy), .done_o(done));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (restart) pidx <= 0;
    else if (advance) pidx <= pidx + 1;
  end
  assign pat_last = (pidx === 4);

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
    chk(!busy && !done && !eval, "idle");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      #1 chk(init && restart, "start pulse");
      @(posedge clk); #1 start = 0;
      n = 0;
      while (eval) begin
        chk(pidx === n, $sformatf("pattern %0d at step %0d", pidx, n));
        chk(!restart, "no restart");
        n++;
        @(posedge clk); #1;
      end
      chk(n === 5, $sformatf("cycles %0d", n));
      chk(done && !busy, "done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
