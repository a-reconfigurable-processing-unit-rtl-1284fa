// tb_ca_rng - checks the cellular automaton against a shift-based reference
// for 2000 generations, the hold when step is low, the zero-seed guard, and
// that its period is the full 65535 states.
module tb_ca_rng;
  import bist_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic load, step;
  logic [15:0] seed, state, exp;

  ca_rng dut (.clk(clk), .rst_n(rst_n), .load_i(load), .seed_i(seed), .step_i(step), .state_o(state));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] e, string what);
    checks++;
    if (state !== e) begin
      failures++; $display("FAIL %s got %04h exp %04h", what, state, e);
    end
  endtask

  initial begin
    load = 0; step = 0; seed = 16'hACE1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1 load = 1;
    @(posedge clk); #1 load = 0;
    check(16'hACE1, "seed");
    exp = 16'hACE1;
    step = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      exp = ref_ca_step(exp);
      check(exp, "step");
    end
    step = 0;
    repeat (3) @(posedge clk); #1;
    check(exp, "hold");
    seed = 16'h0000; load = 1;
    @(posedge clk); #1 load = 0;
    check(16'h0001, "zero seed");
    // Full period: return to 0001 after exactly 65535 steps, not before.
    begin
      int n = 0;
      step = 1;
      do begin
        @(posedge clk); #1; n++;
      end while (state !== 16'h0001 && n < 70000);
      step = 0;
      checks++;
      if (n !== 65535) begin
        failures++; $display("FAIL period %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
