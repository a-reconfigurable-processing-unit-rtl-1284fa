// tb_tpg - checks the test pattern generator: the c17 and EC13 deterministic
// sequences (published test sets) with their last flag, and a pseudo-random
// sequence of 63 patterns against the reference automaton, including the
// restart that replays the same sequence.
module tb_tpg;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  tpg_mode_e mode;
  logic [15:0] n_rand, seed;
  logic restart, advance;
  logic [4:0] pat_a; logic [2:0] pat_b;
  logic [15:0] idx_a, idx_b;
  logic last_a, last_b;

  tpg #(.CUT(CUT_C17)) dut_a (.clk(clk), .rst_n(rst_n), .mode_i(mode), .n_rand_i(n_rand),
    .seed_i(seed), .restart_i(restart), .advance_i(advance), .pattern_o(pat_a),
    .index_o(idx_a), .last_o(last_a));
  tpg #(.CUT(CUT_EC13)) dut_b (.clk(clk), .rst_n(rst_n), .mode_i(mode), .n_rand_i(n_rand),
    .seed_i(seed), .restart_i(restart), .advance_i(advance), .pattern_o(pat_b),
    .index_o(idx_b), .last_o(last_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [4:0] c17_det [4] = '{5'b01111, 5'b11010, 5'b10000, 5'b10101};
    logic [2:0] ec_det  [5] = '{3'b101, 3'b100, 3'b111, 3'b001, 3'b010};
    logic [15:0] s;
    restart = 0; advance = 0; mode = TPG_DETERMINISTIC; n_rand = 63; seed = 16'h1D2B;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1 restart = 1;
    @(posedge clk); #1 restart = 0; advance = 1;
    for (int i = 0; i < 5; i++) begin
      if (i < 4) begin
        chk(pat_a === c17_det[i], $sformatf("c17 det %0d: %05b", i, pat_a));
        chk(last_a === (i === 3), "c17 last");
      end
      chk(pat_b === ec_det[i], $sformatf("ec13 det %0d: %03b", i, pat_b));
      chk(last_b === (i === 4), "ec13 last");
      @(posedge clk); #1;
    end
    advance = 0;
    for (int rep = 0; rep < 2; rep++) begin
      mode = TPG_PSEUDORANDOM; restart = 1;
      @(posedge clk); #1 restart = 0; advance = 1;
      s = seed;
      for (int i = 0; i < 63; i++) begin
        chk(pat_a === s[15:11], $sformatf("rand c17 %0d", i));
        chk(pat_b === s[15:13], $sformatf("rand ec13 %0d", i));
        chk(last_a === (i === 62), "rand last");
        chk(idx_a === 16'(i), "index");
        s = ref_ca_step(s);
        @(posedge clk); #1;
      end
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
