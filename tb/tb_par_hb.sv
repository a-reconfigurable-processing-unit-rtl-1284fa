// tb_par_hb - end-to-end test of the parallel CTR hardware block for c17 and
// EC13.
//
// Deterministic sessions check the published results: 4 / 5 test cycles
// (22 and 16 times fewer than the sequential block), 22 / 16 detected
// faults, faults first detected per pattern 9,6,2,5 and 7,5,3,1,0, and every
// fault-memory word (pattern, fault-free response, mask of newly detected
// faults) against a reference fault simulation. Pseudo-random sessions of 63
// patterns check the published 63 cycles and every counter and word.
module tb_par_hb;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [1:0] start;
  tpg_mode_e mode;
  logic [15:0] n_rand, seed;
  logic [1:0] busy, done;
  logic [3:0][15:0] cnt_a, cnt_b;
  logic [31:0] cyc_a, cyc_b, rd_a, rd_b;
  logic [5:0] lc_a; logic [4:0] lc_b;
  logic [4:0] ra_a; logic [3:0] ra_b;

  par_hb #(.CUT(CUT_C17)) dut_a (.clk(clk), .rst_n(rst_n), .start_i(start[0]), .mode_i(mode),
    .n_rand_i(n_rand), .seed_i(seed), .busy_o(busy[0]), .done_o(done[0]), .count_o(cnt_a),
    .cycles_o(cyc_a), .log_count_o(lc_a), .log_rd_addr_i(ra_a), .log_rd_data_o(rd_a));
  par_hb #(.CUT(CUT_EC13)) dut_b (.clk(clk), .rst_n(rst_n), .start_i(start[1]), .mode_i(mode),
    .n_rand_i(n_rand), .seed_i(seed), .busy_o(busy[1]), .done_o(done[1]), .count_o(cnt_b),
    .cycles_o(cyc_b), .log_count_o(lc_b), .log_rd_addr_i(ra_b), .log_rd_data_o(rd_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic session(bit ec, bit random, int nr, logic [15:0] sd, ref session_t s);
    int cycles, lc, e;
    make_patterns(ec, random, nr, sd, s);
    simulate(ec, s);
    mode = random ? TPG_PSEUDORANDOM : TPG_DETERMINISTIC;
    n_rand = 16'(nr); seed = sd;
    start[ec] = 1;
    @(posedge clk); #1 start = '0;
    while (!done[ec]) @(posedge clk);
    #1;
    cycles = ec ? cyc_b : cyc_a;
    chk(cycles === s.n_pat, $sformatf("ec=%0d cycles %0d exp %0d", ec, cycles, s.n_pat));
    for (int m = 0; m < 4; m++) begin
      int c;
      c = ec ? cnt_b[m] : cnt_a[m];
      chk(c === s.count[m], $sformatf("ec=%0d counter #%0d = %0d exp %0d", ec, m + 1, c, s.count[m]));
    end
    // One word per pattern that detects at least one new fault.
    e = 0;
    for (int i = 0; i < s.n_pat; i++) begin
      logic [31:0] w, x;
      logic [21:0] mask;
      if (s.per_pat[i] === 0) continue;
      mask = '0;
      for (int k = 1; k <= s.n_fault; k++) if (s.first_pat[k] === i) mask[k-1] = 1'b1;
      if (ec) ra_b = 4'(e); else ra_a = 5'(e);
      @(posedge clk); #1;
      w = ec ? rd_b : rd_a;
      if (ec) x = 32'({s.pat[i][2:0], ref_cut(ec, s.pat[i], 0), mask[15:0]});
      else    x = 32'({s.pat[i], ref_cut(ec, s.pat[i], 0), mask});
      chk(w === x, $sformatf("ec=%0d word %0d = %h exp %h", ec, e, w, x));
      e++;
    end
    lc = ec ? lc_b : lc_a;
    chk(lc === e, $sformatf("ec=%0d log count %0d exp %0d", ec, lc, e));
  endtask

  initial begin
    session_t s;
    start = '0; mode = TPG_DETERMINISTIC; n_rand = 63; seed = 16'h1;
    ra_a = '0; ra_b = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    session(0, 0, 0, 16'h0, s);
    chk(cyc_a === 4, "c17 4 cycles");
    chk(cnt_a[3] === 22, "c17 22 faults");
    chk(s.per_pat[0] === 9 && s.per_pat[1] === 6 && s.per_pat[2] === 2 && s.per_pat[3] === 5,
        "c17 published per-pattern counts");
    session(1, 0, 0, 16'h0, s);
    chk(cyc_b === 5, "ec13 5 cycles");
    chk(cnt_b[3] === 16, "ec13 16 faults");
    session(0, 1, 63, 16'hB5A3, s);
    chk(cyc_a === 63, "c17 63 cycles");
    session(1, 1, 63, 16'h4C1D, s);
    chk(cyc_b === 63, "ec13 63 cycles");
    session(0, 1, 3, 16'h0F0F, s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
