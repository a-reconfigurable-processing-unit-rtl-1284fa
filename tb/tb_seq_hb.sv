// tb_seq_hb - end-to-end test of the sequential CTR hardware block for c17
// and EC13.
//
// Deterministic sessions check the published results: 88 / 80 test cycles,
// 22 / 16 detected faults (100% coverage), faults first detected per pattern
// 9,6,2,5 (c17) and 7,5,3,1,0 (EC13), and every fault-memory word against a
// reference fault simulation. Pseudo-random sessions of 63 patterns check the
// published 1386 / 1008 cycles and all counters and words against the
// reference. Counters #1..#3 (behind compressors) are checked as well.
module tb_seq_hb;
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

  seq_hb #(.CUT(CUT_C17)) dut_a (.clk(clk), .rst_n(rst_n), .start_i(start[0]), .mode_i(mode),
    .n_rand_i(n_rand), .seed_i(seed), .busy_o(busy[0]), .done_o(done[0]), .count_o(cnt_a),
    .cycles_o(cyc_a), .log_count_o(lc_a), .log_rd_addr_i(ra_a), .log_rd_data_o(rd_a));
  seq_hb #(.CUT(CUT_EC13)) dut_b (.clk(clk), .rst_n(rst_n), .start_i(start[1]), .mode_i(mode),
    .n_rand_i(n_rand), .seed_i(seed), .busy_o(busy[1]), .done_o(done[1]), .count_o(cnt_b),
    .cycles_o(cyc_b), .log_count_o(lc_b), .log_rd_addr_i(ra_b), .log_rd_data_o(rd_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic session(bit ec, bit random, int nr, logic [15:0] sd, ref session_t s);
    int n_in, cycles, lc, e;
    make_patterns(ec, random, nr, sd, s);
    simulate(ec, s);
    n_in = ec ? 3 : 5;
    mode = random ? TPG_PSEUDORANDOM : TPG_DETERMINISTIC;
    n_rand = 16'(nr); seed = sd;
    start[ec] = 1;
    @(posedge clk); #1 start = '0;
    while (!done[ec]) @(posedge clk);
    #1;
    cycles = ec ? cyc_b : cyc_a;
    chk(cycles === s.n_fault * s.n_pat,
        $sformatf("ec=%0d cycles %0d exp %0d", ec, cycles, s.n_fault * s.n_pat));
    for (int m = 0; m < 4; m++) begin
      int c;
      c = ec ? cnt_b[m] : cnt_a[m];
      chk(c === s.count[m], $sformatf("ec=%0d counter #%0d = %0d exp %0d", ec, m + 1, c, s.count[m]));
    end
    lc = ec ? lc_b : lc_a;
    chk(lc === s.count[3], $sformatf("ec=%0d log count %0d", ec, lc));
    // Words appear in fault order.
    e = 0;
    for (int k = 1; k <= s.n_fault; k++) begin
      logic [31:0] w, x;
      if (s.first_pat[k] < 0) continue;
      if (ec) ra_b = 4'(e); else ra_a = 5'(e);
      @(posedge clk); #1;
      w = ec ? rd_b : rd_a;
      if (ec) x = 32'({s.pat[s.first_pat[k]][2:0], 5'(k), ref_cut(ec, s.pat[s.first_pat[k]], k),
                       ref_cut(ec, s.pat[s.first_pat[k]], 0)});
      else    x = 32'({s.pat[s.first_pat[k]], 5'(k), ref_cut(ec, s.pat[s.first_pat[k]], k),
                       ref_cut(ec, s.pat[s.first_pat[k]], 0)});
      chk(w === x, $sformatf("ec=%0d word %0d = %h exp %h", ec, e, w, x));
      e++;
    end
  endtask

  initial begin
    session_t s;
    start = '0; mode = TPG_DETERMINISTIC; n_rand = 63; seed = 16'h1;
    ra_a = '0; ra_b = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    // c17 deterministic: published 88 cycles, 22 faults, 9/6/2/5 per pattern.
    session(0, 0, 0, 16'h0, s);
    chk(cyc_a === 88, "c17 88 cycles");
    chk(cnt_a[3] === 22, "c17 22 faults");
    chk(s.per_pat[0] === 9 && s.per_pat[1] === 6 && s.per_pat[2] === 2 && s.per_pat[3] === 5,
        "c17 published per-pattern counts");
    // EC13 deterministic: published 80 cycles, 16 faults, 7/5/3/1/0.
    session(1, 0, 0, 16'h0, s);
    chk(cyc_b === 80, "ec13 80 cycles");
    chk(cnt_b[3] === 16, "ec13 16 faults");
    chk(s.per_pat[0] === 7 && s.per_pat[1] === 5 && s.per_pat[2] === 3 && s.per_pat[3] === 1 &&
        s.per_pat[4] === 0, "ec13 published per-pattern counts");
    // Pseudo-random, 63 patterns: published 1386 and 1008 cycles.
    session(0, 1, 63, 16'hB5A3, s);
    chk(cyc_a === 1386, "c17 1386 cycles");
    chk(cnt_a[3] === 22, "c17 random full coverage");
    session(1, 1, 63, 16'h4C1D, s);
    chk(cyc_b === 1008, "ec13 1008 cycles");
    chk(cnt_b[3] === 16, "ec13 random full coverage");
    // A short random session that cannot reach every fault.
    session(0, 1, 2, 16'h0F0F, s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
