// tb_rpu_top - end-to-end test of the RPU with its four hardware blocks, run
// at the default parameters and read back only through the register port.
//
// Session 1 starts all four blocks together in deterministic mode; session 2
// does the same in pseudo-random mode with 63 patterns. For each block the
// test reads status, counters #1..#4, the cycle count and every fault-memory
// word and compares them with a reference fault simulation, and checks the
// published cycle counts (c17: 88 sequential, 4 parallel; EC13: 80 and 5;
// 63 random patterns: 1386, 63, 1008, 63) and that the parallel block is
// faster by the number of faults. It counts how often each mechanism
// happened: deterministic and pseudo-random sessions, blocks busy at the same
// time, fault detections, compressor aliasing (a compressed comparator
// missing a fault the direct one sees), memory words read; one that never
// happened is a failure.
module tb_rpu_top;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [3:0] start, busy, done;
  tpg_mode_e mode;
  logic [15:0] n_rand, seed;
  logic [1:0] rd_hb;
  logic [7:0] rd_addr;
  logic [31:0] rd_data;

  int n_det_sessions = 0, n_rand_sessions = 0, n_concurrent = 0, n_detections = 0;
  int n_alias = 0, n_words = 0, n_speedup = 0;

  rpu_top dut (.clk(clk), .rst_n(rst_n), .start_i(start), .mode_i(mode), .n_rand_i(n_rand),
    .seed_i(seed), .busy_o(busy), .done_o(done), .rd_hb_i(rd_hb), .rd_addr_i(rd_addr),
    .rd_data_o(rd_data));

  always #5 clk = ~clk;

  always @(posedge clk) if ($countones(busy) > 1) n_concurrent++;

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

  task automatic rd(int hb, int addr, output logic [31:0] d);
    rd_hb = 2'(hb); rd_addr = 8'(addr);
    @(posedge clk); #1;
    d = rd_data;
  endtask

  task automatic check_hb(int hb, bit random, int nr, logic [15:0] sd, output int cycles);
    session_t s;
    bit ec, par;
    logic [31:0] d;
    int e;
    ec  = hb >= 2;
    par = hb[0];
    make_patterns(ec, random, nr, sd, s);
    simulate(ec, s);
    rd(hb, 0, d);
    chk(d === 32'h2, $sformatf("hb%0d status %h", hb, d));
    for (int m = 0; m < 4; m++) begin
      rd(hb, 1 + m, d);
      chk(d === 32'(s.count[m]), $sformatf("hb%0d counter #%0d = %0d exp %0d", hb, m + 1, d, s.count[m]));
      if (m < 3 && s.count[m] < s.count[3]) n_alias++;
    end
    n_detections += s.count[3];
    rd(hb, 5, d);
    cycles = d;
    chk(d === 32'(par ? s.n_pat : s.n_pat * s.n_fault), $sformatf("hb%0d cycles %0d", hb, d));
    e = 0;
    if (!par) begin
      for (int k = 1; k <= s.n_fault; k++) begin
        logic [31:0] x;
        logic [4:0] p;
        if (s.first_pat[k] < 0) continue;
        p = s.pat[s.first_pat[k]];
        if (ec) x = 32'({p[2:0], 5'(k), ref_cut(ec, p, k), ref_cut(ec, p, 0)});
        else    x = 32'({p, 5'(k), ref_cut(ec, p, k), ref_cut(ec, p, 0)});
        rd(hb, 8'h80 + e, d);
        chk(d === x, $sformatf("hb%0d word %0d = %h exp %h", hb, e, d, x));
        e++; n_words++;
      end
    end else begin
      for (int i = 0; i < s.n_pat; i++) begin
        logic [31:0] x;
        logic [21:0] mask;
        if (s.per_pat[i] === 0) continue;
        mask = '0;
        for (int k = 1; k <= s.n_fault; k++) if (s.first_pat[k] === i) mask[k-1] = 1'b1;
        if (ec) x = 32'({s.pat[i][2:0], ref_cut(ec, s.pat[i], 0), mask[15:0]});
        else    x = 32'({s.pat[i], ref_cut(ec, s.pat[i], 0), mask});
        rd(hb, 8'h80 + e, d);
        chk(d === x, $sformatf("hb%0d word %0d = %h exp %h", hb, e, d, x));
        e++; n_words++;
      end
    end
    rd(hb, 6, d);
    chk(d === 32'(e), $sformatf("hb%0d word count %0d exp %0d", hb, d, e));
  endtask

  task automatic run_all(bit random, int nr, logic [15:0] sd, int exp_cycles [4]);
    int cyc [4];
    mode = random ? TPG_PSEUDORANDOM : TPG_DETERMINISTIC;
    n_rand = 16'(nr); seed = sd;
    start = 4'hF;
    @(posedge clk); #1 start = '0;
    while (done !== 4'hF) @(posedge clk);
    #1;
    for (int hb = 0; hb < 4; hb++) begin
      check_hb(hb, random, nr, sd, cyc[hb]);
      chk(cyc[hb] === exp_cycles[hb], $sformatf("hb%0d published cycles %0d exp %0d",
                                               hb, cyc[hb], exp_cycles[hb]));
    end
    // Parallel testing is faster by the number of injected faults.
    if (cyc[0] === 22 * cyc[1]) n_speedup++;
    if (cyc[2] === 16 * cyc[3]) n_speedup++;
    if (random) n_rand_sessions++; else n_det_sessions++;
  endtask

  initial begin
    start = '0; mode = TPG_DETERMINISTIC; n_rand = 0; seed = 0; rd_hb = 0; rd_addr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(posedge clk); #1;
    run_all(0, 0, 16'h0, '{88, 4, 80, 5});
    run_all(1, 63, 16'hB5A3, '{1386, 63, 1008, 63});
    $display("mechanisms: det=%0d rand=%0d concurrent_cycles=%0d detections=%0d alias=%0d words=%0d speedup=%0d",
             n_det_sessions, n_rand_sessions, n_concurrent, n_detections, n_alias, n_words, n_speedup);
    chk(n_det_sessions > 0, "deterministic session ran");
    chk(n_rand_sessions > 0, "pseudo-random session ran");
    chk(n_concurrent > 0, "blocks ran concurrently");
    chk(n_detections > 0, "faults detected");
    chk(n_alias > 0, "compressor aliasing observed");
    chk(n_words > 0, "fault memory read");
    chk(n_speedup === 4, "parallel speed-up equals fault count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
