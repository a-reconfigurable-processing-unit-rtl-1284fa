// tb_published_tables - checks the RPU against the published fault
// localisation tables of the deterministic c17 and EC13 tests.
//
// The rows below are copied from those tables: input pattern, multiplexer
// (line) number, stuck-at value and the two printed outputs. The c17 table
// prints the faulty response under "Circuit Output" and the fault-free one
// under "True Output". The EC13 table prints them the other way round (its
// "Circuit Output" equals the fault-free response listed per pattern), and
// the check swaps the columns for the EC13 rows.
//
// The test runs all four hardware blocks in deterministic mode through the
// register port of rpu_top and then checks:
//  * sequential blocks: every fault-memory word {pattern, fault index,
//    faulty, fault-free} is one published row and every published row is
//    read back exactly once (the memory is ordered by fault, the tables by
//    pattern, so the comparison is order-free);
//  * parallel blocks: the mask bits of the words {pattern, fault-free, mask}
//    expand to the same (pattern, fault) set, with the published fault-free
//    response - the published text states that parallel localisation equals
//    the sequential one;
//  * the per-pattern detection counts (c17: 9 6 2 5; EC13: 7 5 3 1 0),
//    counter #4 (22 and 16) and the cycle counts (88/4 and 80/5).
// Ends with the usual TB_RESULT line; a watchdog stops a hung run.
module tb_published_tables;
  import bist_pkg::*;

  typedef struct packed {
    logic [7:0] pat;   // input pattern, MSB = input line 1
    logic [7:0] mux;   // line number
    logic       sa;    // stuck-at value
    logic [1:0] circ;  // "Circuit Output" column
    logic [1:0] tru;   // "True Output" column
  } row_t;

  localparam row_t C17_ROWS [22] = '{
    '{'b01111, 1, 1, 'b10, 'b00}, '{'b01111, 3, 0, 'b11, 'b00},
    '{'b01111, 4, 0, 'b11, 'b00}, '{'b01111, 6, 0, 'b10, 'b00},
    '{'b01111, 7, 1, 'b11, 'b00}, '{'b01111, 8, 0, 'b11, 'b00},
    '{'b01111, 9, 0, 'b01, 'b00}, '{'b01111, 10, 1, 'b10, 'b00},
    '{'b01111, 11, 1, 'b01, 'b00},
    '{'b11010, 2, 0, 'b00, 'b11}, '{'b11010, 3, 1, 'b10, 'b11},
    '{'b11010, 7, 0, 'b00, 'b11}, '{'b11010, 8, 1, 'b00, 'b11},
    '{'b11010, 10, 0, 'b01, 'b11}, '{'b11010, 11, 0, 'b10, 'b11},
    '{'b10000, 2, 1, 'b11, 'b00}, '{'b10000, 5, 1, 'b01, 'b00},
    '{'b10101, 1, 0, 'b01, 'b11}, '{'b10101, 4, 1, 'b10, 'b11},
    '{'b10101, 5, 0, 'b10, 'b11}, '{'b10101, 6, 1, 'b01, 'b11},
    '{'b10101, 9, 1, 'b10, 'b11}
  };

  localparam row_t EC13_ROWS [16] = '{
    '{'b101, 1, 0, 'b01, 'b10}, '{'b101, 2, 1, 'b01, 'b11},
    '{'b101, 3, 0, 'b01, 'b10}, '{'b101, 5, 0, 'b01, 'b10},
    '{'b101, 6, 0, 'b01, 'b00}, '{'b101, 7, 1, 'b01, 'b11},
    '{'b101, 8, 0, 'b01, 'b00},
    '{'b100, 3, 1, 'b10, 'b01}, '{'b100, 4, 1, 'b10, 'b11},
    '{'b100, 6, 1, 'b10, 'b11}, '{'b100, 7, 0, 'b10, 'b00},
    '{'b100, 8, 1, 'b10, 'b11},
    '{'b111, 2, 0, 'b11, 'b01}, '{'b111, 4, 0, 'b11, 'b10},
    '{'b111, 5, 1, 'b11, 'b01},
    '{'b001, 1, 1, 'b10, 'b01}
  };

  localparam int C17_PER_PAT  [4] = '{9, 6, 2, 5};
  localparam int EC13_PER_PAT [5] = '{7, 5, 3, 1, 0};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic [3:0] start, busy, done;
  tpg_mode_e mode;
  logic [15:0] n_rand, seed;
  logic [1:0] rd_hb;
  logic [7:0] rd_addr;
  logic [31:0] rd_data;

  rpu_top dut (.clk(clk), .rst_n(rst_n), .start_i(start), .mode_i(mode), .n_rand_i(n_rand),
    .seed_i(seed), .busy_o(busy), .done_o(done), .rd_hb_i(rd_hb), .rd_addr_i(rd_addr),
    .rd_data_o(rd_data));

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

  task automatic rd(int hb, int addr, output logic [31:0] d);
    rd_hb = 2'(hb); rd_addr = 8'(addr);
    @(posedge clk); #1;
    d = rd_data;
  endtask

  // Published row for (pattern, fault index), or -1.
  function automatic int find_row(bit ec, int pat, int fidx);
    int n = ec ? 16 : 22;
    for (int r = 0; r < n; r++) begin
      row_t w = ec ? EC13_ROWS[r] : C17_ROWS[r];
      if (int'(w.pat) === pat && 2 * int'(w.mux) - 1 + int'(w.sa) === fidx) return r;
    end
    return -1;
  endfunction

  // Checks one block against its table. hb: 0 seq c17, 1 par c17,
  // 2 seq EC13, 3 par EC13.
  task automatic check_block(int hb);
    bit ec  = hb >= 2;
    bit par = hb[0];
    int n_fault = ec ? 16 : 22;
    int n_pat = ec ? 5 : 4;
    int seen [22];
    int per_pat [5];
    logic [31:0] d;
    int n_words;
    for (int r = 0; r < 22; r++) seen[r] = 0;
    for (int p = 0; p < 5; p++) per_pat[p] = 0;

    rd(hb, 'h04, d);
    chk(d === 32'(n_fault), $sformatf("hb%0d counter #4 = %0d", hb, d));
    rd(hb, 'h05, d);
    chk(d === 32'(par ? n_pat : n_fault * n_pat), $sformatf("hb%0d cycles = %0d", hb, d));
    rd(hb, 'h06, d);
    n_words = int'(d);

    for (int i = 0; i < n_words; i++) begin
      int pat, good, faulty, fidx, r, p;
      rd(hb, 'h80 + i, d);
      if (!par) begin
        // {pattern, fault index (5 bits), faulty, fault-free}
        good   = int'(d[1:0]);
        faulty = int'(d[3:2]);
        fidx   = int'(d[8:4]);
        pat    = int'(d >> 9);
        r = find_row(ec, pat, fidx);
        chk(r >= 0, $sformatf("hb%0d word %0d pat=%b fault=%0d is in the table", hb, i, pat,
                              fidx));
        if (r >= 0) begin
          row_t w = ec ? EC13_ROWS[r] : C17_ROWS[r];
          chk(good === int'(ec ? w.circ : w.tru) && faulty === int'(ec ? w.tru : w.circ),
              $sformatf("hb%0d row %0d responses %b/%b", hb, r, faulty, good));
          seen[r]++;
        end
      end else begin
        // {pattern, fault-free, mask}; mask bit g = fault index g+1
        logic [21:0] mask;
        mask = 22'(d & ((32'd1 << n_fault) - 1));
        good = int'((d >> n_fault) & 3);
        pat  = int'(d >> (n_fault + 2));
        for (int g = 0; g < n_fault; g++) if (mask[g]) begin
          r = find_row(ec, pat, g + 1);
          chk(r >= 0, $sformatf("hb%0d pat=%b fault=%0d is in the table", hb, pat, g + 1));
          if (r >= 0) begin
            row_t w = ec ? EC13_ROWS[r] : C17_ROWS[r];
            chk(good === int'(ec ? w.circ : w.tru), $sformatf("hb%0d row %0d fault-free %b", hb, r,
                                                         good));
            seen[r]++;
          end
        end
      end
      // per-pattern tally, by position in the deterministic set
      for (p = 0; p < n_pat; p++) if (int'(det_pattern(ec ? CUT_EC13 : CUT_C17, p)) === pat) break;
      if (p < n_pat) per_pat[p] += par ? $countones(d & ((32'd1 << n_fault) - 1)) : 1;
    end

    for (int r = 0; r < n_fault; r++)
      chk(seen[r] === 1, $sformatf("hb%0d table row %0d read %0d times", hb, r, seen[r]));
    for (int p = 0; p < n_pat; p++)
      chk(per_pat[p] === (ec ? EC13_PER_PAT[p] : C17_PER_PAT[p]),
          $sformatf("hb%0d pattern %0d detects %0d", hb, p, per_pat[p]));
  endtask

  initial begin
    start = '0; mode = TPG_DETERMINISTIC; n_rand = 16'd63; seed = 16'h0001;
    rd_hb = '0; rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    start = 4'hF;
    @(posedge clk); #1;
    start = '0;
    wait (done === 4'hF);
    @(posedge clk); #1;
    for (int hb = 0; hb < 4; hb++) check_block(hb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
