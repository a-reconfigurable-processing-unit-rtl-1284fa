// tb_fault_counters - drives random detection bits into a 3-lane counter bank
// and checks counts and first-detection flags against a reference that keeps
// its own per-lane "already seen" state, including clear and flag clear.
module tb_fault_counters;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic clear, flag_clr, valid;
  logic [2:0][3:0] det, newd;
  logic [3:0][15:0] cnt;

  fault_counters #(.LANES(3), .CW(16)) dut (.clk(clk), .rst_n(rst_n), .clear_i(clear),
    .flag_clr_i(flag_clr), .valid_i(valid), .detect_i(det), .new_o(newd), .count_o(cnt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [3][4];
    int exp_cnt [4];
    logic [2:0][3:0] exp_new;
    clear = 0; flag_clr = 0; valid = 0; det = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    foreach (seen[l, k]) seen[l][k] = 0;
    foreach (exp_cnt[k]) exp_cnt[k] = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      valid = ($urandom % 4) !== 0;
      flag_clr = ($urandom % 10) === 0;
      det = 12'($urandom);
      #1;
      for (int l = 0; l < 3; l++)
        for (int k = 0; k < 4; k++) begin
          exp_new[l][k] = valid && det[l][k] && !seen[l][k];
        end
      checks++;
      if (newd !== exp_new) begin
        failures++; $display("FAIL new cyc=%0d got %h exp %h", cyc, newd, exp_new);
      end
      @(posedge clk); #1;
      for (int l = 0; l < 3; l++)
        for (int k = 0; k < 4; k++) begin
          if (exp_new[l][k]) exp_cnt[k]++;
          seen[l][k] = flag_clr ? 0 : (seen[l][k] || exp_new[l][k]);
        end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (cnt[k] !== 16'(exp_cnt[k])) begin
          failures++; $display("FAIL count %0d cyc=%0d got %0d exp %0d", k, cyc, cnt[k], exp_cnt[k]);
        end
      end
    end
    valid = 0; clear = 1;
    @(posedge clk); #1 clear = 0;
    checks++;
    if (cnt !== '0) begin failures++; $display("FAIL clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
