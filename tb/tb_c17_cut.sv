// tb_c17_cut - exhaustive check of c17 with its fault-injection multiplexers:
// all 32 input patterns under the fault-free vector and each of the 22
// single stuck-at faults, against a line-by-line reference model. It also
// checks the published fault-free responses of the deterministic patterns and
// the published localisation entries of the first pattern 01111.
module tb_c17_cut;
  import bist_ref_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [4:0]  pat;
  logic [22:0] sel;
  logic [1:0]  resp;

  c17_cut dut (.pattern_i(pat), .fault_sel_i(sel), .response_o(resp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [4:0] p, int k, logic [1:0] exp);
    pat = p; sel = 23'(1) << k;
    #1;
    checks++;
    if (resp !== exp) begin
      failures++;
      $display("FAIL pattern=%05b fault=%0d got %02b exp %02b", p, k, resp, exp);
    end
  endtask

  initial begin
    for (int k = 0; k <= 22; k++)
      for (int p = 0; p < 32; p++) apply(5'(p), k, ref_c17(5'(p), k));
    // Published fault-free responses of the deterministic test set.
    apply(5'b01111, 0, 2'b00);
    apply(5'b11010, 0, 2'b11);
    apply(5'b10000, 0, 2'b00);
    apply(5'b10101, 0, 2'b11);
    // Published localisation for 01111: line 1 s-a-1 -> 10, line 9 s-a-0 -> 01.
    apply(5'b01111, 2, 2'b10);
    apply(5'b01111, 17, 2'b01);
    apply(5'b01111, 5, 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
