// tb_ec13_cut - exhaustive check of the EC13 full adder with its fault-
// injection multiplexers: fault-free it must add (sum, carry) for all 8
// inputs; under each of the 16 faults it must match the reference model. It
// also checks published localisation entries (e.g. 101 with line 6 stuck-at-0
// gives 00).
module tb_ec13_cut;
  import bist_ref_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [2:0]  pat;
  logic [16:0] sel;
  logic [1:0]  resp;

  ec13_cut dut (.pattern_i(pat), .fault_sel_i(sel), .response_o(resp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [2:0] p, int k, logic [1:0] exp);
    pat = p; sel = 17'(1) << k;
    #1;
    checks++;
    if (resp !== exp) begin
      failures++;
      $display("FAIL pattern=%03b fault=%0d got %02b exp %02b", p, k, resp, exp);
    end
  endtask

  initial begin
    for (int p = 0; p < 8; p++) begin
      int s;
      s = p[2] + p[1] + p[0];
      apply(3'(p), 0, {s[0], s[1]});
    end
    for (int k = 1; k <= 16; k++)
      for (int p = 0; p < 8; p++) apply(3'(p), k, ref_ec13(3'(p), k));
    apply(3'b101, 11, 2'b00);  // line 6 stuck-at-0
    apply(3'b100, 8,  2'b11);  // line 4 stuck-at-1
    apply(3'b111, 10, 2'b01);  // line 5 stuck-at-1
    apply(3'b001, 2,  2'b01);  // line 1 stuck-at-1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
