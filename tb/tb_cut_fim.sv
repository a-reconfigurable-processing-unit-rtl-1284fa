// tb_cut_fim - checks the CUT selector used for the fault-free signatures:
// both circuit choices, with no fault injected, against the reference
// responses over all input patterns, and with a fault to see it is passed on.
module tb_cut_fim;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [4:0]  pat_a;
  logic [22:0] sel_a;
  logic [1:0]  resp_a;
  logic [2:0]  pat_b;
  logic [16:0] sel_b;
  logic [1:0]  resp_b;

  cut_fim #(.CUT(CUT_C17))  dut_a (.pattern_i(pat_a), .fault_sel_i(sel_a), .response_o(resp_a));
  cut_fim #(.CUT(CUT_EC13)) dut_b (.pattern_i(pat_b), .fault_sel_i(sel_b), .response_o(resp_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 2; k++) begin
      for (int p = 0; p < 32; p++) begin
        pat_a = 5'(p); sel_a = 23'(1) << (k * 7);
        pat_b = 3'(p); sel_b = 17'(1) << (k * 5);
        #1;
        checks += 2;
        if (resp_a !== ref_c17(5'(p), k * 7)) begin
          failures++; $display("FAIL c17 p=%05b k=%0d", p[4:0], k * 7);
        end
        if (resp_b !== ref_ec13(3'(p), k * 5)) begin
          failures++; $display("FAIL ec13 p=%03b k=%0d", p[2:0], k * 5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
