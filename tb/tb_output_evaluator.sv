// tb_output_evaluator - checks comparators #1..#4 for every pair of faulty and
// fault-free 2-bit responses against reference compressor signatures.
module tb_output_evaluator;
  import bist_ref_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [1:0] f, g;
  logic [3:0] det;

  output_evaluator #(.N_OUT(2)) dut (.faulty_i(f), .good_i(g), .detect_o(det));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        f = 2'(a); g = 2'(b);
        #1;
        for (int m = 0; m < 3; m++) exp[m] = ref_compress(m, f) !== ref_compress(m, g);
        exp[3] = (a !== b);
        checks++;
        if (det !== exp) begin
          failures++; $display("FAIL f=%02b g=%02b got %04b exp %04b", f, g, det, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
