// tb_compressor - checks the three compressor modes (parity, AND, OR) over
// all 2-bit responses and parity over random 7-bit responses.
module tb_compressor;
  import bist_ref_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic [1:0] r;
  logic [2:0] sig;
  logic [6:0] r7;
  logic       sig7;

  compressor #(.N_OUT(2), .MODE(0)) u0 (.response_i(r), .signature_o(sig[0]));
  compressor #(.N_OUT(2), .MODE(1)) u1 (.response_i(r), .signature_o(sig[1]));
  compressor #(.N_OUT(2), .MODE(2)) u2 (.response_i(r), .signature_o(sig[2]));
  compressor #(.N_OUT(7), .MODE(0)) u3 (.response_i(r7), .signature_o(sig7));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      r = 2'(v);
      #1;
      for (int m = 0; m < 3; m++) begin
        checks++;
        if (sig[m] !== ref_compress(m, r)) begin
          failures++; $display("FAIL mode=%0d r=%02b", m, r);
        end
      end
    end
    for (int i = 0; i < 50; i++) begin
      int ones;
      r7 = 7'($urandom);
      #1;
      ones = $countones(r7);
      checks++;
      if (sig7 !== ones[0]) begin
        failures++; $display("FAIL parity r7=%07b", r7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
