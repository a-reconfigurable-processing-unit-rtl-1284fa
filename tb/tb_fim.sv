// tb_fim - checks the fault-injection multiplexer for every line value and
// every select code: 00 and 11 pass the line, 01 forces 1, 10 forces 0.
module tb_fim;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic line_i, sa0, sa1, line_o;

  fim dut (.line_i(line_i), .sel_sa0_i(sa0), .sel_sa1_i(sa1), .line_o(line_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 2; v++) begin
      for (int s = 0; s < 4; s++) begin
        line_i = v[0]; {sa0, sa1} = s[1:0];
        @(posedge clk);
        exp = (s === 1) ? 1'b1 : (s === 2) ? 1'b0 : v[0];
        checks++;
        if (line_o !== exp) begin
          failures++;
          $display("FAIL line=%0d sel=%02b got %0d exp %0d", v, s[1:0], line_o, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
