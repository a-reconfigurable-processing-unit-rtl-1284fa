// tb_fault_log_mem - fills the fault memory past its depth and checks the
// stored words, the one-cycle read latency, the count, the overflow flag and
// the clear.
module tb_fault_log_mem;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic clear, we;
  logic [13:0] wdata, rdata;
  logic [4:0] raddr;
  logic [5:0] count;
  logic ovf;

  fault_log_mem #(.W(14), .DEPTH(22)) dut (.clk(clk), .rst_n(rst_n), .clear_i(clear), .we_i(we),
    .wdata_i(wdata), .rd_addr_i(raddr), .rd_data_o(rdata), .count_o(count), .overflow_o(ovf));

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

  initial begin
    logic [13:0] words [22];
    clear = 0; we = 0; wdata = '0; raddr = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(posedge clk); #1 clear = 1;
    @(posedge clk); #1 clear = 0;
    chk(count === 0, "empty");
    // 22 writes with random idle cycles in between, then 3 writes too many.
    for (int n = 0; n < 25; ) begin
      we = ($urandom % 3) !== 0;
      wdata = 14'($urandom);
      if (we) begin
        if (n < 22) words[n] = wdata;
        n++;
      end
      @(posedge clk); #1;
    end
    we = 0;
    chk(count === 22, $sformatf("count %0d", count));
    chk(ovf === 1, "overflow");
    for (int i = 0; i < 22; i++) begin
      raddr = 5'(i);
      @(posedge clk); #1;
      chk(rdata === words[i], $sformatf("word %0d got %h exp %h", i, rdata, words[i]));
    end
    clear = 1;
    @(posedge clk); #1 clear = 0;
    chk(count === 0 && ovf === 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
