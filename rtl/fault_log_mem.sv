// fault_log_mem - memory that keeps the fault-causing injections and the test
// patterns that exposed them, for the processor to read after a test.
//
// An append-only RAM of DEPTH words of W bits: each write (we_i) stores
// wdata_i at the next free address; writes beyond DEPTH are dropped and
// raise overflow_o. count_o is the number of stored words. The read port has
// one cycle of latency (rd_data_o holds the word at the rd_addr_i of the
// previous cycle), as a block RAM does. clear_i empties the memory for a new
// test. What a word holds is decided by the hardware block that writes it.
// The memory's purpose is published; its organisation is this design's.
module fault_log_mem #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 22,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear_i,
  input  logic          we_i,
  input  logic [W-1:0]  wdata_i,
  input  logic [AW-1:0] rd_addr_i,
  output logic [W-1:0]  rd_data_o,
  output logic [AW:0]   count_o,
  output logic          overflow_o
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  count_q;
  logic         overflow_q;
  logic         full;

  assign full = (count_q == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q    <= '0;
      overflow_q <= 1'b0;
    end else if (clear_i) begin
      count_q    <= '0;
      overflow_q <= 1'b0;
    end else if (we_i) begin
      if (full) overflow_q <= 1'b1;
      else      count_q    <= count_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we_i && !clear_i && !full) mem[count_q[AW-1:0]] <= wdata_i;
    rd_data_o <= mem[rd_addr_i];
  end

  assign count_o    = count_q;
  assign overflow_o = overflow_q;
endmodule
