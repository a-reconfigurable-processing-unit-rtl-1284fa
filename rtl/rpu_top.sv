// rpu_top - Reconfigurable Processing Unit (RPU) configured as an on-chip
// stuck-at fault tester.
//
// The RPU holds its hardware blocks (HBs) statically, all loaded at start-up.
// Here it holds four, one per test strategy and circuit:
//   HB 0  seq_hb  c17   sequential CTR: faults injected one after another
//   HB 1  par_hb  c17   parallel CTR:   one CUT copy per fault
//   HB 2  seq_hb  EC13  sequential CTR
//   HB 3  par_hb  EC13  parallel CTR
// Each HB is started separately (start_i bit) with the shared pattern mode,
// pseudo-random test length and seed, and raises its done_o bit when its test
// has finished. HBs may run at the same time.
//
// The processor side of the RPU (bus bridge and stream links to the soft
// processor) is replaced by a plain read port: rd_hb_i selects an HB and
// rd_addr_i a word, whose value appears on rd_data_o one clock later.
//   0x00  {done, busy}          0x01..0x04  counters #1..#4 (faults detected)
//   0x05  test clock cycles     0x06        number of fault-memory words
//   0x80+i  fault-memory word i (layout in seq_hb / par_hb)
// The HB organisation follows the published RPU; the register map is this
// design's.
module rpu_top
  import bist_pkg::*;
#(
  parameter int unsigned CW = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  start_i,
  input  tpg_mode_e   mode_i,
  input  logic [15:0] n_rand_i,
  input  logic [15:0] seed_i,
  output logic [3:0]  busy_o,
  output logic [3:0]  done_o,
  input  logic [1:0]  rd_hb_i,
  input  logic [7:0]  rd_addr_i,
  output logic [31:0] rd_data_o
);
  localparam int unsigned N_HB = 4;

  logic [N_HB-1:0][N_CMP-1:0][CW-1:0] count;
  logic [N_HB-1:0][31:0]              cycles;
  logic [N_HB-1:0][31:0]              log_count;
  logic [N_HB-1:0][31:0]              log_data;

  logic [5:0] c17_lc_s, c17_lc_p;
  logic [4:0] ec_lc_s, ec_lc_p;

  seq_hb #(.CUT(CUT_C17), .CW(CW)) u_hb0 (
    .clk(clk), .rst_n(rst_n), .start_i(start_i[0]), .mode_i(mode_i),
    .n_rand_i(n_rand_i), .seed_i(seed_i), .busy_o(busy_o[0]), .done_o(done_o[0]),
    .count_o(count[0]), .cycles_o(cycles[0]), .log_count_o(c17_lc_s),
    .log_rd_addr_i(rd_addr_i[4:0]), .log_rd_data_o(log_data[0])
  );

  par_hb #(.CUT(CUT_C17), .CW(CW)) u_hb1 (
    .clk(clk), .rst_n(rst_n), .start_i(start_i[1]), .mode_i(mode_i),
    .n_rand_i(n_rand_i), .seed_i(seed_i), .busy_o(busy_o[1]), .done_o(done_o[1]),
    .count_o(count[1]), .cycles_o(cycles[1]), .log_count_o(c17_lc_p),
    .log_rd_addr_i(rd_addr_i[4:0]), .log_rd_data_o(log_data[1])
  );

  seq_hb #(.CUT(CUT_EC13), .CW(CW)) u_hb2 (
    .clk(clk), .rst_n(rst_n), .start_i(start_i[2]), .mode_i(mode_i),
    .n_rand_i(n_rand_i), .seed_i(seed_i), .busy_o(busy_o[2]), .done_o(done_o[2]),
    .count_o(count[2]), .cycles_o(cycles[2]), .log_count_o(ec_lc_s),
    .log_rd_addr_i(rd_addr_i[3:0]), .log_rd_data_o(log_data[2])
  );

  par_hb #(.CUT(CUT_EC13), .CW(CW)) u_hb3 (
    .clk(clk), .rst_n(rst_n), .start_i(start_i[3]), .mode_i(mode_i),
    .n_rand_i(n_rand_i), .seed_i(seed_i), .busy_o(busy_o[3]), .done_o(done_o[3]),
    .count_o(count[3]), .cycles_o(cycles[3]), .log_count_o(ec_lc_p),
    .log_rd_addr_i(rd_addr_i[3:0]), .log_rd_data_o(log_data[3])
  );

  assign log_count[0] = 32'(c17_lc_s);
  assign log_count[1] = 32'(c17_lc_p);
  assign log_count[2] = 32'(ec_lc_s);
  assign log_count[3] = 32'(ec_lc_p);

  // Read port: the address is registered so that register words and memory
  // words (block-RAM read latency) both appear one cycle after the request.
  logic [1:0] hb_q;
  logic [7:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hb_q   <= '0;
      addr_q <= '0;
    end else begin
      hb_q   <= rd_hb_i;
      addr_q <= rd_addr_i;
    end
  end

  always_comb begin
    rd_data_o = '0;
    if (addr_q[7]) begin
      rd_data_o = log_data[hb_q];
    end else begin
      unique case (addr_q)
        8'h00:   rd_data_o = {30'd0, done_o[hb_q], busy_o[hb_q]};
        8'h01:   rd_data_o = 32'(count[hb_q][0]);
        8'h02:   rd_data_o = 32'(count[hb_q][1]);
        8'h03:   rd_data_o = 32'(count[hb_q][2]);
        8'h04:   rd_data_o = 32'(count[hb_q][3]);
        8'h05:   rd_data_o = cycles[hb_q];
        8'h06:   rd_data_o = log_count[hb_q];
        default: rd_data_o = '0;
      endcase
    end
  end
endmodule
