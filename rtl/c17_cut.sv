// c17_cut - ISCAS'85 benchmark c17 with a fault-injection multiplexer (FIM)
// on every one of its 11 lines.
//
// Lines are numbered in the renumbered netlist order: 1..5 are the primary
// inputs, 6..11 the outputs of the six two-input NAND gates
//   6 = NAND(1,3)   7 = NAND(3,4)   8 = NAND(2,7)
//   9 = NAND(7,5)  10 = NAND(6,8)  11 = NAND(8,9)
// and lines 10 and 11 are the primary outputs. Each line is split into a
// pre-multiplexer and a post-multiplexer net with a FIM in between; gates read
// post-multiplexer nets, so a fault on a line reaches every gate it fans out to.
//
// fault_sel_i is the one-hot fault vector of bist_pkg: bit 0 selects no fault,
// bit 2j-1 forces line j to 0, bit 2j forces it to 1. The netlist and the
// select layout follow the published circuit; the circuit is combinational.
module c17_cut (
  input  logic [4:0]  pattern_i,   // bit 4 drives input line 1, bit 0 line 5
  input  logic [22:0] fault_sel_i, // one-hot fault vector, bit k = fault index k
  output logic [1:0]  response_o   // bit 1 = line 10, bit 0 = line 11
);
  localparam int unsigned NW = 11;

  logic [NW:1] pre_mux;  // value before each line's FIM
  logic [NW:1] post_mux; // value after each line's FIM

  // Primary inputs feed lines 1..5.
  always_comb begin
    for (int unsigned j = 1; j <= 5; j++) pre_mux[j] = pattern_i[5-j];
  end

  // Gate outputs, reading post-multiplexer lines.
  assign pre_mux[6]  = ~(post_mux[1] & post_mux[3]);
  assign pre_mux[7]  = ~(post_mux[3] & post_mux[4]);
  assign pre_mux[8]  = ~(post_mux[2] & post_mux[7]);
  assign pre_mux[9]  = ~(post_mux[7] & post_mux[5]);
  assign pre_mux[10] = ~(post_mux[6] & post_mux[8]);
  assign pre_mux[11] = ~(post_mux[8] & post_mux[9]);

  for (genvar j = 1; j <= NW; j++) begin : g_fim
    fim u_fim (
      .line_i   (pre_mux[j]),
      .sel_sa0_i(fault_sel_i[2*j-1]),
      .sel_sa1_i(fault_sel_i[2*j]),
      .line_o   (post_mux[j])
    );
  end

  assign response_o = {post_mux[10], post_mux[11]};

  // Bit 0 of the fault vector only marks the fault-free run.
  logic unused_sel;
  assign unused_sel = fault_sel_i[0];
endmodule
