// ec13_cut - EC13 test circuit, a one-bit full adder, with a fault-injection
// multiplexer (FIM) on every one of its 8 lines.
//
// Lines 1..3 are the inputs a, b, c_in. The gates are
//   4 = AND(1,2)   5 = XOR(1,2)   6 = AND(5,3)   7 = XOR(5,3)   8 = OR(4,6)
// so line 7 is the sum and line 8 the carry. The response is {sum, carry}.
// Only the full-adder function, its 3 inputs, 2 outputs and 16 faults are
// published; this gate structure and line numbering is this design's own, and
// it reproduces every entry of the published EC13 fault localisation tables.
//
// fault_sel_i is the one-hot fault vector of bist_pkg (bit 2j-1 forces line j
// to 0, bit 2j forces it to 1, bit 0 no fault). Purely combinational.
module ec13_cut (
  input  logic [2:0]  pattern_i,   // {a, b, c_in}: bit 2 drives line 1
  input  logic [16:0] fault_sel_i, // one-hot fault vector
  output logic [1:0]  response_o   // {sum, carry}
);
  localparam int unsigned NW = 8;

  logic [NW:1] pre_mux;
  logic [NW:1] post_mux;

  assign pre_mux[1] = pattern_i[2];
  assign pre_mux[2] = pattern_i[1];
  assign pre_mux[3] = pattern_i[0];
  assign pre_mux[4] = post_mux[1] & post_mux[2];
  assign pre_mux[5] = post_mux[1] ^ post_mux[2];
  assign pre_mux[6] = post_mux[5] & post_mux[3];
  assign pre_mux[7] = post_mux[5] ^ post_mux[3];
  assign pre_mux[8] = post_mux[4] | post_mux[6];

  for (genvar j = 1; j <= NW; j++) begin : g_fim
    fim u_fim (
      .line_i   (pre_mux[j]),
      .sel_sa0_i(fault_sel_i[2*j-1]),
      .sel_sa1_i(fault_sel_i[2*j]),
      .line_o   (post_mux[j])
    );
  end

  assign response_o = {post_mux[7], post_mux[8]};

  logic unused_sel;
  assign unused_sel = fault_sel_i[0];
endmodule
