// cut_fim - a circuit under test with fault-injection multiplexers, chosen by
// the CUT parameter from the circuits this design carries.
//
// With the fault vector held at bit 0 (no fault) this is also the source of
// the fault-free signatures: the hardware blocks use a second, fault-free copy
// of the CUT to produce the expected response of every test pattern, in the
// same clock cycle as the faulty copy. Widths come from bist_pkg. Purely
// combinational.
module cut_fim
  import bist_pkg::*;
#(
  parameter cut_e        CUT    = CUT_C17,
  localparam int unsigned N_IN  = cut_n_in(CUT),
  localparam int unsigned N_OUT = cut_n_out(CUT),
  localparam int unsigned N_SEL = cut_n_fault(CUT) + 1
) (
  input  logic [N_IN-1:0]  pattern_i,   // test pattern, bit N_IN-1 = input line 1
  input  logic [N_SEL-1:0] fault_sel_i, // one-hot fault vector
  output logic [N_OUT-1:0] response_o   // CUT response
);
  if (CUT == CUT_C17) begin : g_c17
    c17_cut u_cut (
      .pattern_i  (pattern_i),
      .fault_sel_i(fault_sel_i),
      .response_o (response_o)
    );
  end else begin : g_ec13
    ec13_cut u_cut (
      .pattern_i  (pattern_i),
      .fault_sel_i(fault_sel_i),
      .response_o (response_o)
    );
  end
endmodule
