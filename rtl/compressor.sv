// compressor - space compactor that folds the N_OUT response bits of a circuit
// under test into one bit, so that fewer bits need to be stored and compared.
//
// Three compressors sit behind each CUT; the published design tailors each one
// to its CUT but does not give their logic. This design uses the three
// simplest reductions, selected by MODE:
//   0 - parity (XOR of all outputs)
//   1 - AND of all outputs
//   2 - OR of all outputs
// Purely combinational.
module compressor #(
  parameter int unsigned N_OUT = 2,
  parameter int unsigned MODE  = 0
) (
  input  logic [N_OUT-1:0] response_i,
  output logic             signature_o
);
  always_comb begin
    unique case (MODE)
      1:       signature_o = &response_i;
      2:       signature_o = |response_i;
      default: signature_o = ^response_i;
    endcase
  end
endmodule
