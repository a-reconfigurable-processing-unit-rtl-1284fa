// output_evaluator - comparators #1..#4 of one hardware block lane.
//
// Compressors #1..#3 reduce both the faulty response and the fault-free
// response; comparators #1..#3 compare the two reduced signatures, and
// comparator #4 compares the uncompressed responses. detect_o[k] is 1 when
// comparator #(k+1) sees a difference, i.e. the injected fault is detected on
// that path. The structure (three compressors, four comparators) is the
// published one; the compressor logic is this design's (see compressor).
// Purely combinational.
module output_evaluator
  import bist_pkg::*;
#(
  parameter int unsigned N_OUT = 2
) (
  input  logic [N_OUT-1:0] faulty_i,  // response of the fault-injected CUT
  input  logic [N_OUT-1:0] good_i,    // fault-free signature
  output logic [N_CMP-1:0] detect_o
);
  for (genvar k = 0; k < N_CMP - 1; k++) begin : g_cmp
    logic sig_faulty, sig_good;
    compressor #(.N_OUT(N_OUT), .MODE(k)) u_cmp_f (
      .response_i (faulty_i),
      .signature_o(sig_faulty)
    );
    compressor #(.N_OUT(N_OUT), .MODE(k)) u_cmp_g (
      .response_i (good_i),
      .signature_o(sig_good)
    );
    assign detect_o[k] = sig_faulty != sig_good;
  end

  assign detect_o[N_CMP-1] = faulty_i != good_i;
endmodule
