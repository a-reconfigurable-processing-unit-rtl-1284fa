// fim - fault-injection multiplexer placed on one line of a circuit under test.
//
// A 4-to-1 multiplexer whose data inputs are the line itself, constant 1,
// constant 0 and the line again. The two select bits {sel_sa0, sel_sa1} are
// taken from the CUT's one-hot fault vector:
//   00 - the line passes unchanged
//   01 - stuck-at-1 is injected
//   10 - stuck-at-0 is injected
//   11 - treated as normal operation (the line passes)
// The encoding is the published one. Purely combinational, no timing.
module fim (
  input  logic line_i,    // pre-multiplexer value of the line
  input  logic sel_sa0_i, // first select bit: force 0
  input  logic sel_sa1_i, // second select bit: force 1
  output logic line_o     // post-multiplexer value of the line
);
  always_comb begin
    unique case ({sel_sa0_i, sel_sa1_i})
      2'b01:   line_o = 1'b1;
      2'b10:   line_o = 1'b0;
      default: line_o = line_i;
    endcase
  end
endmodule
