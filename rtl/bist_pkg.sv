// bist_pkg - types, sizes and tables shared by the BIST hardware blocks.
//
// Each circuit under test (CUT) is described by its number of primary inputs,
// primary outputs and lines ("wires"). Lines are numbered 1..N_WIRE in the
// renumbered netlist order: inputs first, then gate outputs. Every line carries
// a fault-injection multiplexer (FIM), so a CUT has 2*N_WIRE stuck-at faults.
//
// Fault index k (0..2*N_WIRE) is the position of the single 1 in the FIM
// select vector: k = 0 injects nothing, k = 2j-1 forces line j to 0 and
// k = 2j forces line j to 1. Shifting the one-hot vector by one position thus
// walks through every fault in turn.
//
// Test patterns are written MSB first: bit N_IN-1 drives input line 1.
// Responses likewise: bit N_OUT-1 is the first primary output.
//
// The c17 netlist, the FIM encoding and the deterministic test sets below follow
// the published ones; the EC13 gate structure is this design's own reading of
// its fault tables (see ec13_cut).
package bist_pkg;

  typedef enum logic [0:0] {
    CUT_C17  = 1'b0,
    CUT_EC13 = 1'b1
  } cut_e;

  // Pattern source of the test pattern generator.
  typedef enum logic [0:0] {
    TPG_DETERMINISTIC = 1'b0,
    TPG_PSEUDORANDOM  = 1'b1
  } tpg_mode_e;

  // Widest CUT supported by the shared buses.
  localparam int unsigned MAX_IN   = 16;

  // Width of the cellular-automaton random number generator.
  localparam int unsigned RNG_W = 16;

  // Number of comparators per CUT: three behind compressors, one direct.
  localparam int unsigned N_CMP = 4;

  function automatic int unsigned cut_n_in(cut_e c);
    return (c == CUT_C17) ? 5 : 3;
  endfunction

  function automatic int unsigned cut_n_out(cut_e c);
    return 2;
  endfunction

  function automatic int unsigned cut_n_wire(cut_e c);
    return (c == CUT_C17) ? 11 : 8;
  endfunction

  function automatic int unsigned cut_n_fault(cut_e c);
    return 2 * cut_n_wire(c);
  endfunction

  // Number of stored deterministic patterns (ATALANTA test sets).
  function automatic int unsigned det_count(cut_e c);
    return (c == CUT_C17) ? 4 : 5;
  endfunction

  // Deterministic test-pattern ROM, right-aligned in MAX_IN bits.
  function automatic logic [MAX_IN-1:0] det_pattern(cut_e c, int unsigned idx);
    logic [MAX_IN-1:0] p;
    p = '0;
    if (c == CUT_C17) begin
      case (idx)
        0: p[4:0] = 5'b01111;
        1: p[4:0] = 5'b11010;
        2: p[4:0] = 5'b10000;
        3: p[4:0] = 5'b10101;
        default: p = '0;
      endcase
    end else begin
      case (idx)
        0: p[2:0] = 3'b101;
        1: p[2:0] = 3'b100;
        2: p[2:0] = 3'b111;
        3: p[2:0] = 3'b001;
        4: p[2:0] = 3'b010;
        default: p = '0;
      endcase
    end
    return p;
  endfunction

  function automatic int unsigned clog2_min1(int unsigned v);
    return (v <= 2) ? 1 : $clog2(v);
  endfunction

endpackage
