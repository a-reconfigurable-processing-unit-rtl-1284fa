// bist_ref_pkg - behavioural reference models used by the testbenches.
//
// These are written independently of the RTL: each circuit is evaluated line
// by line with an explicit "is this the faulty line" test instead of
// multiplexers, and the cellular automaton is evaluated with shifts. Fault
// index k: 0 none, 2j-1 line j stuck-at-0, 2j line j stuck-at-1.
package bist_ref_pkg;

  function automatic logic force_line(int k, int j, logic v);
    if (k === 2*j-1) return 1'b0;
    if (k === 2*j)   return 1'b1;
    return v;
  endfunction

  // c17: returns {line 10, line 11}.
  function automatic logic [1:0] ref_c17(logic [4:0] p, int k);
    logic w[1:11];
    for (int j = 1; j <= 5; j++) w[j] = force_line(k, j, p[5-j]);
    w[6]  = force_line(k, 6,  !(w[1] && w[3]));
    w[7]  = force_line(k, 7,  !(w[3] && w[4]));
    w[8]  = force_line(k, 8,  !(w[2] && w[7]));
    w[9]  = force_line(k, 9,  !(w[7] && w[5]));
    w[10] = force_line(k, 10, !(w[6] && w[8]));
    w[11] = force_line(k, 11, !(w[8] && w[9]));
    return {w[10], w[11]};
  endfunction

  // EC13 full adder: returns {sum, carry}.
  function automatic logic [1:0] ref_ec13(logic [2:0] p, int k);
    logic w[1:8];
    for (int j = 1; j <= 3; j++) w[j] = force_line(k, j, p[3-j]);
    w[4] = force_line(k, 4, w[1] && w[2]);
    w[5] = force_line(k, 5, w[1] !== w[2]);
    w[6] = force_line(k, 6, w[5] && w[3]);
    w[7] = force_line(k, 7, w[5] !== w[3]);
    w[8] = force_line(k, 8, w[4] || w[6]);
    return {w[7], w[8]};
  endfunction

  function automatic logic [1:0] ref_cut(bit is_ec13, logic [4:0] p, int k);
    return is_ec13 ? ref_ec13(p[2:0], k) : ref_c17(p, k);
  endfunction

  // One generation of the 16-cell automaton (rule 150 in cells 0, 2, 4).
  function automatic logic [15:0] ref_ca_step(logic [15:0] s);
    return (s << 1) ^ (s >> 1) ^ (s & 16'h0015);
  endfunction

  // Reference compressor signatures: parity, AND, OR of a 2-bit response.
  function automatic logic ref_compress(int mode, logic [1:0] r);
    case (mode)
      1: return r[1] & r[0];
      2: return r[1] | r[0];
      default: return r[1] ^ r[0];
    endcase
  endfunction

  // Expected outcome of one test session, worked out by plain fault
  // simulation: faults outside, patterns inside, each fault counted once per
  // comparator on its first detection.
  localparam int MAXP = 1024;
  localparam int MAXF = 22;

  typedef struct {
    int          n_pat;
    int          n_fault;
    logic [4:0]  pat       [MAXP];
    int          count     [4];        // faults detected per comparator
    int          first_pat [MAXF+1];   // first pattern detecting fault k (#4), -1 none
    int          per_pat   [MAXP];     // faults first detected by each pattern (#4)
  } session_t;

  function automatic void make_patterns(bit is_ec13, bit random, int n_rand, logic [15:0] seed,
                                        ref session_t s);
    logic [4:0] c17_det [4] = '{5'b01111, 5'b11010, 5'b10000, 5'b10101};
    logic [2:0] ec_det  [5] = '{3'b101, 3'b100, 3'b111, 3'b001, 3'b010};
    logic [15:0] st;
    st = (seed === 0) ? 16'h0001 : seed;
    s.n_fault = is_ec13 ? 16 : 22;
    if (!random) begin
      s.n_pat = is_ec13 ? 5 : 4;
      for (int i = 0; i < s.n_pat; i++) s.pat[i] = is_ec13 ? {2'b00, ec_det[i]} : c17_det[i];
    end else begin
      s.n_pat = (n_rand === 0) ? 1 : n_rand;
      for (int i = 0; i < s.n_pat; i++) begin
        s.pat[i] = is_ec13 ? {2'b00, st[15:13]} : st[15:11];
        st = ref_ca_step(st);
      end
    end
  endfunction

  function automatic void simulate(bit is_ec13, ref session_t s);
    for (int m = 0; m < 4; m++) s.count[m] = 0;
    for (int i = 0; i < s.n_pat; i++) s.per_pat[i] = 0;
    for (int k = 1; k <= s.n_fault; k++) begin
      bit seen [4] = '{0, 0, 0, 0};
      s.first_pat[k] = -1;
      for (int i = 0; i < s.n_pat; i++) begin
        logic [1:0] g, f;
        g = ref_cut(is_ec13, s.pat[i], 0);
        f = ref_cut(is_ec13, s.pat[i], k);
        for (int m = 0; m < 4; m++) begin
          bit d;
          d = (m === 3) ? (f !== g) : (ref_compress(m, f) !== ref_compress(m, g));
          if (d && !seen[m]) begin
            seen[m] = 1;
            s.count[m]++;
            if (m === 3) begin
              s.first_pat[k] = i;
              s.per_pat[i]++;
            end
          end
        end
      end
    end
  endfunction

endpackage
