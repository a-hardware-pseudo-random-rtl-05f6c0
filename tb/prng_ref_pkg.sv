// prng_ref_pkg: reference model of the stochastic logistic-map PRNG, for the
// testbenches. It recomputes one iteration bit by bit from the definition:
// three Fibonacci LFSRs given by their tap positions, comparators
// (LFSR < value), AND products, one-counts over 65535 bits, then
// x' = min(4 c2 - c1, 65535), d' = x' / 4, seeds + 1 (0 skipped).
package prng_ref_pkg;

  typedef int unsigned taps_t [4];

  localparam taps_t TAPS_X1 = '{16, 14, 13, 11};
  localparam taps_t TAPS_X  = '{16, 15, 13, 4};
  localparam taps_t TAPS_U  = '{16, 12, 3, 1};

  function automatic logic [15:0] lfsr_next(logic [15:0] s, taps_t t);
    logic fb = 1'b0;
    foreach (t[i]) fb ^= s[t[i] - 1];
    return {s[14:0], fb};
  endfunction

  function automatic logic [15:0] seed_next(logic [15:0] s);
    return (s == 16'hFFFF) ? 16'h0001 : s + 16'h0001;
  endfunction

  typedef struct {
    logic [15:0] x, d;
    logic [15:0] seed_x1, seed_x, seed_u;
    int unsigned c1, c2;       // last iteration's counts
    bit          saturated;    // last iteration hit the 1.0 limit
  } state_t;

  function automatic void iterate(ref state_t st);
    logic [15:0] s1, s2, s3, xi;
    int unsigned c1, c2, v;
    s1 = st.seed_x1; s2 = st.seed_x; s3 = st.seed_u;
    xi = 16'hFFFF - st.x;
    c1 = 0; c2 = 0;
    for (int i = 0; i < 65535; i++) begin
      if (s1 < xi && s2 < st.x) begin
        c2++;
        if (s3 < st.d) c1++;
      end
      s1 = lfsr_next(s1, TAPS_X1);
      s2 = lfsr_next(s2, TAPS_X);
      s3 = lfsr_next(s3, TAPS_U);
    end
    v = 4 * c2 - c1;
    st.saturated = (v > 65535);
    if (v > 65535) v = 65535;
    st.c1 = c1; st.c2 = c2;
    st.x = 16'(v);
    st.d = 16'(v / 4);
    st.seed_x1 = seed_next(st.seed_x1);
    st.seed_x  = seed_next(st.seed_x);
    st.seed_u  = seed_next(st.seed_u);
  endfunction

endpackage
