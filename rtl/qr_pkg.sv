// qr_pkg: shared types, constants and elaboration-time functions of the
// pipelined Givens-rotation QR decomposition.
//
// The CORDIC stretching factor K and the four adder architectures follow the
// design description. The stream tag (valid bit plus column index), the
// fixed-point constant quantisation and the gain bookkeeping of the
// pre-/post-scaling (pre_exp, post_exp) are this design's own choices; the
// README derives the scaling exponents.
package qr_pkg;

  // CORDIC stretching factor of the circular mode (limit of prod sqrt(1+2^-2i)).
  localparam real K_GAIN = 1.646760258121;

  // Adder architecture used inside every CORDIC add/subtract unit.
  typedef enum logic [1:0] {
    ADD_RCA   = 2'd0,   // ripple-carry
    ADD_CLA   = 2'd1,   // carry look-ahead
    ADD_CSEL  = 2'd2,   // carry-select
    ADD_CSKIP = 2'd3    // carry-skip
  } adder_arch_e;

  // Width of the column index carried with every stream word.
  localparam int COLW = 8;

  // Tag that travels in lock step with the data of a stream.
  typedef struct packed {
    logic            valid;  // the word holds a matrix column
    logic [COLW-1:0] col;    // column index n (0-based) of that word
  } tag_t;

  // K raised to an integer power.
  function automatic real kpow(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * K_GAIN;
    else        for (int i = 0; i < -e; i++) r = r / K_GAIN;
    return r;
  endfunction

  // First iteration index of a linear CORDIC that must reach |z| = K^e:
  // the iterations i = imin.. cover |z| < 2^(1-imin).
  function automatic int lin_imin(input int e);
    int imin;
    imin = 0;
    while (kpow(e) >= 2.0 ** (1 - imin)) imin--;
    return imin;
  endfunction

  // Extra fraction bits a linear CORDIC multiplying by K^e keeps, so that a
  // small factor is still resolved to about 2^-(FRAC+2) relative to itself:
  // the bits needed to lift K^e to at least 1, plus two.
  function automatic int lin_guard(input int e);
    int g;
    g = 0;
    while (kpow(e) * (2.0 ** g) < 1.0) g++;
    return g + 2;
  endfunction

  // Pipeline depth of a linear CORDIC multiplying by K^e with FRAC fraction
  // bits: iterations i = lin_imin(e) .. FRAC + lin_guard(e).
  function automatic int lin_latency(input int e, input int frac);
    return frac + lin_guard(e) - lin_imin(e) + 1;
  endfunction

  // K^e as a fixed-point number with frac fraction bits (round to nearest).
  function automatic longint kfix(input int e, input int frac);
    return longint'(kpow(e) * (2.0 ** frac));
  endfunction

  // Pre-scaling exponent of local row r (0 = pivot) of stage s in an M-row matrix.
  // Stage 0 applies S = diag(K^-2(M-1), K^-2(M-1), K^-(2M-3), ..., K^-M);
  // later stages raise only their pivot row by one factor of K.
  function automatic int pre_exp(input int m, input int s, input int r);
    if (s == 0) return (r == 0) ? -2 * (m - 1) : -(2 * m - 1 - r);
    return (r == 0) ? 1 : 0;
  endfunction

  // Post-scaling exponent of R row s: S' = diag(K^(M-1), ..., K^0).
  function automatic int post_exp(input int m, input int s);
    return m - 1 - s;
  endfunction

  // Depth of the pre-processing of stage s: its slowest row.
  function automatic int pre_latency(input int m, input int s, input int frac);
    int l;
    l = 0;
    for (int r = 0; r < m - s; r++)
      if (pre_exp(m, s, r) != 0 && lin_latency(pre_exp(m, s, r), frac) > l)
        l = lin_latency(pre_exp(m, s, r), frac);
    return l;
  endfunction

  // Depth of the post-processing of stage s (none when the factor is K^0).
  function automatic int post_latency(input int m, input int s, input int frac);
    return (post_exp(m, s) == 0) ? 0 : lin_latency(post_exp(m, s), frac);
  endfunction

  // Depth of one circular CORDIC: a quadrant step plus niter iterations.
  function automatic int givens_latency(input int niter);
    return niter + 1;
  endfunction

  // Depth of the rotation chain of stage s (M-s-1 Givens rotations).
  function automatic int proc_latency(input int m, input int s, input int niter);
    return (m - s - 1) * givens_latency(niter);
  endfunction

  // Time from a word entering stage 0 to the same word entering stage s.
  function automatic int stage_start(input int m, input int s, input int frac, input int niter);
    int t;
    t = 0;
    for (int k = 0; k < s; k++) t += pre_latency(m, k, frac) + proc_latency(m, k, niter);
    return t;
  endfunction

  // Time from a word entering stage 0 to R row s leaving stage s.
  function automatic int row_done(input int m, input int s, input int frac, input int niter);
    return stage_start(m, s, frac, niter) + pre_latency(m, s, frac)
         + proc_latency(m, s, niter) + post_latency(m, s, frac);
  endfunction

endpackage
