// dgldpc_pkg: fixed-point log-likelihood-ratio (LLR) arithmetic shared by all
// decoder blocks of the DGLDPC decoder.
//
// An LLR is L = ln(P(bit=0)/P(bit=1)), so a positive value favours a 0.  It is
// held as a signed two's-complement number of LLR_W bits with LLR_FRAC
// fractional bits, limited to the symmetric range [-LLR_MAX, +LLR_MAX] so that
// negation never overflows.  The word length and scaling are choices of this
// design; the decoding equations are the exact tanh rule and plain sums.
//
// boxplus() is the two-input tanh rule 2*atanh(tanh(a/2)*tanh(b/2)), computed
// exactly in its Jacobian form
//   |a [+] b| = min(|a|,|b|) + f(|a|+|b|) - f(||a|-|b||),  f(x) = ln(1+e^-x)
//   sign      = sign(a) xor sign(b)
// where f() comes from a small table built at elaboration time from that
// formula, rounded to LLR_FRAC fractional bits.  All functions are pure
// combinational logic.
package dgldpc_pkg;

  localparam int LLR_W    = 8;   // LLR word length
  localparam int LLR_FRAC = 2;   // fractional bits, LSB = 0.25
  localparam int LLR_MAX  = (1 << (LLR_W - 1)) - 1;

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic        [LLR_W-1:0] mag_t;

  // Correction table f(x) = ln(1 + exp(-x)); entry i is for x = i / 2^LLR_FRAC.
  localparam int CORR_LEN = 16;
  typedef logic [3:0] corr_tab_t [CORR_LEN];

  function automatic corr_tab_t make_corr_tab();
    corr_tab_t t;
    real scale;
    scale = real'(1 << LLR_FRAC);
    for (int i = 0; i < CORR_LEN; i++)
      t[i] = 4'($rtoi($ln(1.0 + $exp(-real'(i) / scale)) * scale + 0.5));
    return t;
  endfunction

  localparam corr_tab_t CORR_TAB = make_corr_tab();

  function automatic logic [3:0] corr(input logic [LLR_W:0] x);
    return (x < (LLR_W + 1)'(CORR_LEN)) ? CORR_TAB[x[3:0]] : 4'd0;
  endfunction

  // Saturate a wide signed value to the LLR range.
  function automatic llr_t sat(input logic signed [LLR_W+3:0] v);
    if (v > (LLR_W + 4)'(LLR_MAX))       return llr_t'(LLR_MAX);
    else if (v < -(LLR_W + 4)'(LLR_MAX)) return llr_t'(-LLR_MAX);
    else                                 return llr_t'(v);
  endfunction

  // Saturating sum of two LLRs.
  function automatic llr_t sat_add(input llr_t a, input llr_t b);
    return sat((LLR_W + 4)'(a) + (LLR_W + 4)'(b));
  endfunction

  function automatic mag_t llr_abs(input llr_t a);
    return a[LLR_W-1] ? mag_t'(-a) : mag_t'(a);
  endfunction

  // Two-input tanh rule (see above).
  function automatic llr_t boxplus(input llr_t a, input llr_t b);
    mag_t ma, mb, mn;
    logic [LLR_W:0] s, d;
    logic signed [LLR_W+3:0] m;
    ma = llr_abs(a);
    mb = llr_abs(b);
    mn = (ma < mb) ? ma : mb;
    s  = (LLR_W + 1)'(ma) + (LLR_W + 1)'(mb);
    d  = (ma < mb) ? (LLR_W + 1)'(mb - ma) : (LLR_W + 1)'(ma - mb);
    m  = (LLR_W + 4)'(mn) + (LLR_W + 4)'(corr(s)) - (LLR_W + 4)'(corr(d));
    if (m < 0) m = '0;
    return (a[LLR_W-1] ^ b[LLR_W-1]) ? llr_t'(-m) : llr_t'(m);
  endfunction

  // Hard decision: 1 when the LLR favours a one.
  function automatic logic hard(input llr_t a);
    return a[LLR_W-1];
  endfunction

endpackage
