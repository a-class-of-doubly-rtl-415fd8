// llr_ref_pkg: behavioural reference of the fixed-point LLR arithmetic, used
// by the testbenches to work out expected values independently of the RTL.
//
// Values are plain integers in units of one LSB (0.25 for 2 fractional bits).
// The two-input tanh rule is evaluated with real arithmetic:
//   |a [+] b| = min(|a|,|b|) + q(f(|a|+|b|)) - q(f(||a|-|b||)), f(x)=ln(1+e^-x)
// where q() rounds to the LSB, clamped at zero; the sign is the product of
// the signs.  exact_boxplus() is the unquantised 2*atanh(tanh(a/2)tanh(b/2)).
package llr_ref_pkg;

  localparam int W    = 8;
  localparam int FRAC = 2;
  localparam int LMAX = (1 << (W - 1)) - 1;
  localparam real LSB = 1.0 / real'(1 << FRAC);

  function automatic int rsat(input int v);
    return (v > LMAX) ? LMAX : (v < -LMAX) ? -LMAX : v;
  endfunction

  function automatic int qf(input int x_lsb);
    return $rtoi($ln(1.0 + $exp(-real'(x_lsb) * LSB)) / LSB + 0.5);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int rbox(input int a, input int b);
    int ma, mb, m;
    ma = iabs(a);
    mb = iabs(b);
    m  = ((ma < mb) ? ma : mb) + qf(ma + mb) - qf(iabs(ma - mb));
    if (m < 0) m = 0;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic real exact_boxplus(input real a, input real b);
    real p;
    p = $tanh(a / 2.0) * $tanh(b / 2.0);
    if (p > 0.999999999) p = 0.999999999;
    if (p < -0.999999999) p = -0.999999999;
    return 2.0 * $atanh(p);
  endfunction

  // Extrinsic outputs of an SPC decoder, same grouping as the RTL: forward
  // chain x0..x(b-1), backward chain x(N-1)..x(b+1), then combined.
  function automatic void ref_spc(input int n, input int x[], output int e[]);
    int fwd[], bwd[];
    fwd = new[n];
    bwd = new[n];
    e   = new[n];
    fwd[0] = x[0];
    for (int i = 1; i < n; i++) fwd[i] = rbox(fwd[i-1], x[i]);
    bwd[n-1] = x[n-1];
    for (int i = n - 2; i >= 0; i--) bwd[i] = rbox(bwd[i+1], x[i]);
    e[0]   = bwd[1];
    e[n-1] = fwd[n-2];
    for (int b = 1; b < n - 1; b++) e[b] = rbox(fwd[b-1], bwd[b+1]);
  endfunction

  // Reference model of the SCN local decoder for an n^d product code:
  // tau local iterations over the dimensions, then the sum over dimensions.
  function automatic void ref_scn(input int n, input int d, input int tau, input int ich[], output int out[]);
    int nt, e[][], line[], le[], stride, acc;
    nt = n ** d;
    e = new[d];
    foreach (e[c]) begin e[c] = new[nt]; foreach (e[c][t]) e[c][t] = 0; end
    line = new[n];
    for (int it = 0; it < tau; it++)
      for (int c = 0; c < d; c++) begin
        stride = n ** c;
        for (int t0 = 0; t0 < nt; t0++) begin
          if ((t0 / stride) % n != 0) continue;   // first bit of each line
          for (int b = 0; b < n; b++) begin
            acc = ich[t0 + b*stride];
            for (int l = 0; l < d; l++) if (l != c) acc += e[l][t0 + b*stride];
            line[b] = rsat(acc);
          end
          ref_spc(n, line, le);
          for (int b = 0; b < n; b++) e[c][t0 + b*stride] = le[b];
        end
      end
    out = new[nt];
    for (int t = 0; t < nt; t++) begin
      acc = 0;
      for (int c = 0; c < d; c++) acc += e[c][t];
      out[t] = rsat(acc);
    end
  endfunction

  // Random LLR, mostly moderate, sometimes at the rails.
  function automatic int rand_llr();
    int r;
    r = $urandom_range(0, 9);
    if (r == 0) return ($urandom_range(0, 1) != 0) ? LMAX : -LMAX;
    if (r == 1) return $urandom_range(0, 6) - 3;
    return int'($urandom_range(0, 2 * 60)) - 60;
  endfunction

endpackage
