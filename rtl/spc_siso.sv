// spc_siso: soft-in soft-out decoder of one (N, N-1) single-parity-check code.
//
// For every bit b it returns the extrinsic LLR
//   ext[b] = 2 atanh( prod_{l != b} tanh(x[l]/2) ),
// the tanh rule of the SPC component decoder.  The product over "all other
// bits" is formed with a forward and a backward chain of two-input box-plus
// operations (dgldpc_pkg::boxplus), so N-2 + N-2 + N-2 operations serve all N
// outputs instead of N*(N-2).  The forward/backward arrangement and the
// fixed-point box-plus are choices of this design.
//
// Interface: x[N] are the input LLRs (channel plus a-priori), ext[N] the
// extrinsic LLRs.  Purely combinational, no clock.
module spc_siso
  import dgldpc_pkg::*;
#(
  parameter int unsigned N = 4   // code length, at least 2
) (
  input  llr_t x   [N],
  output llr_t ext [N]
);

  llr_t fwd [N];   // fwd[i] = x[0] [+] ... [+] x[i]
  llr_t bwd [N];   // bwd[i] = x[i] [+] ... [+] x[N-1]

  always_comb begin
    fwd[0] = x[0];
    for (int i = 1; i < int'(N); i++) fwd[i] = boxplus(fwd[i-1], x[i]);
    bwd[N-1] = x[N-1];
    for (int i = int'(N) - 2; i >= 0; i--) bwd[i] = boxplus(bwd[i+1], x[i]);
  end

  always_comb begin
    ext[0]   = bwd[1];
    ext[N-1] = fwd[N-2];
    for (int b = 1; b < int'(N) - 1; b++) ext[b] = boxplus(fwd[b-1], bwd[b+1]);
  end

endmodule
