// svn_decoder: super-variable-node (SVN) local decoder for an (N, N-1)
// single-parity-check component code.
//
// The SVN's N code bits are its N edges to the super-check nodes.  Bits
// 0..N-2 are the transmitted (systematic) bits and carry a channel LLR ch[j];
// bit N-1 is the local parity and is not transmitted.  With the SCN messages
// c2v[j] the SVN forms x[j] = ch[j] + c2v[j] (x[N-1] = c2v[N-1]) and decodes
// its SPC with the tanh rule (spc_siso), giving s[j] from all other bits.
//   message to the SCN on edge j : v2c[j] = ch[j] + s[j]   (c2v[j] excluded)
//   a-posteriori LLR of bit j    : ch[j] + c2v[j] + s[j]
// The hard decisions of the transmitted bits are the decoder output; the
// edge bits used for the convergence test are those decisions plus their
// parity, so they always form an SPC codeword.  Which SVN code bits are the
// transmitted ones is this design's choice; the code definition fixes only
// the (4,3) SPC and that the SVN computes extrinsic values from all its
// inputs.  With this choice 1000 SVNs carry 3000 bits at rate 0.417, as the
// DGLDPC-1 code does.
//
// Interface: ch[N-1], c2v[N] in; v2c[N], info_hat[N-1], code_hat[N] out.
// Purely combinational.
module svn_decoder
  import dgldpc_pkg::*;
#(
  parameter int unsigned N = 4   // SVN component SPC code length
) (
  input  llr_t         ch       [N-1],
  input  llr_t         c2v      [N],
  output llr_t         v2c      [N],
  output logic [N-2:0] info_hat,
  output logic [N-1:0] code_hat
);

  llr_t x [N];
  llr_t s [N];

  always_comb begin
    for (int j = 0; j < int'(N) - 1; j++) x[j] = sat_add(ch[j], c2v[j]);
    x[N-1] = c2v[N-1];
  end

  spc_siso #(.N(N)) u_siso (.x(x), .ext(s));

  always_comb begin
    for (int j = 0; j < int'(N) - 1; j++) begin
      v2c[j]      = sat_add(ch[j], s[j]);
      info_hat[j] = hard(sat_add(x[j], s[j]));
    end
    v2c[N-1] = s[N-1];
    code_hat = {^info_hat, info_hat};
  end

endmodule
