// scn_codeword_check: tells whether NSPC^D hard decisions, in product order,
// form a codeword of the (NSPC, NSPC-1)^D single-parity-check product code.
//
// It re-encodes the information positions with spc_pc_encoder and compares
// the result with the input: the word is a codeword exactly when all its check
// positions match.  The decoder ANDs this flag over all SCNs to detect a
// converged codeword and stop early.  How convergence is detected is this
// design's choice.
//
// Interface: bits[] in (product order, as in spc_pc_encoder), ok out.
// Purely combinational.
module scn_codeword_check #(
  parameter int unsigned NSPC = 4,   // SPC component code length n_spc
  parameter int unsigned D    = 2    // number of dimensions
) (
  input  logic [NSPC**D-1:0] bits,
  output logic               ok
);

  localparam int unsigned K  = (NSPC - 1) ** D;
  localparam int unsigned NT = NSPC ** D;

  logic [K-1:0]  info;
  logic [NT-1:0] cw;

  // Pick the information positions (all digits below NSPC-1).
  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      int unsigned p, w, r;
      p = 0; w = 1; r = i;
      for (int d = 0; d < int'(D); d++) begin
        p += (r % (NSPC - 1)) * w;
        r /= (NSPC - 1);
        w *= NSPC;
      end
      info[i] = bits[p];
    end
  end

  spc_pc_encoder #(.NSPC(NSPC), .D(D)) u_enc (.info(info), .cw(cw));

  assign ok = (cw == bits);

endmodule
