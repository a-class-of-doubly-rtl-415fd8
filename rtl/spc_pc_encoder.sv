// spc_pc_encoder: systematic encoder of the (NSPC, NSPC-1)^D single-parity-
// check product code.
//
// The (NSPC-1)^D information bits fill the corner of an NSPC^D hypercube whose
// coordinates are all below NSPC-1; information bit i, with base-(NSPC-1)
// digits (i_0, ..., i_{D-1}), goes to the product position with the same
// digits.  Check bits are then added one dimension after the other: for
// dimension d every position whose digit d equals NSPC-1 becomes the XOR of
// the NSPC-1 positions before it along that dimension.  Because earlier
// dimensions are complete when a later one is encoded, the last dimension also
// produces the checks on checks (for D = 2 the corner bit).  Every line of the
// result, in every dimension, then has even parity.  The construction (checks
// added per dimension, check on checks last) is that of the SPC product code;
// the bit ordering and the purely combinational form are this design's.
//
// Interface: info[] in, cw[] out in product order (position t has base-NSPC
// digits t_0 .. t_{D-1}, t_0 least significant; for D = 2, t = row*NSPC + col).
// Purely combinational.
module spc_pc_encoder #(
  parameter int unsigned NSPC = 4,   // SPC component code length n_spc
  parameter int unsigned D    = 2    // number of dimensions
) (
  input  logic [(NSPC-1)**D-1:0] info,
  output logic [NSPC**D-1:0]     cw
);

  localparam int unsigned K  = (NSPC - 1) ** D;
  localparam int unsigned NT = NSPC ** D;

  // Product position of information bit i.
  function automatic int unsigned info_pos(input int unsigned i);
    int unsigned p, w, r;
    p = 0; w = 1; r = i;
    for (int d = 0; d < int'(D); d++) begin
      p += (r % (NSPC - 1)) * w;
      r /= (NSPC - 1);
      w *= NSPC;
    end
    return p;
  endfunction

  always_comb begin
    logic [NT-1:0] v;
    v = '0;
    for (int unsigned i = 0; i < K; i++) v[info_pos(i)] = info[i];
    for (int unsigned d = 0; d < D; d++) begin
      int unsigned stride;
      stride = NSPC ** d;
      for (int unsigned t = 0; t < NT; t++) begin
        if ((t / stride) % NSPC == NSPC - 1) begin
          logic p;
          p = 1'b0;
          for (int unsigned b = 1; b < NSPC; b++) p ^= v[t - b * stride];
          v[t] = p;
        end
      end
    end
    cw = v;
  end

endmodule
