// spc_pc_dim_decoder: decodes all SPC component codes of one dimension of an
// (NSPC, NSPC-1)^D single-parity-check product code.
//
// The NSPC^D bits of the product code are held in "product order": bit t has
// base-NSPC digits (t_0, ..., t_{D-1}), t_0 the least significant, so for D = 2
// t = row*NSPC + column.  The component codes of dimension DIM (0-based; the
// dimension c = DIM+1 in the usual 1-based numbering) are the NSPC^(D-1) lines
// along which digit DIM varies: code a collects bit b at
//   t = (a mod NSPC^DIM) + b*NSPC^DIM + (a div NSPC^DIM)*NSPC^(DIM+1).
// For D = 2 dimension 1 works on rows and dimension 2 on columns.  That
// regrouping is the interleaver in front of and behind each component decoder;
// here it is only wiring.  One spc_siso per component code runs in parallel.
// The grouping into component codes follows the product-code definition; the
// parallel organisation is this design's.
//
// Interface: x[] are the SISO input LLRs (channel plus a-priori) in product
// order, ext[] the extrinsic LLRs of this dimension in product order.
// Purely combinational.
module spc_pc_dim_decoder
  import dgldpc_pkg::*;
#(
  parameter int unsigned NSPC = 4,   // SPC component code length n_spc
  parameter int unsigned D    = 2,   // number of dimensions
  parameter int unsigned DIM  = 0    // which dimension this unit decodes, 0..D-1
) (
  input  llr_t x   [NSPC**D],
  output llr_t ext [NSPC**D]
);

  localparam int unsigned NCODES = NSPC ** (D - 1);
  localparam int unsigned STRIDE = NSPC ** DIM;

  for (genvar a = 0; a < int'(NCODES); a++) begin : g_code
    localparam int unsigned BASE = (a % STRIDE) + (a / STRIDE) * STRIDE * NSPC;
    llr_t cx [NSPC];
    llr_t ce [NSPC];
    for (genvar b = 0; b < int'(NSPC); b++) begin : g_bit
      assign cx[b] = x[BASE + b * STRIDE];
      assign ext[BASE + b * STRIDE] = ce[b];
    end
    spc_siso #(.N(NSPC)) u_siso (.x(cx), .ext(ce));
  end

endmodule
