// spc_pc_decoder: super-check-node (SCN) local decoder for an (NSPC, NSPC-1)^D
// single-parity-check product code (SPC-PC).
//
// The SCN treats the NSPC^D LLRs arriving from its super-variable nodes as
// channel messages I.  It keeps one extrinsic array E_c per dimension, cleared
// at the start.  Each local turbo iteration visits the dimensions in order
// c = 1..D; for dimension c the a-priori value of every bit is the sum of the
// extrinsic values of the other dimensions, A_c = sum_{l != c} E_l, and every
// component SPC of that dimension is decoded with the tanh rule on I + A_c,
// giving the new E_c.  After tau_max iterations the SCN output for each bit is
// the sum of its extrinsic values over all dimensions, sum_c E_c, which is
// what goes back to the SVNs.  This schedule and its equations are those of
// the SPC-PC decoding algorithm; the hardware mapping is this design's:
// there is one spc_pc_dim_decoder per dimension (all component codes of a
// dimension in parallel) and one dimension is updated per clock cycle.
// Sums are saturated to the LLR range.
//
// Interface and timing: 'start' (one cycle, while idle) captures ch[] and
// tau_max (number of local iterations; 0 is treated as 1).  The decoder then
// updates one dimension per cycle for D*tau_max cycles and writes ext[] one
// cycle later, raising 'done' for one cycle.  From the clock edge that samples
// 'start' to the edge after which 'done' is high there are D*tau_max + 1
// edges.  ext[] holds its value until the next result.  'busy' is high from
// the edge that samples 'start' to the edge that raises 'done'.
module spc_pc_decoder
  import dgldpc_pkg::*;
#(
  parameter int unsigned NSPC = 4,   // SPC component code length n_spc
  parameter int unsigned D    = 2,   // product code dimensions
  parameter int unsigned TW   = 4    // width of the local iteration count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [TW-1:0] tau_max,
  input  llr_t          ch   [NSPC**D],
  output logic          busy,
  output logic          done,
  output llr_t          ext  [NSPC**D]
);

  localparam int unsigned NT = NSPC ** D;
  localparam int unsigned CW = (D > 1) ? $clog2(D) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} state_t;

  state_t          state;
  logic [CW-1:0]   dim;
  logic [TW-1:0]   tau, tau_lim;
  llr_t            ich  [NT];
  llr_t            e    [D][NT];   // extrinsic values, one array per dimension
  llr_t            sx   [D][NT];   // SISO inputs I + A_c of each dimension
  llr_t            se   [D][NT];   // SISO outputs of each dimension
  llr_t            tot  [NT];      // sum over all dimensions

  // A-priori values (eq. sum over the other dimensions) plus channel value.
  always_comb begin
    for (int c = 0; c < int'(D); c++) begin
      for (int t = 0; t < int'(NT); t++) begin
        logic signed [LLR_W+3:0] acc;
        acc = (LLR_W + 4)'(ich[t]);
        for (int l = 0; l < int'(D); l++)
          if (l != c) acc = acc + (LLR_W + 4)'(e[l][t]);
        sx[c][t] = sat(acc);
      end
    end
  end

  for (genvar c = 0; c < int'(D); c++) begin : g_dim
    spc_pc_dim_decoder #(.NSPC(NSPC), .D(D), .DIM(c)) u_dim (
      .x  (sx[c]),
      .ext(se[c])
    );
  end

  // Overall extrinsic value of each bit: sum over all dimensions.
  always_comb begin
    for (int t = 0; t < int'(NT); t++) begin
      logic signed [LLR_W+3:0] acc;
      acc = '0;
      for (int c = 0; c < int'(D); c++) acc = acc + (LLR_W + 4)'(e[c][t]);
      tot[t] = sat(acc);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      dim     <= '0;
      tau     <= '0;
      tau_lim <= '0;
      done    <= 1'b0;
      for (int t = 0; t < int'(NT); t++) begin
        ich[t] <= '0;
        ext[t] <= '0;
        for (int c = 0; c < int'(D); c++) e[c][t] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_RUN;
          dim     <= '0;
          tau     <= TW'(1);
          tau_lim <= (tau_max == '0) ? TW'(1) : tau_max;
          for (int t = 0; t < int'(NT); t++) begin
            ich[t] <= ch[t];
            for (int c = 0; c < int'(D); c++) e[c][t] <= '0;
          end
        end
        S_RUN: begin
          for (int c = 0; c < int'(D); c++)
            if (CW'(c) == dim) e[c] <= se[c];
          if (dim == CW'(D - 1)) begin
            dim <= '0;
            if (tau == tau_lim) state <= S_OUT;
            else                tau   <= tau + TW'(1);
          end else begin
            dim <= dim + CW'(1);
          end
        end
        S_OUT: begin
          ext   <= tot;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
