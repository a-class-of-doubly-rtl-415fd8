// dgldpc_decoder: fully parallel decoder for doubly-generalized LDPC (DGLDPC)
// codes with (SVN_N, SVN_N-1) single-parity-check codes at the super-variable
// nodes (SVNs) and (NSPC, NSPC-1)^D SPC product codes at the super-check nodes
// (SCNs).  The defaults are the DGLDPC-1 code: 1000 SVNs with (4,3) SPCs,
// 250 SCNs with (4,3)^2 product codes, 3000 transmitted bits, 4000 edges.
//
// Each SVN transmits its SVN_N-1 systematic bits, so the codeword has
// N_SVN*(SVN_N-1) bits; bit 3v+j (for SVN_N = 4) is bit j of SVN v.  All SVNs
// (svn_decoder, combinational) and all SCNs (spc_pc_decoder, iterative) exist
// in hardware.  global_ctrl runs global iterations: the SCNs capture the SVN
// messages, run tau_max local turbo iterations and hold their overall
// extrinsic outputs, which the SVNs use for the next messages and for the hard
// decisions.  Every SCN checks its bits with scn_codeword_check; when all
// pass, or after max_iter global iterations, the decisions are latched into
// bits_hat.
//
// Edge permutation (this design's own; the DGLDPC-1 definition gives only the
// size of its 250 x 1000 adjacency matrix).  Edge j of SVN v goes to global socket
//   g = j*N_SVN + ((ADJ_A[j]*v + ADJ_B[j]) mod N_SVN),
// i.e. SCN g / NSPC^D, product position g mod NSPC^D.  Each ADJ_A[j] must be
// coprime to N_SVN so that this is a permutation.  The default constants give
// no SVN two edges to the same SCN and a single pair of SVNs sharing two SCNs.
//
// Interface and timing: channel LLRs are written one SVN at a time (ch_we,
// ch_addr = SVN index, ch_llr[j] = LLR of its bit j) while idle and keep
// their value between codewords.  'start' begins decoding with tau_max local
// and at most max_iter global iterations.  A global iteration takes
// D*tau_max + 3 cycles.  'done' pulses at the end; bits_hat, converged and
// iter_count then stay valid until the next 'start'.
module dgldpc_decoder
  import dgldpc_pkg::*;
#(
  parameter int unsigned N_SVN = 1000,  // number of SVNs (adjacency matrix columns)
  parameter int unsigned SVN_N = 4,     // SVN component SPC code length
  parameter int unsigned NSPC  = 4,     // SCN component SPC code length n_spc
  parameter int unsigned D     = 2,     // SCN product code dimensions
  parameter int unsigned TW    = 4,     // local iteration count width
  parameter int unsigned IW    = 8,     // global iteration count width
  parameter int unsigned ADJ_A [4] = '{1, 723, 103, 341},
  parameter int unsigned ADJ_B [4] = '{0, 373, 912, 302}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // channel LLR load port
  input  logic                         ch_we,
  input  logic [$clog2(N_SVN)-1:0]     ch_addr,
  input  llr_t                         ch_llr     [SVN_N-1],
  // decoding control
  input  logic                         start,
  input  logic [TW-1:0]                tau_max,
  input  logic [IW-1:0]                max_iter,
  output logic                         busy,
  output logic                         done,
  output logic                         converged,
  output logic [IW-1:0]                iter_count,
  output logic [N_SVN*(SVN_N-1)-1:0]   bits_hat
);

  localparam int unsigned NT    = NSPC ** D;               // bits per SCN
  localparam int unsigned NE    = N_SVN * SVN_N;           // edges
  localparam int unsigned M_SCN = NE / NT;                 // adjacency matrix rows
  localparam int unsigned KV    = SVN_N - 1;

  typedef int unsigned map_t [NE];

  // Global socket of SVN edge e = v*SVN_N + j.
  function automatic map_t make_v2s();
    map_t m;
    for (int unsigned v = 0; v < N_SVN; v++)
      for (int unsigned j = 0; j < SVN_N; j++)
        m[v*SVN_N + j] = j*N_SVN + (ADJ_A[j % 4] * v + ADJ_B[j % 4]) % N_SVN;
    return m;
  endfunction

  // SVN edge attached to global socket g (inverse of make_v2s).
  function automatic map_t make_s2v();
    map_t f, m;
    f = make_v2s();
    for (int unsigned e = 0; e < NE; e++) m[f[e]] = e;
    return m;
  endfunction

  localparam map_t S2V = make_s2v();

  // ---------------------------------------------------------------- storage
  llr_t ch_mem [N_SVN][KV];           // channel LLRs per SVN

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < int'(N_SVN); v++)
        for (int j = 0; j < int'(KV); j++) ch_mem[v][j] <= '0;
    end else if (ch_we && !busy) begin
      ch_mem[ch_addr] <= ch_llr;
    end
  end

  // ---------------------------------------------------------------- control
  logic first, scn_start, finish, all_ok;
  logic [M_SCN-1:0] scn_done, scn_ok, scn_busy;

  global_ctrl #(.IW(IW)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .max_iter  (max_iter),
    .scn_done  (&scn_done),
    .all_ok    (all_ok),
    .busy      (busy),
    .first     (first),
    .scn_start (scn_start),
    .finish    (finish),
    .done      (done),
    .converged (converged),
    .iter_count(iter_count)
  );

  assign all_ok = &scn_ok;

  // ---------------------------------------------------------------- nodes
  llr_t v2c   [NE];                   // SVN -> SCN messages, SVN edge order
  llr_t c2v   [NE];                   // SCN -> SVN messages, SVN edge order
  llr_t s_in  [M_SCN][NT];            // SCN inputs, product order
  llr_t s_out [M_SCN][NT];            // SCN outputs, product order
  logic [NE-1:0]          ebit;       // edge hard decisions, SVN edge order
  logic [N_SVN*KV-1:0]    dec;        // transmitted-bit decisions

  for (genvar v = 0; v < int'(N_SVN); v++) begin : g_svn
    llr_t c_in  [SVN_N];
    llr_t c_out [SVN_N];
    for (genvar j = 0; j < int'(SVN_N); j++) begin : g_e
      assign c_in[j]             = first ? llr_t'(0) : c2v[v*SVN_N + j];
      assign v2c[v*SVN_N + j]    = c_out[j];
    end
    svn_decoder #(.N(SVN_N)) u_svn (
      .ch      (ch_mem[v]),
      .c2v     (c_in),
      .v2c     (c_out),
      .info_hat(dec[v*KV +: KV]),
      .code_hat(ebit[v*SVN_N +: SVN_N])
    );
  end

  for (genvar c = 0; c < int'(M_SCN); c++) begin : g_scn
    logic [NT-1:0] sbits;
    for (genvar t = 0; t < int'(NT); t++) begin : g_s
      assign s_in[c][t]                = v2c[S2V[c*NT + t]];
      assign c2v[S2V[c*NT + t]]        = s_out[c][t];
      assign sbits[t]                  = ebit[S2V[c*NT + t]];
    end
    spc_pc_decoder #(.NSPC(NSPC), .D(D), .TW(TW)) u_scn (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (scn_start),
      .tau_max(tau_max),
      .ch     (s_in[c]),
      .busy   (scn_busy[c]),
      .done   (scn_done[c]),
      .ext    (s_out[c])
    );
    scn_codeword_check #(.NSPC(NSPC), .D(D)) u_chk (.bits(sbits), .ok(scn_ok[c]));
  end

  // ---------------------------------------------------------------- output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bits_hat <= '0;
    else if (finish) bits_hat <= dec;
  end

  // All SCNs run in lockstep: they are idle whenever a global iteration starts.
  always_ff @(posedge clk or negedge rst_n)
    if (rst_n) a_lockstep: assert (!(scn_start && (|scn_busy))) else $error("SCN started while busy");

  // The edge map must be a permutation onto whole SCNs.
  initial begin
    assert (NE % NT == 0) else $error("N_SVN*SVN_N must be a multiple of NSPC**D");
    assert (SVN_N <= 4)   else $error("ADJ_A/ADJ_B hold four edge classes");
  end

endmodule
