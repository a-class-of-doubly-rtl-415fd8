// dgldpc_tb_core: stimulus and checking for end-to-end tests of
// dgldpc_decoder; the testbench top instantiates it next to the decoder.
//
// For every codeword it
//   * draws a random codeword of the DGLDPC code: the parity checks of all
//     SCN rows and columns are written over the transmitted bits (an SVN's
//     fourth edge bit is the XOR of its three transmitted bits), brought to
//     row-echelon form by Gaussian elimination over GF(2), the free bits are
//     drawn at random and the pivot bits solved;
//   * sends it over a binary-input AWGN channel (BPSK, 0 -> +1) at a chosen
//     Eb/N0, turning each sample y into the LLR 2y/sigma^2 quantised to the
//     decoder's LSB;
//   * loads the LLRs, starts the decoder and waits for 'done';
//   * runs a behavioural model of the same decoding (same edge map, SVN and
//     SCN equations, stopping rule) and compares bits_hat, converged and
//     iter_count with it, checks the cycle count iter_count*(2*tau_max+3)+1
//     from the edge that samples 'start' to the edge that raises 'done',
//     and, for converged words, that bits_hat equals the codeword sent.
// It counts how often each mechanism occurred: early stop on a codeword,
// stop at max_iter, channel errors corrected, each tau_max and max_iter
// setting used, and a channel write ignored while busy.
module dgldpc_tb_core
  import dgldpc_pkg::*;
  import llr_ref_pkg::*;
#(
  parameter int unsigned N_SVN  = 64,
  parameter int unsigned ADJ_A [4] = '{1, 27, 9, 19},
  parameter int unsigned ADJ_B [4] = '{0, 31, 24, 18},
  parameter int          N_WORDS = 12,
  parameter bit          FULL_MODEL = 1    // compare with the behavioural model
) (
  output logic                        clk,
  output logic                        rst_n,
  output logic                        ch_we,
  output logic [$clog2(N_SVN)-1:0]    ch_addr,
  output llr_t                        ch_llr [3],
  output logic                        start,
  output logic [3:0]                  tau_max,
  output logic [7:0]                  max_iter,
  input  logic                        busy,
  input  logic                        done,
  input  logic                        converged,
  input  logic [7:0]                  iter_count,
  input  logic [N_SVN*3-1:0]          bits_hat
);

  localparam int NB = N_SVN * 3;        // transmitted bits
  localparam int NE = N_SVN * 4;        // edges
  localparam int M  = NE / 16;          // SCNs
  localparam int NR = M * 8;            // parity checks (4 rows + 4 columns per SCN)

  int checks = 0, failures = 0;
  int n_early = 0, n_limit = 0, n_corrected = 0, n_ignored = 0, n_conv = 0;
  int n_tau[16], n_max[256], conv_tau[16], iter_tau[16];

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ edge map
  int sock_svn_edge [NE];   // global socket -> SVN edge index v*4+j
  initial begin
    for (int v = 0; v < N_SVN; v++)
      for (int j = 0; j < 4; j++)
        sock_svn_edge[j*N_SVN + int'((ADJ_A[j] * v + ADJ_B[j]) % N_SVN)] = v*4 + j;
  end

  // ------------------------------------------------------------ codewords
  logic [NB-1:0] hrow [NR];
  int            pivot_col [NR];
  int            rank;

  function automatic logic [NB-1:0] edge_vec(input int e);
    logic [NB-1:0] r;
    int v, j;
    v = e / 4; j = e % 4;
    r = '0;
    if (j < 3) r[v*3 + j] = 1'b1;
    else begin r[v*3] = 1'b1; r[v*3+1] = 1'b1; r[v*3+2] = 1'b1; end
    return r;
  endfunction

  task automatic build_h();
    int r;
    r = 0;
    for (int c = 0; c < M; c++)
      for (int a = 0; a < 4; a++) begin
        hrow[r] = '0; hrow[r+1] = '0;
        for (int b = 0; b < 4; b++) begin
          hrow[r]   ^= edge_vec(sock_svn_edge[c*16 + a*4 + b]);   // row a
          hrow[r+1] ^= edge_vec(sock_svn_edge[c*16 + b*4 + a]);   // column a
        end
        r += 2;
      end
    // reduced row-echelon form
    rank = 0;
    for (int col = 0; col < NB && rank < NR; col++) begin
      int p;
      p = -1;
      for (int i = rank; i < NR; i++) if (hrow[i][col]) begin p = i; break; end
      if (p < 0) continue;
      if (p != rank) begin logic [NB-1:0] t; t = hrow[p]; hrow[p] = hrow[rank]; hrow[rank] = t; end
      for (int i = 0; i < NR; i++) if (i != rank && hrow[i][col]) hrow[i] ^= hrow[rank];
      pivot_col[rank] = col;
      rank++;
    end
  endtask

  function automatic logic [NB-1:0] random_codeword();
    logic [NB-1:0] x, piv;
    x = '0; piv = '0;
    for (int i = 0; i < rank; i++) piv[pivot_col[i]] = 1'b1;
    for (int k = 0; k < NB; k++) if (!piv[k]) x[k] = 1'($urandom);
    for (int i = 0; i < rank; i++) begin
      logic [NB-1:0] t;
      t = hrow[i] & x;
      x[pivot_col[i]] = ^t;     // row i: pivot + free bits = 0
    end
    return x;
  endfunction

  function automatic bit is_codeword(input logic [NB-1:0] x);
    for (int c = 0; c < M; c++)
      for (int a = 0; a < 4; a++) begin
        logic pr, pc;
        pr = 0; pc = 0;
        for (int b = 0; b < 4; b++) begin
          pr ^= ^(edge_vec(sock_svn_edge[c*16 + a*4 + b]) & x);
          pc ^= ^(edge_vec(sock_svn_edge[c*16 + b*4 + a]) & x);
        end
        if (pr || pc) return 0;
      end
    return 1;
  endfunction

  // ------------------------------------------------------------ channel
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // ------------------------------------------------------------ model
  int m_iters;
  bit m_conv;
  logic [NB-1:0] m_bits;

  task automatic model(input int chl[], input int tau, input int maxit);
    int c2v[], v2c[], x[], s[], sin_[], sout[], lim;
    logic [NB-1:0] dec;
    logic [NE-1:0] eb;
    c2v = new[NE]; v2c = new[NE]; sin_ = new[16];
    foreach (c2v[i]) c2v[i] = 0;
    x = new[4];
    lim = (maxit == 0) ? 1 : maxit;
    m_iters = 0; m_conv = 0;
    forever begin
      // SVN messages
      for (int v = 0; v < N_SVN; v++) begin
        for (int j = 0; j < 3; j++) x[j] = rsat(chl[v*3+j] + c2v[v*4+j]);
        x[3] = c2v[v*4+3];
        ref_spc(4, x, s);
        for (int j = 0; j < 3; j++) v2c[v*4+j] = rsat(chl[v*3+j] + s[j]);
        v2c[v*4+3] = s[3];
      end
      // SCNs
      for (int c = 0; c < M; c++) begin
        for (int t = 0; t < 16; t++) sin_[t] = v2c[sock_svn_edge[c*16+t]];
        ref_scn(4, 2, (tau == 0) ? 1 : tau, sin_, sout);
        for (int t = 0; t < 16; t++) c2v[sock_svn_edge[c*16+t]] = sout[t];
      end
      m_iters++;
      // decisions
      for (int v = 0; v < N_SVN; v++) begin
        for (int j = 0; j < 3; j++) x[j] = rsat(chl[v*3+j] + c2v[v*4+j]);
        x[3] = c2v[v*4+3];
        ref_spc(4, x, s);
        for (int j = 0; j < 3; j++) dec[v*3+j] = (rsat(x[j] + s[j]) < 0);
      end
      m_conv = is_codeword(dec);
      if (m_conv || m_iters == lim) break;
    end
    m_bits = dec;
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    logic [NB-1:0] cw, hd;
    int chl[];
    real rate, ebn0, sigma2, y, l;
    int taus[4] = '{1, 3, 5, 6};
    int maxs[3] = '{10, 20, 50};
    real snrs[4] = '{3.0, 2.0, 1.6, 2.5};
    int tau, maxit, ncyc, nerr_ch;

    rst_n = 0; ch_we = 0; ch_addr = '0; start = 0; tau_max = '0; max_iter = '0;
    foreach (ch_llr[j]) ch_llr[j] = '0;
    foreach (n_tau[i]) begin n_tau[i] = 0; conv_tau[i] = 0; iter_tau[i] = 0; end
    foreach (n_max[i]) n_max[i] = 0;
    build_h();
    rate = real'(NB - rank) / real'(NB);
    $display("code: %0d bits, %0d independent checks, rate %f", NB, rank, rate);
    repeat (3) @(negedge clk);
    rst_n = 1;
    chl = new[NB];

    for (int w = 0; w < N_WORDS; w++) begin
      tau   = taus[w % 4];
      maxit = maxs[w % 3];
      ebn0  = snrs[(w / 4) % 4];
      if (w == N_WORDS - 1) ebn0 = -1.0;                  // make sure one word fails
      cw = random_codeword();
      check(is_codeword(cw), "generated word is not a codeword");
      sigma2 = 1.0 / (2.0 * rate * $pow(10.0, ebn0 / 10.0));
      nerr_ch = 0;
      for (int k = 0; k < NB; k++) begin
        y = (cw[k] ? -1.0 : 1.0) + $sqrt(sigma2) * gauss();
        l = 2.0 * y / sigma2 / LSB;
        chl[k] = rsat((l >= 0.0) ? $rtoi(l + 0.5) : -$rtoi(-l + 0.5));
        if ((chl[k] < 0) != cw[k]) nerr_ch++;
      end
      // load
      for (int v = 0; v < N_SVN; v++) begin
        @(negedge clk);
        ch_we = 1; ch_addr = ($clog2(N_SVN))'(v);
        for (int j = 0; j < 3; j++) ch_llr[j] = llr_t'(chl[v*3+j]);
      end
      @(negedge clk);
      ch_we = 0;
      tau_max = 4'(tau); max_iter = 8'(maxit); start = 1;
      @(negedge clk);
      start = 0;
      // a write while decoding must be ignored
      ch_we = 1; ch_addr = '0;
      for (int j = 0; j < 3; j++) ch_llr[j] = llr_t'(-chl[j]);
      @(negedge clk);
      ch_we = 0;
      ncyc = 2;
      while (!done && ncyc < 2000000) begin @(negedge clk); ncyc++; end
      check(done, "decoder never finished");
      n_tau[tau]++; n_max[maxit]++;
      iter_tau[tau] += int'(iter_count);
      if (converged) conv_tau[tau]++;
      if (converged) n_conv++;
      if (converged && iter_count < 8'(maxit)) n_early++;
      if (!converged) n_limit++;
      check(ncyc == int'(iter_count) * (2*tau + 3) + 1, $sformatf("cycles %0d for %0d iterations", ncyc, iter_count));
      if (converged) begin
        check(bits_hat == cw, $sformatf("word %0d: converged to a different codeword", w));
        if (nerr_ch > 0 && bits_hat == cw) n_corrected++;
      end
      if (FULL_MODEL) begin
        model(chl, tau, maxit);
        check(bits_hat == m_bits, $sformatf("word %0d: decisions differ from the model", w));
        check(converged == m_conv, $sformatf("word %0d: converged flag differs", w));
        check(int'(iter_count) == m_iters, $sformatf("word %0d: %0d iterations, model %0d", w, iter_count, m_iters));
        if (bits_hat == m_bits && chl[0] != 0) n_ignored++;
      end
      hd = bits_hat ^ cw;
      $display("word %0d: Eb/N0 %4.1f dB tau %0d max %0d: channel errors %0d, iterations %0d, converged %0d, residual errors %0d",
               w, ebn0, tau, maxit, nerr_ch, iter_count, converged, $countones(hd));
    end

    foreach (taus[i])
      $display("tau_max %0d: %0d words, %0d converged, %0d global iterations in all",
               taus[i], n_tau[taus[i]], conv_tau[taus[i]], iter_tau[taus[i]]);
    $display("mechanisms: early stop %0d, stop at max_iter %0d, corrected words %0d, ignored busy writes %0d",
             n_early, n_limit, n_corrected, n_ignored);
    check(n_early > 0, "no early stop on a codeword");
    check(n_limit > 0, "no stop at max_iter");
    check(n_corrected > 0, "no channel errors corrected");
    if (FULL_MODEL) check(n_ignored > 0, "busy write check not exercised");
    foreach (taus[i]) check(N_WORDS < 4 || n_tau[taus[i]] > 0, $sformatf("tau %0d not used", taus[i]));
    foreach (maxs[i]) check(N_WORDS < 3 || n_max[maxs[i]] > 0, $sformatf("max_iter %0d not used", maxs[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
