// tb_dgldpc_decoder: end-to-end test of the DGLDPC decoder at a reduced size
// (64 SVNs, 16 SCNs, 192 transmitted bits) with an edge map suited to that
// size.  dgldpc_tb_core encodes random codewords, adds AWGN noise, decodes
// them with every local iteration count and global limit of the evaluation,
// and compares the results with a behavioural model of the decoder.
module tb_dgldpc_decoder;
  import dgldpc_pkg::*;

  localparam int unsigned N = 64;
  localparam int unsigned A [4] = '{1, 27, 9, 19};
  localparam int unsigned B [4] = '{0, 31, 24, 18};

  logic                   clk, rst_n, ch_we, start, busy, done, converged;
  logic [$clog2(N)-1:0]   ch_addr;
  llr_t                   ch_llr [3];
  logic [3:0]             tau_max;
  logic [7:0]             max_iter, iter_count;
  logic [N*3-1:0]         bits_hat;

  dgldpc_decoder #(.N_SVN(N), .ADJ_A(A), .ADJ_B(B)) dut (
    .clk(clk), .rst_n(rst_n), .ch_we(ch_we), .ch_addr(ch_addr), .ch_llr(ch_llr),
    .start(start), .tau_max(tau_max), .max_iter(max_iter), .busy(busy), .done(done),
    .converged(converged), .iter_count(iter_count), .bits_hat(bits_hat));

  dgldpc_tb_core #(.N_SVN(N), .ADJ_A(A), .ADJ_B(B), .N_WORDS(24), .FULL_MODEL(1)) core (
    .clk(clk), .rst_n(rst_n), .ch_we(ch_we), .ch_addr(ch_addr), .ch_llr(ch_llr),
    .start(start), .tau_max(tau_max), .max_iter(max_iter), .busy(busy), .done(done),
    .converged(converged), .iter_count(iter_count), .bits_hat(bits_hat));
endmodule
