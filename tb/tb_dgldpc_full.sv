// tb_dgldpc_full: end-to-end test of the DGLDPC decoder with every parameter
// at its default, i.e. the DGLDPC-1 code (1000 SVNs with (4,3) SPCs, 250 SCNs
// with (4,3)^2 product codes, 3000 transmitted bits).  dgldpc_tb_core decodes
// sixteen noisy random codewords at Eb/N0 = 3.0, 2.0, 1.6 and 2.5 dB (the last
// at -1.0 dB instead, where it cannot converge), with each local iteration count 1, 3, 5 and
// 6 and global limits of 10, 20 and 50, and checks them against the codeword
// sent and a behavioural model.  It prints, per local iteration count, how
// many words converged and how many global iterations they took.
module tb_dgldpc_full;
  import dgldpc_pkg::*;

  localparam int unsigned N = 1000;

  logic                   clk, rst_n, ch_we, start, busy, done, converged;
  logic [$clog2(N)-1:0]   ch_addr;
  llr_t                   ch_llr [3];
  logic [3:0]             tau_max;
  logic [7:0]             max_iter, iter_count;
  logic [N*3-1:0]         bits_hat;

  dgldpc_decoder dut (
    .clk(clk), .rst_n(rst_n), .ch_we(ch_we), .ch_addr(ch_addr), .ch_llr(ch_llr),
    .start(start), .tau_max(tau_max), .max_iter(max_iter), .busy(busy), .done(done),
    .converged(converged), .iter_count(iter_count), .bits_hat(bits_hat));

  dgldpc_tb_core #(.N_SVN(N), .ADJ_A('{1, 723, 103, 341}), .ADJ_B('{0, 373, 912, 302}),
                   .N_WORDS(16), .FULL_MODEL(1)) core (
    .clk(clk), .rst_n(rst_n), .ch_we(ch_we), .ch_addr(ch_addr), .ch_llr(ch_llr),
    .start(start), .tau_max(tau_max), .max_iter(max_iter), .busy(busy), .done(done),
    .converged(converged), .iter_count(iter_count), .bits_hat(bits_hat));
endmodule
