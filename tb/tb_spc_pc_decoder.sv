// tb_spc_pc_decoder: checks the SCN local decoder for the (4,3)^2 product
// code, and a (3,2)^3 instance, against a behavioural model of the local
// turbo decoding algorithm: extrinsic arrays cleared, then for each of tau_max
// iterations and each dimension c, A_c = sum of the other dimensions'
// extrinsic values, E_c = SPC extrinsic of I + A_c per component code, and
// finally the sum of E over the dimensions.  It also checks the latency
// (D*tau_max + 1 clock edges from start to done) and that codewords with one
// wrong bit are corrected (a-posteriori signs equal the codeword).
module tb_spc_pc_decoder;
  import dgldpc_pkg::*;
  import llr_ref_pkg::*;

  int checks = 0, failures = 0;
  int corrected = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start2, busy2, done2, start3, busy3, done3;
  logic [3:0] tau2, tau3;
  llr_t       ch2 [16], ext2 [16];
  llr_t       ch3 [27], ext3 [27];

  spc_pc_decoder #(.NSPC(4), .D(2)) dut2 (.clk(clk), .rst_n(rst_n), .start(start2), .tau_max(tau2),
                                          .ch(ch2), .busy(busy2), .done(done2), .ext(ext2));
  spc_pc_decoder #(.NSPC(3), .D(3)) dut3 (.clk(clk), .rst_n(rst_n), .start(start3), .tau_max(tau3),
                                          .ch(ch3), .busy(busy3), .done(done3), .ext(ext3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int iv[], ov[], cyc, tau;
    logic [15:0] cw;
    start2 = 0; start3 = 0; tau2 = 0; tau3 = 0;
    foreach (ch2[i]) ch2[i] = '0;
    foreach (ch3[i]) ch3[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // random inputs, the local iteration counts of the evaluation and more
    for (int it = 0; it < 400; it++) begin
      int taus[6] = '{1, 3, 5, 6, 2, 15};
      tau = taus[it % 6];
      iv = new[16];
      foreach (iv[i]) begin iv[i] = rand_llr() / 3; ch2[i] <= llr_t'(iv[i]); end
      tau2 <= 4'(tau); start2 <= 1;
      @(posedge clk);
      start2 <= 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done2 && cyc < 100);
      check(cyc == 2*tau + 1, $sformatf("latency %0d for tau %0d", cyc, tau));
      ref_scn(4, 2, tau, iv, ov);
      for (int t = 0; t < 16; t++)
        check(int'(ext2[t]) == ov[t], $sformatf("it %0d tau %0d bit %0d got %0d exp %0d", it, tau, t, ext2[t], ov[t]));
    end
    // single errors on random codewords are corrected
    for (int it = 0; it < 100; it++) begin
      int bad;
      cw = '0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) cw[r*4+c] = 1'($urandom);
      for (int r = 0; r < 3; r++) cw[r*4+3] = cw[r*4] ^ cw[r*4+1] ^ cw[r*4+2];
      for (int c = 0; c < 4; c++) cw[12+c] = cw[c] ^ cw[4+c] ^ cw[8+c];
      bad = $urandom_range(0, 15);
      for (int t = 0; t < 16; t++) begin
        int mag;
        mag = (t == bad) ? 6 : 8 + $urandom_range(0, 8);
        ch2[t] <= llr_t'((cw[t] ^ (t == bad)) ? -mag : mag);
        iv[t] = (cw[t] ^ (t == bad)) ? -mag : mag;
      end
      tau2 <= 4'd5; start2 <= 1;
      @(posedge clk);
      start2 <= 0;
      do @(posedge clk); while (!done2);
      begin
        bit allok;
        allok = 1;
        for (int t = 0; t < 16; t++) if (((iv[t] + int'(ext2[t])) < 0) != cw[t]) allok = 0;
        check(allok, $sformatf("single error at %0d not corrected", bad));
        if (allok) corrected++;
      end
    end
    // three-dimensional instance
    for (int it = 0; it < 60; it++) begin
      tau = 1 + it % 6;
      iv = new[27];
      foreach (iv[i]) begin iv[i] = rand_llr() / 3; ch3[i] <= llr_t'(iv[i]); end
      tau3 <= 4'(tau); start3 <= 1;
      @(posedge clk);
      start3 <= 0;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done3 && cyc < 100);
      check(cyc == 3*tau + 1, $sformatf("3D latency %0d for tau %0d", cyc, tau));
      ref_scn(3, 3, tau, iv, ov);
      for (int t = 0; t < 27; t++)
        check(int'(ext3[t]) == ov[t], $sformatf("3D it %0d bit %0d got %0d exp %0d", it, t, ext3[t], ov[t]));
    end
    check(corrected == 100, "corrections");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
