// tb_spc_siso: checks the SPC soft-in soft-out decoder for N = 4 (the SPC
// code of the product-code and SVN decoders) and N = 6 against the reference
// arithmetic of llr_ref_pkg, and checks the N = 4 results against the exact
// real-valued tanh rule within a small tolerance.
module tb_spc_siso;
  import dgldpc_pkg::*;
  import llr_ref_pkg::*;

  int checks = 0, failures = 0;

  llr_t x4 [4], e4 [4];
  llr_t x6 [6], e6 [6];

  spc_siso #(.N(4)) dut4 (.x(x4), .ext(e4));
  spc_siso #(.N(6)) dut6 (.x(x6), .ext(e6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi[], ei[];
    for (int it = 0; it < 3000; it++) begin
      xi = new[4];
      foreach (xi[i]) begin xi[i] = rand_llr(); x4[i] = llr_t'(xi[i]); end
      #1;
      ref_spc(4, xi, ei);
      for (int b = 0; b < 4; b++) begin
        real ex;
        ex = 100.0;
        for (int l = 0; l < 4; l++) if (l != b) begin
          if (ex == 100.0) ex = real'(xi[l]) * LSB;
          else             ex = exact_boxplus(ex, real'(xi[l]) * LSB);
        end
        check(int'(e4[b]) == ei[b], $sformatf("N=4 it %0d bit %0d got %0d exp %0d", it, b, e4[b], ei[b]));
        // quantisation of three two-input steps stays within 1.0
        // (the real-valued reference loses precision near the rails)
        if (ex < 15.0 && ex > -15.0) check((real'(e4[b]) * LSB - ex) < 1.0 && (ex - real'(e4[b]) * LSB) < 1.0,
              $sformatf("N=4 exact it %0d bit %0d got %0d exact %f", it, b, e4[b], ex));
      end
      xi = new[6];
      foreach (xi[i]) begin xi[i] = rand_llr(); x6[i] = llr_t'(xi[i]); end
      #1;
      ref_spc(6, xi, ei);
      for (int b = 0; b < 6; b++)
        check(int'(e6[b]) == ei[b], $sformatf("N=6 it %0d bit %0d got %0d exp %0d", it, b, e6[b], ei[b]));
    end
    // one strong wrong bit among strong bits: extrinsic sign corrects it
    x4 = '{llr_t'(40), llr_t'(40), llr_t'(40), llr_t'(-40)};
    #1;
    check(e4[3] > 0 && e4[0] < 0, "sign of parity extrinsic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
