// tb_svn_decoder: checks the (4,3) SVN decoder.  Expected values: with
// x_j = ch_j + c2v_j (x_3 = c2v_3) and s = reference SPC extrinsic of x,
// v2c_j = ch_j + s_j (v2c_3 = s_3), decisions = sign(x_j + s_j) for j < 3,
// and the fourth edge bit the parity of the three decisions.
module tb_svn_decoder;
  import dgldpc_pkg::*;
  import llr_ref_pkg::*;

  int checks = 0, failures = 0;

  llr_t       ch [3], c2v [4], v2c [4];
  logic [2:0] info_hat;
  logic [3:0] code_hat;

  svn_decoder #(.N(4)) dut (.ch(ch), .c2v(c2v), .v2c(v2c), .info_hat(info_hat), .code_hat(code_hat));

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
    int chv[3], cv[4], x[], s[];
    logic [2:0] hb;
    x = new[4];
    for (int it = 0; it < 3000; it++) begin
      foreach (chv[i]) begin chv[i] = rand_llr(); ch[i] = llr_t'(chv[i]); end
      foreach (cv[i])  begin cv[i]  = (it % 5 == 0) ? 0 : rand_llr(); c2v[i] = llr_t'(cv[i]); end
      #1;
      for (int j = 0; j < 3; j++) x[j] = rsat(chv[j] + cv[j]);
      x[3] = cv[3];
      ref_spc(4, x, s);
      for (int j = 0; j < 3; j++) begin
        check(int'(v2c[j]) == rsat(chv[j] + s[j]), $sformatf("v2c[%0d] got %0d", j, v2c[j]));
        hb[j] = (rsat(x[j] + s[j]) < 0);
        check(info_hat[j] == hb[j], $sformatf("info_hat[%0d]", j));
      end
      check(int'(v2c[3]) == s[3], "v2c[3]");
      check(code_hat == {^hb, hb}, "code_hat");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
