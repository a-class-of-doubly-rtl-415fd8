// tb_spc_pc_dim_decoder: checks the per-dimension decoder of the (4,3)^2
// product code (rows for dimension 1, columns for dimension 2) and of a
// (3,2)^3 product code (third dimension).  The expected values regroup the
// bits into component codes from their row/column/plane coordinates and apply
// the reference SPC decoder of llr_ref_pkg.
module tb_spc_pc_dim_decoder;
  import dgldpc_pkg::*;
  import llr_ref_pkg::*;

  int checks = 0, failures = 0;

  llr_t x16 [16], r16 [16], c16 [16];
  llr_t x27 [27], p27 [27];

  spc_pc_dim_decoder #(.NSPC(4), .D(2), .DIM(0)) dut_row (.x(x16), .ext(r16));
  spc_pc_dim_decoder #(.NSPC(4), .D(2), .DIM(1)) dut_col (.x(x16), .ext(c16));
  spc_pc_dim_decoder #(.NSPC(3), .D(3), .DIM(2)) dut_pl  (.x(x27), .ext(p27));

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
    int xv[16], xw[27];
    int line[], e[];
    for (int it = 0; it < 500; it++) begin
      foreach (xv[i]) begin xv[i] = rand_llr(); x16[i] = llr_t'(xv[i]); end
      foreach (xw[i]) begin xw[i] = rand_llr(); x27[i] = llr_t'(xw[i]); end
      #1;
      line = new[4];
      for (int a = 0; a < 4; a++) begin
        // row a: positions a*4 + b
        for (int b = 0; b < 4; b++) line[b] = xv[a*4 + b];
        ref_spc(4, line, e);
        for (int b = 0; b < 4; b++)
          check(int'(r16[a*4 + b]) == e[b], $sformatf("row %0d bit %0d", a, b));
        // column a: positions b*4 + a
        for (int b = 0; b < 4; b++) line[b] = xv[b*4 + a];
        ref_spc(4, line, e);
        for (int b = 0; b < 4; b++)
          check(int'(c16[b*4 + a]) == e[b], $sformatf("col %0d bit %0d", a, b));
      end
      line = new[3];
      for (int i0 = 0; i0 < 3; i0++)
        for (int i1 = 0; i1 < 3; i1++) begin
          for (int b = 0; b < 3; b++) line[b] = xw[b*9 + i1*3 + i0];
          ref_spc(3, line, e);
          for (int b = 0; b < 3; b++)
            check(int'(p27[b*9 + i1*3 + i0]) == e[b], $sformatf("plane line %0d,%0d bit %0d", i0, i1, b));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
