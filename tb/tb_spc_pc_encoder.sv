// tb_spc_pc_encoder: exhaustive check of the (4,3)^2 product-code encoder
// (all 512 information words) and a random check of a (3,2)^3 encoder.
// Expected: information bits in the corner positions, even parity along every
// line of every dimension, and 9 distinct weight-4 codewords for the nine
// single information bits of (4,3)^2 (minimum distance 2^D = 4).
module tb_spc_pc_encoder;
  int checks = 0, failures = 0;

  logic [8:0]  info2;
  logic [15:0] cw2;
  logic [7:0]  info3;
  logic [26:0] cw3;

  spc_pc_encoder #(.NSPC(4), .D(2)) dut2 (.info(info2), .cw(cw2));
  spc_pc_encoder #(.NSPC(3), .D(3)) dut3 (.info(info3), .cw(cw3));

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
    int minw;
    minw = 99;
    for (int w = 0; w < 512; w++) begin
      info2 = 9'(w);
      #1;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          check(cw2[r*4 + c] == info2[r*3 + c], $sformatf("info %0d pos %0d,%0d", w, r, c));
      for (int a = 0; a < 4; a++) begin
        check((cw2[a*4] ^ cw2[a*4+1] ^ cw2[a*4+2] ^ cw2[a*4+3]) == 1'b0, $sformatf("info %0d row %0d", w, a));
        check((cw2[a] ^ cw2[a+4] ^ cw2[a+8] ^ cw2[a+12]) == 1'b0, $sformatf("info %0d col %0d", w, a));
      end
      if (w != 0 && $countones(cw2) < minw) minw = $countones(cw2);
    end
    check(minw == 4, $sformatf("minimum weight %0d", minw));
    for (int it = 0; it < 200; it++) begin
      info3 = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++)
        check(cw3[(i/4)*9 + ((i/2)%2)*3 + (i%2)] == info3[i], $sformatf("3D info bit %0d", i));
      for (int u = 0; u < 3; u++)
        for (int v = 0; v < 3; v++) begin
          check((cw3[u*9+v*3] ^ cw3[u*9+v*3+1] ^ cw3[u*9+v*3+2]) == 1'b0, "3D dim1 parity");
          check((cw3[u*9+v] ^ cw3[u*9+v+3] ^ cw3[u*9+v+6]) == 1'b0, "3D dim2 parity");
          check((cw3[u*3+v] ^ cw3[u*3+v+9] ^ cw3[u*3+v+18]) == 1'b0, "3D dim3 parity");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
