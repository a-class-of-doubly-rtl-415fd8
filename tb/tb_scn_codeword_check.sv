// tb_scn_codeword_check: drives the (4,3)^2 codeword check with valid
// codewords (built from row and column parities computed here) and with
// random corruptions of them.  The expected flag is whether every row and
// every column has even parity.
module tb_scn_codeword_check;
  int checks = 0, failures = 0;
  int n_ok = 0, n_bad = 0;

  logic [15:0] bits;
  logic        ok;

  scn_codeword_check #(.NSPC(4), .D(2)) dut (.bits(bits), .ok(ok));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] encode(input logic [8:0] info);
    logic [15:0] v;
    v = '0;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) v[r*4+c] = info[r*3+c];
    for (int r = 0; r < 3; r++) v[r*4+3] = v[r*4] ^ v[r*4+1] ^ v[r*4+2];
    for (int c = 0; c < 4; c++) v[12+c] = v[c] ^ v[4+c] ^ v[8+c];
    return v;
  endfunction

  function automatic bit valid(input logic [15:0] v);
    bit r;
    r = 1'b1;
    for (int a = 0; a < 4; a++) begin
      if (v[a*4] ^ v[a*4+1] ^ v[a*4+2] ^ v[a*4+3]) r = 1'b0;
      if (v[a] ^ v[a+4] ^ v[a+8] ^ v[a+12]) r = 1'b0;
    end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 512; w++) begin
      bits = encode(9'(w));
      #1;
      check(ok == 1'b1, $sformatf("codeword %0d rejected", w));
      n_ok++;
      for (int k = 0; k < 4; k++) begin
        bits = bits ^ 16'(1 << $urandom_range(0, 15));
        #1;
        check(ok == valid(bits), $sformatf("corrupted word %h", bits));
        if (!valid(bits)) n_bad++;
      end
    end
    check(n_bad > 1000, "too few invalid words tried");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
