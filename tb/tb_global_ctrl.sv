// tb_global_ctrl: drives the global iteration controller with a model of the
// SCN array (done a fixed number of cycles after each start) and a
// convergence flag that turns on at a chosen iteration.  Checks the number of
// global iterations run, the converged flag, the 'first' flag, the spacing of
// SCN starts (SCN latency + 2 cycles), the 'finish'/'done' timing and the
// limit of max_iter (0 acting as 1).
module tb_global_ctrl;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start, scn_done, all_ok, busy, first, scn_start, finish, done, converged;
  logic [7:0] max_iter, iter_count;

  global_ctrl #(.IW(8)) dut (.clk(clk), .rst_n(rst_n), .start(start), .max_iter(max_iter),
                             .scn_done(scn_done), .all_ok(all_ok), .busy(busy), .first(first),
                             .scn_start(scn_start), .finish(finish), .done(done),
                             .converged(converged), .iter_count(iter_count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // SCN array model
  int lat = 5, cnt = -1, n_start = 0, ok_at = 0, n_done = 0, last_start = 0, now = 0;
  int gap_bad = 0, first_bad = 0;
  always_ff @(posedge clk) begin
    now <= now + 1;
    if (scn_start) begin
      if (n_start > 0 && now - last_start != lat + 2) gap_bad <= gap_bad + 1;
      if (first != (n_start == 0)) first_bad <= first_bad + 1;
      last_start <= now;
      n_start <= n_start + 1;
      cnt <= lat;
    end else if (cnt > 0) cnt <= cnt - 1;
    else cnt <= -1;
    if (scn_done) n_done <= n_done + 1;
  end
  assign scn_done = (cnt == 0);
  assign all_ok   = scn_done && ok_at != 0 && (n_done + 1 >= ok_at);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mi, input int conv_at, input int l);
    int exp_it, ncyc;
    bit fin_seen;
    lat = l; ok_at = conv_at; n_start = 0; n_done = 0; gap_bad = 0; first_bad = 0;
    @(negedge clk);
    max_iter = 8'(mi); start = 1;
    @(negedge clk);
    start = 0;
    ncyc = 0; fin_seen = 0;
    while (!done && ncyc < 5000) begin
      if (finish) fin_seen = 1;
      @(negedge clk);
      ncyc++;
    end
    exp_it = (mi == 0) ? 1 : mi;
    if (conv_at != 0 && conv_at < exp_it) exp_it = conv_at;
    check(done, "done never came");
    check(fin_seen, "finish not seen before done");
    check(int'(iter_count) == exp_it, $sformatf("iterations %0d expected %0d", iter_count, exp_it));
    check(converged == (conv_at != 0 && conv_at <= exp_it), "converged flag");
    check(n_start == exp_it, $sformatf("scn starts %0d", n_start));
    check(gap_bad == 0 && first_bad == 0, "start spacing or first flag");
    check(ncyc == exp_it * (l + 2), $sformatf("cycles %0d", ncyc));
    @(negedge clk);
    check(!done && !busy, "done is one pulse");
  endtask

  initial begin
    start = 0; max_iter = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(10, 3, 5);     // converges early
    run(10, 0, 5);     // runs to the limit
    run(50, 0, 11);    // evaluation limit, 5 local iterations
    run(20, 20, 3);    // converges at the limit
    run(0, 0, 4);      // 0 acts as 1
    run(50, 1, 11);    // converges at once
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
