// tb_fft_multiplier_errors: the rounding-error experiment. For m = 2^10 and
// 2^11 it multiplies (a...a) x (b...b) for a, b in {3, 7, B, F}, checks all
// digits, checks that the largest error before rounding stays below 0.5
// (the limit for correct rounding), and checks the observation behind the
// choice of the 27-bit fraction: the error is largest when both operands
// are all F. The error grid is printed.
module tb_fft_multiplier_errors;
  logic fin [2];
  int   chk [2], fl [2];
  real  err0 [4][4], err1 [4][4];

  fftmul_error_run #(.LOG2M(10)) u_m10 (.finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .err(err0));
  fftmul_error_run #(.LOG2M(11)) u_m11 (.finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .err(err1));

  function automatic bit ff_is_max(input real e [4][4]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (e[i][j] > e[3][3]) return 0;
    return 1;
  endfunction

  initial begin
    int checks, failures;
    do #1000; while (!(fin[0] && fin[1]));
    checks = chk[0] + chk[1];
    failures = fl[0] + fl[1];
    $display("max |error| before rounding, rows a = 3 7 B F, columns b = 3 7 B F");
    for (int i = 0; i < 4; i++)
      $display("m=2^10: %8.5f %8.5f %8.5f %8.5f   m=2^11: %8.5f %8.5f %8.5f %8.5f",
               err0[i][0], err0[i][1], err0[i][2], err0[i][3],
               err1[i][0], err1[i][1], err1[i][2], err1[i][3]);
    checks += 2;
    if (!ff_is_max(err0)) begin failures++; $display("FAIL: m=2^10 error not largest at F x F"); end
    if (!ff_is_max(err1)) begin failures++; $display("FAIL: m=2^11 error not largest at F x F"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 16 products at m = 2^11 take about 2 million cycles.
  initial begin
    #40000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
