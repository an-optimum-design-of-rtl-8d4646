// tb_fft_multiplier_sizes: the operand sizes of the performance comparison,
// m = 2^5 .. 2^12 digits, each in its own multiplier instance running in
// parallel (m = 2^13 is the default size, covered by tb_fft_multiplier_full).
// Every instance checks its product digits and cycle count. For reference
// the measured cycle counts are printed next to the published cycle formula
//   T = 3(Tb + m - 1) log2 m + (2 Trc + 7) m + (3 Tb + Tcmul + Tscl - Trc - 3)
// and the resulting time at a 1.89 ns clock.
module tb_fft_multiplier_sizes;
  import fftmul_pkg::*;

  localparam int NS = 8, FIRST = 5;

  logic   fin [NS];
  int     chk [NS], fl [NS];
  longint cyc [NS];

  for (genvar g = 0; g < NS; g++) begin : g_size
    fftmul_size_run #(.LOG2M(FIRST + g)) u_run (
      .finished(fin[g]), .checks(chk[g]), .failures(fl[g]), .cycles(cyc[g]));
  end

  initial begin
    int checks, failures;
    longint m, paper;
    bit all;
    all = 0;
    while (!all) begin
      #1000;
      all = 1;
      for (int i = 0; i < NS; i++) if (!fin[i]) all = 0;
    end
    checks = 0;
    failures = 0;
    for (int i = 0; i < NS; i++) begin
      m = longint'(1) << (FIRST + i);
      paper = 3 * (T_BFLY + m - 1) * (FIRST + i) + (2 * T_RC + 7) * m
            + (3 * T_BFLY + T_CMUL + T_SCL - T_RC - 3);
      $display("m = 2^%0d: %0d cycles (published formula %0d), %0.4f ms at 1.89 ns, failures %0d",
               FIRST + i, cyc[i], paper, real'(cyc[i]) * 1.89e-6, fl[i]);
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 2 multiplications at m = 2^12 take about 0.6 million cycles of
  // 10 time units.
  initial begin
    #20000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
