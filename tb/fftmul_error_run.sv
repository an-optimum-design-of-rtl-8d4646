// fftmul_error_run: one multiplier instance that multiplies the repeated-
// digit numbers (a a ... a) x (b b ... b), m digits each, for a and b taken
// from {3, 7, B, F}. For each product it measures the largest absolute
// difference between the scaled inverse-FFT outputs (the rounder-carrier's
// inputs) and the exact integer coefficients a*b*min(k+1, 2m-1-k), and checks
// every output digit. Used by tb_fft_multiplier_errors; reports through its
// ports.
module fftmul_error_run
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;
#(
  parameter int unsigned LOG2M = 10
) (
  output logic finished,
  output int   checks,
  output int   failures,
  output real  err [4][4]
);
  localparam int unsigned K  = LOG2M + 1;
  localparam int unsigned AW = K + 1;
  localparam int unsigned M  = 1 << LOG2M;
  localparam int unsigned N  = 2 * M;
  localparam int unsigned VALS [4] = '{3, 7, 11, 15};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic lut_we = 1'b0;
  logic [LOG2M-1:0] lut_waddr = '0;
  cplx_t lut_wdata = '0;
  logic mm_re, mm_we0, mm_we1;
  logic [AW-1:0] mm_raddr0, mm_raddr1, mm_waddr0, mm_waddr1;
  cplx_t mm_rdata0, mm_rdata1, mm_wdata0, mm_wdata1;
  logic digit_valid;
  logic [K-1:0] digit_idx;
  logic [3:0] digit;
  fp_t carry_out;

  int unsigned got [N];
  int          n_in, cur_a, cur_b;
  real         max_err;

  always #5 clk = ~clk;

  fft_multiplier #(.LOG2M(LOG2M)) dut (.*);

  main_memory_model #(.AW(AW)) u_mm (
    .clk, .re(mm_re), .raddr0(mm_raddr0), .raddr1(mm_raddr1),
    .rdata0(mm_rdata0), .rdata1(mm_rdata1),
    .we0(mm_we0), .waddr0(mm_waddr0), .wdata0(mm_wdata0),
    .we1(mm_we1), .waddr1(mm_waddr1), .wdata1(mm_wdata1));

  function automatic longint coef(input int k2);
    int c;
    c = (k2 < int'(M)) ? k2 + 1 : int'(N) - 1 - k2;
    if (c < 0) c = 0;
    return longint'(cur_a) * longint'(cur_b) * longint'(c);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.u_rc.in_valid) begin
      real d;
      d = to_real(dut.u_rc.d) - real'(coef(n_in));
      if (d < 0.0) d = -d;
      if (d > max_err) max_err = d;
      n_in++;
    end
    if (digit_valid) got[digit_idx] = digit;
  end

  initial begin
    real    ang;
    longint acc;
    checks = 0;
    failures = 0;
    finished = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < M; e++) begin
      ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(N);
      @(negedge clk);
      lut_we = 1'b1;
      lut_waddr = LOG2M'(e);
      lut_wdata.re = to_fp($cos(ang));
      lut_wdata.im = to_fp(-$sin(ang));
    end
    @(negedge clk);
    lut_we = 1'b0;
    for (int ia = 0; ia < 4; ia++)
      for (int ib = 0; ib < 4; ib++) begin
        cur_a = VALS[ia];
        cur_b = VALS[ib];
        for (int i = 0; i < N; i++) begin
          u_mm.mem[i]     = '{re: (i < M) ? to_fp(real'(cur_a)) : FP_ZERO, im: FP_ZERO};
          u_mm.mem[N + i] = '{re: (i < M) ? to_fp(real'(cur_b)) : FP_ZERO, im: FP_ZERO};
        end
        n_in = 0;
        max_err = 0.0;
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        while (!done) @(negedge clk);
        err[ia][ib] = max_err;
        acc = 0;
        for (int k2 = 0; k2 < N; k2++) begin
          acc += coef(k2);
          checks++;
          if (longint'(got[k2]) != acc % 16) begin
            failures++;
            if (failures < 10) $display("FAIL m=%0d a=%h b=%h digit %0d", M, cur_a, cur_b, k2);
          end
          acc = acc / 16;
        end
        checks++;
        if (max_err >= 0.5) begin
          failures++;
          $display("FAIL m=%0d a=%h b=%h: error %f reaches 0.5", M, cur_a, cur_b, max_err);
        end
      end
    $display("m = %0d: %0d checks, %0d failures", M, checks, failures);
    finished = 1'b1;
  end

  initial begin
    repeat (16 * (3 * K * (M + 30) + 14 * N) + 2 * M + 1000) @(posedge clk);
    if (!finished) begin
      failures++;
      $display("FAIL: watchdog, m = %0d", M);
      finished = 1'b1;
    end
  end
endmodule
