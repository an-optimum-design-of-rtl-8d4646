// tb_butterfly: checks X = x + yW and Y = x - yW against double precision
// arithmetic for random x, y and unit-magnitude twiddles W, and checks that
// out_valid follows in_valid by exactly T_BFLY = 22 cycles.
module tb_butterfly;
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;

  localparam int NOPS = 2000;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  cplx_t x, y, w, xo, yo;
  int    checks = 0, failures = 0, cyc = 0;
  real   exp_v [$];    // Xr, Xi, Yr, Yi, magnitude per operation
  int    exp_cyc [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  butterfly dut (.clk, .rst_n, .in_valid, .x, .y, .w, .out_valid, .xo, .yo);

  function automatic real rnd();
    return (real'($urandom_range(0, 2000000)) - 1000000.0) / 100.0;
  endfunction

  always @(posedge clk) if (out_valid && rst_n) begin
    real xr, xi, yr, yi, m;
    int  ec;
    xr = exp_v.pop_front(); xi = exp_v.pop_front();
    yr = exp_v.pop_front(); yi = exp_v.pop_front(); m = exp_v.pop_front();
    ec = exp_cyc.pop_front();
    checks++;
    if (!close(to_real(xo.re), xr, 1.0e-6, m) || !close(to_real(xo.im), xi, 1.0e-6, m) ||
        !close(to_real(yo.re), yr, 1.0e-6, m) || !close(to_real(yo.im), yi, 1.0e-6, m)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: got X=%f,%f Y=%f,%f expected X=%f,%f Y=%f,%f", to_real(xo.re),
                 to_real(xo.im), to_real(yo.re), to_real(yo.im), xr, xi, yr, yi);
    end
    checks++;
    if (cyc - ec != T_BFLY) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", cyc - ec, T_BFLY);
    end
  end

  initial begin
    real xr, xi, yr, yi, wr, wi, ang, pr, pi_;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      ang  = 6.283185307179586 * real'($urandom_range(0, 1023)) / 1024.0;
      x.re = to_fp(rnd()); x.im = to_fp(rnd());
      y.re = to_fp(rnd()); y.im = to_fp(rnd());
      w.re = to_fp($cos(ang)); w.im = to_fp(-$sin(ang));
      if (in_valid) begin
        xr = to_real(x.re); xi = to_real(x.im); yr = to_real(y.re); yi = to_real(y.im);
        wr = to_real(w.re); wi = to_real(w.im);
        pr = yr * wr - yi * wi;
        pi_ = yr * wi + yi * wr;
        exp_v.push_back(xr + pr); exp_v.push_back(xi + pi_);
        exp_v.push_back(xr - pr); exp_v.push_back(xi - pi_);
        exp_v.push_back($sqrt(xr * xr + xi * xi) + $sqrt(yr * yr + yi * yi) + 1.0e-9);
        exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (T_BFLY + 3) @(negedge clk);
    checks++;
    if (exp_cyc.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_cyc.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
