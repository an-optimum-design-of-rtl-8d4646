// tb_complex_mul: checks the three-multiplier complex multiplier against a
// double precision complex product, with operands in the range of FFT data,
// and checks that out_valid follows in_valid by exactly T_CMUL = 17 cycles
// (operands are streamed with random gaps).
module tb_complex_mul;
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;

  localparam int NOPS = 2000;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  cplx_t s, t, p;
  int    checks = 0, failures = 0, cyc = 0, seen = 0;
  real   exp_re [$], exp_im [$], exp_mag [$];
  int    exp_cyc [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  complex_mul dut (.clk, .rst_n, .in_valid, .s, .t, .out_valid, .p);

  function automatic real rnd();
    return (real'($urandom_range(0, 2000000)) - 1000000.0) / 1000.0;
  endfunction

  always @(posedge clk) if (out_valid && rst_n) begin
    real er, ei, m;
    int  ec;
    seen++;
    er = exp_re.pop_front(); ei = exp_im.pop_front(); m = exp_mag.pop_front();
    ec = exp_cyc.pop_front();
    checks++;
    if (!close(to_real(p.re), er, 1.0e-6, m) || !close(to_real(p.im), ei, 1.0e-6, m)) begin
      failures++;
      if (failures < 10) $display("FAIL: got %f,%f expected %f,%f", to_real(p.re), to_real(p.im), er, ei);
    end
    checks++;
    if (cyc - ec != T_CMUL) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", cyc - ec, T_CMUL);
    end
  end

  initial begin
    real sr, si, tr, ti;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      s.re = to_fp(rnd()); s.im = to_fp(rnd());
      t.re = to_fp(rnd() / 1000.0); t.im = to_fp(rnd() / 1000.0);
      if (i % 50 == 0) s.im = FP_ZERO;
      if (in_valid) begin
        sr = to_real(s.re); si = to_real(s.im); tr = to_real(t.re); ti = to_real(t.im);
        exp_re.push_back(sr * tr - si * ti);
        exp_im.push_back(sr * ti + si * tr);
        exp_mag.push_back($sqrt((sr * sr + si * si) * (tr * tr + ti * ti)) + 1.0e-9);
        exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (T_CMUL + 3) @(negedge clk);
    checks++;
    if (exp_re.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_re.size());
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
