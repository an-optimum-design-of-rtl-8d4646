// tb_rounder_carrier: feeds noisy product coefficients (integers plus up to
// +-0.4 of error, as an inverse FFT delivers them) into the rounder-carrier
// every T_RC cycles, the fastest rate its carry loop allows, and compares
// the digits with integer carry propagation. Checks that every digit leaves
// exactly T_RC = 10 cycles after its value entered, that clear restarts the
// carry, and the final carry.
module tb_rounder_carrier;
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;

  localparam int NDIG = 200, NNUM = 4;

  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0, out_valid;
  fp_t        d, carry_out;
  logic [3:0] digit;
  int         checks = 0, failures = 0, cyc = 0;
  longint     expd [$];
  int         exp_cyc [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rounder_carrier dut (.clk, .rst_n, .clear, .in_valid, .d, .out_valid, .digit, .carry_out);

  always @(posedge clk) if (out_valid && rst_n) begin
    longint e;
    int     ec;
    e  = expd.pop_front();
    ec = exp_cyc.pop_front();
    checks++;
    if (longint'(digit) != e) begin
      failures++;
      if (failures < 10) $display("FAIL: got digit %h expected %h", digit, e);
    end
    checks++;
    if (cyc - ec != T_RC) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", cyc - ec, T_RC);
    end
  end

  initial begin
    longint c, coef, s;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int num = 0; num < NNUM; num++) begin
      @(negedge clk);
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      c = 0;
      for (int i = 0; i < NDIG; i++) begin
        coef = longint'($urandom_range(0, 1800000));
        if (num == 1) coef = 225 * longint'(i < NDIG / 2 ? i + 1 : NDIG - i);
        if (num == 2 && i % 3 == 0) coef = 0;
        s = coef + c;
        expd.push_back(s % 16);
        c = s / 16;
        @(negedge clk);
        in_valid = 1'b1;
        d = to_fp(real'(coef) + (real'($urandom_range(0, 800)) - 400.0) / 1000.0);
        if (coef == 0) d = to_fp(-real'($urandom_range(0, 300)) / 1000.0);
        exp_cyc.push_back(cyc);
        @(negedge clk);
        in_valid = 1'b0;
        repeat (T_RC - 2) @(negedge clk);
      end
      repeat (T_RC + 2) @(negedge clk);
      checks++;
      if (to_real(carry_out) != real'(c)) begin
        failures++;
        $display("FAIL: final carry %f expected %0d", to_real(carry_out), c);
      end
    end
    checks++;
    if (expd.size() != 0) begin failures++; $display("FAIL: digits missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NNUM * (NDIG + 5) * T_RC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
