// tb_carry_calc: checks rounding to the nearest integer and the split into a
// hexadecimal digit and a floating-point carry, for values near integers
// (within +-0.45), exact halves, negative noise and small values, one value
// per cycle, with results due exactly T_CC = 5 cycles later.
module tb_carry_calc;
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;

  localparam int NOPS = 3000;

  logic        clk = 1'b0;
  fp_t         v, carry;
  logic [3:0]  digit;
  int          checks = 0, failures = 0;
  longint      expn [$];

  always #5 clk = ~clk;

  carry_calc dut (.clk, .v, .digit, .carry);

  initial begin
    longint n, e;
    real    r;
    int     kind;
    for (int i = 0; i < NOPS + T_CC; i++) begin
      @(negedge clk);
      if (i >= T_CC) begin
        e = expn.pop_front();
        checks++;
        if (longint'(digit) != e % 16 || to_real(carry) != real'(e / 16)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: got digit %h carry %f, expected %h %0d", digit, to_real(carry), e % 16, e / 16);
        end
      end
      if (i < NOPS) begin
        kind = $urandom_range(0, 5);
        n = longint'($urandom_range(0, 4000000));
        if (kind == 0) n = longint'($urandom_range(0, 40));
        r = real'(n) + (real'($urandom_range(0, 900)) - 450.0) / 1000.0;
        if (kind == 1) begin r = real'(n) + 0.5; n = n + 1; end     // half rounds up
        if (kind == 2) begin r = -real'($urandom_range(1, 400)) / 1000.0; n = 0; end
        if (kind == 3) begin r = 0.0; n = 0; end
        v = to_fp(r);
        if (kind == 1 && to_real(v) != r) n = longint'(to_real(v) + 0.5);
        expn.push_back(n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
