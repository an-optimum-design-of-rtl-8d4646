// tb_scaler: checks that the scaler divides by 2^K exactly, flushes values
// that would leave the exponent range to zero, and answers T_SCL = 2 cycles
// after in_valid.
module tb_scaler;
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;

  localparam int K = 14, NOPS = 2000;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  fp_t   d, q;
  int    checks = 0, failures = 0, cyc = 0;
  fp_t   expq [$];
  int    exp_cyc [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  scaler #(.K(K)) dut (.clk, .rst_n, .in_valid, .d, .out_valid, .q);

  always @(posedge clk) if (out_valid && rst_n) begin
    fp_t e;
    int  ec;
    e  = expq.pop_front();
    ec = exp_cyc.pop_front();
    checks++;
    if (q !== e) begin
      failures++;
      if (failures < 10) $display("FAIL: got %h expected %h", q, e);
    end
    checks++;
    if (cyc - ec != T_SCL) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", cyc - ec, T_SCL);
    end
  end

  initial begin
    real r;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      d.sign = 1'($urandom());
      d.exp  = EXP_W'($urandom_range(0, 2 ** EXP_W - 1));
      d.frac = FRAC_W'($urandom());
      if (d.exp == 0) d = FP_ZERO;
      if (in_valid) begin
        r = to_real(d) / pow2(K);
        expq.push_back(to_fp(r));
        exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: results missing"); end
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
