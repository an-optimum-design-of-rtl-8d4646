// tb_fp_addsub: checks the floating-point adder/subtracter against double
// precision arithmetic rounded to the 35-bit format, one operation per cycle,
// and checks that each result appears exactly T_ADD cycles after its operands.
// Operands are chosen so that the double sum is exact (exponents close
// together), plus zeros and exact cancellations.
module tb_fp_addsub;
  import fftmul_pkg::*;
  import fftmul_tb_pkg::*;

  localparam int NOPS = 3000;

  logic clk = 1'b0;
  fp_t  a, b, y;
  logic sub;
  int   checks = 0, failures = 0;
  fp_t  expq [$];
  int   cyc = 0;

  always #5 clk = ~clk;

  fp_addsub dut (.clk, .a, .b, .sub, .y);

  function automatic real rnd_val(input int e_lo, input int e_hi);
    real m;
    m = 1.0 + real'($urandom_range(0, 32'h7ffffff)) / 134217728.0;
    m = m * pow2(int'($urandom_range(0, e_hi - e_lo)) + e_lo);
    return ($urandom_range(0, 1) == 1) ? -m : m;
  endfunction

  initial begin
    real ra, rb;
    int  kind;
    for (int i = 0; i < NOPS + T_ADD; i++) begin
      @(negedge clk);
      if (i < NOPS) begin
        kind = $urandom_range(0, 9);
        ra = rnd_val(-10, 10);
        rb = rnd_val(-10, 10);
        if (kind == 0) rb = 0.0;
        if (kind == 1) ra = 0.0;
        a   = to_fp(ra);
        b   = to_fp(rb);
        sub = $urandom_range(0, 1);
        if (kind == 2) begin b = a; sub = 1'b1; end   // exact cancellation
        ra = to_real(a);
        rb = to_real(b);
        expq.push_back(to_fp(sub ? ra - rb : ra + rb));
      end
      if (i >= T_ADD) begin
        fp_t e;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d: got %h expected %h", i - T_ADD, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
