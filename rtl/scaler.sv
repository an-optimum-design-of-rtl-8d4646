// scaler: divides an inverse-FFT output by the transform length 2m = 2^K.
//
// Because the divisor is a power of two only the exponent changes: K is
// subtracted from it. Values whose exponent would drop to zero or below are
// flushed to zero. The imaginary part of an inverse-FFT output of a real
// product is only rounding noise, so only the real part is scaled. Subtracting K from the exponent follows the
// design description; dropping the imaginary part follows its remark that
// the imaginary errors may be neglected. The caller passes the real part in
// and writes the result back with a zero imaginary part.
//
// Timing: T_SCL = 2 cycles (input register, then the exponent subtracter and
// output register), one value per cycle.
module scaler
  import fftmul_pkg::*;
#(
  parameter int unsigned K = 14    // log2 of the transform length 2m
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp_t   d,
  output logic  out_valid,
  output fp_t   q
);
  fp_t  r1;
  logic v1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end

  always_ff @(posedge clk) begin
    r1 <= d;
    if (r1.exp > EXP_W'(K)) begin
      q.sign <= r1.sign;
      q.exp  <= r1.exp - EXP_W'(K);
      q.frac <= r1.frac;
    end else begin
      q <= FP_ZERO;
    end
  end
endmodule
