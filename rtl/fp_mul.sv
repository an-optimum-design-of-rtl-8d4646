// fp_mul: pipelined floating-point multiplier ("fpmul").
//
// Computes y = a * b in the 35-bit format of fftmul_pkg (28x28-bit
// significand product, round to nearest even, flush to zero). The result
// appears T_MUL (7) cycles after the operands and a new product can start
// every cycle. As in fp_addsub the arithmetic is one combinational step
// followed by a register chain; synthesis retiming is expected to spread the
// significand multiplier (a Wallace tree in the original implementation)
// over the stages. The latency is derived from the published complex
// multiplier latency; the algorithm is this design's choice.
module fp_mul
  import fftmul_pkg::*;
#(
  parameter int unsigned LAT = T_MUL
) (
  input  logic clk,
  input  fp_t  a,
  input  fp_t  b,
  output fp_t  y
);
  fp_t s1;

  always_ff @(posedge clk) s1 <= fftmul_pkg::fp_mul(a, b);

  if (LAT > 1) begin : g_pipe
    fp_delay #(.W(FP_W), .DEPTH(LAT - 1)) u_dly (.clk(clk), .d(s1), .q(y));
  end else begin : g_direct
    assign y = s1;
  end
endmodule
