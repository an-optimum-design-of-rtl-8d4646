// fp_addsub: pipelined floating-point adder/subtracter ("fpaddsub").
//
// Computes y = a + b when sub = 0 and y = a - b when sub = 1, in the 35-bit
// format of fftmul_pkg (round to nearest even, flush to zero). The result
// appears T_ADD (5) cycles after the operands; a new operation can start
// every cycle. The operation itself is one combinational step
// (align, add, normalise, round) registered and then carried through
// T_ADD-1 further registers: the placement of pipeline cuts is left to
// register retiming in synthesis. The latency is derived from the published
// butterfly and complex-multiplier latencies; the internal algorithm is this
// design's choice.
module fp_addsub
  import fftmul_pkg::*;
#(
  parameter int unsigned LAT = T_ADD
) (
  input  logic clk,
  input  fp_t  a,
  input  fp_t  b,
  input  logic sub,
  output fp_t  y
);
  fp_t s1;

  always_ff @(posedge clk) s1 <= fp_add(a, b, sub);

  if (LAT > 1) begin : g_pipe
    fp_delay #(.W(FP_W), .DEPTH(LAT - 1)) u_dly (.clk(clk), .d(s1), .q(y));
  end else begin : g_direct
    assign y = s1;
  end
endmodule
