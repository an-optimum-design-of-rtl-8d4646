// inv_butterfly: radix-2 decimation-in-frequency butterfly of the inverse FFT.
//
//   X' = x' + y',   Y' = (x' - y') * conj(W)
//
// Four adders/subtracters form x'+y' and x'-y' (5 cycles). The sum waits in
// two 17-cycle buffers while the difference is multiplied by W with its
// imaginary sign inverted, which turns the forward twiddle W^e stored in the
// look-up table into W^-e for the inverse transform. That is the published
// structure. W is applied at the input together with x' and y' and is
// delayed here by T_ADD cycles so that it meets the difference; the figure
// shows no such delay, it is this design's way of keeping a single operand
// time for the caller. Latency T_BFLY = 22 cycles, one butterfly per cycle.
module inv_butterfly
  import fftmul_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x,
  input  cplx_t y,
  input  cplx_t w,
  output logic  out_valid,
  output cplx_t xo,   // X'
  output cplx_t yo    // Y'
);
  cplx_t sum, dif, wc, wd;
  logic [T_ADD-1:0] vpipe;

  fp_addsub u_sr (.clk(clk), .a(x.re), .b(y.re), .sub(1'b0), .y(sum.re));
  fp_addsub u_si (.clk(clk), .a(x.im), .b(y.im), .sub(1'b0), .y(sum.im));
  fp_addsub u_dr (.clk(clk), .a(x.re), .b(y.re), .sub(1'b1), .y(dif.re));
  fp_addsub u_di (.clk(clk), .a(x.im), .b(y.im), .sub(1'b1), .y(dif.im));

  // Conjugate: invert the sign of the imaginary part (zero stays zero).
  always_comb begin
    wc = w;
    if (w.im.exp != 0) wc.im.sign = ~w.im.sign;
  end
  fp_delay #(.W(2*FP_W), .DEPTH(T_ADD)) u_wdly (.clk(clk), .d(wc), .q(wd));

  fp_delay #(.W(FP_W), .DEPTH(T_CMUL)) u_buf_re (.clk(clk), .d(sum.re), .q(xo.re));
  fp_delay #(.W(FP_W), .DEPTH(T_CMUL)) u_buf_im (.clk(clk), .d(sum.im), .q(xo.im));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[T_ADD-2:0], in_valid};

  complex_mul u_cmul (.clk(clk), .rst_n(rst_n), .in_valid(vpipe[T_ADD-1]),
                      .s(dif), .t(wd), .out_valid(out_valid), .p(yo));
endmodule
