// butterfly: radix-2 decimation-in-time butterfly of the forward FFT.
//
//   X = x + y*W,   Y = x - y*W
//
// y*W is formed by a complex_mul (17 cycles) while x waits in two buffers of
// the same depth; four adders/subtracters then form the real and imaginary
// parts of X and Y (5 cycles). This is the published structure. Latency
// T_BFLY = 22 cycles, one butterfly per cycle. W is supplied by the caller
// (the twiddle look-up table) at the same time as x and y.
module butterfly
  import fftmul_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t x,
  input  cplx_t y,
  input  cplx_t w,
  output logic  out_valid,
  output cplx_t xo,   // X
  output cplx_t yo    // Y
);
  cplx_t yw, xd;
  logic  cm_valid;

  complex_mul u_cmul (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
                      .s(y), .t(w), .out_valid(cm_valid), .p(yw));

  fp_delay #(.W(FP_W), .DEPTH(T_CMUL)) u_buf_re (.clk(clk), .d(x.re), .q(xd.re));
  fp_delay #(.W(FP_W), .DEPTH(T_CMUL)) u_buf_im (.clk(clk), .d(x.im), .q(xd.im));

  fp_addsub u_xr (.clk(clk), .a(xd.re), .b(yw.re), .sub(1'b0), .y(xo.re));
  fp_addsub u_xi (.clk(clk), .a(xd.im), .b(yw.im), .sub(1'b0), .y(xo.im));
  fp_addsub u_yr (.clk(clk), .a(xd.re), .b(yw.re), .sub(1'b1), .y(yo.re));
  fp_addsub u_yi (.clk(clk), .a(xd.im), .b(yw.im), .sub(1'b1), .y(yo.im));

  logic [T_ADD-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[T_ADD-2:0], cm_valid};
  assign out_valid = vpipe[T_ADD-1];
endmodule
