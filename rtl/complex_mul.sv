// complex_mul: pipelined complex multiplier with three real multiplications.
//
// p = s * t is computed as
//   p_re = s_re*t_re - s_im*t_im
//   p_im = (s_re + s_im)(t_re + t_im) - (s_re*t_re + s_im*t_im)
// which trades the fourth multiplier of the schoolbook form for three extra
// adders. The structure follows the published block diagram: two adders form
// the operand sums while two multipliers form s_re*t_re and s_im*t_im; a
// subtracter and an adder combine those two products; a third multiplier
// forms the product of the sums; a final subtracter gives p_im, and a buffer
// delays p_re to leave at the same time.
//
// Timing: add (5) + multiply (7) + subtract (5) gives T_CMUL = 17 cycles
// from operands to result, one new product per cycle. in_valid travels with
// the data and comes out as out_valid.
module complex_mul
  import fftmul_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t s,
  input  cplx_t t,
  output logic  out_valid,
  output cplx_t p
);
  fp_t sum_s, sum_t;        // s_re + s_im, t_re + t_im          (cycle 5)
  fp_t rr, ii;              // s_re*t_re, s_im*t_im              (cycle 7)
  fp_t rr_ii_d, rr_ii_s;    // rr - ii (delayed to 17), rr + ii (cycle 12)
  fp_t prod_x;               // (s_re+s_im)(t_re+t_im)            (cycle 12)
  fp_t pre;                 // rr - ii before the output buffer

  fp_addsub u_add_s (.clk(clk), .a(s.re), .b(s.im), .sub(1'b0), .y(sum_s));
  fp_addsub u_add_t (.clk(clk), .a(t.re), .b(t.im), .sub(1'b0), .y(sum_t));
  fp_mul    u_mul_rr (.clk(clk), .a(s.re), .b(t.re), .y(rr));
  fp_mul    u_mul_ii (.clk(clk), .a(s.im), .b(t.im), .y(ii));

  // The prod_x multiplier takes the sums at cycle 5 and finishes at cycle 12,
  // while rr and ii are combined from cycle 7 to cycle 12; both meet at the
  // last subtracter.
  fp_mul    u_mul_x  (.clk(clk), .a(sum_s), .b(sum_t), .y(prod_x));
  fp_addsub u_sub_r  (.clk(clk), .a(rr), .b(ii), .sub(1'b1), .y(pre));
  fp_addsub u_add_ri (.clk(clk), .a(rr), .b(ii), .sub(1'b0), .y(rr_ii_s));
  fp_addsub u_sub_i  (.clk(clk), .a(prod_x), .b(rr_ii_s), .sub(1'b1), .y(p.im));

  fp_delay #(.W(FP_W), .DEPTH(T_CMUL - T_MUL - T_ADD)) u_buf (
    .clk(clk), .d(pre), .q(rr_ii_d));
  assign p.re = rr_ii_d;

  logic [T_CMUL-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[T_CMUL-2:0], in_valid};
  assign out_valid = vpipe[T_CMUL-1];
endmodule
