// fft_multiplier: multiplies two m-digit hexadecimal integers with FFTs.
//
// The digits of a and b, padded with m zero digits each, are treated as
// 2m-point complex vectors u and v. The product is
//     h = IFFT( FFT(u) .* FFT(v) ) / 2m
// followed by rounding each element to the nearest integer and propagating
// carries so that every digit falls back into 0..15. All arithmetic is
// floating point in the short 35-bit format of fftmul_pkg.
//
// Blocks (one arithmetic module per operation, all sharing one memory):
//   butterfly      forward FFT stages            latency 22
//   inv_butterfly  inverse FFT stages            latency 22
//   complex_mul    pointwise product             latency 17
//   scaler         division by 2m                latency 2
//   rounder_carrier rounding and carries         10 cycles per digit
//   fftmul_memory  8-entry cache + twiddle table
//   fftmul_controller pass sequencing and addresses
// The operands and all intermediate vectors live in an external main memory
// reached through the mm_* ports: two read ports with one cycle of read
// latency (address in one cycle, data in the next) and two write ports.
// Word address layout: region U = 0 .. 2m-1, region V = 2m .. 4m-1, one
// complex word per address.
//
// Use: write the twiddle factors W^e = exp(-2*pi*i*e/2m), e = 0..m-1, through
// lut_*; place digit a_i as a floating-point number at U[i] and b_i at V[i]
// (i < m), with zeros at i = m..2m-1; pulse start. The 2m product digits
// leave on digit_valid/digit/digit_idx, least significant first, one every
// T_RC cycles at the end; done pulses after the last, and carry_out then holds
// the carry above the top digit (zero for a correct product). U and V are
// overwritten.
module fft_multiplier
  import fftmul_pkg::*;
#(
  parameter int unsigned LOG2M = 13,             // m = 2^LOG2M digits per operand
  localparam int unsigned K    = LOG2M + 1,
  localparam int unsigned AW   = K + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // twiddle-factor loading
  input  logic                  lut_we,
  input  logic [LOG2M-1:0]      lut_waddr,
  input  cplx_t                 lut_wdata,
  // external main memory
  output logic                  mm_re,
  output logic [AW-1:0]         mm_raddr0,
  output logic [AW-1:0]         mm_raddr1,
  input  cplx_t                 mm_rdata0,
  input  cplx_t                 mm_rdata1,
  output logic                  mm_we0,
  output logic [AW-1:0]         mm_waddr0,
  output cplx_t                 mm_wdata0,
  output logic                  mm_we1,
  output logic [AW-1:0]         mm_waddr1,
  output cplx_t                 mm_wdata1,
  // product digits
  output logic                  digit_valid,
  output logic [K-1:0]          digit_idx,
  output logic [RADIX_BITS-1:0] digit,
  output fp_t                   carry_out
);
  phase_e           phase;
  logic [3:0]       stage;
  logic             op_valid, res_valid, rc_clear;
  logic [K-1:0]     res_idx;
  logic             c_wr0_en, c_wr1_en;
  logic [2:0]       c_wr0_idx, c_rd0_idx, c_wr1_idx, c_rd1_idx;
  logic [LOG2M-1:0] lut_raddr;
  pair_t            ops, res, res_out;
  cplx_t            w;

  logic  bf_v, ibf_v, cm_v, sc_v, rc_v;
  cplx_t bf_x, bf_y, ibf_x, ibf_y, cm_p;
  fp_t   sc_q;

  fftmul_controller #(.LOG2M(LOG2M)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .phase, .stage,
    .mm_re, .mm_raddr0, .mm_raddr1,
    .mm_we0, .mm_waddr0, .mm_we1, .mm_waddr1,
    .c_wr0_en, .c_wr0_idx, .c_rd0_idx, .c_wr1_en, .c_wr1_idx, .c_rd1_idx,
    .lut_raddr, .op_valid, .res_valid, .res_idx, .rc_clear);

  fftmul_memory #(.ENTRIES(8), .LOG2M(LOG2M)) u_mem (
    .clk,
    .wr0_en(c_wr0_en), .wr0_idx(c_wr0_idx), .wr0_data({mm_rdata0, mm_rdata1}),
    .rd0_idx(c_rd0_idx), .rd0_data(ops),
    .wr1_en(c_wr1_en), .wr1_idx(c_wr1_idx), .wr1_data(res),
    .rd1_idx(c_rd1_idx), .rd1_data(res_out),
    .lut_we, .lut_waddr, .lut_wdata, .lut_raddr, .lut_rdata(w));

  butterfly u_bf (.clk, .rst_n, .in_valid(op_valid && (phase == PH_FFT_U || phase == PH_FFT_V)),
                  .x(ops.a), .y(ops.b), .w(w), .out_valid(bf_v), .xo(bf_x), .yo(bf_y));

  inv_butterfly u_ibf (.clk, .rst_n, .in_valid(op_valid && phase == PH_IFFT),
                       .x(ops.a), .y(ops.b), .w(w), .out_valid(ibf_v), .xo(ibf_x), .yo(ibf_y));

  complex_mul u_cmul (.clk, .rst_n, .in_valid(op_valid && phase == PH_CMUL),
                      .s(ops.a), .t(ops.b), .out_valid(cm_v), .p(cm_p));

  scaler #(.K(K)) u_scl (.clk, .rst_n, .in_valid(op_valid && phase == PH_SCALE),
                         .d(ops.a.re), .out_valid(sc_v), .q(sc_q));

  rounder_carrier u_rc (.clk, .rst_n, .clear(rc_clear),
                        .in_valid(op_valid && phase == PH_ROUND), .d(ops.a.re),
                        .out_valid(rc_v), .digit(digit), .carry_out(carry_out));

  // Result of the module that is active in this pass.
  always_comb begin
    res       = '0;
    res_valid = 1'b0;
    case (phase)
      PH_FFT_U, PH_FFT_V: begin res = {bf_x, bf_y};       res_valid = bf_v;  end
      PH_IFFT:            begin res = {ibf_x, ibf_y};     res_valid = ibf_v; end
      PH_CMUL:            begin res = {cm_p, cplx_t'(0)}; res_valid = cm_v;  end
      PH_SCALE:           begin res = {sc_q, FP_ZERO, cplx_t'(0)}; res_valid = sc_v; end
      PH_ROUND:           begin res = '0;                 res_valid = rc_v;  end
      default: ;
    endcase
  end

  assign mm_wdata0   = res_out.a;
  assign mm_wdata1   = res_out.b;
  assign digit_valid = rc_v;
  assign digit_idx   = res_idx;
endmodule
