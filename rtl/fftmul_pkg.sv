// fftmul_pkg: number format, latencies and shared arithmetic of the FFT
// multi-digit multiplier.
//
// The datapath works on a reduced floating-point format: one sign bit, a
// 7-bit biased exponent and a 27-bit fraction with a hidden leading one
// (35 bits in all). That is the shortest format found sufficient for
// multiplying two 2^13-digit hexadecimal numbers. Exponent code 0 means zero;
// there are no denormals, infinities or NaNs (results below the range flush
// to zero, results above it saturate). Rounding is to nearest, ties to even;
// the rounding mode is this design's choice.
//
// The pipeline latencies are those of the optimally pipelined multiplier:
// (inv-)butterfly 22, complex multiplier 17, scaler 2, rounder-carrier 10.
// The adder (5) and multiplier (7) latencies are derived from them: a
// complex multiply is add -> multiply -> subtract (5+7+5 = 17) and a
// butterfly is a complex multiply plus one add (17+5 = 22).
package fftmul_pkg;

  localparam int unsigned EXP_W  = 7;
  localparam int unsigned FRAC_W = 27;
  localparam int unsigned FP_W   = 1 + EXP_W + FRAC_W;
  localparam int unsigned MANT_W = FRAC_W + 1;          // with hidden one
  localparam int unsigned BIAS   = (1 << (EXP_W - 1)) - 1;

  localparam int unsigned T_ADD  = 5;   // fpaddsub latency
  localparam int unsigned T_MUL  = 7;   // fpmul latency
  localparam int unsigned T_CMUL = T_ADD + T_MUL + T_ADD;   // 17
  localparam int unsigned T_BFLY = T_CMUL + T_ADD;          // 22
  localparam int unsigned T_SCL  = 2;
  localparam int unsigned T_CC   = 5;   // carry calc latency
  localparam int unsigned T_RC   = T_ADD + T_CC;            // 10

  localparam int unsigned RADIX_BITS = 4;   // hexadecimal digits
  localparam int unsigned INT_W      = 32;  // integer width in carry calc

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp_t;

  typedef struct packed {
    fp_t re;
    fp_t im;
  } cplx_t;

  // Operands of one butterfly (x, y) or one pointwise product (s, t), and
  // the two results (X, Y) of a butterfly: one cache entry.
  typedef struct packed {
    cplx_t a;
    cplx_t b;
  } pair_t;

  // Processing phases of one multiplication, in order.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_FFT_U = 3'd1,   // forward FFT of the first operand
    PH_FFT_V = 3'd2,   // forward FFT of the second operand
    PH_CMUL  = 3'd3,   // pointwise complex product
    PH_IFFT  = 3'd4,   // inverse FFT of the product
    PH_SCALE = 3'd5,   // division by 2m
    PH_ROUND = 3'd6    // rounding and carry propagation
  } phase_e;

  localparam fp_t FP_ZERO = '0;

  // Round a normalised significand (hidden one at bit MANT_W+2, three
  // guard/round/sticky bits below the fraction) and pack it.
  function automatic fp_t fp_pack(input logic s, input int e,
                                  input logic [MANT_W+2:0] n);
    logic [MANT_W:0] m;
    logic            up;
    fp_t             r;
    up = n[2] & (n[1] | n[0] | n[3]);
    m  = {1'b0, n[MANT_W+2:3]} + MANT_W'(up);
    if (m[MANT_W]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return FP_ZERO;
    if (e >= (1 << EXP_W)) begin
      r.sign = s;
      r.exp  = '1;
      r.frac = '1;
      return r;
    end
    r.sign = s;
    r.exp  = EXP_W'(e);
    r.frac = m[FRAC_W-1:0];
    return r;
  endfunction

  // a + b (sub = 0) or a - b (sub = 1).
  function automatic fp_t fp_add(input fp_t a, input fp_t b, input logic sub);
    fp_t                big, lit;
    logic               sb;
    logic               sbig, slit;
    int unsigned        d;
    logic [MANT_W+2:0]  mx, my, full;
    logic [MANT_W+3:0]  sum;
    logic [MANT_W+2:0]  n;
    logic               sticky;
    int                 e;
    int unsigned        lz;
    sb = b.sign ^ sub;
    if (b.exp == 0) return a;
    if (a.exp == 0) begin
      big      = b;
      big.sign = sb;
      return big;
    end
    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      big = a; lit = b; sbig = a.sign; slit = sb;
    end else begin
      big = b; lit = a; sbig = sb; slit = a.sign;
    end
    d    = int'(big.exp) - int'(lit.exp);
    mx   = {1'b1, big.frac, 3'b000};
    full = {1'b1, lit.frac, 3'b000};
    if (d > MANT_W + 2) begin
      my = '0;
      my[0] = 1'b1;
    end else begin
      my     = full >> d;
      sticky = |(full & ((MANT_W+3)'(1) << d) - 1'b1);
      my[0]  = my[0] | sticky;
    end
    if (sbig == slit) sum = {1'b0, mx} + {1'b0, my};
    else                sum = {1'b0, mx} - {1'b0, my};
    if (sum == 0) return FP_ZERO;
    e = int'(big.exp);
    if (sum[MANT_W+3]) begin
      n = sum[MANT_W+3:1];
      n[0] = n[0] | sum[0];
      e = e + 1;
    end else begin
      lz = 0;
      for (int i = MANT_W + 2; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      n = sum[MANT_W+2:0] << lz;
      e = e - int'(lz);
    end
    return fp_pack(sbig, e, n);
  endfunction

  // a * b
  function automatic fp_t fp_mul(input fp_t a, input fp_t b);
    logic [2*MANT_W-1:0] p;
    logic [MANT_W+2:0]   n;
    logic                s;
    int                  e;
    s = a.sign ^ b.sign;
    if (a.exp == 0 || b.exp == 0) return FP_ZERO;
    p = {1'b1, a.frac} * {1'b1, b.frac};
    e = int'(a.exp) + int'(b.exp) - int'(BIAS);
    if (p[2*MANT_W-1]) begin
      n = {p[2*MANT_W-1 -: MANT_W+2], |p[MANT_W-3:0]};
      e = e + 1;
    end else begin
      n = {p[2*MANT_W-2 -: MANT_W+2], |p[MANT_W-4:0]};
    end
    return fp_pack(s, e, n);
  endfunction

  // Reverse the low nbits bits of v (nbits <= 32).
  function automatic logic [31:0] bitrev(input logic [31:0] v, input int unsigned nbits);
    logic [31:0] r;
    r = '0;
    for (int i = 0; i < 32; i++)
      if (i < nbits) r[nbits-1-i] = v[i];
    return r;
  endfunction

endpackage
