// carry_calc: splits a rounded digit sum into a radix-16 digit and a carry.
//
// The input is a non-negative floating-point value v (a product digit plus
// the carry from the digit below). v is rounded to the nearest integer n
// (half rounds up) by selecting its integer bits with a shifter (the
// multiplexer) and adding the first dropped bit (the rounding adder). The
// digit is n mod 16 and the carry n / 16, returned as a floating-point value
// ready to be added to the next digit. Negative inputs and inputs below 0.5
// give n = 0: the coefficients of an integer product are never negative, so a
// negative value can only be rounding noise around zero. The multiplexer and
// rounding adder follow the design description; the rest, including the
// integer width INT_W and the exact conversion of the carry back to floating
// point, is this design's choice.
//
// Timing: T_CC = 5 cycles, one value per cycle. The result is computed in
// one combinational step and carried through the register chain.
module carry_calc
  import fftmul_pkg::*;
(
  input  logic                  clk,
  input  fp_t                   v,
  output logic [RADIX_BITS-1:0] digit,
  output fp_t                   carry
);
  localparam int unsigned CW = INT_W - RADIX_BITS;

  typedef struct packed {
    logic [RADIX_BITS-1:0] digit;
    fp_t                   carry;
  } res_t;

  function automatic res_t split(input fp_t x);
    logic [INT_W-1:0]  ipart, n;
    logic              rbit;
    logic [MANT_W-1:0] mant;
    logic [CW-1:0]     c;
    int                u, p;
    res_t              r;
    mant  = {1'b1, x.frac};
    u     = int'(x.exp) - int'(BIAS);
    ipart = '0;
    rbit  = 1'b0;
    if (x.sign || x.exp == 0 || u < -1) begin
      ipart = '0;
      rbit  = 1'b0;
    end else if (u == -1) begin
      rbit  = 1'b1;
    end else if (u <= int'(FRAC_W)) begin
      ipart = INT_W'(mant >> (int'(FRAC_W) - u));
      rbit  = (u == int'(FRAC_W)) ? 1'b0 : mant[int'(FRAC_W) - u - 1];
    end else if (u < int'(INT_W)) begin
      ipart = INT_W'(mant) << (u - int'(FRAC_W));
    end else begin
      ipart = '1;
    end
    n       = ipart + INT_W'(rbit);
    r.digit = n[RADIX_BITS-1:0];
    c       = n[INT_W-1:RADIX_BITS];
    r.carry = FP_ZERO;
    p       = -1;
    for (int i = 0; i < int'(CW); i++) if (c[i]) p = i;
    if (p >= 0) begin
      r.carry.exp  = EXP_W'(int'(BIAS) + p);
      if (p <= int'(FRAC_W))
        r.carry.frac = FRAC_W'(c << (int'(FRAC_W) - p));
      else
        r.carry.frac = FRAC_W'(c >> (p - int'(FRAC_W)));
    end
    return r;
  endfunction

  res_t s1, sq;

  always_ff @(posedge clk) s1 <= split(v);

  fp_delay #(.W($bits(res_t)), .DEPTH(T_CC - 1)) u_dly (.clk(clk), .d(s1), .q(sq));

  assign digit = sq.digit;
  assign carry = sq.carry;
endmodule
