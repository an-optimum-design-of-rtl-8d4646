// rounder_carrier: turns scaled inverse-FFT outputs into radix-16 digits.
//
// Digits are processed from the least significant one upwards. Each input
// value is added to the carry left by the digit below (fp_addsub), then
// carry_calc rounds the sum to the nearest integer and splits it into an
// output digit and a new carry, which is fed back to the adder. The adder /
// carry-calc loop is the published structure.
//
// The loop cannot be pipelined: a digit can enter only when the carry of the
// previous one is known. A value entering on in_valid gives out_valid and
// its digit T_RC = 10 cycles later, and the new carry is bypassed to the
// adder in that same cycle, so the next value may enter exactly T_RC cycles
// after the previous one (not earlier; an assertion checks this). clear
// zeroes the carry before the first digit of a number. carry_out holds the
// last carry produced.
module rounder_carrier
  import fftmul_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  fp_t                   d,
  output logic                  out_valid,
  output logic [RADIX_BITS-1:0] digit,
  output fp_t                   carry_out
);
  fp_t              carry_q, carry_new, carry_in, sum;
  logic [T_RC-1:0]  vpipe;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[T_RC-2:0], in_valid};
  assign out_valid = vpipe[T_RC-1];

  // Carry bypass: the carry produced in this cycle feeds a digit entering now.
  assign carry_in = out_valid ? carry_new : carry_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         carry_q <= FP_ZERO;
    else if (clear)     carry_q <= FP_ZERO;
    else if (out_valid) carry_q <= carry_new;

  fp_addsub  u_add (.clk(clk), .a(d), .b(carry_in), .sub(1'b0), .y(sum));
  carry_calc u_cc  (.clk(clk), .v(sum), .digit(digit), .carry(carry_new));

  assign carry_out = carry_q;

  // Only one digit may be inside the carry loop at a time.
  a_one_in_loop: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (vpipe[T_RC-2:0] == '0))
    else $error("rounder_carrier: new digit before the previous carry is known");
endmodule
