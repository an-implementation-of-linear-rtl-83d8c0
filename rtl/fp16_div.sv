// fp16_div: combinational FPU-16 divider, result = a / b.
//
// Used by the linear-regression engine to form the inverse of the 2x2
// determinant. The dividend significand is shifted left by 14 places and
// divided by the divisor significand with an integer divider; the quotient
// lies in (2^13, 2^15), so it holds the hidden one, ten fraction bits and the
// guard and round bits, and a non-zero remainder becomes the sticky bit.
// Rounding is to nearest even. Special cases follow IEEE 754: x/0 gives a
// signed infinity, 0/0 and inf/inf give the quiet NaN, x/inf gives a signed
// zero. Subnormal operands count as zero.
//
// Interface: a (dividend), b (divisor), y, all raw binary16 words.
// Combinational; the caller registers the result.
module fp16_div
  import fp16_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);

  fp16_t fa, fb;
  logic  sign;
  logic [24:0] num;
  logic [10:0] den;
  logic [24:0] quo;
  logic [10:0] rem;
  logic [13:0] sig;
  int          exp_b;

  assign fa = fp16_t'(a);
  assign fb = fp16_t'(b);

  always_comb begin
    sign  = fa.sign ^ fb.sign;
    num   = {1'b1, fa.man, 14'd0};
    den   = {1'b1, fb.man};
    quo   = num / 25'(den);
    rem   = 11'(num % 25'(den));
    exp_b = int'(fa.exp) - int'(fb.exp) + FP16_BIAS;
    if (quo[14]) begin
      sig = {quo[14:2], quo[1] | quo[0] | (rem != '0)};
    end else begin
      sig   = {quo[13:1], quo[0] | (rem != '0)};
      exp_b = exp_b - 1;
    end

    if (fp16_is_nan(fa) || fp16_is_nan(fb))
      y = FP16_QNAN;
    else if ((fp16_is_inf(fa) && fp16_is_inf(fb)) || (fp16_is_zero(fa) && fp16_is_zero(fb)))
      y = FP16_QNAN;
    else if (fp16_is_inf(fa) || fp16_is_zero(fb))
      y = fp16_inf(sign);
    else if (fp16_is_zero(fa) || fp16_is_inf(fb))
      y = fp16_zero(sign);
    else
      y = fp16_round_pack(sign, exp_b, sig);
  end

endmodule
