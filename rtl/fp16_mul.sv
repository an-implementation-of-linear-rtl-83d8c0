// fp16_mul: combinational FPU-16 multiplier, result = a * b.
//
// One of the floating-point operations the linear-regression engine needs
// (the squared inputs, the cross products and the final scaling by the
// inverse determinant). The two 11-bit significands (hidden one included) are
// multiplied into a 22-bit product in [1, 4); the product is normalised by at
// most one place, the bits below the guard and round positions are ORed into
// a sticky bit, and fp16_round_pack() rounds to nearest even. Special operands
// follow IEEE 754: NaN in gives the quiet NaN, infinity times zero gives NaN,
// infinity times a number gives a signed infinity. Subnormals count as zero.
//
// Interface: a, b, y are raw binary16 words. Purely combinational, so the
// result is valid in the same cycle; the caller registers it.
module fp16_mul
  import fp16_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y
);

  fp16_t fa, fb;
  logic  sign;
  logic [10:0] ma, mb;
  logic [21:0] prod;
  logic [13:0] sig;
  int          exp_b;

  assign fa = fp16_t'(a);
  assign fb = fp16_t'(b);

  always_comb begin
    sign  = fa.sign ^ fb.sign;
    ma    = {1'b1, fa.man};
    mb    = {1'b1, fb.man};
    prod  = ma * mb;
    exp_b = int'(fa.exp) + int'(fb.exp) - FP16_BIAS;
    if (prod[21]) begin
      sig   = {prod[21:9], |prod[8:0]};
      exp_b = exp_b + 1;
    end else begin
      sig   = {prod[20:8], |prod[7:0]};
    end

    if (fp16_is_nan(fa) || fp16_is_nan(fb))
      y = FP16_QNAN;
    else if ((fp16_is_inf(fa) && fp16_is_zero(fb)) || (fp16_is_zero(fa) && fp16_is_inf(fb)))
      y = FP16_QNAN;
    else if (fp16_is_inf(fa) || fp16_is_inf(fb))
      y = fp16_inf(sign);
    else if (fp16_is_zero(fa) || fp16_is_zero(fb))
      y = fp16_zero(sign);
    else
      y = fp16_round_pack(sign, exp_b, sig);
  end

endmodule
