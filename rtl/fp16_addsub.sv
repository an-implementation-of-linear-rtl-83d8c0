// fp16_addsub: combinational FPU-16 adder/subtracter, y = a + b or a - b.
//
// Accumulates the running sums of the linear-regression engine and forms the
// differences in the determinant and numerators. The operand of larger
// magnitude is taken as the reference; the other significand, extended by
// three bits (guard, round, sticky), is shifted right by the exponent
// difference with every bit shifted out ORed into the sticky bit. An
// effective addition may carry one place to the left; an effective
// subtraction is renormalised with a leading-zero count. fp16_round_pack()
// then rounds to nearest even. An exact zero difference is +0. IEEE 754
// special cases: NaN in, or inf - inf, gives the quiet NaN; an infinite
// operand otherwise wins. Subnormal operands count as zero.
//
// Interface: a, b, sub (1 = subtract), y. Combinational.
module fp16_addsub
  import fp16_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        sub,
  output logic [15:0] y
);

  fp16_t fa, fb, big, sml;
  logic        swap, eff_sub;
  int          shamt, lz, exp_b;
  logic [13:0] mbig, msml, msh;
  logic [27:0] wide;
  logic [14:0] sum;
  logic [13:0] sig;

  always_comb begin
    fa = fp16_t'(a);
    fb = fp16_t'(b);
    fb.sign = fb.sign ^ sub;

    swap    = {fb.exp, fb.man} > {fa.exp, fa.man};
    big     = swap ? fb : fa;
    sml   = swap ? fa : fb;
    eff_sub = big.sign ^ sml.sign;
    shamt   = int'(big.exp) - int'(sml.exp);
    mbig    = {1'b1, big.man, 3'b000};
    msml  = {1'b1, sml.man, 3'b000};

    wide    = '0;
    if (shamt >= 15) begin
      msh = 14'd1;                    // only the sticky bit survives
    end else begin
      wide = {msml, 14'd0} >> shamt;
      msh  = {wide[27:15], wide[14] | (wide[13:0] != '0)};
    end

    exp_b = int'(big.exp);
    lz    = 0;
    sig   = '0;
    if (eff_sub) begin
      sum = {1'b0, mbig - msh};
      for (int i = 0; i <= 13; i++)
        if (sum[i]) lz = 13 - i;        // the highest set bit wins
      sig   = sum[13:0] << lz;
      exp_b = exp_b - lz;
    end else begin
      sum = {1'b0, mbig} + {1'b0, msh};
      if (sum[14]) begin
        sig   = {sum[14:2], sum[1] | sum[0]};
        exp_b = exp_b + 1;
      end else begin
        sig   = sum[13:0];
      end
    end

    if (fp16_is_nan(fa) || fp16_is_nan(fb))
      y = FP16_QNAN;
    else if (fp16_is_inf(fa) && fp16_is_inf(fb))
      y = (fa.sign == fb.sign) ? fp16_inf(fa.sign) : FP16_QNAN;
    else if (fp16_is_inf(fa))
      y = fa;
    else if (fp16_is_inf(fb))
      y = fb;
    else if (fp16_is_zero(fa) && fp16_is_zero(fb))
      y = fp16_zero(fa.sign & fb.sign);
    else if (fp16_is_zero(fb))
      y = fa;
    else if (fp16_is_zero(fa))
      y = fb;
    else if (eff_sub && (sum[13:0] == '0))
      y = fp16_zero(1'b0);
    else
      y = fp16_round_pack(big.sign, exp_b, sig);
  end

endmodule
