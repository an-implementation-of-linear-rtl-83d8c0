// fp16_pkg: shared definitions for the half-precision (FPU-16) operators.
//
// The number format is IEEE 754 binary16: 1 sign bit, a 5-bit exponent with
// bias 15 and a 10-bit mantissa with a hidden leading one. The operators built
// on this package round to nearest, ties to even. Subnormal inputs are read as
// zero and results below the smallest normal number (2^-14) are flushed to a
// signed zero; this flush-to-zero behaviour is a choice of this design, made to
// keep the operators small. Every NaN result is the quiet NaN 16'h7E00.
//
// fp16_round_pack() is the common back end of the adder, multiplier and
// divider: it takes a sign, a biased exponent and a normalised 14-bit
// significand {hidden, 10 fraction bits, guard, round, sticky}, rounds, and
// handles exponent overflow (to infinity) and underflow (to zero).
package fp16_pkg;

  typedef struct packed {
    logic       sign;
    logic [4:0] exp;
    logic [9:0] man;
  } fp16_t;

  localparam logic [15:0] FP16_QNAN = 16'h7E00;
  localparam logic [15:0] FP16_PINF = 16'h7C00;
  localparam logic [15:0] FP16_ONE  = 16'h3C00;
  localparam int          FP16_BIAS = 15;

  function automatic logic fp16_is_nan(input fp16_t a);
    return (a.exp == 5'h1F) && (a.man != '0);
  endfunction

  function automatic logic fp16_is_inf(input fp16_t a);
    return (a.exp == 5'h1F) && (a.man == '0);
  endfunction

  // Zero or subnormal: both are treated as zero.
  function automatic logic fp16_is_zero(input fp16_t a);
    return a.exp == 5'h00;
  endfunction

  function automatic fp16_t fp16_inf(input logic sign);
    return {sign, 5'h1F, 10'h000};
  endfunction

  function automatic fp16_t fp16_zero(input logic sign);
    return {sign, 15'h0000};
  endfunction

  // sig[13] is the hidden one, sig[12:3] the fraction, sig[2] guard,
  // sig[1] round, sig[0] sticky. exp_b is the biased exponent of sig.
  function automatic fp16_t fp16_round_pack(input logic sign,
                                            input int   exp_b,
                                            input logic [13:0] sig);
    logic        round_up;
    logic [11:0] rounded;
    int          e;
    round_up = sig[2] & (sig[1] | sig[0] | sig[3]);
    rounded  = {1'b0, sig[13:3]} + {11'd0, round_up};
    e        = exp_b;
    if (rounded[11]) begin
      rounded = rounded >> 1;
      e       = e + 1;
    end
    if (e >= 31)     return fp16_inf(sign);
    else if (e <= 0) return fp16_zero(sign);
    else             return {sign, e[4:0], rounded[9:0]};
  endfunction

endpackage
