// fp32_mul: combinational IEEE-754 single-precision multiplier, the synapse
// product (weight times input) of every neuron in the controller.
//
// How it works: the two 24-bit significands (hidden bit restored, subnormal
// inputs taken with exponent 1) are multiplied into a 48-bit product, which
// is normalised by a leading-zero count. A result below the normal range is
// shifted right into a subnormal, every bit shifted out kept as a sticky
// bit. Rounding is to nearest, ties to even, done by adding the round
// increment to the packed {exponent, fraction}, so that a carry out of the
// fraction bumps the exponent and a carry into exponent 255 yields infinity.
// NaN operands and 0 * infinity return the quiet NaN 0x7FC00000; infinity
// times a non-zero value returns a signed infinity; a zero operand returns a
// signed zero.
//
// Interface: a, b in; p = a * b out. Timing: purely combinational, no
// clock. The number format is the one the controller specifies; the choice
// of IEEE rounding, subnormal handling and the single-cycle combinational
// structure are this design's own.
module fp32_mul
  import fp32_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t p
);

  fp32_fields_t fa, fb;
  assign fa = a;
  assign fb = b;

  logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero, sgn;
  assign a_nan  = (fa.exp == EXP_MAX) && (fa.frac != '0);
  assign b_nan  = (fb.exp == EXP_MAX) && (fb.frac != '0);
  assign a_inf  = (fa.exp == EXP_MAX) && (fa.frac == '0);
  assign b_inf  = (fb.exp == EXP_MAX) && (fb.frac == '0);
  assign a_zero = (fa.exp == '0) && (fa.frac == '0);
  assign b_zero = (fb.exp == '0) && (fb.frac == '0);
  assign sgn    = fa.sign ^ fb.sign;

  logic [23:0] ma, mb;
  logic [47:0] prod, pn;
  logic [95:0] wide;
  logic [5:0]  lz;
  logic [6:0]  rsh;
  logic signed [11:0] er;
  logic [22:0] mant;
  logic        guard, sticky, inc;
  logic [7:0]  efield;
  logic [30:0] mag;

  always_comb begin
    ma   = {fa.exp != '0, fa.frac};
    mb   = {fb.exp != '0, fb.frac};
    prod = ma * mb;

    // Leading zeros of the product (48 when the product is zero).
    lz = 6'd48;
    for (int i = 0; i < 48; i++)
      if (prod[i]) lz = 6'(47 - i);

    pn = prod << lz;
    // Biased exponent of pn read as 1.xxx (bit 47 being the hidden bit).
    er = 12'(signed'({4'd0, (fa.exp == '0) ? 8'd1 : fa.exp}))
       + 12'(signed'({4'd0, (fb.exp == '0) ? 8'd1 : fb.exp}))
       - 12'(BIAS - 1) - 12'(signed'({6'd0, lz}));

    // Results below the normal range become subnormal: shift right by 1-er.
    if (er < 12'sd1)
      rsh = (er < -12'sd60) ? 7'd61 : 7'(12'sd1 - er);
    else
      rsh = 7'd0;
    wide   = {pn, 48'd0} >> rsh;
    // The hidden bit stays at the top only for a normal result.
    efield = wide[95] ? er[7:0] : 8'd0;
    mant   = wide[94:72];
    guard  = wide[71];
    sticky = |wide[70:0];
    inc    = guard & (sticky | mant[0]);
    mag    = {efield, mant} + 31'(inc);

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      p = FP_QNAN;
    else if (a_inf || b_inf)
      p = {sgn, EXP_MAX, 23'd0};
    else if (a_zero || b_zero)
      p = {sgn, 31'd0};
    else if (er > 12'sd254)
      p = {sgn, EXP_MAX, 23'd0};
    else
      p = {sgn, mag};
  end

endmodule
