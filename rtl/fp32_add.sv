// fp32_add: combinational IEEE-754 single-precision adder, used for the
// weighted sums of the neurons and for the error junction of the controller.
//
// How it works: the operands are ordered by magnitude, the smaller one's
// 24-bit significand is shifted right by the exponent difference into a
// 28-bit working word (carry, hidden bit, 23 fraction bits, guard, round and
// a sticky bit that collects every bit shifted out), and the two are added
// or subtracted according to the signs. A carry out shifts the result right
// by one; cancellation shifts it left by its leading-zero count, but never
// below exponent 1, which leaves a subnormal. Rounding is to nearest, ties
// to even, by adding the round increment to the packed {exponent, fraction}
// so that a carry bumps the exponent (and exponent 255 means infinity). An
// exact zero from unlike signs is +0; the sum of two -0 is -0. NaN operands
// and inf + (-inf) return the quiet NaN 0x7FC00000.
//
// Interface: a, b in; s = a + b out (subtract by flipping b's sign bit).
// Timing: purely combinational. The number format is the controller's; the
// IEEE rounding, subnormal handling and structure are this design's choice.
module fp32_add
  import fp32_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t s
);

  fp32_fields_t fa, fb, fx, fy;
  assign fa = a;
  assign fb = b;

  logic a_nan, b_nan, a_inf, b_inf;
  assign a_nan = (fa.exp == EXP_MAX) && (fa.frac != '0);
  assign b_nan = (fb.exp == EXP_MAX) && (fb.frac != '0);
  assign a_inf = (fa.exp == EXP_MAX) && (fa.frac == '0);
  assign b_inf = (fb.exp == EXP_MAX) && (fb.frac == '0);

  // fx is the operand of larger magnitude.
  assign fx = (a[30:0] >= b[30:0]) ? fa : fb;
  assign fy = (a[30:0] >= b[30:0]) ? fb : fa;

  logic [7:0]  ex, ey, d;
  logic [4:0]  dcap;
  logic [27:0] mx, my, sum;
  logic [55:0] yw;
  logic [26:0] n;
  logic [4:0]  lz, lsh;
  logic [8:0]  en;
  logic        sub, guard, sticky, inc;
  logic [7:0]  efield;
  logic [30:0] mag;

  always_comb begin
    ex   = (fx.exp == '0) ? 8'd1 : fx.exp;
    ey   = (fy.exp == '0) ? 8'd1 : fy.exp;
    d    = ex - ey;
    dcap = (d > 8'd31) ? 5'd31 : d[4:0];
    sub  = fx.sign ^ fy.sign;

    mx = {1'b0, fx.exp != '0, fx.frac, 3'b000};
    yw = {1'b0, fy.exp != '0, fy.frac, 3'b000, 28'd0} >> dcap;
    my = {yw[55:29], yw[28] | (|yw[27:0])};

    sum = sub ? (mx - my) : (mx + my);

    lz  = 5'd0;
    lsh = 5'd0;
    if (sum[27]) begin
      n  = {sum[27:2], sum[1] | sum[0]};
      en = {1'b0, ex} + 9'd1;
    end else begin
      lz = 5'd27;
      for (int i = 0; i < 27; i++)
        if (sum[i]) lz = 5'(26 - i);
      lsh = ({3'd0, lz} < ex) ? lz : 5'(ex - 8'd1);
      n   = sum[26:0] << lsh;
      en  = {1'b0, ex} - {4'd0, lsh};
    end

    efield = n[26] ? en[7:0] : 8'd0;
    guard  = n[2];
    sticky = n[1] | n[0];
    inc    = guard & (sticky | n[3]);
    mag    = {efield, n[25:3]} + 31'(inc);

    if (a_nan || b_nan || (a_inf && b_inf && (fa.sign != fb.sign)))
      s = FP_QNAN;
    else if (a_inf)
      s = a;
    else if (b_inf)
      s = b;
    else if (sum == '0)
      s = {fa.sign & fb.sign, 31'd0};
    else if (en > 9'd254)
      s = {fx.sign, EXP_MAX, 23'd0};
    else
      s = {fx.sign, mag};
  end

endmodule
