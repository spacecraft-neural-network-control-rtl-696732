// fp_ref_pkg: reference model for the testbenches. It computes IEEE-754
// single-precision results by a route independent of the RTL: operands are
// widened exactly to double precision, the operation is done in double
// (real) arithmetic, and the double result is rounded once to single
// precision (nearest, ties to even, with subnormals). Because double carries
// more than twice the single-precision significand plus two bits, rounding
// the double result again gives the correctly rounded single result for
// addition and multiplication. Every NaN result is returned as the quiet NaN
// 0x7FC00000, which is what the RTL produces.
package fp_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    logic [7:0]  e;
    logic [22:0] m;
    e = f[30:23];
    m = f[22:0];
    if (e == 8'hff)
      d = {f[31], 11'h7ff, m, 29'd0};
    else if (e == 8'h00) begin
      // value = m * 2^-149, exact in double
      f2r = real'(m) * $bitstoreal({1'b0, 11'(1023 - 149), 52'd0});
      if (f[31]) f2r = -f2r;
      if (f[31] && m == 0) f2r = $bitstoreal(64'h8000_0000_0000_0000);
      return f2r;
    end else
      d = {f[31], 11'(32'(e) - 127 + 1023), m, 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real x);
    logic [63:0]  d;
    logic [10:0]  ed;
    logic [52:0]  mm;
    logic [127:0] w;
    int           ef, sh;
    logic [23:0]  mant;
    logic         g, st, inc;
    logic [30:0]  mag;
    d  = $realtobits(x);
    ed = d[62:52];
    if (ed == 11'h7ff) return (d[51:0] != 0) ? QNAN : {d[63], 8'hff, 23'd0};
    if (ed == 11'h000) return {d[63], 31'd0};
    mm = {1'b1, d[51:0]};
    ef = int'(ed) - 1023 + 127;
    sh = (ef >= 1) ? 0 : 1 - ef;
    if (sh > 100) sh = 100;
    w    = {mm, 75'd0} >> sh;
    mant = w[127:104];
    g    = w[103];
    st   = |w[102:0];
    inc  = g & (st | mant[0]);
    if (ef >= 255) return {d[63], 8'hff, 23'd0};
    mag = {(ef >= 1) ? 8'(ef) : 8'd0, mant[22:0]} + 31'(inc);
    return {d[63], mag};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // Random operand: a mix of arbitrary bit patterns (all classes: zeros,
  // subnormals, infinities, NaN, extremes) and values of moderate size.
  function automatic logic [31:0] rand_fp(input int unsigned mode);
    logic [31:0] r;
    r = $urandom;
    case (mode % 4)
      0: ;                                                  // any pattern
      1: r[30:23] = 8'(110 + ($urandom % 35));              // moderate
      2: r[30:23] = 8'($urandom % 3);                       // tiny / subnormal
      default: r[30:23] = 8'(120 + ($urandom % 10));        // near 1.0
    endcase
    return r;
  endfunction

endpackage
