// fp64_mul: combinational IEEE-754 double-precision multiplier for the
// floating-point operations of EX1 (fmul, and the product of fma3).
//
// Both significands (with hidden bit) are multiplied into a 106-bit product,
// normalised by at most one place and rounded to nearest, ties to even.
// Subnormal inputs and results are flushed to signed zero; overflow gives
// infinity; NaN inputs, or infinity times zero, give the default quiet NaN.
// The document names the operation only; the rounding and the handling of
// special values are this design's choices. Purely combinational.
module fp64_mul (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  logic        sa, sb, sy;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        za, zb, ia, ib, na, nb;
  logic [105:0] prod;
  logic [52:0] mant;
  logic        g, st, inc;
  logic [53:0] mr;
  logic signed [13:0] ex;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy = sa ^ sb;
    za = (ea == 11'd0);
    zb = (eb == 11'd0);
    ia = (ea == 11'h7ff) && (fa == 52'd0);
    ib = (eb == 11'h7ff) && (fb == 52'd0);
    na = (ea == 11'h7ff) && (fa != 52'd0);
    nb = (eb == 11'h7ff) && (fb != 52'd0);
    prod = {1'b1, fa} * {1'b1, fb};
    ex = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 14'sd1023;
    if (prod[105]) begin
      mant = prod[105:53];
      g    = prod[52];
      st   = |prod[51:0];
      ex   = ex + 14'sd1;
    end else begin
      mant = prod[104:52];
      g    = prod[51];
      st   = |prod[50:0];
    end
    inc = g & (st | mant[0]);
    mr  = {1'b0, mant} + {53'd0, inc};
    if (mr[53]) begin
      mr = mr >> 1;
      ex = ex + 14'sd1;
    end
    if (na || nb || (ia && zb) || (ib && za))
      y = 64'h7ff8_0000_0000_0000;
    else if (ia || ib)
      y = {sy, 11'h7ff, 52'd0};
    else if (za || zb || ex <= 14'sd0)
      y = {sy, 63'd0};
    else if (ex >= 14'sd2047)
      y = {sy, 11'h7ff, 52'd0};
    else
      y = {sy, ex[10:0], mr[51:0]};
  end
endmodule
