// fp64_add: combinational IEEE-754 double-precision adder for the
// floating-point operations of EX1 (fadd, and the sum of fma3).
//
// The operand of larger magnitude is kept, the other is aligned to it with
// guard, round and sticky bits, the two are added or subtracted, the result
// is renormalised and rounded to nearest, ties to even. Subnormal inputs and
// results are flushed to signed zero, overflow gives infinity, an exact
// cancellation gives +0, NaN inputs or inf-inf give the default quiet NaN.
// These choices are this design's; the document names the operation only.
// Purely combinational.
module fp64_add (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);
  logic        sa, sb, sbig;
  logic [10:0] ea, eb, ebig, esml;
  logic [51:0] fa, fb, fbig, fsml;
  logic        za, zb, ia, ib, na, nb, sub;
  logic [11:0] d;
  logic [55:0] big, sml, shf, mask;
  logic        sticky;
  logic [56:0] sum;
  logic [5:0]  lz;
  logic        found;
  logic signed [13:0] ex;
  logic [52:0] mant;
  logic        g, rs, inc;
  logic [53:0] mr;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    za = (ea == 11'd0);
    zb = (eb == 11'd0);
    ia = (ea == 11'h7ff) && (fa == 52'd0);
    ib = (eb == 11'h7ff) && (fb == 52'd0);
    na = (ea == 11'h7ff) && (fa != 52'd0);
    nb = (eb == 11'h7ff) && (fb != 52'd0);
    sub = sa ^ sb;
    if ({ea, fa} >= {eb, fb}) begin
      sbig = sa; ebig = ea; fbig = fa; esml = eb; fsml = fb;
    end else begin
      sbig = sb; ebig = eb; fbig = fb; esml = ea; fsml = fa;
    end
    mask = '0;
    sum  = '0;
    d   = {1'b0, ebig} - {1'b0, esml};
    big = {1'b1, fbig, 3'b000};
    sml = {1'b1, fsml, 3'b000};
    if (d >= 12'd56) begin
      shf    = 56'd0;
      sticky = 1'b1;
    end else begin
      shf    = sml >> d[5:0];
      mask   = (56'd1 << d[5:0]) - 56'd1;
      sticky = |(sml & mask);
    end
    shf[0] = shf[0] | sticky;
    if (sub) sum = {1'b0, big} - {1'b0, shf};
    else     sum = {1'b0, big} + {1'b0, shf};
    ex = $signed({3'b000, ebig});
    if (sum[56]) begin
      sum = {1'b0, sum[56:2], sum[1] | sum[0]};
      ex  = ex + 14'sd1;
    end
    // leading-zero count of sum[55:0] by halving steps
    lz = 6'd0;
    found = (sum[55:0] != 56'd0);
    if (sum[55:24] == 32'd0) begin lz[5] = 1'b1; sum = sum << 32; end
    if (sum[55:40] == 16'd0) begin lz[4] = 1'b1; sum = sum << 16; end
    if (sum[55:48] == 8'd0)  begin lz[3] = 1'b1; sum = sum << 8;  end
    if (sum[55:52] == 4'd0)  begin lz[2] = 1'b1; sum = sum << 4;  end
    if (sum[55:54] == 2'd0)  begin lz[1] = 1'b1; sum = sum << 2;  end
    if (sum[55] == 1'b0)     begin lz[0] = 1'b1; sum = sum << 1;  end
    ex  = ex - $signed({8'd0, lz});
    mant = sum[55:3];
    g    = sum[2];
    rs   = sum[1] | sum[0];
    inc  = g & (rs | mant[0]);
    mr   = {1'b0, mant} + {53'd0, inc};
    if (mr[53]) begin
      mr = mr >> 1;
      ex = ex + 14'sd1;
    end
    if (na || nb || (ia && ib && sub))
      y = 64'h7ff8_0000_0000_0000;
    else if (ia)
      y = {sa, 11'h7ff, 52'd0};
    else if (ib)
      y = {sb, 11'h7ff, 52'd0};
    else if (za && zb)
      y = {sa & sb, 63'd0};
    else if (za)
      y = b;
    else if (zb)
      y = a;
    else if (!found || ex <= 14'sd0)
      y = 64'd0;
    else if (ex >= 14'sd2047)
      y = {sbig, 11'h7ff, 52'd0};
    else
      y = {sbig, ex[10:0], mr[51:0]};
  end
endmodule
