// emax_ex1: the first arithmetic unit (EX1) of an EMAX processing element.
//
// EX1 applies one operation, chosen by the PE's instruction, to up to three
// operands X, Y and Z taken from the register slots flowing down the array or
// from the RGI constant. The operation set follows the EX1 column of the
// instruction table: 32-bit add/add3/sub/sub3; 16bit[2] SIMD mauh/mauh3/
// msuh/msuh3, mluh (each 16-bit lane of X times the 9-bit Y), mh2bw (four
// lanes saturated to 0..255 and packed to bytes), max/min/median; and FP64
// fmul, fadd and fma3 (X + Y*Z).
//
// Before a 16bit[2] operation each operand goes through its {f,h,l} field
// selector: f keeps the word, h spreads byte3/byte2 into the high/low 16-bit
// lanes and l does the same with byte1/byte0. 32-bit and 16bit[2] results are
// zero-extended to 64 bits. fma3 rounds the product before the sum (two
// roundings); misc operations whose behaviour is not defined (mmrg3, msad,
// minl, minl3, mcas) are not provided. EX1_NOP passes X through.
// Purely combinational: the PE registers the result.
module emax_ex1
  import emax_pkg::*;
(
  input  ex1_op_e     op,
  input  word_t       x,
  input  word_t       y,
  input  word_t       z,
  input  fhl_e        xf,
  input  fhl_e        yf,
  input  fhl_e        zf,
  output word_t       res
);
  function automatic word_t fhl_sel(input word_t w, input fhl_e f);
    unique case (f)
      FHL_H:   return {32'd0, 8'd0, w[31:24], 8'd0, w[23:16]};
      FHL_L:   return {32'd0, 8'd0, w[15:8], 8'd0, w[7:0]};
      default: return w;
    endcase
  endfunction

  function automatic logic [7:0] sat8(input logic [15:0] v);
    if (v[15])            return 8'h00;
    else if (v > 16'd255) return 8'hff;
    else                  return v[7:0];
  endfunction

  word_t xe, ye, ze;
  word_t mul_a, mul_y, fadd_a, fadd_b, fadd_y;
  logic [15:0] xh, xl, yh, yl, zh, zl;
  logic [31:0] r32;
  logic [15:0] rh, rl;
  // per-lane compare results, lane 1 = high 16 bits, lane 0 = low 16 bits
  logic [15:0] la [2], lb [2], lc [2], mx2 [2], mn2 [2], mx3 [2], mn3 [2], md3 [2];

  always_comb begin
    la[1] = xh; la[0] = xl;
    lb[1] = yh; lb[0] = yl;
    lc[1] = zh; lc[0] = zl;
    for (int i = 0; i < 2; i++) begin
      mx2[i] = ($signed(la[i]) > $signed(lb[i])) ? la[i] : lb[i];
      mn2[i] = ($signed(la[i]) < $signed(lb[i])) ? la[i] : lb[i];
      mx3[i] = ($signed(mx2[i]) > $signed(lc[i])) ? mx2[i] : lc[i];
      mn3[i] = ($signed(mn2[i]) < $signed(lc[i])) ? mn2[i] : lc[i];
      // median = max(min(a,b), min(max(a,b), c))
      md3[i] = ($signed(mx2[i]) < $signed(lc[i])) ? mx2[i] : lc[i];
      md3[i] = ($signed(mn2[i]) > $signed(md3[i])) ? mn2[i] : md3[i];
    end
  end

  // one multiplier serves fmul (X*Y) and fma3 (Y*Z)
  fp64_mul u_mul (.a(mul_a), .b(y), .y(mul_y));
  fp64_add u_add (.a(fadd_a), .b(fadd_b), .y(fadd_y));

  always_comb begin
    mul_a  = (op == EX1_FMA3) ? z : x;
    fadd_a = x;
    fadd_b = (op == EX1_FMA3) ? mul_y : y;
  end

  always_comb begin
    xe = fhl_sel(x, xf);
    ye = fhl_sel(y, yf);
    ze = fhl_sel(z, zf);
    {xh, xl} = xe[31:0];
    {yh, yl} = ye[31:0];
    {zh, zl} = ze[31:0];
    rh  = 16'd0;
    rl  = 16'd0;
    r32 = 32'd0;
    res = x;
    unique case (op)
      EX1_ADD:   res = {32'd0, x[31:0] + y[31:0]};
      EX1_ADD3:  res = {32'd0, x[31:0] + y[31:0] + z[31:0]};
      EX1_SUB:   res = {32'd0, x[31:0] - y[31:0]};
      EX1_SUB3:  res = {32'd0, x[31:0] - y[31:0] - z[31:0]};
      EX1_MAUH, EX1_MAUH3, EX1_MSUH, EX1_MSUH3, EX1_MLUH,
      EX1_MMAX, EX1_MMAX3, EX1_MMIN, EX1_MMIN3, EX1_MMID3: begin
        unique case (op)
          EX1_MAUH:  begin rh = xh + yh;      rl = xl + yl;      end
          EX1_MAUH3: begin rh = xh + yh + zh; rl = xl + yl + zl; end
          EX1_MSUH:  begin rh = xh - yh;      rl = xl - yl;      end
          EX1_MSUH3: begin rh = xh - yh - zh; rl = xl - yl - zl; end
          EX1_MLUH:  begin
            rh = 16'(xh * {7'd0, ye[8:0]});
            rl = 16'(xl * {7'd0, ye[8:0]});
          end
          EX1_MMAX:  begin rh = mx2[1]; rl = mx2[0]; end
          EX1_MMAX3: begin rh = mx3[1]; rl = mx3[0]; end
          EX1_MMIN:  begin rh = mn2[1]; rl = mn2[0]; end
          EX1_MMIN3: begin rh = mn3[1]; rl = mn3[0]; end
          default:   begin rh = md3[1]; rl = md3[0]; end
        endcase
        res = {32'd0, rh, rl};
      end
      EX1_MH2BW: begin
        r32 = {sat8(xh), sat8(xl), sat8(yh), sat8(yl)};
        res = {32'd0, r32};
      end
      EX1_FMUL:  res = mul_y;
      EX1_FADD, EX1_FMA3: res = fadd_y;
      default:   res = x;
    endcase
  end
endmodule
