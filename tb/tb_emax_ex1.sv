// tb_emax_ex1: self-checking test of the EX1 unit.
// Random operands are applied to every implemented operation and the result
// is compared with a reference written here: lane arithmetic on 16-bit
// halves, byte saturation for mh2bw, and for the FP64 operations the
// simulator's own IEEE double arithmetic (fma3 = x + (y*z) with the product
// rounded first). Operands of the FP tests stay in the normal range.
module tb_emax_ex1;
  import emax_pkg::*;

  ex1_op_e op;
  word_t   x, y, z, res;
  fhl_e    xf, yf, zf;
  int      checks = 0, failures = 0;

  emax_ex1 dut (.op, .x, .y, .z, .xf, .yf, .zf, .res);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd_real();
    real m;
    int  e;
    m = (real'($urandom) / 4294967296.0) * 2.0 - 1.0;
    e = int'($urandom_range(0, 60)) - 30;
    return m * (2.0 ** e);
  endfunction

  function automatic logic [15:0] h16(input word_t w, input fhl_e f, input bit hi);
    case (f)
      FHL_H:   return hi ? {8'd0, w[31:24]} : {8'd0, w[23:16]};
      FHL_L:   return hi ? {8'd0, w[15:8]}  : {8'd0, w[7:0]};
      default: return hi ? w[31:16] : w[15:0];
    endcase
  endfunction

  function automatic logic [7:0] s8(input logic [15:0] v);
    int sv;
    sv = int'($signed(v));
    if (sv < 0) return 0;
    if (sv > 255) return 255;
    return v[7:0];
  endfunction

  task automatic check(input string what, input word_t exp);
    #1;
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL %s op=%s x=%h y=%h z=%h got %h exp %h", what, op.name(), x, y, z, res, exp);
    end
  endtask

  initial begin
    word_t e;
    logic [15:0] a1, a0, b1, b0, c1, c0, r1, r0;
    real  rx, ry, rz, rt;
    for (int n = 0; n < 300; n++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom}; z = {$urandom, $urandom};
      xf = FHL_F; yf = FHL_F; zf = FHL_F;
      op = EX1_NOP;  check("nop", x);
      op = EX1_ADD;  check("add", {32'd0, x[31:0] + y[31:0]});
      op = EX1_ADD3; check("add3", {32'd0, x[31:0] + y[31:0] + z[31:0]});
      op = EX1_SUB;  check("sub", {32'd0, x[31:0] - y[31:0]});
      op = EX1_SUB3; check("sub3", {32'd0, x[31:0] - y[31:0] - z[31:0]});
      // 16bit[2] with random field selectors
      xf = fhl_e'($urandom_range(0, 2)); yf = fhl_e'($urandom_range(0, 2));
      zf = fhl_e'($urandom_range(0, 2));
      a1 = h16(x, xf, 1); a0 = h16(x, xf, 0);
      b1 = h16(y, yf, 1); b0 = h16(y, yf, 0);
      c1 = h16(z, zf, 1); c0 = h16(z, zf, 0);
      op = EX1_MAUH;  check("mauh",  {32'd0, a1 + b1, a0 + b0});
      op = EX1_MAUH3; check("mauh3", {32'd0, a1 + b1 + c1, a0 + b0 + c0});
      op = EX1_MSUH;  check("msuh",  {32'd0, a1 - b1, a0 - b0});
      op = EX1_MSUH3; check("msuh3", {32'd0, a1 - b1 - c1, a0 - b0 - c0});
      r1 = 16'(int'(a1) * int'(y[8:0])); r0 = 16'(int'(a0) * int'(y[8:0]));
      yf = FHL_F;
      op = EX1_MLUH;  check("mluh",  {32'd0, r1, r0});
      b1 = y[31:16]; b0 = y[15:0];
      op = EX1_MH2BW; check("mh2bw", {32'd0, s8(a1), s8(a0), s8(b1), s8(b0)});
      b1 = h16(y, yf, 1); b0 = h16(y, yf, 0);
      r1 = ($signed(a1) > $signed(b1)) ? a1 : b1; r0 = ($signed(a0) > $signed(b0)) ? a0 : b0;
      op = EX1_MMAX;  check("mmax", {32'd0, r1, r0});
      r1 = ($signed(r1) > $signed(c1)) ? r1 : c1; r0 = ($signed(r0) > $signed(c0)) ? r0 : c0;
      op = EX1_MMAX3; check("mmax3", {32'd0, r1, r0});
      r1 = ($signed(a1) < $signed(b1)) ? a1 : b1; r0 = ($signed(a0) < $signed(b0)) ? a0 : b0;
      op = EX1_MMIN;  check("mmin", {32'd0, r1, r0});
      r1 = ($signed(r1) < $signed(c1)) ? r1 : c1; r0 = ($signed(r0) < $signed(c0)) ? r0 : c0;
      op = EX1_MMIN3; check("mmin3", {32'd0, r1, r0});
      begin
        int v[3], t;
        logic [15:0] md[2];
        for (int l = 0; l < 2; l++) begin
          v[0] = int'($signed(l ? a1 : a0)); v[1] = int'($signed(l ? b1 : b0));
          v[2] = int'($signed(l ? c1 : c0));
          for (int i = 0; i < 2; i++) for (int j = 0; j < 2 - i; j++)
            if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
          md[l] = 16'(v[1]);
        end
        op = EX1_MMID3; check("mmid3", {32'd0, md[1], md[0]});
      end
      // FP64
      xf = FHL_F; yf = FHL_F; zf = FHL_F;
      rx = rnd_real(); ry = rnd_real(); rz = rnd_real();
      x = $realtobits(rx); y = $realtobits(ry); z = $realtobits(rz);
      op = EX1_FMUL; check("fmul", $realtobits(rx * ry));
      op = EX1_FADD; check("fadd", $realtobits(rx + ry));
      rt = ry * rz;
      op = EX1_FMA3; check("fma3", $realtobits(rx + rt));
      // cancellation and close operands
      y = $realtobits(-rx);
      op = EX1_FADD; check("fadd cancel", 64'd0);
      ry = rx * (1.0 + 1.0 / 1048576.0);
      y = $realtobits(-ry);
      op = EX1_FADD; check("fadd close", $realtobits(rx - ry));
    end
    x = $realtobits(3.5); y = 64'd0;
    op = EX1_FMUL; check("fmul zero", 64'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
