// tb_emax_ex2: self-checking test of the EX2 unit: 64-bit and/or/xor,
// 16bit[2] add/sub and the per-lane arithmetic right shift, against
// references computed lane by lane here.
module tb_emax_ex2;
  import emax_pkg::*;

  ex2_op_e    op;
  word_t      x, y, res, r;
  logic [3:0] sh;
  int checks = 0, failures = 0;

  emax_ex2 dut (.op, .x, .y, .sh, .res);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t shifted(input word_t v, input logic [3:0] s);
    int h, l;
    if (s == 0) return v;
    h = int'($signed(v[31:16])) >>> s;
    l = int'($signed(v[15:0])) >>> s;
    return {32'd0, 16'(h), 16'(l)};
  endfunction

  task automatic check(input word_t exp);
    #1;
    checks++;
    if (res !== exp) begin
      failures++;
      $display("FAIL op=%s sh=%0d x=%h y=%h got %h exp %h", op.name(), sh, x, y, res, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      sh = (n % 3 == 0) ? 4'd0 : 4'($urandom_range(1, 15));
      op = EX2_NOP;  check(shifted(x, sh));
      op = EX2_AND;  check(shifted(x & y, sh));
      op = EX2_OR;   check(shifted(x | y, sh));
      op = EX2_XOR;  check(shifted(x ^ y, sh));
      r = {32'd0, 16'(x[31:16] + y[31:16]), 16'(x[15:0] + y[15:0])};
      op = EX2_MAUH; check(shifted(r, sh));
      r = {32'd0, 16'(x[31:16] - y[31:16]), 16'(x[15:0] - y[15:0])};
      op = EX2_MSUH; check(shifted(r, sh));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
