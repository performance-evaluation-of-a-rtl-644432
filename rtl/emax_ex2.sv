// emax_ex2: the second arithmetic unit (EX2) of an EMAX processing element.
//
// EX2 follows EX1 in the same PE: its X operand is the EX1 result and its Y
// operand a register slot or the RGI constant. It provides the EX2 column of
// the instruction table, the 64-bit logic operations and/or/xor and the
// 16bit[2] add/sub mauh/msuh, and then an optional arithmetic right shift of
// each signed 16-bit lane (the ">Mn" suffix of the mnemonics, n = sh).
// With sh = 0 the word is left untouched, so FP64 values pass unchanged;
// with sh > 0 the upper 32 bits are cleared. EX2_NOP passes X.
// The encoding of the shift and the 64-bit width of the logic operations are
// this design's choices. Purely combinational.
module emax_ex2
  import emax_pkg::*;
(
  input  ex2_op_e     op,
  input  word_t       x,
  input  word_t       y,
  input  logic [3:0]  sh,
  output word_t       res
);
  word_t r;
  logic [15:0] h, l;

  always_comb begin
    unique case (op)
      EX2_AND:  r = x & y;
      EX2_OR:   r = x | y;
      EX2_XOR:  r = x ^ y;
      EX2_MAUH: r = {32'd0, x[31:16] + y[31:16], x[15:0] + y[15:0]};
      EX2_MSUH: r = {32'd0, x[31:16] - y[31:16], x[15:0] - y[15:0]};
      default:  r = x;
    endcase
    h = 16'($signed(r[31:16]) >>> sh);
    l = 16'($signed(r[15:0]) >>> sh);
    res = (sh == 4'd0) ? r : {32'd0, h, l};
  end
endmodule
