// fp16_mul: combinational IEEE-754 binary16 multiplier.
//
// The exact product of the two fixed-point magnitudes (LSB 2**-48) is formed in
// 82 bits and rounded once to nearest-even by cnn_pkg::fp16_round(), which
// also produces subnormal results and overflow to infinity. NaN operands and
// infinity times zero give the quiet NaN 0x7E00.
//
// One multiplier sits in each vector lane of a PE. The document names only the
// half-precision format; the structure is this implementation's choice.
// Purely combinational, no clock.
module fp16_mul
  import cnn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);
  logic [81:0] prod;
  logic        sign;
  logic        a_zero, b_zero;

  always_comb begin
    sign   = a[15] ^ b[15];
    a_zero = (a[14:0] == 15'd0);
    b_zero = (b[14:0] == 15'd0);
    prod   = {41'd0, fp16_fix(a)} * {41'd0, fp16_fix(b)};
    if (fp16_is_nan(a) || fp16_is_nan(b))
      y = FP16_QNAN;
    else if ((fp16_is_inf(a) && b_zero) || (fp16_is_inf(b) && a_zero))
      y = FP16_QNAN;
    else if (fp16_is_inf(a) || fp16_is_inf(b))
      y = {sign, FP16_INF[14:0]};
    else
      y = fp16_round(sign, {{(RND_W-82){1'b0}}, prod}, -48);
  end
endmodule
