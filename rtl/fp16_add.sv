// fp16_add: combinational IEEE-754 binary16 adder.
//
// Both operands are turned into exact fixed-point magnitudes (LSB 2**-24, the
// smallest subnormal), added or subtracted exactly in 42 bits and rounded once
// to nearest-even by cnn_pkg::fp16_round(). Subnormals are handled in full.
// NaN operands and inf + (-inf) give the quiet NaN 0x7E00; an exact zero sum
// of operands with opposite signs is +0.
//
// The accelerator computes in half precision inside the PEs; the adder is
// used for the per-lane accumulation and the final reduction of a vector.
// The document gives no adder design: this exact-then-round structure is a
// choice of this implementation. Purely combinational, no clock.
module fp16_add
  import cnn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t y
);
  logic [41:0] fa, fb, mag;
  logic        sign;

  always_comb begin
    fa = {1'b0, fp16_fix(a)};
    fb = {1'b0, fp16_fix(b)};
    if (a[15] == b[15]) begin
      mag  = fa + fb;
      sign = a[15];
    end else if (fa >= fb) begin
      mag  = fa - fb;
      sign = (fa == fb) ? 1'b0 : a[15];
    end else begin
      mag  = fb - fa;
      sign = b[15];
    end

    if (fp16_is_nan(a) || fp16_is_nan(b))
      y = FP16_QNAN;
    else if (fp16_is_inf(a) && fp16_is_inf(b))
      y = (a[15] == b[15]) ? a : FP16_QNAN;
    else if (fp16_is_inf(a))
      y = a;
    else if (fp16_is_inf(b))
      y = b;
    else
      y = fp16_round(sign, {{(RND_W-42){1'b0}}, mag}, -24);
  end
endmodule
