// fp32_to_fp16: combinational IEEE-754 binary32 to binary16 conversion.
//
// The input and weight data arrive from the host in single precision and are
// narrowed once, before they enter the PE chain, so that every PE works in
// half precision. Rounding is to nearest-even (cnn_pkg::fp16_round()); values
// too large become infinity, values below half the smallest subnormal become
// signed zero, NaN becomes the quiet NaN 0x7E00. The rounding mode is this
// implementation's choice; the document only states that the conversion
// happens before the PEs. Purely combinational, no clock.
module fp32_to_fp16
  import cnn_pkg::*;
(
  input  fp32_t a,
  output fp16_t y
);
  always_comb begin
    if (a[30:23] == 8'hFF)
      y = (a[22:0] != 23'd0) ? FP16_QNAN : {a[31], FP16_INF[14:0]};
    else if (a[30:23] == 8'h00)
      y = {a[31], 15'd0};  // binary32 subnormals are far below binary16 range
    else
      y = fp16_round(a[31], {{(RND_W-24){1'b0}}, 1'b1, a[22:0]},
                     int'(a[30:23]) - 150);
  end
endmodule
