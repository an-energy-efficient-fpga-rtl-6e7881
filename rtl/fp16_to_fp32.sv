// fp16_to_fp32: combinational IEEE-754 binary16 to binary32 conversion.
//
// Used by the output writer to widen the PE results back to the single
// precision the host works in. The conversion is exact: binary16 subnormals
// are normalised, infinities keep their sign and NaNs keep their payload
// (shifted into the top of the binary32 fraction, quiet bit set).
// Purely combinational, no clock.
module fp16_to_fp32
  import cnn_pkg::*;
(
  input  fp16_t a,
  output fp32_t y
);
  logic [4:0] e;
  logic [9:0] f;
  int         p;
  logic [22:0] frac;

  always_comb begin
    e    = a[14:10];
    f    = a[9:0];
    p    = 0;
    frac = '0;
    for (int i = 0; i < 10; i++)
      if (f[i]) p = i;
    if (e == 5'h1F)
      y = (f != 10'd0) ? {a[15], 8'hFF, 1'b1, f[8:0], 13'd0} : {a[15], 8'hFF, 23'd0};
    else if (e != 5'd0)
      y = {a[15], 8'(int'(e) + 112), f, 13'd0};
    else if (f == 10'd0)
      y = {a[15], 31'd0};
    else begin
      // value = f * 2**-24 = 1.xxx * 2**(p-24)
      frac = 23'({13'd0, f} << (23 - p));
      y    = {a[15], 8'(p + 103), frac};
    end
  end
endmodule
