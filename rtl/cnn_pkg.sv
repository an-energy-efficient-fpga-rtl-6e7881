// cnn_pkg: types, constants and floating-point helper functions shared by the
// convolution accelerator.
//
// The layer descriptor (cu_cfg_t) is the 10-byte record that the control unit
// hands to every kernel: input width, height and channel count, the number of
// filters of this call (16 bits each) and the filter size and stride (8 bits
// each). Output size and padding are not stored, they are derived from it
// (pad = size/2, out = (in + 2*pad - size)/stride + 1), as in the reference
// software framework.
//
// fp16_round() is the single rounding routine of the design. It takes an exact
// unsigned magnitude MAG worth MAG * 2**LSB_EXP and returns the nearest IEEE-754
// binary16 value (round to nearest, ties to even), with subnormal results and
// overflow to infinity. The FP16 adder, multiplier and the FP32->FP16
// converter all reduce their exact intermediate result to such a magnitude and
// call it, so that every unit rounds the same way.
package cnn_pkg;

  typedef logic [15:0] fp16_t;
  typedef logic [31:0] fp32_t;

  localparam fp16_t FP16_QNAN = 16'h7E00;
  localparam fp16_t FP16_INF  = 16'h7C00;

  // Layer descriptor: 2+2+2+2+1+1 = 10 bytes.
  typedef struct packed {
    logic [15:0] w;       // input feature map width
    logic [15:0] h;       // input feature map height
    logic [15:0] c;       // input channels
    logic [15:0] n;       // filters applied in this call (<= number of PEs)
    logic [7:0]  size;    // filter is size x size x c
    logic [7:0]  stride;  // convolution stride
  } cu_cfg_t;

  localparam int CFG_BITS = $bits(cu_cfg_t);

  localparam int RND_W = 96;  // width of the magnitude fed to fp16_round()

  // Round MAG * 2**LSB_EXP to binary16 with sign SIGN.
  function automatic fp16_t fp16_round(input logic sign,
                                       input logic [RND_W-1:0] mag,
                                       input int lsb_exp);
    int msb;          // position of the leading one
    int e;            // unbiased exponent of the leading one
    int q;            // exponent of the binary16 quantum at this magnitude
    int drop;         // bits of MAG below the quantum
    logic [RND_W-1:0] kept;
    logic rnd, sticky;
    int ef;
    fp16_t r;
    msb = -1;
    for (int i = 0; i < RND_W; i++)
      if (mag[i]) msb = i;
    if (msb < 0) begin
      r = {sign, 15'd0};
    end else begin
      e = msb + lsb_exp;
      q = (e - 10 > -24) ? e - 10 : -24;
      drop = q - lsb_exp;
      if (drop <= 0) begin
        // exact: the value already sits on the quantum grid
        kept   = mag << (-drop);
        rnd    = 1'b0;
        sticky = 1'b0;
      end else if (drop > RND_W) begin
        kept   = '0;
        rnd    = 1'b0;
        sticky = 1'b1;
      end else begin
        kept   = mag >> drop;
        rnd    = mag[drop-1];
        sticky = 1'b0;
        for (int i = 0; i < RND_W; i++)
          if (i < drop - 1 && mag[i]) sticky = 1'b1;
      end
      if (rnd && (sticky || kept[0])) kept = kept + 1'b1;
      if (kept >= 96'd2048) begin
        kept = kept >> 1;
        q = q + 1;
      end
      if (kept >= 96'd1024) begin
        ef = q + 25;
        if (ef >= 31) r = {sign, FP16_INF[14:0]};
        else          r = {sign, ef[4:0], kept[9:0]};
      end else begin
        r = {sign, 5'd0, kept[9:0]};
      end
    end
    return r;
  endfunction

  // Exact fixed-point magnitude of a finite binary16 value, LSB = 2**-24.
  function automatic logic [40:0] fp16_fix(input fp16_t a);
    logic [10:0] m;
    m = (a[14:10] == 5'd0) ? {1'b0, a[9:0]} : {1'b1, a[9:0]};
    if (a[14:10] == 5'd0) return {30'd0, m};
    return {30'd0, m} << (a[14:10] - 5'd1);
  endfunction

  function automatic logic fp16_is_nan(input fp16_t a);
    return (a[14:10] == 5'h1F) && (a[9:0] != 10'd0);
  endfunction

  function automatic logic fp16_is_inf(input fp16_t a);
    return (a[14:10] == 5'h1F) && (a[9:0] == 10'd0);
  endfunction

  // Number of VEC-wide channel groups needed for C channels (ceil(C/VEC)).
  function automatic logic [15:0] chan_groups(input logic [15:0] c, input int vec);
    return 16'((32'(c) + vec - 1) / vec);
  endfunction

  // Output size along one axis: (in + 2*pad - size)/stride + 1, pad = size/2.
  function automatic logic [15:0] out_dim(input logic [15:0] in_dim,
                                          input logic [7:0] size,
                                          input logic [7:0] stride);
    int span;
    span = int'(in_dim) + 2 * (int'(size) / 2) - int'(size);
    if (stride == 8'd0 || span < 0) return 16'd0;
    return 16'(span / int'(stride) + 1);
  endfunction

endpackage
