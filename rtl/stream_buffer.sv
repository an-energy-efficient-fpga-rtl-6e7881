// stream_buffer: generates, element by element, the part of the input feature
// map that the PEs need for each step of their dot products, so that no PE
// ever stores the input map.
//
// For every output pixel (oy, ox), every filter tap (ky, kx) and every group
// of VEC channels cg it emits VEC lane descriptors, lane l standing for input
// channel c = cg*VEC + l at row oy*stride + ky - pad and column
// ox*stride + kx - pad, pad = size/2. A descriptor is either an element
// offset into the planar input map, (c*h + row)*w + col, or a zero lane: the
// lane is a padding channel added to fill the last vector (c >= channels) or
// the tap falls into the zero border around the map. Loop order, outermost
// first: oy, ox, ky, kx, cg, l. The channel-interleaved order (VEC channels
// of one position per vector) and the zero padding channel follow the
// document; the zero border is generated here instead of being stored.
//
// Timing: a cfg is taken (cfg_valid && cfg_ready) while idle; from the next
// cycle one descriptor is offered per cycle and advances on d_valid &&
// d_ready. cfg_ready returns high in the cycle after the last descriptor.
module stream_buffer
  import cnn_pkg::*;
#(
  parameter int VEC = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_valid,
  output logic        cfg_ready,
  input  cu_cfg_t     cfg,
  output logic        d_valid,
  input  logic        d_ready,
  output logic        d_zero,
  output logic [31:0] d_addr,
  output logic        d_last      // last descriptor of the whole map
);
  cu_cfg_t     l;
  logic        busy;
  logic [15:0] oh, ow, cgs;
  logic [15:0] oy, ox, cg;
  logic [7:0]  ky, kx;
  logic [15:0] lane;
  logic        w_l, w_cg, w_kx, w_ky, w_ox, w_oy;
  int          c, row, col, pad;

  assign cfg_ready = !busy;
  assign d_valid   = busy;

  always_comb begin
    pad    = int'(l.size) / 2;
    c      = int'(cg) * VEC + int'(lane);
    row    = int'(oy) * int'(l.stride) + int'(ky) - pad;
    col    = int'(ox) * int'(l.stride) + int'(kx) - pad;
    d_zero = (c >= int'(l.c)) || (row < 0) || (row >= int'(l.h))
          || (col < 0) || (col >= int'(l.w));
    d_addr = d_zero ? 32'd0
                    : 32'((c * int'(l.h) + row) * int'(l.w) + col);
    w_l    = (lane == 16'(VEC - 1));
    w_cg   = w_l  && (cg == cgs - 16'd1);
    w_kx   = w_cg && (kx == l.size - 8'd1);
    w_ky   = w_kx && (ky == l.size - 8'd1);
    w_ox   = w_ky && (ox == ow - 16'd1);
    w_oy   = w_ox && (oy == oh - 16'd1);
    d_last = w_oy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      l    <= '0;
      oh   <= '0;
      ow   <= '0;
      cgs  <= '0;
      oy   <= '0;
      ox   <= '0;
      ky   <= '0;
      kx   <= '0;
      cg   <= '0;
      lane <= '0;
    end else if (!busy) begin
      if (cfg_valid) begin
        l    <= cfg;
        oh   <= out_dim(cfg.h, cfg.size, cfg.stride);
        ow   <= out_dim(cfg.w, cfg.size, cfg.stride);
        cgs  <= chan_groups(cfg.c, VEC);
        oy   <= '0;
        ox   <= '0;
        ky   <= '0;
        kx   <= '0;
        cg   <= '0;
        lane <= '0;
        busy <= 1'b1;
      end
    end else if (d_ready) begin
      lane <= w_l ? '0 : lane + 16'd1;
      if (w_l)  cg <= w_cg ? '0 : cg + 16'd1;
      if (w_cg) kx <= w_kx ? '0 : kx + 8'd1;
      if (w_kx) ky <= w_ky ? '0 : ky + 8'd1;
      if (w_ky) ox <= w_ox ? '0 : ox + 16'd1;
      if (w_ox) oy <= w_oy ? '0 : oy + 16'd1;
      if (w_oy) busy <= 1'b0;
    end
  end
endmodule
