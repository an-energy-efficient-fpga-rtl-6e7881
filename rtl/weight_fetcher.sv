// weight_fetcher: the kernel that loads the filters of one call into the PE
// chain.
//
// On taking the layer description (with the base word address of the FP32
// weights of this call's first filter in host memory, laid out filter by
// filter as [f][c][ky][kx]) it reads all n filters and sends them to PE0 as
// FP16 vectors in the order the PEs consume them: for each filter, for each
// tap (ky, kx), for each group of VEC channels, one vector holding VEC
// consecutive channels of that tap. When the channel count is not a multiple
// of VEC the missing lanes are zeros, which forms the extra zero ("fake")
// channel of every filter. PE0 keeps the first filter and passes on the rest.
// Which filters of a layer a call loads is chosen by the host through the
// base address, as in the document.
//
// Timing: one lane per cycle, one vector every VEC cycles at best; the
// weights of all n filters are sent before the fetcher is ready for the next
// call.
module weight_fetcher
  import cnn_pkg::*;
#(
  parameter int VEC       = 8,
  parameter int RSP_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,
  output logic              cfg_ready,
  input  cu_cfg_t           cfg,
  input  logic [31:0]       base,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [31:0]       mem_req_addr,
  input  logic              mem_rsp_valid,
  input  fp32_t             mem_rsp_data,
  output logic              w_valid,
  input  logic              w_ready,
  output logic [VEC*16-1:0] w_data
);
  cu_cfg_t     l;
  logic        busy;
  logic [31:0] base_q;
  logic [15:0] f, cg, cgs, lane;
  logic [7:0]  ky, kx;
  logic        d_ready, d_zero;
  logic [31:0] d_addr;
  logic        w_l, w_cg, w_kx, w_ky, w_f;
  int          c;

  assign cfg_ready = !busy;

  always_comb begin
    c      = int'(cg) * VEC + int'(lane);
    d_zero = (c >= int'(l.c));
    d_addr = d_zero ? 32'd0
           : 32'(((int'(f) * int'(l.c) + c) * int'(l.size) + int'(ky))
                 * int'(l.size) + int'(kx));
    w_l    = (lane == 16'(VEC - 1));
    w_cg   = w_l  && (cg == cgs - 16'd1);
    w_kx   = w_cg && (kx == l.size - 8'd1);
    w_ky   = w_kx && (ky == l.size - 8'd1);
    w_f    = w_ky && (f == l.n - 16'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      l      <= '0;
      base_q <= '0;
      cgs    <= '0;
      f      <= '0;
      ky     <= '0;
      kx     <= '0;
      cg     <= '0;
      lane   <= '0;
    end else if (!busy) begin
      if (cfg_valid) begin
        l      <= cfg;
        base_q <= base;
        cgs    <= chan_groups(cfg.c, VEC);
        f      <= '0;
        ky     <= '0;
        kx     <= '0;
        cg     <= '0;
        lane   <= '0;
        busy   <= 1'b1;
      end
    end else if (d_ready) begin
      lane <= w_l ? '0 : lane + 16'd1;
      if (w_l)  cg <= w_cg ? '0 : cg + 16'd1;
      if (w_cg) kx <= w_kx ? '0 : kx + 8'd1;
      if (w_kx) ky <= w_ky ? '0 : ky + 8'd1;
      if (w_ky) f  <= w_f  ? '0 : f + 16'd1;
      if (w_f)  busy <= 1'b0;
    end
  end

  vec_gather #(.VEC(VEC), .RSP_DEPTH(RSP_DEPTH)) u_gather (
    .clk, .rst_n, .base(base_q),
    .d_valid(busy), .d_ready, .d_zero, .d_addr,
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_rsp_valid, .mem_rsp_data,
    .v_valid(w_valid), .v_ready(w_ready), .v_data(w_data));
endmodule
