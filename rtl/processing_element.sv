// processing_element: one link of the PE daisy chain. PE number ID computes
// output feature map ID of the call, i.e. the dot products of filter ID with
// every window of the input map.
//
// Three streams pass through every PE, each on blocking valid/ready channels:
//  * control: the layer description arrives on ctrl_in, is kept, and is
//    passed on to the next PE on ctrl_out;
//  * weights: of the n filters that arrive on w_in the PE keeps the first
//    (flen = size*size*ceil(c/VEC) vectors, stored in a weight memory) and
//    passes the remaining ones on to w_out;
//  * input: every input vector is read from x_in and, unless this is the last
//    PE, written on to x_out in the same cycle; an input vector is consumed
//    only when the next PE's channel has room.
// With each input vector the PE multiplies its VEC lanes by the matching
// weight vector and adds the products into VEC lane accumulators (FP16).
// After flen vectors the accumulators are reduced by a pairwise adder tree,
// ((l0+l1)+(l2+l3))+..., to one FP16 result and cleared.
//
// Results travel down the same chain: for every output pixel the PE first
// passes on the ID results of the PEs before it (r_in to r_out) and then
// sends its own, so the last PE delivers, per pixel, the results of filters
// 0, 1, ..., n-1 in that order. A PE whose ID is not below n has no filter in
// this call: it computes nothing and only passes input vectors and results
// on. The PE returns to wait for the next control word when its weights,
// inputs and results of the call have all been handled.
//
// Timing: one input vector per cycle when the channels allow; the product,
// accumulation and, on the last vector of a window, the reduction are
// combinational and the result enters a two-entry result FIFO at the clock
// edge. The structure (filter per PE, daisy-chained inputs, weights, control
// and results, VEC-lane accumulation with a final reduction) follows the
// document; the accumulation order, the tree shape and the channel depths
// are this implementation's choice.
module processing_element
  import cnn_pkg::*;
#(
  parameter int NUM_PE = 32,
  parameter int ID     = 0,
  parameter int VEC    = 8,
  parameter int WDEPTH = 576
) (
  input  logic              clk,
  input  logic              rst_n,
  // control chain
  input  logic              ctrl_in_valid,
  output logic              ctrl_in_ready,
  input  cu_cfg_t           ctrl_in,
  output logic              ctrl_out_valid,
  input  logic              ctrl_out_ready,
  output cu_cfg_t           ctrl_out,
  // weight chain
  input  logic              w_in_valid,
  output logic              w_in_ready,
  input  logic [VEC*16-1:0] w_in,
  output logic              w_out_valid,
  input  logic              w_out_ready,
  output logic [VEC*16-1:0] w_out,
  // input-map chain
  input  logic              x_in_valid,
  output logic              x_in_ready,
  input  logic [VEC*16-1:0] x_in,
  output logic              x_out_valid,
  input  logic              x_out_ready,
  output logic [VEC*16-1:0] x_out,
  // result chain
  input  logic              r_in_valid,
  output logic              r_in_ready,
  input  fp16_t             r_in,
  output logic              r_out_valid,
  input  logic              r_out_ready,
  output fp16_t             r_out,
  // activity, for monitoring
  output logic              busy
);
  localparam bit LAST = (ID == NUM_PE - 1);
  localparam int WAW  = (WDEPTH > 1) ? $clog2(WDEPTH) : 1;

  logic [VEC*16-1:0] wmem [WDEPTH];

  // call state
  logic        active;          // this PE has a filter in the call
  logic [31:0] flen;            // vectors per filter
  logic [31:0] w_total;         // weight vectors still to receive
  logic [31:0] w_seen;          // weight vectors received
  logic [31:0] x_left;          // input vectors still to consume
  logic [31:0] r_left;          // results still to send on r_out
  logic [WAW-1:0] kidx;         // position inside the current window
  logic [31:0] fcnt;            // results already sent for the current pixel

  // ---------------------------------------------------------------- control
  logic take_ctrl;
  logic [15:0] oh, ow;
  logic [31:0] npix, fl;
  assign ctrl_in_ready  = !busy && (LAST || ctrl_out_ready);
  assign ctrl_out_valid = !LAST && ctrl_in_valid && !busy;
  assign ctrl_out       = ctrl_in;
  assign take_ctrl      = ctrl_in_valid && ctrl_in_ready;

  always_comb begin
    oh   = out_dim(ctrl_in.h, ctrl_in.size, ctrl_in.stride);
    ow   = out_dim(ctrl_in.w, ctrl_in.size, ctrl_in.stride);
    npix = 32'(oh) * 32'(ow);
    fl   = 32'(ctrl_in.size) * 32'(ctrl_in.size)
         * 32'(chan_groups(ctrl_in.c, VEC));
  end

  // ---------------------------------------------------------------- weights
  logic w_keep, w_take;
  assign w_keep      = active && (w_seen < flen);
  assign w_in_ready  = busy && (w_total != 0) && (w_keep || LAST || w_out_ready);
  assign w_out_valid = !LAST && busy && (w_total != 0) && !w_keep && w_in_valid;
  assign w_out       = w_in;
  assign w_take      = w_in_valid && w_in_ready;

  always_ff @(posedge clk)
    if (w_take && w_keep) wmem[WAW'(w_seen)] <= w_in;

  // ---------------------------------------------------------------- compute
  logic        w_loaded, last_vec, res_ready, x_take, res_push;
  fp16_t       acc   [VEC];
  fp16_t       prod  [VEC];
  fp16_t       accn  [VEC];
  fp16_t       node  [2*VEC-1];
  logic [VEC*16-1:0] wv;

  assign w_loaded    = !active || (w_seen >= flen);
  assign last_vec    = (32'(kidx) == flen - 1);
  assign x_in_ready  = busy && (x_left != 0) && w_loaded
                    && (LAST || x_out_ready)
                    && (!active || !last_vec || res_ready);
  assign x_out_valid = !LAST && busy && (x_left != 0) && w_loaded && x_in_valid
                    && (!active || !last_vec || res_ready);
  assign x_out       = x_in;
  assign x_take      = x_in_valid && x_in_ready;
  assign res_push    = x_take && active && last_vec;
  assign wv          = wmem[kidx];

  for (genvar i = 0; i < VEC; i++) begin : g_lane
    fp16_mul u_mul (.a(x_in[16*i +: 16]), .b(wv[16*i +: 16]), .y(prod[i]));
    fp16_add u_acc (.a(acc[i]), .b(prod[i]), .y(accn[i]));
    assign node[VEC-1+i] = accn[i];
  end
  for (genvar i = 0; i < VEC - 1; i++) begin : g_tree
    fp16_add u_red (.a(node[2*i+1]), .b(node[2*i+2]), .y(node[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kidx <= '0;
      for (int i = 0; i < VEC; i++) acc[i] <= 16'h0000;
    end else if (take_ctrl) begin
      kidx <= '0;
      for (int i = 0; i < VEC; i++) acc[i] <= 16'h0000;
    end else if (x_take) begin
      if (last_vec) begin
        kidx <= '0;
        for (int i = 0; i < VEC; i++) acc[i] <= 16'h0000;
      end else begin
        kidx <= kidx + 1'b1;
        for (int i = 0; i < VEC; i++) acc[i] <= accn[i];
      end
    end
  end

  // ---------------------------------------------------------------- results
  logic  res_valid, res_pop, fwd_phase;
  fp16_t res_data;

  chan_fifo #(.W(16), .DEPTH(2)) u_res (
    .clk, .rst_n,
    .in_valid(res_push), .in_ready(res_ready), .in_data(node[0]),
    .out_valid(res_valid), .out_ready(res_pop), .out_data(res_data));

  // Active PE: per pixel, ID results from upstream, then its own.
  // Inactive PE: everything from upstream.
  assign fwd_phase   = !active || (fcnt < 32'(ID));
  assign r_out_valid = busy && (r_left != 0) && (fwd_phase ? r_in_valid : res_valid);
  assign r_out       = fwd_phase ? r_in : res_data;
  assign r_in_ready  = busy && (r_left != 0) && fwd_phase && r_out_ready;
  assign res_pop     = busy && (r_left != 0) && !fwd_phase && r_out_ready;

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      active  <= 1'b0;
      flen    <= '0;
      w_total <= '0;
      w_seen  <= '0;
      x_left  <= '0;
      r_left  <= '0;
      fcnt    <= '0;
    end else if (!busy) begin
      if (take_ctrl) begin
        busy    <= 1'b1;
        active  <= (32'(ID) < 32'(ctrl_in.n));
        flen    <= fl;
        w_total <= (32'(ID) < 32'(ctrl_in.n)) ? (32'(ctrl_in.n) - 32'(ID)) * fl : 32'd0;
        w_seen  <= '0;
        x_left  <= npix * fl;
        r_left  <= npix * ((32'(ID) < 32'(ctrl_in.n)) ? 32'(ID) + 1 : 32'(ctrl_in.n));
        fcnt    <= '0;
      end
    end else begin
      if (w_take) begin
        w_total <= w_total - 1;
        w_seen  <= w_seen + 1;
      end
      if (x_take) x_left <= x_left - 1;
      if (r_out_valid && r_out_ready) begin
        r_left <= r_left - 1;
        if (active) fcnt <= (fcnt == 32'(ID)) ? '0 : fcnt + 1;
      end
      if (w_total == 0 && x_left == 0 && r_left == 0) busy <= 1'b0;
    end
  end

  // Handshake rule of the chains: an offered result stays until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   r_out_valid && !r_out_ready |=> r_out_valid);
endmodule
