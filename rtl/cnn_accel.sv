// cnn_accel: convolution-layer accelerator built around a daisy chain of
// NUM_PE processing elements.
//
// One call computes up to NUM_PE output feature maps of a convolution layer:
// PE i applies filter i to the whole input map. The host describes the layer
// (input width, height, channels, number of filters n <= NUM_PE, filter size,
// stride; zero border of size/2) and gives three base word addresses into the
// memory it shares with the accelerator: the FP32 input map [c][y][x], the
// FP32 filters of this call [f][c][ky][kx] and the FP32 output maps
// [f][oy][ox]. A start pulse begins the call; done pulses when the last
// output word has been written. Layers with more filters than PEs take
// several calls.
//
// Data flow (all links are blocking FIFO channels):
//   control unit -> input fetcher, weight fetcher, output writer, PE0
//   input fetcher (stream buffer + FP32->FP16) -> PE0 -> PE1 -> ... (input)
//   weight fetcher (FP32->FP16)                -> PE0 -> PE1 -> ... (filters)
//   PE0 -> PE1 -> ... -> PE(NUM_PE-1) -> output writer (results, FP16->FP32)
// Inputs and filters travel as vectors of VEC channels of one position; a
// channel count that is not a multiple of VEC is filled with zero channels.
//
// Memory ports: two read ports (input and weights; request valid/ready with
// word address, in-order responses of any latency with no back-pressure) and
// one write port (valid/ready, word address, data). The shared-memory
// interconnect of the host platform sits outside this module.
//
// Defaults follow the document's main configuration: 32 PEs and vectors of 8
// half-precision values. WDEPTH (weight vectors a PE can hold) is sized so
// that the largest filter of the target network, 3x3x512, fits; channel
// depths are this implementation's choice.
module cnn_accel
  import cnn_pkg::*;
#(
  parameter int NUM_PE    = 32,
  parameter int VEC       = 8,
  parameter int WDEPTH    = 576,
  parameter int RSP_DEPTH = 8,
  parameter int CH_DEPTH  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // host control
  input  logic        start,
  input  cu_cfg_t     cfg,
  input  logic [31:0] in_base,
  input  logic [31:0] w_base,
  input  logic [31:0] out_base,
  output logic        busy,
  output logic        done,
  output logic        err,
  // input-map read port
  output logic        in_req_valid,
  input  logic        in_req_ready,
  output logic [31:0] in_req_addr,
  input  logic        in_rsp_valid,
  input  fp32_t       in_rsp_data,
  // weight read port
  output logic        w_req_valid,
  input  logic        w_req_ready,
  output logic [31:0] w_req_addr,
  input  logic        w_rsp_valid,
  input  fp32_t       w_rsp_data,
  // output write port
  output logic        out_wr_valid,
  input  logic        out_wr_ready,
  output logic [31:0] out_wr_addr,
  output fp32_t       out_wr_data,
  // which PEs are inside a call, for monitoring
  output logic [NUM_PE-1:0] pe_busy
);
  localparam int VW = VEC * 16;

  cu_cfg_t    cu_cfg;
  logic [3:0] cfg_valid, cfg_ready;
  logic       run_done;

  control_unit #(.NUM_PE(NUM_PE), .VEC(VEC), .WDEPTH(WDEPTH)) u_cu (
    .clk, .rst_n, .start, .host_cfg(cfg), .busy, .done, .err,
    .cfg(cu_cfg), .cfg_valid, .cfg_ready, .run_done);

  // Channel ends: index i is the channel into PE i; index NUM_PE leaves
  // the last PE (results only).
  logic          c_wv [NUM_PE+1], c_wr [NUM_PE+1];   // write side
  logic          c_rv [NUM_PE+1], c_rr [NUM_PE+1];   // read side
  cu_cfg_t       c_wd [NUM_PE+1], c_rd [NUM_PE+1];
  logic          x_wv [NUM_PE+1], x_wr [NUM_PE+1], x_rv [NUM_PE+1], x_rr [NUM_PE+1];
  logic [VW-1:0] x_wd [NUM_PE+1], x_rd [NUM_PE+1];
  logic          w_wv [NUM_PE+1], w_wr [NUM_PE+1], w_rv [NUM_PE+1], w_rr [NUM_PE+1];
  logic [VW-1:0] w_wd [NUM_PE+1], w_rd [NUM_PE+1];
  logic          r_wv [NUM_PE+1], r_wr [NUM_PE+1], r_rv [NUM_PE+1], r_rr [NUM_PE+1];
  fp16_t         r_wd [NUM_PE+1], r_rd [NUM_PE+1];

  // Control word into PE0.
  assign c_wv[0]      = cfg_valid[3];
  assign c_wd[0]      = cu_cfg;
  assign cfg_ready[3] = c_wr[0];

  input_fetcher #(.VEC(VEC), .RSP_DEPTH(RSP_DEPTH)) u_in (
    .clk, .rst_n, .cfg_valid(cfg_valid[0]), .cfg_ready(cfg_ready[0]),
    .cfg(cu_cfg), .base(in_base),
    .mem_req_valid(in_req_valid), .mem_req_ready(in_req_ready),
    .mem_req_addr(in_req_addr), .mem_rsp_valid(in_rsp_valid),
    .mem_rsp_data(in_rsp_data),
    .x_valid(x_wv[0]), .x_ready(x_wr[0]), .x_data(x_wd[0]));

  weight_fetcher #(.VEC(VEC), .RSP_DEPTH(RSP_DEPTH)) u_wf (
    .clk, .rst_n, .cfg_valid(cfg_valid[1]), .cfg_ready(cfg_ready[1]),
    .cfg(cu_cfg), .base(w_base),
    .mem_req_valid(w_req_valid), .mem_req_ready(w_req_ready),
    .mem_req_addr(w_req_addr), .mem_rsp_valid(w_rsp_valid),
    .mem_rsp_data(w_rsp_data),
    .w_valid(w_wv[0]), .w_ready(w_wr[0]), .w_data(w_wd[0]));

  // PE0 has no upstream results.
  assign r_rv[0] = 1'b0;
  assign r_rd[0] = '0;

  for (genvar i = 0; i < NUM_PE; i++) begin : g_pe
    chan_fifo #(.W(CFG_BITS), .DEPTH(1)) u_cch (
      .clk, .rst_n, .in_valid(c_wv[i]), .in_ready(c_wr[i]), .in_data(c_wd[i]),
      .out_valid(c_rv[i]), .out_ready(c_rr[i]), .out_data(c_rd[i]));
    chan_fifo #(.W(VW), .DEPTH(CH_DEPTH)) u_xch (
      .clk, .rst_n, .in_valid(x_wv[i]), .in_ready(x_wr[i]), .in_data(x_wd[i]),
      .out_valid(x_rv[i]), .out_ready(x_rr[i]), .out_data(x_rd[i]));
    chan_fifo #(.W(VW), .DEPTH(CH_DEPTH)) u_wch (
      .clk, .rst_n, .in_valid(w_wv[i]), .in_ready(w_wr[i]), .in_data(w_wd[i]),
      .out_valid(w_rv[i]), .out_ready(w_rr[i]), .out_data(w_rd[i]));
    if (i > 0) begin : g_rch
      chan_fifo #(.W(16), .DEPTH(CH_DEPTH)) u_rch (
        .clk, .rst_n, .in_valid(r_wv[i]), .in_ready(r_wr[i]), .in_data(r_wd[i]),
        .out_valid(r_rv[i]), .out_ready(r_rr[i]), .out_data(r_rd[i]));
    end

    processing_element #(.NUM_PE(NUM_PE), .ID(i), .VEC(VEC), .WDEPTH(WDEPTH)) u_pe (
      .clk, .rst_n,
      .ctrl_in_valid(c_rv[i]), .ctrl_in_ready(c_rr[i]), .ctrl_in(c_rd[i]),
      .ctrl_out_valid(c_wv[i+1]), .ctrl_out_ready(c_wr[i+1]), .ctrl_out(c_wd[i+1]),
      .w_in_valid(w_rv[i]), .w_in_ready(w_rr[i]), .w_in(w_rd[i]),
      .w_out_valid(w_wv[i+1]), .w_out_ready(w_wr[i+1]), .w_out(w_wd[i+1]),
      .x_in_valid(x_rv[i]), .x_in_ready(x_rr[i]), .x_in(x_rd[i]),
      .x_out_valid(x_wv[i+1]), .x_out_ready(x_wr[i+1]), .x_out(x_wd[i+1]),
      .r_in_valid(r_rv[i]), .r_in_ready(r_rr[i]), .r_in(r_rd[i]),
      .r_out_valid(r_wv[i+1]), .r_out_ready(r_wr[i+1]), .r_out(r_wd[i+1]),
      .busy(pe_busy[i]));
  end

  // The last PE drives no control, weight or input channel.
  assign c_wr[NUM_PE] = 1'b0;
  assign w_wr[NUM_PE] = 1'b0;
  assign x_wr[NUM_PE] = 1'b0;

  output_writer u_ow (
    .clk, .rst_n, .cfg_valid(cfg_valid[2]), .cfg_ready(cfg_ready[2]),
    .cfg(cu_cfg), .base(out_base),
    .r_valid(r_wv[NUM_PE]), .r_ready(r_wr[NUM_PE]), .r_data(r_wd[NUM_PE]),
    .wr_valid(out_wr_valid), .wr_ready(out_wr_ready), .wr_addr(out_wr_addr),
    .wr_data(out_wr_data), .run_done);
endmodule
