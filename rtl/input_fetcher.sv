// input_fetcher: the kernel that feeds the input feature map into the PE
// chain.
//
// It owns the stream buffer: once it takes the layer description from the
// control unit (with the base word address of the FP32 input map in host
// memory), the stream buffer lists the input elements of every dot-product
// step in channel-interleaved order, and the gather stage reads them from
// host memory, narrows them to FP16 and packs them VEC channels to a vector.
// The vectors leave on x_* toward PE0, one vector per dot-product step, the
// same vector being sent again whenever a later step needs it (overlapping
// windows), so that no PE stores the map.
//
// Timing: one descriptor per cycle, so one vector every VEC cycles at best;
// memory stalls and a full PE0 channel hold it back (blocking channel).
module input_fetcher
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
  output logic              x_valid,
  input  logic              x_ready,
  output logic [VEC*16-1:0] x_data
);
  logic        d_valid, d_ready, d_zero, d_last;
  logic [31:0] d_addr, base_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                      base_q <= '0;
    else if (cfg_valid && cfg_ready) base_q <= base;

  stream_buffer #(.VEC(VEC)) u_sb (
    .clk, .rst_n, .cfg_valid, .cfg_ready, .cfg,
    .d_valid, .d_ready, .d_zero, .d_addr, .d_last);

  vec_gather #(.VEC(VEC), .RSP_DEPTH(RSP_DEPTH)) u_gather (
    .clk, .rst_n, .base(base_q),
    .d_valid, .d_ready, .d_zero, .d_addr,
    .mem_req_valid, .mem_req_ready, .mem_req_addr,
    .mem_rsp_valid, .mem_rsp_data,
    .v_valid(x_valid), .v_ready(x_ready), .v_data(x_data));
endmodule
