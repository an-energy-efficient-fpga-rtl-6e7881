// vec_gather: turns a stream of lane descriptors into FP16 vectors read from
// host memory. Shared by the input fetcher and the weight fetcher.
//
// Each descriptor is either a zero lane or an element offset; offsets are
// added to BASE and issued as single-word reads on the memory port. A small
// tag FIFO remembers, in order, which lanes are zeros and which wait for
// memory, so that reads stay pipelined while the lanes are reassembled in
// descriptor order. Responses return in request order, one FP32 word each,
// with no back-pressure; a credit counter keeps the number of reads in flight
// at most RSP_DEPTH so that the response FIFO can never overflow. Every word
// is narrowed to FP16 on its way in; after VEC lanes the vector is pushed into
// a two-entry output FIFO. Zero lanes cost one cycle like memory lanes.
//
// Memory port: mem_req_valid/mem_req_ready/mem_req_addr (word address);
// mem_rsp_valid/mem_rsp_data, any latency, in order.
module vec_gather
  import cnn_pkg::*;
#(
  parameter int VEC       = 8,
  parameter int RSP_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        base,
  input  logic               d_valid,
  output logic               d_ready,
  input  logic               d_zero,
  input  logic [31:0]        d_addr,
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic [31:0]        mem_req_addr,
  input  logic               mem_rsp_valid,
  input  fp32_t              mem_rsp_data,
  output logic               v_valid,
  input  logic               v_ready,
  output logic [VEC*16-1:0]  v_data
);
  localparam int CW = $clog2(RSP_DEPTH + 1);

  logic          tag_in_ready, tag_valid, tag_zero, tag_pop;
  logic          rsp_valid, rsp_pop;
  fp32_t         rsp_data;
  fp16_t         lane_val;
  logic [CW-1:0] credits;          // reads in flight or waiting in the FIFO
  logic          credit_ok, take;
  logic [15:0]   lane;
  logic [VEC*16-1:0] asm_vec;
  logic          ovf_in_ready, lane_ok;

  assign credit_ok     = (credits < CW'(RSP_DEPTH));
  assign take          = d_valid && tag_in_ready
                      && (d_zero || (credit_ok && mem_req_ready));
  assign d_ready       = tag_in_ready && (d_zero || (credit_ok && mem_req_ready));
  assign mem_req_valid = d_valid && !d_zero && tag_in_ready && credit_ok;
  assign mem_req_addr  = base + d_addr;

  chan_fifo #(.W(1), .DEPTH(RSP_DEPTH + 2)) u_tag (
    .clk, .rst_n,
    .in_valid(take), .in_ready(tag_in_ready), .in_data(d_zero),
    .out_valid(tag_valid), .out_ready(tag_pop), .out_data(tag_zero));

  chan_fifo #(.W(32), .DEPTH(RSP_DEPTH)) u_rsp (
    .clk, .rst_n,
    .in_valid(mem_rsp_valid), .in_ready(), .in_data(mem_rsp_data),
    .out_valid(rsp_valid), .out_ready(rsp_pop), .out_data(rsp_data));

  fp32_to_fp16 u_cvt (.a(rsp_data), .y(lane_val));

  // A lane can be completed when its value is there and, for the last lane,
  // the output FIFO has room.
  assign lane_ok = tag_valid && (tag_zero || rsp_valid)
                && ((lane != 16'(VEC - 1)) || ovf_in_ready);
  assign tag_pop = lane_ok;
  assign rsp_pop = lane_ok && !tag_zero;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      credits <= '0;
      lane    <= '0;
      asm_vec <= '0;
    end else begin
      credits <= credits + CW'(mem_req_valid && mem_req_ready) - CW'(rsp_pop);
      if (lane_ok) begin
        asm_vec[16*lane +: 16] <= tag_zero ? 16'h0000 : lane_val;
        lane <= (lane == 16'(VEC - 1)) ? '0 : lane + 16'd1;
      end
    end
  end

  logic [VEC*16-1:0] full_vec;
  always_comb begin
    full_vec = asm_vec;
    full_vec[16*(VEC-1) +: 16] = tag_zero ? 16'h0000 : lane_val;
  end

  chan_fifo #(.W(VEC*16), .DEPTH(2)) u_out (
    .clk, .rst_n,
    .in_valid(lane_ok && (lane == 16'(VEC - 1))), .in_ready(ovf_in_ready),
    .in_data(full_vec),
    .out_valid(v_valid), .out_ready(v_ready), .out_data(v_data));

  // Responses never arrive without a read in flight.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_rsp_valid |-> credits != '0);
endmodule
