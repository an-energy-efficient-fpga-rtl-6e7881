// tb_cnn_accel_full: one complete call of the accelerator at its default
// size (32 PEs, 8-channel vectors, 576-vector weight stores) on a layer of
// the shape of the last 3x3 stage of ResNet-152: a 7x7 input map with 512
// channels, 32 filters of 3x3x512, stride 1, zero border. The weight store of
// every PE is filled to its last entry (3*3*512/8 = 576 vectors). Host
// memories and the reference are those of tb_cnn_accel; every one of the
// 32*7*7 output words is checked.
module tb_cnn_accel_full;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int NUM_PE = 32, VEC = 8;
  localparam int IN_WORDS = 7 * 7 * 512, W_WORDS = 32 * 9 * 512, OUT_WORDS = 32 * 49;
  localparam int MAX_CYCLES = 3000000;

  logic clk = 0, rst_n = 0;
  logic start, busy, done, err;
  cu_cfg_t cfg;
  logic [31:0] in_base, w_base, out_base;
  logic in_req_valid, in_req_ready, in_rsp_valid;
  logic [31:0] in_req_addr;
  fp32_t in_rsp_data;
  logic w_req_valid, w_req_ready, w_rsp_valid;
  logic [31:0] w_req_addr;
  fp32_t w_rsp_data;
  logic out_wr_valid, out_wr_ready;
  logic [31:0] out_wr_addr;
  fp32_t out_wr_data;
  logic [NUM_PE-1:0] pe_busy;
  int checks = 0, failures = 0;

  cnn_accel dut (.*);

  tb_mem_rd #(.SIZE(IN_WORDS), .LAT(4), .STALL_PCT(10)) u_in_mem (
    .clk, .req_valid(in_req_valid), .req_ready(in_req_ready), .req_addr(in_req_addr),
    .rsp_valid(in_rsp_valid), .rsp_data(in_rsp_data));
  tb_mem_rd #(.SIZE(W_WORDS), .LAT(6), .STALL_PCT(10)) u_w_mem (
    .clk, .req_valid(w_req_valid), .req_ready(w_req_ready), .req_addr(w_req_addr),
    .rsp_valid(w_rsp_valid), .rsp_data(w_rsp_data));

  logic [31:0] out_mem [OUT_WORDS];
  int out_writes = 0, out_stalls = 0, bad_out_addr = 0;
  int n_refused = 0, n_split = 0, n_idle_pe = 0, n_fake = 0, n_border = 0,
      n_stride2 = 0, n_wfwd = 0, n_x_block = 0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (out_wr_valid && out_wr_ready) begin
      if (out_wr_addr < OUT_WORDS) out_mem[out_wr_addr] = out_wr_data;
      else bad_out_addr++;
      out_writes++;
    end
    if (out_wr_valid && !out_wr_ready) out_stalls++;
    out_wr_ready <= ($urandom_range(9, 0) != 0);
    if (dut.x_wv[0] && !dut.x_wr[0]) n_x_block++;
    if (dut.w_wv[1] && dut.w_wr[1]) n_wfwd++;
  end

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One call: filters f0 .. f0+n-1 of a layer with ntot filters.
  task automatic do_call(input cu_cfg_t c, input int wb, input int ob);
    int guard;
    @(negedge clk);
    cfg = c; in_base = 0; w_base = 32'(wb); out_base = 32'(ob);
    start = 1;
    @(negedge clk);
    start = 0;
    guard = 0;
    while (!done && guard < MAX_CYCLES) begin
      @(negedge clk);
      guard++;
    end
  endtask

  task automatic layer(input int w, input int h, input int c, input int ntot,
                       input int size, input int stride);
    int pad, oh, ow, cgs, npix, bad;
    pad = size / 2;
    oh  = (h + 2 * pad - size) / stride + 1;
    ow  = (w + 2 * pad - size) / stride + 1;
    npix = oh * ow;
    cgs = (c + VEC - 1) / VEC;
    for (int i = 0; i < w * h * c; i++) u_in_mem.mem[i] = rand_f32();
    for (int i = 0; i < ntot * c * size * size; i++) u_w_mem.mem[i] = rand_f32();
    for (int i = 0; i < ntot * npix; i++) out_mem[i] = 32'hFFFFFFFF;
    if (ntot > NUM_PE) n_split++;
    if (ntot % NUM_PE != 0) n_idle_pe++;
    if (c % VEC != 0) n_fake++;
    if (size > 1) n_border++;
    if (stride == 2) n_stride2++;
    // host: one call per group of NUM_PE filters
    for (int f0 = 0; f0 < ntot; f0 += NUM_PE) begin
      int n;
      n = (ntot - f0 < NUM_PE) ? ntot - f0 : NUM_PE;
      do_call('{w: 16'(w), h: 16'(h), c: 16'(c), n: 16'(n), size: 8'(size), stride: 8'(stride)},
              f0 * c * size * size, f0 * npix);
    end
    // reference
    bad = 0;
    for (int f = 0; f < ntot; f++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          fp16_t acc [];
          fp16_t r;
          acc = new[VEC];
          for (int l = 0; l < VEC; l++) acc[l] = 16'h0000;
          for (int ky = 0; ky < size; ky++)
            for (int kx = 0; kx < size; kx++)
              for (int g = 0; g < cgs; g++)
                for (int l = 0; l < VEC; l++) begin
                  int ch, y, x;
                  fp16_t xv, wv;
                  ch = g * VEC + l;
                  y = oy * stride + ky - pad;
                  x = ox * stride + kx - pad;
                  xv = (ch >= c || y < 0 || y >= h || x < 0 || x >= w) ? 16'h0000
                     : ref_f2h(u_in_mem.mem[(ch * h + y) * w + x]);
                  wv = (ch >= c) ? 16'h0000
                     : ref_f2h(u_w_mem.mem[((f * c + ch) * size + ky) * size + kx]);
                  acc[l] = ref_add(acc[l], ref_mul(xv, wv));
                end
          r = ref_reduce(acc, VEC);
          checks++;
          if (out_mem[f * npix + oy * ow + ox] !== ref_h2f(r)) begin
            bad++;
            if (bad < 5) $display("FAIL f%0d (%0d,%0d): %h expected %h", f, oy, ox,
                                  out_mem[f * npix + oy * ow + ox], ref_h2f(r));
          end
        end
    failures += bad;
    $display("layer %0dx%0dx%0d, %0d filters %0dx%0d stride %0d: %0d outputs checked, %0d wrong",
             w, h, c, ntot, size, size, stride, ntot * npix, bad);
  endtask

  initial begin
    int t0;
    start = 0; cfg = '0; in_base = 0; w_base = 0; out_base = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = $time;
    layer(7, 7, 512, 32, 3, 1);
    $display("call took %0d cycles", ($time - t0) / 10);
    checks++;
    if (busy !== 1'b0 || pe_busy !== '0 || bad_out_addr != 0 || u_in_mem.bad_addr != 0
        || u_w_mem.bad_addr != 0 || out_writes != 32 * 49) begin
      failures++;
      $display("FAIL not idle at the end, wrong write count or out-of-range access");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
