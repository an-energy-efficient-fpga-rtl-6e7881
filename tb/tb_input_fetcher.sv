// tb_input_fetcher: runs the input fetcher against a behavioural memory with
// random stalls and latency, and a PE-side consumer with random back-pressure.
// Every vector is compared with one built independently: for each output
// pixel, tap and channel group, VEC channels of one input position converted
// to FP16 by the reference, zeros for padding channels and border taps.
// Layer shapes cover both strides, 1x1 and 3x3 filters and a channel count
// that is not a multiple of VEC; a nonzero base address is used.
module tb_input_fetcher;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int VEC = 4, BASE = 100;
  logic clk = 0, rst_n = 0;
  logic cfg_valid, cfg_ready;
  cu_cfg_t cfg;
  logic [31:0] base;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  fp32_t mem_rsp_data;
  logic x_valid, x_ready;
  logic [VEC*16-1:0] x_data;
  int checks = 0, failures = 0;

  input_fetcher #(.VEC(VEC), .RSP_DEPTH(4)) dut (.*);
  tb_mem_rd #(.SIZE(2048), .LAT(4), .STALL_PCT(25)) u_mem (
    .clk, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w, input int h, input int c, input int size, input int stride);
    int pad, oh, ow, cgs, got, bad, guard;
    logic [VEC*16-1:0] expv [$];
    for (int i = 0; i < w * h * c; i++) u_mem.mem[BASE + i] = rand_f32();
    pad = size / 2;
    oh  = (h + 2 * pad - size) / stride + 1;
    ow  = (w + 2 * pad - size) / stride + 1;
    cgs = (c + VEC - 1) / VEC;
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int ky = 0; ky < size; ky++)
          for (int kx = 0; kx < size; kx++)
            for (int g = 0; g < cgs; g++) begin
              logic [VEC*16-1:0] v;
              for (int l = 0; l < VEC; l++) begin
                int ch, y, x;
                ch = g * VEC + l;
                y = oy * stride + ky - pad;
                x = ox * stride + kx - pad;
                if (ch >= c || y < 0 || y >= h || x < 0 || x >= w) v[16*l +: 16] = 16'h0000;
                else v[16*l +: 16] = ref_f2h(u_mem.mem[BASE + (ch * h + y) * w + x]);
              end
              expv.push_back(v);
            end
    @(negedge clk);
    cfg = '{w: 16'(w), h: 16'(h), c: 16'(c), n: 16'd1, size: 8'(size), stride: 8'(stride)};
    base = BASE;
    cfg_valid = 1;
    #1;
    while (!cfg_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cfg_valid = 0;
    got = 0; bad = 0; guard = 0;
    while (got < expv.size() && guard < 200000) begin
      x_ready = ($urandom_range(3, 0) != 0);
      #1;
      if (x_valid && x_ready) begin
        checks++;
        if (x_data !== expv[got]) begin
          bad++;
          if (bad < 5) $display("FAIL vector %0d: %h expected %h", got, x_data, expv[got]);
        end
        got++;
      end
      @(negedge clk);
      guard++;
    end
    failures += bad;
    checks++;
    if (got != expv.size()) begin
      failures++;
      $display("FAIL only %0d of %0d vectors", got, expv.size());
    end
  endtask

  initial begin
    cfg_valid = 0; cfg = '0; base = '0; x_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 5, 3, 3, 1);
    run(6, 5, 8, 1, 2);
    run(5, 4, 6, 3, 2);
    repeat (20) @(negedge clk);
    checks++;
    if (x_valid !== 1'b0 || u_mem.bad_addr != 0 || u_mem.stalls == 0) begin
      failures++;
      $display("FAIL extra vectors, bad addresses (%0d) or no memory stalls", u_mem.bad_addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
