// tb_weight_fetcher: runs the weight fetcher against a behavioural memory with
// random stalls and latency and a consumer with random back-pressure, and
// compares every vector with one built independently from the [f][c][ky][kx]
// weight array: for each filter, tap and channel group, VEC channels of that
// tap in FP16, zeros in the padding channels. Shapes include a channel count
// that is not a multiple of VEC (3 channels, as the first layer of the target
// network) and 1x1 filters; a nonzero base address selects the filters.
module tb_weight_fetcher;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int VEC = 4, BASE = 37;
  logic clk = 0, rst_n = 0;
  logic cfg_valid, cfg_ready;
  cu_cfg_t cfg;
  logic [31:0] base;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  fp32_t mem_rsp_data;
  logic w_valid, w_ready;
  logic [VEC*16-1:0] w_data;
  int checks = 0, failures = 0;

  weight_fetcher #(.VEC(VEC), .RSP_DEPTH(4)) dut (.*);
  tb_mem_rd #(.SIZE(4096), .LAT(5), .STALL_PCT(25)) u_mem (
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

  task automatic run(input int n, input int c, input int size);
    int cgs, got, bad, guard;
    logic [VEC*16-1:0] expv [$];
    for (int i = 0; i < n * c * size * size; i++) u_mem.mem[BASE + i] = rand_f32();
    cgs = (c + VEC - 1) / VEC;
    for (int f = 0; f < n; f++)
      for (int ky = 0; ky < size; ky++)
        for (int kx = 0; kx < size; kx++)
          for (int g = 0; g < cgs; g++) begin
            logic [VEC*16-1:0] v;
            for (int l = 0; l < VEC; l++) begin
              int ch;
              ch = g * VEC + l;
              if (ch >= c) v[16*l +: 16] = 16'h0000;
              else v[16*l +: 16] = ref_f2h(u_mem.mem[BASE + ((f * c + ch) * size + ky) * size + kx]);
            end
            expv.push_back(v);
          end
    @(negedge clk);
    cfg = '{w: 16'd9, h: 16'd9, c: 16'(c), n: 16'(n), size: 8'(size), stride: 8'd1};
    base = BASE;
    cfg_valid = 1;
    #1;
    while (!cfg_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cfg_valid = 0;
    got = 0; bad = 0; guard = 0;
    while (got < expv.size() && guard < 200000) begin
      w_ready = ($urandom_range(3, 0) != 0);
      #1;
      if (w_valid && w_ready) begin
        checks++;
        if (w_data !== expv[got]) begin
          bad++;
          if (bad < 5) $display("FAIL vector %0d: %h expected %h", got, w_data, expv[got]);
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
    cfg_valid = 0; cfg = '0; base = '0; w_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4, 3, 7);
    run(3, 8, 1);
    run(2, 6, 3);
    repeat (20) @(negedge clk);
    checks++;
    if (w_valid !== 1'b0 || u_mem.bad_addr != 0) begin
      failures++;
      $display("FAIL extra vectors or bad addresses");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
