// tb_output_writer: feeds the output writer with FP16 results in chain order
// (pixel by pixel, filter 0..n-1 within a pixel) under random gaps and a
// write port with random back-pressure, and checks each write: address
// base + f*out_h*out_w + pixel, data the exact FP32 value of the result. Also
// checks the run_done pulse after the last write, that nothing is written
// before a description arrives, and a second call with another shape.
module tb_output_writer;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_valid, cfg_ready;
  cu_cfg_t cfg;
  logic [31:0] base;
  logic r_valid, r_ready;
  fp16_t r_data;
  logic wr_valid, wr_ready;
  logic [31:0] wr_addr;
  fp32_t wr_data;
  logic run_done;
  int checks = 0, failures = 0;

  output_writer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w, input int h, input int n, input int size,
                     input int stride, input int b);
    int oh, ow, npix, sent, bad, guard, dones;
    fp16_t vals [$];
    oh = (h + 2 * (size / 2) - size) / stride + 1;
    ow = (w + 2 * (size / 2) - size) / stride + 1;
    npix = oh * ow;
    for (int i = 0; i < npix * n; i++) vals.push_back(16'($urandom) & 16'hBFFF);
    @(negedge clk);
    r_valid = 1; r_data = 16'h3C00; wr_ready = 1;
    #1;
    checks++;
    if (wr_valid !== 1'b0 || r_ready !== 1'b0) begin
      failures++;
      $display("FAIL writes while idle");
    end
    r_valid = 0;
    cfg = '{w: 16'(w), h: 16'(h), c: 16'd1, n: 16'(n), size: 8'(size), stride: 8'(stride)};
    base = 32'(b);
    cfg_valid = 1;
    @(negedge clk);
    cfg_valid = 0;
    sent = 0; bad = 0; guard = 0; dones = 0;
    while (sent < vals.size() && guard < 50000) begin
      r_valid = ($urandom_range(4, 0) != 0);
      r_data = vals[sent];
      wr_ready = ($urandom_range(3, 0) != 0);
      #1;
      if (run_done) dones++;
      if (r_valid && r_ready) begin
        int f, p;
        p = sent / n;
        f = sent % n;
        checks++;
        if (!wr_valid || wr_addr !== 32'(b + f * npix + p) || wr_data !== ref_h2f(vals[sent])) begin
          bad++;
          if (bad < 5) $display("FAIL result %0d: addr %0d data %h, expected %0d %h", sent,
                                wr_addr, wr_data, b + f * npix + p, ref_h2f(vals[sent]));
        end
        sent++;
      end
      @(negedge clk);
      guard++;
    end
    r_valid = 0;
    failures += bad;
    checks++;
    if (run_done !== 1'b1 || dones != 0 || cfg_ready !== 1'b1) begin
      failures++;
      $display("FAIL run_done %b (early %0d)", run_done, dones);
    end
  endtask

  initial begin
    cfg_valid = 0; cfg = '0; base = '0; r_valid = 0; r_data = '0; wr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 4, 3, 3, 1, 1000);
    run(7, 7, 4, 3, 2, 20);
    run(4, 4, 1, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
