// tb_stream_buffer: compares the descriptor stream of the stream buffer with
// a loop-nest model (oy, ox, ky, kx, channel group, lane) for several layer
// shapes: 1x1, 3x3 and 7x7 filters, strides 1 and 2, channel counts that are
// and are not multiples of VEC, and random back-pressure. It also checks the
// descriptor count and that with d_ready held high one descriptor leaves per
// cycle.
module tb_stream_buffer;
  import cnn_pkg::*;
  localparam int VEC = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_valid, cfg_ready, d_valid, d_ready, d_zero, d_last;
  logic [31:0] d_addr;
  cu_cfg_t cfg;
  int checks = 0, failures = 0;

  stream_buffer #(.VEC(VEC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w, input int h, input int c, input int size,
                     input int stride, input bit stall);
    int pad, oh, ow, total, got, cycles, bad;
    logic exp_zero [$];
    int   exp_addr [$];
    pad = size / 2;
    oh  = (h + 2 * pad - size) / stride + 1;
    ow  = (w + 2 * pad - size) / stride + 1;
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int ky = 0; ky < size; ky++)
          for (int kx = 0; kx < size; kx++)
            for (int ch = 0; ch < c + ((VEC - c % VEC) % VEC); ch++) begin
              int y, x;
              y = oy * stride + ky - pad;
              x = ox * stride + kx - pad;
              if (ch >= c || y < 0 || y >= h || x < 0 || x >= w) begin
                exp_zero.push_back(1); exp_addr.push_back(0);
              end else begin
                exp_zero.push_back(0); exp_addr.push_back((ch * h + y) * w + x);
              end
            end
    total = exp_zero.size();
    @(negedge clk);
    cfg = '{w: 16'(w), h: 16'(h), c: 16'(c), n: 16'd1, size: 8'(size), stride: 8'(stride)};
    cfg_valid = 1;
    @(negedge clk);
    cfg_valid = 0;
    got = 0; cycles = 0; bad = 0;
    while (got < total && cycles < 20 * total + 10) begin
      d_ready = stall ? ($urandom_range(2, 0) != 0) : 1'b1;
      #1;
      if (d_valid && d_ready) begin
        checks++;
        if (d_zero !== exp_zero[got] || (!d_zero && d_addr !== 32'(exp_addr[got]))
            || d_last !== (got == total - 1)) begin
          bad++;
          if (bad < 5) $display("FAIL desc %0d: zero=%b addr=%0d, expected zero=%b addr=%0d",
                                got, d_zero, d_addr, exp_zero[got], exp_addr[got]);
        end
        got++;
      end
      @(negedge clk);
      cycles++;
    end
    failures += bad;
    checks++;
    if (got != total || d_valid !== 1'b0 || cfg_ready !== 1'b1) begin
      failures++;
      $display("FAIL count %0d of %0d, still valid %b", got, total, d_valid);
    end
    if (!stall) begin
      checks++;
      if (cycles != total) begin
        failures++;
        $display("FAIL rate: %0d descriptors took %0d cycles", total, cycles);
      end
    end
  endtask

  initial begin
    cfg_valid = 0; d_ready = 0; cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 5, 3, 3, 1, 0);
    run(5, 5, 3, 3, 2, 1);
    run(6, 4, 8, 1, 1, 1);
    run(7, 7, 4, 1, 2, 0);
    run(9, 8, 3, 7, 2, 1);
    run(4, 4, 9, 3, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
