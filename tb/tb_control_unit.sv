// tb_control_unit: checks that the control unit refuses layer descriptions
// the PE chain cannot run (err pulse, stays idle), offers an accepted one to
// all four consumers until each has taken it, in any order and at any time,
// ignores a second start while busy, and pulses done one cycle after the
// output writer reports the end of the run.
module tb_control_unit;
  import cnn_pkg::*;
  localparam int NUM_PE = 4, VEC = 8, WDEPTH = 36;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, err, run_done;
  cu_cfg_t host_cfg, cfg;
  logic [3:0] cfg_valid, cfg_ready;
  int checks = 0, failures = 0;

  control_unit #(.NUM_PE(NUM_PE), .VEC(VEC), .WDEPTH(WDEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic cu_cfg_t mk(int w, int h, int c, int n, int size, int stride);
    return '{w: 16'(w), h: 16'(h), c: 16'(c), n: 16'(n), size: 8'(size), stride: 8'(stride)};
  endfunction

  task automatic try_bad(input cu_cfg_t c, input string what);
    @(negedge clk); host_cfg = c; start = 1;
    @(negedge clk); start = 0;
    expect_true(err === 1'b1 && busy === 1'b0, {"refuse ", what});
    @(negedge clk);
    expect_true(err === 1'b0, "err is a pulse");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; run_done = 0; cfg_ready = '0; host_cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    try_bad(mk(8, 8, 8, 0, 3, 1), "n = 0");
    try_bad(mk(8, 8, 8, 5, 3, 1), "n > NUM_PE");
    try_bad(mk(8, 8, 0, 2, 3, 1), "c = 0");
    try_bad(mk(8, 8, 8, 2, 3, 0), "stride = 0");
    try_bad(mk(8, 8, 40, 2, 3, 1), "filter longer than WDEPTH"); // 3*3*5 = 45 > 36
    try_bad(mk(8, 8, 8, 2, 0, 1), "size = 0");

    for (int call = 0; call < 6; call++) begin
      cu_cfg_t c;
      logic [3:0] taken;
      int guard;
      c = mk(5 + call, 7, 8 * (call % 4 + 1), call % NUM_PE + 1, (call % 2) ? 3 : 1, call % 2 + 1);
      @(negedge clk); host_cfg = c; start = 1;
      @(negedge clk); start = 0; host_cfg = '0;
      expect_true(busy === 1'b1 && err === 1'b0, "accept valid description");
      taken = '0;
      guard = 0;
      while (taken != 4'hF && guard < 200) begin
        cfg_ready = 4'($urandom);
        #1;
        expect_true(cfg_valid === ~taken, "cfg_valid offered to consumers that have not taken it");
        expect_true(cfg === c, "cfg holds the description");
        // a second start must be ignored
        start = ($urandom_range(3, 0) == 0);
        host_cfg = mk(1, 1, 1, 1, 1, 1);
        taken = taken | (cfg_valid & cfg_ready);
        @(negedge clk);
        start = 0;
        guard++;
      end
      cfg_ready = '0;
      #1;
      expect_true(cfg_valid === 4'b0 && cfg === c, "all consumers served, description kept");
      repeat ($urandom_range(5, 0)) begin
        @(negedge clk);
        expect_true(busy === 1'b1 && done === 1'b0, "busy until run_done");
      end
      run_done = 1;
      @(negedge clk); run_done = 0;
      expect_true(done === 1'b1 && busy === 1'b0, "done pulse after run_done");
      @(negedge clk);
      expect_true(done === 1'b0, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
