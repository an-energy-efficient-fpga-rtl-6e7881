// tb_processing_element: one PE (ID 1 of a 3-PE chain) between random
// producers and consumers on all four chains. Per call it checks that the
// control word is passed on, that of the filters arriving the PE keeps the
// first and passes the rest on unchanged, that every input vector is passed
// on unchanged, and that per output pixel it first passes on the upstream
// result and then sends its own dot product, which is compared with a
// reference computed lane by lane in FP16 in the same order (multiply, add
// into the lane accumulator, pairwise reduction). A second call has n = 1, so
// the PE holds no filter and must only pass inputs and results on. A third
// call with every channel always ready checks that the PE takes one input
// vector per cycle.
module tb_processing_element;
  import cnn_pkg::*;
  import tb_ref_pkg::*;
  localparam int NUM_PE = 3, ID = 1, VEC = 4, WDEPTH = 64;
  localparam int VW = VEC * 16;
  logic clk = 0, rst_n = 0;
  logic ctrl_in_valid, ctrl_in_ready, ctrl_out_valid, ctrl_out_ready;
  cu_cfg_t ctrl_in, ctrl_out;
  logic w_in_valid, w_in_ready, w_out_valid, w_out_ready;
  logic [VW-1:0] w_in, w_out;
  logic x_in_valid, x_in_ready, x_out_valid, x_out_ready;
  logic [VW-1:0] x_in, x_out;
  logic r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  fp16_t r_in, r_out;
  logic busy;
  int checks = 0, failures = 0;
  int pct;  // percentage of cycles a producer/consumer is willing

  processing_element #(.NUM_PE(NUM_PE), .ID(ID), .VEC(VEC), .WDEPTH(WDEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [VW-1:0] rand_vec();
    logic [VW-1:0] v;
    for (int l = 0; l < VEC; l++) v[16*l +: 16] = ref_f2h(rand_f32());
    return v;
  endfunction

  // queues: stimulus and expected outputs
  logic [VW-1:0] wq [$], xq [$], w_exp [$], x_exp [$];
  fp16_t         rq [$], r_exp [$];
  cu_cfg_t       c_exp [$];
  bit            ctrl_pending;
  bit            w_hold = 0, x_hold = 0, r_hold = 0;
  cu_cfg_t       ctrl_word;

  // producers
  always @(negedge clk) begin
    ctrl_in_valid <= ctrl_pending;
    ctrl_in       <= ctrl_word;
    // a producer keeps offering a word until it is taken
    if (!w_hold) begin
      w_in_valid  <= (wq.size() != 0) && ($urandom_range(99, 0) < pct);
      w_in        <= (wq.size() != 0) ? wq[0] : '0;
    end
    if (!x_hold) begin
      x_in_valid  <= (xq.size() != 0) && ($urandom_range(99, 0) < pct);
      x_in        <= (xq.size() != 0) ? xq[0] : '0;
    end
    if (!r_hold) begin
      r_in_valid  <= (rq.size() != 0) && ($urandom_range(99, 0) < pct);
      r_in        <= (rq.size() != 0) ? rq[0] : '0;
    end
    ctrl_out_ready <= ($urandom_range(99, 0) < pct);
    w_out_ready    <= ($urandom_range(99, 0) < pct);
    x_out_ready    <= ($urandom_range(99, 0) < pct);
    r_out_ready    <= ($urandom_range(99, 0) < pct);
  end

  // handshakes, checked at the clock edge
  always @(posedge clk) if (rst_n) begin
    w_hold = w_in_valid && !w_in_ready;
    x_hold = x_in_valid && !x_in_ready;
    r_hold = r_in_valid && !r_in_ready;
    if (ctrl_in_valid && ctrl_in_ready) ctrl_pending = 0;
    if (w_in_valid && w_in_ready) void'(wq.pop_front());
    if (x_in_valid && x_in_ready) void'(xq.pop_front());
    if (r_in_valid && r_in_ready) void'(rq.pop_front());
    if (ctrl_out_valid && ctrl_out_ready) begin
      checks++;
      if (c_exp.size() == 0 || ctrl_out !== c_exp[0]) begin
        failures++; $display("FAIL control word");
      end
      if (c_exp.size() != 0) void'(c_exp.pop_front());
    end
    if (w_out_valid && w_out_ready) begin
      checks++;
      if (w_exp.size() == 0 || w_out !== w_exp[0]) begin
        failures++; $display("FAIL forwarded weight");
      end
      if (w_exp.size() != 0) void'(w_exp.pop_front());
    end
    if (x_out_valid && x_out_ready) begin
      checks++;
      if (x_exp.size() == 0 || x_out !== x_exp[0]) begin
        failures++; $display("FAIL forwarded input");
      end
      if (x_exp.size() != 0) void'(x_exp.pop_front());
    end
    if (r_out_valid && r_out_ready) begin
      checks++;
      if (r_exp.size() == 0 || r_out !== r_exp[0]) begin
        failures++;
        if (failures < 10) $display("FAIL result %h expected %h", r_out, r_exp.size() ? r_exp[0] : 16'hx);
      end
      if (r_exp.size() != 0) void'(r_exp.pop_front());
    end
  end

  task automatic call(input int w, input int h, input int c, input int n, input int size,
                      input int stride);
    int oh, ow, cgs, flen, npix, guard;
    logic [VW-1:0] filt [$];
    oh = (h + 2 * (size / 2) - size) / stride + 1;
    ow = (w + 2 * (size / 2) - size) / stride + 1;
    npix = oh * ow;
    cgs = (c + VEC - 1) / VEC;
    flen = size * size * cgs;
    ctrl_word = '{w: 16'(w), h: 16'(h), c: 16'(c), n: 16'(n), size: 8'(size), stride: 8'(stride)};
    c_exp.push_back(ctrl_word);
    ctrl_pending = 1;
    // filters ID..n-1 arrive; the first is kept
    for (int f = ID; f < n; f++)
      for (int k = 0; k < flen; k++) begin
        logic [VW-1:0] v;
        v = rand_vec();
        for (int l = 0; l < VEC; l++) if ((k % cgs) * VEC + l >= c) v[16*l +: 16] = 16'h0000;
        wq.push_back(v);
        if (f == ID) filt.push_back(v);
        else w_exp.push_back(v);
      end
    for (int p = 0; p < npix; p++) begin
      fp16_t acc [];
      acc = new[VEC];
      for (int l = 0; l < VEC; l++) acc[l] = 16'h0000;
      for (int k = 0; k < flen; k++) begin
        logic [VW-1:0] v;
        v = rand_vec();
        xq.push_back(v);
        x_exp.push_back(v);
        if (k == flen - 1) begin
          for (int l = 0; l < VEC; l++)
            acc[l] = ref_add(acc[l], ref_mul(v[16*l +: 16], filt.size() ? filt[k][16*l +: 16] : 16'h0));
        end else begin
          for (int l = 0; l < VEC; l++)
            acc[l] = ref_add(acc[l], ref_mul(v[16*l +: 16], filt.size() ? filt[k][16*l +: 16] : 16'h0));
        end
      end
      // upstream results of this pixel
      for (int u = 0; u < ((n > ID) ? ID : n); u++) begin
        fp16_t r;
        r = ref_f2h(rand_f32());
        rq.push_back(r);
        r_exp.push_back(r);
      end
      if (n > ID) r_exp.push_back(ref_reduce(acc, VEC));
    end
    guard = 0;
    while ((c_exp.size() || w_exp.size() || x_exp.size() || r_exp.size() || busy) && guard < 100000) begin
      @(posedge clk);
      guard++;
    end
    checks++;
    if (guard >= 100000 || wq.size() || xq.size() || rq.size()) begin
      failures++;
      $display("FAIL call did not complete: %0d %0d %0d %0d", c_exp.size(), w_exp.size(), x_exp.size(), r_exp.size());
    end
  endtask

  initial begin
    int t0, t1;
    ctrl_pending = 0; ctrl_word = '0; pct = 70;
    ctrl_in_valid = 0; w_in_valid = 0; x_in_valid = 0; r_in_valid = 0;
    ctrl_out_ready = 0; w_out_ready = 0; x_out_ready = 0; r_out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    call(4, 3, 6, 3, 3, 1);      // active PE, one filter passed on, fake channels
    call(5, 5, 4, 1, 1, 2);      // no filter for this PE: pass-through only
    call(6, 6, 8, 2, 3, 2);      // active, last filter of the call
    // rate: all producers and consumers always willing
    pct = 100;
    @(posedge clk);
    t0 = $time;
    call(4, 4, 8, 2, 1, 1);      // 16 pixels x 2 vectors
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 > 16 * 2 + 12) begin
      failures++;
      $display("FAIL rate: 32 input vectors took %0d cycles", (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
