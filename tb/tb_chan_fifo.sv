// tb_chan_fifo: drives the channel FIFO with random write and read requests
// and compares every word read with a queue model; also checks that the FIFO
// blocks the writer exactly when it holds DEPTH words and the reader exactly
// when it is empty, and that it fills and drains completely at least once.
module tb_chan_fifo;
  localparam int W = 12, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  chan_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      // phases with more writes than reads, then the reverse
      int pw;
      pw = ((cyc / 200) % 2 == 0) ? 80 : 20;
      @(negedge clk);
      in_valid  = ($urandom_range(99, 0) < pw);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(99, 0) < 100 - pw);
      #1;
      checks++;
      if (in_ready !== (q.size() < DEPTH) || out_valid !== (q.size() != 0)) begin
        failures++;
        $display("FAIL flags at size %0d: in_ready=%b out_valid=%b", q.size(), in_ready, out_valid);
      end
      if (q.size() == DEPTH) fulls++;
      if (q.size() == 0) empties++;
      if (out_valid && out_ready) begin
        logic [W-1:0] e;
        e = q.pop_front();
        checks++;
        if (out_data !== e) begin
          failures++;
          $display("FAIL data %h expected %h", out_data, e);
        end
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("FAIL never full (%0d) or never empty (%0d)", fulls, empties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
