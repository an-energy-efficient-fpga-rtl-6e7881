// tb_fp16_mul: checks the binary16 multiplier against the real-arithmetic
// reference of tb_ref_pkg on directed corner cases (zeros, subnormals,
// underflow to subnormals and zero, overflow, infinities, NaN) and on random
// operand pairs, half of them with exponents that sum near the bias so that
// products land on normal, subnormal and overflowing results alike.
module tb_fp16_mul;
  import tb_ref_pkg::*;
  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  fp16_mul dut (.a, .b, .y);

  task automatic check(input logic [15:0] x, input logic [15:0] z);
    logic [15:0] exp_y;
    a = x; b = z;
    #1;
    exp_y = ref_mul(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d [] = '{16'h0000, 16'h8000, 16'h0001, 16'h8001, 16'h03FF, 16'h0400,
                          16'h3C00, 16'hBC00, 16'h7BFF, 16'hFBFF, 16'h7C00, 16'hFC00,
                          16'h7E00, 16'h3555, 16'h0200, 16'h3C01, 16'h1400};
    foreach (d[i]) foreach (d[j]) check(d[i], d[j]);
    for (int i = 0; i < 40000; i++) begin
      logic [15:0] x, z;
      x = 16'($urandom);
      z = 16'($urandom);
      if (i % 2 == 0) z[14:10] = 5'd30 - x[14:10] + 5'($urandom_range(4, 0));
      check(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
