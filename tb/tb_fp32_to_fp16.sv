// tb_fp32_to_fp16: checks FP32->FP16 narrowing against the reference on
// directed values (zeros, binary32 subnormals, the binary16 overflow and
// underflow thresholds, infinities, NaN) and on random binary32 words whose
// exponents are concentrated around the binary16 range.
module tb_fp32_to_fp16;
  import tb_ref_pkg::*;
  logic [31:0] a;
  logic [15:0] y;
  int checks = 0, failures = 0;

  fp32_to_fp16 dut (.a, .y);

  task automatic check(input logic [31:0] x);
    logic [15:0] e;
    a = x;
    #1;
    e = ref_f2h(x);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL f2h %h -> %h, expected %h", x, y, e);
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
    logic [31:0] d [] = '{32'h00000000, 32'h80000000, 32'h00000001, 32'h3F800000,
                          32'h477FE000, 32'h477FF000, 32'h47800000, 32'h33800000,
                          32'h33000000, 32'h33000001, 32'h387FC000, 32'h7F800000,
                          32'hFF800000, 32'h7FC00000, 32'h3F801000, 32'h3F803000};
    foreach (d[i]) check(d[i]);
    for (int i = 0; i < 40000; i++) begin
      logic [31:0] x;
      x = $urandom;
      if (i % 4 != 0) x[30:23] = 8'(127 + $urandom_range(40, 0) - 28);
      check(x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
