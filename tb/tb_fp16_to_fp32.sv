// tb_fp16_to_fp32: checks FP16->FP32 widening exhaustively, all 65536 inputs,
// against the exact re-encoding of tb_ref_pkg.
module tb_fp16_to_fp32;
  import tb_ref_pkg::*;
  logic [15:0] a;
  logic [31:0] y;
  int checks = 0, failures = 0;

  fp16_to_fp32 dut (.a, .y);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic [31:0] e;
      a = 16'(i);
      #1;
      e = ref_h2f(16'(i));
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL h2f %h -> %h, expected %h", a, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
