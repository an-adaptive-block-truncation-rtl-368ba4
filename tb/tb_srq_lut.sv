// tb_srq_lut: all 256 entries of the square root quantization table
// against the rule round(sqrt(|E|/2)) limited to 0..7 with the sign, and
// the worked example: error 108 - 70 = 38 gives code 4 (decoded 32).
module tb_srq_lut;
  import abtc_model_pkg::*;
  logic [7:0] e8;
  logic [3:0] code;
  int checks = 0, failures = 0;
  srq_lut dut (.e8, .code);

  initial begin
    for (int i = 0; i < 256; i++) begin
      int v;
      v = (i >= 128) ? i - 256 : i;
      e8 = 8'(i);
      #1;
      checks++;
      if (code[2:0] != 3'(srq_k(v)) || code[3] != (v < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d code=%h exp k=%0d", v, code, srq_k(v));
      end
    end
    e8 = 8'd38;
    #1;
    checks++;
    if (code != 4'd4 || 2 * code[2:0] * code[2:0] != 32) failures++;
    e8 = 8'(-38);
    #1;
    checks++;
    if (code != 4'b1100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
