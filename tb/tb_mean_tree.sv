// tb_mean_tree: sum and mean of 16 samples against a plain loop, for
// all-zero, all-255 and 3000 random blocks.
module tb_mean_tree;
  import abtc_pkg::*;
  pix_t x [BLK_PIX];
  logic [11:0] sum;
  pix_t mean;
  int checks = 0, failures = 0;
  mean_tree dut (.x, .sum, .mean);

  task automatic run(int mode);
    int s = 0;
    for (int i = 0; i < 16; i++) begin
      x[i] = (mode == 0) ? 8'd0 : (mode == 1) ? 8'd255 : 8'($urandom_range(0, 255));
      s += x[i];
    end
    #1;
    checks++;
    if (sum != 12'(s) || mean != 8'(s / 16)) begin
      failures++;
      $display("FAIL sum %0d mean %0d exp %0d %0d", sum, mean, s, s / 16);
    end
  endtask

  initial begin
    run(0);
    run(1);
    repeat (3000) run(2);
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
