// tb_pattern_coder: bit count and coded magnitudes of the 16 mean errors,
// for every cut-error 0..4 in linear mode and for square root mode,
// against the model; includes all-zero errors (n = 0) and errors beyond
// 7 bits (saturation to 127).
module tb_pattern_coder;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  err_t e [BLK_PIX];
  logic [2:0] cut;
  logic srq_en;
  logic [NBITS_W-1:0] nbits;
  logic [AME_MAX_W-1:0] ame [BLK_PIX];
  int checks = 0, failures = 0;
  pattern_coder dut (.e, .cut, .srq_en, .nbits, .ame);

  task automatic run(int mode, int c, bit s);
    int ev [16], a [16], mx = 0, n = 0, amp;
    amp = 1 << $urandom_range(0, 8);
    for (int i = 0; i < 16; i++) begin
      ev[i] = (mode == 0) ? 0 : (mode == 1) ? ((i % 2) ? 255 : -255)
                                            : sat($urandom_range(0, 2 * amp) - amp, -255, 255);
      e[i] = 9'(ev[i]);
    end
    cut = 3'(c); srq_en = s;
    #1;
    foreach (ev[i]) begin
      a[i] = s ? srq_k(ev[i]) : sat(iabs(ev[i]) >> c, 0, 127);
      if (a[i] > mx) mx = a[i];
    end
    while ((1 << n) <= mx) n++;
    if (s) n = 3;
    checks++;
    if (nbits != 3'(n)) begin
      failures++;
      if (failures < 10) $display("FAIL nbits %0d exp %0d (cut %0d srq %0d)", nbits, n, c, s);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (ame[i] != 7'(a[i])) failures++;
    end
  endtask

  initial begin
    for (int c = 0; c < 5; c++) begin
      run(0, c, 0);
      run(1, c, 0);
      repeat (300) run(2, c, 0);
    end
    run(1, 0, 1);
    repeat (300) run(2, 0, 1);
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
