// tb_am_module: AM, bit plane, mean errors and their absolute sum against
// the model, for flat, two-level, extreme (0/255 halves) and random blocks.
module tb_am_module;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  pix_t x [BLK_PIX];
  pix_t mean;
  logic [6:0] am;
  logic [15:0] bp;
  err_t e [BLK_PIX];
  logic [11:0] sum_abs;
  int checks = 0, failures = 0;
  am_module dut (.x, .mean, .am, .bp, .e, .sum_abs);

  task automatic run(int mode);
    int y [16], me [16], sae, sa;
    mmom_t m;
    mcfg_t c = '{th_am: 4, th_sae: 50, th_sad: 50, th_map: 5, cut: 0, srq: 0};
    for (int i = 0; i < 16; i++) begin
      case (mode)
        0: y[i] = 77;
        1: y[i] = (i % 4 < 2) ? 20 : 220;
        2: y[i] = (i < 8) ? 0 : 255;
        default: y[i] = $urandom_range(0, 255);
      endcase
      x[i] = 8'(y[i]);
    end
    moments(y, c, m, me, sae);
    mean = 8'(m.mean);
    #1;
    sa = 0;
    foreach (me[i]) sa += iabs(me[i]);
    checks++;
    if (am != 7'(m.am) || bp != m.bp || sum_abs != 12'(sa)) begin
      failures++;
      if (failures < 10) $display("FAIL am %0d/%0d bp %h/%h", am, m.am, bp, m.bp);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(e[i]) != me[i]) failures++;
    end
  endtask

  initial begin
    run(0); run(1); run(2);
    repeat (2000) run(3);
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
