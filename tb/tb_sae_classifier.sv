// tb_sae_classifier: 5-bit AM, SAE and block type against the model for
// random blocks of varying contrast and random thresholds; counts that
// all three types and the AM saturation occurred.
module tb_sae_classifier;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  pix_t x [BLK_PIX];
  pix_t mean;
  logic [6:0] am;
  logic [15:0] bp;
  logic [7:0] th_am;
  logic [SAE_W-1:0] th_sae;
  logic [AM_W-1:0] am5;
  logic [SAE_W-1:0] sae;
  blk_type_t btype;
  int checks = 0, failures = 0, seen [3], n_sat = 0;
  sae_classifier dut (.x, .mean, .am, .bp, .th_am, .th_sae, .am5, .sae, .btype);

  initial begin
    repeat (4000) begin
      int y [16], me [16], s, base, amp;
      mmom_t m;
      mcfg_t c;
      c.th_am = $urandom_range(1, 12);
      c.th_sae = $urandom_range(10, 300);
      base = $urandom_range(0, 255);
      amp = 1 << $urandom_range(0, 7);
      for (int i = 0; i < 16; i++) begin
        y[i] = sat(base + $urandom_range(0, amp) - amp / 2, 0, 255);
        x[i] = 8'(y[i]);
      end
      moments(y, c, m, me, s);
      mean = 8'(m.mean); am = 7'(m.am); bp = m.bp;
      th_am = 8'(c.th_am); th_sae = 12'(c.th_sae);
      #1;
      checks++;
      if (am5 != 5'(m.am > 31 ? 31 : m.am) || sae != 12'(s) || int'(btype) != m.btype) begin
        failures++;
        if (failures < 10) $display("FAIL am5 %0d sae %0d/%0d type %0d/%0d", am5, sae, s, btype, m.btype);
      end
      seen[m.btype]++;
      if (m.am > 31) n_sat++;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || n_sat == 0) failures++;
    $display("types: normal=%0d uniform=%0d pattern=%0d saturated_am=%0d", seen[0], seen[1], seen[2], n_sat);
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
