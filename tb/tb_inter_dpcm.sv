// tb_inter_dpcm: SPF decision for random pairs of current and previous
// frame moments (close or far apart, all type combinations), with
// ref_ok low forcing no SPF, against the rule written out here.
module tb_inter_dpcm;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  logic ref_ok;
  blk_type_t btype;
  pix_t mean;
  logic [6:0] am;
  logic [15:0] bp;
  moments_t prev;
  cfg_t cfg;
  logic spf;
  int checks = 0, failures = 0, n_spf_u = 0, n_spf_o = 0;
  inter_dpcm dut (.ref_ok, .btype, .mean, .am, .bp, .prev, .cfg, .spf);

  initial begin
    repeat (5000) begin
      int t1, t2, m1, m2, a1, a2, tam, tmap;
      bit [15:0] b1, b2;
      bit exp;
      t1 = $urandom_range(0, 2); t2 = $urandom_range(0, 2);
      m1 = $urandom_range(0, 255); m2 = sat(m1 + $urandom_range(0, 16) - 8, 0, 255);
      a1 = $urandom_range(0, 127); a2 = sat(a1 + $urandom_range(0, 16) - 8, 0, 127);
      b1 = 16'($urandom);
      b2 = b1;
      repeat ($urandom_range(0, 8)) b2[$urandom_range(0, 15)] ^= 1'b1;
      tam = $urandom_range(1, 10); tmap = $urandom_range(1, 8);
      ref_ok = ($urandom_range(0, 9) != 0);
      btype = blk_type_t'(t1); mean = 8'(m1); am = 7'(a1); bp = b1;
      prev = '{btype: blk_type_t'(t2), mean: 8'(m2), am: 7'(a2), bp: b2};
      cfg = '{th_am: 8'(tam), th_sae: 12'd0, th_sad: 12'd0, th_map: 5'(tmap), cut: 3'd0, srq_en: 1'b0};
      #1;
      if (!ref_ok) exp = 0;
      else if (t1 == 1 && t2 == 1) exp = iabs(m1 - m2) < tam;
      else exp = iabs(m1 - m2) < tam && iabs(a1 - a2) < tam && popc(b1 ^ b2) < tmap;
      checks++;
      if (spf != exp) begin
        failures++;
        if (failures < 10) $display("FAIL spf %0d exp %0d", spf, exp);
      end
      if (exp && t1 == 1 && t2 == 1) n_spf_u++;
      if (exp && !(t1 == 1 && t2 == 1)) n_spf_o++;
    end
    checks++;
    if (n_spf_u == 0 || n_spf_o == 0) failures++;
    $display("SPF: uniform pairs=%0d other=%0d", n_spf_u, n_spf_o);
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
