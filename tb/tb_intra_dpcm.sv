// tb_intra_dpcm: a stream of blocks in which each block is either a small
// perturbation of the previous one or a new random block, with random
// thresholds per run.  The SPB decision is compared with the model (which
// keeps its own copy of the previous block); a frame start in the middle
// must block SPB for that block.  Counts SPB hits for each block type.
module tb_intra_dpcm;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid = 0, sof = 0;
  blk_type_t btype;
  pix_t mean;
  logic [6:0] am;
  logic [15:0] bp;
  err_t e [BLK_PIX];
  cfg_t cfg;
  logic spb;
  int checks = 0, failures = 0, hits [3];
  intra_dpcm dut (.clk, .rst_n, .valid, .sof, .btype, .mean, .am, .bp, .e, .cfg, .spb);

  initial begin
    int y [16], cb [16], cr [16], kind, cnt;
    mintra_t st;
    mmom_t cur, dummy;
    mcfg_t mc;
    bitq_t q;
    st.have_prev = 0;
    cfg = '{th_am: 8'd5, th_sae: 12'd60, th_sad: 12'd40, th_map: 5'd5, cut: 3'd0, srq_en: 1'b0};
    foreach (y[i]) begin y[i] = 100; cb[i] = 128; cr[i] = 128; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cnt = 0; cnt < 3000; cnt++) begin
      int sel, base, amp;
      sel = $urandom_range(0, 9);
      if (cnt % 500 == 0) begin
        cfg.th_am = 8'($urandom_range(2, 10));
        cfg.th_sae = 12'($urandom_range(20, 200));
        cfg.th_sad = 12'($urandom_range(10, 80));
        cfg.th_map = 5'($urandom_range(2, 8));
      end
      if (sel < 6) begin
        foreach (y[i]) y[i] = sat(y[i] + $urandom_range(0, 2) - 1, 0, 255);
      end else begin
        base = $urandom_range(0, 255);
        amp = 1 << $urandom_range(0, 7);
        foreach (y[i]) y[i] = sat(base + $urandom_range(0, amp) - amp / 2, 0, 255);
      end
      mc = '{th_am: cfg.th_am, th_sae: cfg.th_sae, th_sad: cfg.th_sad, th_map: cfg.th_map, cut: 0, srq: 0};
      sof <= (cnt % 700 == 350);
      q = encode_block(y, cb, cr, mc, cnt % 700 == 350, 1'b0, dummy, st, cur, kind);
      // drive the DUT with the same moments
      begin
        int me [16], s;
        mmom_t m;
        moments(y, mc, m, me, s);
        btype <= blk_type_t'(m.btype); mean <= 8'(m.mean); am <= 7'(m.am); bp <= m.bp;
        for (int i = 0; i < 16; i++) e[i] <= 9'(me[i]);
      end
      valid <= 1;
      @(negedge clk);
      checks++;
      if (spb != (kind == 3)) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d spb=%0d exp kind %0d", cnt, spb, kind);
      end
      if (kind == 3) hits[cur.btype]++;
      @(posedge clk);
      valid <= 0;
      @(posedge clk);
    end
    checks++;
    if (hits[0] == 0 || hits[1] == 0 || hits[2] == 0) failures++;
    $display("SPB hits: normal=%0d uniform=%0d pattern=%0d", hits[0], hits[1], hits[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
