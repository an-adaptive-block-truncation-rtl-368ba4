// tb_abtc_encoder_cif: the encoder set to the CIF frame size, 352x288
// (88 x 72 blocks), the size of the evaluation video sequences.  Three
// frames are sent without gaps, a key frame and two predicted frames, each
// with one column of the threshold table used for those sequences:
// th_am/th_sae/cut-error of 2/32/0 (lowest ratio of the first sequence),
// 13/208/4 (highest ratio of the second) and 5/88/2 (middle of the third).
// th_sad and th_map are not part of that table; 40 and 5 are used.  Every
// output word, the last-word flag and the per-block decision are compared
// with abtc_model_pkg, and the time from the last pixel to the last word is
// checked against 2*W + 40 cycles.
module tb_abtc_encoder_cif;
  import abtc_pkg::*;
  import abtc_model_pkg::*;

  localparam int W = 352, H = 288, NB = (W / 4) * (H / 4), NFRAMES = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic in_valid = 0, in_sof = 0, in_key = 0;
  rgb_t in_pix;
  logic out_valid, out_last, stat_valid, stat_spf, stat_spb;
  logic [31:0] out_word;
  blk_type_t stat_type;
  // the decoder is fed with the encoder's own words, queued here because
  // the encoder cannot be stalled; each frame is decoded with its own mode
  logic dec_in_ready, dec_out_valid, dec_out_sof;
  logic dv = 0, take = 0, ds = 0;
  logic [31:0] dw = 0;
  logic [2:0]  dc = 0;
  logic [31:0] dq_w [$];
  logic [3:0]  dq_m [$];
  int          dq_f [$];
  int          wf = 0;
  pix_t dec_out_y [BLK_PIX];
  pix_t dec_out_cb, dec_out_cr;
  logic [$clog2((W / 4) * (H / 4))-1:0] dec_out_idx;
  int   n_dec = 0;

  abtc_encoder #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .cfg, .in_valid, .in_sof, .in_key, .in_pix,
    .out_valid, .out_word, .out_last, .stat_valid, .stat_spf, .stat_spb, .stat_type,
    .dec_cut(dc), .dec_srq_en(ds), .dec_in_valid(dv), .dec_in_word(dw),
    .dec_in_ready, .dec_out_valid, .dec_out_y, .dec_out_cb, .dec_out_cr, .dec_out_idx, .dec_out_sof
  );

  always @(posedge clk) if (rst_n && out_valid) begin
    dq_w.push_back(out_word);
    dq_m.push_back({cfg.cut, cfg.srq_en});
    dq_f.push_back(wf);
    if (out_last) wf++;
  end
  // a frame's words go in once the previous frame is fully decoded
  always @(negedge clk) begin
    if (take) begin
      void'(dq_w.pop_front()); void'(dq_m.pop_front()); void'(dq_f.pop_front());
    end
    dv = 0;
    if (dq_w.size() > 0 && n_dec >= dq_f[0] * NB) begin
      dv = 1; dw = dq_w[0]; {dc, ds} = dq_m[0];
    end
    take = dv && dec_in_ready;
  end
  // decoded blocks come back in order, one per block
  always @(posedge clk) if (rst_n) begin
    if (dec_out_valid) begin
      check(int'(dec_out_idx) == n_dec % ((W / 4) * (H / 4)), "decoded block order");
      n_dec++;
    end
  end

  int checks = 0, failures = 0;
  int img_r [H][W], img_g [H][W], img_b [H][W];
  int prev_r [H][W];
  logic [31:0] exp_words [$];
  bit          exp_last  [$];
  int          exp_kind  [$];
  mmom_t       store [NB];
  mintra_t     st;
  int          frames_done = 0;
  int          n_kind [5];
  int          n_spb_type [3];
  int          n_srq = 0, n_pad = 0, n_keysup = 0, n_cut = 0;
  longint      cyc = 0;

  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // pixel value of block (bx,by), position (i,j) for frame f
  function automatic void make_frame(int f);
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) begin
        int bx = xx / 4, by = yy / 4, i = yy % 4, j = xx % 4, v;
        int cr_ = 0, cb_ = 0;
        case (by % 4)
          0: v = (bx < 4) ? 100 + (f == 4 ? bx : 0) : ((j < 2) ? 90 : 110);
          1: begin
               // pattern blocks; an odd block repeats its left neighbour
               // with a small offset, so it is an SPB pattern block
               automatic int seed = (bx / 2) * 16 + i * 4 + j;
               v = (seed * 73 + 11) % 256;
               if (bx % 2 == 1) v = sat(v + ((i + j) % 2), 0, 255);
               if (f >= 3) v = sat(v + f, 0, 255);
             end
          2: begin
               v = (f == 0 || f == 2) ? 40 + 30 * j + 5 * i + 3 * bx : $urandom_range(0, 255);
               cr_ = 20 * (bx % 3);
             end
          default: begin
               v = 160 + ((i * 4 + j) % 3) + 2 * bx;
               cb_ = 15 * (bx % 2);
             end
        endcase
        if (f == 4 && by >= 2) v = $urandom_range(0, 255);
        v = sat(v, 0, 255);
        img_r[yy][xx] = sat(v + cr_, 0, 255);
        img_g[yy][xx] = v;
        img_b[yy][xx] = sat(v + cb_, 0, 255);
      end
  endfunction

  function automatic mcfg_t to_m(cfg_t c);
    mcfg_t m;
    m.th_am = c.th_am; m.th_sae = c.th_sae; m.th_sad = c.th_sad;
    m.th_map = c.th_map; m.cut = c.cut; m.srq = c.srq_en;
    return m;
  endfunction

  // model: expected words and decisions of one frame
  function automatic void model_frame(bit key);
    bitq_t all, q;
    int yb [16], cbb [16], crb [16], kind, yy, cbv, crv;
    mmom_t cur;
    mcfg_t mc = to_m(cfg);
    bit ref_ok = (frames_done > 0) && !key;
    for (int by = 0; by < H / 4; by++)
      for (int bx = 0; bx < W / 4; bx++) begin
        int idx = by * (W / 4) + bx;
        for (int k = 0; k < 16; k++) begin
          int px = bx * 4 + k % 4, py = by * 4 + k / 4;
          ycc(img_r[py][px], img_g[py][px], img_b[py][px], yy, cbv, crv);
          yb[k] = yy; cbb[k] = cbv; crb[k] = crv;
        end
        q = encode_block(yb, cbb, crb, mc, idx == 0, ref_ok, store[idx], st, cur, kind);
        // would this block have been SPF had the frame not been a key frame?
        if (key && frames_done > 0) begin
          mintra_t tmp = st;
          mmom_t c2; int k2;
          void'(encode_block(yb, cbb, crb, mc, idx == 0, 1'b1, store[idx], tmp, c2, k2));
          if (k2 == 4) n_keysup++;
        end
        store[idx] = cur;
        exp_kind.push_back(kind);
        n_kind[kind]++;
        if (kind == 3) n_spb_type[cur.btype]++;
        if (kind == 2 && mc.srq) n_srq++;
        if (kind == 2 && !mc.srq && mc.cut != 0) n_cut++;
        all = {all, q};
      end
    if (all.size() % 32 != 0) n_pad++;
    while (all.size() % 32 != 0) all.push_back(1'b0);
    for (int w = 0; w < all.size() / 32; w++) begin
      logic [31:0] v;
      for (int b = 0; b < 32; b++) v[31 - b] = all[w * 32 + b];
      exp_words.push_back(v);
      exp_last.push_back(w == all.size() / 32 - 1);
    end
    frames_done++;
  endfunction

  // output monitor
  int got_last = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      if (exp_words.size() == 0) check(0, "unexpected output word");
      else begin
        logic [31:0] ew;
        bit el;
        ew = exp_words.pop_front();
        el = exp_last.pop_front();
        check(out_word == ew, $sformatf("word %h expected %h", out_word, ew));
        check(out_last == el, "last flag");
      end
      if (out_last) got_last++;
    end
    if (stat_valid) begin
      int k, ek;
      k = stat_spf ? 4 : stat_spb ? 3 : int'(stat_type);
      if (exp_kind.size() == 0) check(0, "unexpected block decision");
      else begin
        ek = exp_kind.pop_front();
        check(k == ek, $sformatf("block kind %0d expected %0d", k, ek));
      end
    end
  end

  task automatic send_frame(int f, bit key, bit gaps);
    longint t_last;
    int lasts = got_last;
    make_frame(f);
    model_frame(key);
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) begin
        if (gaps) while ($urandom_range(0, 3) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_sof   <= (xx == 0 && yy == 0);
        in_key   <= key;
        in_pix   <= '{r: 8'(img_r[yy][xx]), g: 8'(img_g[yy][xx]), b: 8'(img_b[yy][xx])};
        @(posedge clk);
      end
    in_valid <= 0;
    in_sof <= 0;
    t_last = cyc;
    while (got_last == lasts) @(posedge clk);
    if (!gaps) check(cyc - t_last <= 2 * W + 40,
                     $sformatf("frame %0d finished %0d cycles after its last pixel", f, cyc - t_last));
    repeat (5) @(posedge clk);
  endtask

  initial begin
    cfg = '{th_am: 8'd2, th_sae: 12'd32, th_sad: 12'd40, th_map: 5'd5, cut: 3'd0, srq_en: 1'b0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    send_frame(0, 1'b1, 1'b0);
    cfg = '{th_am: 8'd13, th_sae: 12'd208, th_sad: 12'd40, th_map: 5'd5, cut: 3'd4, srq_en: 1'b0};
    send_frame(1, 1'b0, 1'b0);
    cfg = '{th_am: 8'd5, th_sae: 12'd88, th_sad: 12'd40, th_map: 5'd5, cut: 3'd2, srq_en: 1'b0};
    send_frame(2, 1'b0, 1'b0);
    repeat (20) @(posedge clk);
    check(exp_words.size() == 0, "all expected words seen");
    check(exp_kind.size() == 0, "all block decisions seen");
    for (int k = 0; k < 20000 && n_dec < frames_done * NB; k++) @(posedge clk);
    check(n_dec == frames_done * NB, $sformatf("decoded %0d blocks", n_dec));
    $display("mechanisms: uniform=%0d normal=%0d pattern=%0d spb=%0d (u%0d n%0d p%0d) spf=%0d srq=%0d cut=%0d pad=%0d keysup=%0d",
             n_kind[1], n_kind[0], n_kind[2], n_kind[3], n_spb_type[1], n_spb_type[0],
             n_spb_type[2], n_kind[4], n_srq, n_cut, n_pad, n_keysup);
    check(n_kind[1] > 0, "uniform block seen");
    check(n_kind[0] > 0, "normal block seen");
    check(n_kind[2] > 0, "pattern block seen");
    check(n_spb_type[1] > 0, "SPB uniform seen");
    check(n_spb_type[0] > 0, "SPB normal seen");
    check(n_spb_type[2] > 0, "SPB pattern seen");
    check(n_kind[4] > 0, "SPF seen");
    check(n_cut > 0, "cut-error pattern block seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
