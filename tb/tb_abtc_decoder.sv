// tb_abtc_decoder: self-checking test of abtc_decoder on a 32x16 frame
// (32 blocks) over 12 frames.  Blocks are made directly in YCbCr: flat,
// two-level, random, near copies of the block before and near copies of
// the previous frame's block, so every record type appears.  The reference
// encoder of abtc_model_pkg turns them into records, which are packed into
// 32-bit words with zero padding at each frame end and fed to the decoder
// with random gaps, honouring in_ready.  The expected reconstruction of
// each block is worked out here from the block's moments and errors: the
// mean, mean -/+ AM, mean -/+ (a << cut) or mean -/+ 2k^2, and for SPB and
// SPF the previously expected block.  Frames alternate between linear
// coding with cut-error 0..2 and square-root coding.  It counts each record
// type and fails if one never occurred.
module tb_abtc_decoder;
  import abtc_pkg::*;
  import abtc_model_pkg::*;

  localparam int W = 32, H = 16, NB = (W / 4) * (H / 4), NFRAMES = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  cut = 0;
  logic        srq_en = 0;
  logic        in_valid = 0, in_ready;
  logic [31:0] in_word = 0;
  logic        out_valid, out_sof;
  pix_t        out_y [BLK_PIX];
  pix_t        out_cb, out_cr;
  logic [$clog2(NB)-1:0] out_idx;

  abtc_decoder #(.WIDTH(W), .HEIGHT(H)) dut (
    .clk, .rst_n, .cut, .srq_en, .in_valid, .in_word, .in_ready,
    .out_valid, .out_y, .out_cb, .out_cr, .out_idx, .out_sof
  );

  int checks = 0, failures = 0;
  int n_kind [5];
  int ref_y [NB][16], ref_cb [NB], ref_cr [NB];   // previous frame, expected
  int prv_y [16], prv_cb, prv_cr;                 // previous block, expected
  int src_y [NB][16];                             // previous frame, source
  logic [127:0] exp_y [$];          // expected Y, pixel i in bits 8i+7:8i
  int exp_cb [$], exp_cr [$], exp_idx [$];
  logic [31:0] words [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected decoded luminance of a coded (not copied) block
  function automatic void recon(input mmom_t m, input int e [16], input mcfg_t c,
                                output int y [16]);
    int am5, a, mag;
    am5 = m.am > 31 ? 31 : m.am;
    for (int i = 0; i < 16; i++) begin
      case (m.btype)
        1: mag = 0;
        0: mag = am5;
        default: begin
          if (c.srq) begin a = srq_k(e[i]); mag = 2 * a * a; end
          else begin a = sat(iabs(e[i]) >> c.cut, 0, 127); mag = a << c.cut; end
        end
      endcase
      y[i] = sat(m.bp[i] ? m.mean - mag : m.mean + mag, 0, 255);
    end
  endfunction

  task automatic make_frame(int f, mcfg_t c);
    bitq_t bits, r;
    mintra_t st;
    mmom_t cur, pf;
    int y [16], cb [16], cr [16], kind, ey [16], ecb, ecr, e [16], sae;
    int base;
    st.have_prev = 0;
    bits.delete();
    for (int b = 0; b < NB; b++) begin
      base = $urandom_range(20, 230);
      case ($urandom_range(0, 5))
        0: foreach (y[i]) y[i] = base + $urandom_range(0, 1);
        1: foreach (y[i]) y[i] = sat(base + ((i % 4 < 2) ? -25 : 25), 0, 255);
        2: foreach (y[i]) y[i] = $urandom_range(0, 255);
        3: if (b > 0) foreach (y[i]) y[i] = src_y[b][i]; else foreach (y[i]) y[i] = base;
        default: if (f > 0) foreach (y[i]) y[i] = src_y[b][i]; else foreach (y[i]) y[i] = base;
      endcase
      // case 3 reuses the previous block of this frame (stored in src_y below)
      foreach (cb[i]) begin cb[i] = 100 + 4 * (b % 5); cr[i] = 160 - 4 * (b % 3); end
      pf.btype = 1; pf.mean = 0; pf.am = 0; pf.bp = 0;
      if (f > 0) begin
        int py [16];
        mcfg_t c0;
        c0 = c;
        foreach (py[i]) py[i] = src_y[b][i];
        moments(py, c0, pf, e, sae);
      end
      r = encode_block(y, cb, cr, c, b == 0, f > 0, pf, st, cur, kind);
      n_kind[kind]++;
      foreach (r[i]) bits.push_back(r[i]);
      moments(y, c, cur, e, sae);
      if (kind == 4) begin
        ey = ref_y[b]; ecb = ref_cb[b]; ecr = ref_cr[b];
      end else if (kind == 3) begin
        ey = prv_y; ecb = prv_cb; ecr = prv_cr;
      end else begin
        recon(cur, e, c, ey);
        ecb = ((cb[0] / 4) & 63) * 4;
        ecr = ((cr[0] / 4) & 63) * 4;
      end
      begin
        logic [127:0] pk;
        foreach (ey[i]) pk[8*i +: 8] = 8'(ey[i]);
        exp_y.push_back(pk);
      end
      exp_cb.push_back(ecb); exp_cr.push_back(ecr); exp_idx.push_back(b);
      ref_y[b] = ey; ref_cb[b] = ecb; ref_cr[b] = ecr;
      prv_y = ey; prv_cb = ecb; prv_cr = ecr;
      // the next block of type 3 copies this one; the next frame sees this one
      if (b + 1 < NB) foreach (y[i]) src_y[b + 1][i] = (f > 0 && $urandom_range(0, 1) == 1) ? src_y[b + 1][i] : y[i];
      foreach (y[i]) src_y[b][i] = y[i];
    end
    while (bits.size() % 32 != 0) bits.push_back(1'b0);
    for (int k = 0; k < bits.size(); k += 32) begin
      logic [31:0] wv;
      for (int j = 0; j < 32; j++) wv[31 - j] = bits[k + j];
      words.push_back(wv);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (exp_idx.size() == 0) check(0, "unexpected block");
    else begin
      bit ok;
      logic [127:0] ey;
      int xcb, xcr, xidx;
      ey = exp_y.pop_front();
      ok = 1;
      for (int i = 0; i < 16; i++) if (out_y[i] != ey[8*i +: 8]) ok = 0;
      check(ok, $sformatf("Y of block %0d", out_idx));
      xcb = exp_cb.pop_front();
      xcr = exp_cr.pop_front();
      xidx = exp_idx.pop_front();
      check(out_cb == pix_t'(xcb), "Cb");
      check(out_cr == pix_t'(xcr), "Cr");
      check(int'(out_idx) == xidx, "block index");
      check(out_sof == (xidx == 0), "sof");
    end
  end

  initial begin
    mcfg_t c;
    c = '{th_am: 4, th_sae: 60, th_sad: 40, th_map: 5, cut: 0, srq: 0};
    for (int b = 0; b < NB; b++) foreach (src_y[b][i]) src_y[b][i] = 128;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      c.srq = (f % 3 == 2);
      c.cut = f % 3;
      // the mode must be in place before the frame's first record is parsed
      while (exp_idx.size() > 0) @(posedge clk);
      make_frame(f, c);
      @(negedge clk);
      cut = 3'(c.cut); srq_en = c.srq;
      while (words.size() > 0) begin
        bit take;
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) in_valid = 0;
        else begin in_valid = 1; in_word = words[0]; end
        take = in_valid && in_ready;
        @(posedge clk);
        if (take) void'(words.pop_front());
      end
      @(negedge clk) in_valid = 0;
    end
    repeat (200) @(posedge clk);
    check(exp_idx.size() == 0, "all blocks decoded");
    $display("records: normal=%0d uniform=%0d pattern=%0d spb=%0d spf=%0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_kind[4]);
    for (int k = 0; k < 5; k++) check(n_kind[k] > 0, $sformatf("record kind %0d seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
