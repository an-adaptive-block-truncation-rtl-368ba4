// abtc_encoder: adaptive block truncation coding (ABTC) video encoder.
//
// RGB frames arrive in scanline order, at most one pixel per cycle, and
// leave as a stream of 32-bit words holding one variable-length record per
// 4x4 block.  Each block is coded in the cheapest way that keeps it close
// to the original:
//   SPF  same as the co-located block of the previous frame    1 bit
//   SPB  same as the previous block of this frame              3 bits
//   uniform  (AM < th_am): the means only                      23 bits
//   normal   (SAE < th_sae): mean, AM and bit plane            44 bits
//   pattern  otherwise: mean, bit plane and 16 coded errors    42+16n bits
// The luminance is classified and coded; the chroma of every non-copied
// block is sent as two 6-bit means.
//
// Pipeline (one block enters every 8 cycles at the fastest):
//   line_buffer      scanline -> block order, two pixels per beat
//   rgb2ycc x2       colour conversion of both pixels of a beat
//   block_assembler  8 beats -> one block                  (register)
//   S1  mean_tree x3 Y, Cb, Cr means                        (register)
//   S2  am_module    AM, bit plane, mean errors; previous-
//                    frame moments read from moment_store  (register)
//   S3  sae_classifier, pattern_coder, intra_dpcm, inter_dpcm,
//       block_packer; moment_store written                  (register)
//   bitstream_packer records -> 32-bit words, flushed at the end of frame
//
// in_key given with in_sof makes that frame a key frame (no SPF); the first
// frame after reset is always treated as one.  The dec_* ports belong to
// an abtc_decoder placed beside the encoder: it takes a word stream (for
// example this encoder's own, looped back) and returns decoded blocks.  cfg must be held steady
// during a frame.  The stat_* outputs report the decision for every block
// one cycle before its record enters the word packer.  H must be at least
// 8 so that a frame's first block leaves before the next frame starts.
module abtc_encoder
  import abtc_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 480,
  localparam int unsigned NBLK  = (WIDTH / 4) * (HEIGHT / 4),
  localparam int unsigned BW    = $clog2(NBLK)
)(
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic               in_key,
  input  rgb_t               in_pix,
  output logic               out_valid,
  output logic [WORD_W-1:0]  out_word,
  output logic               out_last,
  output logic               stat_valid,
  output logic               stat_spf,
  output logic               stat_spb,
  output blk_type_t          stat_type,
  // decoder, beside the encoder with its own ports
  input  logic [2:0]         dec_cut,
  input  logic               dec_srq_en,
  input  logic               dec_in_valid,
  input  logic [WORD_W-1:0]  dec_in_word,
  output logic               dec_in_ready,
  output logic               dec_out_valid,
  output pix_t               dec_out_y [BLK_PIX],
  output pix_t               dec_out_cb,
  output pix_t               dec_out_cr,
  output logic [BW-1:0]      dec_out_idx,
  output logic               dec_out_sof
);
  // ---------------- block-order stream ----------------
  logic          lb_valid, lb_first, lb_last, lb_sof, lb_eof;
  rgb_t          lb_pix [2];
  ycc_t          lb_ycc [2];
  logic [BW-1:0] lb_blk;

  line_buffer #(.W(WIDTH), .H(HEIGHT)) u_lb (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid(lb_valid), .out_pix(lb_pix), .out_first(lb_first),
    .out_last(lb_last), .out_sof(lb_sof), .out_eof(lb_eof), .out_blk(lb_blk)
  );

  rgb2ycc u_csc0 (.rgb(lb_pix[0]), .ycc(lb_ycc[0]));
  rgb2ycc u_csc1 (.rgb(lb_pix[1]), .ycc(lb_ycc[1]));

  logic          ba_valid, ba_sof, ba_eof;
  pix_t          ba_y [BLK_PIX], ba_cb [BLK_PIX], ba_cr [BLK_PIX];
  logic [BW-1:0] ba_idx;

  block_assembler #(.BW(BW)) u_ba (
    .clk, .rst_n, .in_valid(lb_valid), .in_pix(lb_ycc), .in_first(lb_first),
    .in_sof(lb_sof), .in_eof(lb_eof), .in_blk(lb_blk),
    .blk_valid(ba_valid), .y(ba_y), .cb(ba_cb), .cr(ba_cr),
    .blk_sof(ba_sof), .blk_eof(ba_eof), .blk_idx(ba_idx)
  );

  // ---------------- frame bookkeeping ----------------
  logic key_in, key_cur, have_prev_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_in <= 1'b1;
      key_cur <= 1'b1;
    end else begin
      if (in_valid && in_sof) key_in <= in_key;
      if (lb_valid && lb_sof) key_cur <= key_in;
    end
  end

  // ---------------- S1: means ----------------
  pix_t m_y, m_cb, m_cr;
  logic [11:0] sum_y_unused, sum_cb_unused, sum_cr_unused;

  mean_tree u_mean_y  (.x(ba_y),  .sum(sum_y_unused),  .mean(m_y));
  mean_tree u_mean_cb (.x(ba_cb), .sum(sum_cb_unused), .mean(m_cb));
  mean_tree u_mean_cr (.x(ba_cr), .sum(sum_cr_unused), .mean(m_cr));

  logic          s1_valid, s1_sof, s1_eof;
  logic [BW-1:0] s1_idx;
  pix_t          s1_y [BLK_PIX];
  pix_t          s1_mean;
  logic [CMEAN_W-1:0] s1_cb6, s1_cr6;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0; s1_sof <= 1'b0; s1_eof <= 1'b0; s1_idx <= '0;
      s1_mean <= '0; s1_cb6 <= '0; s1_cr6 <= '0;
      for (int i = 0; i < BLK_PIX; i++) s1_y[i] <= '0;
    end else begin
      s1_valid <= ba_valid;
      if (ba_valid) begin
        s1_sof <= ba_sof; s1_eof <= ba_eof; s1_idx <= ba_idx;
        s1_y <= ba_y;
        s1_mean <= m_y;
        s1_cb6 <= m_cb[7:2];
        s1_cr6 <= m_cr[7:2];
      end
    end
  end

  // ---------------- S2: AM, bit plane, errors ----------------
  logic [6:0]  am_c;
  logic [15:0] bp_c;
  err_t        e_c [BLK_PIX];
  logic [11:0] sabs_unused;

  am_module u_am (.x(s1_y), .mean(s1_mean), .am(am_c), .bp(bp_c), .e(e_c), .sum_abs(sabs_unused));

  logic          s2_valid, s2_sof, s2_eof;
  logic [BW-1:0] s2_idx;
  pix_t          s2_y [BLK_PIX];
  pix_t          s2_mean;
  logic [CMEAN_W-1:0] s2_cb6, s2_cr6;
  logic [6:0]    s2_am;
  logic [15:0]   s2_bp;
  err_t          s2_e [BLK_PIX];
  moments_t      prev_m;
  blk_type_t     cur_type;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0; s2_sof <= 1'b0; s2_eof <= 1'b0; s2_idx <= '0;
      s2_mean <= '0; s2_cb6 <= '0; s2_cr6 <= '0; s2_am <= '0; s2_bp <= '0;
      for (int i = 0; i < BLK_PIX; i++) begin
        s2_y[i] <= '0; s2_e[i] <= '0;
      end
    end else begin
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_sof <= s1_sof; s2_eof <= s1_eof; s2_idx <= s1_idx;
        s2_y <= s1_y; s2_mean <= s1_mean; s2_cb6 <= s1_cb6; s2_cr6 <= s1_cr6;
        s2_am <= am_c; s2_bp <= bp_c; s2_e <= e_c;
      end
    end
  end

  moment_store #(.DEPTH(NBLK)) u_store (
    .clk,
    .rd_en(s1_valid), .rd_addr(s1_idx), .rd_data(prev_m),
    .wr_en(s2_valid), .wr_addr(s2_idx),
    .wr_data('{btype: cur_type, mean: s2_mean, am: s2_am, bp: s2_bp})
  );

  // ---------------- S3: decisions and record ----------------
  logic [AM_W-1:0]      am5;
  logic [SAE_W-1:0]     sae_unused;
  logic [NBITS_W-1:0]   nbits;
  logic [AME_MAX_W-1:0] ame [BLK_PIX];
  logic                 spb, spf;
  record_t              rec_c;

  sae_classifier u_cls (
    .x(s2_y), .mean(s2_mean), .am(s2_am), .bp(s2_bp),
    .th_am(cfg.th_am), .th_sae(cfg.th_sae),
    .am5(am5), .sae(sae_unused), .btype(cur_type)
  );

  pattern_coder u_pat (.e(s2_e), .cut(cfg.cut), .srq_en(cfg.srq_en), .nbits(nbits), .ame(ame));

  intra_dpcm u_intra (
    .clk, .rst_n, .valid(s2_valid), .sof(s2_sof), .btype(cur_type),
    .mean(s2_mean), .am(s2_am), .bp(s2_bp), .e(s2_e), .cfg(cfg), .spb(spb)
  );

  inter_dpcm u_inter (
    .ref_ok(have_prev_frame && !key_cur), .btype(cur_type), .mean(s2_mean),
    .am(s2_am), .bp(s2_bp), .prev(prev_m), .cfg(cfg), .spf(spf)
  );

  block_packer u_pack (
    .spf(spf), .spb(spb), .btype(cur_type), .ymean(s2_mean), .am5(am5),
    .bp(s2_bp), .nbits(nbits), .ame(ame), .cb6(s2_cb6), .cr6(s2_cr6), .rec(rec_c)
  );

  logic    s3_valid, s3_eof;
  record_t s3_rec;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_valid <= 1'b0; s3_eof <= 1'b0; s3_rec <= '0;
      have_prev_frame <= 1'b0;
      stat_valid <= 1'b0; stat_spf <= 1'b0; stat_spb <= 1'b0; stat_type <= BT_UNIFORM;
    end else begin
      s3_valid   <= s2_valid;
      stat_valid <= s2_valid;
      if (s2_valid) begin
        s3_eof    <= s2_eof;
        s3_rec    <= rec_c;
        stat_spf  <= spf;
        stat_spb  <= spb && !spf;
        stat_type <= cur_type;
        if (s2_eof) have_prev_frame <= 1'b1;
      end
    end
  end

  bitstream_packer u_bits (
    .clk, .rst_n, .in_valid(s3_valid), .in_rec(s3_rec), .flush(s3_valid && s3_eof),
    .out_valid, .out_word, .out_last
  );

  // ---------------- decoder ----------------
  abtc_decoder #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_dec (
    .clk, .rst_n, .cut(dec_cut), .srq_en(dec_srq_en),
    .in_valid(dec_in_valid), .in_word(dec_in_word), .in_ready(dec_in_ready),
    .out_valid(dec_out_valid), .out_y(dec_out_y), .out_cb(dec_out_cb),
    .out_cr(dec_out_cr), .out_idx(dec_out_idx), .out_sof(dec_out_sof)
  );
endmodule
