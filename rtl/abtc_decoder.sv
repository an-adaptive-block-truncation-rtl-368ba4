// abtc_decoder: rebuilds 4x4 YCbCr blocks from the word stream of
// abtc_encoder, doing the encoding steps in reverse.
//
// Words enter a 256-bit bit queue, whose first unread bit is kept in bit 255.
// A word is accepted whenever at most 224 bits are queued (in_ready).  Each
// cycle the head of the queue is parsed.  The first bit is the SPF flag.
// After a 0, two bits give the class: 11 SPB, 01 uniform, 00 normal,
// 10 pattern (whose next 3 bits are the error width n).  The record is
// decoded once all its bits are queued: one block per cycle at most.
//   SPF      copy of the same block of the previous frame (frame store)
//   SPB      copy of the block decoded just before
//   uniform  every pixel = mean
//   normal   mean - AM where the bit plane is 1, mean + AM where it is 0
//   pattern  mean -/+ |E'| by the bit plane.  |E'| is (a << cut) in linear
//            mode and 2k^2 in square-root mode (srq_en).
// Results are clamped to 0..255.  Chroma is one value per block, the 6-bit
// mean scaled back to 8 bits.  The mode (cut, srq_en) is not in the stream,
// so it is given as an input, set as the encoder was for that frame.
// After the last block of a frame the zero padding up to the next word
// boundary is dropped.
//
// The frame store (one entry of 16 Y samples and two chroma means per
// block) is read asynchronously at the current block index and written with
// every decoded block, SPF and SPB copies included.
//
// Output: out_valid for one cycle per block, registered, with the block's
// 16 Y samples in raster order inside the block, its Cb and Cr values, its
// index in the frame and out_sof on the frame's first block.
//
// The decoding order (SPF flag first, then the class) and the
// reconstruction rules follow the coding scheme; the queue, the handshake
// and the block-order output are this design's choices.  Conversion back
// to RGB and raster reordering for display are not included.
module abtc_decoder
  import abtc_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 480,
  localparam int unsigned NBLK  = (WIDTH / 4) * (HEIGHT / 4),
  localparam int unsigned BW    = $clog2(NBLK)
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        cut,
  input  logic              srq_en,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_word,
  output logic              in_ready,
  output logic              out_valid,
  output pix_t              out_y [BLK_PIX],
  output pix_t              out_cb,
  output pix_t              out_cr,
  output logic [BW-1:0]     out_idx,
  output logic              out_sof
);
  localparam int unsigned QW = 256;

  logic [QW-1:0] bq;
  logic [8:0]    cnt;          // queued bits
  logic [4:0]    pos;          // bits of this frame consumed, mod 32
  logic [BW-1:0] idx;

  // ---------------- record head ----------------
  logic       h_spf;
  logic [1:0] h_code;
  logic [2:0] h_n;
  logic       known, go, last_blk;
  logic [7:0] len;
  logic [8:0] drop;

  assign h_spf  = bq[QW-1];
  assign h_code = bq[QW-2 -: 2];
  assign h_n    = bq[QW-4 -: 3];

  always_comb begin
    if (h_spf)                    len = 8'd1;
    else if (h_code == 2'b11)     len = 8'd3;
    else if (h_code == 2'b01)     len = 8'd23;
    else if (h_code == 2'b00)     len = 8'd44;
    else                          len = 8'd42 + {h_n, 4'b0};
    known = h_spf ? (cnt >= 9'd1)
                  : (cnt >= 9'd3) && (h_code != 2'b10 || cnt >= 9'd6);
  end

  assign go       = known && (cnt >= {1'b0, len});
  assign last_blk = (idx == BW'(NBLK - 1));
  // after the last record of a frame, skip the padding to the word boundary
  always_comb begin
    logic [4:0] p_after;
    p_after = pos + len[4:0];
    drop    = {1'b0, len} + (last_blk ? {4'b0, 5'(6'd32 - {1'b0, p_after})} : 9'd0);
  end

  // ---------------- field extraction ----------------
  pix_t          mean;
  logic [4:0]    am5;
  logic [15:0]   bp;
  logic [5:0]    cb6, cr6;
  logic [QW-1:0] errs, tail;
  logic [6:0]    a [BLK_PIX];

  always_comb begin
    bp   = '0;
    mean = '0;
    am5  = bq[QW-12 -: 5];
    errs = bq << 30;
    tail = '0;
    for (int i = 0; i < BLK_PIX; i++) a[i] = '0;
    unique case (h_code)
      2'b01: begin                       // uniform
        mean = bq[QW-4 -: 8];
        tail = bq << 11;
      end
      2'b00: begin                       // normal
        mean = bq[QW-4 -: 8];
        for (int i = 0; i < BLK_PIX; i++) bp[i] = bq[QW-17-i];
        tail = bq << 32;
      end
      default: begin                     // pattern (SPB needs no fields)
        mean = bq[QW-7 -: 8];
        for (int i = 0; i < BLK_PIX; i++) bp[i] = bq[QW-15-i];
        for (int i = 0; i < BLK_PIX; i++) begin
          logic [QW-1:0] s;
          s    = errs << (i * h_n);
          a[i] = 7'(s[QW-1 -: 7] >> (3'd7 - h_n));
        end
        tail = bq << (30 + 16 * int'(h_n));
      end
    endcase
    cb6 = tail[QW-1 -: 6];
    cr6 = tail[QW-7 -: 6];
  end

  // ---------------- reconstruction ----------------
  logic [8*BLK_PIX-1:0] fy [NBLK];
  logic [11:0]          fc [NBLK];
  logic [8*BLK_PIX-1:0] py, ry;
  logic [11:0]          pc, rc;

  always_comb begin
    if (h_spf) begin
      ry = fy[idx];
      rc = fc[idx];
    end else if (h_code == 2'b11) begin
      ry = py;
      rc = pc;
    end else begin
      rc = {cb6, cr6};
      for (int i = 0; i < BLK_PIX; i++) begin
        logic [8:0]  mag;
        logic [5:0]  k2;
        logic [10:0] v;
        k2 = {3'b0, a[i][2:0]} * {3'b0, a[i][2:0]};
        unique case (h_code)
          2'b01:   mag = '0;
          2'b00:   mag = {4'b0, am5};
          default: mag = srq_en ? {2'b0, k2, 1'b0}
                                : 9'({2'b0, a[i]} << cut);
        endcase
        v = bp[i] ? 11'($signed({3'b0, mean})) - 11'($signed({2'b0, mag}))
                  : 11'($signed({3'b0, mean})) + 11'($signed({2'b0, mag}));
        ry[8*i +: 8] = clamp_pix(v);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (go) begin
      fy[idx] <= ry;
      fc[idx] <= rc;
    end
  end

  // ---------------- queue, counters and output ----------------
  logic accept;
  assign in_ready = (cnt <= 9'd224);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bq        <= '0;
      cnt       <= '0;
      pos       <= '0;
      idx       <= '0;
      py        <= '0;
      pc        <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_sof   <= 1'b0;
      out_cb    <= '0;
      out_cr    <= '0;
      for (int i = 0; i < BLK_PIX; i++) out_y[i] <= '0;
    end else begin
      logic [QW-1:0] q;
      logic [8:0]    c;
      q = bq;
      c = cnt;
      if (go) begin
        q = q << drop;
        c = c - drop;
      end
      if (accept) begin
        q = q | ({in_word, 224'b0} >> c);
        c = c + 9'd32;
      end
      bq  <= q;
      cnt <= c;
      out_valid <= go;
      if (go) begin
        pos     <= last_blk ? 5'd0 : pos + len[4:0];
        idx     <= last_blk ? '0 : idx + 1'b1;
        py      <= ry;
        pc      <= rc;
        out_idx <= idx;
        out_sof <= (idx == '0);
        out_cb  <= {rc[11:6], 2'b0};
        out_cr  <= {rc[5:0], 2'b0};
        for (int i = 0; i < BLK_PIX; i++) out_y[i] <= ry[8*i +: 8];
      end
    end
  end

  // the queue never holds more than 224 + 32 bits
  assert property (@(posedge clk) disable iff (!rst_n) cnt <= 9'd256)
    else $error("abtc_decoder: bit queue overflow");
endmodule
