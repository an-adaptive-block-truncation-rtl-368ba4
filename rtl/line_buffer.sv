// line_buffer: turns a scanline-order RGB stream into a block-order stream
// of 4x4 blocks, two horizontally adjacent pixels per beat.
//
// Storage is 8 lines of W pixels (5120 pixels for a 640-pixel VGA line),
// kept as W/2 words of two pixels per line.  Lines 0-3 and 4-7 of the
// buffer are two halves used in turn, alternating with every block row
// (also across frame boundaries, so frames with an odd number of block
// rows work): while one block row (four lines) is written into one half,
// the previous block row is read out of the other.
// When the last pixel of the fourth line of a block row has been written,
// the reader walks that half block by block: for each block, rows 0..3,
// and in each row the left then the right pixel pair, i.e. the three
// earlier lines of the block are fetched together with the last one, at
// line offsets 3, 2, 1 and 0.  A block row takes 2W read cycles and the
// next block row takes at least 4W input cycles, so the reader always
// finishes first.
//
// Input: one pixel per cycle at most (in_valid), in_sof with the first
// pixel of a frame.  Output: out_valid with the pixel pair, out_first on
// the first of a block's 8 beats, out_last on its last, out_sof on the
// first beat of a frame's first block, out_eof on the last beat of its
// last block, and out_blk the block's raster index in the frame.
// Output follows the reader's address by one cycle (synchronous read).
module line_buffer
  import abtc_pkg::*;
#(
  parameter int unsigned W = 640,
  parameter int unsigned H = 480,
  localparam int unsigned WORDS = 4 * W,                 // 8 lines of W/2 words
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned BW    = $clog2((W / 4) * (H / 4))
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  rgb_t          in_pix,
  output logic          out_valid,
  output rgb_t          out_pix [2],
  output logic          out_first,
  output logic          out_last,
  output logic          out_sof,
  output logic          out_eof,
  output logic [BW-1:0] out_blk
);
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);
  localparam int unsigned BXW = (W / 4 > 1) ? $clog2(W / 4) : 1;
  localparam int unsigned BYW = (H / 4 > 1) ? $clog2(H / 4) : 1;

  logic [47:0] mem [WORDS];

  // ---------------- write side ----------------
  logic [XW-1:0] wx;
  logic [YW-1:0] wy;
  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  rgb_t          hold;
  logic          wr_half;        // buffer half receiving the current block row
  logic          start;          // a block row is complete
  logic          start_half;
  logic [BYW-1:0] start_brow;
  logic          start_lastrow;

  always_comb begin
    cx = in_sof ? '0 : wx;
    cy = in_sof ? '0 : wy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wx <= '0;
      wy <= '0;
      hold <= '0;
      wr_half <= 1'b0;
      start <= 1'b0;
      start_half <= 1'b0;
      start_brow <= '0;
      start_lastrow <= 1'b0;
    end else begin
      start <= 1'b0;
      if (in_valid) begin
        if (!cx[0]) hold <= in_pix;
        else        mem[AW'(32'({wr_half, cy[1:0]}) * (W / 2) + 32'(cx >> 1))] <= {hold, in_pix};
        if (32'(cx) == W - 1) begin
          wx <= '0;
          wy <= (32'(cy) == H - 1) ? '0 : cy + 1'b1;
          if (cy[1:0] == 2'd3) begin
            start         <= 1'b1;
            start_half    <= wr_half;
            wr_half       <= ~wr_half;
            start_brow    <= BYW'(cy >> 2);
            start_lastrow <= (32'(cy) == H - 1);
          end
        end else begin
          wx <= cx + 1'b1;
          wy <= cy;
        end
      end
    end
  end

  // ---------------- read side ----------------
  logic           busy, half, lastrow;
  logic [BYW-1:0] brow;
  logic [BXW-1:0] bx;
  logic [1:0]     r;
  logic           p;
  logic [AW-1:0]  rd_addr;
  logic [47:0]    rd_word;
  logic           m_valid, m_first, m_last, m_sof, m_eof;
  logic [BW-1:0]  m_blk;

  always_comb rd_addr = AW'((32'({half, r}) * (W / 2)) + 32'(bx) * 2 + 32'(p));

  always_ff @(posedge clk) begin
    if (busy) rd_word <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; half <= 1'b0; lastrow <= 1'b0;
      brow <= '0; bx <= '0; r <= '0; p <= 1'b0;
      m_valid <= 1'b0; m_first <= 1'b0; m_last <= 1'b0;
      m_sof <= 1'b0; m_eof <= 1'b0; m_blk <= '0;
    end else begin
      m_valid <= busy;
      m_first <= busy && r == 2'd0 && !p;
      m_last  <= busy && r == 2'd3 && p;
      m_sof   <= busy && brow == '0 && bx == '0 && r == 2'd0 && !p;
      m_eof   <= busy && lastrow && 32'(bx) == W / 4 - 1 && r == 2'd3 && p;
      m_blk   <= BW'(32'(brow) * (W / 4) + 32'(bx));
      if (start) begin
        busy <= 1'b1; half <= start_half; lastrow <= start_lastrow;
        brow <= start_brow; bx <= '0; r <= '0; p <= 1'b0;
      end else if (busy) begin
        p <= ~p;
        if (p) begin
          r <= r + 2'd1;
          if (r == 2'd3) begin
            if (32'(bx) == W / 4 - 1) busy <= 1'b0;
            else bx <= bx + 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    out_valid  = m_valid;
    out_first  = m_first;
    out_last   = m_last;
    out_sof    = m_sof;
    out_eof    = m_eof;
    out_blk    = m_blk;
    out_pix[0] = rgb_t'(rd_word[47:24]);
    out_pix[1] = rgb_t'(rd_word[23:0]);
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("line_buffer: block row complete before the previous one was read out");
endmodule
