// abtc_pkg: types, field widths and helper functions shared by the ABTC
// (adaptive block truncation coding) encoder blocks.
//
// A block is 4x4 pixels, numbered 0..15 in raster order inside the block.
// Pixels travel two at a time (two horizontally adjacent pixels per beat),
// so one block is eight beats.  The field widths of the coded block record
// (8-bit luminance mean, 5-bit absolute moment, 6-bit chroma means, 16-bit
// bit plane, 3-bit error bit count, 1- and 2-bit block identifiers) follow
// the record layout of the coding scheme; the struct layouts and the
// configuration bundle are this implementation's own.
package abtc_pkg;

  localparam int unsigned BLK_PIX   = 16;   // pixels per 4x4 block
  localparam int unsigned YMEAN_W   = 8;    // coded luminance mean
  localparam int unsigned AM_W      = 5;    // coded absolute moment
  localparam int unsigned CMEAN_W   = 6;    // coded chroma mean
  localparam int unsigned NBITS_W   = 3;    // "number of bits of AME" field
  localparam int unsigned AME_MAX_W = 7;    // largest AME width a 3-bit count can name
  localparam int unsigned SAE_W     = 12;   // 16 * 255 fits in 12 bits
  localparam int unsigned REC_W     = 160;  // longest record is 42 + 16*7 = 154 bits
  localparam int unsigned REC_LEN_W = 8;
  localparam int unsigned WORD_W    = 32;   // output word

  typedef logic [7:0] pix_t;
  typedef logic signed [8:0] err_t;         // mean error x_i - mean, -255..255

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  typedef struct packed {
    pix_t y;
    pix_t cb;
    pix_t cr;
  } ycc_t;

  // Two-bit block identifier after the leading 0 of a non-SPF record.
  typedef enum logic [1:0] {
    BT_NORMAL  = 2'b00,
    BT_UNIFORM = 2'b01,
    BT_PATTERN = 2'b10,
    BT_SPB     = 2'b11    // same as the previous block of this image
  } blk_type_t;

  // Run-time coding parameters (thresholds chosen for a target rate).
  typedef struct packed {
    logic [7:0]       th_am;    // uniform test; also difMean / difAM threshold
    logic [SAE_W-1:0] th_sae;   // normal / pattern split
    logic [SAE_W-1:0] th_sad;   // SAD threshold for adjacent pattern blocks
    logic [4:0]       th_map;   // difMap threshold (bits that differ)
    logic [2:0]       cut;      // cut-error: LSBs dropped from each AME
    logic             srq_en;   // code pattern blocks with square root quantization
  } cfg_t;

  // Moments of one block kept for the inter-frame (previous frame) test.
  typedef struct packed {
    blk_type_t   btype;         // BT_UNIFORM, BT_NORMAL or BT_PATTERN
    pix_t        mean;
    logic [6:0]  am;            // full absolute moment, 0..127
    logic [15:0] bp;            // bit plane, bit i = pixel i below the mean
  } moments_t;

  // One coded block: the last len bits of bits, first bit sent = bits[len-1].
  typedef struct packed {
    logic [REC_LEN_W-1:0] len;
    logic [REC_W-1:0]     bits;
  } record_t;

  function automatic logic [3:0] popcount8(input logic [7:0] v);
    logic [3:0] c;
    c = '0;
    for (int i = 0; i < 8; i++) c += 4'(v[i]);
    return c;
  endfunction

  function automatic pix_t clamp_pix(input logic signed [10:0] v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  function automatic logic [8:0] abs9(input logic signed [9:0] v);
    logic signed [9:0] a;
    a = (v < 0) ? -v : v;
    return a[8:0];
  endfunction

endpackage
