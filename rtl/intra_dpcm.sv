// intra_dpcm: intra-frame DPCM test.  Decides whether the current block is
// "same as the previous block" (SPB) of the same image, by comparing it
// with the block that came just before it in block order:
//   both uniform:  |difMean| < th_am
//   both normal:   |difMean| < th_am, |difAM| < th_am, difMap < th_map
//   both pattern:  |difMean| < th_am, SAD < th_sad
//   types differ, or first block of a frame: not SPB.
// difMap counts the bits that differ between the two bit planes; the count
// is formed from the top and bottom 8-bit halves separately, as the scheme
// does to keep its count tables at 2^8 entries.  SAD sums |E_i - E'_i|
// over the two blocks' mean errors.
// spb is combinational from the current block and the stored previous
// block; on a clock edge with valid high the current block becomes the
// stored one.  sof marks the first block of a frame.
module intra_dpcm
  import abtc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic             sof,
  input  blk_type_t        btype,
  input  pix_t             mean,
  input  logic [6:0]       am,
  input  logic [15:0]      bp,
  input  err_t             e [BLK_PIX],
  input  cfg_t             cfg,
  output logic             spb
);
  logic        have_prev;
  blk_type_t   p_type;
  pix_t        p_mean;
  logic [6:0]  p_am;
  logic [15:0] p_bp;
  err_t        p_e [BLK_PIX];

  logic [8:0]  dmean, dam;
  logic [4:0]  dmap;
  logic [SAE_W-1:0] sad;
  logic [15:0] x;
  logic        m_ok;

  always_comb begin
    dmean = abs9(10'($signed({2'b0, mean})) - 10'($signed({2'b0, p_mean})));
    dam   = abs9(10'($signed({3'b0, am}))   - 10'($signed({3'b0, p_am})));
    x     = bp ^ p_bp;
    dmap  = 5'(popcount8(x[15:8])) + 5'(popcount8(x[7:0]));
    sad   = '0;
    for (int i = 0; i < BLK_PIX; i++)
      sad += SAE_W'(abs9(10'(e[i]) - 10'(p_e[i])));
    m_ok = dmean < 9'(cfg.th_am);
    spb  = 1'b0;
    if (have_prev && !sof && btype == p_type) begin
      unique case (btype)
        BT_UNIFORM: spb = m_ok;
        BT_NORMAL:  spb = m_ok && (dam < 9'(cfg.th_am)) && (dmap < cfg.th_map);
        BT_PATTERN: spb = m_ok && (sad < cfg.th_sad);
        default:    spb = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      p_type    <= BT_UNIFORM;
      p_mean    <= '0;
      p_am      <= '0;
      p_bp      <= '0;
      for (int i = 0; i < BLK_PIX; i++) p_e[i] <= '0;
    end else if (valid) begin
      have_prev <= 1'b1;
      p_type    <= btype;
      p_mean    <= mean;
      p_am      <= am;
      p_bp      <= bp;
      for (int i = 0; i < BLK_PIX; i++) p_e[i] <= e[i];
    end
  end
endmodule
