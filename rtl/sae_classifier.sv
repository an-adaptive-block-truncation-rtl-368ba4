// sae_classifier: three-level block classification.
// The block is first reproduced with simplified AMBTC, in which the pixel
// distribution is ignored and the two levels are mean - AM and mean + AM
// (AM as it will be sent, saturated to 5 bits); pixels with bp = 1 take
// the low level.  SAE is the sum of absolute differences between the
// reproduced and original pixels (the sum form of MAE, so the threshold is
// in sum units).  Then
//   AM  < th_am           -> uniform
//   SAE < th_sae          -> normal
//   otherwise             -> pattern
// Combinational, no latency.
module sae_classifier
  import abtc_pkg::*;
(
  input  pix_t              x [BLK_PIX],
  input  pix_t              mean,
  input  logic [6:0]        am,
  input  logic [15:0]       bp,
  input  logic [7:0]        th_am,
  input  logic [SAE_W-1:0]  th_sae,
  output logic [AM_W-1:0]   am5,
  output logic [SAE_W-1:0]  sae,
  output blk_type_t         btype
);
  pix_t lo, hi, rec, d;

  always_comb begin
    am5 = (am > 7'd31) ? 5'd31 : am[4:0];
    lo  = clamp_pix(11'($signed({3'b0, mean})) - 11'($signed({6'b0, am5})));
    hi  = clamp_pix(11'($signed({3'b0, mean})) + 11'($signed({6'b0, am5})));
    sae = '0;
    for (int i = 0; i < BLK_PIX; i++) begin
      rec = bp[i] ? lo : hi;
      d   = (rec > x[i]) ? rec - x[i] : x[i] - rec;
      sae += SAE_W'(d);
    end
    if (8'(am) < th_am)     btype = BT_UNIFORM;
    else if (sae < th_sae)  btype = BT_NORMAL;
    else                    btype = BT_PATTERN;
  end
endmodule
