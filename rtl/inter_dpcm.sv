// inter_dpcm: inter-frame block difference coding.  Decides whether the
// current block is "same as the previous frame" (SPF): it is compared only
// with the block at the same position in the previous frame, whose
// moments come from moment_store.
//   both blocks uniform:           |difMean| < th_am
//   either one not uniform:        |difMean| < th_am, |difAM| < th_am and
//                                  difMap < th_map
// ref_ok low (key frame, or no previous frame yet) forces spf low.
// Combinational, no latency.
module inter_dpcm
  import abtc_pkg::*;
(
  input  logic        ref_ok,
  input  blk_type_t   btype,
  input  pix_t        mean,
  input  logic [6:0]  am,
  input  logic [15:0] bp,
  input  moments_t    prev,
  input  cfg_t        cfg,
  output logic        spf
);
  logic [8:0]  dmean, dam;
  logic [4:0]  dmap;
  logic [15:0] x;

  always_comb begin
    dmean = abs9(10'($signed({2'b0, mean})) - 10'($signed({2'b0, prev.mean})));
    dam   = abs9(10'($signed({3'b0, am}))   - 10'($signed({3'b0, prev.am})));
    x     = bp ^ prev.bp;
    dmap  = 5'(popcount8(x[15:8])) + 5'(popcount8(x[7:0]));
    if (!ref_ok)
      spf = 1'b0;
    else if (btype == BT_UNIFORM && prev.btype == BT_UNIFORM)
      spf = dmean < 9'(cfg.th_am);
    else
      spf = (dmean < 9'(cfg.th_am)) && (dam < 9'(cfg.th_am)) && (dmap < cfg.th_map);
  end
endmodule
