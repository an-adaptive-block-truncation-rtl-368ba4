// pattern_coder: codes the 16 absolute mean errors (AME) of a pattern
// block.  The sign of each error travels in the bit plane, so only
// magnitudes are coded here.
//   srq_en = 0: a_i = |E_i| >> cut (cut-error, the LSBs given up for rate),
//               limited to 7 bits; the width n of every field is the bit
//               length of the largest a_i (0..7), sent in the 3-bit count.
//               The decoder restores E'_i = +/- (a_i << cut).
//   srq_en = 1: each error is clamped to -128..127 and mapped through the
//               square root quantization table; the 3-bit magnitude k is
//               sent and n is 3.  The decoder restores E'_i = +/- 2k^2.
// Combinational, no latency.
module pattern_coder
  import abtc_pkg::*;
(
  input  err_t                 e [BLK_PIX],
  input  logic [2:0]           cut,
  input  logic                 srq_en,
  output logic [NBITS_W-1:0]   nbits,
  output logic [AME_MAX_W-1:0] ame [BLK_PIX]
);
  logic [7:0]  e8   [BLK_PIX];
  logic [3:0]  sq   [BLK_PIX];
  logic [AME_MAX_W-1:0] lin [BLK_PIX];
  logic [AME_MAX_W-1:0] amax;
  logic [8:0]  mag, sh;

  for (genvar i = 0; i < BLK_PIX; i++) begin : g_srq
    srq_lut u_lut (.e8(e8[i]), .code(sq[i]));
  end

  always_comb begin
    amax = '0;
    for (int i = 0; i < BLK_PIX; i++) begin
      if (e[i] > 9'sd127)       e8[i] = 8'h7f;
      else if (e[i] < -9'sd128) e8[i] = 8'h80;
      else                      e8[i] = e[i][7:0];
      mag    = abs9(10'(e[i]));
      sh     = mag >> cut;
      lin[i] = (sh > 9'd127) ? 7'd127 : sh[6:0];
      if (lin[i] > amax) amax = lin[i];
    end
    nbits = '0;
    for (int b = 0; b < AME_MAX_W; b++) if (amax[b]) nbits = 3'(b + 1);
    for (int i = 0; i < BLK_PIX; i++) ame[i] = srq_en ? {4'b0, sq[i][2:0]} : lin[i];
    if (srq_en) nbits = 3'd3;
  end
endmodule
