// mean_tree: mean module of the encoder.  Adds the 16 samples of a 4x4
// block with a four-level binary adder tree (8, 4, 2, 1 adders) and takes
// the mean with a 4-bit right shift (floor).  The tree replaces the
// serial accumulate-and-feed-back loop, the same restructuring the coding
// scheme uses to shorten the critical path of this history-sensitive
// step; the two-pixel pairs of the first level are the two pixels of one
// transfer beat.  Combinational, no latency.
module mean_tree
  import abtc_pkg::*;
(
  input  pix_t       x [BLK_PIX],
  output logic [11:0] sum,
  output pix_t       mean
);
  logic [8:0]  l1 [8];
  logic [9:0]  l2 [4];
  logic [10:0] l3 [2];

  always_comb begin
    for (int i = 0; i < 8; i++) l1[i] = 9'(x[2*i]) + 9'(x[2*i+1]);
    for (int i = 0; i < 4; i++) l2[i] = 10'(l1[2*i]) + 10'(l1[2*i+1]);
    for (int i = 0; i < 2; i++) l3[i] = 11'(l2[2*i]) + 11'(l2[2*i+1]);
    sum  = 12'(l3[0]) + 12'(l3[1]);
    mean = sum[11:4];
  end
endmodule
