// block_packer: forms the variable-length code record of one block.
// Fields, first bit sent first:
//   SPF      1                                              1 bit
//   SPB      0 11                                           3 bits
//   uniform  0 01 Ymean(8) Cb(6) Cr(6)                     23 bits
//   normal   0 00 Ymean(8) AM(5) BP(16) Cb(6) Cr(6)        44 bits
//   pattern  0 10 n(3) Ymean(8) BP(16) 16 x AME(n) Cb(6) Cr(6)  42+16n bits
// BP is sent pixel 0 first; the AMEs are sent pixel 0 first.  SPF takes
// precedence over SPB, the order in which a decoder tests the flags.
// The record is right-aligned: its first bit is bits[len-1].
// Combinational, no latency.
module block_packer
  import abtc_pkg::*;
(
  input  logic                 spf,
  input  logic                 spb,
  input  blk_type_t            btype,
  input  pix_t                 ymean,
  input  logic [AM_W-1:0]      am5,
  input  logic [15:0]          bp,
  input  logic [NBITS_W-1:0]   nbits,
  input  logic [AME_MAX_W-1:0] ame [BLK_PIX],
  input  logic [CMEAN_W-1:0]   cb6,
  input  logic [CMEAN_W-1:0]   cr6,
  output record_t              rec
);
  logic [15:0] bp_tx;
  logic [REC_W-1:0] acc;
  logic [REC_LEN_W-1:0] len;
  logic [AME_MAX_W-1:0] mask;

  always_comb begin
    for (int i = 0; i < 16; i++) bp_tx[15-i] = bp[i];
    mask = AME_MAX_W'((8'd1 << nbits) - 8'd1);
    acc  = '0;
    len  = '0;
    if (spf) begin
      acc = REC_W'(1'b1);
      len = 8'd1;
    end else if (spb) begin
      acc = REC_W'(3'b011);
      len = 8'd3;
    end else begin
      acc = REC_W'({1'b0, btype});
      len = 8'd3;
      unique case (btype)
        BT_UNIFORM: begin
          acc = {acc[REC_W-21:0], ymean, cb6, cr6};
          len = len + 8'd20;
        end
        BT_NORMAL: begin
          acc = {acc[REC_W-42:0], ymean, am5, bp_tx, cb6, cr6};
          len = len + 8'd41;
        end
        default: begin   // BT_PATTERN
          acc = {acc[REC_W-28:0], nbits, ymean, bp_tx};
          len = len + 8'd27;
          for (int i = 0; i < BLK_PIX; i++) begin
            acc = (acc << nbits) | REC_W'(ame[i] & mask);
            len = len + 8'(nbits);
          end
          acc = {acc[REC_W-13:0], cb6, cr6};
          len = len + 8'd12;
        end
      endcase
    end
    rec.bits = acc;
    rec.len  = len;
  end
endmodule
