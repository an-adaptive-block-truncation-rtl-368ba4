// block_assembler: gathers the eight two-pixel beats of one 4x4 block
// (already converted to YCbCr) into whole-block arrays.  Beat k carries
// pixels 2k and 2k+1 of the block in raster order.  in_first restarts the
// count; when the eighth beat arrives the block is presented on the next
// cycle for one cycle with blk_valid, together with the frame flags and
// block index captured on its beats.
module block_assembler
  import abtc_pkg::*;
#(
  parameter int unsigned BW = 15
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  ycc_t          in_pix [2],
  input  logic          in_first,
  input  logic          in_sof,
  input  logic          in_eof,
  input  logic [BW-1:0] in_blk,
  output logic          blk_valid,
  output pix_t          y  [BLK_PIX],
  output pix_t          cb [BLK_PIX],
  output pix_t          cr [BLK_PIX],
  output logic          blk_sof,
  output logic          blk_eof,
  output logic [BW-1:0] blk_idx
);
  logic [2:0] cnt, k;
  logic       sof_seen;

  always_comb k = in_first ? 3'd0 : cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      sof_seen <= 1'b0;
      blk_valid <= 1'b0;
      blk_sof <= 1'b0;
      blk_eof <= 1'b0;
      blk_idx <= '0;
      for (int i = 0; i < BLK_PIX; i++) begin
        y[i] <= '0; cb[i] <= '0; cr[i] <= '0;
      end
    end else begin
      blk_valid <= 1'b0;
      if (in_valid) begin
        for (int j = 0; j < 2; j++) begin
          y [{k, j[0]}] <= in_pix[j].y;
          cb[{k, j[0]}] <= in_pix[j].cb;
          cr[{k, j[0]}] <= in_pix[j].cr;
        end
        cnt <= k + 3'd1;
        if (in_first) begin
          sof_seen <= in_sof;
          blk_idx  <= in_blk;
        end
        if (k == 3'd7) begin
          blk_valid <= 1'b1;
          blk_sof   <= in_first ? in_sof : sof_seen;
          blk_eof   <= in_eof;
        end
      end
    end
  end
endmodule
