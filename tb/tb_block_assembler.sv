// tb_block_assembler: 200 blocks of random YCbCr beats with random gaps
// between beats; the assembled arrays, frame flags and block index must
// match what was sent, and blk_valid must rise exactly once per block,
// one cycle after the eighth beat.
module tb_block_assembler;
  import abtc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_first = 0, in_sof = 0, in_eof = 0;
  ycc_t in_pix [2];
  logic [7:0] in_blk = 0;
  logic blk_valid, blk_sof, blk_eof;
  pix_t y [BLK_PIX], cb [BLK_PIX], cr [BLK_PIX];
  logic [7:0] blk_idx;
  ycc_t sent [BLK_PIX];
  int checks = 0, failures = 0, nvalid = 0;
  block_assembler #(.BW(8)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_first, .in_sof, .in_eof,
    .in_blk, .blk_valid, .y, .cb, .cr, .blk_sof, .blk_eof, .blk_idx);

  always @(posedge clk) if (rst_n && blk_valid) nvalid++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 200; b++) begin
      bit s, e;
      s = (b % 50 == 0);
      e = (b % 50 == 49);
      for (int k = 0; k < 8; k++) begin
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          in_valid = 0;
        end
        @(negedge clk);
        sent[2 * k] = ycc_t'(24'($urandom));
        sent[2 * k + 1] = ycc_t'(24'($urandom));
        in_valid = 1; in_pix[0] = sent[2 * k]; in_pix[1] = sent[2 * k + 1];
        in_first = (k == 0); in_sof = s && k == 0; in_eof = e && k == 7; in_blk = 8'(b);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!blk_valid || blk_sof != s || blk_eof != e || blk_idx != 8'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d flags", b);
      end
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (y[i] != sent[i].y || cb[i] != sent[i].cb || cr[i] != sent[i].cr) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d pixel %0d", b, i);
        end
      end
    end
    @(negedge clk);
    checks++;
    if (nvalid != 200) begin
      failures++;
      $display("FAIL %0d blocks presented", nvalid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
