// tb_line_buffer: three 16x12 frames (4 x 3 blocks) of numbered pixels,
// one with random input gaps, two at one pixel per cycle.  Every output
// beat must carry the right pixel pair of the right block in block order
// (rows 0..3, left pair then right pair), with correct first/last/sof/eof
// flags and block index.  Also checks that a block row leaves within
// 2*W + 4 cycles of its last pixel.
module tb_line_buffer;
  import abtc_pkg::*;
  localparam int W = 16, H = 12, NBX = W / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_sof = 0;
  rgb_t in_pix;
  logic out_valid, out_first, out_last, out_sof, out_eof;
  rgb_t out_pix [2];
  logic [$clog2((W / 4) * (H / 4))-1:0] out_blk;
  int checks = 0, failures = 0, beat = 0, frame_out = 0;
  longint cyc = 0, t_row_done = 0;
  line_buffer #(.W(W), .H(H)) dut (.clk, .rst_n, .in_valid, .in_sof, .in_pix, .out_valid,
    .out_pix, .out_first, .out_last, .out_sof, .out_eof, .out_blk);

  function automatic rgb_t pix_of(int f, int x, int y);
    return '{r: 8'(x + 16 * f), g: 8'(y), b: 8'(x ^ y ^ f)};
  endfunction

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    int nb, blk, k, bx, by, r, p;
    nb = (W / 4) * (H / 4);
    blk = (beat / 8) % nb;
    k = beat % 8;
    bx = blk % NBX; by = blk / NBX; r = k / 2; p = k % 2;
    checks++;
    if (out_pix[0] != pix_of(frame_out, bx * 4 + 2 * p, by * 4 + r) ||
        out_pix[1] != pix_of(frame_out, bx * 4 + 2 * p + 1, by * 4 + r) ||
        out_first != (k == 0) || out_last != (k == 7) ||
        out_sof != (blk == 0 && k == 0) || out_eof != (blk == nb - 1 && k == 7) ||
        int'(out_blk) != blk) begin
      failures++;
      if (failures < 10) $display("FAIL frame %0d beat %0d", frame_out, beat);
    end
    if (k == 7 && bx == NBX - 1) begin
      checks++;
      if (cyc - t_row_done > 2 * W + 4) failures++;
    end
    beat++;
    if (beat % (8 * nb) == 0) frame_out++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (f == 1) while ($urandom_range(0, 2) == 0) begin
            in_valid <= 0;
            @(posedge clk);
          end
          in_valid <= 1; in_sof <= (x == 0 && y == 0); in_pix <= pix_of(f, x, y);
          @(posedge clk);
          if (x == W - 1 && y % 4 == 3) t_row_done = cyc;
        end
      in_valid <= 0; in_sof <= 0;
      repeat (f == 0 ? 3 : 40) @(posedge clk);
    end
    repeat (4 * W) @(posedge clk);
    checks++;
    if (beat != 3 * 8 * (W / 4) * (H / 4)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
