// am_module: absolute moment (AM), one-bit plane and mean errors of one
// 4x4 luminance block, given its mean.
//   E_i = x_i - mean                     (mean error, signed 9 bits)
//   bp[i] = 1 where x_i < mean, else 0   (also the sign of E_i)
//   AM = (sum |E_i|) >> 4                (floor)
// The 16 absolute errors are summed as two half-block trees (rows 0-1 and
// rows 2-3) joined at the end, the two-way split the scheme uses to halve
// the critical path.  Combinational, no latency.
module am_module
  import abtc_pkg::*;
(
  input  pix_t        x [BLK_PIX],
  input  pix_t        mean,
  output logic [6:0]  am,
  output logic [15:0] bp,
  output err_t        e [BLK_PIX],
  output logic [11:0] sum_abs
);
  logic [8:0]  ae [BLK_PIX];
  logic [10:0] half [2];

  always_comb begin
    for (int i = 0; i < BLK_PIX; i++) begin
      e[i]  = $signed({1'b0, x[i]}) - $signed({1'b0, mean});
      bp[i] = (x[i] < mean);
      ae[i] = abs9(10'(e[i]));
    end
    for (int h = 0; h < 2; h++) begin
      half[h] = '0;
      for (int i = 0; i < 8; i++) half[h] += 11'(ae[8*h+i]);
    end
    sum_abs = 12'(half[0]) + 12'(half[1]);
    am      = sum_abs[10:4];
  end
endmodule
