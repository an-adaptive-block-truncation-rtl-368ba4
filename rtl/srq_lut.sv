// srq_lut: square root quantization table for pattern-block mean errors.
// 256 entries of 4 bits, indexed by the mean error as an 8-bit two's
// complement number (errors beyond -128..127 are clamped by the caller).
// Entry = {sign, k}: the error magnitude is halved (floor) and replaced by
// the nearest square k*k with k = 0..7 (ties go to the smaller k), so the
// code is round(sqrt(|E|/2)) limited to 3 bits.  The decoder rebuilds the
// error as sign * 2*k*k.  Example: E = 38 -> 19 -> nearest square 16 -> k = 4,
// decoded 32.  The table is computed at elaboration from that rule and read
// combinationally.
module srq_lut
  import abtc_pkg::*;
(
  input  logic [7:0] e8,      // signed mean error
  output logic [3:0] code     // {sign, k}
);
  function automatic logic [3:0] srq_entry(input int idx);
    int v, mag, q, best, bestd, d;
    v    = (idx >= 128) ? idx - 256 : idx;
    mag  = (v < 0) ? -v : v;
    q    = mag / 2;
    best = 0;
    bestd = q;
    for (int k = 1; k < 8; k++) begin
      d = (k * k > q) ? k * k - q : q - k * k;
      if (d < bestd) begin
        bestd = d;
        best  = k;
      end
    end
    return {(v < 0) ? 1'b1 : 1'b0, 3'(best)};
  endfunction

  logic [3:0] table_q [256];

  initial begin
    for (int i = 0; i < 256; i++) table_q[i] = srq_entry(i);
  end

  assign code = table_q[e8];
endmodule
