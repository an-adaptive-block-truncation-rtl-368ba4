// rgb2ycc: converts one 24-bit RGB pixel to 8-bit Y, Cb and Cr.
//
// The coding scheme converts the partitioned RGB blocks to YCbCr before
// coding; it does not give the conversion matrix.  This block uses the
// full-range ITU-R BT.601 (JFIF) matrix in 8-bit fixed point:
//   Y  = ( 77 R + 150 G +  29 B + 128) >> 8
//   Cb = (-43 R -  85 G + 128 B + 128) >> 8 + 128
//   Cr = (128 R - 107 G -  21 B + 128) >> 8 + 128
// each result clamped to 0..255.  Purely combinational, no latency.
module rgb2ycc
  import abtc_pkg::*;
(
  input  rgb_t rgb,
  output ycc_t ycc
);
  logic signed [18:0] r, g, b;
  logic signed [18:0] ys, cbs, crs;

  function automatic pix_t sat8(input logic signed [18:0] v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  always_comb begin
    r   = 19'(rgb.r);
    g   = 19'(rgb.g);
    b   = 19'(rgb.b);
    ys  = (19'sd77 * r + 19'sd150 * g + 19'sd29 * b + 19'sd128) >>> 8;
    cbs = ((-19'sd43 * r - 19'sd85 * g + 19'sd128 * b + 19'sd128) >>> 8) + 19'sd128;
    crs = ((19'sd128 * r - 19'sd107 * g - 19'sd21 * b + 19'sd128) >>> 8) + 19'sd128;
    ycc.y  = sat8(ys);
    ycc.cb = sat8(cbs);
    ycc.cr = sat8(crs);
  end
endmodule
