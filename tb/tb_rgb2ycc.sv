// tb_rgb2ycc: checks the colour conversion against the model on the
// eight corners of the RGB cube, on grey levels (Y must equal the level)
// and on 2000 random pixels.
module tb_rgb2ycc;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  rgb_t rgb;
  ycc_t yo;
  int checks = 0, failures = 0;
  rgb2ycc dut (.rgb, .ycc(yo));

  task automatic try(int r, int g, int b);
    int y, cb, cr;
    rgb = '{r: 8'(r), g: 8'(g), b: 8'(b)};
    #1;
    ycc(r, g, b, y, cb, cr);
    checks++;
    if (yo.y != 8'(y) || yo.cb != 8'(cb) || yo.cr != 8'(cr)) begin
      failures++;
      if (failures < 10) $display("FAIL rgb %0d %0d %0d: got %0d %0d %0d exp %0d %0d %0d",
                                  r, g, b, yo.y, yo.cb, yo.cr, y, cb, cr);
    end
  endtask

  initial begin
    for (int c = 0; c < 8; c++) try(c[0] ? 255 : 0, c[1] ? 255 : 0, c[2] ? 255 : 0);
    for (int v = 0; v < 256; v += 5) begin
      try(v, v, v);
      checks++;
      if (yo.y != 8'(v) || yo.cb != 8'd128 || yo.cr != 8'd128) failures++;
    end
    repeat (2000) try($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
