// tb_moment_store: fills a 64-entry store with random moments, reads every
// entry back (data one cycle after the address), then checks that a read
// and a write of the same address in one cycle return the old entry.
module tb_moment_store;
  import abtc_pkg::*;
  localparam int D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0;
  moments_t rd_data, wr_data;
  moments_t shadow [D];
  int checks = 0, failures = 0;
  moment_store #(.DEPTH(D)) dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  initial begin
    for (int i = 0; i < D; i++) begin
      shadow[i] = moments_t'({$urandom, $urandom});
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = shadow[i];
    end
    @(negedge clk);
    wr_en = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < D; i++) begin
        int a;
        a = pass ? $urandom_range(0, D - 1) : i;
        @(negedge clk);
        rd_en = 1; rd_addr = 6'(a);
        @(negedge clk);
        rd_en = 0;
        checks++;
        if (rd_data != shadow[a]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d", a);
        end
      end
    // read and write the same address together
    for (int i = 0; i < 16; i++) begin
      moments_t nv;
      int a;
      nv = moments_t'({$urandom, $urandom});
      a = $urandom_range(0, D - 1);
      @(negedge clk);
      rd_en = 1; rd_addr = 6'(a); wr_en = 1; wr_addr = 6'(a); wr_data = nv;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data != shadow[a]) failures++;
      shadow[a] = nv;
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data != nv) failures++;
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
