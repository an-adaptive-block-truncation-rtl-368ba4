// tb_bitstream_packer: random records of 1..154 bits, 8 to 12 cycles
// apart as the encoder delivers them, grouped into "frames" ending with a
// flush.  The words must equal the concatenated bits, zero padded at each
// flush, with out_last on the final word of each frame.  Frames whose
// length is an exact multiple of 32 and padded ones both occur.
module tb_bitstream_packer;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, flush = 0;
  record_t in_rec;
  logic out_valid, out_last;
  logic [31:0] out_word;
  logic [31:0] exp_w [$];
  bit exp_l [$];
  record_t recs [12];
  int checks = 0, failures = 0, n_exact = 0, n_pad = 0;
  bitstream_packer dut (.clk, .rst_n, .in_valid, .in_rec, .flush, .out_valid, .out_word, .out_last);

  always @(posedge clk) if (out_valid) begin
    logic [31:0] w;
    bit l;
    checks++;
    if (exp_w.size() == 0) failures++;
    else begin
      w = exp_w.pop_front();
      l = exp_l.pop_front();
      if (out_word != w || out_last != l) begin
        failures++;
        if (failures < 10) $display("FAIL word %h/%h last %0d/%0d", out_word, w, out_last, l);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      bitq_t all;
      int nrec;
      all.delete();
      nrec = $urandom_range(1, 12);
      for (int r = 0; r < nrec; r++) begin
        int len;
        logic [REC_W-1:0] v;
        len = $urandom_range(0, 3) == 0 ? 154 : $urandom_range(1, 154);
        v = '0;
        // last record of every 4th frame is sized to end on a word boundary
        if (f % 4 == 0 && r == nrec - 1) begin
          len = 32 - (all.size() % 32);
          if (len == 0) len = 32;
        end
        for (int b = 0; b < len; b++) begin
          bit x;
          x = 1'($urandom);
          v[len - 1 - b] = x;
          all.push_back(x);
        end
        recs[r] = '{len: 8'(len), bits: v};
      end
      if (all.size() % 32 == 0) n_exact++; else n_pad++;
      while (all.size() % 32 != 0) all.push_back(1'b0);
      for (int w = 0; w < all.size() / 32; w++) begin
        logic [31:0] x;
        for (int b = 0; b < 32; b++) x[31 - b] = all[32 * w + b];
        exp_w.push_back(x);
        exp_l.push_back(w == all.size() / 32 - 1);
      end
      for (int r = 0; r < nrec; r++) begin
        @(negedge clk);
        in_valid = 1; in_rec = recs[r]; flush = (r == nrec - 1);
        @(negedge clk);
        in_valid = 0; flush = 0;
        repeat ($urandom_range(6, 10)) @(negedge clk);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_w.size() != 0 || n_exact == 0 || n_pad == 0) failures++;
    $display("frames: exact=%0d padded=%0d", n_exact, n_pad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
