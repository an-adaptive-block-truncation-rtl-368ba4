// tb_block_packer: record length and bits for SPF, SPB, uniform, normal
// and pattern blocks (every bit count 0..7) against records assembled
// here bit by bit; checks the record lengths 1, 3, 23, 44 and 42 + 16n.
module tb_block_packer;
  import abtc_pkg::*;
  import abtc_model_pkg::*;
  logic spf, spb;
  blk_type_t btype;
  pix_t ymean;
  logic [AM_W-1:0] am5;
  logic [15:0] bp;
  logic [NBITS_W-1:0] nbits;
  logic [AME_MAX_W-1:0] ame [BLK_PIX];
  logic [CMEAN_W-1:0] cb6, cr6;
  record_t rec;
  int checks = 0, failures = 0;
  block_packer dut (.spf, .spb, .btype, .ymean, .am5, .bp, .nbits, .ame, .cb6, .cr6, .rec);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bitq_t q;
      int kind, n, explen;
      q.delete();
      kind = t % 5;
      n = $urandom_range(0, 7);
      spf = (kind == 4); spb = (kind == 3) || (kind == 4 && t % 2 == 0);
      btype = blk_type_t'(kind < 3 ? kind : $urandom_range(0, 2));
      ymean = 8'($urandom); am5 = 5'($urandom); bp = 16'($urandom);
      nbits = 3'(n); cb6 = 6'($urandom); cr6 = 6'($urandom);
      for (int i = 0; i < 16; i++) ame[i] = 7'($urandom_range(0, (1 << n) - 1));
      #1;
      if (kind == 4) put(q, 1, 1);
      else if (kind == 3) put(q, 3, 3);
      else begin
        put(q, kind, 3);
        if (kind == 2) put(q, n, 3);
        put(q, ymean, 8);
        if (kind == 0) put(q, am5, 5);
        if (kind != 1) for (int i = 0; i < 16; i++) put(q, bp[i], 1);
        if (kind == 2) for (int i = 0; i < 16; i++) put(q, ame[i], n);
        put(q, cb6, 6); put(q, cr6, 6);
      end
      explen = (kind == 4) ? 1 : (kind == 3) ? 3 : (kind == 1) ? 23 : (kind == 0) ? 44 : 42 + 16 * n;
      checks++;
      if (rec.len != 8'(q.size()) || q.size() != explen) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d len %0d exp %0d", kind, rec.len, q.size());
      end
      for (int b = 0; b < q.size(); b++) begin
        checks++;
        if (rec.bits[q.size() - 1 - b] != q[b]) failures++;
      end
      checks++;
      if ((rec.bits >> q.size()) != '0) failures++;
    end
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
