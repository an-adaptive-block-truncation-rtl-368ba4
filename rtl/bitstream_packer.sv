// bitstream_packer: packs variable-length block records into 32-bit words,
// first record bit into the word's MSB.  Records enter through in_valid /
// in_rec with no back-pressure; up to one 32-bit word leaves per cycle
// through out_valid / out_word.  flush asks for the bits still held after
// the last record of a frame to be sent as one final word, zero padded;
// out_last marks that final word (or the last full word when nothing is
// left over).
//
// Capacity: the bit accumulator holds 224 bits.  The encoder delivers at
// most one record (at most 154 bits) per 8 cycles while 8 words can leave
// in that time, so fewer than 32 bits are held when a record arrives and
// the accumulator cannot overflow; an assertion checks this.
module bitstream_packer
  import abtc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  record_t             in_rec,
  input  logic                flush,
  output logic                out_valid,
  output logic [WORD_W-1:0]   out_word,
  output logic                out_last
);
  localparam int unsigned ACC_W = 224;

  logic [ACC_W-1:0] acc, acc_n, ins;
  logic [8:0]       fill, fill_n;
  logic             flush_pend, flush_pend_n;
  logic             emit, last;

  always_comb begin
    acc_n        = acc;
    fill_n       = fill;
    flush_pend_n = flush_pend | flush;
    emit         = 1'b0;
    last         = 1'b0;
    if (fill >= 9'd32) begin
      emit   = 1'b1;
      acc_n  = acc << 32;
      fill_n = fill - 9'd32;
      last   = flush_pend && !in_valid && fill == 9'd32;
    end else if (flush_pend && !in_valid && fill != 9'd0) begin
      emit   = 1'b1;
      acc_n  = '0;
      fill_n = '0;
      last   = 1'b1;
    end
    if (last || (flush_pend && !in_valid && fill == 9'd0)) flush_pend_n = flush;
    ins = '0;
    if (in_valid) begin
      ins    = ACC_W'(in_rec.bits) << (9'(ACC_W) - fill_n - 9'(in_rec.len));
      acc_n  = acc_n | ins;
      fill_n = fill_n + 9'(in_rec.len);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      fill       <= '0;
      flush_pend <= 1'b0;
      out_valid  <= 1'b0;
      out_word   <= '0;
      out_last   <= 1'b0;
    end else begin
      acc        <= acc_n;
      fill       <= fill_n;
      flush_pend <= flush_pend_n;
      out_valid  <= emit;
      out_word   <= acc[ACC_W-1 -: WORD_W];
      out_last   <= last;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (fill_n <= 9'(ACC_W)))
    else $error("bitstream_packer: accumulator overflow");
endmodule
