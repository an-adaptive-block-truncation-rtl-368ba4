// moment_store: one moments_t entry (block type, mean, AM, bit plane; 33
// bits) per 4x4 block of a frame, holding the previous frame for the
// inter-frame test.  Simple dual-port memory: one synchronous read port
// (data one cycle after the address) and one write port.  A read and a
// write to the same address in the same cycle return the old entry.  The
// contents are not reset; the encoder never trusts them before one whole
// frame has been written.  DEPTH defaults to a VGA frame, 160 x 120 blocks.
module moment_store
  import abtc_pkg::*;
#(
  parameter int unsigned DEPTH = 19200,
  localparam int unsigned AW   = $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output moments_t      rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  moments_t      wr_data
);
  moments_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
