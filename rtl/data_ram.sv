// data_ram: the single-ported cache data memory.
//
// 128 rows of 8 quads (256 bits); one row holds one transfer block and is
// addressed by {set, block, transfer block}. Reading is combinational, so a
// cache memory hit delivers its quads in the same cycle. A write stores the
// quads selected by wmask at the clock edge; the mask lets a partly fetched
// transfer block be added to a row without destroying quads that are
// already valid there. Size and addressing follow the original design; the
// per-quad write mask is this design's choice.
module data_ram
  import icache_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << RAM_AW
) (
  input  logic       clk,
  input  ram_addr_t  addr,
  input  logic       we,
  input  qmask_t     wmask,
  input  row_t       wdata,
  output row_t       rdata
);

  row_t mem [DEPTH];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we)
      for (int q = 0; q < TBQ; q++)
        if (wmask[q]) mem[addr][q] <= wdata[q];
  end

endmodule
