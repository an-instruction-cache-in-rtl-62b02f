// fetch_lookup: the fetcher's comparator for prefetch_lookup.
//
// Looks whether the transfer block following the one the instruction unit
// is reading is already present, so that it need not be prefetched:
// trblock_hit is set when the next transfer block is in the fetch buffer,
// or is fully valid (all 8 data_valid bits) in one of the two blocks of its
// set. It is also set when the requested transfer block itself is in the
// fetch buffer, so that a prefetch does not throw away the block the
// server is still reading. tags/st must be the tag/status words of the
// set of the next transfer block. Combinational; follows the original
// design, which likewise ignores the read buffer here.
module fetch_lookup
  import icache_pkg::*;
(
  input  addr_t              address,
  input  tba_t               fb_addr,
  input  tag_t    [WAYS-1:0] tags,
  input  status_t [WAYS-1:0] st,
  output logic               trblock_hit
);

  tba_t nxt;
  logic fetch_hit, cache_hit, keep;

  always_comb begin
    nxt       = a_tba(address) + 1'b1;
    fetch_hit = (nxt == fb_addr);
    cache_hit = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (tags[w] == tba_tag(nxt) && st[w].block_valid && &tb_valid(st[w], tba_tb(nxt)))
        cache_hit = 1'b1;
    keep        = (a_tba(address) == fb_addr);
    trblock_hit = keep || fetch_hit || cache_hit;
  end

endmodule
