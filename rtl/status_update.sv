// status_update: where and how a fetch buffer is stored in the cache.
//
// Given the fetch buffer's transfer block address and quad_valid bits and
// the tag/status words of its set, it decides the block (way) that
// receives it and the new tag/status of that block:
//   * if one of the two blocks already holds this tag (block_valid set),
//     that block is used and the new quads are added to its data_valid bits;
//   * otherwise a block is replaced: an invalid block if there is one, else
//     the least recently used one (the one whose MRU bit is clear). Its tag
//     is rewritten and only the new quads are marked valid.
// It also gives the data RAM row {set, way, transfer block}. Combinational.
// The merge/replace rule and LRU replacement follow the original design;
// preferring an invalid block is this design's choice.
module status_update
  import icache_pkg::*;
(
  input  tba_t               fb_addr,
  input  qmask_t             fb_valid,
  input  tag_t    [WAYS-1:0] tags,
  input  status_t [WAYS-1:0] st,
  output logic               way,
  output logic               replace,
  output tag_t               new_tag,
  output logic [BLKQ-1:0]    new_valid,
  output ram_addr_t          ram_addr
);

  logic [WAYS-1:0] hit;
  logic [BLKQ-1:0] ins;

  always_comb begin
    for (int w = 0; w < WAYS; w++)
      hit[w] = (tags[w] == tba_tag(fb_addr)) && st[w].block_valid;
    ins = '0;
    ins[tba_tb(fb_addr)*TBQ +: TBQ] = fb_valid;
    replace = !(|hit);
    if (!replace)                way = hit[1];
    else if (!st[0].block_valid) way = 1'b0;
    else if (!st[1].block_valid) way = 1'b1;
    else                         way = st[0].mru;   // replace the one not used last
    new_tag   = tba_tag(fb_addr);
    new_valid = replace ? ins : (st[way].data_valid | ins);
    ram_addr  = {tba_set(fb_addr), way, tba_tb(fb_addr)};
  end

endmodule
