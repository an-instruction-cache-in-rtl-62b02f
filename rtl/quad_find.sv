// quad_find: locates one requested quad (one of the server's comparators).
//
// Given a quad address it checks, all combinationally:
//   rb_hit    - the read buffer holds its transfer block and the quad is valid;
//   fb_hit    - the fetch buffer holds its transfer block and the quad is
//               valid or arriving from the bus unit this cycle;
//   fb_wait   - the fetch buffer holds its transfer block, the quad has not
//               arrived yet, but the running fetch will still bring it
//               (the quad pointer has not passed it);
//   cache_hit - the tag of one of the two blocks of the set matches, that
//               block is valid and the quad's data_valid bit is set.
// For a cache hit it also gives the way, the data RAM row {set, way,
// transfer block} and the 8 data_valid bits of that transfer block, which
// the read buffer copies along with the row.
// Hit detection follows the original comparators; the fb_wait rule (a quad
// skipped by wrap-around or left out by a stopped fetch counts as a miss)
// is this design's choice.
module quad_find
  import icache_pkg::*;
(
  input  addr_t              addr,
  input  tba_t               rb_addr,
  input  qmask_t             rb_valid,
  input  tba_t               fb_addr,
  input  logic               fb_qv,
  input  logic               fetch_active,
  input  word_t              fetch_qp,
  input  tag_t    [WAYS-1:0] tags,
  input  status_t [WAYS-1:0] st,
  output logic               rb_hit,
  output logic               fb_hit,
  output logic               fb_wait,
  output logic               cache_hit,
  output logic               way,
  output ram_addr_t          ram_addr,
  output qmask_t             tb_valid_bits
);

  logic [WAYS-1:0] m;
  logic            fb_tb;

  always_comb begin
    rb_hit = (a_tba(addr) == rb_addr) && rb_valid[a_word(addr)];
    fb_tb  = (a_tba(addr) == fb_addr);
    fb_hit = fb_tb && fb_qv;
    fb_wait = fb_tb && !fb_qv && fetch_active && (a_word(addr) >= fetch_qp);
    for (int w = 0; w < WAYS; w++)
      m[w] = (tags[w] == a_tag(addr)) && st[w].block_valid
             && st[w].data_valid[{a_tb(addr), a_word(addr)}];
    cache_hit = |m;
    way = m[1];
    ram_addr = {a_set(addr), way, a_tb(addr)};
    tb_valid_bits = tb_valid(st[way], a_tb(addr));
  end

endmodule
