// icache_pkg: sizes, field layout and shared types of the instruction cache.
//
// The cache stores 32-bit "quads" addressed by a 46-bit virtual quad
// address (30-bit quad address plus a 16-bit process identification code).
// The address splits, from the least significant end, into a 3-bit word
// field (quad within a transfer block), a 2-bit transfer block field, a
// 4-bit set field and a 37-bit tag. The cache is two-way set associative:
// 16 sets x 2 blocks x 32 quads = 1024 quads (4 KByte). A transfer block of
// 8 quads is the unit moved between main memory and the cache and is one
// row of the data RAM.
//
// The status word of a block is 34 bits: 32 data_valid bits (one per quad,
// index = transfer block * 8 + word), a block_valid bit and one LRU bit.
// The LRU bit is kept per block as a "most recently used" flag; of the two
// blocks of a set the one whose flag is clear is replaced first. All these
// numbers are the ones of the original prototype.
package icache_pkg;

  parameter int unsigned ADDR_W  = 46;  // virtual quad address
  parameter int unsigned QUAD_W  = 32;  // one instruction bus quad
  parameter int unsigned WORD_W  = 3;   // word field
  parameter int unsigned TB_W    = 2;   // transfer block field
  parameter int unsigned SET_W   = 4;   // set field
  parameter int unsigned WAYS    = 2;   // blocks per set
  parameter int unsigned TAG_W   = ADDR_W - WORD_W - TB_W - SET_W;  // 37
  parameter int unsigned TBA_W   = ADDR_W - WORD_W;                 // 43
  parameter int unsigned TBQ     = 1 << WORD_W;                     // 8 quads per transfer block
  parameter int unsigned BLKQ    = TBQ << TB_W;                     // 32 quads per block
  parameter int unsigned NSETS   = 1 << SET_W;                      // 16
  parameter int unsigned RAM_AW  = SET_W + 1 + TB_W;                // 7: set, block, transfer block

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [QUAD_W-1:0] quad_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [TB_W-1:0]   tb_t;
  typedef logic [SET_W-1:0]  set_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [TBA_W-1:0]  tba_t;      // transfer block address = address without word field
  typedef logic [RAM_AW-1:0] ram_addr_t;
  typedef logic [TBQ-1:0]    qmask_t;    // one bit per quad of a transfer block
  typedef quad_t [TBQ-1:0]   row_t;      // one data RAM row / buffer contents

  typedef struct packed {
    logic              mru;          // bit 33: block used most recently in its set
    logic              block_valid;  // bit 32
    logic [BLKQ-1:0]   data_valid;   // bits 31..0
  } status_t;

  // DemandPre code towards the MMU (first bit = demand, second = prefetch).
  typedef enum logic [1:0] {
    DP_IDLE   = 2'b00,  // fetcher idle, MMU idle
    DP_PRE    = 2'b01,  // prefetching: translate the prefetch address
    DP_DEMAND = 2'b10,  // demand fetching: translate the fetch address
    DP_DEMUPD = 2'b11   // demand fetch waiting while the fetch buffer is stored
  } demand_pre_t;

  function automatic word_t a_word(addr_t a); return a[WORD_W-1:0]; endfunction
  function automatic tb_t   a_tb(addr_t a);   return a[WORD_W +: TB_W]; endfunction
  function automatic set_t  a_set(addr_t a);  return a[WORD_W+TB_W +: SET_W]; endfunction
  function automatic tag_t  a_tag(addr_t a);  return a[ADDR_W-1 -: TAG_W]; endfunction
  function automatic tba_t  a_tba(addr_t a);  return a[ADDR_W-1:WORD_W]; endfunction

  function automatic tb_t   tba_tb(tba_t t);  return t[TB_W-1:0]; endfunction
  function automatic set_t  tba_set(tba_t t); return t[TB_W +: SET_W]; endfunction
  function automatic tag_t  tba_tag(tba_t t); return t[TBA_W-1 -: TAG_W]; endfunction

  // The 8 data_valid bits of one transfer block inside a status word.
  function automatic qmask_t tb_valid(status_t s, tb_t tb);
    return s.data_valid[tb*TBQ +: TBQ];
  endfunction

endpackage
