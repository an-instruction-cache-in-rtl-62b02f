// fetcher: prefetcher, demand fetcher and fetch controller.
//
// Fetches transfer blocks from main memory through the bus unit into the
// fetch buffer and stores the buffer in the cache afterwards. States:
//   REST  - idle;
//   PRE   - prefetching the next transfer block (prefetch_lookup_on_hits:
//           started when the instruction unit requests, the server did not
//           start a demand fetch, and fetch_lookup reports the next
//           transfer block absent); all 8 quads are asked for (count = 7);
//   DEM   - demand fetching with wrap-around: started by the server's
//           start_fetcher at the missing quad, fetching it and the rest of
//           its transfer block (count = 7 - word); lower quads are skipped;
//   STORE - the fetch buffer is written into the data RAM (when the
//           arbiter grants it) and the tag/status of its block is updated
//           (status_update chooses the block, LRU replacement).
// The quad pointer qp names the fetch buffer place of the next arriving
// quad and is incremented on every bus ready; after the 8th place the
// buffer is stored.
//
// A demand fetch stops a running prefetch or demand fetch ("stop
// prefetch"/"stop demand fetch"): if quads already arrived they are kept,
// so cancel is raised first, the buffer is stored, and the new request is
// issued with valid afterwards; if none arrived, valid and cancel are
// raised together. A demand that comes while storing is remembered and
// issued right after.
//
// Bus unit protocol (synchronous, sampled at the clock edge): valid for
// one cycle with fetch_addr and count (number of quads minus one); the bus
// unit then returns the quads in order, one per cycle in which ready is
// set; cancel ends the running burst. demand_pre tells the MMU which
// address to translate (00 idle, 01 prefetch address, 10 demand address,
// 11 demand pending while the fetch buffer is stored).
// Errors: bus_error (bus unit timeout) or mmu_pagefault ends the running
// burst in place of a ready. Quads already received are stored as usual.
// During a prefetch the error is otherwise ignored and prefetching stays
// off until the next demand fetch; during a demand fetch it is passed to
// the server (dem_error, err_code = {timeout, pagefault}) in the same cycle.
// States, wrap-around, count values, stop rules and demand_pre codes
// follow the original design; merging its two separate state controllers
// into one state register is this design's choice, as are the way an error
// ends the burst and how long prefetching stays off after one.
module fetcher
  import icache_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // instruction unit / server
  input  logic               request,
  input  addr_t              address,
  input  logic               start_fetcher,
  input  addr_t              demand_addr,
  output logic               fetch_active,
  output word_t              qp,
  // tag/status RAM: read port and write port
  output set_t               rd_set,
  input  tag_t    [WAYS-1:0] rd_tag,
  input  status_t [WAYS-1:0] rd_st,
  output logic               ts_we,
  output set_t               ts_set,
  output logic               ts_way,
  output tag_t               ts_tag,
  output logic [BLKQ-1:0]    ts_data_valid,
  // fetch buffer and its address register
  input  tba_t               fb_addr,
  input  qmask_t             fb_valid,
  output logic               fb_load,
  output tba_t               fb_addr_in,
  output logic               fb_clear,
  output logic               en_fetch,
  // data RAM write through the arbiter
  output logic               wr_req,
  output ram_addr_t          wr_addr,
  input  logic               wr_gnt,
  // bus unit
  output logic               bus_valid,
  output logic               bus_cancel,
  output logic [2:0]         bus_count,
  output addr_t              fetch_addr,
  input  logic               bus_ready,
  input  logic               bus_error,
  input  logic               mmu_pagefault,
  // error of a demand fetch, to the server (one cycle)
  output logic               dem_error,
  output logic [1:0]         err_code,
  // MMU
  output demand_pre_t        demand_pre,
  output addr_t              pref_addr,
  // event flags (one cycle each)
  output logic               ev_prefetch,
  output logic               ev_demand,
  output logic               ev_stop,
  output logic               ev_store,
  output logic               ev_replace,
  output logic               ev_pre_error
);

  typedef enum logic [1:0] {F_REST, F_PRE, F_DEM, F_STORE} fstate_e;

  fstate_e     state, state_n;
  word_t       qp_n;
  logic        unwritten, dem_pend, dem_pend_n;
  addr_t       dem_addr_q, dem_addr_n;
  demand_pre_t store_mode, store_mode_n;
  logic        trblock_hit, take, last, dirty, busy, err, pre_off;
  logic        start_dem, start_pre;
  addr_t       dem_src;
  logic        su_way, su_replace;
  tag_t        su_tag;
  logic [BLKQ-1:0] su_valid;
  ram_addr_t   su_ram;

  pref_addr_dec u_padec (.addr(address), .pref_addr);

  assign rd_set = (state == F_STORE) ? tba_set(fb_addr) : a_set(pref_addr);

  fetch_lookup u_lookup (
    .address, .fb_addr, .tags(rd_tag), .st(rd_st), .trblock_hit
  );

  status_update u_supd (
    .fb_addr, .fb_valid, .tags(rd_tag), .st(rd_st),
    .way(su_way), .replace(su_replace), .new_tag(su_tag),
    .new_valid(su_valid), .ram_addr(su_ram)
  );

  always_comb begin
    busy     = (state == F_PRE) || (state == F_DEM);
    en_fetch = busy;
    err      = busy && (bus_error || mmu_pagefault);
    take     = busy && bus_ready && !err;
    last     = take && (qp == word_t'(TBQ - 1));
    dirty    = unwritten || take;
    dem_src  = start_fetcher ? demand_addr : dem_addr_q;

    state_n      = state;
    qp_n         = take ? qp + 1'b1 : qp;
    dem_pend_n   = dem_pend;
    dem_addr_n   = dem_addr_q;
    store_mode_n = store_mode;
    start_dem    = 1'b0;
    start_pre    = 1'b0;
    bus_cancel   = 1'b0;
    wr_req       = 1'b0;
    ts_we        = 1'b0;
    ev_stop      = 1'b0;

    unique case (state)
      F_REST: begin
        if (start_fetcher)                  start_dem = 1'b1;
        else if (request && !trblock_hit && !pre_off) start_pre = 1'b1;
      end
      F_PRE, F_DEM: begin
        if (start_fetcher) begin
          ev_stop    = 1'b1;
          bus_cancel = 1'b1;
          if (dirty) begin
            state_n      = F_STORE;
            dem_pend_n   = 1'b1;
            dem_addr_n   = demand_addr;
            store_mode_n = (state == F_PRE) ? DP_PRE : DP_DEMAND;
          end else begin
            start_dem = 1'b1;
          end
        end else if (last || (err && dirty)) begin
          state_n      = F_STORE;
          dem_pend_n   = 1'b0;
          store_mode_n = (state == F_PRE) ? DP_PRE : DP_DEMAND;
        end else if (err) begin
          state_n = F_REST;
        end
      end
      F_STORE: begin
        wr_req = 1'b1;
        if (start_fetcher) begin
          dem_pend_n = 1'b1;
          dem_addr_n = demand_addr;
        end
        if (wr_gnt) begin
          ts_we = 1'b1;
          if (start_fetcher || dem_pend) start_dem = 1'b1;
          else                           state_n = F_REST;
        end
      end
      default: state_n = F_REST;
    endcase

    if (start_dem) begin
      state_n    = F_DEM;
      qp_n       = a_word(dem_src);
      dem_pend_n = 1'b0;
    end else if (start_pre) begin
      state_n = F_PRE;
      qp_n    = '0;
    end

    bus_valid  = start_dem || start_pre;
    fetch_addr = start_dem ? dem_src : pref_addr;
    bus_count  = start_dem ? 3'(TBQ - 1 - a_word(dem_src)) : 3'(TBQ - 1);
    fb_load    = bus_valid;
    fb_clear   = bus_valid;
    fb_addr_in = a_tba(fetch_addr);

    wr_addr       = su_ram;
    ts_set        = tba_set(fb_addr);
    ts_way        = su_way;
    ts_tag        = su_tag;
    ts_data_valid = su_valid;

    fetch_active = busy;
    unique case (state)
      F_REST:  demand_pre = DP_IDLE;
      F_PRE:   demand_pre = DP_PRE;
      F_DEM:   demand_pre = DP_DEMAND;
      default: demand_pre = (dem_pend || start_fetcher) ? DP_DEMUPD : store_mode;
    endcase

    dem_error    = err && state == F_DEM;
    err_code     = {bus_error, mmu_pagefault};
    ev_pre_error = err && state == F_PRE;

    ev_prefetch = start_pre;
    ev_demand   = start_dem;
    ev_store    = ts_we;
    ev_replace  = ts_we && su_replace;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= F_REST;
      qp         <= '0;
      unwritten  <= 1'b0;
      dem_pend   <= 1'b0;
      dem_addr_q <= '0;
      store_mode <= DP_IDLE;
      pre_off    <= 1'b0;
    end else begin
      state      <= state_n;
      qp         <= qp_n;
      dem_pend   <= dem_pend_n;
      dem_addr_q <= dem_addr_n;
      store_mode <= store_mode_n;
      if (start_dem)         pre_off <= 1'b0;
      else if (ev_pre_error) pre_off <= 1'b1;
      if (take)       unwritten <= 1'b1;
      else if (ts_we) unwritten <= 1'b0;
    end
  end

  // the fetch buffer is only stored when it holds something new
  a_store_only_dirty: assert property (@(posedge clk) disable iff (!rst_n)
    ts_we |-> unwritten);

endmodule
