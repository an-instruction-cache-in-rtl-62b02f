// icache: two-way set-associative instruction cache with prefetching.
//
// 1024 quads (4 KByte) in 16 sets of two 32-quad blocks; each block is
// divided into four 8-quad transfer blocks, the unit fetched from main
// memory. The instruction unit asks for a quad address and receives that
// quad and the next one on a 64-bit path (data_lo, data_hi); main memory is
// reached through a 32-bit bus unit. Between them sit
//   server        - finds the two quads and delivers them (server.sv);
//   read buffer   - copy of the transfer block last read from the data RAM;
//   fetch buffer  - the transfer block being fetched, with fetch bypass;
//   data RAM      - 128 x 256 bits, single ported (ram_arbiter: server first);
//   tag/status RAM- tags, block_valid, data_valid and LRU bits, multi-ported;
//   status reg    - transfer block addresses of the two buffers;
//   fetcher       - one-transfer-block-lookahead prefetch on hits, demand
//                   fetch with wrap-around, stop prefetch/stop demand fetch;
//   flush_ctrl    - 16-cycle flush of all block_valid bits;
//   ram_bist      - memory self test of the data RAM.
//
// Interfaces (all synchronous to clk, active-low asynchronous rst_n):
//   instruction unit: request/address held until ack; ready[0]/ready[1]
//     mark data_lo/data_hi valid (combinational, so a hit completes in the
//     cycle of the request); ack ends the request, with or without ready;
//     error (ready = 00, status {timeout, pagefault} in data_lo[1:0]) when
//     a demand fetch for the request failed.
//   bus unit: bus_valid (one cycle) with bus_addr and bus_count (quads - 1);
//     bus_ready marks a quad on bus_data; bus_cancel ends a burst;
//     bus_error (timeout) ends a burst in place of a ready.
//   MMU: demand_pre (00 idle, 01 prefetch, 10 demand, 11 demand waiting for
//     a fetch buffer store) and pref_addr, the prefetch address;
//     mmu_pagefault ends a burst in place of a ready.
//   flush: request to flush; flush_busy while it is pending or running.
//   self test: self_test asks for a March C- test of the data RAM
//     (ram_bist, 768 cycles) once the fetcher is idle; test_busy while
//     pending or running, test_fail from the first mismatch until the next
//     test. The test ends with a flush, since it destroys the cached quads.
// pref_addr[2:0] is always zero: a prefetch starts at a transfer block.
// The address given on bus_addr is the virtual quad address of the first
// quad wanted; translating it is the MMU's task outside this block.
module icache
  import icache_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction unit
  input  logic        request,
  input  addr_t       address,
  input  logic        ack,
  output logic [1:0]  ready,
  output quad_t       data_lo,
  output quad_t       data_hi,
  output logic        error,
  // bus unit
  output logic        bus_valid,
  output logic        bus_cancel,
  output logic [2:0]  bus_count,
  output addr_t       bus_addr,
  input  logic        bus_ready,
  input  quad_t       bus_data,
  input  logic        bus_error,
  // MMU
  output demand_pre_t demand_pre,
  output addr_t       pref_addr,
  input  logic        mmu_pagefault,
  // cache flushing mode
  input  logic        flush,
  output logic        flush_busy,
  // memory self test
  input  logic        self_test,
  output logic        test_busy,
  output logic        test_fail
);

  // tag/status RAM: port 0 first quad, port 1 second quad, port 2 fetcher
  set_t               ts_rd_set [3];
  tag_t    [WAYS-1:0] ts_rd_tag [3];
  status_t [WAYS-1:0] ts_rd_st  [3];
  logic               f_we, f_way, s_we, s_way, fl_we;
  set_t               f_set, s_set, fl_set;
  tag_t               f_tag;
  logic [BLKQ-1:0]    f_dv;

  // buffers
  tba_t      rb_addr, fb_addr, rb_load_addr, fb_addr_in;
  logic      rb_load, fb_load, fb_clear_f, en_fetch;
  qmask_t    rb_valid, rb_load_valid, fb_valid;
  word_t     w_lo, w_hi, qp;
  logic      byp_lo, byp_hi, fb_qv_lo, fb_qv_hi;
  quad_t     rb_q_lo, rb_q_hi, fb_q_lo, fb_q_hi;
  row_t      ram_rdata, fb_row;

  // data RAM
  logic      s_ram_req, wr_req, wr_gnt, ram_we;
  ram_addr_t s_ram_addr, wr_addr, ram_addr;

  // server <-> fetcher
  logic      start_fetcher, strt_fetch2, fetch_active;
  addr_t     demand_addr;
  logic      ev_prefetch, ev_demand, ev_stop, ev_store, ev_replace, ev_pre_error;
  logic      dem_error;
  logic [1:0] err_code;

  // flush
  logic      fl_busy, fl_buf_clear, req_int;

  // memory self test
  logic      bt_busy, bt_active, bt_done, bt_we, arb_we;
  ram_addr_t bt_addr, arb_addr;
  row_t      bt_wdata;

  assign req_int    = request && !fl_busy && !bt_busy;
  assign flush_busy = fl_busy;
  assign test_busy  = bt_busy;

  // the test overwrites the data RAM, so it ends with a flush
  flush_ctrl u_flush (
    .clk, .rst_n, .flush(flush || bt_done),
    .fetcher_idle(demand_pre == DP_IDLE && !bt_active),
    .busy(fl_busy), .fl_we, .fl_set, .buf_clear(fl_buf_clear)
  );

  ram_bist u_bist (
    .clk, .rst_n, .test(self_test), .idle(demand_pre == DP_IDLE && !fl_busy),
    .busy(bt_busy), .active(bt_active), .done(bt_done), .fail(test_fail),
    .addr(bt_addr), .we(bt_we), .wdata(bt_wdata), .rdata(ram_rdata)
  );

  assign ram_addr = bt_active ? bt_addr : arb_addr;
  assign ram_we   = bt_active ? bt_we   : arb_we;

  tag_status_ram #(.NRD(3)) u_tsram (
    .clk, .rst_n,
    .rd_set(ts_rd_set), .rd_tag(ts_rd_tag), .rd_st(ts_rd_st),
    .f_we, .f_set, .f_way, .f_tag, .f_block_valid(1'b1), .f_data_valid(f_dv),
    .s_we, .s_set, .s_way,
    .fl_we, .fl_set
  );

  data_ram u_dram (
    .clk, .addr(ram_addr), .we(ram_we), .wmask(bt_active ? '1 : fb_valid),
    .wdata(bt_active ? bt_wdata : fb_row),
    .rdata(ram_rdata)
  );

  ram_arbiter u_arb (
    .s_req(s_ram_req), .s_addr(s_ram_addr), .f_req(wr_req), .f_addr(wr_addr),
    .addr(arb_addr), .we(arb_we), .f_gnt(wr_gnt)
  );

  status_reg u_sreg (
    .clk, .rst_n, .rb_load, .rb_addr_in(rb_load_addr),
    .fb_load, .fb_addr_in, .rb_addr, .fb_addr
  );

  read_buffer u_rbuf (
    .clk, .rst_n, .load(rb_load), .row_in(ram_rdata), .valid_in(rb_load_valid),
    .flush(fl_buf_clear), .w_lo, .w_hi, .byp_lo, .byp_hi,
    .q_lo(rb_q_lo), .q_hi(rb_q_hi), .valid(rb_valid)
  );

  fetch_buffer u_fbuf (
    .clk, .rst_n, .clear(fb_clear_f || fl_buf_clear), .en_fetch, .qp,
    .ready(bus_ready && !bus_error && !mmu_pagefault), .mem_data(bus_data), .w_lo, .w_hi,
    .q_lo(fb_q_lo), .q_hi(fb_q_hi), .qv_lo(fb_qv_lo), .qv_hi(fb_qv_hi),
    .row(fb_row), .valid(fb_valid)
  );

  server u_server (
    .clk, .rst_n,
    .request(req_int), .address, .ack, .ready, .data_lo, .data_hi, .error,
    .set1(ts_rd_set[0]), .set2(ts_rd_set[1]),
    .tags1(ts_rd_tag[0]), .st1(ts_rd_st[0]),
    .tags2(ts_rd_tag[1]), .st2(ts_rd_st[1]),
    .lru_we(s_we), .lru_set(s_set), .lru_way(s_way),
    .rb_addr, .rb_valid, .rb_q_lo, .rb_q_hi, .w_lo, .w_hi, .byp_lo, .byp_hi,
    .rb_load, .rb_load_addr, .rb_load_valid,
    .fb_addr, .fb_qv_lo, .fb_qv_hi, .fb_q_lo, .fb_q_hi,
    .fetch_active, .fetch_qp(qp), .dem_error, .err_code,
    .ram_req(s_ram_req), .ram_addr(s_ram_addr),
    .start_fetcher, .strt_fetch2, .demand_addr
  );

  fetcher u_fetcher (
    .clk, .rst_n,
    .request(req_int), .address, .start_fetcher, .demand_addr,
    .fetch_active, .qp,
    .rd_set(ts_rd_set[2]), .rd_tag(ts_rd_tag[2]), .rd_st(ts_rd_st[2]),
    .ts_we(f_we), .ts_set(f_set), .ts_way(f_way), .ts_tag(f_tag),
    .ts_data_valid(f_dv),
    .fb_addr, .fb_valid, .fb_load, .fb_addr_in, .fb_clear(fb_clear_f), .en_fetch,
    .wr_req, .wr_addr, .wr_gnt,
    .bus_valid, .bus_cancel, .bus_count, .fetch_addr(bus_addr), .bus_ready,
    .bus_error, .mmu_pagefault, .dem_error, .err_code,
    .demand_pre, .pref_addr,
    .ev_prefetch, .ev_demand, .ev_stop, .ev_store, .ev_replace, .ev_pre_error
  );

endmodule
