// server: serves the quad-pair requests of the instruction unit.
//
// The instruction unit gives the address of a quad and wants that quad
// (lo) and the next one (hi). Each is located by a quad_find comparator in
// the order read buffer, fetch buffer, cache memory; failing all three the
// quad is either on its way in the running fetch (wait) or missing.
//
// Per quad the server then
//   * delivers it from the read buffer or the fetch buffer (fetch bypass
//     included), or
//   * reads its transfer block from the data RAM, bypasses the quad to the
//     instruction unit and copies the row with its valid bits into the read
//     buffer at the same clock edge (LoadReadBuf), updating the LRU bit;
//   * or starts a demand fetch (start_fetcher; strt_fetch2 when it is the
//     second quad that is missing).
// The data RAM has one port, so when both quads are cache memory hits in
// different transfer blocks the first is delivered in the first cycle and
// the second one cycle later. A second-quad demand fetch is only started
// once the first quad no longer waits for the fetcher.
//
// Handshake: ready[0]/ready[1] rise combinationally as soon as the first /
// second quad is on data_lo / data_hi; the instruction unit answers with
// ack (which may come in the same cycle, giving a one-cycle access). A
// delivered quad is held in a register until ack, so later changes of the
// buffers cannot disturb it; ack without both ready bits aborts the
// request (a jump). Request and address must stay stable until ack.
// When a demand fetch that one of the quads waits for ends in an error,
// the server raises error (from the next cycle until ack) with ready = 00
// and the error status {timeout, pagefault} in the low bits of data_lo;
// it starts no new demand fetch for this request.
// The search order, bypasses, LRU update and two-cycle border case follow
// the original design; the hold registers replace its "next" state
// controller and are this design's own choice, as is the error encoding.
module server
  import icache_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // instruction unit
  input  logic               request,
  input  addr_t              address,
  input  logic               ack,
  output logic [1:0]         ready,
  output quad_t              data_lo,
  output quad_t              data_hi,
  output logic               error,
  // tag/status RAM read ports
  output set_t               set1,
  output set_t               set2,
  input  tag_t    [WAYS-1:0] tags1,
  input  status_t [WAYS-1:0] st1,
  input  tag_t    [WAYS-1:0] tags2,
  input  status_t [WAYS-1:0] st2,
  // LRU update
  output logic               lru_we,
  output set_t               lru_set,
  output logic               lru_way,
  // read buffer
  input  tba_t               rb_addr,
  input  qmask_t             rb_valid,
  input  quad_t              rb_q_lo,
  input  quad_t              rb_q_hi,
  output word_t              w_lo,
  output word_t              w_hi,
  output logic               byp_lo,
  output logic               byp_hi,
  output logic               rb_load,
  output tba_t               rb_load_addr,
  output qmask_t             rb_load_valid,
  // fetch buffer and fetcher state
  input  tba_t               fb_addr,
  input  logic               fb_qv_lo,
  input  logic               fb_qv_hi,
  input  quad_t              fb_q_lo,
  input  quad_t              fb_q_hi,
  input  logic               fetch_active,
  input  word_t              fetch_qp,
  input  logic               dem_error,
  input  logic [1:0]         err_code,
  // data RAM
  output logic               ram_req,
  output ram_addr_t          ram_addr,
  // fetcher start
  output logic               start_fetcher,
  output logic               strt_fetch2,
  output addr_t              demand_addr
);

  typedef enum logic [2:0] {SRC_RB, SRC_FB, SRC_RAM, SRC_WAIT, SRC_MISS} src_e;

  addr_t     a1, a2;
  logic      rb1, fb1, wt1, ch1, way1;
  logic      rb2, fb2, wt2, ch2, way2;
  ram_addr_t ra1, ra2;
  qmask_t    tv1, tv2;
  src_e      src1, src2;
  logic      got1, got2;
  quad_t     hold1, hold2;
  logic      need1, need2, ram1, ram2, avail1, avail2, miss1, miss2;
  quad_t     live1, live2;
  logic      errq, err_now;
  logic [1:0] errc;

  assign a1 = address;
  assign a2 = address + 1'b1;
  assign set1 = a_set(a1);
  assign set2 = a_set(a2);
  assign w_lo = a_word(a1);
  assign w_hi = a_word(a2);

  quad_find u_find1 (
    .addr(a1), .rb_addr, .rb_valid, .fb_addr, .fb_qv(fb_qv_lo),
    .fetch_active, .fetch_qp, .tags(tags1), .st(st1),
    .rb_hit(rb1), .fb_hit(fb1), .fb_wait(wt1), .cache_hit(ch1),
    .way(way1), .ram_addr(ra1), .tb_valid_bits(tv1)
  );

  quad_find u_find2 (
    .addr(a2), .rb_addr, .rb_valid, .fb_addr, .fb_qv(fb_qv_hi),
    .fetch_active, .fetch_qp, .tags(tags2), .st(st2),
    .rb_hit(rb2), .fb_hit(fb2), .fb_wait(wt2), .cache_hit(ch2),
    .way(way2), .ram_addr(ra2), .tb_valid_bits(tv2)
  );

  function automatic src_e pick(logic rb, logic fb, logic ch, logic wt);
    if (rb)      return SRC_RB;
    else if (fb) return SRC_FB;
    else if (ch) return SRC_RAM;
    else if (wt) return SRC_WAIT;
    else         return SRC_MISS;
  endfunction

  always_comb begin
    src1  = pick(rb1, fb1, ch1, wt1);
    src2  = pick(rb2, fb2, ch2, wt2);
    need1 = request && !got1;
    need2 = request && !got2;

    // one data RAM row per cycle, the first quad first
    ram1 = need1 && src1 == SRC_RAM;
    ram2 = need2 && src2 == SRC_RAM && (!ram1 || ra2 == ra1);
    ram_req  = ram1 || (need2 && src2 == SRC_RAM);
    ram_addr = ram1 ? ra1 : ra2;
    byp_lo   = ram1;
    byp_hi   = ram2;

    rb_load       = ram_req;
    rb_load_addr  = ram1 ? a_tba(a1) : a_tba(a2);
    rb_load_valid = ram1 ? tv1 : tv2;
    lru_we        = ram_req;
    lru_set       = ram1 ? a_set(a1) : a_set(a2);
    lru_way       = ram1 ? way1 : way2;

    avail1 = need1 && !errq && (src1 == SRC_RB || src1 == SRC_FB || ram1);
    avail2 = need2 && !errq && (src2 == SRC_RB || src2 == SRC_FB || ram2);

    live1 = (src1 == SRC_FB) ? fb_q_lo : rb_q_lo;
    live2 = (src2 == SRC_FB) ? fb_q_hi : rb_q_hi;
    data_lo = errq ? quad_t'(errc) : got1 ? hold1 : live1;
    data_hi = got2 ? hold2 : live2;
    ready   = errq ? 2'b00 : {got2 || avail2, got1 || avail1};
    error   = errq;

    // a failed demand fetch is reported when one of our quads waited for it
    err_now = dem_error && ((need1 && src1 == SRC_WAIT) ||
                            (need2 && src2 == SRC_WAIT));

    // demand fetch: first quad first; the second only when the first is
    // not waiting for the fetcher
    miss1 = need1 && !errq && src1 == SRC_MISS;
    miss2 = need2 && !errq && src2 == SRC_MISS && !(need1 && src1 == SRC_WAIT);
    start_fetcher = miss1 || miss2;
    strt_fetch2   = !miss1 && miss2;
    demand_addr   = miss1 ? a1 : a2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got1 <= 1'b0;
      got2 <= 1'b0;
      errq <= 1'b0;
      errc <= '0;
    end else if (!request || ack) begin
      got1 <= 1'b0;
      got2 <= 1'b0;
      errq <= 1'b0;
    end else begin
      if (err_now) begin
        errq <= 1'b1;
        errc <= err_code;
      end
      if (avail1) got1 <= 1'b1;
      if (avail2) got2 <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (avail1) hold1 <= live1;
    if (avail2) hold2 <= live2;
  end

  // a delivered quad stays delivered until the instruction unit acknowledges
  a_ready_held: assert property (@(posedge clk) disable iff (!rst_n)
    request && !ack && ready[0] |=> ready[0] || !request || error);

endmodule
