// tb_fetcher: the fetcher with a fetch buffer, the address register and a
// bus unit model with fixed latency (2 cycles, no gaps). Checks, cycle by
// cycle: a prefetch of the next transfer block (count 7) and its store
// exactly one cycle after the 8th quad; a demand fetch with wrap-around
// (count 7 - word) whose store waits for the data RAM arbiter; stopping a
// prefetch after some quads (cancel first, store, then valid, DemandPre
// 11); stopping one before any quad (valid with cancel); the stored
// tag/status and the fetch buffer contents; a bus error during a prefetch
// (ignored, quads kept, prefetching off until a demand fetch) and a
// pagefault during a demand fetch (passed on with its code).
module tb_fetcher;
  import icache_pkg::*;

  logic clk = 0, rst_n = 0, request = 0, start_fetcher = 0, wr_gnt_en = 1;
  addr_t address = '0, demand_addr = '0;
  logic fetch_active, ts_we, ts_way, fb_load, fb_clear, en_fetch, wr_req, wr_gnt;
  word_t qp;
  set_t rd_set, ts_set;
  tag_t [1:0] rd_tag;
  status_t [1:0] rd_st;
  tag_t ts_tag;
  logic [31:0] ts_data_valid;
  tba_t fb_addr, fb_addr_in, rb_addr_unused;
  qmask_t fb_valid;
  ram_addr_t wr_addr;
  logic bus_valid, bus_cancel, bus_ready;
  logic [2:0] bus_count;
  addr_t fetch_addr, pref_addr;
  demand_pre_t demand_pre;
  logic ev_prefetch, ev_demand, ev_stop, ev_store, ev_replace, ev_pre_error;
  logic bus_error = 0, mmu_pagefault = 0, dem_error;
  logic [1:0] err_code;
  quad_t bus_data, q_lo, q_hi;
  logic qv_lo, qv_hi;
  row_t fb_row;
  int bursts, cancels;
  tag_t mtag [16][2];
  status_t mst [16][2];
  int checks = 0, failures = 0;

  assign wr_gnt = wr_req && wr_gnt_en;
  always_comb begin
    rd_tag = {mtag[rd_set][1], mtag[rd_set][0]};
    rd_st  = {mst[rd_set][1], mst[rd_set][0]};
  end
  always @(posedge clk) if (ts_we) begin
    mtag[ts_set][ts_way] <= ts_tag;
    mst[ts_set][ts_way]  <= '{mru: 1'b1, block_valid: 1'b1, data_valid: ts_data_valid};
  end

  fetcher dut (.*);
  fetch_buffer u_fb (.clk, .rst_n, .clear(fb_clear), .en_fetch, .qp, .ready(bus_ready && !bus_error && !mmu_pagefault),
    .mem_data(bus_data), .w_lo(3'd0), .w_hi(3'd1), .q_lo, .q_hi, .qv_lo, .qv_hi,
    .row(fb_row), .valid(fb_valid));
  status_reg u_sr (.clk, .rst_n, .rb_load(1'b0), .rb_addr_in('0), .fb_load, .fb_addr_in,
    .rb_addr(rb_addr_unused), .fb_addr);
  bus_unit_model #(.LAT(2), .MAXGAP(0)) u_bus (.clk, .rst_n, .valid(bus_valid), .cancel(bus_cancel),
    .count(bus_count), .addr(fetch_addr), .err_div(0), .ready(bus_ready), .error(), .pagefault(), .data(bus_data), .bursts, .cancels);

  always #5 clk = ~clk;

  function automatic quad_t mem_word(addr_t a);
    return a[31:0] ^ {a[45:32], 18'h0};
  endfunction
  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask
  function automatic addr_t mk(tag_t t, int s, int tb, int w);
    return {t, 4'(s), 2'(tb), 3'(w)};
  endfunction
  task automatic step(); @(negedge clk); #1; endtask

  tag_t T;
  addr_t A, N, B, C, D;
  int t_store;

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    T = 37'h05_0000_0123;
    for (int s = 0; s < 16; s++) for (int w = 0; w < 2; w++) begin mtag[s][w] = '0; mst[s][w] = '0; end
    #12 rst_n = 1;

    // F1: prefetch of the next transfer block
    step(); A = mk(T, 1, 0, 2); N = mk(T, 1, 1, 0);
    request = 1; address = A; #1;
    chk("F1 valid", bus_valid && !bus_cancel && bus_count == 3'd7 && fetch_addr == N && pref_addr == N);
    chk("F1 idle code", demand_pre == DP_IDLE);
    t_store = -1;
    for (int c = 1; c <= 12; c++) begin
      step();
      if (c <= 9) chk("F1 pre code", demand_pre == DP_PRE);
      if (ts_we && t_store < 0) begin
        t_store = c;
        chk("F1 store", ts_set == 4'd1 && ts_way == 1'b0 && ts_tag == T &&
                        ts_data_valid == 32'h0000_FF00 && wr_addr == {4'd1, 1'b0, 2'd1});
      end
      if (c > 10) chk("F1 no second prefetch", !bus_valid);
    end
    chk("F1 store cycle", t_store == 10);
    for (int q = 0; q < 8; q++) chk("F1 contents", fb_row[q] == mem_word(N + addr_t'(q)));
    request = 0;

    // F2: demand fetch with wrap-around; the store waits for the arbiter
    step(); B = mk(T, 4, 2, 5); request = 1; address = B; start_fetcher = 1; demand_addr = B; #1;
    chk("F2 valid", bus_valid && !bus_cancel && bus_count == 3'd2 && fetch_addr == B);
    step(); start_fetcher = 0; #1;
    chk("F2 demand code", demand_pre == DP_DEMAND && qp == 3'd5 && fetch_active);
    wr_gnt_en = 0;
    repeat (4) step();     // quads at cycles 2,3,4
    chk("F2 store requested", wr_req && !ts_we);
    step(); chk("F2 store waits", wr_req && !ts_we);
    wr_gnt_en = 1; #1;
    chk("F2 store", ts_we && ts_set == 4'd4 && ts_data_valid == 32'h00E0_0000 && wr_addr == {4'd4, 1'b0, 2'd2});
    step(); chk("F2 rest", demand_pre == DP_IDLE && !wr_req);
    request = 0;

    // F3: stop a prefetch after three quads
    step(); C = mk(T, 7, 0, 0); request = 1; address = C; #1;
    chk("F3 prefetch", bus_valid && bus_count == 3'd7);
    repeat (4) step();     // quads at cycles 2,3,4 -> three valid
    D = mk(T, 9, 3, 6); start_fetcher = 1; demand_addr = D; #1;
    chk("F3 cancel first", bus_cancel && !bus_valid);
    step(); start_fetcher = 0; #1;
    chk("F3 code 11", demand_pre == DP_DEMUPD);
    chk("F3 store", ts_we && ts_set == 4'd7 && ts_data_valid == 32'h0000_0700);
    chk("F3 then valid", bus_valid && !bus_cancel && fetch_addr == D && bus_count == 3'd1);
    step(); chk("F3 demand", demand_pre == DP_DEMAND && qp == 3'd6);
    repeat (4) step();
    chk("F3 demand stored", mst[9][0].data_valid[31:24] == 8'hC0);
    request = 0;

    // F4: stop a prefetch before any quad arrived: valid with cancel
    step(); request = 1; address = mk(T, 11, 0, 0); #1;
    chk("F4 prefetch", bus_valid);
    step(); start_fetcher = 1; demand_addr = mk(T, 13, 0, 1); #1;
    chk("F4 valid+cancel", bus_valid && bus_cancel && bus_count == 3'd6);
    step(); start_fetcher = 0; request = 0;
    repeat (15) step();

    // F5: bus error during a prefetch after two quads
    step(); request = 1; address = mk(T, 3, 0, 0); #1;
    chk("F5 prefetch", bus_valid && bus_count == 3'd7);
    repeat (4) step();     // quads at cycles 2,3; error instead of the third
    bus_error = 1; #1;
    chk("F5 error ignored", ev_pre_error && !dem_error && !bus_cancel);
    step(); bus_error = 0; #1;
    chk("F5 quads kept", ts_we && ts_set == 4'd3 && ts_data_valid == 32'h0000_0300);
    address = mk(T, 5, 0, 0);
    step(); chk("F5 rest", demand_pre == DP_IDLE && !fetch_active);
    repeat (4) begin step(); chk("F5 prefetch off", !bus_valid); end

    // F6: pagefault during a demand fetch before any quad
    start_fetcher = 1; demand_addr = mk(T, 10, 2, 4); address = demand_addr; #1;
    chk("F6 demand", bus_valid && bus_count == 3'd3);
    step(); start_fetcher = 0; mmu_pagefault = 1; #1;
    chk("F6 error passed", dem_error && err_code == 2'b01 && !ev_pre_error);
    step(); mmu_pagefault = 0; address = mk(T, 12, 0, 0); #1;
    chk("F6 nothing stored", !ts_we && !wr_req);
    chk("F6 prefetch on again", bus_valid && fetch_addr == mk(T, 12, 1, 0));
    step(); request = 0;
    repeat (12) step();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
