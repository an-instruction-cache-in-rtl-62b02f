// tb_icache: end-to-end test of the instruction cache at its full size.
//
// An instruction unit model walks through code: runs of sequential quad
// pairs (step 1 or 2) broken by random jumps, over four tags so that sets
// overflow and blocks are replaced. It sometimes takes the quads late and
// sometimes aborts a request (a jump detected while waiting). Every
// accepted quad pair is compared with the memory contents mem_word(a),
// computed independently of the cache. Halfway through, the cache is
// flushed and the next request must miss; at a quarter, the memory self
// test runs (it must pass, take at least 6 x 128 cycles and leave the
// cache empty). Immediately repeated requests
// must be served in the request cycle (one-cycle hit). In the last quarter
// the bus unit model reports timeouts and pagefaults; a request that gets
// an error must see the status of the failing transfer in data_lo and is
// retried. Each mechanism of the cache is counted and must occur at least
// once.
module tb_icache;
  import icache_pkg::*;

  localparam int NREQ   = 4000;
  localparam int MAXCYC = 400000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        request = 1'b0, ack = 1'b0, flush = 1'b0;
  addr_t       address = '0;
  logic [1:0]  ready;
  quad_t       data_lo, data_hi, bus_data;
  logic        bus_valid, bus_cancel, bus_ready, flush_busy;
  logic        error, bus_error, mmu_pagefault;
  logic        self_test = 1'b0, test_busy, test_fail;
  int          n_selftest = 0, test_cycles;
  logic [1:0]  last_code = '0;
  int          err_div = 0;
  bit          got_error;
  logic [2:0]  bus_count;
  addr_t       bus_addr, pref_addr;
  demand_pre_t demand_pre;
  int          bursts, cancels;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  icache dut (
    .clk, .rst_n, .request, .address, .ack, .ready, .data_lo, .data_hi, .error,
    .bus_valid, .bus_cancel, .bus_count, .bus_addr, .bus_ready, .bus_data, .bus_error,
    .demand_pre, .pref_addr, .mmu_pagefault, .flush, .flush_busy,
    .self_test, .test_busy, .test_fail
  );

  bus_unit_model #(.LAT(2), .MAXGAP(2)) u_bus (
    .clk, .rst_n, .valid(bus_valid), .cancel(bus_cancel), .count(bus_count),
    .addr(bus_addr), .err_div, .ready(bus_ready), .error(bus_error),
    .pagefault(mmu_pagefault), .data(bus_data), .bursts, .cancels
  );

  function automatic quad_t mem_word(addr_t a);
    return a[31:0] ^ {a[45:32], 18'h0};
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_rb, n_fb, n_bypass, n_ram, n_border, n_wait, n_demand, n_demand2,
      n_prefetch, n_stop, n_store, n_replace, n_conflict, n_demupd,
      n_abort, n_late, n_onecycle, n_flush, n_cancel_only, n_lru,
      n_dem_err, n_pre_err;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_server.need1 && dut.u_server.src1 == 3'd0) n_rb++;
    if (dut.u_server.need1 && dut.u_server.src1 == 3'd1) n_fb++;
    if (dut.u_server.avail1 && dut.u_server.src1 == 3'd1 && !dut.u_fbuf.valid[dut.u_server.w_lo]) n_bypass++;
    if (dut.u_server.ram1 || dut.u_server.ram2) n_ram++;
    if (dut.u_server.ram1 && dut.u_server.need2 && dut.u_server.src2 == 3'd2 && !dut.u_server.ram2) n_border++;
    if (dut.u_server.need1 && dut.u_server.src1 == 3'd3) n_wait++;
    if (dut.u_fetcher.ev_demand) n_demand++;
    if (dut.u_fetcher.ev_demand && dut.strt_fetch2) n_demand2++;
    if (dut.u_fetcher.ev_prefetch) n_prefetch++;
    if (dut.u_fetcher.ev_stop) n_stop++;
    if (dut.u_fetcher.ev_store) n_store++;
    if (dut.u_fetcher.ev_replace) n_replace++;
    if (dut.wr_req && dut.s_ram_req) n_conflict++;
    if (demand_pre == DP_DEMUPD) n_demupd++;
    if (bus_cancel && !bus_valid) n_cancel_only++;
    if (dut.s_we) n_lru++;
    if (dut.fl_we) n_flush++;
    if (dut.u_fetcher.ev_pre_error) n_pre_err++;
    if (demand_pre == DP_DEMAND && (bus_error || mmu_pagefault))
      last_code <= {bus_error, mmu_pagefault};
    if (dut.u_fetcher.ev_prefetch && n_pre_err > 0)
      check("no prefetch between a prefetch error and a demand fetch",
            !dut.u_fetcher.pre_off);
    // bus protocol rule: count never exceeds the transfer block
    if (bus_valid) check("count within transfer block",
                         int'(bus_count) + int'(a_word(bus_addr)) <= 7);
  end

  // ---------------- instruction unit model ----------------
  tag_t tags [4];
  int   cyc;

  // one request; returns the cycle in which both quads were ready (-1 aborted)
  task automatic do_request(addr_t a, int late, bit abort, int abort_at, output int lat);
    int seen;
    seen = -1; lat = -1;
    cyc  = 0;
    got_error = 1'b0;
    forever begin
      @(negedge clk);
      request = 1'b1; address = a; ack = 1'b0;
      #2;
      if (error) begin
        check("error status on data_lo", data_lo == quad_t'(last_code) && ready == 2'b00);
        n_dem_err++;
        got_error = 1'b1;
        ack = 1'b1;
      end else if (ready == 2'b11) begin
        if (seen < 0) seen = cyc;
        if (cyc - seen >= late) begin
          check("data_lo", data_lo == mem_word(a));
          check("data_hi", data_hi == mem_word(a + 1'b1));
          ack = 1'b1; lat = seen;
        end
      end else if (abort && cyc >= abort_at) begin
        ack = 1'b1;
      end
      @(posedge clk);
      cyc++;
      if (ack) break;
      if (cyc > 300) begin
        check("request finishes", 1'b0);
        break;
      end
    end
    @(negedge clk);
    ack = 1'b0; request = 1'b0;
  endtask

  addr_t pc;
  int    lat, lat2, stores_before, demands_before;

  initial begin
    tags[0] = 37'h0_0000_0001; tags[1] = 37'h0_0000_0002;
    tags[2] = 37'h1_2345_6781; tags[3] = 37'h0_0000_0003;
    pc = {tags[0], 9'h000};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int r = 0; r < NREQ; r++) begin
      bit abort;
      int late;
      abort = ($urandom_range(19, 0) == 0);
      late  = ($urandom_range(3, 0) == 0) ? int'($urandom_range(3, 1)) : 0;
      if (r == NREQ * 3 / 4) err_div = 5;
      do_request(pc, late, abort, int'($urandom_range(3, 0)), lat);
      for (int t = 0; t < 40 && got_error; t++) do_request(pc, 0, 1'b0, 0, lat);
      if (got_error) check("request succeeds after retries", 1'b0);
      if (lat < 0) n_abort++;
      if (late > 0 && lat >= 0) n_late++;

      // an immediate repeat must hit in the request cycle
      if (lat >= 0 && $urandom_range(7, 0) == 0) begin
        stores_before = n_store;
        do_request(pc, 0, 1'b0, 0, lat2);
        if (n_store == stores_before) begin
          check("repeat served in one cycle", lat2 == 0);
          if (lat2 == 0) n_onecycle++;
        end
      end

      // memory self test at a quarter: passes, then the cache is empty
      if (r == NREQ / 4) begin
        @(negedge clk); self_test = 1'b1;
        @(negedge clk); self_test = 1'b0;
        test_cycles = 0;
        while (test_busy || flush_busy) begin
          if (dut.bt_active) test_cycles++;
          @(negedge clk);
        end
        check("self test passes", !test_fail);
        check("self test length", test_cycles == 6 * 128);
        n_selftest++;
        demands_before = n_demand;
        do_request(pc, 0, 1'b0, 0, lat);
        check("miss after self test", n_demand > demands_before);
      end

      // flush halfway: the next request must go to memory
      if (r == NREQ / 2) begin
        @(negedge clk); flush = 1'b1;
        @(negedge clk); flush = 1'b0;
        while (flush_busy) @(negedge clk);
        demands_before = n_demand;
        do_request(pc, 0, 1'b0, 0, lat);
        check("miss after flush", n_demand > demands_before);
      end

      // next instruction address
      if (abort || $urandom_range(11, 0) == 0)
        pc = {tags[$urandom_range(3, 0)], 9'($urandom)};
      else
        pc = pc + addr_t'($urandom_range(2, 1));
      if ($urandom_range(3, 0) == 0) @(negedge clk);   // idle cycle
    end

    $display("mechanisms: rb=%0d fb=%0d bypass=%0d ram=%0d border=%0d wait=%0d demand=%0d demand2=%0d",
             n_rb, n_fb, n_bypass, n_ram, n_border, n_wait, n_demand, n_demand2);
    $display("            prefetch=%0d stop=%0d store=%0d replace=%0d conflict=%0d demupd=%0d cancel=%0d",
             n_prefetch, n_stop, n_store, n_replace, n_conflict, n_demupd, n_cancel_only);
    $display("            lru=%0d flush=%0d abort=%0d late=%0d onecycle=%0d bursts=%0d dem_err=%0d pre_err=%0d",
             n_lru, n_flush, n_abort, n_late, n_onecycle, bursts, n_dem_err, n_pre_err);
    check("read buffer hit seen", n_rb > 0);
    check("fetch buffer hit seen", n_fb > 0);
    check("fetch bypass seen", n_bypass > 0);
    check("cache memory hit seen", n_ram > 0);
    check("border two-cycle case seen", n_border > 0);
    check("wait for fetch seen", n_wait > 0);
    check("demand fetch seen", n_demand > 0);
    check("second-quad demand seen", n_demand2 > 0);
    check("prefetch seen", n_prefetch > 0);
    check("stop fetch seen", n_stop > 0);
    check("store seen", n_store > 0);
    check("replacement seen", n_replace > 0);
    check("RAM conflict seen", n_conflict > 0);
    check("demand_pre 11 seen", n_demupd > 0);
    check("cancel before valid seen", n_cancel_only > 0);
    check("LRU update seen", n_lru > 0);
    check("flush seen", n_flush == 32);
    check("self test seen", n_selftest == 1);
    check("abort seen", n_abort > 0);
    check("late ack seen", n_late > 0);
    check("one-cycle repeat seen", n_onecycle > 0);
    check("demand fetch error reported", n_dem_err > 0);
    check("prefetch error ignored", n_pre_err > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
