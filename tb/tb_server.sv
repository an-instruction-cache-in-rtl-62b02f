// tb_server: directed scenarios for the server, with the read buffer,
// fetch buffer, tag/status RAM and data RAM modelled in the testbench:
// read buffer hit, cache memory hit with read buffer load and LRU update,
// two cache hits in different transfer blocks (two cycles), misses of the
// first and of the second quad, waiting for a running fetch (and not
// starting a second-quad fetch meanwhile), holding delivered quads until
// ack, and abort by ack without ready; a failed demand fetch reported to
// the instruction unit only when a quad waited for it. Latencies are checked in cycles.
module tb_server;
  import icache_pkg::*;

  logic clk = 0, rst_n = 0, request = 0, ack = 0;
  addr_t address = '0;
  logic [1:0] ready;
  quad_t data_lo, data_hi;
  set_t set1, set2;
  tag_t [1:0] tags1, tags2;
  status_t [1:0] st1, st2;
  logic lru_we, lru_way;
  set_t lru_set;
  tba_t rb_addr, rb_load_addr, fb_addr;
  qmask_t rb_valid, rb_load_valid, fb_valid;
  quad_t rb_q_lo, rb_q_hi, fb_q_lo, fb_q_hi;
  word_t w_lo, w_hi, fetch_qp;
  logic byp_lo, byp_hi, rb_load, fb_qv_lo, fb_qv_hi, fetch_active;
  logic ram_req, start_fetcher, strt_fetch2;
  ram_addr_t ram_addr;
  addr_t demand_addr;
  logic dem_error = 0, error;
  logic [1:0] err_code = 0;
  row_t rbdata, fbdata;
  tag_t    mtag [16][2];
  status_t mst  [16][2];
  int checks = 0, failures = 0;

  server dut (.*);
  always #5 clk = ~clk;

  function automatic quad_t ramq(ram_addr_t r, int q);
    return {16'hA000 | 16'(r), 16'(q)};
  endfunction

  // surroundings
  always_comb begin
    tags1 = {mtag[set1][1], mtag[set1][0]}; st1 = {mst[set1][1], mst[set1][0]};
    tags2 = {mtag[set2][1], mtag[set2][0]}; st2 = {mst[set2][1], mst[set2][0]};
    rb_q_lo = byp_lo ? ramq(ram_addr, int'(w_lo)) : rbdata[w_lo];
    rb_q_hi = byp_hi ? ramq(ram_addr, int'(w_hi)) : rbdata[w_hi];
    fb_qv_lo = fb_valid[w_lo]; fb_qv_hi = fb_valid[w_hi];
    fb_q_lo = fbdata[w_lo]; fb_q_hi = fbdata[w_hi];
  end
  always @(posedge clk) if (rb_load) begin
    rb_addr <= rb_load_addr; rb_valid <= rb_load_valid;
    for (int q = 0; q < 8; q++) rbdata[q] <= ramq(ram_addr, q);
  end

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  task automatic clear_all();
    for (int s = 0; s < 16; s++) for (int w = 0; w < 2; w++) begin
      mtag[s][w] = 37'h1F_0000_0000 + 37'(s * 2 + w); mst[s][w] = '0;
    end
    rb_addr = '1; rb_valid = '0; fb_addr = '1; fb_valid = '0;
    fetch_active = 0; fetch_qp = 0;
    for (int q = 0; q < 8; q++) begin rbdata[q] = 32'hB000_0000 + q; fbdata[q] = 32'hF000_0000 + q; end
  endtask

  function automatic addr_t mk(tag_t t, int s, int tb, int w);
    return {t, 4'(s), 2'(tb), 3'(w)};
  endfunction

  tag_t T;
  addr_t A;

  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    T = 37'h12_3456_789A;
    clear_all();
    #12 rst_n = 1;

    // S1: both quads in the read buffer -> ready in the request cycle
    @(negedge clk); A = mk(T, 3, 1, 2); rb_addr = a_tba(A); rb_valid = 8'hFF;
    request = 1; address = A; #1;
    chk("S1 ready", ready == 2'b11);
    chk("S1 data", data_lo == 32'hB000_0002 && data_hi == 32'hB000_0003);
    chk("S1 no ram", !ram_req && !start_fetcher);
    // hold until ack: change the buffer, the quads must stay
    @(posedge clk); #1 rbdata[2] = 32'h0; rbdata[3] = 32'h0; rb_valid = '0; #1;
    chk("S1 hold", ready == 2'b11 && data_lo == 32'hB000_0002 && data_hi == 32'hB000_0003);
    ack = 1; @(posedge clk); #1 ack = 0; request = 0;

    // S2: cache memory hit in way 1, same transfer block
    clear_all();
    @(negedge clk); A = mk(T, 3, 1, 4); mtag[3][1] = T; mst[3][1].block_valid = 1;
    mst[3][1].data_valid[15:8] = 8'hFF;
    request = 1; address = A; #1;
    chk("S2 ready", ready == 2'b11);
    chk("S2 ram", ram_req && ram_addr == {4'd3, 1'b1, 2'd1});
    chk("S2 data", data_lo == ramq({4'd3, 1'b1, 2'd1}, 4) && data_hi == ramq({4'd3, 1'b1, 2'd1}, 5));
    chk("S2 load rb", rb_load && rb_load_addr == a_tba(A) && rb_load_valid == 8'hFF);
    chk("S2 lru", lru_we && lru_set == 4'd3 && lru_way == 1'b1);
    ack = 1; @(posedge clk); #1 ack = 0; request = 0;

    // S3: both in the cache, different transfer blocks -> two cycles
    clear_all();
    @(negedge clk); A = mk(T, 5, 1, 7); mtag[5][0] = T; mst[5][0].block_valid = 1;
    mst[5][0].data_valid[23:8] = 16'hFFFF;
    request = 1; address = A; #1;
    chk("S3 first cycle", ready == 2'b01 && ram_addr == {4'd5, 1'b0, 2'd1});
    chk("S3 data lo", data_lo == ramq({4'd5, 1'b0, 2'd1}, 7));
    @(posedge clk); #1;
    chk("S3 second cycle", ready == 2'b11 && ram_addr == {4'd5, 1'b0, 2'd2});
    chk("S3 data", data_lo == ramq({4'd5, 1'b0, 2'd1}, 7) && data_hi == ramq({4'd5, 1'b0, 2'd2}, 0));
    ack = 1; @(posedge clk); #1 ack = 0; request = 0;

    // S4: both missing -> demand fetch of the first quad
    clear_all();
    @(negedge clk); A = mk(T, 2, 0, 3); request = 1; address = A; #1;
    chk("S4", ready == 2'b00 && start_fetcher && !strt_fetch2 && demand_addr == A);
    // S8: abort by ack without ready
    ack = 1; @(posedge clk); #1 ack = 0; request = 0; #1;
    chk("S8 abort", ready == 2'b00 && !start_fetcher);

    // S5: first in the read buffer, second (next transfer block) missing
    clear_all();
    @(negedge clk); A = mk(T, 2, 0, 7); rb_addr = a_tba(A); rb_valid = 8'h80;
    request = 1; address = A; #1;
    chk("S5", ready == 2'b01 && start_fetcher && strt_fetch2 && demand_addr == A + 1);

    // S6: both wait for the running fetch, then arrive
    clear_all();
    @(negedge clk); A = mk(T, 6, 3, 2); fb_addr = a_tba(A); fetch_active = 1; fetch_qp = 3'd1;
    request = 1; address = A; #1;
    chk("S6 wait", ready == 2'b00 && !start_fetcher);
    @(posedge clk); #1 fb_valid[2] = 1; #1;
    chk("S6 first", ready == 2'b01 && data_lo == 32'hF000_0002);
    @(posedge clk); #1 fb_valid[3] = 1; fb_valid[2] = 0; #1;
    chk("S6 both", ready == 2'b11 && data_lo == 32'hF000_0002 && data_hi == 32'hF000_0003);
    ack = 1; @(posedge clk); #1 ack = 0; request = 0;

    // S7: first waits for the fetch, second missing -> no second fetch yet
    clear_all();
    @(negedge clk); A = mk(T, 6, 3, 7); fb_addr = a_tba(A); fetch_active = 1; fetch_qp = 3'd5;
    request = 1; address = A; #1;
    chk("S7", ready == 2'b00 && !start_fetcher);
    // once the fetch has stopped without the quad it counts as a miss
    fetch_qp = 3'd0; fetch_active = 0; #1;
    chk("S7 skipped", start_fetcher && !strt_fetch2 && demand_addr == A);
    ack = 1; @(posedge clk); #1 ack = 0; request = 0;

    // S9: the fetch the first quad waits for fails
    clear_all();
    @(negedge clk); A = mk(T, 8, 1, 3); fb_addr = a_tba(A); fetch_active = 1; fetch_qp = 3'd2;
    request = 1; address = A; #1;
    chk("S9 wait", ready == 2'b00 && !error);
    dem_error = 1; err_code = 2'b10;
    @(posedge clk); #1 dem_error = 0; err_code = 2'b00; fetch_active = 0; #1;
    chk("S9 error", error && ready == 2'b00 && data_lo == 32'h2 && !start_fetcher);
    @(posedge clk); #1;
    chk("S9 error held", error && data_lo == 32'h2 && !start_fetcher);
    ack = 1; @(posedge clk); #1 ack = 0; request = 0; #1;
    chk("S9 cleared", !error);
    // a new request for the same quad starts a new demand fetch
    @(negedge clk); request = 1; #1;
    chk("S9 retry", !error && start_fetcher && demand_addr == A);
    ack = 1; @(posedge clk); #1 ack = 0; request = 0;

    // S10: a failing fetch that no quad waits for is not reported
    clear_all();
    @(negedge clk); A = mk(T, 8, 1, 3); rb_addr = a_tba(A); rb_valid = 8'h18;
    fetch_active = 1; fb_addr = a_tba(A) + 1'b1;
    request = 1; address = A; dem_error = 1; err_code = 2'b01; #1;
    chk("S10 served", ready == 2'b11);
    @(posedge clk); #1 dem_error = 0; #1;
    chk("S10 no error", !error && ready == 2'b11);
    ack = 1; @(posedge clk); #1 ack = 0; request = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
