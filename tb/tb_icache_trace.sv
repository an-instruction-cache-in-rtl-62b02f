// tb_icache_trace: the cache in a replica of its original test bench.
//
// Main memory is a 2048-word memory that holds its own addresses: the bus
// unit model cuts each address to 11 bits, and the quad read is that
// 11-bit number. The instruction unit raises request again right after
// each ack and acks in the same cycle in which both ready bits are set.
// The address stream is an estimated instruction trace of 6545 quad-pair
// addresses, made by a small trace generator in this file. It has:
//   - straight-line code in steps of one or two quads;
//   - loops that jump back 8..200 quads and repeat 2..20 times;
//   - calls to and returns from a handful of routines;
//   - a process switch (new 16-bit PIN) every 1000 requests.
// Each accepted pair is compared with the memory. A mismatch records the
// clock number, as the original's error memory did, and the first eight
// are printed. At the end the testbench prints the number of clock cycles,
// the share of requests served in their first cycle, and the fetch counts.
// It checks that every request completed, that no data was wrong, and,
// as a sanity bound of this testbench, that more than 40% of the requests
// were served in one cycle. The trace generator has a fixed seed, so the
// trace is the same in every run.
module tb_icache_trace;
  import icache_pkg::*;

  localparam int NTRACE = 6545;
  localparam int MAXCYC = 2000000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        request = 1'b0, ack, flush = 1'b0, self_test = 1'b0;
  addr_t       address = '0;
  logic [1:0]  ready;
  quad_t       data_lo, data_hi, bus_data;
  logic        bus_valid, bus_cancel, bus_ready, flush_busy, error;
  logic        bus_error, mmu_pagefault, test_busy, test_fail;
  logic [2:0]  bus_count;
  addr_t       bus_addr, pref_addr;
  demand_pre_t demand_pre;
  int          bursts, cancels;

  int checks = 0, failures = 0;
  int teller = 0;                      // clock counter
  int errs [8];
  int nerr = 0;

  always #5 clk = ~clk;
  always @(posedge clk) teller <= teller + 1;

  icache dut (
    .clk, .rst_n, .request, .address, .ack, .ready, .data_lo, .data_hi, .error,
    .bus_valid, .bus_cancel, .bus_count, .bus_addr, .bus_ready, .bus_data, .bus_error,
    .demand_pre, .pref_addr, .mmu_pagefault, .flush, .flush_busy,
    .self_test, .test_busy, .test_fail
  );

  bus_unit_model #(.LAT(3), .MAXGAP(1), .MEM_AW(11)) u_bus (
    .clk, .rst_n, .valid(bus_valid), .cancel(bus_cancel), .count(bus_count),
    .addr(bus_addr), .err_div(0), .ready(bus_ready), .error(bus_error),
    .pagefault(mmu_pagefault), .data(bus_data), .bursts, .cancels
  );

  // acknowledge generator: ack as soon as both quads are delivered
  assign ack = request && ready == 2'b11;

  function automatic quad_t rom(addr_t a);
    return quad_t'(a[10:0]);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (nerr < 8) errs[nerr] = teller;
      nerr++;
    end
  endtask

  // data comparator: only when the instruction unit takes the data
  always @(posedge clk) if (rst_n && ack) begin
    check("data_lo", data_lo == rom(address));
    check("data_hi", data_hi == rom(address + 1'b1));
  end

  // ---------------- trace generator ----------------
  logic [15:0] pin;
  logic [29:0] pc, loop_start, loop_end;
  logic [29:0] routine [6];
  logic [29:0] stack [8];
  int          sp, loop_left;

  function automatic logic [29:0] next_pc();
    logic [29:0] n;
    n = pc + 30'($urandom_range(2, 1));
    if (loop_left > 0 && n >= loop_end) begin
      loop_left--;
      return loop_start;
    end
    if (loop_left == 0 && $urandom_range(39, 0) == 0) begin
      loop_start = n - 30'($urandom_range(200, 8));
      loop_end   = n;
      loop_left  = int'($urandom_range(20, 2));
      return loop_start;
    end
    if (sp < 8 && $urandom_range(59, 0) == 0) begin
      stack[sp] = n; sp++;
      return routine[$urandom_range(5, 0)];
    end
    if (sp > 0 && $urandom_range(49, 0) == 0) begin
      sp--;
      return stack[sp];
    end
    return n;
  endfunction

  int n_first, cyc_req, cycles0, n_dem0, n_pre0;
  int n_dem, n_pre;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_fetcher.ev_demand) n_dem++;
    if (dut.u_fetcher.ev_prefetch) n_pre++;
  end

  initial begin
    void'($urandom(32'd1989));         // the same trace in every run
    n_dem = 0; n_pre = 0; n_first = 0; sp = 0; loop_left = 0;
    pin = 16'h0001;
    pc  = 30'h0000_1000;
    for (int i = 0; i < 6; i++) routine[i] = 30'h0001_0000 + 30'(i * 300);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cycles0 = teller;
    for (int r = 0; r < NTRACE; r++) begin
      if (r > 0 && r % 1000 == 0) pin = pin + 1'b1;   // process switch
      request = 1'b1;
      address = {pin, pc};
      cyc_req = 0;
      #1;
      while (!ack && cyc_req < 200) begin
        @(negedge clk); #1;
        cyc_req++;
      end
      check("request completes", ack);
      if (cyc_req == 0) n_first++;
      @(negedge clk);
      pc = next_pc();
    end
    request = 1'b0;
    $display("trace: %0d requests in %0d cycles, %0d served in one cycle (%0d%%), %0d demand fetches, %0d prefetches",
             NTRACE, teller - cycles0, n_first, n_first * 100 / NTRACE, n_dem, n_pre);
    for (int i = 0; i < nerr && i < 8; i++) $display("mismatch at clock %0d", errs[i]);
    check("more than 40% served in one cycle", n_first * 10 > NTRACE * 4);
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
