// tb_ram_bist: the March C- memory test against a data RAM model in which
// faults can be switched on: none, a bit stuck at 1, a bit stuck at 0, and
// a coupling fault (writing ones into one row sets the next row). Checks
// that a test waits while the cache is not idle, that a run takes 6 x 128
// cycles, that done pulses once, that fail is set exactly when a fault is
// present and is cleared by the next run, and that the RAM ends all zero.
module tb_ram_bist;
  import icache_pkg::*;

  localparam int DEPTH = 128;

  logic clk = 0, rst_n = 0, test = 0, idle = 0;
  logic busy, active, done, fail, we;
  ram_addr_t addr;
  row_t wdata, rdata;
  row_t mem [DEPTH];
  int fault = 0;   // 0 none, 1 stuck-at-1, 2 stuck-at-0, 3 coupling
  int checks = 0, failures = 0;

  ram_bist #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // RAM model with faults
  always_comb begin
    rdata = mem[addr];
    if (fault == 1 && addr == 7'd77) rdata[4][2] = 1'b1;
    if (fault == 2 && addr == 7'd0)  rdata[0][0] = 1'b0;
  end
  always @(posedge clk) if (we) begin
    mem[addr] <= wdata;
    if (fault == 3 && addr == 7'd10 && wdata[0][0]) mem[11] <= '1;
  end

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  task automatic run(int f, logic expect_fail);
    int cyc, dones;
    fault = f;
    @(negedge clk); test = 1; idle = 0;
    @(negedge clk); test = 0;
    repeat (3) begin
      @(negedge clk);
      chk("waits for idle", busy && !active);
    end
    idle = 1;
    cyc = 0; dones = 0;
    @(negedge clk);
    while (busy && cyc < 2000) begin
      if (active) cyc++;
      if (done) dones++;
      if (cyc == 1) chk("fail cleared at start", !fail);
      @(negedge clk);
    end
    if (done) dones++;
    chk("run length 6 x DEPTH", cyc == 6 * DEPTH);
    chk("done once", dones == 1);
    chk("fail as expected", fail == expect_fail);
    if (!expect_fail)
      for (int r = 0; r < DEPTH; r++) chk("ends all zero", mem[r] == '0);
    idle = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < DEPTH; r++) mem[r] = {8{32'hA5A5_5A5A ^ 32'(r)}};
    #12 rst_n = 1;
    run(0, 1'b0);
    run(1, 1'b1);
    run(0, 1'b0);
    run(2, 1'b1);
    run(3, 1'b1);
    run(0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
