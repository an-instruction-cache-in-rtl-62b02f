// tb_read_buffer: random loads, flushes and word selections against a
// reference copy, with and without the data RAM bypass.
module tb_read_buffer;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, flush = 0, byp_lo = 0, byp_hi = 0;
  row_t row_in, eref;
  qmask_t valid_in, valid, ev;
  word_t w_lo, w_hi;
  quad_t q_lo, q_hi;
  int checks = 0, failures = 0;
  read_buffer dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic known;
    known = 0; ev = '0; valid_in = '0;
    for (int q = 0; q < 8; q++) row_in[q] = '0;
    #12 rst_n = 1;
    chk("reset clears valid", valid == 0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom_range(2, 0) == 0); flush = ($urandom_range(30, 0) == 0);
      for (int q = 0; q < 8; q++) row_in[q] = $urandom;
      valid_in = 8'($urandom);
      w_lo = 3'($urandom); w_hi = 3'($urandom);
      byp_lo = $urandom_range(1, 0); byp_hi = $urandom_range(1, 0);
      #1;
      if (byp_lo) chk("bypass lo", q_lo == row_in[w_lo]); else if (known) chk("reg lo", q_lo == eref[w_lo]);
      if (byp_hi) chk("bypass hi", q_hi == row_in[w_hi]); else if (known) chk("reg hi", q_hi == eref[w_hi]);
      chk("valid", valid == ev);
      @(posedge clk);
      if (load) begin eref = row_in; known = 1; end
      if (flush) ev = '0; else if (load) ev = valid_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
