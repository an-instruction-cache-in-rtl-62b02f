// tb_flush_ctrl: a flush request made while the fetcher is busy must wait;
// once the fetcher is idle the controller must clear sets 0..15 in 16
// consecutive cycles, clear the buffers in the first one and stay busy
// from the request to the last set.
module tb_flush_ctrl;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, fetcher_idle = 0;
  logic busy, fl_we, buf_clear;
  set_t fl_set;
  int checks = 0, failures = 0;
  flush_ctrl dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #12 rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      fetcher_idle = 0;
      @(negedge clk); chk("idle", !busy && !fl_we);
      flush = 1; #1 chk("busy at request", busy);
      @(negedge clk); flush = 0;
      for (int k = 0; k < rep * 3; k++) begin
        chk("waits for fetcher", busy && !fl_we); @(negedge clk);
      end
      fetcher_idle = 1;
      @(negedge clk);
      for (int s = 0; s < 16; s++) begin
        chk("clearing", fl_we && fl_set == 4'(s) && busy);
        chk("buffer clear first", buf_clear == (s == 0));
        @(negedge clk);
      end
      chk("done", !busy && !fl_we);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
