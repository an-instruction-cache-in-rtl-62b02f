// tb_status_reg: random loads of the two address registers against a
// reference copy, including reset.
module tb_status_reg;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0, rb_load = 0, fb_load = 0;
  tba_t rb_addr_in, fb_addr_in, rb_addr, fb_addr, erb, efb;
  int checks = 0, failures = 0;
  status_reg dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rb_addr_in = '0; fb_addr_in = '0;
    #12 rst_n = 1; erb = '0; efb = '0;
    checks++; if (rb_addr != 0 || fb_addr != 0) failures++;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rb_load = $urandom_range(1, 0); fb_load = $urandom_range(1, 0);
      rb_addr_in = {$urandom, $urandom}; fb_addr_in = {$urandom, $urandom};
      @(posedge clk);
      if (rb_load) erb = rb_addr_in;
      if (fb_load) efb = fb_addr_in;
      #1;
      checks++;
      if (rb_addr != erb || fb_addr != efb) begin
        failures++; $display("FAIL at %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
