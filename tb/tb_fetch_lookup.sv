// tb_fetch_lookup: random addresses with the fetch buffer and the cache set
// arranged to hold the next transfer block or not; trblock_hit is compared
// with a reference built from integer arithmetic on the address.
module tb_fetch_lookup;
  import icache_pkg::*;
  addr_t address;
  tba_t fb_addr;
  tag_t    [1:0] tags;
  status_t [1:0] st;
  logic trblock_hit;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  fetch_lookup dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] nx, cur; logic [36:0] ntg; int ntb; logic exp_hit;
    for (int i = 0; i < 5000; i++) begin
      address = {$urandom, $urandom};
      if (i % 7 == 0) address[8:0] = 9'h1FF;    // next block in another tag
      cur = 64'(address) / 8;
      nx = (cur + 1) % (64'd1 << 43);
      ntg = 37'(nx / 64); ntb = int'(nx % 4);
      case ($urandom_range(3, 0))
        0: fb_addr = 43'(nx);
        1: fb_addr = 43'(cur);
        default: fb_addr = {$urandom, $urandom};
      endcase
      for (int w = 0; w < 2; w++) begin
        tags[w] = $urandom_range(1, 0) ? ntg : {5'($urandom), $urandom};
        st[w] = {2'($urandom), $urandom};
        if ($urandom_range(1, 0)) st[w][ntb*8 +: 8] = 8'hFF;
      end
      #1;
      exp_hit = (64'(fb_addr) == nx) || (64'(fb_addr) == cur);
      for (int w = 0; w < 2; w++)
        if (tags[w] == ntg && st[w][32] && st[w][ntb*8 +: 8] == 8'hFF) exp_hit = 1;
      checks++;
      if (trblock_hit != exp_hit) begin failures++; $display("FAIL i=%0d", i); end
      if (exp_hit) n_hit++; else n_miss++;
    end
    checks++; if (n_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
