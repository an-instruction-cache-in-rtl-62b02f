// tb_quad_find: random addresses, buffer contents and tag/status words,
// biased so that every kind of hit occurs; the outputs are compared with a
// reference computed from the definitions (field extraction by shifting).
module tb_quad_find;
  import icache_pkg::*;
  addr_t addr;
  tba_t rb_addr, fb_addr;
  qmask_t rb_valid;
  logic fb_qv, fetch_active;
  word_t fetch_qp;
  tag_t    [1:0] tags;
  status_t [1:0] st;
  logic rb_hit, fb_hit, fb_wait, cache_hit, way;
  ram_addr_t ram_addr;
  qmask_t tb_valid_bits;
  int checks = 0, failures = 0, n_rb = 0, n_fb = 0, n_wait = 0, n_ch = 0;

  quad_find dut (.*);

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s (iter)", w); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [63:0] a64;
    int wd, tbf, sf;
    logic [36:0] tg;
    logic m0, m1;
    for (int i = 0; i < 5000; i++) begin
      addr = {$urandom, $urandom};
      a64 = 64'(addr);
      wd = int'(a64 % 8); tbf = int'((a64 / 8) % 4); sf = int'((a64 / 32) % 16); tg = 37'(a64 / 512);
      rb_addr  = $urandom_range(1, 0) ? 43'(a64 / 8) : {$urandom, $urandom};
      fb_addr  = $urandom_range(1, 0) ? 43'(a64 / 8) : {$urandom, $urandom};
      rb_valid = 8'($urandom); fb_qv = $urandom_range(1, 0);
      fetch_active = $urandom_range(1, 0); fetch_qp = 3'($urandom);
      for (int w = 0; w < 2; w++) begin
        tags[w] = $urandom_range(2, 0) == 0 ? tg : {5'($urandom), $urandom};
        st[w] = {2'($urandom), $urandom};
      end
      #1;
      m0 = (tags[0] == tg) && st[0][32] && st[0][tbf * 8 + wd];
      m1 = (tags[1] == tg) && st[1][32] && st[1][tbf * 8 + wd];
      chk("rb_hit", rb_hit == ((rb_addr == 43'(a64 / 8)) && rb_valid[wd]));
      chk("fb_hit", fb_hit == ((fb_addr == 43'(a64 / 8)) && fb_qv));
      chk("fb_wait", fb_wait == ((fb_addr == 43'(a64 / 8)) && !fb_qv && fetch_active && wd >= int'(fetch_qp)));
      chk("cache_hit", cache_hit == (m0 || m1));
      if (m0 || m1) begin
        chk("way", way == m1);
        chk("ram_addr", ram_addr == 7'(sf * 8 + int'(m1) * 4 + tbf));
        chk("tb bits", tb_valid_bits == 8'(st[m1] >> (tbf * 8)));
      end
      n_rb += int'(rb_hit); n_fb += int'(fb_hit); n_wait += int'(fb_wait); n_ch += int'(cache_hit);
    end
    chk("all cases", n_rb > 0 && n_fb > 0 && n_wait > 0 && n_ch > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
