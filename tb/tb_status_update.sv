// tb_status_update: random fetch buffer addresses, valid masks and set
// contents; checks the chosen block (existing block with the same tag,
// else an invalid one, else the least recently used one), the merged or
// fresh data_valid bits and the data RAM row.
module tb_status_update;
  import icache_pkg::*;
  tba_t fb_addr;
  qmask_t fb_valid;
  tag_t    [1:0] tags;
  status_t [1:0] st;
  logic way, replace;
  tag_t new_tag;
  logic [31:0] new_valid;
  ram_addr_t ram_addr;
  int checks = 0, failures = 0, n_merge = 0, n_inv = 0, n_lru = 0;

  status_update dut (.*);

  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [36:0] tg; int tbf, sf, ew; logic h0, h1, erep; logic [31:0] ins, ev;
    for (int i = 0; i < 5000; i++) begin
      fb_addr = {$urandom, $urandom}; fb_valid = 8'($urandom);
      tg = fb_addr[42:6]; tbf = int'(fb_addr[1:0]); sf = int'(fb_addr[5:2]);
      for (int w = 0; w < 2; w++) begin
        tags[w] = $urandom_range(2, 0) == 0 ? tg : {5'($urandom), $urandom};
        st[w] = {2'($urandom), $urandom};
      end
      #1;
      h0 = tags[0] == tg && st[0][32];
      h1 = tags[1] == tg && st[1][32];
      ins = 32'(fb_valid) << (tbf * 8);
      erep = !(h0 || h1);
      if (h1)              begin ew = 1; n_merge++; end
      else if (h0)         begin ew = 0; n_merge++; end
      else if (!st[0][32]) begin ew = 0; n_inv++; end
      else if (!st[1][32]) begin ew = 1; n_inv++; end
      else begin ew = st[0][33] ? 1 : 0; n_lru++; end
      ev = erep ? ins : (st[ew][31:0] | ins);
      chk("replace", replace == erep);
      chk("way", int'(way) == ew);
      chk("tag", new_tag == tg);
      chk("valid", new_valid == ev);
      chk("ram_addr", ram_addr == 7'(sf * 8 + ew * 4 + tbf));
    end
    chk("all cases", n_merge > 0 && n_inv > 0 && n_lru > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
