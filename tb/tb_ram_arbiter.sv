// tb_ram_arbiter: all request combinations with random addresses; the
// server must always get the port, the fetcher only when the server is idle.
module tb_ram_arbiter;
  import icache_pkg::*;
  logic s_req, f_req, we, f_gnt;
  ram_addr_t s_addr, f_addr, addr;
  int checks = 0, failures = 0;
  ram_arbiter dut (.*);
  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 400; i++) begin
      {s_req, f_req} = 2'(i);
      s_addr = 7'($urandom); f_addr = 7'($urandom);
      #1;
      chk("addr", addr == (s_req ? s_addr : f_addr));
      chk("gnt",  f_gnt == (f_req && !s_req));
      chk("we",   we == (f_req && !s_req));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
