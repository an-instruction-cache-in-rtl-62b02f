// tb_pref_addr_dec: random quad addresses; the prefetch address must be the
// first quad of the following transfer block, computed here by arithmetic
// on the whole address (round down to a multiple of 8, add 8, wrap at 2^46).
module tb_pref_addr_dec;
  import icache_pkg::*;
  addr_t a, p;
  int checks = 0, failures = 0;
  pref_addr_dec dut (.addr(a), .pref_addr(p));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [63:0] e;
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom, $urandom};
      if (i == 0) a = '1;            // wrap-around case
      if (i == 1) a = 46'h7;
      #1;
      e = ((64'(a) / 8) * 8 + 8) % (64'd1 << 46);
      checks++;
      if (64'(p) != e) begin
        failures++;
        $display("FAIL a=%h p=%h exp=%h", a, p, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
