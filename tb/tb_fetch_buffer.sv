// tb_fetch_buffer: random quad arrivals at random quad pointer positions,
// clears and word selections, compared with a reference copy, including
// the fetch bypass of a quad arriving in the current cycle.
module tb_fetch_buffer;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en_fetch = 0, ready = 0;
  word_t qp, w_lo, w_hi;
  quad_t mem_data, q_lo, q_hi;
  logic qv_lo, qv_hi;
  row_t row, eref;
  qmask_t valid, ev;
  int checks = 0, failures = 0;
  fetch_buffer dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string w, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic tk;
    ev = '0; qp = '0; w_lo = '0; w_hi = '0; mem_data = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = ($urandom_range(15, 0) == 0);
      en_fetch = $urandom_range(3, 0) != 0; ready = $urandom_range(1, 0);
      qp = 3'($urandom); mem_data = $urandom;
      w_lo = 3'($urandom); w_hi = 3'($urandom);
      #1;
      tk = en_fetch && ready;
      chk("qv_lo", qv_lo == (ev[w_lo] || (tk && qp == w_lo)));
      chk("qv_hi", qv_hi == (ev[w_hi] || (tk && qp == w_hi)));
      if (ev[w_lo]) chk("q_lo reg", q_lo == eref[w_lo]); else if (qv_lo) chk("q_lo bypass", q_lo == mem_data);
      if (ev[w_hi]) chk("q_hi reg", q_hi == eref[w_hi]); else if (qv_hi) chk("q_hi bypass", q_hi == mem_data);
      chk("valid", valid == ev);
      for (int q = 0; q < 8; q++) if (ev[q]) chk("row", row[q] == eref[q]);
      @(posedge clk);
      if (tk) eref[qp] = mem_data;
      if (clear) ev = '0; else if (tk) ev[qp] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
