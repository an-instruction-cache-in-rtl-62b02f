// tb_data_ram: random masked row writes and reads against a reference
// array; only quads that were written are compared.
module tb_data_ram;
  import icache_pkg::*;
  logic clk = 0, we = 0;
  ram_addr_t addr;
  qmask_t wmask;
  row_t wdata, rdata;
  row_t   ref_m [128];
  qmask_t known [128];
  int checks = 0, failures = 0;
  data_ram dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int r = 0; r < 128; r++) known[r] = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = 7'($urandom);
      we = $urandom_range(1, 0);
      wmask = 8'($urandom);
      for (int q = 0; q < 8; q++) wdata[q] = $urandom;
      #1;
      for (int q = 0; q < 8; q++)
        if (known[addr][q]) begin
          checks++;
          if (rdata[q] != ref_m[addr][q]) begin failures++; $display("FAIL row %0d q %0d", addr, q); end
        end
      @(posedge clk);
      if (we) for (int q = 0; q < 8; q++)
        if (wmask[q]) begin ref_m[addr][q] = wdata[q]; known[addr][q] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
