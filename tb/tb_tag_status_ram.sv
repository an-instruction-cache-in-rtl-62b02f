// tb_tag_status_ram: random fetcher, server (LRU) and flush writes applied
// to a reference model in the documented priority order (server, then
// fetcher, then flush); all three read ports are compared every cycle.
module tb_tag_status_ram;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0;
  set_t rd_set [3];
  tag_t    [1:0] rd_tag [3];
  status_t [1:0] rd_st  [3];
  logic f_we = 0, f_way = 0, f_block_valid = 0, s_we = 0, s_way = 0, fl_we = 0;
  set_t f_set = 0, s_set = 0, fl_set = 0;
  tag_t f_tag = 0;
  logic [31:0] f_data_valid = 0;
  tag_t    rtag [16][2];
  status_t rst_m [16][2];
  logic    tknown [16][2];
  int checks = 0, failures = 0;

  tag_status_ram #(.NRD(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) for (int w = 0; w < 2; w++) begin
      rst_m[s][w] = '0; tknown[s][w] = 0;
    end
    for (int p = 0; p < 3; p++) rd_set[p] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++) rd_set[p] = 4'($urandom);
      f_we = $urandom_range(2, 0) == 0; f_set = 4'($urandom_range(3, 0)); f_way = $urandom_range(1, 0);
      f_tag = {5'($urandom), $urandom}; f_block_valid = $urandom_range(1, 0); f_data_valid = $urandom;
      s_we = $urandom_range(1, 0); s_set = 4'($urandom_range(3, 0)); s_way = $urandom_range(1, 0);
      fl_we = $urandom_range(9, 0) == 0; fl_set = 4'($urandom_range(3, 0));
      #1;
      for (int p = 0; p < 3; p++) for (int w = 0; w < 2; w++) begin
        checks++;
        if (rd_st[p][w] != rst_m[rd_set[p]][w]) begin
          failures++; $display("FAIL status port %0d set %0d way %0d at %0t", p, rd_set[p], w, $time);
        end
        if (tknown[rd_set[p]][w]) begin
          checks++;
          if (rd_tag[p][w] != rtag[rd_set[p]][w]) begin failures++; $display("FAIL tag"); end
        end
      end
      @(posedge clk);
      if (s_we) begin rst_m[s_set][s_way].mru = 1; rst_m[s_set][!s_way].mru = 0; end
      if (f_we) begin
        rtag[f_set][f_way] = f_tag; tknown[f_set][f_way] = 1;
        rst_m[f_set][f_way] = '{mru: 1'b1, block_valid: f_block_valid, data_valid: f_data_valid};
        rst_m[f_set][!f_way].mru = 0;
      end
      if (fl_we) begin rst_m[fl_set][0].block_valid = 0; rst_m[fl_set][1].block_valid = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
