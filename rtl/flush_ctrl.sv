// flush_ctrl: cache flushing mode.
//
// A pulse (or level) on flush asks for the whole cache to be emptied, for
// instance when process identification codes are reused. The request is
// kept until the fetcher is idle; then a 4-bit set counter runs from 0 to
// 15 and clears the block_valid bits of both blocks of one set per cycle,
// so a flush takes 16 clock cycles. In the first of them the read buffer
// and fetch buffer valid bits are cleared as well (buf_clear). While busy
// is set the cache does not serve the instruction unit.
// The counter-based flush follows the original design's outline of this
// mode; waiting for the idle fetcher and clearing the buffers are this
// design's choices.
module flush_ctrl
  import icache_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic fetcher_idle,
  output logic busy,
  output logic fl_we,
  output set_t fl_set,
  output logic buf_clear
);

  logic pending, running;
  set_t cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      running <= 1'b0;
      cnt     <= '0;
    end else begin
      if (flush && !running) pending <= 1'b1;
      if ((pending || flush) && !running && fetcher_idle) begin
        running <= 1'b1;
        pending <= 1'b0;
        cnt     <= '0;
      end else if (running) begin
        cnt <= cnt + 1'b1;
        if (cnt == set_t'(NSETS - 1)) running <= 1'b0;
      end
    end
  end

  assign fl_we     = running;
  assign fl_set    = cnt;
  assign buf_clear = running && cnt == '0;
  assign busy      = running || pending || flush;

endmodule
