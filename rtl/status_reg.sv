// status_reg: transfer block addresses of the read buffer and fetch buffer.
//
// Two 43-bit registers. The server loads the read buffer address when it
// copies a transfer block from the data RAM into the read buffer; the
// fetcher loads the fetch buffer address when it starts fetching a new
// transfer block. Both compare units (server and fetcher) read them to see
// which transfer block each buffer holds. Loads take effect at the clock
// edge; reset clears both. Follows the original design.
module status_reg
  import icache_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rb_load,
  input  tba_t rb_addr_in,
  input  logic fb_load,
  input  tba_t fb_addr_in,
  output tba_t rb_addr,
  output tba_t fb_addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_addr <= '0;
      fb_addr <= '0;
    end else begin
      if (rb_load) rb_addr <= rb_addr_in;
      if (fb_load) fb_addr <= fb_addr_in;
    end
  end

endmodule
