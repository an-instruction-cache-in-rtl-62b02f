// bus_unit_model: behavioural model of the bus unit, MMU and main memory
// used by the cache testbenches (not part of the design).
//
// On bus_valid it starts a burst at addr of count+1 quads; the first quad
// comes LAT cycles later, following quads with random gaps of 0..MAXGAP
// cycles. ready is raised for one cycle per quad with the quad on data.
// cancel ends the running burst; valid together with cancel replaces it.
// Errors: when err_div > 0, each quad is replaced with probability
// 1/err_div by a one-cycle error (bus timeout) or pagefault, which ends
// the burst.
// Memory contents are computed, not stored: mem_word(a) below, or, with
// MEM_AW > 0, a memory of 2^MEM_AW words that holds its own addresses
// (the address is cut to MEM_AW bits). Address translation is the
// identity.
module bus_unit_model
  import icache_pkg::*;
#(
  parameter int LAT    = 2,
  parameter int MAXGAP = 2,
  parameter int MEM_AW = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic       cancel,
  input  logic [2:0] count,
  input  addr_t      addr,
  input  int         err_div,
  output logic       ready,
  output logic       error,
  output logic       pagefault,
  output quad_t      data,
  output int         bursts,
  output int         cancels
);

  function automatic quad_t mem_word(addr_t a);
    if (MEM_AW > 0) return quad_t'(a & addr_t'((64'd1 << MEM_AW) - 1));
    return a[31:0] ^ {a[45:32], 18'h0};
  endfunction

  logic  active;
  addr_t cur;
  int    remaining, wait_cnt;
  logic  fail, fail_pf, slot;

  function automatic logic roll(int div);
    return div > 0 && $urandom_range(div - 1, 0) == 0;
  endfunction

  assign slot      = active && wait_cnt == 0;
  assign ready     = slot && !fail;
  assign error     = slot && fail && !fail_pf;
  assign pagefault = slot && fail && fail_pf;
  assign data  = ready ? mem_word(cur) : 32'hDEAD_BEEF;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; cur <= '0; remaining <= 0; wait_cnt <= 0;
      bursts <= 0; cancels <= 0; fail <= 1'b0; fail_pf <= 1'b0;
    end else if (valid) begin
      fail      <= roll(err_div);
      fail_pf   <= $urandom_range(1, 0) == 1;
      active    <= 1'b1;
      cur       <= addr;
      remaining <= int'(count) + 1;
      wait_cnt  <= LAT - 1;
      bursts    <= bursts + 1;
      if (cancel) cancels <= cancels + 1;
    end else if (cancel) begin
      active  <= 1'b0;
      cancels <= cancels + 1;
    end else if (active) begin
      if (slot && fail) begin
        active <= 1'b0;
      end else if (ready) begin
        fail      <= roll(err_div);
        fail_pf   <= $urandom_range(1, 0) == 1;
        cur       <= cur + 1'b1;
        remaining <= remaining - 1;
        if (remaining == 1) active <= 1'b0;
        wait_cnt  <= (MAXGAP > 0) ? int'($urandom_range(MAXGAP, 0)) : 0;
      end else if (wait_cnt > 0) begin
        wait_cnt <= wait_cnt - 1;
      end
    end
  end

endmodule
