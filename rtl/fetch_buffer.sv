// fetch_buffer: collects one transfer block arriving from the bus unit.
//
// Eight quad registers with a quad_valid bit each. While en_fetch is set,
// every cycle in which the bus unit raises ready the quad on mem_data is
// written to the place given by the quad pointer qp and its valid bit is
// set. clear (start of a new fetch) drops all valid bits; it has priority.
//
// Two output quads (lo, hi) are selected by word field. A quad is
// available (qv_*) when its valid bit is set or when it is arriving on
// mem_data right now (fetch bypass: the quad goes to the instruction unit
// in the same cycle in which it is stored). The whole contents and the
// valid bits go to the data RAM when the fetcher stores the buffer.
// Structure and bypass follow the original design.
module fetch_buffer
  import icache_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   en_fetch,
  input  word_t  qp,
  input  logic   ready,
  input  quad_t  mem_data,
  input  word_t  w_lo,
  input  word_t  w_hi,
  output quad_t  q_lo,
  output quad_t  q_hi,
  output logic   qv_lo,
  output logic   qv_hi,
  output row_t   row,
  output qmask_t valid
);

  logic take;
  assign take = en_fetch && ready;

  always_ff @(posedge clk) begin
    if (take) row[qp] <= mem_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= '0;
    else if (clear) valid <= '0;
    else if (take)  valid[qp] <= 1'b1;
  end

  always_comb begin
    qv_lo = valid[w_lo] || (take && qp == w_lo);
    qv_hi = valid[w_hi] || (take && qp == w_hi);
    q_lo  = valid[w_lo] ? row[w_lo] : mem_data;
    q_hi  = valid[w_hi] ? row[w_hi] : mem_data;
  end

endmodule
