// read_buffer: copy of the transfer block last read from the data RAM.
//
// Eight quad registers plus one valid bit per quad (the transfer block's
// data_valid bits at the time of the copy, since a stopped fetch can leave
// a transfer block only partly valid). Later requests for quads of the
// same transfer block are served from here without a data RAM access.
//
// Each of the two output quads (lo = the addressed quad, hi = the next one)
// is picked by its word field. When byp_lo/byp_hi is set the quad is taken
// from row_in, the data RAM output, instead of the register: this is the
// bypass that delivers a cache memory hit in the same cycle in which the
// row is copied into the buffer (load, effective at the clock edge).
// A flush clears all valid bits. Structure as in the original design.
module read_buffer
  import icache_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  row_t   row_in,
  input  qmask_t valid_in,
  input  logic   flush,
  input  word_t  w_lo,
  input  word_t  w_hi,
  input  logic   byp_lo,
  input  logic   byp_hi,
  output quad_t  q_lo,
  output quad_t  q_hi,
  output qmask_t valid
);

  row_t data;

  always_ff @(posedge clk) begin
    if (load) data <= row_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= '0;
    else if (flush) valid <= '0;
    else if (load)  valid <= valid_in;
  end

  assign q_lo = byp_lo ? row_in[w_lo] : data[w_lo];
  assign q_hi = byp_hi ? row_in[w_hi] : data[w_hi];

endmodule
