// ram_arbiter: gives the single data RAM port to the server or the fetcher.
//
// The server reads the RAM on a cache memory hit; the fetcher writes a
// completed or stopped fetch buffer into it. The server always wins, so a
// request of the instruction unit is never delayed by the fetcher; the
// fetcher keeps its request up until f_gnt tells it the write was done at
// this clock edge. Purely combinational. Server priority is the original
// design's rule.
module ram_arbiter
  import icache_pkg::*;
(
  input  logic      s_req,    // server reads
  input  ram_addr_t s_addr,
  input  logic      f_req,    // fetcher wants to write
  input  ram_addr_t f_addr,
  output ram_addr_t addr,
  output logic      we,
  output logic      f_gnt
);

  always_comb begin
    addr  = s_req ? s_addr : f_addr;
    f_gnt = f_req && !s_req;
    we    = f_gnt;
  end

endmodule
