// pref_addr_dec: prefetch address decoder.
//
// Takes the quad address of the instruction unit, increments its transfer
// block address (the address without the 3-bit word field) and appends a
// zero word field: the address of the first quad of the next transfer
// block. This is the address a prefetch starts at and is sent to the MMU.
// Combinational. Function as in the original design.
module pref_addr_dec
  import icache_pkg::*;
(
  input  addr_t addr,
  output addr_t pref_addr
);

  assign pref_addr = {a_tba(addr) + 1'b1, {WORD_W{1'b0}}};

endmodule
