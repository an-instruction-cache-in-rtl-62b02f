// tag_status_ram: tag and status memories of the two blocks of every set.
//
// Four small memories (Tag0, Tag1, Status0, Status1), 16 words each, read
// through NRD independent combinational read ports so that the server can
// look up the first quad, the second quad and the fetcher its own set in
// the same cycle. Writes are synchronous:
//   * fetcher port (f_*): stores tag, block_valid and data_valid of way
//     f_way and marks that way most recently used (the other way not);
//   * server port (s_*): LRU update after a cache memory hit, marks way
//     s_way most recently used;
//   * flush port (fl_*): clears block_valid of both ways of one set.
// When ports meet on one set the fetcher overrides the server's LRU update
// and a flush overrides both. Status bits are cleared by reset; tags are
// not, because a tag is only looked at when its block_valid bit is set.
// Splitting into four memories and the multi-porting follow the original
// prototype; the fixed port priorities are this design's choice.
module tag_status_ram
  import icache_pkg::*;
#(
  parameter int unsigned NRD = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // read ports
  input  set_t                  rd_set [NRD],
  output tag_t    [WAYS-1:0]    rd_tag [NRD],
  output status_t [WAYS-1:0]    rd_st  [NRD],
  // fetcher write port
  input  logic                  f_we,
  input  set_t                  f_set,
  input  logic                  f_way,
  input  tag_t                  f_tag,
  input  logic                  f_block_valid,
  input  logic [BLKQ-1:0]       f_data_valid,
  // server LRU port
  input  logic                  s_we,
  input  set_t                  s_set,
  input  logic                  s_way,
  // flush port
  input  logic                  fl_we,
  input  set_t                  fl_set
);

  tag_t    [WAYS-1:0] tags [NSETS];
  status_t [WAYS-1:0] stat [NSETS];

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_tag[p] = tags[rd_set[p]];
      rd_st[p]  = stat[rd_set[p]];
    end
  end

  always_ff @(posedge clk) begin
    if (f_we) tags[f_set][f_way] <= f_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++) stat[s] <= '0;
    end else begin
      if (s_we) begin
        stat[s_set][s_way].mru  <= 1'b1;
        stat[s_set][!s_way].mru <= 1'b0;
      end
      if (f_we) begin
        stat[f_set][f_way].mru         <= 1'b1;
        stat[f_set][!f_way].mru        <= 1'b0;
        stat[f_set][f_way].block_valid <= f_block_valid;
        stat[f_set][f_way].data_valid  <= f_data_valid;
      end
      if (fl_we) begin
        stat[fl_set][0].block_valid <= 1'b0;
        stat[fl_set][1].block_valid <= 1'b0;
      end
    end
  end

endmodule
