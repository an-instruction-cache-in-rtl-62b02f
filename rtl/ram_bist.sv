// ram_bist: memory self test of the data RAM (March C-).
//
// The data RAM is the one large memory of the cache, so it gets an
// algorithmic test instead of scan. A pulse or level on test asks for a
// run; it is kept until the cache is idle (idle: fetcher at rest, no flush
// running). The test then takes the data RAM port and runs March C-, one
// address per clock cycle, each row written and read as a whole (all
// zeros or all ones):
//   up (w0); up (r0,w1); up (r1,w0); down (r0,w1); down (r1,w0); down (r0)
// The RAM reads combinationally, so the read and the write of one
// element happen in the same cycle: 6 x DEPTH cycles in all (768 at the
// default size). fail is set on the first mismatch and stays set until the
// next run; done pulses for one cycle at the end, and the cache is then
// flushed because the test overwrote all cached quads.
// A memory test as a state machine is what the original design names for
// its self-test mode; the choice of March C- and of the backgrounds is
// this design's own.
module ram_bist
  import icache_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << RAM_AW
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      test,
  input  logic      idle,
  output logic      busy,     // pending or running: requests are held off
  output logic      active,   // running: owns the data RAM port
  output logic      done,
  output logic      fail,
  // data RAM port while busy
  output ram_addr_t addr,
  output logic      we,
  output row_t      wdata,
  input  row_t      rdata
);

  typedef struct packed {
    logic down;   // address order
    logic rd;     // read and compare
    logic rv;     // expected value
    logic wr;     // write
    logic wv;     // value written
  } march_t;

  localparam int NEL = 6;

  function automatic march_t element(logic [2:0] e);
    unique case (e)
      3'd0:    return '{down: 1'b0, rd: 1'b0, rv: 1'b0, wr: 1'b1, wv: 1'b0};
      3'd1:    return '{down: 1'b0, rd: 1'b1, rv: 1'b0, wr: 1'b1, wv: 1'b1};
      3'd2:    return '{down: 1'b0, rd: 1'b1, rv: 1'b1, wr: 1'b1, wv: 1'b0};
      3'd3:    return '{down: 1'b1, rd: 1'b1, rv: 1'b0, wr: 1'b1, wv: 1'b1};
      3'd4:    return '{down: 1'b1, rd: 1'b1, rv: 1'b1, wr: 1'b1, wv: 1'b0};
      default: return '{down: 1'b1, rd: 1'b1, rv: 1'b0, wr: 1'b0, wv: 1'b0};
    endcase
  endfunction

  logic        pending, running;
  logic [2:0]  el;
  ram_addr_t   cur;
  march_t      m;
  logic        last_addr, mismatch;

  always_comb begin
    m         = element(el);
    addr      = cur;
    we        = running && m.wr;
    wdata     = {(TBQ * QUAD_W){m.wv}};
    mismatch  = running && m.rd && (rdata != {(TBQ * QUAD_W){m.rv}});
    last_addr = m.down ? (cur == '0) : (cur == ram_addr_t'(DEPTH - 1));
    busy      = pending || running;
    active    = running;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      running <= 1'b0;
      el      <= '0;
      cur     <= '0;
      done    <= 1'b0;
      fail    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (test && !running) pending <= 1'b1;
      if ((pending || test) && !running && idle) begin
        running <= 1'b1;
        pending <= 1'b0;
        el      <= '0;
        cur     <= '0;
        fail    <= 1'b0;
      end else if (running) begin
        if (mismatch) fail <= 1'b1;
        if (last_addr) begin
          if (el == 3'(NEL - 1)) begin
            running <= 1'b0;
            done    <= 1'b1;
          end else begin
            el  <= el + 1'b1;
            cur <= element(el + 3'd1).down ? ram_addr_t'(DEPTH - 1) : '0;
          end
        end else begin
          cur <= m.down ? cur - 1'b1 : cur + 1'b1;
        end
      end
    end
  end

endmodule
