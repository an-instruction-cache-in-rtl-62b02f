# Instruction cache with read buffer, fetch buffer and prefetching

This cache feeds a processor's instruction unit. Each request asks for two
consecutive 32-bit instruction words (called *quads* here) on a 64-bit path.
Main memory sits behind a 32-bit bus unit whose latency is not known in
advance. The cache must hand over a pair of quads in the cycle it is asked
for whenever it can.

Three ideas make that possible:

- **Virtual addresses.** The cache is indexed and tagged by the virtual quad
  address plus a 16-bit process number. Address translation is needed only
  for a fetch from memory, and the MMU does it in parallel. A process switch
  does not force a flush.
- **A read buffer in front of the single-ported data RAM.** The RAM is one
  256-bit row (8 quads) wide. Each RAM read copies the whole row into the
  read buffer, so the next requests in straight-line code are served from
  the buffer. That leaves the RAM free for the fetcher.
- **A fetch buffer between the bus unit and the RAM.** A fetched transfer
  block (8 quads) is collected in the buffer and written into the RAM in
  one cycle. Its quads can be handed to the instruction unit as soon as
  they arrive, including in the very cycle they come off the bus (the
  *fetch bypass*). While the processor runs out of the cache, the fetcher
  prefetches the next transfer block into this buffer.

The default configuration is about 4 KB: 1024 quads, two-way set
associative.

## Organisation and address fields

A 46-bit address is `{PIN[15:0], quad address[29:0]}`. The cache splits it
as follows:

| bits    | field          | use                                           |
|---------|----------------|-----------------------------------------------|
| [2:0]   | word           | quad within a transfer block                  |
| [4:3]   | transfer block | one of the 4 transfer blocks of a block       |
| [8:5]   | set            | one of 16 sets                                |
| [45:9]  | tag            | 37 bits, compared with both ways of the set   |

- **Block:** 32 quads, the unit of replacement. There is one tag per block.
- **Transfer block:** 8 quads, the unit fetched from memory and one data
  RAM row.
- **Transfer-block address (tba):** address bits [45:3].

| memory          | size        | contents                                              |
|-----------------|-------------|-------------------------------------------------------|
| tag RAM         | 16 x 2 x 37 | tag of each block                                     |
| status RAM      | 16 x 2 x 34 | 32 data_valid bits (one per quad), block_valid, LRU   |
| data RAM        | 128 x 256   | row address `{set, way, transfer block}`              |
| read buffer     | 8 x 32 + 8  | last RAM row read, with its valid bits                |
| fetch buffer    | 8 x 32 + 8  | transfer block being fetched, with quad_valid bits    |
| status register | 2 x 43      | tba of the read buffer and of the fetch buffer        |

Valid bits are kept per quad, because a fetch can be stopped halfway. A
quad counts as cached when:

- its block's tag matches;
- its block_valid bit is set;
- its own data_valid bit is set.

The tag and status memories have three read ports: one for each requested
quad, and one for the fetcher. They are built from registers. The data RAM
is a plain array with a combinational read.

The package `icache_pkg` holds:

- the field widths;
- the types (`addr_t`, `tba_t`, `row_t`, `status_t`, ...);
- field-extract functions (`a_set`, `a_tag`, `a_tba`, ...).

To change a size, edit the package.

## Serving a request (`server`, `quad_find`)

This is the core of the cache and the part that needs the most care.

The instruction unit holds `request` and `address` until it raises `ack`.
The cache must return the quad at `address` on `data_lo` and the quad at
`address+1` on `data_hi`. The second quad may lie in the next transfer
block, or in the next set.

Each of the two quads gets its own comparator (`quad_find`). A comparator
reports the first place that holds the quad, in this order:

1. **Read buffer:** tba matches and the quad's valid bit is set.
2. **Fetch buffer:** tba matches and the quad is stored, or is on the bus in
   this cycle.
3. **Cache memory:** tag, block_valid and data_valid all match, in either
   way.
4. **Wait:** the fetch buffer is filling this transfer block, and the quad
   pointer has not yet passed this quad. The quad will arrive.
5. **Miss:** none of the above.

The server combines the two answers:

- **Read buffer or fetch buffer:** the quad goes straight out, and its
  `ready` bit rises combinationally. A request that hits therefore
  finishes in the cycle it appears, if the instruction unit acks at once.
- **Cache memory:** the server reads the quad's row from the data RAM and
  bypasses the quad to the output. At the same clock edge it copies the row
  and its 8 valid bits into the read buffer and updates the block's LRU
  bit. The RAM has one port and reads one row per cycle. If both quads hit
  the memory in different rows, the first quad is delivered in this cycle
  and the second one the next cycle. This is the only two-cycle hit. The
  server always wins the RAM against the fetcher.
- **Wait:** nothing is done. The quad is delivered through the fetch bypass
  when it arrives.
- **Miss of the first quad:** the server raises `start_fetcher` with that
  address.
- **Miss of the second quad:** the server raises `start_fetcher` with
  `address+1`. It does this only once the first quad is no longer waiting
  for the fetcher, so two demand fetches never stop each other.

`ready[0]` and `ready[1]` rise independently. A quad that has been
delivered is kept in a hold register until `ack`. Later changes to the
buffers, such as a new read-buffer load for the second quad, therefore
cannot disturb it. An `ack` before both ready bits are set aborts the
request, for example after a jump. The cache then drops it without any
other effect. A demand fetch it started keeps running.

A quad can be skipped by a wrap-around demand fetch, or never come because
a fetch was stopped. Rule 4 does not apply to such a quad, so it becomes a
miss rather than an endless wait.

## Fetching (`fetcher`, `fetch_lookup`, `status_update`)

The fetcher has one state register with four states:

| state | `demand_pre` | meaning                                                  |
|-------|--------------|----------------------------------------------------------|
| REST  | 00           | idle                                                     |
| PRE   | 01           | prefetching the next transfer block                      |
| DEM   | 10           | demand fetching a missing quad                           |
| STORE | 01/10/11     | writing the fetch buffer into the cache; 11 = a demand is waiting |

### Prefetch

The cache looks one transfer block ahead. Whenever the instruction unit
requests and the server does not start a demand fetch, the fetcher looks
at transfer block `tba+1`. It prefetches that block, with all 8 quads
(`bus_count = 7`), unless one of these holds:

- the fetch buffer already holds it;
- the fetch buffer holds the current transfer block;
- `tba+1` is completely valid in the cache.

The prefetch address `{tba+1, 000}` is always shown to the MMU on
`pref_addr`, so that translation can start early.

### Demand fetch

A demand fetch starts at the missing quad. It asks only for the rest of
its transfer block (`bus_count = 7 - word`). The quad pointer starts at
the missing word, and the lower quads of the row stay invalid.

### Stopping a fetch

A demand fetch always wins over a running fetch, whether that is a
prefetch or another demand fetch.

- **Quads already arrived:** the fetcher raises `bus_cancel` alone, stores
  the partial buffer, and issues the new `bus_valid` after the store.
  `demand_pre` shows 11 meanwhile.
- **Nothing arrived yet:** `bus_valid` and `bus_cancel` come in the same
  cycle, so the new burst replaces the old one at once.

### Store

The store starts the cycle after the 8th quad arrives, or when a fetch is
stopped or ends in an error. `status_update` reads the set of the fetch
buffer's block and picks a way:

- **Tag matches a valid block:** the fetched quads' data_valid bits are
  merged into that block.
- **Otherwise:** an invalid way is used, or else the least recently used
  one. Its tag is replaced, and all its data_valid bits except the new ones
  are cleared.

The row is written through a per-quad write mask, so a partial buffer
never overwrites valid quads. A store waits while the server uses the RAM.

## Interfaces and timing

All signals are synchronous to `clk`. `rst_n` is asynchronous and active
low, and clears every state register and valid bit.

**Instruction unit**

| signal      | dir | timing |
|-------------|-----|--------|
| `request`, `address[45:0]` | in | held until `ack` |
| `ready[1:0]` | out | combinational; bit 0 marks `data_lo` valid, bit 1 marks `data_hi` |
| `data_lo`, `data_hi` | out | valid while the matching ready bit is set |
| `ack`       | in  | ends the request at this clock edge, with or without ready |
| `error`     | out | the demand fetch for this request failed; see Errors |

**Bus unit**

| signal      | dir | timing |
|-------------|-----|--------|
| `bus_valid` | out | one cycle; starts a burst |
| `bus_addr[45:0]` | out | first quad of the burst, sent with `bus_valid` (virtual; the MMU translates) |
| `bus_count[2:0]` | out | number of quads wanted minus one, sent with `bus_valid` |
| `bus_ready` | in  | a quad is on `bus_data` in this cycle; the quads come in address order. It is used in the same cycle (fetch bypass to `data_lo`/`data_hi`), so it must arrive early in the cycle |
| `bus_data[31:0]` | in | the quad marked by `bus_ready` |
| `bus_cancel`| out | ends the running burst |
| `bus_error` | in  | timeout; ends the burst in place of a ready |

**MMU**

| signal      | dir | timing |
|-------------|-----|--------|
| `demand_pre[1:0]` | out | the fetcher's state, so the MMU knows which address to translate |
| `pref_addr[45:0]` | out | the next prefetch address |
| `mmu_pagefault` | in | ends the burst in place of a ready |

**Flush**

| signal      | dir | timing |
|-------------|-----|--------|
| `flush`     | in  | requests a flush |
| `flush_busy`| out | set while the flush is pending or running |

**Self test**

| signal      | dir | timing |
|-------------|-----|--------|
| `self_test` | in  | requests a memory test of the data RAM |
| `test_busy` | out | set while the test is pending or running |
| `test_fail` | out | set from the first mismatch until the next test starts |

## Errors

A bus timeout or a pagefault ends the running burst in the same cycle. The
quads that already arrived are stored as usual.

- **During a prefetch:** the processor did not ask for these quads, so the
  error is ignored. Prefetching stays off until the next demand fetch, so
  the cache does not retry the failing page.
- **During a demand fetch, with a quad of the current request waiting for
  it:** the server raises `error` from the next cycle until `ack`. `ready`
  is 00 meanwhile, even if one quad had already been delivered, and
  `data_lo[1:0]` holds `{timeout, pagefault}`. The server
  starts no new fetch for that request. If the instruction unit requests
  the same address again after its handler, a new demand fetch starts.

## Flush (`flush_ctrl`)

A flush waits until the fetcher is idle. It then clears the block_valid
bits of sets 0 to 15 in 16 cycles, and clears the valid bits of both
buffers. Requests are held off while `flush_busy` is set.

## Memory self test (`ram_bist`)

The data RAM is the large memory of the cache. In silicon it would be a
generated SRAM, which scan cannot test, so it gets an algorithmic test.

A self-test request waits until the fetcher is idle and no flush is
running. The test then takes over the RAM port and runs March C-, one row
per cycle, with whole rows of zeros or ones:

    up (w0); up (r0,w1); up (r1,w0); down (r0,w1); down (r1,w0); down (r0)

The RAM reads combinationally, so each element reads and writes a row in
the same cycle. A run takes 6 x 128 = 768 cycles. It detects:

- stuck-at faults;
- transition faults;
- address decoder faults;
- most coupling faults.

The test destroys the cached quads, so it ends with a normal 16-cycle
flush. Requests are held off throughout.

## Modules

| file                 | contents |
|----------------------|----------|
| `icache_pkg.sv`      | widths, types, field functions |
| `icache.sv`          | top level, wiring only |
| `server.sv`          | request handling, hold registers, error report |
| `quad_find.sv`       | per-quad lookup: read buffer, fetch buffer, wait, cache |
| `fetcher.sv`         | prefetch, demand fetch, stop, store, DemandPre, errors |
| `fetch_lookup.sv`    | the "do not prefetch" test |
| `status_update.sv`   | way choice and new tag and status for a store |
| `pref_addr_dec.sv`   | `{tba+1, 000}` |
| `tag_status_ram.sv`  | tag and status memories: 3 read ports; fetcher, LRU and flush write ports |
| `data_ram.sv`        | 128 x 256 data RAM with per-quad write mask |
| `ram_arbiter.sv`     | server-first access to the data RAM |
| `read_buffer.sv`, `fetch_buffer.sv`, `status_reg.sv` | the two buffers and their addresses |
| `flush_ctrl.sv`      | 16-cycle flush |
| `ram_bist.sv`        | March C- self test of the data RAM |

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb/bus_unit_model.sv` is a behavioural model of the bus unit, the MMU and
main memory. It has:

- the contents `mem(a) = a[31:0] ^ {a[45:32], 18'h0}`;
- a 2-cycle first-quad latency;
- random gaps between quads;
- optional random timeouts and pagefaults.

The end-to-end test `tb_icache` runs the top level at its default size. It
makes 4000 requests: sequential runs broken by jumps across four tags,
late acks, aborts and immediate repeats. It runs a self test at a quarter
of the way and a flush halfway. Errors are switched on in the last
quarter. It compares every delivered quad pair with
`mem()`. It also counts each mechanism and fails if one never occurs: the
read-buffer, fetch-buffer and bypass hits, the two-cycle case, waits,
first- and second-quad demand fetches, prefetch, stop, store, replacement,
RAM conflicts, DemandPre 11, flush, self test, and both kinds of error.

`tb_icache_trace` rebuilds the cache's original test bench:

- main memory is 2048 words, each holding its own 11-bit address;
- the instruction unit requests again right after each ack, and acks as
  soon as both ready bits are set;
- the 6545-request address trace comes from a small generator with loops,
  calls and returns, and a process switch every 1000 requests.

It checks every pair. It also prints the cycle count, the share of requests
served in their first cycle (64% for the fixed trace), and the demand fetch and prefetch
counts.

Run either test from the repository root:

    verilator --binary --timing --assert -Mdir obj_icache \
        rtl/icache_pkg.sv tb/tb_icache.sv -y rtl -y tb +libext+.sv \
        --top-module tb_icache -o sim
    ./obj_icache/sim

Replace `tb_icache` with any other testbench name to run that one. The
whole set runs in seconds.

## Where this design departs from the original

- **Hold registers.** Delivered quads are kept in hold registers until
  `ack`. The original used a separate "next" state controller, and updated
  its status only after the acknowledge.
- **One state register in the fetcher.** The original's separate prefetch
  and demand state controllers and signal mergers are folded into one
  four-state register. The visible behaviour is unchanged: counts,
  wrap-around, cancel/valid ordering and DemandPre codes.
- **Choices the original leaves open:**
  - the LRU bit is kept per block as a "most recently used" flag;
  - an invalid way is filled before the LRU way is replaced;
  - the data RAM has a per-quad write mask;
  - the bus unit's `bus_valid` lasts one cycle, and `bus_count` is the
    number of quads minus one;
  - `bus_addr` is an explicit port;
  - the reset behaviour.
- **Error signalling.** The original prototype had no error signals. The
  error ports, the `{timeout, pagefault}` status encoding, and keeping
  prefetching off after a prefetch error are this design's own.
- **Self test.** The original only names the self-test mode. It says just
  that a memory test algorithm can be written as a state machine. The
  choice of March C-, the ports, and the flush at the end are this
  design's own.
- **Flush.** The flush mode was only outlined in the original. The
  `flush`/`flush_busy` handshake, waiting for an idle fetcher, and clearing
  the buffers are this design's own.

## Limitations

- **Not built:**
  - the transparent mode (cache bypassed), whose behaviour is not
    specified;
  - the scan part of self test, which needs a gate-level netlist with scan
    flip-flops. Only the memory test exists, and the small tag and status
    memories are left to scan.
- **Outside the cache:** the bus unit, the MMU and the instruction unit
  are represented only by testbench models. The MMU model translates by
  identity.
- **No real program traces.** The end-to-end test runs on generated
  address streams, not on traces of real programs.
- **Memories.** The tag and status memories are flip-flops, and the data
  RAM is an inferred array with an asynchronous read. A real
  implementation would use SRAM macros and might have to pipeline the RAM
  read. That would turn the one-cycle cache hit into a two-cycle one.
