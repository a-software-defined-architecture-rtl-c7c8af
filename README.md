# Disaggregated memory controller: compute brick to memory brick over serial lanes

A rack built from separate *compute bricks* (processors with little local memory) and *memory
bricks* (DRAM with memory controllers, no processors) lets a compute brick use memory that
physically sits in another box. A circuit switch joins a compute brick's serial transceiver to a
memory brick's transceiver. Software allocates a memory segment on a memory brick and maps it
into the compute brick's physical address space, and from then on ordinary loads and stores
reach it. Applications need no changes.

This repository holds the hardware data path that makes this work: a pair of **Disaggregated
Memory Controllers (DMCs)**. The compute-side DMC (`cdmc`) catches memory bus transactions aimed
at remote segments. It rewrites their addresses into the memory brick's address space, tags
them, and streams them over serial lanes. The memory-side DMC (`mdmc`) hands the requests to
its memory controllers and sends every response back on the lane it came from. AXI4 streamers
on both ends turn the memory bus channels into a single flit stream and back. The top module,
`dmc_prototype`, runs AXI4 to AXI4. Its defaults match a two-board FPGA prototype:
- 2 master ports on the compute brick;
- 2 lanes;
- 2 memory slave ports on the memory brick;
- a 152-bit internal datapath and 64-bit lane words;
- one 156.25 MHz clock.

```
 compute brick                                                        memory brick
 AXI4 master port m ─► cbrick_streamer ─► cdmc ─► lane n (64 b) ─► mdmc ─► mbrick_streamer ─► AXI4 slave s
                      (AXI4 ⇄ flits)       │       ▲  serDES +         │    (flits ⇄ AXI4)     (DDR controller)
                                           └───────┘  circuit switch   │
                                      responses come back on the same lane, tagged for their port
```

The serDES cores, the cables and the circuit switch are not part of this RTL. The lane words
of both DMCs are ports of the top (`c_tx_*`/`c_rx_*` on the compute brick, `d_rx_*`/`d_tx_*` on
the memory brick). A system, or a testbench, joins compute lane *n* to a memory-brick lane.

## Flits

Inside the DMCs each transaction is a short run of 152-bit flits. 152 bits holds the widest
AXI4 channel, a read beat: 128 data bits plus id and response. `dmc_pkg` defines the flit:

| bits | field | meaning |
|---|---|---|
| 151:149 | `kind` | `K_AW`=1, `K_W`=2, `K_AR`=3, `K_R`=4, `K_B`=5, `K_CFG`=6 |
| 148 | `eot` | last flit of the transaction |
| 147:146 | `mtag` | master port the request came from (written by the compute brick) |
| 145:144 | `ltag` | lane the request arrived on (written by the memory brick) |
| 143:0 | `body` | depends on `kind`, see below |

| kind | body |
|---|---|
| AW, AR | `[39:0]` address, `[47:40]` len, `[50:48]` size, `[52:51]` burst, `[58:53]` id |
| W | `[127:0]` data, `[143:128]` byte strobes |
| R | `[127:0]` data, `[129:128]` resp, `[135:130]` id |
| B | `[1:0]` resp, `[7:2]` id |
| CFG | one lookup-table entry (see *In-band configuration*) |

A write is an AW flit followed by its W beats, with `eot` on the last beat. A read is a single
AR flit. A read response is its R beats; a write response is one B flit. Every switching point
in both DMCs moves whole transactions: a route or an arbiter grant is taken at the first flit
and held until the `eot` flit. Two consequences:
- The W beats of a write are never separated from their AW.
- An R burst is never interleaved with another response.

The tags are two bits each. That limits a brick to four master ports and four lanes. Widening
them means narrowing the body, and the W beat (data plus strobes) already fills the 144 body bits.

## Compute-brick DMC (`cdmc`)

**Transmit side, per master port.** `req_prep_steer` owns that port's *MemPort Lookup Structure*
(`memport_lookup`). This is a small table with one entry per remote segment:

| field | meaning |
|---|---|
| Low Addr, High Addr | the segment's bounds in the compute brick's address space; inclusive, and they are the match key |
| Rmem Offset | added to the address to reach the memory brick's address space |
| OutPort | the lane whose circuit leads to that memory brick |

For each AW or AR flit, the unit:
- looks up the address;
- adds the offset to the address;
- writes the port number into `mtag`;
- steers the whole transaction through a 1×N crossbar (`txn_steer`) into queue (m, n) of lane *n*.

Entries are matched in parallel. If entries overlap, the lowest index wins.

If an address hits no entry, the whole transaction is dropped and `lookup_miss[m]` pulses for
one cycle. The master then gets no response. Software must not touch unmapped remote space.

**Transmit side, per lane.** A `txn_rr_arbiter` drains the M queues (·, n) one transaction at a
time, in round-robin order. Next comes the `rate_limiter`, then the `flit_downsizer`, which
sends each flit as three 64-bit words, low word first. The top word carries flit bits 151:128
and 40 zero bits.

**Receive side, per lane.** The stages are:
1. A `flit_upsizer` rebuilds flits by counting words from reset.
2. An `edge_fifo` edge buffer holds them.
3. A response-steering `txn_steer` pushes each response into queue (n, m), picked by its `mtag`.
4. Per master port, a round-robin arbiter delivers the responses.

This gives M×N queues on the transmit path and another M×N on the receive path.

## Memory-brick DMC (`mdmc`)

The memory brick only answers requests. Per lane:
1. An upsizer rebuilds flits.
2. An edge buffer holds them.
3. The lane number is written into `ltag`.
4. A crossbar steers each transaction to the slave port that holds its address. The slave
   port is `(addr >> SLAVE_LSB) % S`. With `SLAVE_LSB=30` and S=2, the two memory controllers
   take alternating 1 GiB regions.
5. Per slave port, a round-robin arbiter merges the N lane queues.

Responses return `ltag` and `mtag` unchanged. A crossbar per slave port steers each response by
`ltag` back to the lane its request arrived on. There, an arbiter and a downsizer send it.

## AXI4 streamers

`cbrick_streamer` is the AXI4 slave on each compute-brick master port. It puts one transaction
at a time onto the flit path:
- either an AR;
- or an AW followed directly by all its W beats.

When reads and writes are both waiting, they take turns. Returning R flits drive the R channel
(`rlast` comes from `eot`). B flits drive the B channel.

`mbrick_streamer` is the AXI4 master on each memory-brick slave port.
- **Requests:** it issues AW/W/AR from the request flits. It puts the flit's tags in the upper
  bits of the AXI id: `{ltag, mtag, id}`, so 10 bits.
- **Responses:** the memory returns the id unchanged, so every R and B can be tagged again for
  the return trip without any table.
- **Merging:** it merges R and B into one flit stream. A started R burst always finishes first.

AXI4 ids on the compute side are 6 bits, and data beats are 16 bytes. The streamers pass the
burst fields through. Bursts must be INCR and must not cross a segment boundary, because only
the first address of a burst is looked up.

## In-band configuration

The lookup tables are written over the same path as data, so the control software needs no
side channel. Every compute-side master port has a 4 KiB configuration window, starting at
`CFG_BASE` (default `0xA000_0000`). Here is how a write into that window flows:
1. Each W beat of the write becomes one CFG flit.
2. The streamer itself answers the write with an OKAY B.
3. `req_prep_steer` takes the CFG flit, writes the entry into its table, and forwards nothing.

The beat's data holds the entry. The offset within the window does not matter.

| data bits | field |
|---|---|
| 39:0 | Low Addr |
| 79:40 | High Addr (inclusive) |
| 119:80 | Rmem Offset (added modulo 2^40) |
| 121:120 | OutPort (lane) |
| 125:122 | entry index |
| 126 | valid (0 removes the entry) |

`dmc_pkg::cfg_entry()` decodes such a word into a table entry. A configuration write only
reaches the table of the port it was written on. Reset clears every entry.

**Rate limits** come from a control plane that knows every allocation. They are plain ports,
one set per compute-brick lane:
- `rl_en` turns the limiter on;
- `rl_rate` is the refill rate, in 1/256 flit per cycle;
- `rl_burst` is the bucket size, in flits.

The limiter is a token bucket. A flit may pass when the bucket holds at least one flit of
credit, and passing costs that one flit. While the limiter holds flits back, `throttled[n]` is
high.

## Flow control, and where flits can be lost

Inside each brick every queue has valid/ready back pressure. A full queue stalls everything
that feeds it, back to the AXI4 channel. The lanes have no back pressure. The downsizer sends
whenever it has a flit, and the upsizer cannot refuse one. So when a receiving edge buffer is
full, the flit is **dropped**, and `c_rx_drop[n]` or `d_rx_drop[n]` pulses. This can happen at
the memory brick when:
- the lanes deliver faster than its memory controllers drain;
- several compute bricks share a memory brick.

The rate limiters exist to prevent it. A dropped flit corrupts its transaction, and nothing
retries it. Size the rate limits, `QDEPTH` and the memory-side service rate together.

## Timing and throughput

Everything runs on one clock. The streamers, the translation, the crossbars and the arbiters
are combinational. The queues, the downsizer and the upsizer add the registered stages.

- A lane carries one flit every three cycles. At 156.25 MHz that is 833 MB/s of write data per
  lane, and the same of read data on the return lane. The padding of the third word costs about
  20 % of the raw 10 Gb/s.
- For a one-beat read, the end-to-end testbench measures **129 cycles** from AR acceptance at the
  compute brick to the first R beat. The lane models are 57 cycles each way, and memory answers
  at once. So the two DMCs and streamers add 15 cycles in total, and the remaining 114 are serDES
  latency. The number quoted for the prototype is a 134-cycle overhead over local memory. The
  testbench requires the measured value to be above 114 and at most 134 cycles.
- With a 64-byte cache line:
  - a line read costs 1 request flit and 4 response flits;
  - a line written costs 5 request flits and 1 response flit.

  A STREAM-style copy kernel can therefore move about 1059 MiB/s through one lane, and sum/triad
  kernels about the same. The return lane is their limit. The two lanes double this when the
  segments are spread over both.

`tb_stream_kernels` runs the four STREAM kernels over the top at its default parameters. They
are `copy c=a`, `scale b=3c`, `sum c=a+b` and `triad a=b+3c`. Each kernel has 16 cache lines in
flight. Measured at 156.25 MHz:

| run | bytes moved per line | measured | bound |
|---|---|---|---|
| copy, scale: 1 port, 1 lane | 128 | 880 MiB/s | 1059 MiB/s |
| sum, triad: 1 port, 1 lane | 192 | 1011 MiB/s | 1059 MiB/s |
| sum: 24 lines in flight, lane limited to 48/256 flit per cycle | 192 | 664 MiB/s | 1059 MiB/s |
| copy: 2 ports sharing lane 0, 8 lines in flight each | 128 | 793 MiB/s in total | 1059 MiB/s |
| copy: 2 ports, port 1 moved to lane 1 by a configuration write, 16 lines in flight each | 128 | 1744 MiB/s in total | 2119 MiB/s |

A single lane is the bottleneck. Ports that share it split its bandwidth. Ports spread over
several lanes add their bandwidth together.

**How many reads can be in flight.** Don't put more than about 32 read bursts in flight on one
lane without rate limiting. That is 16 lines for sum and triad, which read two lines per line
they write. The reason:
- A read request is one flit, but its answer is four.
- A burst of reads therefore reaches the memory brick up to four times faster than the return
  lane can carry the data back.
- The memory-side queues fill, and nothing can stop the sending lane. So the memory-side edge
  buffer overflows.

With the default `QDEPTH=8`:
- 32 reads in flight is safe.
- 48 reads in flight is not safe. Sum with 24 lines overflows unlimited, and also with the
  lane limited to 64/256 flit per cycle.

Limiting the lane to 48/256 flit per cycle makes the 48-read case safe, at 664 MiB/s. This is
the use of the rate limiter that the control plane is meant to make. Deeper memory-side queues
are the other remedy.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dmc_prototype`, `dmc_system` | `M` | 2 | compute-brick master ports (≤ 4) |
| | `N` | 2 | lanes (≤ 4) |
| | `S` | 2 | memory-brick slave ports |
| | `ENTRIES` | 4 | lookup entries per master port (≤ 16) |
| | `QDEPTH` | 8 | depth of every queue and edge buffer |
| | `SLAVE_LSB` | 30 | address bit that starts the slave-port select |
| | `CFG_BASE` | `0xA000_0000` | configuration window of each master port |

`ENTRIES=4` covers the prototype's configuration of four 512 MiB remote segments.

## Where this design departs from the prototype it follows, or fills gaps

The source description fixes these points:
- the block structure;
- the lookup fields;
- the translation by offset;
- the M×N queues;
- the transaction-atomic round-robin arbiters;
- the rate limiter position;
- the missing lane back pressure;
- the 152/64-bit widths;
- the single clock.

These are choices of this design:
- **Flit layout, tag widths and the CFG flit kind.** Only the 152-bit width is given.
- **Three words per flit on a lane.** A denser packing, 19 words per 8 flits, would reach the
  full lane rate but needs a realigning upsizer.
- **Token-bucket rate limiting.** The source gives no mechanism.
- **Discarding requests that miss the lookup.** The source does not say what happens then.
- **The configuration window.** The path by which configuration reaches the tables is not given
  beyond being in-band.
- **Slave selection by address bits** at the memory brick.
- **Tags carried in the AXI id** at the memory brick.
- **Queue depths.**
- **Dropping on edge-buffer overflow**, with a pulse. The source only says overflow can happen.

The whole design runs on one clock, as the prototype does. A design could instead run the bus
side faster than the lanes, turning the edge queues into clock-crossing FIFOs. This RTL does
not do that.

Not in the RTL:
- the Aurora serDES cores and the circuit switch (vendor and external parts);
- the processor system, the AXI interconnects and the DDR controllers;
- the control-plane software;
- the management NIC.

The testbenches model the lanes (`aurora_link_model`: a fixed delay, 57 cycles by default) and
the memories (`flit_mem_model`, `axi_mem_model`).

## Files

| file | contents |
|---|---|
| `rtl/dmc_pkg.sv` | flit and AXI types, constants, `cfg_entry()` |
| `rtl/edge_fifo.sv` | queues and edge buffers |
| `rtl/memport_lookup.sv` | segment table and range lookup |
| `rtl/req_prep_steer.sv` | translation, tagging, request steering, in-band config |
| `rtl/txn_steer.sv` | transaction-holding 1×N crossbar |
| `rtl/txn_rr_arbiter.sv` | transaction-atomic round-robin N×1 switch |
| `rtl/rate_limiter.sv` | token bucket |
| `rtl/flit_downsizer.sv`, `rtl/flit_upsizer.sv` | 152 ⇄ 3×64-bit lane words |
| `rtl/cdmc.sv`, `rtl/mdmc.sv` | compute-brick and memory-brick DMCs |
| `rtl/dmc_system.sv` | both DMCs with flit-level master and slave ports |
| `rtl/cbrick_streamer.sv`, `rtl/mbrick_streamer.sv` | AXI4 ⇄ flit streamers |
| `rtl/dmc_prototype.sv` | top: AXI4 to AXI4 |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_stream_kernels.sv` | STREAM kernels end to end, with bandwidth checks |
| `tb/aurora_link_model.sv`, `tb/flit_mem_model.sv`, `tb/axi_mem_model.sv` | behavioural models (testbench only) |

## Simulating

Each testbench checks itself, ends with a line `TB_RESULT checks=<n> failures=<n>`, and stops
itself through a watchdog if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv rtl/dmc_pkg.sv tb/tb_dmc_prototype.sv \
    --top-module tb_dmc_prototype -o sim
./obj_dir/sim
```

Swap in any other `tb_*` name to run another testbench. The testbenches use only two-state
values and `$urandom`.

`tb_dmc_prototype` runs the top at its default parameters. It works in these steps:
1. It configures segments through the configuration windows of both master ports, spread over
   both lanes and both memory controllers.
2. It checks the 129-cycle round trip.
3. It runs random reads and writes from both ports against a reference memory, and checks every
   read against it.
4. It drives the mechanisms of the design and counts each one. A mechanism that never happens
   counts as a failure.

The mechanisms it counts:
- back pressure at a master port;
- read/write alternation in a streamer;
- CFG writes and their local B;
- a lookup miss;
- rate-limiter throttling;
- memory-side edge-buffer overflow. This is caused on purpose by slowing the memory and turning
  rate limiting off.

`tb_dmc_system` runs the same kind of test at flit level, without the streamers. The block
testbenches compare each module with an independent model: queue, range table, ideal token
bucket, word packing, and transaction order.
