# 3D-MMC: a multi-core built from identical stacked dies

A 3D-MMC system is a stack of dies that are all the same. Each die is a
complete four-core machine: four processing elements (PEs) with private
memory, and one peripheral subsystem (PS) that holds the die's shared memory
and a bank of hardware semaphores. Everything on a die talks through one
small packet switch. Vertical connections (through-silicon vias, TSVs) join
the switches of neighbouring dies, so a core on any die can read and write the
shared memory of every die. Stacking more dies adds cores and shared memory
without a new chip design. Spreading shared-memory traffic over the
memories of several dies is called *resource pooling*. It relieves the
single-ported shared memory of a die once too many local cores compete for it.

This repository holds synthesizable SystemVerilog for everything in that
system except the processor cores, the PLLs and the vendor debug and
peripheral IP (see [What is not here](#what-is-not-here)). The main
configuration is a two-die stack with eight cores. It is simulated end to
end with behavioural core and PLL models.

## The stack at a glance

```
             clk pad, LayerID pads ("00", select=1)
                         |
   die 0  +--------------v------------------------------------------+
          | PE0  PE1  PE2  PE3      PS (shared RAM + semaphores)    |
          |  N    E    S    W         L                             |
          |  +----+----+----+---------+-- noc_switch --+ U   D       |
          |                                   conn3d_macro          |
          +-----------------------------------------|---------------+
            clock TSV, LayerID TSV (+1), data link down / data link up
          +-----------------------------------------|---------------+
   die 1  | same die; pads pulled down, so it takes clock and ID    |
          | from the TSVs                                           |
          +---------------------------------------------------------+
```

`mmc3d_top` instantiates `NUM_LAYERS` copies of `mmc_layer` (default 2). Die 0
is the top die. Layer numbers grow downwards.

## How a shared-memory access travels

This is the heart of the design and the part worth reading first.

**Address map (per PE).** A core's bus request is decoded on `addr[31:28]`:

| region        | target                                          |
|---------------|-------------------------------------------------|
| `0x0xxx_xxxx` | boot ROM (1K words)                              |
| `0x4xxx_xxxx` | private RAM (16K words = 64 KB)                  |
| `0x8xxx_xxxx` | shared memory of die `addr[25:24]`; `addr[23]=1` selects its semaphores |
| other         | answered at once with zero, no effect            |

So `0x8000_0000` is die 0's shared RAM, `0x8100_0000` die 1's, and
`0x8080_0000` is semaphore 0 of die 0. Shared addresses are the same for every
core, whatever die it sits on.

**Bus.** Inside a PE and inside the PS, masters and slaves use a simple
single-outstanding request/ready bus (`bus_req_t`/`bus_rsp_t` in `mmc_pkg`).
The master holds `req` and its fields until the slave pulses `ready` for one
cycle. `rdata` is valid in that cycle. RAMs answer one cycle after `req`. The
original chip uses AMBA AHB here. This bus keeps the same master/slave
structure without AHB's pipelining.

Every bus has two masters:

- in a PE, the core and a JTAG debug master;
- in the PS, the network interface and a debug master.

`bus_arbiter` shares the bus between them. A lone master passes straight
through. When both request, they take turns, and each keeps the bus from
grant to `ready`. The debug masters themselves are library IP. Their buses
are ports of the top (`dbg_req_i`/`dbg_rsp_o`), with index 4 for the PS.

**Packets.** The PE's network interface (`ni_pe`) turns a shared access into a
packet of 33-bit flits (`{last, data[31:0]}`):

| packet         | flits                                   |
|----------------|-----------------------------------------|
| write request  | head, address, data                     |
| read request   | head, address                           |
| read response  | head, data                              |

Writes are *posted*. The core gets `ready` as soon as the last flit has
entered the switch, and there is no write response. Reads block the core
until the response returns. Each NI handles one access at a time.

Head flit layout (`head_t`):

| bits    | field                                                         |
|---------|---------------------------------------------------------------|
| [31:14] | route: six 3-bit hops, next hop in [16:14]                    |
| [13:12] | source die                                                    |
| [11:10] | source PE                                                     |
| [9]     | write                                                         |
| [8]     | response                                                      |
| [7:4]   | byte strobes                                                  |

**Source routing.** The sender writes the whole path into the head. From die
`s` to die `d` the path is |d-s| hops Down (code 5) or Up (4), then Local (6)
into the PS (`make_route` in `mmc_pkg`). The PS answers reads with a route
built the same way from the source die and PE carried in the request.

**Switch** (`noc_switch`). Each die has one switch with seven ports:

- N, E, S and W (codes 0-3) lead to PE0-PE3.
- U and D (4, 5) lead to the 3D macro.
- L (6) leads to the PS.

Each input has a two-flit buffer. A head flit's low hop names its output. The
switch shifts the route down by one hop as it forwards the head, so the next
switch finds its own hop in the same bits. Outputs are granted round-robin
and stay locked to one input until the packet's `last` flit has passed
(wormhole switching). `stall_o` marks inputs whose head is waiting.

**Ordering.** All packets from one PE to one shared memory take the same path
through in-order buffers, and the PS serves them strictly in arrival order.
A PE's read therefore always sees its own earlier posted writes, and a
semaphore release reaches the PS after the data writes before it. There is
no ordering between different memories, and no cache coherence. Software
synchronises through the semaphores.

**PS** (`mmc_ps`, `ni_ps`). The PS network interface is the only master of the
PS bus and performs one request at a time:

- a write takes 3 flit cycles plus 2 bus cycles;
- a read puts its 2-flit response into a queue and moves on.

That single master in front of a one-write-port/one-read-port RAM is what
makes a die's shared memory saturate when four local cores hammer it.

**Why responses are queued.** Requests and responses share one network.
Suppose a PS could not take a new request until its last response had
left. Then this cycle could form:

1. The PS of die 0 waits to send a response down.
2. That response waits for the link FIFO into die 1, which is full of
   requests for die 1's PS.
3. Die 1's PS waits to send a response up.
4. That response waits for the link FIFO into die 0, which is full of
   requests for die 0's PS.

Nothing moves again. Without the queue, a four-die stack under all-to-all
traffic falls into this deadlock within microseconds.

Each PE has at most one read outstanding. `ni_ps` therefore queues
responses, with room for one per PE of the largest stack (`RESP_DEPTH` =
4 dies x 4 PEs = 16). Its request side then never waits for the network,
so requests always drain and the cycle cannot close.

**Semaphores** (`semaphore_bank`). There are 32 one-bit test-and-set
semaphores. A read returns the old value and sets the semaphore, so reading 0
means you own it. Writing 0 releases it.

## The vertical link

`conn3d_macro` holds two identical links, one to the die above and one to the
die below. Each link has a transmit path and a receive path.

**Serializer** (`tsv_serializer`, sending die's clock). A 33-bit flit goes
out on `LANES`=8 data TSVs in 5 beats, low slice first. A `valid` wire is
high on every beat and an `sof` wire marks the first beat. Flits follow back
to back. That is 8 bits per cycle, or 3.2 Gbit/s at 400 MHz per direction. A
flit therefore occupies the link for 5 cycles. A write request (3 flits)
takes 15 cycles to cross.

**Forwarded clock.** The sending die's clock travels with the data on its own
TSV. Each die has its own PLL, so dies run at the same frequency with an
unknown phase between them.

**Deserializer** (`tsv_deserializer`). It runs on the forwarded clock and
rebuilds the flit.

**Dual-clock FIFO** (`dc_fifo`, 8 entries). It moves flits into the
receiving die's clock. It is a standard asynchronous FIFO: Gray-coded
pointers, two-flop synchronisers.

**Back-pressure.** The FIFO's write side raises a *stop* wire while 5 or more
entries are (conservatively) in use. The stop goes back over a TSV to the
sender, which synchronises it and starts no new flit while it is high. The
margin of 3 free entries covers the flit in flight, the one that can start
during the two-cycle synchroniser delay, and the deserializer's register.
`rx_overflow` flags a write into a full FIFO and must never happen.

Each link direction uses 12 TSVs: 8 data, valid, sof, clock and stop.

## Self-configuration: LayerID and clock

Because every die is the same, a die finds its place in the stack at power-up
(`layer_id_gen`):

- On the top die a select pad is driven high, and the 2-bit LayerID pads
  carry `00`.
- On other dies those pads are pulled down, so a multiplexer takes the ID
  arriving on the TSVs from above.
- Each die sends its own ID plus one down to the next die.

The die's NIs use the ID to build routes.

The clock follows the same chain (`clock_select`). The top die (ID 0) feeds
its pad clock to its PLL. Every other die feeds the clock arriving from
above. The PLL output (`pll_ref_o` out, `pll_clk_i` back in) clocks the die
and is passed down.

The stack reset is asserted asynchronously and released synchronously in each
clock domain (`rst_sync`). The top and bottom dies each have one link with no
neighbour. `mmc3d_top` feeds those receivers idle data and the die's own clock
so that they reset cleanly.

## Resource pooling, measured

Resource pooling is a software policy: it decides which accesses go to the
local shared memory and which to another die's. The hardware only has to make
every shared memory reachable, which it does. The end-to-end testbench runs
the *Memory Stress* workload: each core performs 1000 stores to shared
memory, with 12 idle cycles between stores standing in for the loop code. All
active cores are on die 0. Cycles at 400 MHz:

| cores | all local | all remote | pooled (core 0 remote) |
|-------|-----------|------------|------------------------|
| 1     | 17000     | 17000      | -                      |
| 2     | 17005     | 30002      | 17000                  |
| 3     | 17010     | 45002      | 17005                  |
| 4     | 20012     | 60002      | 17010                  |

How to read the table:

- **One core** sees no difference between local and remote, because stores
  are posted.
- **Remote stores** are limited by the link (15 cycles per store), so two or
  more remote cores block.
- **Local stores** are limited by the PS (about 5 cycles per store), so four
  local cores block.
- **Pooling** sends one of the four cores to the other die. That removes the
  blocking and cuts the time by 15% here.

The exact numbers depend on the loop time assumed for the core. The original
chip, running real LEON3 software, shows the same pattern:

- local and remote times are equal for one core;
- remote is slower from two cores on;
- pooling removes the local blocking.

Its gains are larger: 26.6% with three cores and 42.3% with four. The
difference comes from the ratio of two service times. In this RTL a store
holds the vertical link for 15 cycles but the PS for only about 5, so three
times as many cores fit on the local memory as on the link. No single core
loop time can therefore make the local memory block at three cores while one
remote core still runs at full speed. The original saturates its local
memory at about two cores' worth of stores and its link at about one and a
third.

### Scheduling remote accesses inside a task

Pooling can also be finer grained. Each core sends a fraction of its own
stores to the remote memory, and the order in which it does so matters. In
`tb/tb_tlrp.sv` the four cores of die 0 each make 1000 stores, R of them
remote. `k` is how many cores make their remote stores at the same time:

| R (remote per core) | k = 4 | k = 2 | k = 1 |
|---------------------|-------|-------|-------|
| 0                   | 20012 | -     | -     |
| 125                 | 24993 | 22499 | 18512 |
| 250                 | 29993 | 24996 | 17010 |
| 500                 | 39993 | 30002 | -     |
| 750                 | -     | 45002 | -     |
| 1000                | 60002 | -     | -     |

The link serves one remote store per 15 cycles, so one core at a time can use
it at full speed. With `k = 1` the remote store slots of the cores take turns:

- at no time do all four cores hit the local memory;
- at no time do two cores share the link.

With `k = 4` the time is a straight line between the all-local and all-remote
points (`T = R*C_R4 + (1000-R)*C_L4`). The testbench checks this to within 5%.

Past R = 500, two pairs of cores can no longer take turns. The second pair's
remote slot is moved to the end of its stores, so in the overlap all four
cores are remote (a mixed "2+4" schedule). The time is then a sum over the
phases, each at its own cost per store:

- C_2R2L, with two cores remote and two local, comes from the k = 2, R = 250
  run (about 30 cycles);
- C_R4, with all four remote, comes from the R = 1000 run (60 cycles).

For R = 750 this predicts `500*C_2R2L + 500*C_R4` = 44991 cycles; 45002 were
measured. The testbench checks the prediction to within 5%.

### Four benchmark kernels on 1, 4 and 8 cores

`tb/tb_kernels.sv` runs the original's four parallel benchmarks:

- a median filter with window 3 over 64 integers;
- an 8x8 integer matrix multiplication, with the output elements shared
  out among the cores (the original splits it by divide and conquer);
- a 1D DCT of each row of an 8x8 matrix, in fixed point. Each core keeps
  the cosine coefficients (scaled by 4096) in its private RAM and reads
  them from there;
- a 1D FFT of each row of an 8x8 matrix: radix 2, 12 butterflies per row,
  with fixed-point twiddles from private RAM. Its results are checked
  against a floating-point DFT, to within 4.

The core models do the arithmetic, and every operand and result goes through
the real memory system. Every output is checked, exactly except for the
FFT's. The arithmetic takes an assumed number of cycles:

- 8 per output for the median;
- 16 per output for the matrix and the DCT;
- 8 per FFT butterfly.

With 8 cores, the data sits either in die 0's shared memory only ("single")
or in a copy per die ("local"). Cycles at 400 MHz:

| kernel | 1 core | 4 cores | 8 cores, single | 8 cores, local |
|--------|--------|---------|-----------------|----------------|
| median filter | 2696 | 1083 | 1834 | 555 |
| matrix multiply | 11584 | 4576 | 6896 | 2288 |
| 1D DCT | 7488 | 2560 | 3717 | 1280 |
| 1D FFT | 2064 | 1092 | 1606 | 554 |

On local data, 8 cores take about half the time of 4. On a single memory they
lose to 4 cores: a die-1 core waits for a vertical round trip on every
shared-memory operand, and the small arithmetic budget hides none of it. The original
measured only 1-17% between the two placements. Its cores spend far more
time per operand on computation and on private-memory accesses, which hides
the vertical latency. The testbench checks that:

- 4 cores beat 1;
- 8 cores on local data beat 4;
- local data is never slower than single.

The same testbench also runs the median filter with resource pooling: the
four cores of die 0, two of which work on a copy in die 1's shared memory.
The outputs are right, but the run takes 2359 cycles against 1083 on one
memory. Four cores do not saturate one shared memory, and every read is a
blocking round trip. Pooling reads this way costs a vertical round trip per
operand and gains nothing. The original reports a 5% gain for this case. The
stores of the memory-stress test above are posted, so they do not pay the
round trip, and pooling pays there.

## Files

| file | role |
|------|------|
| `rtl/mmc_pkg.sv` | shared types (bus, flit, head, events), port codes, address map, route function |
| `rtl/mmc3d_top.sv` | the stack: dies and their TSV wiring |
| `rtl/mmc_layer.sv` | one die |
| `rtl/mmc_pe.sv` | PE without its core: decoder, boot ROM, private RAM, NI |
| `rtl/mmc_ps.sv` | PS: NI, shared RAM, semaphores |
| `rtl/ni_pe.sv`, `rtl/ni_ps.sv` | network interfaces |
| `rtl/noc_switch.sv`, `rtl/sync_fifo.sv` | switch and its input buffers |
| `rtl/bus_ram.sv`, `rtl/bus_rom.sv`, `rtl/semaphore_bank.sv` | memories and semaphores |
| `rtl/bus_arbiter.sv` | shares a PE or PS bus between its two masters |
| `rtl/conn3d_macro.sv`, `rtl/tsv_serializer.sv`, `rtl/tsv_rx.sv`, `rtl/tsv_deserializer.sv`, `rtl/dc_fifo.sv` | vertical link |
| `rtl/layer_id_gen.sv`, `rtl/clock_select.sv`, `rtl/rst_sync.sv` | configuration, clock and reset |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_mmc3d_top` end to end; `tb_tlrp` the scheduling workload; `tb_kernels` median filter, matrix multiply, DCT and FFT; `tb_stack4` a four-die stack |
| `tb/pll_model.sv` | delay model of a PLL, simulation only |
| `tb/bus_tasks.svh`, `tb/rom_test.hex` | shared bus task, small ROM image |

### Main parameters

| parameter | default | where | note |
|-----------|---------|-------|------|
| `NUM_LAYERS` | 2 | `mmc3d_top` | up to 4 with the 2-bit LayerID |
| `NUM_PE` | 4 | `mmc_pkg` | fixed by the four horizontal switch ports |
| `PRIV_WORDS`, `SHARED_WORDS` | 16384 | `mmc_layer` | 64 KB each; sizes are this design's choice |
| `ROM_WORDS`, `ROM_FILE` | 1024, `""` | `mmc_layer` | ROM image loaded with `$readmemh` |
| `NUM_SEM` | 32 | `mmc_layer` | semaphores per die |
| `RESP_DEPTH` | 16 | `ni_ps` | read responses a PS can hold, one per PE of a four-die stack |
| `LANES` | 8 | `mmc_layer` | data TSVs per direction, 8 bits/cycle |
| `FIFO_DEPTH` | 2 / 8 | switch / link | buffers |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example, the end-to-end run at full size (a few seconds):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mmc_pkg.sv tb/tb_mmc3d_top.sv --top-module tb_mmc3d_top -Wno-fatal
./obj_dir/Vtb_mmc3d_top
```

Swap the testbench name for any other `tb/tb_*.sv`. Testbenches read files by
paths relative to the repository root, so run them from there.

In a 2-state simulator, an asynchronous reset only acts on its falling edge.
The testbenches therefore start with reset high and pull it low after 1 ns.
Do the same in your own benches.

What the testbenches check, beyond data against reference models:

- the one-cycle RAM latency;
- the serializer's 5 cycles per flit;
- that the stop wire throttles the sender and no FIFO overflows;
- that the switch keeps packets whole and in order and shifts routes;
- LayerIDs 0 and 1, and 0 to 3 in a four-die stack (`tb_stack4`). In that
  stack, all 16 cores write and read every die's memory at once, across up
  to three vertical hops, and share one semaphore-guarded counter;
- that the PLL reference follows the pad clock on the top die;
- an exact shared counter after 80 semaphore-protected increments from all
  eight cores on both dies;
- that switch stalls, requests in both vertical directions, TSV stops and
  semaphore contention each happen.
- the results of the four benchmark kernels on 1, 4 and 8 cores
  (`tb_kernels`), and the timing of the scheduling workload against its
  per-phase model (`tb_tlrp`).

## What is not here

- **Processor cores.** The original uses LEON3 SPARC cores with instruction
  caches. Each PE's core bus is a port of the top (`core_req_i`/`core_rsp_o`),
  driven in simulation by task-based core models.
- **PLLs.** They are analog. The top has `pll_ref_o`/`pll_clk_i` ports, and
  `tb/pll_model.sv` is a delay model.
- **Debug and peripheral IP.** The AHB JTAG debug masters, APB bridges,
  timers, interrupt controllers and UART are standard library IP. Not
  included. The debug masters' bus ports are there and are arbitrated. The
  testbenches drive them with task-based models.
- **Resource-pooling schedules.** They are software (how accesses are
  assigned to memories), not hardware.

## Where this RTL makes its own choices

The original describes the blocks and how they connect but leaves these
details open. They are choices of this RTL:

- the on-chip bus, which is not AHB;
- the address map and the packet and head formats;
- posted writes;
- one switch with seven ports and two-flit buffers, round-robin wormhole
  arbitration;
- 8 TSV lanes with valid/sof framing and the stop wire. This gives the stated
  3.2 Gbit/s at 400 MHz, with the serdes running at the die clock rather
  than a faster one;
- FIFO depths, memory sizes and the semaphore count;
- the test-and-set semaphore rule;
- the reset scheme;
- one wire for each clock and LayerID TSV. The original uses three redundant
  TSVs in parallel for each of these signals.

**Stack limit.** The 2-bit LayerID limits the stack to four dies. An
eight-die stack would need a wider ID (`ID_W`) and a longer route field.

**Clock sent down.** The PLL output, not the raw pad clock, is what passes to
the next die.
