# ControlPULP-style power controller platform in SystemVerilog

A many-core server processor needs a small, dedicated controller that keeps
its power under a budget. Every few hundred microseconds the controller reads
the power, voltage and temperature (PVT) sensors of every core. It answers
requests from the operating system and the board controller, computes new
per-core frequencies and writes them back. This repository holds the
on-chip infrastructure of such a controller, a RISC-V power controller with
a parallel accelerator for the control law:

* a **SoC domain** built around a manager core: 512 KiB of L2 memory with two
  banks reserved for that core, a platform-level interrupt controller (PLIC)
  that turns up to 144 mailbox doorbells into one interrupt, a timer, and
  two 64-bit AXI4 ports to the outside world;
* a **cluster domain** that runs the control law in parallel on eight worker
  cores. It has a 16-bank, 128 KiB L1 scratchpad reached in a single cycle,
  a DMA engine that gathers the sensor registers of all controlled cores
  with one 2-D (strided) transfer, an event unit with a hardware barrier, and
  a timer.

The two domains have their own clocks, `clk_i` for the SoC and `clk_cl_i` for
the cluster. The two AXI links between them, one in each direction, pass
through an asynchronous clock-domain crossing (`axi_cdc`).

The RISC-V cores themselves are standard open-source cores and are not part
of this RTL. The top module brings their memory ports out, so a core model or
a real core can be attached, and the testbenches drive those ports with
behavioural bus masters.

```
                 manager core (outside)                 worker cores 0..7 (outside)
                 instr         data                      data ports
                   |             |                           |
                 demux   demux: L2 | PLIC | timer | AXI   demux: L1 | event unit | periph | AXI
                   |        |      |      |      |          |        |           |         |
 AXI slave --> AXI->TCDM    |      |      |   TCDM->AXI     |        |      timer, DMA cfg |
 (firmware load)   |        |      |      |      |          |        |                  arbiter
                   v        v      |      |  AXI demux      |        |                     |
              +------------------+ |      |   /      \      v        v                 TCDM->AXI
              | L2: 2 private +  | |      |  cluster  ext  +---------------+             |
              | 4 shared banks   | |      |    |       |   | L1 crossbar + |<-- DMA --+  |
              +------------------+ |      |  AXI->TCDM |   | 16 banks      |          |  |
                   ^               |      |   -> L1    |   +---------------+          v  v
                   |                                   |                         AXI mux (cluster)
                   +--------- AXI->TCDM <-- L2 ------ AXI demux <-------------------+
                                                 ext --+
                                                       v
                                         AXI mux (SoC + cluster) --> AXI master port
                                                               (sensors, mailboxes)
```

The link from the SoC demux into the cluster and the link from the cluster
mux to its demux each pass through an `axi_cdc` (not drawn).

## Memory map

All addresses are as seen by the manager core. The worker cores see the same
map.

| Region | Base | Size | Reached from |
|---|---|---|---|
| PLIC | `0x0C00_0000` | 4 MiB | manager data port |
| Cluster L1 | `0x1000_0000` | 128 KiB | workers directly; manager over AXI |
| Cluster timer | `0x1020_0400` | 1 KiB | workers |
| Event unit | `0x1020_0800` | 1 KiB | workers (each core has its own port) |
| Cluster DMA | `0x1020_1800` | 1 KiB | workers |
| SoC timer | `0x1A10_B000` | 4 KiB | manager data port |
| L2 private banks | `0x1C00_0000` | 64 KiB | manager instruction and data ports only |
| L2 shared banks | `0x1C01_0000` | 448 KiB | manager, AXI slave port, cluster (DMA and workers) |
| anything else | | | AXI master port |

An access that no target claims is granted at once and reads `0xBADACCE5`.
That includes a cluster or AXI-slave access to the private L2 banks, which
also writes nothing.

## The local bus (TCDM protocol)

Cores, memories and register files talk over a simple word bus (`cpulp_pkg`):

* `tcdm_req_t {req, addr, we, be[3:0], wdata}` and `tcdm_rsp_t {gnt, rvalid, rdata}`.
* A master holds `req` and the other fields until it sees `gnt` in the same
  cycle.
* `rvalid` (with `rdata` for reads) comes exactly one cycle after the grant,
  for reads and writes alike.
* A slave stalls a master only by withholding `gnt`.

The event unit uses this to put a core to sleep: the wait and barrier reads
are simply not granted until the event arrives.

Three building blocks make every local interconnect:

* `tcdm_demux` sends a master's request to one of N regions by address. The
  target sees the offset from its region base.
* `tcdm_xbar` is an N-master, M-slave crossbar. The slave is picked by the
  word address bits above `SEL_LSB`, and each slave has its own round-robin
  arbiter. Its pointer moves past the winner, so a master waits at most N-1
  cycles for a bank. With M = 1 it is a plain arbiter.
* `tcdm_sram` is one bank: a word array with byte enables, always granted,
  with a registered read.

The **L1** (`l1_tcdm`) is a crossbar over 16 banks of 2048 words. Word
*i* lives in bank *i* mod 16, so the cores that walk consecutive words spread
over all banks. Without a conflict an access takes one cycle. When several
masters hit the same bank in the same cycle, they are served one per cycle in
round-robin order. The L1 has 10 masters: the 8 workers, the DMA and the AXI
path from the SoC.

The **L2** (`l2_memory`) has six banks, which keep the manager's own traffic
predictable:

* **Two private banks** of 32 KiB each, contiguous. Only the manager
  core's instruction and data ports reach them, so firmware fetches never
  collide with DMA or AXI traffic.
* **Four shared banks** of 112 KiB each, word-interleaved. They serve the
  manager, the AXI slave port and the cluster.

## AXI side

All AXI4 links use 32-bit addresses, 64-bit data and 6-bit IDs. The AXI
structures are `axi_req_t` and `axi_rsp_t`, which carry all five channels
in one bundle.

* `axi_to_tcdm` is an AXI4 slave. It works on one burst at a time and turns
  INCR and FIXED bursts into word accesses. A full 64-bit beat becomes two
  word accesses, and a narrow beat becomes one, in the lane given by
  address bit 2. Only the halves that have write strobes are written.
  Responses are always OKAY.
* `tcdm_to_axi` turns one word access of a core into a single-beat AXI
  transaction of size 4 bytes. The grant is held back until the AXI
  response is in, so the core stalls for the round trip.
* `axi_demux` routes AW and AR by address. While transactions of one
  direction are outstanding to one target, a new one to a different target
  waits. This keeps responses in order without a reorder buffer. W beats
  follow the AW order.
* `axi_mux` merges several sources:
  * AW and AR are arbitrated round robin. A source that is shown to the
    output keeps the output until its handshake.
  * W beats are taken in AW order.
  * The mux writes the source index into the AXI ID at bit `TAG_LSB`, and
    B and R are steered back by those bits.
  * Two muxes in a row use different tag positions: the cluster mux uses
    bit 4 and the SoC/cluster mux uses bit 5. Sources must therefore leave
    the ID bits from 4 up at zero; an assertion checks this.

* `axi_cdc` carries an AXI4 link from one clock to another. Each of the
  five channels has its own small asynchronous FIFO (`cdc_fifo`, depth 4).
  The FIFO pointers cross in Gray code through two-flop synchronisers. A
  beat needs two to three cycles of the receiving clock to cross. The order
  of each channel is kept, and several transactions can be in flight.
  One crossing sits on the SoC-to-cluster link into the L1, and one on the
  cluster's outgoing link before its demux to L2 and the master port.

The platform wires these into the paths shown in the diagram:

* The **SoC path**: the manager core → `tcdm_to_axi` → demux, which goes
  either into the cluster L1 or out to the AXI master port.
* The **cluster path**: the DMA and the worker-core bridge → mux → demux,
  which goes either to the shared L2 or out to the AXI master port.
* The **outgoing mux** merges the SoC and cluster paths onto the AXI master
  port.

## Cluster DMA (`cluster_dma`)

The DMA exists so that the sensors of all controlled cores can be read in one
request. A transfer is REPS rows of LEN bytes:

* On the AXI side, row *r* starts at `EXT + r*STRIDE`.
* On the L1 side, the rows are packed one after another from `L1`.

With a 0x190 stride and 72 rows, one command reads a 12-byte sensor block
from each of 72 processing elements.

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | EXT | AXI-side start address |
| 0x04 | L1 | L1 start address (cluster address, `0x1000_0000` based) |
| 0x08 | LEN | bytes per row, multiple of 4 |
| 0x0C | STRIDE | bytes between row starts on the AXI side |
| 0x10 | REPS | number of rows (0 counts as 1, reset value 1) |
| 0x14 | CMD | write: bit 0 = direction (0 AXI→L1, 1 L1→AXI), queues the transfer |
| 0x18 | STATUS | `{completed[15:0], queued[15:0]}` |

Programming a transfer writes the first five registers and then CMD.

* **Command queue:** CMD takes a snapshot of the registers into a 4-entry
  queue. A CMD write stalls (no grant) while the queue is full. Transfers
  run in order.
* **Done signal:** `done_o` pulses when a transfer ends, and this pulse is
  event 8 in the event unit.

Inside, two walkers run over the same sequence of addresses:

* The **address walker** issues INCR bursts of 4-byte beats, at most 256 beats
  each, never crossing a 4 KiB boundary. It keeps issuing as long as fewer
  than `MAX_OUTSTANDING` (128) bursts are in flight. With a far-away sensor
  network this hides the latency: 128 bursts are in the air before the first
  answer returns.
* The **data walker** follows word by word:
  * For reads, each R beat is written into L1 in the cycle it is accepted.
    The L1 grant doubles as `r_ready`, so a bank conflict simply stalls the
    R channel.
  * For writes, each word is read from L1 and then sent as a W beat. A small
    queue of burst lengths places WLAST.

## Event unit and hardware barrier (`event_unit`)

Each worker has its own register port at `0x1020_0800`.

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | EVT_MASK | events that may wake this core |
| 0x04 | EVT_BUFFER | pending events; write 1 to clear |
| 0x08 | EVT_WAIT | read: sleep until `buffer & mask != 0`, return and clear those bits |
| 0x0C | BARRIER_MASK | cores that take part in the barrier (shared) |
| 0x10 | BARRIER | read: arrive and sleep until all cores in the mask have arrived |
| 0x14 | SW_EVENT | write a core mask: sets event bit 0 in those cores |

* **Event bits:** bit 0 is the software event, bit 8 is DMA done and bit 9 is
  the cluster timer.
* **Sleeping:** a sleeping core's read is simply not granted, and
  `core_sleep_o` shows it so that the core's clock can be gated.
* **Barrier release:** all cores of the barrier are granted in the same
  cycle the last one arrives, and the barrier re-arms at once.
* **Use in the control law:** the parallel code meets at this barrier before
  core 0 computes each reduction (for example the total power).

## PLIC (`plic`)

This is a RISC-V platform-level interrupt controller with 144 sources and a
single target, the manager core. Source ID *j* is input line *j−1*; ID 0
means "none".

| Offset | Register |
|---|---|
| `0x000000 + 4*id` | priority (3 bits) |
| `0x001000` | pending bits (read) |
| `0x001080` | gateway mode per source: 1 = edge, 0 = level |
| `0x002000 + 4*k` | enable bits of IDs 32k..32k+31 |
| `0x200000` | threshold |
| `0x200004` | read: claim (returns the ID, clears pending); write ID: complete |

* **Gateway:** a gateway lets one request per source through until the
  handler completes it.
* **Selection:** among the pending, enabled sources above the threshold, the
  highest priority wins and the lowest ID breaks ties.
* **Timing:** the choice is registered, so `irq_o` and `irq_id_o` follow an
  input edge after two clock cycles. Two cycles is the controller's share of
  the 46-cycle path from a doorbell to the first instruction of the handler.

## Timers (`timer_unit`)

The SoC and cluster timers are the same block: a 32-bit counter with an 8-bit
prescaler.

* `0x00 CFG`:
  * bit 0: enable
  * bit 1: interrupt enable
  * bit 2: continuous (restart at zero after a match)
  * bit 3: reset the counter (self-clearing)
  * bits 15:8: prescaler
* `0x04 CNT`: the counter.
* `0x08 CMP`: the compare value.

On a match, `irq_o` is high for one cycle.

## What is not here

* **The RISC-V cores** (manager core and workers, with their FPUs, core-local
  interrupt controller and debug module). Their ports are top-level ports.
* **The workers' private instruction caches.** A worker's instruction fetches
  are expected to reach the L2 on their own.
* **The slow peripheral subsystem:** the I/O DMA, QSPI, I2C, PMBus and AVSBus
  controllers, the APB bus and their bridges to AXI.
* **The processor side:** the mailboxes, the network and the sensor
  registers. The testbenches model them with a latency-programmable AXI
  memory (`tb/axi_delay_mem.sv`).

The published block diagram labels the L1 as 16 KiB, while the description
and the area figures give 128 KiB. This design uses 128 KiB.

The following are choices of this design:

* the address map and all register maps;
* the bus protocols inside the platform;
* the bank sizes inside the L2;
* the DMA command queue;
* the event numbering;
* the structure and depth of the clock-domain crossings, and one reset
  shared by both clocks.

Known limits:

* The AXI bridges handle one transaction at a time.
* `axi_to_tcdm` treats WRAP bursts as INCR.
* `axi_demux` serialises traffic that changes target.

When `axi_mux` or `cluster_dma` is linted on its own, Verilator may report a
combinational loop through the AXI ready signals and the DMA's `r_ready`. Each AXI bundle is one packed struct,
so readies that depend on other channels' valids look circular. No signal
actually depends on itself, and synthesis finds no loop.

## Size

Synthesised with Yosys at the default parameters, the platform without the
cores has:

* about 11,100 generic cells;
* 6,900 flip-flops, about 2,300 of them in the FIFOs of the two
  clock-domain crossings;
* 5.24 Mbit of memory arrays (4 Mbit of L2 and 1 Mbit of L1).

The PLIC is the largest piece of logic.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Simulate with Verilator 5,
for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/cpulp_pkg.sv tb/tb_controlpulp.sv --top-module tb_controlpulp
./obj_dir/Vtb_controlpulp
```

`tb_controlpulp` runs the whole platform at its default size through one
control step. The SoC clock has a 10 ns period and the cluster clock 12 ns,
so every transfer between the domains crosses between unrelated clocks. The
step:

* firmware is loaded over the AXI slave port and fetched back;
* a doorbell interrupt is raised, claimed and completed;
* the manager writes into the L1;
* the DMA gathers 72 rows of sensor registers while the workers sleep;
* the workers read the gathered data in parallel, meet three times at the
  barrier, write results to L2, and wake each other by software event and
  by the cluster timer.

It counts each mechanism and fails if one never happened:

* the firmware load;
* refusals of private-L2 accesses;
* PLIC interrupts;
* SoC-timer interrupts;
* manager writes into L1;
* DMA completions;
* wake-ups and sleep cycles;
* L1 bank conflicts;
* barrier releases;
* core writes to L2;
* contention at both AXI muxes;
* cluster-timer events;
* software events.

It also checks:

* the PLIC's two-cycle latency;
* single-cycle L1 access without conflicts;
* that all cores leave the barrier in the same cycle.

The block testbenches cover:

| Testbench | Checks |
|---|---|
| `tb_tcdm_sram` | byte enables, read latency |
| `tb_tcdm_xbar` | random traffic against a reference memory, round-robin fairness (bounded wait) |
| `tb_tcdm_demux` | routing, offset removal, error answer |
| `tb_l1_tcdm`, `tb_l2_memory` | random multi-master traffic, interleaving, the private-bank rule |
| `tb_plic` | priorities, threshold, ties, claim/complete, level and edge gateways, 2-cycle latency |
| `tb_timer_unit` | match timing, prescaler, continuous mode |
| `tb_event_unit` | barrier with random arrival order, wait-for-event, masking |
| `tb_cluster_dma` | 2-D gather with 0x190 stride, a 1000-word read across 4 KiB boundaries, scatters to AXI, queued random transfers, the 128-burst limit under a 300-cycle latency |
| `tb_axi_mux`, `tb_axi_demux` | ID tagging, W ordering, target switching under random traffic |
| `tb_axi_to_tcdm`, `tb_tcdm_to_axi` | full, narrow and FIXED bursts with random strobes against a byte-level model |
| `tb_axi_cdc` | random write and read bursts from a 10 ns clock into a memory on a 14 ns clock: data, IDs, burst counts, crossing time |

Simulation here is two-state. Every register that is read is reset, and the
testbenches initialise the memories they read.
