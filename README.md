# Thermal-aware MPSoC emulation platform

Checking how a multiprocessor system-on-chip heats up takes billions of cycles of real
software on it. Cycle-accurate software simulation is far too slow for that. This design puts
the MPSoC on an FPGA instead, and pairs it with a thermal model that runs on a host PC. The
FPGA platform runs the cores and collects activity statistics in hardware. The host turns
those statistics into temperatures and sends the temperatures back. A thermal policy on the
FPGA then reacts to them by changing the cores' clock frequency.

Two ideas make the FPGA numbers trustworthy and the loop closed.

* **Virtual clocks.** Each emulated core runs on its own *virtual clock*, derived from the
  FPGA clock. The emulator stops a core's clock whenever the FPGA cannot behave like the
  target chip, and the core never notices. Examples are a board memory that is slower than
  the memory being modelled, or an Ethernet link that cannot keep up. Time as the core sees
  it is always target time.
* **Hardware sniffers and a statistics path.** Small monitors count or log events during a
  sampling period. The default period is 10 ms of target time. At the end of each period the
  results are written into a buffer, which is sent to the host as one Ethernet packet. The
  reply packet carries temperatures, which land in register-based *virtual sensors*. A
  two-state policy reads the sensors and switches the cores between 500 MHz and 100 MHz.

The processor cores are not part of this RTL. In the real platform they are vendor soft or
hard cores. Each core connects to its subsystem through a simple request/acknowledge port,
and it must obey a clock-enable output. The testbenches use a behavioural core model.

## Block overview

```
                    +-------------------- mpsoc_emu_top --------------------+
 core 0 <-cpu_*---->| subsystem 0: mem_ctrl, I-cache, D-cache, 2 BRAMs      |
 ...                | ...                     |                             |
 core N-1 <-------->| subsystem N-1           |                             |
                    |        shared_bus (round robin) -> ext_mem_bridge ----|--> sram_* (1 MB)
                    |                                 \-> hw_sem (0x2F..)    |
                    | vpcm (virtual clocks) <- suppress / eth stall / DFS    |
                    |                                                        |
                    | stats_bus:  sniffer_count x N, sniffer_energy x N,     |
                    |             sniffer_toggle, sniffer_event,             |
                    |             eth_dispatcher (tx, rx),                   |
                    |             host port  ->  eth_buffer, temp_sensors    |
                    | dtm_fsm <- temp_sensors                                |
                    | eth_dispatcher ----------------------------------------|--> eth_tx_* / eth_rx_*
                    +--------------------------------------------------------+
```

| File | Role |
|---|---|
| `mpsoc_pkg.sv` | shared types (request/response structs), address map, event numbering |
| `subsystem.sv` | one processing subsystem without its core |
| `mem_ctrl.sv` | address decode, latency enforcement, clock suppression |
| `dm_cache.sv` | direct-mapped write-through L1 cache (used as I- and D-cache) |
| `bram_mem.sv` | on-chip private memory |
| `shared_bus.sv` | 32-bit shared bus with priority or round-robin arbitration |
| `ext_mem_bridge.sv` | shared bus to asynchronous SRAM |
| `hw_sem.sv` | hardware semaphores on the shared interconnect |
| `vpcm.sv` | virtual platform clock manager |
| `sniffer_count.sv`, `sniffer_energy.sv`, `sniffer_toggle.sv`, `sniffer_event.sv` | hardware sniffers |
| `stats_bus.sv` | dedicated statistics bus |
| `eth_buffer.sv` | block-RAM statistics buffer |
| `eth_dispatcher.sv` | sampling periods, packet send/receive, saturation stall |
| `temp_sensors.sv` | virtual temperature sensors with threshold flags |
| `dtm_fsm.sv` | dual-state frequency policy |
| `mpsoc_emu_top.sv` | the whole platform |

## Memory controller: making the FPGA's memories look like the target's

This is the least obvious part of the design. Each subsystem's `mem_ctrl` lets the user
choose the latency of each memory kind, counted in cycles of the core's virtual clock:

| Parameter | Default | Used for |
|---|---|---|
| `LAT_PRIV` | 2 | non-cacheable private memory (address `0x0xxx_xxxx`) |
| `LAT_HIT` | 1 | cacheable private memory, cache hit (`0x1xxx_xxxx`) |
| `LAT_MISS` | 8 | cacheable private memory, cache miss |
| `LAT_SHARED` | 10 | shared memory over the bus (`0x2xxx_xxxx`) |

A fetch in the cacheable range goes to the I-cache, and a load or store goes to the D-cache.
Any other address answers at once with 0.

The controller itself runs on the physical clock. When it takes a request it starts a counter
of *virtual* clock edges of its core. Two cases can then happen:

* **The physical memory is faster than the configured latency.** The controller keeps the
  data and presents `ack` only when the counter reaches the latency. The core sees exactly
  `LAT` edges.
* **The physical memory is slower.** The configured latency runs out while the real access
  is still going on. The controller then raises `suppress_o`, and the clock manager stops
  that core's virtual clock. Physical cycles keep passing, but no virtual edge happens, so
  the core is frozen with its state intact. When the data arrives, suppression drops, and
  the data is delivered on the next virtual edge. That edge is exactly the configured number
  of virtual cycles after the request.

The controller also suppresses the one cycle in which it decodes a new request. This way
even a one-cycle latency is met whatever the decode costs.

A cached access starts with `LAT_HIT`. If the cache reports a miss, the target switches to
`LAT_MISS`. An access to shared memory costs `LAT_SHARED` virtual cycles however long
arbitration and the SRAM take. Contention on the bus therefore shows up as extra
*suppressed* physical cycles, not as extra emulated cycles. If you want contention to cost
target time, you model it in `LAT_SHARED`.

The core handshake works as follows:

* The core holds `cpu_req_i` until it samples `ack` on an edge where its clock enable is high.
* `ack` stays high until such an edge.
* The controller handles one access at a time.
* The four downstream ports use a common handshake. The requester holds `req` until a
  one-cycle `ack`, and drops it in the following cycle.

## Subsystem, caches and memories

`subsystem` connects one controller to its memories:

* A non-cacheable private BRAM (`PRIV_BYTES`, default 32 KB).
* A cacheable private BRAM (`CPRV_BYTES`, 32 KB) behind an I-cache and a D-cache (8 KB each).
* The shared-memory port toward the bus.

Both caches are direct-mapped and write-through, with 32-byte lines. A write miss does not
allocate a line. A refill fetches one word per memory access. The two caches share the
cacheable BRAM through a two-master fixed-priority arbiter, with the D-cache first. That
arbiter is an instance of `shared_bus`.

The subsystem also produces ten event lines for its sniffer, one per virtual edge or per
access, in this order:

1. active
2. stalled on memory
3. idle (reported by the core on `cpu_idle_i`)
4. private access
5. I-cache hit
6. I-cache miss
7. D-cache hit
8. D-cache miss
9. shared access
10. suppressed cycle

## Shared bus and external memory

`shared_bus` is a 32-bit single-transfer bus, loosely modelled on a simple on-chip
high-performance bus:

* Arbitration is round-robin (`ROUND_ROBIN=1`) or fixed priority with master 0 first.
* The arbitration latency is `ARB_LAT` cycles, default 1.
* It shows its grant vector and its address/data lines, for the sniffers.

`ext_mem_bridge` turns bus transfers into accesses to an asynchronous SRAM:

* 2^`SRAM_AW` words; the default of 18 gives 1 MB.
* Pins: `sram_ce_n`, `sram_we_n`, `sram_oe_n`, a word address, and separate data-in and
  data-out buses.
* Each access holds the pins for `SRAM_WAIT` cycles.

Shared addresses `0x2Fxx_xxxx` do not go to the SRAM. They go to `hw_sem`, a bank of
`NSEM` (32) hardware semaphores that the cores use to synchronise. Each semaphore occupies
one word:

* A read returns the semaphore's value, 0 for free and 1 for taken, and sets it to 1 in the
  same access. A core takes a lock by reading until it gets 0.
* A write stores bit 0 of the data. Writing 0 releases the lock.
* The bank answers one cycle after a request.
* From the core's side, a semaphore access costs `LAT_SHARED`, like any other shared access.

## Virtual clock manager

`vpcm` outputs one clock enable per subsystem (`cpu_ce_o`). In a given physical cycle,
enable *i* is high when all of these hold:

* emulated time is running, meaning the Ethernet link is not saturated;
* the DFS divider lets the cycle through;
* subsystem *i* is not suppressing.

While the low frequency is selected, only one emulated cycle in `DFS_DIV` (default 5, i.e.
500 to 100 MHz) produces an edge. Memories, controllers and the bus stay on the physical
clock. Clock enables are used instead of real gated clocks, so the whole design is a single
clock domain.

## Statistics path

### Sniffers

* **Count sniffer** (one per subsystem): counts each of the ten event lines over the period.
* **Energy sniffer** (one per subsystem): turns the same ten event lines into the energy of
  four cells: the core, the I-cache, the D-cache and the private memory. Each component is
  charged its worst-case (maximum) power for every cycle in which it is used. That power is
  converted to energy per target cycle, and 90% of it is charged per use. The other 10% is
  leakage, charged on every emulated cycle. A cache miss also charges the memory for a whole
  line refill. The defaults come from an ARM11-class core at 500 MHz:

  | Cell | Maximum power | Energy per cycle | Dynamic per use | Leakage per cycle |
  |---|---|---|---|---|
  | core | 1.5 W | 3000 pJ | 2700 pJ | 300 pJ |
  | 8 KB cache | 710 mW | 1420 pJ | 1278 pJ | 142 pJ |
  | 32 KB memory | 275 mW | 550 pJ | 495 pJ | 55 pJ |

  The energy per cycle is the same at 100 MHz. The results are reported in units of 1024 pJ.
* **Transition sniffer** (shared bus): counts every bit flip of the bus address, write-data
  and read-data lines. This is the switching-activity input for interconnect power.
* **Event sniffer** (shared bus): logs every cycle in which a bus grant is given, as a
  record {24-bit cycle offset in the period, 8-bit grant mask}. Records pass through an
  8-entry FIFO. Records that do not fit in the window are counted as dropped.

When the dispatcher pulses `sample`, each sniffer copies its counters, clears them, and
writes the copy over the statistics bus. Counting continues without a gap.

### Statistics bus

`stats_bus` has 2·NSUB+5 masters (13 at the defaults):

* one count sniffer per subsystem;
* one energy sniffer per subsystem;
* the transition sniffer;
* the event sniffer;
* the dispatcher's read port;
* the dispatcher's write port;
* an external `host_*` port for a statistics-side processor.

Arbitration is round-robin with one access per cycle. The grant is combinational, and read
data arrives one cycle after the grant. Word address bit 11 selects the slave:

* bit 11 = 0: the 512-word buffer;
* bit 11 = 1: the sensor bank. Sensors are at 0..NS-1 and the two thresholds at NS and NS+1.

### Buffer layout (32-bit words, NSUB = 4)

| Words | Content |
|---|---|
| 16*i .. 16*i+9 | counters of subsystem i, in the event order above |
| 16*i+10 .. 16*i+13 | energies of subsystem i: core, I-cache, D-cache, memory (units of 1024 pJ) |
| 64 | transition count of the shared bus |
| 80 | event log header {dropped[15:0], logged[15:0]} |
| 81 .. 127 | event records |

### Packets

When all sniffers report done, `eth_dispatcher` streams one packet on `eth_tx_*`, as a byte
stream with valid/ready/last. The fields are:

| Field | Bytes |
|---|---|
| destination MAC `02:00:00:00:00:02` | 6 |
| source MAC `02:00:00:00:00:01` | 6 |
| EtherType `0x88B5` | 2 |
| period sequence number | 4 |
| buffer words 0..16*NSUB+63, big-endian | 4 each |

Received packets with the same EtherType carry, after their 14-byte header, one 16-bit
temperature per sensor, most significant byte first. The unit is 1/16 K. The values pass
through an 8-entry queue into the sensor registers. Values that find the queue full are
counted in `rx_drop_o`.

### Saturation stall

A period can end while the previous packet is still leaving. The dispatcher then raises a
stall, and the clock manager stops every virtual clock. Emulated time is frozen until the
link has drained. Only then is the sample taken. `stall_cycles_o` counts the cycles lost this
way.

## Thermal policy (DFS)

`temp_sensors` flags each sensor as hot (above `T_HIGH`, 350 K) or cool (below `T_LOW`,
340 K). Both thresholds are writable over the statistics bus. `dtm_fsm` has two states:

* It goes to SLOW when any sensor is hot.
* It returns to FAST only when all sensors are cool.

The 10 K band between the thresholds prevents oscillation. `dfs_enable_i` turns the policy
on. `dfs_switch_o` pulses on every change.

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `NSUB` | 4 | subsystems (1..8) |
| `CACHE_BYTES`, `LINE_BYTES` | 8192, 32 | each L1 cache |
| `PRIV_BYTES`, `CPRV_BYTES` | 32768 | private memories |
| `LAT_PRIV`, `LAT_HIT`, `LAT_MISS`, `LAT_SHARED` | 2, 1, 8, 10 | emulated latencies |
| `ROUND_ROBIN`, `ARB_LAT` | 1, 1 | shared-bus arbitration |
| `SRAM_AW`, `SRAM_WAIT` | 18, 2 | external SRAM |
| `NSEM` | 32 | hardware semaphores |
| `NS` | 8 | virtual sensors |
| `DFS_DIV` | 5 | fast/slow frequency ratio |
| `SAMPLE_CYCLES` | 5,000,000 | period in emulated cycles (10 ms at 500 MHz) |
| `BUF_WORDS` | 512 | buffer depth |

## Where this design departs from the framework it implements

* The original platform connects the cores through a generated network-on-chip. Its main
  thermal case study uses one. It can also use vendor buses. This RTL uses its own shared
  bus instead, so NoC switches, NoC power and NoC contention are not modelled.
* The processor cores, the Ethernet MAC/PHY, the off-chip memory chips and the host thermal
  model are not included. Ports are provided where they connect.
* Only one timing class is put on virtual clocks: the cores. Memories, controllers and the
  bus run on the physical clock, and their cost is expressed through the controller latencies.
* Shared memory is always reached uncached. The optional DDR controller is not built.
* Energy is computed per component (core, each cache, private memory). The host must map
  components onto its thermal grid cells. The shared bus and shared memory get no energy
  sniffer; their activity is available as transition counts and access counts.
* The following are this design's own choices: packet formats, buffer layout, address map,
  temperature encoding, the number of sensors, the cache line size, and every latency except
  the 10-cycle shared memory.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`.
Example with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    -y rtl -y tb rtl/mpsoc_pkg.sv tb/tb_mpsoc_emu_top.sv --top-module tb_mpsoc_emu_top
./obj_dir/Vtb_mpsoc_emu_top
```

* There is one `tb_<module>` per RTL module.
* `tb_mpsoc_emu_top` runs four behavioural cores on the full platform, with a short sampling
  period (4,000 cycles). It checks each mechanism at least once:
  * latency suppression
  * saturation stalls
  * both DFS switches
  * bus contention
  * the event log
  * bus transitions
  * packet contents, including cell energies checked against the counters
  * temperature download
* `tb_workload_dither` also runs at the defaults. Four cores dither two 128x128 grey images
  held in the shared SRAM, one quarter each, with Floyd-Steinberg error diffusion. The error
  rows are kept in cacheable private memory. The testbench checks every output pixel against
  its own reference, and checks the access counts reported in the statistics packets. It
  takes about 1.2 million cycles.
* `tb_workload_matrix_tm` runs the thermal case study at the defaults, with the testbench
  playing the host thermal model. Four cores form a pipeline of 4x4 matrix multiplications
  and hand matrices on through shared memory, guarded by the semaphores. The run covers
  three sampling periods:
  1. After the first packet, the testbench reports one sensor at 360 K, and the policy must
     drop to 100 MHz.
  2. After the second packet it reports every sensor below 340 K, and the policy must return
     to full speed.
  3. Then the input stream is stopped and the pipeline drains.

  The testbench checks every product. It also checks that throughput, active cycles and core
  energy are lower in the slow period. Throughput falls by less than the 5× clock ratio,
  because suppressed cycles cost the same physical time at either speed. The run takes about
  15 million cycles, about a minute in Verilator.
* `tb_workload_matrix` runs the matrix kernel on two platforms side by side, one built with
  a single subsystem and one with eight, each with one core per subsystem. Only the
  sampling period is shortened, to 20,000 cycles. It checks every product, plus each core's
  access count summed over the packets. The shared platform it uses is `tb_matrix_system`.
* `tb_mpsoc_full` uses every default, including the 5,000,000-cycle period. It runs until the
  first statistics packet and checks that packet's contents, including core energy.
