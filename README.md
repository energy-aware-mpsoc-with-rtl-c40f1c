# Space-sharing MPSoC with individually clocked processor-memory modules

Real-time systems usually time-share one fast processor among their tasks.
They then need a schedule that provably meets every deadline, and the
processor runs fast all the time because the worst case needs it. This
design goes the other way. **Every task gets a processor-memory module (PMM)
of its own** (space-sharing), so no schedule is needed. **Every PMM also has
its own clock**, and the task's software sets its rate. A task runs only as
fast as its current phase needs: slowly while it waits for an event, and
quickly while a calculation must meet its deadline. Dynamic power scales
with clock rate, so the chip uses close to the least energy the application
allows.

The PMMs exchange messages over a **non-blocking Benes network** of 2x2
switches working in circuit-switching mode. A circuit, once set up, belongs
to its sender and receiver(s) alone, so no other task's traffic can delay a
message. The network runs on a clock of its own, asynchronous to the PMMs,
with dual-clock message FIFOs at its edges. An **on-chip shared memory** with
a round-robin arbiter holds data that several tasks use.

This RTL covers everything except the processors. Each PMM's instruction
bus and data bus are top-level ports, so a soft-core CPU (for example a
32-bit MicroBlaze-class core) or a testbench connects there.

```
                 osc_clk
                    |
            +---------------+   gen_clk (200 MHz)
            |clock generator|-------------------------------+
            +---------------+                               |
                    | gen_clk                               |
   +----------+----------+----- ... ----+------------+      |
   | divider0 | divider1 |              | divider7   | net divider
   +----------+----------+              +------------+      |
    pmm_clk[0] pmm_clk[1]                pmm_clk[7]   net_clk
        |          |                         |          |   |
   +--------+ +--------+                +--------+      |   |
   | PMM 0  | | PMM 1  |     ...        | PMM 7  |      |   |
   | I-mem  | | I-mem  |                | I-mem  |      |   |
   | D-mem  | | D-mem  |                | D-mem  |      |   |
   | rate   | | rate   |                | rate   |      |   |
   +--------+ +--------+                +--------+      |   |
     tx  rx     tx  rx                    tx  rx        |   |
   +----------------------------------------------------+   |
   |  input FIFOs -> 8x8 Benes fabric -> output FIFOs        |  real-time network
   +---------------------------------------------------------+
   +---------------------------------------------------------+
   |  shared memory (round-robin arbiter, gen_clk)           |
   +---------------------------------------------------------+
```

## Module hierarchy

| File | Module | Role |
|---|---|---|
| `rtl/mpsoc_pkg.sv` | `mpsoc_pkg` | message width, switch modes, I/O address map, Benes wiring functions |
| `rtl/mpsoc_top.sv` | `mpsoc_top` | the whole chip without the processors |
| `rtl/pmm.sv` | `pmm` | one PMM: two local memories, clock-rate register, message port |
| `rtl/local_mem.sv` | `local_mem` | two-port RAM with byte enables, 1-cycle read latency |
| `rtl/clock_rate_ctrl.sv` | `clock_rate_ctrl` | generator, one divider per PMM, one for the network |
| `rtl/clock_generator.sv` | `clock_generator` | behavioural PLL/DCM model (not synthesisable) |
| `rtl/clock_divider.sv` | `clock_divider` | phase-accumulator divider, rate set in MHz |
| `rtl/rt_network.sv` | `rt_network` | FIFOs plus Benes fabric |
| `rtl/async_fifo.sv` | `async_fifo` | dual-clock Gray-pointer FIFO, first-word fall-through |
| `rtl/benes_network.sv` | `benes_network` | N x N Benes fabric with switch-mode registers |
| `rtl/benes_switch.sv` | `benes_switch` | 2x2 switch: straight, cross, broadcast |
| `rtl/shared_mem.sv` | `shared_mem` | shared RAM with round-robin arbiter |
| `rtl/rr_arbiter.sv` | `rr_arbiter` | round-robin arbiter |
| `rtl/reset_sync.sv` | `reset_sync` | asynchronous-assert, synchronous-release reset |

Each file opens with a comment that gives its interface and timing. The
comment also separates what the architecture prescribes from the choices
made for this implementation.

## The processor-memory module

A PMM is a processor with private Harvard-style local memories, running on
its own clock `pmm_clk[i]`. All of its ports are synchronous to that clock.

* **Instruction bus:** `i_req`, byte address `i_addr`. `i_rdata` and
  `i_rvalid` follow one clock later. A processor can fetch one instruction
  per clock.
* **Data bus:** `d_req`, byte mask `d_be` (zero means read), `d_addr`,
  `d_wdata`. `d_rdata` and `d_rvalid` follow one clock later. If bit 31 of
  the address is clear, the access goes to the data memory. If it is set,
  the access goes to the I/O registers, selected by `d_addr[5:2]`:

  | sel | name | access | meaning |
  |---|---|---|---|
  | 0 | `CLK_RATE` | R/W | this PMM's clock rate in MHz (bits 7:0) |
  | 1 | `MSG_TX` | W | send one 32-bit word into the network |
  | 2 | `MSG_RX` | R | take one received word |
  | 3 | `STATUS` | R | bit 0: send FIFO full; bit 1: a received word is waiting |

  Sending and receiving block. A write to `MSG_TX` while the send FIFO is
  full, or a read of `MSG_RX` while nothing is waiting, raises `d_stall`
  in that cycle and has no effect. The processor must hold the request
  until `d_stall` falls; an assertion in `pmm` checks this. A task that
  must not block polls `STATUS` first.
* **Loader port:** `ld_*` works like the data bus and writes or reads either
  memory (`ld_sel` 0 = instruction, 1 = data). It loads programs before the
  processor starts.

The memory sizes are per-PMM parameters: `IMEM_WORDS[i]` and
`DMEM_WORDS[i]`, in 32-bit words, default 2048 (8 KB each). Word addresses
wrap at the memory size. Space-sharing lets each memory be sized for its
one task, and `tb_sensor_task` builds a chip whose PMMs all have different
sizes.

## Individual clocking

### Clock generator and dividers

The master oscillator `osc_clk` (100 MHz in the testbenches) feeds one clock
generator. The generator multiplies by `GEN_MULT` = 2 to give `gen_clk` =
`F_GEN_MHZ` = 200 MHz, and reports `locked` after 8 input cycles.
`clock_generator.sv` is a behavioural model that stands in for the FPGA's
PLL/DCM primitive. It measures the input period with `$realtime`, so it
simulates but does not synthesise. For an FPGA build, replace it with the
vendor primitive; its ports (`clk_in`, `rst`, `clk_out`, `locked`) are
those of a typical clock manager.

Every PMM, and the network, has a `clock_divider` on `gen_clk`. Its rate is
a whole number of MHz, not a division ratio. Each generator cycle, the
divider adds `2*rate` to an accumulator. When the sum reaches 200, it
subtracts 200 and toggles the output clock flip-flop. So over every
microsecond there are exactly `rate` output cycles for any rate from 1 to
100 MHz. Rates that do not divide 200 evenly have edges that fall on
generator edges, with at most 5 ns of jitter. For example, 40 MHz gives a
steady 25 ns period, and 30 MHz gives a mix of 30 ns and 35 ns periods that
averages exactly 33.3 ns. A rate of 0, or one above 100, is ignored. After
reset, every PMM and the network run at 100 MHz (`PMM_RESET_MHZ`,
`NET_RESET_MHZ`).

### Setting a rate from software

The task writes its wanted rate to `CLK_RATE`, for example
`set_clock_rate(2)` while polling and `set_clock_rate(40)` while calculating.
The PMM holds the value on `rate_mhz` and flips `rate_tgl`. The divider
passes `rate_tgl` through a two-flop synchroniser and loads the new rate 2
to 3 generator cycles later. The output clock changes frequency without
glitches: only the increment changes, and the clock still comes straight
from one flip-flop. Reading `CLK_RATE` returns the last value written.
`cur_rate[i]` reports the rate actually in force.

The network's rate is set from outside through `net_rate_mhz` and
`net_rate_tgl`, with the same handshake. The PMMs do not have to be
stopped for this, because the network meets them only through dual-clock
FIFOs.

### Choosing rates

Rates come from the number of clock cycles a phase needs and that phase's
deadline, worked out at compile time. For example:

* a polling loop with 40 cycles per 20 µs period needs 2 MHz;
* a calculation of 1200 instructions with a 30 µs deadline needs 40 MHz.

`tb_sensor_task` runs exactly this task on PMM 0. A sensor on PMM 1 sends a
data word, and the testbench checks:

* the event is seen within 20 µs;
* the 1200 fetches take 30.0 µs;
* the clock returns to 2 MHz afterwards.

## The real-time network

### Structure

`rt_network` places:

* a dual-clock `async_fifo` (depth 16) at each input, written by the PMM on
  its own clock;
* a Benes fabric on `net_clk`;
* a dual-clock FIFO at each output, read by the receiving PMM on its own
  clock.

A word leaves an input FIFO when the fabric's path reports every
destination FIFO ready. It then crosses the fabric in one `net_clk` cycle.
End to end, a message takes the two-flop synchronisation delay of each
FIFO (about two clocks of the reading domain) plus one network clock.
A FIFO has to absorb the words a sender can produce faster than the
network, or the receiver, takes them. Size `FIFO_DEPTH` from the longest
burst and the largest clock ratio you expect; outside a burst, a full FIFO
just stalls the sender. The FIFOs, not the switches, account for most of
the network's logic and power.

### Benes fabric

An N-port Benes network (N a power of two) has `2*log2(N) - 1` columns of
N/2 2x2 switches; for N = 8, that is 5 columns of 4. It is built
recursively:

1. The first column splits each block of wires between an upper and a lower
   Benes network of half the size.
2. The last column merges the two halves again.

Flattened, the wire that leaves column `s` at position `p` enters column
`s+1` at `mpsoc_pkg::benes_link(N, s, p)`:

* **Input half** (`s < log2(N)-1`): inside every block of `M = N >> s`
  wires, an unshuffle. The upper output of switch `i` goes to position `i`
  and the lower output to position `i + M/2`.
* **Output half:** the mirror image, a shuffle inside blocks of
  `M = N >> (2*log2(N) - 3 - s)`.

Any permutation of inputs to outputs can be routed with no two paths
sharing a wire. The network is therefore **rearrangeably non-blocking**:
every set of point-to-point circuits fits at the same time, and a message's
transfer time does not depend on what other tasks send.

### Circuit set-up

Each switch holds its mode in a register. The modes are:

| `cfg_mode` | name | effect |
|---|---|---|
| 0 | `SW_STRAIGHT` | in0→out0, in1→out1 |
| 1 | `SW_CROSS` | in0→out1, in1→out0 |
| 2 | `SW_BCAST0` | in0→both outputs |
| 3 | `SW_BCAST1` | in1→both outputs |

Registers are written one per `net_clk` cycle: `cfg_we`, column
`cfg_stage`, switch `cfg_idx`, mode `cfg_mode`. After reset, every switch is
straight, which connects input i to output i. A circuit stays in place until
it is rewritten. The modes for a given permutation come from the standard
looping algorithm. `tb/benes_route_pkg.sv` has a SystemVerilog version of
it (`route`), along with a reference model of the fabric (`evaluate`,
`evaluate_ready`), which a controller or a software routine can copy.
Changing the configuration while words are in flight on affected paths is
up to the user: the fabric does not drain itself.

### Multicast and flow control

The broadcast modes make a tree of paths from one input to several
outputs, for multicast or broadcast to all PMMs. Each path carries data and
`valid` forward and `ready` backward, with no registers inside the fabric.
A multicast word must never be delivered twice, or to only some of its
receivers. So in a broadcast mode the switch passes `valid` to one branch
only when the other branch is also ready, and reports ready to its source
only when both are. A word therefore reaches all of its receivers in the
same cycle, or none of them. The input that a broadcast switch leaves
unconnected sees `ready` low, so it holds its words instead of losing them.

## Shared memory

`shared_mem` holds `SHMEM_WORDS` = 4096 32-bit words (16 KB), with one
port per PMM in the `gen_clk` domain. A round-robin arbiter grants one
request per clock. A requester waits at most N-1 cycles, however busy the
others are, so access time is bounded. Protocol per port:

* hold `req` (with `be`, word `addr` and `wdata`) until `gnt` is high;
* for a read, `rvalid` and `rdata` follow one clock after `gnt`.

## Clock domains and reset

There are 1 + N + 1 clock domains: `gen_clk` (dividers, shared memory),
each `pmm_clk[i]`, and `net_clk`. They meet only in the dual-clock FIFOs
and in the toggle handshakes of the dividers. All divided clocks are
generated from the same `gen_clk`, but the design does not rely on that:
every crossing is fully asynchronous.

`rst_n` is one asynchronous active-low reset for the whole chip. Each
domain has a `reset_sync`, which asserts at once and releases two edges of
that domain's clock after `rst_n` rises. `gen_clk` runs only after the
generator locks, and the divided clocks only after the dividers leave
reset, so the domains come out of reset in order: generator, dividers,
then PMMs and network. Each FIFO side is reset by the reset of its own
domain.

In simulation, testbenches start with `rst_n` = 1 and drive it to 0 at 1
ns. This gives the asynchronous resets a real falling edge even when
simulators start 2-state variables at random values.

## What this RTL leaves out or does its own way

* **No processors.** The soft-core CPUs (32-bit, up to 100 MHz) and their
  optional coprocessors are not included; their buses are top-level ports.
  Any 32-bit core with a one-cycle-latency memory bus and a stall input can
  be attached.
* **No bridges.** The optional I/O, network-interface and external-memory
  bridges are not included.
* **No oscillator.** The master oscillator is off-chip (`osc_clk`), and the
  clock generator is a simulation model.
* **Own choices:**
  * the rate register holds whole MHz, with a phase-accumulator divider;
  * the I/O address map and blocking send/receive;
  * 32-bit message words with valid/ready flow control;
  * the network configuration port, a plain register write port in the
    network clock domain (no in-band set-up messages);
  * FIFOs at the network outputs as well as its inputs, so that the
    receiving PMM reads in its own clock domain;
  * a separate divider for the network clock;
  * shared-memory size, arbitration and ports in the generator domain;
  * default memory sizes of 8 KB + 8 KB per PMM.
* **Sizes:** the defaults are 8 PMMs and an 8-port network. Larger chips
  need `N_PMM` to be a power of two. A 34-PMM chip needs N_PMM = 64, which
  leaves 30 ports unused.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`, and each has a
watchdog.

| Testbench | What it exercises |
|---|---|
| `tb_benes_switch` | all modes, every valid/ready combination, all-or-none broadcast |
| `tb_benes_network` | random permutations of 8 ports routed by the looping algorithm, random settings with broadcast modes against the reference model |
| `tb_async_fifo` | random traffic between unrelated clocks, full and empty, ordering |
| `tb_clock_divider` | edge counts at 100, 40, 2 and 7 MHz, edge spacing, rate changes, ignored rates |
| `tb_clock_generator` | lock and output frequency |
| `tb_clock_rate_ctrl` | independent rates for all PMMs and the network |
| `tb_local_mem`, `tb_shared_mem` | byte enables, read latency, write collisions, arbitration with a bounded wait |
| `tb_pmm` | I/O map, stalls, rate handshake, loader |
| `tb_rt_network` | permutations and multicast across clock domains with back-pressure |
| `tb_mpsoc_top` | the full chip at default parameters, described below |
| `tb_sensor_task` | the 2/40 MHz sensor-polling task and per-PMM memory sizes |

`tb_mpsoc_top` runs the chip with default parameters. Eight per-PMM
agents:

* load and fetch programs;
* set rates of 2 to 100 MHz and measure them;
* exchange messages over a permutation, again with the network slowed to
  5 MHz, and over a multicast circuit;
* contend for the shared memory.

It counts each mechanism and checks that every one occurred.

With Verilator 5, from the top of the tree:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/mpsoc_pkg.sv tb/benes_route_pkg.sv \
  tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top -o sim
./obj_dir/sim
```

Use the same command with another `tb_*.sv` for the other testbenches.
`-Wno-fatal` is only needed for the delay warnings from the behavioural
clock generator. Each run takes well under a minute.

## Changing the design

* `N_PMM`: a power of two ≥ 2. The network, the switch-address widths
  (`cfg_stage`, `cfg_idx`) and the arbiter all follow from it.
* `IMEM_WORDS[i]`, `DMEM_WORDS[i]`: per-PMM memory sizes in words.
* `SHMEM_WORDS`, `FIFO_DEPTH` (a power of two).
* `GEN_MULT`, `F_GEN_MHZ`: keep `F_GEN_MHZ` = oscillator × `GEN_MULT`. The
  highest rate is `F_GEN_MHZ/2`, and the rate register is 8 bits wide.
* `PMM_RESET_MHZ`, `NET_RESET_MHZ`: clock rates after reset.
