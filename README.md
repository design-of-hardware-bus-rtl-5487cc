# HBMU: a hardware bus monitoring unit for SoC power management

A power manager can only choose clock gating, frequency or voltage levels
well if it knows how busy the on-chip bus is. The HBMU measures this in
hardware, with no software sampling. It has two independent parts:

* **Bus monitor unit (BMU).** It watches one AXI bus, either a master's or a
  slave's, picked by a distributor from the interconnect's ports, and measures the traffic on it: transactions, bytes, read and
  write latency histograms, cycles carrying data and cycles a transaction
  is open. The results are kept per address range. Software controls it and
  reads the results over APB.
* **Bus contention unit (BCU).** It watches the arbiters of an AXI
  interconnect (6 masters x 2 slaves by default). For every master and
  every slave it counts how often that device won the bus while another
  device was waiting for the same destination. If any count rises above 4,
  it asks for clock gating.

The results go to a power management unit (PMU) and a clock generation
unit (CGU). Neither is part of this RTL.

```
                 +---------------------------- bus_monitor (BMU) ---------------------------+
 bm_ports[8] -> bm_distributor -> (axi_mon_t)
 AXI bus ------> | bm_txn_detect --ev[0..2]--> bm_perf_counter x3 (S0 PC, S1 PC, S2 PC)     |
 (axi_mon_t)     |   |  bm_addr_decoder x2                  |                              |
                 |   |                                      v                              |
 ext_trig ------>| start/stop, interrupt     bm_global_counters (4 x 64 bit)               |
 APB <---------->| bm_apb_regs  <------------ results, configuration ---->                 |--> active, irq
                 +------------------------------------------------------------------------+
                 +---------------------------- bcu -----------------------------------------+
 interconnect -->| mcm: cm_channel AR, AW, W (per master)    scm: cm_channel R, B (per slave)|--> counts, conflict
 arbitration     |                 \_________ bcu_clock_gate (any count > 4) ______/        |--> cg_en, gclk
                 +------------------------------------------------------------------------+
```

`hbmu` is the top level. It places the two units side by side on one clock
and reset, and brings all of their ports out. The monitor side takes all
N_M + N_S interconnect ports (`bm_ports`, masters first, then slaves) and
reports which one it observes on `bm_port_sel`.

### Distributor

One monitor serves several ports. `bm_distributor` is a multiplexer in
front of the monitor:

* software writes the port number to `DIST_SEL` (0x014);
* the number is taken over only while `CTRL.EN` is 0, so a measurement
  never mixes two ports;
* when the port changes, all transactions the monitor was tracking are
  forgotten, because their responses will never be seen;
* a number at or above the port count gives an idle bus.

The selection is registered, so the new port is observed one cycle after
the write (or after `EN` is cleared).

## Bus monitor unit

### What is measured

The monitor has three performance counter (PC) sets. Each set has twenty
32-bit counters:

| counter | advances on | by |
|---|---|---|
| TCR_RD / TCR_WR | AR / AW handshake (`valid && ready`) | 1 |
| TSR_RD / TSR_WR | the same handshake | burst bytes, `(len+1) << size` |
| VC_RD / VC_WR | each R / W data beat (`valid && ready`) | 1 |
| BC_RD / BC_WR | the last data beat (`rlast` / `wlast`) | transaction length in cycles |
| RLC_0..7 | first R beat of a read | 1, in the latency interval that holds it |
| WLC_0..3 | the B handshake of a write | 1, in the latency interval that holds it |

There are also four 64-bit global clock counters. Each one counts the
cycles during which its `CTRL.GCC_EN` bit is set and the monitor is active.

### Timing definitions

These definitions are the heart of the monitor. They are this design's
own, because the measured quantities are named but their end points are
not. Every transaction is timed from the cycle of its address handshake:

* **read latency**: cycles until the first R beat. A beat in the cycle
  right after AR gives a latency of 1.
* **read busy length**: cycles from AR to the `rlast` beat, both cycles
  included.
* **write busy length**: cycles from AW to the `wlast` beat, both cycles
  included. A single beat sent in the AW cycle gives a length of 1.
* **write latency**: cycles from AW to the B handshake.

`bm_txn_detect` stamps each accepted address with a free-running cycle
counter and stores it in a queue. It stores the PC set of the transaction
with it. There are two queues:

* a read queue of `RD_OT` entries (default 8);
* a write queue of `WR_OT` entries (default 8). Each write entry moves from
  "waiting for data" to "waiting for a response".

Later R, W and B handshakes are charged to the oldest matching entry, so
several outstanding transactions are timed correctly. This needs two
things from the bus:

* **Responses come back in address order.** This holds for a single ID
  stream or an in-order slave. A monitor on a bus with out-of-order
  responses will charge them to the wrong transaction.
* **Write data does not run ahead of its address**, except in the same
  cycle.

A handshake that finds its queue full, or finds no open transaction, is
not counted. It sets the sticky `UNTRACKED` status bit instead. This
happens, for example, when monitoring is enabled in the middle of a burst.

Transactions are tracked even while monitoring is stopped. Only the
counting is gated, so a response that arrives just after `EN` is set still
finds its own entry.

### Latency histograms

Latencies range from a few cycles to hundreds. Rather than keep one
counter per latency value, the monitor sorts each latency into one of
8 read intervals or 4 write intervals, and advances that interval's
counter by one.

The intervals are set by ascending lower limits:

* `RD_BOUND_0..6` for read, with reset values 4, 8, 16, 32, 64, 128, 256;
* `WR_BOUND_0..2` for write, with reset values 8, 32, 128.

Interval *k* holds latencies `>= BOUND_(k-1)` and `< BOUND_k`. Interval 0
holds everything below the first limit. The last interval has no upper
limit. If the limits are not ascending, the interval index becomes the
number of limits that the latency reaches.

### Address ranges and ID filter

Each PC set *i* has three registers:

* `BASE_i`, the lowest address of its range;
* `LIMIT_i`, the highest address of its range;
* `ID_i`, an optional ID filter.

A transaction belongs to the **lowest-numbered** set where `BASE <= addr <= LIMIT`
and, if the ID filter is enabled, where the AXI ID is equal to the
programmed ID. A transaction that no set takes is not counted.

On a master's bus, the ranges split the traffic by destination slave. On a
slave's bus, the ID filters pick out one source.

### Start, stop, triggers, interrupt

* `CTRL.EN` starts monitoring, and clearing it stops monitoring.
* If `EXT_TRIG_EN` or `ADDR_TRIG_EN` is also set, monitoring waits after
  `EN` for one of two triggers:
  * `ext_trig` is high, for example the `active` output of another
    monitor;
  * a transaction is seen whose address equals `TRIG_ADDR`. This
    transaction is already counted.
* Clearing `EN` also re-arms the trigger.
* `STATUS[0]` is set when the read plus write transaction count of any set
  reaches `TXN_THR`.
* `STATUS[1]` is set when a counted latency is at least `LAT_THR`.
* A threshold of 0 turns its interrupt source off. Write 1 to a status bit
  to clear it.
* `irq = CTRL.IRQ_EN && STATUS[1:0] != 0`.

### Register map (APB, 32-bit, byte offsets)

| offset | register | contents |
|---|---|---|
| 0x000 | CTRL | [0] EN, [1] EXT_TRIG_EN, [2] ADDR_TRIG_EN, [3] IRQ_EN, [7:4] GCC_EN; pulses: [8] CLR (all PC sets and UNTRACKED), [15:12] GCC_CLR |
| 0x004 | STATUS | [0] transaction IRQ, [1] latency IRQ (W1C), [2] ACTIVE, [3] UNTRACKED |
| 0x008 / 0x00C / 0x010 | TRIG_ADDR / TXN_THR / LAT_THR | |
| 0x014 | DIST_SEL | [7:0] port observed by the monitor (reset 0) |
| 0x020 + 0x10·i | BASE_i, +4 LIMIT_i, +8 ID_i ([31] enable, [3:0] ID) | reset: set 0 0x0000_0000-0x3FFF_FFFF, set 1 0x4000_0000-0x7FFF_FFFF, set 2 0x8000_0000-0xFFFF_FFFF |
| 0x060 + 4·k | RD_BOUND_k, k = 0..6 | |
| 0x080 + 4·k | WR_BOUND_k, k = 0..2 | |
| 0x100 + 8·g | GCC_g low word, +4 high word | |
| 0x200 + 0x80·p | PC set p: +00 TCR_RD, +04 TCR_WR, +08 TSR_RD, +0C TSR_WR, +10 VC_RD, +14 VC_WR, +18 BC_RD, +1C BC_WR, +20..3C RLC_0..7, +40..4C WLC_0..3 | |

The APB slave has no wait states and never signals an error. Unmapped
offsets read 0.

A 64-bit counter is read as two words with no snapshot. Stop the counter,
or read the high word twice, when it may carry between the two reads.

## Bus contention unit

### The conflict rule

In an AXI interconnect, each destination has an arbiter that gives the
channel to one source at a time. A **conflict** is counted for the source
that wins when both of these hold:

* a transfer starts at that destination (`valid && ready` on the
  destination side);
* at least one other source is asserting `valid` towards the **same**
  destination.

The winner's counter advances by one per transfer, however many sources
wait. The count of device *x* is therefore "how often *x* held the bus
against competition".

`cm_channel` implements this rule for one channel. `mcm` and `scm` use it
five times:

| unit | channel | sources | destinations | grant signal | counted |
|---|---|---|---|---|---|
| mcm | read address | masters | slaves | `s_armaster` | per transfer |
| mcm | write address | masters | slaves | `s_awmaster` | per transfer |
| mcm | write data | masters | slaves | `s_wmaster` | once per burst (first beat) |
| scm | read data | slaves | masters | `m_rslave` | once per burst (first beat) |
| scm | write response | slaves | masters | `m_bslave` | per transfer |

### What the interconnect must expose

For each source, the unit needs its `valid` and the router's decision of
where the request goes (`*_dest`). For each destination port, it needs the
handshake and the arbiter's grant index. For the data channels it also
needs `last`.

These are internal signals of the interconnect. Connecting them is part of
the integration work.

A rival counts only if it is routed to the same destination. With a single
destination, every other asserted `valid` is a rival.

### Clock gating

`bcu_clock_gate` compares all 22 counters with `CG_THRESH` (default 4).
When any counter is **greater** than the threshold:

* it raises the registered `cg_en` one cycle later;
* it stops `gclk` with a glitch-free gate: an enable flop on the falling
  edge, ANDed with `clk`.

The request stays until `bcu_clr` clears the counters. Which domain
`gclk` feeds, and what the CGU does with `cg_en`, are left to the
integrator.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| hbmu, bcu, mcm, scm | N_M | 6 | masters on the interconnect |
| hbmu, bcu, mcm, scm | N_S | 2 | slaves on the interconnect |
| hbmu, bus_monitor, bm_txn_detect | RD_OT, WR_OT | 8 | transactions tracked in flight |
| hbmu, bcu | CG_THRESH | 4 | clock gating when a count exceeds this |
| hbmu (N_BM_PORTS), bm_distributor (N_PORTS) | | 8 | ports the monitor can be switched to |
| hbmu_pkg | NUM_PC, NUM_RD_BINS, NUM_WR_BINS, NUM_GCC | 3, 8, 4, 4 | fixed structure of the monitor |
| hbmu_pkg | CNT_W, GCC_W | 32, 64 | counter widths |
| hbmu_pkg | AXI_ADDR_W, AXI_ID_W | 32, 4 | observed AXI fields |

All counters wrap around and none saturates. Reset is asynchronous and
active low.

## How far to trust it, and where it departs

Taken from the reference description of the unit:

* the split into BMU and BCU;
* the measured quantities;
* three PC sets selected by address range, with an ID filter;
* 8 and 4 latency intervals with 32-bit counters;
* four 64-bit global counters;
* APB control;
* MCM on AR, AW and W, and SCM on R and B, for a 6 x 2 interconnect;
* counting a conflict when a transfer starts while other devices request
  the bus;
* clock gating above a count of 4;
* distributors that connect several master and slave ports to one monitor.

This design's own choices:

* the timing end points above;
* the in-order tracking queues;
* how interval limits are encoded;
* the register map and reset values;
* the trigger and interrupt conditions;
* separate AR and AW counters, where the reference has one address-channel
  count;
* counting a burst once on the W and R channels;
* restricting rivals to the same destination;
* the enable/clear pins of the BCU;
* the gate cell;
* the distributor as a software-selected multiplexer, frozen while the
  monitor is enabled.

A "valid count" could also be read as derived from the global counter and
the busy count. Here it is simply the number of data beats.

Not included, because no logic is specified for them:

* the interconnect itself;
* the other blocks of a generic power management unit: workload estimator,
  process monitor, DVS/DFS/ABB/AVS controller, reset and clock generation
  units, and the PMU's power lookup table;
* the PMIC and level shifters.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| tb_bm_addr_decoder | random ranges, IDs and edge addresses against a reference decode |
| tb_bm_global_counters | random enable and clear, plus an exact 37-cycle interval |
| tb_bm_perf_counter | random events and interval limits against a histogram model |
| tb_bm_txn_detect | hand-timed AXI sequences: latency, busy length, bytes, two outstanding reads, write data in the address cycle, ID filtering, untracked beats, flush |
| tb_bm_apb_regs | register reset values, read-back, pulses, every result word, W1C interrupt status |
| tb_bus_monitor | about 250 random bursts with stalls and latencies up to 300 cycles, compared over APB with a model; global counter cycle count; address and external triggers; both interrupts; clear |
| tb_cm_channel, tb_mcm, tb_scm | directed conflict cases plus random traffic against a model |
| tb_bcu_clock_gate, tb_bcu | gating at a count of 5 but not 4, gated clock stopped and restarted, gating from slave-side counts |
| tb_bm_distributor | random port selection and hold against a model, idle bus for out-of-range selections, `switched` pulse |
| tb_hbmu_cases | the worked examples of the reference: monitor values for a short read and write sequence, the winner of each contention case, gating at a count of 5 but not 4 |
| tb_hbmu | end to end at default parameters: BMU traffic on distributor port 3 (port 0 carries other traffic), selection frozen while enabled, phases together with random 6 x 2 arbitration traffic; checks every contention counter each cycle, `cg_en` and `gclk`; fails if any mechanism never occurred |

For each mechanism (each channel's conflicts, clock gating, each PC set,
range misses, ID filtering), `tb_hbmu` reports how often it happened. It
counts a failure for any mechanism that never happened.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/hbmu_pkg.sv tb/tb_hbmu.sv --top-module tb_hbmu -o sim
./obj_dir/sim
```

Replace `tb_hbmu` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/hbmu_pkg.sv rtl/<module>.sv`.

Lint warnings that remain:

* unused constants of the shared package;
* `rst_n` is used both as an asynchronous reset and in the
  `disable iff` of assertions;
* `pready` and `pslverr` are constant by design.
