# NoC emulation platform

Simulating a network on chip with realistic traffic is slow: a software model
of a few switches manages thousands of cycles per second, while validating a
network properly takes hundreds of millions of packets. This design moves the
traffic around the network into hardware. A network of switches under test is
placed on an FPGA and surrounded by hardware **traffic generators** (TGs),
which inject packets, and **traffic receptors** (TRs), which take them in,
check them and gather statistics. A processor on the same chip configures the
generators, starts every device in the same cycle, and afterwards reads the
statistics and prints them to a host PC over a serial link. The network runs
at full clock speed, so a run of 10^8 packets takes seconds.

This repository holds the platform around the network: the generators, the
receptors, their control modules, the bus that makes them addressable, the
processor bus and the serial monitor. The switches and the processor are not
included. The top module `noc_emu_framework` exposes the processor's bus
signals and one link per network port as plain ports.

```
          OPB (processor is the master)
   ───────────┬─────────────────────────────┬──────────
              │                             │
      ┌───────┴────────────────┐    ┌───────┴──────┐
      │ emu_platform           │    │ monitor_uart │── uart_tx / uart_rx
      │  dev_bus ─┬─ emu_control 0 (stochastic group)
      │           ├─ emu_control 1 (trace group)
      │           ├─ TG 0..3 ── tg_link_o[n] ──► network of switches (outside)
      │           └─ TR 0..3 ◄─ tr_link_i[n] ◄──
      └────────────────────────┘
```

## Flits, packets and the link

Each link carries 32-bit flits with a head and a tail mark, plus a valid bit
(`link_t` in `noc_emu_pkg`, 35 bits). The sender holds valid until the
receiver's `ready` is high; a flit moves in every cycle in which both are
high. The network may therefore stall a generator for as long as it likes,
and a receptor may refuse flits (the trace receptor does this when its
report FIFO is full).

Every packet has at least three flits and at most 63:

| flit | contents |
|---|---|
| 0 (head) | `{dest[31:22], src[21:12], len[11:6], 6'b0}` |
| 1 | injection stamp: the platform's cycle counter when the request was made |
| 2 .. len-2 | payload from a 32-bit LFSR in the generator |
| len-1 (tail) | CRC-32 over flits 0 .. len-2 |

The CRC uses the reflected polynomial 0xEDB88320 and is applied one 32-bit
word at a time. It starts at 0xFFFFFFFF and has no final inversion. The
receiving interface (`noc_if_rx`) recomputes the CRC and checks the
destination against its own node number and the flit count against the
length field. One cycle after the tail it reports the source, the length,
the stamp and three pass/fail bits. The stamp travels inside the packet, so
a receptor needs no table of outstanding packets. It computes latency as
`now − stamp` modulo 2^32, which is exact for any latency under 85 s at
50 MHz.

`noc_if_tx` turns a request (destination, length) into these flits. It
accepts a new request only when it is idle, so two packets from one
generator are never interleaved. With no stalls, the head flits of two
back-to-back packets are `len + 1` cycles apart: `len` flits plus one idle
cycle.

## Time

A platform-wide 32-bit counter `now` advances every cycle. It is the time
base for injection stamps and latencies, and it is the same in every device.
Separately, each control module keeps a 64-bit **emulation time** that
advances only while its group runs. Receptors use this emulation time for
their histograms. Its low 32 bits are broadcast to the devices and hold at
all ones once the count no longer fits.

## Control groups: start, stop, reset

Devices come in two kinds, and each kind has its own control module:

* control 0 drives the stochastic generators and the histogram receptors;
* control 1 drives the trace-driven generators and the trace receptors.

A control module broadcasts `bcast_t {run, clr, etime}` to its group. Writing
its command register makes the change in one cycle for the whole group:

* bit 0 starts the group (`run` rises in every device at once);
* bit 1 stops it;
* bit 2 resets it: a one-cycle `clr` clears all statistics, FIFOs, LFSRs
  and the emulation time, and stops the group.

Generators inject only while `run` is high. Receptors keep taking flits when
`run` is low, so packets in flight after a stop are still counted. Each
device reports `done`, and the control module's status register shows when
all devices of its group are done. A generator is done when it has sent its
packet budget or emptied its trace FIFO. A receptor is done when it is not in
the middle of a packet. The processor polls this to find the end of a run.

## Address map

The processor sees two OPB slaves. Each acknowledges a transfer in the cycle
after select, and read data comes with the acknowledge.

| base | size | slave |
|---|---|---|
| `0x8000_0000` (`PLATFORM_BASE`) | 1 MiB | emulation platform |
| `0x4060_0000` (`MONITOR_BASE`) | 16 B | monitor UART |

Inside the platform, byte address bits [18:8] select a device slot and bits
[7:2] select a 32-bit register:

| slot | device |
|---|---|
| n (0..511) | TG n |
| 512 + n | TR n |
| 1024 + k | control module k |

`dev_bus` decodes the slot into a separate select strobe for each device,
which gives each device its own small bus. It registers the selected
device's read data one cycle later. Device n is both TG n and TR n of
network node n. With the default parameters (`N_STG = N_TTG = N_HTR = N_TTR
= 2`), nodes 0–1 have stochastic TGs, nodes 2–3 trace TGs, nodes 0–1
histogram TRs and nodes 2–3 trace TRs.

### Stochastic traffic generator (`tg_stochastic`)

| reg | meaning |
|---|---|
| 0 | CTRL `{rand_dest[3], mode[2:1], enable[0]}` |
| 1 | RATE: in uniform mode a packet is requested in a cycle when `lfsr[15:0] < RATE` |
| 2 | LEN `{max[13:8], min[5:0]}`: length drawn at random in [min, max] |
| 3 | DEST `{mask[25:16], base[9:0]}`: fixed `base`, or with `rand_dest` `base + (lfsr & mask)` |
| 4 | NPKT: packets to send (0 = unlimited) |
| 5 | BURST: mode 1 `{gap[31:16], len[15:0]}`; mode 2 `{scale[19:16], base[15:0]}` |
| 6, 7 | packets sent, flits sent |
| 8 | STATUS `{busy, done}` |
| 9, 10, 11 | delivery time of the last burst, sum of burst delivery times, bursts completed |

There are three modes:

* **Mode 0 (uniform)** requests a packet whenever the LFSR draw falls below
  RATE. The offered load is RATE/65536 packets per idle cycle.
* **Mode 1 (burst)** sends `len` packets back to back, then waits `gap`
  cycles.
* **Mode 2 (normal-like)** waits `base + (s << scale)` cycles between
  packets. Here `s` is the sum of four 4-bit uniform draws, which gives a
  bell-shaped spread around `base + 30 << scale`.

A burst's delivery time runs from the cycle its first packet is requested to
the cycle after the network takes the tail of its last packet. Without
stalls, a burst of 4 packets of 5 flits takes 4 × 6 + 1 = 25 cycles. Any
back-pressure the network applies lengthens it.

### Trace-driven traffic generator (`tg_trace`)

A trace is a list of 32-bit packet descriptors `{len[31:26], dest[25:16],
dt[15:0]}`. The processor streams them into a 16-entry FIFO by writing
register 1 during the run; reading register 1 returns the free space. Each
descriptor becomes a request once `dt << SHIFT` run cycles have passed since
the previous request (for the first one, since the start). SHIFT is in CTRL
bits [7:4]. It lets software slow a trace down without rewriting it.

The generator never queues requests ahead of the interface. When a
descriptor's time comes while the previous packet is still being sent, is
stalled by the network, or has not yet arrived in the FIFO, the packet goes
out as soon as it can and the **late** counter (register 5) increments. As a
result, the head flits of consecutive packets are `max(dt << SHIFT, len_prev
+ 2)` cycles apart when nothing stalls. A nonzero late count means the trace
asked for more than the network, or the processor's streaming, could
deliver.

Other registers: 0 CTRL `{shift, enable}`, 2 packets, 3 flits, 4 STATUS
`{busy, done}`.

### Receptors (`tr_histogram`, `tr_trace`, common part `tr_common`)

Both receptor types provide the following registers:

| reg | meaning |
|---|---|
| 1 | packets |
| 2 | flits acknowledged |
| 3 | packets failing CRC |
| 4 | packets with wrong destination or length |
| 5 / 11 | 64-bit sum of latencies (low / high word) |
| 6 | pop the debug FIFO |
| 7 | debug FIFO fill |

The debug mode is enabled by bit 1 of register 0. It copies the data of every
acknowledged flit into a 16-entry FIFO so that the processor can print packets
for manual inspection.

* The **histogram receptor** counts acknowledged flits into 16 bins by
  emulation time. The bin is `min(etime >> GRAN, 15)`, with GRAN in register
  0 bits [12:8], and the last bin collects everything later. The bins are
  read at registers 32..47. This receptor always accepts flits.
* The **trace receptor** writes a report for each packet into a 16-entry
  FIFO. The report uses the generators' descriptor layout, `{len, src,
  gap}`, where gap is the number of cycles since the previous arrival
  (saturated to 16 bits). A latency word goes with it. A recorded trace can
  therefore be fed back to a trace generator. Register 8 peeks at the
  descriptor, register 9 reads the latency and pops the entry, and
  register 10 gives the fill. When the FIFO is full, the receptor stops
  acknowledging flits, so the network sees back-pressure and nothing is
  lost.

## Statistics and where they come from

| statistic | source |
|---|---|
| average latency | latency sum ÷ packet count, per receptor |
| packets sent / received | TG registers 6 and 2; TR register 1 |
| delivery time of each burst | stochastic TG registers 9–11 |
| total emulation time | control registers 1 and 3 |
| flits delivered over time | histogram TR bins, bin width 2^GRAN cycles |
| per-packet latency trace | trace TR report FIFO |
| integrity | CRC and destination/length error counts |

The processor reads these values and writes text to the monitor.

## Monitor (`monitor_uart`)

The monitor is an OPB slave with 16-entry transmit and receive FIFOs. It
sends 8N1 serial data at `CLKS_PER_BIT` = 434 clocks per bit, which is
115200 baud from 50 MHz. Its registers are:

| offset | meaning |
|---|---|
| 0 | received byte (a read pops it) |
| 4 | byte to send |
| 8 | status `{tx_full, tx_empty, rx_full, rx_valid}` |
| 12 | control: bit 1 clears the receive FIFO, bit 0 the transmit FIFO |

## Parameters

| parameter | default | where |
|---|---|---|
| `N_STG`, `N_TTG`, `N_HTR`, `N_TTR` | 2 each | top, platform |
| `PLATFORM_BASE`, `MONITOR_BASE` | `0x8000_0000`, `0x4060_0000` | top |
| `CLKS_PER_BIT` | 434 | top, monitor |
| trace FIFO, report FIFO, debug FIFO | 16 entries | `tg_trace`, `tr_trace`, `tr_common` |
| histogram bins | 16 | `tr_histogram` |

Node numbers are 10 bits wide and the slot map has room for 512 generators
and 512 receptors. The number of devices is therefore limited by the FPGA,
not by the format.

## Where this design departs from its source, or fills gaps

The platform's structure follows the published design it is based on:

* generators and receptors at each network port;
* one control module per device kind, which synchronises start, stop and
  reset;
* separate device buses behind the processor bus;
* a serial monitor;
* a 32-bit packet descriptor made of length, destination and relative time.

The following are this design's own choices:

* **Everything at bit level:** the flit format, the link handshake, the packet
  layout, the CRC, the descriptor field widths, all register maps and the
  address map inside the platform window.
* **Stochastic models.** The source names normal and burst traffic and a
  user-set data rate. The three modes above are the simplest generators that
  produce these.
* **Burst delivery time** is measured at the generator, up to the moment the
  network takes the last tail flit. It includes the time the network stalls
  the burst, but not the flight of the last packet.
* **Latency** uses a stamp carried in the packet.
* **Histogram** bin count and saturation.
* **Trace receptor:** its record layout and its back-pressure when full.
* **Emulation time** is 64 bits wide.

The following are not built:

* **Reactive traces.** Generators that respond to traffic their receptors
  receive are not built. A trace generator only replays its descriptors.
* **Link congestion statistics** inside the network.
* **The network of switches.** It comes from a separate NoC generator and
  is the device under test. Its links are top-level ports.
* **The processor.** Its software is not included. The testbenches act as
  the processor through bus tasks.
* **Board memory** holding long traces.
* **FPGA resource figures.** The resource numbers of the original platform
  belong to a specific device and are not reproduced.

## Simulating

Every block has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=<n> failures=<m>`. The helper files are:

* `tb/tb_ref_pkg.sv`: a reference CRC and packet builder;
* `tb/tb_noc_model.sv`: a behavioural store-and-forward network with random
  delay and stalls that stands in for the switches.

With plain Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/noc_emu_pkg.sv tb/tb_ref_pkg.sv tb/tb_noc_emu_framework.sv \
    --top-module tb_noc_emu_framework
./obj_dir/Vtb_noc_emu_framework
```

Replace `tb_noc_emu_framework` with any `tb_<block>` to run that block's
testbench.

* `tb_noc_emu_framework` runs the whole top at its default parameters. A
  processor model runs a stochastic emulation and a trace-driven one
  together over the network model, drains trace reports during the run,
  stops and restarts a group, and resets a group for a second run. It checks
  the statistics against what the network model delivered: packet and flit
  counts, histogram totals, one CRC error from a corrupted packet, and each
  trace report. It then sends a report through the monitor and decodes it
  from the serial line. It counts each mechanism: the three stochastic
  modes, trace injection, late injection, back-pressure, CRC detection, the
  saturated histogram bin, debug capture, stop, reset, all-done, UART output
  and burst delivery time. If any of them never happened, it fails.
* `tb_workload_trace` runs a quarter of a 16-million-packet trace: 2,000,000
  descriptors streamed into each trace generator, one packet every 10 cycles
  across the platform. It checks that every packet arrives intact and on
  time. It also checks that the emulated time matches the trace: 4×10^6
  packets in 4×10^7 cycles, which scales to 3.2 s at 50 MHz for the full
  trace. It simulates in under a minute. The full trace needs 1.6×10^8
  cycles, about four times as long.
