# Communication monitors for debugging a NoC-based multiprocessor SoC

In a multiprocessor system-on-chip many bugs and performance problems are not in
any one processor. They come from how processors, memories and peripherals talk
to each other over the interconnect: split and pipelined bus transactions, and
packets crossing a network-on-chip (NoC) with different quality-of-service
classes. This RTL provides *monitors* that sit on interconnect links and only
listen. Each monitor turns the link traffic into a few numbers a debugger can
read: bandwidth use, transaction latency, a CRC signature of the data, and a
trigger that fires after a programmed number of matching transactions. What
"matching" means is set by programmable transaction filters.

All monitors are built from one template with six parts:

1. a **protocol-specific front end** (PSFE), which turns the link protocol into
   protocol-independent events;
2. **bandwidth** measurement;
3. **transaction latency** measurement, for bus links only;
4. **trigger** generation, with a request/acknowledge pair;
5. **checksum** (CRC) generation;
6. **control and status registers**, reached through a debug register port.

A monitor instance includes only the functions it needs. Each function sits
behind a transaction filter.

## What the top level holds

`noc_monitor_top` holds three monitors, matching the three configurations whose
gate cost is known for this template:

| instance  | module           | monitored link                              | functions |
|-----------|------------------|---------------------------------------------|-----------|
| `u_mon64` | `axi_monitor`    | AXI4, 64-bit data, 8 pending transactions, 4-bit IDs | trigger+CRC (filter A), latency (filter B), bandwidth (filter C) |
| `u_mon32` | `axi_monitor`    | AXI4, 32-bit data, 8 pending transactions, 4-bit IDs | same |
| `u_rmon`  | `router_monitor` | NoC link, 32-bit words, 3-word flits        | bandwidth, trigger, CRC, all behind one shared filter |

In a full system you would place bus monitors on master and slave ports and on
the bus side of network interfaces, and router monitors on router-to-router and
router-to-NI links. The links are plain input ports of the top, so monitors can
be instantiated wherever they are needed.

All monitors share one debug register port. `dbg_sel` picks the monitor
(0 = 64-bit AXI, 1 = 32-bit AXI, 2 = router). A JTAG TAP data register or a
functional bus would drive this port; no TAP is included. Each monitor has its
own `dbg_trigger_req`/`dbg_trigger_ack` bit, meant for an interrupt controller
or a cross-trigger network. Each AXI monitor also drives a `latency_interrupt`
bit.

```
 AXI link ──► axi_psfe ──► data beats ─┬─► bus_filter A ─► mon_trigger ─► dbg_trigger_req/ack
 (passive)    (2 x axi_pend_table)     │                └► mon_crc
                           completions ┼─► bus_filter B ─► mon_latency ─► latency_interrupt
                                       └─► bus_filter C ─► mon_bandwidth
                          all counters/config ◄──► mon_csr ◄──► debug register port

 NoC link ──► router_psfe (router_filter inside) ─► mon_bandwidth, mon_trigger, mon_crc ◄─► mon_csr
```

## The AXI front end: tracking pending transactions

This is the most involved part of the design, and it takes most of the area of
an AXI monitor.

A filter that checks an address range has to know the address of *every data
beat*. AXI gives an address only once per burst, and it allows several bursts
to be in flight at once:
- read data of different IDs can interleave;
- responses of different IDs can return in any order;
- within one ID, everything stays in order.

`axi_psfe` therefore keeps two `axi_pend_table`s, one for reads and one for
writes, each with `MAX_PEND` (8) entries.

* **Allocation.** An AR or AW handshake takes the lowest free entry. The entry
  records the ID, the burst length, size and type, the start address, the
  address of the next beat, and the issue time (a free-running 32-bit cycle
  counter).
* **Rank per ID.** Each entry also stores its *rank*: how many older pending
  entries have the same ID. The entry with rank 0 is the one the next read
  beat or write response of that ID belongs to. When that entry completes,
  every other entry of the same ID moves up one rank. Together the ranks act
  as one FIFO per ID, but in one shared store.
* **Write data.** AXI4 write data carries no ID and follows address order. A
  second rank counts the older entries still receiving data. W beats go to the
  entry whose data rank is 0.
* **Beat address.** On each beat, the entry's next-beat address moves on by the
  AXI rule (`mon_pkg::axi_next_addr`):
  - FIXED keeps the address;
  - INCR steps from the size-aligned address;
  - WRAP steps from the size-aligned address and wraps at `(len+1) << size`.
* **Completion.** The last read beat (RLAST) or a B handshake frees the entry.
  It reports the start address and the latency, which is the completion cycle
  minus the issue cycle.

All lookups are combinational. Events come out in the same cycle as the
handshake, and the units behind them update at that clock edge.

Limits you should know about:
- **Full table.** An address that finds its table full is not tracked, and the
  sticky `ovf` flag (status flags bit 2) is set. Beats of untracked bursts can
  then be given to the wrong entry until the traffic drains; the tables empty
  themselves once all outstanding transactions finish.
- **Early write data.** AXI allows write data before its address. Such data is
  counted as a beat, with address 0 and ID 0.
- **Unused response fields.** RRESP and BRESP are not observed.

## Filters

`bus_filter` (AXI) matches an event when the filter is enabled and all of these
hold:
- the event's direction is enabled;
- `addr_lo <= addr <= addr_hi` (both ends included);
- `(data ^ ref_data) & mask == 0`;
- if ID matching is on, `id == ref_id`.

A disabled filter passes everything. In the AXI monitor each function has its
own filter. Each filter is built twice, once per direction, with one shared
configuration, because a read beat and a write beat can occur in the same cycle:
- filters A and C see data beats;
- filter B sees completed transactions, which carry no data, so leave its mask
  at 0.

`router_filter` matches a NoC word on:
- packet position (header, body, end of packet);
- QoS (best effort or guaranteed throughput);
- the End-of-Message flag;
- word number within the flit;
- data under a mask.

Each of the first four criteria is a set of allowed values, one enable bit per
value. The router monitor has a single filter, inside `router_psfe`, that all
its functions share. This is cheaper, but every function then counts the same
traffic.

## Measurement units

| unit | what it keeps | timing / rules |
|------|---------------|----------------|
| `mon_bandwidth` | `used_cnt`: cycles with at least one matching beat/word; `total_cnt`: all cycles | utilisation = used/total, computed by software; both saturate |
| `mon_latency` | last, max, sum, count of matching completion latencies | average = sum/count in software; `latency_interrupt` goes high when a sample exceeds `lat_max` and stays high until cleared; `lat_max = 0` disables it |
| `mon_trigger` | count of matches (up to 2 per cycle on AXI) | `dbg_trigger_req` rises on the edge after the match that makes count ≥ `trig_value`, and stays up until `dbg_trigger_ack`; then `fired` is set and no new request is made until cleared; `trig_value = 0` disables it |
| `mon_crc` | CRC-32, polynomial 0x04C11DB7, init 0xFFFFFFFF, MSB first, not reflected, no final XOR | AXI: `{beat address, data}` of each matching beat, write before read in the same cycle; router: each matching 32-bit word |

On the router monitor a word is counted two clock edges after it is on the
link: one edge to register the link in the PSFE, one in the unit.

Comparing CRC signatures taken at several monitors along one path, or against
a signature from a system model, shows on which stretch the data was corrupted.

## Router link front end

The NoC link format used here is the design's own choice: `link_valid`,
`link_data[31:0]`, and the side-band bits `link_eop` (last word of a packet),
`link_eom` (End of Message) and `link_gt` (1 = guaranteed throughput).
`router_psfe` registers the link once. It numbers words modulo `FLIT_WORDS` (3),
restarting after each end of packet. The first word after an end of packet is
marked as the header. A one-word packet is marked as end of packet.

There is no latency unit here, because a word takes a fixed time to cross a NoC
link.

## Debug register map

All registers are 32-bit words. Writes take effect at the clock edge where
`dbg_wr` is high. Read data appears on `dbg_rdata` one cycle after `dbg_rd`.
Unmapped addresses read zero. Configuration words reset to zero, which means
every filter passes everything and every trigger is disabled.

Writing to address `0x7F` (the command register) stores nothing. Each 1 bit
gives a one-cycle clear pulse:

| bit | clears |
|-----|--------|
| 0 | bandwidth |
| 1 | latency statistics and interrupt |
| 2 | trigger count; re-arms the trigger |
| 3 | CRC |
| 4 | overflow flag |

AXI monitor:

| address | register |
|---------|----------|
| 0x00–0x06 | filter A: `CTRL`, `ADDR_LO`, `ADDR_HI`, `REF_LO`, `REF_HI`, `MASK_LO`, `MASK_HI` |
| 0x08–0x0E | filter B (same layout) |
| 0x10–0x16 | filter C (same layout) |
| 0x18 | trigger value |
| 0x19 | latency interrupt threshold |
| 0x80–0x88 | status: bw used, bw total, latency last, max, sum, count, trigger count, flags, CRC |

Filter `CTRL` bits:

| bits | meaning |
|------|---------|
| 0 | enable |
| 1 | match ID |
| 2 | writes |
| 3 | reads |
| 15:8 | reference ID |

The `_HI` data words are used only when the data bus is wider than 32 bits.

AXI status flags:

| bit | meaning |
|-----|---------|
| 0 | trigger request |
| 1 | fired |
| 2 | pending-table overflow |
| 3 | latency interrupt |

Router monitor:

| address | register |
|---------|----------|
| 0x00 | filter control (bits below) |
| 0x01 | reference data |
| 0x02 | mask |
| 0x03 | trigger value |
| 0x80–0x84 | status: bw used, bw total, trigger count, flags (bit 0 request, bit 1 fired), CRC |

Router filter control bits:

| bits | meaning |
|------|---------|
| 0 | enable |
| 3:1 | allowed positions: header, body, end |
| 5:4 | allowed QoS: BE, GT |
| 7:6 | allowed EOM values: 0, 1 |
| 8+ | allowed word numbers |

All addresses and offsets are named constants in `mon_pkg`.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `axi_monitor` | `DATA_W`, `ID_W`, `MAX_PEND`, `ADDR_W` | 64, 4, 8, 32 | link sizes; pending transactions per direction |
| `axi_monitor` | `HAS_TRIGGER`, `HAS_CRC`, `HAS_LATENCY`, `HAS_BANDWIDTH` | 1 | include a function; a left-out function reads zero and drives its outputs low |
| `router_monitor` | `LINK_W`, `FLIT_WORDS` | 32, 3 | link width, words per flit |
| `router_monitor` | `HAS_TRIGGER`, `HAS_CRC`, `HAS_BANDWIDTH` | 1 | as above |
| `noc_monitor_top` | `AXI64_DATA_W`, `AXI32_DATA_W`, `ID_W`, `MAX_PEND`, `LINK_W`, `FLIT_WORDS`, `ADDR_W` | 64, 32, 4, 8, 32, 3, 32 | passed to the monitors |

Counters and latency values are 32 bits wide. Reset is asynchronous and active
low (`rst_n`).

## How closely this follows the original monitor description

These follow the published template: the six parts, the four bus-filter
criteria, the router-link characteristics, the two bandwidth accumulators, the
latency statistics with interrupt, counting matches up to a programmed trigger
value with a request/acknowledge handshake, CRC signatures, and the
configurations (64-bit and 32-bit AXI with 8 pending transactions and 4-bit
IDs; 32-bit router link with 3-word flits).

The rest is this design's own choice, because the template does not specify it:
- the register map and command bits;
- the router link signals;
- the CRC polynomial and what is hashed;
- latency measured from address handshake to completion;
- the trigger counting data beats (each data element is matched) rather than
  whole bursts;
- sticky interrupt and trigger behaviour;
- saturation;
- overflow handling;
- the rank-based pending store.

Known differences:
- **No TAP.** The debug port is a parallel register port. A JTAG TAP is meant
  to drive it.
- **One trigger unit per monitor.** The template allows several trigger units
  in parallel, for example one per direction. Here one unit counts matches from
  both AXI directions.
- **Area not matched.** The gate counts reported for the template
  (about 36k, 26k and 13k NAND2 equivalents) come from a commercial 65 nm
  synthesis run. This RTL was not tuned to match them.
- **Not included.** The NoC itself (routers, network interfaces, buses) and the
  debug scan chains are outside this RTL.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. `tb/axi_traffic_gen.sv` is a shared AXI4 traffic source. It drives
random interleaved, out-of-order bursts of all three burst types with random
back-pressure. It also computes, independently of the RTL, the beat addresses
and latencies a monitor should report.

`noc_monitor_top_tb` runs the whole infrastructure end to end, at the default
sizes, in a few seconds. It programs all three monitors, checks every status
word against its own reference, and checks that each mechanism occurs at least
once:
- filter rejections;
- all burst types;
- interleaving;
- every trigger handshake;
- both latency interrupts;
- table overflow;
- the clear commands.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/mon_pkg.sv tb/noc_monitor_top_tb.sv --top-module noc_monitor_top_tb
./obj_dir/Vnoc_monitor_top_tb
```

Replace the testbench name to run any other test. The testbenches use only
`$urandom`, so they also run in two-state simulators.
