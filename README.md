# NetFlow flow cache and NetFlow v5 exporter for a 10 Gb/s link

This design sorts every packet on a 10 Gigabit Ethernet link into flows and
reports each finished flow as a NetFlow v5 record. It never samples. A flow is
a 5-tuple: source IP, destination IP, source port, destination port and
protocol.

A minimum Ethernet frame plus its inter-frame gap is 616 bits on the wire.
That is 61.6 ns, or 12 cycles of the 200 MHz, 64-bit MAC user interface, so
the design must take one new packet every 12 cycles indefinitely. It manages
this by:

- keeping the flows in an on-chip hash table;
- letting two independent processes work on the two ports of a dual-port
  block RAM.

The RTL is SystemVerilog (IEEE 1800-2017). There are two halves:

| Half | Module | What it does |
|---|---|---|
| Flow cache | `netflow_cache` | Classifies packets and decides when a flow is finished. |
| Export engine | `netflow_export` | Packs finished flows, 30 at a time, into UDP/IPv4 NetFlow v5 datagrams. |

`netflow_top` joins the two halves between two MAC user interfaces:
- receive on port 0 (the monitored link);
- transmit on port 1 (towards the collector).

Beside them sits a second flow cache, `nfqdr_cache`, with the same function.
It keeps 786,432 flows in external SRAM and watches its own link. It is
described in its own section below.

The MACs, the PHYs and the processor that sets them up are not part of this
RTL.

```
 MAC 0 rx ──► pkt_parser ──► flow_hash ──► create_update_flows ──port A──┐
 (AXIS 64b)   5-tuple,        14-bit         (Process A)                 │
              flags, time,    address          │ FIN/RST records     flow_table
              IP length                        ▼                     16384 x 241 b
                                         export_module ◄── timeout_monitor ─port B─┘
              timestamp_counter (ms) ──►  (FIFO, AXIS)      (Process B, sweep)
                                              │ 30-byte records
                                              ▼
   flow_encoding ──► PDU FIFO ──► general_control ──► frame_mem ──► frame_sender ──► MAC 1 tx
        │ partial UDP sum              ▲   ▲                                 │ pkt_sent
        ▼                              │   │                                 │
   nf5_header ──► udp_header ──► ip_header ┘  ◄── sys_time_gen              ─┘
```

## The flow table and its two processes

Each of the 16,384 entries is 241 bits (`flow_pkg::flow_entry_t`):

| Field | Bits |
|---|---|
| busy | 1 |
| 5-tuple | 104 |
| OR of the TCP flags seen | 8 |
| first timestamp (ms) | 32 |
| last timestamp (ms) | 32 |
| packet count | 32 |
| byte count | 32 |

The entry's address is a 14-bit hash of the 5-tuple. There is no chaining and
no second slot. A packet whose address already holds a different flow is a
**collision**: the packet is dropped and counted, and the resident flow keeps
its entry.

**Process A** (`create_update_flows`) owns port A and takes 2 cycles per
packet:
1. Cycle 1: read the entry at the packet's hash address.
2. Cycle 2: write the new entry, using:

| Entry holds | Packet is not FIN/RST | Packet has FIN or RST |
|---|---|---|
| nothing | create the flow (1 packet) | export a 1-packet record, leave the entry empty |
| the same 5-tuple | update flags, last time, packets, bytes | update, export at once, clear the entry |
| another flow | drop the packet (collision) | export a 1-packet record, keep the other flow |

When Process A exports a record it stalls until the export FIFO accepts it.

**Process B** (`timeout_monitor`) owns port B and takes 2 cycles per entry:
1. It walks the table with a free-running address counter, one read per entry.
2. One cycle later it compares the current time with the entry's two
   timestamps.
3. A busy entry that has been idle for `INACTIVE_TIMEOUT` ms (default 15 s),
   or has lived for `ACTIVE_TIMEOUT` ms (default 30 min), is offered to the
   export FIFO.
4. In the cycle the record is accepted, Process B clears the entry's busy bit
   through port B.

A full sweep takes 32,768 cycles (164 µs), which is well below the 1 ms
timestamp step.

**The one subtle point: the two ports are independent, but the data is
shared.** Process B could read an entry just before Process A rewrites it, and
then export and clear a stale copy. That would lose the update or export a
flow twice. To prevent this, `create_update_flows` publishes which address it
reads and writes in each cycle, and the monitor watches those addresses:
- In its read cycle, it notes whether Process A writes the same address in
  that cycle. If so, the monitor's read returns the old contents.
- In its evaluate cycle, it checks whether Process A reads or writes the
  address.

If any of these happen, the monitor leaves the entry alone for this sweep and
counts it in `n_skipped`; the next sweep decides. Process A is never delayed,
so it keeps its 2-cycle rate. Because both processes own a port, the two
ports never write the same address in one cycle.

After reset, `flow_table` clears itself by writing zero to each entry (16,384
cycles). Its `init_done` output, brought out as `ready`, holds both
processes off until the clear has finished.

## The packet path and its cycle budget

| Stage | Throughput | Latency |
|---|---|---|
| `pkt_parser` | a 64-byte frame is 8 beats; never stalls the MAC (`tready` = 1) | result registered at the last beat |
| `flow_hash` | 1 packet per cycle | 1 cycle |
| `create_update_flows` | 1 packet per 2 cycles | 2 cycles |

The parser picks fields by their byte offset in an Ethernet II frame:
- EtherType;
- IP version and IHL;
- IP Total Length;
- protocol;
- the two addresses;
- the ports and TCP flags, taken at 14 + 4·IHL, so IP options are handled.

The timestamp is the millisecond counter at the frame's first beat.

The parser rejects a frame that is any of:
- not IPv4;
- neither TCP nor UDP;
- too short to hold the fields;
- marked bad by the MAC (`tuser` on the last beat, i.e. a failed FCS).

The byte count added to a flow is the IP Total Length, as NetFlow reports it.

The parser holds one finished packet. If a second packet completes while the
first is still waiting, the second is dropped and counted in `n_dropped`.
This only happens when the export path backs up all the way into Process A.
For example, the collector port may be held off while FIN/RST packets keep
arriving.

The hash (`flow_hash`) is the remainder of dividing the 104-bit tuple
(source IP first, MSB first) by the primitive polynomial
x^14 + x^5 + x^3 + x + 1. This is a CRC with a zero start value and no final
XOR. Every input bit changes the address, and the whole remainder is
computed in one cycle. `flow_pkg::prim_poly` gives primitive polynomials for
other widths if `TABLE_DEPTH` is changed.

## Exporting records

`export_module` merges the two record sources into one FIFO (64 records).
Process A's records go first. Each record leaves as one AXI4-Stream packet.
The format depends on `NETFLOW_EXPORT_PRESENT`:

| Value | Packet | Size |
|---|---|---|
| 1 | the 30-byte record, big-endian, fields in table order | 4 beats, `tkeep` of the last beat 0x3F |
| 0 | the record in a 60-byte Ethernet frame, EtherType 0x88B5, to broadcast | — |

With `NETFLOW_EXPORT_PRESENT` = 0, the frames go straight to MAC port 1. This
is a plain format for checking the cache against a software flow meter.

## The NetFlow v5 export engine

A datagram holds up to `N_FLOWS` (30) flow records. It is sent:
- as soon as 30 records are waiting; or
- `WAIT_MS` (60 s) after the first record of a partial batch arrived.

Laid out on the wire (`tb_util_pkg::nf5_frame` builds it the same way):

| Bytes | Content |
|---|---|
| 0-13 | Ethernet: destination MAC, source MAC, 0x0800 |
| 14-33 | IPv4: 0x45, length, identification (+1 per datagram), DF, TTL 64, protocol 17, checksum, addresses |
| 34-41 | UDP: ports 2055/2055, length, checksum over the pseudo-header |
| 42-65 | NetFlow v5 header: version 5, count, sysUptime, unix_secs, unix_nsecs, flow_sequence, engine type/id, sampling 0 |
| 66-... | count × 48-byte PDUs: srcaddr, dstaddr, nexthop 0, input/output 0, dPkts, dOctets, First, Last, srcport, dstport, pad, tcp_flags, prot, ToS/AS/masks 0 |

A full datagram is 66 + 30 × 48 = 1506 bytes, or 189 words of 64 bits.

How the datagram is assembled:

1. **PDUs.** `flow_encoding` turns each incoming record into six 64-bit PDU
   words in the PDU FIFO. As it goes, it adds the PDU's 16-bit words into a
   running one's-complement sum.
2. **Headers.** When a batch closes, `general_control` accepts it. Then:
   - `nf5_header` builds the NetFlow header and adds its words to the sum.
     `flow_sequence` counts the flows sent before this datagram.
   - `udp_header` adds the pseudo-header and the UDP header and folds the sum
     into the final checksum.
   - `ip_header` computes the IPv4 header checksum.

   Each of these starts on the previous one's `done` pulse.
3. **Frame memory.** While the headers are computed, `general_control`
   copies the PDU words into `frame_mem`:
   - The 66-byte header ends two bytes into word 8, so every PDU word is
     written shifted by two byte lanes, with byte enables.
   - When `ip_header` is done, the nine header words are written, the last
     one with only its two low byte lanes enabled.
4. **Send.** `frame_sender` reads the memory one word ahead of the
   AXI4-Stream handshake and sends the frame. It pulses `pkt_sent` at the
   end. Only then may the next datagram overwrite the memory.

   While a datagram is in the memory, `flow_encoding` is already collecting
   the next batch in the FIFO.

`sys_time_gen` provides:
- sysUptime in ms;
- unix_secs and unix_nsecs.

There is no wall-clock source, so these count from reset. A real deployment
would load an epoch offset.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| netflow_top / netflow_cache | `TABLE_DEPTH` | 16384 | flow entries (power of two; hash width = log2) |
| | `CYCLES_PER_MS` | 200000 | clock cycles per millisecond tick |
| | `INACTIVE_TIMEOUT` | 15000 | ms without packets before a flow is exported |
| | `ACTIVE_TIMEOUT` | 1800000 | ms after its first packet a flow is cut |
| | `NETFLOW_EXPORT_PRESENT` | 1 | 1: NetFlow v5 engine; 0: one plain frame per record |
| netflow_top / netflow_export | `N_FLOWS` | 30 | PDUs per datagram |
| | `WAIT_MS` | 60000 | ms a partial batch waits |
| netflow_export | MACs, IPs, ports | 00:02:00:00:00:02 / :01, 192.168.0.2 / .1, 2055 | collector and exporter addresses |
| netflow_cache | `EXPORT_FIFO_DEPTH` | 64 | records between the cache and its output |
| netflow_export | `PDU_FIFO_DEPTH`, `FRAME_DEPTH` | 256, 256 | 64-bit words |
| netflow_top / nfqdr_cache | `QDR_HASH_W` / `HASH_W` | 18 | hash width of the external table (3 x 2^18 = 786,432 flow slots) |
| | `QDR_CACHE_ENTRIES` / `CACHE_ENTRIES` | 8 | internal cache entries |
| nfqdr_mem_arbiter | `B_MAX_PENDING`, `MAX_READS` | 2, 16 | reads the sweep may have outstanding; reads in flight in total |

## Top-level ports

| Port | Meaning |
|---|---|
| `rx_*` | AXI4-Stream from MAC port 0: 64-bit `tdata`, `tkeep`, `tvalid`, `tlast`, `tuser` as the bad-frame flag; `rx_tready` is always 1 |
| `tx_*` | AXI4-Stream to MAC port 1 |
| `ready` | the table has been cleared after reset |
| `now` | the millisecond counter |
| `q_rx_*` | AXI4-Stream from MAC port 2, the link watched by the external-memory cache |
| `q_m_*` | its 30-byte records as AXI4-Stream packets |
| `q_mem_*` | its memory controller: `req`, per-module `we`, `addr` = {hash, word}, 432-bit `wdata`/`rdata`, `rvalid` |
| `q_ready`, `q_stat[0..12]` | its table has been cleared; its counters: accepted, rejected, dropped, created, updated, collisions, FIN/RST, cache hits, inactive, active, skipped, sweeps, exported |

The status counters come out as the array `stat[0..12]`:

| Index | Counter |
|---|---|
| 0 | accepted |
| 1 | rejected |
| 2 | dropped |
| 3 | created |
| 4 | updated |
| 5 | collisions |
| 6 | FIN/RST exports |
| 7 | inactive exports |
| 8 | active exports |
| 9 | skipped |
| 10 | sweeps |
| 11 | records exported |
| 12 | datagrams sent |

The reset `rst_n` is asynchronous and active low.

## Choices made where the source description is open or inconsistent

- **Table size.** The 14-bit hash gives 16,384 entries. The earlier
  4096-entry table size was not used.
- **Hash.** This design uses division by a primitive polynomial. An
  alternative description of the design mentions a hash using multipliers.
  The actual polynomial was never stated, so the one above is this design's
  own.
- **Byte count.** This design uses the IP Total Length. An alternative
  reading would count the bytes of the whole frame.
- **FIN/RST path.** Process A writes these exports straight into the export
  FIFO. They do not go through the timeout monitor.
- **Time source.** The reference hardware takes time from an external GPS
  time counter. Here a free-running millisecond counter since reset is used.
- **Left open, chosen here:**
  - the interlock between the two processes;
  - the export FIFO priority;
  - the plain record frame format;
  - every NetFlow header constant (engine type/id, IP identification, TTL,
    addresses, ports);
  - how the 66-byte header is placed in the 64-bit frame memory.

## The external-memory variant (`nfqdr_cache`)

`nfqdr_cache` is a second flow cache with the same stream ports as
`netflow_cache`. It keeps the flow table in three external QDR-II SRAM
modules instead of block RAM. It is an alternative to the on-chip cache.
`netflow_top` instantiates it beside the on-chip cache, on a third link
(MAC port 2). Its ports are brought out with a `q_` prefix:
- its record stream (`q_m_*`);
- its memory port (`q_mem_*`), the user side of a memory controller that
  returns reads in order;
- its counters (`q_stat`).

The parser, the hash, the export module and the millisecond counter are
shared with the on-chip design. The hash is 18 bits wide. Each hash code
owns three slots, one in each memory module, so the table holds
3 x 2^18 = 786,432 flows. Three flows with the same hash code coexist; only a
fourth is dropped.

Each flow takes two addresses. All three modules are addressed in lockstep
and have their own write enables.

| Address | Word (144 bits per module) |
|---|---|
| `{hash, 0}` | identity: 5-tuple, spare bits, busy bit |
| `{hash, 1}` | information: TCP flags, first and last timestamps, packets, bytes |

The blocks:

| Module | Role |
|---|---|
| `nfqdr_flow_lookup` | Process A. It asks the internal cache first. On a hit it updates the record and writes back only the information word. On a miss it reads both words of all three slots, then updates the matching slot, creates the flow in the first free slot, or drops the packet when all three hold other flows. FIN/RST packets are exported at once and their slot is cleared. |
| `nfqdr_internal_cache` | 8 fully associative entries of recently created or updated flows, keyed by hash code and slot. The look-up is combinational and replacement is round-robin. It has two invalidate ports, one for each process. |
| `nfqdr_mem_arbiter` | Shares the single memory port. Process A always wins. Process B is served only in cycles A does not ask, with at most two reads outstanding. Read data goes back to its owner through a queue of owner bits. |
| `nfqdr_timeout_monitor` | Process B. After reset it clears every identity word, then raises `ready`. It then sweeps the hash codes, reading both words of the three slots and exporting and clearing expired flows. A hash code Process A is working on is left for the next sweep. |

The create/update step is not a separate block here. It is folded into
`nfqdr_flow_lookup`, so that one state machine owns all of Process A's
memory traffic.

Timing with a 4-cycle read latency:
- a cache miss takes 6 + 4 = 10 cycles per packet, inside the 12-cycle budget;
- a cache hit takes 2 to 3 cycles;
- a controller latency above 6 cycles would break the budget on misses;
- one sweep of 2^18 hash codes takes about 10.5 ms at 200 MHz.

## What is not here

Outside this RTL:
- the QDR memories and their controller (`tb/qdr_model.sv` is a behavioural
  stand-in with a fixed read latency, for simulation only);
- the 10G MACs and PHYs;
- the configuration processor.

## Verification

Every block has a self-checking testbench in `tb/`. The two processes of
the external-memory cache are checked through `tb_nfqdr_cache`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. Shared reference code
is in `tb/tb_util_pkg.sv`:
- a bit-serial model of the hash;
- an Ethernet/IPv4/TCP/UDP frame builder;
- an Internet checksum;
- a complete NetFlow v5 datagram builder.

The main benches:

| Testbench | What it checks |
|---|---|
| `tb_flow_hash` | Every hash against the long-division model; one result per cycle. |
| `tb_pkt_parser` | Fields, IP options, rejected frames; 200 minimum-size frames at the worst-case 12-cycle spacing with nothing lost. |
| `tb_create_update_flows` | Every create/update/collision/FIN/RST case against a model, on a 16-entry table; the 2-cycle rate. |
| `tb_timeout_monitor` | Both timeouts, the skip on a clash with Process A, timestamp wrap, 2 cycles per entry. |
| `tb_netflow_cache` | Full 16,384-entry table, with the millisecond shortened. FIN/RST exports in order against a flow-level model; inactivity exports equal to the model's table; packet and byte conservation for flows cut by the active timeout. |
| `tb_netflow_export` | Datagrams compared byte for byte with the reference builder, full and timed. |
| `tb_netflow_top` | End to end, with shortened time. Every datagram is rebuilt from its PDUs and compared byte for byte, and every PDU is matched to a predicted record. It counts each mechanism and fails if any of them never happened: create, update, collision, FIN/RST export, inactive and active timeout, sweep skip, rejected frame, overflow drop, full datagram, timed datagram, transmit back-pressure. |
| `tb_nfqdr_cache` | The external-memory cache at 2^8 hash codes, against the memory model. Flows are forced four deep onto one hash code, so three are kept and the fourth is dropped. It checks cache hits, FIN/RST exports in order, inactivity exports equal to the model, active-timeout conservation, and no loss at 12-cycle spacing. |
| `tb_nfqdr_internal_cache`, `tb_nfqdr_mem_arbiter` | The cache against a model with the same replacement. The arbiter's priority, its limit on outstanding reads and its routing of reads back to the right owner. |
| `tb_netflow_top_full` | All parameters at their defaults (200 MHz millisecond, real timeouts, 30 PDUs). 30 flows of three packets each end with FIN and must come out as one 1506-byte datagram, byte-exact. |

The one-minute wait and the 15 s / 30 min timeouts are only exercised with
shortened time scales. At the real scale they would need 10^10 or more
cycles.

To run a bench with Verilator (5.x), from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_netflow_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/csum_pkg.sv rtl/flow_pkg.sv rtl/qdr_pkg.sv tb/tb_util_pkg.sv tb/tb_netflow_top.sv
./obj_dir/Vtb_netflow_top
```

Replace the last file and the `--top-module` with any other bench.
`--timing` is needed for the testbenches' delays. The RTL itself has none.
The simulator initialises nothing: all registers that are read are reset,
and the flow table clears itself.

## Limits worth knowing

- **Collisions lose packets.** The on-chip table has no second slot, so with many
  concurrent flows the loss becomes noticeable. With random addresses and n
  active flows, roughly n/16384 of new flows land on a busy entry.
- **The parser holds only one packet.** A stall on the collector port that
  lasts long enough will fill, in turn:
  - the export FIFO;
  - the PDU FIFO;
  - the frame memory.

  After that, FIN/RST packets stall Process A and frames are dropped. The
  drops are counted, not hidden.
- **The export engine keeps up with one record per minimum-size packet, but
  only just.** It spends about 13 cycles per record:
  - copying the PDUs into the frame memory;
  - then sending the frame from it.

  These two steps are not overlapped.
- **Timestamps are 32-bit milliseconds.** They wrap after 49 days; the
  subtractions are modular, so ageing is correct across the wrap.
- **The external-memory cache has only been run against a model memory.**
  The model answers every read after 4 cycles. A real QDR-II controller
  has a longer and less regular latency. On a cache miss, Process A needs
  6 cycles plus the read latency, so a latency above 6 cycles breaks the
  12-cycle budget for back-to-back new flows. Its full-size run covers
  only:
  - clearing the whole table after reset;
  - one flow, from its first packet to its FIN export.
