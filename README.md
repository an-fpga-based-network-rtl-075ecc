# Dual-partition network middlebox with hitless remote update

A network box built on an FPGA normally stops forwarding while its
processing logic is replaced by partial reconfiguration. For a 3.7 MB
partial bitstream that is about 9 ms, or roughly 9 MB of traffic at 64 bits
per cycle and 100 MHz. This design avoids the outage with dual modular
redundancy. The application datapath exists twice, in two reconfigurable
partitions, RP_0 and RP_1. Both normally share the traffic. When a new
bitstream arrives over the network for one partition, that partition is
drained, held and reloaded through the FPGA's internal configuration port
(ICAP). Meanwhile the other partition carries every packet. When the reload
is done, the partition is re-initialised, put back into service, and a
status packet goes back to the sender.

The SystemVerilog here is the static logic around the two partitions, one
application to put in them (a learning switch), and behavioural models of
the SRAM and the ICAP primitive for simulation. The architecture follows the
published design by T. H. Tan, C. Y. Ooi and M. N. Marsono ("An FPGA-based
network system with service-uninterrupted remote functional update"). That
paper gives the block structure, the order of the update steps and the
bitstream sizes. It does not give the insides of most blocks. Everything
below that it leaves open is this design's own choice, and the sections say
where.

## Block diagram

```
 rx[0..3] ──► pkt_dispatcher ──(4 streams)──► ingress_allocator ──► RP_0: pkt_proc_module ─┐
                   │                                           └──► RP_1: pkt_proc_module ─┤
                   │ management packets                                                    ▼
                   ▼                                                           egress_allocator
            mgmt_pkt_handler ──── status replies ───────────────┐                          │ (4 streams)
                   │ bitstream words                             ▼                          ▼
                   ▼                                        plane_arbiter ◄─────────────────┘
            reconfig_handler ──► ICAP pins                       │
                   │                                             ▼
               sram_if ──► SRAM pins                        tx[0..3]
```

`dmr_middlebox_top` wires these together. Its ports are the four receive
and four transmit streams of the MACs, the SRAM pins, the ICAP pins, and
three status outputs: `rp_enable`, `reconfig_busy` and `load_cycles`.

## Packet streams

Every block boundary carries a valid/ready stream of `beat_t` (see
`rtl/mbox_pkg.sv`). A beat holds:

- 64 data bits, with frame byte 0 in `data[7:0]`;
- a byte-enable `keep`;
- `last`, which marks the final beat of a packet;
- `src`, the one-hot receive port;
- `dst`, the set of transmit ports, filled in by the application.

A beat transfers on a clock edge where both valid and ready are high. The
design assumes four ports and one clock for the whole datapath.

## The application path

- **pkt_dispatcher.** Each receive port holds the first beat of a packet
  until the second beat shows the EtherType (frame bytes 12–13).
  - Management packets use EtherType `0x88B5`. Those from all ports are
    merged, packet by packet and round robin, onto one stream to the
    management handler.
  - All other packets leave on their port's application stream.
  - This costs one cycle at the head of each packet. After that the packet
    streams at one beat per cycle.
- **ingress_allocator.** There is one allocation lane per partition. A lane
  may claim the next waiting port (round robin) only when its partition is
  both enabled (`rp_enable`) and idle (it holds no packet). The two lanes
  never claim the same port. So two packets from different ports are
  processed in parallel. When one partition is disabled, the other takes
  everything. Because a port is served by one lane at a time, the order of
  packets from each port is preserved.
- **pkt_proc_module** (one per partition). A learning switch with a
  16-entry content-addressable table of (MAC, port) pairs.
  - The destination MAC is matched on the first beat. A hit sends the packet
    to the learned port. A miss or a group address floods it to all ports.
  - The receive port is always removed from the set. A packet left with no
    port is dropped.
  - The source MAC is learned on the second beat. An existing entry is
    updated; otherwise entries are replaced first in, first out.
  - Latency is one register stage. Reset clears the table.
- **egress_allocator.** A partition's packet is granted its whole port set
  once no port in the set is held by the other partition's packet. Two
  packets with disjoint sets move at the same time. A flood is copied to
  every port of its set: each port takes the beat when it is ready, and the
  partition's beat is consumed when all ports have taken it.
- **plane_arbiter.** On each transmit port, a packet-level round-robin
  arbiter (`pkt_rr_arbiter`) chooses between application packets and the
  management plane's status replies.

## The remote update

This is the heart of the design, in `reconfig_handler` and
`mgmt_pkt_handler`.

### Management packet format

This format is this design's own. The source architecture does not specify
one.

| bytes | content |
|---|---|
| 0–5 | destination MAC (the device; not checked) |
| 6–11 | sender MAC, remembered for the reply |
| 12–13 | EtherType `0x88B5` |
| 14 | flags: bit 0 = first segment, bit 1 = last segment, bit 7 = reply |
| 15 | target partition (0 or 1) |
| 16… | bitstream bytes in file order, whole 32-bit words |

A bitstream can be split over any number of packets. They must arrive in
order. The handler turns each 64-bit payload beat into two 32-bit words,
most significant byte first, so the words are the bitstream's big-endian
configuration words. Packets with the reply bit set are ignored.

### Update sequence

For an update of partition R:

1. **STORE.** Words are written to SRAM, one per cycle, at word address
   `{R, index}`. That gives a 2^20-word (4 MiB) region per partition, enough
   for the largest bitstream. The first word of a "first" packet resets the
   index. The last word of a "last" packet starts the update.
2. **STOP.** `rp_enable[R]` drops, so no new packet is sent to R. The handler
   waits until R holds no packet: the module is idle and the ingress lane is
   not mid-packet.
3. **LOAD.** R is held in reset (`rp_rst_n[R]` low), and its valid/ready
   toward the static logic are forced low. This stands in for the
   decoupling that real partial reconfiguration needs. The handler issues
   one SRAM read per cycle and writes each returned word to ICAP: 32 bits
   per cycle, 3.2 Gbit/s at 100 MHz.
4. **RB (readback).** The handler writes the standard 7-series ICAP packets:
   dummy `FFFFFFFF`, sync `AA995566`, NOOP, a type-1 read of STAT
   (`2800E001`) and two NOOPs. It then switches ICAP to read and captures
   the status word. Finally it sends DESYNC (`30008001`, `0000000D`) and two
   NOOPs. The status word is passed on as it is, not interpreted.
5. **INIT.** R stays in reset for 16 more cycles. In this design that is
   what initialising the module means. Then it is released.
6. **DONE.** `rp_enable[R]` rises again. A three-beat status packet goes to
   the sender's MAC and port. It carries the partition index, the ICAP
   status word and the number of words loaded.

During all of this the other partition keeps serving traffic. New bitstream
words are refused (back-pressure) until the update ends. Only one update
runs at a time. A refused management packet holds up its receive port, so
application packets behind it on that same port wait until the update ends;
the other ports are not affected. Senders should therefore wait for the
status packet before sending the next bitstream.

### Out-of-service time

Partition R is out of service from the start of LOAD to the end of INIT.
That takes the word count plus 39 cycles: the SRAM path latency, the
readback program and the 16 INIT cycles. `load_cycles` reports the figure.
At the paper's sizes:

| partition | bitstream | words | cycles here | cycles reported in the paper |
|---|---|---|---|---|
| RP_0 | 3,666,884 B | 916,721 | 916,760 | 1,146,179 |
| RP_1 | 2,241,540 B | 560,385 | 560,424 | 700,758 |

The paper's cycle counts work out to 3.2 bytes per cycle. Its own statement
of a 32-bit ICAP bus at 100 MHz means 4 bytes per cycle. This RTL follows
the 32-bit, one-word-per-cycle statement. The two therefore differ by 25%.
Either way, no packet is lost, because the other partition stays in service.

## What is modelled, and what is left out

- **Partial reconfiguration itself** cannot be written as RTL. A reload is
  modelled as reset plus isolation of the partition. After the reload the
  partition holds the same `pkt_proc_module`, freshly initialised. On
  hardware it would hold whatever logic the bitstream describes. The
  paper's evaluation loads modules extended with deep packet inspection.
  Those are not described there, so they are not built.
- **ICAP** is a vendor primitive. `tb/icap_model.sv` accepts words, counts
  the bitstream and answers the STAT read. Its status value is `0x4000` in
  the low half, with the count of bitstream words in the upper half.
- **SRAM** is off-chip. `sram_if` assumes a generic pipelined synchronous
  SRAM with active-high strobes and a 2-cycle read latency.
  `tb/sram_model.sv` models it. A real board's QDR or DDR device would need
  its own pin interface here.
- **MACs** come from the board's framework. The top exposes their streams.
- The Input Arbiter and Output Queues of the earlier single-partition
  design are not part of this one.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `mbox_pkg` | `NUM_PORTS`, `DATA_W`, `NUM_RP`, `CFG_W` | 4, 64, 2, 32 | ports, data bus, partitions, ICAP word |
| top | `CAM_DEPTH` | 16 | switch table entries per partition |
| top | `RP_AW` | 20 | log2 of SRAM words per partition (SRAM address is `RP_AW+1` bits) |
| top | `SRAM_RD_LAT` | 2 | SRAM read latency |
| top | `INIT_CYCLES` | 16 | partition reset after the reload |
| top | `DEV_MAC` | 02:00:00:00:00:01 | source MAC of status replies |

`mbox_pkg` also holds the management EtherType and flag bit positions.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mbox_pkg.sv tb/tb_pkt_pkg.sv tb/tb_dmr_middlebox_top.sv \
    --top-module tb_dmr_middlebox_top
./obj_dir/Vtb_dmr_middlebox_top
```

| testbench | what it exercises |
|---|---|
| `tb_pkt_rr_arbiter` | no interleaving, per-input order, strict rotation, one beat per cycle |
| `tb_pkt_dispatcher` | routing of management, application and one-beat packets; rate |
| `tb_ingress_allocator` | idle-only hand-off, parallel partitions, one partition disabled |
| `tb_pkt_proc_module` | learned, flooded and dropped packets against a reference table; latency; reset |
| `tb_egress_allocator` | floods, empty sets, conflicts, simultaneous disjoint packets |
| `tb_plane_arbiter` | per-port merge of both planes, alternation under contention |
| `tb_mgmt_pkt_handler` | segmented bitstreams, flags, ignored replies, word rate, status packet bytes |
| `tb_reconfig_handler` | two updates, restart, refusal during update, wait for quiet, exact ICAP stream at one word per cycle, exact readback commands, report |
| `tb_sram_if` | data, latency, burst rate, write/read conflict |
| `tb_dmr_middlebox_top` | whole box, default parameters: continuous traffic from 8 hosts while both partitions are reloaded with 3,000- and 2,000-word bitstreams |
| `tb_full_size` | the same with the paper's bitstream sizes (916,721 and 560,385 words in 1,500-byte packets); runs in well under a minute |

The two top-level testbenches check that:

- no frame is lost or duplicated;
- no frame returns to its own port;
- ICAP receives each bitstream word for word;
- each reply is correct;
- the out-of-service time is within the expected bound.

They also count each mechanism and fail if one never happens: management
dispatch, both partitions busy at once, traffic during a reload, flood,
learned forwarding, own-port drop, a reply meeting traffic at the plane
arbiter, and transmit back-pressure.

## Changing the design

- **A different application.** Replace `pkt_proc_module`, keeping its
  ports. It must set `dst` in every beat and report `idle` truthfully, since
  both the allocator and the update sequence depend on it.
- **A different SRAM.** Replace `sram_if`, keeping its user side.
  `reconfig_handler` needs only `rd_valid` to come back in order.
- **Another management format.** This is confined to `mgmt_pkt_handler` and
  the EtherType test in `pkt_dispatcher`.
