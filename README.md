# Line-rate IPv4 router from persistent kernels

This is a small layer-3 IPv4 router. It follows the architecture in *OpenCL Based Design Pattern for Line Rate Packet Processing* (Khan, Athanas, Booth, Marshall). There, a router is built in OpenCL from two patterns. Only the TCAM lookup is written as RTL. Here the whole design is written as synthesizable SystemVerilog, and it keeps the same structure:

* **Persistent kernels.** Every block runs forever. It waits on its input channel, handles one item and writes the result to its output channel. No controller starts or stops the blocks.
* **Channels are FIFOs.** A block stalls only when its own input is empty or its own output is full. A slow table lookup therefore does not stop the parser.
* **Headers travel, packets stay.** Each packet is written once into an on-chip *packet server*. Only its Packet Header Vector (PHV) moves through the match+action stages. The PHV holds the header bytes plus metadata. The deparser reads the packet back and lays the edited header over it.

## Pipeline

```
 stream in ──► ingress ──► [chan 1→2] ──► parser ×2 lanes ──► [chan 2→1]
                  │                     (Eth/IPv4 parse, checksum verify)
                  │ write                                   │
                  ▼                                         ▼
           packet server                     IPv4 LPM stage   (ternary engine)
           (16 slots, 2 ports)                              │
                  │ read                     forward stage    (exact engine)
                  ▼                                         │
 stream out ◄── deparser ◄──────────────── send-frame stage (exact engine)
   (header overlay, checksum update, slot release back to ingress)

 control commands ──► update kernel of each stage ──► that stage's engine
```

| Stage | Key | Action on hit | On miss |
|---|---|---|---|
| IPv4 LPM (`ST_IPV4_LPM`) | destination IPv4 address | next hop = `action[47:16]`, egress port = `action[7:0]`, TTL − 1 | drop |
| forward (`ST_FORWARD`) | next-hop address | destination MAC = `action` | drop |
| send frame (`ST_SEND_FRAME`) | egress port | source MAC = `action` | drop |

A packet is also dropped in these cases:

* It is not plain IPv4: the EtherType is not 0x0800, the version is not 4, or the header carries options (IHL ≠ 5).
* Its header checksum is wrong.
* It is shorter than 34 bytes.
* It is longer than a buffer slot (1536 bytes).

A dropped packet still passes through every stage as a PHV marked `drop`. It skips the lookups, and the deparser releases its buffer slot. This keeps packets in order, and slot allocation depends on that order.

## The PHV (`router_pkg::phv_t`)

The PHV has two parts:

* `hdr`: the first 34 bytes of the packet (the 14-byte Ethernet II header and the 20-byte IPv4 header), as packed structs in wire order. Byte 0 is in the most significant bits.
* `meta`: the metadata.
  * Set by the ingress: ingress port, length in bytes, and the packet-server slot.
  * Set by the parser: the `eth_valid`, `ipv4_valid` and `csum_ok` flags.
  * Set by the LPM stage: next hop and egress port.
  * `drop`: can be set by any stage.

The ingress fills `hdr` with the raw bytes. Parsing is then a check of those fields, and the stages edit the fields in place.

## Packet server and the life of a slot

`packet_server` has 16 slots of 48 words of 256 bits each. A block RAM has two ports, so exactly two blocks use this memory and no arbitration is needed:

* The ingress writes on port A.
* The deparser reads on port B. Read data appears one clock after `b_re` and stays until the next read.

The ingress takes the next slot in ring order when a packet starts. Every block keeps packet order, so slots finish in the order they were taken. The deparser's one-clock `free_valid` pulse therefore always releases the oldest slot. When all 16 slots are in use, the ingress holds `in_ready` low. This is the router's only input back-pressure.

## Parser: two PHVs per clock

The FPGA clock is around 240 MHz, which is too slow for one packet per clock at line rate. So the parser is two lanes wide:

* `chan_fifo` can pop two items in one clock on its read side. It can also push two items in one clock on its write side.
* The parser reads up to two PHVs per clock. Each lane has its own `ipv4_checksum` instance.
* The parser writes both results one clock later. It advances only when the next channel has room for two.

Two PHVs are waiting only when the parser was blocked for a while. That happens when the LPM stage falls behind a burst of short packets.

## Match+action stages and the lookup engines

This is the part that sets the router's speed. A stage (`rmt_stage`) is built from these blocks:

* `rmt_query` builds the key and sends a query, tagged with the stage number, into a 2-entry query channel. In the same clock it parks the PHV in a 4-entry *pending* channel.
* The engine (`tcam_engine` or `exact_engine`) answers the queries in order.
* `rmt_result` pairs the oldest pending PHV with the next result and applies the action.
* `table_update` is the stage's control-plane kernel.

Match and action are separate blocks so that queries can queue up while the action side waits on the downstream stage.

### The TCAM engine

The TCAM engine is a plain scan, not a true TCAM:

* It holds 512 entries of {valid, 40-bit key, 40-bit mask, 48-bit action}. They are stored as 64 block-RAM banks of 8 rows; entry `i` is in bank `i/8`, row `i%8`.
* For each query, every bank reads two rows per clock (both RAM ports) for 4 clocks. Each bank keeps its first match.
* In the fifth clock, the lowest-numbered bank with a match wins. Its index and action data, with the query's tag, go into the result register.

Timing, from the clock the query is taken:

```
clk 0  accept query, read rows 0,1 of every bank
clk 1  read rows 2,3   compare rows 0,1
clk 2  read rows 4,5   compare rows 2,3
clk 3  read rows 6,7   compare rows 4,5
clk 4                  compare rows 6,7, pick the lowest bank, load result
clk 5  result valid; the next query is taken in this clock if the result is
```

Consequences:

* The engine does **one lookup every `BANK_DEPTH/2 + 1` = 5 clocks**. At 242 MHz that is 48.4 M lookups/s. It is the slowest block, so the whole router also does at most 48.4 M packets/s.
* A table write goes ahead of the next query and delays it by one clock. The write happens only between lookups, so a lookup never sees a half-written entry.
* Priority is by index: the lowest matching index wins. For longest-prefix match, the control plane must store longer prefixes at lower indices.

### The exact engine

`exact_engine` has the same interface and works the same way, with two differences:

* It stores no mask and matches on key equality.
* Its 512 entries are spread over 128 banks of 4 rows instead of 64 banks of 8. A lookup then takes `4/2 + 1` = 3 clocks: 80.3 M lookups/s at 241 MHz.

### Control plane

The host sends `ctl_cmd_t` commands on one channel: {`table_id`, `index`, `valid`, `key`, `prefix_len`, `action`}.

* Every `table_update` sees every command and takes only those for its own table. The router routes `ctl_ready` from the update kernel named by `table_id`.
* For the LPM table the kernel builds the mask. The 8 padding bits above the 32-bit address and the first `prefix_len` address bits must match.
* Keys are right-aligned in 40 bits: an IPv4 address, a next hop, or an 8-bit port.
* `valid = 0` deletes an entry.

## Deparser

For each PHV that is not dropped, the deparser:

* reads the packet from its slot, one word per clock;
* replaces bytes 0–33 with the edited header, computing a new IPv4 checksum for it;
* sends the words with start/end of packet, the empty byte count and the egress port.

After the last word has been taken, it releases the slot. There is one idle clock between packets. A 64-byte packet therefore takes 3 clocks, well under the 5 clocks of the TCAM engine.

## Interfaces of `router_top`

| Port group | Signals |
|---|---|
| Packet in | `in_valid/in_ready`, `in_data[255:0]` (byte 0 in bits 255:248), `in_sop`, `in_eop`, `in_empty[4:0]` (unused bytes in the last word), `in_port[7:0]` |
| Packet out | `eg_valid/eg_ready`, `eg_data`, `eg_sop`, `eg_eop`, `eg_empty`, `eg_port` |
| Control | `ctl_valid/ctl_ready`, `ctl` (`ctl_cmd_t`) |
| Status | `drops` (packets discarded), `slots_used` |

All channels are valid/ready with no ready latency. Reset `rst_n` is asynchronous and active low. Parameters: `LANES = 2`; `BANKS = 64` and `BANK_DEPTH = 8` for the LPM engine; `EX_BANKS = 128` and `EX_BANK_DEPTH = 4` for the two exact engines. Widths and sizes shared by all blocks are in `router_pkg`.

## What follows the published design and what is this design's own

These parts follow the published design:

* the kernel graph: ingress, parser, IPv4 LPM, forward exact, send-frame exact, deparser/egress, with the packet server beside them;
* channels as FIFOs;
* a two-port packet server shared by exactly two kernels;
* a parser that handles two packets per clock;
* IPv4 checksum verify at ingress and update at egress;
* split query and result kernels around an RTL lookup engine, with a control kernel per stage;
* a dedicated engine per stage;
* a naive TCAM that scans block-RAM data/mask pairs, eight per RAM, with 40-bit keys.

These are choices of this design:

* 256-bit stream words, 16 slots of 1536 bytes, 8-bit ports, 48-bit action data, and 512-entry tables. The TCAM uses 64 banks and the exact engines 128 banks. These counts are read from the published block-RAM counts of the two engines: 65 and 129.
* The lowest-index-wins priority, and reading two rows per clock.
* The actions of the three tables, taken from the usual three-table IPv4 router, and dropping on any miss.
* Carrying the raw header in the PHV.
* The ingress, not the parser, writing the packet server. The published block diagram draws the packet server next to the parser. Here the two memory ports go to the ingress and the deparser, which keeps the two-kernel limit.
* Overlaying the header at egress instead of writing it back to memory.
* The pending channel that carries each PHV from a stage's query block to its result block. The published stage diagram shows only the query and result paths through the engine.
* Feeding the deparser from the last stage's PHV channel, which tells it the slot, the port and the new header.
* All channel depths, the command format and the reset behaviour.

Known differences in performance:

* The exact engine does 80.3 M lookups/s at 241 MHz, against a published 57 M. How the published engine is organised is not described.
* The TCAM scan gives 48.4 M lookups/s at 242 MHz, against a published 45 M. The router's rate, one 64-byte packet per 5 clocks, is 48 Mpps, against a published figure of just under 40 Mpps.

## Not included

These parts are not included:

* **Alternatives to the built design.**
  * One TCAM shared by several stages, with results routed back by stage tag. The tag is present but unused.
  * Merging a stage's result kernel with the next stage's query kernel.
* **Platform parts.**
  * Host DMA and off-chip DDR as packet sources and sinks.
  * The Ethernet MAC/PHY.
  * Host software.
  * The stream and control ports are where these connect.
* **Features not in the design.**
  * Queuing and buffer management.
  * TTL-expiry handling.
  * IPv4 options.
  * Multiple egress queues. The egress port is a side-band field on the single output stream.

## Simulating

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/router_pkg.sv tb/tb_pkt_pkg.sv tb/tb_router_top.sv \
  --top-module tb_router_top -Mdir obj_top
./obj_top/Vtb_router_top
```

Other blocks work the same way: swap in `tb/tb_<block>.sv`. Verilator finds the other modules through `-Irtl`. `tb/tb_pkt_pkg.sv` builds packets and computes checksums byte by byte, so expected values do not come from the RTL.

`tb_router_top` runs the router at its default sizes and takes about 20 s. It does the following:

* Programs the three tables.
* Sends 100 minimum-size packets and checks the rate: 60 packets in exactly 300 clocks.
* Sends 400 mixed packets of 20–1518 bytes with random egress back-pressure, a forced long stall, and table writes during traffic.
* Compares every output packet byte by byte, and its port, with a reference router.
* Checks the drop count.
* Fails if any of these never happened: two PHVs parsed in one clock, egress back-pressure, all slots in use, a lookup skipped for a dropped packet, a table write during lookups, a miss in each table, a bad checksum, a non-IPv4 frame, a runt.

`tb_lookup_rate` runs both engines at their default sizes with full 512-entry tables. It offers 1000 back-to-back lookups to each and checks every result against a reference search. It also checks that the lookups are exactly 5 clocks apart (ternary) and 3 clocks apart (exact).

The unit testbenches use small engines so the reference search stays short: 4 banks × 8 rows for the TCAM (5-clock latency and rate) and 4 banks × 4 rows for the exact engine (3 clocks).

## Files

| File | Contents |
|---|---|
| `rtl/router_pkg.sv` | widths, header and PHV structs, command/query/result types |
| `rtl/router_top.sv` | the router |
| `rtl/ingress.sv`, `rtl/packet_server.sv`, `rtl/deparser.sv` | packet path |
| `rtl/parser.sv`, `rtl/ipv4_checksum.sv` | parse and checksum |
| `rtl/rmt_stage.sv`, `rtl/rmt_query.sv`, `rtl/rmt_result.sv`, `rtl/table_update.sv` | match+action stage |
| `rtl/tcam_engine.sv`, `rtl/exact_engine.sv` | lookup engines |
| `rtl/chan_fifo.sv` | multi-lane channel FIFO |
| `tb/tb_*.sv` | one self-checking testbench per block, `tb_lookup_rate.sv` for the engine rates, and `tb_pkt_pkg.sv` helpers |
