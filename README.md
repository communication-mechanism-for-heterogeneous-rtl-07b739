# Multicast ring network for a two-layer image-processing computer

This RTL models the communication network of a heterogeneous image-processing
machine. A low-level layer of DSPs does pixel work. A layer of up to 15 PCs does
the symbolic, high-level work. A Master Controller (MC) hands out tasks. All of
them talk over QuickRing: point-to-point rings that move one 42-bit symbol per
ring clock (40 MHz) from node to node.

The central idea is to use the ring's **multicast** mode for everything. Every
packet carries a 16-bit mask of destination nodes. Each node on the way:

1. takes a copy if its own bit is set;
2. clears that bit;
3. passes the packet on while bits remain.

One transmission can therefore feed any subset of the PCs, for example one
image strip to every PC that needs it.

The system has two rings:

- **CCN ring (control and communication network):** node 0 is the MC, node 1 is
  the DSP Layer Controller (DLC), and node 2 is a bridge.
- **PC ring:** node 0 is the other side of the bridge, and nodes 1..15 are PCs.

The bridge is two ring controllers placed back to back. Between them sits an
**Address Conversion Decoder**. An 8-bit group field in each packet head picks
the destinations on the far ring. The decoder turns it into a new mask.

## Blocks and data flow

```
client Tx ─► qr_tx_port ─► async_fifo(32) ─► qr_tx_router (X/Y FIFOs) ─┐
                                                                       ▼
Up ring ─► ring_deserializer ─► qr_mcast_handler ──forward──► qr_ring_out ─► ring_serializer ─► Dn ring
                                    │ copy
                                    ▼
             qr_head_stripper ─► qr_target_fifo(3 pkts) ─► async_fifo(8) ─► qr_rx_port ─► client Rx
```

`qr_controller` wires the chain above into one ring node. `bridge_hop` joins two
controllers through `acd_path` (forward and reverse). `hetero_ccn_top` builds the
3-node CCN ring and the 16-node PC ring. `qr_pkg` holds the shared types.

| module | role |
|---|---|
| `qr_tx_port` | 4-stage input pipeline. Drops nulls, reserved codes, payloads before the first head, and repeated heads. Drives TxOK. |
| `async_fifo` | Gray-pointer dual-clock FIFO, used as the Tx (32) and Rx (8) resynchronizers. |
| `qr_tx_router` | Puts each stream into X or Y (one stream per FIFO, 42 entries each) and cuts it into packets. |
| `qr_ring_out` | Ring/Multicast FIFO (40) plus the downstream multiplexer. Decides between forwarding and launching a local packet. |
| `qr_mcast_handler` | Makes the copy and forward decisions at each head. |
| `qr_head_stripper` | Rotates directed-head routing fields. Removes redundant variable-length directed heads. |
| `qr_target_fifo` | Receive buffer counted in whole packet slots (3 × 21 symbols). |
| `qr_rx_port` | Client receive port with RxSTALL and early type. |
| `ring_serializer` / `ring_deserializer` | Send a 42-bit symbol as 7 six-bit sub-symbols, with an error-detection code (EDC). |
| `acd_forward_lut` / `acd_reverse_lut` | The two address conversion tables. |

## Packets on the ring

A client writes a stream: a head word, then any number of payload words. The
controller cuts the stream into ring packets. Each packet is the head followed by
at most 20 payloads, and its last payload is marked as a tail. A packet closes:

- at a tail written by the client, or
- at the 20th payload, or
- when the client starts a new stream while the old one still has payloads
  waiting.

Each packet repeats the stream's head, with the source field overwritten by the
node's ID. The receiving client therefore sees one head per packet. Each packet
ends in a data-tail (or frame-tail) type code.

At every packet boundary the downstream multiplexer chooses what to send next:

- **Local packet:** it starts only if at most 12 forwarded symbols are waiting in
  the 40-entry Ring/Multicast FIFO. The FIFO then has room for everything that
  arrives during the 21 cycles the local packet takes.
- **Forwarding:** takes priority while the backlog is larger.

Packets are never interleaved. When nothing is ready, the node sends a null.

Multicast receive rules (`qr_mcast_handler`):

- **Own bit set, Target FIFO slot free:** copy the packet and claim the slot. The
  slot comes back when the packet's tail leaves the Target FIFO.
- **Own bit set, no slot free:** the copy is lost for this node. It is counted as
  `ev_mc_drop`. Multicast has no retransmission, so the sending software has to
  budget receive buffers.
- **Forwarding:** the own bit is cleared. The packet goes on only if bits remain
  and it has not returned to its source.

## Address conversion

The group field is head bits [23:16].

**Forward (CCN → PCs).** The low nibble L and the high nibble H of the group field
select the PC-ring mask:

- **L = 0:** H selects one of 16 fixed patterns that spread work evenly (every
  2nd PC, every 3rd, ...). For example 0x10 → 0xAAAA and 0x20 → 0x5554.
- **L ≠ 0:** the PCs from L up to H. The range wraps past 15 back to 1, so
  0x37 → nodes 7..15 and 1..3. H = 0 ends the range at node 15.
- **Mask bit 0** (the bridge itself) is always 0.

**Reverse (PCs → CCN).** Group bit k selects CCN node k. Bit 2, the bridge, is
forced to 0. A PC reaches the MC with group 0x01, the DLC with 0x02, or both with
0x03. In both directions the group field and the rest of the head travel
unchanged. The bridge's own controller fills in its source ID.

## Ring symbol and timing

A ring symbol is `{type[1:0], frame, data[31:0]}` followed by a 7-bit EDC. It is
sent most significant slice first. Sub-symbol 1 thus carries the type bits, the
frame bit and data[31:29], and sub-symbols 6–7 carry the EDC, as in the QuickRing
channel map. Two parts are this design's own:

- **Type codes:** head = 00 (frame bit 1 = multicast, 0 = directed), payload = 01,
  tail = 10, access/null = 11.
- **EDC:** interleaved parity. Bit i covers symbol bits i, i+7, … It catches any
  single-bit error and any burst of up to 7 bits. A bad symbol becomes a null and
  sets the sticky `ring_abort`.

`ss_clk` must be exactly 7 × `rg_clk` with aligned rising edges. All clocks leave
reset on a common edge, which aligns the serializer and deserializer phase
counters. Client ports use non-pipelined timing: type and word in the same
cycle. TxOK falls when 20 places remain in the Tx pipeline plus resynchronizer. A
client that stops within 20 symbols loses nothing.

## Where this departs from the QuickRing part, or goes beyond what is specified

- Only the multicast datapath is built. Directed heads are routed best-effort:
  copied at the target if a slot is free, otherwise forwarded. The
  voucher/ticket reservation, the low-bandwidth FIFO and its target handlers are
  absent.
- The following are not modelled:
  - pipelined client timing (PIPE);
  - the RxS tri-state;
  - LVDS pads;
  - clock generation;
  - error recovery beyond the sticky abort flag.
- These are choices made for this design:
  - the EDC code and the ring type-code values;
  - the 40-entry Ring/Multicast FIFO depth;
  - alternating X/Y service;
  - how a forwarded packet waits for late symbols (it sends nulls in between).
- The processors (MC, the DLC's two DSPs, the PCs and the low-level DSP array)
  are software and are not included. Their client ports are ports of
  `hetero_ccn_top`.
- Control messages: `qr_pkg` defines a first-payload-word layout
  `{type[31:29], task id[28:24], body[23:0]}` and a status-report layout. The
  network itself carries any words.

## Simulating

Every testbench checks itself, prints `TB_RESULT checks=N failures=M`, and has a
watchdog. Build one with plain Verilator, for example:

```
verilator --binary --timing --assert --top-module tb_hetero_ccn_top \
    -Irtl -y rtl rtl/qr_pkg.sv tb/tb_hetero_ccn_top.sv -o simv
./obj_dir/simv
```

| testbench | what it shows |
|---|---|
| `tb_hetero_ccn_top` | The full system at default size (3 + 16 nodes), in four phases: (1) status reports from all PCs reach the MC; (2) instruction plus 100 data words go to the DLC, and a broadcast goes to all PCs; (3) a pattern multicast goes to the odd PCs; (4) a 200-word burst goes to a stalled PC, causing overflow drops, while another PC sends to the MC. It counts launches, deferred forwarding, both conversions, drops and TxOK going low, and fails if any never happened. |
| `tb_qr_controller` | Two-node ring: packetization, the directed-head rotation and stripping, the ring rate (20 payloads per 21 cycles), overflow on a stalled receiver, and wire-error detection. |
| `tb_bridge_hop` | Both conversion directions through a real bridge. |
| `tb_acd_lut` | Every one of the 256 codes for both tables, against an independent model. |
| `tb_ring_serdes` | The channel map, the latency, and every single-bit wire error. |
| others | One per block: `tb_qr_tx_port`, `tb_qr_tx_router`, `tb_qr_ring_out`, `tb_qr_mcast_handler`, `tb_qr_head_stripper`, `tb_qr_target_fifo`, `tb_qr_rx_port`, `tb_async_fifo`, `tb_acd_path`, `tb_qr_pkg`. |

To change the system size, use `hetero_ccn_top #(.N_HP(n))`. It supports up to
15 PCs, since 4-bit node IDs allow 16 nodes per ring. Buffer sizes are parameters
of `qr_controller`.
