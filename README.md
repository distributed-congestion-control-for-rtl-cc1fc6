# Distributed congestion control for a mesh network-on-chip

Router buffers in a packet-switched network-on-chip are small, so a hot
spot can fill them within a few tens of cycles. This design detects early
signs of congestion at every router buffer, finds out which tile is sending
the offending traffic, and tells that tile to slow down. There is no central
controller: every router watches its own buffers, and every tile throttles
itself when told to.

The loop, for a 3x3 mesh:

1. A **buffer monitor** on each router output buffer sees the number of
   queued packets reach a threshold.
2. It searches a short history of recent packets for the one with the
   lowest priority that it has not reported yet.
3. It hands that packet's source address and priority to the router's
   **congestion monitor**.
4. The congestion monitor sends a *congestion notification* to the source
   tile over a separate control network.
5. The congestion monitor of the source tile receives it.
6. The tile's **AIMD window controller** halves its injection window.
7. The tile's **traffic shaper** then lets the tile inject only during that
   shorter window.

Steps 1–5 take three clock cycles when the control network adds no delay.
Steps 6–7 add two more. When no notification has arrived for 2048 cycles,
the window grows again by a fixed step.

## Packet header

Flits are 16 bits. Each packet begins with two header flits (`cc_pkg`):

| flit | fields |
|------|--------|
| 1 (routing) | message class [15:14], message tag [13:8], destination input port [7:4], destination address [3:0] |
| 2 | destination logic ID [15:7], **priority [6:4]**, **source address [3:0]** |

Routers look only at the first flit, so the two fields added for
congestion control do not change the routing. The traffic shaper of the
sending tile writes its own address and the tile's priority into flit 2.

**Priority 0 is the most important and 7 the least important.** A
buffer monitor therefore reports the packet with the *largest* priority
value, and the congestion monitor keeps the report with the *smallest*
value.

## Buffer monitor (`buffer_monitor`)

This is the core of the design. The monitored buffer (`router_buffer`)
provides four signals:

- `new_packet`: a packet's second header flit has just been written.
- `source` and `prio`: the source address and priority from that flit.
- `packets_outqueue`: the number of packets in the buffer.

The monitor holds three things: a `congested` flag, a history FIFO (the
*hFIFO*) and the search logic.

**Congestion.** `congested = enable && packets_outqueue >= threshold`.
Note the `>=`.

**History.** The hFIFO has `HISTORY_DEPTH` (4) entries. Each entry holds
`{notified, priority, source}`. Every new packet is shifted into entry 0,
and the oldest entry falls off the end. The settings control it as
follows:

- **depth** sets how much of the hFIFO the search looks at. Entry *i*
  takes part only when *i* ≤ depth. With depth 0 the search sees only the
  newest packet. If depth equals threshold − 1, the reported packet is
  always one that is still in the buffer. With a larger depth it may be a
  packet that has already left.
- **exemption**: a packet whose priority value is below `exemption`
  enters the hFIFO already marked `notified`. Such a packet can never be
  reported. It still counts towards congestion: exemption hides
  congestion from the control loop, it does not prevent it.

**Search (find_lowest).** While the buffer is congested, the monitor
takes all eligible entries (not notified, *i* ≤ depth). It picks the one
with the largest priority value, and the newest entry wins a tie. In the
next clock it outputs that entry's source and priority for one cycle on
`notif_*`, and it marks the entry `notified`. If congestion lasts, it
reports the next eligible entry one clock later, and so on until none is
left. The mark belongs to this monitor only. A monitor at the next hop
can report the same packet again.

Reset marks every entry `notified`, so an empty entry is never reported.

## Congestion monitor (`congestion_monitor`)

Each router has one congestion monitor. `congestion_controller` groups it
with the router's buffer monitors. That unit is the whole per-router
congestion logic: one monitor per output buffer, with slots the router
lacks left out through `PORT_EN`. The congestion monitor has three sides:

- **Buffer monitor side.** When several monitors report in the same
  clock, it keeps the report with the highest priority (smallest value;
  the lowest port index wins a tie) and drops the rest.
- **Control network side.** In *autonomous mode* (the reset state) it
  sends the kept report at once as a notification
  `{dest = packet source, sender = this router, prio}`. The notification
  uses `tx_valid`/`tx_ready` and stays valid until the network accepts it.
  A report that arrives while a notification is still waiting is dropped.
  A received notification is always accepted. It is latched in a mailbox
  and signalled on `rx_event` one clock later.
- **Microcontroller side.** A register bus with 16-bit words. Writes take
  effect at the clock edge. A read returns its data one clock after
  `bus_rd`.

| addr | name | access | contents |
|------|------|--------|----------|
| 0x0 | CTRL | rw | [0] autonomous mode (reset 1); [1] send slot busy (ro) |
| 0x1 | BUFMSK | rw | one enable bit per buffer monitor (cmBufMsk; reset all ones) |
| 0x2 | THRESHOLD | rw | congestion threshold in packets (reset 2) |
| 0x3 | DEPTH | rw | history depth minus one (reset HISTORY_DEPTH−1) |
| 0x4 | EXEMPTION | rw | priorities below this are never reported (reset 0) |
| 0x5 | TIMER | rw | free-running counter, +1 per clock |
| 0x6 | STAT_SENT | r, write clears | notifications sent |
| 0x7 | STAT_RECV | r, write clears | notifications received |
| 0x8 | LOCAL | r, read clears | [15] valid, [6:4] prio, [3:0] source of the latest local report |
| 0x9 | TX | w | send `{prio [6:4], dest [3:0]}` if the send slot is free |
| 0xA | RX | r, read clears | [15] valid, [14] overrun, [6:4] prio, [3:0] sending router |

Threshold, depth and exemption are shared by all monitors of a router.

**Manual mode.** Writing 0 to CTRL[0] turns off autonomous sending.
Reports are then no longer sent; they are only kept in LOCAL, which
holds the latest report in either mode. Software decides what to send
and sends it through TX.

## Traffic shaper and window control

**Traffic shaper (`traffic_shaper`).** It sits between a tile's network
interface and its router. Time is cut into periods of 2048 cycles. In each
period the window is open for the first `window` cycles. Flits pass only
while it is open, so a tile can use at most `window`/2048 of its link.
The check is made flit by flit, so a packet may be split across periods.
The shaper also stamps the tile's address and priority into each packet.
It can limit packet length as well. When a payload reaches `max_payload`
words (set through `len_wr`/`len_in`; reset 256, so nothing is cut), the
flit that reaches the limit leaves marked `last`. The shaper then sends
the packet's two header flits again, and the rest of the payload follows
as a new packet.

**AIMD window controller (`aimd_controller`).** It is the binomial window
rule with (k, l) = (0, 1), better known as additive increase,
multiplicative decrease:

- Each received notification halves the window, but never below 16.
- Each run of 2048 cycles without a notification adds `ALPHA` = 128, up
  to 2048.

Both events restart the 2048-cycle timer. The same loop could be run in
software by the tile's microcontroller. Here it is a small fixed-function
unit. It reacts in one clock, where a software polling loop would take
around a hundred.

## The mesh (`cc_noc`)

`cc_noc` is the top: a `MESH_X` × `MESH_Y` (3 × 3) array of nodes.

**Node layout.** Node *n* sits at x = n mod 3, y = n div 3, and its
address is *n*. Each node has:

- one `router_buffer` plus `buffer_monitor` per existing output port. The
  ports are local (0), north (1), east (2), south (3) and west (4). That
  gives 3 at corners, 4 at edges and 5 in the centre: 33 in all.
- one `congestion_controller`: the buffer monitors of those ports and a
  `congestion_monitor` with five monitor slots. Slots without a port are
  left out.
- one `aimd_controller` and one `traffic_shaper`.

**Parts outside the design.** The following are not part of this RTL and
appear as ports, indexed by node (and port):

| part | ports |
|------|-------|
| router crossbar | `buf_in_*` (writes into the buffers), `buf_out_*` (the link side) |
| control network | `cn_tx_*`, `cn_rx_*` |
| microcontroller | `uc_*` |
| network interface | `ni_*` into the shaper (with `ni_prio_*` and `ni_len_*` setting the tile's priority and length limit), `inj_*` out of it |

**Observation outputs.** `congested`, `window`, `win_open`,
`win_decrease` and `win_increase` let you watch the loop.

**Timing** from the clock *t* in which a buffer reaches its threshold,
with a zero-delay control network:

| clock | event |
|-------|-------|
| t | `congested` rises (combinational) |
| t+1 | the buffer monitor reports |
| t+2 | the congestion monitor drives `cn_tx_valid` |
| t+3 | the destination's mailbox and `rx_event` are set |
| t+4 | the AIMD controller has the new window |
| t+5 | the shaper uses it |

## Design choices and open points

The RTL follows the described architecture. The following are this
design's own choices, and they are where it is most likely to differ from
the original system:

- **Buffer size.** `BUF_FLITS` = 32 is not given. A packet counts as
  queued from its second header flit until its last flit leaves. A
  `last` sideband flag delimits packets.
- **Long packets.** Payloads can be up to 256 words, which is 258 flits.
  Such a packet is longer than a 32-flit buffer, so the buffer never
  counts more than two packets. At threshold 2, a stalled link is seen
  only if the stall catches the end of one packet and the start of the
  next inside the buffer. A threshold of 1 does not help: it flags every
  busy buffer. Short packets are fine. For long ones, either set the
  shaper's length limit so that two or more pieces fit in a buffer (a
  limit of 14 words gives 16-flit pieces), or make `BUF_FLITS` hold a few
  whole packets (virtual cut-through needs at least one anyway).
- **Threshold comparison.** It uses `>=`. A plain "above" reading would
  be `>`. `>=` is the one consistent with the depth/threshold behaviour
  described above.
- **Priority encoding.** 0 is the highest priority. The exemption
  semantics rest on this.
- **Congestion monitor interface.** The register map, bus timing, register
  widths and reset values are this design's. Received notifications go to
  a one-entry mailbox, not into processor memory.
- **Dropped reports.** Reports are dropped while a notification waits for
  the network. One report per clock is made during congestion.
- **Window.** The window is measured in cycles of a fixed 2048-cycle
  period. `ALPHA` = 128 and the minimum window of 16 are choices; the
  only rule is that alpha is greater than 1.
- **Control loop.** Packets are cut to the length limit by repeating
  their headers; a receiver sees the pieces as separate packets. The
  AIMD loop is hardware. The square-root variant (k = l = 0.5), slow
  start and handling of operating system commands are not implemented.
- **Surroundings.** The data router (routing and crossbar), the control
  network, the microcontrollers and the data network interfaces are not
  included.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_cc_noc \
  -y rtl -y tb +libext+.sv rtl/cc_pkg.sv tb/tb_cc_noc.sv -o sim
./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_buffer_monitor` | A reference model, cycle by cycle, plus directed cases: tie to the newest packet, depth 0, exemption 3, mask, one-clock report. |
| `tb_router_buffer` | Random packets with back-pressure against a queue model; `new_packet` timing; packet count. |
| `tb_congestion_monitor` | Register reset values and read-back; random arbitration against a model; hold and drop while busy; counters; mailbox and overrun; manual mode; timer. |
| `tb_traffic_shaper` | Gating against `phase < window`; exactly `window` flits per period; header stamping; clamping; the stream of cut packets against a model. |
| `tb_aimd_controller` | Window model under random notifications; halving, floor, cap; increase exactly R cycles after the last change. |
| `tb_congestion_controller` | One router's congestion logic under random traffic, random settings and random network back-pressure, cycle by cycle against a model; a left-out slot. |
| `tb_wl_controller_sizes` | The same random check at 1, 4 and 16 buffer monitors, and at history depths of 32 and 64. |
| `tb_wl_long_packets` | Full-size mesh with 258-flit packets: 2048 flits per period with the window open; detection of a stall; exactly `window` flits per period after throttling; with a 14-word length limit, 16-flit pieces and detection of a stall in the middle of a long packet. |
| `tb_cc_noc` | End to end at full size: congestion caused by tile 0 (whose packets are cut to a 3-word payload) throttles tile 0 with the latencies above; the window recovers after 2048 quiet cycles; exemption; simultaneous reports; mask; manual mode; send counter. It also counts each mechanism and fails if one never occurs. |

The top's parameters (`MESH_X`, `MESH_Y`, `BUF_FLITS`, `HISTORY_DEPTH`,
`PERIOD`) can be changed freely. The node address is 4 bits, so at most
16 nodes.
