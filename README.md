# HNoC router node with adaptive key rotation aware obfuscation (AKRAO)

This is a network-on-chip router node with four ports. Inside the node, packets stay
obfuscated with a key, and the node replaces that key by itself while it runs. A word from
one of four 32-bit input ports travels to one of four output ports on one of two paths:

- **Normal path.** The *input switching allocator and buffer* queues the packet. The
  *AKRAO router core* then XORs its header and payload with the current key, computes its
  route from the obfuscated header and switches it through a crossbar. The crossbar wires
  and registers only ever hold obfuscated packets.
- **Bypass path.** The *forwarding buffer* skips the input allocator and the router core. It
  serves packets that ask for fast delivery, and packets that would otherwise wait in a
  congested input buffer.

Both paths end in the *output switching allocator and buffer*. It merges them, queues
packets per output port and delivers one packet per cycle as *Output Data* plus *Output
Address*. It also keeps the last word delivered to each port on a port register.

The key changes at a fixed interval, after a fixed number of packets, or on request. Each
packet carries the number of the key it was obfuscated with, so a key change never corrupts
a packet that is already inside the router.

```
            in_fast / congestion
 port_in[in_add] ──┬────────────► fwd_buffer ──────────────────────────────┐
 out_add           │                                                        ▼
                   └──► isabm ──► hnoc_router_akrao ─────────────────────► osab ──► out_data / out_addr
                        (queues,   (obfuscate ─► route ─► obf_crossbar      (merge,    port_out[0..3]
                         arbiter)   ▲            akrao_key_rotation)         deliver)
                                    └── in_ready low during a key rotation ("secure control")
```

## Packets and ports

A packet is a single flit of 37 bits (`hnoc_pkg::pkt_t`): a priority bit, a 2-bit source
port, a 2-bit destination port and a 32-bit payload. At the top level:

- On a cycle with `in_valid` high, the word on `port_in[in_add]` becomes the packet's
  payload and `out_add` becomes its destination. `port_in[0..3]` are ports A..D.
- If `in_ready` is low, the node has refused the packet, and the source must keep it on its
  inputs.
- `port_out[p]` holds the last word delivered to output port p. `port_strobe[p]` pulses for
  one cycle when that register changes.

The reference run shows what this means. The ports carry 14, 1E, 28, 32 (hex); port B is
sent to A and C. Then the ports carry 19, 23, 2D, 38; B is sent to A, and C is sent to B and
to C. The port registers end at A = 23, B = 2D and C = 2D, and D is never written.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `RES` | in | 1 | asynchronous reset, active high |
| `port_in` | in | 4 × 32 | input ports A..D |
| `in_valid`, `in_add`, `out_add` | in | 1, 2, 2 | inject the word of port `in_add` for port `out_add` |
| `in_prio` | in | 1 | high-priority traffic class |
| `in_fast` | in | 1 | ask for the bypass path |
| `in_ready` | out | 1 | the packet was taken this cycle |
| `fwd_perm` | in | 4 | destinations the bypass may serve |
| `rekey_req` | in | 1 | rotate the key now |
| `port_ready` | in | 4 | output port can receive |
| `out_valid`, `out_data`, `out_addr` | out | 1, 32, 2 | Output Data and Output Address |
| `out_ready` | in | 1 | the receiver takes the delivered packet |
| `port_out`, `port_strobe` | out | 4 × 32, 4 | last word per output port; update pulse |
| `congested`, `key_epoch` | out | 1, 3 | input buffer congested; number of the current key |

**Latency** with no contention, counted from the cycle in which `in_valid` is presented to
the cycle in which `out_valid` rises:

- normal path: 4 cycles (input queue, router entry register, crossbar lane, output queue);
- bypass path: 2 cycles (forwarding buffer, output queue).

The normal path accepts one packet per cycle. The only exception is a key-rotation cycle.

## Key rotation and obfuscation

This part is the least obvious. It lives in `akrao_key_rotation`, `obf_crossbar` and
`hnoc_router_akrao`.

**Obfuscation.** `hnoc_pkg::obfuscate` XORs the destination with key bits [1:0], the source
with key bits [3:2] and the payload with the whole 32-bit key. The priority bit stays in
clear, so the allocators never need the key. Applying the same key twice gives back the
original packet.

**Where packets are obfuscated.** The router core obfuscates a packet when it enters the
entry register. It recovers only the destination, in that register, to decode the route.
The packet crosses the crossbar and sits in its output lane register still obfuscated. It
is restored at the lane's exit, so the output side and the ports see clear words. The
bypass path stores packets unchanged: a packet that arrives already obfuscated from
elsewhere stays obfuscated.

**Where keys come from.** A 32-bit maximal-length Galois LFSR (x^32 + x^22 + x^2 + x + 1,
seed `SEED`) steps on every cycle. A rotation captures its current state as the new key.
The key value therefore depends on when rotations happen, not only on how many there have
been. A rotation is triggered by any of:

- `ROT_INTERVAL` cycles since the last rotation (default 64);
- `PKT_LIMIT` packets obfuscated under the current key (default 16);
- `rekey_req`.

**Epochs.** Each key has a 3-bit number, its epoch. The last eight keys stay in `key_hist`,
indexed by epoch. A packet records its epoch when it enters, and the crossbar restores it
with `key_hist[epoch]`, whatever the current key has become in the meantime.

A rotation writes the history slot of the next epoch. It is held back while any packet
inside the router still carries that epoch (the router reports this on `epoch_busy`). So
however long an output lane is blocked, no packet can lose its key.

**Secure control.** During the cycle in which a new key is written, the router core takes
no packet (`in_ready` low). The input allocator keeps its head packet and dispatches it in
the next cycle. Rotations cost one cycle of throughput each.

## Input switching allocator and buffer (`isabm`)

- **Queues.** There is one queue per destination port, `DEPTH` = 4 packets each. A packet
  is classified into the queue of its destination as it arrives.
- **Monitoring.** The block counts total occupancy. It raises `congested` at `CONG_THRESH`
  (12 of 16 entries).
- **Admission.** A packet is refused when its queue is full. While the buffer is congested,
  a normal-priority packet is also refused when its queue is already half full. This keeps
  room for high-priority packets.
- **Requests and arbitration.** Every non-empty queue requests the router. Queues win first
  if their head packet is high priority, or if their request has waited `AGE_LIMIT` (8)
  cycles. Aging stops a stream of high-priority packets from starving the other queues.
  Among equal requests, a round-robin arbiter chooses.
- **Dispatch.** The winning head leaves when the router accepts it.

## Forwarding buffer (`fwd_buffer`)

The forwarding buffer is a 4-entry FIFO. It checks two things before it takes a packet:

- the destination must be allowed by `fwd_perm`;
- it must hold fewer than `THRESH` (3) packets.

If it refuses, the packet falls back to the normal path.

The top sends a packet to the bypass when `in_fast` is set or the input buffer is
congested, provided the bypass accepts it. Otherwise the packet goes to the input
allocator. If that refuses too, `in_ready` is low.

## Output switching allocator and buffer (`osab`)

Each output port has a 4-entry queue. The queue's sources are the router lane of that port
and the forwarding buffer, when the forwarded packet is for that port. If both offer a
packet to the same queue in the same cycle, the two paths take turns and the loser waits.

On the delivery side, a round-robin arbiter picks one non-empty queue per cycle among the
ports whose `port_ready` is high. Order is kept per path and destination: packets of one
path to one port leave in the order they entered. Packets that took different paths may
overtake each other.

## Parameters

All parameters are on `hnoc_akrao_top`. Port count and widths are in `hnoc_pkg`.

| parameter | default | origin |
|---|---|---|
| `N_PORTS`, `DATA_W`, `ADDR_W` (package) | 4, 32, 2 | sizes of the original design |
| `KEY_W`, `EPOCH_W` (package) | 32, 3 | this implementation |
| `IN_DEPTH`, `CONG_THRESH`, `AGE_LIMIT` | 4, 12, 8 | this implementation |
| `FWD_DEPTH`, `FWD_THRESH` | 4, 3 | this implementation |
| `OUT_DEPTH` | 4 | this implementation |
| `ROT_INTERVAL`, `PKT_LIMIT`, `SEED` | 64, 16, 32'hACE1_2468 | this implementation |

Constraints:

- `IN_DEPTH` and `OUT_DEPTH` must be at least 2.
- `CONG_THRESH` must be at most 4 × `IN_DEPTH`.
- `SEED` must be non-zero.

At the defaults, synthesis gives about 780 flip-flops and 1.3 kbit of queue storage.

## How far this follows the original design

The original design description gives the block structure (the four blocks and the two
paths), the port names and sizes, and what each block is for. It does not give their
internal organisation. This implementation makes these choices:

- **Clock and handshakes.** The original design shows no clock port. Its only control
  inputs are the two addresses and the reset. Here every block is synchronous with
  valid/ready handshakes, and `in_prio`, `in_fast`, `fwd_perm`, `rekey_req`, `port_ready`
  and the Output Data / Output Address channel are added.
- **Meaning of the input address.** The prose describes the input address as the
  destination. The reference waveform shows it selecting the source port, with the output
  address giving the destination. This RTL follows the waveform.
- **Output width.** The reference waveform labels the output ports as 8 bits wide. The
  timing report and the I/O count imply 32 bits. The outputs here are 32 bits.
- **Mechanisms this implementation chose.** The original gives only the purpose of each of
  these:
  - queue per destination, aging rule, admission rule under congestion;
  - forwarding-buffer threshold and permission mask;
  - LFSR key source, the three rotation triggers, the epoch history;
  - XOR obfuscation and where it is applied and removed;
  - the merge policy at the output.
- **Not built.** The original lists look-ahead bypass route computation, shortest-path
  computation and parallel virtual-channel allocation among its components. It describes
  none of them. With a single router node, route computation here is a decode of the
  destination port, and there are no virtual channels.
- **Original figures not reproduced.** The original reports FPGA figures: 135 LUTs, 261 I/O,
  about 18 ns worst path. This RTL is not expected to reproduce them. It has more buffering
  and a wider interface (319 I/O bits).

## Files

| file | contents |
|---|---|
| `rtl/hnoc_pkg.sv` | sizes, packet type, obfuscation function |
| `rtl/hnoc_akrao_top.sv` | router node: steering and the four blocks |
| `rtl/isabm.sv` | input switching allocator and buffer |
| `rtl/fwd_buffer.sv` | forwarding buffer |
| `rtl/hnoc_router_akrao.sv` | router core: obfuscation, route computation |
| `rtl/obf_crossbar.sv` | crossbar with obfuscated lanes |
| `rtl/akrao_key_rotation.sv` | key source, rotation triggers, key history |
| `rtl/osab.sv` | output switching allocator and buffer |
| `rtl/sync_fifo.sv`, `rtl/rr_arbiter.sv` | FIFO and round-robin arbiter |
| `tb/tb_<module>.sv` | self-checking testbench of each block |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog fails it
if it hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/hnoc_pkg.sv tb/tb_hnoc_akrao_top.sv \
          --top tb_hnoc_akrao_top -Mdir obj_top
./obj_top/Vtb_hnoc_akrao_top
```

Replace `hnoc_akrao_top` with any other module name to run that block's testbench.

### What the end-to-end test does

`tb_hnoc_akrao_top` runs the node at its default parameters:

1. It replays the reference sequence above and checks the port registers.
2. It checks the 4-cycle and 2-cycle latencies.
3. It sends 3000 uniquely tagged packets under random traffic. The traffic includes phases
   with a stalled receiver and with blocked ports.

A scoreboard checks that every packet is delivered exactly once, on its destination port,
with its payload intact. The test also counts the mechanisms listed below and fails if any
of them never happened:

- bypass on request, bypass because of congestion, bypass refused by permission;
- input refusal, the secure-control stall, merge conflicts, aged requests;
- high-priority traffic, blocked ports;
- rotations by interval, by packet count and by request.

### Block testbenches

- `tb_isabm` checks admission, and the dispatch order against the order worked out by hand.
- `tb_fwd_buffer` checks permission, the threshold and FIFO order.
- `tb_akrao_key_rotation` checks each trigger against a reference LFSR, and the hold on a
  busy epoch.
- `tb_obf_crossbar` checks that lanes hold only obfuscated packets and restore them by
  epoch.
- `tb_hnoc_router_akrao` runs 400 random packets across about 85 key rotations.
- `tb_osab` checks the merge turns and delivery order.

Verilator lint warns about unconnected status outputs (PINCONNECTEMPTY) and about the reset
being used both as an asynchronous clear and in assertion `disable iff` clauses
(SYNCASYNCNET). Both are intended.
