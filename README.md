# A two-tier message-passing network for a multi-FPGA multiprocessor

This RTL builds the communication fabric of a multiprocessor spread over several
FPGAs. On each FPGA, processors and hardware engines ("computing nodes") talk
to each other through small FIFOs and a network interface per node. Between
FPGAs, packets pass through gateway nodes onto serial links. Programs running on
the nodes use MPI-style `send`/`receive`. Software processors run that protocol
themselves. Hardware engines hand it to a message-passing engine (TMD-MPE) that
sits between the engine and the network.

The design has two ideas.

* **The network routes by rank.** Every packet header holds the MPI rank of its
  sender and receiver. A node's network interface knows which ranks lie behind
  each of its links: one rank for a neighbouring node, or a whole range for a
  gateway to another FPGA. So no routing table is kept anywhere else. Crossing
  to another FPGA is just "the destination falls in the gateway's range".
* **Messages use a rendezvous protocol.** A sender first sends a small
  *envelope*. Data moves only after the receiver answers with *clear-to-send*.
  A receiver therefore never buffers message data it did not ask for. It only
  stores 8-byte envelopes, which keeps memory small.

## Packets

Tier 1 (on-chip) packets are words on 33-bit FIFOs: 32 data bits plus a control
bit.

| word | contents |
|------|----------|
| header (control bit = 1) | `SRC[31:24]`, `DEST[23:16]`, `NDW[15:0]` |
| `NDW` data words (control bit = 0) | payload |

`SRC` and `DEST` are 8-bit ranks, so up to 256 nodes. `NDW` is the number of
data words. The control bit marks headers. A broadcast interface relies on it
to find the start of a packet without counting.

A Tier 2 (off-chip) packet wraps a Tier 1 packet:

| word | contents |
|------|----------|
| 1 | `SOP[31:24]` = `8'hA5`, `size[23:10]`, `seq[9:0]` |
| 2 | `src_addr[31:16]`, `dst_addr[15:0]` (link channel addresses) |
| 3 .. | the Tier 1 header and data |
| n-1 | Almost-EOP `32'hAEAEAEAE` |
| n | EOP `32'hE0E0E0E0`. The off-chip controller puts a CRC here. |

`size` counts every word of the Tier 2 packet, so it is `NDW + 5`. `seq` counts
packets modulo 1024. The SOP, Almost-EOP and EOP values are this design's
choice. The real values belong to the off-chip controller, which is not part of
this RTL. A Tier 2 packet is at most 512 words. The engine therefore never
puts more than 507 data words in one packet (512 − 4 Tier 2 words − 1 Tier 1
header).

All definitions live in `rtl/tmd_pkg.sv`.

## Network interfaces (NetIf)

Every node, computing or gateway, has one NetIf. Each NetIf has a direct link
to every other NetIf on its FPGA, so an FPGA with `M` nodes has `M·(M−1)` links.
Two styles exist, and they interoperate only within the same style. One FPGA
uses one style throughout.

**Selective (`netif_sel`).** On transmit, the header's `DEST` is compared with
a `[LRN, HRN]` rank range per outgoing channel. The matching channel is
latched in a destination register, and the whole packet (`NDW+1` words) goes
down that channel only. An unstalled packet takes `1 + (NDW+1)` cycles: one
cycle to decode, then one word per cycle. A packet whose rank matches no
channel is dropped.

On receive, everything that arrives is meant for this node. A linear priority
decoder picks the lowest-numbered channel that has a word waiting. That channel
is held in a source register until `NDW+1` words have been moved to the node.
Packets are never interleaved. A packet on a high-numbered channel can wait
behind a long one on a lower channel; that is the known weakness of this
scheme.

**Broadcast (`netif_bcast`).** On transmit there is almost no logic. The
head of the node's outgoing FIFO is wired to every other NetIf, and the FIFO is
popped by the OR of their read strobes. On receive, each NetIf watches the
heads of all the others. It takes a packet only if that head is a header whose
`DEST` lies in its own rank range. It picks among candidates by the same
linear priority and counts `NDW` words through. Every link toggles for every
packet, so this style costs more power than the selective one.

A computing node's range is its own rank. A gateway's range is all ranks of
the FPGA the gateway leads to.

## Crossing FPGAs: the bridge

A gateway node is a NetIf plus a `bridge`. The bridge has two independent
state machines:

* **Outgoing:** reads a Tier 1 header, sends the two Tier 2 header words, then
  the header and `NDW` data words, then Almost-EOP and EOP. Throughput is one
  word per cycle. Each packet adds four words of overhead.
* **Incoming:** discards words until one has `SOP` in its top byte. It then
  skips the second header word and passes the Tier 1 header on with its control
  bit set. It passes `NDW` data words, then consumes the two tail words.

The serial link controller and transceivers are outside this RTL. The top
brings out each gateway's Tier 2 word streams as FIFO-style ports: a read side
for outgoing words and a write side for incoming ones.

## The message-passing engine (TMD-MPE)

`tmd_mpe` is the block that needs the most care. It sits between a
computing element and its NetIf. Both sides are 33-bit FIFO ports. It is
half-duplex: one state machine does both send and receive. It only reads the
network while it is carrying out a command.

**Commands** are four words from the element:

1. opcode: `1` = send, `2` = receive
2. message size in words (any 32-bit value, 0 allowed)
3. `{local rank[31:24], remote rank[23:16], 16'h0}`
4. tag

For a send, `size` data words follow the command.

**Send.**

1. Emit the envelope: header with `NDW=1`, then the tag.
2. Wait for clear-to-send from the remote rank: header with `NDW=1`, then
   `32'hFFFFFFFF`.
3. Stream the data as packets of `min(remaining, 507)` words.

A zero-length send ends after the clear-to-send.

While waiting for clear-to-send, any other envelope that arrives is stored as
unexpected. Any other packet is read and thrown away.

**Receive.**

1. Search the unexpected-envelope queue for an entry with this source and
   tag. The search is linear, one entry per cycle.
2. On a hit, remove the entry: the last entry is moved into its slot, so the
   queue stays packed. Send clear-to-send.
3. On a miss, read the network. Store non-matching envelopes in the queue
   until the matching one arrives, then send clear-to-send.
4. Give the element a header `{SRC, DEST, NDW=0}` and the tag. Then copy
   data packets from that source to the element until `size` words have
   passed.

**Queue.** The queue holds `NUM_NODES` entries of two words each (header,
tag). That is enough for one pending envelope from every rank. `queue_level`
shows its occupancy. If it were ever full, further envelopes would be dropped;
an assertion flags that case.

**Deadlock to keep in mind.** A rendezvous send blocks until the receiver
posts its receive. The engine cannot receive while it sends. So two engines
that send to each other at the same time wait forever, each holding the
other's envelope in its queue. Programs must order pairwise exchanges, for
example even ranks send first and odd ranks receive first.

## PowerPC nodes: `dcr2fsl`

The PowerPC has no FIFO ports. It reaches the network over its DCR bus:

| address | write | read |
|---------|-------|------|
| `BASE+0` | push a data word (control bit 0) | pop a word from the incoming FIFO (0 if empty) |
| `BASE+1` | push a header word (control bit 1) | status `{29'b0, head-is-header, out_full, in_exists}` |

`dcr_ack` rises one cycle after a request to either address. A write to a full
outgoing FIFO is not acknowledged until there is room. Reads of other
addresses see `dcr_dbus_in` passed through, as on a DCR daisy chain.

## The Jacobi hardware engine

`jacobi_engine` is the example computing element. It solves the steady
heat equation on a grid, using the Jacobi iteration on horizontal strips of
the grid:

```
v[i][j] = (u[i-1][j] + u[i+1][j] + u[i][j-1] + u[i][j+1]) / 4
sum     = Σ (u[i][j] - v[i][j])²        (reported to the master every iteration)
```

Each engine owns `ROWS` rows of `COLS` values, where `ROWS ≤ MAX_ROWS` and is
given at run time. It also keeps a ghost row above and below. Columns 0 and
`COLS-1` are fixed edges. Numbers are IEEE single precision, so strips can be
exchanged with processors that use an FPU. The float units `fp_add` and
`fp_mul` round to nearest even and flush subnormals to zero.

The engine sits behind a TMD-MPE. Every exchange is one send or receive
command. A master node drives the engine as follows:

| step | direction | tag | contents |
|------|-----------|-----|----------|
| 1 | master → engine | `0x100` | `ROWS`, then `{up rank, down rank}`; `FF` means no neighbour |
| 1 | master → engine | `0x101` | the strip with both ghost rows, `(ROWS+2)·COLS` words |
| 2 | engine ↔ neighbours | `0x102` | row 1 goes up and row `ROWS+1` comes from below; row `ROWS` goes down and row 0 comes from above |
| 3–5 | engine → master | `0x103` | that iteration's sum of squares |
| 6 | master → engine | `0x104` | `0` = iterate again, else stop |
| end | engine → master | `0x105` | the strip, `ROWS·COLS` words; the engine then waits for a new step 1 |

**Exchange order.** Because the engine is half-duplex, two neighbours must
not both start with a send. Even ranks send first; odd ranks receive first.
The master computes the square root and compares it against the tolerance.

**Datapath and timing.** One adder and one multiplier are used in turn, so
each interior point takes 7 cycles. Then one cycle per value copies `v` back
into `u`.

## Putting a machine together

**`fsl_fifo`** is the link everywhere. It is a 16-word, 33-bit,
first-word-fall-through FIFO: `dout` is valid while `exists` is high. Assertions
catch overflow and underflow.

**`tmd_fpga`** builds one FPGA:

* `NUM_PE` computing nodes and `NUM_GW` gateway nodes.
* All NetIfs joined pairwise by FIFOs. Selective or broadcast is chosen by
  `BCAST`.
* One FIFO per direction between each node and its NetIf.

A computing node's kind is set by `NODE_KIND`:

| kind | node | what the outside sees |
|------|------|----------------------|
| 0 | software processor that runs the protocol itself | its FIFO pair (`pe_tx_*`, `pe_rx_*`) |
| 1 | hardware engine or processor behind a TMD-MPE | the element side of the engine |
| 2 | PowerPC | its DCR bus (`dcr_*`) |
| 3 | PowerPC behind a TMD-MPE | its DCR bus |

A kind 1 node whose `JACOBI` bit is set holds a built-in Jacobi engine.
Its element side is then internal. The `JAC_MASTER`, `JAC_COLS` and
`JAC_MAX_ROWS` parameters set the engine.

Gateway `g` gets rank range `GW_LRN[g]..GW_HRN[g]`. Computing node `j` has rank
`FIRST_RANK + j`.

**`tmd_top`** is the whole machine. By default it has:

* 5 FPGAs of 9 nodes each, so ranks 0..44. Node `j` of FPGA `f` has rank
  `9f + j`.
* On each FPGA, nodes 0–3 software, 4–6 TMD-MPE, 7–8 PowerPC.
* On FPGA 1, the three TMD-MPE nodes (ranks 13–15) hold built-in Jacobi
  engines, with rank 9 as their master (`JACOBI_MASK`, `JAC_MASTER`). This
  is the mix of four MicroBlazes, two PowerPCs and three engines. The other
  TMD-MPE nodes bring out their element side.
* 4 gateways per FPGA, so every pair of FPGAs has its own link. Gateway `g` of
  FPGA `f` leads to FPGA `g` if `g < f`, otherwise to FPGA `g+1`. Reading
  gateways 0–3 as A–D, this matches the published five-board wiring. For
  example, FPGA 0's A–D go to FPGAs 1–4, and FPGA 4's A–D go to FPGAs 0–3.
* FPGA 4 uses broadcast NetIfs; the others use selective ones.

Every port is a flat array indexed by node (`n = 9f + j`) or by link end
(`l = 4f + g`). To close a link between FPGAs `f` and `q`, connect link end
`l` to the end of the matching gateway on `q`:

* that gateway's index on `q` is `gp = (f < q) ? f : f − 1`;
* its link end is `l2 = 4q + gp`;
* connect `t2_tx_*[l]` to `t2_rx_*[l2]`, and the reverse.

Ports that a node kind does not use are tied to zero. For example, FIFO nodes
have an idle DCR bus and DCR nodes have idle FIFO ports.

## What is not in this RTL

* **Processors and off-chip parts.** The processors (MicroBlaze, PowerPC
  405), the off-chip link controller with its CRC and retransmission, the
  serial transceivers, and the memory controllers are taken as given parts.
  They connect at the top-level ports.
* **The Jacobi engine's original message protocol** is not reproduced.
  The protocol above is this design's own.
* **Collective operations.** Barrier, broadcast and reduce are built from
  send/receive in software. The engine does not implement them.

## Choices made where the source design is silent

* **Control bit.** It marks Tier 1 headers.
* **Packet codes.** The SOP, Almost-EOP and EOP values are this design's
  own. The following come from the original design:
  * the clear-to-send word `FFFFFFFF`;
  * opcodes 1 (send) and 2 (receive);
  * the field order of the engine's command: opcode, size, ranks, tag;
  * the field order of its output: header, tag, data.

  The design chose where the two ranks sit in the command's third word
  (bits 31:24 and 23:16). It also chose to put 0 in the output header's
  unused length field. The received message reaches the element as a single
  packet, with no 507-word limit.
* **Tier 2 framing.** `size` counts all words, and the 507-word data limit
  follows from the 512-word Tier 2 maximum.
* **Queue.** Its size is `NUM_NODES` entries, and a removed entry is filled
  from the back.
* **Unrouted packets.** A selective Netif drops a packet whose rank matches
  no channel.
* **Receiver resync.** The bridge receiver resynchronises on SOP.
* **`dcr2fsl` registers.** The register map and acknowledge timing are this
  design's own.
* **Reset.** It is synchronous and active high everywhere, with a single
  clock.
* **Configuration.** The mix of node kinds, the placement of the Jacobi
  engines and the broadcast/selective split in `tmd_top` are chosen so that
  one machine contains every kind of node and both NetIf styles.

Two lint warnings remain on purpose:

* Inside `tmd_fpga`, the status pins of the message-passing and Jacobi
  engines are left open.
* `dest >= LRN` is constant-true in a broadcast NetIf whose range starts at
  rank 0.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/tmd_pkg.sv tb/tb_tmd_top.sv \
          --top-module tb_tmd_top -o tb --Mdir obj_top
./obj_top/tb
```

The same command works for the other testbenches:

| testbench | what it covers |
|-----------|----------------|
| `tb_fsl_fifo` | random traffic against a queue model, full/empty |
| `tb_netif_sel` | range routing, dropping, priority order, whole-packet reception, stalls, timing |
| `tb_netif_bcast` | fan-out and OR-ed read, range filter, priority |
| `tb_bridge` | framing words, size and sequence fields, SOP resync, round trip |
| `tb_dcr2fsl` | register map, status, full-FIFO hold-off, pass-through |
| `tb_tmd_mpe` | envelope / clear-to-send, 507/507/86 packetizing, unexpected queue by source and tag, zero-length messages |
| `tb_tmd_fpga` | one FPGA of each NetIf style with software, MPE and DCR nodes and a gateway |
| `tb_jacobi_engine` | two engines (even and odd rank, edge strip), every command word, exchange order, sums and result against a bit-exact float reference |
| `tb_tmd_top` | the full 45-node machine at default parameters |

`tb_tmd_top` covers eight flows. It connects the link ends back to back and
runs them all at once:

* a 1200-word MPE message between FPGAs, whose envelope waits in the
  receiver's queue;
* MPE-to-MPE messages in both directions through the broadcast FPGA;
* a software-to-MPE rendezvous;
* two packets competing for one receiver;
* a 400-word packet held back by a receiver that stops reading;
* PowerPC sends and receives over DCR;
* three Jacobi engines solving an 8×60 grid for three iterations, driven by
  a master at rank 9. The convergence sums and the final grid must match a
  single-precision reference bit for bit.

The testbench counts each mechanism. A mechanism that never happens counts as
a failure. The full-size machine compiles in about a minute and simulates in
under a second.
