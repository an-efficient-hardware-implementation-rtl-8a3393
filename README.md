# Stigmergy Engine: AntNet routing in hardware

AntNet routes packets the way ants find food. Every node keeps, for each
destination, a probability for each neighbour. Nodes now and then send small
*forward ants* toward a destination. Each ant picks its next hop at random,
weighted by those probabilities, and records every node it passes with the
time it got there. At the destination the ant turns into a *backward ant*. It
walks the recorded path in reverse. At each node it measures how long the
trip from that node to the destination took and raises the probability of the
neighbour it used, by more when the trip was fast. Data packets then follow
the probabilities, so traffic drifts toward the routes that are fast at the
moment.

How well this works depends on how accurately the ants measure trip times.
If a CPU handles ants in software, its own variable processing time ends up
in the measurement. The Stigmergy Engine is an SoC peripheral that does all
of an ant's per-node work in fixed-function logic. It parses the packet,
detects loops, picks the next hop and updates the routing table. It is an
AMBA 2.0 AHB master, which it uses to fetch ant packets and routing tables
from system memory. It is also an APB slave, through which the host
configures it and starts work.

This RTL is a SystemVerilog implementation of that architecture. The
overall structure, the packet format and the three algorithmic units follow
the published design. Bus protocol details, the register map, the memory
layout and several corner cases are filled in here and are listed under
[Departures and own choices](#departures-and-own-choices).

## Block structure

```
   APB ──> apb_if ──> reg_set ──cmd/cfg──> topctrl <──> ahb_master <──> AHB
                         ^                  │  │  │
                         └──fin/result──────┘  │  └──> uptrtable   (routing-table update)
                                               ├─────> sellink     (next-node selection, 8-bit LFSR)
                                               └─────> setrfm      (reinforcement value, bCost)
```

| Module | Role |
|---|---|
| `stigmergy_engine` | top level, wires the blocks below, brings out AHB master, APB slave, `irq`, `ntp_time` |
| `topctrl` | FSM: reads the ant, checks it, runs the units, writes ant and tables back |
| `sellink` | roulette-wheel choice of the next neighbour, translated to its address |
| `setrfm` | reinforcement value `r` from the current and best trip time; keeps the best trip time (bCost) up to date |
| `uptrtable` | applies `r` to the routing-table row of the destination |
| `ahb_master` | single 32-bit AHB transfers with bus request/grant, wait states, ERROR |
| `apb_if`, `reg_set` | APB slave port and the register file |
| `lfsr8` | 8-bit maximal-length LFSR (x^8+x^6+x^5+x^4+1), used by `sellink` and for random destinations |
| `ant_pkg` | packet layout, type/command/result enums, configuration struct, register offsets |

Parameters: `NBR = 4` neighbours per node and `NDEST = 16` destinations. With
four neighbours, one routing-table row of byte probabilities fills exactly one
32-bit bus word. The packet layout expects `NBR = 4`; `NDEST` can be any power
of two.

## The ant packet

An ant is 160 bytes, held as 40 32-bit words in memory and inside `topctrl`.
Fields use the word and bit positions below; multi-byte values are whole
32-bit words.

| Word | Bits | Field | Meaning |
|---|---|---|---|
| 0 | 31:24 | Type | 0 = forward ant, 1 = backward ant (rest of word reserved) |
| 1 | 31:0 | sNode | address of the node that created the ant |
| 2 | 31:0 | dNode | address of the destination |
| 3 | 31:24 | pNodeOdr | position of the ant along its recorded path (see below) |
| 3 | 23:16 | tNodeNum | number of nodes recorded (rest of word reserved) |
| 4–15 | 31:0 | intNode[0..11] | addresses of the visited nodes, in visiting order |
| 16–39 | 31:0 | visTime[0..11] | 64-bit arrival time at each visited node, high word first |

An ant can record at most 12 nodes. Node times are 64-bit values of a
network-synchronised clock (SNTP style, 200 ps per unit). They enter the
engine on the `ntp_time` input. The clock itself is kept outside the engine.

## What the engine does with an ant

The host writes a command bit to CTRL. The engine works on the 40-word packet
at address `ANT` in memory, then raises `irq` (if enabled). It reports a
result code in STATUS and, in NEXTHOP, the address the host should send the
ant to.

**Creating an ant** (CTRL bit 1). The engine builds a new forward ant: it sets
sNode to this node, records this node with the current time as the first
visited node, and sets tNodeNum = 1 and pNodeOdr = 0. dNode is either the
DMAN register (manual mode) or, in random mode (CTRL bit 2), a random entry of
the destination table that is neither empty nor this node. The engine then
selects the next hop as for a forward ant and writes the packet out.

**Forward ant** (CTRL bit 0, Type = 0):

1. *Circle check.* If this node's address is already among the recorded
   nodes, the ant has looped. A loop would teach the tables a wrong route, so
   the ant is removed (result CIRCLE) and the packet is not written back.
2. *Record.* The engine appends this node and the current time. pNodeOdr
   becomes the index of this entry and tNodeNum grows by one.
3. *Turn around?* The ant turns if this node is dNode, or if tNodeNum has
   reached the maximum in MAXN (12 after reset). In the second case this node
   becomes the ant's destination: dNode is overwritten with this node's
   address. Type becomes backward, and NEXTHOP is the previously recorded
   node (result TURNED).
4. *Otherwise select.* The engine reads the routing-table row of dNode and
   `sellink` picks a neighbour (result FORWARD).

**Backward ant** (Type = 1). pNodeOdr counts down on the way back: the node
that receives a backward ant is `intNode[pNodeOdr-1]`, and the neighbour it
had used on the way out is `f = intNode[pNodeOdr]`.

1. The current trip time is `curCost = visTime[tNodeNum-1] - visTime[pNodeOdr-1]`.
   This is the time the ant took from this node to the destination. It is a
   64-bit difference, saturated to 32 bits.
2. The engine reads bCost of dNode from the traffic model, and `setrfm`
   computes `r`. If `setrfm` renews bCost, the new value is written back.
3. The engine reads the routing-table row of dNode, `uptrtable` applies `r`
   with neighbour `f`, and the row is written back.
4. pNodeOdr is decremented. If this node is the ant's source (index 0), the
   ant is consumed (result ARRIVED). Otherwise NEXTHOP is the node one step
   further back (result BACKWARD) and the packet is written out.

The following are rejected with result BAD and not written back: an unknown
Type, an unknown dNode, a backward ant that does not name this node at its
position, a hop that is not in the neighbour table, an all-zero
probability row, and an AHB ERROR response.

Only the row of the ant's destination is updated. Original AntNet also
updates the rows of every intermediate node on the path; this design does
not.

## Choosing the next node (`sellink`)

The row of dNode holds byte probabilities `P_0..P_3` (bits `8i+7:8i`). They
sum to about 255. Over four cycles `sellink` accumulates them into registers
`R_i = P_0 + … + P_i`. Over the next four cycles it compares each `R_i` with
an 8-bit pseudo-random number PRN. Among the registers with `R_i > PRN` it
keeps the smallest, in the register `R_temp`. Since the sums only grow, that
is the first one, so neighbour `i` is chosen with probability about `P_i/255`.
The index is then translated through the neighbour address table. The LFSR
steps once per selection. If no `R_i` exceeds PRN (a row summing below PRN),
the last neighbour with a non-zero probability is taken. Latency: `done`
comes 2·NBR+2 = 10 cycles after `start`.

## The reinforcement value (`setrfm`)

`setrfm` turns "how good was this trip" into a byte `r`. For destination d
it compares curCost with bCost, the best trip time to d seen recently:

```
if bCost of d is older than BTTH          -> bCost := curCost, r' = 0   (expired, re-initialised)
else if curCost <= bCost                  -> bCost := curCost, r' = 0   (new best)
else if curCost > CSTH (size threshold)   -> r' = 255                   (hopelessly slow)
else                                      -> r' = min(255, (curCost - bCost) >> norm_shift)
C_res = cres_max - min(cres_max, bCost >> cres_scale)
r     = (255 - r') >> C_res
```

So `r'` measures how far the trip was from the best. `255 - r'` inverts it into
a quality score. The shift by `C_res` scales that score: a large bCost means a
long route, where a given absolute difference matters less, so `C_res` falls
and `r` grows. How fast it falls depends on the network, so `cres_max`,
`cres_scale` and `norm_shift` are registers (RFM). The time limit on bCost
(BTTH) lets the engine forget a best time that is no longer reachable. The
size threshold (CSTH) cuts off the arithmetic for hopeless trips.

bCost values live in memory, one word per destination. The time each one was
last set is kept inside `setrfm`: one 32-bit stamp per destination, plus a
valid bit that reset clears. An entry that was never set counts as expired.
Results come one cycle after `start`.

## The table update (`uptrtable`)

With `r` read as `r/256`, neighbour `f` (the one the ant used) and the others `n`:

```
P_f <- P_f + r * (255 - P_f) / 256
P_n <- P_n - r * P_n / 256
```

The divisions truncate. One shared 8×8 multiplier handles one entry per
cycle, so a row takes NBR+1 = 5 cycles. The sum of a row stays close to 255
but drifts down slowly through truncation.

## Memory and bus

| Region | Address | Contents |
|---|---|---|
| ant buffer | `ANT` | 40 words, layout above |
| routing table | `RT + 4·k` | row of destination table entry k: `P_i` in bits `8i+7:8i` |
| traffic model | `TM + 4·k` | bCost of destination k (32 bits, time units) |

For `m` neighbours and `n` destinations the two tables take `m·n + 4·n`
bytes, which is 128 bytes here. The host must initialise rows (probabilities
summing to about 255) and bCost words (for example all ones) before ants
arrive.

The AHB master performs one SINGLE, NONSEQ, 32-bit transfer per word. It
raises HBUSREQ, waits for HGRANT with HREADY, drives one address phase and
then the data phase, and honours wait states. With an immediate grant and no
wait states each word takes 5 clock cycles, counting the handshake with the
controller. Processing a forward ant moves 81 words (packet in, row, packet
out), so it takes roughly 420 cycles plus the 10 cycles of `sellink`. That is
about 4 µs at the 100 MHz clock the original design was built for.

### Register map (APB, byte offsets)

| Offset | Name | Access | Content |
|---|---|---|---|
| 0x00 | CTRL | W/R | bit0 process the ant at ANT, bit1 create an ant (both self-clearing, ignored while busy); bit2 random dNode mode; bit3 interrupt enable |
| 0x04 | STATUS | R, W1C | bit0 busy, bit1 done (write 1 to clear), [7:4] result, [9:8] last selected neighbour |
| 0x08 | OWN | R/W | this node's address |
| 0x0C | ANT | R/W | byte address of the ant buffer |
| 0x10 | RT | R/W | byte address of the routing table |
| 0x14 | TM | R/W | byte address of the traffic model |
| 0x18 | DMAN | R/W | dNode for manual-mode creation |
| 0x1C | NEXTHOP | R | where to send the ant |
| 0x20 | BTTH | R/W | bCost time threshold (reset 0x0100_0000) |
| 0x24 | CSTH | R/W | curCost size threshold (reset 0x0010_0000) |
| 0x28 | RFM | R/W | [4:0] norm_shift (8), [10:8] cres_max (2), [20:16] cres_scale (16) |
| 0x2C | MAXN | R/W | maximum tNodeNum, 1–12 (12) |
| 0x40+4i | NBR[i] | R/W | neighbour address table |
| 0x80+4k | DEST[k] | R/W | destination address table (0 = unused); entry k owns routing-table row k |

Result codes: 1 FORWARD, 2 TURNED, 3 BACKWARD, 4 ARRIVED, 5 CIRCLE, 6 BAD.
The `irq` output is STATUS.done AND CTRL.bit3.

## Departures and own choices

The original design describes the blocks, the packet and the formulas. The
following are choices made in this RTL, and places where it differs:

- **Sizes.** The original design gives no number of neighbours or
  destinations. This RTL uses 4 and 16, which hold both example topologies
  below except possibly for node degree in the larger one.
- **Host handshake.** Packets are exchanged through a memory buffer, with a
  command register, a NEXTHOP register and an interrupt. The register map,
  the reset values and the result codes are this design's.
- **pNodeOdr on the way back**, the Type encoding, and **rewriting dNode**
  when the maximum tNodeNum is reached are interpretations.
- **norm()** is a saturating right shift. The **C_res law** is the linear
  rule above. The original only asks that C_res fall as bCost rises and be
  adjustable.
- **One bCost per destination.** The original describes bCost as the best
  time over the link to a given next node and destination. But its memory
  budget has room for only one 4-byte value per destination. This RTL keeps
  one per destination, so all neighbours are measured against the same best
  time.
- **bCost renewal:** an expired or beaten bCost takes the current trip time.
  Its time stamps are held on chip, because the external memory budget
  `m·n + 4·n` has room only for bCost itself.
- **Multiplier:** `uptrtable` uses an 8×8 multiplier for `r·P`. The original
  speaks only of comparators, adders and shifters.
- **Wiring:** in the original block diagram the three units talk only to
  the controller. Here the neighbour table and the `setrfm` thresholds go
  from the register set straight to the units. This is the same data over
  a shorter path.
- **Bus:** single transfers only (no bursts), HLOCK low, one clock for AHB
  and APB, asynchronous active-low reset.
- **Processing time** is not constant, since it includes AHB grant and wait
  states. The original aims to keep it short and regular but gives no cycle
  budget.
- **Not included:** the surrounding SoC (CPU, Ethernet MACs, memory
  controllers, other peripherals), the memory holding the tables, and the
  SNTP time client. The engine's bus ports and `ntp_time` input are where
  these connect.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_sellink` | 300 selections on random and sparse rows against the selection rule, LFSR sequence, address translation, 10-cycle latency |
| `tb_setrfm` | every branch (expiry, new best, saturation, normalised), C_res, bCost stamps, against a reference model |
| `tb_uptrtable` | 400 random rows and `r` values (including 0 and 255) against the update equations, 5-cycle latency |
| `tb_topctrl` | controller with the real units and a memory: creation (manual and random), forwarding, circle removal, turn at destination and at the maximum, backward updates at an intermediate node and at the source, rejection |
| `tb_ahb_master` | 2000 transfers against an AHB memory model with random grant delay and wait states; ERROR response |
| `tb_apb_if`, `tb_reg_set` | APB timing, every register, command pulses, W1C, interrupt |
| `tb_stigmergy_engine` | end-to-end at default parameters (below) |

`tb_stigmergy_engine` builds a four-node diamond: source 0, destination 3,
routes 0-1-3 and 0-2-3. It uses four engines, each with its own memory
model, and the testbench plays the hosts and the links. With the route
through node 1 made fast, node 0's probability of neighbour 1 for
destination 3 rises from 127 to about 247 within 50 ants. When the route
through node 2 becomes the fast one, the probabilities swap within 80 ants.
Later phases force turns at the maximum tNodeNum, random destinations and
saturation at the size threshold. The test counts each mechanism and fails
if one never happens. The whole run takes under a second in Verilator.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl rtl/ant_pkg.sv \
    tb/ahb_mem_model.sv tb/tb_stigmergy_engine.sv --top-module tb_stigmergy_engine
obj_dir/Vtb_stigmergy_engine
```

Block testbenches build the same way: `rtl/ant_pkg.sv`, the testbench, and
`-y rtl` to find the modules. `tb/ahb_mem_model.sv` is a behavioural AHB
memory used only by testbenches. It is not part of the design.

The two evaluations of the original design are covered as follows. The
four-node experiment is reproduced by `tb_stigmergy_engine`. The 13-node
comparison with the original AntNet is not simulated, because the links of
that topology are not given in text form.
