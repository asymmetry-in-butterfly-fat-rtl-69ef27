# Asymmetric Butterfly Fat Tree network-on-chip

A butterfly fat tree (BFT) is a hierarchical packet-switched network that is
cheap to build on an FPGA. Processing elements (PEs) sit at the leaves. Each
level is built from one of two switch types:

- **t switches** have one parent port, so they narrow the bandwidth going up;
- **pi switches** have two parent ports, so they keep it.

By picking t or pi per level, the designer sets how much bandwidth each level
has. A classic BFT is symmetric: all subtrees at a level use the same switch
type. When an application's traffic is unbalanced (for example, after a graph
is bisected, one half talks far more than the other), this wastes area on
quiet subtrees and starves busy ones.

This RTL implements an **asymmetric BFT**. Each quarter of the tree can have
its own switch composition, so a busy quarter gets many more channels than a
quiet one. Where two sibling subtrees of different widths meet, a
**converging switch** joins them and narrows them to the width the parent
level expects. It is built from t switches, with **t-random** switches in its
upper stages to spread traffic over the wide side.

The default configuration is a 256-PE network. Its quarters provide 64, 16, 8
and 8 up channels, and a 64-16-8 converging switch sits above the two dense
quarters.

## Packets and channels

A channel carries one single-flit packet per cycle in each direction. A packet
is the packed struct `bft_pkg::pkt_t` (52 bits):

| field   | bits | use |
|---------|------|-----|
| `valid` | 1    | the channel carries a packet this cycle |
| `addr`  | 8    | destination PE (0-255) |
| `seq`   | 11   | sequence number; carried for the PE's reorder buffer and never read by a switch |
| `data`  | 32   | payload |

There is no flow control between switches. A packet that arrives at a switch
always leaves it on the next clock edge. The only place a packet can be held
back is at injection: a PE's packet is refused when the switch next to it
cannot take it.

## Deflection routing inside a switch

All switch types share one arbitration core, `bft_switch`. It has two child
ports and NP parent ports: 1 for t, 2 for pi, and 0 for the root. It has no
buffers. Its outputs are registered, so each hop takes exactly one cycle.

A switch at level `L` serves the PEs whose address starts with the `L`-bit
`PREFIX` of its subtree. Level 0 is the root and level 7 is next to the PEs.
Each packet has a desired output:

- if its destination is **outside** the subtree, it wants any parent port;
- if its destination is **inside**, it wants the child named by address bit
  `7-L`. In a **t-random switch**, it instead wants the child named by a bit
  that flips every cycle: left in one cycle, right in the next. The address
  bit is ignored.

Because the number of inputs equals the number of outputs, every packet can
always be placed. The order of placement is:

1. **Parent inputs first.** A packet that comes down from a parent but is not
   for this subtree was deflected into it by mistake. It takes a parent port
   ahead of everything else, so it is turned back up in the very next cycle.
2. **The two child inputs next.** Their order swaps every cycle (using the
   same toggle bit as the t-random direction), so that neither child can
   starve the other.
3. Each packet takes its desired port if that port is still free.
4. **Losers are deflected.** A packet that lost its port takes the first free
   port, in the order parents, left child, right child. The `deflect` output
   marks cycles in which this happened.

A deflected packet is not lost. If it went down into the wrong subtree, the
switch there sees it is foreign and sends it straight back up. If it went up
while its destination is below, the parent sees that it belongs to its own
subtree and sends it back down.

**Switches next to the PEs** (level 7) follow two extra rules, because a PE
must only receive packets addressed to it:

- Packets from parents are placed first. A parent packet that loses its PE
  port goes back up.
- Only then is a PE's injection considered. It is accepted (`c_rdy`, which
  becomes `pe_rdy` at the network boundary) only if its desired port is still
  free. Otherwise the PE must present it again.

`pe_rdy` is combinational from `pe_in` and the switch state. A PE offers a
packet, samples `pe_rdy` in the same cycle, and drops the packet only if it
was accepted.

## Subtrees and channel widths

`bft_subtree` builds a symmetric subtree from the PEs up to a root level
`LEVEL`. Its parameter `COMP` has one bit per level: 1 for pi, 0 for t.

Each switching node holds one switch per up channel of its child nodes.
Switch `j` pairs channel `j` of the left child with channel `j` of the right
child. Parent port `k` of switch `j` becomes up channel `j + k*WC`. As a
result, a pi level doubles the channel count and a t level keeps it. The
number of up channels leaving a level-`l` node is computed by
`bft_pkg::up_width`.

The three subtree types of the default network are listed below, from level
7 (next to the PEs) up to level 2:

| type | composition (level 7 to level 2) | `COMP` | up channels at level 2 |
|------|----------------------------------|--------|-------------------------|
| dense (st-0, AS1) | pi pi pi pi pi pi | `8'hFC` | 64 |
| medium (st-1, AS1) | pi t pi t pi pi | `8'hAC` | 16 |
| sparse (st-2, st-3) | t pi t pi t pi, then t at level 1 | `8'h54` | 8 (8 at level 1) |
| AS0 dense (st-0, st-1) | pi pi pi t pi pi | `8'hEC` | 32 |

## The converging switch

`converging_switch` sits at level 1, above two quarters that have `WL` and
`WR` up channels. It delivers `WP` channels to the root. Its stages, from the
children up, are:

1. **Pre-stages** run only when `WL != WR`. Columns of t switches halve the
   wider side until it is as wide as the narrow side. Both children of such a
   switch lead into the same quarter, so these switches behave as switches of
   that quarter's level, level 2. A packet that was wrongly deflected into the
   wide side is recognised as foreign and sent back up.
2. **Pairing stage.** `min(WL,WR)` t switches. Switch `j` takes channel `j` of
   each side. These are ordinary level-1 switches: they choose the side from
   the address, so each packet ends up in the correct quarter.
3. **t-random stages.** Columns of t-random switches halve the width until it
   equals `WP`. Coming down, they send packets alternately left and right.
   This spreads the packets over all the pairing switches, and from there
   over all the wide channels. Plain t switches would push every packet for
   one side onto the same edge of the tree.

In every column, switch `j` pairs channels `j` and `j + width/2` of the column
below.

| network | `WL-WR-WP` | pre-stages | pairing | t-random stages | switches |
|---------|-----------|------------|---------|-----------------|----------|
| AS1 (default) | 64-16-8 | 2 (32 + 16 switches) | 16 | 1 (8) | 72 |
| AS0 | 32-32-8 | 0 | 32 | 2 (16 + 8) | 56 |
| example | 16-8-2 | 1 (8) | 8 | 2 (4 + 2) | 22 |

Without deflection, a packet crosses the converging switch in
`log2(max/min) + 1 + log2(min/WP)` cycles, counted from the wide side.
Counted from the narrow side, the `log2(max/min)` term drops out.

## The 256-PE network

`asym_bft` is the top level. It places four 64-PE quarters at level 2 (st-0
to st-3, `PREFIX` 0 to 3), a level-1 node above each pair, and a root.

- Each level-1 node is chosen by `L1_KIND*`. It is a t node or a pi node when
  its two children are equally wide, or a converging switch
  (`L1_CONVERGE`, width `CNV_W*`).
- The root has one two-port switch for each channel that arrives from each
  half. The two halves must arrive with the same number of channels, which is
  checked at elaboration.

The defaults give AS1:

- st-0 is dense, st-1 is medium, and a 64-16-8 converging switch joins them;
- st-2 and st-3 are sparse and are joined by a t node;
- there are 8 root switches.

For AS0, set `COMP_ST0 = COMP_ST1 = 32'hEC` (the converging switch becomes
32-32-8).

The table gives the delivery latency of a lone packet in an idle AS1 network
(one cycle per switch on the path):

| from to | path | cycles |
|---------|------|--------|
| PE 0 to PE 1 | level-7 switch | 1 |
| PE 0 to PE 63 | up to level 2 and back | 11 |
| st-0 to st-1 | 6 up, 2 pre-stages, pairing, 6 down | 15 |
| st-1 to st-3 | 6 up, pairing, t-random, root, level-1 t, 6 down | 16 |
| st-0 to st-3 | 6 up, 2 pre, pairing, t-random, root, level-1 t, 6 down | 18 |
| st-2 to st-3 | 6 up, level-1 t, 6 down | 13 |

Top-level ports:

- `clk` is the clock.
- `rst_n` is a synchronous, active-low reset.
- `pe_in[256]` carries injected packets, with the valid bit inside the
  packet. `pe_rdy[256]` tells the PE whether its packet was accepted.
- `pe_out[256]` carries delivered packets. These must always be accepted.
- `deflect[6:0]` flags a deflection in, from bit 0 up: st-0, st-1, st-2,
  st-3, the two level-1 nodes, and the root.

Packets between one pair of PEs can arrive out of order. The receiving PE has
to restore the order using `seq`.

## What the RTL does not contain

- **PEs and their reorder buffers.** The network only carries the sequence
  number. The testbenches contain behavioural PEs that generate traffic and
  check what they receive.
- **Symmetric comparison networks.** These can be described with the same
  top: equal `COMP_ST*` values, with `L1_KIND*` set to `L1_T` or `L1_PI`.
  They have not been simulated.

## Choices this RTL makes

The following points are this implementation's own decisions:

- the fixed arbitration order, with the child priority swapped every cycle;
- the rule that a packet which loses its port takes the first free port;
- the injection back-pressure at the PE level and the combinational `pe_rdy`;
- the channel permutation between levels and inside the converging switch;
- that pre-stage switches act as switches of the wide quarter's level;
- the t-random phase: left in the first cycle after reset;
- the root built from two-port switches;
- the field order inside the packet struct;
- the synchronous active-low reset;
- the `deflect` observation outputs.

Switch resource and timing figures for FPGAs (LUT, FF and Fmax values for
t, t-random and pi switches) are not reproduced or checked here.

## Files

| file | contents |
|------|----------|
| `rtl/bft_pkg.sv` | packet struct, level-1 kind enum, `up_width` |
| `rtl/bft_switch.sv` | shared deflection arbitration core |
| `rtl/t_switch.sv`, `rtl/pi_switch.sv`, `rtl/t_random_switch.sv` | the three switch types |
| `rtl/bft_subtree.sv` | symmetric subtree with per-level switch type |
| `rtl/converging_switch.sv` | converging switch |
| `rtl/asym_bft_l1.sv` | level-1 node: t, pi or converging |
| `rtl/asym_bft.sv` | 256-PE asymmetric network (top) |
| `tb/*_tb.sv` | self-checking testbenches for the three switch types, the subtree, the converging switch and the top (the shared core and the level-1 node are tested through them), plus `asym_bft_as0_tb` for the AS0 configuration |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each one has a watchdog. Read the package first and let Verilator find the
other files:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/bft_pkg.sv tb/asym_bft_tb.sv --top-module asym_bft_tb
./obj_dir/Vasym_bft_tb
```

Replace `asym_bft_tb` with the name of any other testbench to run it.

What the testbenches check:

- **Switch testbenches** drive random packets. Each cycle they check that no
  packet is lost or invented, that packets are turned back correctly, that
  parent packets have priority, that every port some packet wanted is used
  productively, that the `deflect` flag is right and that no packet is
  misdelivered at the PE level. The t-random testbench also checks the
  alternating direction.
- **`bft_subtree_tb`** and **`converging_switch_tb`** check lone-packet
  latencies against hop counts and run random traffic with modelled
  neighbours. The converging-switch test checks that a stream of packets
  from one parent channel is spread over more than one wide channel.
- **`asym_bft_tb`** runs the default network without overriding any
  parameter. It checks lone-packet latencies (the table above), then runs
  the four synthetic patterns with 1024 messages per sending PE and checks
  that every packet arrives exactly once, with intact data and sequence
  number. It also requires a deflection in every region and at least one
  refused injection. With 100 % injection it measured these throughputs
  (packets/cycle/PE):

  | pattern | traffic | AS1 | AS0 |
  |---------|---------|-----|-----|
  | Test-0 | all PEs to random PEs | 0.095 | 0.095 |
  | Test-1 | st-0,1 all active, 1/4 of st-2,3 active | 0.065 | 0.064 |
  | Test-2 | st-0,1 among themselves, st-2,3 slowly into st-0,1 | 0.038 | 0.042 |
  | Test-3 | st-0 among itself, others slowly into st-0 | 0.036 | 0.036 |

  Slow senders inject with probability 1/8 per cycle. Each run takes a few
  seconds.
