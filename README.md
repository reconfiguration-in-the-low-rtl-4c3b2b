# Reconfigurable networks for a two-level vision machine

This RTL models the two lower levels of an image-understanding computer.
Each level is built around a network that can be reconfigured while it runs:

- **The low level (CAAPP)** is a SIMD array of bit-serial processing elements
  (PEs), one per pixel. Its **Coterie network** is a switched mesh. Each PE
  opens or closes a few switches, and this splits the array into isolated
  groups called coteries. Inside every coterie at once, a wired-OR gives a
  broadcast and a Some/None ("does anyone respond?") test. Connected-component
  work falls out of this directly: close the switches between similar
  neighbours, and each region becomes a coterie of its own.
- **The intermediate level (ICAP)** is a grid of DSP processors. They talk over
  bit-serial links that pass through a crossbar built from **PARCOS** chips.
  Each PARCOS chip keeps a cache of 32 connection patterns. A new pattern can
  be written into the cache while the current one stays live, and switching
  to a stored pattern takes one write. A barrier unit uses this to reswitch
  the network before it releases the processors from a barrier.

The design is a prototype-sized slice. It has:

- 64 × 64 PEs on 64 chips, each chip with its own backing store;
- 64 ICAP ports;
- the 64 × 64 crossbar, built from eight 32 × 32 PARCOS chips;
- the barrier unit;
- three global OR lines and a global sum.

The DSP processors and the array controller are not modelled. Their buses
are ports of the top module `iua_top`.

## Blocks

| File | Block |
|---|---|
| `rtl/iua_pkg.sv` | Shared types: the PE instruction format, the switch register, op codes, network commands |
| `rtl/caapp_chip.sv` | 64 PEs, each with X, Y, R (response), A (activity) and C (carry) registers, 320 bits of RAM and 8 Coterie switches; plus the chip's responder counter |
| `rtl/sewn_mesh.sv` | Nearest-neighbour mesh: each PE reads the X bits of two neighbours per instruction |
| `rtl/coterie_network.sv` | The Coterie network |
| `rtl/caapp_array.sv` | Chips, mesh and Coterie network together; array-wide Some/None; backing-store port |
| `rtl/backing_store.sv` | 32K bits per PE, dual-ported: a 64-bit bit-plane port for the CAAPP and a 16-bit port for the ICAP |
| `rtl/parcos_tree_mux.sv`, `rtl/parcos.sv` | One PARCOS chip: 32 tree multiplexers, the pattern cache (CPC), Row Select Register (RSR), Control Pattern Register (CPR) |
| `rtl/icap_network.sv` | The 64 × 64 network from 8 PARCOS chips |
| `rtl/icap_barrier.sv` | Barrier with an optional reswitch before release |
| `rtl/icap_global_feedback.sv` | Three global OR lines and the bit-serial sum of one 8-bit value per processor |
| `rtl/iua_top.sv` | The slice |

## The PE instruction

Every cycle, one `pe_instr_t` goes to all PEs. The format is this design's own;
the original instruction set is not published. The fields are:

- `op`: the operation;
- two source selects `s1` and `s2`, taken from:
  - the constants 0 and 1;
  - RAM;
  - the registers X, Y, R, A and C;
  - the two neighbours;
  - the Coterie value;
  - the last backing-store bit;
  - a switch bit;
- a destination: X, Y, R, A, RAM or a switch bit;
- a 16-entry truth table `tt`, indexed by `{s1, s2, C, old destination}`;
- an 8-entry carry table `ttc`;
- `unmasked`, which makes the instruction run in inactive PEs too (A = 0);
- a RAM address and a backing-store address.

The constants `TT_S1`, `TT_S2`, `TT_C` and `TT_D` (and `TC_*` for the carry)
combine with bitwise operators into any function. For example,
`TT_S1 ^ TT_S2 ^ TT_C` with carry `(TC_S1&TC_S2)|(TC_S1&TC_C)|(TC_S2&TC_C)` is one
step of a bit-serial add.

The other ops are:

- `OP_COT` places `s1` on the Coterie network. The array drops `instr_ready`
  until the network has settled.
- `OP_SWSTORE` and `OP_SWLOAD` save and restore all 8 switches as one RAM byte.
- `OP_BSRD` and `OP_BSWR` move one bit plane to or from the backing store.
- `OP_CNT` latches every chip's responder count.

## The Coterie network (hardest part)

Every node has a horizontal and a vertical bus segment, which cross without
touching. Each node has eight switches:

- **W** and **E** join the horizontal segment to the west and east links.
- **N** and **S** join the vertical segment to the north and south links.
- **H** and **V** join the PE to the horizontal and vertical segments.
- **NW** joins the west link to the north link, and **NE** joins the north link
  to the east link. These are diagonal bypasses that go around the node.

The groups of connected links and segments are the coteries. In each
coterie, the value every PE reads is the OR of the bits placed on it.

In silicon this is a precharged wired-OR that settles within an instruction.
Here it is computed by **synchronous relaxation**:

1. `start` clears every net and samples the drive bits.
2. Each clock, every net ORs in the nets it is switched to.
3. The evaluation ends in the first cycle in which nothing changes.

Nets only ever rise, so that cycle is a fixed point. The cost is latency: one
cycle for each net on the longest switched path, plus one. A region shaped
like a long snake can take thousands of cycles. The array stalls instructions
(`instr_ready` low) for that time. Cycle counts of programs that use the
network are therefore not the original machine's.

The switch settings must not change during an evaluation. This holds by
construction, because no instruction runs while the network is busy. An
assertion in `caapp_array` checks it.

## PARCOS and the 64 × 64 network

**One PARCOS chip** has these pins:

- a 6-bit `addr`: 0–31 select a control byte (the output port), 32 selects the RSR;
- 5-bit data, in and out;
- four strobes:
  - `wr1` writes a byte of the control word selected by the RSR, or writes the RSR;
  - `wr2` is the single-write reswitch: RSR ← data and CPR ← CPC[data];
  - `pr` makes CPC[RSR] live;
  - `rd` reads back a byte or the RSR.

Each output has its own tree multiplexer, steered by its 5 CPR bits, so
broadcasts are free. Reset sets the CPR to the identity pattern. The meanings
of the pins are this design's reading of the chip's pin names.

**The network** is two columns of four chips:

- Column-1 chips 0 and 1 see inputs 0–31; chips 2 and 3 see inputs 32–63.
- Column-2 chip k drives outputs 16k–16k+15. It chooses between two 16-line
  bundles: one from a column-1 chip in the upper half and one from the lower half.

Every output has a dedicated path, so any mapping can be routed. The
controller uses three commands:

- `NET_SET_ROW`: choose a control word in all chips;
- `NET_LINK out, in`: write one byte in a column-1 chip and one in a column-2
  chip;
- `NET_RESWITCH row`: one strobe in all chips.

A full pattern takes 64 link commands, and switching takes one.

## Known departures and limits

- **Array size.** The array is 64 × 64, not the full machine's 512 × 512.
  Verilator lint and the slang synthesis front end grow too fast with size:
  about 4× in memory and 8× in time for each doubling of the side.
- **Coterie timing.** The network settles over clock cycles, as described
  above, not within one 100 ns cycle.
- **Mesh edges.** The mesh reads 0 past the array edge.
- **Global sum.** The sum has its own counter. The original uses the CAAPP
  count hardware.
- **Backing store.** Each chip's store is an array of 32768 words of 64 bits
  (2 Mbit per chip). Reads are registered and return the data from before a
  same-cycle write. If both ports write the same bit in one cycle, the CAAPP
  port wins.
- **Not modelled.** The ICAP DSPs, the array controller and the higher
  symbolic level are not modelled.
- **PARCOS read port.** The network does not use it.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/iua_pkg.sv rtl/parcos_tree_mux.sv \
  rtl/parcos.sv tb/tb_parcos.sv --top-module tb_parcos -Mdir obj && obj/Vtb_parcos
```

`tb_caapp_array` (16 × 16 PEs), `tb_iua_top` (16 × 16 PEs) and `tb_iua_top_full` (the full 64 × 64 size, a long build) run
connected-component marking on random images:

1. Each PE closes the switches towards set neighbours, found by
   two-neighbour mesh reads.
2. The switch pattern is saved to RAM and restored.
3. A seed pixel is broadcast over the network.
4. The marked region is checked against a breadth-first search.

The two top-level testbenches also load the image and reads the result through the ICAP ports
of the backing stores. It then stores network patterns, runs barriers that
reswitch the network, and checks the serial links, the OR lines and the
global sum. It counts each mechanism it exercises.
