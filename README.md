# BZ-FAD: a low-power shift-and-add multiplier

A radix-2 shift-and-add multiplier takes one multiplier bit per clock
cycle. It is small, but in a conventional implementation most of its flip-flops
and gates toggle every cycle:

- the B register shifts to bring the next bit to the select line;
- a binary counter counts the cycles;
- a multiplexer switches the adder input between A and 0;
- the adder works even when it only adds 0;
- the whole partial-product register shifts right.

The design here ("bypass zero, feed A directly", BZ-FAD) produces the same
product with most of that activity removed:

| Conventional                         | BZ-FAD                                                                  |
|--------------------------------------|-------------------------------------------------------------------------|
| B shifts right every cycle           | B stays still; a one-hot multiplexer picks bit *i*                      |
| binary cycle counter                 | a one-hot ring counter marks cycle *i* and also ends the operation       |
| A/0 multiplexer in front of the adder| A is wired straight into the adder                                      |
| adder runs every cycle               | when B(i) = 0 the adder's inputs are not touched, so it does not switch |
| 2N-bit partial product shifts        | shift is wiring; the lower half is written one bit per cycle, never moved |

The ring counter is itself a low-power design (the *hot-block* ring counter).
Its flip-flops are grouped in blocks of four. A small clock gator per block
lets clock edges through only to the block that holds the single 1.

The default configuration is a 32 x 32-bit unsigned multiplier with a 64-bit
product, 32 cycles per multiplication, and ring-counter blocks of 4 bits.

## Interface

`bzfad_multiplier #(N = 32, BLOCK = 4)`

| Port         | Dir | Width     | Meaning                                                     |
|--------------|-----|-----------|-------------------------------------------------------------|
| `clk`        | in  | 1         | clock; every register uses the rising edge                  |
| `rst`        | in  | 1         | asynchronous reset, active high                             |
| `start`      | in  | 1         | start a multiplication (ignored while busy)                 |
| `a`, `b`     | in  | N         | multiplicand and multiplier, unsigned                       |
| `busy`       | out | 1         | high during the N cycles of a multiplication                |
| `done`       | out | 1         | one-cycle pulse: `product` is valid                         |
| `product`    | out | 2N        | `a * b`, held until the next start                          |
| `hot_blocks` | out | N/BLOCK   | which ring-counter blocks are being clocked (observation only) |

Timing:

- While idle, a rising edge with `start = 1` captures `a` and `b`.
- N cycles follow, one per bit of `b`.
- `done` is high in the cycle after the N-th of those edges, which is N
  rising edges after the edge that accepted `start`.
- `start` may be raised again in the cycle in which `done` is high, so
  multiplications can run back to back, one every N cycles.
- `rst` must be applied (it needs a rising edge) before the first operation.
  It puts the ring counter at bit 0. The multiplier checks with an assertion
  that the counter sits at bit 0 whenever it is idle.

## How one multiplication proceeds

Cycle *i* (0 ≤ *i* < N) is the cycle in which ring-counter bit *i* is 1.
The upper N bits of the partial product (call it PP) live in one of two
N-bit registers:

- **Feeder** is the adder's left input. The adder computes `Feeder + A`
  (N+1 bits) all the time.
- **Bypass** holds PP in cycles where nothing has to be added.

A one-bit register `hot_q` holds B(i) for the current cycle. Two things
happen in cycle *i*:

1. The result multiplexer forms
   `R = B(i) ? Feeder + A : {0, Bypass}` (N+1 bits).
   R shifted right by one is the new PP. That shift is only wiring.
   `R[0]` is product bit *i*, and it is final.
2. At the rising edge that ends the cycle:
   - `R[0]` is written into bit *i* of the lower product half
     (`product_lo_reg`), enabled by ring bit *i*.
   - The one-hot multiplexer, driven by the ring counter rotated by one
     place, looks ahead at B(i+1). The new PP `R[N:1]` goes to Feeder if
     B(i+1) = 1 and to Bypass if it is 0.
   - `hot_q` takes B(i+1).

The key property: when B(i) = 0, PP was written into Bypass at the previous
edge. Feeder was left alone, and A never changes during a multiplication, so
the adder's inputs are the same as in the cycle before and it makes no
transitions. This is why A can be wired into the adder without the A/0
multiplexer.

Start and finish:

- **Start.** The zero partial product is written only to the register that
  B(0) selects. So if B(0) = 0, Feeder keeps its old value and the adder
  stays quiet.
- **Last cycle** (ring bit N-1). The final upper half is always written into
  Bypass, and `hot_q` is cleared.
- **Result.** `product = {Bypass, lower half}` from then on.

The ring counter needs exactly N steps to return to bit 0, so it is back
at its start position for the next operation with no reset.

Small example, N = 4, A = 5 (0101), B = 6 (0110):

| cycle | B(i) | R                 | product bit | new PP goes to (B(i+1)) |
|-------|------|-------------------|-------------|-------------------------|
| start | –    | –                 | –           | 0 → Bypass (B(0)=0)     |
| 0     | 0    | Bypass = 00000    | p0 = 0      | 0000 → Feeder (B(1)=1)  |
| 1     | 1    | 0000+0101 = 00101 | p1 = 1      | 0010 → Feeder (B(2)=1)  |
| 2     | 1    | 0010+0101 = 00111 | p2 = 1      | 0011 → Bypass (B(3)=0)  |
| 3     | 0    | Bypass = 00011    | p3 = 1      | 0001 → Bypass (last)    |

The product is {0001, 1110} = 30.

## The hot-block ring counter

`hot_block_ring_counter #(WIDTH = 32, BLOCK = 4)` is a one-hot ring. The 1
moves from bit *j* to bit *j*+1 on each enabled edge and wraps from WIDTH-1
to 0. The flip-flops are split into WIDTH/BLOCK blocks. Each block has its
own gated clock from a `hot_block_cg`, and no other logic decides when a
block is clocked.

### The clock gator

`hot_block_cg` has four inputs:

- `rst`;
- the inverted clock `clk_n`;
- **Entrance**: the bit just before the block. When it is 1, the 1 enters
  the block at the next edge.
- **Exit**: the first bit of the next block. When it is 1, the 1 has just
  left.

Inside are a latch, a 2:1 "watchdog" multiplexer and a NAND gate:

```
gate    = latch ? Exit : Entrance      -- watchdog multiplexer
latch   : transparent while gate = 1, data = Entrance, reset by rst
clk_out = NAND(latch, clk_n)           -- = clk while latch = 1, else stuck at 1
```

The gator moves through three states:

1. **Off.** The latch holds 0 and watches Entrance.
2. **Turning on.** When Entrance rises, the latch opens, takes 1 and switches
   over to watching Exit. Exit is 0, so the latch closes again holding 1.
3. **Turning off.** When Exit rises, the latch opens, takes Entrance (now 0)
   and goes back to watching Entrance.

Why this is glitch-free: Entrance and Exit are flip-flop outputs that change
just after a rising edge, while `clk` is high and `clk_n` is low. A low
`clk_n` holds the NAND output at 1, so the gated clock does not move while
the latch changes. The first rising edge a block receives is therefore the
one that moves the 1 into it. The last is the one that moves the 1 out.

The block holding the 1 is clocked. So is the block the 1 is about to enter,
for the one cycle in which that block's Entrance is high. Each enabled cycle
produces clock edges in at most two blocks (8 flip-flops with 4-bit blocks),
however wide the counter is. A plain ring counter clocks all WIDTH
flip-flops every cycle. The per-block cost is one gator, whatever the block
size.

### Reset and enable

- **Reset.** After reset the 1 is in bit 0, so the gator of block 0 resets
  to *on* (`RESET_VALUE = 1`) and all other gators reset to *off*.
- **Enable.** The multiplier must hold the counter still between
  multiplications. `en` is ANDed into the inverted clock that feeds every
  gator (`clk_n = ~clk & en`). `en` is the multiplier's `busy` state
  register, so it changes only while `clk` is high, and the gating is
  glitch-free for the same reason as above.
- **Requirements.** The counter needs `BLOCK >= 2` and at least two blocks.
  With a single block, Exit would be the block's own first bit and the block
  would switch itself off. An elaboration-time assertion checks this. A
  simulation assertion checks that the ring stays one-hot.

The gator latch opens and closes through its own multiplexer, so synthesis
tools report a logic loop and a latch in every gator. Both are intended: the
loop is the gator's storage. All other registers in the design are ordinary
rising-edge flip-flops on `clk`.

## Modules

| File                            | Module                   | Role                                                  |
|---------------------------------|--------------------------|-------------------------------------------------------|
| `rtl/bzfad_multiplier.sv`       | `bzfad_multiplier`       | top: operands, Feeder/Bypass, result multiplexer, wiring |
| `rtl/bzfad_control.sv`          | `bzfad_control`          | idle/run state, `load`, `done`                        |
| `rtl/bzfad_pkg.sv`              | `bzfad_pkg`              | state type                                            |
| `rtl/hot_block_ring_counter.sv` | `hot_block_ring_counter` | one-hot ring counter in clock-gated blocks            |
| `rtl/hot_block_cg.sv`           | `hot_block_cg`           | per-block clock gator                                 |
| `rtl/onehot_mux.sv`             | `onehot_mux`             | picks B(i+1) with the ring counter as select          |
| `rtl/ripple_carry_adder.sv`     | `ripple_carry_adder`     | N-bit full-adder chain, N+1-bit sum                   |
| `rtl/product_lo_reg.sv`         | `product_lo_reg`         | lower product half, bit *i* written in cycle *i*      |

Parameters:

- `N`: the operand width, any multiple of `BLOCK` that gives at least two
  blocks.
- `BLOCK`: the ring-counter block size. 4 gave the lowest ring-counter power
  in the published evaluation, which covered 16- to 64-bit counters.

Synthesized at the defaults, the top has about 195 flip-flop bits and 8
latch bits.

## Where this RTL departs from the published circuit

The architecture, the data flow and the gator circuit follow the published
design. These points are choices made here:

- **Feeder and Bypass are clock-enabled registers.** The published circuit
  clocks them through NAND/NOR gates fed with the inverted clock. The
  clock-enable form behaves the same way, and a synthesis flow can map it to
  integrated clock-gating cells. A NOR-gated clock whose select falls while
  the clock is high would also produce a false edge.
- **The lower product half uses flip-flops, not latches.** In the published
  circuit it is N latches whose gates are the ring-counter bits. The ring bit
  that closes latch *i* falls at the same edge at which that latch's data
  changes. An edge-triggered capture avoids that race. Each bit is still
  written once and never shifted.
- **B(i) is looked up once.** The one-hot multiplexer selects B(i+1) (the
  ring counter rotated by one place), and a flip-flop keeps it as B(i) for
  the next cycle. One B multiplexer serves both the Feeder/Bypass choice and
  the result multiplexer.
- **Choices not covered by the source:**
  - the start/busy/done handshake and unsigned operands;
  - asynchronous reset of the datapath;
  - the ring counter's enable;
  - block 0's gator resetting to *on*;
  - where the initial and final partial products are stored.
- **Width.** The source gives both 32 bits (its headline results) and 16
  bits (its detailed comparison). The default is 32, and 16 is tested as
  well.
- **Not modelled.** Power, area and transistor-level details
  (transmission-gate multiplexers, the 18-transistor gator) are not
  modelled. The RTL expresses the switching-activity savings structurally;
  it does not measure them.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| Testbench                        | What it checks |
|----------------------------------|----------------|
| `tb_bzfad_multiplier`            | Full default size (32 bits). Corner cases and 300 random pairs against a 64-bit reference, including sparse multipliers. Checks the 32-cycle latency, `busy`, that a `start` while busy is ignored, and back-to-back starts. Checks that Feeder never changes before a bypass cycle and that one or two ring blocks are clocked. Counts adder cycles, bypass cycles, block hand-overs and wraps, and fails if any of them never happened. |
| `tb_bzfad_multiplier_16`         | The 16-bit configuration: a sliding single-bit multiplier, then 1500 random pairs, with a 16-cycle latency. |
| `tb_activity_compare`            | Runs BZ-FAD beside a conventional shift-and-add model (`tb/conv_shift_add.sv`) on 400 random 32-bit operand pairs. Checks both products and counts register-bit toggles, adder-input toggles and clocked flip-flops during the multiplication cycles. Requires BZ-FAD to be lower on all three. |
| `tb_hot_block_ring_counter`      | Seven counters side by side (16/32/48/64 bits with 4-bit blocks, plus block sizes 2, 8 and 16) against a plain ring register, under a random enable. Checks the exact set of clocked blocks and at most two block clock edges per cycle (none when disabled), and reset in mid-run. Uses the helper `tb/ring_check.sv`. |
| `tb_hot_block_cg`                | Gator on/off timing, no rising edge in the Entrance cycle, `clk_out` parked at 1 when off, edge count per visit, both reset values. |
| `tb_onehot_mux`, `tb_ripple_carry_adder`, `tb_product_lo_reg`, `tb_bzfad_control` | Each module against a reference. The adder is checked exhaustively at 8 bits. |

A typical run of `tb_activity_compare` gives BZ-FAD about 53 % of the
conventional register-bit toggles and 32 % of its adder-input toggles. About
38 % as many flip-flops receive a clock edge. These are toggle counts at
register level, not power figures: they leave out the adder's internal nodes,
the multiplexers and the clock tree.

Running one with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bzfad_pkg.sv tb/tb_bzfad_multiplier.sv --top-module tb_bzfad_multiplier
./obj_dir/Vtb_bzfad_multiplier
```

Every testbench finishes in well under a second. The testbenches apply
reset with a rising edge just after time 0, because the asynchronous resets
trigger on `posedge rst`.

## Changing the design

- **Width or block size.** Set `N` and `BLOCK` on `bzfad_multiplier`.
  Latency is N cycles.
- **Signed operands.** These are not supported. Adding them would need a
  sign-handling step (for example, a subtract in the last cycle), and the
  source does not describe one.
- **Other adders.** Any adder can replace `ripple_carry_adder` if it keeps
  the `{carry, sum}` output. The bypass scheme places no constraint on the
  adder type. The ripple-carry adder was chosen because it has the fewest
  transitions per addition.
