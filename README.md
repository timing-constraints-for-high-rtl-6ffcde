# Counterflow-clocked (C²) pipelining

A C² pipeline is a chain of level-sensitive latches whose clock runs **backwards**, against the
data. The clock enters at the downstream end of the pipeline. It then passes through one
inverting delay element per stage on its way upstream. Each latch takes its clock from the node
of that chain next to it, so:

* neighbouring latches are open in opposite phases, as in a two-phase latch pipeline;
* each upstream latch sees every clock edge one element delay `d_c` later than its downstream
  neighbour. The latches do not switch all at once. Their switching spreads over the clock
  phase, which lowers peak supply current and switching noise;
* there is no global clock tree and no skew budget. Correct operation needs only local,
  one-sided conditions between neighbours.

With `P` the clock phase (half period), `S`/`H` the latch setup and hold times, and `d_ds`/`d_dl`
the shortest and longest logic delay of a stage, the conditions are as follows. Wire delays are
left out here, and the hold condition also loses its wire terms.

| condition | meaning |
|---|---|
| `d_c + d_ds > H` | hold: the clock must reach the upstream latch late enough that new data cannot overrun the downstream latch before it closes |
| `P > d_c + d_dl + S` | setup: the phase must cover the clock lag plus the slowest logic. It does not depend on skew, and a slower clock always fixes it |
| forward skip over `k` stages, `k` odd: `k·d_c < P − S` | data may jump downstream directly only to a latch of the opposite phase, and not so far that the destination closes before the source's data is final |
| backward skip over `k` stages, `k` even: `k·d_c < P − H` | data may jump upstream only to a latch of the same phase, and not so far that the destination is still open when the source reopens with new data |

With `d_c` = 1 ns and `P` = 50 ns, a forward jump of about 50 stages is still safe.

## How the RTL represents it

The synthesizable RTL (`rtl/`) describes the *structure*: latches, the inverter chain, and which
node every latch and every forwarding path uses. The delay elements are plain inverters in the
RTL and have zero delay in simulation. Neighbouring latches are then exactly complementary, and
a zero-delay simulation behaves like an ideal two-phase latch pipeline. The values it produces
are the ones the real, staggered circuit produces when the conditions above hold. Whether they
hold is a question for physical design: the delays of the inverters and wires.

The timing itself is studied separately. `tb/c2_clock_line_model.sv` is a simulation-only clock
line with a real delay per element. `tb/tb_c2_clock_line_model.sv` uses it to show the effects
described below.

## Building blocks

| module | what it is |
|---|---|
| `c2_pkg` | pixel type, line length, tap count, block-depth function |
| `c2_latch` | level-sensitive latch, open while its clock is high (a dynamic latch in silicon) |
| `c2_clock_line` | inverter chain; `node[NODES-1]` = input clock, `node[k] = ~node[k+1]`; `clk_out` = `node[0]`. `INVERTING=0` gives a buffer chain |
| `c2_pipeline` | `STAGES` latches on a clock line, blank data paths |
| `c2_sequential` | two pipelines in series: B's outgoing clock → one inverter → A's clock input |
| `c2_fork_join` | a long and a short pipeline in parallel. Both take `clk` at their downstream ends. The short one is fed by forwarding and its outgoing clock is terminated. The long one's clock goes upstream |
| `c2_sync_interface` | a C² pipeline inside a conventionally clocked system (below) |
| `line_memory_block` | one line of delay: a circular buffer acting on the rising edge of its node clock |
| `line_memory_unit` | four line memories on one clock line, giving 0–4 line delayed pixels |
| `mac_unit` | multiply-accumulate using backwarding |
| `c2_top` | everything together (below) |

### Placement rule: odd forward, even backward

A datum sent downstream from a latch on node `a` can go *directly* to a latch on node `b` only
if `b − a` is odd. The destination is then open in the phase right after the source closes. An
even distance is split in two odd hops by one extra latch. A datum sent upstream must go to a
node at an even distance. In the zero-delay RTL this rule is what keeps the data aligned. In
silicon it is also what makes the timing work.

## The line memory unit (`line_memory_unit`)

The unit gives a vertical image filter the current pixel and the pixels 1, 2, 3 and 4 lines
above it. Its clock line has six nodes:

```
clk_in -> inv -> C5 -> inv -> C4 -> inv -> C3 -> inv -> C2 -> inv -> C1 -> inv -> C0 (= clk_out)

din (from a latch on C0, outside the unit)
   -> block 1 (C1) -> block 2 (C2) -> block 3 (C3) -> block 4 (C4)

output latches, all on C5:
   tap 0 <- din                         distance 5, direct
   tap 1 <- block 1 -> latch on C2      distance 4 = 1 + 3
   tap 2 <- block 2                     distance 3, direct
   tap 3 <- block 3 -> latch on C4      distance 2 = 1 + 1
   tap 4 <- block 4                     distance 1, direct
```

Each line memory block is a circular buffer. On the rising edge of its node clock it moves its
oldest pixel to its output register and stores the new pixel in the freed slot. A rising edge
on node `Cj` is the moment a latch on `Cj` would open. At that moment the block's input, from
node `Cj−1`, is stable. Its output changes while the latches on `Cj+1` are closed. So a block
behaves like a pipeline latch with storage.

Each hop through an extra latch costs half a clock period. To make the taps *exactly* one line
apart at the output latch, blocks on odd nodes hold `LINE_LEN−1` pixels and blocks on even
nodes `LINE_LEN` (`c2_pkg::lmb_depth`). A block delays by its full depth, so the four blocks
together delay by `4·LINE_LEN − 2` pixels. The two forwarding latches make up the rest.

Timing: the input must be stable while `C0` is low. The taps are updated while `C5` is high.
When the output latch closes, `taps[j]` is the pixel `j·LINE_LEN` samples older than `taps[0]`.
The unit takes one pixel per clock.

`rst` only clears the block address counters. Memory contents are never cleared, so the taps
carry meaningful data once four lines have been written.

## The multiply-accumulate unit (`mac_unit`)

Four latch ranks, `L1` (operands) → multiplier → `L2` (product) → adder → `L3`, `L4`
(accumulator). The clock enters at `L4`, so `c4 = clk`, `c3 = ~clk`, `c2 = clk`, `c1 = ~clk`.
The accumulator on `L4` is sent back two nodes, to the adder in front of `L3`, through a 2-input
MUX. The MUX selects zero when `clr` is set, which starts a new sum. In silicon the MUX and its
restoring inverter form the backward delay. That delay must exceed `2·d_c`, so the returning
value arrives after the product from `L2`. No extra latch is needed. `clr` travels down with the
operands.

Operands are taken at the rising edge of `clk`. The new sum shows on `acc` from the next rising
edge, one result per clock. Lint reports the loop `acc → MUX → adder → L3 → L4` as
combinational. It never is one, because `L3` and `L4` are open in opposite phases.

## Synchronization interface (`c2_sync_interface`)

The interface fits a C² pipeline into logic clocked conventionally by `clk`. An input latch runs
on `clk`. The pipeline's clock line is fed at its far end with `clk1`, an inverted and delayed
copy of `clk`. With an even number of stages, the pipeline's first latch is an even number of
inversions from `clk`: it has the same phase as the input latch but a later clock. The input
latch hands data to it by backwarding: an even clock distance, with the later clock
as the margin. The last latch runs on `clk1`, so its output is stable while `clk` is high, ready for any receiver clocked by `clk`. `din` is
taken at the falling edge of `clk`. `dout` has it `STAGES/2 − 1` periods later.

## The top (`c2_top`)

### The line memory section of a subband filter chip

This is the line memory section of a chip that splits HDTV images into subbands. A 2D-FIFO
delivers pixels. Two line memory units work side by side, a pipeline fork/join. A filterbank
consumes their taps. The clock enters at the filterbank end:

```
clk -> inv -> c1 -> unit II -> c2 (terminated)
           -> c3 -> unit I  -> c4 -> inv -> c5 -> 2D-FIFO
```

Unit I's clock path is the longer one, so its outgoing clock `c4` is the one passed upstream.
Unit II's `c2` is used only by that unit's input latch. Each unit takes its own 8-bit bus
(`d3_i`, `d3_ii`) through an input latch on its outgoing clock. The units drive the tap buses
`d2` (unit I) and `d1` (unit II). In the zero-delay RTL `c4 = c2 = ~clk` and `c5 = clk`. The
`d3` buses must be stable while `clk` is low and at its rising edge. The taps are stable while
`clk` is low.

The 2D-FIFO and the filterbank are **not** in this RTL. Their internal organisation, polyphase
ordering and filter coefficients are not known. Their buses and the clock `c5` are ports of
`c2_top`.

### The other examples

The other examples stand beside the line memory section with their own ports, sharing only
`clk`:

* the MAC (`mac_*`);
* the synchronization interface (`sync_*`);
* a sequential connection of two 4-latch pipelines (`seq_*`);
* the fork/join of a 6- and a 2-latch pipeline (`fj_*`).

## Parameters and sizes

| parameter | default | where it comes from |
|---|---|---|
| pixel width | 8 | bus width of the subband chip |
| taps per unit | 5 (0–4 line delays) | subband chip |
| `LINE_LEN` | 1920 | design choice (one HDTV line) |
| MAC widths | 8 × 8 → 24 | design choice |
| pipeline / interface stages | 4 | design choice (interface needs an even count) |
| fork/join lengths | 6 and 2 | design choice |

## What the testbenches show

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_c2_top` runs the whole top at its default sizes, 1920-pixel lines, for 9,800 clocks. It
  checks all ten taps against a software history of the pixels, and the MAC against a running
  sum. It also checks the interface, sequential and fork/join outputs against their expected
  latencies. It counts each mechanism: direct forwarding, split forwarding, the join of both
  units at the 4-line tap, MAC accumulation by backwarding, MAC reset, and the composition
  examples. A mechanism that never occurs is a failure.
* `tb_c2_clock_line_model` uses the delayed clock line (64 inverters of 1 ns, 50 ns phase) and
  shows the following:
  * the edge ripples upstream one `d_c` per node;
  * forwarding from node 0 to an odd node `k` delivers the right datum for `k ≤ 49` and the
    wrong one beyond (rule `k·d_c < P − 0.5 ns`);
  * backwarding over an even distance up to 50 is safe, and longer ones fail;
  * an 8-stage pipeline with 10 ns of logic per stage on the staggered clocks delivers every
    datum in order.

## Limits and departures

* Clock delays, wire delays and setup/hold are physical. The synthesizable RTL cannot enforce
  the timing conditions. The layout must meet them.
* The dynamic latches are modelled as static latches. Their minimum clock rate is not modelled.
* The local clock buffers that amplify the chain for each latch are not modelled.
* The alternative pipeline with non-inverting clock buffers and latches of alternating polarity
  is not built, except for the buffer option of `c2_clock_line`.
* The MAC form that backwards into extra latches is not built either. The variant built is the
  one without extra latches.
* Design choices with no source:
  * the line length;
  * the depths of the line memory blocks;
  * a synchronous address reset;
  * separate input buses for the two units;
  * the MAC widths and the `clr` flag travelling with the operands;
  * the join of the fork/join, shown as two plain outputs.
* The subband chip's stated pixel rate is 72 MHz with an 18 MHz clock. The built section takes
  one pixel per clock per unit, two per clock in all. Whether that matches depends on how the
  2D-FIFO's polyphase split divides the stream, which is not known.
* The 2D-FIFO, the filterbank, the double-frequency clock and its adjustable delay element, and
  the 12-bit link to a second chip are not implemented.

## Simulating

Any testbench builds with Verilator 5. For example:

```
verilator --binary --timing --assert --top-module tb_c2_top \
    -y rtl -y tb +libext+.sv rtl/c2_pkg.sv tb/tb_c2_top.sv -o sim
./obj_dir/sim
```

`tb_c2_clock_line_model` needs `--timing` for its delays. All testbenches run in seconds. Lint a
module with `verilator --lint-only -Wall -y rtl rtl/c2_pkg.sv rtl/<module>.sv`.
