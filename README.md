# Spiking neural network on a De Bruijn network of computational-RAM arrays

This design runs a leaky integrate-and-fire spiking neural network without a
processor or datapath in the usual sense. Each neuron is a **CRAM array**: a
spintronic memory whose cells can also act as inputs and output of a logic
gate, so that one gate is evaluated in every column of the array at once. A
neuron's weights, delays, filter table, spike history and membrane potential
stay in its array, and every arithmetic step of the neuron model is a
sequence of such gates. One **controller array** holds the gate sequence and
broadcasts it, one step per cycle, to all arrays, so all neurons compute a
time step in lockstep.

Spikes travel between arrays over a **generalized De Bruijn graph** (GDBG):
array `u` has links to arrays `2u mod N` and `2u+1 mod N`. There are 2N links
instead of one per pair, every array is at most log2(N) hops from every other,
and routing is a fixed schedule of log2(N) steps with no packets and no
congestion.

The RTL is a logic-level model. The magnetic tunnel junctions, bitline
voltages and sense circuits are not modelled; what is modelled is what they
compute, cycle by cycle.

## Files

| file | what it is |
|---|---|
| `rtl/cram_pkg.sv` | instruction word (`instr_t`), gate opcodes, program selector |
| `rtl/cram_ucode_pkg.sv` | program generator: full adder, adder, multiplier, XOR, LFSR, the LIF time step; row layout `lif_map` |
| `rtl/cram_array.sv` | one CRAM array (one neuron) |
| `rtl/cram_controller.sv` | controller array: program memory + step counter |
| `rtl/gdbg_node.sv` | routing port of one array |
| `rtl/gdbg_network.sv` | the De Bruijn wiring of N nodes and the routing schedule |
| `rtl/snn_cram_top.sv` | the network: controller, N arrays, router, time-step sequencer |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus `tb_snn_cram_wide` |

## The CRAM array and its gate model

Think of the array transposed: it has `COLS` **lanes** (default 1024, one per
presynaptic neuron, i.e. per synapse) and `ROWS` **rows** (default 512). A row
is one bit position in every lane. A multi-bit value such as a weight occupies
several rows, bit `i` in row `base+i`, and each lane holds its own value.

A gate reads input cells and writes an output cell **of the same lane**, in
every lane at once. Like the device, a gate does not compute its output from
scratch: the output must first be **preset**, and the gate then switches it to
the opposite value if the number of inputs holding 1 meets the gate's
condition:

| gate | inputs | preset | switches when |
|---|---|---|---|
| NAND2 | 2 | 0 | fewer than 2 ones |
| AND2 | 2 | 1 | fewer than 2 ones |
| OR2 / NOR2 | 2 | 0 / 1 | at least 1 one |
| INV, INV2 | 1 | 1 | input is 1 (INV2 writes two outputs) |
| COPY | 1 | 0 | input is 1 |
| MAJ3 | 3 | 0 | at least 2 ones |
| MAJ5 | 5 | 0 | at least 3 ones |

A gate whose output was not preset gives the wrong answer, as in the
hardware. Presets are separate instructions and can cover up to 8 consecutive
rows at once.

Other operations: `LSHIFT` reads a row and writes it back shifted down by
2^k lanes (used by the reduction tree), `LOADEN` loads the column enable from
a row (masked instructions then only touch enabled lanes), `WRSPK` writes the
routed input spike train into a row, `RDSPK` latches lane 0 of a row as the
neuron's output spike. A host port writes and reads whole rows for
initialisation.

## Arithmetic out of gates

Everything in the neuron is built in `cram_ucode_pkg` from these routines:

- **Full adder**, three gates: `cout = MAJ3(a,b,cin)`; `INV2` writes `~cout`
  into two cells; `sum = MAJ5(a,b,cin,~cout,~cout)`. With presets this is six
  instructions.
- **Adder**: a ripple chain of full adders, carries alternating between two
  scratch rows. Operands can be rows, constants (using preset all-0 and
  all-1 rows) or shifted rows. The destination must not overlap the inputs,
  because presetting an output would destroy an input not yet read, so
  accumulations ping-pong between two buffers.
- **Multiplier**: AND gates make the partial products, the adder sums them
  (an N-bit by N-bit product costs N^2 full adders).
- **XOR**: four NAND gates.
- **Pseudorandom noise**: a 9-bit LFSR with polynomial x^9 + x^5 + 1 held in
  cells b1..b9: `t = b5 XOR b9` by four NANDs, then nine COPY gates shift
  b1..b8 into b2..b9 and t into b1 (13 gates, plus presets).

All values are unsigned. Products are rounded back as `(a*b + 2^(S-1)) >> S`.

## One neuron time step (program `PROG_LIF`)

The program works in every lane of every array at once. The rows it uses
are given by `lif_map(S, LF, NMAX, NOISE_W)`; at the defaults it uses 268 of
the 512 rows and is 4179 instructions long.

1. **Synaptic delay.** Each lane has an S-bit local delay counter. It is
   incremented and compared with the lane's delay `d`; on a match the
   counter returns to 0 and the lane is enabled for this step. The compare
   result becomes the column enable. A lane with delay `d` therefore takes
   part periodically, not every step.
2. **Spike history.** The `LF` history rows age by one step (COPY gates) and
   the routed input train is written into the newest one.
3. **Filter.** For each history entry `s`, the S-bit filter value `alpha(s)`
   (same in all lanes) is ANDed with that entry's spike and accumulated. The
   sum is rounded to S bits as `(sum + LF/2) >> log2(LF)`. Masked: only
   enabled lanes do this work.
4. **Weighting.** The filtered value times the lane's S-bit weight, rounded
   to S bits; then ANDed with the column enable, so disabled lanes add 0.
5. **Sum over lanes.** log2(NMAX) levels of "shift the partial sums down by
   2^k lanes, add". Every carry is kept, so lane 0 ends with the exact sum.
6. **Response current** `u = sum + bias + r1`, **potential**
   `v = u + round(v_old * KV / 2^S) + r2`, where `KV` is the stored leak
   factor and `r1`, `r2` are the low `NOISE_W` bits of the LFSR, stepped
   before each use. The potential wraps modulo 2^VW, VW = S + log2(NMAX) + 2.
7. **Threshold and reset.** `v - theta` by adding the inverted threshold with
   carry-in 1; the carry out is the spike (v >= theta). `v` is then ANDed
   with the inverted spike, which zeroes it after a spike, and the spike is
   latched as the array's output.

Only lane 0 of steps 5-7 is meaningful; the other lanes compute too but
their values are ignored.

## Routing over the De Bruijn graph

At the start of a routing phase each node loads its own spike as a 1-spike
train. In step `c` (1..log2 N) node `v` receives the trains of `v>>1` (train
A) and `(v>>1) + N/2` (train B):

- while `c <= log2(NMAX)` each train holds 2^(c-1) spikes; the node places A
  in the low half and B above it. The trains double each step.
- once `c > log2(NMAX)` both trains are full and half must be dropped. For
  each output slot a stored **bit indicator** picks train A or B and a stored
  log2(NMAX)-bit **address** picks the spike in it. There is one such table
  per step beyond log2(NMAX), written once through the `tbl_*` ports; it
  decides which NMAX neurons reach each node.

When N <= NMAX no tables are needed and every node ends with all N spikes,
neuron `j`'s spike in slot `bitreverse(j)` (log2 N bits) at every node; the
weights are simply stored in that order.

## The top and its timing

`snn_cram_top` runs one time step per `step_start` pulse:

| phase | cycles |
|---|---|
| route (`route_busy`) | log2(N) |
| compute (`compute_busy`) | program length (4179 at the defaults) |
| overhead | 3 |

`spikes` holds the new output spikes when `step_done` pulses. Before the
first step, load every array's rows through `cfg_we/cfg_array/cfg_row/cfg_data`
(the layout is `lif_map`; history, delay counters and potential must be
zeroed, bias, threshold, leak factor and LFSR seed written as lane-0 values,
the filter table replicated in every lane, weights and delays per lane) and,
if N > NMAX, the router tables. Configuration is only allowed while idle
(an assertion checks it).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 1024 | neurons = arrays (power of two) |
| `NMAX` | 1024 | presynaptic neurons per neuron = lanes = wires per link (power of two) |
| `S` | 1 | weight, delay and filter-value bit length |
| `LF` | 64 | filter table entries |
| `ROWS` | 512 | cells per lane |
| `NOISE_W` | 2 | noise bits added per use |
| `DEPTH` | 8192 | controller program words |

`NMAX`, `S`, `LF` and `ROWS` are the source design's main configuration
(1024 presynaptic neurons, 1-bit weights, 64-entry table, 1024 x 512 cells).
That configuration targets one billion neurons; `N` defaults to 1024
because a billion arrays of half a million cells each cannot be elaborated
or simulated. Larger `S` or `LF` need more rows: S = 9, LF = 64 needs 916
rows and a 12536-word program, so raise `ROWS` and `DEPTH` with them; the
controller stops with an error if the program does not fit.

## Where this model departs from or fills in the source design

- The gate/preset pairing, the 8-row bulk preset, the lane-shift operation,
  the instruction format and one instruction per cycle are this design's.
- The source design rounds after every addition of the reduction tree; this
  one keeps all carries (an exact sum). The source design also adds a
  "scaled old spike train" into the membrane potential; it is left out here.
- The delay compare is built from XOR, OR and INV gates rather than a
  subtraction.
- The 2x2 multiplier is the general AND-plus-full-adder multiplier, not the
  exact NAND/AND/INV cascade of the source design's illustration.
- The GDBG edge rule `u -> 2u, 2u+1 (mod N)` and the gather form of the
  selection tables are this design's reading.
- A routing step takes one cycle; in the hardware the trains are read and
  written through the arrays' memory.
- **Not built:** the STDP learning engine (pre/post spike timers, lookup of
  the learning window, update of the weights by A+ / A-).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
With plain Verilator, e.g. for the end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/cram_pkg.sv rtl/cram_ucode_pkg.sv \
  rtl/cram_array.sv rtl/cram_controller.sv rtl/gdbg_node.sv rtl/gdbg_network.sv \
  rtl/snn_cram_top.sv tb/tb_snn_cram_top.sv --top-module tb_snn_cram_top
./obj_dir/Vtb_snn_cram_top
```

| testbench | what it checks |
|---|---|
| `tb_cram_array` | 3000 random instructions against a lane-by-lane gate model, full-adder and NAND truth tables, masking, lane shifts |
| `tb_cram_controller` | the self-test program: 4-bit add and multiply, XOR, LFSR step in 16 lanes; one word per cycle; 13 gates per LFSR step |
| `tb_gdbg_network` | 16 neurons / 8 wires (one selection step) and 8 / 8 against a model that follows the graph edges; log2(N) cycles |
| `tb_snn_cram_top` | 16 neurons, 8 slots, S=2, LF=4, 14 time steps: every spike and membrane potential against an integer reference; counts routing, delay gating, spikes, resets, leak and noise |
| `tb_snn_cram_wide` | 64 neurons each listening to all 64, arrays at their default S, LF and ROWS, 3 time steps |

The largest network simulated is the 64-neuron one; the 1024-neuron default
was not simulated, because the simulator's build of 1024 array instances
did not finish in reasonable time.
