# Time-coded digital cellular neural network

A cellular neural network (CNN) is a grid of identical cells. Each cell
computes, once per iteration, a weighted sum of its own value and the values
of its eight nearest neighbours, then passes that sum through a transfer
function:

    Net = w1*x1 + w2*x2 + ... + w9*x9          y = f(Net)

The same nine weights (the *template*) are used by every cell. When you choose
the template, you choose the image operation the network performs.

Most of the area of a conventional digital cell goes into its nine parallel
multipliers. This design replaces each multiplier with **one AND gate**. Values
are sent as pulses spread over the time slots of an iteration, so that ANDing
two such signals and counting the high slots gives their product. One cell
then needs only nine AND gates, nine XOR gates (for the signs), one up/down
counter, a clamp and a 5-bit register. An iteration takes 15 clock cycles.

## Number format

All cell values, inputs and weights are 5-bit sign-magnitude numbers
(`cnn_pkg::cnn_val_t`): a sign bit and a magnitude `m` = 0..15, meaning
±m/15. This gives 31 distinct levels from -1 to +1. The encoding has a -0;
the network never produces it, but a loaded image may contain it, and it acts
as zero.

## The time code

An iteration is divided into 15 slots, numbered 1..15 (0..14 in the RTL's
`slot` signal). The two operands of a multiplication use two different codes.

* **Input (interval code):** a value of magnitude `m` is high in slots
  1..m and low afterwards. A cell's own output is sent this way to its
  neighbours as `statex_o`, with the sign on `sign_o`.
* **Weight (spread code):** a weight of magnitude `k` is high in exactly `k`
  slots, spread as evenly as possible over the iteration:

| k/15 | high slots |
|------|------------|
| 0    | none |
| 1    | 8 |
| 2    | 4 12 |
| 3    | 3 8 13 |
| 4    | 2 6 10 14 |
| 5    | 2 5 8 11 14 |
| 6    | 2 4 7 9 12 14 |
| 7    | 2 4 6 8 10 12 14 |
| 8    | 1 3 5 7 9 11 13 15 |
| 9..15 | all slots except those of (15-k)/15 |

The AND of the two codes is high in those of the weight's `k` slots that fall
in the input's first `m` slots. Because the weight slots are spread evenly,
this count is close to `m*k/15`. For example, 8/15 × 9/15: the weight 9/15 is
high in slots 1 3 5 6 8 10 11 13 15, and five of those lie in slots 1..8. The
product comes out as 5/15 = 0.333, against the exact 0.32. Over all 256
magnitude pairs the counted product never differs from the exact product by
more than 0.47/15, so the AND code rounds to within half a step. The sign of
the product is the XOR of the two signs.

Every pattern in the table is symmetric in time, and the patterns for `k` and
`15-k` are complements of each other. The table lives in
`cnn_pkg::wgt_pattern` as 15-bit constants, where bit `s-1` is slot `s`.

## The cell (`cnn_cell`)

```
 in1..in9 ──AND── hit ─┐                                ┌── data_out (5)
 w1..w9  ──┘           ├─ counter ─9─ transfer ─5─ mx ─5─ converter ── statex_o
 sin1..9 ──XOR── neg ──┘             function     │                └── sign_o
 sw1..9  ──┘                                   new_data
```

* `cnn_and_xor`: `hit[i] = in_t[i] & w_t[i]` and `neg[i] = sin[i] ^ sw_t[i]`.
* `cnn_counter`: on every enabled slot it adds +1 for each positive hit and
  -1 for each negative hit. All nine gates are counted in the same clock.
  After 15 slots it holds Net in units of 1/15. The largest possible sum is
  |Net| = 9·15 = 135, so the counter is 9 bits signed. It starts from 0 in
  every iteration, so there is no bias term.
* `cnn_transfer`: by default, Net is clamped to ±15: the piecewise-linear CNN
  output, saturating at ±1. With parameter `TF = TF_HARDLIM` it outputs +1
  for Net ≥ 0 and -1 otherwise.
* **mx**: while `load` is high, the register takes `new_data` instead of
  the transfer-function result, and the counter is cleared.
* `cnn_converter`: the 5-bit result register `data_out`, and the interval
  encoder `statex_o = (slot < |data_out|)`, `sign_o = data_out.sign`.

**Timing.** Each slot is one clock. Every clock:
1. the converter presents the current value of all cells as intervals;
2. the weight generator presents one slot of each weight pattern;
3. the counter adds that slot's products.

On the 15th slot, `net` (the counter plus the last slot's products) goes
through the transfer function and is registered. The counter restarts in the
same clock. The new value appears on `data_out` one clock after the last
slot, and the next iteration starts right away.

All cells update together. During an iteration, every neighbour still sees
the previous iteration's value, because the register changes only at its end.

## The array (`cnn_array`) and cascading

Cell inputs are numbered as a 3×3 window around the cell:

    1 2 3
    4 5 6      5 = the cell's own output
    7 8 9

Input `k` of cell (r, c) is the output of the cell at
(r-1+(k-1)/3, c-1+(k-1)%3). The template `wgt[k-1]` weights that input in
every cell.

Cells on the edge of the grid take their missing neighbours from ports:

| port | direction | contents |
|------|-----------|----------|
| `n_in`, `s_in` | input | the row above and the row below, `COLS+2` entries each, corners included: index 0 is column -1, index `COLS+1` is column `COLS` |
| `w_in`, `e_in` | input | the column left and the column right, `ROWS` entries each |
| `n_out`, `s_out`, `w_out`, `e_out` | output | the time-coded outputs of the edge cells (`tsig_t`: `state`, `sign`) |

To build a larger network, wire the `*_out` ports of neighbouring tiles to
each other's `*_in` ports; the corner entries come from the diagonal tiles.
All tiles must share `clk`, `load`, `run` and the template. Their
controllers then stay in lockstep, or you can drive several arrays from one
controller. To give a single array a fixed boundary, drive the boundary
ports with a constant value's interval code. Tying them all to zero gives a
zero boundary.

## Top level and control (`cnn_top`, `cnn_ctrl`)

`cnn_top` holds one slot controller, one shared weight generator
(`cnn_weight_gen`) and a `ROWS`×`COLS` array (4×4 by default).

To run it:
1. Hold the template on `wgt[0..8]` (input 1..9 order), which must stay
   stable while running.
2. Put the image on `data_in` and raise `load` for one clock. This loads
   every register, puts the slot count at 0, clears the counters and clears
   `iter_cnt`.
3. Hold `run` high. `iter_done` is high during the last slot of each
   iteration. From the next clock on, `data_out` holds the new image and
   `iter_cnt` counts the iterations done.
4. Lowering `run` freezes the network in its current slot. Raising it again
   continues without losing any count.

A `load` in the middle of an iteration throws away the partial sums. The
reset `rst_n` is asynchronous and active low, and clears everything to 0.

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS`, `COLS` | 4, 4 | grid size |
| `TF` | `TF_SATLIN` | transfer function (`TF_HARDLIM` for a hard limiter) |
| `ITER_W` | 16 | width of `iter_cnt` |

The package `cnn_pkg` holds the fixed sizes: 15 slots, 4-bit magnitudes, 9
inputs, a 9-bit counter.

## Where this RTL follows the published design and where it fills gaps

These parts follow the published design:
* the 15-slot time code and its weight patterns;
* AND multiplication and XOR signs;
* the 9-input cell, with input 5 fed back from the cell itself;
* the 9-bit counter followed by the transfer function, the mx for new data,
  and the converter;
* nearest-neighbour coupling;
* 5-bit values;
* 15 clocks per iteration;
* a cascadable array.

These parts are this design's own choices:
* The **transfer function's curve.** The source only says that a transfer
  function is applied, naming sigmoid, hard-limiter and threshold as
  examples. Saturating-linear is the default because it keeps all 31 output
  levels. No sigmoid is provided.
* The **load/run control protocol**, the iteration counter, and loading in
  one clock through parallel per-cell ports. The source gives no host
  interface.
* The **boundary ports**. The source calls the network "fully cascadable"
  but says nothing about edge cells.
* One **shared, combinational weight generator** for the whole array. There
  are no output registers on the time-coded signals. For the clock rates the
  source reports (several hundred MHz on an FPGA), you would likely register
  `w_t`/`sw_t` and `statex_o` and shift the slot count to match.
* No **bias** term, following the weighted sum as the source writes it.
* The 4×4 default size comes from the connection drawing. The source states
  no array size.

Area and timing figures of the original FPGA implementation (gate count,
maximum clock) are properties of that device and tool flow. They have not
been reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The testbenches
share a reference model (`tb/tb_cnn_ref_pkg.sv`), which restates the weight
patterns as slot lists and computes products by counting slots.

| testbench | what it checks |
|-----------|----------------|
| `tb_cnn_weight_gen` | every magnitude, position and slot against the slot lists; `k` high slots per pattern; the 8/15 × 9/15 = 5/15 example |
| `tb_cnn_and_xor` | random gate inputs |
| `tb_cnn_counter` | running sum every slot, random enable gaps, restart, clear, full-scale ±135 |
| `tb_cnn_transfer` | the whole 9-bit range, both curves |
| `tb_cnn_converter` | interval length, contiguity and sign for all 32 values; hold; reset |
| `tb_cnn_ctrl` | slot sequence with random pauses and loads; 15 clocks per iteration |
| `tb_cnn_cell` | one cell with its self-loop: the worked example (8/15 with self-weight 9/15 gives 5/15, then 3/15); random templates with pauses; reload mid-iteration; 15-clock latency |
| `tb_cnn_array` | a 3×5 grid (non-square, so swapped indices show up) with random boundaries, templates and images; edge outputs slot by slot; a second grid with the hard limiter on the same inputs |
| `tb_cnn_top` | the whole network at default size |

`tb_cnn_top` runs the worked example, then 24 random runs: random templates,
images and boundaries, random pauses, and reloads mid-iteration. It checks
`slot`, `iter_done`, `iter_cnt` and the 15-clock iteration, and it counts the
design's mechanisms: load, mid-iteration reload, pause, negative products,
saturation at +1 and at -1, non-zero boundary input, and edge-output
activity. Any mechanism that never occurs counts as a failure.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_cnn_top \
        -y rtl -y tb +libext+.sv rtl/cnn_pkg.sv tb/tb_cnn_ref_pkg.sv tb/tb_cnn_top.sv
    ./obj_dir/Vtb_cnn_top

To run another testbench, replace `tb_cnn_top` with its name. Every file
holds one module or package, named after the file. The packages
(`cnn_pkg`, and for testbenches `tb_cnn_ref_pkg`) must be listed first.
For lint: `verilator --lint-only -Wall -y rtl rtl/cnn_pkg.sv rtl/cnn_top.sv`.
The one remaining lint warning is the counter's `acc` output. Inside the
cell it goes unused, because only `net` is needed there; the testbench uses
it to observe the counter.
