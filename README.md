# MGU_1 recurrent-network accelerator for RSSI indoor localisation

This is a small recurrent neural network in hardware. It takes a person's
start position and, at each time step, 11 received-signal-strength (RSSI)
readings. From these it predicts where the person is at each step. The
network has two layers of a stripped-down gated recurrent cell called
**MGU_1**, each with 32 units, followed by a fully connected layer with two
outputs, (x, y). In total it holds 7,170 16-bit weights, all on chip.

MGU_1 has one gate. With `⊙` meaning element-wise multiplication, one
layer at step t computes:

```
xf_t = Wxf·x_t + b_f          xh_t = Wxh·x_t + b_h          (depend only on the input)
f_t  = σ( xf_t + Whf·h_{t-1} )                               (forget gate)
h̃_t  = tanh( xh_t + f_t ⊙ (Whh·h_{t-1}) )                    (candidate)
h_t  = f_t ⊙ h_{t-1} + (1 − f_t) ⊙ h̃_t
```

The candidate applies `f_t` *after* the matrix product, not to `h_{t-1}`
before it. This is the key hardware choice: `Whh·h_{t-1}` no longer waits
for the gate, so it runs at the same time as `Whf·h_{t-1}`.

The accelerator splits each layer along these lines into three compute
modules, which work on different time steps at once:

* **Input module.** Computes `xf_t` and `xh_t`. These depend only on the
  input, so this module runs ahead whenever an input vector is waiting.
* **Forget module.** Computes `f*_t = xf_t + Whf·h_{t-1}` and sends it to be
  passed through the sigmoid.
* **Hidden state module.** Computes `Whh·h_{t-1}`, then the candidate, then
  `h_t`.

Both layers share one pipelined sigmoid/tanh look-up unit.

```
 RSSI words ─► data_buffer ─► x_t = {loc_x, loc_y, rssi[0..10]}
                                 │
                  ┌──────────────▼─────────────── mgu_layer (layer 1) ┐
                  │ input_module ──xf──► forget_module ──f*──┐        │
                  │       └──────xh──► hidden_module ◄──f,1-f,h̃──┐   │
                  └─────────────────────────┬──────────────────│───┘
                                            h_t (layer 1)      │
                  ┌─────────────────────────▼───── layer 2 ────│───┐
                  │         (same structure, 32 inputs)        │   │
                  └─────────────────────────┬──────────────────│───┘
                                            h_t (layer 2)   activation_module
                                            ▼                 (σ / tanh LUT,
                                     output_module             layer 2 first)
                                     (FC 32 → 2, output FIFO) ─► y_vec
 ctrl_regs: start, steps, start location, count, irq
```

## The MAC slice and the processing element

All arithmetic runs on `dsp_mac`, a multiply-accumulate slice modelled on a
Xilinx DSP48E1. It has a 16×16-bit multiplier, a 48-bit accumulator and
three register stages, so a result appears 3 cycles after it is issued.
`cmd` selects one of three modes for each operation:

| cmd | mode | used for |
|-----|------|----------|
| `2'b00` `MAC_ABC` | P = A·B + C | first term of a dot product, with the bias on C; also `f ⊙ Wh + xh` |
| `2'b01` `MAC_AB`  | P = A·B     | first term of `h_t` |
| `2'b10` `MAC_ABP` | P = A·B + P | accumulate |

A `pe` (processing element) is 16 slices.

* **Matrix mode.** All 16 slices get the same input element and each slice
  gets its own weight. Feeding the input one element per cycle, with one
  weight row per cycle, builds 16 output elements of a matrix–vector
  product in parallel.
* **Element-wise mode** (`lane_mode=1`). Each slice gets its own operand, so
  the same PE also does the element-wise products.

Each compute module has `HID/16` PEs, so 2 PEs for 32 units.

Matrix–vector cost: an input of length P takes P issue cycles plus 3
cycles of latency.

## Fixed-point format

* **Activations** (inputs, hidden states, gate values) are int16 with
  `DATA_FL = 10` fractional bits (range ±32).
* **Weights** are int16 with `W_FL = 12` fractional bits.
* **Layer-1 input** has its own format, `IN_FL` (default 10).
* **Biases** are stored with `DATA_FL` bits. They enter the accumulator on
  C, shifted left by `IN_FL + W_FL − DATA_FL` to line up with the products.
* **Results.** Every accumulator result is brought back to `DATA_FL` by an
  arithmetic right shift, which truncates, and then saturated to int16
  (`mgu_pkg::rescale`).

Both formats are parameters of every module, so one layer can use a
different split than the other. This is the "dynamic fixed point" the
design is built around. The top gives both layers the same values.

## Input module (`input_module`)

Input vectors queue in a small FIFO. For each vector, the module feeds the
PE array one element per cycle with the matching weight row:

* First the 13 rows of `Wxf`. The first row uses `MAC_ABC` to load `b_f`.
* Then the 13 rows of `Wxh`, which load `b_h` the same way.

`xf_t` is pushed into its own FIFO `IN_DIM+3` cycles after the first issue,
and `xh_t` follows `IN_DIM` cycles later.

The weight memory has one row per input element and `HID` words per row:

| rows | contents |
|------|----------|
| `0..P−1` | `Wxf` |
| `P..2P−1` | `Wxh` |
| `2P` | `b_f` |
| `2P+1` | `b_h` |

## Forget module (`forget_module`)

A four-state controller:

* `IDLE`: waits for `run` and a buffered `xf_t`.
* `ADD`: a one-cycle element-wise add of `xf_t` and the recurrent term.
  The recurrent term is zero in the first step of a sequence.
* `SIG`: streams the 32 elements of `f*_t` to the activation unit.
* `WH`: computes `Whf·h_{t-1}` (`HID+3` cycles).

Transitions:

| from | to | condition |
|------|----|-----------|
| `SIG` | `WH` | new `h_t` registered by the hidden state module, not the last step |
| `SIG` | `ADD` | last step and the next `xf` already buffered: a new sequence starts at once |
| `SIG` | `IDLE` | last step, no `xf` buffered |
| `WH` | `ADD` | `xf` buffered |
| `WH` | `IDLE` | no `xf` buffered |

`f*_t` is ready `HID+4` cycles after `h_{t-1}`.

The module also waits for `f_free` from the hidden state module before it
streams a new `f*`. This interlock stops it from overwriting the previous
`f_t` while that value is still in use.

## Hidden state module (`hidden_module`)

This module owns one PE array and the `f_t`, `1−f_t` and `h̃_t` storage. Per
step it runs these phases:

1. **WH.** `Whh·h_{t-1}` in matrix mode (`HID+3` cycles). This overlaps with
   the forget module.
2. **Wait.** Collects `f_t` and `1−f_t` from the activation unit. Only
   responses tagged with this layer are taken.
3. **MULF.** `h*_t = f_t ⊙ (Whh·h_{t-1}) + xh_t`: one element-wise
   `MAC_ABC` with `xh_t` on C.
4. **TANH.** Streams `h*_t` out and collects `h̃_t`.
5. **CALC.** `h_t = f_t ⊙ h_{t-1} + (1−f_t) ⊙ h̃_t`: one `MAC_AB` and one
   `MAC_ABP` issue.
6. **OUT.** Offers `h_t` on a valid/ready port. Once `h_t` is taken it
   becomes `h_{t-1}`, `h_done` pulses, and the next `Whh·h` starts.

After the last step of a sequence, `h_{t-1}` and the recurrent products
return to zero.

## Shared activation unit (`activation_module`, `act_lut`)

The unit takes one element per cycle through a 4-stage pipeline. An element
accepted in cycle t comes out in cycle t+4. The stages are:

1. Register the granted request.
2. Take `|x|` and form the table address: 11 bits, 8 fractional, covering
   `[0, 8)`. Larger magnitudes saturate.
3. Read the table: 11-bit output with 10 fractional bits.
4. Restore the sign using `σ(−x) = 1 − σ(x)` and `tanh(−x) = −tanh(x)`.

Only the positive half of each function is stored: 2 × 2048 entries,
computed at elaboration time in integer arithmetic (powers of
`exp(−1/256)` held as 60-bit fractions) and rounded to nearest. For a
sigmoid, the unit returns both `σ` and `1−σ`, since `h_t` needs both.

Each response carries the requesting layer, the function and the element
index. The response is broadcast, and each module picks out its own
entries.

When both layers request in the same cycle, layer 2 (nearer the output)
wins and layer 1 waits. Inside a layer, the forget and hidden state modules
share one request port and never request at the same time.

## Output module, buffers and host interface

**`output_module`** is the fully connected layer from layer 2's `h_t` to
(x, y). It is a 2-lane PE fed one hidden element per cycle. Results
(`HID+3` cycles) go into a 16-entry output FIFO that the host drains with
`y_pop`. The weight memory holds:

* rows `0..HID−1`: weights, two per row;
* row `HID`: the two biases.

**`data_buffer`** takes RSSI readings one 16-bit word per transfer into a
128-word FIFO, enough for a 9 × 11 sequence. It builds
`x_t = {loc_x, loc_y, rssi[0..10]}`, so element 0 is `loc_x`. Every step of
a sequence uses the same start location, taken from the registers.

**`ctrl_regs`** is a word-addressed register port (`reg_rdata` is a
combinational read):

| addr | name | meaning |
|------|------|---------|
| 0 | CTRL | write bit0 = start, bit1 = clear irq; read {irq, done, busy} |
| 1 | STEPS | time steps per sequence (reset value 9) |
| 2 | LOC_X | start location x (`DATA_FL`) |
| 3 | LOC_Y | start location y |
| 4 | COUNT | results so far in the current sequence |

When `STEPS` results have been written, `busy` falls and `done` and `irq`
rise.

The host is expected to:

1. Write the last prediction back into `LOC_X`/`LOC_Y` as the next start
   location.
2. Start the next sequence.

Results are counted even while idle. A sequence whose inputs are already
buffered can therefore follow the previous one with no gap.

**Weight loading.** The top writes one 16-bit word per cycle through
`wr_en/wr_unit/wr_row/wr_col/wr_data`. `wr_unit` selects the target:

| `wr_unit` | target |
|-----------|--------|
| 0, 1, 2 | layer 1 input, forget and hidden state modules |
| 4, 5, 6 | the same modules in layer 2 |
| 8 | output module |

Weight memories are plain arrays with a combinational read. On an FPGA they
map to block RAM, with the DSP input register acting as the RAM output
register.

## Sizes and parameters

The defaults are the localisation model:

* `RSSI_DIM=11` and `LOC_DIM=2`, giving `IN_DIM=13`;
* `HID=32` and `PE_LANES=16`;
* 9 steps per sequence.

Weights: layer 1 uses 2,944, layer 2 uses 4,160 and the output layer uses
66, for a total of 7,170.

`HID` must be a multiple of `PE_LANES`. Weight row and column indices
are 8 bits wide, which limits `HID` to 255 and `IN_DIM` to 127 (the input
module stores `2·IN_DIM+2` rows). Larger networks, such as 64 units (4 PEs per module), are a parameter change.
Networks of a few hundred units would need wider indices. The output width
is fixed at 2 in the top.

## Timing and throughput

Each layer's input products run ahead of its recurrent part, so successive
time steps overlap. The rest of a step is serial: the recurrent matrix
product, the add, 32 sigmoid elements, the gate multiply, 32 tanh elements
and the final update.

The end-to-end test measures about **1,620–1,770 cycles per 9-step
sequence**, roughly 180 cycles per step.

The original implementation reports 6 µs per 9-step sequence at 142 MHz,
about 850 cycles. Most of the gap comes from the single shared activation
unit, which handles one element per cycle: each layer needs 64 activation
elements per step, and the two layers contend for the unit. The original
does not describe how its schedule reaches its figure. Adding activation
units or widening the unit would close most of the gap; neither is built
here.

## Departures and open points

* **Mode encoding.** The mode encoding follows the DSP mode table above:
  `2'b10` accumulates. One description of the original instead says to
  switch to `2'b00` after the first cycle; that would add C again rather
  than accumulate.
* **Output layer.** Its insides are not specified by the original. It reuses
  the PE scheme with 2 lanes.
* **Storage of `f_t`, `1−f_t` and `h̃_t`.** The original places this storage
  in the activation unit. Here it lives in each hidden state module, next
  to its consumer.
* **Added handshakes.** These are this design's own:
  * `f_free` and `h_done` between the forget and hidden state modules;
  * the valid/ready handshake between layers and to the output module;
  * the register map;
  * the weight-load port.
* **Details not given by the original.** These are this design's own
  choices:
  * reset: synchronous, active low, clears all state;
  * FIFO depths;
  * the LUT input scaling;
  * accumulator width 48;
  * truncating rescale.
* **Alternatives not built.** A piecewise-linear tanh, a distributed-RAM
  table and several activation units serving groups of MAC slices are
  alternatives the original only compares with; none is built.
* **Surrounding system not included.** The host processor, its DMA
  engine, DRAM and the UART link are not included. The top exposes the
  register, weight-load, input-stream and output-buffer ports where they
  would connect.
* **Trained weights not included.** The tests use random weights and check
  the hardware bit for bit against a software model using the same
  fixed-point rules.

## Files and simulation

`rtl/` holds one module or package per file. `mgu_pkg.sv` has the shared
types, the MAC mode enum and the rescale/saturate functions; it must be
compiled first. `tb/` holds one self-checking testbench per module, named
`tb_<module>`. Each prints `TB_RESULT checks=… failures=…`.

`tb_mgu_accel` runs the whole accelerator at its default size. It:

* loads all 7,170 weights;
* runs three 9-step sequences, two of them back to back;
* compares every prediction with a reference model;
* checks the latency bound and the interrupt;
* counts activation conflicts, run-ahead of the input modules and both
  forget-module paths into `ADD`.

It finishes in well under a minute. To run it:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mgu_pkg.sv tb/tb_mgu_accel.sv --top-module tb_mgu_accel -Mdir obj -o sim
./obj/sim
```

Replace `tb_mgu_accel` with any other `tb_<module>` to test one block.
