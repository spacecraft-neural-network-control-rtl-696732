# Neural network battery-charge controller for a spacecraft power bus, in IEEE-754 single precision

A spacecraft's solar array feeds the load in sunlight and charges the battery
with whatever is left over. In eclipse the battery alone carries the load. The
controller here decides how the battery charge current should change. It
compares the current that is available (solar array plus battery discharge)
with the current the load draws, and maps that error, together with the load
current, through a small trained neural network to a change in battery charge
current.

The network is a 2-3-1 multilayer perceptron:

```
             +-----------+
 error ----+-| hidden U_0|-- y1 --+
           | +-----------+        |   +-----------+
 i_l   --+-+-| hidden U_1|-- y2 --+---|  output   |--- delta_ibc
         | | +-----------+        |   |  neuron   |
         +-+-| hidden U_2|-- y3 --+   |   U_3     |
             +-----------+            +-----------+
```

Every neuron forms a weighted sum of its inputs plus a bias. All of them use
the pure linear (identity) activation, so each output is simply that sum. All
arithmetic is IEEE-754 single-precision floating point, which gives the
controller the dynamic range of a general-purpose number format without any
scaling analysis. The network is trained offline, so the weights are inputs
to the hardware: nothing is learned on chip.

## Hierarchy

| module | role |
|---|---|
| `power_ctrl_subsystem` | top: error junction plus controller |
| `error_junction` | `e = i_pv + i_bd - i_l` |
| `nnc_2_3_1` | the 2-3-1 network; ports named W11..W33, b11..b13, b3, Y1..Y3 |
| `hidden_neuron` | `y <= w_error*error + w_il*i_l + bias`, registered |
| `output_neuron` | `y = w31*y1 + w32*y2 + w33*y3 + b3`, combinational |
| `fp32_mul`, `fp32_add` | single-precision multiplier and adder |
| `fp32_pkg` | format constants, `float32_t`, the `nnc_weights_t` weight struct |

The controller needs 9 multipliers and 9 adders (2 multiplies and 2 adds per
hidden neuron, 3 and 3 for the output neuron). The error junction adds two
more adders.

## Timing and control pins

The network has one pipeline stage. Each hidden neuron ends in a 32-bit
register, and those three registers (96 flip-flops) are the only state in
the design. On a rising `clk` edge:

* `res` high clears y1..y3 to +0. Reset is synchronous and takes priority
  over `load`.
* otherwise, `load` high captures the three hidden sums.
* otherwise, the registers hold their values, even when the inputs change.

The output neuron and the error junction are combinational. So `delta_ibc`
(and `nn_output` of `nnc_2_3_1`) is valid one clock after the currents are
applied with `load` high. At the intended 100 MHz clock that is 10 ns, well
inside the 100 ns the original design quotes for one result. After a reset,
`delta_ibc` equals `b3`, because all three hidden outputs are zero.

Nothing inside the design sets the clock frequency. The combinational path
runs through one error junction (two adders), one multiplier and two adders
in a hidden neuron, and, after the register, one multiplier and three adders
in the output neuron. Whether that path closes at 100 MHz depends on the
target. If it does not, insert registers between the arithmetic units.

## The floating-point units

These units are where most of the design effort is. Each one is a single
combinational block. Both round to nearest, ties to even, and handle every
IEEE-754 class:

* **Subnormals** are accepted as inputs and produced as results. An operand
  with exponent field 0 is read with exponent 1 and no hidden bit.
* **Rounding** adds the round increment to the packed `{exponent, fraction}`
  field. A carry out of the fraction therefore raises the exponent, a
  subnormal that rounds up becomes the smallest normal number, and a carry
  into exponent 255 gives infinity.
* **NaN results** (a NaN operand, 0 × ∞, ∞ − ∞) are always the quiet NaN
  `0x7FC00000`. Payloads are not propagated.
* **Signed zeros:** an exact cancellation in the adder gives +0, and
  (−0) + (−0) gives −0. A product with a zero operand takes the XOR of the
  operand signs.

`fp32_mul` multiplies the two 24-bit significands into a 48-bit product. It
normalises the product with a leading-zero count, which also covers subnormal
operands. If the result exponent falls below 1, it shifts right into the
subnormal range, and everything shifted out is kept as a sticky bit.

`fp32_add` orders the operands by magnitude. It aligns the smaller one in a
28-bit word (carry, hidden bit, 23 fraction bits, guard, round, sticky), then
adds or subtracts. After a carry it shifts right by one. After cancellation
it shifts left by the leading-zero count, but stops at exponent 1, which
leaves a subnormal.

The order of the additions matters, because floating-point addition is not
associative:

* hidden neuron: `(w_error*error + w_il*i_l) + bias`
* output neuron: `((w31*y1 + w32*y2) + w33*y3) + b3`
* error junction: `(i_pv + i_bd) - i_l`

A model of this controller must use the same order to match it bit for bit.

## Ports of the top

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `res`, `load` | in | 1 | clock, synchronous reset, capture enable |
| `i_pv`, `i_bd`, `i_l` | in | 32 | solar-array, battery-discharge and load currents |
| `w` | in | `nnc_weights_t`, 13 × 32 | trained weights and biases |
| `error` | out | 32 | error current fed to the network |
| `y1`, `y2`, `y3` | out | 32 | hidden-neuron outputs |
| `delta_ibc` | out | 32 | change in battery charge current |

In `nnc_weights_t`:

* `w1k` weights the error into hidden neuron k.
* `w2k` weights the load current into hidden neuron k.
* `b1k` is hidden neuron k's bias.
* `w3k` weights y_k into the output.
* `b3` is the output bias.

`nnc_2_3_1` exposes the same values as thirteen separate ports, with the
network output on `nn_output`. It has 610 signal pins besides the clock.

## Relation to the original design, and choices made here

Taken from the original design:

* the 2-3-1 structure
* the two inputs, error current and load current
* the pure linear activations
* biases on every hidden and output neuron
* IEEE-754 single precision
* the port and instance names of the controller
* the `clk`/`load`/`res` pins on the hidden neurons only
* 96 flip-flops
* the sign convention of the error junction (+ solar array, + battery
  discharge, − load)

Chosen here, because the original does not specify them:

* the IEEE rounding mode and the subnormal, NaN and infinity handling (the
  original uses a floating-point library and says only that it follows the
  IEEE standard)
* the order of the additions
* that `res` is synchronous and active high, and that `load` is a plain
  register enable
* the reset value +0
* putting the registers at the hidden-neuron outputs. This is the one
  placement that gives the 96 flip-flops reported for the original.
* that the error junction is digital and in floating point (the original
  controller takes the error as an input)
* passing the two inputs to all three hidden neurons in parallel. The
  original's text mentions multiplexing in the input layer, but its block
  diagram wires the inputs in parallel, and that is what is built.

Not built:

* the solar array and current sensing, and the battery subsystem. These are
  analog plant outside the logic: currents enter and `delta_ibc` leaves as
  ports.
* training, which is done offline by back-propagation
* a weight memory. The trained weight values are not available, so the
  weights are ports, to be driven from registers, a ROM or a bus interface
  added by the integrator.

## Verification

Each module has a self-checking testbench in `tb/`. All of them print
`TB_RESULT checks=N failures=M` at the end, and each has a watchdog.

The reference model is `tb/fp_ref_pkg.sv`. It widens single-precision
operands exactly to double precision, does the operation in double-precision
(`real`) arithmetic, and rounds the result once to single precision with its
own bit-level rounding routine. Double precision carries more than twice the
single-precision significand plus two bits. So for addition and
multiplication this double rounding always gives the correctly rounded single
result, and the RTL is compared with it bit for bit.

* `tb_fp32_mul` and `tb_fp32_add` run hand-picked corner cases and tens of
  thousands of random operands. The corner cases cover ties, subnormal
  boundaries, overflow, cancellation and the special values. The random
  operands are drawn from every number class, and the adder also gets
  near-cancelling pairs.
* `tb_hidden_neuron` checks reset, the one-clock load latency (no change
  before the edge), hold with `load` low, and reset winning over `load`.
  Two assertions inside `hidden_neuron` state the same register rules: reset
  clears the output, and with neither `load` nor `res` high it holds. They
  fire in any simulation run with `--assert`.
* `tb_output_neuron` and `tb_error_junction` check random and hand-worked
  values. The junction cases include a sunlight point (+4 A), an eclipse
  point (−1 A) and a balanced point (+0).
* `tb_nnc_2_3_1` gives each neuron distinct random weights, so that a crossed
  connection is caught. It checks y1..y3 and the output after load and after
  hold.
* `tb_power_ctrl_subsystem` runs the whole design end to end at its default
  configuration with a 100 MHz clock. It uses a fixed set of moderate
  weights and 400 operating points, two thirds sunlight and one third
  eclipse (no solar-array current, battery discharging). It checks the
  error, hidden and output values and measures the latency against the
  100 ns budget (it is 10 ns). It counts sunlight points, eclipse points,
  loads, holds and resets, and fails if any of them never happened.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/fp32_pkg.sv tb/fp_ref_pkg.sv tb/tb_power_ctrl_subsystem.sv \
    --top-module tb_power_ctrl_subsystem
./obj_dir/Vtb_power_ctrl_subsystem
```

To run another testbench, replace the testbench file and the top-module
name. The packages must be listed first, because Verilator does not find a
package through `-y`.

## Size

After generic synthesis, the whole subsystem has 96 flip-flop bits and about
1,900 word-level cells. Most of them are in the 9 multipliers and 11 adders.
There are no memories.
