# A perceptron network built from two pass-gate arithmetic cells

This design is a small feed-forward neural network in hardware. Every neuron
is a self-contained *neuroprocessor*: it weights its inputs, sums them,
takes the sign of the sum (a hard-limiting, or threshold, activation) and
holds the decision in a register. The aim behind the design is low power.
All of the arithmetic in a neuron comes from just two cells:

- a **one-bit signed multiplication cell**, and
- a **one-bit full adder**.

Both are meant as transfer-gate (pass-transistor) circuits. Their outputs
are formed by steering existing signals through switches, not by pull-up
and pull-down networks tied to the supplies. The multiplier cell takes 8
transistors and the adder 12, against 20 and 28 for static CMOS. The power
advantage lives at transistor level, so RTL cannot show it. What this RTL
does capture is the logic of those cells, written as the same two-way
selections the switches make, and how a neuron and a network are built
from them.

The default network has 4 inputs, two hidden layers of 6 and 4 neurons, and
3 outputs. All 13 neurons work in parallel.

## Number formats

Everything is in **sign-magnitude** form because the multiplication cell
works that way: a magnitude and a separate sign bit.

| quantity | format | meaning |
|---|---|---|
| neuron input | `neuro_pkg::bip_t` = `{neg, nz}` | ternary value: `nz=0` is 0, otherwise -1 if `neg`, else +1 |
| weight | `W+1` bits, bit `W` = sign | value = ±magnitude, with `W = 8` magnitude bits by default |
| weighted sum U | `SW` bits, two's complement | `SW = W + clog2(N+1) + 1`, so it never overflows |
| neuron output | 1 bit | 1 = +1 (sum ≥ 0), 0 = -1 |

A neuron's output goes to the next layer as an input with `nz=1` and
`neg = ~y` (see `neuro_pkg::from_limiter`). The network's own inputs may be
-1, 0 or +1.

Weights are plain input ports. The design has no weight memory and no
training logic. Whoever drives the ports keeps the weights stable.

## The signed multiplication cell (`sign_mult_cell`)

The inputs are two one-bit operands X and Y with signs SIGN(X) and
SIGN(Y). The outputs are the magnitude product X·Y and its sign
SIGN(X·Y). It works as three selections:

```
X·Y        = X ? Y : X                  (AND: a 0 in X passes itself)
difference = SIGN(X) ? ~SIGN(Y) : SIGN(Y)  (XOR of the signs)
SIGN(X·Y)  = X·Y ? difference : X·Y     (the product itself gates the sign)
```

The last stage feeds the product back into the sign. As a result, a zero
product is never reported as negative. This matters when cells are combined
into words.

## Multiplying an input by a weight (`signed_weight_mult`)

A weight of W magnitude bits is multiplied by a ternary input using one
cell per weight bit. All cells share the input's magnitude bit (`nz`) and
sign bit, and each cell gets one weight bit plus the weight's sign. This
gives:

- **Magnitude of the product:** the weight's magnitude when the input is
  nonzero, else 0.
- **Sign of the product:** the OR of the cells' sign outputs. Because each
  cell's sign is gated by its own product bit, the word is negative exactly
  when the product is nonzero and the two signs differ.

Together this is the classic rule for a ±1-input neuron: add the weight,
and flip its sign when the input is negative.

## The summing junction (`summation_unit`)

A neuron with N inputs has N+1 products. The extra one is a constant input
of 1 times a bias weight `w[N]`. These products are added by a chain of
N+1 ripple-carry adders, each built of `full_adder` cells
(`ripple_adder`). A negative product is added in two's complement without a
separate negation circuit:

- its zero-extended magnitude is inverted (XOR with the sign), and
- the sign drives the adder's carry in, which supplies the `+1`.

```
acc[0] = 0
acc[k+1] = acc[k] + (mag[k] ^ {SW{neg[k]}}) + neg[k]
U = acc[N+1]
```

The unit is purely combinational. U settles after the multiplier cells
plus N+1 rippling adder chains. The design sets no clock frequency. At the
default sizes the worst path is 5 to 7 chained 12-bit ripple adders.

## The full adder (`full_adder`)

The full adder is also written as selections around the propagate signal
P = A xor B:

```
SUM  = P ? ~Cin : Cin
Cout = P ?  Cin : A      (when A = B the carry out is A itself)
```

## Hard limiter and output latch (`activation_latch`)

The activation is the sign of U. A sum of exactly zero counts as +1. The
decision is held in a register that loads on each rising clock edge, so a
neuron's output changes only at clock edges. `rst_n` is an asynchronous,
active-low reset that sets every decision to +1.

## Neuron, layer and network

- `neuron`: `summation_unit` followed by `activation_latch`. Its output
  appears one rising edge after its inputs and weights are stable.
- `neuron_layer`: M neurons sharing N inputs, each with its own weight row
  `w[j]` (the bias weight is at `w[j][N]`).
- `neuroprocessor_mlp` (top): three layers, fully connected. Each layer
  sends its results only to the next layer.

### Timing of the network

Every neuron registers its output, so the network is a **three-stage
pipeline**:

```
edge t   : hidden layer 1 latches f1(x)
edge t+1 : hidden layer 2 latches f2(layer 1)
edge t+2 : output layer latches  f3(layer 2)   -> y
```

`y` after edge t+2 is the answer for the `x` present before edge t. That
is three edges of latency. A new input vector can be applied every cycle.
This holds as long as the weights stay unchanged while a vector is in
flight. When the weights change, the next three outputs mix old and new
weights.

### Top-level ports

| port | direction | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all registers on the rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; outputs become +1 |
| `x` | in | `N_IN` × `bip_t` | network inputs |
| `w1` | in | `[N_H1][N_IN+1][W+1]` | layer-1 weights, row j = neuron j, last entry = bias |
| `w2` | in | `[N_H2][N_H1+1][W+1]` | layer-2 weights |
| `w3` | in | `[N_OUT][N_H2+1][W+1]` | output-layer weights |
| `y` | out | `N_OUT` | decisions, 1 = +1 |

Parameters: `N_IN=4`, `N_H1=6`, `N_H2=4`, `N_OUT=3`, `W=8`. Any positive
values work. The sum width follows automatically.

## What is given and what is chosen

These parts follow the architecture:

- the two cells and their signal names;
- the neuron's structure (multipliers and adders forming the summing
  junction, a constant input of 1 with its own weight, sign activation,
  and an output latch that updates on the rising edge);
- the fully connected multilayer network with 4-6-4-3 neurons.

These are this design's own choices:

- the ternary input and sign-magnitude weight formats, and the 8-bit
  weight magnitude;
- the product sign being gated by the product, so a zero product is never
  negative;
- the carry-in trick for negative products, and the chained ripple adders;
- zero counting as +1, and the asynchronous reset to +1;
- weights as ports, with no storage or learning.

The hard limiter is the only activation built. Smoother activations
(sigmoid, tanh) and real-valued inputs are natural extensions, but they are
not part of this design. Nor is time-multiplexing one set of neurons across
layers (a bit-serial style). This design is fully parallel.

The claims of the low-power circuit style cannot be checked in RTL: the
transistor counts, the absence of supply connections, and the lower power
and delay. In synthesis, each cell becomes ordinary gates.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sign_mult_cell` | all 16 input combinations against integer multiplication |
| `tb_full_adder` | all 8 input combinations against integer addition |
| `tb_summation_unit` | 5000 random vectors plus largest/smallest sums, zero inputs, negative-zero weights, with N=6 |
| `tb_activation_latch` | sign decision after each edge, hold between edges, asynchronous reset |
| `tb_neuron` | 3000 vectors, one per clock, one-edge latency; requires zero, positive and negative sums |
| `tb_neuron_layer` | 2000 vectors through a 4-input, 6-neuron layer |
| `tb_neuroprocessor_mlp` | the full default network (see below) |

`tb_neuroprocessor_mlp` runs the top at its default parameters. It
streams a new random input every cycle through 60 batches of random
weights. Its reference model is written in plain integers and has its own
copy of the three latch layers, and the test compares the outputs after
every edge. It also evaluates the whole network directly for the input
applied three edges earlier, which pins down the latency and the
one-vector-per-cycle rate. The test counts these events and fails if any
never happens:

- negative inputs, zero inputs and negative products;
- sums of exactly zero, and +1 and -1 decisions, in every layer;
- a reset in mid-stream;
- weight changes.

`tb/tb_util_pkg.sv` holds the integer reference functions and random
generators shared by the testbenches.

### Running with Verilator

From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/neuro_pkg.sv tb/tb_util_pkg.sv tb/tb_neuroprocessor_mlp.sv \
  --top-module tb_neuroprocessor_mlp -Mdir obj_mlp
./obj_mlp/Vtb_neuroprocessor_mlp
```

Replace the testbench name to run another one. To lint the RTL:

```sh
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl +libext+.sv rtl/neuro_pkg.sv \
  rtl/neuroprocessor_mlp.sv --top-module neuroprocessor_mlp
```

Lint reports two harmless warnings, hence `-Wno-fatal`:

- the unused carry out of the last adder stage in each summing junction
  (the sum width already rules out overflow);
- the package constant that the smallest modules do not use.

## Files

| file | content |
|---|---|
| `rtl/neuro_pkg.sv` | input type, default weight width, sum-width function |
| `rtl/sign_mult_cell.sv` | one-bit signed multiplication cell |
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/ripple_adder.sv` | chain of full adders |
| `rtl/signed_weight_mult.sv` | ternary input × sign-magnitude weight |
| `rtl/summation_unit.sv` | summing junction of a neuron |
| `rtl/activation_latch.sv` | hard limiter and output register |
| `rtl/neuron.sv` | one neuroprocessor |
| `rtl/neuron_layer.sv` | one fully connected layer |
| `rtl/neuroprocessor_mlp.sv` | the three-layer network (top) |
