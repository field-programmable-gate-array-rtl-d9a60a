# A 16:4:16 fully connected network with time-shared neurons

This is the fully connected (FC) stage of a neural network. It takes 16 inputs,
has 4 hidden neurons with a `tansig` (tanh) activation, and has 16 output
neurons with a linear (`purelin`) activation. A direct implementation gives
every neuron its own multipliers, which is 64 multipliers for each layer. This
design shares a few arithmetic units over time instead:

* **Hidden layer.** One neuron datapath with **8 multipliers** and **8
  adders** computes the four hidden neurons one after another. Each
  multiplier handles two of the 16 inputs, in two rounds.
* **Output layer.** Two identical neuron datapaths run in parallel, each
  with **2 multipliers** and **2 adders**. Each one computes 8 of the 16
  outputs, one after another.
* **Pipelining.** The two layers form a two-stage pipeline. The hidden
  layer works on vector k+1 while the output layer finishes vector k.

The cost is latency. At the default sizes a result appears 350 clocks after
the first input word. A new result follows every 197 clocks.

The structure follows a published FPGA architecture for an efficient DNN
fully connected layer. The "Departures" section below lists every place where
this RTL differs from that description or fills in something it leaves open.

## Number format

| quantity | width | format |
|---|---|---|
| inputs X1..X16 | 9 bits | two's complement integer. The intended range is ±64. |
| weights, biases | 9 bits | two's complement, scaled by 256 (Q8): 1.0 = 256 |
| product | 18 → 10 bits | `floor(x*w/256)`: the 8 LSBs are dropped (arithmetic shift) |
| hidden outputs Y1..Y4 | 10 bits | Q8, equal to `round(256*tanh(a/256))` |
| network outputs X'1..X'16 | 10 bits | Q8, the linear sum saturated to 10 bits |

The hidden neuron's sum C = Σ floor(x·w/256) + b is a Q8 number. It is
saturated to the 9-bit range [-256, 255] and then addresses a 512-entry ROM.
The ROM covers x = C/256 in [-1, 1) and holds `round(256*tanh(x))`, so
every entry lies between -195 and +195. The ROM contents are computed when
the design is elaborated (`tansig_rom.sv`). No table file is needed.

## How one hidden neuron is computed

The hidden unit (`hidden_layer.sv`) is a chain of stages, each driven by one
control signal.

1. **Input registers, control C.** A chain of 16 registers
   (`input_reg_chain`) is loaded from the top, one word per clock, while
   C = 1. After 16 words, X1 is in the bottom register. With C = 0 the
   demultiplexers connect the registers to the multipliers instead of to
   the next register.
2. **Weights, control D.** All 64 hidden weights sit in a 64-deep circular
   shift register (`weight_siso`). Sixteen shifts with D = 1 move the
   current neuron's 16 weights into 8 small shift registers of depth two,
   one in front of each multiplier. Multiplier k then holds the weights for
   inputs 2k+1 and 2k+2. For neuron 1 this loading happens at the same time
   as the input loading. The 64-deep register is circular: after all four
   neurons it has made one full turn and is ready for the next vector.
3. **Multiplier array, two rounds** (`mult_array`). Each multiplier is a
   serial shift-add multiplier (`seq_mult`) that takes N = 9 clocks.
   * In round 0 the 8 multipliers form the products of the odd inputs
     X1, X3, …, X15.
   * In round 1 they form the products of the even inputs.
   * An output demultiplexer writes each product, scaled back by 2⁻⁸, into
     its register V1..V16.
4. **Pipelined adder array** (`adder_array`). See the next section.
5. **Tansig ROM.** The saturated sum addresses the ROM. The ROM's
   registered output is written into entry n of the depth-4 output register.

While neuron n is in the adder array and the ROM, the weights of neuron n+1
are already being shifted in. As a result, only the first neuron pays for
the adder array and ROM latency in full.

## The pipelined adder array

A plain adder tree for 16 values needs 15 adders. Here each stage has half
the adders a plain tree would need. Each adder is used in two consecutive
clocks: a multiplexer (E = 0, then E = 1) picks which pair of values it adds,
and a demultiplexer stores each result in its own register. For 16 products
the array has 4 + 2 + 1 adders plus one bias adder:

| clock | stage-1 adders (4) | stage-2 adders (2) | stage-3 adder (1) | bias adder |
|---|---|---|---|---|
| 0 | V1..V8 → R1..R4 | | | |
| 1 | V9..V16 → R5..R8 | | | |
| 2 | | R1..R4 → R9, R10 | | |
| 3 | | R5..R8 → R11, R12 | | |
| 4 | | | R9+R10 → R13 | |
| 5 | | | R11+R12 → R14 | R13 + b → T |
| 6 | | | | T + R14 → C |

The sum C is valid after clock 6. This is 7 clocks, as in the original
description: two clocks per stage plus one for the bias. The module is
generic in `L`, the number of inputs, which must be a power of two and at
least 4. The output neurons use it with `L = 4`: one adder is used twice,
then the bias adder works for two clocks.

Every register in the array has the full output width (input width +
log2(L) + 1), so the array cannot overflow. A new operation may start
2·log2(L) − 3 clocks after the previous one. Both neuron controllers start
operations far less often than that.

## Output layer

`output_layer` holds two `output_neuron` units. Both receive the same four
hidden outputs. Unit 0 computes X'1..X'8 and unit 1 computes X'9..X'16, at
the same time. Each unit contains:

* input registers Reg1..Reg4, loaded in one clock;
* a 32-word circular weight memory;
* a 2-multiplier array with depth-2 weight shift registers (the same
  `mult_array` as in the hidden layer, with `M = 2`);
* a 4-input adder array;
* an 8-entry circular bias FIFO;
* the `purelin` activation, which is only a saturation to 10 bits;
* an 8-entry output memory.

For each output, the unit shifts in the output's 4 weights (4 clocks). It
then multiplies in two rounds (2N clocks) and adds the bias. The adding
overlaps the weight loading of the next output.

## Timing (N = 9, clock counts)

| event | clocks |
|---|---|
| product of one serial multiplier | N = 9 after `start` |
| multiplier array, 16 products in V | 2N+1 = 19 |
| adder array, sum of 16 + bias | 7 |
| hidden: first output stored, counted from the last input word | 2N+10 = 28 |
| hidden: each further neuron | 2N+18 = 36 |
| hidden: `y_valid`, counted from the last input word | 8N+65 = 137 |
| output unit: output j stored after `start` | 2N+9 + j·(2N+6) |
| output layer: `done` after `start` | 16N+52 = 196 |
| whole network: first result after the first input word | 24N+134 = 350 |
| whole network: results, input kept full | every 16N+53 = 197 |

All of these counts are checked by the testbenches.

## Interfaces

The top level is `fcnn_top`. It has no parameters: sizes come from
`fcnn_pkg`.

* **Reset.** `rst_n` is an asynchronous active-low reset.
* **Configuration bus** (`cfg_valid`, `cfg_sel`, `cfg_data`). Write it while
  the network is idle, before the first vector. Each clock with `cfg_valid`
  high shifts one 9-bit word into the memory that `cfg_sel` selects, in this
  order:
  * `CFG_HID_W`: 64 words. Neuron 1 w1..w16, then neuron 2, and so on.
  * `CFG_HID_B`: b1..b4.
  * `CFG_OUT_W0`: output 1 w1..w4, then output 2, …, up to output 8.
  * `CFG_OUT_B0`: biases of outputs 1..8.
  * `CFG_OUT_W1`, `CFG_OUT_B1`: the same for outputs 9..16.

  Assertions flag configuration writes while a vector is in progress.
* **Input stream** (`x_valid`, `x_data`, `x_ready`). Send one word per
  accepted clock, X1 first. `x_ready` is high while the hidden layer is
  loading a vector. A word is taken on a clock edge where both `x_valid` and
  `x_ready` are high. Gaps in `x_valid` are allowed.
* **Result** (`out_data`, `out_valid`). `out_valid` pulses for one clock when
  `out_data[0..15]` (X'1..X'16) is complete. The values then stay put until
  the next vector's first output is written, at least 2N+9 clocks later.
* **Observation.** `hid_y` shows the hidden outputs. `hid_valid` is high
  while a hidden result waits for the output layer.

The layer-to-layer handshake is a valid/ready pair (`y_valid` / `y_ready`
inside the top). The hidden layer accepts the next vector only after the
output layer has taken its result. Since the output layer is the slower
stage, it sets the throughput.

## Departures from the original description

* **One clock everywhere.** In the original, the multipliers run at f and
  the adders at f/N. Here everything runs on a single clock, and every adder
  step takes one clock.
* **Latency figures.** The original quotes 2N+23 clocks for the hidden layer
  and 2N+8 for the output layer. This design needs:
  * 16 input clocks plus 2N+10 clocks to the first hidden output;
  * 16 input clocks plus 8N+65 clocks for all four hidden outputs, because
    neurons 2–4 each need their own 16-clock weight load;
  * 2N+9 clocks for the first output of an output unit, and 16N+52 for all
    eight.
* **Output-layer arithmetic.** This design uses 4 multipliers and 4 adders
  in total. The original's comparison table lists 4 multipliers and 6 adders
  without saying how the adders are split.
* **Output-layer weights.** The output units shift their four weights in
  serially (4 clocks). The original loads inputs, weights and bias in one
  clock.
* **Output activation.** The original shows a LUT/ROM stage in the output
  units but also says it is unnecessary for `purelin`. There is no ROM here:
  the linear output is saturated to 10 bits.
* **Bias FIFO and output memory.** The original's 16-deep bias FIFO and
  16-deep output memory are split into two 8-deep halves, one per unit.
* **Product width.** The original truncates products to 9 bits, which is
  safe for inputs within ±64. This design keeps 10 bits, so that any 9-bit
  input is safe.
* **Adder width.** Inside the adder array the width does not grow stage by
  stage: every register has the full width.
* **Tansig ROM.**
  * The entries are 10 bits wide. The original mentions both N and 2N bits
    for the entry width in one place and 10 bits in another.
  * The ROM address is the sum saturated to [-1, 1). How the sum becomes
    an address is not spelled out in the original.
* **Interfaces and reset are this design's own.** This covers:
  * the configuration bus and the order of its words;
  * the valid/ready handshakes;
  * the circular reuse of the weight memories;
  * the reset.
* **Network depth.** The original once mentions "3 hidden layers". Its
  architecture and every figure, however, describe one hidden layer of four
  neurons (16:4:16), which is what is built.

The original also describes a "conventional" fully parallel structure (64
multipliers per layer). It is only used there as a baseline and is not part
of this RTL.

## Verification

Each block has a self-checking testbench in `tb/`:

* Each compares the block against an independent integer/real model in
  `tb/fcnn_ref_pkg.sv`.
* Each checks the clock counts from the timing table.
* Each ends with a line `TB_RESULT checks=<n> failures=<n>`.
* Each has a watchdog.

`tb_fcnn_top` runs the whole network at its default sizes:

* It writes every weight and bias through the configuration bus.
* It streams 12 vectors and checks all 16 outputs of each against the
  model.
* It checks the first-result latency and the spacing between results.
* It counts each mechanism and fails if any of them never occurs: input
  gaps, back-pressure from the output layer, both layers busy at once,
  tansig-address saturation at both ends, and output saturation.

To build and run a testbench with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  --top-module tb_fcnn_top -y rtl -y tb +libext+.sv \
  rtl/fcnn_pkg.sv tb/fcnn_ref_pkg.sv tb/tb_fcnn_top.sv -o sim
./obj_dir/sim
```

Substitute any other `tb_<block>` for `tb_fcnn_top`. Every testbench runs in
well under a second.

## Files

| file | block |
|---|---|
| `rtl/fcnn_pkg.sv` | sizes, formats, configuration-bus encoding |
| `rtl/fcnn_top.sv` | whole network |
| `rtl/hidden_layer.sv` | shared hidden neuron with its controller |
| `rtl/output_layer.sv` | two output units in parallel |
| `rtl/output_neuron.sv` | one output unit with its controller |
| `rtl/input_reg_chain.sv` | input registers with the C demultiplexers |
| `rtl/weight_siso.sv` | circular serial-in serial-out weight/bias memory |
| `rtl/mult_array.sv` | two-round multiplier array with depth-2 weight registers |
| `rtl/seq_mult.sv` | N-clock serial multiplier |
| `rtl/adder_array.sv` | pipelined adder array with bias adder |
| `rtl/tansig_rom.sv` | 512-entry tanh table |

To change the network size, edit the constants in `fcnn_pkg`. The blocks
assume that the number of inputs to a neuron is a power of two, at least 4,
and twice the number of multipliers. They also assume that the number of
output neurons divides evenly among the output units.
