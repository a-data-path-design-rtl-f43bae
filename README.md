# Pipelined floating-point neural network datapath

This is a feed-forward artificial neural network built from a small library of fully
pipelined neurons that work on IEEE-754 single-precision numbers. Each neuron multiplies
its stimuli by stored weights in parallel, sums the products in an adder tree, and applies
a transfer function. Every multiplier and adder is pipelined, so the network accepts a new
stimulus set on every clock cycle and produces one result set per cycle after a fixed
latency. All weights of the network sit on one long shift-register chain and are loaded
through a single 32-bit input, one word per cycle.

The default configuration is a small regression network: 4 inputs, a hidden layer of four
4-input neurons, and an output layer of two 4-input neurons, all with a linear
transfer function. It predicts the compressive and tensile strength of concrete from four
mix properties: amount of cement, amount of water, consistency and temperature.

The structure follows a published design: a neuron library and network template from
which a software generator writes HDL for a given network description. Here that
generator is replaced by one parameterised SystemVerilog module. The floating-point cores
were vendor IP in the original and are written from scratch here. "Departures and open
points" below lists every place where this RTL had to choose for itself.

## Block structure

```
ann_network                       network: input regs -> N_LAYERS neuron layers -> output regs
├── input_layer                   stimulus registers, serial shift chain or parallel load
├── neuron_layer  (x N_LAYERS)    fully connected layer of identical neurons
│   └── neuron    (x layer size)
│       ├── weight_chain          Register Unit: serially loaded weights (and bias)
│       ├── fp32_mul (x N_IN)     Multiplication Unit
│       ├── fp32_add (tree)       Addition Unit, log2(N_IN) levels, +1 adder for the bias
│       └── activation_unit       transfer function, 1 cycle
└── output_layer                  result registers (optional, OUTPUT_REGS)
ann_pkg                           fp32_t, latencies, act_e, per-layer parameter types
```

## The neuron

A neuron with `N_IN` inputs (2 or 4 in the library) computes

    y = f( (x0*w0 + x1*w1) + (x2*w2 + x3*w3) [+ bias] )

The additions happen in exactly this pairing, because floating-point addition is not
associative. The testbench references use the same order and are bit exact.

| function   | `ACT`          | f(v)                          |
|------------|----------------|-------------------------------|
| PureLin    | `ACT_PURELIN`  | v                             |
| HardLim    | `ACT_HARDLIM`  | 1.0 if v >= 0, else 0.0       |
| HardLims   | `ACT_HARDLIMS` | 1.0 if v >= 0, else -1.0      |

In the hard limits, -0.0 counts as v >= 0.

**Timing.** Drive the stimuli on `x` and raise `en` in the same cycle. The stimuli and
`en` are sampled at the next clock edge. The result is on `y`, with `en_out` high for
exactly one cycle, `LATENCY` cycles later:

| neuron              | latency                      |
|---------------------|------------------------------|
| 2 inputs            | 8 (mul) + 8 (add) + 1 = 17   |
| 4 inputs            | 8 + 8 + 8 + 1 = 25           |
| with bias           | +8 (one more adder)          |

`en` may be high on every cycle. `en_out` comes from a shift register that runs beside
the datapath. The arithmetic units have no valid signals of their own.

Port names map to the original library's signal names: `en` is EnN, `en_out` is EnN_Out,
`y` is FonkOut, and `weight_in`/`weight_out` are WeightIn/WeightOut.

## The weight chain and how to load it

This is the part users get wrong most easily. Every neuron's weight registers form a
shift register (`weight_chain`): `w[0]` takes `weight_in`, `w[i]` takes `w[i-1]`, and
the last register drives `weight_out`. The chain shifts once per cycle while `load` is
high. A biased neuron has one more register, holding the bias, after its last weight.

In `ann_network` the chains are joined in this order:

1. `data_in`
2. layer 0: neuron 0, then neuron 1, and so on
3. layer 1: neuron 0, neuron 1, ...
4. the last layer's last neuron, whose chain end is `weight_out`

So a chain of `NW` words is loaded by pushing, over `NW` cycles with `load` high, the word
for chain position `NW-1` first and the word for position 0 last. For the default network
`NW` = 24:

| chain position | register                                        |
|----------------|-------------------------------------------------|
| 0..3           | hidden neuron 0: w0..w3 (weights on inputs 0..3) |
| 4..7           | hidden neuron 1                                 |
| 8..11          | hidden neuron 2                                 |
| 12..15         | hidden neuron 3                                 |
| 16..19         | output neuron 0: w0..w3 (on hidden neurons 0..3) |
| 20..23         | output neuron 1                                 |

In general, neuron k of layer l starts at the sum of the chain lengths of all earlier
layers plus `k * (SIZES[l] + BIASES[l])`.

Rules:

- The weights are read when a stimulus set enters the multipliers, and the bias when the
  set reaches the bias adder. Do not shift the chain while a computation you care about
  is in flight.
- An assertion in `neuron` forbids `load` and `en` in the same cycle.
- `weight_out` lets you read back the chain, or extend it into another network.

## Stimulus input and network timing

`input_layer` holds one stimulus set. It can be filled in two ways, chosen by
`SERIAL_INPUT`:

- **Serial (default).** The input registers form a second shift chain on the same
  `data_in` bus. Each cycle `load_in` is high shifts one word in. The word shifted first
  lands in the last input, so push `x[3], x[2], x[1], x[0]`, then raise `en` for one
  cycle. This saves pins: the whole network has a single 32-bit data input. It allows
  one set per `SIZES[0] + 1` cycles.
- **Parallel.** `par_in` is captured in every cycle `en` is high, so a new set can enter
  on every cycle. At the 498.72 MHz reported for the original implementation on a
  Virtex-6, that is 498 million results per second.

`load` (weights) and `load_in` (stimuli) are separate strobes on the shared `data_in` bus.

The latency from `en` to `en_out`/`data_out` is:

    1 (input register) + sum of the layer latencies + 1 (output register)

For the default network this is 1 + 25 + 25 + 1 = 52 cycles, which is 104.26 ns at
498.72 MHz. The original design quotes that same time for its serial-input
configuration. In serial mode the four shift cycles come before `en`.

With `OUTPUT_REGS = 0` the last layer drives `data_out` directly. The latency is then one
cycle shorter, and the value is valid only in the `en_out` cycle. With output registers,
`data_out` holds until the next result.

## Floating-point units

`fp32_mul` and `fp32_add` are IEEE-754 binary32 units with an 8-cycle latency and full
throughput.

- **Multiplier.** Four working stages: register the operands; form the 24x24-bit
  significand product; normalise by at most one place; round and pack.
- **Adder.** Six working stages: register the operands; order them by magnitude;
  align with guard/round/sticky bits; add or subtract; normalise by leading-zero
  count; round and pack.
- **Pipelining.** The remaining stages (four in the multiplier, two in the adder) are
  plain delay registers. Register retiming in synthesis can move them into the
  multiplier array and the alignment shifter, which are the longest paths.
- **Rounding.** Round to nearest, ties to even.
- **Subnormals.** Subnormal inputs and results are flushed to zero (signed).
- **Overflow** gives a signed infinity.
- **Invalid operations** (0*inf, inf-inf, any NaN operand) give the quiet NaN
  `0x7FC00000`.
- **Zero sums.** An exact zero sum is +0, unless both operands are negative.

## Parameters

| module         | parameter      | default            | meaning                                       |
|----------------|----------------|--------------------|-----------------------------------------------|
| `ann_network`  | `SERIAL_INPUT` | 1                  | serial or parallel stimulus registers         |
|                | `OUTPUT_REGS`  | 1                  | output registers present                      |
|                | `N_LAYERS`     | 2                  | neuron layers (at most `MAX_LAYERS` = 8)      |
|                | `SIZES`        | `'{4,4,2,0,...}`   | `SIZES[0]` inputs, `SIZES[l+1]` neurons in layer l |
|                | `ACTS`         | all `ACT_PURELIN`  | transfer function per layer                   |
|                | `BIASES`       | all 0              | biased neurons per layer                      |
| `neuron_layer` | `N_NEURONS`, `N_IN`, `ACT`, `BIAS` | 4, 4, PureLin, 0 | layer shape                       |
| `neuron`       | `N_IN`, `ACT`, `BIAS` | 4, PureLin, 0 | `N_IN` must be a power of two (2, 4, ...)  |
| `fp32_mul`/`fp32_add` | `LATENCY` | 8                 | at least 4 / 6                                |

`SIZES`, `ACTS` and `BIASES` are fixed-length arrays (types `layer_sizes_t`,
`layer_acts_t`, `layer_bias_t` in `ann_pkg`). Entries past `N_LAYERS` are ignored.

Every layer that feeds a neuron layer must have a power-of-two width, because the adder
tree is a balanced binary tree.

After coarse synthesis, the default network comes to about 4.2k word-level cells and
8.6k flip-flop bits. A further 8.4k bits sit in the delay lines, which are inferred as
memories.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`, has a
watchdog, and ends with `$finish`. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/ann_pkg.sv tb/fp_ref_pkg.sv \
          tb/tb_ann_network.sv --top tb_ann_network
./obj_dir/Vtb_ann_network
```

Replace `tb_ann_network` with any testbench below.

| testbench              | what it checks                                                  |
|------------------------|-----------------------------------------------------------------|
| `tb_fp32_mul`, `tb_fp32_add` | 2000 random operand pairs at full throughput, plus directed special cases; exact result and latency |
| `tb_weight_chain`      | shifting, holding, load order, chain end                        |
| `tb_activation_unit`   | the three transfer functions, signed zeros, 1-cycle timing      |
| `tb_neuron`            | all six library neurons (2/4 inputs x 3 functions) and two biased ones; values and 17/25/33-cycle latencies, streaming |
| `tb_neuron_layer`      | chain order across neurons, full connection, layer latency      |
| `tb_input_layer`, `tb_output_layer` | register behaviour in both modes                   |
| `tb_ann_network`       | four networks end to end (listed below); counts that every mechanism occurred |
| `tb_ann_network_full`  | the default network unchanged: 24 weights, then 68 concrete mixes evaluated serially, 52-cycle latency each |

The four networks in `tb_ann_network` are:

- the default network, serial input;
- the default network, parallel input, back to back;
- a 4-2-2-2 network that mixes biased, HardLims and 2-input layers;
- the default network without output registers.

For `tb_ann_network` the mechanisms counted are: chain load and reload, serial shifts,
parallel captures, back-to-back results, bias additions, both hard-limit outcomes, and
unregistered outputs.

The reference model (`tb/fp_ref_pkg.sv`) widens binary32 to double, computes there, and
rounds back with ties-to-even. This is exact for products, and for sums of operands whose
exponents are close. The random stimuli keep exponents in a narrow range so that this
holds.

## Departures and open points

- **Floating-point cores.** The originals were vendor cores. These are new
  implementations with the same latency and throughput. Rounding, subnormal flushing and
  NaN rules are this design's choices, and results can differ from the vendor core's in
  those corner cases.
- **HardLims.** The library lists a third neuron type besides PureLin and HardLim. It is
  implemented here as the symmetric hard limit (+1/-1). That reading comes from the
  type's name, not from a definition.
- **Bias.** Biased neurons exist in the library's format, but their insides are not
  described. Here the bias sits after the weights on the chain and is added after the
  adder tree, which costs 8 more cycles. The default network uses no bias.
- **Connectivity.** Layers are fully connected. The original network description
  format can express arbitrary connections between named neurons; that is not supported.
- **Layer types.** All neurons of a layer have the same type, as the original requires.
  Different layers may use different types.
- **Number formats.** Only single-precision float is implemented. The description
  format also names integer data and 16/64-bit widths, but no neurons for those exist.
  The "address width" setting has no counterpart, since the network has no addressed
  memory.
- **Trained weights.** The trained weights and the 68 measured concrete mixes are not
  available. The full-size testbench uses generated weights and mixes and checks
  bit-exact agreement with the reference. It does not check prediction accuracy.
- **Own choices.** The reset is synchronous and active high, and clears weights and
  pipeline valid bits. The separate `load_in` strobe, the one-cycle input register
  stage and the capture-on-enable output registers are also this design's choices.
- **No FonkOut at network level.** The original's top-level symbol also shows a
  neuron-style FonkOut output. The network's results are `data_out` only.
