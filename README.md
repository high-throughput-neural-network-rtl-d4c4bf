# A three-layer truth-table neural network for network intrusion detection

This is a small binarized neural network that labels network flow records
as *attack* or *benign*. It is built for line-rate use on an FPGA. Each
record is a 593-bit vector: the UNSW-NB15 flow features, with every feature
discretized into bits. The network classifies one record per clock, and the
decision appears three clocks later.

The main idea comes from the LogicNets approach. A neuron that reads only a
few low-precision inputs has a small, finite input space. Whatever it does
internally (weights, sum, activation), it is therefore a fixed Boolean
function of a handful of bits. So each neuron is built as a truth table,
with no multipliers or adders. A layer is a row of such tables that tap a
sparse subset of the previous layer's outputs. The network is tiny:

| layer  | neurons | inputs per neuron | input width | table address bits | output |
|--------|--------:|------------------:|------------:|-------------------:|-------:|
| input  | 49      | 7 of the 593 features | 1 bit  | 7                  | 2 bits |
| hidden | 7       | 7 of the 49 outputs   | 2 bits | 14                 | 2 bits |
| output | 1       | all 7 hidden outputs  | 2 bits | 14                 | 2 bits |

The reference implementation of this topology was reported to run at
1027.75 MHz on an AMD Alveo U280 (xcu280-fsvh2892-2L-e). It used 135 LUTs and
148 flip-flops, with a latency of 2.92 ns, which is three clock periods. It
classified the UNSW-NB15 test partition with 90.91 % accuracy and an F1
score of 91.82 %.

## What is and is not the trained network

The hardware structure here follows the published network:

- topology, fan-in and bit widths;
- one table per neuron;
- sparse connections;
- three register stages.

The *contents* of the network are not published, so stand-ins are used.
The contents are the 57 truth tables and the sparse map that says which
inputs each neuron reads. The stand-ins are deterministic formulas in
`rtl/nid_pkg.sv`. This RTL is therefore a structurally faithful network
with synthetic weights. It does not reproduce the reported accuracy. To get
the trained classifier, replace `neq_weight`, `neq_bias`, `neq_eval` (or the
body of `hbb_neuron`) and `neq_conn` with the trained tables and map. No
port, register or timing changes.

The stand-in neuron is a quantized perceptron:

- **inputs**: a 1-bit input maps to -1/+1. A 2-bit code `c` maps to
  `2c-3` (-3, -1, +1, +3).
- **weights**: `w(l,n,k) = c-3` if `c<3`, else `c-2`, where
  `c = (53l + 29n + 17k + 11nk + 5k² + 3) mod 6`. This gives values in
  {-3,-2,-1,+1,+2,+3}. Weights are never zero, so no neuron is optimized
  away.
- **bias**: `b(l,n) = ((17l + 23n) mod 5) - 2`.
- **activation**: the code is `clamp(floor(s / 2^B_IN) + 2, 0, 3)`, where
  `s` is the bias plus the weighted inputs. Equivalently, there are three
  thresholds at `-D`, `0` and `+D`, with `D = 2` in the input layer and
  `D = 4` elsewhere.
- **sparse map**: input `k` of neuron `n` reads previous-layer output
  `((n·7 + k)·STRIDE) mod N_IN`. The strides are 173, 5 and 1. 593 is prime
  and 5 is coprime to 49, so no neuron reads the same input twice. In the
  hidden layer, every one of the 49 input-layer outputs is read exactly
  once.

## How a neuron becomes logic (`hbb_neuron`)

`hbb_neuron` is one hardware building block: an X-input, 2-output
combinational function, with X = 7 or 14. Its body evaluates the
constant-weight perceptron on the address bits. Because every weight and
the bias are elaboration-time constants, this is exactly a truth table over
2^X entries, written in closed form rather than enumerated. A synthesizer
flattens it into LUT logic, as it would a 16384-line case statement.
Writing it in closed form is a choice of this design: building
16384-entry constant arrays at elaboration is very slow in common tools.

Within `addr`, input `k` is `addr[k*B_IN +: B_IN]`.

## Layers and pipeline (`neq_layer`, `nid_bnn`)

`neq_layer` wires each neuron's table inputs to its sparse sources, using
generate loops with constant indices, so the wiring costs no logic. It
registers all outputs in one stage. `nid_bnn` chains three of these:

```
features[592:0] ─► input layer (49 HBB) ─► reg ─► hidden layer (7 HBB) ─► reg ─► output neuron ─► reg ─► score[1:0], attack
in_valid ────────────────────────────────► reg ──────────────────────────► reg ─────────────────► reg ─► out_valid
```

- **Latency**: a record presented with `in_valid` at clock edge *t* gives
  `out_valid`, `score` and `attack` after edge *t+3*. This matches the three
  clock periods of the reported latency.
- **Throughput**: one record per clock. There is no back-pressure, so
  whoever consumes the output must take it when `out_valid` is high.
- **Reset**: `rst_n` is active low and synchronous. It clears only the three
  valid bits, so records in flight are dropped. The data registers are not
  reset.
- **Decision**: `attack = score[1]`, meaning the output code lies in the
  upper half of its range. Training used a logistic (BCE-with-logits) loss
  with label 1 = attack, so the output code is read as a quantized logit,
  and "positive" means attack. The valid handshake, the reset and this rule
  are this design's choices.
- **Unread features**: the input layer reads only 343 of the 593 feature
  bits. The rest are unused by construction, which is what a sparse first
  layer means. Lint tools report those bits as unused.

After generic synthesis the design has 117 flip-flop bits: 98 + 14 + 2 data
bits and 3 valid bits. The reference implementation reported 148
flip-flops. The published description does not say where the other 31 sit,
so they are not added here.

## Files

| file | contents |
|------|----------|
| `rtl/nid_pkg.sv`    | topology constants, `act_t`, stand-in neuron and sparse-map functions |
| `rtl/hbb_neuron.sv` | one truth-table neuron (combinational) |
| `rtl/neq_layer.sv`  | one sparse layer with output register and valid bit |
| `rtl/nid_bnn.sv`    | top: the three layers and the decision |
| `tb/tb_hbb_neuron.sv` | all addresses of an input-layer neuron (128) and a hidden neuron (16384), plus hand-worked entries |
| `tb/tb_neq_layer.sv`  | input layer: 3000 random vectors with gaps, map distinctness, latency 1, reset, every neuron hits every code |
| `tb/tb_nid_bnn.sv`    | end to end at full size: 4000 records with gaps, 16-record bursts, a reset during a burst; checks every result, the 3-clock latency and that each event and score code occurred |
| `tb/tb_nid_testset_stream.sv` | 82,332 records (the size of the UNSW-NB15 test partition) back to back; checks every result and that the stream takes exactly N+2 clocks |

Every testbench computes its expected values with its own reference model
and does not call the package functions. Each one prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/nid_pkg.sv tb/tb_nid_bnn.sv --top-module tb_nid_bnn
./obj_dir/Vtb_nid_bnn
```

Substitute any other testbench name. All four run in a few seconds at the
full default size.

## Changing it

- **Trained network**: swap the functions in `nid_pkg`. If the trained
  connectivity is irregular, replace `neq_conn` with a lookup into a
  constant table.
- **Other sizes**: `nid_bnn` has parameters `N_IN`, `N_L1`, `N_L2` and `F`.
  The package holds the activation width (`ACT_BITS = 2`) and the strides.
  A stride must keep each neuron's inputs distinct.
- **Deeper pipelines or more layers**: instantiate more `neq_layer`s. Each
  one adds a clock of latency.
