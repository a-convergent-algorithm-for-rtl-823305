# Cascade of multiplexed dual-output discrete perceptrons

A single discrete perceptron, `z = stp(w·x)`, can only separate classes that a
hyperplane can split. This design makes a perceptron universal at the cost of
one multiplexer. Each neuron gives two outputs, `z` and its complement. A 2:1
multiplexer picks one of them with a selector `u`. The selector is 1 exactly
for the inputs the neuron gets wrong. A second neuron is then trained to
produce that selector, and it has its own selector in turn. The chain ends
with a neuron whose problem is linearly separable; its selector is tied to 0.

The hardware only evaluates a trained network. Training happens off line and
decides how many stages there are and what weights they hold. The default
configuration is a 4-neuron network that computes 4-bit parity. Each neuron
is a serial multiply–accumulate unit with 16-bit signed integer weights in a
small ROM.

The structure follows the cascade network and FPGA neuron of İ. Genç and
C. Güzeliş, *A convergent algorithm for a cascade network of multiplexed dual
output discrete perceptrons for linearly nonseparable classification*. The
RTL, the controller, the timing and the default weights belong to this
design. The section "Where this design departs or chooses" lists every
choice.

## What the cascade computes

Number the stages 1..m from the output end. Stage j has a neuron
`z_j = stp(w_j·x)` and a selector `u_j`:

```
y       = u_1 ? ~z_1 : z_1
u_j     = u_(j+1) ? ~z_(j+1) : z_(j+1)
u_m     = 0
```

Written out, `y = z_1 xor z_2 xor … xor z_m`. The input vector `x` has a
constant 1 as its last entry, so the last weight of each neuron is its
threshold. `stp(s)` is 1 for `s >= 0`.

Training builds the chain one stage at a time. The target of stage 1 is the
desired output `d`. Stage j is trained on target `u_(j-1)`. The next target is
`u_j = u_(j-1) xor z_j`: it is 1 where neuron j was wrong. Each stage must be
*semicorrect*: its errors are all of one kind, either all false 1s or all
false 0s. This rule is what makes the construction terminate, and it shrinks
the number of remaining errors towards zero.

Example, EXOR on two inputs:

- Stage 1 fires for `x0 + x1 >= 1`. It is wrong only for input 11.
- Stage 2 fires for `x0 + x1 >= 2`, which is 1 for input 11 alone. That
  problem is linearly separable, so the chain stops.
- The result is `y = OR xor AND = EXOR`.

The default 4-bit parity weights generalise this. Neuron k fires when at least
k inputs are 1 (weights 1,1,1,1 and threshold weight −k). The xor of the four
neurons is 1 for an odd number of ones.

## The serial neuron (`neuron`)

Each neuron has one multiplier and one accumulator. It walks over its inputs
one per clock. All neurons have their own datapath and run in parallel.

```
            x[3:0]     {000,1,x[3:0]}
 gen_count ──count[2:0]──► mux8_1 ──bit──►[reg]──┐
    ▲            │                                ▼
    │            └──{00,count[2:0]}──► weight_rom ─► mult16_1 ─► accumulator ─► comparator ─► [y reg]
 neuron_controller (counter_en, counter_rst, accu_en, out_ready)          high_detect(out_ready) ─► enable
```

- **Slots.** The 8:1 multiplexer sees `x[0..3]` in slots 0–3 and a constant 1
  in slot 4, which multiplies the threshold weight. Slots 5–7 hold 0.
- **Weights.** `weight_rom` holds 8 signed 16-bit words (128 bits), one per
  slot. The contents are the `WEIGHTS` parameter of type
  `mdo_pkg::weight_vec_t`. Element `[i]` weighs slot `i`.
- **Multiply.** The inputs are single bits, so `mult16_1` simply gates the
  weight.
- **Accumulate and compare.** `accumulator` sign-extends each product into a
  32-bit sum. `comparator` tests `sum >= 0`.
- **Output register.** `high_detect` makes a one-clock pulse on the rising
  edge of `out_ready`. That pulse loads the comparator result into `y`.

### Timing

The ROM read is synchronous. Its word for slot k comes out one clock after the
counter shows k. The multiplexer bit goes through one register so that the bit
and its weight reach the multiplier together. For the same reason the
controller delays the accumulate enable by one clock.

The controller is a one-hot state machine. Its states also appear on the
`t_state` test output.

| state | clocks | what happens |
|-------|--------|--------------|
| IDLE  | –      | counter and accumulator held at 0; waits for `en` |
| CLEAR | 1      | counter and accumulator cleared for a new evaluation |
| RUN   | N_TERMS (8) | counter steps 0..7; products added one clock later |
| DRAIN | 1      | the last product is added |
| DONE  | –      | `out_ready` = 1; the sum is held |

An evaluation starts on a clock edge where `en` is high and either:

- the neuron is in IDLE, or
- the neuron is in DONE and `x` differs from the `x` of the last evaluation.

Once started, the evaluation runs to the end whatever `en` does. `x` must stay
stable while it runs.

Counting from the starting edge:

- `out_ready` rises after N_TERMS + 2 = 10 clocks.
- The neuron's `y` changes one clock after that.
- The cascade delays its own `out_ready` by that extra clock, so it rises
  after 11 clocks. From then until the next start, `y` is valid.

An unchanged `x` with `en` high does not restart the neuron. It keeps the
result it has.

## Cascade top (`mdo_cascade`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock |
| a_clr | in | 1 | asynchronous reset, active high |
| en | in | 1 | start an evaluation (see above) |
| x | in | 4 | binary input vector |
| y | out | 1 | class output, equal to `u[0]` |
| u | out | N_STAGES | stage outputs; `u[j]` drives the selector of stage j−1 |
| out_ready | out | 1 | `y` and `u` are valid for the current `x` |

Parameters:

- `N_STAGES` (default 4) is the number of stages.
- `N_TERMS` (default 8) is the number of multiplexer slots each neuron steps
  through.
- `STAGE_WEIGHTS[N_STAGES]` holds the weights. `STAGE_WEIGHTS[0]` belongs to
  the output stage.

The default is the parity network. The rest of the hierarchy:

- `mdo_stage` is one neuron plus its dual-output multiplexer. Its 10 pins
  are clk, a_clr, en, x[3:0], u, y and out_ready.
- `neuron` contains `neuron_controller`, `gen_count`, `mux8_1`,
  `weight_rom`, `mult16_1`, `accumulator`, `comparator` and `high_detect`.
- `mdo_pkg` holds the widths, the weight types, the state encoding and
  `parity_weights(k)`.

## Loading a trained network

To run another network, pass its weights as parameters. Each stage takes an
8-element `weight_vec_t`. In a `'{…}` literal the elements are listed from
slot 7 down to slot 0:

```
'{0, 0, 0, threshold, w_x3, w_x2, w_x1, w_x0}
```

Pad unused stages with a stage that never fires: all weights 0 and a
threshold weight of −1. Such a stage contributes 0 to the xor.

`tb/tb_random_boolean.sv` carries ten such networks for random 4-input
Boolean functions. For each one, every stage takes the semicorrect
separation with the fewest errors, searched over integer weights in [−3, 3]
and threshold weights in [−10, 10]. The ten networks need 2 or 3 neurons,
2.6 on average. The source reports an average of 2.60 ± 0.70 neurons for
16-bit integer weights.

## Where this design departs or chooses

Taken from the source:

- the cascade structure and the xor it computes
- the neuron's block list and the names of its ports
- the 16-bit signed weights, the 32-bit accumulator and the 8-bit counter
- the 8:1 input multiplexer, with `0001` on its upper inputs
- the 5-bit ROM address, with `00` on its upper bits
- the 128 ROM bits per neuron
- the parity network with 4 neurons

This design's own choices:

- **Weights.** The source does not give the trained parity weights. The
  defaults (`parity_weights`) are a correct 4-neuron solution, but not
  necessarily the weights of the original.
- **Complement output.** The second output is the exact complement of `z`.
  The model defines it as `stp(−w·x)`, which differs only when `w·x = 0`:
  there the model gives 1 on both outputs and this design gives `z` = 1 and
  0. A trained weight set should not rely on a sum of exactly 0 in the
  second output.
- **Controller.** The state machine, the start rule (`en`, plus a change of
  `x`) and the latency are invented; the source names only the control
  unit's ports. Test outputs: `t_bit_count` counts the products added and
  `t_state` shows the state.
- **Slots.** All 8 slots are stepped through, although only 5 carry data.
  The source says the output takes "n steps" for n inputs. Set
  `N_TERMS = 5` to take 5 steps.
- **ROM read.** The read is registered, which brings the bit register and
  the delayed accumulate enable with it. The ROM contents are a parameter,
  not a memory file.
- **Comparator threshold.** The comparator's reference is 0, with
  `stp(0) = 1`.
- **Output register.** `high_detect` is read as a rising-edge detector on
  `out_ready` that enables the output register. The register's clock and
  reset connections are chosen by this design: master clock and master
  reset.
- **Resets.** `counter_rst` clears the counter and the accumulator in IDLE
  and CLEAR. The master reset clears the controller, the output register
  and the edge detector.
- **Cascade `out_ready`.** It is the AND of the neurons' `out_ready`,
  delayed one clock.
- **Register count.** Synthesis gives 53 flip-flop bits per stage, against 63
  registers reported for the FPGA neuron. The memory matches at 128 bits.

Limits:

- Inputs are single bits, so only binary problems run: parity, EXOR and
  random Boolean functions of up to 4 inputs.
- Problems with real-valued or integer inputs would need a wider input
  multiplexer and a real multiplier. Examples are the two-spirals problem,
  with 57–67 neurons and fixed-point weights with 12 fraction bits, and a
  2-D grid example.
- Wider Boolean problems (5–8 inputs) need a wider `x` and more slots.
- Training is not in hardware.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

- **Leaf blocks.** These are checked exhaustively or with random stimulus
  against reference models: the counter wrap and asynchronous clear, the
  ROM's one-clock latency and its zero reads past the depth, sign extension
  in the accumulator, the signed compare and the edge detector.
- **`tb_neuron_controller`.** Checks the 10-clock latency. Checks that each
  counter value 0..7 gets exactly one accumulate enable one clock later.
  Checks the start rules and a reset in mid-run.
- **`tb_neuron`.** Compares three neurons on all 16 inputs with `stp(w·x)`
  computed in the testbench. One of the neurons has weights of ±32767/−32768.
- **`tb_mdo_stage`.** Checks `y = z` for `u = 0` and `y = ~z` for `u = 1`.
- **`tb_mdo_cascade`.** Runs with default parameters and tests the whole
  parity network end to end: all 16 inputs plus random ones, `y` against the
  parity, every `u[j]` against the expected xor chain, and the latency of 11
  clocks. It also counts each mechanism and fails if one never occurs:
  - each selector at 0 and at 1
  - each neuron firing and not firing
  - sums exactly at the threshold
  - restarts on a new `x`
  - holds on an unchanged `x`
  - `en` blocking a start
  - a reset during an evaluation
- **`tb_exor_example`.** Runs the two-neuron EXOR network. Checks that stage
  2's selector is 1 only for input 11.
- **`tb_random_boolean`.** Runs the ten trained random 4-input functions
  against their truth tables.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -y rtl rtl/mdo_pkg.sv tb/tb_mdo_cascade.sv --top-module tb_mdo_cascade
./obj_dir/Vtb_mdo_cascade
```

The other testbenches build the same way: replace the testbench file and the
top-module name.

To lint: `verilator --lint-only -Wall -y rtl rtl/mdo_pkg.sv rtl/mdo_cascade.sv`.
Lint reports three kinds of warning, all expected:

- `SYNCASYNCNET`: the resets drive asynchronous clears and are also used in
  assertion `disable iff` clauses and for the cascade's ready flag.
- `PINCONNECTEMPTY`: the controller's two test outputs are not connected
  inside the neuron.
- `UNUSEDPARAM`: some package constants are unused in a given file.
