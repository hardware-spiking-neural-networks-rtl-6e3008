# Stochastic-computing spiking neural network with pair-based STDP

This is synthesizable SystemVerilog for a small spiking neural network in which
no multiplier, adder or subtractor is used for the model arithmetic. Every
product, sum and difference in the neuron, synapse and learning-rule equations
is computed by a single logic gate (AND, MUX, NOT) acting on pseudo-random
bitstreams. This is *stochastic computing* (SC). The network consists of:

- integrate-and-fire (IF) neurons,
- a first-order ("sigma") synapse whose current decays between spikes and
  jumps by the weight on each presynaptic spike,
- on-line learning of the weight by pair-based spike-timing-dependent
  plasticity (PSTDP). A presynaptic spike shortly before a postsynaptic one
  strengthens the weight. The reverse order weakens it.

The default build is the two-neuron, one-synapse network. Two parameters widen
it to a fully connected two-layer network of any size, with one learning
synapse per input-output pair. The design follows the
architecture of the article *Hardware Spiking Neural Networks with Pair-Based
STDP Using Stochastic Computing*. The section "Where this RTL goes beyond, or
departs from, the source" lists the choices this RTL makes on its own.

## How a number travels through the design

Everything else follows from this part, so it comes first.

**Storage.** Between time steps, every quantity is an N-bit unsigned register
(N = 12 by default). This covers the membrane potential, synaptic current,
traces, weight and constants. A register value X stands for X / L, where
L = 2^N − 1 = 4095. So `12'hFFF` is 1.0. The full scales are 1 mV for potentials
and 1 nA for currents. Weights and traces are plain numbers in [0, 1].

**To a bitstream (`sc_sng`).** Each operand has its own stochastic number
generator. This is a maximal-length 12-bit LFSR (`sc_lfsr`, polynomial
x^12 + x^6 + x^4 + x + 1) plus a comparator. Each cycle the comparator outputs 1
when (LFSR state − 1) < X. A maximal LFSR visits each non-zero state exactly
once per L cycles. So any window of L consecutive cycles carries exactly X ones.
A single stream is therefore exact, whatever the phase of the window.

**Gates (`sc_element`).** The gate set is:

| operation | gate | result probability |
|---|---|---|
| multiply (unipolar) | AND | p(a)·p(b) |
| multiply (bipolar) | XNOR | bipolar product |
| scaled add | MUX, select stream of ½ | (p(a) + p(b)) / 2 |
| scaled subtract | NOT on b, then MUX | read as bipolar: (a − b) / 2 |

The "½" select stream is another generator, with input 2048.

**Back to binary (`sc_counter`).** A counter counts the ones over one period of
exactly L cycles. The count c is then decoded according to what the stream was:

- `DEC_UNI`: value = c. Used for products.
- `DEC_ADD`: value = min(2c, L). This undoes the ½ of the MUX adder, so a MUX
  followed by this counter is a saturating adder.
- `DEC_SUB`: value = max(2c − L, 0). This reads the NOT+MUX stream as a bipolar
  number, which gives a − b directly, clamped at 0.

**Where the error comes from.** A product or sum of two streams is exact only
if the two streams are uncorrelated. Both LFSRs in a block have the same
polynomial and step together. So the ones counted after a gate depend only on
the two seeds, not on when the period starts. Some seed pairs are much better
than others. Here is the decay of the synaptic current by 0.99 per step, run for
50 steps:

- a poor seed pair ended 8 % above 0.99^50;
- the pair (7, 1) ends within 1 %.

`sc_pkg::seed()` holds 12 seeds. Each block uses the pairs that gave the
smallest error for its critical gate. That gate is the AND with 0.99 for
currents and traces, and the current-times-gain AND for the neuron. With these
pairs the per-step error is a few codes (about 0.1 % of full scale). The error
grows only where the result is a small difference of large numbers. An example
is a neuron driven by a very small current, where 0.0075 mV per step comes out
up to about 7 % off.

Lower precision is a parameter (`N = 8` or `10`). It shortens the period to 255
or 1023 cycles and roughly doubles the error for every two bits removed.

## Time steps and the schedule inside one

The network advances in forward-Euler steps of h = 0.1 ms. In `sc_snn` a
counter raises `step` once every `STEP_CYCLES` clocks. The default is 10 000,
which is real time at 100 MHz. On `step` every block starts its work:

| block | work per step | cycles (L = 4095) |
|---|---|---|
| neuron | one period, then store; one extra cycle if it fires | L + 2 or L + 3 |
| synapse | one period, then store | L + 2 |
| learning rule, no spike | one period (S1) | L + 2 |
| learning rule, spike | two periods (S2→S4 or S3→S5), then S6 | 2L + 4 = 8 194 |

`STEP_CYCLES` must therefore be at least 2L + 5. An assertion checks that all
blocks are idle when `step` comes.

Spikes are one-cycle pulses that arrive at the end of a step's first period.
The synapse and the learning rule remember them and use them in the **next**
step. Registers change only at the end of a period. So in every step:

- the synapse and the output neuron read the weight and current of the previous
  step;
- the learning rule's traces see each spike exactly one step after it was fired.

## The blocks

### SC-IF neuron (`sc_if_neuron`, controller `sc_if_ctrl`)

The update is v(t+1) = v(t) + (h·Rm/τm)·I(t). With h = 0.1 ms, Rm = 10 MΩ and
τm = 10 ms, the gain is 0.1 mV per nA. The hardware works like this:

- An AND gate multiplies the current stream by the gain stream.
- A MUX (input 1 = v, input 0 = gained current, select ½) adds the result to
  the v stream.
- The counter doubles the count, giving v_m.
- A comparator tests v_m > V_th (0.9 mV).

Controller 1 has three states:

- **S0** waits for `step`.
- **S1** runs the period and stores v_m.
- **S2** is entered only when v_m exceeded the threshold. It pulses `spike` for
  one cycle and returns v to V_rest = 0.

With a constant 0.1 nA input the potential rises 0.01 mV per step and the
neuron fires every 91 steps (about 9 ms).

### SC-Synapse (`sc_synapse`)

The synapse update depends on whether a presynaptic spike is pending:

- **No spike pending:** I ← I·A_I through an AND gate, with A_I = 1 − h/τ = 0.99.
- **Spike pending:** I ← I + w through a MUX with select ½ and the doubling
  counter, saturating at 1 nA.

In the synapse equation I·A_I + (hC/τ)·w, the factor hC/τ is exactly 1 for
C = 100. That is why a bare MUX is enough. `sc_snn` checks this factor when it
elaborates.

### SC-PSTDP learning rule (`sc_pstdp`, `sc_pstdp_ctrl`, `sc_pstdp_sau`)

The learning rule keeps three values:

- presynaptic trace x, which jumps by 0.5 on a presynaptic spike and otherwise
  decays by A_j = 0.99 per step;
- postsynaptic trace y, which does the same on postsynaptic spikes;
- the weight w.

On a presynaptic spike, w ← w − y·A_i·B_i (depression). On a postsynaptic spike,
w ← w + x·A_j·B_j (potentiation). B_i = B_j = 0.3994.

The arithmetic unit `sc_pstdp_sau` is pure gates. It has four ANDs, one NOT and
two MUXes for the weight, plus two MUXes for the trace increments. Nine
generators feed it, one per register or constant. Controller 2 decides which
stream each of three counters reads:

| state | entered when | x counter | y counter | w counter |
|---|---|---|---|---|
| S0 | reset / waiting | – | – | – |
| S1 | step, no spike pending | x·A | y·A | – |
| S2 | step, presynaptic spike pending | x·A + 0.5 | – | – |
| S4 | after S2 | – | y·A | w − y·A·B_i (bipolar read) |
| S3 | step, only postsynaptic spike pending | – | y·A + 0.5 | – |
| S5 | after S3 | x·A | – | w + x·A·B_j |
| S6 | after S4 or S5 | – | – | w ← w′ (one cycle) |

Each trace thus decays exactly once per step. The weight change always uses the
other side's trace from before this step's decay. If a presynaptic and a
postsynaptic spike are pending together, the presynaptic branch runs first and
the postsynaptic spike waits one step. Results clamp to [0, 1].

### The network (`sc_snn`)

The top builds `N_PRE` input neurons and `N_POST` output neurons, fully
connected. Input neuron k is driven by `i_ext[k]`. Synapse s = j·N_PRE + k joins
input k to output j. Each synapse has its own learning rule, which sees
`pre_spike[k]` and `post_spike[j]`.

Output neuron j receives the sum of its row's synaptic currents, clamped to
1 nA. With one input this is just the current. The ports expose every state
variable as packed arrays:

- `v_pre` is `[N_PRE][N]`;
- `v_post` is `[N_POST][N]`;
- `i_syn`, `weight`, `x_trace` and `y_trace` are `[N_PRE·N_POST][N]`.

With `N_POST = 1` these shapes reduce to those of a single-output network.

## Parameters

| parameter (module) | default | meaning |
|---|---|---|
| `N` (all) | 12 | bitstream precision; period 2^N − 1 |
| `N_PRE` (`sc_snn`) | 1 | input neurons |
| `N_POST` (`sc_snn`) | 1 | output neurons (N_PRE·N_POST synapses) |
| `STEP_CYCLES` (`sc_snn`) | 10 000 | clocks per 0.1 ms step (≥ 2·(2^N − 1) + 5) |
| `H_MS`, `TAU_MS`, `TAU_PLUS_MS`, `TAU_MINUS_MS`, `TAU_M_MS` | 0.1, 10, 10, 10, 10 | Euler step and time constants (ms) |
| `RM_MOHM`, `C_SYN` | 10, 100 | membrane resistance, synapse constant |
| `B_I`, `B_J` | 0.3994 | STDP amplitudes |
| `V_TH_MV`, `V_REST_MV` | 0.9, 0 | threshold and rest |
| `TRACE_INC`, `W_INIT` | 0.5, 0.5 | trace jump per spike, initial weight (own choices) |

The top converts the real-valued parameters to codes with `sc_pkg::to_fix`. The
rounding rule is round(r·(2^N − 1)). The lower-level modules take the codes
directly. For example, A = 0.99 is 4054 and B = 0.3994 is 1636.

The default network synthesizes to 507 flip-flops with no multipliers.

## How well it matches the equations

The testbenches compare the hardware with the same discrete equations computed
in floating point:

- **Learning window.** Spike pairs at Δt = ±1…±20 steps produce weight changes
  of ±0.5·0.3994·0.99^|Δt|, to within 5 codes (0.1 %).
- **Long run.** 1 400 steps (140 ms) of one synapse with seven pre- and seven
  postsynaptic spikes give NRMSE of 0.4 % (x trace), 0.9 % (y trace), 1.2 %
  (weight) and 0.5 % (current).
- **Precision.** The RMS weight-change error is 0.012 at 8 bits, 0.005 at
  10 bits and 0.0007 at 12 bits.
- **Full network.** The two-neuron network at full size runs 500 steps
  (5 million cycles). Every step is checked against the equations: current,
  output potential, and weight after lone spikes.
- **Larger networks.** In a 40×1 network, every input neuron fires at its
  expected interval. In a 6×3 network, each output neuron's potential follows
  0.1 times the clamped sum of its row's currents.

## Where this RTL goes beyond, or departs from, the source

- **Global schedule.** The source gives the controllers' states but no cycle
  timing. The one-period-per-state schedule, the extra load cycle and the
  one-step spike latency are this design's choices. So are the global step
  counter and the real-time 10 000-cycle step.
- **Weight-change factor.** The weight change includes the decay factor A
  (y·A·B, x·A·B). This follows the gate drawing of the arithmetic unit. The
  written rule, Δw = y·B, omits A.
- **Synapse on a spike.** On a spike the synapse adds w without also decaying
  I, as the gate structure does. The synapse equation would also decay I.
- **Trace increments.** The increment gates are not part of the described
  arithmetic unit, which covers only the weight path. The source writes the
  increment only as a time step times a Dirac impulse. The value 0.5 matches
  the first jump of the traces in its published waveforms. The initial weight
  (0.5) is assumed.
- **Where the current decays.** The source lists the synaptic-current decay
  among the learning controller's "no spike" work. Here the synapse has its own
  small sequencer, started by the same step strobe, so the timing is the same.
- **Saturation.** All values saturate in [0, 1]. The synaptic current in the
  source's own plots briefly exceeds 1 nA; here it clamps.
- **Controller details.** S1 returns directly to S0. A presynaptic spike has
  priority when both spikes are pending.
- **Neuron gain.** The neuron update needs a multiplication by h·Rm/τm = 0.1,
  and the source says an AND gate does it. Its drawing shows only the MUX
  adder, so where the AND goes is this design's choice: on the current input.
- **Several inputs.** With more than one input, synaptic currents are summed in
  binary with clamping. This is the one adder in the design, and it is absent
  in the default one-input build. How several synapses combine is not
  specified by the source.
- **Several outputs.** The source estimates the cost of two-layer networks such
  as 48 inputs × 3 outputs with 144 synapses, but does not give their wiring.
  Full connection (`N_POST`) is this design's reading.
- **Not covered.** `sc_snn` does not generate networks with a hidden layer,
  such as 25-5-1 with 130 synapses. Such networks would be built from the same
  modules.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=… failures=…`, and each has a watchdog. Use Verilator 5 with
timing support. For example, for the full-size network test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          -Irtl -Itb --top-module tb_sc_snn rtl/sc_pkg.sv tb/tb_sc_snn.sv
./obj_dir/Vtb_sc_snn
```

Replace `tb_sc_snn` with any other testbench:

| testbench | what it runs | approx. run time |
|---|---|---|
| `tb_sc_snn` | default 1×1 network, 500 steps, all mechanisms counted | 3 s |
| `tb_sc_snn_fig5` | 140 ms synapse + STDP against the floating-point model, NRMSE | 6 s |
| `tb_sc_snn_net` | 40×1 network, 300 steps | 20 s |
| `tb_sc_snn_layer` | 6×3 network (18 synapses), 200 steps; rows must stay identical, row sums checked | 5 s |
| `tb_sc_pstdp`, `tb_sc_pstdp_precision` | learning window at 12 bits; at 8/10/12 bits | < 2 s |
| `tb_sc_if_neuron`, `tb_sc_synapse` | neuron ramp/firing; synapse add/decay/clamp | 1 s |
| `tb_sc_lfsr`, `tb_sc_sng`, `tb_sc_element`, `tb_sc_counter`, `tb_sc_if_ctrl`, `tb_sc_pstdp_ctrl`, `tb_sc_pstdp_sau` | building blocks | < 1 s |

Every register that is read is reset, so results do not depend on the
simulator's initial values.

## Files

- `rtl/sc_pkg.sv`: enums, fixed-point conversion, LFSR taps, seeds.
- `rtl/sc_lfsr.sv`, `rtl/sc_sng.sv`, `rtl/sc_element.sv`, `rtl/sc_counter.sv`:
  the SC primitives.
- `rtl/sc_if_ctrl.sv`, `rtl/sc_if_neuron.sv`: neuron.
- `rtl/sc_synapse.sv`: synapse.
- `rtl/sc_pstdp_ctrl.sv`, `rtl/sc_pstdp_sau.sv`, `rtl/sc_pstdp.sv`: learning rule.
- `rtl/sc_snn.sv`: the network top.
- `tb/`: one testbench per module, plus the workload tests above.
