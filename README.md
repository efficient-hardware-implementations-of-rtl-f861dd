# SpinAPS core: a first-to-spike inference engine for probabilistic spiking networks

This RTL is the neuro-synaptic core of SpinAPS. SpinAPS is an inference accelerator for a two-layer
spiking neural network built from Generalized Linear Model (GLM) neurons. An output neuron does not
fire when a threshold is crossed. In every time step it fires with a probability that is a sigmoid
of its membrane potential. The network classifies by the *first-to-spike* rule: the class is the
first output neuron that fires, and inference stops at that moment. On most inputs this ends well
before the presentation is over.

The core holds one such network: 256 input neurons, 256 output neurons and 8-bit synapses. Input
spikes are kept over a window of tau = 7 steps, within a presentation of T = 8 steps. The synapses
are meant to sit in a dense binary STT-RAM array (magnetic tunnel junctions), one bit per cell. The
neuron arithmetic is plain digital CMOS logic. The RTL models the array by its logic function only.

## What one time step computes

With binary basis functions, a stimulus kernel is simply one learned weight per input neuron,
output neuron and delay. Output neuron *i* at step *t* therefore has the potential

    u_i(t) = gamma_i + sum over inputs j, delays k = 1..tau of  s_j(t-k) * w(j, i, k)

Here s_j is the 0/1 spike train of input *j*, and gamma_i is a bias. The input of step *t* itself
does not enter u(t). At t = 1 only the bias counts. Input features that can be negative (for
example sensor features in [-1, 1]) keep a sign bit per input neuron. An input with the sign set
subtracts its weights instead of adding them.

The core spikes neuron *i* when `p(u_i) > r`. Here *p* is an 8-bit piecewise-linear sigmoid and *r*
is an 8-bit pseudo-random byte.

## How the weights are laid out and read

The key to the design is the memory mapping. One word line of the synaptic array holds one weight
for **every** output neuron: 256 x 8 = 2048 bits. Input neuron *j* owns tau consecutive word lines,
one per delay:

| word lines            | contents                                            |
|-----------------------|-----------------------------------------------------|
| `j*7 + (k-1)`         | w(j, *, k): weights of input *j* at delay *k* (k = 1..7) |
| `1792`                | gamma for all 256 output neurons                    |
| `1793 .. 1804`        | fan-out destinations, 22 output neurons per line    |
| `1805 .. 2047`        | spare                                               |

A spike of input *j* that arrived *k* steps ago therefore means "read word line `j*7 + k-1` and add
it to all 256 accumulators". A step costs one array read per active (input, delay) pair plus one
for gamma, whatever the number of output neurons. An input neuron that has not spiked in the last
tau steps costs nothing in the array. It does cost one idle cycle of the sequencer.

The path through the core, one stage per module:

1. **Input registers and window mux** (`spike_window_gen`). Each input neuron has a T-bit
   shift register of its past spikes. One shared multiplexer extracts the tau-bit window of the
   neuron being visited. Bit k-1 of the window is the spike from k steps back. The controller
   drives the select with `t-1`, so bits from before the sample started read as 0.
2. **Word-line sequencer** (`wl_addr_gen`). It issues the gamma read first. It then walks the
   input neurons in order and issues one read per set window bit, lowest delay first. An address
   register holds `j*tau`.
3. **Synaptic array** (`stt_syn_mem`). This is 2048 x 2048 bits with a one-cycle registered read.
   Its slower clock is modelled by the sequencer's wait cycles (see below).
4. **Accumulators** (`membrane_accum`). These are 256 signed 18-bit adders, one per output neuron.
   The gamma word loads them. Every later word adds its sign-extended weights, or subtracts them
   for a negative input.
5. **Spike generation** (`spike_gen`, `pwl_sigmoid`, `lfsr16`). Sixteen sigmoid units are each
   shared by 16 output neurons. In cycle *c* of 16, unit *g* serves neuron `16*g + c`. Each unit
   compares its neuron's probability with the upper byte of a shared 16-bit LFSR. The LFSR
   advances once per spike-generation cycle.
6. **First-to-spike decision** (`fts_decoder`). The first step in which any neuron spikes ends the
   sample. If several neurons spike in that step, the lowest index wins.
7. **Fan-out** (`fanout_unit`). When the deciding step has spikes, each spiking output neuron
   (lowest index first) has its destination entry read from word lines 1793-1804. An entry holds
   4 destinations of 23 bits each: a 12-bit core number and an 11-bit word line in that core. The
   unit sends one packet per destination on `pkt_valid`/`pkt_ready`. The packing is
   `line 1793 + n/22`, 92 bits per neuron at `[(n%22)*92 +: 92]`, and entry *e* at `e*23`, with
   the word line in the low 11 bits. A word line of all ones (`0x7FF`) marks an unused entry.
8. **Controller** (`spinaps_ctrl`) sequences all of the above.

### Cycle count of a step

From the cycle in which the input vector is accepted to the cycle with `out_valid`:

    19 + sum over the 256 input neurons of max(1, number of set window bits)
       + (RD_CYC - 1) * (number of array reads, gamma included)

The logic runs at 500 MHz and the array at 100 MHz, so one array read takes `RD_CYC = 5` logic
cycles. The count is 1 cycle for the gamma read and 1 per active word line (or per idle neuron),
plus 4 wait cycles after every read. Then come 1 drain cycle, 16 spike-generation cycles and 1
cycle to finish. The array is read back to back at its own rate, one word line per 10 ns. That
gives 25.6 G synaptic operations per second, where one operation is one word line of 256
synapses. A silent input neuron costs one 2 ns logic cycle, not an array cycle. The testbench
checks this count exactly for every step.

## Number formats and the sigmoid

* Weights and gamma are two's-complement 8-bit numbers with 4 fractional bits. Their step is 1/16
  and their range is [-8, 8). The potential u uses the same scale with 18 bits. The worst case of
  1793 reads of -128 still fits, so the accumulators never wrap at the default size.
* Before the sigmoid, u is saturated to 8 bits (Q3.4, [-8, 7.94]).
* Let x <= 0 and |x| = I + F, where I is the integer part and F the fraction. The sigmoid is
  approximated by

      y = (1/2 - F/4) / 2^I        (a subtraction and a shift)

  For x > 0, y(x) = 1 - y(-x). The output is an 8-bit unsigned probability: p = floor(256*y) for
  x <= 0, and p = 256 - p(-x) for x > 0, capped at 255. Examples: x = 0 gives p = 128, x = -1 gives
  64, x = -0.5 gives 96, x = -8 gives 0 and x >= 7.07 gives 255. A neuron with p = 0 can never
  spike. A neuron at -8 is therefore silent.
* LFSR: Fibonacci, x^16 + x^14 + x^13 + x^11 + 1, period 65535, loadable seed.

## Using the core (`spinaps_core`)

1. **Program** the array while the core is idle. Drive `prog_we`, `prog_addr` (word line) and
   `prog_data`, where output neuron *i* is in bits `[8*i +: 8]`. Write the 1792 kernel lines and
   the gamma line. The array has no reset.
2. **Seed** the LFSR if required (`lfsr_seed_we`, `lfsr_seed`).
3. **Start** a sample. Pulse `start` with `in_sign` (one sign bit per input, 1 = negative).
4. **Feed** one 256-bit spike vector per step with `in_valid`. It is taken in a cycle where
   `in_ready` is high. Keep `in_valid` high until then.
5. After each step `out_valid` pulses with `out_spikes` and `out_t`. The sample ends with `done`.
   `decided`, `decision` (the class) and `decision_t` (its step) then hold until the next start.
   If no neuron fired within T steps, `decided` stays 0.
6. If the sample ended on a spike, the core then sends the destination packets of the spiking
   neurons on `pkt_valid`, `pkt_core` and `pkt_wl`. A packet is taken in a cycle where `pkt_ready`
   is high. `busy` stays high until the last packet has gone; a new `start` waits for `busy` to
   fall. Tie `pkt_ready` high if the packets are not needed.

Inputs are sampled on the rising edge of `clk`. `rst_n` is asynchronous and active low. Assertions
in the core and controller check the input handshake, that programming happens only while idle,
and the sequencing.

## Parameters

All defaults are the baseline configuration and live in `rtl/spinaps_pkg.sv`:

| parameter   | default | meaning |
|-------------|---------|---------|
| `N_IN`      | 256  | input neurons |
| `N_OUT`     | 256  | output neurons (a multiple of `PWL_SHARE`) |
| `B`         | 8    | synapse bits including sign. 5 to 7 are the reduced-precision variants; the array word is `N_OUT*B` |
| `TAU`       | 7    | spike integration window (at most `T`) |
| `T`         | 8    | presentation length in steps |
| `ACC_W`     | 18   | accumulator width |
| `PWL_SHARE` | 16   | output neurons per sigmoid unit |
| `WL`        | 2048 | word lines; needs `N_IN*TAU + 1` plus the destination lines (12 at the defaults) |
| `FRAC`      | 4    | fractional bits of weights, gamma and u (0 to 6) |
| `RD_CYC`    | 5    | logic cycles per array read (500 MHz logic, 100 MHz array) |

Which networks fit one core at the defaults:

* **256 x 256 with T = 8, tau = 7** fits. It needs 1793 of the 2048 word lines.
* **Handwritten digits** (784 inputs, 10 classes, T = tau = 8) does not fit one core. It needs
  784 x 8 + 1 = 6273 word lines. It would span several cores, with the inputs split between them
  and the partial sums combined. The RTL does not provide that combining.
* **Activity recognition** (561 features, 6 classes, T = tau = 16) also needs several cores. The
  core itself can be built with `T = 16, TAU = 16` and a larger `WL`.
* **Reduced precision (5 to 7 bits)**: such weights fit unchanged, sign-extended into the 8-bit
  words. Setting `B` to match shrinks the array. With `B = 5` the default scale leaves only
  [-1, 1) for weights and gamma, and then no neuron can be made silent. `FRAC = 1` gives
  [-8, 7.5] in steps of 1/2 instead. The clip of u and the 8-bit probability are the same for
  every `B`. A fully reduced design would also quantize u and the probability to b bits.

## Departures and own choices

The following are choices of this implementation, not fixed by the architecture:

* There is one clock, the logic clock. The slower array is modelled by wait cycles: the sequencer
  issues a read every `RD_CYC` cycles, and the array model answers in one cycle. The fan-out
  unit waits the same `RD_CYC` cycles for each destination line.
* The input handshake, the program port, the state sequence and the one idle cycle per silent
  input neuron are this implementation's own.
* The input of step *t* is accepted at the start of the step, but it only affects later steps.
  The last vector of a T-step presentation therefore has no effect.
* Q3.4 clipping, the rounding of the sigmoid output, the LFSR polynomial and its use of the upper
  byte, and the sharing of one random byte by all 16 sigmoid units in a cycle are this
  implementation's choices. The last of these correlates the spike draws of neurons served in
  the same cycle.
* There is no feedback kernel (a neuron's own past spikes do not enter its potential). The
  first-to-spike rule stops the sample at the first output spike, so that term would always be
  zero before the decision.
* Bit k-1 of the window selects delay k. A pattern `1010010`, read left to right as delays
  1 to 7, therefore reads word lines `j*7 + 0`, `j*7 + 2` and `j*7 + 5`, in that order.
* Ties in the first-to-spike decision go to the lowest neuron index.
* Fan-out runs once, after the deciding step, because that step ends the sample. It shares the
  array read port with the word-line sequencer, which is idle at that time. The packing of 22
  neurons per line, the send order and the "no destination" code are this implementation's own.
* Not included: the analog STT-RAM cells, drivers and sense amplifiers (the array is a logical
  model), the mesh network and routers that would carry the packets to other cores, the
  combining of partial sums when a network spans several cores, and the rate-coding of inputs
  into spikes.

## Files and simulation

`rtl/` holds one module or package per file: `spinaps_pkg`, `spike_window_gen`, `wl_addr_gen`,
`stt_syn_mem`, `membrane_accum`, `pwl_sigmoid`, `lfsr16`, `spike_gen`, `fts_decoder`,
`spinaps_ctrl`, `fanout_unit` and the top, `spinaps_core`. `tb/` holds one self-checking testbench per module,
`tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M`.

`tb_spinaps_core` runs the core at its full default size. It programs the array three times:
small random weights, uniformly -1 weights with gamma at -8, and full-range random weights. It
runs 12 samples against a reference model. The model computes the potentials, the sigmoid in real
arithmetic, the LFSR bytes, the spikes, the decision and the exact cycle count of every step. The
test counts and requires each mechanism at least once:

* bias-only steps
* silent input neurons
* negated inputs
* clipping at both ends
* early decisions and ties
* samples without any spike
* input stalls
* LFSR reseeds
* destination packets, packet back-pressure and unused destination entries

It finishes in well under a second.

Run any testbench with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_spinaps_core \
      -y rtl -y tb +libext+.sv -Irtl rtl/spinaps_pkg.sv tb/tb_spinaps_core.sv
    ./obj_dir/Vtb_spinaps_core

The unit testbenches compare each block with an independent model:

* the window for every select value
* the exact read sequence and scan length
* memory read/write behaviour
* accumulator sums
* an exhaustive sweep of the sigmoid
* the LFSR sequence and its 65535 period
* the spike schedule and timing
* decisions and ties
* the controller's step protocol
* the fan-out line addresses, packet order and back-pressure

`tb_spinaps_workloads` builds the core at two larger sizes and runs rate-coded random inputs
against the same reference model:

* a digit-sized network: 784 inputs, 16 outputs (10 used), T = tau = 8, 8192 word lines. With
  about 20% of pixels active, the sequencer makes about 800 visits per step, and a step takes
  about 1100 cycles.
* an activity-sized network: 561 signed inputs (40% negative), 16 outputs (6 used),
  T = tau = 16, 9216 word lines. A step takes about 650 visits and 1800 cycles.
* a reduced-precision core: 256 inputs, 32 outputs (10 used), `B = 5`, `FRAC = 1`.

At these sizes the 18-bit accumulators could overflow in the worst case. The random test weights
stay far from that.

All pass, and each has been shown to fail against a deliberately broken copy of its block.
