# Duplex Izhikevich neurons: skip the square term while a neuron is quiet

A digital Izhikevich neuron spends most of every Euler step on one term:
`0.04 v^2`. Yet for most of a spike period the membrane potential barely
moves. A tonic-spiking neuron is in this *quasi-static* state for roughly 95 %
of each period, and in a network most neurons are silent most of the time.
The *duplex* neuron exploits this. It keeps the expensive parts of the
right-hand side in two registers:

    alpha = 0.04 v^2 + 140 - u
    beta  = a (b v - u)

It recomputes them only when the last step moved `v` by more than a threshold
`delta`. In all other steps it reuses the stored `alpha` and `beta` and runs
only the short update:

    v <- v + (alpha + 5 v + I) * dt
    u <- u + beta * dt

`5v` stays in the short path because its coefficient is large. The neuron
therefore has two step lengths: a long *full* step (firing state) and a short
*quasi-static* step. A larger `delta` skips more full steps but bends the
trajectory more.

This RTL contains the neuron, the arithmetic units it is built from, and a
42-7-1 spiking network of 50 such neurons. The network tells the letters E
and H apart. A serial port and a 12-bit DAC code give access to one chosen
neuron's membrane potential.

## Number format and constants

All state is signed 30-bit fixed point: 16 integer bits and 14 fraction bits
(Q16.14, `izh_pkg::fix_t`). Units are the model's own: mV for `v`, and the
same scale for `u`, `I`, `alpha` and `beta`.

There are no general multipliers. Every constant product is a sum of shifted
copies of the operand, described by a bit mask in which bit `k` stands for
2^-k (`izh_pkg`):

| coefficient | mask terms | value used |
|---|---|---|
| 0.04 | 2^-5 + 2^-7 + 2^-11 | 0.039551 |
| a = 0.02 | 2^-6 + 2^-8 + 2^-12 | 0.019897 |
| b = 0.2 | 2^-3 + 2^-4 + 2^-7 + 2^-8 | 0.199219 |
| dt = 1/32 ms | arithmetic shift right by 5 | exact |

The after-spike reset is `v > 30` → `v = c`, `u = u + d`. It uses
c = -65 mV and d = 6, the usual tonic-spiking values. Reset values of `v` and
`u` are -65 and -13 (= b·c). All of these are parameters of `duplex_neuron`.

## Inside one neuron (`duplex_neuron`)

### The two arithmetic units

* `cordic_square` computes `v^2` with a linear-mode CORDIC in 21 iterations,
  one per clock. Iteration `i` adds ±`x·2^-i` to `y` and removes ±`2^-i`
  from `z`, steering `z` (initially `x`) to zero, so `y` ends as `x·x`.
  Iterations start at `i = -6` (a left shift by 6). This makes any
  |x| < 128 converge, which covers the whole membrane-potential swing.
  Larger inputs are clipped. The error is below |x|·2^-14 plus the
  truncation of the shifted terms: under 0.01 mV² in the tests.
* `const_mult_serial` computes `init + Σ (x >>> k)` over the set bits of a
  mask. It adds one term per clock on one adder. The `init` operand folds a
  further addition into the chain. For example, `alpha` is
  `(140 - u) + 0.04·v²` in three clocks.

### The step schedule

A step begins with `start` while `ready` is high. `i_in` is captured at the
same time.

```
full step (recompute set, or duplex_en = 0)             quasi-static step
  clk 0      start CORDIC(v); start b*v - u              clk 0  start
  clk 1-21   CORDIC iterates; in parallel:               clk 1  U1
             b*v - u (4 terms), then a*(...) (3 terms)   clk 2  U2
             and p = 140 - u                             clk 3  U3
  clk 22-26  alpha = p + 0.04*v^2 (3 terms)              clk 4  WB, done next clock
  clk 27-30  U1..WB, done next clock
U1: s0 = alpha + 4v        s1 = v + I
U2: s0 = s0 + s1           un = u + beta*dt
U3: vn = v + s0*dt         ud = un + d
WB: spike = vn > 30;  v = spike ? c : vn;  u = spike ? ud : un
    recompute = spike or |s0*dt| > delta
```

Apart from the CORDIC's own pair of adders, at most two additions happen in
any clock. Back-to-back steps take 5 clocks when quasi-static and 32 clocks
when full.

The full/quasi-static decision is made at the end of a step and applies to
the next one. It compares `|v[n+1] - v[n]|` with `delta`. Before a reset
this difference is exactly `s0·dt`, so no subtractor is needed. A spike
always forces the next step to be full. So does the step after a reset, and
every step started while `duplex_en` is low. The low setting turns the
neuron into the plain, unmodified Izhikevich neuron for comparison.

### The dead zone, and the refresh that fixes it

Skipping alpha creates a trap that exact arithmetic does not have. While
alpha is frozen, `v` moves by `(alpha + 5v + I)·dt`. With 14 fraction bits
and dt = 2^-5, any `|alpha + 5v + I|` below 2^-9 gives an update of exactly
zero. Then `v` never changes, the `delta` test never fires again, and the
neuron is stuck. Meanwhile `u` keeps drifting on a stale `beta`.

This really happens: a neuron left at rest settles to such a point. The
neuron therefore forces a full step after `MAX_QS` (64) quasi-static steps
in a row, i.e. every 2 ms of model time. Normal quasi-static runs are much
shorter, because with alpha frozen any nonzero `dv` grows by a factor 1 + 5·dt
per step. So the refresh only costs a silent neuron one full step in 65.

`step_full`, `alpha` and `beta` are outputs so that a test bench or a
counter can watch the saving.

## The network (`duplex_snn_top`)

```
pattern[41:0] --(pixel ? i_stim : 0)--> 42 input neurons
        spikes --> synapse_layer 42x7 --> 7 hidden neurons
        spikes --> synapse_layer 7x1  --> 1 output neuron
net_ctrl: start all 50 --> wait for every done --> tick synapses --> repeat
```

* **Neurons.** There are 50 independent `duplex_neuron` instances, and all of
  them take the same time step in parallel. Input neuron `k` receives the
  current `i_stim` while `pattern[k]` is 1.
* **Synapses** (`synapse_layer`). Each post-synaptic neuron has a current
  register. Once per step it is updated as
  `I <- I - I/16 + Σ w·spike`: a decaying current with a time constant of
  16 steps (0.5 ms), kicked by the weight of each input that spiked in that
  step.

  Weights are signed 16-bit numbers with 8 fraction bits. They are loaded
  through `w_we/w_layer/w_addr/w_data`:
  * layer 0 is input→hidden, at address `hidden·42 + input`;
  * layer 1 is hidden→output, at address `hidden`.

  Reset clears all weights. They come from training done elsewhere (the
  original work used STDP). No learning rule is in this RTL.
* **Step barrier** (`net_ctrl`). Quasi-static neurons finish a step in 5
  clocks and full ones in 32. Spikes may only cross to the next layer once
  every neuron has finished. The controller therefore pulses `start` to all
  neurons and collects their `done` pulses. It then gives one `tick`, in
  which the synapses take that step's spikes. A network step lasts the
  slowest neuron's step plus 2 clocks. So the network runs quickly only in
  steps where *every* neuron is quasi-static. `wait_count` counts the clocks
  in which finished neurons sat idle.
* **Counters.** `step_count`, `full_count`, `qs_count` (neuron-steps of each
  kind) and `out_spike_count`. The fraction `qs_count / (full_count +
  qs_count)` is the computation saving.

### Observing a neuron

`probe_sel` selects a neuron: 0-41 are input neurons, 42-48 hidden neurons
and 49 the output neuron. Its potential appears on `probe_v` and in two
further forms:

* `dac_code`: 12 bits for an external DAC, computed as
  `floor(v·16) + 2048` clipped to 0..4095, i.e. 1/16 mV per code over
  ±128 mV.
* `uart_txd`: 8N1 at `CLKS_PER_BIT` clocks per bit (434 gives 115200 baud
  at 50 MHz). `sample_streamer` takes the potential at the end of a step
  whenever no packet is in flight. It sends the byte `A5`, then the
  sign-extended 32-bit value most significant byte first. Samples that
  arrive during a packet are dropped, so the line carries the potential
  decimated to the serial bit rate.

## What the simulations show

These are results of the included test benches, not of hardware:

* Single tonic-spiking neuron, constant I = 16, four spike periods after
  the first spike (`tb_workload_delta_sweep`):

  | delta (mV) | unmodified | 1/1024 | 1/256 | 1/128 | 1/16 | 1/8 |
  |---|---|---|---|---|---|---|
  | clocks per spike | 18,544 | 18,242 | 17,900 | 17,654 | 7,604 | 6,006 |
  | fewer clocks | - | 1.6 % | 3.5 % | 4.8 % | 59 % | 68 % |

  A spike period is about 520-580 steps (16-18 ms of model time). The
  published FPGA implementation reports 74 % fewer clocks at 1/8 and 70 % at
  1/16. Its schedule differs, and so does its ratio of full to quasi-static
  step length.
* Near the firing threshold (I = 6), the share of steps that skip alpha/beta
  is 0.3, 54.5, 76.2, 86.2, 89.2 and 92.1 % for delta = 0.001, 0.005, 0.01,
  0.05, 0.1 and 0.2 mV. The spike period stretches by 0.04 % at the smallest
  delta and by 19.9 % at the largest.

  The shift-and-add coefficients (0.0396 for 0.04, 0.1992 for b) raise the
  lowest current that makes the neuron fire from 4.0 to about 5.7, from
  `(5-b)^2/(4·0.0396) - 140`. A neuron driven with I = 4 therefore stays
  silent in this arithmetic.
* A bursting parameter set (c = -50, d = 2) fires in bursts, with
  inter-spike intervals of 43 and 1,061 steps.
* In the network with delta = 1/8 mV, 82 % of neuron-steps are quasi-static
  while the letters are shown. The output neuron fires for E and stays
  silent for H, in both duplex and unmodified mode. The network steps are
  bounded by the slowest neuron. Even so, 1,200 steps of E take 25,843 clocks
  with duplex neurons against 40,800 unmodified, 1.6 times faster. The
  original work reports about 2.5 times for its trained network.

## Where this RTL fills gaps or departs

* The CORDIC's iteration range and the shift-and-add forms of a and b are
  choices made here. So are the clock-by-clock schedule, the 5/32-clock step
  lengths, c = -65, d = 6 and the `MAX_QS` refresh.
* The synapse model, the weight format, pixel-to-current input coding, the
  single barrier for all layers and the probe/UART/DAC formats are this
  design's own.
* `delta` and `duplex_en` are run-time inputs, so one build covers every
  threshold and the unmodified neuron.
* Weights must be supplied. Weights trained for unmodified neurons may not
  work for duplex neurons, because duplex neurons spike earlier. They should
  be trained with the neuron mode that will be used.
* Not included: the external 12-bit DAC itself (only its code is produced)
  and the STDP training.

## Files

| file | contents |
|---|---|
| `rtl/izh_pkg.sv` | Q16.14 type, `to_fix()`, coefficient masks, dt shift |
| `rtl/cordic_square.sv` | linear-CORDIC squarer |
| `rtl/const_mult_serial.sv` | serial shift-and-add constant multiplier |
| `rtl/duplex_neuron.sv` | the duplex Izhikevich neuron |
| `rtl/synapse_layer.sv` | weights and decaying synaptic currents |
| `rtl/net_ctrl.sv` | time-step sequencer with the slowest-neuron barrier |
| `rtl/uart_tx.sv`, `rtl/sample_streamer.sv` | serial sample output |
| `rtl/duplex_snn_top.sv` | the 42-7-1 network |
| `tb/tb_*.sv` | one self-checking bench per module |

Each bench prints `TB_RESULT checks=N failures=M` and stops itself. It has a
watchdog that counts a failure if the run hangs.

* `tb_duplex_neuron` checks every Euler step against a real-valued model of
  the same equations. It checks the full/quasi-static choice and the 5/32
  clock latency, and prints clocks per spike.
* `tb_workload_delta_sweep` runs the threshold sweeps and the bursting
  neuron quoted above.
* `tb_duplex_snn_top` runs the network at its default sizes for 3,600 steps.
  Weights are hand-set: positive from pixels only E has, negative from
  pixels only H has. The bench checks E/H separation, DAC codes and decoded
  UART packets. It fails if a full step, a quasi-static step, a barrier
  wait, a spike in any layer or a UART packet never happens.

To simulate, for example the neuron:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/izh_pkg.sv tb/tb_duplex_neuron.sv --top-module tb_duplex_neuron
./obj_dir/Vtb_duplex_neuron
```

Use the same command with another `tb_*` file and top module for the other
benches. The network bench runs in about a minute.
