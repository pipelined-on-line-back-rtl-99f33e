# Pipelined on-line back-propagation on a network of neuron processors

This is synthesizable SystemVerilog for a small neural network that trains
itself on chip. Every neuron has its own processing element. The layers run
at the same time rather than in turn.

Ordinary on-line back-propagation is sequential. The hidden layer computes its
outputs, then the output neuron computes the error, then the error travels
back and all weights change. Only after that can the next sample start. In
*pipelined* on-line back-propagation (PBP) the hidden neurons do not wait for
the error of the sample they just produced. While the output neuron turns the
hidden outputs of sample *t* into an error and back-propagated deltas, the
hidden neurons already compute sample *t+1*. The price is that each hidden
weight update arrives one iteration late. In return both layers work nearly
all the time.

The default configuration is a 2-2-1 network: two inputs, two hidden neurons
and one output neuron. It learns XOR.

```
              backward memory 1 (delta_1, x1, x2)
        +-----------------------------------------+
        v                                         |
  +-----------+  forward memory 1 (h_1)    +-------------+
  | hidden    |--------------------------->|             |
  | neuron 1  |                            |   output    |--> done, converged,
  +-----------+                            |   neuron    |    epoch error,
  +-----------+  forward memory 2 (h_2)    |  (training  |    weights,
  | hidden    |--------------------------->|   set and   |    hold counters
  | neuron 2  |                            |   control)  |
  +-----------+                            +-------------+
        ^                                         |
        +-----------------------------------------+
              backward memory 2 (delta_2, x1, x2)
```

## The pipeline schedule

This is the part that takes the most care. The table shows iterations in
steady state. "Post" means that a message is written into a shared memory
component and handed over.

| in iteration *r* | output neuron | hidden neuron *i* |
|---|---|---|
| takes | h_i(r) from every forward component | delta_i(r−2) and sample r from its backward component |
| computes | y(r), e(r), delta_i(r); updates its own weights | updates its weights with delta_i(r−2); computes h_i(r) |
| posts (at the start of the iteration) | delta_i(r−1) and sample r+1 to every backward component | h_i(r) to its forward component (at the end) |

Here is the same thing step by step. The output neuron starts each iteration by
posting two things to every backward component: the delta it computed in the
previous iteration and the next sample. It then waits for the hidden outputs
of the current sample. The hidden neurons take that message and start on the
next sample straight away. So a delta computed from sample *s* reaches hidden
neuron *i* together with sample *s+2*. By then the neuron has already computed
sample *s+1* with weights that did not yet include that update.

Each hidden neuron therefore keeps the inputs x_k and its own derivative
f'(u_i) for the last **two** samples. When a delta arrives, it is paired with
the data of the sample it belongs to:

```
w_ik += ETA * f'(u_i[s]) * delta_i[s] * x_k[s]        (s = sample two iterations back)
```

On the output side the rules are the usual on-line ones:

```
u    = sum_i w_i * h_i + w_bias         y = f(u)        e = d - y
delta_i = e * f'(u) * w_i              (weights before this iteration's update)
w_i  += ETA * e * f'(u) * h_i
```

During the first two iterations the hidden neurons receive a delta of zero.
The output neuron posts sample 0 with zero deltas before its first iteration.
This primes the pipeline so that one sample is always in flight.

## Shared memory components and the synchronization point

The neurons never share a bus. Each hidden neuron has its own pair of
components:

- **Forward component** (1 word): written only by the hidden neuron, read only
  by the output neuron. It carries h_i.
- **Backward component** (N_IN+1 words): written only by the output neuron,
  read only by the hidden neuron. Word 0 holds delta_i and words 1..N_IN hold
  the next sample.

Each component (`shared_mem`) is a small register file guarded by a one-bit
semaphore:

- **Empty:** the writer owns the words. It writes them and sets the semaphore
  with `wr_post`.
- **Full:** the reader owns the words. It reads them (the read is
  combinational) and clears the semaphore with `rd_take`.

A write, post or take in the wrong state is ignored, and an assertion reports
it. Posting and taking these components is the whole synchronization between
the layers. A neuron that finds its component in the wrong state waits; it is
*on hold*. `hidden_neuron` counts its hold cycles and `pbp_top` counts the
cycles from start to done. Together they give the degree of parallelism:

```
Pd = 100 * (1 - hold_cycles / run_cycles) %
```

## Arithmetic

- **Numbers:** all values are signed 32-bit fixed point with 16 fractional
  bits (Q15.16, `pbp_pkg::fix_t`). Products are truncated toward minus
  infinity (`pbp_pkg::fmul`).
- **Activation:** the logistic sigmoid, approximated by the piecewise-linear
  "PLAN" curve (`pbp_act`). Its segments are |u|/4 + 0.5, |u|/8 + 0.625 and
  |u|/32 + 0.84375, with saturation at |u| ≥ 5 and f(−u) = 1 − f(u). It needs
  only shifts and adds.
- **Derivative:** f'(u) = y(1 − y).
- **Bias:** every neuron has a bias weight on a constant input of 1. Without
  it a 2-2-1 network cannot represent XOR.

## Datapaths and timing

Each neuron is a small state machine with one multiply-accumulate step per
cycle. With no waiting, both kinds of neuron take 13 cycles per iteration:

- **Hidden neuron:** wait 1 cycle, read message 3, form the update factor 1,
  update weights 3, multiply-accumulate 3, activation 1, post 1.
- **Output neuron:** post message 3, take 1, multiply-accumulate 3,
  activation/error/stop check 1, deltas 2, weight update 3.

Because the two layers have equal work, they overlap almost perfectly:

- The XOR run takes 52 cycles per epoch.
- The hidden neurons are on hold for about 0.2 % of the time (Pd ≈ 99.8 %).
- Hold time appears only at start-up and where the two schedules drift by a
  cycle.

With a larger hidden layer the output neuron's share grows with N_HID
(3 + 1 + (N_HID+1) + 1 + N_HID + (N_HID+1) cycles) while a hidden neuron's does
not, so the hidden neurons start to wait. A 2-4-1 network on XOR takes
19 cycles per iteration and 76 per epoch; its hidden neurons reach
Pd ≈ 68 %, and it converges after 361 epochs. Spreading the output neuron's
work over several units would restore the balance. That is not built here.

## Training control and results

The output neuron holds the training set (parameters `X_SET`, `D_SET`) and
presents it cyclically. At the end of every epoch (N_PAT samples) it does
three things:

- It pulses `epoch_valid` with `epoch_mse`, the mean of e² over the epoch.
  This is the error history a host would log.
- It stops training if `epoch_mse < cfg_mse_stop`, and then sets `done` and
  `converged`.
- It stops training if `cfg_max_epochs` epochs are done, and then sets `done`
  only.

The stop check comes after the error is computed and before the deltas and
weight update. So the last sample's update is not applied to the output
weights. The hidden neurons finish the round they are in and then wait.

A one-cycle `start` restarts everything from the initial weights and clears
all semaphores and counters. The stop settings are inputs so that a host can
load them. The final weights (`w_hidden`, `w_out`) and all counters are plain
output ports.

With the defaults (ETA = 2.0, the initial weights in `pbp_top`) and
`cfg_mse_stop = 0.01`, the XOR run converges after 443 epochs (23,044
cycles). The trained network gives y = 0.106, 0.880, 0.921 and 0.080 for inputs
00, 01, 10 and 11.

## Relation to the original multiprocessor system

The PBP scheme and this topology come from a system built from three 32-bit
soft-core processors on an FPGA:

- one processor per neuron;
- a forward and a backward shared component per hidden neuron;
- each component written by one side only.

That system also had caches, off-chip DDR SDRAM and SSRAM, and a JTAG UART
link to a host PC. Here each processor and its program are replaced by a
dedicated fixed-point datapath that performs the same task sequence:

- **Hidden neuron:** receive delta and the next sample, update weights,
  compute h, send h.
- **Output neuron:** receive h, compute output and error, check the stop
  conditions, compute deltas, update weights, send.

The processors, caches, external memories and host link are not part of this
RTL. The host's role is reduced to the `start`, `cfg_*` inputs and the result
outputs. As a result, the cycle counts and Pd above are not comparable with
the processor system's measured figures:

| Measure | Processor system | This RTL |
|---|---|---|
| Pd | about 75 % | 99.8 % |
| Speed | about 180 epochs/s at 100 MHz | about 1.9 million epochs/s at 100 MHz (simulated) |
| Epochs to converge on XOR | about 270 | 443 (different learning rate and initial weights) |

Some choices are this design's own, because the scheme leaves them open:

- The number format, the sigmoid approximation and the bias inputs.
- The learning rate (2.0) and the initial weights.
- The cyclic sample order.
- The semaphore protocol.
- The stop thresholds (inputs) and the reset behaviour (synchronous,
  active-low).
- The delta formula's derivative. It is taken at the output neuron's linear
  output, delta_i = e·f'(u_out)·w_i. The hidden neuron applies its own
  f'(u_i) in its update, which is the standard form of back-propagation.

## Files

| file | contents |
|---|---|
| `rtl/pbp_pkg.sv` | word width, fixed-point type, `fmul` |
| `rtl/pbp_act.sv` | activation f(u) and f'(u) (combinational) |
| `rtl/shared_mem.sv` | shared memory component with semaphore |
| `rtl/hidden_neuron.sv` | hidden neuron datapath, delayed update, hold counter |
| `rtl/output_neuron.sv` | output neuron datapath, training set, stop control, epoch error |
| `rtl/pbp_top.sv` | the network: N_HID × (hidden neuron + forward + backward component) + output neuron |
| `tb/pbp_ref.svh` | reference fixed-point arithmetic used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters of `pbp_top`:

- `N_IN`, `N_HID`, `N_PAT`
- `ETA`
- `W_HID_INIT[i][k]` and `W_OUT_INIT[i]`: packed arrays; the last index is
  the bias.
- `X_SET`, `D_SET`

The datapaths are written for any `N_IN` and `N_HID`. The 2-2-1 and 2-4-1
configurations are tested; other input counts are not.

## Simulation

Every testbench prints a line `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example, the end-to-end run at the default parameters:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb \
  rtl/pbp_pkg.sv rtl/pbp_act.sv rtl/shared_mem.sv rtl/hidden_neuron.sv \
  rtl/output_neuron.sv rtl/pbp_top.sv tb/tb_pbp_top.sv --top-module tb_pbp_top
./obj_dir/Vtb_pbp_top
```

(`-Wno-fatal` keeps the width warnings of the testbenches, which pass
narrower counters to a 64-bit compare, from stopping the build.) The other
testbenches are built the same way. Use the files a module needs and
its testbench as top.

- **`tb_pbp_act`:** sweeps u and compares with the PLAN formula. It also checks
  the breakpoints, the symmetry and f(0), f'(0).
- **`tb_shared_mem`:** checks the semaphore states and flag timing, and that
  contents hold while full. It also checks clear, and a random message stream
  with writer and reader running concurrently.
- **`tb_hidden_neuron`:** plays the output neuron with random deltas, samples
  and handshake delays. It checks every h_i against a reference of the
  delayed update, plus the final weights and the 9-cycle take-to-post latency.
  It also checks that the hold count equals the waits it imposed.
- **`tb_output_neuron`:** plays both hidden neurons with random h_i and delays.
  It checks every backward message (the deltas one iteration late and the
  sample sequence), each epoch's error, the final weights and the 12-cycle
  take-to-post latency. It stops once by the epoch limit and once by the error
  threshold.
- **`tb_pbp_top`:** trains XOR end to end at the default parameters against a
  whole-network reference model:
  - It compares every epoch's error, the stop epoch, the iteration counts and
    all final weights, and checks the trained network on the four patterns.
  - It counts hold at the synchronization point, output waits, delayed updates,
    epoch reports, both stop conditions and a restart. It fails if any of them
    never happened.
  - It prints Pd and epochs/s.
- **`tb_pbp_wide`:** the same end-to-end checks for a 2-4-1 network. It also
  requires hold time in the hidden layer, which is now the faster layer.

The whole run takes well under a second.
