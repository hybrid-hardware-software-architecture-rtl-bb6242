# Neural-network evaluator for a hybrid processor + FPGA PSO trainer

Training a neural network by particle swarm optimisation (PSO) is an outer
loop: dozens of candidate weight vectors ("particles") move through weight
space, and each step needs the network's error for every particle on every
training sample. The swarm arithmetic is small and likes to change between
experiments, so it stays in software on a soft processor. The network
evaluation is the repeated, regular part, so it goes into logic. This RTL is
that logic: a memory-mapped peripheral that takes one weight vector plus one
input sample, runs a fully connected perceptron with two hidden layers in
single-precision floating point, and hands back the outputs. The same
peripheral serves the training phase (the processor computes the
mean-squared-error fitness from the returned outputs) and the testing phase
(the processor sends the trained weights and classifies samples).

The default network is 4-10-10-3: four inputs, two hidden layers of ten
neurons, three outputs. That is the size used for the iris and balance-scale
data sets. A 2-6-6-4 configuration, used for XOR, is obtained by parameters.

## Data flow of one evaluation

```
 processor ──Avalon-MM──► avalon_slave ──► buffer_in (D+NI words) ──► nn_engine ──► buffer_out (NO words)
     ▲                        │  ▲                         │            │  fp_calc          │
     │                        │  └──── status / waitrequest┴── ready_unit ◄──────────────────┘
     └──── readdata, irq, ready_to_receive, ready_to_send ◄┘
```

1. The processor waits for **ready_to_receive** (input buffer empty, engine
   idle). It sees the flag as a port, in the status word, or as an interrupt.
2. It writes the **D weights and biases, then the NI inputs** into
   `buffer_in`, one word per bus write. D = (NI+1)·NH + (NH+1)·NH + (NH+1)·NO,
   so 193 for 4-10-3, and the buffer holds 197 words.
3. The write that fills the last empty word starts the engine. Further writes
   to `buffer_in` are held off with `waitrequest` until the run ends. The
   processor can therefore stream the next sample straight away, and the bus
   stalls instead of corrupting the running set.
4. The engine writes the NO outputs into `buffer_out`. When all are there,
   **ready_to_send** rises. At the same moment `buffer_in` is emptied.
5. The processor reads the NO outputs. Reading the last one empties
   `buffer_out`. If the next set is already in `buffer_in`, its run starts
   now. A run never starts while results are still unread.

So every evaluation resends the whole weight vector: D + NI writes, then
NO reads plus polling. For 4-10-3, that is 197 writes, a 418-cycle run and 3
reads per sample. Bus traffic, not the engine, dominates.

### Register map (word addresses)

The top two address bits select a region; the rest is the word offset.
`ADDR_W = clog2(D+NI) + 2`, which is 10 bits by default.

| region | address          | access | content |
|--------|------------------|--------|---------|
| 0      | `0x000 + i`      | W      | `buffer_in[i]`. Reads return 0. A write waits while the buffer is full |
| 1      | `0x100 + o`      | R      | output `o`. Reading `o = NO-1` while the buffer is full releases it |
| 2      | `0x200`          | R      | status: bit 0 ready_to_receive, bit 1 ready_to_send, bit 2 busy, bits 15:8 results held, bits 31:16 input words held |
| 3      | `0x300`          | R/W    | bit 0 enables irq on ready_to_receive, bit 1 enables irq on ready_to_send |

Reads have a fixed latency of one cycle: `readdatavalid` comes with the data.
Only writes to region 0 can wait. `irq` is a level, `(en0 & ready_to_receive) | (en1 & ready_to_send)`.
`rtr_pulse` and `rts_pulse` pulse for one cycle on the rising edge of each flag.

### Layout of the weight vector

This is the part a software author has to get exactly right. The engine reads
the weights strictly in order, with one pointer that runs from 0 to D-1:

```
for layer in (hidden1: NI inputs -> NH, hidden2: NH -> NH, output: NH -> NO):
    for neuron n of the layer:
        bias(n), w(n, input 0), w(n, input 1), ..., w(n, input fan_in-1)
then: input 0, ..., input NI-1        (addresses D .. D+NI-1)
```

A neuron computes `sigmoid(bias + Σ w·x)`. The sum starts from the bias and
adds the products in input order. Each product is rounded to single precision
and then added and rounded again; there is no fused multiply-add. A software
model that wants bit-identical outputs must round at the same points
(`nn_ref` in `tb/tb_fp_ref_pkg.sv` does).

## The network engine

`nn_engine` is a finite-state machine around one floating-point unit. It is
idle until `buffer_in` is full and `buffer_out` is empty. Then it goes through:

- **LOAD**: copies the NI inputs into a local register file, two cycles each.
- **WREAD / WACC**: processes one weight word every two cycles. The address is
  presented in the first cycle and the synchronous buffer returns the word in
  the second. The bias word loads the accumulator; a weight word adds
  weight × input.
- **ACT**: applies the activation. For a hidden layer, the result is stored as
  an input of the next layer, and after the layer's last neuron the outputs
  become the inputs. For the output layer, the result is written to `buffer_out`.
- **DONE**: empties `buffer_in` and returns to idle.

`busy` is high for exactly **2·NI + 2·D + 2·NH + NO + 1** cycles:
418 for 4-10-3 and 197 for 2-6-4. `ready_to_send` rises the same number of
cycles after the bus write that filled `buffer_in`, or after the read that
released `buffer_out` if that came later. This is a serial design: one
multiply-add per two cycles, and the fewest resources. Pipelining the buffer
read would halve the run time, but since resending the weights takes 197 bus
cycles per sample anyway, the gain for the whole system is small.

## Arithmetic

- **Format**: IEEE-754 single precision. Rounding is to nearest, ties to
  even. Subnormals are flushed to zero, overflow gives infinity, and NaN is
  neither produced nor propagated. Weights and activations of a network like
  this never come near those limits.
- **fp_mul / fp_add**: combinational. Multiply and add are chained in one
  cycle inside `fp_calc`. This is convenient in simulation. For a real FPGA
  at 100 MHz, a register between the multiplier and the adder (one more
  cycle per weight) is probably needed; timing has not been closed on any
  device.
- **Activation**: the logistic function, approximated piecewise-linearly by PLAN:

  | \|x\|          | sigmoid(\|x\|)       |
  |---------------|---------------------|
  | < 1           | 0.25·\|x\| + 0.5     |
  | 1 … < 2.375   | 0.125·\|x\| + 0.625  |
  | 2.375 … < 5   | 0.03125·\|x\| + 0.84375 |
  | ≥ 5           | 1                   |

  A negative x gives 1 − sigmoid(|x|). The slopes are powers of two, so each
  is an exponent decrement followed by one addition, and one more addition
  handles a negative x. The error against the true logistic function is at
  most about 0.019. The output saturates to exactly 0 or 1, so a trained
  network can reach zero mean squared error on 0/1 targets. The XOR training
  test shows this.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NI`, `NH`, `NO` | 4, 10, 3 | inputs, neurons per hidden layer (two hidden layers), outputs |
| `D` | 193 | weights + biases, (NI+1)·NH + (NH+1)·NH + (NH+1)·NO |
| `IN_AW`, `OUT_AW`, `ADDR_W` | 8, 2, 10 | derived address widths; leave them at their defaults |

For 2-6-4, instantiate `nn_fpga_top #(.NI(2), .NH(6), .NO(4))`. The status
word's count fields limit NO to 255 and D+NI to 65535.

## Files

| file | content |
|------|---------|
| `rtl/nn_pkg.sv` | shared sizes, `calc_d`, float constants, region enum, status struct |
| `rtl/fp_mul.sv`, `rtl/fp_add.sv` | single-precision multiplier and adder |
| `rtl/fp_sigmoid.sv` | PLAN activation |
| `rtl/fp_calc.sv` | floating-point unit: multiply-add and activation |
| `rtl/buffer_in.sv` | D+NI-word input buffer with per-word valid bits |
| `rtl/buffer_out.sv` | NO-word output buffer |
| `rtl/ready_unit.sv` | ready_to_receive / ready_to_send, edge pulses, irq |
| `rtl/nn_engine.sv` | the network FSM |
| `rtl/avalon_slave.sv` | bus slave and register map |
| `rtl/nn_fpga_top.sv` | top: everything wired together |
| `tb/tb_fp_ref_pkg.sv` | reference arithmetic for the testbenches (double-precision reals, rounded to single), the PLAN reference and a bit-exact network model |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the two system tests below |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Each has
a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/nn_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_nn_fpga_top.sv \
    --top-module tb_nn_fpga_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run any other one. `-y` lets Verilator find the
modules by file name.

What the tests establish:

- **tb_fp_mul, tb_fp_add, tb_fp_calc**: tens of thousands of random operands,
  bit-exact against double-precision results rounded to single. They also
  cover round-to-even ties, cancellation, zero, overflow and underflow.
- **tb_fp_sigmoid**: bit-exact against the PLAN reference, and within 0.02 of
  the true logistic function, over all segments and both signs.
- **tb_buffer_in, tb_buffer_out, tb_ready_unit, tb_avalon_slave**: flags,
  counts, repeated writes, release, one-cycle read latency, `waitrequest`,
  status word and interrupt enables.
- **tb_nn_engine**: 20 random 4-10-3 weight sets, outputs bit-exact against
  the reference network, run length exactly 418 cycles, and no start while
  results are unread.
- **tb_nn_fpga_top**: the testing phase at the default size with nothing
  overridden. One weight set is run over 45 samples, the size of an iris
  test split; random inputs stand in for the data set. It alternates between
  polling and waiting on the interrupt, overlaps every second sample so that
  bus stalls and held-back starts happen (each is counted, and a mechanism
  that never occurs is a failure), checks every output bit-exact, and checks
  the 418-cycle ready_to_send latency. Runs in well under a second.
- **tb_pso_xor**: the training phase on 2-6-4 XOR. The testbench acts as the
  processor. It trains with P = 70, 60 iterations, w = 0.92, c1 = c2 = 0.3,
  c3 = 1e-5, once with each of three velocity updates:
  - standard PSO, `v' = w·v + c1·r1·(pbest − x) + c2·r2·(gbest − x)`;
  - velocity control with an added `c3·r / e^(v²)`, which searches locally;
  - velocity control with an added `c3·r / v²`, which makes a slow particle
    jump to a new region.

  Every particle is evaluated over the bus, 51,240 network runs in about
  10 s. Every output is checked against the reference. In each training run,
  the global best must never rise and must end below its start. All three
  usually reach all four patterns correct. The velocity clamp (±0.5), the
  initial ranges and the target encoding (outputs 0/1 one-hot for the XOR
  value, outputs 2 and 3 at 0) are choices of the test.
- **tb_pso_balance**: training and testing at the default 4-10-3 size, with
  no parameters overridden, on the balance-scale problem. The data set is
  generated: all 625 combinations of left/right weight and distance in 1..5,
  with the class from comparing the two torques and inputs scaled by 1/5. It
  trains with velocity control (`c3·r / v²`) on 245 random samples with
  P = 60, for 15 iterations (about 235,000 network runs, about 90 s). Then it
  classifies 100 other samples. One run gives a best error of 0.19 → 0.10
  and 86 of 100 test samples correct. Every 8th network run is checked
  bit-exact, the global best must never rise, and it must improve.

## Where this departs from the original system, and what is not here

- **Processor, PSO software, PLL, timer**: these are not part of this RTL.
  The testbenches take the processor's place on the bus. The PSO of
  `tb_pso_xor` is testbench code, not hardware, matching the original
  partitioning: swarm in software, network in hardware.
- **Floating-point cores**: the original used vendor floating-point cores.
  These units are written from scratch with simplified special cases (see
  Arithmetic). Their latency differs from any vendor core.
- **Activation**: no activation function was specified. The logistic
  function, in its PLAN approximation, is this design's choice. Replacing
  `fp_sigmoid` with an exact exponential-and-divide version changes nothing
  else, apart from the run length if it takes more cycles.
- **Interface details are this design's own**: the register map, the weight
  order, the rule that the input buffer is emptied after each run, the
  release-on-read of the output buffer, the interrupt, and the engine waiting
  for an empty output buffer.
- **Resources and speed**: no FPGA fit or timing result exists for this RTL.
  The serial engine is built to be small; its cycle counts are exact, and
  whole-system speed depends on the bus master.
