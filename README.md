# Streaming FIR processor with parallel pipelined MAC lanes

This is a real-time sample processor for a communication receiver. It takes
one 16-bit sample per clock from a converter and puts it through a
noise-reducing pre-filter. It then applies a programmable FIR filter and
hands one 16-bit result per clock to the next stage. The FIR work is spread
over several three-stage multiply-accumulate (MAC) pipelines. These work in
lock step on neighbouring output samples and read their operands from on-chip
block RAM. A small controller schedules the work so that the multipliers stay
busy every cycle. A 16-point FFT on the side takes frames of the
pre-filtered stream and delivers their spectra on a separate output.

The architecture follows the one in *FPGA-Based Real-Time Signal Processing
Architecture for High-Speed Communication Systems*, which targets a Xilinx
Zynq-7000 at 200 MHz. That description is at block level. It gives the chain
of blocks, the 16-bit data path, the split of the BRAM into coefficient and
sample areas, the three MAC stages (multiply, accumulate, output register)
and an FSM that drives enable, reset and address-select signals. It does not
give the algorithm, the sizes, the number formats or the scheduling. Those
are this implementation's choices, and the section
[Where this departs from the published architecture](#where-this-departs-from-the-published-architecture)
lists them.

## Dataflow

```
 adc_valid/adc_data                                            cfg_* (coefficients)
        |                                                            |
        v                                                            v
 +-------------+   +----------------+   +----------------------------------------+
 | input_fifo  |-->| preproc_filter |-->| bram_memory                            |
 | 16 x 16 bit |   | moving average |   |  sample window (one copy per lane)     |
 | drop on full|   | or bypass      |   |  coefficient area (address select)     |
 +-------------+   +----------------+   +----------------------------------------+
                                           | NUM_PE samples        | 1 coefficient
                                           v                       v
                                        +----------------------------------------+
                                        | parallel_core: NUM_PE x mac_pipeline   |
                                        |  multiply -> accumulate -> output reg  |
                                        +----------------------------------------+
                                           | NUM_PE results at once
                                           v
                                        +-----------------+
                                        | output_register |--> out_valid/out_data/out_ready
                                        | parallel in,    |
                                        | serial out      |
                                        +-----------------+
        control_fsm: window writes, read addresses, address select,
                     MAC enable / first (accumulator reset) / last, output credits

        preproc_filter output --> fft_unit (16-point frames) --> spec_* (spectrum)
```

The filter it computes, with `x` the pre-filter output and samples before
the first one taken as zero:

```
y[n] = sat16( ( sum_{k=0}^{NUM_TAPS-1} c[k] * x[n-k] ) >>> 15 )
```

The coefficients `c[k]` are signed 16-bit values in Q1.15. The sum is exact
in a 40-bit accumulator. It is then shifted right by 15 (arithmetic, so it
truncates towards minus infinity) and saturated to 16 bits.

## How the parallel lanes share the work

This is the part that takes the most care, in `control_fsm.sv`.

**Batches.** The input is cut into batches of `NUM_PE` consecutive samples.
Batch `b` produces outputs `y[b*NUM_PE + p]` for lanes `p = 0..NUM_PE-1`. It
takes `NUM_TAPS` cycles, one tap per cycle. In tap cycle `k` the controller
reads coefficient `c[k]` once and sends it to every lane. At the same time
lane `p` reads sample `x[b*NUM_PE + p - k]` from its own copy of the sample
window. So each lane sees the same coefficient sequence but a sample sequence
shifted by `p`. That is exactly what its output needs.

**Why the window is replicated.** Every lane needs a different sample in the
same cycle. Each lane therefore has a private copy of the sample window (one
BRAM each). All copies are written together through one write port, so they
always hold the same data.

**The window is circular.** It holds `SMP_DEPTH` samples, addressed by the
sample number modulo `SMP_DEPTH`. The controller keeps two counters:

* `wr_cnt`: samples written so far.
* `base`: the first sample of the current batch.

`avail = wr_cnt - base` is the number of samples written but not yet
finished by a batch.

* A batch may start when `avail >= NUM_PE`. A sample written in the decision
  cycle counts, because the first read happens one cycle later.
* A new sample is accepted when `avail < 2*NUM_PE`. It is also accepted in
  the last tap cycle of a batch, when `NUM_PE` of them are about to retire.
  So the next batch's samples arrive while the current batch runs.
* The oldest sample a running batch still reads is `base - (NUM_TAPS-1)`. The
  newest that may be written is `base + 2*NUM_PE`. The window therefore needs
  `SMP_DEPTH >= 2*NUM_PE + NUM_TAPS`, which also rules out reading and
  writing one address in the same cycle. The top-level module sets
  `SMP_DEPTH` to the next power of two (32 for the defaults).
* After reset the controller spends `SMP_DEPTH` cycles writing zeros to the
  window (state `S_INIT`). This is how the "samples before the first are
  zero" rule is met without resettable RAM.

**Back-to-back batches.** In the last tap cycle the controller checks whether
the next batch is ready. If it is, tap 0 of the next batch follows in the
very next cycle. The accumulator restart (`first`) travels down the pipeline
with the operands, so one run can end and the next begin without a gap. With
`NUM_PE == NUM_TAPS` (the default, 8 and 8) the core takes in and gives out
one sample per clock. In simulation, 400 outputs at full input rate left in
400 consecutive cycles.

**Output credits.** A batch's `NUM_PE` results arrive in one cycle, and the
output storage must have room for them. The controller keeps a count of
reserved slots. It adds `NUM_PE` when a batch starts and subtracts one for
each output word that leaves. A batch starts only if `reserved + NUM_PE <=
OUT_DEPTH`. So the output storage cannot overflow however slow the consumer
is. While a batch waits for room, the `out_stall` status output is high.

**Coefficient loading.** The coefficient area has one port. Its address comes
either from the tap counter or from `cfg_addr`, chosen by the controller's
address select. Writes are accepted (`cfg_ready`) only while the controller
is idle. To reload, drive `enable` low. The running batch finishes, the
controller goes idle, and you write `NUM_TAPS` words with `cfg_we`. Then
drive `enable` high again. The new set applies from the next batch.

## The MAC pipeline

`mac_pipeline.sv` is one lane. It has the three stages of the published
design:

| stage | register | work |
|---|---|---|
| 1, multiply | `prod_q` | 16 x 16 signed product (32 bits) |
| 2, accumulate | `acc_q` | `acc = (first ? 0 : acc) + prod` in 40 bits |
| 3, output register | `out_data` | `sat16(acc >>> 15)` |

Operand pairs come with `in_valid` (enable), `first` and `last`. The result
of a run whose last pair enters in cycle `t` is valid in cycle `t+3`.
`parallel_core.sv` places `NUM_PE` of these side by side. They share the
coefficient and the control strobes, and an assertion checks that they stay
in lock step.

## Pre-filter and input buffering

`preproc_filter.sv` has two modes, chosen by `pre_mode`:

* `PRE_AVG`: a moving average over `2**PRE_LOG2_LEN` samples (4 by default).
  It is kept as a running sum and divided by an arithmetic shift.
* `PRE_BYPASS`: passes samples through unchanged.

The history is updated in both modes, so the mode can change between any two
samples. The stage has one register and a valid/ready handshake.

`input_fifo.sv` (16 entries) absorbs short stalls. A converter cannot be held
off, so a sample that arrives while the FIFO is full is dropped, and
`adc_overflow` pulses in that cycle. Dropping only happens when the consumer
is slower than the source for longer than the FIFO and the window can cover.

## Spectrum branch

`fft_unit.sv` is a radix-2, decimation-in-time FFT of `N = 2**FFT_LOG2N`
real samples (16 by default). It watches the samples that enter the sample
window. Whenever it is free, it takes the next `N` of them as a frame and
then works through three phases:

* **Load.** `N` cycles. Each sample goes to the bit-reversed address, with
  zero imaginary part.
* **Compute.** `(N/2)*log2(N)` cycles, with one butterfly per cycle, in place.
* **Output.** The `N` bins leave in natural order on `spec_valid` /
  `spec_re` / `spec_im` / `spec_bin`, held by `spec_ready`.

Samples that arrive while it computes or delivers are not in any frame. The
FIR path is never stalled by it.

Every stage halves its results. This keeps the data in 16 bits, and the
output is `X[k]/N`, where `X` is the DFT of the frame.

The twiddles are Q1.15 values of `round(32767*cos(2*pi*t/N))` and
`round(32767*sin(2*pi*t/N))` for `t = 0..N/2-1`, computed at elaboration.

Against a floating-point DFT the error stayed within 4 LSBs in simulation.
The testbenches allow 6.

## Timing and performance

| quantity | value |
|---|---|
| sustained rate, `NUM_PE == NUM_TAPS` | 1 sample per clock (200 MSPS at 200 MHz) |
| sustained rate in general | `min(1, NUM_PE/NUM_TAPS)` samples per clock |
| MAC pipeline latency | 3 cycles (15 ns at 200 MHz) |
| last input sample to first output of its batch | `NUM_TAPS + 7` cycles (15 with the defaults) |
| reset to first accepted sample | `SMP_DEPTH` cycles of window clearing |

The 15-cycle figure is made up as follows:

* FIFO: 1 cycle.
* Pre-filter: 1 cycle.
* Controller decision: 1 cycle.
* Tap reads: `NUM_TAPS` cycles.
* Memory read: 1 cycle.
* MAC: 3 cycles.
* Output storage: 1 cycle.

| workload from the published evaluation | needed | this RTL |
|---|---|---|
| 1 Gbps input of 16-bit samples | 62.5 MSPS | 200 MSPS at 200 MHz: fits, 31% load |
| 240 MSPS at 200 MHz (throughput sweep), 250 MSPS (comparison table) | 1.2 to 1.25 samples per clock | 1 sample per clock: not reached |
| three-stage MAC pipeline, "30 ns" | 3 stages | 3 stages, 15 ns at 200 MHz |

Rates above one sample per clock would need a wider input bus, which the
published design does not have. Its figure of about 10 ns per pipeline stage
does not match its own 200 MHz (5 ns) clock. This RTL is counted in cycles.

## Parameters

Top level (`rt_sigproc_top`):

| parameter | default | meaning |
|---|---|---|
| `NUM_TAPS` | 8 | FIR length |
| `NUM_PE` | 8 | parallel MAC lanes; `NUM_PE == NUM_TAPS` gives one sample per clock |
| `FIFO_DEPTH` | 16 | input FIFO entries (power of two) |
| `PRE_LOG2_LEN` | 2 | pre-filter averages `2**PRE_LOG2_LEN` samples |
| `OUT_DEPTH` | `4*NUM_PE` | output storage words (power of two, multiple of `NUM_PE`) |
| `FFT_LOG2N` | 4 | FFT frame of `2**FFT_LOG2N` samples |
| `SMP_DEPTH` (derived) | 32 | sample window, next power of two `>= 2*NUM_PE+NUM_TAPS` |

Word widths are in `sp_pkg.sv`:

* `DATA_W = 16`
* `COEF_W = 16`
* `ACC_W = 40`
* `FRAC_W = 15`

`ACC_W = 40` leaves 8 guard bits, which is enough for up to 256 taps at full
scale. `NUM_PE` must be a power of two, because `OUT_DEPTH` must be.

## Ports of the top level

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `adc_valid`, `adc_data[15:0]` | in | converter sample |
| `adc_ready` | out | the sample offered now is taken |
| `adc_overflow` | out | the sample offered now is dropped |
| `pre_mode` | in | `PRE_BYPASS` (0) or `PRE_AVG` (1) |
| `enable` | in | allow new batches; low to reload coefficients |
| `cfg_we`, `cfg_addr`, `cfg_data[15:0]` | in | coefficient write (Q1.15) |
| `cfg_ready` | out | the write is accepted in this cycle |
| `out_valid`, `out_data[15:0]`, `out_ready` | out/out/in | result stream, in sample order |
| `spec_valid`, `spec_re`, `spec_im`, `spec_bin`, `spec_ready` | out/out/out/out/in | spectrum bins `X[k]/N`, bin 0 first |
| `busy`, `batch_start`, `out_stall` | out | status |

## Where this departs from the published architecture

These parts come from the published description:

* the block chain of input buffer, pre-processing, parallel MAC core,
  BRAM and output register;
* the 16-bit data bus;
* the coefficient/sample split of the BRAM;
* the three MAC stages;
* an FSM issuing enable, reset and address-select signals.

The following are this implementation's own choices, made where the
description is silent:

* **Algorithm.** An FIR filter. The description names filtering,
  convolution and modulation as uses of the MAC units. The coefficient and
  sample memories point to FIR.
* **Pre-processing.** A 4-sample moving average with bypass. The description
  asks only for a pipelined digital filter that removes noise.
* **Parallelism.** 8 lanes, 8 taps, the lane-per-output batch schedule,
  replicated sample windows, and credit-based output flow control.
* **Number formats.** Q1.15 coefficients, 40-bit accumulator, truncating
  shift and saturation.
* **Buffer behaviour.** FIFO and output depths, drop-on-full input, and
  valid/ready handshakes.
* **Reset.** Asynchronous active-low reset, and window clearing after reset.
* **The FFT.** The description names an FFT in the pre-processing stage and
  gives nothing else. The FFT here has these properties, all of them this
  implementation's own:
  * its length is 16 points;
  * it uses a single in-place butterfly;
  * it scales each stage by 1/2;
  * it sits on a side branch that produces spectra instead of feeding the
    FIR core. A real-sample FIR filter cannot use complex bins.

Not built:

* **The ADC.** It is analog. Its digital side is the `adc_*` ports.
* **The optional DAC or communication link after the output.** Its input is
  the `out_*` stream.

## Files

| file | content |
|---|---|
| `rtl/sp_pkg.sv` | widths, types, pre-filter mode enum, scale-and-saturate function |
| `rtl/input_fifo.sv` | input FIFO with drop-on-full |
| `rtl/preproc_filter.sv` | moving-average / bypass pre-filter |
| `rtl/bram_memory.sv` | coefficient area and per-lane sample windows |
| `rtl/mac_pipeline.sv` | one three-stage MAC lane |
| `rtl/parallel_core.sv` | `NUM_PE` MAC lanes in lock step |
| `rtl/control_fsm.sv` | controller: window, addresses, strobes, credits |
| `rtl/output_register.sv` | parallel-in, serial-out output storage |
| `rtl/fft_unit.sv` | radix-2 frame FFT of the spectrum branch |
| `rtl/rt_sigproc_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench checks its outputs against a model written independently in
the testbench. It prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if the design hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sp_pkg.sv tb/tb_rt_sigproc_top.sv \
          --top-module tb_rt_sigproc_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Each testbench runs in well
under a second.

* **`tb_rt_sigproc_top`.** The whole design at its default sizes. A reference
  model follows every accepted sample through the pre-filter and the FIR
  filter, with the coefficient set in force for that sample's batch, and
  checks every output. It runs phases that cover:
  * full rate, checking one output per clock;
  * a slow consumer, which causes output stalls, a full window, a full FIFO
    and dropped samples;
  * large gains, which cause saturation;
  * random traffic;
  * coefficient reloads and pre-filter mode changes between phases.

  It also measures the latency of an isolated batch, and compares every
  spectrum frame with a floating-point DFT of the samples the frame took. It
  counts each of these mechanisms and fails if one never happened.
* **`tb_rt_sigproc_workload`.** Streams 4,000 samples at the 1 Gbps rate
  (5 samples in every 16 clocks, 62.5 MSPS at 200 MHz) and then 4,000 at one
  sample per clock. It checks that no sample is dropped, that every output is
  correct, and that the output keeps pace with the input.
* **`tb_control_fsm`.** Checks the schedule without the datapath. It tracks
  which sample number sits at each window address and verifies that every
  lane of every batch pairs tap `k` with sample `b*NUM_PE+p-k`. It also
  checks the credit bound and that coefficient writes never overlap a tap
  read.
* **The other testbenches.** Random traffic against queue or array models of
  their module.
