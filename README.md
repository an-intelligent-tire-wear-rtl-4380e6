# Tire-wear neural network on an FPGA

This RTL computes a small fully connected neural network that estimates tire
degradation for a race car, lap by lap, from per-lap race data. It is meant to
sit in the FPGA fabric of an SoC (Cyclone V class) next to a hard processor
(the "host"). The host streams in the trained weights once. After that, for
each driver and lap, it sets the inputs, raises `ready`, and reads a single
fixed-point result when `valid` rises. Every inference takes a fixed 37 clock
cycles, which is 0.74 µs at 50 MHz.

The main idea is to **parallelise along the widest layer**. The network is

```
N_IN inputs ──► N_MID middle nodes (ReLU) ──► N_OUT third-layer nodes ──► 1 output
   (16)              (64, one NNM each)            (16, summed)            (hard-coded weights)
```

Each middle-layer node is its own hardware unit, the **NNM** ("neural net
middle"). An NNM has a private weight RAM and exactly one multiplier, and every
NNM runs the same cycle-by-cycle schedule in lockstep. So the time for an
inference depends only on `N_IN + N_OUT`, and the middle layer's width costs
area, not time.

## Files

| file | role |
|---|---|
| `rtl/tire_nn_pkg.sv` | fixed-point type `fx_t`, saturating multiply/add, ReLU, NNM state enum |
| `rtl/tire_nn_top.sv` | top: host interface, NNM array, third-layer sum, output layer |
| `rtl/nnm.sv` | one middle-layer node: sequencer, sum register, multiplier, RAM |
| `rtl/m10k_ram.sv` | weight RAM with a two-cycle read delay (M10K-style) |
| `rtl/weight_addr_counter.sv` | address counter that overflows after the last weight |
| `rtl/fxp_mul.sv` | 27-bit fixed-point multiplier (one DSP block) |
| `rtl/hps_edge_trigger.sv` | turns a host level signal into a one-cycle enable on its rising edge |
| `rtl/weight_loader.sv` | routes the streamed weight words to NNM 0, 1, 2, … |
| `rtl/third_layer_sum.sv` | sums the NNM products for each third-layer node |
| `rtl/output_layer.sv` | output node with hard-coded weights, registered result + valid |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tire_nn_ref_pkg.sv` | independent 64-bit integer reference arithmetic for the testbenches |

## Number format

All values are 27-bit two's-complement fixed point. That is one sign bit, 6
integer bits and 20 fraction bits, giving a range of ±64 and a resolution of
about 1e-6. The 27-bit width matches one Cyclone V DSP multiplier. The
20-bit fraction is this design's choice: it gives results that agree with a
floating-point model to about six decimal places.

- A product is the full 54-bit product shifted right by 20. The shift rounds
  toward −∞, and the result is then saturated to 27 bits.
- A sum saturates instead of wrapping.
- Wide sums (the third layer and the output) are formed at full width and
  saturated only once, at the end.

## The NNM: one middle node, one multiplier, seven states

This is the heart of the design. Each NNM computes

```
h     = ReLU( bias + Σ_i w_in[i] · x[i] )        i = 0 … N_IN-1
y[j]  = h · w_out[j]                              j = 0 … N_OUT-1
```

It delivers `y[j]`, its contribution to third-layer node `j`. All `N_IN + N_OUT`
products use the same multiplier, one product per clock cycle.

**RAM layout.** The NNM's RAM holds `1 + N_IN + N_OUT` words (33 by default):

| address | content |
|---|---|
| 0 | bias |
| 1 … N_IN | `w_in[0 … N_IN-1]` |
| N_IN+1 … N_IN+N_OUT | `w_out[0 … N_OUT-1]` |

One address counter serves both writing and reading. It counts up and
overflows to 0 after the last address. No address is ever computed: writing
happens in order, and during a computation the counter advances every cycle.
Because the RAM has a **two-cycle read delay**, the sequencer starts the
counter two cycles before the data is needed.

**Sequencer.** The states, with the address presented to the RAM and the word
arriving from it:

| state | cycles | counter (address presented) | data arriving | action |
|---|---|---|---|---|
| WRITE | until all words written | advances on each write | — | `wr_data` written at the counter; the last write overflows it to 0 |
| STALL1 | 1 | 0 | — | covers the first cycle of read delay |
| STALL2 | 1 | 1 | — | covers the second |
| BIAS | 1 | 2 | bias | sum register ← bias |
| MAC | N_IN | 3 … | `w_in[i]` | sum ← sum + x[i]·w_in[i] |
| OUT | N_OUT | … | `w_out[j]` | y[j] ← h·w_out[j]; in the first OUT cycle the ReLU is applied: a negative sum is replaced by 0 in the sum register |
| DONE | until next start | cleared to 0 | — | `done` high, `y` held |

From the cycle in which `start` is high to the first cycle of DONE takes
`4 + N_IN + N_OUT` cycles. That is 36 with the default sizes.

`start` sends the NNM back to STALL1 from any state except WRITE, so a new
`start` in the middle of a computation simply restarts it. A `start` during
WRITE is ignored. When the last weight is written, the NNM goes straight into
STALL1 and computes once on its current inputs.

**Inputs.** The inputs `x` must stay stable from `start` until `done`.

## Third layer and output

`third_layer_sum` adds the `y[j]` of all NNMs, giving each third-layer node
`h3[j]`. This layer has no bias and no activation.

`output_layer` computes `out = B2 + Σ_j W2[j]·h3[j]`, and the result is
registered. The weights `W2`/`B2` are **parameters**, meaning they are fixed
in the hardware. Every other weight is loaded at run time. To use a newly
trained model, set these parameters and rebuild.

The defaults (`W2[j] = 1/N_OUT`, `B2 = 0`, so the output is the mean of the
third layer) are placeholders, not trained values. The output is linear and
can be negative. A negative value means the tire is past the point where a pit
stop was planned, not that the tire is fully worn.

## Host interface and handshake

Every host action is a **rising edge** of a level signal. `hps_edge_trigger`
samples the edge on the FPGA clock and turns it into a one-cycle enable. No
clock is gated.

- **Weight stream.** Each rising edge of `hps_wr` writes `hps_wr_data`. The
  words go in NNM order: the 33 words of NNM 0 (bias, input weights, output
  weights), then those of NNM 1, and so on, for 64 × 33 = 2112 words in all.
  `weights_loaded` rises after the last word. The network then computes once on
  `hps_x`, and `fpga_valid` rises with that first result.
- **Inference.** The host sets `hps_x` and raises `hps_ready`:
  - On the detected edge, `fpga_valid` falls and every NNM goes to STALL1.
  - `fpga_valid` rises with `fpga_data` **37 cycles** after the cycle in which
    the edge was detected, which is 38 cycles after `hps_ready` was raised.
  - The result is held, even with `hps_ready` still high, until the next
    rising edge.
  - A ready edge during a computation restarts it with the current inputs.
  - A ready edge before the weights are loaded is ignored.
- **Reset.** `rst` is synchronous and active high. It puts every NNM back into
  weight loading, so the whole weight stream must be sent again.

Assertions in the RTL check that the sequencer only holds legal states, that
`fpga_valid`, once raised, stays high until a ready edge, and that a result is
taken only when every NNM is loaded.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_IN` | 16 | network inputs |
| `N_MID` | 64 | middle-layer nodes = NNM instances |
| `N_OUT` | 16 | third-layer nodes |
| `W2[N_OUT]`, `B2` | 1/16 each, 0 | hard-coded output weights and bias |

The layer sizes are this design's choice, made to agree with two published
figures:

- `N_IN + N_OUT = 32` gives the stated deterministic latency of 37 cycles.
- 64 NNM multipliers plus 16 output multipliers make 80 DSP-sized
  multipliers, close to the 82 DSP blocks the reference FPGA build used.

The cost of an inference is `5 + N_IN + N_OUT` cycles whatever `N_MID` is.

Each NNM uses one 33 × 27-bit RAM, which fits in one M10K block. At the
defaults the whole network holds 57,024 weight bits.

## Where this RTL departs from, or fills in, the original design

These points follow the reference design:

- the parallel NNM array
- a RAM and a single multiplier per NNM
- the 27-bit fixed point
- the seven-state sequence with two stall cycles for the RAM's read delay
- the bias at address 0, and the address counter that overflows after the
  last weight
- the ReLU applied in the first output cycle
- rising-edge ready and valid signalling
- hard-coded weights into the output
- the 37-cycle latency

These are this design's own choices:

- **Layer sizes** (see above). The trained network's sizes and weights are not
  available.
- **Network shape.** The third layer is treated as a second hidden layer. Its
  incoming weights are in the NNM RAMs, and its weights to the single output
  are hard-coded. The third layer has no bias and no activation.
- **Number format**: 20 fraction bits, floor rounding and saturation.
- **Weight delivery**: the order of the stream and the `weight_loader`
  routing. This includes the first computation right after loading, and
  ignoring ready until loading is done.
- **Handshake detail.** A ready edge is taken as a restart from STALL1. `valid`
  is dropped on the ready edge.
- **One sampling register** on the host signals. This assumes the host bridge
  is clocked from the FPGA clock. Set `SYNC_STAGES = 2` in `hps_edge_trigger`
  for a truly asynchronous source.
- **RAMs are inferred arrays**, not vendor macros.

The following are not part of this RTL:

- the host processor and its software (scoreboard, lap handling)
- the SDRAM frame buffer and VGA output used to plot degradation (640 × 480,
  16-bit pixels at byte address `(640·y + x) << 1`, written by software)
- the clock PLLs

## Verification

Each module has a self-checking testbench. Each compares the module's outputs
with a reference written separately in 64-bit integer arithmetic
(`tb/tire_nn_ref_pkg.sv`), and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

- `tb_tire_nn_top` runs the top at its **default parameters**. It acts as the
  host:
  - It streams all 2112 weights, checks the first result, then runs 5 laps × 7
    drivers of inferences on synthetic inputs. The results are compared with a
    full-network reference.
  - It checks that every result arrives exactly 37 cycles after the ready edge
    and is held while ready stays high.
  - It counts, and requires, each mechanism at least once: weight writes, stall
    cycles, address-counter overflow, ReLU clamping of negative sums, a restart
    by a mid-computation ready edge, and a ready edge ignored during loading.
- `tb_tire_nn_top_sizes` runs the same host sequence through
  `tb/tire_nn_harness.sv` on three other network shapes: 2-1-2, 5-3-4 and
  3-9-7. These use signed, distinct output weights and a nonzero output bias.
  The test checks the results and the `5 + N_IN + N_OUT` latency.
- `tb_nnm_sizes` loads six NNMs of different sizes (from 1×1 to 24×8) with the
  address pattern, where the word at address `a` holds the value `a`.
  Each output therefore shows which RAM address it was computed from.
- `tb_nnm` runs an NNM at default sizes. It checks outputs, the
  `4 + N_IN + N_OUT` latency, restarts, reload after reset, and both ReLU cases.
- `tb_m10k_ram` checks the exact two-cycle read delay.
- The other testbenches check their unit against the integer reference:
  - `tb_weight_addr_counter`: the overflow point
  - `tb_hps_edge_trigger`: exactly one pulse per rising edge
  - `tb_weight_loader`: routing and completion
  - `tb_fxp_mul`, `tb_third_layer_sum`, `tb_output_layer`: the arithmetic,
    including saturation

Each testbench was also run against a deliberately broken copy of its module,
and reported failures there.

What is not verified: no trained weights or real race data are available. The
results are therefore checked for arithmetic agreement with the reference
model, not for prediction quality.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_tire_nn_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tire_nn_pkg.sv tb/tire_nn_ref_pkg.sv tb/tb_tire_nn_top.sv -o sim
./obj_dir/sim
```

Replace `tb_tire_nn_top` with any other `tb_<module>` to run that module's
test. The full-size top-level test finishes in well under a second of
simulation time. To change the network, override `N_IN`, `N_MID`, `N_OUT`, `W2`
and `B2` on `tire_nn_top`. The latency then becomes `5 + N_IN + N_OUT` cycles.
