# Two spiking-neural-network accelerators: SpinalFlow and INXS

This repository holds synthesizable SystemVerilog for two accelerators for
spiking neural networks (SNNs). They share nothing but a clock and reset, and
the top module `thesis_top` places them side by side.

* **SpinalFlow** is a digital accelerator for *temporally coded* SNNs. In
  this coding each neuron fires at most once per input interval, and the
  value it carries is *when* it fires. SpinalFlow keeps every layer's
  activations as sorted lists of `(tick, neuron)` pairs. It walks those
  lists in time order, so a layer needs one addition per input spike,
  however many ticks the interval has.
* **INXS** is an in-situ analog accelerator for rate-coded leaky
  integrate-and-fire (LIF) networks. Memristor crossbars add up the weights
  of all incoming spikes at once, in the analog domain. A digital neuron
  unit then updates the membrane potentials, which are kept in SRAM.

Both designs come from a study of efficient SNN hardware. The sizes below
are that study's main configurations. Where it does not pin down a detail,
this implementation makes a choice and says so; the list is under
*Departures and own choices*.

## SpinalFlow

### The dataflow: spines

Take a convolution layer with K = 128 kernels. Apply all 128 kernels to one
receptive field and you get 128 output neurons at one output position; that
group is a **spine**. SpinalFlow computes one spine per **step**, using 128
processing elements (PEs), one per kernel. It is output-stationary: a PE
keeps its neuron's potential in a single register for the whole step and
drops it at the end. Potentials are never written to memory.

The inputs to a step are the spines of the previous layer that lie in the
receptive field. Each is already sorted by tick, because the previous layer
produced it in tick order. Up to 16 of them (16 × 128 = 2048 inputs) are
loaded into 16 **spine buffers**. A **min finder**, a tree of comparators,
then merges them into one time-ordered stream, one spike per cycle. For each
spike `(t, id)` the controller reads one 128-weight row of the **filter
buffer**: the row holding the weight from input `id` to each of the 128
kernels. It hands weight *i* to PE *i*. A PE adds the weight to its
potential. When the potential reaches the threshold, the PE fires with tick
`t` and ignores the rest of the step. A neuron fires at most once.

Because inputs arrive in tick order, the PEs also fire in tick order. The
**output queue** therefore turns the per-cycle fire masks straight into the
next sorted spine, with no sorting needed. That spine can be written back
into the input buffer as input to the next layer.

```
 input buffer (36 spines) --16 loads--> 16 spine buffers --> min finder
                                                              | (t,id)
 filter buffer (4608 x 1024 b) <-- row_base[spine] + id ------+
        | 128 weights                                          | t
        v                                                      v
 128 PEs (add, compare, fire once) --fire mask, t--> output queue --> spine out
                                                            \--> write-back
```

### Blocks

| module | role |
|---|---|
| `sf_pkg` | constants, the 16-bit spike entry `{tick[7:0], id[7:0]}`, the step command |
| `sf_pe` | accumulator and comparator; fire-once flag |
| `sf_pe_array` | 128 PEs; fire mask and fire tick |
| `sf_spine_buffer` | one sorted spine of up to 128 entries, loaded whole, popped from the head |
| `sf_min_finder` | combinational tree; earliest head among 16; ties go to the lower buffer |
| `sf_merge_unit` | 16 spine buffers plus the min finder; pops the winner when the consumer is ready |
| `sf_input_buffer` | 9 KB: 36 slots × 128 entries × 16 bit, plus a length per slot; whole-slot read |
| `sf_filter_buffer` | 576 KB: 4608 rows of 128 bytes in 32 banks (low address bits pick the bank), 1024-bit read |
| `sf_output_queue` | FIFO of `(mask, tick, last)` entries; emits one spike per cycle, lowest PE first |
| `sf_controller` | step sequencer (idle, load, land, run, tail, wait for the queue) |
| `sf_stdp_unit` | STDP support: records a step's input spikes, then streams out Δt for every PE |
| `spinalflow` | the core: everything above plus the host ports and write-back |

### A step, cycle by cycle

A step command (`step_cmd_t`) gives these fields:

* `n_spines`: the number of input spines, 1 to 16.
* `slot`: the input-buffer slot of each spine.
* `row_base`: the filter row of each spine's entry 0, so the row of a spike
  is `row_base[spine] + id`.
* `wb_en` and `out_slot`: whether to write the output spine back, and where.

Once the command is accepted, one slot is read per cycle and loaded into its
spine buffer. After that, one input spike enters the pipeline per cycle:

1. merge and filter-buffer read;
2. PE add and compare;
3. push of the fire mask into the output queue.

With no back-pressure, `spine_done` comes **`n_spines + n_spikes + 5`
cycles** after the command is accepted. The spike stream stalls whenever
the output queue is almost full, which happens when `spk_out_ready` is low
or many PEs fire at once. `stat_stalls` counts these stall cycles.

The output port emits one spike per cycle with valid/ready, in firing order
(lowest PE first within a cycle). The entry's position in the spine goes with
it, and `spine_done` gives the spine length. If `wb_en` is set, each emitted
entry is also written into slot `out_slot` of the input buffer, followed by
the length. During write-back, host writes to the input buffer are refused:
`host_ib_ready` is low. A following step can then use that slot directly,
which is how layers are chained.

### STDP support

Spike-timing-dependent plasticity (STDP) changes the weight from input *j*
to neuron *i* by an amount that depends on Δt = t_j − t_i: the input's
spike tick minus the neuron's. SpinalFlow already has both halves of that:

* the merged input stream is the step's input spikes, in time order;
* the output spine holds each PE's firing tick.

`sf_stdp_unit` adds the two missing pieces.

* An **input spike buffer** records every spike the step applies: its tick,
  and the filter row it read. It holds 2048 entries, one full 16-spine
  receptive field.
* Each PE gets a register for its firing tick and a **subtractor**.

After the step, while the core is idle, pulse `stdp_start`. The unit then
streams one entry per recorded input spike, in the order applied, with
valid/ready. Each entry gives the filter row, which is exactly the row of
weights to update, plus the input tick and the PEs that fired. It also gives
Δt for each of the 128 PEs, as a signed 9-bit value, 0 for PEs that did not
fire. The first entry is valid on the second clock edge after `stdp_start`,
and then one entry follows per cycle. Do not issue the next step command
until `stdp_busy` falls.

### Number formats

Weights and potentials are signed 8-bit. The PE sums saturate rather than
wrap, and a PE fires when `potential >= threshold`. Ticks are 8 bits wide,
so an input interval has up to 256 ticks. There is no leak in SpinalFlow,
by design.

## INXS

### The tick: odd phase, then even phase

INXS works in ticks. Each tick has two phases.

* **Odd (analog) phase.** Every crossbar applies one spike bit per row, for
  this tick's input spikes. Each bitline then carries the sum of the cell
  values on the rows that spiked. A tick lasts at least 100 ns, so that
  these currents can settle and be held. At a 0.78 ns cycle that is
  `ODD_CYCLES = 129` cycles.
* **Even (digital) phase.** Each crossbar's ADC walks its 128 bitlines, one
  per cycle, and all 64 ADCs of a synaptic unit move in lockstep. The rest
  of the pipeline is digital:
  1. A weight is 16 bits, but a cell holds 2, so one weight spans 8
     adjacent columns. A **shift-and-add** unit per crossbar rebuilds the
     increment from the 8 slice results: `sum(slice_j << 2j)`.
  2. A neuron with more than 256 inputs spans several crossbars. The unit
     sums the increments of 2^`agg_log2` crossbars.
  3. The unit sends the results on its 128-bit bus, 8 neurons per cycle.
  4. The **neuron unit** reads the potentials from its central buffer one
     cycle ahead. It computes `v + inc − leak` in 8 lanes and compares each
     result with the threshold. A lane that fires resets to 0, emits a
     spike, and its new potential is written back.

  With C = 128 bitlines, the even phase lasts `C + S` cycles. Here S is
  `3 + ceil(groups / 8)` cycles of pipeline and emission, plus 3 cycles to
  drain the neuron units.

### Sizes (the 8×8×8×128 tile)

| item | value |
|---|---|
| crossbar | 256 rows × 128 columns, 2-bit cells, 8-bit ADC |
| weights per crossbar | 256 inputs × 16 neurons (16-bit weights = 8 columns each) |
| synaptic units per tile | 8, of 64 crossbars each |
| neuron units per tile | 8, each with 8 adders and 8 comparators |
| central buffers | 8 × 128 KB = 8 × (1024 rows × 64 potentials of 16 bit) |
| buses | 128 bits = 8 × 16-bit values |

### Blocks

| module | role |
|---|---|
| `inxs_pkg` | constants and the flit `{lane_en[8], nid[17], val[8][16]}` |
| `inxs_xbar_adc` | **behavioural model** of the analog part: crossbar, sample-and-hold, 8-bit ADC that clips at 255 and flags it |
| `inxs_shift_add` | rebuilds a 16-bit increment from 8 slices; saturates at 32767 |
| `inxs_synaptic_unit` | 64 crossbars with ADCs and shift-add units; crossbar aggregation; flit emission |
| `inxs_central_buffer` | 1024 × 64 × 16-bit SRAM, word-masked writes, 1-cycle read |
| `inxs_neuron_unit` | 2-stage LIF update with a read-after-write bypass |
| `inxs_tile` | 8 synaptic units, 8 neuron units, 8 central buffers, the tick state machine |

### Neuron ids and the central buffer

Synaptic unit *i* sends its results to neuron unit *i*. That unit owns
central buffer *i*, which holds 64 potentials per row, and neuron id `nid`
lives at row `nid / 64`, word `nid % 64`. Results are numbered like this:
for neuron slot *n* (0..15) of crossbar group *g*, the id is
`home_base + n·groups + g`.

A flit covers 8 consecutive ids. When `home_base` is a multiple of 8, and
with no aggregation, a flit never crosses a row. With aggregation the group
count can be 32, 16, 8, 4, 2 or 1. The neuron unit asserts that a flit's
enabled lanes all fall in one row.

Two flits in a row that touch the same buffer row would make the second
read stale data. The bypass prevents that: it takes the words just written
in place of the SRAM read. `stat_bypass` counts how often it is used.

### Driving a tile

1. While the tile is idle, program the weights row by row with `prog_*`,
   and initialise or read the potentials with `cb_host_*`.
2. Load each crossbar's input spikes with `in_wr_*`.
3. Set `agg_log2`, `home_base`, `leak` and `threshold`, then pulse
   `tick_start`. `odd_phase` and `even_phase` show which phase is running.
4. Spikes appear on `spk_valid/mask/nid` of each unit as they are produced.
5. `tick_done` pulses when the tick ends.

## Departures and own choices

SpinalFlow:
* The spike entry format, the step command, the write-back path and the
  output-queue handshake are this design's own. So are saturating
  arithmetic and firing at `>=`.
* A step merges at most 16 spines. A receptive field of more than 2048
  inputs would need several partial steps, and they cannot be split without
  breaking time order, so such layers do not fit. This covers 3×3×512
  convolutions and 4096-input fully connected layers. Their 128 filters do
  fit the 576 KB filter buffer.
* The bank assignment of the filter buffer is fixed (low-order
  interleaving), not configurable per layer.
* Off-chip memory is not modelled. Filters and input spines are written
  through host ports.
* The STDP readout runs after a step and blocks the next step until it is
  read out. It could instead run alongside the next step's forward pass.
  The weight update itself (w ± μ·e^Δt) is not built: the unit only
  produces the Δt values a weight-update engine would use.

INXS:
* Only one tile is built. The ring network inside the tile, the mesh
  between tiles and the per-neuron routing table are not. Synaptic unit *i*
  delivers straight to neuron unit *i*, and spikes leave as ports. A full
  network therefore cannot be mapped onto this RTL.
* In place of the 4 KB input buffer of a tile there is one input register
  per crossbar. The 2.5 KB output buffer is absent, and a single
  `home_base` per unit stands in for the routing register of each crossbar.
* The odd and even phases run one after the other for the whole tile; they
  do not overlap across layers.
* Cell values and weights are unsigned. The potential is signed 16-bit and
  saturates. Leak is subtracted on every update, and a neuron resets to 0
  after it fires.
* The crossbar and ADC are a behavioural model. They keep the cell values in
  flip-flops and sum them digitally, which is fine for simulation but is not
  how the analog array is built.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. It compares
the module's outputs with a model written inside the testbench, checks
cycle counts where the design fixes them, and ends with a
`TB_RESULT checks=N failures=M` line. A watchdog stops a hung simulation.

`tb/tb_thesis_top.sv` runs the whole top at its default sizes. Both
accelerators run concurrently, and their shared sequences live in
`tb/*_scenario.svh` and `tb/*_drv.svh`.

SpinalFlow runs 40 steps, including 8 chained layers that use write-back. The
test checks every output spike and spine length against a reference model.
After every step it also checks the whole STDP readout. It counts each
mechanism, failing if one never occurs:

* output back-pressure;
* pipeline stalls;
* refused host writes;
* empty receptive fields;
* saturation;
* bursts of simultaneous firing;
* STDP readouts.

INXS programs all 512 crossbars and runs 4 ticks: sparse and dense inputs,
with aggregation, and with a low threshold. The test checks every spike,
the length of each phase and every final potential. It also requires ADC
clipping, bypass use and spikes to have happened.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sf_pkg.sv rtl/inxs_pkg.sv \
    tb/tb_thesis_top.sv --top-module tb_thesis_top -o sim
./obj_dir/sim
```

The full-size top test runs for about a minute; most of that is programming
the crossbars. The unit testbenches take seconds.
