# Spiker-V accelerator peripheral: a spiking neural network behind an AXI port

This is a spiking-neural-network (SNN) inference engine packaged as a memory-mapped
peripheral for a small RISC-V microcontroller of the PULPissimo kind. The CPU writes one
input sample (one bit per input neuron: spike or no spike) into a bank of registers and
sets two control bits. The accelerator then runs one *time step* of a feed-forward network
of leaky integrate-and-fire (LIF) neurons and reports the output layer's spikes in result
registers. A burst of time steps keeps the neurons' membrane potentials from step to step,
so information carried in spike timing builds up across samples. The default network has
784 inputs (a 28x28 binary image), one hidden layer of 128 neurons and 10 outputs.

The structure follows the Spiker-V design. That design integrates an SNN accelerator called
Spiker into PULPissimo on a Zynq UltraScale+ FPGA:

    AXI4 slave ──► axi_to_reg ──► spiker_adapter_reg_top ──► spiker
                   (bridge)       (register file)            ├─ spiker_reader
                                                             ├─ spiker_network ─ spiker_layer x2 ─ spiker_weight_rom
                                                             └─ spiker_writer

The CPU, the SoC interconnect, memories, debug and the FPGA's processing system are not
included. They connect through the AXI port of `spiker_adapter`, the top module.

## Using it from software

Registers are 32 bits wide. Offsets are relative to the peripheral's base address (the
reference software places it at 0x1A40_0000).

| offset      | name                 | access        | content |
|-------------|----------------------|---------------|---------|
| 0x00–0x60   | SPIKES_0 … SPIKES_24 | rw            | input spikes; input k is bit k%32 of SPIKES_(k/32) |
| 0x64–0x70   | SPIKES_RESULT_0 … _3 | ro            | output spikes of the last finished step; output k is bit k%32 of word k/32 |
| 0x74        | CTRL1                | rw            | bit 0 SAMPLE_READY, bit 1 START |
| 0x78        | STATUS               | rw / hw write | bit 0 SAMPLE (sticky: a sample was taken), bit 1 READY (mirrors the network's ready) |

Any other offset answers with an AXI SLVERR. Writes to SPIKES_RESULT are ignored. Byte
strobes are honoured.

A time step under software control looks like this:

1. Write the sample into SPIKES_0…24. One INCR burst is fine.
2. Write CTRL1 = SAMPLE_READY | START, then CTRL1 = SAMPLE_READY straight away. This makes
   START a short pulse (see below).
3. Poll STATUS until SAMPLE = 1: the sample has been captured. Write STATUS = 0 to clear it.
4. Poll STATUS until READY = 1, then read SPIKES_RESULT_0…3.
5. Go back to 1 for the next step of the same burst. To end the burst, write CTRL1 = 0.
   This clears all membrane potentials, so the next burst starts from rest.

## The sample / ready handshake

This is the part of the design that is easiest to get wrong. `spiker_network` has four
handshake signals:

* `sample_ready`: a level, "a stream of samples is present".
* `start`: a level, "you may run".
* `ready`: high whenever the network can take a sample.
* `sample`: a one-clock pulse, "the sample on the input has been captured".

```
state      IDLE ──capture──► RUN ──last layer done──► WAIT ──capture──► RUN ...
                                                      │
                                       sample_ready=0 ▼ (membranes cleared)
                                                     DONE ──capture──► RUN ...
ready      = sample_ready in IDLE (from the first clock after reset), 0 in RUN, 1 in WAIT and DONE
capture    = start & sample_ready & (state != RUN)      -> sample pulses on the next clock
```

Both inputs are levels. So while START and SAMPLE_READY stay high, the network takes a new
sample on the first clock after every step. That is how the free-running mode works: one
register write keeps the network stepping on whatever SPIKES holds, and software stops it
by clearing CTRL1. The step counter output `step_count_o` shows how many steps were taken.

For exactly one sample per step, software must lower START before the current step ends.
The shortest possible step is 6 clocks (two layers, no input spikes). When START is written
high and then low with two back-to-back AXI writes, it is high for fewer clocks than that,
so the network takes exactly one sample.

`sample_ready` low is only seen between steps (in WAIT). It ends the burst: the membranes
are cleared and the network goes to DONE, where `ready` stays high as the confirmation.
This differs from IDLE after reset, where `ready` also needs `sample_ready`. During reset
`ready` is low. A producer that raises `sample_ready` before releasing reset therefore still
sees `ready` rise, on the first clock after reset.

## The LIF network engine

`spiker_layer` is one fully connected layer of N_NEU neurons. Each neuron has a signed
V_W-bit membrane potential `v`. A time step of the layer does three things:

1. **Leak**, once, when the step starts: `v ← v − (v >>> LEAK_SHIFT)`. This is an
   exponential decay by 1/16 at the default, with no multiplier.
2. **Integrate**, event-driven. The input spike vector is copied into a pending mask. Each
   clock a priority encoder takes the lowest pending input, clears it, and reads that
   input's weight row from `spiker_weight_rom`. The row holds the weight from this input to
   every neuron. One clock later the whole row is added to all N_NEU membranes in parallel.
   Sums saturate at the V_W-bit limits. Inputs without a spike cost no clock, so the step
   length follows the number of spikes, not the layer width.
3. **Fire**: every neuron with `v ≥ V_TH` emits a spike and its membrane is reset to 0.

Timing: a layer that receives n input spikes takes n + 4 clocks, from the edge that starts
it to the edge that starts the next layer (3 clocks when n = 0). The layers of a step run
one after another, so a step takes Σ(n_l + 4) clocks. `spiker_network` reports this as
`step_cycles_o`, and the testbenches check it against the reference model. At 784-128-10
with 20 % input activity, a step is about 160 + 4 + (hidden spikes) + 4 clocks.

`spiker_network` stacks NUM_HIDDEN hidden layers of N_HID neurons and an output layer of
N_OUT neurons. Layer k's done pulse starts layer k+1. `sat_o` pulses when some membrane
saturated during the step.

### Weights

**The weights are placeholders.** The trained network is not part of this design, and the
register map has no way to load weights. So each layer's `spiker_weight_rom` is
initialised from `spiker_pkg::weight_value(layer, row, col)`. That function hashes the three
indices with 32-bit integer arithmetic and maps the result onto [−12, 19]. The mean is
positive, so neurons fire under ordinary input activity. To deploy a trained network,
replace this function, or the ROM's `initial` block, with the trained values. The ROM has
a synchronous read with an enable, so it maps onto FPGA block RAM. At the default size it
holds 784×128 + 128×10 eight-bit weights, or 813,056 bits.

## AXI bridge and register file

`axi_to_reg` handles one AXI4 transaction at a time:

* A burst becomes one register access per beat. INCR and WRAP advance by 2^size bytes
  (WRAP does not wrap); FIXED keeps the address.
* A register error on any beat returns SLVERR.
* When AW and AR arrive together, the bridge alternates which one it serves first.
* Concurrent assertions check the AXI rule that a valid request stays stable until it is
  accepted, and that the bridge's own B and R responses do the same.

`spiker_adapter_reg_top` answers every access in the same clock. STATUS can be written by
the hardware and by software; if both write in the same clock, software wins.

`spiker_reader` flattens the SPIKES words into the input vector and registers it, together
with the two CTRL1 bits (one clock). `spiker_writer` latches the output spikes into the
result words when a step finishes. It sets STATUS.SAMPLE on each capture and writes
STATUS.READY every clock.

## Parameters of `spiker_adapter`

| parameter  | default | meaning |
|------------|---------|---------|
| N_IN       | 784     | input neurons; at most 800 (25 SPIKES words) |
| N_HID      | 128     | neurons per hidden layer |
| NUM_HIDDEN | 1       | number of hidden layers |
| N_OUT      | 10      | output neurons; at most 128 (4 result words) |
| W_W        | 8       | weight width (signed) |
| V_W        | 16      | membrane width (signed) |
| V_TH       | 128     | firing threshold |
| LEAK_SHIFT | 4       | leak = v >>> LEAK_SHIFT per step |

Shared types live in `spiker_pkg`: the register-bus structs, the AXI4 channel structs
(32-bit address and data, 4-bit ID), the register offsets and the weight function.

## What comes from the Spiker-V description and what is this design's own choice

From the description:
* the three-part peripheral: AXI-to-register bridge, generated register file, Spiker core;
* the reader / network / writer split of the core;
* the register list, with 25 SPIKES words, 4 result words, and CTRL1 and STATUS with their
  bit names and access types;
* the handshake signal names and their sequence;
* LIF neurons in feed-forward layers computed in time steps, updated clock by clock and
  driven by events;
* the 10 outputs.

The input width is given once as 748 bits. But 748 bits fill only 24 words, while the
register description has 25. The 784-input default (25 words, a 28x28 image) is the
reading chosen here. Set N_IN = 748 for the other reading; nothing else changes.

This design's own choices:
* the hidden-layer size and count;
* all widths, the threshold, the shift-based leak, reset to zero and saturation;
* the placeholder weights;
* register offsets, error rules and software write priority;
* the exact handshake edges, including the DONE state and clearing the membranes at the
  end of a burst;
* the sticky SAMPLE flag;
* the bridge's single-transaction behaviour;
* the result format (output spikes of the last step, not spike counts).

The description says that the writer's control signals "allow the network to know when
it is ready to receive new data". Here the writer never holds the network back. A result
that software has not read yet is overwritten by the next step, so software that needs
every step's output must pulse START (see above).

In the description, bit 0 of STATUS is SAMPLE ("ready for the next sample"), yet its
example program polls bit 0 while waiting "for ready". This design keeps the register
layout, so polling bit 0 tells software that its sample was taken. Poll bit 1 for the
result.

Not included: the RISC-V core, the PULPissimo interconnect and peripherals, the FPGA board
logic, and the tutorial "wide ALU" peripheral. That peripheral's operations and register
map are not specified.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. `tb/spiker_ref_pkg.sv` is an integer reference model of
the LIF network. It predicts output spikes, saturation and step lengths. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_spiker_adapter \
    -y rtl -y tb +libext+.sv rtl/spiker_pkg.sv tb/spiker_ref_pkg.sv tb/tb_spiker_adapter.sv
./obj_dir/Vtb_spiker_adapter
```

Replace the top and the last file to run another testbench. The testbenches are:

* `tb_spiker_adapter` runs the whole peripheral at 64-16-10 through AXI. Its membranes are
  9 bits wide so that saturation occurs. It counts each mechanism and fails if one never
  happens: sample acknowledge, READY, multi-step bursts, end of burst, layers with no input
  spike, saturation, AXI bursts, SLVERR, free-running steps and output spikes.
* `tb_spiker_adapter_full` runs the default 784-128-10 configuration with no parameter
  overridden. Building it takes about 20 s.
* `tb_spiker_adapter_cprog` replays the reference driver program's sequence at the default
  size. The program writes two SPIKES words (0x89ABCDEF and 0), sets SAMPLE_READY and then
  START, polls STATUS bit 0 and reads the four result words. START stays high, so the
  peripheral free-runs until the testbench stops it.
* `tb_spiker_network_mock` drives a 4-8-4 network using only edges of the handshake. It
  keeps `sample_ready` high through reset, raises `start` when `ready` rises, and presents
  the next of F, E, D, C, F, F, F on each rising edge of `sample`. It drops `sample_ready`
  at the next rising edge of `ready`. That edge ends the sixth step, so the seventh input is
  never taken.
* `tb_spiker_network` also replays the 4-bit input sequence F, E, D, C, F, F, F of the
  original network test. Its outputs differ from the original's, because the weights
  differ.

To change the network, override the parameters of `spiker_adapter`. To change the weights,
change `spiker_pkg::weight_value`. The reference model uses the same function, so the
testbenches keep working.
