# NeuroFlow engine: a two-phase spiking-network simulator in SystemVerilog

This is the processing engine of one FPGA in a time-driven simulator for
spiking neural networks. It advances up to 98,304 Izhikevich neurons in steps
of 1 ms of model time. Neuron state and synaptic connectivity live in
off-chip DRAM. The chip holds only what has to be random-access: the input
currents that are still on their way to each neuron, for the next 16 ms.

Each time step has two phases:

1. **State update.** Neuron records stream in from DRAM, 12 per memory word.
   Twelve floating-point neuron modules update them in parallel with the
   current that is due now, and the records are written back. Neurons that
   fire are recorded in on-chip buffers.
2. **Synaptic integration.** For every neuron that fired, its row of synaptic
   packets streams in from DRAM, 24 packets per word. Each packet's weight is
   added into one of 24 on-chip accumulator lanes, at the slot for the time
   step when its axonal delay runs out.

The memory traffic has only two patterns: a sequential sweep over the neuron
records, and bursts of one row per spike. The only random access is the
read-modify-write into on-chip memory.

Only the hardware is here: no host software, DRAM controller or
inter-FPGA link. Spikes leave on a port. A host that wants plasticity (STDP)
computes it from that spike stream and rewrites synaptic rows in DRAM between
runs.

## Block diagram

```
                      host registers (noise, seed, injector table, monitor slots)
                                   |
 run/n_steps --> nf_controller --> su_start ---------------------------> sa_start
                                   |                                      |
  DRAM neuron words  ==>  state_update_kernel                 syn_integration_kernel  <==  DRAM synaptic words
  (12 x 256 bit)          | current_injector                   | picks non-empty FIFO        (24 x 32 bit)
                          | 12 x noise_rng                     | streams the row
                          | 12 x izh_neuron_unit               | unpacks 24 packets/word
                          | write-back ==> DRAM                |
                          | spikes ==> spk_*                   |
                          v                                    v
                     12 x fired_fifo  ------------------->  acc_* (24 lanes in parallel)
                          ^                                    |
                          | read-and-clear slot t             v
                          +------------------------  24 x syn_accum_lane (16 slots x 4096 neurons)
                                                     neuron_monitor <- write-back of chosen neurons
```

| file | role |
|---|---|
| `rtl/neuroflow_top.sv` | one FPGA: wires everything together, decodes host registers |
| `rtl/nf_controller.sv` | runs phase (i) then phase (ii) for each step, counts steps |
| `rtl/state_update_kernel.sv` | phase (i) datapath |
| `rtl/syn_integration_kernel.sv` | phase (ii) datapath |
| `rtl/syn_accum_lane.sv` | one synapse lane: delay-slot accumulator memory |
| `rtl/fired_fifo.sv` | fired-neuron buffer, one per neuron module |
| `rtl/izh_neuron_unit.sv` | 6-stage pipelined Izhikevich update, fp32 |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fix2fp.sv` | single-precision arithmetic and fixed-to-float conversion |
| `rtl/current_injector.sv` | on-chip table of DC current sources |
| `rtl/noise_rng.sv` | uniform / Gaussian noise current per neuron module |
| `rtl/neuron_monitor.sv` | on-chip record of membrane potentials of chosen neurons |
| `rtl/nf_pkg.sv` | packet and record layouts, constants, register map |

## The delay ring: where a synaptic weight goes

This is the least obvious part of the design, so here it is exactly.

**Lanes.** Neuron `n` belongs to lane `n mod 24`, at local index `n / 24`.
Each lane is one `syn_accum_lane` with its own memory and adder, so all 24
lanes take a packet every cycle without conflicts. A 12-bit local index gives
24 x 4096 = 98,304 neurons. That is the size of one FPGA.

**Synaptic words.** A row in DRAM is a sequence of 768-bit words. Packet `l`
of a word (bits `32*l+31 : 32*l`) always targets lane `l`. Its 12-bit index
field is the local index, so the target neuron is `index*24 + l`. A lane with
nothing to deliver in a word gets a packet with weight 0. A neuron with `k`
targets in lane `l` therefore needs at least `k` words. Spread the targets
evenly across the lanes to keep rows short.

**Packet** (32 bits, `syn_pkt_t`):

| bits | field | meaning |
|---|---|---|
| 31:16 | weight | signed fixed point Q5.10 (range -32 .. +31.999, step 1/1024) |
| 15:4 | nidx | local index of the target neuron in the lane |
| 3:0 | delay | axonal delay minus one: 0 means 1 ms, 15 means 16 ms |

**Slots.** Each lane memory has 16 slots x 4096 neurons of 24-bit signed
accumulators, with the same binary point as the weights. A spike in step `t`
with delay field `d` adds its weight to slot `(t + d + 1) mod 16`. In phase (i)
of step `t`, the state-update kernel reads slot `t mod 16` for every neuron
and clears it in the same access. That slot is then free for the spikes of
step `t + 15` and later. No current is copied from slot to slot; the ring
index moves instead. Accumulators saturate instead of wrapping.

**Read-modify-write.** A lane's accumulate path takes two cycles: read, then
add and write. The written value is forwarded so that back-to-back packets to
the same neuron and slot add correctly. A read-and-clear must not happen
while accumulation is in flight. The controller's phase order guarantees
this, and an assertion checks it. After reset each lane clears its memory in
a sweep of 65,536 cycles. `lanes_ready` rises when the sweep is done, and the
controller waits for it.

## Phase (i): the state-update pipeline

**Neuron records** are 256 bits each (`neuron_rec_t`), from high bits to low:
`v, u, a, b, c, d` as IEEE-754 single precision, then `syn_ptr` (the
synaptic-word address of the neuron's row) and `syn_len` (its length in words,
up to 65,535). Record `j` of memory word `k` is neuron `nbase + 12*k + j`. The
host sets `n_words`, the number of words in use, so a network smaller than
98,304 neurons costs time in proportion to its size. `nbase` is the index of
this FPGA's first neuron, for sequential mapping of a larger network.

Per word, the kernel:

1. issues the read and accepts the response (any DRAM latency; requests are
   issued ahead);
2. reads and clears slot `t mod 16` at the 12 neurons' local indices in their
   lanes. The 24 lanes split into two groups of 12, and word `k` uses group
   `k mod 2`. It also queries the current injector;
3. converts the accumulated value to fp32. The input current is
   `I = I_syn + I_ext + I_noise`;
4. runs the 12 `izh_neuron_unit`s. Each unit does one forward-Euler step of 1 ms:

   ```
   v' = v + 0.04 v^2 + 5 v + 140 - u + I
   u' = u + a (b v - u)
   if v' >= 30:  spike, v' = c, u' = u' + d
   ```

   The units are six stages deep, with at most one multiply or add per path
   per stage, and take a new neuron every cycle;
5. writes the word back to the same address, reports the spikes on `spk_*`
   (`spk_base` = first neuron of the word, `spk_mask[j]` = neuron
   `spk_base + j`), and pushes `{syn_ptr, syn_len}` of every fired neuron with
   a non-empty row into fired buffer `j`.

Because the row pointer travels with the fired entry, phase (ii) never needs to
look up a neuron. With a memory that is always ready, phase (i) takes
`n_words` plus a pipeline fill of about ten cycles. At full size that is
8,192 cycles per step, 56 us at 145 MHz.

## Phase (ii): synaptic integration

The kernel serves the 12 fired buffers lowest index first. For each entry it
issues `len` word reads from `ptr` onward, keeping as many requests in flight
as the memory accepts. Each returned word is unpacked into 24 lane
accumulations in one registered step. The phase ends when every buffer is
empty, every request has returned, and the lanes have finished writing. Each
row costs two cycles to start, then one word per cycle if memory keeps up.
`rows_done` and `words_done` count the work.

## Number formats

| quantity | format |
|---|---|
| v, u, a, b, c, d, currents into the neuron | IEEE-754 single precision. Round to nearest even; subnormals flushed to zero; overflow gives infinity; no NaN |
| synaptic weight | signed Q5.10 in 16 bits |
| lane accumulator | signed 24 bits, 10 fraction bits, saturating |
| injector amplitude | signed Q15.16 in 32 bits, fp32 after summing |
| noise amplitude | fp32 |

Currents are in the same units as `v`, because the Euler step is 1 ms: a
weight of 1.0 raises the potential by about 1 mV.

## Host interface

Registers are written through `host_wr_en / host_wr_addr / host_wr_data`.
Word addresses:

| address | content |
|---|---|
| `0x0010` | noise amplitude, fp32 (0 turns noise off) |
| `0x0011` | bit 0: noise distribution, 1 = Gaussian (standard deviation 1 x amplitude), 0 = uniform in [-1, 1) x amplitude |
| `0x0012` | RNG seed. Writing reseeds all generators; each neuron module mixes in its own constant |
| `0x0100 + 8*e + f` | current source `e` (0..15), field `f`: 0 first neuron, 1 last neuron (inclusive), 2 start step, 3 stop step (exclusive), 4 amplitude Q15.16. Overlapping sources add |
| `0x0200 + s` | monitor slot `s` (0..3): bit 31 enable, bits 30:0 neuron index |

To run, pulse `run` with `n_steps` and `n_words` set. `step_done` pulses after
each step and `done` after the last one. `t_step` keeps counting across runs,
so a host can stop every 100 or 1,000 steps to apply batched weight updates.
A pulse on `clear_t` sets it back to zero. The monitor stores the new `v` of
each enabled neuron at position `t_step mod 1024`. Read it with
`mon_rd_slot / mon_rd_t`; `mon_rd_data` is valid one cycle later.

Memory channels: `nrd_*` and `srd_*` are read channels. The request is valid
and ready. The response comes back in request order and is always accepted.
`nwr_*` is the write-back; it must be accepted every cycle it is valid.

## Parameters

| parameter | default | note |
|---|---|---|
| `N_PE` | 12 | neuron modules; also records per DRAM word (3,072-bit words) |
| `SYN_LANES` | 24 | synapse lanes; packets per synaptic word (768 bits). Must be a multiple of `N_PE` |
| `N_NEURONS` | 98,304 | capacity; with 24 lanes, the 12-bit packet index fixes it at 98,304 or less |
| `N_SRC` | 16 | current sources |
| `N_MON`, `MON_DEPTH` | 4, 1024 | monitored neurons, steps kept per neuron |

On-chip memory at the defaults is 24 x 65,536 x 24 bits for the lanes
(37.7 Mbit), 12 x 8,192 x 48 bits for the fired buffers (4.7 Mbit) and
4 x 1,024 x 32 bits for the monitor. The lane memory is the large item. A
smaller FPGA can use fewer lanes or neurons.

## Where this departs from the system it is modelled on

- Only the Izhikevich model with forward Euler is built. The original also
  offers leaky and adaptive-exponential integrate-and-fire,
  Hodgkin-Huxley-type models, fourth-order Runge-Kutta, and exponential or
  alpha synaptic filters. Here the input current is the plain sum of the
  weights that arrive in the step.
- STDP, the host link, the DRAM controller and spike exchange between FPGAs
  are not part of the RTL. The optional on-chip weight cache and the compact
  format for dense networks are not built.
- The original synapse stage has up to 48 parallel modules. This build has 24,
  chosen so that the 12-bit index field reaches exactly 98,304 neurons.
- Delays are limited to 1..16 ms by the 4-bit field. A network with delays up
  to 20 ms, such as the classic polychronization network, does not fit unless
  `DELAY_W` is widened. Widening it also widens the slot count and the lane
  memory.
- Bit positions of the packet fields, the neuron-record layout, the weight
  and accumulator formats, the register map, the RNG type (xorshift32) and its
  Gaussian approximation (sum of four bytes), and the memory handshake are
  this design's own.
- Weights in Q5.10 cannot hold values smaller than 1/1024. Networks that
  divide small weights by the synapse count need a larger weight scale.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nf_pkg.sv tb/nf_tb_pkg.sv rtl/*.sv tb/tb_mem_model.sv tb/tb_neuroflow_top.sv \
    --top-module tb_neuroflow_top -o sim && ./obj_dir/sim
```

Use `--top-module tb_<name>` and that testbench's file for the others. The
unit tests compare against bit-exact models in the testbench:

- the FP units and converter against an exact real-number reference,
  including ties;
- the lane against a memory model, including back-to-back hits on one address;
- the kernels against a reference of the full step.

`tb/tb_mem_model.sv` is a behavioural DRAM with a set latency and random
back-pressure.

- `tb/tb_neuroflow_top.sv` runs a small configuration: 64 neurons, 4 modules,
  8 lanes, for 70 steps. It covers every part of the datapath, including
  noise, injection, multi-word rows, ring wrap-around and forwarding, and
  counts how often each occurs.
- `tb/tb_neuroflow_full.sv` instantiates the top with its default parameters
  and runs 10 steps of a 98,304-neuron random network with a reference model.
  Building it takes several minutes, most of it in the C++ compiler.

The reference models read the neuron state back from the simulated memory
after each step. A forward-Euler Izhikevich step at 1 ms amplifies a one-ulp
difference in `v` within a few steps. The reference computes in double
precision and allows a few ulp, so it must not drift away from the hardware.
