# Braindrop core in SystemVerilog

Braindrop is a neuromorphic core that computes with a population of noisy, mismatched analog
neurons instead of exact arithmetic. A programmer describes a dynamical system: vectors, the
functions that map one vector to another, and the differential equations that link them. A
compiler turns this into three sets of numbers:

- **encoders**: which neurons are driven, and with what sign;
- **decoders**: how to weight the spikes of a neuron pool so they add up to a wanted function;
- **transforms**: how to send one decoded vector to another pool.

The analog neurons and synapses are cheap and slow. Digital logic moves the spikes between
them. This repository holds that digital logic as synthesizable RTL, with behavioural models
of the analog parts so the loop can be simulated end to end.

Energy is saved in two ways, and both shape the logic:

1. **Accumulative thinning.** A neuron pool emits thousands of spikes per second. Multiplying
   each spike by a decoding vector and sending the result everywhere would cost a message per
   spike per dimension. Instead, each output dimension has an *accumulator bucket*. Each spike
   adds its 8-bit weight to the bucket. The bucket sends a single signed delta (+1 or −1) when
   it crosses ±T, and then moves back by T. So the traffic leaving a pool scales with the
   decoded value, not with the number of neurons.
2. **Sparse encoding through a diffusor.** A decoded delta is not sent to every neuron with its
   own weight. It goes to a few *tap points*: synaptic filters, one for every four somas. An
   analog resistive mesh (the diffusor) spreads each filter's current to nearby somas with
   exponential decay. Sums of these decaying kernels act as the encoders.

## Data flow

```
 somas(4096) --spike--> aer_tx --{subarray,idx}--> accum_datapath --gtag,±1--> route!=0 --> acc_out_*
    ^                                              (PAT, WM, AM, acc_update)     |
    |                                                  ^                         v route==0
 diffusor <-- synaptic filters(1024) <-- aer_rx        | transform request    tag_fifo <-- host_*
                                           ^           |                         |
                                           +-- syn ----+------ tat_controller <--+
                                                                (TAT)  --route--> rt_out_*
```

- **Somas → AER TX.** `aer_tx` keeps a pending flag per soma. It sends one address event per
  cycle, choosing a subarray (a group of 64 somas) round-robin and, inside that subarray, the
  lowest pending index. A soma that spikes again while still pending is not queued twice. The
  `collision` output reports it.
- **Decode.** `accum_datapath` uses the 6-bit subarray number to read the **pool action table
  (PAT)**. The PAT returns a weight-memory row and the first accumulator bucket of the pool. The
  datapath then walks the pool's buckets until one has its stop bit set. For each bucket it
  reads the neuron's weight, updates the bucket through `acc_update`, and writes it back. A
  bucket that crosses its threshold emits its 19-bit global tag with the sign of the delta.
- **Global tags.** The top 8 bits of a global tag are a route. Route 0 means "stay on this
  core": the low 11 bits (the local tag) go into the tag FIFO. Any other route leaves the core
  on `acc_out_*`, for an external router.
- **Tag FIFO.** The FIFO holds 20-bit words: an 11-bit tag, a signed 8-bit count and a dirty
  bit. The host can push tags too, on a second port with lower priority.
- **Tag action table (TAT).** `tat_controller` pops a word. It runs the list of actions stored
  from TAT address `tag` up to an entry with its stop bit set, and repeats the list |count|
  times. There are three kinds of action:
  - *transform*: feed the delta back into `accum_datapath` as if it were a spike. The entry
    gives a first bucket and a weight column, so a matrix–vector product is done one delta at a
    time through further buckets;
  - *synapse*: send the signed delta to one or two tap points (synaptic filters), through
    `aer_rx`;
  - *route*: send the delta off the core with a new global tag (`rt_out_*`).
- **Analog side.** Each synaptic filter low-passes its ±1 pulses. The diffusor spreads the
  filter currents to the somas. Each soma integrates its current plus a bias and an offset, and
  fires.

Because a transform's output goes through the same accumulators as a decode, a pool's decoded
output can be multiplied by a matrix, thinned again, and passed on with no multiplier anywhere.

## The memories and their word layouts

Sizes follow the original chip. Field layouts are this design's choice where the sizes alone do
not fix them. All types are in `rtl/braindrop_pkg.sv`.

| Memory | Entries | Word | Layout |
|---|---|---|---|
| PAT | 64 (one per subarray) | 20 bits | `{wm_row[9:0], am_base[9:0]}` |
| WM | 65536 | 8-bit signed weight, 128 = 1.0 | decode weight of dimension *i* for neuron *n*: `WM[(wm_row+i)*64 + n]`; transform column element *i*: `WM[wm_base+i]` |
| AM | 1024 buckets | 38 bits | `{stop, gtag[18:0], thr[2:0], state[14:0] signed}` |
| FIFO | 2048 | 20 bits | `{dirty, tag[10:0], count[7:0] signed}` |
| TAT | 2048 | 29 bits | `{stop, kind[1:0], payload[25:0]}` |
| CM | 256 tiles × 128 bits | 8 bits per soma | see below |

Thresholds are powers of two: `T = 2^(7+thr)` in units of 1/128. So a bucket needs
`2^thr` full-scale (weight ±1.0) spikes to emit one delta. A larger `thr` gives less traffic
but coarser output.

TAT payloads by `kind`:
- `TAT_ACC`: `{am_base[9:0], wm_base[15:0]}`.
- `TAT_SYN`: two taps, each `{valid, neg, addr[9:0]}`. The tap's `neg` flips the delta's sign.
- `TAT_ROUTE`: `gtag[18:0]`.
- `TAT_NOP`: does nothing. It can close a list.

The configuration memory (CM) has one byte per soma:

| Bits | Meaning |
|---|---|
| [2:0] | offset code: 0..6 mean −3..+3 units of offset; 7 means no offset |
| [4:3] | attenuation of the input current: 1, 1/2, 1/3, 1/4 |
| [5] | kill the soma |
| [6] | kill the synaptic filter; read from the top-left soma of each 2×2 group |
| [7] | ADC select; kept in the memory, but nothing reads it |

Offsets and attenuation trim each soma's mismatch. Killing a soma removes a neuron that is
badly out of range.

## FIFO folding

When the word at the tail of the FIFO holds the same tag as a new delta, the delta is folded
into that word. Its sign is added to the word's count, so a burst of deltas for one tag costs
one word and one TAT walk with a repeat count. Folding is refused in two cases:

- the FIFO holds fewer than two words, so the tail word may be the one being read;
- the count would leave the range −128..127.

Opposite deltas cancel. A word whose count reaches 0 is dropped by the TAT controller without
running its list. `merged` pulses on each fold.

## Timing

Everything runs on one clock with valid/ready handshakes. A transfer happens on a cycle where
both are high, and a valid output holds its data until it is taken (this is asserted).

| Unit | Throughput and latency |
|---|---|
| `aer_tx` | one event per cycle |
| `accum_datapath`, spike | 1 cycle PAT read + 2 cycles per bucket + 1 cycle per emitted delta |
| `accum_datapath`, transform | 2 cycles per bucket + 1 cycle per emitted delta |
| `tat_controller` | 1 cycle per TAT entry, 2 for a synapse entry (two taps) |
| `tag_fifo` | first-word fall-through: a pushed word can be read on the next cycle |
| `aer_rx` | exc/inh pulse one cycle after the event |

Transform requests win over new spikes in the datapath. This keeps the FIFO draining when the
somas are busy. When the FIFO is full, the datapath stalls, and then so does `aer_tx`. Spikes of
pending somas merge in the meantime.

The analog models advance on `analog_tick`, so the digital logic can run many cycles per
analog time step.

## Behavioural analog models

These three modules are simple stand-ins, good enough to close the loop and to exercise the
logic. They do not predict the real circuit's numbers.

- `soma_model`: leaky integrate-and-fire. The input is `attenuated(i_in) + bias + offset + mismatch`.
  Leak is `v >>> LEAK_SHIFT` per tick. The soma fires and resets when `v ≥ VTH`. The top gives each
  soma a fixed pseudo-random mismatch derived from its index: `((n·2654435761) >> 23) − 256`.
- `synaptic_filter_model`: first-order low-pass. Each pulse adds ±`AMP`, and it decays by
  `1/2^TAU_SHIFT` per tick, with saturation. `kill` forces it to 0.
- `diffusor_model`: combinational. The filters sit on a 32×32 grid and the somas on a 64×64
  grid. A soma receives the sum over the 3×3 filters around its own filter, each shifted right
  by `SPACE_SHIFT` × Manhattan distance. The real mesh is hexagonal, has a tunable space constant,
  and can be cut at pool boundaries; none of that is modelled.

Not modelled: the 12 bias DACs (the top takes a single `bias_dac` value instead), the two ADCs,
the host FPGA and the pads.

## Array geometry

For soma `n` (12 bits):
- `row = {n[11:9], n[5:3]}` and `col = {n[8:6], n[2:0]}`, so subarray `n[11:6]` is an 8×8 block of
  the 64×64 array;
- its synaptic filter is `{row[5:1], col[5:1]}`, one per 2×2 somas;
- its CM tile is `n[11:4]`.

## Where this departs from the original chip

- **Asynchronous to synchronous.** The original logic is quasi-delay-insensitive asynchronous.
  Here it is clocked, with valid/ready standing in for the asynchronous channels. Cycle counts
  therefore say nothing about the chip's measured event rates.
- **AER transmitter and receiver.** The original ones are bit-serial designs described elsewhere.
  The encoder here is a plain round-robin/priority encoder, and the receiver is a one-hot decoder.
- **Chosen by this design:** the memory word layouts above, the threshold encoding, the route
  field of the global tag, the list-with-stop-bit organisation of the PAT/AM and TAT, the FIFO
  folding rule and depth, and where host tags enter. The original chip has sizes for these
  memories but no layouts.
- **Mixed action lists.** In the original, each tag's list acts on a single kind of output. Here a list may mix transform, synapse and route entries; a single-kind list is the special case.
- **One TAT.** The chip splits the TAT over two memory macros; here it is one table.
- **Not built:** diffusor cut switches, ADC selection, and programmable synaptic time constants.
- **Capacity.** The largest configuration considered for the chip, 4096 neurons × 16 dimensions
  with a tap point for every fourth neuron, needs 16384 tap entries. This TAT holds 2048 entries
  of two taps each, so it does not fit. Every smaller configuration does.

## Files

- `rtl/braindrop_pkg.sv`: sizes, widths, memory word types.
- `rtl/braindrop_core.sv`: the top. It has no parameters; every size is the chip's.
- Digital blocks:
  - `pool_action_table`, `weight_memory`, `accumulator_memory`, `acc_update`,
    `accum_datapath`;
  - `tag_fifo`, `tag_action_table`, `tat_controller`;
  - `aer_tx`, `aer_rx`, `config_memory`.
- Models: `soma_model`, `synaptic_filter_model`, `diffusor_model`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each compares the module against
  an independent reference model. Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Each testbench is standalone. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/braindrop_pkg.sv tb/tb_accum_datapath.sv --top-module tb_accum_datapath
./obj_dir/Vtb_accum_datapath
```

`-y rtl` lets verilator find every module by its file name; only the package has to be listed.

`tb_braindrop_core` runs the full-size core, with no parameter overrides. The host drives one
pool through tap points under it. That pool's decoded output is then:

- sent as tap-point input to a second pool;
- transformed into a bucket whose deltas leave the core;
- routed out.

The second pool decodes with a negative weight. The testbench checks the following:

- every delta count against what the thinning arithmetic predicts from the number of decoded
  spikes, for example `floor(20 × spikes / 128)`;
- that the FIFO's folded counts are replayed in full;
- the number of synaptic events;
- that killed somas and filters stay silent;
- that a flood which fills the FIFO comes out intact.

It also counts each mechanism and fails if one never happened: decode, positive and negative
deltas, transforms, synaptic events, off-core output, FIFO folds, FIFO full, AER collisions,
datapath stalls, and soma and filter kills. Building and running it takes about two minutes.

Two further full-size testbenches run the digital half of the chip's example networks:

- `tb_decode_workload` decodes a 1024-neuron pool (one dimension, through the FIFO and TAT to
  `rt_out`) and a 256-neuron pool (two dimensions, to `acc_out`), with random 8-bit decoders and
  live somas. It checks every output's delta counts exactly against a replay of the observed
  address events. It takes about three minutes.
- `tb_rotation_workload` rotates a 2-D vector. Input deltas for x and y enter from the host, and a
  transform multiplies them by R(θ) for six angles and all four sign quadrants. It checks the
  output deltas exactly against a reference accumulator, and to within ±2 of the ideal rotated
  value.

The analog side of those networks cannot be reproduced here: the behavioural models are not
calibrated to the chip. That includes the tuning curves, the integrator's and the delay line's
dynamics, and their error figures.
