# TTFS spiking CNN accelerator

This is synthesizable SystemVerilog for an event-driven accelerator for
*time-to-first-spike* (TTFS) spiking neural networks. In a TTFS network each
neuron fires at most once per inference, and the value it carries is encoded by
*when* it fires. Almost all neurons stay silent almost all the time, so the
hardware only works when a spike arrives. It never scans a whole layer per
input.

The accelerator is an array of processing elements (PEs) that talk through a
network-on-chip. Each PE holds a slice of one layer: its weights, its neurons,
and the addresses its neurons send to when they fire. Inside a PE the work is
split over three small engines. A *load* module turns an incoming spike into a
run of SRAM addresses. A *compute* module does saturating additions. A *store*
module writes results back and decides who fires. The three are connected only
through FIFOs, in the decoupled access-execute style, so memory latency and
back-pressure never stall the address generator directly.

The default build has 42 PEs. That is enough for a 784-300-300-10 MNIST
multilayer perceptron, which uses 39 of them, and with those defaults that
network runs end to end in simulation.

## Arithmetic: accumulated weights as a slope

Each neuron has two 32-bit words:

* **ACC** is the accumulated weight. Every input spike that reaches the neuron
  adds its weight to ACC. ACC starts at the neuron's bias and is never cleared
  during an inference.
* **NP** is the neuron word: bit 31 is the *spiked* flag and bits 30:0 are the
  signed potential.

Time is divided into timesteps (8 by default). During timestep *t* the inputs
that fire in *t* arrive and update ACC. At the end of the timestep an **EoT**
(end-of-timestep) packet makes the PE sweep all its neurons:

```
NP.pot  = sat31(NP.pot + ACC)
fire    = !NP.spiked && NP.pot >= threshold
NP.spiked |= fire
```

ACC therefore acts as the slope of the membrane potential. An input that
arrived early has been added into the potential at every EoT since, which is
how TTFS encodes "earlier means larger". Weights are 8-bit signed. Both adders
saturate instead of wrapping.

## Packets

Every packet is 75 bits (`ttfs_pkg::packet_t`):

| bits  | field  | meaning |
|-------|--------|---------|
| 74:67 | `dest` | destination PE number (255 is used for the host in the testbenches) |
| 66    | `prog` | 1 = programming packet |
| 65    | `eot`  | prefix bit: 0 = input spike, 1 = end of timestep |
| 64:62 | `tgt`  | programming target: register, weight, ACC, neuron, spike address, clear |
| 61:48 | `addr` | programming address or register number |
| 47:0  | `data` | spike payload or programming data |

An input spike to a **convolution** PE carries `{Ch, Y_jump, X_jump, S_neuron,
S_weight}` in `data[34:0]`:

* `Ch` (9 bits) is the input channel.
* `Y_jump` and `X_jump` (3 bits each) say how many extra rows and columns of
  the filter the pixel touches. Border pixels touch fewer, and that is how
  padding and stride are expressed.
* `S_neuron` (12 bits) is the first output neuron it updates, as an index in the
  whole output feature map.
* `S_weight` (8 bits) is the first filter tap it uses.

An input spike to a **fully connected** PE carries only `W_START`, the address
of its first weight.

When a neuron fires, the PE sends the 48-bit entry that its spike address SRAM
holds for it: an 8-bit destination PE and 40 bits of payload. The payload is
already in the format the next layer expects. The network is therefore wired by
filling these tables, not by logic.

## Inside a PE

```
 NoC in ─► input FIFO ─► router interface ─┬─► core incoming FIFO ─► load ─┐
                                 │   ▲      │                          │   │
                    (forwarded   │   │      │   read-request FIFOs ◄───┘   │ l2c / l2s
                     copy)       ▼   │      │          │                   ▼ FIFOs
 NoC out ◄─ output FIFO ◄────────┘   │      │   memory interface ─► read-response FIFOs ─► compute
                                     │      │     │  │  │  │                                  │
                    generated spikes └──────┼─────┘  │  │  │           c2s FIFO ◄──────────────┘
                                            │   4 single-port SRAMs          │
                                            │   weight 9216x8, ACC 256x32,   ▼
                                            │   neuron 256x32, spike 256x48 store ─► write FIFOs,
                                            │                                     spiked-neuron FIFO
                                            └─► control unit (configuration registers)
```

**Router interface** (`router_if`). This is the PE's gateway. An input spike
goes into the core and, in the same cycle, a copy goes out to the next PE of the
same layer (`fwd_dest`), so every PE of a layer sees every input. A packet waits
until both FIFOs can take it. Programming packets stop here: register writes go
to the control unit and SRAM writes go to the memory interface. Packets that the
memory interface builds for fired neurons go out when no copy is being
forwarded.

**Control unit** (`pe_ctrl`). These are the configuration registers, set by
programming packets with `tgt = 0`:

| reg | name | use |
|---|---|---|
| 0 | layer | CONV, CONV_POOL, FC, FC_SOFTMAX |
| 1 | wid_output | width of the whole output feature map |
| 2 | wid_weight | filter width K |
| 3 | threshold | firing threshold (signed) |
| 4 | max_ts | timesteps per inference (`done` when reached) |
| 5 | n_base | layer index of this PE's first neuron (convolution) |
| 6 | n_count | neurons held by this PE (1..256) |
| 7 | x_jump | FC: accesses per spike minus one |
| 8 | x_inc | FC: address step |
| 9 | fwd | `{enable, dest}`: next PE of the same layer |
| 10 | eot | `{last_in_layer, dest}`: where the layer's EoT goes after the last PE |
| 11 | pool | max-pooling window size P |

A packet with `tgt = 5` (clear) resets the pooling mask and the timestep
counter. Send one before each inference.

**Memory interface** (`mem_if`) and **SRAMs** (`sp_sram`). There is one
interface per SRAM. The SRAMs are single-ported, and the ACC and neuron SRAMs
are both read and written by the core. When a read and a write wait together,
the interface alternates between them, so neither can starve the other. A read
is granted only while its response FIFO has room for the answer, which arrives
one cycle later. Programming writes use an SRAM only in cycles the core leaves
it free. The same block reads the spike address SRAM for each fired neuron and
builds the outgoing packet.

## The core: load, compute, store

**Load** (`load_unit`). This is a three-state machine (IDLE, CONFIG, PROCESS).
It emits one *element* per cycle. An element is a set of pushes that all happen
in the same cycle: read requests to the memory interface, an operation tag for
compute, and a target address for store.

* **Convolution spike.** For `y = 0..Y_jump` and `x = 0..X_jump` it reads
  weight `w` and accumulator `acc`. Along a row, `acc` falls by one and `w`
  rises by one. Each new row starts `wid_output` lower in `acc` and `wid_weight`
  higher in `w`. Take a 6x6 output map, a 3x3 filter and the spike
  `{0, 1, 1, 7, 0}`: it produces (acc 7, w 0), (6, 1), (1, 3), (0, 4). That is,
  the pixel hits its four neighbours with the four filter taps that connect
  them. The weight base is `Ch*K*K + S_weight`, so a PE stores one KxK filter
  slice per input channel.
* **Fully connected spike.** For `k = 0..x_jump` it reads weight
  `W_START + k*x_inc` and accumulator `k*x_inc`.
* **EoT.** For every neuron `i < n_count` it reads ACC[i] and NP[i]. The last
  element is tagged.

A convolution layer's output map may be larger than 256 neurons. It is then
split by whole rows over several PEs: PE *j* holds neurons
`n_base .. n_base+n_count-1`. Every PE of the channel receives every spike and
silently skips elements outside its band, without any memory access.

**Compute** (`compute_unit`) is purely combinational. It pops one operand set
per element:

* accumulate: `ACC + w`, saturating at 32 bits;
* EoT: `NP.pot + ACC`, saturating at 31 bits, keeping the spiked flag.

**Store** (`store_unit`) pairs each result with its target address. It writes
the ACC or neuron word and applies the firing rule. Each fired neuron goes into
the spiked-neuron FIFO. After the last neuron of a sweep it pushes an
*end-of-sweep marker* and counts the timestep.

**The fence.** The load module takes a new packet only when the core is
*drained*: no element of the previous packet is still waiting in the
l2c/l2s/c2s FIFOs, the write FIFOs or the store. Two consecutive fully connected
spikes touch the same accumulators. Without the fence, the second spike could
read an accumulator before the first spike's result had been written back. The
cost is a few cycles of pipeline drain per packet. The elements inside one
packet always touch distinct addresses, so they stream at one per cycle.

## Firing rules per layer type

* **CONV, FC.** Integrate and fire as above. A neuron fires once per inference.
* **CONV_POOL.** The layer is followed by PxP max pooling. The store follows the
  sweep with row and column counters and finds each neuron's pooling window.
  It keeps one mask bit per window. The first neuron of a window to cross the
  threshold sends the window's spike and sets the mask bit. Later crossings in
  that window are marked spiked but send nothing. All neurons of a window
  share one spike address entry, the pooled position, so the next layer sees
  exactly one spike per window, at the earliest timestep any of its neurons
  fired. A PE's row band must hold whole pooling windows, so its row count must
  be a multiple of P.
* **FC_SOFTMAX** (output layer). No threshold applies. At every EoT the neuron
  with the largest potential is sent. On a tie the later index wins. The host
  reads the class from the first result.

## Ordering of timesteps across PEs

This needs care. PEs of one layer run independently and drift apart in time.
Suppose every PE of a layer sent its own EoT to the next layer. The next layer
could then see "timestep *t* is over" before a slower sibling's spikes of
timestep *t* had arrived.

The rule is that a layer's EoT goes to the next layer only after the last PE
of the layer has finished its sweep and sent its spikes. This design enforces
it by chaining the EoT:

1. The router interface does **not** forward EoT packets.
2. When a PE has finished its own sweep and sent all of its spikes, its
   end-of-sweep marker turns into an EoT. Every PE except the last sends it to
   the next PE of the layer (`fwd_dest`). The last PE sends it to the first PE
   of the next layer, or to the host (`eot_dest`, with `last_in_layer` set).
3. So PE *j+1* starts its sweep only after PE *j* has emitted everything, and
   the next layer gets one EoT per timestep, after every spike of that
   timestep.

This holds only if the system meets two requirements:

* The network-on-chip must deliver packets between one pair of PEs in the
  order they were sent. Dimension-ordered routing on a mesh does this.
* The host must not send the inputs of timestep *t+1* until the output layer's
  EoT for timestep *t* has come back. Otherwise a fast first layer could mix
  timesteps.

The testbenches meet both.

## Mapping a network

Everything is loaded with programming packets sent to each PE. The
testbenches contain a small mapper (`tb/net_bench.sv`, tasks `build` and
`program_all`) that shows the recipe:

* **Fully connected layer with `n_in` inputs.** A PE holds
  `m = min(256, floor(9216/n_in))` neurons. The weight of input *j* to local
  neuron *i* is at `j*m + i`, and input *j* is sent as `W_START = j*m`, with
  `x_jump = m-1` and `x_inc = 1`.
* **Convolution layer.** A PE holds a band of rows of one output channel. Its
  weight SRAM holds that channel's `Cin` filters, KxK each, channel after
  channel. The host or the previous layer computes `Y_jump, X_jump, S_neuron,
  S_weight` for each input pixel from the pixel position, the padding and the
  map size. These values then sit in the previous layer's spike address
  entries.
* **Biases** go into ACC. **Initial potentials** (normally 0) go into NP.
* **Spike address entries** hold `{dest, payload}`. `dest` is the first PE of
  the next layer, and the payload is what the next layer must receive for
  this neuron.
* Set `fwd` to the next PE of the same layer on every PE but the last. On the
  last PE set `eot` to `{1, first PE of the next layer}`.

## Sizes

Per PE:

| resource | built |
|---|---|
| neurons | 256 |
| weights | 9216 (8-bit) |
| ACC SRAM | 256 x 32 bits |
| neuron SRAM | 256 x 32 bits |
| spike address SRAM | 256 x 48 bits |
| FIFOs | 4 entries (core incoming FIFO 8) |

The array is 42 PEs (`ttfs_accel #(NUM_PE, FIFO_DEPTH)`).

What fits in 42 PEs:

* **MNIST 784-300-300-10:** 28 + 10 + 1 = 39 PEs. It fits, and
  `tb_accel_mnist` runs it.
* **Fashion-MNIST 784-1000-10:** 93 PEs with 9216 weights per PE. With
  19 456 weights per PE it still needs 43 PEs.
* **Small 28x28 CNNs** (for example 16C3-P2-32C3-P2-128-10): about 120 PEs.
* **14x14 convolution layers with 64 or 512 output channels:** one PE per
  channel.

Every per-PE limit holds for these networks, so they run once `NUM_PE` is
raised. Addresses in packets are 8 bits, so up to 255 PEs can be addressed
without widening `DEST_W`.

## What is not here

* **The mesh routers are not included.** The top, `ttfs_accel`, brings out
  each PE's input and output FIFO port (`in_valid/in_pkt/in_ready`,
  `out_valid/out_pkt/out_ready`, one per PE). A router, or the behavioural
  network in the testbench, connects them.
* **The offline mapper** (training, quantisation, table generation) is
  software. Only the small test mapper described above exists.

Points where this RTL makes its own choices:

* The programming packet layout and the register map.
* The spike address entry is 48 bits, not 64. The 16 unused bits are left out.
* Pooling sends the first crossing neuron of a window instead of comparing the
  potentials of the window. The output spike is the same.
* Softmax reports at every EoT instead of on a separate signal.
* The threshold test is `>=`.
* Compute is combinational and is given one work item per element, instead of
  a state machine loaded with a count.
* The fence between packets.
* Passing the EoT along the PEs of a layer, and the host barrier, described above.

## Files

`rtl/`:

| file | content |
|---|---|
| `ttfs_pkg.sv` | packet, configuration and work-item types; saturating adders |
| `ttfs_accel.sv` | top: `NUM_PE` PEs with their network ports brought out |
| `ttfs_pe.sv` | one PE |
| `router_if.sv` | router interface |
| `pe_ctrl.sv` | control unit |
| `ttfs_core.sv` | core: load, compute, store and their FIFOs |
| `load_unit.sv` | load module |
| `compute_unit.sv` | compute module |
| `store_unit.sv` | store module |
| `mem_if.sv` | memory interface |
| `sp_sram.sv` | single-port SRAM: one-cycle read, written as an array, to be replaced by a macro |
| `sync_fifo.sv` | valid/ready FIFO |

`tb/` has one self-checking bench per block. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_load_unit` replays the worked address sequences above under random
  back-pressure.
* `tb_store_unit` checks threshold, spiked flag, pooling mask and softmax on
  hand-worked cases.
* `tb_ttfs_core` and `tb_ttfs_pe` compare against a software model over four
  timesteps.
* `tb_ttfs_accel` runs a small CNN on 6 PEs: conv+pool split over two PEs,
  conv, FC and softmax. The random data and the model are built in the bench.
  It counts that every mechanism occurs: forwarding, pooling suppression, input
  stalls, ACC read/write contention, every layer firing and the host barrier.
* `tb_accel_mnist` runs 784-300-300-10 on the full-size 42-PE array. It takes
  about 50 000 cycles and under a minute.
* `tb_accel_cnn28` runs a 28x28 image through a 3x3 convolution with two
  channels and 2x2 pooling, then a 392->10 softmax layer, on the full-size
  array. Each channel is split over four PEs by rows, so nine PEs are used.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ttfs_pe \
    rtl/ttfs_pkg.sv $(ls rtl/*.sv | grep -v ttfs_pkg) tb/tb_ttfs_pe.sv
./obj_dir/Vtb_ttfs_pe
```

For the three network benches, also add `tb/net_bench.sv`, with
`--top-module tb_ttfs_accel`, `tb_accel_mnist` or `tb_accel_cnn28`. The package must come first.
