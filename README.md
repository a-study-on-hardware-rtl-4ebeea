# Neural networks on a network-on-chip, and on a layer-multiplexed FPGA datapath

A feed-forward neural network spends most of its time on two things:
multiply-accumulate work inside each neuron, and moving every neuron's output
to every neuron of the next layer. This design holds two answers to that.

* **NoCNN processor.** 20 tiles sit in a 5 x 4 two-dimensional torus. Each
  tile is a processing element (PE) of four neurons plus a 5-port wormhole
  router. A PE collects its four results into one packet (one header, up to
  four data flits) and sends one such packet to each PE of the next layer.
  So a layer-to-layer transfer costs one packet per pair of PEs, not one
  message per pair of neurons. The header carries the route as a list of
  3-bit output-port codes, one per hop. Each router reads the first code,
  and shifts the list on as the header leaves.
* **Layer-multiplexed network (LMP).** A pool of 20 neuron modules is too
  small to hold a whole network, so layers take turns on the modules. A step
  table says which layers occupy the modules in each step. When consecutive
  layers share a step, they work on different input patterns, like stages
  of a pipeline.

The two are independent. `ann_top` puts them side by side with separate
ports and a shared clock and reset.

All RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every module has a
self-checking testbench, and one end-to-end testbench runs both processors
at their default sizes.

---

## 1. Numbers and packets

### Fixed point

| Where | Format | Range |
|---|---|---|
| NoC processor data | 32-bit two's complement, 25 fraction bits (Q6.25) | [-64, 64) |
| LMP data and weights | 16-bit, 12 fraction bits (Q3.12) | [-8, 8) |

In the NoC, products are rounded down to 25 fraction bits and added in a
40-bit accumulator, which saturates to 32 bits on its way out. In the LMP,
products are kept exact and added in a 40-bit accumulator. In both, the sum
is limited to the table's range before it addresses the activation table.

### Activation tables

Both designs look the activation function up in a RAM that the host loads,
so any function can be used: log-sigmoid, tanh, and so on.

* **NoC:** 1024 words. The index is the top 10 bits of the Q6.25 sum with
  the sign bit inverted, so word *k* covers [-64 + k/8, -64 + (k+1)/8).
* **LMP:** 256 words over [-8, 8), in steps of 1/16. Sums outside that
  range use the end words.

The testbenches fill word *k* with f(the middle of slice *k*).

### Flit format (NoC)

Every flit is 34 bits. The top two bits are the flit type (FT): `00` is a
dummy (dropped by routers), `10` a header, `11` a payload.

| Bits | Header | Payload |
|---|---|---|
| 33:32 | FT = `10` | FT = `11` |
| 31 | VCN: virtual channel (0/1) of the whole packet | data [31:0] |
| 30:27 | UN: used-neuron mask of the sending PE | |
| 26:12 | PCI: PE control information. PCI[7:0] is the input index of the first payload | |
| 11:0 | DA0..DA3: four 3-bit port codes, DA0 in [11:9] | |

Port codes: N = `000`, W = `001`, S = `010`, E = `011`, PE = `100`.

A packet has one header and popcount(UN) payloads, so 1 to 4 payloads.
Routers and PEs count payloads this way instead of looking for the end of
the packet. The field widths are the published ones; the bit positions are
this design's choice.

---

## 2. The router (hardest part)

`nocnn_router` has five ports, in index order N, W, S, E, PE. Each input
port (`nocnn_input_port`) has two virtual channels (VCs). Each VC is a 5-flit
FIFO (`nocnn_fifo`).

**Links and credits.** A link is `{valid, vc, flit}`. The receiver returns a
one-cycle credit pulse on the flit's VC each time it takes that flit out of
its buffer. Every output counts the free slots of each VC downstream: 5 at
reset, minus one per flit sent, plus one per credit. A flit is only sent
when its VC has a credit, so a buffer can never overflow. An assertion in
the input port checks this.

**Routing computation (RC).** This happens when a header is written into
the buffer. In destination-tag mode (`ALGO = RT_DT`, the default), DA0 is the
output port. The decoded one-hot request is stored next to the flit.

**DA shift.** When a header leaves, its DA field moves left by 3 bits, and
`100` (PE) fills the low bits. The next router therefore finds its own port
in DA0. A packet whose list runs out is delivered to the local PE.

**VC selection (VA).** Between packets, an input port alternates round-robin
between its two VCs and offers one head header to the switch allocators.
Once a header is granted, the port stays on that VC until all
popcount(UN) payloads have left. So a packet is never interleaved with
another on the way out.

**Switch allocation (SA).** There is one `nocnn_switch_alloc` per output.
Each has three parts:

* The decoder looks at each input's flit type and requested port.
* A fixed-priority arbiter gives the PE input priority over N, W, S and E.
* The hold logic keeps the output on the winning input until that packet's
  payloads have passed.

Payloads do not compete. They follow their header.

**Timing.** A flit that arrives at cycle *t* is in the buffer at *t+1* and,
if nothing blocks it, on the next link at *t+2*. That is two cycles per hop.
The published router has four pipeline stages (RC, VA, SA, ST). Here RC
happens at the buffer write, and VA, SA and the crossbar share one cycle.
The functions are the same but the latency is shorter; see *Departures* below.

**Absolute-address routing.** With `ALGO = RT_XY, RT_WF, RT_NL, RT_NF or
RT_FA`, the header holds the destination's x (bits 11:9) and y (bits 8:6)
instead of a port list. `inoc_route_fn` compares them with the router's own
coordinates. It gives one condition per input port and output port, for
X-Y, west-first, north-last, negative-first and a fully adaptive variant,
and exactly one output matches any destination. In this mode headers are
not shifted. x grows to the east and y to the south.

---

## 3. The PE and the tile

### PE (`nocnn_pe`)

A PE holds four neurons (`nocnn_neuron`) that share one activation table
(`nocnn_act_lut`). One input pattern goes through these stages:

1. **Accumulate.** Each header gives the payload count (popcount(UN)) and,
   in PCI[7:0], the input index of its first payload. Each payload goes to
   all four neurons. At the same time, the weight address generator gives
   them the input index, which is also the weight address in each neuron's
   own RAM. Neurons not set in the PE's used mask accumulate nothing.
2. **Flush and activate.** After `n_inputs` payloads, the PE waits four
   cycles for the neuron pipelines to drain. It then sends the four sums
   through the shared table, one per cycle, which takes five cycles.
3. **Send.** For each of `n_dest` destinations it sends one packet: a
   stored header (its UN field overwritten with the used mask), then one
   payload per used neuron, lowest neuron first. With `n_dest = 0` a single
   packet goes to the host instead; that is how an output-layer PE reports.
4. The accumulators are cleared. The PE refuses input from step 2 until
   here.

A neuron takes an input at cycle *t*. Its weight RAM and input register
deliver at *t+1*, the product register at *t+2*, and the accumulator holds
the new sum at *t+3*.

**Configuration** (`cfg_we` with `cfg_sel`):

| `cfg_sel` | Writes |
|---|---|
| `CFG_WEIGHT` | weight `cfg_addr` of neuron `cfg_neuron` (32 per neuron) |
| `CFG_LUT` | table word `cfg_addr` |
| `CFG_HDR` | header `cfg_addr` (8 per PE, one per destination) |
| `CFG_REG` | `{n_dest[15:12], n_inputs[11:4], used[3:0]}` |

### Tile (`nocnn_tile`)

A tile joins the router and the PE, and adds three things:

* A 10-flit receive FIFO between the router's PE output and the PE. It is
  large enough for both VCs' credits, and it returns a credit per flit read.
* A merge of router packets and host packets at packet boundaries, router
  first.
* A sender that puts PE packets on the router's PE input on the VC named by
  the header's VCN bit, counting that port's credits. Host-bound packets
  leave on `res_valid`/`res_flit` instead.

### The torus (`nocnn_top`)

Tile (row *r*, column *c*) has number *r*·4 + *c*, and coordinates
x = *c*, y = *r*. Its N port connects to row *r*-1, S to row *r*+1, W to
column *c*-1 and E to column *c*+1, all modulo the array size.

Host ports:

* a configuration port addressed by tile number;
* one valid/ready packet port that feeds the PE of `host_tile`;
* per tile, a result stream (`res_valid`, `res_flit`, always accepted) and a
  `done` pulse per pattern.

---

## 4. Mapping a network onto the NoC processor

The testbench maps networks the way the published design does. Layer *l*
uses column *l*, and its neurons fill the PEs of that column four at a time.
A layer of 20 neurons therefore uses all five PEs of a column, and a layer
of 3 uses one PE with three neurons working. Unused tiles sleep.

To configure the processor:

* Every input-layer PE receives the input vector from the host as packets
  (header with PCI = index of the first value).
* Each PE of layer *l* gets one header per PE of layer *l*+1. The header's
  route is E, then N or S the short way round the torus, then PE. PCI is
  4·(sender index within its layer), so that the receiver's weight address
  lines up.
* `n_inputs` is the size of the previous layer.
* Output-layer PEs get `n_dest = 0`.

The host sends one pattern at a time and waits for its results. A PE
accepts input again as soon as it has sent. Two patterns in flight could mix
in a PE that hears from several PEs of the previous layer.

Measured at the default size (cycles from the first input flit to the last
result flit, one pattern):

| Network | PEs per layer | Packets between tiles | Cycles |
|---|---|---|---|
| 3-20-20-1 | 1-5-5-1 | 35 | 126 |
| 4-12-1 | 1-3-1 | 6 | 77 |
| 4-7-13-1 | 1-2-4-1 | 14 | 103 |
| 4-5-5-1 | 1-2-2-1 | 8 | 86 |
| 5-20-10-2 | 2-5-3-1 | 28 | 130 |

The packet counts are (PEs of *l*) x (PEs of *l*+1), summed over layer
pairs. The published packet counts for the first four networks are the
same. For 5-20-10-2 the published count is 35, which does not follow from
the one-packet-per-PE-pair rule.

Limits at the default parameters:

* at most 4 columns (layers) of 5 PEs (20 neurons);
* at most 32 inputs per neuron (`WDEPTH`);
* at most 8 destination headers per PE (`HDEPTH`);
* at most 4 hops per route (four DA fields).

A 20-50-1 network, for example, does not fit.

---

## 5. The layer-multiplexed network (`lmp_ann`)

### Neuron module (`lmp_neuron`)

The stages are:

1. x and w are registered.
2. The multiplier runs. Enable low forces a zero product.
3. The product is registered.
4. The product is added into the accumulator register. A `first` input
   makes the accumulator load the product instead of adding it.
5. The table lookup is registered.

The result of a sum whose last input arrives at cycle *t* appears with
`y_valid` at *t+4*.

### Step table and control block

For each step *s* and each module *m*, the host writes one entry:

| Field | Bits | Meaning |
|---|---|---|
| en | 0 | module used in this step |
| out | 1 | its result is a network output |
| src | 4:2 | layer it reads (0 = input pattern RAM) |
| dst | 8:5 | its neuron index in layer src+1 |
| n_in | 13:9 | number of inputs |
| wbase | 21:14 | first weight address in the module's own weight RAM |

`start` runs steps 0..`n_steps`-1 in a loop, `n_loops` times. It moves to
the next input pattern once per loop.

Within a step, one counter *j* runs over the inputs. Each enabled module
gets two things:

* input *j* of its source layer (input RAM or layer buffer: the mux/demux
  of the circuit);
* weight `wbase + j`.

Each module's result is caught in its own output register. Once the slowest
module of the step has finished, all output registers are written into the
layer buffers at the same time. A step with *n* inputs at most therefore
takes *n* + 5 cycles, and a loop takes one cycle more than its steps.

**Why this gives a pipeline.** Suppose layers *k* and *k*+1 share a step.
Layer *k*+1 reads layer *k*'s buffer before the step writes it, so it sees
the previous loop's values, which belong to the previous pattern. Each
layer boundary inside a step adds one loop of latency. A layer boundary
between steps adds none. The testbench cuts a network into groups of *D*
consecutive layers, one group per step, where *D* is the pipeline depth.
For example, 3-4-2-3-1 at depth 2 becomes:

* step 0: layers 1 and 2 (4 + 2 modules);
* step 1: layers 3 and 4 (3 + 1 modules);

with one result per loop of 18 cycles.

Default limits:

* 20 modules;
* 16 inputs per neuron and 16 neurons per layer;
* 5 computing layers;
* 4 steps per loop;
* 16 stored patterns;
* 64 weights per module.

---

## 6. Departures from the published design

* **Router latency.** The router takes 2 cycles per hop instead of the
  published 4-stage pipeline. RC is done at buffer write, and VA, SA and the
  crossbar share one cycle.
* **Flow control.** It is credit based, with one credit counter per VC per
  output. The published text does not say how flow control is done.
* **Switch priority.** The order among N, W, S, E after the PE is fixed
  here as N > W > S > E. Only the PE's top priority is published.
* **Header bits.** The positions of the header fields and the use of
  PCI[7:0] as the weight base are this design's choices. So are the 1024-
  and 256-word table sizes and their indexing.
* **Host side.** The tile's receive FIFO, the router/host merge, the host
  result path (`n_dest = 0`) and the one-pattern-at-a-time rule are
  additions. The chip's I/O ring is replaced by plain ports.
* **LMP schedule.** The LMP uses a general step table. The published
  example schedule cannot be reconstructed exactly, and the schedule used
  here keeps *D* layers in flight, each on its own pattern. The input
  memory is not clocked faster than the neurons; it is read combinationally
  by all modules of a step.
* **Bias.** Neither design has a separate bias input. A bias can be given
  as an extra input fixed at 1.
* **Not built.** Off-chip training, the design-space tool that chooses a
  pipeline depth, the pads, and power and area figures are not part of this
  RTL.

---

## 7. Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` at the end. Each
also has a watchdog that fails the run if it hangs. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nocnn_pkg.sv tb/tb_nocnn_ref_pkg.sv tb/tb_lmp_ref_pkg.sv \
    tb/tb_ann_top.sv --top tb_ann_top -o sim
./obj_dir/sim
```

Replace `tb_ann_top` with any other testbench name.

| Testbench | Covers |
|---|---|
| `tb_ann_top` | both processors at default size: five networks on the NoC (outputs, result packets, inter-tile packet counts, torus wrap links, VC1 traffic, partly working and sleeping tiles, multi-destination PEs, output contention); two LMP networks (pipelined steps, multiplexed modules, disabled modules) |
| `tb_nocnn_tile` | PE packets leaving on the right links and VCs, inputs from host and neighbour in one pattern, transit traffic, credit count |
| `tb_nocnn_router` | random traffic with back-pressure on all ports and both VCs, ordering per VC, DA shift, 2-cycle hop, PE priority, X-Y mode |
| `tb_nocnn_input_port` | VC buffering, routing request, packet lock, credits |
| `tb_nocnn_switch_alloc` | priority, hold for payloads, credit gating |
| `tb_inoc_route_fn` | all five absolute-address rule sets: exactly one output, minimal and turn-model rules |
| `tb_nocnn_pe` | full PE cycle: weights, table, partial masks, several destinations, host results |
| `tb_nocnn_neuron`, `tb_nocnn_act_lut` | arithmetic, timing and table indexing |
| `tb_lmp_neuron` | sums of 1 to 8 inputs with gaps, disabled module, saturation, 4-cycle result timing |
| `tb_lmp_ann` | ten network/depth combinations against an exact model, loop lengths |

`tb_nocnn_ref_pkg` and `tb_lmp_ref_pkg` hold the reference arithmetic and
the table contents. The end-to-end test finishes in a few seconds of
simulation time after about a minute of compilation.

## 8. Files

| File | Contents |
|---|---|
| `rtl/nocnn_pkg.sv` | flit, link and field definitions, port codes, helper functions |
| `rtl/ann_top.sv` | top: both processors |
| `rtl/nocnn_top.sv` | NoC processor: 5 x 4 torus of tiles |
| `rtl/nocnn_tile.sv` | tile: router, PE, receive FIFO, merge, sender |
| `rtl/nocnn_router.sv` | 5-port, 2-VC wormhole router |
| `rtl/nocnn_input_port.sv` | VC buffers, RC, VA |
| `rtl/nocnn_switch_alloc.sv` | switch allocator of one output |
| `rtl/inoc_route_fn.sv` | absolute-address routing conditions |
| `rtl/nocnn_fifo.sv` | fall-through FIFO |
| `rtl/nocnn_pe.sv` | PE: decoder, controller, encoder |
| `rtl/nocnn_neuron.sv` | NoC neuron: weight RAM, MAC |
| `rtl/nocnn_act_lut.sv` | shared activation table |
| `rtl/lmp_ann.sv` | layer-multiplexed network and its control block |
| `rtl/lmp_neuron.sv` | LMP neuron module |
