# Neural-network controlled 4-port packet switch

A switch has to decide, every time slot, which input is connected to which
output. Here that decision is made by a small feedforward neural network: the
packets waiting on the four input lanes are turned into a vector of numbers,
the network answers with the configuration matrix of a 4 x 4 crossbar, and the
crossbar switches all four packets at once. A collision detector and a set of
per-output, per-precedence queues in front of the fabric make sure the network
only ever sees packets with distinct destinations, and give the switch a
simple strict-priority QoS.

The RTL follows a published simulation model of such a switch (four packet
generators, an input-queue block, the network-controlled fabric and output
FIFOs of eight packets) and turns it into synchronous SystemVerilog. Where the
model leaves details open (widths, timing, handshakes, arithmetic of the
network, tie-breaking) this implementation makes its own choices; they are
listed in [Departures and own choices](#departures-and-own-choices).

## The packet

`sw_pkg::packet_t`, 26 bits:

| field  | bits | values | meaning |
|--------|------|--------|---------|
| `src`  | 3    | 1..4   | input port (generator) the packet came from |
| `dst`  | 3    | 1..4   | output port it must leave on |
| `prio` | 6    | P*10+d | P = precedence 1..4 (higher is more urgent), d = drop precedence 1..3 (higher is dropped first), as in DSCP assured forwarding |
| `data` | 14   | 1..10000 | payload stand-in; random, so it also identifies the packet |

`prec_of()` and `drop_of()` split the priority field.

## Data path

```
 pkt_gen x4 --> input_queue ------------------> switch_fabric -----------------> pkt_fifo x4 --> tx
 (user or      collision_detector               ffnn (100 hidden, 4 out)          (8 packets,
  random,      + qos_queue per output            -> configuration matrix c         valid/ready)
  jitter FIFO)   (4 precedences x 8)             crossbar 4x4
```

`nn_switch_top` wires these together. One packet per port moves per clock
cycle.

* **Generators** (`pkt_gen`) make packets, either from a user port or at
  random. In random mode each field has its own mode: fixed, uniform over a
  range, or bell-shaped over a range (the mean of four uniform numbers). The
  packets pass through a FIFO that is read at random times to imitate network
  jitter.
* **Input-queue block** (`input_queue`) turns the arriving packets into four
  *lanes*. Lane *i* carries packets whose source is port *i+1*. In any one
  cycle no two lanes hold packets for the same output.
* **Fabric** (`switch_fabric`) has the network compute the configuration
  matrix from the lanes, then switches them through the crossbar.
* **Output FIFOs** (`pkt_fifo`, eight packets) hold packets until the device
  on the far side is ready. `tx_valid`/`tx_ready` is a plain valid/ready
  handshake.

### Timing

A packet that meets no collision and no queue takes 7 cycles. It is pushed
into its generator in cycle t. The generator FIFO is read in t+1 and the packet
is on the generator output in t+2. It is on its lane in t+3. The two network
stages and the fabric output register bring it to the output FIFO input in
t+6, and it is at the FIFO head (`tx_valid`) in t+7. Every stage takes a new
set of packets every cycle, so the switch moves up to four packets per cycle.

## Collisions and the two queueing modes

This is the part of the design with the most behaviour. The collision
detector (`collision_detector`) compares the packets arriving in a cycle. Two
packets collide when both are valid and have the same destination. In each
group of colliding packets the one with the highest precedence P wins. Among
equal P the lower drop precedence d wins, then the lower port number.

`iq_mode` selects what happens to colliding packets:

* `IQ_DROP`: the winner goes on and the others are dropped (`coll_drop_n`).
  Nothing is buffered.
* `IQ_QOS`: all colliding packets go into the QoS queue of their output
  (`qos_queue`). Each output has one sub-queue per precedence, eight packets
  each. Several packets can enter the same sub-queue in one cycle. A packet that
  finds its sub-queue full is dropped (tail drop, `tail_drop_n`). When the
  output can take a packet, the oldest packet of the highest non-empty
  precedence is read. This is strict priority: a busy high precedence can
  starve the lower ones. `qos_occupancy[k][p]` shows how many packets wait
  in each sub-queue.

In both modes, a packet that collides with nothing goes straight to its lane
if its output's queue is empty. If the queue is not empty, the packet is
queued behind it (`IQ_QOS`) or dropped as busy (`IQ_DROP`). Either way a flow
is never reordered. If the mode changes to `IQ_DROP` while queues still hold
packets, those queues keep draining.

A queued packet has to leave on the lane of its source port. Two queue heads
may need the same lane in one cycle, for example when input 1 has packets
waiting for outputs 2 and 3. Packets going straight through take their lanes
first. The queue heads then get lanes in output order, starting from a
pointer that rotates every cycle, so no output is permanently shut out.

**Flow control to the output FIFOs.** Output *k* is offered a packet only
while `out_ready[k]` is high. The top computes it as: FIFO count + packets in
flight to *k* < `OUT_DEPTH`. In flight means the lane register, two network
stages and the fabric output register. The in-flight count goes up when a lane
carries a packet for *k* and down when such a packet leaves the fabric. So the
output FIFOs never overflow: a slow far side fills the QoS queues instead (QoS
mode), or makes the input-queue block drop (drop mode, `busy_drop_n`).

## The control network

`ffnn` is a two-layer feedforward network evaluated fully in parallel. Each
layer is one pipeline stage, so it takes a new vector every cycle and answers
two cycles later.

* Input: 12 unsigned 8-bit integers, the `src`, `dst` and `prio` of each of the
  four lanes (all zero for an empty lane).
* Hidden layer: 100 neurons, `h = clamp(W1*x + b1, -1, +1)`. This saturating
  linear function stands in for the tan-sigmoid that toolbox networks use.
* Output layer: 4 linear neurons, `y = W2*h + b2`.
* Arithmetic: weights and biases are signed 16-bit with 8 fraction bits.
  Hidden values keep 8 fraction bits; outputs are rounded to 8 fraction bits
  and saturated.

**Output encoding.** With four output neurons and a 4 x 4 matrix, output
neuron *k*, rounded to an integer, is the number (1..4) of the lane connected
to output port *k*. 0 or any other value leaves the port unconnected. This
gives `c[i][k] = 1` when lane *i* drives port *k*, and each column of `c` has
at most one closed switch by construction. The crossbar (`crossbar`) is an
AND-OR array of controlled switches. It still flags a column with two packets
(`nn_conflict`). `nn_lost_n` counts lane packets the matrix connected nowhere.
`misroute` flags a packet that arrives at a port other than its destination.
The fabric trusts the network and does not correct it from the `dst` field.

**Weights.** The network is trained offline, so the hardware has no fixed
weights. They are written one word per cycle through `nn_wr_en`, `nn_wr_addr`
and `nn_wr_data`, in this order:

| addresses | content |
|-----------|---------|
| `h*12 + j`, 0..1199 | hidden weight, neuron h, input j |
| 1200..1299 | hidden biases |
| `1300 + o*100 + h` | output weight, neuron o, hidden h |
| 1700..1703 | output biases |

After reset all weights are zero and nothing is routed.

The testbenches use a weight set that solves the routing task exactly
(`tb/tb_nn_weights.sv`). It uses 20 of the 100 hidden neurons. Neuron `5*i+t`
looks only at lane *i*'s destination *d*. It computes
`s = clamp(2d - 2t - 1, -1, 1)`, which is +1 for d > t and -1 otherwise.
For an integer *d*, `(s(i,j-1) - s(i,j)) / 2` is 1 exactly when d = j. So output
neuron *k* gets weight `+(i+1)/2` from neuron `5i+k` and `-(i+1)/2` from neuron
`5i+k+1`, and its value is the lane number *i+1*. All these values are exact in
the 8-fraction-bit format. A trained network can be loaded through the same
port instead. It must use the same output encoding, and its rounded outputs
must be exact integers.

## Generators

`gen_cfg_t` configures each generator:

| field | meaning |
|-------|---------|
| `en` | run the generator |
| `mode` | `GEN_USER`: take packets from `user_pkt` while `user_valid` is high. `GEN_RANDOM`: make them |
| `rate` | random mode: a packet is made with probability rate/256 per cycle |
| `jitter` | the generator FIFO is read with probability (jitter+1)/256 per cycle |
| `dst`, `prec`, `dropp`, `data` | for each field, `FIELD_FIXED` (value `lo`), `FIELD_UNIFORM` or `FIELD_GAUSS` over `lo..hi` |

The source field is always the generator's own port. Random numbers come from
xorshift64 generators, one per field, seeded from `SEED` and the port number.
A packet that finds the generator FIFO full is lost (`gen_overflow`). The
generator has no back-pressure input because the input-queue block takes every
packet.

## Departures and own choices

Taken from the original model:

* four ports
* the packet fields and the P*10+d priority code
* four generators with user or random (uniform or Gaussian) sequences and
  randomly timed FIFO reads
* the collision detector
* the two collision behaviours: drop lower priority, or per-output queues with
  one independent queue per precedence, tail drop and highest precedence first
* queues of 8 packets
* a 4 x 4 crossbar controlled by a configuration matrix
* a feedforward network with 100 hidden and 4 output neurons that produces it
* output FIFOs of 8 packets that send when the far side is ready

Own choices:

* The whole design is synchronous: one clock, one active-low synchronous
  reset, one packet per port per cycle. The original is a continuous-time
  model.
* The network's input vector is src, dst and prio of each lane. The data field
  is left out.
* The network uses fixed-point arithmetic and a saturating-linear hidden
  activation instead of tan-sigmoid.
* Each output neuron encodes the lane number of one output.
* No trained weights exist, so weights are loaded at run time.
* Each precedence sub-queue holds 8 packets. The total per output is not
  limited to 8.
* Colliding packets are tie-broken by drop precedence, then port number. The
  drop precedence d plays no other part.
* Packets that do not collide go straight through. Queued packets use their
  source lane, with rotating arbitration between queue heads.
* The input-queue block holds back packets when an output FIFO is full, so
  output FIFOs do not overflow.
* The generator FIFO is 8 deep.
* The Gaussian is approximated by the mean of four uniform numbers.
* Packets whose destination is not 1..4 are dropped.
* The switch does not implement network training, packet lengths or the
  measured traffic mixes of the original study.

## Files

| file | content |
|------|---------|
| `rtl/sw_pkg.sv` | packet type, priority helpers, configuration types, network fixed-point constants |
| `rtl/nn_switch_top.sv` | the switch: generators, input-queue block, fabric, output FIFOs, flow control |
| `rtl/pkt_gen.sv` | packet generator |
| `rtl/input_queue.sv` | input-queue block |
| `rtl/collision_detector.sv` | collision detector |
| `rtl/qos_queue.sv` | per-output queue with one sub-queue per precedence |
| `rtl/switch_fabric.sv` | network plus crossbar, with the delay line that keeps packets in step |
| `rtl/ffnn.sv` | the neural network with its weight memory |
| `rtl/crossbar.sv` | 4 x 4 switch array |
| `rtl/pkt_fifo.sv` | packet FIFO with tail drop (output FIFO and generator FIFO) |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_nn_weights.sv` holds the routing weight set |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. Each has a
cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_nn_switch_top \
    -y rtl -y tb +libext+.sv rtl/sw_pkg.sv tb/tb_nn_weights.sv tb/tb_nn_switch_top.sv
./obj_dir/Vtb_nn_switch_top
```

Replace the top module and the last file to run another testbench. The
package files must come first.

What the testbenches check:

* `tb_nn_switch_top` runs the switch at its default sizes for about 10,000
  cycles.
  * It loads the routing weights, measures the 7-cycle latency of a lone
    packet, then runs heavy traffic in drop mode, then in QoS mode with a slow
    far side.
  * It switches back to drop mode with full queues, then runs random traffic
    with jitter and generator overflow.
  * Every user packet must arrive unchanged, once, at its destination, and in
    order within its (source, destination, precedence) flow.
  * After draining, packets made must equal packets delivered plus all drop
    counters.
  * Each mechanism must occur at least once: collisions, both kinds of drop,
    queueing, tail drop, priority reordering, draining after a mode switch,
    generator overflow, far-side stalls, and crossing matrices.
* `tb_input_queue` compares the input-queue block against a cycle model in both
  modes.
* `tb_qos_queue` and `tb_pkt_fifo` compare against queue models.
* `tb_ffnn` checks random weights against a fixed-point model, and the
  routing weights for exact lane numbers.
* `tb_switch_fabric` checks routing, latency and the matrix, and that nothing
  is routed with zero weights.
* `tb_crossbar`, `tb_collision_detector` and `tb_pkt_gen` check their blocks'
  rules and the generator's statistics.

## Limits

* The network is only as good as its weights. The testbenches prove the
  datapath with an exact hand-made solution, not with a trained network.
* The in-flight count goes by the destination field. A packet the network
  connects nowhere (`nn_lost_n`) leaves its destination's count one too high
  until reset. A misrouted packet is flagged by `misroute`.
* Strict priority can starve low precedences under sustained high-precedence
  load. That is intended.
* The fully parallel network uses 1,600 multipliers (1,200 in the hidden layer,
  400 in the output layer) and 1,704 weight registers. It is built for
  single-cycle layers, not for area.
