# NASH: a fault-tolerant 3D network of spiking-neuron cores

NASH is a spiking neural network processor built as a three-dimensional mesh. Every
node of the mesh holds one *spiking neuron processing core* (SNPC): 256
leaky-integrate-and-fire neurons with a 256-input synapse memory and on-chip STDP
learning. The node also holds a network interface and a 7-port multicast router.
Spikes travel between cores as 81-bit flits. The network keeps delivering them
when links, crossbar paths or the vertical through-silicon-via (TSV) bundles
between layers fail.
A network is mapped layer by layer. The input layer sits in the bottom layer of
the mesh, the hidden layer in the next, the output layer above that. A neural time
step is a wave of flits moving up through the stack.

The RTL here is synthesizable SystemVerilog. The default size is 3 x 3 x 3 nodes,
each with 256 neurons and 256 inputs.

## The neuron core (SNPC)

A core time step is driven by a seven-state controller:
`IDLE → DWNLD → COMP → LEAK → FIRE → UPLD → LEARN → IDLE`.

* **DWNLD** latches the presynaptic spike vector (256 bits) into the crossbar unit
  (`pnu_xbar`).
* **COMP**: the OR of the vector tells whether any input spiked. A one-hot
  extractor then takes the lowest set bit each cycle. It turns that bit into a row
  address for the synapse memory and clears it.
  * The synapse memory (`synapse_mem`) is 256 banks, one per neuron, each holding
    256 signed 8-bit weights.
  * One row read gives every neuron its weight for that input in the same cycle.
  * All 256 neurons therefore integrate in parallel.
  * A step with E input spikes costs E+1 cycles here, not 256.
* **LEAK** subtracts the leak value from every membrane.
* **FIRE** compares each membrane with the threshold.
  * The membrane is 13 bits plus an overflow bit.
  * It clamps at zero, and overflow counts as firing.
  * A neuron that fires is reset to zero and enters a refractory period of a set
    number of steps. During that period it ignores input.
* **UPLD** presents the 256-bit output vector. In total, `o_spk_valid` follows the
  step start by E+4 cycles.
* **LEARN** (`stdp_learning`) runs trace-based STDP:
  * The unit keeps a 16-step circular history of input and output vectors.
  * The reference step is the one 8 steps back. For each neuron that fired then:
    * inputs that spiked in the 8 steps before it are strengthened by LTP;
    * inputs that spiked in the 8 steps after it are weakened by LTD;
    * both updates saturate at the 8-bit range.
  * Each affected row is read and written back in two cycles, shared with the
    crossbar's memory port. An update over E rows takes 2E+2 cycles.
  * The state is skipped when learning is off or there is nothing to update.

## Flits and the network interface

    [80:79] type   00 = configuration, 11 = spike
    [78:70] source x, y, z (3 bits each)
    [69:64] time   {segment[1:0], step[3:0]}
    [63:0]  spikes one 64-bit segment of the source's output vector

The encoder (`ni_encoder`) sends one flit per *non-empty* 64-bit segment of an
output vector, lowest segment first. It obeys the router's stall signal.

The time field carries the segment number beside a 4-bit step count, so the
receiver knows where the 64 bits belong. The original format has a 6-bit "firing
time" field; this split is this design's own.

The decoder (`ni_decoder`) keeps a map from {source node, segment} to one of the
K/64 input slots of the core. Its *spike arrival window* (SAW) works like this:
* The first spike flit of a step opens the window. The window lasts `saw_len`
  cycles, and every flit that arrives within it is ORed into the vector.
* When the window closes, the vector is handed to the core.
* A flit that arrives while that vector waits is dropped as *late*. It is counted
  on `late_o`.
* A short window gives fast steps but loses spikes under congestion.

Type-00 flits that reach the decoder write its map.

## The router (FTMC-3DR)

The router has seven ports: local, N, E, S, W, up and down. A flit crosses it in a
four-stage pipeline, so an uncontended hop takes four cycles:

1. **BW**: the flit is written into the input buffer of its port.
2. **RC**: the route is looked up. The table is indexed by the flit's *source*
   address, because routing is source-based multicast: each table entry is a 7-bit
   mask of output ports, and a flit may leave on several of them at once.
3. **SA**: the switch allocator gives each output to one input. It uses a
   least-recently-granted matrix arbiter per output. An output is granted only
   while the next router's buffer is not stalling it (stall/go).
4. **CT**: the flit crosses to the output register.

An input keeps its flit until every requested output has been granted. Buffers
raise stall when fewer than three slots are free.

### Fault tolerance

* **Faulty links: primary and backup routes.**
  * Each router has two tables, a primary and a backup.
  * A flit carries a `fault_flag` beside it on the link.
  * When the flag is clear, the flit takes its primary ports. If one of those is
    faulty, the flit takes the backup ports instead for that branch, and the copies
    sent there have the flag set.
  * A flagged flit follows backup entries only.
  * The trees themselves are computed offline. The host loads them through the
    configuration bus; `tb_nash_top` shows how.
* **Deadlock in the input buffer (random access buffer).**
  * Each input buffer is randomly addressable. A timer watches the request at its
    head.
  * If that request has not been served after `TIMEOUT` cycles, the buffer pulses a
    deadlock notice. It then offers the oldest packet that asks for a different
    output.
  * A flit whose route mask is empty is dropped.
* **Faulty crossbar paths (bypass link on demand).** An output whose crossbar path
  is marked faulty can still be reached through a single bypass link. At most one
  such output per router is served each cycle.
* **Faulty TSV clusters (`tsv_share`).** Each layer has one sharing arbiter for its
  up links and one for its down links. Each router's vertical link has a weight.
  * A router whose cluster is faulty borrows a healthy cluster from a neighbour in
    the same layer.
  * The lender must have a lower weight than the borrower, and the lowest weight
    wins. A cluster is lent to one router at most.
  * Faulty routers are resolved in index order.
  * The lender sends in even cycles and the borrower in odd cycles.
  * A router with no possible lender sees its vertical port as faulty, so routing
    falls back on the backup tables.

## Node and system

`nash_node` joins the core, the interface and the router.
* A decoded vector starts a core step.
* The core's output goes to the encoder.
* `inj_valid`/`inj_spk` sends a vector into the network as the node's own spikes
  without computing, which is how the input layer is fed.
* `ext_valid`/`ext_spk` hands a vector straight to the core.

`nash_top` builds the NX x NY x NZ mesh. The node index is
`n = z*NX*NY + y*NX + x`. Mesh edges are tied off as faulty ports.

Configuration (`cfg_we`, `cfg_node`, `cfg_target`, `cfg_addr`, `cfg_data`,
`cfg_row`) writes one item per cycle:

| target | address | data |
|---|---|---|
| ROUTE_PRI / ROUTE_BAK | source address {x,y,z} | 7-bit port mask |
| DEC_MAP | {source, segment} | {enable, slot} |
| SYN_ROW | input index | a row of N weights on `cfg_row` |
| PARAM | THRESHOLD, LEAK, REFRACT, LEARN_EN, LTP, LTD, SAW | value |

Fault inputs are `link_fault`, `xbar_fault` (per node and port), `tsv_fault_up` and
`tsv_fault_dn` (per layer and router), and `tsv_weight`. The event outputs
(`ev_*`) pulse once per occurrence of each mechanism.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. For example:

    verilator --binary --timing -Wno-fatal -Irtl rtl/nash_pkg.sv rtl/*.sv \
        tb/tb_nash_top.sv --top-module tb_nash_top -o sim && ./obj_dir/sim

(`nash_pkg.sv` must come first.)

* `tb_nash_top` runs a 2 x 2 x 3 mesh with 64-neuron cores through a three-layer
  network.
  * Phases: fault-free, then faulty links, TSV cluster and crossbar paths, then
    learning, then a too-short SAW.
  * Every hidden and output vector is checked against a LIF model in the
    testbench.
  * Every mechanism is counted: reroute, bypass, deadlock, late flit, learning,
    refractory, TSV borrow, stall and window.
* `tb_nash_full` runs the default 3 x 3 x 3, 256-neuron system through full
  configuration and three checked steps. It takes several minutes.

## Where this design departs from or adds to the original

* Default mesh 3 x 3 x 3, the size used for evaluation; a 4 x 4 x 4 system is
  `NX=NY=NZ=4`.
* Fan-in per core is 256. A hidden neuron with 784 inputs (the 784:225:10 MNIST
  network) needs its inputs split over several cores; one core cannot take them.
* The segment number in the time field, `fault_flag` as a link sideband, the
  decoder's slot map, and the host configuration bus are this design's choices.
* Buffer depth 8, deadlock timeout 16 cycles, 4-bit refractory count, 4-bit TSV
  weights and the phase-based TSV time sharing are chosen values.
* The input buffer's own fault detection is not built, only its deadlock
  handling.
* The offline multicast tree algorithms, the physical TSVs and the host-side spike
  encoding are outside the RTL.
