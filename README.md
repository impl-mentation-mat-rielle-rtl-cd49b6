# Spiking oscillator networks for image segmentation: two hardware engines

A simplified Oscillatory Dynamic Link Matcher (ODLM) is a network of leaky
integrate-and-fire neurons. Each neuron is an oscillator. Its potential climbs
a concave charging curve towards a threshold. On reaching it, the neuron
fires, loses one threshold's worth of potential, and sends a spike to its
neighbours. A spike raises each neighbour's potential by a synaptic weight.
Because the curve is concave, neurons joined by strong weights pull each
other's phases together until they fire at the same instant.

For image segmentation there is one neuron per pixel. The weight between
neighbouring pixels is large when their grey levels are similar and small
otherwise. After some time, each region of similar pixels has become a group
of neurons that fire in step. Reading the neurons' phases then gives the
segments. Image matching works the same way on a fully connected network.

This repository holds synthesizable SystemVerilog for two independent engines
that run such networks:

* **`ed_hsnn`, the event-driven engine.** One pipelined processing element
  jumps from one spike to the next, in firing-time order. A sorted event queue
  (a *structured heap*) supplies the next neuron to fire. Topology and weights
  are computed when needed, so a 65 536-neuron image network stores no weight
  matrix.
* **`bs_hsnn`, the bit-slice engine.** This is a time-driven array of 648
  one-bit-wide columns, one per neuron. All potentials advance one time step
  per clock. When neurons fire, their spikes travel once around a ring of
  columns. The weights are added bit-serially as they pass, from a full
  N x N weight matrix in block RAM.

`odlm_top` puts both engines side by side. They share only the clock and the
reset, and each keeps its own host port.

---

## 1. The event-driven engine

### 1.1 Representing a neuron by its firing time

Between spikes, a neuron's potential follows a known curve:

    p(t) = I0/tau * (1 - exp(-t/tau))

So the neuron can be stored as the time at which it will next reach the
threshold, without its potential. Nothing is computed for a neuron until a
spike reaches it. A spike is then handled in four steps:

1. Turn the stored firing time into the present potential. The input is the
   time left, `firing_time - sim_time`, which goes through a ROM (the
   *membrane model*).
2. Add the weight, or subtract the threshold if this is the neuron that fired
   (the *synapse model*).
3. Turn the new potential back into time left, through the inverse ROM, and
   add `sim_time` (the *inverse membrane model*).
4. Give the neuron its new place in the event queue.

Encoding used here (13-bit times and potentials):

* **Potential code.** 8191 is the threshold and 0 is the reset level.
* **Time.** One full charge from 0 to the threshold takes 8191 ticks.
* **Curve.** The shape depends only on `K = -ln(1 - VTH*tau/I0)`. With the
  default `I0 = 6.918`, `tau = 0.1447` and `VTH = 1`, the curve is clearly
  concave.
* **ROM contents.** Both ROMs are computed at elaboration from real-valued
  functions in `ed_pkg`: `pot_of_left` and `left_of_pot`. No data files are
  needed.
* **Time arithmetic.** It is modulo 2^13. Every comparison uses
  `(t - sim_time) mod 2^13`, which stays correct as long as every stored
  firing time lies within one period after `sim_time`. The charging curve
  guarantees this.
* **Saturation.** A weight that lifts a potential to or past the threshold
  saturates it at 8191. That neuron's firing time becomes `sim_time`: it fires
  next, at the same instant.

### 1.2 Weights from pixel differences

The weight depends only on `d = |pixel_pre - pixel_post|`:

    w = WMAX * (1 - 1/(1 + exp(-(ALPHA*d/255 - DELTA))))     (scaled by 8191)

With `WMAX = 0.0325`, `ALPHA = 100` and `DELTA = 6`, this gives:

* equal pixels: about 3 % of the threshold (266 codes);
* a difference of about 15 grey levels: half of that;
* pixels more than about 30 grey levels apart: 0 or 1 code.

The 256 values sit in a ROM addressed by `d` (`ed_weight_calc`). The weight
is 9 bits wide.

The sign of `DELTA` inside the exponent is this design's reading of the rule.
With `+DELTA`, every weight would round to zero at 9 bits.

### 1.3 Topology on the fly

`ed_topology_solver` turns a pair (pre-synaptic ID, synapse number) into a
post-synaptic ID.

**Grid mode.** The synapse number indexes a 16-entry table of signed ID
offsets, and the offset is added to the pre-synaptic ID.

* The table resets to the 8-neighbour pattern of a grid `ROW_PITCH` wide:
  `0, -R-1, -R, -R+1, -1, +1, R-1, R, R+1`.
* Offset 0 stands for the firing neuron itself. It raises the
  `SamePreAndPost` flag, and the later stages then reset that neuron instead
  of exciting it.
* The host can rewrite the table, for example for a 4-neighbour grid. It can
  also set the number of synapses per neuron (default 9).

**Fully connected mode** (`full_conn = 1`). The synapse number is the
post-synaptic ID: a counter that visits every neuron.

Edge pixels would get illegal neighbours, so the image sits inside a border
of inactive neurons. Inactive neurons never enter the queue, and updates sent
to them are dropped. A 406 x 158 image with a one-pixel border uses a
408 x 160 grid, which is 65 280 of the 65 536 IDs.

### 1.4 The processing element (`ed_pe`)

The processing element is a five-stage pipeline. One synapse can enter per
clock.

| stage | work |
|---|---|
| 1 | Topology solver: post ID and `same` flag. |
| 2 | Read the post-synaptic neuron's state: active bit, firing time, pixel. |
| 3 | Weight ROM (pixel difference) and membrane ROM (time left to potential). |
| 4 | Synapse model (add weight or reset); inverse ROM plus `sim_time` gives the new firing time. |
| 5 | Write the new state back; the result also goes to the controller for the queue. |

* **Latency.** A synapse entering at clock 0 leaves at clock 4.
* **Host access.** While the network is idle, the host reaches the state
  memory through the same read and write ports.

### 1.5 The structured heap event queue (`ed_event_queue`)

This is the core of the engine. Every active neuron is in a binary tree of
nodes ordered by firing time, with the earliest at the root. Each node stores
{valid, ID, firing time, pixel}.

**Difference from an ordinary heap.** An element may only sit on one path
from the root. At level `l` (root = 1) of an `L`-level tree, element `id` can
only occupy node `id >> (L - l)`, so the ID's bits, MSB first, spell out its
path. This is what makes an arbitrary neuron findable, which an ordinary heap
cannot do. The queue therefore supports:

* **insert**: walk down the path. At each occupied node, the earlier of (node,
  carried element) stays and the later one is carried further down.
* **delete any element**: walk down the path until the ID is found
  (*locate*). Then, while the hole has children, pull the earlier child up
  into it (*promote*).
* **update**: delete, then insert with the new time. This is what every
  processed synapse does.
* **read**: locate only.

**Heap property.** A node fires no later than its children, and an empty node
has only empty children. The next neuron to fire is always at the root, and
the root is always visible on `top_*`.

**Memory optimisation.** In any three-level sub-tree, at most one of the four
bottom nodes can be occupied at a time. The last level therefore has one node
per four IDs (`id >> 2`), shared by two parent nodes. For 2^16 neurons,
L = 17 and the tree has 2^16 - 1 + 2^14 = 81 919 nodes, instead of the
2^17 - 1 a plain structured heap needs.

**Pipelining.** Every tree level has its own memory and its own operation
context. Each memory is split into even and odd nodes, so one access returns a
pair of siblings. All contexts move down one level per stage of three clocks:

1. read: each level memory reads one word;
2. compute: each context decides from what was read;
3. write: each level memory takes at most one write, and every context moves
   down one level.

Different operations therefore work on different levels at the same time.
Two distance rules keep the result equal to running them one after another:

* A delete at level `l` reads its own node and, in the same read phase, the
  children at level `l + 1`. It must therefore run at least two levels behind
  the operation ahead of it.
* An insert or a read only touches its own level, so it may follow one level
  behind.

An update enters as a delete, and its insert follows one stage later. Updates
are accepted every three stages (9 clocks). Reads are not overlapped with each
other, so their results come back in order. A request is held in a one-entry
input register (`req_ready` = register free). `top_stable` says the root is
final for every accepted request, and `idle` says nothing is waiting or in
flight.

**Reset and overflow.**

* After reset, all level memories are cleared in parallel, one word per
  clock, before `req_ready` rises. That takes 2^14 = 16 384 clocks at full
  size.
* An insert that finds no free node sets the sticky `overflow` flag. This
  cannot happen while each ID is inserted at most once.

### 1.6 Controller, merger and host port

**Controller (`ed_controller`).** It runs the event loop:

1. Take the root from the merger.
2. Set `sim_time` to its firing time.
3. Issue synapse numbers `0 .. n_syn-1` for it to the processing element.
4. Turn each result into a queue update.

The next synapse is issued once the queue has accepted the previous update,
so the processing element's latency is hidden behind the queue's 9-clock
update rate. The next event is taken once the queue reports its root final
(`top_stable`). A run ends after the requested number of events, or when the queue is empty.

**Merger (`ed_merger`).** It picks the earliest root among `NQ` queues, with
ties going to the lowest index. With the single queue built here (`NQ = 1`)
it passes the root through. It exists so that more processing elements and
queues can be added.

**Host port** (parallel, on `ed_hsnn`). The handshake is `host_valid` and
`host_ready`. The commands are:

| `host_cmd` | action |
|---|---|
| 0 LOAD | Write the neuron state for `host_id` {active, firing time, pixel}. Active neurons are also inserted in the queue. |
| 1 READ | `host_rd_valid` pulses with the state of `host_id` on `host_rd_data`. |
| 2 RUN | Process `host_arg` events. `run_done` pulses at the end. |
| 3 NSYN | Set the number of synapses per neuron to `host_arg`. |

* The topology table has its own write port (`lut_we/lut_addr/lut_data`),
  and `full_conn` selects the mode.
* The host loads firing times, not potentials. To start from a potential
  `p`, load `left_of_pot(p)`.
* `sim_time` starts at 0.

## 2. The bit-slice engine

### 2.1 Two phases

The network alternates between two phases (`bs_controller`).

**Time evolution.** Each clock is one time step for every neuron at once. The
two MSBs of each P-bit potential pick one of four equal segments. A decoder
turns them into a one-hot word: `1000`, `0100`, `0010`, `0001` for segments 0
to 3. The word is shifted left by `pwl_shift` and added to the potential.

* Each segment rises at half the slope of the one before. This is a concave
  four-segment stand-in for the exponential curve.
* At P = 16 and shift 6, one period is 32 + 64 + 128 + 256 = **480** steps.
* The threshold is 2^P. The carry out of the potential sets the neuron's
  *Spike* flag. Dropping the carry is the reset, because it subtracts the
  threshold and keeps the excess.

**Spike propagation.** It starts as soon as any Spike flag is set, which is
detected by a global OR.

* **Start (1 clock).** Each column copies its Spike into its *spiking bit*
  (SB), and the flags are cleared.
* **Ring positions (N positions).** The SBs form a ring. At ring position
  `k`, column `i` holds the bit of column `(i - k) mod N`. Column `i` reads
  the weight of the synapse from that neuron and, if the bit is set, adds it
  to its potential. The SBs then move one column to the right. After N
  positions every column has seen every spike, and the bits are home again.
* **Check (1 clock).** If the additions made new neurons fire, another
  propagation follows at once. Otherwise evolution resumes.

A propagation always costs exactly **P x N + 2** clocks, whether it carries
one spike or all N. So a network that has synchronised into a few large
groups runs far faster than one that has not.

### 2.2 Bit-serial arithmetic

Each column has two units.

* **Membrane unit (`bs_mmu`).** It holds the P-bit potential.
* **Synapse unit (`bs_smu`).** It holds the SB and a one-bit full adder with a
  carry register.

During one ring position (P clocks):

* The potential rotates right through the adder, LSB first. The sum bit
  re-enters at the MSB.
* In the first W clocks the weight bits arrive, gated by the SB. In the
  remaining P - W clocks only the carry ripples into the upper bits.
* The carry out of the last bit is the threshold crossing, and it sets Spike.

Adders of two different widths are therefore one full adder per column.

### 2.3 Weight memory layout (`bs_weight_mem`)

Each column stores all N weights onto its neuron.

* One address selects the same bit of the same *slot* in every column, so a
  read returns an N-bit row.
* Address = `slot * W + bit`.
* Slot `k` of column `i` holds the weight from neuron `(i - k) mod N`, which
  is the neuron whose spiking bit column `i` holds at ring position `k`.
  Slot 0 is the neuron's own weight, normally 0. A missing synapse is weight 0.
* The controller's address counter runs one clock ahead, because the read is
  registered. It skips the carry-only clocks and wraps to 0 after the last
  bit of the last slot.
* The host writes and reads whole rows.

To load a weight matrix `w[post][pre]`, write to row `k*W + b` the N bits
`(w[i][(i-k) mod N] >> b) & 1`, for `i = 0..N-1`.

### 2.4 Host port (parallel, on `bs_hsnn`)

**Configuration registers (`cfg_*`).** Writes are accepted only while idle.

| addr | name | access |
|---|---|---|
| 0 | run_steps | Write: run this many time steps. This also starts the run. |
| 1 | pwl_shift | Write: curve speed, default 6. |
| 2 | status | Read: bit 0 is busy. |
| 3 | n_props | Read: propagations in the last run. |
| 4 | n_steps | Read: time steps in the last run. |

The other ports:

* `wld_*` writes a weight row, and `wrd_row` reads one back a clock after
  `wld_addr`.
* `pot_*` loads or reads the potential of one column.
* A run ends after `run_steps` steps, once no spike is pending.
* Busy clocks = steps + (P x N + 2) per propagation + 1 per chain of
  propagations entered from evolution + 1.

## 3. How far it matches the original design

| item | original | here |
|---|---|---|
| event-driven size | 65 536 neurons, 13/13/8/9-bit time/potential/pixel/weight | same |
| event-queue pipelining | successive operations overlap level by level; one synapse every 7 clocks | same structure, one memory and context per level, 3-clock stages; one update every 9 clocks, measured 87 clocks per 9-synapse event at 65 536 neurons (Eq. 5.1 gives 65) |
| queue distance rules | not given | delete 2 levels behind any operation, insert or read 1 level behind |
| bit-slice size | 648 neurons, 16-bit potential, 11-bit weights | same |
| bit-slice period | 448 steps | 480 steps at shift 6: four halving power-of-two slopes over equal quarters cannot give 448 |
| best / worst cycles per period | about 11 k / 6.7 M | 10 852 / 6.72 M (P x N + 2 per propagation, + 480) |
| host link | serial cable with a communications controller | plain parallel ports, one per engine |
| host-side work | weight computation, initial states, display on a PC | not part of the hardware |

Choices of this design that the original leaves open include:

* the host command sets and register maps;
* the time and potential scaling of the ROMs;
* saturation at the threshold;
* the order of the offset table;
* the one-hot decoder order;
* the weight-slot order in the bit-slice memory;
* ties in the merger, which go to the lowest index.

When neurons have equal firing times, the one the heap holds nearer the root
fires first.

## 4. Files

`rtl/`:

* Package: `ed_pkg`.
* Event-driven units: `ed_topology_solver`, `ed_state_mem`, `ed_weight_calc`,
  `ed_membrane_model`, `ed_synapse_model`, `ed_inv_membrane_model`, `ed_pe`,
  `ed_event_queue`, `ed_merger`, `ed_controller`, and the network
  `ed_hsnn`.
* Bit-slice units: `bs_mmu`, `bs_smu`, `bs_slice`, `bs_weight_mem`,
  `bs_controller`, `bs_config_regs`, and the network `bs_hsnn`.
* Top level: `odlm_top`.

Each file opens with a description of its interface and timing.

`tb/`:

* One self-checking testbench per module, `tb_<module>`.
* Two reference models: `tb_ed_ref_pkg` for the event-driven arithmetic and
  `tb_bs_ref_pkg` for the bit-slice network.
* `tb_odlm_top`, which runs both engines end to end at reduced size:
  * 256 event-driven neurons on a 16-wide grid, with the 8-neighbour table, a
    rewritten 4-neighbour table, and fully connected mode;
  * 8 bit-slice columns.
* `tb_odlm_full`, which runs `odlm_top` with every parameter at its default:
  * 65 280-neuron grid, 3000 checked events, all 65 536 neurons read back;
  * 648 bit-slice columns on a 24 x 27 grid, checked clock for clock.

  It takes about a minute and a half with Verilator.

The network testbenches replay every event or run in their reference model
and compare every neuron. They also count each mechanism and fail if one
never occurs:

* **Event-driven:** resets, neurons pushed to fire at once, time
  wrap-around, inactive neurons skipped, rewritten topology, fully connected
  mode.
* **Bit-slice:** time steps, propagations, cascades, simultaneous spikes,
  weight-caused threshold crossings.

`tb_bs_hsnn` also shows eight neurons with equal weights locking into a
single group that fires in one time step.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if it hangs.

## 5. Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/ed_pkg.sv tb/tb_odlm_top.sv --top-module tb_odlm_top
    ./obj_dir/Vtb_odlm_top

Replace `tb_odlm_top` with any other testbench name. Every file holds one
module or package of the same name, so `-y` finds the rest.

Sizes:

* Event-driven: `ed_hsnn` takes `N_NEURONS` and `ROW_PITCH`. The queue depth
  follows as `clog2(N_NEURONS) + 1` levels.
* Bit-slice: `bs_hsnn` takes `N`, `P` and `W`.
* `odlm_top` passes these through as `ED_NEURONS`, `ED_ROW_PITCH`, `BS_N`,
  `BS_P` and `BS_W`.

The curve and weight constants (`I0`, `TAU`, `VTH`, `WMAX`, `ALPHA`, `DELTA`)
are real parameters of `ed_hsnn`. The ROMs are recomputed from them at
elaboration.
