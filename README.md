# Three-stage ATM switch with cell-level path allocation

A large ATM switch built from three stages of smaller modules offers many
paths between an input and an output, so the fabric as a whole is no longer
self-routing. This design chooses, afresh in every cell time slot, an
intermediate-stage module for every arriving cell such that

* no input module sends more than S1 cells to any intermediate module, and
* no intermediate module sends more than S2 cells to any output module.

With that guarantee the input and intermediate stages never see contention:
they need no buffers, every path has the same delay, and cell order on a
connection is preserved. Only the output stage buffers. Cells that cannot be
given a path in their slot are discarded and counted.

The default configuration is a 3072 x 3072 fabric: L1 = 32 input modules of
N1 = 96 ports, M = 32 intermediate modules, L2 = 32 output modules of 96
ports, channel groups of S1 = 4 links (input to intermediate) and S2 = 8
links (intermediate to output). The stage modules are then 128 x 128,
128 x 256 and 256 x 96.

## The path-allocation algorithm

Three tables drive it: `K[i][j]`, cells in input module i wanting output
module j; `A[i][r]`, free links from input module i to intermediate module r
(starts at S1); `B[r][j]`, free links from r to output module j (starts at
S2). The basic step, `atomic(i, r, j)`, routes
`R = min(K[i][j], A[i][r], B[r][j])` cells from i to j through r and subtracts
R from all three.

To run many steps at once without two of them touching the same table
entry, an MP x MP torus of processors is used, MP = max(L1, L2, M). Processor
(i, j) keeps `K[i][j]` and starts with `A[i][r]` and `B[r][j]` for
r = (i + j) mod MP. In iteration k it executes `atomic(i, (i + j - k) mod MP, j)`;
then it hands its reduced A to processor (i, j + 1) and its reduced B to
processor (i + 1, j). After MP iterations every (input, intermediate, output)
triple has been tried once, and every input tries every intermediate module
in every iteration, which keeps the allocation fair. Entries belonging to
modules that do not exist start at zero, and positions with i >= L1 or
j >= L2 are mere delay registers. (`atomic_proc`, `path_alloc_array`.)

## Getting K in, and the result out

The array needs, per input module, the number of cells for each output
module, and each cell afterwards needs to learn the intermediate module it
was given. Both are done with self-routing networks, per input module:

**Request counting** (`batcher_sorter`, `request_counter`,
`rb_concentrator`). The N1 cells are sorted together with one control packet
per output module, using the key {idle, output module, is-control}. Control
packet j then sits at sorter output `D_j = K_0 + ... + K_j + j`, with the
K_j cells for j just below it. A count generator at each sorter output turns
a control packet into a packet {destination j, data D_j}; a reverse-banyan
concentrator (nonblocking for this pattern) delivers it to line j, and
`K_j = D_j - D_{j-1} - 1`, computed as `D_j + ~D_{j-1}` (K_0 = D_0). This
takes 2 clocks per concentrator stage plus one for the adders:
2*log2(128) + 1 = 15 clocks.

**Routing-tag assignment** (`tag_assigner`, `copy_network`). The cells for
j occupy sorter outputs `D_{j-1}+1 .. D_{j-1}+K0_j`. Before iteration 0 and
after every iteration, a routing-packet generator broadcasts a token to the
first K_j of them, where K_j is the count still outstanding. A cell keeps
only the last token it receives: cells routed in iteration k stop being
addressed after it and keep that iteration's token. The first broadcast
carries the intermediate-module number (i + j) mod MP; each address
generator then steps its copy down by one per later packet, because the
array moves to module (i + j - k) mod MP in iteration k. After the last
iteration a null token marks the cells still waiting: they are lost. The
broadcasts go through a broadcast-banyan copy network (omega wiring, Boolean
interval splitting, most significant bit first). Generator j sits on input
j and its interval starts at `D_{j-1}+1 >= j`, with intervals in increasing
order; such patterns never collide, which the testbenches confirm.

## Timing of a slot

| phase | clocks (defaults) |
|---|---|
| sort (sampled on `slot_start`) | 1 |
| request counting | 2*LG + 1 = 15 |
| MP iterations, MP + 1 broadcasts | MP + 1 = 33 |
| copy-network drain, address generators | 2*LG + 1 = 15 |
| input-stage and intermediate-stage modules | 2 |
| **slot_start to slot_done** | **4*LG + MP + 7 = 67** |

LG = log2 of the sorter size (N1 + L2 rounded up to a power of two). Every
network stage is pipelined, so one broadcast enters per clock.

## Top level: `atm3_switch`

Ports: `in_cell[L1][N1]` (cell = {valid, output module, output port,
payload}, 45 bits by default), `slot_start` / `ready`, then after
`slot_done`: `out_valid` / `out_cell[M][L2][S2]` (link n from intermediate
module r to output module j), `lost_cnt[L1]`, and `error` (a network
collision or link overflow; the algorithm rules both out, so it should
never rise). Outputs hold until the next `slot_start`. Slots do not
overlap.

The input and intermediate modules are `cf_switch_module`: the n-th valid
cell (in input order) bound for channel group g takes link n of g. No
arbitration is needed because path allocation never asks for more than the
group holds.

Not included: the 256 x 96 buffered output modules (their inputs are
`out_cell`), and the port controllers that adapt line rates.

## Where this RTL departs from the described hardware

* **Word-wide, not bit-serial.** The processors, adders and routing packets
  work on whole words. One iteration takes one clock instead of nine, and the
  routing-packet shortening needed for bit-serial packets is unnecessary. The
  two clocks per network stage, and so the 15-clock request count, are kept.
* **Square torus.** Positions outside L1 x L2 are delay registers; the leaner
  arrangement with extra A/B registers per row/column is not used.
* **Network wiring.** The sorter is a bitonic Batcher network; the
  concentrator routes least significant bit first through inverse shuffles;
  the copy network is an omega network. These are standard choices consistent
  with the description, verified nonblocking by simulation.
* **Single loss priority.** Running allocation twice for CLP = 0 / 1 cells is
  not built.
* **Cell format** and payload width (32 bits) are this design's own.

## Files

| file | contents |
|---|---|
| `rtl/atm_pkg.sv` | default sizes, helper functions |
| `rtl/atomic_proc.sv` | one array processor |
| `rtl/path_alloc_array.sv` | the MP x MP torus |
| `rtl/batcher_sorter.sv` | bitonic sorter with output register |
| `rtl/rb_concentrator.sv` | reverse-banyan concentrator |
| `rtl/request_counter.sv` | count generators, concentrator, adders |
| `rtl/copy_network.sv` | broadcast-banyan copy network |
| `rtl/tag_assigner.sv` | routing-packet generators, copy network, address generators |
| `rtl/cf_switch_module.sv` | contention-free input / intermediate module |
| `rtl/atm3_switch.sv` | top level and slot sequencer |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F`. For example:

    verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_atm3_switch \
        -y rtl -y tb +libext+.sv rtl/atm_pkg.sv tb/tb_atm3_switch.sv
    ./obj_dir/Vtb_atm3_switch

The module testbenches run at the default sizes (128-line networks, 32 x 32
array). `tb_atm3_switch` checks the whole fabric against a reference model of
the algorithm (routes per input/intermediate/output triple, loss counts,
cell integrity, slot length) with uniform full load, a hot spot that forces
losses, and light load. It runs the fabric at 8 x 8 x 8 modules with 24 ports
each (192 ports). That is the largest size simulated end to end: at the
default 3072 ports, building the simulator takes more than ten minutes. The
default top does pass lint and elaboration.

## How far to trust it

Every module's testbench compares against values computed independently
(sorting order, positions, min/subtract model, interval broadcasts,
reference allocation). Each was also shown to fail on a deliberately broken
copy of its module. Not verified: the full-size top in simulation, timing
closure, and cell-loss statistics of the size reported for the algorithm
(1e9-cell runs).
