# Dual-plane input/output buffered cell switch with single-pass SMA scheduling

An input-queued switch is cheap, because its fabric and memories run at the port rate. But one FIFO per input loses throughput to head-of-line blocking. An output-queued switch avoids that, but its fabric and memories must run N times faster. This design sits between the two:

- Every input keeps one **virtual output queue** (VOQ) per output, so no cell waits behind a cell for a different output.
- **Two N x N crossbar planes**, each at the port rate, give a speedup of two. Each input can send two cells per cell time and each output can take two.
- Short **output queues** absorb the second cell.
- The **simple matching algorithm (SMA)** decides which VOQs send. It does one request-grant-accept pass per plane per cell time, with no iteration, so it suits short cell times.

The SMA pointers do not react to the match. They rotate by one every cell time, from initial values chosen so that:

- every input/output pair is the mutual top priority of one of the two planes once every N/2 cell times;
- as a result, a non-empty VOQ is served at least once in every N/2 cell times.

With uniform Bernoulli traffic, the switch's mean delay is close to that of an ideal output-queued switch.

The default configuration is 64 x 64 with 64-bit cells, 8-cell VOQs and 256-cell output queues.

## How SMA matches, cell time by cell time

Each plane k (k = 1, 2) has one grant round-robin pointer G_jk per output j and one accept round-robin pointer A_ik per input i. All steps happen in the same cell time, on both planes independently:

1. **Request.** Every non-empty VOQ Q_ij requests output j, on both planes.
2. **Grant.** G_jk grants the requesting input nearest to its pointer g_jk. It scans g_jk, g_jk+1, ..., wrapping around.
3. **Accept.** A_ik accepts the granting output nearest to its pointer a_ik. If A_ik accepts G_jk, Q_ij sends its head cell through plane k.
4. **Update.** At the end of the cell time every pointer advances by one, modulo N, whatever was matched. This is simpler than iSLIP, whose pointers move only after an accepted grant.

Initial pointer values, in 1-based terms:

| pointer | plane 1 | plane 2 (mod N) |
|---|---|---|
| a_ik (input i) | N - (i-1) | N/2 - (i-1) |
| g_jk (output j) | N - (j-1) | N/2 - (j-1) |

With these values, a_ik = j holds exactly when g_jk = i. On plane 1 this happens when i + j - 1 equals the cell-time count (mod N). On plane 2 it happens N/2 cell times later.

When G_jk's pointer is at i and Q_ij requests, G_jk grants i. A_ik's pointer is at j, so it accepts. Every pair is therefore matched on one plane or the other once every N/2 cell times if its queue is not empty. Any other plane-2 offset still works, but gives a weaker guarantee: for example a base of 3N/4 instead of N/2 gives 3N/4 cell times. `PLANE2_BASE` sets this base.

The two planes do not coordinate, so one VOQ can be matched on both in the same cell time:

- If the VOQ holds two or more cells, it sends its first cell on plane 1 and its second on plane 2.
- If it holds only one cell, the cell goes on plane 1 and plane 2 carries nothing for that input. The plane-2 slot is wasted, as in the original scheme.

The output queue writes the plane-1 cell before the plane-2 cell. Together with the VOQ FIFOs, this keeps cells of one (input, output) flow in order.

### A 4 x 4 example

Take this head-of-line matrix (rows are inputs 1..4, columns are outputs 1..4):

```
0 1 0 0
0 0 1 1
1 1 0 1
1 0 0 1
```

Plane-1 pointers start at {4,3,2,1} and plane-2 pointers at {2,1,4,3}. The matches are:

- **Plane 1:** (2,3), (3,2) and (4,1).
- **Plane 2:** (1,2), (2,3) and (3,4).

Q_23 is matched on both planes. After the cell time, the pointers are {1,4,3,2} and {3,2,1,4}. `tb_sma_plane` checks this example cell by cell.

## Timing

One clock cycle is one cell time. A cell is carried as one W-bit word; there is no byte-serial datapath. In each cycle:

- Queue occupancies are registers. The head-of-line flags, both planes' grants and accepts, the VOQ read-out, both crossbars and the output-queue write enables form one combinational path, which settles within the cycle.
- On the rising edge: the matched cells are written into the output queues, arrivals enter the VOQs, one cell leaves every non-empty output queue, and all pointers advance.

Latency is two cell times at minimum:

- An arrival offered in cycle t is matched in cycle t+1 at the earliest.
- It then appears on `out_cell` in cycle t+2.

Reset is synchronous and active low. It empties every queue and loads the initial pointers.

## Blocks

| module | role |
|---|---|
| `sma_pkg` | `init_pointer()` (the initial-value rule in 0-based form, `(BASE-1-idx) mod N`) and `idx_width()` |
| `sma_rr_arbiter` | one GRP or ARP: pointer register plus a wrap-around first-one selector |
| `sma_plane` | N GRPs and N ARPs: one request-grant-accept pass for one plane |
| `sma_scheduler` | two `sma_plane`s: plane 1 with base N, plane 2 with base `PLANE2_BASE` = N/2 |
| `cell_fifo` | FIFO taking up to 2 cells and giving up to 2 per cycle; used as VOQ and as output queue |
| `input_buffer_module` | N VOQs, arrival routing by destination, the two-cell/one-cell departure rule |
| `switching_plane` | N x N AND-OR crossbar set by a plane's match matrix |
| `output_buffer_module` | takes up to 2 cells per cycle (plane 1 first), sends 1 |
| `atm_switch_top` | the whole switch |

Indices are 0-based throughout the RTL: port i of the description above is index i-1, and pointer value p is stored as p-1. Matrices are indexed `[input][output]`.

### Top-level ports (`atm_switch_top`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock (one cycle per cell time), synchronous active-low reset |
| `in_valid[N]` | 1 each | a cell arrives at input p |
| `in_dest[N]` | log2 N each | its output port |
| `in_cell[N]` | W each | the cell |
| `in_drop[N]` | 1 each | the arrival was discarded because its VOQ was full |
| `out_valid[N]`, `out_cell[N]` | 1, W each | one cell per cell time per output |
| `out_drop[N]` | 2 each | cells (0..2) discarded by a full output queue in this cell time |

### Parameters

| parameter | default | notes |
|---|---|---|
| `N` | 64 | ports; the switch size the algorithm was evaluated at. Must be even for the N/2 offset. |
| `W` | 64 | cell word width; a design choice. Set to 424 for a full 53-byte ATM cell. |
| `VOQ_DEPTH` | 8 | cells per VOQ; a design choice, power of two |
| `OBUF_DEPTH` | 256 | cells per output queue; a design choice, power of two |
| `PLANE2_BASE` | N/2 | plane-2 pointer base; N/2 gives the N/2 service guarantee |

## What is this design's own choice

The algorithm, the queue organisation, the two-plane structure, the pointer rule and the two-cell rule are as described above. The following are this design's own choices, not specified by the algorithm:

- One cell per clock cycle, carried as one word, with the match computed combinationally in the same cycle.
- **Queue depths.** The algorithm's evaluation treats buffers as unbounded.
- **Loss on overflow.** A full VOQ or output queue discards the excess cells and reports them (`in_drop`, `out_drop`). There is no back-pressure, neither to the line nor from the output queue to the scheduler.
- A lone cell matched on both planes uses plane 1.
- Reset behaviour and 0-based indices.
- The crossbar is a plain AND-OR multiplexer per output. Cells carry no routing tag through the fabric: the match matrix sets the crossbar directly.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=<n> failures=<n>`.

- `tb_sma_rr_arbiter`: grants and pointer rotation against a reference scan. It uses N = 5 (with wrap-around) and N = 64.
- `tb_sma_plane`: the 4 x 4 example above, and 300 random cell times at N = 7 against a reference request-grant-accept model.
- `tb_sma_scheduler`: N = 16 with a queue model. It checks:
  - matching legality;
  - the pointer pairing (a_ik = j implies g_jk = i);
  - the N/2 offset between planes;
  - that a mutually pointed pair is always matched;
  - the N/2 service guarantee.

  The longest observed unmatched run is N/2-1, so the bound is met exactly.
- `tb_input_buffer_module`, `tb_output_buffer_module`, `tb_switching_plane`: queue and crossbar behaviour against reference models, including overflow and the two-cell rule.
- `tb_atm_switch_top` (8 ports, small queues) and `tb_atm_switch_full` (all defaults, 64 ports) share the environment `atm_switch_env`. It runs Bernoulli traffic, then a hot spot on output 0, then a drain. It checks:
  - every cell arrives intact, at its own output and in flow order;
  - latency is at least two cell times;
  - every non-discarded cell is delivered;
  - both discard flags follow occupancy models;
  - the N/2 service guarantee holds.

  It also counts each mechanism and fails if any never occurs: VOQ overflow, output overflow, two-cell dual match, lone-cell dual match, two cells into one output, and traffic on each plane.

`tb_atm_switch_full` prints the mean and variance of the queueing delay at loads 0.6 to 0.99, with 2000 cell times per load. The delay excludes the fixed two-cycle pipeline. These short runs are a sanity check of the shape, not a statistically converged measurement. One run at the defaults gave:

| load | 0.6 | 0.7 | 0.8 | 0.85 | 0.9 | 0.95 | 0.99 |
|---|---|---|---|---|---|---|---|
| mean delay (cell times) | 0.80 | 1.22 | 2.04 | 2.86 | 4.34 | 9.12 | 22.7 |
| delay variance (cell times squared) | 1.6 | 3.0 | 6.3 | 10.7 | 22.3 | 102 | 394 |

No cell was lost in the Bernoulli phases. The delay stays low up to load 0.9 and rises steeply towards load 1, the behaviour of an output-queued switch. At load 0.99, 2000 cell times is too short for the queues to reach steady state, so that column underestimates. In the same run the longest stretch a non-empty VOQ went unmatched was 31 cell times, which is N/2 - 1 for N = 64.

### Simulating with Verilator

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/sma_pkg.sv tb/tb_atm_switch_top.sv --top-module tb_atm_switch_top
./obj_dir/Vtb_atm_switch_top
```

Replace the testbench name to run another test. For lint only: `verilator --lint-only -Wall -y rtl rtl/sma_pkg.sv rtl/atm_switch_top.sv`.

At N = 64 the model is large. Building `tb_atm_switch_full` takes several minutes of C++ compilation, mostly because of the 2 x 64 x 64 arbiter scans and crossbars, but it runs in seconds.

Lint leaves only unused-signal warnings:

- The pointer and grant outputs of the scheduler are not used inside the top. They are brought out for observation and test.
- The second head entry of the output queue's FIFO is never read, because only one cell leaves per cycle.

## Limits

- **No line interfaces.** The design has no ATM cell framing, no header translation and no line interface (UTOPIA or PHY). Cells arrive already tagged with their output port.
- **No delay statistics in hardware.** The delay and delay-variation figures come from the testbench.
- **Timing.** The combinational match path spans two arbiter scans of N inputs each plus the crossbar. At N = 64 a fast implementation would register the match or use a tree-structured priority encoder. That timing work has not been done.
