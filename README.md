# All-pairs shortest path on a ring of message-passing kernels

This is a hardware accelerator for all-pairs shortest path (APSP) on
unweighted, directed graphs. On such a graph the shortest path is the one
with the fewest edges, so APSP is the same as a breadth-first search (BFS)
from every node. The accelerator does not run n separate searches. It runs
all of them at once, in lock-step:

* A **task** `<u, start, count>` means: "for the search that started at node
  `u`, visit the `count` neighbours listed at `C[start ...]`".
* The design proceeds in **levels**, also called **supersteps**. Level L
  consumes every task in the current queue `Q_c`. It marks each node reached
  for the first time at distance L and puts the follow-up tasks into the next
  queue `Q_n`.
* The two queues then swap roles, and the next level begins. The run ends
  after the first level that produces no tasks.

Up to 64 identical **kernels** do the work: 4 FPGAs ("application engines")
with 16 kernels each. Each kernel has one memory controller port. All queues,
the graph and the n x n distance matrix live in shared memory. Kernels never
talk to each other except through one **token** that travels round a ring of
all kernels, one kernel per clock cycle. The token decides where in `Q_n`
each kernel may write. It also tells the kernels when a level has ended and
when the run has finished.

## Data in memory

All addresses are 64-bit-word addresses (48 bits). The host writes four
regions before a run. Their bases are run-time parameters.

| Region | Contents |
|---|---|
| `C` (`c_base`) | The CSR column-index vector: the adjacency lists of all nodes, one after another. One node id per word. |
| `d` (`d_base`) | The n x n distance matrix, stored row-major: `d(u,w)` is at `d_base + u*n + w`. |
| `q0` (`q0_base`) | The initial tasks, one per node: `<i, R[i], R[i+1]-R[i]>` for i = 0..n-1. |
| `q1` (`q1_base`) | Empty. At odd levels `Q_c = q0` and `Q_n = q1`; at even levels the roles swap. |

A **distance word** has two forms:

```
unvisited:  [63:32] start of w's list in C   [31:1] length of w's list   [0] = 0
visited:    [63:32] level (= hop distance)   [31:1] 0                    [0] = 1
```

The host initialises every `d(u,w)` to the unvisited form for node `w`. The
diagonal `d(u,u)` is set to visited with level 0.

Storing w's adjacency pointer inside `d(u,w)` saves one memory access. The
word read to test "has u reached w yet?" already holds the next task for `w`.
A reached node therefore costs one read of `d(u,w)` and two writes (the new
distance and the new task), and no read of the CSR row offsets.

A **task** is packed into one 64-bit word: `u[63:48]`, `start[47:24]`,
`count[23:0]` (`msg_t` in `apsp_pkg`). These widths allow graphs of up to
2^16 nodes and 2^24 edges.

## The kernel

```
             memory controller port (valid/ready requests, tagged responses)
                  ^ mc_req                                   | mc_rsp
        +---------+-----------+                   +----------v---------+
        |  requests_mux       |                   |  response_decoder  |
        |  round-robin, tags  |                   |  routes by tag     |
        +--^----^----^---^--^-+                   +---+------+------+--+
           |    |    |   |  |                         |      |      |
  Qc-read FIFO  |    |   |  qn_writer <-- token       |msg   |{u,w} |{u,w,d}
   ^   C-read FIFO   |   |   ^   (reserved slots)     v      v      v
   |     ^   d-read FIFO |   |                     process2 process3 process4
 process1|       ^  d-write FIFO                      |      |      |  |
         +-------|-------^---------------------------+      |      |  |
                 +-------|----------------------------------+      |  |
                         +-----------------------------------------+  |
                                         Q_n tasks -> qn_writer <-----+
```

* **process1** reads the kernel's share of `Q_c`. Kernel k of K reads entries
  k, k+K, k+2K, ... below the queue size.
* **process2** takes each task and reads `C[start .. start+count-1]`, one
  request per cycle.
* **process3** reads `d(u,w)` for each neighbour `w` that comes back.
* **process4** looks at the visit flag of `d(u,w)`:
  * If the flag is clear, it queues a write of `<level,1>` to `d(u,w)`. It
    also pushes the task `<u, start, count>`, taken from the old word, into
    the Q_n FIFO.
  * If the flag is set, the entry is dropped.
* **qn_writer** holds process 4's tasks until the token has reserved slots
  for them. It then writes them to `q_n_base + slot`.

### Tags and credits

The processes never wait on memory. Each process pushes requests into its own
FIFO. The multiplexer tags each request with `{source[2:0], u[15:0], w[15:0]}`.
The memory port may answer out of order, and the decoder uses the tag to put
each response into the right FIFO. The tag also brings back `u` and `w` with
the data, so processes 3 and 4 need no lookup table. Write acknowledgements
come back through the same path and are only counted.

The response channel cannot be stalled. Each reading process therefore holds
**credits** for the FIFO its responses will land in:

* A process starts with one credit per FIFO entry (`FIFO_DEPTH`).
* It spends one credit per request.
* It gets the credit back when the next process pops that FIFO.

A response therefore always finds room; assertions in `response_decoder`
check this. A full FIFO stalls only the process that feeds it.

A kernel is **idle** for the current level when all of the following hold:

* process 1 has requested its whole share of `Q_c`;
* every FIFO is empty;
* no memory request is outstanding, writes included.

This is what the token collects.

## The token ring (`k2k_interface`)

This is the part that needs the most care. Every kernel has one token
register. The register holds:

| Field | Meaning |
|---|---|
| `valid` | A token is present. |
| `level` | The current level. |
| `qc_size` | The number of tasks in `Q_c` for this level. |
| `count` | The number of `Q_n` slots reserved so far in this level. |
| `idle` | Every kernel passed so far in this round was idle. |
| `done` | The run is over. |

On each cycle, a kernel that holds the token does the following:

1. **New level.** If the token's level differs from the kernel's own level,
   the kernel adopts it: it latches the level and `qc_size`, and pulses
   `new_level`, which restarts process 1. The kernel clears the idle flag,
   because it has not started the level yet.
2. **Reservation.** Otherwise, if `n` tasks wait unreserved in its Q_n FIFO,
   the kernel takes slots `count .. count+n-1` and forwards `count + n`.
   Reservations happen in token order, so they never overlap. A kernel may
   reserve several times in one level (the `qn_writer` keeps up to `RANGES`
   pending ranges).
3. **Idle vote.** The kernel ANDs its idle state into `idle`.

The **first kernel** (the one that numbered itself 0) also runs the
supersteps:

* `start` creates the token for level 1, with `count = 0` and
  `qc_size = init_count`.
* Every time the token returns, a new round begins with `idle = 1`.
* If the round that just closed found every kernel idle, the level is over:
  * If `count` is 0, `Q_n` is empty. The first kernel sends a `done` token
    once round the ring, so that every kernel raises `done`. The top's
    `level` output is then the last level processed, which is the largest
    finite distance + 1.
  * Otherwise the token for `level+1` leaves with `qc_size = count` and
    `count = 0`. The queues swap, because each kernel derives the `Q_c` and
    `Q_n` bases from the parity of its level.

Why one all-idle round is enough: once a kernel is idle for a level it cannot
become busy again in that level, because its work comes only from the fixed
`Q_c`. Also, "idle" includes "all my writes were acknowledged". So when the
level ends, every `Q_n` entry and every distance write is in memory.

Timing: a round takes one cycle per kernel plus the latency of the links
between engines. A level therefore lasts at least two rounds: one in which
the kernels adopt it, and one in which they all vote idle.

**Duplicates.** Two reads of the same `d(u,w)` can both see the flag clear
before either write lands. This happens within a kernel or across kernels.
Both then write the same level and both push a task for `w`. The duplicate
re-walks `w`'s list at the next level and finds every neighbour either
already visited or about to receive the same level. The result is still
correct; only bandwidth is lost. Graphs with high out-degree make this more
likely.

## System, configuration and start

* `apsp_ae` chains `K` kernels (default 16). Its token and configuration enter
  kernel 0 and leave kernel K-1.
* `apsp_coprocessor` places `N_AE` engines (default 4) side by side. The links
  between engines are platform hardware and are not part of this RTL. Engine
  e drives `link_tok_out[e]` / `link_cfg_out[e]`. The platform must deliver
  them, with any latency, to `link_tok_in[(e+1) % N_AE]` /
  `link_cfg_in[(e+1) % N_AE]`. The memory controller ports (64 by default)
  are the arrays `mc_req`, `mc_ready` and `mc_rsp`, indexed
  `e*K_PER_AE + k`.

Configuration is a pipelined chain:

1. The host drives `host_cfg` (a `kcfg_t`) for one cycle with `valid = 1`,
   `kernel_id = 0`, `num_kernels = N_AE*K_PER_AE`, `num_nodes = n`, the four
   base addresses and `init_count = n`.
2. Each kernel latches the configuration and passes it on one cycle later,
   with `kernel_id + 1`. The kernels therefore number themselves, and the
   one that gets 0 becomes the first kernel.
3. After the configuration has reached the last kernel (64 cycles plus the
   link latencies), pulse `start` for one cycle, while no run is in
   progress.
4. Wait for `done`.

All state is reset by the synchronous active-low `rst_n`.

### Memory port protocol (`mc_req_t` / `mc_rsp_t`)

* **Request:** `valid`, `write`, `addr[47:0]`, `data[63:0]`, `tag[34:0]`. A
  request transfers when `valid && mc_ready`.
* **Response:** `valid`, `tag`, `data`, one per cycle at most. It cannot be
  refused.
* Every request gets exactly one response with the same tag: reads return
  data, writes return an acknowledgement. Order is free.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_AE` | 4 | top | Engines (FPGAs) in the ring |
| `K_PER_AE` / `K` | 16 | top / `apsp_ae` | Kernels per engine, one memory port each |
| `FIFO_DEPTH` | 512 | top, `apsp_ae`, `apsp_kernel` | Depth of every on-chip FIFO; also the credit count |
| `RANGES` | 4 | `qn_writer` | Pending `Q_n` reservations per kernel |
| `NODE_W`, `PTR_W`, `CNT_W` | 16, 24, 24 | `apsp_pkg` | Task fields |
| `ADDR_W`, `LEVEL_W`, `QIDX_W` | 48, 32, 32 | `apsp_pkg` | Address, level and queue-index widths |

The engine count, kernels per engine, one port per kernel and the 512-deep
FIFOs are the source architecture's configuration, built on a Convey HC-2
with four Virtex-5 LX330 FPGAs at 150 MHz.

### Choices made in this design

The following are choices of this design, not given by the source
architecture:

* the field widths and task packing;
* round-robin arbitration;
* the tag layout;
* credits;
* interleaved splitting of `Q_c`;
* the idle vote and the level/size fields in the token;
* the `q0`/`q1` parity scheme;
* write acknowledgements;
* the row-major layout of `d`;
* `level` stored in bits [63:32] of a visited word;
* the range FIFO in `qn_writer`;
* carrying the configuration over the engine links.

## Graph sizes

The architecture was evaluated on R-MAT graphs with 2^14, 2^15 and 2^16 nodes
and average out-degrees 8 to 64. At the default widths all of them fit:

* node ids need at most 16 bits;
* C pointers need at most 22 bits;
* the distance matrix at 2^16 nodes is 2^32 words (32 GiB).

Each queue region must be sized by the host. The worst case is n^2 tasks in
one level, and `QIDX_W = 32` just covers 2^16 nodes. For larger graphs,
widen `NODE_W`/`PTR_W`/`CNT_W`: the task word is then no longer 64 bits, and
the memory word width has to follow.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The system-level tests use two helpers:

* `tb/mc_model.sv`, a behavioural model of the memory ports. It stalls 20 %
  of cycles at random and returns responses after 2-12 cycles, out of order.
* `tb/apsp_tb_pkg.sv`, which generates random and R-MAT graphs in CSR form
  and computes reference distances with an ordinary BFS.

| Testbench | What it shows |
|---|---|
| `tb_sync_fifo`, `tb_requests_mux`, `tb_response_decoder` | Ordering, full/empty/count, round-robin, tag routing |
| `tb_process1` .. `tb_process4` | Address sequences, credit limits, stalls, visit-flag decision |
| `tb_qn_writer` | Writes land exactly in the reserved ranges, in push order |
| `tb_k2k_interface` | Three-stage ring: reservations tile `0..size-1` each level, level hand-over, termination, one stage per clock cycle |
| `tb_apsp_kernel` | A complete APSP run on one kernel (ring of one) with 4-deep FIFOs |
| `tb_apsp_ae` | A complete APSP run on four kernels |
| `tb_apsp_coprocessor` | The full default design (64 kernels, 512-deep FIFOs, 3-cycle links) on a 40-node graph. It also counts supersteps, link crossings, reservations, tasks waiting for the token, visited drops, duplicates, stalls, out-of-order responses and termination. |
| `tb_rmat_workload` | The full default design on R-MAT graphs with 2^7 nodes at degrees 8, 16, 32 and 64 |

The full-size tests compare the whole distance matrix with the reference
BFS, and the final level with the largest finite distance + 1.

Example `tb_rmat_workload` results (128 nodes, all 64 kernels, memory model
accepting 80 % of cycles):

| Degree | Levels | Cycles | Requests per port-cycle |
|---|---|---|---|
| 8 | 7 | 8 589 | 0.60 |
| 16 | 6 | 14 745 | 0.66 |
| 32 | 5 | 26 905 | 0.69 |
| 64 | 4 | 52 441 | 0.69 |

These numbers come from a memory model, not from DRAM, and say nothing about
the speed of a real system.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/apsp_pkg.sv tb/apsp_tb_pkg.sv tb/tb_apsp_coprocessor.sv \
    --top-module tb_apsp_coprocessor -Mdir obj
./obj/Vtb_apsp_coprocessor
```

Replace the testbench name to run another one. The full-size tests build in
under a minute and run in seconds.

## Limits

* The memory controllers, the links between engines, the host interface and
  the host's initialisation (building CSR, the distance words and the initial
  tasks) are outside the RTL. Only behavioural stand-ins exist, in the
  testbenches.
* The architecture allows several kernels to share one memory port for
  compute-bound algorithms. This design always uses one port per kernel.
* No timing closure or resource figures were produced for a real FPGA. The
  kernel's address path contains a full `u * n` multiplier in processes 3
  and 4, which a real implementation would probably pipeline.
* `start` must be pulsed once per run. A second pulse during a run would put
  a second token on the ring.
