# Boolean gene regulatory network attractor accelerator

A Boolean gene regulatory network (GRN) has *n* genes. Each gene is on or off,
and each has an update function of the genes. In synchronous mode every
gene is updated at once, so the network is a map `x(t+1) = F(x(t))` on the
2^n states. Any trajectory ends in an **attractor**: a fixed point or a cycle
of states. For each initial state, biologists want three things: the
attractor it ends in, how many steps it takes to get there (the **transient**,
T), and the attractor's **length** (L).

This accelerator turns `F` into a combinational circuit, so one network step
takes one clock cycle. It then places many copies of that circuit side by
side. Each copy sits in a processing element (PE). A PE takes a range of
initial states and, for each one, runs a slow/fast walker cycle detection
that returns the attractor, T and L. PEs are grouped into clusters. Each
cluster has one 512-bit input channel and one 512-bit output channel to the
host. The host spreads ranges of initial states over the PEs and collects
one result per initial state.

The default configuration has 128 PEs in 4 clusters of 32, one cluster per
host channel. It is built around the 3-gene example network
`v1 = v1 & v2, v2 = v1 | v3, v3 = v2 & ~v3`.

## Structure

```
                 grn_accel (NUM_CLUSTERS = 4)
  channel c  ┌──────────────── grn_cluster (N_PE = 32) ─────────────────┐
  s_* ──────►│ axi_reader ──broadcast {first,last,ID}──► grn_pe 0..N-1  │
             │                                               │ results │
  m_* ◄──────│ axi_writer ◄── mux ◄── rr_arbiter (requests) ◄┘         │
             └───────────────────────────────────────────────────────────┘

  grn_pe:  task ──► sync_fifo (input) ──► attractor_search_engine ──► sync_fifo (output) ──► result
                                               │  3 x grn_model
```

| module | role |
|---|---|
| `grn_pkg` | network enum, field widths, channel width |
| `grn_model` | the network's update functions, one step, combinational |
| `attractor_search_engine` | cycle detection over a range of initial states; T and L registers |
| `sync_fifo` | PE input and output control FIFOs |
| `grn_pe` | ID filter + input FIFO + engine + output FIFO |
| `rr_arbiter` | round-robin choice among PEs holding results |
| `axi_reader` | unpacks task packages from 512-bit beats, broadcasts them |
| `axi_writer` | packs results into 512-bit beats |
| `grn_cluster` | reader, PEs, arbiter, multiplexer, writer |
| `grn_accel` | top: independent clusters side by side |

## How the attractor search works

The engine holds two walkers, `slow` and `fast`. It also holds three copies
of the model circuit, computing `f(slow)`, `f(fast)` and `f(f(fast))`, so
every iteration below takes one clock cycle:

1. **START** (1 cycle): both walkers are loaded with the initial state `x0`.
2. **RUN1** (k cycles): `slow ← f(slow)`, `fast ← f(f(fast))` until the two
   are equal. They always meet inside the attractor. k is the smallest
   k ≥ 1 with `x_k = x_2k`.
3. **RUN2** (T + 1 cycles): `slow` restarts at `x0`. Both walkers now take
   single steps and T is counted. Because they start k steps apart and k is
   a multiple of L, they meet exactly at the first attractor state `x_T`.
4. **RUN3** (L cycles): `fast` goes once around the attractor from `x_T`,
   counting L.
5. **EMIT**: the result is held until the output FIFO takes it. Then the
   engine either moves to the next state of the range (back to START) or
   returns to idle.

With the result accepted at once, the result appears `2 + k + T + L` cycles
after the range was taken. Within a range, one initial state occupies the
engine for `3 + k + T + L` cycles, or 5 to 8 cycles for the 3-gene network.
Starting a new range costs one more cycle.
T and L are 32-bit counters with no overflow guard.

Only the three model-circuit copies depend on the network's equations. The
rest of the engine is two n-bit walker registers, the range registers, two
n-bit comparators and the T and L counters.

## Packages on the channels

All state fields are the gene count rounded up to whole bytes (SW bits; 8
for 2 or 3 genes, 72 for a 70-gene network). Fields are listed most
significant first.

**Task package** (`TW = 2·SW + 8` bits): `{first state, last state, PE ID}`.
The PE with that ID (0 .. N_PE-1 within the cluster) computes every state
from `first` to `last` inclusive. If `last < first`, the range wraps around
modulo 2^n. A task beat carries `floor(512 / TW)` packages, with slot 0 in
bits `[TW-1:0]`. For the 3-gene network that is 21 packages of 24 bits. An
ID of `8'hFF` marks an empty slot, which is skipped. A package for an ID that
no PE of the cluster has is dropped.

**Result package** (`RW = 2·SW + 64` bits):
`{initial state, first attractor state, T[31:0], L[31:0]}`. One is sent per
initial state. In a result beat, each slot is `8 + RW` bits: a flag byte
(`8'h01` = valid) above the result. A beat holds `floor(512 / (8 + RW))`
slots, 5 of 88 bits for the 3-gene network, and unused slots are zero.
Results from different PEs interleave in round-robin order. The initial
state is carried so that the host can match each result to its state.

## Flow control

* **Input broadcast.** The reader offers one package per cycle to all PEs of
  the cluster. The addressed PE accepts it when its input FIFO has room.
  Otherwise the broadcast waits, which stalls the whole cluster's input
  until that PE drains a range. The host therefore balances load by how it
  spreads ranges over PE IDs, and the FIFOs (depth `IN_DEPTH`, default 4)
  absorb the imbalance.
* **Results.** Each PE's output FIFO (depth `OUT_DEPTH`) raises a request.
  `rr_arbiter` grants the first requester at or after its pointer. When the
  writer takes the result, the pointer moves past the granted PE. The
  writer takes at most one result per cycle.
* **Beats out.** A full packing buffer is moved to the output register and
  held until `m_tready`. When the cluster is completely idle (no task beat
  held, no PE with work), a partly filled buffer is flushed and that beat
  has `m_tlast` set. The host knows how many results to expect, and counts
  valid slots.
* `busy_o` per cluster is high while any task, search or result is
  outstanding.

All handshakes are valid/ready. Reset is synchronous and active low.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `MODEL` | all | `GRN_FIG2B` | built-in network |
| `NUM_CLUSTERS` | `grn_accel` | 4 | clusters, one per 512-bit channel pair |
| `PES_PER_CLUSTER` / `N_PE` | `grn_accel` / `grn_cluster` | 32 | PEs (network copies) per cluster |
| `IN_DEPTH`, `OUT_DEPTH` | `grn_accel`, `grn_cluster`, `grn_pe` | 4 | control FIFO depths (powers of two) |

Built-in networks (`grn_pkg::grn_model_e`). The first gene is the most
significant state bit:

* `GRN_FIG1C`: `a = ~b, b = a & b`. This is 2 genes with one fixed point,
  `10`, which every state reaches.
* `GRN_FIG1D`: `a = ~b, b = ~a`. This is 2 genes with the 2-cycle `00 ↔ 11`
  and two fixed points, `01` and `10`.
* `GRN_FIG2B`: `v1 = v1 & v2, v2 = v1 | v3, v3 = v2 & ~v3`. This is 3 genes.

**Adding a network.** Add an enum value and its gene count in `grn_pkg`,
then add a generate branch with its update equations in `grn_model`. All
widths follow from the gene count. In the original flow, a generator writes
this circuit from the user's equations.

## How far this follows the source description

These parts follow the description of the accelerator:

* The cluster/PE organisation: reader, PEs, round-robin arbiter and writer
  per cluster, with 128 copies in 4 clusters of 32.
* The 512-bit channels.
* The three-field task package with byte-rounded state fields, and
  ID-matched enqueueing in a per-PE input FIFO.
* Ranges of initial states per task, with one result per state.
* The result content: attractor, transient and length.
* One network step per cycle, and one-two step cycle detection with T and L
  registers.

These are choices made here, where the description says nothing:

* The field widths of the ID (8 bits) and of T and L (32 bits).
* The empty-slot and flag-byte encodings, and the initial state in the
  result.
* FIFO depths and the broadcast back-pressure.
* The dropping of unknown IDs and the flush-on-idle.
* The exact phases of the search engine, with three model copies.

Departures and gaps:

* **Channels are beat streams.** The reader and writer implement only the
  data side of the host channels, as valid/ready 512-bit beat streams. The
  memory-mapped AXI4 address, burst and response handling, the PCIe/DMA
  shell, the FPGA's DDR4 and the host software are outside this RTL.
* **Evaluated networks are not included.** The networks the accelerator was
  evaluated on (53 to 321 genes, 118 to 2,242 operations) are not built in,
  because their update equations are not part of the description. The PE
  count of the default configuration matches what was used for the 53-,
  70- and 104-gene networks. The larger networks used 32 copies (one
  cluster's worth).
* **Only synchronous update mode.** The asynchronous and probabilistic
  update modes are mentioned as possible extensions and are not built.
* **The `a = ~b, b = ~a` example follows its equations.** It was drawn with
  `01` and `10` forming a second 2-cycle, but the equations make both fixed
  points. The model follows the equations.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.
`tb/grn_ref_pkg.sv` is an independent reference. It re-states the
equations and finds each state's attractor by brute force, recording the
step at which every state was first seen until one repeats.

| testbench | what it covers |
|---|---|
| `tb_grn_model` | every state of every built-in network; the printed state-diagram edges |
| `tb_sync_fifo` | random traffic against a queue model, full and empty corners |
| `tb_rr_arbiter` | strict rotation under full load; random requests against a pointer model |
| `tb_attractor_search_engine` | all initial states of two networks; the exact `2+k+T+L` latency; wrapping ranges with back-pressure |
| `tb_grn_pe` | ID filtering, input-FIFO stall, in-order results |
| `tb_axi_reader`, `tb_axi_writer` | slot packing and unpacking, empty slots, flush and `m_tlast`, back-pressure |
| `tb_grn_cluster` | 4-PE cluster end to end |
| `tb_grn_accel` | the full default accelerator: 4 × 32 PEs, about 3,600 initial states, all clusters at once |

The cluster and top-level testbenches count each flow-control mechanism and
fail if one never occurs:

* a full input FIFO stalling the broadcast;
* several PEs competing for the arbiter;
* a dropped unknown ID;
* a skipped empty slot;
* host back-pressure;
* a flushed partial beat.

The full-size run takes about 1,500 clock cycles and a few seconds.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/grn_pkg.sv tb/grn_ref_pkg.sv tb/tb_grn_accel.sv --top-module tb_grn_accel
./obj_dir/Vtb_grn_accel
```

Substitute any other `tb_*` name for a single block. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/grn_pkg.sv rtl/grn_accel.sv`.
It reports two style warnings, for the FIFO fill-level outputs that `grn_pe`
leaves unconnected.
Testbenches use hierarchical references into `grn_cluster` to count the
internal events above.
