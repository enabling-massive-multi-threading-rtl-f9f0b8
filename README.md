# Hash-scheduled hardware threads on a many-core mesh

This RTL implements a fabric that creates, places, feeds and starts very
fine-grained threads in hardware, without any central scheduler. A program is
split into small threads that pass data to each other in a producer-consumer
style. Each thread has a **frame**, the storage its producers write into, and a
**scheduling slot (SS)**, the count of inputs it still waits for. When the
count reaches zero the thread is runnable and the hardware starts it on its
processing element (PE). Nothing else has to be done in software.

Every tile of the chip pairs a PE with a router. The router is extended with a
**Thread Dispatcher** that keeps the tile's threads in a small table. The hard
question is where to put each new thread. If the choice is poor, a few tiles
overheat and their links congest. If the choice ignores locality, related
threads end up far apart. The design settles this with a tiny hash unit in every
tile. The hash unit draws the destination from pseudo-random sequences that visit
every candidate exactly once per period. Threads of one *asynchronous function*
stay inside one **virtual node (VN)**, a group of neighbouring tiles. New
asynchronous functions spread over the whole chip.

The default configuration is 256 tiles in a 16 x 16 mesh. Each tile has a
16 KiB scratchpad and a 32-row thread table.

## Files

| file | module | role |
|---|---|---|
| `rtl/delta_pkg.sv` | package | thread identifier, PE request/response, network packet, tile/VN mapping |
| `rtl/delta_chip.sv` | `delta_chip` | top: mesh of tiles; PE and Thread-Storage ports brought out per tile |
| `rtl/delta_tile.sv` | `delta_tile` | router + Thread Dispatcher + scratchpad |
| `rtl/thread_dispatcher.sv` | `thread_dispatcher` | executes thread instructions and network messages |
| `rtl/th_hash.sv` | `th_hash` | the hash scheduling function H(N_pe, I_ex) |
| `rtl/debruijn_lfsr.sv` | `debruijn_lfsr` | maximum-length LFSR extended to all 2^N states |
| `rtl/tdt.sv` | `tdt` | Thread Descriptor Table: CAM, SS/frame array, priority encoder, swap-out |
| `rtl/scratchpad.sv` | `scratchpad` | two-port 16 KiB data memory shared by PE and dispatcher |
| `rtl/ring_router.sv` | `ring_router` | mesh router (four unidirectional link directions, XY routing) |

The processing elements, their instruction caches and the DRAM layer that
holds threads swapped out of a full table are not part of the RTL. Their
connections are ports of `delta_chip`.

## Thread identifiers and virtual nodes

A thread is named by a 64-bit **T_id** (`delta_pkg::tid_t`):

```
 63      56 55      48 47      40 39      32 31                    0
+----------+----------+----------+----------+-----------------------+
| src N_id | src C_id | dst N_id | dst C_id |          CNT          |
+----------+----------+----------+----------+-----------------------+
```

`src` is the tile that created the thread and `dst` is the tile that will run
it. Each is given as a VN number (N_id) and a core number inside the VN (C_id).
CNT is the creating tile's running counter. Because the destination is written
into the name, every later message about the thread goes straight to the right
tile, with no lookup and no second hash.

Tiles are numbered `t = y*MESH_X + x`. A VN is a block of `2^vn_log`
consecutive tile numbers. So `N_id = t >> vn_log`, `C_id = t mod 2^vn_log`, and
`t = N_id*2^vn_log + C_id` (`tile_of` / `addr_of` in the package). With the
reset value `vn_log = 4`, a VN is one mesh row of 16 tiles. `vn_log = 6` gives
four rows, and so on. Each tile's PE sets the VN size with `SetVN`. All tiles
must use the same value. Change it only while no thread is alive, because the
tile a message is sent to is computed from the current size.

## Choosing a destination: the hash unit

`th_hash` is the core of the scheme. It answers, in the same cycle as the
request, "which tile runs this new thread?".

**Full-period LFSRs.** An ordinary maximum-length LFSR of N bits walks through
the 2^N − 1 non-zero states in a scrambled order. `debruijn_lfsr` inverts the
feedback bit whenever bits `[N-2:0]` are all zero. This splices the all-zero
state into the cycle, between `100…0` and `00…01`. The register now visits all
2^N values once per period. It behaves like a round-robin counter whose order
looks random. Any 2^N consecutive draws hit every value exactly once. That is
why the distribution of threads is flat even over short windows, not only on
average.

**One LFSR per VN size, in parallel.** The hash unit holds one such LFSR for
every width k = 1..LOG_PE (1..8 on a 256-tile chip). The width-k register
supplies a C_id for a VN of 2^k cores. All of them run at the same time. A
first multiplexer, driven by `vn_log`, picks the width in use. Changing the
VN size therefore needs no reprogramming of the sequences.

**Instruction multiplexer.** A second multiplexer, driven by the instruction,
builds the destination:

* `CreateThread`: `<own N_id, new C_id>`. The thread stays in the caller's VN,
  which keeps the threads of an asynchronous function close together.
* `CreateAF`: `<new N_id, new C_id>`, anywhere on the chip. Both fields come
  from one extra LOG_PE-bit LFSR, read as a tile number and split at bit
  `vn_log`. Two separate LFSRs of equal period would advance in lockstep and
  reach only 2^k of the possible pairs. One full-width register reaches every
  tile once per 2^LOG_PE requests.

All LFSRs advance together on every create request. Every tile seeds its LFSRs
differently (a fixed hash of the tile number). Tiles therefore walk different
sequences, and simultaneous creators do not all pick the same target.

Cost per tile: LFSRs of 1 + 2 + … + 8 bits plus one of 8 bits (44 flip-flops),
two small multiplexers, and no arithmetic.

`tb/tb_hash_uniformity.sv` puts 256 hash units, one per tile with the tile's
seed, at injection rate 1.0 for 200 cycles. Each request is CreateThread or
CreateAF at random. Over the 51,200 requests the per-tile counts give Pearson
χ² ≈ 138 with 255 degrees of freedom. The 1 % critical value is 310.5, so the
distribution is consistent with uniform.

## Life of a thread

The PE drives the dispatcher with a valid/ready request (`pe_req_t`: op, T_id,
offset, data). For every accepted request, a response (`pe_rsp_t`) comes
exactly one cycle later.

| instruction | dispatcher action | message |
|---|---|---|
| `CreateThread`, `CreateAF` (data = initial SS) | hash → destination; T_id = {own, dst, CNT}; CNT++ ; T_id returned | CREATE to dst tile |
| `WriteData` (T_id, F_o, word) | — | WRITE to the thread's tile |
| `DecreaseSS` (T_id, n) | — | DEC (by n) to the thread's tile |
| `DeleteThread` (T_id) | — | DELETE to the thread's tile |
| `ReadData` (T_id, F_o) | local table search, scratchpad read at F_b + F_o | — |
| `SetVN` (data = log2 size) | sets `vn_log` | — |

`DecreaseSS` takes an amount. A producer can therefore write several words and
signal them all with one decrement.

At the receiving tile:

* **CREATE** allocates a table row with the given SS. If the table is full,
  the row is taken by swap-out (see below).
* **WRITE** searches the table with the T_id and stores the word at
  `F_b + F_o` in the scratchpad.
* **DEC** lowers SS. It saturates at zero.
* **DELETE** frees the row.

A WRITE or DEC for a thread that is not in the table is dropped and pulses
`drop_valid`. This happens to threads that were swapped out. Messages from one
source to one destination always take the same path through single-entry
registers, so they cannot overtake each other. A thread's CREATE therefore
always arrives before its creator's WRITEs and DECs.

A thread whose SS is zero is offered on `fire_valid/fire_tid/fire_fb`. If
several are runnable, the one with the lowest T_id goes first. The PE takes it
with `fire_ready`. It reads its inputs with `ReadData` or directly from the
scratchpad at `fire_fb`, and ends with `DeleteThread`. A PE runs one thread at
a time. It signals that it is free by raising `fire_ready` again.

The dispatcher serves either the PE or the network in a cycle. When both
want it, they take turns. A request that must send a message waits while the
previous message has not yet entered the router.

## The Thread Descriptor Table

`tdt` keeps two arrays of `ENTRIES` rows:

* **CAM:** valid bit and 64-bit T_id. Every access searches it. A hit returns
  the row.
* **Descriptor array:** SS, frame base F_b and a "running" bit.

Row i owns the scratchpad window that starts at `F_b = i*FRAME_WORDS`. The
default is 32 rows of 64 words, which uses the lower 8 KiB of the 16 KiB
scratchpad. The rest is free for the PE.

A priority encoder compares the T_ids of all runnable rows (valid, not
running, SS = 0) and offers the smallest. Because CNT is the low field, older
threads of one creator go first.

**Swap-out.** When a CREATE arrives and no row is free, the table picks the
non-running row with the highest SS. It compares that SS with the new
thread's SS. The thread that waits longer, that is, the one with the higher SS,
leaves for the per-PE Thread Storage bank. On a tie, the new thread leaves. The
leaving thread's T_id and SS appear for one cycle on `spill_valid/spill_tid/spill_ss`.
If the stored thread leaves, the new thread takes its row.

This RTL does not copy the frame words of a swapped-out thread, and it has no
path that brings a thread back from the Thread Storage.

## Mesh and router

The 2D mesh is made of four link directions: eastbound, westbound, northbound
and southbound. Each tile's `ring_router` joins the four link pairs with the
local dispatcher. Packets are single flits that carry a whole message
(`pkt_t`, 122 bits).

Routing is dimension order: first along X to the destination column, then
along Y, then to the local port. This cannot deadlock on a mesh. The router
has two stages: route and arbitrate, then one output register per direction.
Flits already in the network have fixed priority over local injection. An
output register takes a flit only when it is empty. A link therefore carries at
most one flit every two cycles, and no ready signal spans more than one hop.
Links on the mesh border are tied off.

Latency: a `CreateThread` with SS 0 for the own tile is offered on
`fire_valid` within 5 cycles of the request. Each further hop adds one cycle
when the links are free.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `MESH_X`, `MESH_Y` | 16, 16 | chip, tile, router | mesh size (256 tiles, at most 256) |
| `ENTRIES` | 32 | chip, tile, dispatcher, tdt | thread-table rows per tile |
| `FRAME_WORDS` | 64 | chip, tile, dispatcher, tdt | 32-bit words per frame |
| `SP_WORDS` | 4096 | chip, tile | scratchpad words (16 KiB) |
| `VN_LOG_RST` | 4 | chip, tile, dispatcher | log2 VN size after reset |
| `LOG_PE` | 8 | dispatcher, th_hash | log2 tiles (derived in the tile) |

`ENTRIES*FRAME_WORDS` must fit in the scratchpad, and an assertion checks
this. N_id and C_id fields are 8 bits wide, which limits a chip to 256 tiles.

## Where this RTL makes its own choices

The architecture fixes these points:

* the 64-bit T_id made of source, destination and counter;
* hash-based placement with full-period LFSRs, one per VN size, selected by
  VN size and then by instruction;
* the instruction set;
* the CAM-based table with frame address `F_b + F_o`;
* the lowest-T_id priority encoder;
* swap-out of the thread with the higher SS;
* the 16 KiB scratchpad;
* 256 PEs.

The following are choices of this implementation:

* the field widths of the T_id (8/8/8/8/32) and all encodings;
* the LFSR tap sets and seeds, and stepping all LFSRs on every request;
* a single whole-chip LFSR for CreateAF;
* VNs as blocks of consecutive tile numbers;
* one 32-bit word per WriteData/ReadData, and DecreaseSS carrying an amount;
* fixed frame windows per table row, with 32 rows of 64 words;
* the choice of swap-out victim, and saturating SS;
* dropping messages for unknown threads;
* the router as a whole, which the architecture takes from existing work;
* the two-port scratchpad and the PE/network turn-taking in the dispatcher.

Not implemented:

* the `ConfigRouter` instruction, whose effect is not defined beyond
  "configure virtual nodes";
* re-placing a thread on another PE when a tile runs out of space;
* moving swapped-out threads' frames to the Thread Storage and bringing them
  back.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog. Build one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/delta_pkg.sv tb/tb_delta_chip.sv --top-module tb_delta_chip
./obj_dir/Vtb_delta_chip
```

| testbench | what it exercises |
|---|---|
| `tb_debruijn_lfsr` | full 2^N period and unique states, N = 1, 3, 6, 8, 10 |
| `tb_th_hash` | in-VN placement, even spread per VN size, whole-chip CreateAF coverage, clamping, determinism |
| `tb_tdt` | CAM search and F_b, SS decrement, lowest-T_id firing, delete, both swap-out cases |
| `tb_scratchpad` | random two-port traffic against a reference, write collision |
| `tb_ring_router` | 1,500 random flits with back-pressure, XY output choice, priority, hop latency |
| `tb_thread_dispatcher` | all instructions with a looped-back network, T_id fields, drops, swap-out, turn-taking |
| `tb_delta_tile` | create-to-fire through the router, shared scratchpad, traffic to and from a neighbour |
| `tb_delta_chip` | 4 x 4 chip, 4-row tables: producer/consumer program in two VN sizes; every mechanism must occur |
| `tb_delta_chip_full` | the default 16 x 16 chip running the same program, 6,144 threads |
| `tb_hash_uniformity` | χ² test of 51,200 placements over 256 tiles |

`tb/chip_pe_array.sv` holds the behavioural PEs used by both chip tests. Each
PE creates threads with SS 2, writes two words into each one, signals it with
one `DecreaseSS 2`, and runs whatever its dispatcher fires. A fired thread
reads its two words, checks their sum, and deletes itself. The scoreboard
requires every thread to run exactly once on the tile named in its T_id, or to
be reported on the swap-out port.

In the reduced chip test, the tables overflow on purpose: about half of the
threads are swapped out, and their later messages are dropped.

The largest size simulated is the default chip itself (`tb_delta_chip_full`,
16 x 16 tiles). All 6,144 threads ran on their named tiles with the right data,
and no check failed. It finished in 1,337 cycles, and its 32-row tables never
overflowed. The simulation takes a few seconds. Building it is the slow part:
Verilator flattens the 256 differently-parameterised tiles into about 500 MB of
C++, which takes about 14 minutes to compile with `-j 4`. Budget for
that, or use `tb_delta_chip` (4 x 4, builds in about 30 s) for quick runs.
