# Heracles-style mesh multicore in SystemVerilog

This is a synthesizable shared-memory multicore built from small, swappable
parts. Each node of a two-dimensional mesh holds four things:

- a pipelined 32-bit MIPS integer core;
- direct-mapped instruction and data caches;
- one slice of the global main memory;
- a virtual-channel router.

A core loads and stores anywhere in one flat address space. The high bits of
an address name the node that holds the word. Accesses homed at the core's
own node go straight to its local memory. All others become request packets,
travel the network, are served by the remote node's local memory and come
back as response packets. Every size that matters is a parameter. The
defaults give the reference system:

| Part | Default |
|---|---|
| Mesh | 3 x 3 (`MESH_X`, `MESH_Y`) |
| Core | 7 stages, 1 hardware thread, full bypassing, branches predicted not taken, no delay slot |
| L1 caches | direct mapped, 64 lines (`INDEX_BITS=6`) of 8 words (`OFFSET_BITS=3`), i.e. 2 KiB each |
| Local memory | 2^18 bytes = 256 KiB per node (`LOCAL_ADDR_BITS=18`) |
| Router | 5 ports, 2 virtual channels per port (`VC_PER_PORT`), 8 flits each (`VC_DEPTH`) |
| Routing | dimension order (X then Y), or per-router routing tables |

All files are in `rtl/` (one module or package per file) and `tb/`
(testbenches).

## Module hierarchy

```
heracles_mesh                  top: MESH_X x MESH_Y nodes, mesh links, start/PC and routing-table inputs
 └─ heracles_node              one node
     ├─ mips_core              7-stage MIPS core
     ├─ l1_cache  (x2)         instruction cache, data cache
     ├─ addr_resolution        local memory or network, by address
     ├─ local_memory           this node's slice of main memory, 3 requesters served round-robin
     ├─ packetizer             memory traffic <-> packets
     ├─ network_interface      packetizer <-> router local port, credits, class split
     └─ vc_router              5-port VC router
         ├─ vc_buffer (x10)    one FIFO per input VC
         ├─ route_compute      XY logic and the routing table
         └─ rr_arbiter         VA and SA arbiters
heracles_pkg                   shared types: flit, head flit, memory request/response, port numbers
```

## Address map

Node (x, y) has the linear number `n = y*MESH_X + x`. It holds bytes
`n*2^LOCAL_ADDR_BITS` up to `(n+1)*2^LOCAL_ADDR_BITS - 1` of the address space. At
the defaults that is 256 KiB per node, so node 0 holds `0x00000`–`0x3FFFF`,
node 1 holds `0x40000`–`0x7FFFF`, and so on. `addr_resolution` takes
`addr >> LOCAL_ADDR_BITS` as the home node. It places that node at
`x = n mod MESH_X` and `y = (n / MESH_X) mod MESH_Y`, so addresses beyond the
last node wrap. Code and data can be in any node's memory. A core whose PC
points into another node fetches its instructions over the network.

## Memory access path

Every cache talks to the rest of the system with one request/response
bundle (`mem_req_t` and `mem_resp_t` in the package):

- A request is `{we, addr, wdata}` with valid/ready.
- A read returns the whole line: `2^OFFSET_BITS` words in order, the last
  one flagged `last`.
- A write returns one acknowledgement word with `last` set.

Each cache keeps at most one request outstanding. Responses can therefore
never be reordered, and no tag is needed on them.

`local_memory` has three requester ports: instruction cache, data cache, and
the packetizer. The packetizer turns requests arriving from other nodes into
ordinary cache-style requests. That is how remote traffic reaches the
memory. Timing:

- The memory serves one transaction at a time, choosing round-robin among
  the requesters.
- A write is acknowledged in the cycle after it is accepted.
- A read delivers its 8 words in 8 consecutive cycles, starting two cycles
  after acceptance. The array is read synchronously, like a block RAM.

### Caches (`l1_cache`)

The cache has two stages, matching the two cycles the core spends on fetch
and on memory access. Stage 1 reads the tag, valid and data arrays
synchronously. Stage 2 compares the tag and presents the word or raises
`miss`.

- **Reads:** a read miss fetches the whole line, then the access hits.
- **Writes:** stores are write-through without write-allocate. The word
  always goes to memory. `miss` stays high until the acknowledgement
  returns. A line that holds the word is updated at that moment.
- **Hold:** while the core is frozen (`hold`), the arrays re-read the
  stage-2 address. A line filled during the freeze is then seen as a hit
  two cycles after the fill.

There is **no coherence**. A cache can hold a stale copy of a word another
core has since written. Data shared between cores must be written by one and
read by the other only after the reader's cached copy is known to be gone.
With write-through caches, the simplest rule is: poll only addresses the
reader has not cached before, or give each core disjoint data.

## Packets and message classes

A flit is 34 bits: a 2-bit kind (`HEAD`, `BODY`, `TAIL`, or `HT` for a
single-flit packet) and a 32-bit payload. The head flit's payload is a
`head_t`:

| Bits | Field |
|---|---|
| 31:19 | reserved |
| 18:17 | message type |
| 16 | requesting cache at the source (0 instruction, 1 data) |
| 15:8 | source node {y, x} |
| 7:0 | destination node {y, x} |

The four packets:

| Packet | Flits | Class |
|---|---|---|
| read request | head, address | request |
| write request | head, address, data | request |
| read response | head, 8 data words | response |
| write acknowledgement | head only (HT) | response |

Requests travel on the lower half of each port's virtual channels and
responses on the upper half. At the default of 2 VCs that is VC 0 for
requests and VC 1 for responses. A node always accepts responses, so
responses can never be stuck behind requests. Together with XY routing, this
keeps the request–response protocol free of deadlock.

### Packetizer

`packetizer` runs three independent engines:

1. **Outgoing requests.** A request that `addr_resolution` sends off-node is
   sent flit by flit. `creq_ready` is given with the last flit.
   `addr_resolution` keeps its grant on the same cache until then, so the
   flits of two caches never interleave.
2. **Incoming responses.** These are turned back into `mem_resp_t` words for
   the cache named in the head flit.
3. **Incoming requests from other nodes.** The packet is collected, then
   presented to the local memory. The memory's answer is collected in a line
   buffer and returned to the source node as a response packet. This engine
   handles one remote request at a time.

### Network interface

`network_interface` sits between the packetizer and the router's local port:

- **Injection:** it injects request flits on VC 0 and response flits on VC
  `VC_PER_PORT/2`, only while it holds a credit for that router buffer.
- **Ejection:** it buffers each ejected VC (`VC_DEPTH` flits) and returns a
  credit to the router for every flit the packetizer takes.

## Router (`vc_router`)

The router is an input-buffered wormhole router with credit-based flow
control. A head flit passes four one-cycle stages:

1. **RC – route computation.** `route_compute` gives the output port, either
   by dimension-order logic (first X, then Y) or from the routing table.
   The table is indexed by the destination's node number.
2. **VA – virtual-channel allocation.** Each output port has a round-robin
   arbiter. It picks one of the input VCs that are waiting for that port and
   gives it a free output VC of the packet's class.
3. **SA – switch allocation.** This is separable. Each input port first picks
   one of its VCs that has a flit and a downstream credit. Each output port
   then picks one of the competing input ports. Both stages are round-robin.
4. **ST – switch traversal.** The winner is popped through the crossbar into
   the output register, which drives the link.

Body and tail flits only go through SA and ST. The tail flit releases the
output VC. A head flit presented at an input appears on the output link 4
cycles later if it meets no contention. Every flit removed from an input
buffer returns one credit (one bit per VC, registered) to the upstream
router.

Port numbering: N=0, E=1, S=2, W=3, local=4. The y coordinate grows towards
S. Links at the mesh edge are tied off.

### Routing tables

`heracles_mesh` exposes one write port for all tables:

- `rt_we`, `rt_node`: which router;
- `rt_addr`: the destination node number;
- `rt_data`: the output port.

`use_table` switches every router from XY logic to its table. Tables reset
to "local", so they must be filled before `use_table` is raised. The routes
must reach the destination and be deadlock-free. The end-to-end testbench
uses Y-then-X routes as an example.

## Core (`mips_core`)

The seven stages:

| Stage | Work |
|---|---|
| F1 | PC to the instruction cache |
| F2 | tag check, instruction word |
| D | decode, register read, J/JAL |
| X | ALU, multiply, branches, JR/JALR, address |
| M1 | data cache stage 1 |
| M2 | data cache stage 2, load data |
| W | register write |

Hazards:

- **Bypassing.** X takes each operand from M1, M2 or W if an older
  instruction there writes that register. The register file writes through
  to D.
- **Load-use.** Load data only exists at the end of M2. An instruction in D
  that needs a load still in X or M1 waits, which costs up to 2 bubbles.
- **Control.** There is no prediction table and no delay slot; every branch
  is treated as not taken. A taken branch, JR or JALR resolves in X and
  flushes the three younger instructions. J and JAL resolve in D and flush
  two.
- **Cache misses.** A miss in either cache freezes the whole pipeline until
  it is resolved.

Instruction set: ADD(U) ADDI(U) SUB(U) AND(I) OR(I) XOR(I) NOR SLT(I)(U) LUI
SLL SRL SRA SLLV SRLV SRAV MULT(U) MFHI MFLO MTHI MTLO LW SW BEQ BNE BLEZ BGTZ
BLTZ BGEZ J JAL JR JALR. Notes on the subset:

- ADD and SUB do not trap on overflow.
- Other opcodes execute as no-ops.
- There are no byte or halfword loads and stores, no divide, and no
  floating point.
- BREAK or SYSCALL stops the core. `halted` rises once the pipeline has
  drained.

After reset a core sleeps until its `start` pulse, which loads `start_pc`.
Its event counters are brought out on `perf[n]`:

| Index | Counts |
|---|---|
| 0 | retired instructions |
| 1 | frozen cycles |
| 2 | load-use bubbles |
| 3 | bypassed operands |
| 4 | flushed instructions |

## Simulating

The testbenches fill memories by hierarchical writes to
`...u_node.u_lm.mem`, start the cores and compare results against values
computed in the testbench. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/heracles_pkg.sv tb/tb_heracles_mesh.sv --top-module tb_heracles_mesh
./obj_dir/Vtb_heracles_mesh
```

Use `+verilator+rand+reset+2` to start undriven state at random values.
Replace the testbench and top name to run another test.

| Testbench | What it checks |
|---|---|
| `tb_rr_arbiter`, `tb_vc_buffer`, `tb_route_compute` | against reference models, random stimulus |
| `tb_vc_router` | single-flit latency of 4 cycles; random multi-VC traffic checked flit by flit; credit back-pressure; table routing |
| `tb_network_interface`, `tb_packetizer`, `tb_addr_resolution`, `tb_local_memory`, `tb_l1_cache` | protocol and data against models, including read latency and line order |
| `tb_mips_core` | a program with bypasses, load-use stalls, branches and jumps, on an ideal memory; checks results and event counts |
| `tb_heracles_node` | a 2 x 1 mesh where each core works on the other node's memory |
| `tb_heracles_mesh` | the full default 3 x 3 system, see below |
| `tb_workload_matmul` | parallel matrix multiplication on the default system, see below |
| `tb_workload_fib` | Fibonacci numbers on 1, 3 and 7 cores, with all data in one node or spread over the nodes |

`tb_heracles_mesh` runs the default 3 x 3 system with no parameter changes:

- All nine cores run a 37-instruction test program. Core n keeps its data in
  node (n+4) mod 9, and core 4 also fetches its code from node 2.
- The system runs twice: once with XY routing, once with Y-then-X routing
  tables.
- It checks all 90 result words.
- It fails if any of these never happens: a cache-miss freeze, a load-use
  bubble, a bypass, a branch flush, a remote request, a
  switch-allocation conflict, a table-routed flit.

It finishes in well under a minute.

`tb_workload_matmul` multiplies two matrices on the default system.

- **Data placement:** A is in node 0, B (stored transposed) in node 1, and C
  in node 2.
- **Work split:** core c of P computes rows c, c+P, ... of C.
- **Checks:** every element of C, and that nine cores finish before four.

Measured run lengths (cycles, from start to the last core halting):

| Matrix | 4 cores | 9 cores |
|---|---|---|
| 16 x 16 | 26 619 | 16 027 |
| 32 x 32 | 232 672 | 128 558 |

Storing B untransposed makes the inner loop step through B with a stride of
one row. That maps the column onto a few sets of the direct-mapped data
cache, so nearly every access misses. All cores then queue at node 1, and
nine cores become slower than four. Data placement matters more than core
count in this system.

`tb_workload_fib` computes F(0)..F(199). Core c of P takes every P-th
number. It runs each core count with two placements:

- **one node:** all code and results in node 0, as if that node held the only
  main memory;
- **distributed:** each core's code and results in its own node.

| Cores | One node | Distributed |
|---|---|---|
| 1 | 163 053 | 163 053 |
| 3 | 56 630 | 54 926 |
| 7 | 25 047 | 24 036 |

The gap is small because this loop lives in the caches. Only the stores, and
the first fetch of each line, reach memory.

`tb/mips_asm_pkg.sv` has small functions that encode MIPS instructions, for
writing further test programs.

## Differences from the reference architecture

The reference architecture this design follows offers more options than are
built here:

- **No cache coherence.** The reference default pairs every local memory
  with a MESI directory (sized by a `SHARERS` parameter). It is not built,
  and neither is the remote-access mode that sends remote data straight to
  the caches. Caches are write-through with no write-allocate, and nothing
  keeps copies in different caches consistent.
- **Single-threaded core only.** The injector core, the two-thread core and
  the two-thread core with thread migration are not built. So the
  hardware-multithreading experiments (two threads, several context-switch
  policies) cannot run on this design.
- **Level 1 only.** No level-2 cache.
- **Buffered router only.** No bufferless (deflection) router, no weak
  round-robin arbiter variant, no 3D-mesh or fat-tree router shapes. The
  router is parameterised in ports and VCs, but `heracles_mesh` wires only a
  2D mesh.
- **Simpler routing tables.** An entry is selected by the destination node
  and gives only the output port. The VC is still allocated dynamically
  within the packet's class. The reference architecture can also index
  routes by flow or source/destination pair, and can pin the VC.
- **Uniform memory only.** Every node has the same local memory size. The
  centralised (single memory) and non-uniform layouts are not provided.
  Setting `LOCAL_ADDR_BITS` changes the size for all nodes.
- **Memory size.** 256 KiB per node is the power of two nearest the
  reference's "260KB".
- **Reduced instruction set**, listed above.

The reference leaves several details unspecified, so this design chose them:

- flit and head-flit formats;
- message types;
- the request/response VC split;
- credits, and the separable switch allocator;
- cache write policy and line-fill timing;
- local-memory timing;
- the stage at which each kind of jump resolves;
- the event counters.

## Scaling

- **Mesh size:** set `MESH_X` and `MESH_Y` on `heracles_mesh`. Node
  coordinates are 4 bits each, so up to 16 x 16.
- **Reference memory sizes per mesh size:**

  | Mesh | Local memory | `LOCAL_ADDR_BITS` |
  |---|---|---|
  | 4 x 4 | 64 KiB | 16 |
  | 5 x 5 | 32 KiB | 15 |
  | 6 x 6 | 16 KiB | 14 |

- **Caches:** grow with `INDEX_BITS` (more lines) or `OFFSET_BITS` (longer
  lines). Longer lines also lengthen read responses.
- **Router:** `VC_PER_PORT` must be even, because the two message classes
  split the VCs in half.
