# Pointer-Chasing Engines for a 3D-stacked memory cube

Walking a linked data structure is a chain of dependent loads. To read node
*n+1* you first need the pointer stored in node *n*. A host CPU pays a full
trip to DRAM, through its cache hierarchy, for every hop. This RTL moves
the walk into the logic layer of a Hybrid-Memory-Cube-style device:

* The host sends one **FIND** instruction: "walk this list, hash chain or
  b+tree from this node until you find this key".
* One **Pointer-Chasing Engine (PCE)** per memory vault runs the walk next
  to its DRAM.
* The host polls for the result.

Two ideas make this faster than plain near-memory pointer chasing:

1. **Speculative wide loads.** A PCE does not fetch just the node it needs.
   It fetches a whole *window* of memory, 64 B to 8 KB, into a vector
   register. Any later node that falls inside a window already held in a
   register costs no DRAM access. Registers also keep their windows from
   one FIND to the next.
2. **Reconfigurable grouping.** Each vault has 256-byte vector registers.
   Neighbouring vaults can join into one *logical* PCE, whose register is
   the concatenation of theirs. This is how windows wider than 256 B are
   built: 2 vaults give 512 B, and all 32 vaults give 8 KB. The FIND's
   operand size chooses the grouping.

The design follows the pointer-chasing engine of Santos et al.,
"Processing in 3D memories to speed up operations on complex data
structures". That work defines:

* the FIND fields;
* the seven-step search algorithm;
* the RA/RS register tags;
* the Internal Find forwarding;
* the grouping of vault engines;
* direct-segment address translation;
* the sizes: 32 vaults, 8 x 256 B vector registers per vault, and 5-cycle
  inter-vault latency.

Everything else is this implementation's choice. That includes the word
encodings, the node layouts, the timing, the host and memory handshakes,
the replacement policy and the fault handling. Each choice is marked in
the section where it appears, and collected under
[Where this RTL departs or chooses](#where-this-rtl-departs-or-chooses).

## The FIND instruction (`pce_pkg::find_t`)

| field | width | meaning |
|---|---|---|
| `stype` | 2 | `ST_LIST`, `ST_HASH` or `ST_BTREE` |
| `base` | 64 | virtual address of the first node |
| `data_off` | 16 | byte offset of the data word (list/hash) or of the key array (b+tree) |
| `data_size` | 16 | list/hash: key size in bytes (1..8, compared on the low bytes). b+tree: number of keys per node (1..15) |
| `next_off` | 16 | byte offset of the next pointer (list/hash) or of the child-pointer array (b+tree) |
| `gold` | 64 | the key searched for |
| `struct_size` | 16 | node size in bytes; used only to reject fields that fall outside the node |
| `op_lg` | 4 | log2 of the operand (window) size: 6 = 64 B ... 13 = 8 KB |

The engine rejects a malformed FIND as a fault. A FIND is malformed if:

* it has a 32-byte operand or any other `op_lg` outside 6..13;
* an offset is not 8-byte aligned;
* a field lies outside `struct_size`;
* it gives more than 15 b+tree keys.

Width and encoding choices:

* Pointers and keys are 64-bit, 8-byte-aligned words.
* Physical addresses are 33 bits, enough for an 8 GB cube.

## Data structures the engine walks

* **Linked list.** The key is at `data_off` and the next pointer at
  `next_off`. A null pointer ends the walk as "not found".
* **Hash table.** A FIND walks one bucket chain. The host gives the head of
  the chain as `base`, and the chain is walked exactly like a list.
* **B+tree.** Each node holds `data_size` sorted keys at `data_off` and
  `data_size + 1` child pointers at `next_off`. With 15 keys and 16
  children, a node fits in 256 bytes. The engine reads one key per cycle,
  and the key compare is scalar:
  * It counts the keys that are `<= gold` and stops at the first key that
    is greater than `gold`.
  * The count selects the child.
  * A node whose selected child pointer is null is a leaf. The leaf reports
    "found" when one of its keys equalled `gold`, and `slot` gives that
    key's index.
  * Unused key slots must hold all-ones.

  The node layout and the leaf rule are this design's choice. The source
  design only says that b+tree nodes have a key array and a child array,
  with 16 children per node.

## How a search walks (`pce_ctrl`)

Each vault's controller is a small FSM with one state per cycle:

```
IDLE -> XBASE -> ROUTE -> LOOK -> READ -> EVAL -> ROUTE ... -> DONE
                   |        |
                   v        v
                  FWD     LOAD -> LWAIT -> READ
```

It follows the seven steps of the source design, with one refinement.
Ownership (steps 2 and 6) and the RA/RS check (step 7) are applied to
**every 64-bit word the walk reads**, not once per node. The words a walk
reads are the data word, the next pointer, each b+tree key and the chosen
child pointer. Because the checks are per word, a node may straddle a
window or a vault boundary.

1. **XBASE.** The virtual base address of a host FIND is translated
   (`seg_xlate`). The engine reports a fault if the base lies outside the
   direct segment.
2. **ROUTE.** The byte address of the next word is computed from the node
   address, the phase and the field offsets. Its vault is
   `addr[8 +: log2 NV]`. If that vault's group leader is another vault,
   the FSM goes to FWD. FWD hands the whole search context (`ctx_t`) to
   `ifind_net` and returns to IDLE. The search is now an *Internal Find*,
   and the context carries a physical node address from here on.
3. **LOOK.** The word address is compared with the tags of all registers.
   Each tag holds RA (window base) and RS (window size), and a hit means
   `RA <= addr < RA + RS`. On a miss the FSM goes through LOAD and LWAIT:
   * It picks a register round-robin.
   * It starts a load of the operand-size window, aligned to its size, in
     every member vault of the group.
   * It waits until every member slice has written its part.
   * It sets the register's tag.
4. **READ.** The lane that holds the word is read from the member slice
   that owns it. The read returns the raw value and its direct-segment
   translation.
5. **EVAL.** What happens depends on the phase:
   * Data word: compare with `gold`. A match ends the walk as found.
   * Next pointer or child pointer: if null, end the walk. If outside the
     segment, end with a fault. Otherwise it becomes the new node.
   * B+tree key: count it and move on.

A word that hits costs 4 cycles (ROUTE, LOOK, READ, EVAL). A FIND that
hits everywhere therefore takes 2 + 4 x (words read) cycles from the host
handshake to `res_valid`. A miss adds the window load: the vault-controller
latency plus a few cycles of handshake. A forward adds the network
latency and one cycle.

## Windows, vaults and groups (`pce_cube`)

This is the least obvious part of the design.

Addresses are interleaved over the vaults in 256-byte blocks:
`vault = addr[12:8]` for 32 vaults. The source design does not give the
interleave. It was chosen so that the grouping it describes falls out
naturally: an aligned window of 2^k bytes (k > 8) covers exactly 2^(k-8)
neighbouring vaults, starting at a vault whose index is a multiple of the
group size.

| operand | vaults per logical PCE | logical PCEs | logical register |
|---|---|---|---|
| 64 B, 128 B, 256 B | 1 | 32 | 256 B (partly filled for 64/128 B) |
| 512 B | 2 | 16 | 512 B |
| 1 KB ... 4 KB | 4 ... 16 | 8 ... 2 | 1 KB ... 4 KB |
| 8 KB | 32 | 1 | 8 KB |

Each vault has one register bank and one controller. Inside a group:

* **Only the leader runs the FSM.** The leader is the lowest vault of the
  group, and it keeps the RA/RS tags of the logical registers.
* **Loads.** The leader's load command goes to every member. Member *m*
  loads the 256-byte block `window_base + 256*m` into the same register
  index.
* **Reads.** A word at byte address `a` sits in vault `a[12:8]`, lane
  `a[7:3]`. The leader drives the read address of all its members and
  picks the answer of the vault that holds the word. Together these paths
  stand for the inter-vault links that the source design uses to "request
  registers from different PCEs".
* **Setting the grouping.** The grouping comes from the FIND being
  accepted. If it differs from the current grouping, all tags are cleared.
  Registers of the same grouping survive across FINDs, which is where
  temporal locality pays off.
* **One FIND at a time.** Only one FIND is in flight in the cube. The host
  FIND is steered to the leader of the vault its *virtual* base address
  maps to. If translation moves it elsewhere, that leader forwards it.
* **Partial windows.** 64 B and 128 B windows fill only their part of a
  256-byte register. The tag's RS records the size.

## Address translation (`seg_xlate`, `vec_xlate`)

The translation is direct-segment, not paged. Three registers describe
the segment: `seg_base`, `seg_limit` and `seg_offset`.

* If `seg_base <= V < seg_limit`, the physical address is `V + seg_offset`.
* Any other V is a fault, which is this design's choice.

`vec_xlate` translates all 32 lanes of the selected register in parallel,
as the vector step of the algorithm. The controller then takes the lane it
needs.

## Interfaces

**Top level `pce_cube`** (parameters `NV=32`, `NREG=8`, `VBYTES=256`,
`NET_LAT=5`; `VBYTES` must stay 256, the interleave):

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `seg_base`, `seg_limit`, `seg_offset` | in | direct segment, 64 bits each |
| `host_valid`, `host_ready`, `host_find` | in/out/in | FIND handshake; `host_ready` is low while a FIND is in flight |
| `res_valid`, `res` | out | one-cycle pulse with `result_t`: `found`, `fault`, `node` (physical address of the matching node), `slot` (b+tree key index), and counters of nodes visited, register hits, window loads and Internal Finds |
| `busy` | out | a FIND is in flight |
| `mem_req_valid/ready/addr/lg[v]` | out/in/out/out | per vault: read `2^lg` bytes at physical `addr` (lg <= 8) |
| `mem_rsp_valid/data[v]` | in | per vault: the 256-byte-aligned block holding `addr`, 2048 bits, byte 0 in bits 7:0 |

Rules of the memory port:

* Each vault has at most one request outstanding, and the response may
  come any number of cycles later.
* A request always targets the vault of its own port and never crosses a
  256-byte block.

The result pulse stands in for the polled flag of the source design, in
which the engine "flags a particular memory address" that the host polls.
Writing the flag to memory is left to the integration.

**Inside:**

* `vault_slice`: register bank, `vec_xlate`, and a load unit with
  valid/ready towards the vault controller.
* `vreg_bank`: 8 x 256 B, byte-enable write, combinational whole-register
  read.
* `ifind_net`: round-robin arbiter feeding a `NET_LAT`-stage pipeline. A
  context accepted in cycle *t* reaches its destination in cycle
  *t + NET_LAT*. The whole pipe holds if the destination is busy.

## Files

| file | contents |
|---|---|
| `rtl/pce_pkg.sv` | FIND, context and result types; constants |
| `rtl/pce_cube.sv` | top: 32 vault slices and controllers, grouping, read/load networks, Internal Find network, result |
| `rtl/pce_ctrl.sv` | per-vault FSM with RA/RS tags |
| `rtl/vault_slice.sv` | per-vault vector datapath and load unit |
| `rtl/vreg_bank.sv` | vector register bank |
| `rtl/vec_xlate.sv`, `rtl/seg_xlate.sv` | vector and scalar direct-segment translation |
| `rtl/ifind_net.sv` | inter-vault Internal Find network |
| `tb/hmc_vault_model.sv` | behavioural vault memory: fixed latency, 1 MB backing store shared by all ports, checks that requests stay in their vault |
| `tb/tb_ds_pkg.sv` | builds lists, hash chains and b+trees in a memory image; FIND constructor |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_pce_workloads` and `tb_pce_regs` |

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pce_cube \
    -Irtl -Itb -y rtl -y tb rtl/pce_pkg.sv tb/tb_ds_pkg.sv tb/tb_pce_cube.sv
./obj_dir/Vtb_pce_cube
```

Replace `tb_pce_cube` with any other testbench. The packages must be
listed first, and `-y` finds the modules. Every testbench ends with
`TB_RESULT checks=N failures=M`. All testbenches pass, and each fails on a
deliberately broken copy of its module.

* `tb_pce_cube` runs the top at its default size: 32 vaults, 64 KB of
  vector registers. It covers:
  * contiguous and scattered lists, a hash chain with 4-byte keys, and a
    three-level b+tree;
  * absent keys;
  * faults, register reuse across FINDs, and register replacement;
  * every grouping from 64 B to 8 KB.

  Monitors count each mechanism: forwarding, loads, hits, replacement,
  multi-vault loads, tag clearing, found / not found / fault, and b+tree
  descent. A mechanism that never happens fails the test. The test also
  checks the cycle count of an all-hit walk, 2 + 4 per word.
* `tb_pce_regs` runs two cubes side by side on the same memory image and
  the same searches. One has the default 8 registers per vault (64 KB in
  all) and the other has 1 (8 KB). The searches are b+tree lookups that
  often repeat keys, and hash-chain lookups. Both cubes must return the
  right answers, and the 64 KB cube must make fewer window loads. In one
  run it made 25 loads and the 8 KB cube made 97.
* `tb_pce_workloads` runs scaled-down versions of the evaluated workloads
  at the default size. It searches each structure with 64 B, 256 B, 1 KB,
  4 KB and 8 KB operands and prints the cycle counts. The runs use
  1024-node lists (contiguous, 25 %, 50 % and 100 % of nodes at random
  places), a 64-entry hash chain and a 2000-key b+tree. The memory model
  has a 20-cycle latency. With registers cleared before each list run:

| list layout | 64 B | 256 B | 1 KB | 4 KB | 8 KB |
|---|---|---|---|---|---|
| contiguous | 14775 | 10167 | 8679 | 8307 | 8238 |
| 100 % random | 35394 | 21258 | 15970 | 12186 | 8382 |

(cycles to walk all 1024 nodes.) The limit is 8 cycles per node: two words
at 4 cycles each. Wider windows remove the loads and the forwards. The
20-search b+tree runs keep their registers between searches: they take
4053 cycles with 64 B windows and 2172 cycles with 8 KB windows.

The full workloads fit the default configuration. The node counts are the
source's; the node sizes are assumed:

| workload | size |
|---|---|
| 1M-node lists | 16 MB |
| 1.5M-entry hash table | 48 MB |
| 3M-node b+tree with 256-byte nodes | 768 MB |

All three fit in the 8 GB that a 33-bit physical address reaches. The walk
length is unbounded, and the counters are 32 bits. The 8 KB-of-registers
configuration of the source's hash experiment is `NREG=1`.

## Where this RTL departs or chooses

* **One FIND in flight** in the whole cube. The source design does not say
  how concurrent FINDs share vaults and groups.
* **Per-word ownership and RA/RS checks**, described above. The source
  checks the next address. Per-word checking also covers keys and nodes
  that straddle windows.
* **Operand range 64 B ... 8 KB.** One passage of the source mentions
  32-byte chunks. The other passages and the evaluation use 64 B as the
  minimum, which is followed here.
* **Node layouts**, the null-pointer end of a walk, the b+tree leaf rule,
  and key compare on the low `data_size` bytes.
* **Round-robin register replacement.** Tags are cleared on a change of
  grouping. There is no other coherence with host writes: the host must
  not change a structure while FINDs run on it, or it must switch the
  grouping to clear the tags.
* **Faults** for addresses outside the segment and for malformed FINDs.
* **The result is a port, not a memory write.** It adds counters for
  observability.
* **Not built:**
  * the general-purpose parts of the vector processor this engine is
    carved from: its scalar register bank (8 x 32 bit), its multiply and
    divide units, and its instruction set;
  * the DRAM vaults and the serial links of the cube;
  * the host processor.

  The memory side is the per-vault port. `tb/hmc_vault_model.sv` models it
  for simulation only.
* **Timing** is this design's: one FSM state per cycle and a combinational
  lane read with translation. The 1.25 GHz clock of the source design has
  not been checked against any technology.
