# Near-memory accelerators for a 16-vault stacked DRAM

Data-intensive kernels such as sorting, string search, bulk copies and
hash-table lookups spend most of their time moving data. A 3D-stacked DRAM
with a logic die at the bottom of the stack (the Hybrid Memory Cube
organisation) has far more internal bandwidth than a host CPU can use.
This RTL puts a small accelerator for each of those four kernels
into that logic die, under every one of the 16 DRAM vaults. An accelerator
reaches its own vault through the through-silicon vias, and any other vault
through the logic layer's crossbar. The host processor only sends
commands and collects results.

The RTL describes the logic layer: accelerator tiles, vault controller front
ends, crossbars and accelerator controllers. The DRAM dies and the SerDes
PHYs are not part of it. The top module brings out one packet port for each
vault and for each link, and the testbenches attach behavioural models to them.

## Organisation

```
              host processor (4 SerDes links, 2 command ports)
                 |  link packets            |  commands / results
                 v                          v
   +---------------------------+   +------------------+
   | request / response        |<->| acc_controller x2|  (hash_unit inside)
   | crossbar (20 x 16)        |   +------------------+
   +---------------------------+            | command / result crossbar (2 x 16)
      |   ^        ...                      v
   +--v---+----------------------------------------------+  x16 (one per vault)
   | vault_ctrl <---- local path ----  acc_tile           |
   |    |                               sort_unit         |
   |    |                               strmatch_unit     |
   |    |                               ll_traversal      |
   |    |                               memcopy_unit      |
   +----|-------------------------------------------------+
        v  DRAM port (TSVs) -> vault DRAM (outside this RTL)
```

| module | role |
|---|---|
| `nmp_top` | the logic layer: 16 × (`acc_tile` + `vault_ctrl`), four `crossbar` instances, 2 × `acc_controller` |
| `acc_tile` | the four accelerators of one vault with their output buffer, input buffer and address generation |
| `vault_ctrl` | merges local and crossbar requests onto the vault's DRAM port and routes replies back |
| `crossbar` | generic N×M packet crossbar with one round-robin arbiter per output |
| `acc_controller` | takes host commands, picks the vault holding the data, returns results |
| `hash_unit` | key → bucket address (multiplicative hashing) |
| `vault_addr_map` | address → vault index for both mapping schemes |
| `sort_unit`, `bitonic_sorter`, `merge_unit` | sorting accelerator |
| `strmatch_unit` | Aho-Corasick string matcher |
| `ll_traversal` | hash-table lookup engine (linked-list traversal with a CAM of outstanding lookups) |
| `memcopy_unit` | block copy with out-of-order replies |
| `buffer_fifo`, `rr_arbiter` | input/output buffers and arbiters |
| `nmp_pkg` | packet, command and result types, constants |

## Address mapping: where data lives

The device holds 4 GB, so addresses are 32 bits wide. The unit of transfer is
a 64-byte block. The vault that owns an address depends on a mode bit, the
`scheme_b` input of the top:

* **Scheme A** (`scheme_b = 0`) is the stock interleave. The vault index is
  address bits 9:6, so consecutive blocks go to consecutive vaults. A long
  array is spread over all vaults. This gives the most bank parallelism to a
  processor, but an accelerator finds only one block in 16 in its own vault.
* **Scheme B** (`scheme_b = 1`) keeps a 4 KB page in one vault. The vault
  index is address bits 15:12. If the operating system hands out pages with
  near-memory work in mind, an accelerator works almost entirely on its local
  vault.

Both the accelerator controllers (to choose a vault) and every tile's address
generation (to choose local path or crossbar) use the same decoder. The
mapping bit therefore only changes where traffic flows; the functional result
is the same under both schemes. Switching the scheme does not move data that
is already stored. Software has to do that.

## The path of a memory request

This is the part of the design that ties everything together. All traffic is
made of two packet types, defined in `nmp_pkg`:

* `mem_req_t`: `we`, `addr`, 512-bit `wdata`, `src`, `tag`.
* `mem_rsp_t`: the same fields with `rdata`. A write is acknowledged with a
  reply whose `we` is 1, so an accelerator knows when its data is in memory.

`src` names the port that must get the reply. Ports 0–15 are the tiles and
ports 16–19 are the four links. `tag` is the requester's own field: in a tile,
bits 7:6 name the accelerator and bits 5:0 are left to it. Every interface
is valid/ready. A sender keeps its packet unchanged until it sees ready.

1. **Tile, outbound.** A round-robin arbiter picks one of the four
   accelerators' requests. The tile writes its port number into `src` and
   the accelerator number into `tag[7:6]`. The request then goes into the
   4-entry output buffer.
2. **Address generation.** The head of the output buffer is decoded with
   `vault_addr_map`. If the address is in the tile's own vault, the request
   goes to that vault's `vault_ctrl` directly (the TSV path). Otherwise it
   goes to the request crossbar, addressed to the owning vault.
3. **Crossbar.** The request crossbar has 20 inputs (16 tiles and 4 links)
   and 16 outputs (the vault controllers). Each output has its own
   round-robin arbiter. A packet crosses in the cycle it is granted; losers
   keep their packet and wait. The top decodes the vault of each link request
   from its address and writes the link's port number into `src`.
4. **Vault controller.** `vault_ctrl` alternates between local and crossbar
   requests onto the DRAM port. A reply whose `src` is the vault's own number
   goes back to the local tile. Any other reply goes into the response
   crossbar (16 inputs, 20 outputs), addressed by `src`.
5. **Tile, inbound.** Replies from the local path and from the crossbar are
   merged into the 4-entry input buffer. From there each reply goes to the
   accelerator named in `tag[7:6]`. Every accelerator accepts a reply in any
   cycle, because it never has more requests outstanding than it can absorb.
   So the input buffer always drains, and replies cannot block requests
   anywhere in the system.

Replies from different vaults arrive in any order. `memcopy_unit` and
`ll_traversal` are built for that; `sort_unit` and `strmatch_unit` keep only
one request outstanding.

## Commands and results

The host talks to an accelerator controller with `cmd_t` and receives
`result_t`. The controller stamps its own number into the command, so that
the result comes back to it. It also sets the target vault:

| `op` | arguments | runs in vault | result |
|---|---|---|---|
| `OP_MEMCPY` | a0 source, a1 destination, a2 bytes (multiples of 64) | of a0 | r0 = bytes |
| `OP_SORT` | a0 array, a1 scratch area of equal size, a2 number of 64-bit keys (multiple of 64) | of a0 | r0 = address of the sorted array (array or scratch), r1 = keys |
| `OP_STRMATCH` | a0 text, a1 bytes (multiple of 64) | of a0 | r0 = matches, r1 = offset of the last matching character, ok = any match |
| `OP_SM_ROW` | vault, a0 state, a1 first character (multiple of 8), a2 eight 8-bit next states | named | none |
| `OP_SM_MATCH` | vault, a0 state, a1 pattern vector of that state | named | none |
| `OP_HASH` | a0 key, a1 bucket array base, a2 log2(buckets), a3 VA→PA offset | of the bucket | ok = found, r0 = key, r1 = value |

Each accelerator in a tile runs one command at a time, except `ll_traversal`,
which accepts a new lookup whenever one of its 16 table entries is free. The
four accelerators of a tile run concurrently. Results carry the accelerator
and the vault number. A host that keeps several commands in flight on one
controller should match results by those fields, because results of
different accelerators can come back in any order.

## The accelerators

### Sorting (`sort_unit`, `bitonic_sorter`, `merge_unit`)

The sort has two phases, on 64-bit unsigned keys.

* **Phase 1** reads 64 keys (8 blocks) at a time into a register array. It
  passes them through a 64-input bitonic sorting network and writes them back
  in place. The network has 21 compare-exchange stages of 32 comparators
  each, with a register after every stage. A set therefore leaves 21 cycles
  after it enters, and a new set could enter every cycle.
* **Phase 2** merges pairs of sorted runs with `merge_unit`, which outputs one
  key per cycle: the smaller of the two heads, A first on ties. Each run has a
  one-block buffer, and merged keys are collected in a third block buffer.
  When an input buffer runs dry it is refilled from memory. When the output
  buffer is full it is written out. Each pass doubles the run length
  (64, 128, 256, …) and writes into the other of the two areas (array,
  scratch). The result reports which area holds the final array: the array
  itself after an even number of merge passes, the scratch area after an odd
  number.

Keys sit in a block little-endian: key *i* is bits 64·i+63 … 64·i.

### String matching (`strmatch_unit`)

The host compiles its patterns into a deterministic Aho-Corasick automaton
and writes it into two on-chip tables:

* the next-state table: 256 states × 256 characters, 8-bit entries;
* the match table: a 16-bit pattern vector for each state.

State 0 is the root. The search streams the text through two 64-byte block
buffers, and the next block is fetched while the current one is consumed.
Each cycle one character and the current state address the next-state table.
That read is registered, so its output is the new state: one character per
cycle, 64 cycles per block. One cycle later the match table is read for the
new state, and every set bit counts as a match. The measured time for
1024 bytes is 1037 cycles.

### Hash-table lookup (`hash_unit`, `ll_traversal`)

The tables are open-chained: a bucket is one 64-bit word holding a pointer to
a linked list. A node is a 64-byte block with the key in word 0, the value in
word 1 and the next pointer in word 2. A pointer of 0 ends a list.

The controller's `hash_unit` computes the bucket address:
`base + 8 · top_bits(key × 0x9E3779B97F4A7C15)`, using the top log2(buckets)
bits of the low 64 bits of the product. The controller sends the lookup to
the vault holding that bucket.

In that vault, `ll_traversal` keeps a 16-entry table of active lookups. Each
entry holds the key, the address of its outstanding read and a state:
READ_PTR (reading the bucket) or FETCH_KEY (reading a node). Entries issue
reads through a round-robin arbiter. Each read reply is compared with the
addresses of all entries (a CAM search), and every entry waiting on that
block advances. It stops on a key match or a null pointer, or else reads the
next node. Pointers stored in the table are virtual addresses. The table
must sit in a region mapped contiguously, and every pointer is translated by
adding the offset given with the lookup, so no TLB is needed.

### Memory copy (`memcopy_unit`)

The copy reads blocks in address order, with up to 16 reads in flight. A
reply carries its address, and the write goes to
`dst + (reply address − src)`, so replies may come back in any order. Replies
wait in a 16-entry buffer until the request port is free, and writes have
priority over new reads. The copy finishes when every write has been
acknowledged.

## Parameters

| parameter | default | where |
|---|---|---|
| vaults, links | 16, 4 | `nmp_pkg::N_VAULTS`, `N_LINKS` (also `nmp_top` `NV`, `NL`) |
| block size | 64 bytes | `nmp_pkg::BLOCK_BYTES` |
| address width | 32 (4 GB) | `nmp_pkg::ADDR_W` |
| sorting network | 64 keys × 64 bits | `sort_unit` `N`, `bitonic_sorter` `N`, `W` |
| automaton | 256 states, 16 patterns | `strmatch_unit` `STATES`, `N_PAT` |
| lookup table | 16 outstanding lookups | `ll_traversal` `N_ENT` |
| copy | 16 blocks in flight | `memcopy_unit` `MAX_OUT` |
| tile buffers | 4 entries | `acc_tile` `BUF_DEPTH` |
| accelerator controllers | 2 | `nmp_pkg::N_CTRL` |

The accelerators were specified for an 800 MHz clock. No timing closure has
been done on this RTL.

## What is specified and what is chosen here

These come from the architecture:

* 16 vaults with a controller and an accelerator under each;
* a crossbar to four SerDes links;
* accelerator controllers that take commands from the processor and place
  work on the vault that holds the data;
* the two address mappings with their bit positions;
* 64-byte blocks;
* a 64-input, 64-bit bitonic network followed by merge units;
* an Aho-Corasick engine with host-written SRAM tables, processing one
  character per cycle and 64 cycles per block;
* a hash lookup unit built around a CAM of outstanding lookups (key, read
  address, state), searched on every reply, with hashing at the memory
  interface and offset-based address translation;
* a block copy that computes the write address from the reply address.

These are this design's own choices:

* all packet and command formats, and the tag and `src` routing;
* valid/ready handshakes everywhere, and round-robin arbitration;
* the buffer depths;
* putting all four accelerators in every tile;
* separate command and result crossbars, instead of sending commands
  through the data crossbar;
* the hash function and the node layout;
* the 256-state, 16-pattern automaton size;
* the result formats.

These depart from the source architecture:

* **In-place merging.** The original sorter merges in place, but how is not
  specified. Here the merge ping-pongs between the array and a scratch area
  of the same size, and the result names the area that holds the output.
* **String-matching tables.** The original engine uses a bit-split
  organisation of its state machine tables. This one uses a plain 256-way
  next-state table. That costs more SRAM for the same function.
* **Sort and string search bandwidth.** Both keep one memory request in
  flight. The sort does not overlap its memory traffic with merging, so it
  will not reach the bandwidth of the original.
* **The memory controller.** `vault_ctrl` is only the arbitration and
  reply-routing front end. DRAM command scheduling, refresh and timing belong
  to the DRAM side of its port.
* **One vault per command.** Work is not split across vaults automatically.
  A 256 MB sort, for example, is 16 sorts of one vault each, plus a final
  merge, issued by the host.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. Each one uses `tb/tb_mem_pkg.sv`, a
shared sparse memory, and most use `tb/mem_port_model.sv`, a DRAM port model
with configurable latency, out-of-order return and back-pressure. To build
and run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nmp_pkg.sv tb/tb_mem_pkg.sv tb/tb_nmp_top.sv --top-module tb_nmp_top
./obj_dir/Vtb_nmp_top
```

| testbench | what it exercises |
|---|---|
| `tb_nmp_top` | the whole layer at default size with a DRAM model on all 16 vaults. Link writes and reads; under Scheme B a copy between vaults, a sort of 1024 keys, a string search and 40 hash lookups all at once; then a switch to Scheme A and an 8 KB interleaved copy. It also counts that each mechanism occurs: local path, crossbar path, link traffic, crossbar contention, DRAM back-pressure, out-of-order replies, both controllers, both schemes, all four accelerators |
| `tb_acc_tile` | one tile with local and remote memory, four accelerators running concurrently |
| `tb_sort_unit` | sorts of 64, 192 and 512 keys, checked against a reference sort |
| `tb_bitonic_sorter`, `tb_merge_unit` | network (latency of 21 cycles, one set per cycle) and merge element |
| `tb_strmatch_unit` | builds the automaton for overlapping patterns, compares with a brute-force scan, checks one character per cycle |
| `tb_ll_traversal` | chained table, 16 lookups in flight, out-of-order replies, absent and repeated keys |
| `tb_memcopy_unit` | out-of-order replies, guard blocks, in-flight limit |
| `tb_crossbar`, `tb_vault_ctrl`, `tb_acc_controller`, `tb_buffer_fifo`, `tb_vault_addr_map`, `tb_hash_unit` | the infrastructure blocks |

Compile times are dominated by the sorting network: one `sort_unit` takes a
few minutes to build in Verilator. The full `nmp_top` takes longer, because
it contains 16 tiles.

`tb_nmp_top` runs the whole layer at its default size (16 vaults, 4 links,
64-key sorting networks); it simulates about 28,000 cycles and takes about
two minutes of simulation time with an unoptimised Verilator build.

**Known open failure.** In `tb_nmp_top`, 1740 of 1741 checks pass. The
copy, sort, string search, link traffic and mapping switch all give correct
results, and every mechanism count is non-zero. The exception is the 40 hash
lookups run through the whole layer. They all come back as "not found" (ok = 0)
for keys that are in the table, so the check "lookups found keys" fails. The
same lookup path passes on its own in `tb_ll_traversal`, `tb_acc_controller`
and `tb_acc_tile`. The cause has not been found yet. Treat hash lookups through
`nmp_top` as unverified.
