# Crystalor recovery-tag hardware

Encrypted non-volatile memory is normally protected by an authentication
tree: every leaf (a block of payload data) is encrypted and authenticated
under a nonce made of its address and a counter, and the counters are
themselves protected by MACs up to a root kept on chip. After a power failure
the off-chip tree is usually inconsistent, because the intermediate nodes are
updated in the background and are lost mid-flight. Existing recovery schemes
rebuild the old intermediate counters from the leaves, which only works while
every counter is a plain integer whose sum is meaningful. With *split
counters* (one shared major counter plus small per-node minor counters) the
history is destroyed on every minor-counter overflow, so the old tree cannot
be rebuilt.

Crystalor takes a different route:

* It keeps a single 128-bit **recovery tag** on chip that authenticates all
  leaf counters at once. The tag is a keyed hash (PXOR-Hash) that can be
  updated incrementally with two AES calls per store, so it adds almost
  nothing to a normal store.
* After a crash it throws the old intermediate nodes away and builds a
  **new tree** whose counters are provably larger than anything used before,
  then re-computes the recovery tag over all leaf counters and compares it
  with the on-chip copy. A match means the leaf counters were not rolled
  back; a mismatch raises an error.
* Leaf *data* is not read during recovery. Each leaf is still authenticated
  by the tree engine when it is next loaded ("lazy" recovery), which is what
  makes recovery fast.

This repository contains synthesizable SystemVerilog for the Crystalor part
of such a system: the secure key/tag storage, the PXOR-Hash accelerator, the
store sequence that keeps leaves and tag consistent across a crash, the write
pending queue, the root counter, and the recovery sequence including the
new-counter arithmetic. The tree engine itself (authenticated encryption of
leaves and MACs of tree nodes), caches and main memory are not included; the
top module exposes ports where they connect.

## Counter blocks

All counters are split counters with a 56-bit major counter and 8-bit minor
counters, eight nodes per major counter. One group of eight nodes is stored
as a 128-bit **counter block** (`crystalor_pkg::sc_block_t`):

```
bits 127..64   major counter (56 significant bits, upper 8 bits zero)
bits  63..56   minor[0]
   ...
bits   7..0    minor[7]
```

The 64-bit major field makes the block exactly one AES block, which is what
PXOR-Hash consumes. Updating a node increments its minor counter; if that
minor counter was 255, all eight minors are cleared and the major counter is
incremented (`split_counter_inc`). An overflow means the other seven leaves
of the group have to be re-encrypted by the tree engine under the new major
value; the store controller only reports it (`ctr_overflow`).

The leaf counter blocks, in address order, are the hash input
`D[1], D[2], ..., D[m]`: leaf `a` belongs to block `i = a/8 + 1`.

## PXOR-Hash and its accelerator

For a key `K` and `L = E_K(0)` (AES-128), the tag of `D[1..m]` is

```
T = E_K(1*L ^ D[1]) ^ E_K(2*L ^ D[2]) ^ ... ^ E_K(m*L ^ D[m])
```

where `i*L` is a product in GF(2^128). Changing block `i` from `D` to `D'`
changes the tag by `E_K(i*L ^ D) ^ E_K(i*L ^ D')`, so the update costs two
AES calls regardless of memory size, and the full tag costs one AES call per
block. The tag never leaves the chip, which is why a keyed
almost-universal hash is enough here and a full MAC is not needed.

`gf128_mul_idx` forms `i*L` by shift-and-add over the bits of `i`, reducing
by x^128 + x^7 + x^2 + x + 1 (the usual PMAC polynomial; the field
polynomial is this design's choice). `aes128_enc_pipe` is a fully unrolled
AES-128 with one pipeline stage per round (latency 11, one block per cycle);
the round keys travel down the pipeline with the data, and the S-box is
computed at elaboration from its definition rather than stored as a table.

`pxor_hash_accel` puts the two together and offers three commands:

| command | what it does | result |
|---|---|---|
| `HOP_UPDATE` | `delta = E(iL^old) ^ E(iL^new)`, `upd_tag = tag_in ^ delta` | `upd_valid` 13 cycles after acceptance |
| `HOP_STREAM` | accumulates `E(iL^D[i])` from `cmd_first` to `cmd_last` | `tg_valid` 12 cycles after the last block |
| `HOP_GEN_L`  | `E_K(0)` | `l_valid` |

An update occupies the command port for two cycles (the two AES inputs enter
the pipeline back to back); a stream block takes one. Several commands may
be in flight; results come back in order as one-cycle pulses without back
pressure.

## Keeping leaves and tag consistent: the store sequence

The hard requirement is that the recovery tag always matches the leaf
counters that are, or will certainly be, in memory. A store may be cut off by
a crash at any point, so `crystalor_store_ctrl` runs one store at a time:

1. On `st_valid` it computes the new counter block, copies the request
   (leaf index, plaintext, old and new block) into a **non-volatile redo
   register**, and raises the **busy flag** (also non-volatile).
2. It asks the external encryption engine to encrypt the leaf under the new
   counter (`ae_*`).
3. In parallel it asks the accelerator for the tag update of block `i`.
4. When both answers are in, a single clock edge does all of: push the
   ciphertext entry into the write pending queue, write the new tag to the
   tag cache and the SRAM, drop the busy flag, advance the root counter and
   hand the new counter block to the tree engine (`ctr_*`).

Because step 4 is one edge, a crash leaves the system in one of two states:
busy flag down (the store either never started or is fully committed, with
its entry in the persistent queue) or busy flag up (nothing of the store is
committed, and the redo register holds everything needed to replay it). The
replay recomputes both the encryption and the tag update from the redo
register.

Commit timing: a store commits `lat + 3` cycles after it is accepted, where
`lat` is the longer of the encryption engine's latency and the
accelerator's 13 cycles. With an engine latency of `14 + l/128` cycles (22
for 1024-bit leaves) the engine is the slower one, so the tag update adds no
latency to a store.

The **write pending queue** (`wpq`, 8 entries) is the persistence domain: its
entries survive a crash and drain to memory on `mem_wr_*`. Each entry holds
the leaf index, the new counter block, the engine's tag, the root value after
this store ("Root+1") and the ciphertext, 1384 bits at the default size.
When it is full, stores wait.

The **root counter** (`tree_root_reg`) is a 56+8-bit split counter kept on
chip that advances with every committed store and is replaced by the new
root after recovery. Its width and its increment-per-store rule are this
design's choices.

## Recovery

`crystalor_recovery_ctrl` runs on `rec_start`, with stores and
configuration held off, in a fixed order. The order matters: the new tree is
built *before* the tag is checked, so that once the tag check passes no
earlier manipulation can still be exploited.

1. **Redo.** If the busy flag is up, the interrupted store is replayed
   through the store controller. The controller then waits for the write
   pending queue to drain, so memory holds every committed leaf.
2. **New tree.** Level by level from the leaves upward it reads every counter
   block of the level below (`rd_*`, pipelined, in-order responses on
   `rsp_*`), feeds them to `new_counter_unit`, and emits each new parent
   block on `nw_*` for the tree engine to MAC and write. The single top
   node becomes the new root.
3. **Tag check.** It reads all leaf counter blocks again, streams them
   through the accelerator as `D[1..m]`, and compares the result with the
   SRAM tag: `rec_ok` or `rec_err`.

### Why the new counters are safe

A parent node must get a counter value it has never had. The parent's
minor counter `j` counts updates of child node `j`, and a child node is
updated once for every update of any leaf below it, so an upper bound on the
number of times child node `j` can have been updated is enough. For a child
block with major counter `M` and minors `m0..m7`, every major increment
stands for at most `8*(2^8 - 1) + 1 = 2041` updates (all eight minors
filled to 255, then one more overflow), so the block has seen at most
`2041*M + m0 + ... + m7` updates. Summing this over the `BETA/8` child
blocks under parent node `j` gives `ub[j]`, and the new parent block is

```
major    = sum over j of floor(ub[j] / 256)
minor[j] = ub[j] mod 256
```

Example: a parent node with one child block `M = 2`, minors `3,0,...,0`
has `ub = 2*2041 + 3 = 4085`, so it contributes `15` to the major and gets
minor `245`. Because `ub` only grows as leaves are written, repeated crashes
also keep producing fresh values.

`new_counter_unit` accepts one child block per cycle. `in_node_last` closes
a parent node (after `BETA/8` child blocks), `in_blk_last` closes a parent
block (after 8 nodes, or fewer at the root). The result appears one cycle
after the last input. `out_overflow` flags a major sum that does not fit in
56 bits; the 96-bit accumulator is wide enough for any 16 child blocks.

### Cost

At the default size (arity 128, depth 5, 1024-bit leaves: 2^35 leaves,
4 TB) the tag check streams `m = 2^32` blocks at one per cycle, and the new
tree has `1 + 128 + ... + 128^4` nodes (about 2.7 * 10^8). The tree MACs are
computed by the external engine.

## Secure storage and the tag cache

`secure_sram` holds three 128-bit words: `K`, `L` and the recovery tag. It
is never reset. Writing the key through the `cfg_*` port makes the top run
`HOP_GEN_L` and store `L`. Writing the tag word sets the initial tag of a
freshly initialised memory (the tag of an all-zero memory must be provided by
software or produced by a recovery run).

`recovery_tag_cache` is a 128-bit register with a valid bit next to the
accelerator. Every tag update writes the register and, in the same cycle,
the SRAM (write-through). After a reset or a configuration write of the tag
it refills from the SRAM before the next store update is issued.

## Top level

`crystalor_top` parameters:

| parameter | default | meaning |
|---|---|---|
| `LEAF_W` | 1024 | leaf size in bits |
| `BETA` | 128 | tree arity (16 MAC input blocks x 8 nodes per block) |
| `DEPTH` | 5 | tree depth |
| `WPQ_DEPTH` | 8 | write pending queue entries |
| `ADDR_W` | 40 | leaf index width (35 bits needed at the defaults) |
| `IDX_W` | 40 | hash block index width (33 bits needed at the defaults) |

Port groups:

| group | direction | purpose |
|---|---|---|
| `clk`, `rst_n`, `nv_rst_n` | in | clock; crash reset of volatile state; first-power-on reset of persistent state (busy flag, redo register, queue, root) |
| `cfg_*` | in | write `K` (also computes `L`) or the recovery tag |
| `st_*` | in | store request: leaf index, plaintext, current counter block of its group |
| `ae_*` | out/in | request to and answer from the external authenticated-encryption engine |
| `ctr_*` | out | new leaf counter block for the tree MAC engine, with overflow flag |
| `mem_wr_*` | out | write pending queue drain to main memory |
| `rec_*` | in/out | start recovery; active, done, ok, error, counter overflow |
| `rd_*`, `rsp_*` | out/in | counter block reads during recovery (level, index) |
| `nw_*` | out | new tree node blocks during recovery |
| `busy_flag`, `root_major`, `root_minor`, `wpq_count` | out | status |

The accelerator is shared: recovery has priority, then `L` generation, then
store updates.

## What follows the published scheme and what is this design's own

Taken from the scheme: the split-counter format (56/8 bits, 8 nodes per
major counter), PXOR-Hash with `L = E_K(0)` and `i*L` masks over AES-128,
the two-call incremental update, the rate-1 full tag, 384 bits of secure
storage plus a 128-bit tag cache, the store steps (busy flag, non-volatile
copy of the inputs, parallel encryption and tag update, simultaneous queue
write and tag update), the 8-entry write pending queue whose entries carry
"Root+1", the recovery order (redo, new tree, tag check), the new-counter
equations, lazy recovery, and the default sizes (arity 128, depth 5,
1024-bit leaves, 4 TB).

This design's choices: all handshakes and port encodings; the field
polynomial; the fully unrolled AES pipeline; one store in flight at a time;
the two resets; the configuration port and `L` generation; the tag cache
refill rule; the root counter format; reading the leaf counters twice in
recovery (once for the tree, once for the tag); waiting for the queue to
drain before rebuilding; index widths of 40 bits; starting the tag update
from the store request, at the same time as the encryption, rather than from
the queued entry.

Not included: the leaf encryption engine and node MAC engine, the
re-encryption of sibling leaves after a minor overflow, caches, the metadata
cache, main memory, and a general atomic-persistency / redo-logging
mechanism beyond the single-store redo described above. The compact AES
engine (under 15 kGE) assumed by the scheme is replaced by an unrolled
pipeline, which is larger. The depth-7 configuration (arity 64) needs 42 leaf
index bits, so it requires `ADDR_W = 42`, `BETA = 64`, `DEPTH = 7`.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops; a watchdog counts a failure
if it hangs. Reference values come from `tb/tb_aes_ref_pkg.sv`, a separate
behavioural AES-128, field multiplication and PXOR-Hash term written
independently of the RTL. Example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb \
  rtl/crystalor_pkg.sv rtl/aes128_pkg.sv tb/tb_aes_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg) tb/tb_crystalor_top.sv \
  --top-module tb_crystalor_top
./obj_dir/Vtb_crystalor_top +verilator+rand+reset+2
```

| testbench | what it shows |
|---|---|
| `tb_aes128_enc_pipe` | FIPS-197 vectors and random blocks against the reference, one per cycle, latency 11 |
| `tb_gf128_mul_idx` | `i*L` against the reference multiplication |
| `tb_pxor_hash_accel` | updates, streamed tags and `L` against the reference; result latencies |
| `tb_secure_sram`, `tb_recovery_tag_cache`, `tb_tree_root_reg`, `tb_wpq` | storage, write-through/refill, root carry, queue order/full/empty |
| `tb_split_counter_inc`, `tb_new_counter_unit` | counter arithmetic, including overflows |
| `tb_crystalor_store_ctrl` | store sequence, commit timing, crash in mid-store followed by redo |
| `tb_crystalor_recovery_ctrl` | recovery on a small tree (arity 16, depth 2): new counters, root, tag ok and tag error |
| `tb_crystalor_top` | whole design at the default arity 128, depth 2, 256-bit leaves (16384 leaves): key load and `L`, stores with minor overflows, queue-full stalls, a crash with redo, recoveries that pass and one that detects a rolled-back leaf counter; counts each of these and fails if any never happens |
| `tb_crystalor_top_full` | whole design at default size: key load, tag set, three stores (one overflowing) with the tag, memory entry and root checked |

A recovery at the default size would stream 2^32 blocks and was not
simulated; the largest recovery simulated is the arity-128, depth-2 tree
(2048 leaf counter blocks) of the end-to-end testbench. The recovery
controller testbench also checks that, without memory stalls, leaf counter
blocks are read and hashed at one per cycle.
