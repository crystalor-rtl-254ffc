# Crystalor: fast crash recovery for an encrypted persistent memory

## The problem and the idea

A persistent (non-volatile) main memory that is encrypted and authenticated
needs a tree of counters and MACs: every 1024-bit leaf is encrypted under a
per-leaf counter, and a tree of counter blocks and MACs protects those
counters against replay. The upper nodes of that tree normally live in an
on-chip cache and reach the memory late. So after a power loss the copy of the
tree in the memory is stale. It would have to be rebuilt and checked
node by node, which for terabytes of memory takes a long time.

Crystalor avoids that with a small change:

* **One leaf tag on chip.** The chip keeps a single 128-bit tag over all *leaf
  counter blocks* of the tree, in a persistent on-chip register. It is a keyed
  hash (PXOR-Hash) whose key never leaves the chip.
* **Cheap update on every store.** Each term of the hash depends on one counter
  block only. A store that changes one block therefore updates the tag with
  two AES calls. They run in parallel with the tree engine's own work, so they
  add nothing to store latency.
* **Throw the old tree away after a crash.** Recovery does not try to repair
  the stale intermediate nodes. It computes fresh ones from the leaf counters.
  Each new counter is large enough to be above any value the old node
  could ever have reached. No old (node, counter, MAC) triple can then be
  replayed. The leaf counters themselves are checked by recomputing the leaf tag
  and comparing it with the on-chip register.
* **Lazy leaf check.** The leaf data is not touched during recovery. The
  authenticated encryption of each leaf still catches tampering the first time
  the leaf is read.

The tree engine itself (a parallelizable tree with 128-ary nodes, "ELM") and
the memory are outside this RTL. This RTL is the Crystalor part: the on-chip
secure registers, the PXOR-Hash engine, the store-side sequencing with its
crash-atomic commit, and the recovery sequencer with the new-tree arithmetic.

## Main configuration

| Parameter | Default | Meaning |
|---|---|---|
| `ARITY` | 128 | tree arity |
| `DEPTH` | 5 | tree depth; `ARITY^DEPTH` = 2^35 leaves of 128 B = 4 TiB |
| `K_SHARE` | 8 | nodes sharing one major counter (split counters) |
| `L_MA` / `L_MI` | 56 / 8 | major / minor counter bits; one counter block = 56 + 8*8 = 120 bits |
| `LEAF_BITS` | 1024 | leaf size; ELM output = leaf ciphertext + 128-bit AE tag = 1152 bits |
| `WPQ_DEPTH` | 8 | write pending queue entries |

Derived widths at the defaults:

* leaf address: 35 bits
* leaf counter blocks: 2^32
* PXOR-Hash block index: 33 bits (indices 1 to 2^32)
* NV-register / WPQ entry: 35 + 120 + 1152 = 1307 bits

The ELM engine is assumed to take about 30 cycles per update.

## PXOR-Hash, the leaf tag

Let the counter blocks be D[1..m], zero-padded to 128 bits, and let K be the
key. Then

    L = AES_K(0)
    T = XOR over i of AES_K( i*L  xor  D[i] )

Here i*L is a product in GF(2^128), with reduction polynomial x^128 + x^7 +
x^2 + x + 1. When D[i] changes to D'[i]:

    T' = T xor AES_K(i*L xor D[i]) xor AES_K(i*L xor D'[i])

Block index i is the leaf counter block number plus one. Index 0 is never
used, so the mask is never zero.

* `gf128_mul_idx` forms i*L. It XORs L*x^j over the set bits j of i. The
  index is short (33 bits), so this is a combinational network and needs no
  full 128x128 multiplier.
* `aes128_pipe` is a 10-stage fully pipelined AES-128. It has an on-the-fly
  key schedule and an S-box computed from the GF(2^8) inverse, so there are no
  tables. Latency is 10 cycles, one block per cycle.
* `pxor_hash` puts one AES pipeline behind three request kinds:
  * `PH_UPDATE`: the two calls in consecutive cycles. It returns their XOR
    ("delta").
  * `PH_GEN`: one TagGen term per cycle, added into an accumulator.
  * `PH_RAW`: plain AES_K(x), used once to derive L.

## Stores and the crash-atomic commit

`store_ctrl` handles one store at a time. The caller gives the leaf address
and the leaf's current counter block.

1. **Accept.** `sc_ctr_update` applies the split-counter rule. The leaf's minor
   counter is incremented. If it was all ones, the major counter is
   incremented and all minors of the block are cleared instead, and
   `elm_req_ovf` tells the tree engine that siblings need re-encryption. The
   new block goes to the ELM engine (`elm_req_*`). In the same cycle the delta
   for the old and new block is requested from PXOR-Hash.
2. **Stage.** When both answers are in, these go into the on-chip
   *non-volatile register* (`nv_stage_reg`) in one edge, and its flag is
   raised:
   * leaf address, new counter block, ELM output
   * the new tag, `tag_cache xor delta`
3. **Commit.** While the flag is up and the WPQ has room, the entry is pushed
   into the WPQ. In the same edge the new tag is written to the Leaf TAG
   register and its cache, and the flag is lowered.

The WPQ drains to the NVM through `nvm_wr_*`. Each completed write also
advances the on-chip root counter.

**What survives a crash.** In this RTL, `rst_n` models a reboot after power
loss.

* Persistent (no `rst_n`; only `nv_clear` at provisioning clears them): K, L,
  the Leaf TAG register, the NV register with its flag, the WPQ with its busy
  flags and pointers, and the root counter.
* Volatile (reset by `rst_n`): the tag cache (reloaded from the register one
  cycle after reset), the controllers, and the AES pipeline.

The outcome of a crash depends on when it hits:

* **Before staging.** The store is lost as a whole. The tag was not touched.
* **After staging.** The flagged entry is still in the NV register after the
  reboot. The same commit path moves it, together with its tag, so WPQ
  contents and leaf tag always agree.

## Recovery: the new tree

`recovery_ctrl` accepts three commands:

* `CMD_SETUP`: after a key load, derives L.
* `CMD_INIT`: computes the first leaf tag over the leaf counters in the
  memory. This is for a fresh memory whose counters are not all zero.
* `CMD_RECOVER`: runs three steps strictly in order:
  1. Wait until the NV register and the WPQ have drained into the memory
     (`drained`).
  2. Rebuild the tree bottom-up, one level at a time.
  3. Read all leaf counter blocks again and compare their PXOR-Hash TagGen
     with the Leaf TAG register. The result is `verify_ok` or `verify_err`.

Step 2 works as follows, for a parent node j whose children are held in
counter blocks i' (major `Ma`, minors `mi`):

    ctr_pa[j] = sum over child blocks i' of ( Ma[i'] * (K*(2^L_MI - 1) + 1) + sum of its minors mi[i'][*] )
    new major of the parent block = sum over its K nodes of floor(ctr_pa[j] / 2^L_MI)
    new minor of node j           = ctr_pa[j] mod 2^L_MI

Why this works:

* Every minor overflow of a child adds one to its major counter.
* Every update of a child also updated the parent's counter.
* So `ctr_pa` is at least the number of updates the parent can have seen.
* The resulting major/minor pair is therefore never below the parent's old
  nonce.

`newtree_ctr` takes one child counter block per cycle and emits the parent
block one cycle after its last child. New blocks leave on `meta_wr_*`, where
the tree engine picks them up to compute the new MACs. The level-0 block
becomes the new on-chip root counter.

Recovery runs in about `sum_p ARITY^(p+1)/K_SHARE` + `ARITY^DEPTH/K_SHARE`
cycles, plus memory stalls. At the defaults that is roughly 2 x 2^32 reads.

## Interfaces and timing

`crystalor_top` brings out these ports:

* `nv_clear`
* `key_wr`/`key_in`
* the command handshake `cmd_*`
* the store handshake `st_*`
* the ELM request and response `elm_*`
* the WPQ-to-NVM write `nvm_wr_*` (ready = durable)
* metadata reads and writes by level and block index `meta_*`
* `root_blk`

Timing details:

* **Handshakes.** All handshakes are valid/ready, sampled on the rising edge.
  ELM responses and metadata read responses arrive in order and cannot be
  stalled.
* **Store path.** A store can be accepted when `st_ready` is high. The
  PXOR-Hash delta is ready 12 cycles after acceptance. With a 30-cycle ELM,
  staging follows the ELM answer by one cycle and the commit by one more.
  So Crystalor adds two cycles to a store's path to the WPQ and none to the
  ELM computation.
* **Refused stores.** Stores are refused while a command runs or while the tag
  cache reloads after reset.
* **Setup.** `CMD_SETUP` finishes within 16 cycles of being taken (AES latency plus handshakes).

## Where this RTL departs from the original design, and what it assumes

* The ELM engine, the NVM, the memory controller with its metadata cache,
  redo logging and the power-fail domain are outside this RTL.
* Only one store is in flight at a time. The original design pipelines
  the store path through the AES engine.
* Recovery reads the leaf counter level twice: once for the new tree, once
  for the tag check. This keeps the two steps strictly ordered. The original
  design counts the leaf metadata read once.
* `CMD_INIT` (tag initialisation) and the command interface are additions.
* Several choices are this design's own:
  * the GF(2^128) bit order
  * the block layout `{major, minor[K-1..0]}`, zero-padded to 128 bits
  * block indices starting at 1
  * the 10-cycle AES pipeline
  * the wrap of major counters at 2^56
* The new tag is stored next to the staged data in the NV register. That
  makes the tag update and the WPQ push one atomic step across a crash.

## Verification

Each block has a self-checking testbench in `tb/`. It compares against
independent reference models. `tb/aes_ref_pkg.sv` holds a straightforward AES
and i*L model and is checked against the FIPS-197 vector. Each testbench
prints `TB_RESULT checks=N failures=M`.

* `tb_crystalor_top` runs the design end to end at a small tree: arity 4,
  depth 3, 2-bit minors, a 4-entry WPQ. It covers:
  * stores with minor and root overflows
  * NVM stalls that fill the WPQ
  * a crash with the NV register flagged and the WPQ full
  * recovery with the new tree checked block by block against the equations
  * the recovery cycle bound
  * detection of a rolled-back leaf counter
* `tb_crystalor_full` runs the top at the default size. It covers:
  * setup
  * eight stores across the whole 35-bit leaf range, with overflows
  * draining
  * checks of the tag, ELM and NVM traffic, and root counter
* `tb_recovery_cost` runs the recovery sequencer alone on a tree of arity 16
  and depth 3 with the full 56/8-bit counter format (4096 leaves). It counts
  the work of a recovery against the closed form:
  * b^d/8 = 512 PXOR-Hash terms
  * sum of b^(i-1) = 273 new node counters, in 35 counter blocks
  * 1058 reads, done in 1084 cycles when the memory never stalls
* Recovery and `CMD_INIT` at the default size read 2^32 blocks and were not
  simulated. The largest tree recovered in simulation has 4096 leaves.
  At the defaults a recovery takes about 2 x 2^32 + 2^25 reads, so about
  8.6 x 10^9 cycles if the memory delivers one counter block per cycle.

Simulating with Verilator, for example the end-to-end test:

    verilator --binary --timing -y rtl +libext+.sv -Itb \
        rtl/aes_pkg.sv rtl/crystalor_pkg.sv tb/aes_ref_pkg.sv tb/tb_crystalor_top.sv \
        --top-module tb_crystalor_top
    ./obj_dir/Vtb_crystalor_top

Run this from the directory that holds `rtl/` and `tb/`. Modules are found in
`rtl/` by name; packages are listed first. Swap in another `tb/tb_*.sv` and
its module name for the other tests (drop `tb/aes_ref_pkg.sv` for the benches
that do not import it). All widths follow
from the parameters on `crystalor_top`, so a different tree (for example
`ARITY=64, DEPTH=7`) needs only a parameter change.

The full design synthesises to about 67k generic cells and 4.4k flip-flops,
plus 15k bits of persistent storage (NV register and WPQ).
