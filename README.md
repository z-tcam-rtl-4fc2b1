# Z-TCAM: a ternary CAM made of plain SRAM

A ternary CAM (TCAM) stores words whose bits are 0, 1 or x (don't care) and,
given a key, returns the lowest address whose word matches it. Real TCAM
cells are large, slow and expensive. Z-TCAM gets the same answer from
ordinary memories read in a fixed three-stage sequence. It has no
match-lines and no comparators. The search takes one key per clock and
always takes four clocks, whatever the table holds.

This RTL is parameterised. Its defaults give a 64-entry, 32-bit TCAM built
as 4 layers of 16 entries, with each key cut into 4 sub-words of 8 bits.

## The idea: turn a table into lookups

Cut the ternary table two ways:

* **Columns.** Split each C-bit word into N sub-words of w = C/N bits
  (sub-word 1 is the most significant).
* **Rows.** Split the DEPTH entries into L *layers* of K = DEPTH/L
  consecutive entries.

Each piece (one layer × one sub-word position) is a small K × w ternary
table. Expand its x bits into every value they stand for: the sub-word
`0x` stands for both `00` and `01`. For every w-bit value s you can then
record *which of the layer's K entries accept s in this position*. That is
a K-bit set.

An entry matches the key exactly when it accepts every sub-word of the
key. So the matching entries of a layer are the bitwise AND of N K-bit
sets, one looked up per sub-word. Nothing else is needed: no comparison
is ever made at search time.

Each layer keeps three memories per sub-word position:

| memory | size | contents |
|---|---|---|
| VM, validation memory | 2^w × 1 | 1 if value s occurs in any entry of the layer |
| OATAM, OAT address memory | 2^w × w | for a value that occurs: which OAT row holds its K-bit set |
| OAT, original address table | 2^w × K | the K-bit sets; bit i is entry `layer*K + i` |

The VM is a fast "is this sub-word present at all" filter. The OATAM adds
one level of indirection: sub-words that occur are numbered 0, 1, 2, … in
ascending order, and the OAT is read at that number. With the OATAM sized
2^w × w, the OAT can hold one row for every possible sub-word, so this
indirection never runs out of rows.

### Worked example

This is the 4 × 4 table, with N = 2, L = 2 and w = K = 2, that
`tb_ztcam_example` checks word by word:

| address | word | layer |
|---|---|---|
| 0 | `00 11` | 1 |
| 1 | `01 01` | 1 |
| 2 | `0x 11` | 2 |
| 3 | `11 1x` | 2 |

Layer 2, sub-word position 1: the values `00` and `01` come from `0x`
(entry 2), and `11` comes from entry 3. So VM = {00, 01, 11}. The OATAM
maps 00→0, 01→1 and 11→2. The OAT rows are {2}, {2} and {3}.

Layer 2, position 2: `11` comes from entries 2 and 3, and `10` from entry
3 via `1x`. So the OATAM maps 10→0 and 11→1, and the OAT rows are {3} and
{2, 3}.

Searching `0011` in layer 2:

1. The VMs accept `00` and `11`.
2. The OATAMs give rows 0 and 1.
3. The OATs give {2} and {2, 3}. Their AND is {2}, so the layer reports
   address 2.

Layer 1 reports address 0. The final priority encoder returns 0.

## Search pipeline

`ztcam` slices the key and sends the N sub-words to all L layers at once.
Inside a layer (`ztcam_layer`), each memory has a registered read:

| clock edge | stage |
|---|---|
| 1 | The VMs are read at the sub-words. The sub-words are registered. |
| 2 | The *activation* signal is the AND of the N VM bits (`ztcam_and1`). If it is high, the OATAMs are read at the registered sub-words. |
| 3 | If the search is still alive, the OATs are read at the OATAM outputs. Then the K-bit AND (`ztcam_andk`) and the layer priority encoder (`ztcam_lpe`) settle combinationally: the layer's potential match address (PMA) is valid. |
| 4 | The CAM priority encoder (`ztcam_cpe`) registers the result of the lowest-numbered layer that hit: `ma_valid`, `match`, `ma`. |

So a PMA is ready three clocks after its key and the match address four
clocks after. A new key can enter on every clock.

A layer reports a mismatch in two different ways:

* **A VM rejects a sub-word.** Activation stays low. The OATAM and OAT
  reads are skipped and their outputs hold.
* **Every sub-word is present, but never in one entry.** The K-bit AND
  comes out zero.

Two valid bits, "search in flight" and "search still alive", travel with
each search. They are the only state that reset clears.

## Priority

Several entries can match one key. As in a conventional TCAM, the lowest
address wins:

* The LPE picks the lowest set bit of the K-bit AND.
* Layer l holds addresses l·K to l·K+K−1, so the CPE picks the
  lowest-numbered layer that hit.

The PMA a layer reports is already a full table address: the layer's base
plus the LPE index.

## Loading a table

The search hardware does not interpret ternary words. A table is loaded
by writing the memory words that the mapping above produces. The write
port takes one word per clock:

| signal | meaning |
|---|---|
| `wr_layer`, `wr_part` | which layer and which sub-word position (0 = sub-word 1) |
| `wr_mem` | `MEM_VM`, `MEM_OATAM` or `MEM_OAT` (`ztcam_pkg::mem_sel_e`) |
| `wr_addr` | the sub-word value, or the row number for the OAT |
| `wr_data` | right-aligned data: 1 bit for the VM, w bits for the OATAM, K bits for the OAT |

To load a table, do this for each layer l and position n, visiting the
sub-word values s = 0 … 2^w − 1 in order:

1. Form the set of entries e = l·K + i whose sub-word n accepts s. An
   entry accepts s when `((s ^ value) & care) == 0`, where care is 0 at
   the x bits.
2. If the set is empty, write VM[s] = 0.
3. Otherwise write:
   * VM[s] = 1
   * OATAM[s] = r
   * OAT[r] = the set

   Here r is a counter that starts at 0 for each (l, n) and goes up by
   one each time a set is written.

`tb/ztcam_map_model.sv` does exactly this and is the reference for
writing a loader.

The memories are not reset. Every VM word of every layer and position
must be written before the first search. OATAM and OAT words of absent
sub-words are never read.

Writes may share a clock with searches. A search that reads a word in the
same cycle it is written sees the old word. Updating a single entry means
recomputing the affected sets; incremental update is not provided.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `C` | 32 | bits per entry (must be a multiple of N) |
| `DEPTH` | 64 | entries (must be a multiple of L) |
| `L` | 4 | layers |
| `N` | 4 | sub-words per key |

The derived values are w = C/N and K = DEPTH/L. The total storage is
L·N·2^w·(1 + w + K) bits. At the defaults that is 102,400 bits, 50 times the
64 × 32 = 2,048 ternary cells of the table itself. Smaller w shrinks the
memories exponentially. Larger N costs only more, smaller memories and a
wider AND.

The same RTL was also simulated at 512 × 36 with (L, N) = (2, 4), (4, 4),
(2, 3) and (4, 3), and at 64 × 32 with (2, 4). At (2, 3), w = 12 and
K = 256, and the OATs alone take 2·3·4096·256 ≈ 6.3 Mbit.

## Files

`rtl/`:

* `ztcam_pkg.sv`: the memory-select enum and a width helper.
* `ztcam.sv`: the top. Splits the key, holds L layers and the CPE, and
  decodes `wr_layer`.
* `ztcam_layer.sv`: one layer. Holds the N VM/OATAM/OAT triples, the two
  ANDs, the LPE and the valid pipeline.
* `ztcam_vm.sv`, `ztcam_oatam.sv`, `ztcam_oat.sv`: the three memories.
  Each is an array with a registered read and a separate write port, so it
  maps onto simple dual-port block RAM or an SRAM macro.
* `ztcam_and1.sv`, `ztcam_andk.sv`, `ztcam_lpe.sv`, `ztcam_cpe.sv`: the
  ANDs and the priority encoders.

`tb/`:

* `tb_ztcam.sv`: the full-size end-to-end test at the defaults. It loads
  two random tables one after the other and runs 4,000 searches on each,
  one per clock. It checks every result against a direct ternary match,
  and checks the 3- and 4-clock latencies. It also requires each of these
  cases to have occurred at least once:
  * a VM rejection
  * an empty K-bit AND
  * a layer with several matches
  * several layers matching together
  * a match through x bits
  * a miss
  * back-to-back searches
* `tb_ztcam_example.sv`: the worked example above. It checks every memory
  word of layer 2 and the PMAs and match address of key `0011`.
* `tb_ztcam_workloads.sv` with `ztcam_workload_run.sv`: the six sizes
  listed above, run side by side.
* `tb_ztcam_layer.sv`: layer 2 of the example, with memory words written
  by hand and each stage checked, plus a random default-size layer.
* `tb_ztcam_vm.sv`, `tb_ztcam_oatam.sv`, `tb_ztcam_oat.sv`,
  `tb_ztcam_and1.sv`, `tb_ztcam_andk.sv`, `tb_ztcam_lpe.sv`,
  `tb_ztcam_cpe.sv`: unit tests.
* `ztcam_map_model.sv`: the mapping and reference search used by the
  tests above.

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ztcam_pkg.sv \
    tb/tb_ztcam.sv --top-module tb_ztcam -o sim
./obj_dir/sim
```

Replace `tb_ztcam` with any other testbench name. All of them run in
seconds. Lint the design with
`verilator --lint-only -Wall -Irtl rtl/ztcam_pkg.sv rtl/ztcam.sv`.

## What is specified and what is chosen here

The following follow the published architecture:

* the partitioning into layers and sub-words
* the three memories per partition and their sizes and meanings
* the VM filter gating the OATAM read
* the two ANDs and the two priority encoders
* PMA three clocks after the key and match address four clocks after
* one search per clock
* the ascending numbering of OAT rows, which reproduces the published
  example

The following are choices made in this RTL:

* **Priority:** lowest address first, in both encoders. The architecture
  only says that an address is selected; its example agrees with this
  rule.
* **OAT bit order:** bit i stands for the layer's i-th entry.
* **Read timing:** every memory has a registered read. The stage
  boundaries follow from this.
* **OAT read enable:** the activation signal, delayed one clock, enables
  the OAT read.
* **Reset and valid flags:** `rst_n` (synchronous, active low) clears the
  valid flags; `search_valid`, `res_valid` and `ma_valid` mark searches.
* **Loading:** the write port and its encoding are this design's own.
  Loading is done in software; there is no hardware that computes the
  mapping from a ternary table. The architecture treats that processing
  as done before the memories are written.
* **Memory build:** the memories are generic arrays. An ASIC build would
  replace them with SRAM macros of the same shape.

Known limits:

* Storage grows as 2^w, so w must stay small. This sets how finely a wide
  key has to be cut.
* Only sizes with C divisible by N and DEPTH divisible by L are accepted.
