# HPU: a processor for binary hyperdimensional computing

Hyperdimensional computing (HDC) stores information in very wide random binary
vectors (thousands of bits) and computes with a small set of element-wise
operations on them:

| Operation | Meaning | Hardware |
|---|---|---|
| bind (multiply) | combine two vectors into one unlike either | bitwise XOR |
| permute | mark position or order | cyclic shift by one bit |
| bundle (add) | a vector similar to all inputs | per-bit signed count, then sign |
| similarity | how alike two vectors are | Hamann similarity `D - 2*hamming(a, b)` |
| associative search | which stored vector is closest | argmax of similarities |

Classification (language, EMG gestures), factorization of bound vectors into
their factors, and similar HDC algorithms all reduce to these operations. This
RTL is a programmable processor for them. It has one datapath that encodes
(bind, permute, bundle, scaled bundle), and an associative memory spread over
several tiles that stores vectors and searches them. A host streams in one
instruction per cycle and moves vectors through an 8-bit port.

The default configuration is a D = 1024-bit datapath with M = 2 associative
memory (AM) tiles, 8-bit accumulators and 16 similarity registers per tile.

## Folds: vectors wider than the datapath

An algorithm can use any vector width that is a multiple of D. A vector of
f·D bits is handled as f *folds* of D bits, one after another. A fold
counter in the control unit (`fold_rst`, `fold_incr`) says which fold is
being processed. Kernels run their instruction sequence once per fold:

* Encoding kernels work fold by fold with no interaction between folds.
  They store one result row per fold.
* Similarity is summed over folds in the similarity registers. The first
  fold uses `simreg_load` and later folds use `simreg_add`. The argmax
  is taken once, at the end.

The hard part is the item vectors: the random vectors assigned to input
symbols. Storing f folds of every item would multiply item memory by f.
Instead, each item has one D-bit *seed*. Fold k of the item is the seed
after k steps of the cellular automaton rule 90 (CA90):

    next[i] = cur[i-1] XOR cur[i+1]      (indices modulo D)

CA90 of a random vector looks like a new random vector, so the folds act as
independent random parts of one long vector.

Computing fold k from the seed takes k steps. Each VMU (vector memory unit)
therefore keeps a **CA90 cache**: one row per seed, holding the latest fold
computed, plus a parity bit saying whether it is an even or odd fold. A read
of item row r at fold number F does one of three things:

| Fold | Cache state | Output | Cache write-back |
|---|---|---|---|
| F = 0 | any | the seed from the Seed SRAM | `{1, CA90(seed)}`, so fold 1 is ready |
| F > 0 | parity = F mod 2 | the cached word | none |
| F > 0 | parity ≠ F mod 2 | CA90(cached word) | `{F mod 2, that word}` |

Programs walk folds in order (0, 1, 2, ...). Under that rule the parity bit
is enough to tell "already advanced for this fold" from "one step behind".
Every read takes exactly one cycle, whatever the path.

* The cache is a dual-port SRAM, so the write-back never blocks the next read.
* Jumping back to fold 0 always works, because fold 0 reads the seed.
* Skipping folds, or reading at fold F after the cache was advanced past
  F + 1, returns the wrong fold. The program must avoid both.

## Block structure

```
hpu_top
 ├─ hpu_ctrl            instruction register, decode, control registers,
 │                      shared address registers
 ├─ hpu_am_tile × M     one associative-memory tile
 │   ├─ hpu_vmu         Seed SRAM, CA90 cache, partitioned Vector SRAM
 │   │   ├─ hpu_sram_sp (seed, 4 vector partitions)
 │   │   ├─ hpu_sram_dp (CA90 cache, D+1 bits wide)
 │   │   └─ hpu_ca90
 │   ├─ hpu_sim_accum   query and vector registers, similarity registers
 │   │   └─ hpu_similarity
 │   └─ hpu_local_argmax
 │       └─ hpu_argmax_tree
 ├─ hpu_hd_encoder      the encoding datapath
 │   ├─ hpu_binary_encoder  D × hpu_bcu
 │   ├─ hpu_scale_unit
 │   └─ hpu_acc_banks   2 × D × hpu_acc_unit
 ├─ hpu_global_argmax   (uses hpu_argmax_tree)
 └─ hpu_io_ctrl         8-bit data port, vector and integer buffers
```

`hpu_pkg` holds the opcodes, the instruction type, the argument field
helpers and the decoded-control struct.

### Vector memory unit (one per tile)

| Memory | Size per tile | Holds |
|---|---|---|
| Seed SRAM | 256 × D | item seeds; "item space" |
| CA90 cache | 256 × (D+1), dual port | latest fold of each item |
| Vector SRAM | 4 partitions × 128 × D | stored vectors, class vectors, temporaries; "vector space" |

Over the two tiles this is 512 seed rows, 512 cache rows and 1024 vector
rows.

* Addresses are `{space, row[8:0]}`.
* Vector rows 0–127 are partition 0, rows 128–255 partition 1, and so on.
* `part_set` switches partitions off per tile, to save power for small
  programs. A switched-off partition reads as all zeros and ignores writes.
* A store to item space writes a seed.

### Encoding datapath (shared by all tiles)

* The **Binary Encoder** is a ring of D one-bit cells. Each cell can:
  * load its input bit;
  * take the bit of its lower neighbour (permute: bit i gets bit i−1, bit 0
    gets bit D−1);
  * XOR its input bit into the stored bit (bind).
* The **Scale Unit** maps each bit of the Binary Encoder output to a signed
  8-bit value:
  * 1 becomes +s, 0 becomes −s;
  * s = 1 without scaling;
  * with scaling, s is a similarity register or the input integer buffer.
* There are two **accumulator banks**, each D saturating 8-bit accumulators.
  * A bank can be loaded or added to.
  * Sums clip at +127 and −128, and so do negated values.
  * A bank's thresholded output is the sign: 1 when the sum ≥ 0.
* The thresholded bank can be stored to memory. It can also be fed back into
  the Binary Encoder, for nested expressions such as binding a bundle with
  an item.

### Associative search (per tile, then global)

1. `query_load` puts the current fold of the query into the query register of
   every active tile.
2. `sim_compute` reads a row into each tile's vector register, together with
   a quantization shift.
3. The Hamann similarity is computed combinationally. It is shifted right
   (arithmetic shift) by the quantization amount and clipped to 8 bits.
4. `simreg_load`/`simreg_add` write it to, or add it into, one of the 16
   similarity registers. The add saturates.
5. The same step also copies the row address of that `sim_compute` into one
   of 16 **address registers**. These sit in the control unit and are shared
   by all tiles, because every tile compares the same row numbers.
6. `lcomp_set` selects, per tile, which similarity registers take part.
   `lcomp_load` registers each tile's maximum and its register index.
7. `gcomp_load` takes the maximum over the tiles. `gcomp_update` does the same
   but also includes the previous global result. A search over more vectors
   than there are registers therefore runs in rounds.

The global result is `{valid, tile, space, row}` of the winner and its
similarity. The host reads it with `obuff_vec_load` and `obuff_int_load`,
selecting the global source.

On ties, the lower register index wins and the lower tile wins. Registers
not selected by the mask never win, so a set of all-negative similarities is
handled correctly.

The address register keeps the row of the *last* fold compared into it. A
program that stores the folds of a class vector in consecutive rows gets the
row of the last fold back. The testbench uses this convention.

## Instruction stream and timing

There is no instruction memory. The host presents a 25-bit instruction
`{opcode[4:0], arg[19:0]}` on `instr_i` every cycle, and `nop` (all zeros)
when idle. The pipeline has three registers:

| Cycle | Stage | What happens |
|---|---|---|
| t | — | the instruction is on `instr_i`; it is captured at the clock edge ending cycle t |
| t+1 | stage 1 | control registers and the fold counter change at the end of the cycle; VMU reads start; input buffers load |
| t+2 | stage 2 | VMU data arrive; the Binary Encoder, accumulators, similarity and argmax registers, stores and output buffers update at the end of the cycle |
| t+3 | — | the results are visible, including on `io_data_o` |

One instruction issues per cycle with no stalls. A VMU read (stage 1) and
the computation on the previous read (stage 2) overlap.

The processor has no interlocks, so the program must respect two rules:

* **Store, then read.** A store to a single-port SRAM happens in stage 2. A
  read of the same SRAM in that same cycle, issued by the *next*
  instruction, loses its port. Leave one instruction (a `nop` will do)
  between a store and a read of the same memory. An assertion in `hpu_ctrl`
  reports violations in simulation.
* **Configuration changes.** A `tile_en_set`/`mem_en_set` takes effect for
  the reads of the instruction issued after it.

Reset (`rst_n`, active low, asynchronous) clears all registers and sets the
fold to 0. It leaves all tiles, VMUs and partitions enabled and all
comparator masks empty. SRAM contents are not reset.

## Instruction set

| Opcode | Name | Action |
|---|---|---|
| 00000 | `nop` | nothing |
| 00001 | `fold_rst` | fold := 0 |
| 00010 | `fold_incr` | fold := fold + 1 |
| 00011 | `ibuff_vec_load` | input vector buffer := input shift register |
| 00100 | `ibuff_int_load` | input integer buffer := `io_data_i` |
| 00101 | `be_perm` | Binary Encoder := permute(Binary Encoder) |
| 00110 | `part_set` | active partitions of tile `ctile` := mask |
| 00111 | `lcomp_set` | comparator mask of tile `ctile` := mask |
| 01000 | `tile_en_set` | active AM tiles := mask |
| 01001 | `mem_en_set` | enabled VMUs := mask |
| 01010 | `gcomp_load` | global result := argmax over active tiles |
| 01011 | `gcomp_update` | global result := argmax over active tiles and the previous result |
| 01100 | `lcomp_load` | each tile's local argmax over its masked registers |
| 10000 | `be_load` | Binary Encoder := VMU[tile][addr], or bank `bank` if `src` |
| 10001 | `be_mult` | Binary Encoder ^= VMU[tile][addr], or bank `bank` if `src` |
| 10010 | `obuff_vec_load` | output shift register := VMU[tile][addr], or the global result if `src` |
| 10011 | `mem_store_acc` | VMUs in `vmask`, row addr := thresholded bank `bank` |
| 10100 | `mem_store_ibuff` | VMUs in `vmask`, row addr := input vector buffer |
| 10101 | `mem_store_be` | VMUs in `vmask`, row addr := Binary Encoder |
| 10110 | `query_load` | query register of active tiles := VMU[addr] |
| 10111 | `sim_compute` | vector register of active tiles := VMU[addr], shift := `quant` |
| 11000 | `obuff_int_load` | output integer := similarity register `reg` of `tile`, or the global maximum if `src` |
| 11001 | `accbank_load` | bank `bank` := scaled Binary Encoder |
| 11010 | `accbank_add` | bank `bank` += scaled Binary Encoder (saturating) |
| 11011 | `simreg_load` | register `reg` of active tiles := similarity; address register `reg` := last row |
| 11100 | `simreg_add` | register `reg` of active tiles += similarity (saturating); address register as above |

The `accbank_*` instructions take `scale` (1 = scaled) and `src`. The scale
source is similarity register `reg` of `tile` when `src` = 0, and the input
integer buffer when `src` = 1.

The argument fields are:

| Bits | Field | Used by |
|---|---|---|
| [8:0] | row | memory instructions |
| [9] | space: 1 = Vector SRAM, 0 = item | memory instructions |
| [11:10] | tile | single-tile reads, similarity register reads, scaling |
| [12] | bank | accumulator and bank-source instructions |
| [13] | src | bank source, ibuff scale source, global output source |
| [17:14] | `reg`, `quant` or `vmask` | per instruction |
| [18] | scale | `accbank_*` |
| [15:0] | mask | `*_set` |
| [17:16] | ctile | `part_set`, `lcomp_set` |

Stores write every VMU in `vmask` that `mem_en_set` also enables. The same
vector can therefore go to several tiles in one instruction, which is how a
query reaches all tiles. `hpu_pkg::mk_arg` and `hpu_pkg::mk_cfg` build
arguments.

## Host port

* **Vector in.** Put a byte on `io_data_i` and assert `io_shift_in_i` for one
  cycle. Repeat D/8 times. The first byte becomes bits [7:0]. Then issue
  `ibuff_vec_load` and a `mem_store_ibuff`.
* **Integer in.** Hold the value on `io_data_i` while `ibuff_int_load` is in
  stage 1, one cycle after it is presented.
* **Vector out.** Issue `obuff_vec_load`. From cycle t+3, `io_data_o` shows
  bits [7:0]. Each cycle with `io_shift_out_i` high moves on to the next
  byte.
* **Integer out.** Issue `obuff_int_load`. From cycle t+3, `io_data_o` shows
  the signed 8-bit value. The next `obuff_vec_load` switches the pins back
  to the vector register.

## Programming the kernels

Per fold, with n inputs:

| Kernel | Sequence | Instructions |
|---|---|---|
| Ngram `a_n ^ p(a_{n-1} ^ ... p(a_1))` | `be_load a1`, then (`be_perm`, `be_mult a_i`) for i = 2..n, then a store | 2n per fold, plus the store and `fold_incr` |
| Multiply-add `sum(a_i ^ b_i)` | (`be_load a_i`, `be_mult b_i`, `accbank_add`) for each pair | 3n per fold |
| Associative search over c rows | `query_load`, then (`sim_compute`, `simreg_load/add`) for each row | 1 + 2c per fold, plus `lcomp_load` and `gcomp_load` once |
| Scaled accumulation (factorization) | (`be_load v_i`, `accbank_add` with scale from register i) | 2 per vector per fold |

Two of these counts differ from the instruction counts this architecture was
designed for:

* A search needs two instructions per compared row: one to read the row and
  one to choose which similarity register receives the result. The
  reference design counts a search as 2 + f instructions.
* Ngram and multiply-add match the reference counts (2nf and 3nf), apart from
  the store and the fold step.

## Capacity at the default size

| Workload | Needs | Fits |
|---|---|---|
| 1024-bit kernels | a few rows | yes |
| Language classification: 21 classes, 27 letters, f = 2 | 27 seeds, 42 class rows, 11 registers per tile | yes |
| EMG gestures: 64 channels, f = 1 | about 86 seeds (22 signal levels assumed), 5 classes | yes |
| Factorization: 3 factors × 64 items, f = 2 | 192 seeds, 64 similarities per factor | yes, with two rounds of 32 registers; the two fold partial sums stay in the two banks |
| Factorization at 16384 bits (f = 16) | depends on item count | only while a factor fits in 32 registers, or with the host re-inserting similarities through the integer buffer |
| Synthetic factorization: 9 × 70 items | 630 item seeds | no: there are 512 seed rows. At f = 1 the extra items fit as plain vectors; at f = 16 they do not |

The fold counter is 8 bits, so up to 256 folds (262 144-bit vectors) can be
addressed.

## Choices made where the architecture leaves room

These decisions are this implementation's own:

* Instruction width is 5 + 20 = 25 bits. The layout of the argument fields
  is this design's. The opcodes of `gcomp_update` (01011) and `fold_rst`
  (00001) were chosen here.
* SRAMs are plain arrays with registered reads and no reset. Reading the row
  being written returns the old word. A real chip would use foundry macros
  (8 macros of 128 bits side by side per memory).
* Quantized similarities are clipped to 8 bits before they are accumulated.
* The permute direction (bit i takes bit i−1) and the byte order of the host
  port.
* The port-conflict rule for a store followed by a read, instead of a stall.
* Ties in the argmax go to the lower index.
* The pad ring (IO cells and supply pads) is not modelled. The top-level
  ports stand for the signal pads. One of the 26 instruction pads of the
  fabricated chip has no function here.
* The FPGA test board that streams instructions and measures power is played
  by the testbenches.

## Simulation

Each `rtl/*.sv` file is one module or package. Each block has a
self-checking testbench, `tb/tb_<module>.sv`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example, the
full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb --top-module tb_hpu_top \
          rtl/hpu_pkg.sv tb/tb_hpu_top.sv -o vtop
./obj_dir/vtop
```

`tb_hpu_top` runs the processor at its default size, using only the
instruction and IO pins. It loads seeds and vectors through the port, then
runs:

* Ngram encoding over folds 0–2, which uses all three cache paths;
* multiply-add;
* ibuff-scaled accumulation that saturates;
* a nested bundle-then-bind through bank feedback;
* a two-fold associative search over 12 vectors in both tiles, in two
  comparator rounds;
* similarity-scaled accumulation;
* switching a partition off;
* disabling a tile;
* a check that an instruction's result reaches the pins after 3 cycles.

It counts each mechanism and fails if one never happened. It simulates in
under a second.

Two workload testbenches also run at full size and check every result
against a bit-exact model in the testbench:

* `tb_hpu_lang` is language-style classification at the benchmark's size:
  27 letter items, 21 classes and 2 folds. Each synthetic class is trained
  from 15 letter 4-grams. The six queries search both tiles in parallel and
  are all classified correctly.
* `tb_hpu_fact` is factorization of a product of 3 factors with 16 items
  each, at 2 folds. It runs six resonator iterations, each doing unbind,
  then similarity, then similarity-scaled bundling. It then decodes each
  factor with the argmax units and checks it against the true item.

The block testbenches compare against models written independently in the
testbench. Examples: a bit-serial CA90, integer Hamann similarity with
clipping, a fold-by-fold model of the CA90 cache, and a linear-scan argmax.
Several use reduced D to stay short.

Lint (`verilator --lint-only -Wall`) reports only unused-signal warnings,
plus one about `rst_n` being used by the assertion as well as by the
asynchronous resets.
