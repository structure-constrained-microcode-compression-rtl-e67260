# Compressed microcode store with a shared dictionary block

A microcoded CPU keeps its microcode in a wide, deep ROM, and that ROM costs area and power.
Most of its bits are redundant. Many microinstructions share the same bit patterns in groups of
columns that change together. This design stores the microcode in compressed form and rebuilds
each microinstruction on the fly:

* a **pointer array** holds, for every micro-address, short pointers plus the few columns that do
  not compress well (the *uncompressed columns*);
* **dictionaries** hold the distinct row patterns of each group (*cluster*) of columns;
* a **spreader** puts each dictionary's bits back into their original column positions.

The compressed store has exactly as many lines as the original ROM. The micro-address therefore
indexes it directly, with no address translation, and the microcode itself does not change.

What sets this design apart is that **every dictionary is the same memory block**: one
`DICT_LINES x DICT_COLS` layout, instantiated K times. A hand-built ROM block only has to be
designed and verified once. The cost is area: a dictionary smaller than the block leaves lines
or columns unused. The microcode is therefore clustered offline so that all clusters have about
the same width and the same number of patterns. That clustering is software and is not part of
this RTL. Its output is what the engine is parameterised and programmed with:

* the column map;
* the pointer-array contents;
* the dictionary contents.

## Rebuilding a microinstruction: the pipeline

```
 uaddr ──► ptr_array ──► [ uncompressed | ptr0 | ptr1 | ... ]      stage 1 (registered)
                               │          │      │
                               │          ▼      ▼
                               │      dict_block dict_block ...     stage 2 (registered)
                               ▼          │      │
                          stage-2 reg     │      │
                               └──► spreader ◄───┘  (wiring only)
                                        │
                                        ▼
                                      uinst
```

| clock edge | what happens |
|---|---|
| 0 | `addr_valid`/`uaddr` sampled; pointer-array line read |
| 1 | each dictionary reads the pattern its pointer selects; uncompressed bits copied to a stage-2 register |
| after 1 | `uinst_valid` high, `uinst` = spreader output |

The engine takes one fetch per clock and has a fixed latency of two clocks. It has no stall
input; an idle cycle is simply `addr_valid` low. Only the two valid bits are reset (synchronous,
`rst_n` low), and no memory is read while reset is held. The memories and their output registers
are not reset.

## The pointer word and the column map

These two tables carry the result of the clustering, so they need the most care.

**Pointer-array word** (`PA_W = N_UNCOMP + sum(PTR_W)` bits):

```
 MSB                                                           LSB
 [ ptr K-1 | ... | ptr 1 | ptr 0 | uncompressed columns N_UNCOMP-1..0 ]
```

`PTR_W[d]` is dictionary d's pointer width, ceil(log2 of its pattern count). Dictionaries may
have different widths. A narrower pointer is zero-extended to the block address, so a
dictionary with few patterns uses only the bottom lines of its block. `uc_pkg::ptr_offset()`
gives each pointer's bit position.

**Column map `COL_SRC`.** The spreader sees one source vector:

```
 src = { dict K-1 [DICT_COLS-1:0], ..., dict 0 [DICT_COLS-1:0], uncompressed [N_UNCOMP-1:0] }
```

`COL_SRC[c]` is the index into `src` that drives microinstruction bit `c`. For example, if
column 7 is the third column (j = 2) of dictionary 1, with `N_UNCOMP = 11` and
`DICT_COLS = 32`, then `COL_SRC[7] = 11 + 1*32 + 2 = 45`. The columns of one cluster need not
be adjacent in the microinstruction.

A cluster narrower than the block simply leaves some block columns unnamed. Those columns are
stored but never reach the output. Elaboration fails if an entry is out of range or two
columns name the same source.

Both tables are packed parameters of fixed maximum size: `uc_pkg::col_map_t` holds up to 256
columns and `uc_pkg::ptr_w_t` up to 16 dictionaries. Package functions build the common cases:

* `contiguous_col_map()`;
* `uniform_ptr_w()`.

## What sharing one block costs

For N lines, L columns, L0 uncompressed columns and K dictionaries, the compressed store takes

* with dictionaries built to size: `N*(L0 + sum ptr widths) + sum_i M_i*L_i` bits (M_i
  patterns, L_i columns);
* with one shared block: `N*(L0 + sum ptr widths) + K * max(M_i) * max(L_i)` bits.

Divided by `N*L`, these give the *regular* and the *structure-constrained* compression ratios.
When the clusters are similar in size the two are close. The configurations the testbenches
build reproduce these structure-constrained ratios:

| configuration | lines x cols | dictionaries (block) | uncompressed | pointer bits | ratio |
|---|---|---|---|---|---|
| default (desktop microcode "A") | 22,528 x 75 | 2 x (2,025 x 32) | 11 | 2 x 11 | 51.67 % |
| mobile microcode "C" | 5,632 x 236 | 8 x (595 x 26) | 28 | 8 x 10 | 55.07 % |
| mobile microcode "D" | 5,632 x 240 | 9 x (785 x 22) | 42 | 9 x 10 | 66.50 % |
| two-dictionary example | 2,000 x 54 | 2 x (500 x 34), holding 20 cols/500 pats and 34 cols/100 pats | 0 | 9 + 7 | 61.11 % |

In the last row the regular ratio is about 42%. That 19-point gap is the area the shared block
wastes when the two dictionaries are badly matched.

**Where the default numbers come from.** The following are published figures for that
microcode:

* 22,528 lines of 75 bits;
* two dictionaries of 32 columns;
* 75 − 64 = 11 uncompressed columns;
* a structure-constrained ratio of 51.67%.

The block depth is not published. The value 2,025 is the only depth consistent with those
figures: 11-bit pointers, and 22,528·33 + 2·2,025·32 = 873,024 bits, which is 51.67% of
1,689,600. The depths of the C and D configurations were found the same way.

A fourth, laptop-class configuration is published with 234 columns and 3 dictionaries of 24
columns. Those numbers are inconsistent with its stated ratio: the 162 columns left
uncompressed would alone exceed it. It is therefore not modelled.

The default column map is contiguous: dictionary 0 feeds columns 0–31, dictionary 1 feeds
32–63, and the uncompressed columns feed 64–74. The real clustering of that microcode is not
known. Supply your own `COL_SRC` for a real microcode.

## Filling the memories

The pointer array and the dictionaries stand for ROMs. There are two ways to give them
contents, and both are choices of this design:

* `INIT_FILE` on `ptr_array` / `dict_block`: a `$readmemh` image loaded at elaboration, as for
  a mask ROM. It is not brought out on the top; set it on the instances if you use it.
* **Programming ports** on the top:
  * `pa_ld_en/addr/data` writes a pointer-array word.
  * `dict_ld_en[d]` writes dictionary d, using the shared `dict_ld_addr/data`.

  An assertion forbids programming while a fetch is in flight.

Producing these contents from a microcode requires two steps:

1. Cluster the columns. This is offline software: a move/exchange search that minimises the
   shared-block size.
2. Collect each cluster's unique patterns, number them and write the pointers.

The testbenches do step 2 themselves on synthetic microcode. Step 1 is not provided.

## Files

| file | contents |
|---|---|
| `rtl/uc_pkg.sv` | table types, default configuration, layout functions |
| `rtl/ptr_array.sv` | pointer array + uncompressed columns, synchronous read |
| `rtl/dict_block.sv` | the shared dictionary block, synchronous read, pointer range assertion |
| `rtl/spreader.sv` | column placement from `COL_SRC` (no logic) |
| `rtl/uc_decomp_engine.sv` | top: two-stage pipeline joining the above |
| `tb/tb_ptr_array.sv`, `tb/tb_dict_block.sv`, `tb/tb_spreader.sv` | unit tests |
| `tb/tb_uc_decomp_engine.sv` | end to end, small configuration with interleaved clusters, uneven pointer widths, unused block lines/columns |
| `tb/tb_uc_decomp_full.sv` | end to end at the default parameters (22,528 lines) |
| `tb/tb_uc_workloads.sv`, `tb/tb_uc_workload_run.sv` | the C, D and two-dictionary configurations |

Every end-to-end test follows the same steps:

1. Generate a compressible microcode. The rows of each cluster are drawn from a pattern pool.
2. Compress it independently of the RTL.
3. Program the engine. Unused block lines and columns get random junk.
4. Fetch every address with random idle cycles.
5. Check each microinstruction bit for bit, and check its two-clock latency.

## Simulating

With Verilator 5 (any testbench; replace the name):

```
verilator --binary --timing --assert --top-module tb_uc_decomp_full \
    -y rtl -y tb +libext+.sv rtl/uc_pkg.sv tb/tb_uc_decomp_full.sv
./obj_dir/Vtb_uc_decomp_full
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The full-size run
takes well under a second.

## Limits and departures

* **Pipeline depth.** The exact pipeline organisation of the original engine is not known here.
  The two-stage split (pointer read, then dictionary read) and the valid-only handshake are
  choices of this design.
* **Programming ports.** The write ports and the no-programming-during-fetch rule are
  additions; a pure ROM would omit them.
* **Default configuration.** The block depth of 2,025 patterns and the contiguous default
  column map are reconstructions, not published data.
* **Not included:**
  * the offline clustering algorithm;
  * a microsequencer;
  * any real microcode contents.
* **Block composition.** Building a memory from smaller copies of a verified block (for
  example 1024×32 from two 512×32 halves) is a related reuse idea. It is not modelled.
