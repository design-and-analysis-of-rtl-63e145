# Smith-Waterman trace back and reconstruction engine

Smith-Waterman local alignment of two DNA sequences happens in three steps:

1. Fill a score matrix.
2. Find its highest cell.
3. Trace a path back from that cell to rebuild the two sequences with gaps inserted where they differ.

This engine does steps 2 and 3 in hardware for a 4x4 matrix. You give it:

- the 16 filled cells `z1..z16`;
- the sample sequence `s` and the target sequence `t`, four bases each.

One clock later it returns:

- `score_out`: the score of the traced path;
- `sout`, `tout`: the reconstructed sample and target, with gaps;
- `path_out`: the cells the path went through.

A new problem can be presented on every clock.

The engine is split into 18 blocks that run side by side:

- **comparator 1** picks the highest cell;
- **16 trace back sub-modules** `z1..z16`, one per cell, each able to trace from its own cell;
- **comparator 2** collects the result.

Only the sub-module of the winning cell is enabled. Each sub-module is a fixed, unrolled walk, so no control state machine is needed.

## Data conventions

| item | format |
|---|---|
| base codes | A = `000`, C = `001`, G = `010`, T = `100`, gap = `101` |
| `s`, `t` | 4 bases x 3 bits = 12 bits; the first base is in bits `[11:9]` |
| `z` | `logic [15:0][3:0]`; `z[0]` is `z1`. Row-major: `z1..z4` is row 1, `z13..z16` is row 4 |
| matrix axes | row *r* belongs to sample base `s_r`, column *c* to target base `t_c` |
| `sout`, `tout` | 12 bits, **right-aligned**: the last aligned pair is in `[2:0]`; unused leading fields stay `000` |
| `score_out` | 8 bits |
| `path_out` | 16 bits; bit *k-1* is set if cell `zk` lies on the path |

Unused leading fields are `000`, which is also the code for A. A 3-base result therefore cannot be told apart from a 4-base result that starts with A. The path mask removes the ambiguity: the alignment length is the number of bits set in `path_out`, up to 4.

## The trace back walk (`traceback_cell`)

This is the heart of the design and the part most worth understanding.

Sub-module `zK` starts at its own cell (row *r*, column *c*) and repeats the following:

1. Add the current cell's value to the score and mark the cell in the path mask.
2. Look at the three cells the alignment can have come from:
   - up: (*r*-1, *c*);
   - diagonal: (*r*-1, *c*-1);
   - left: (*r*, *c*-1).

   A neighbour outside the matrix counts as 0.
3. If all three are 0, the path ends here. Otherwise step to the largest neighbour. Equal values are resolved in the order **up, diagonal, left**.
4. Emit one aligned pair, chosen by the step taken out of the cell:

   | step out of the cell | pair emitted (sample, target) |
   |---|---|
   | diagonal, or end of path | (`s_r`, `t_c`) |
   | up | (`s_r`, gap) |
   | left | (gap, `t_c`) |

The first pair emitted, from the start cell, becomes the last base of `sout`/`tout`; each later pair moves one field to the left. The score is the sum of the cell values along the path, start cell included.

The walk is a plain `for` loop of 2N-1 = 7 iterations in an `always_comb`. Synthesis unrolls it into a chain of 7 stages. Each stage has three 4-bit muxes that read the neighbours at a data-dependent position, a three-way compare, and an adder. This chain is the engine's critical path.

A path can cover up to 7 cells: for example, from `z16` three steps up and three steps left. Only 4 pairs fit the 12-bit outputs, so the 4 pairs nearest the start cell are kept. The full path still shows in `path_out`.

### Worked examples

These four cases come with published results, and the design reproduces all of them:

| start cell | s | t | score | sout | tout |
|---|---|---|---|---|---|
| z16 (8) | ACGT | ACGT | 20 = 8+6+4+2 | `12'h054` (ACGT) | `12'h054` (ACGT) |
| z10 (3) | ACGT | AGTC | 6 = 3+1+2 | `12'h00A` (_ACG) | `12'h015` (_AG-) |
| z12 (3) | ATGG | TACG | 6 = 3+1+2 | `12'h022` (_ATG) | `12'h00A` (_ACG) |
| z7 (4) | ATGC | CATC | 6 = 4+2 | `12'h004` (__AT) | `12'h004` (__AT) |

The full matrices are in `tb/sw_ref_pkg.sv` (`example_vec`).

The z10 case fixes the tie rule. From `z10` the up neighbour `z6` and the diagonal neighbour `z5` are both 1, and only going up first gives the published target `_AG-`. So ties go up before diagonal, even though the usual description of Smith-Waterman gives the diagonal priority.

The two z10 and z12 cases also rule out "keep the path with the largest sum". For both, a longer zig-zag path sums to 7, yet the published score is 6. That is why the walk is greedy, one neighbour at a time.

### Choices in this design

The original design describes what each block does but not how it does it. The following are this design's own choices:

- **The walk itself.** The greedy largest-neighbour rule, its tie order and the pair emitted at each step were chosen so that the four examples above come out exactly.
- **Matrix orientation.** The sample is on the rows. This follows a recorded simulation of the z12 case and the z10 table. The tables printed for the z12 and z7 cases list `s` and `t` the other way round; their results are consistent with the two exchanged. The table above uses the orientation of this design.
- **Disabled or zero start.** A sub-module whose enable is low, or whose own cell is 0, outputs all zeros.
- **Path output.** The path is output as a 16-bit cell mask. Only its name is specified originally.
- **Truncation.** Paths longer than 4 pairs are truncated as described above.

## Comparators

**`comparator1`** compares the 16 cells and raises one enable, `out_en[k-1]` for cell `zk`:

- when several cells share the maximum, the lowest-numbered one wins, so exactly one sub-module runs;
- an all-zero matrix raises no enable, and the engine then outputs zeros;
- a concurrent assertion checks that the enables are one-hot or zero.

**`comparator2`** receives the score, sample, target and path of all 16 sub-modules and forwards the set with the highest score:

- the lowest-numbered sub-module wins ties;
- all-zero scores give zero outputs.

In the engine only the enabled sub-module has a non-zero score, so comparator 2 just passes its result along.

## Timing

Every block has a `REG_OUT` parameter, defaulting to 1:

- With 1, the block's outputs are registered, so each block on its own answers one clock after its inputs.
- With 0, the block is purely combinational.

The top, `sw_traceback_top`, instantiates comparator 1 and the 16 sub-modules with `REG_OUT = 0` and comparator 2 with `REG_OUT = 1`. As a result:

- the whole engine also answers one clock after its inputs;
- throughput is one alignment per clock;
- the clock period must cover comparator 1, the 7-stage walk and comparator 2. This is a long combinational path: the original layout closed timing at a 50-55 ns period.

`max_out`, the value of the highest cell, is registered alongside the result.

All resets are synchronous and active high (`rst`), and clear the registered outputs.

## Files

| file | contents |
|---|---|
| `rtl/dna_pkg.sv` | base codes, move type |
| `rtl/comparator1.sv` | highest-cell search, one-hot enables |
| `rtl/traceback_cell.sv` | one trace back and reconstruction sub-module (`K` = its cell) |
| `rtl/traceback_recon.sv` | the array of N*N sub-modules |
| `rtl/comparator2.sv` | selection of the best result |
| `rtl/sw_traceback_top.sv` | the engine |
| `tb/sw_ref_pkg.sv` | reference model, worked examples, random matrix generators |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/sw_traceback_n9_tb.sv` | the engine built for 9-base sequences |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | matrix is N x N; sequences have N bases |
| `ZW` | 4 | bits per matrix cell |
| `SCW` | 8 | bits of the path score (a 7-cell path of 15s is 105, 7 bits) |
| `OUT_LEN` | 4 | bases in `sout`/`tout` |
| `K` | 16 | (`traceback_cell` only) the cell this sub-module starts from, 1..N*N |
| `REG_OUT` | 1 | (blocks only) register the outputs |

The RTL is written for any `N`. The block testbenches and their reference model use the 4x4 default. `tb/sw_traceback_n9_tb.sv` builds the engine for 9-base sequences, with:

- `N = 9`;
- `OUT_LEN = 17`, enough for any path;
- `SCW = 8`, which holds the worst case (2N-1)·(2^ZW-1) = 255.

It runs a standard 9x9 illustration matrix (GTCTATCAC against ATCTCGTAT) and random 9x9 problems.

The walk grows to 2N-1 stages, so the one-clock critical path grows with it.

## Verification

Each testbench compares the hardware with `sw_ref_pkg`, a reference model written independently of the RTL. The model uses integer matrices and queues. The testbenches also:

- check every published example;
- check the one-clock latency: outputs hold until the rising edge and change right after it;
- end with a line `TB_RESULT checks=N failures=M`;
- stop through a watchdog if they hang.

The input vectors include:

- proper Smith-Waterman matrices of random sequences (match +2, mismatch -1, gap -1);
- random matrices;
- small-valued matrices full of ties.

The end-to-end test, `sw_traceback_top_tb`, runs the engine at its default size and feeds one problem per clock. It counts, and requires at least once, each of these cases:

- equal maxima;
- an all-zero matrix;
- up steps (gaps in the target);
- left steps (gaps in the sample);
- an up/diagonal tie;
- a path longer than the 4-base output;
- a path ending on an inner zero;
- a path ending at the matrix edge;
- a synchronous reset in the middle of the stream.

Running it with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/dna_pkg.sv tb/sw_ref_pkg.sv tb/sw_traceback_top_tb.sv \
    --top-module sw_traceback_top_tb -o simv
./obj_dir/simv
```

For another block, replace the testbench file and top module name, for example `tb/traceback_cell_tb.sv` and `traceback_cell_tb`.

## Limits

- Only steps 2 and 3 of Smith-Waterman are covered. The score matrix must be filled elsewhere.
- The design has been simulated but not characterised for timing, area or power.
- Outputs hold at most `OUT_LEN` pairs. Longer paths lose their oldest pairs from `sout`/`tout`.
- The walk follows the greedy rule above. This is not textbook Smith-Waterman trace back, which follows the cell each value was computed from. On a proper Smith-Waterman matrix the two usually agree, but not always.
