# Table-lookup converters between binary and residue numbers

A residue number system (RNS) represents an integer `u` by its remainders
`|u|_m1, ..., |u|_mr` modulo a set of pairwise coprime moduli. Arithmetic is fast
and carry-free in that form, but only if getting into and out of it is cheap too.
This RTL implements both conversions with small lookup tables, adders and
pipeline registers:

* **binary to residue**: two versions. One is a fully pipelined tree converter
  that accepts a number every clock. The other is a small serial converter that
  takes one digit per clock.
* **residue to binary**: a pipelined converter based on the Chinese remainder
  theorem. It groups several residues into one table ("high radix") and reduces
  modulo `M` with one table lookup.

The default configuration uses the moduli `{2,3,5,7,11,13,17,19}`, with dynamic
range `M = 9,699,690` (24 bits). On the binary side it uses 8 digits of radix 16
(32-bit numbers).

## Binary to residue: digit tables plus modular sums

Write `u = sum u_i R^i` with digits `u_i` of radix `R`. Then

    |u|_m = | sum_i |u_i R^i|_m |_m

Each term `|u_i R^i|_m` comes from a lookup table indexed by the digit and its
position, so no division is needed. Using a large radix `R = 2^q` (here
`q = DIGIT_W = 4`) cuts the number of terms, and so the number of additions, by
a factor of `q`. The price is tables that are `2^q / 2q` times larger in total.
Radix 16 keeps each table at 16 entries. Because `R` is a power of two, no radix
conversion is needed: a digit is simply a 4-bit field of the binary input.

Every modular addition uses a *tabular modulo-m adder* (`mod_adder_table`). A
plain binary adder produces `a+b` in `[0, 2m-2]`, and a `2m-1`-entry table maps
that sum back into `[0, m-1]`. Changing the modulus only changes table contents.

### Pipelined tree converter (`b2r_tree_converter`)

There is one row per modulus (`b2r_tree_channel`). Each row has `n` tables, one
per digit position, each holding `|d * R^i|_m` for `d = 0..R-1`. A balanced
binary tree of `n-1` modular adders sums the table outputs. Registers sit after
the tables and after every tree level. The latency is therefore
`1 + ceil(log2 n)` clocks (4 at the defaults), and a new number enters every
clock. In total there are `r*n` tables and `r(n-1)` adders.

### Serial converter (`b2r_serial_converter`)

For a smaller area, each modulus gets a single general table
(`b2r_serial_channel`). It is indexed by `{i, u_i}` and holds all `n` position
weights, which is `n * 2^q` entries. Each modulus also gets one modular adder
whose output feeds back through an accumulator. The input is loaded into a shift
register that moves one digit right per clock, so the digit at the bottom is
`u_i` while the position counter holds `i`.

Handshake: `start` (ignored while `busy`) loads `u`. After `n` clocks of
lookup-and-add, `done` pulses for one clock, `n + 1` clocks after the start
clock. `residues` then holds its value until the next conversion finishes.

## Residue to binary: high-radix CRT tables

With `M = prod m_k`, let `w_k` be the number whose residues are 1 for `m_k` and
0 for every other modulus. Then `u = | sum_k w_k |u|_mk |_M`. The converter
(`r2b_converter`) works in three pipelined steps, with latency 4 and one
conversion per clock.

1. **Group tables** (`r2b_group_rom`). The moduli are partitioned into `l` groups.
   One table per group takes all of the group's residues at once and returns
   `u_p = | sum_{k in group} w_k |u|_mk |_M`. The index packs the group's residues
   in mixed radix, `x_a + m_a*(x_b + m_b*(...))`, so a group needs exactly
   `prod m_k` words. The default partition `{2,3,5,7}`, `{11,19}`, `{13,17}`
   gives 210, 209 and 221 words, three almost equal 256-word ROMs. Balancing the
   table sizes is the reason for grouping, and it also cuts the number of
   summands from 8 to 3. With one modulus per group (`NUM_GROUPS = 8`,
   `GROUP_OF = '{0,...,7}`) the same module is the basic one-table-per-residue
   converter.
2. **Summation** (`csa_tree` plus one adder). A binary tree of `l-1` carry-save
   nodes, `ceil(log2 l)` levels deep, adds the partial results. Each node merges
   two carry-save numbers through two rows of 3:2 counters. A single
   carry-propagate adder then produces `u_s` in `[0, l(M-1)]`.
3. **Modulo-M reduction** (`mod_m_reducer`), described next.

### Reducing modulo M in one lookup

`u_s` can be up to `l` times `M`, so trial subtraction could take `l` steps.
Instead, let `F = floor(log2 M)`, so that `2^(F-1) <= M/2`. The bits of `u_s` from
position `F-1` upward, `ceil(log2(l(M-1))) - F + 1` bits (about `log2 l + 1`),
address a small table. Entry `h` holds `qM`, the largest multiple of `M` that is
not above `h * 2^(F-1)`.

For any `u_s` with those top bits equal to `h`,

    h*2^(F-1) <= u_s < (h+1)*2^(F-1)   and   qM <= h*2^(F-1) < (q+1)M

so `0 <= u_s - qM < M + 2^(F-1) < 2M`. One subtraction of the table entry and at
most one corrective subtraction of `M` give the exact result. For the default
`l = 3` the table has 8 entries. For `l = 16` it has 32 entries (5 index bits),
which the reducer's testbench also runs. The lookup-and-subtract and the
corrective subtraction are separate pipeline stages.

## Files and interfaces

| file | contents |
|---|---|
| `rtl/rns_pkg.sv` | moduli set, partition, widths, types `residue_t`, `rns_word_t`, `bin_word_t`, `bin_mrange_t`, elaboration-time helpers |
| `rtl/rns_converter_top.sv` | top: the three converters side by side, each with its own ports |
| `rtl/b2r_tree_converter.sv`, `b2r_tree_channel.sv` | pipelined tree binary-to-residue converter |
| `rtl/b2r_serial_converter.sv`, `b2r_serial_channel.sv` | serial binary-to-residue converter |
| `rtl/b2r_rom.sv` | `(u_i, i) -> |u_i R^i|_m` table (position-specific or general) |
| `rtl/mod_adder_table.sv` | tabular modulo-m adder |
| `rtl/r2b_converter.sv`, `r2b_group_rom.sv`, `csa_tree.sv`, `mod_m_reducer.sv` | residue-to-binary converter and its parts |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Residue `k` of a word is the field `[k]` of a packed `[NUM_MOD-1:0][RES_W-1:0]`
array and belongs to `MODULI[k]`. All clocked modules use `clk` and a
synchronous active-low `rst_n`. The pipelined units carry a valid bit and have
no back-pressure.

| unit (top prefix) | input | output | latency | rate |
|---|---|---|---|---|
| tree (`tree_`) | `in_valid`, 32-bit `u` | `out_valid`, 8 residues | 4 | 1 per clock |
| serial (`serial_`) | `start`, 32-bit `u` | `busy`, `done`, 8 residues | `done` 9 clocks after `start` | 1 per 9 clocks |
| residue-to-binary (`r2b_`) | `in_valid`, 8 residues | `out_valid`, 24-bit `u` | 4 | 1 per clock |

The residue-to-binary converter expects residues in range (`x_k < m_k`). A
binary input `u >= M` is converted correctly to residues, but it cannot be
recovered from them: converting back gives `u mod M`.

All tables are computed at elaboration by constant functions from the
parameters. Nothing is read from files. To change the moduli, edit `MODULI`,
`NUM_MODULI`, `GROUP_OF`, `NUM_GROUPS`, `RES_W`, `RANGE_M` and `M_W` in
`rns_pkg`, or override them per instance. `r2b_group_rom` stops elaboration if
`RANGE_M` is not the product of `MODULI`. To change the binary width, edit
`DIGIT_W` and `NUM_DIGITS`.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example, for the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -y rtl \
        --top-module tb_rns_converter_top rtl/rns_pkg.sv tb/tb_rns_converter_top.sv
    ./obj_dir/Vtb_rns_converter_top

`-y rtl` lets verilator find each module in `rtl/<name>.sv`; the package is
listed explicitly. Replace the testbench name to run any other one. The testbenches compare against values computed
independently with `%`, and check latency and throughput where they are
defined. `tb_rns_converter_top` runs the whole unit at its default size. It
sends random `u < M` through the tree converter and feeds the residues straight
into the residue-to-binary converter; the round trip must return `u`. It also
runs the serial converter on 300 numbers. It counts back-to-back results,
reductions with and without the corrective subtraction, and start pulses
ignored while busy, and fails if any of these never happens.
`tb_r2b_converter` checks the grouped and the one-table-per-residue
configurations, plus a second moduli set, `{7,11,13,15,16}`.
`tb_b2r_tree_converter` also runs a 6-digit converter for the moduli
`{15,16,29,31}`.

## Choices made here, and departures

* **Radix 16 and 8 digits.** The digit count follows the 8-digit converter
  arrays. The radix was chosen as the largest radix at which the cost analysis
  still shows a benefit.
* **One moduli set for both directions.** `{2,...,19}` with the balanced
  partition comes from the residue-to-binary example. The binary-to-residue side
  had no set of its own, so it uses the same one.
* **Edge-triggered registers** are used where latches separate the pipeline
  stages. Register placement, valid bits, the reset and the serial unit's
  `start`/`busy`/`done` controller are this design's own.
* **Mixed-radix table index** for the group tables, chosen so that each group
  needs exactly `prod m_k` words.
* **Modular adder table size** is `2m-1` entries, covering every sum from `0` to
  `2m-2`.
* **Digit counts that are not a power of two** pad the binary-to-residue adder
  tree (and the carry-save tree) with zero leaves. The adders on those leaves
  add constants and synthesis removes them.
* **Not included:**
  * The older non-tree pipelined converter that the tree converter improves on.
  * The alternatives discussed but not chosen: logic-based modular adders, and
    carry-save internal additions in the binary-to-residue tree.
  * The variant of the residue-to-binary tables that groups equal-size bit
    chunks of residues instead of whole residues. Its table equation is not
    specified.
* The three converters are independent and share only clock and reset. The
  RNS arithmetic that would sit between them is outside this design.
