# Address generator from multiple LUT cascades

An *address generator* is the inverse of a memory. Given an n-bit input vector, it returns
the address (1..k) of that vector in a set of k registered vectors, or 0 if the vector is not
in the set. Typical uses are routing and switching tables, dictionary lookup and data
compression. A CAM does this, but it needs a comparator per entry. This design uses only
ordinary single-port RAMs and a few gates.

The idea: break the n-input function into a chain (*cascade*) of small RAMs. Each RAM reads a
few more input bits plus a short code (the *rails*) from the RAM before it. For an address
generator with k vectors, the rails need only ceil(log2(k+1)) bits: after any prefix of the
input, the only thing that matters is which registered vectors still agree with it, and
there are at most k+1 such situations. A single cascade for 63 vectors needs 6 rails. With
only a few free address lines per RAM, that makes the chain long. The design therefore
splits the vectors into g groups of at most 2^r - 1 vectors each. It builds one narrow
cascade per group, runs all cascades in parallel on the same input bits, and merges their
outputs in an encoder. Fewer rails leave more RAM address lines for primary inputs, so each
cascade has fewer levels.

The RTL is parameterised. By default it builds the **r5p11** generator: 48 inputs, 62
registered vectors, r = 5 rails, p = 11 RAM address lines, 2 cascades of 8 cells. Each cell
is a 2^11 x 5-bit RAM, which is one 18-Kbit FPGA block RAM. The output is 6 bits wide. The
same code builds the other five published configurations (see the sizing table below).

## The function being realized

For registered vectors a_1..a_k (distinct, n bits each):

    F(x) = i   if x = a_i
    F(x) = 0   otherwise

The bits of `x` are packed MSB first: `x[N-1]` is x_1, the first variable. Cell 1 of every
cascade reads the top P bits.

## One cascade

A cascade for a group of m <= 2^r - 1 vectors has S cells:

| cell        | RAM address                              | RAM word |
|-------------|------------------------------------------|----------|
| 1           | x_1 .. x_p  (p bits)                     | r rails  |
| 2 .. S-1    | rails of previous cell, next p-r inputs  | r rails  |
| S (last)    | rails, remaining inputs (at most p bits) | local address 0..m |

So S = 1 + ceil((n-p)/(p-r)). For r5p11: 1 + ceil(37/6) = 8. Its last cell reads the rails
plus only 48 - 11 - 6*6 = 1 input bit. That makes it a 2^6-word RAM, still one block RAM
on an FPGA.

### What the rails mean (the RAM contents)

The hardware does not fix a rail code. It only moves codes from cell to cell. The contents
of all cells are computed off-chip, by functional decomposition of each group's function,
and written through the write ports. Any code is correct as long as it gives two input
prefixes the same code only when they lead to the same remaining function.

The testbenches use a simple code that is easy to compute, and it is a good default:

> After cell j, the rail value is the smallest local address i whose vector a_i agrees with
> every input bit read so far, or 0 if no vector of the group agrees.

Two different prefixes never share a non-zero code, because the smallest agreeing vector
determines the whole prefix. An input that has already failed stays at 0. At the last cell
the prefix is the whole vector, so the code *is* the local address. Written out, the word at
address `a` of cell j is:

- cell 1: `a` is the first p input bits. The word is the smallest i whose first p bits equal
  `a`, or 0.
- cell j > 1: `a = {rail, xj}`. If `rail` is 0 or is not a used address, the word is 0.
  Otherwise take the prefix of vector a_rail up to the previous cell and append `xj`. The
  word is the smallest i whose prefix up to this cell equals that, or 0.
- last cell in the OR architecture: a non-zero word additionally gets the group offset
  (see below).

`tb/ag_tb_pkg.sv` (`cell_word`) implements exactly this. Any other valid decomposition works
just as well. The 6-input example in `tb/tb_example_tables.sv` loads hand-written tables
that use a different code (3 = "no match" at the first level), and passes the same checks.

### Writing the cells

Each cell's RAM has a two-way address mux. While WE is low, the address is
`{rails from the previous cell, this cell's inputs}`. While WE is high, it is
`{c_j, this cell's inputs}`, and the word `d_j` is written there. All cells of a cascade
write in the same clock, each at its own address. The input slices of different cells are
disjoint, so one `x` vector can address all of them independently. A full load takes
2^P clocks: in clock t every cell writes its word number `t mod 2^(cell address width)`:

    for t in 0 .. 2^P-1:
      for each cell j:  a = t mod 2^AW_j
                        x slice of cell j = low XW_j bits of a
                        c[j]              = a >> XW_j        (ignored for cell 1)
                        d[j]              = word(j, a)
      we = 1 for the cascades being loaded

Each cascade has its own WE bit. One group can be rewritten, for example to change one
registered vector, while the other groups keep their contents. Groups that are not being
written ignore their `c` and `d`.

## Merging the groups

Cascade i (1-based) covers global addresses (i-1)(2^r-1)+1 .. i(2^r-1). Because every
vector belongs to exactly one group, at most one cascade returns a non-zero value.

- **Plain architecture** (`OR_ARCH = 0`, `special_encoder`): the last cells hold local
  addresses (r bits). The encoder outputs `v_i + (i-1)(2^r-1)` for the non-zero `v_i`, or 0.
  For r5p11 this is `v1` if `v1 != 0`, else `v2 + 31`.
- **OR architecture** (`OR_ARCH = 1`, `or_encoder`): the last cell of every cascade except
  the first is widened to the full output width and already stores the global address. The
  encoder is then one OR gate per bit. This costs some RAM bits but takes the adder out of
  the output path. It suits designs with few groups, where the widened last cells still fit
  in one block RAM each.

## Timing

Every cell has a registered RAM output, so each level costs one clock. The cascade is fully
pipelined: a new lookup can enter every clock. The inputs of cell j are delayed j-1 clocks
by skew registers, so they meet the rails computed from the same vector. `addr` and
`out_valid` appear exactly **S clocks** after `x`/`in_valid` (8 for r5p11). The encoder is
combinational after the last RAM. Throughput is one 6-bit address per clock.

A lookup applied while any WE bit is high is not tagged valid. While writing, the cells'
outputs are meaningless.

## Configurations

| name    | K  | R | P  | OR_ARCH | groups G | levels S | RAM bits |
|---------|----|---|----|---------|----------|----------|----------|
| r3p12   | 63 | 3 | 12 | 0       | 9        | 5        | 552,960  |
| r4p12   | 60 | 4 | 12 | 0       | 4        | 6        | 331,776  |
| r4p12OR | 60 | 4 | 12 | 1       | 4        | 6        | 333,312  |
| r5p11   | 62 | 5 | 11 | 0       | 2        | 8        | 144,000  |
| r5p11OR | 62 | 5 | 11 | 1       | 2        | 8        | 144,064  |
| r6p11   | 63 | 6 | 11 | 0       | 1        | 9        | 99,840   |

All have N = 48 and a 6-bit output, and every cell fits one 18-Kbit block RAM: 45, 24, 24,
16, 16 and 9 RAMs respectively. P follows from that limit: 2^p * r <= 2^11 * 9, so
p = floor(log2(9/r)) + 11. Fewer rails give more groups but fewer levels.

## Interface of `multi_lut_cascade_ag`

Parameters: `N` (inputs, 48), `K` (registered vectors, 62), `R` (rails, 5), `P` (RAM
address lines, 11), `OR_ARCH` (0). Derived: `G = ceil(K/(2^R-1))`,
`S = 1 + ceil((N-P)/(P-R))`, `OUT_W = clog2(G(2^R-1)+1)`, and `D_W` (R, or OUT_W when
`OR_ARCH`).

| port        | dir | width           | meaning |
|-------------|-----|-----------------|---------|
| `clk`       | in  | 1               | clock |
| `rst_n`     | in  | 1               | async active-low; clears only the valid pipeline |
| `we`        | in  | G               | write enable per cascade |
| `x`         | in  | N               | input vector (`x[N-1]` = x_1); also the write address for every cell |
| `in_valid`  | in  | 1               | a lookup is applied this clock |
| `c`         | in  | G x S x R       | write-select bits per cascade and cell (`c[i][0]` unused) |
| `d`         | in  | G x S x D_W     | write data; cells other than widened last cells use the low R bits |
| `addr`      | out | OUT_W           | generated address, 0 = no match |
| `out_valid` | out | 1               | `addr` belongs to the lookup applied S clocks earlier |

The RAMs have no reset and start with unknown contents. Load every cascade before the first
lookup.

## Modules

| file | contents |
|------|----------|
| `rtl/addr_gen_pkg.sv` | sizing functions (levels, groups, widths, input slice of each cell) |
| `rtl/lut_cell.sv` | single-port RAM cell with the lookup/write address mux, registered read, read-first |
| `rtl/lut_cascade.sv` | S cells, input skew registers, valid pipeline |
| `rtl/special_encoder.sv` | offset-and-select encoder of the plain architecture |
| `rtl/or_encoder.sv` | OR encoder of the OR architecture |
| `rtl/multi_lut_cascade_ag.sv` | top: G cascades on shared inputs plus the chosen encoder |

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=<n> failures=<n>`. Example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_full_size_r5p11 rtl/addr_gen_pkg.sv tb/ag_tb_pkg.sv \
        tb/tb_full_size_r5p11.sv
    ./obj_dir/Vtb_full_size_r5p11

| testbench | what it covers |
|-----------|----------------|
| `tb_lut_cell` | write and read addressing, one-clock latency, read-first during a write |
| `tb_lut_cascade` | 20-input, 6-level cascade with 7 vectors, including two that differ only in the last bit; streamed lookups with exact latency; a reload after replacing a vector |
| `tb_special_encoder` | exhaustive checks against the gate equations of the 2x2-rail encoder and the r5p11 rule; random checks for 9 groups |
| `tb_or_encoder` | OR merging for 2 and 4 groups |
| `tb_multi_lut_cascade_ag` | all six configurations plus the 6-input example in both architectures and as a single 3-level cascade, through `tb/ag_harness.sv`. Checks loading, a hit in every cascade, misses (including one-bit neighbours of registered vectors), a lookup suppressed during a write, and a single-group reload while the other groups' write data toggle. Every result is checked against the reference function at the exact latency |
| `tb_k1000_n32` | a larger generator: 32 inputs, 1000 vectors, r = 9, p = 11 (2 cascades of 12 cells of 2^11 x 9 bits) |
| `tb_full_size_r5p11` | the same sequence on the top with all parameters at their defaults |
| `tb_example_tables` | 6-input, 6-vector example loaded with hand-written cell tables, all 64 inputs, both architectures |

All of them finish in well under a second of simulation.

## Design choices not fixed by the architecture

- **Pipelining.** One clock per level and one lookup per clock come from the architecture.
  The skew registers that align inputs with rails, and the `in_valid`/`out_valid` tags, are
  this implementation's own.
- **Write port.** The cell's address mux (c_j while writing, rails while looking up) is
  part of the architecture. The per-cascade write enable, the use of the undelayed `x` as
  the write address, and read-first RAM behaviour are choices made here.
- **Content generation** is not hardware. Whoever loads the RAMs must compute the
  decomposition, for example with the rule above.
- **Level count** uses S = 1 + ceil((N-P)/(P-R)). This meets the theoretical bound
  S <= ceil((n-r)/(p-r)) for address generators and gives the published level counts.
- **Encoder conflicts.** If several cascades return non-zero values (which happens only
  with inconsistent contents), the plain encoder takes the lowest-numbered cascade and the
  OR encoder ORs them. A concurrent assertion in the top (`a_one_group_hits`) reports any
  valid lookup on which more than one cascade matched.
- **Output width** is `clog2(G(2^R-1)+1)`, 6 for every configuration above.
- **Baselines not included.** A block-RAM CAM and a register/XNOR comparator design are
  the usual alternatives this architecture is measured against. Neither is part of this
  RTL.
- **Timing figures.** Clock rates, slice counts and throughput on a particular FPGA
  cannot be reproduced by simulation. The RAM counts in the table follow directly from the
  structure.
