# Residue-checked fault-tolerant systolic arrays

A systolic array is a grid of identical multiply-accumulate cells through
which data is pumped in lock step. It computes filters, convolutions and
matrix products fast, but a single faulty cell silently corrupts every
result that passes through it. This design adds, next to the ordinary
binary array, a few small *residue arrays*: copies of the same array that
work on numbers reduced modulo a small base (5, 11 and 19 here). Reduction
modulo a base commutes with addition and multiplication. So at the array
edge the binary result, reduced modulo each base, must equal what the
residue array produced. Comparing the two finds an error. Because an error is
assumed to be an added ±2^i, the pattern of differences over several bases
also says *which* power of two was added, so the error can be subtracted
again. With two or three bases the design detects, corrects and locates
faulty cells while the array keeps running.

The approach follows the scheme published as *"Fault-Tolerant Systolic
Arrays: An Approach Based upon Residue Arithmetic"*. All RTL here is a fresh
implementation. Where that description was silent, the choices are this
design's own; they are listed below and in each file's opening comment.

## Syndromes and the error model

For a binary result `P'` that should have been `P`, and bases `b_1..b_k`,
the **syndrome** is the vector of digits

    s_k = (P' mod b_k) - (residue array k result)   (mod b_k)

It is zero when nothing went wrong. A fault in a binary adder or multiplier
is modelled as an additive error `e = ±2^i`, `0 <= i < n` for an `n`-bit
result. Then `s_k = e mod b_k`. If every `±2^i` gives a different non-zero
syndrome, a table maps syndrome → error, and the correction `-e` is added to
the binary result. Because the correction is added and not written over the
result, the corrected value is exact.

A residue array can fail too. Its fault changes only its own digit, so a
syndrome with a single non-zero digit points at the residue side, not the
binary side.

### Why 5, 11 and 19

The bases must be odd, small and pairwise coprime, and they must keep all
the error syndromes apart over the whole result width. A published table of
base triples gives 5, 11, 19 a coverage of 20 bits, both for single errors
(any *pair* of the three can correct them) and for two consecutive errors.
The design therefore uses 20-bit results and 8-bit samples and weights. The
defaults live in `ft_pkg`: `DATA_W`, `RES_W`, `DIG_W`, `BASES3`, `BASES2`.

These claims were checked exhaustively for this triple:
- all 40 values ±2^i (i < 20) have distinct non-zero syndromes under every
  pair of bases;
- every same-sign double error ±(2^i + 2^j) has a syndrome different from
  every single error.

Opposite-sign doubles cannot be kept apart by any bases, because
2^(i+1) − 2^i = 2^i. The two-error networks therefore assume that both
errors of a pair have the same sign. The double-syndrome network is the
exception: it handles a fault that produces both signs (see below).

Correcting *two simultaneous errors of any kind* is stricter. With 5, 11,
19 it holds only up to 10 result bits. That network therefore sits on its
own narrow array (4-bit data, 10-bit results).

## Processing elements

| module | does |
|---|---|
| `bin_pe` | `Yout <- Yin + Win·Xin`; X passes through `XREG` registers, W and Y through one |
| `res_pe` | the same on residues: an ordinary multiply-add on the short digits, then a correcting circuit (`bin2res`) that reduces the result modulo the base |
| `bin_loc_pe` | `bin_pe` plus check-sum adders for the 2-D array (see below) |
| `res_loc_pe` | the modulo-M twin of `bin_loc_pe`, built from `mod_add` |
| `bin2res` | binary → residue: adds `2^i mod M` for every set bit through a chain of modular adders |
| `mod_add`, `mod_sub` | modular add/subtract of two digits. `mod_add` forms `a + b + (2^k − M)`. A carry means the low bits are the answer; without a carry, M is added back |

All PE outputs are registered on one rising-edge clock. Reset is
asynchronous and active low. The residue PEs are cycle-aligned with the
binary ones, so the comparison at the edge needs no realignment.

## Linear array (`ft_linear`)

N binary PEs in a row run as an FIR filter with the weights held in the
PEs: `y(t) = Σ_p W_p · x(t−p)`. X moves through two registers per PE and the
partial sum through one. NB residue arrays (default three) repeat the
computation, fed through binary-to-residue converters. At the right edge:

    binary result ──► syndrome_gen ──► correction network ──► y_out
    residue results ─┘

**Localization.** With `LOCALIZE = 1` every PE position is also compared
between the binary and the residue arrays. `pe_fault[p]` is set while
position p disagrees. An error entering at PE p rides along with the
partial sum, so positions p, p+1, … all disagree. `pe_first` therefore
gives, one-hot, the first disagreeing position: the cell a host should
switch out. Reconfiguration itself is not part of this design.

## Bidimensional array and check sums (`ft_2d`)

An R×C grid (default 2×3), "horizontal computing":
- x enters each row on the left and moves right;
- partial results move right and leave at the right edge, one per row;
- weights enter each column at the top and move down one row per cycle.

Each row is thus a linear array with its own syndrome generator and
correction network, and a non-zero row syndrome flags the row.

To find the **column**, each binary PE has extra adders that build check
sums of the cell results. The residue grids build the same sums modulo
their bases. `VARIANT` selects one of three structures:

| variant | check-sum hardware | sums produced |
|---|---|---|
| `CHK_A` (default) | one extra adder | `Y'out = Y'in + Yout`, running down the column |
| `CHK_B` | as `CHK_A` plus a second adder | also `Y''out = Y''in + Y'in + Yout`, running right; it checks the first adder |
| `CHK_C` | one three-input adder | `Yout + Y'in + Y''in`, sent both down and right |

At the bottom edge the binary column sum is compared with the residue
column sums. The OR over the bases of the non-zero differences is the
**faulty column identifier** `col_fault[c]`. As with rows, an error moves
right with the result, so later columns disagree too. `col_first` marks the
first one, and together with the flagged row it names the faulty cell. A
fault in a check-sum adder alone raises a column flag but leaves every row
result correct.

## Correction networks

`ECN_MODE` of both arrays selects the network at each output.

| mode | module | corrects |
|---|---|---|
| 0 | none | nothing: detection only, `detected` flag |
| 1 | `ecn_single` | one error |
| 2 | `ecn_consec` | two errors whose faults appear one after the other |
| 3 | `ecn_dsyn` | as 2, when a fault's error sign depends on the data |
| 4 | `ecn_anykind` | two errors of any kind, even in the same result |

All of them report their choice on `sel` as alpha0..alpha3
(`SEL_BIN`, `SEL_C1`, `SEL_C2`, `SEL_C3`). They raise `uncorrectable` and
pass the binary result when a syndrome fits none of their cases.

**Single error** (`ecn_single`, `corr_lut`). The correction table compares
the syndrome with the 2n constants `±2^i mod b_k`, which are computed at
elaboration. On a match the table outputs `−e`, and an adder and a
multiplexer apply it.

**Two consecutive errors** (`ecn_consec`). Permanent faults usually arrive
one at a time. The first single error's syndrome `s_i` and correction `c_i`
are stored in a register. That register is written once, until the host
pulses `clear`. Later, a syndrome that is not a single error is treated as
"first fault + a new one". The network subtracts `s_i` digit by digit
(`mod_sub`) and looks up the remainder in a second table, which gives
`c''`. The output is then `binary + c_i + c''`. Outputs that carry only
one of the two errors still go through the single path. So the array keeps
producing correct results with two faulty cells, as long as the first fault
showed up on its own before the second one appeared.

**Double-syndrome consecutive errors** (`ecn_dsyn`). A stuck bit inside an
adder adds +2^i for some data and −2^i for other data. When the first error
is seen, the network therefore stores both possible syndromes, `s` and
`−s`, with their corrections. A second error is removed by subtracting
either stored syndrome:
- `SEL_C2` uses the syndrome stored as seen;
- `SEL_C3` uses its negation.

**Any kind** (`ecn_anykind`, three bases). Transient or simultaneous
errors give no "first error" to remember. This network uses four tables:
- three single-error tables, one per pair of bases;
- one table of same-sign double errors.

It decides in this order:
1. all pairs agree → single correction;
2. the double table matches → double correction;
3. only one digit is non-zero → residue-side fault, binary result passed
   (`res_fault`);
4. the pairs that recognise a single error agree → their correction
   (a faulty residue array spoils only the pairs that include it);
5. otherwise → `uncorrectable`.

## Timing

- **Linear array.** With `x(t)` sampled at clock edge t, `y_raw` (binary)
  and `y_out` (corrected) hold `y(t)` after edge `t + N`. `sel`,
  `detected`, `uncorrectable` and `stored` are registered with them.
  `pe_fault`/`pe_first` are combinational from the PE registers.
- **2-D array.** Row r's result for `x_r(t)` appears after edge `t + C`.
  Row r sees a change of the weights r cycles after row 0. Column flags
  refer to check sums that lag by up to R cycles.
- **Correction networks.** They are combinational, apart from the
  first-error registers. Those load on the edge after the first detection
  and are emptied by reset or by the synchronous `clear`.
- **Throughput.** One result per clock per row, unchanged by the checking.

## Top level (`ft_top`)

Three independent parts share only clock and reset:

| prefix | part |
|---|---|
| `lin_` | 4-PE linear array, three residue arrays, localization, double-syndrome network |
| `arr_` | 2×3 array, three residue grids, `CHK_A`, consecutive-error network per row, column identifier |
| `ak_`  | 4-PE narrow linear array (4-bit data, 10-bit results) with the any-kind network |

The `*_y_err` and `arr_cs_err` inputs add errors to cell results and
check-sum adders. They exist for testing and must be tied to zero in use.
The host side is ports only:
- data in;
- fault flags out;
- `clear` to forget a stored first error after a repair.

## Own choices and departures

- Widths (8-bit data, 20-bit results) and the choice of the 5, 11, 19 row
  of the published table are choices; the coverage figures match it.
- The computation is an FIR filter. The scheme fits any multiply-accumulate
  array.
- The following are additions of this design:
  - the `pe_first`/`col_first` one-hot pointers;
  - the host `clear`;
  - the `uncorrectable` flag;
  - the error-injection inputs.
- Double errors are read as same-sign errors for the consecutive and
  any-kind networks. This is the only reading under which the published
  two-error coverages come out.
- In the double-syndrome network the second stored syndrome is the
  negation of the first. Which alpha signal selects which path is also
  this design's naming.
- For the any-kind network, the three single tables as "one per pair of
  bases" and the decision order are this design's reading. The narrow
  array that carries it is the design's arrangement.
- In `CHK_C`, which outputs the three-input adder drives, and all check-sum
  registering, are this design's reading.
- `mod_add` applies the base correction when there is **no** carry out of
  the offset sum. This is the arithmetically correct case; the original
  wording puts it the other way round.

## Not built

- The **reconfiguration network** that switches faulty cells out. Its
  structure is left to the designer, so the flags are brought out as
  ports instead.
- The **host** that drives the arrays.
- The **bidirectional 2-D array**, whose vertical stream also carries
  computed results. The computation on that path is not specified.
- The **triple-syndrome** correction network. Only its constraint on the
  bases is outlined, not its structure.

## Verification

Every module has a self-checking testbench in `tb/` with a watchdog. Each
ends by printing `TB_RESULT checks=<n> failures=<n>`. The testbenches
compare against independent models: integer FIR and grid models, and
syndromes computed with `%`.

`tb_ft_top` runs the whole top at its default size, with all three parts
concurrently. It fails if any mechanism never happens:
- alpha0 … alpha3;
- a permanent fault masked by the data;
- localization, row and column flags;
- a check-sum-only fault;
- the host clear;
- single and simultaneous double errors in the any-kind part.

`tb_ft_linear_modes` runs the linear array in modes 0, 1, 3 and 4 side by
side. `tb_ft_2d_variants` runs the 2-D array with check-sum structures
`CHK_B` and `CHK_C`. It checks that a fault in a check-sum adder leaves the
results correct but flags both its column and its row. `tb_ft_pkg` checks
the package's modular helper functions. It also checks exhaustively that
the single-error syndromes stay apart under every pair of bases.

## Simulating

With Verilator 5 (two-state simulation, timing enabled):

    verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
        rtl/ft_pkg.sv tb/tb_ft_top.sv --top-module tb_ft_top
    ./obj_dir/Vtb_ft_top

Replace `tb_ft_top` with any other testbench name to run a single block.

## Changing it

- **Bases.** Any odd, coprime set below 32 can be passed through `BASES`
  (and `NB`). Larger bases need a wider `DIG_W`. The correction tables
  adapt by themselves, but whether the new set keeps syndromes apart for
  your result width must be checked first.
- **Array size.** Change `N` (linear) or `R`/`C` (2-D). Widen `RES_W` when
  `N · (2^DATA_W − 1)^2` no longer fits.
- **The any-kind network.** It needs exactly three bases and a result width
  they cover; `ft_linear`/`ft_2d` stop elaboration on an unsupported
  `ECN_MODE`/`NB` pair.
