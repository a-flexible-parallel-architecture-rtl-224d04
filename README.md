# A programmable systolic array for relaxation labeling

Relaxation labeling gives each of N objects one of M labels. A table of
compatibility coefficients C_ij(λt, λp) says how well "object i has label t"
fits with "object j has label p". Starting from an initial guess, every
object's labels are updated again and again from the labels of all the other
objects, until nothing changes any more.

There are two forms of the algorithm:

* **Discrete (DRL).** Each object holds a set of still-possible labels, one
  bit per label. Label t stays possible for object i only if, for every
  other object j, some label j still holds is compatible with it:

      L_i(t) ← L_i(t) AND  AND_j ( OR_p ( C_ij(t,p) AND L_j(p) ) )

* **Probabilistic (PRL).** Each object holds a probability for each label,
  and the coefficients lie in [-1, 1]. The update is:

      S_i(t)   = Σ_j Σ_p C_ij(t,p) · P_j(p)
      P_i(t) ← P_i(t)·(1 + S_i(t)) / Σ_p P_i(p)·(1 + S_i(p))

Both updates have the same shape. A "product" of coefficient and estimate is
reduced over all (j, p) into a supporting evidence S_i(t). That evidence is
combined with the object's old estimate, and then normalised. This design
builds that shape once, from units whose function is programmable:

| unit | DRL | PRL |
|---|---|---|
| PE I stage | AND-OR of bit vectors | multiplier |
| PE A stage | AND | adder |
| combiner G/H registers | parallel out | serial out |
| combiner A | no operation | adds 1.0 |
| combiner I | AND | multiplier |
| combiner ACC | no operation | accumulator |
| combiner D | no operation | divider |

It does one new estimate per clock, and the array iterates by itself until
the result is consistent (DRL) or has converged (PRL).

## Overall structure

```
             +-------------+  X (estimates), Y (identity), tag
 host ──────►| stream_ctrl |──────────────┬─────────────┬─────────────┐
 (lbl_*)     |  + label    |              ▼             ▼             ▼
             |    buffer   |          row t=1       row t=2       row t=3     main_array
             +-------------+      N·M PEs, 1-way  N·M PEs       N·M PEs
                    ▲              systolic          │             │
                    │ feedback        │ Y,W          │ Y,W         │ Y,W
             +--------------+     +---▼-------------▼-------------▼---+
             | status_check |◄────|            combiner               |──► r_out / p_out
             +--------------+     +-----------------------------------+
```

* **main_array** has M identical rows, one per label λt. All rows see the
  same estimate stream on X. Row t produces S_i(λt) for i = 1..N, one per
  live slot.
* **pe_row** is a one-way linear systolic row of N·M PEs. In DRL only the
  first N take part, and the row output is tapped after PE N. In PRL all
  N·M PEs take part.
* **relax_pe** holds a small ring of preloaded coefficients. Only the
  estimates move through the array; coefficients never do.
* **combiner** takes the M row outputs and the delayed old estimates. It
  produces the new estimate on `r_out`, with the old one next to it on
  `p_out`.
* **status_check** compares new with old over one whole iteration. It also
  returns the new estimates to the input.
* **stream_ctrl** builds the input stream and holds the current labeling
  in a buffer. It decides when to stop. It is the only port through which
  data enters or leaves (besides the coefficient preload).

## The systolic row (hardest part)

### PE pipeline

Each PE has four lines: X (estimates), Y (partial evidence), W (the
estimate that belongs to the slot on Y), and a one-bit tag that marks a
live slot. The stages are:

1. **PFIFO stage** (first PE of a row only). A programmable delay on X,
   which forms the W line.
2. **I stage.** Combines the top coefficient of the PE's ring with the
   estimate on X.
   * DRL: `|(C & L)` over the M label bits.
   * PRL: `C·P`.
3. **A stage.** Folds that into Y.
   * DRL: AND.
   * PRL: saturating add.
4. **Z buffer.** One extra register on X.

Y, W and the tag pass through a PE in 3 clocks, but X takes 4. So at each
PE, a given slot on Y meets the estimate one position *earlier* in the
stream than at the previous PE. After passing PE m, slot q has been
combined with stream elements q-1, q-2, …, q-m (cyclically).

For that to reach all elements, the stream is sent **twice in a row**
(2·len clocks, len = N in DRL and N·M in PRL). Live slots are the len
clocks starting at the last element of the first copy.

PE m (1-based) uses, for result slot q (1-based), stream element

    e = ((q - m - 1) mod len) + 1

### Coefficient ring

The ring of each PE holds len coefficients. It advances by one in every
clock in which a live slot is in the PE's first stage. So the entry on top
is always the one the next I stage needs.

| mode | the ring of PE m in row t holds, in order q = 1..len |
|---|---|
| DRL | the M-bit vector `C_q,e(λt, ·)` (bit p-1 = λp) |
| PRL | `C_i,j(λt, λp)` for slots q = (i-1)·M + 1, where j = ⌈e/M⌉ and p = ((e-1) mod M) + 1; 0 for other slots |

In PRL only every M-th slot carries a useful sum: each row computes
S_i(λt) for i = 1..N, in slots 1, M+1, 2M+1, …. The combiner picks those.

### PFIFO lengths

| mode | rows | PFIFO length on X in the first PE |
|---|---|---|
| DRL | every row | N-1 |
| PRL | row t (0-based) | N·M-1-t, i.e. 14, 13, 12 |

Different lengths make the W lines of the M rows deliver P_i(λ1..M) side by
side, exactly when row 1 presents S_i(λ1..M).

### Timing at N = 5, M = 3

Clock 0 is the clock in which the first estimate is on X_in.

| | DRL | PRL |
|---|---|---|
| first supporting evidence at the row output | 19 | 59 |
| first new estimate on r_out | 24 | 66 |
| last new estimate of the iteration | 28 | 80 |
| next iteration's stream starts at X_in | 26 | 68 |
| iteration period | 26 | 68 |

The next iteration starts 2 clocks after the previous one's first result:
the feedback register, then the stream input register.

## Combiner

| stage | DRL | PRL |
|---|---|---|
| G/H | latches S_i(Λ) (one bit per row) and L_i | loads S_i(λ1..M) and P_i(λ1..M) in parallel once per object, then shifts them out one per clock |
| A | – | 1 + S |
| I | L AND S | (1 + S)·P → numerator |
| ACC | one register | sums the M numerators of an object, and holds the sum while the object's M divisions run; the numerator and old estimate wait M clocks in PFIFO1/PFIFO2 |
| D | – | numerator / sum |

Latency is 5 clocks in DRL and M+4 (= 7) in PRL.

## Consistency, convergence and the iteration loop

`status_check` compares `r_out` with `p_out` for every valid result of an
iteration:

* DRL: the label vectors must be equal.
* PRL: |new − old| ≤ `eps` (a run-time input).

A one-clock `status_valid` pulse follows the iteration's last result, and
`consistent` tells the outcome.

`stream_ctrl` works as follows:

* **Iteration 0** reads the label buffer, which the host filled with
  `lbl_we` / `lbl_din` (element 1 first).
* **Every later iteration**
  * takes its first copy straight from the fed-back results and writes it
    into the buffer;
  * reads its second copy back from the buffer.
* **Stopping.** The run stops when an iteration is consistent, or when
  `max_iter` iterations have been checked. The iteration already under way
  is then cut after its first copy, and its tags are suppressed, so it
  produces no results. `done` rises, and `converged` tells which of the two
  stop reasons applied.
* **Reading the result.** The final estimates are in the buffer. They are
  read by pulsing `lbl_rd` (rotate) and sampling `lbl_head`.

## Number formats

* **DRL words.** Bit t-1 is label λt; upper bits are zero.
* **PRL estimates and coefficients.** 8-bit signed fixed point with 6
  fraction bits, so 1.0 = 64 and the range is [-2, 2).
  * Products are truncated toward −∞.
  * The Y line is 12 bits with 6 fraction bits, and saturates.
  * The combiner's numerator (20 bits) and sum (22 bits) are wider. Only the
    quotient returns to 8 bits.
  * 1 + S and the numerator are clamped at 0. A zero sum gives 0, and the
    quotient is limited to 1.0.

The widths are in `relax_pkg` (DW, YW, FRAC). N and M are module
parameters of `relax_top` and default to 5 and 3.

## Host interface

1. **Coefficients.** Hold `coef_we`, with `coef_row` = t (0-based) and
   `coef_pe` = m−1, for one clock per coefficient. Write the ring of each
   PE in order q = 1..len; the first written ends on top.
2. **Estimates.** Shift the len initial estimates in with `lbl_we`.
3. **Run.** Set `mode`, `max_iter` and `eps`, then pulse `start`.
4. **Results.**
   * `r_out` / `p_out` / `r_valid` show each iteration's results as they
     are made.
   * After `done`, read the buffer.
5. **Mode changes.** Change `mode` only while the array is idle.

## Where this design departs from the original architecture, or fills gaps

* **One row length for both modes.** The original uses rows of N PEs for
  DRL and rows of N·M PEs for PRL. Here each row always has N·M PEs, and
  DRL takes its output after PE N. In DRL the tag is not passed beyond
  PE N.
* **Own additions.** These are not part of the original:
  * the tag line;
  * the label buffer, the iteration limit and the stop rule;
  * the tolerance input `eps`;
  * the coefficient-load port.
* **Own numeric choices.** The fixed-point format, the widths of the Y line
  and the combiner, and the clamps are this design's own.
* **`p_out` between results.** Outside the valid results, `p_out` carries
  the second copy of the stream rather than zero. Only `r_valid` results
  are meaningful.
* **The DRL combiner path.** PFIFO1/PFIFO2 are bypassed in DRL. The
  no-operation ACC stage still costs one register, which is what gives the
  24-clock timing.
* **Coefficient timing.** A PE reads its ring's top entry during the clock
  in which its I-stage result is formed, and the result is held in the next
  clock.
* **Not built.** A self-timed (asynchronous) version of the array is not
  built; this design is fully synchronous.

## Files

| file | content |
|---|---|
| `rtl/relax_pkg.sv` | mode enum, widths, saturating add, fixed-point multiply |
| `rtl/pfifo.sv` | programmable-length delay line |
| `rtl/coef_ring.sv` | coefficient ring |
| `rtl/relax_pe.sv` | processing element |
| `rtl/pe_row.sv` | one systolic row |
| `rtl/main_array.sv` | M rows, PFIFO lengths, coefficient-load decode |
| `rtl/combiner.sv` | combiner |
| `rtl/status_check.sv` | consistency / convergence check, feedback register |
| `rtl/stream_ctrl.sv` | stream sequencer, label buffer, iteration control |
| `rtl/relax_top.sv` | top level |
| `tb/<module>_tb.sv` | self-checking testbench of each module |

## Simulation

Each testbench checks against a software model of its own, counts checks
and failures, and prints one line `TB_RESULT checks=… failures=…`. For
example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module relax_top_tb \
    rtl/relax_pkg.sv rtl/pfifo.sv rtl/coef_ring.sv rtl/relax_pe.sv rtl/pe_row.sv \
    rtl/main_array.sv rtl/combiner.sv rtl/status_check.sv rtl/stream_ctrl.sv \
    rtl/relax_top.sv tb/relax_top_tb.sv
./obj_dir/Vrelax_top_tb
```

`relax_top_tb` runs the whole design at its default size (N = 5, M = 3) in
four cases:

1. The five-region, three-colour map-colouring problem in DRL, run until it
   is consistent.
2. A random PRL problem run to convergence.
3. A PRL run stopped by the iteration limit.
4. DRL again, after the mode switch.

It checks every result bit for bit, the iteration counts, and the clock
numbers given above. It also checks that each mechanism (both modes, each
stop reason, feedback, mode switch) occurred.

`relax_top_sizes_tb` runs the same kind of test at N = 6, M = 4. Its
problems are random DRL and PRL ones. It checks that the rows, the combiner
and the sequencer follow the parameters, and that the clock numbers follow
the general formulas:

| | DRL | PRL |
|---|---|---|
| first evidence | 4N − 1 | 4NM − 1 |
| first new estimate | 4N + 4 | 4NM + M + 3 |
| iteration period | 4N + 6 | 4NM + M + 5 |

To try another size, change its two `localparam`s.

The module testbenches use the default size, and each finishes within
seconds.
