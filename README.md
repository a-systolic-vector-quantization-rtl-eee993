# Systolic vector quantization search processor

A vector quantizer codes an input vector by finding the closest entry
(codevector) in a fixed codebook and sending that entry's index. For speech
coding the search must finish for every input frame in real time, and an
exhaustive search over N codevectors of dimension k costs about kN
multiply-adds. This RTL performs the search in a fully pipelined, bit-level
systolic array. Codevectors stream past the input vector one per clock, and
the index of the best match comes out once every N clocks, independent of k.

The array is built from two kinds of processor:

* **Inner Product Processor (IPP)**. One per vector component, cascaded. IPP i
  computes `d = x_i * y_(j,i) + c` and hands the running sum to IPP i+1.
* **Comparator Processor (CP)**. One at the end of the cascade. It keeps the
  smallest sum seen in the current search and the number of the codevector
  that produced it.

Everything inside both processors works at the bit level. Each cell is a
latched full adder or a small latched logic cell. Numbers move between cells
one bit position per clock, in a diagonal "skewed" wavefront.

## Distortion as an inner product

The array evaluates, for every codevector j,

    D_j = sum_{i=0}^{k-1} x_i * z_(j,i) + r_j

and reports the j with the smallest D_j. Squared Euclidean distance has this
form. Expand `|x - y_j|^2`. The term `|x|^2` is the same for every j and can be
dropped. Store `z_(j,i) = -2 y_(j,i)` in place of the codevector, and store
`r_j = sum_i y_(j,i)^2` with each entry. Other measures fit the same form:

| measure | z_(j,i) | r_j |
|---|---|---|
| squared error | -2 y_(j,i) | sum_i y_(j,i)^2 |
| weighted squared error, weights w_i | -2 w_i y_(j,i) | sum_i w_i y_(j,i)^2 |
| Itakura-Saito (LPC order p, k = p+1) | Raa_j(0), then 2 Raa_j(i) | 0 |

For Itakura-Saito, the input components are the autocorrelations Rxx(i) of
the speech frame. The Raa_j(i) are the autocorrelations of the predictor
coefficients of codebook entry j. The array then computes
`alpha_j = Raa_j(0) Rxx(0) + 2 sum Raa_j(i) Rxx(i)`.

The codebook memory must therefore hold k+1 words per entry. That memory, and
the logic that streams it, sit outside this RTL.

## Data flow through the array

```
 r_j --skew--> c[IPP 0]d --> c[IPP 1]d --> ... --> c[IPP K-1]d --upper 24 bits--> [CP] --> index
               a  b          a  b                  a  b
              x0  y(j,0)    x1  y(j,1)            x(K-1) y(j,K-1)
```

The running sum travels between IPPs bit-serially skewed. Bit n of a sum
leaves an IPP one clock after bit n-1 of the same sum, and every clock a new
sum starts. An IPP adds B = 12 clocks of delay. So component i of codevector j
must reach IPP i exactly B*i clocks after component 0 reached IPP 0. The
same rule applies to the input component: IPP i must see the new x_i B*i clocks
after IPP 0 sees x_0. The caller produces this skew. The top level adds only
the bit skew for r_j.

A synchronisation bit (`sync_i`) marks the first codevector of every search.
It travels down the cascade with the sums. Its spacing alone tells the
processor the codebook size, so consecutive searches may use different N.

## Inside the IPP: a trapezoid of latched full adders

`vq_ipp` multiplies two 12-bit two's complement numbers and adds a 25-bit sum.
It is an array of 12 rows, one per bit of the input component a:

* Row r adds `a[r] * b * 2^r` into the running sum. It covers bit columns r to
  24, so the rows have 25, 24, ..., 14 cells: 234 full adder cells in all.
* Each cell (`vq_ipp_cell`) computes `s_o = s_i ^ (a & b) ^ c_i` and the
  majority carry. It latches sum, carry and the a bit.
* The carry and the a bit move one column to the left per clock, along the
  row. The sum moves down one row per clock, in the same column.
* Cell (r, n) therefore works on word w in clock `w + n + r`.
* The codevector bit moves diagonally, from cell (r-1, n-1) to (r, n), through
  two latches.

To line the operands up with this wavefront, skewing delays sit on two edges
of the array:

* bit a[r] enters its row 2r clocks late;
* bit n of the sign-extended b enters row 0 n clocks late.

Low sum bits are final once the row of their own column has passed. Below the
diagonal they only run through plain delay latches, so that all 25 output bits
keep the same skew.

**Sign.** In two's complement the top bit of a weighs -2^11. The last row
uses the complement of b and gets a carry-in of a[11]. Together these add
`a[11] * (~b + 1) * 2^11 = -a[11] * b * 2^11`. No correction term is needed
elsewhere, and the result is exact modulo 2^25.

**Timing.** Word w is on `a_i`/`b_i` in clock w. Bit n of c arrives in clock
w + n. Bit n of d leaves in clock w + n + 12. `sync_o` is `sync_i` delayed 12
clocks.

## Inside the CP: minimum search on a skewed stream

`vq_cp` takes distortions LSB first. A magnitude comparison needs the MSB
first, so the CP has three parts.

**Delay triangle** (`vq_cp_delay_triangle`). Comparator cell i handles the
i-th bit counted from the MSB. Its bit is delayed 2i clocks. The MSB then
reaches cell 0 first, and each lower bit reaches the next cell one clock
later. The sync bit is delayed 23 clocks so that it travels with the MSB.

**Comparator chain** (`vq_cp_comparator_chain`). Cell i holds bit i of the
Minimum Distortion Register (MDR), counted from the MSB. Two latched flags
travel with the distortion:

| P Q | meaning so far |
|---|---|
| 0 0 | all bits equal, no decision |
| 1 0 | x > m |
| 0 1 | x < m |

In every cell the MDR bit is replaced by the bit of the smaller number:

* the old bit if x > m;
* the x bit if x < m;
* while undecided, the AND of the two bits in magnitude cells and the OR in
  the sign cell.

When the sync bit passes a cell, the cell compares against, and replaces, the
largest positive 24-bit number (0111...1) instead of its stored bit. A search
therefore starts fresh without a separate clear cycle. Equal values never
count as smaller, so ties keep the earlier index.

**Counter, TIR and IR** (`vq_cp_counter`). This is a 16-bit systolic counter.
A carry C (C_0 = 1), a load flag L and a new-search flag W enter bit 0 and
move one bit per clock:

* L_0 = "x < m" from the end of the comparator chain;
* W_0 = the sync bit leaving the chain.

Each bit cell holds:

* S, the counter, which counts one per distortion and is cleared by W;
* t, the Temporary Index Register (TIR), which copies S when L is set;
* I, the Index Register (IR), which copies t when W passes.

The result of a search is moved into the IR when the next search's sync
reaches the counter.

**Timing.** The LSB of the first distortion of a search and `sync_i` arrive
in clock t. The index of the previous search is then complete on `index_o`,
with `sync_o` high, in clock t + 2*24 - 1 + 16 = t + 63. It holds until the
next search ends.

**Shortest search.** IR bit i is written i clocks after bit 0. So the word is
whole when `sync_o` rises only if a search has at least 16 codevectors.
Shorter searches still produce correct bits, but each bit must be read in its
own clock (bit i in clock t + 48 + i).

## Using `vq_top`

Ports (defaults K = 16, B = 12, CW = 25, DW = 24, IW = 16):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `sync_i` | in | 1 | 1 with the first codevector of a search, at IPP 0 |
| `r_i` | in | 25 | r_j, in the clock codevector j enters IPP 0 |
| `x_i[K]` | in | 12 each | input vector; `x_i[i]` switches to the new vector B*i clocks after the search starts |
| `y_i[K]` | in | 12 each | stored components z_(j,i); `y_i[i]` carries codevector j B*i clocks after it enters IPP 0 |
| `index_o` | out | 16 | index of the best codevector of the previous search |
| `index_valid_o` | out | 1 | 1 in the clock a new index appears |

Suppose the next search starts at IPP 0 in clock s. Then the index of the
search before it appears in clock

    s + LAT,  LAT = K*B + (CW - DW) + 2*DW - 1 + IW = 192 + 1 + 47 + 16 = 256

A new search may start on the clock after the previous one's last codevector.
The processor then delivers one index every N clocks. The last search of a
run is reported only when another sync pulse follows it.

The first `index_valid_o` after reset belongs to the empty search before the
first sync. Ignore it.

### Number ranges

* All 25 bits of the running sum are kept. Overflow wraps, so only the final
  D_j must fit in 25 bits. Intermediate sums may wrap.
* The CP compares the upper 24 bits of the sum, so distortions that differ
  only in bit 0 count as equal.
* The stored z values must fit in 12 bits. For squared error this limits
  codevector components to 11 bits, since z = -2y.

With 16 components, inputs and codevectors within about ±250 keep weighted
squared error (weights up to 3) inside the range. The testbenches use that.
A system with full-range data must scale its input.

## Departures from the original chip set

This RTL follows a published two-chip NMOS design (an IPP chip and a CP chip).
It departs from that design in these ways:

* **Latency.** The original IPP array has a latency of 3B clocks. A cascade
  of k of them takes B(2k+3) clocks. This IPP takes B clocks, because of where
  its latches sit. Throughput is the same: one operation per clock, and one
  index per N clocks.
* **Array wiring.** The original array came from earlier literature and its
  exact wiring is not reproduced here. The row/column trapezoid described
  above has the same cell count (234), the same cell equations and the same
  complemented-b sign cells.
* **Low-order bits.** The original notes that the 4 low-order bits of r_j and
  of the partial sums can be truncated without hurting the search. That was
  how 16 IPPs fit the word. Here all bits are kept (see Number ranges).
* **Word widths.** The original gives a 25-bit IPP output and 24-bit
  distortions in the CP without saying which bit is dropped. Here the LSB is
  dropped.
* **Details the original leaves open.** These are this design's own
  completion: the MDR update of the sign cell, the comparison against the
  overridden MDR bit at a search start, and the counter value the TIR loads.

## Design decisions worth knowing

* **IPP latency.** Latches sit between rows and between columns, so an IPP
  adds 12 clocks. A cascade of K IPPs adds 12K, and the whole index latency
  is 256 clocks at K = 16. A different latch placement, with a longer delay
  per IPP, would work the same way as long as the input skew matches it.
* **Word widths.** The IPP sum is 25 bits and the CP compares 24. The CP gets
  the upper 24 bits, which keeps the sign and the ordering. The sync bit gets
  one extra clock of delay to match.
* **No LSB truncation inside the IPP.** Dropping low-order bits of r_j and of
  the partial sums would let longer cascades fit the word. Here every bit is
  computed instead, and scaling is left to the data.
* **Search start.** The sign cell of the MDR starts a search from 0 and the
  other cells from 1, which gives the largest positive number. The P/Q flags
  are computed against that overridden value, so the first codevector of a
  search always wins unless it equals the largest positive number.
* **TIR load.** The TIR takes the counter value after its update in the same
  clock. The first codevector of a search is therefore number 0.
* **Reset.** Every register resets synchronously. The MDR resets to the
  largest positive number; everything else resets to 0.
* **Not built.** Pads, packaging and the transistor-level cell layout are not
  part of the RTL. Neither are the codebook memory and the controller that
  streams it with the B-clock skew.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
integer arithmetic, checks the clock in which each result is due, and ends by
printing `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_vq_ipp_cell` | all 16 input combinations, with plain and complemented b |
| `tb_vq_ipp` | 3000 random and extreme words: each bit of a*b+c in its clock, sync delay |
| `tb_vq_cp_delay_triangle` | each tap's delay (2i) and the sync delay |
| `tb_vq_cp_comparator_chain` | P, Q, R and every MDR bit against a running-minimum model, ties, full-range values |
| `tb_vq_cp_counter` | each TIR and IR bit in its clock; one search longer than 2^16, so that the count wraps |
| `tb_vq_cp` | index and timing for random searches, including the shortest (16-entry) searches and many ties |
| `tb_vq_top` | 8 squared-error searches, N = 64, at default size; counts search starts, new minima, ties and IR transfers |
| `tb_vq_workloads` | weighted squared error with k = 16 over N = 65,536; squared error with k = 8, N = 1,024; Itakura-Saito with p = 10, N = 256 |

To run one with Verilator:

    verilator --binary --timing -Wno-fatal --top-module tb_vq_top \
        -y rtl -y tb +libext+.sv rtl/vq_pkg.sv tb/tb_vq_top.sv
    ./obj_dir/Vtb_vq_top

`tb_vq_top` and `tb_vq_workloads` run the full default configuration. They
take well under a minute to build and a few seconds to simulate.

## Files

* `rtl/vq_pkg.sv`: default word sizes.
* `rtl/vq_ipp_cell.sv`, `rtl/vq_ipp.sv`: the IPP.
* `rtl/vq_cp_delay_triangle.sv`, `rtl/vq_cp_comparator_chain.sv`,
  `rtl/vq_cp_counter.sv`, `rtl/vq_cp.sv`: the CP.
* `rtl/vq_top.sv`: the cascade.

All sizes are parameters. K may be lowered to build a shorter cascade, or
kept at 16 with unused components fed zeros. DW and IW may be changed in the
CP; `vq_top` keeps CW >= DW and feeds the CP the top DW bits.
