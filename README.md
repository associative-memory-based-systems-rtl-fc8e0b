# Fully-parallel nearest-match associative memory (Manhattan and Hamming distance)

An associative memory stores R reference words and, given an input word,
returns the stored word closest to it. "Closest" means the smallest
Manhattan distance, the sum of |input unit - reference unit| over all units
of the word, or the smallest Hamming distance when the units are single
bits. Typical uses are codebook vector quantization for image compression,
where each 4x4 pixel block is replaced by the number of its nearest codebook
block, and black/white pattern recognition.

The architecture does the whole comparison in the memory array at once.
Every row has its own comparators. Every row forms its own distance. One
winner-search circuit shared by all rows then picks the minimum. No
sequential scan takes place, and the search circuit grows linearly with the
number of rows. For reference spaces too large for one array, several such
arrays ("banks") search in parallel. A small digital tournament then picks
the global winner among the banks' local winners.

This RTL gives two memories side by side in `am_top`:

* **Manhattan memory, bank type** (`bank_am_system`): 4 banks of 64
  reference words, 256 words in all. Each word is 16 units of 5 bits, so
  the distance range is 0 to 16 x 31 = 496.
* **Hamming memory** (`hamming_am`): 32 reference words of 768 bits, with a
  distance range of 0 to 768.

In the original circuits the word comparison, the winner line-up amplifier
and the winner-take-all stage are analog. Here they are exact integer
arithmetic that computes the same decision. Everything else is ordinary
synchronous digital logic.

## One search, row by row

For each row i of a bank, in one clock cycle:

1. **Unit comparators** (`unit_comparator`, one per K-bit unit): each forms
   |SW - REF| for its unit, where SW is the search-word unit and REF the
   stored unit. The next section explains how.
2. **Word comparator** (`word_comparator`): sums the units' results into
   C_i, the row's distance. On silicon this is a current sum on a match
   line. The transistor widths are weighted 1, 2, 4, ... for the magnitude
   bits and 1 for the correction line. Here it is an adder with the same
   weights.
3. **Winner line-up amplifier** (`wla`): finds the smallest C_i (the
   feedback F). It then maps every row to a level LA_i, with the winner at
   full scale and the losers below it by a gain of 20 per distance step.
4. **Winner-take-all** (`wta`): five cascaded stages widen the gap between
   the top row and the rest. A decision stage then raises match line M_i
   for the winner and for any row at exactly the same distance.
5. **Priority encoder** (`priority_encoder`): turns the match lines into a
   row address. The lowest row wins among equal rows.
6. **Tree adder** (`tree_adder`): adds the winner row's unit results in a
   binary adder tree. This gives the winner-input distance as a number,
   which the banks need in order to compare their local winners.

The local result (found, row, distance, match lines) is registered at the
bank output.

## The unit comparator: |a - b| with one adder

This block is the least obvious part of the design and is taken directly
from the compact subtract/absolute-value circuit it models. Inverting the
stored value and adding with carry-in 0 gives:

    S = SW + ~REF = SW - REF - 1   (mod 2^K),   C_max = carry out

* If SW > REF, then C_max = 1, and S is one less than the magnitude.
* If SW <= REF, then C_max = 0, and ~S = REF - SW is exactly the magnitude.

So the unit outputs the K bits `out_mag = C_max ? S : ~S` and one more line
`out_cor = C_max` with weight 1. Their sum is |SW - REF| in every case.

The +1 is never added inside the unit. It becomes one extra unit-weight
transistor on the match line (in this RTL, one extra adder input). This
saves a second carry chain per unit.

For K = 1 the same unit reduces to an XOR, and the Hamming memory uses a
plain XOR bit comparator (`bit_comparator`) with no correction line.

Example, K = 5, SW = 3, REF = 10: ~REF = 21, and S = 24 with C_max = 0. The
outputs are out_mag = ~24 = 7 and out_cor = 0, so the distance is 7.

## Winner line-up and winner-take-all models

The two analog stages are modelled by their decision, not by their
voltages:

* `wla` uses `LA_i = LA_MAX - min(LA_MAX, GAIN*(C_i - min C))` with
  `LA_MAX = 4095` and `GAIN = 20`. Because the reference point is the
  minimum itself, the winner sits at the top of the steep region at any
  absolute distance. This models the self-adapting maximum-gain region of
  the real amplifier. With `en` low every LA_i is 0.
* `wta` applies five stages of `e' = min(4095, 5*e)` to each row's
  separation e from the best row, with alternating polarity (an inverting
  common-source stage). A threshold at half scale then decides.

A one-step distance difference becomes a separation of 20 in the amplifier.
It then grows to at least 4095 after the winner-take-all stages. So the
model separates any two distinct distances and is exactly a minimum finder.
Rows at equal minimum distance all raise M_i.

The models leave out what the silicon has and the RTL cannot show:
transistor mismatch, finite settling time, and the loss of reliability the
real circuit shows at large winner-input distances. The voltage scale, the
threshold and the choice of the lower ends of the gain ranges (20 of 20-50,
5 of 5-20 per stage) are this design's own.

## Banks and the global tournament

`bank_am_system` instantiates NB banks (`am_bank`) on a shared search word.
It also instantiates `global_winner_select`, a binary tree of
`dist_comp_sel` nodes. Each node compares two distances and passes the
smaller one on, with its {bank, row} address. Four banks need two rounds.
An absent candidate always loses, and on equal distances the lower bank
wins. The final result is the code number {bank, row} and the distance.

**Bank-selective activation:** `bank_en[b]` low keeps bank b out of the
search. Its local result reports no winner and it cannot win the
tournament. The purpose is power. When the reference space is partitioned
so that the bank holding the winner is known in advance, only that bank
needs to search. With all banks disabled, `win_found` is 0.

**Pipeline:** bank search and tournament are separate register stages.
A search sampled at clock edge t has its local winners registered at t+1
and the global result on `win_*` at t+2. A new search can start every
cycle, so throughput is set by the bank search alone.

**Reading the winner back:** each bank has a 2-1 selector in front of its
read row decoder. It chooses either the external address or the bank's last
local winner. `rd_winner` with `rd_en` reads the global winner's reference
word from the bank that won the last search. Issue that read after
`win_valid` and before the next search completes.

## Interface of `am_top`

All signals are synchronous to `clk`. `rst_n` is an asynchronous active-low
reset, and it clears the memories as well as the registers.

| signal | dir | width | meaning |
|---|---|---|---|
| `m_bank_en` | in | 4 | bank enables |
| `m_wr_en`, `m_addr`, `m_wdata` | in | 1, 8, 80 | write `m_wdata` at `m_addr = {bank[1:0], row[5:0]}` |
| `m_rd_en`, `m_rd_winner` | in | 1, 1 | read `m_addr`, or the last winner's word |
| `m_rdata`, `m_rdata_valid` | out | 80, 1 | read data, one cycle after `m_rd_en` |
| `m_search`, `m_search_word` | in | 1, 80 | start a search; unit j is bits [5j+4:5j] |
| `m_win_valid` | out | 1 | result valid, two cycles after `m_search` |
| `m_win_found`, `m_win_bank`, `m_win_row`, `m_win_dist` | out | 1, 2, 6, 9 | global winner |
| `h_en` | in | 1 | Hamming memory enable |
| `h_wr_en`, `h_addr`, `h_wdata` | in | 1, 5, 768 | write a reference word |
| `h_rd_en`, `h_rdata` | in/out | 1, 768 | read `h_addr`, data one cycle later |
| `h_search`, `h_search_word` | in | 1, 768 | start a search |
| `h_match_valid`, `h_match` | out | 1, 32 | match lines of the minimum-distance row(s), one cycle after `h_search` |

A search and a write in the same cycle search the old contents.

## Parameters and sizes

| parameter | default | where |
|---|---|---|
| `K` | 5 | bits per Manhattan unit |
| `W` | 16 | units per Manhattan word (a 4x4 pixel block) |
| `R` | 64 | words per bank |
| `NB` | 4 | banks; must be a power of two, at least 2 |
| `HW`, `HR` | 768, 32 | Hamming word width and word count |

The defaults live in `am_pkg`. Distance widths follow from them
(`am_pkg::dist_width`).

Other configurations and whether the defaults hold them:

* A 2-bank, 128-word memory fits, or can be built exactly with `NB=2`.
* A single 128-word Manhattan bank is `am_bank` with `R=128`.
* A 1024-entry vector-quantization codebook of 8 banks x 128 words does not
  fit the default 256 words. It needs `NB=8, R=128`, and `tb_vq_codebook`
  runs that size.

## Departures from the circuits this models

* The analog match-line summation, the winner line-up amplifier and the
  winner-take-all circuit are exact integer models, as described above.
  Real settling times of a few hundred nanoseconds become one clock cycle.
* Storage cells are flip-flops, so every row is visible to its comparators
  at once. Reads and writes move whole words. Column-wise access to single
  units is not provided.
* The choices made here are: lowest row first in the priority encoder,
  lower bank first in the tournament, registering of the two pipeline
  stages, the enable and read-out protocol, and clearing the memory on
  reset.
* Bias, power-regulation and signal-regulation transistors have no logic
  function and are not represented.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/am_pkg.sv tb/tb_am_top.sv \
        --top-module tb_am_top -Mdir obj_am_top
    ./obj_am_top/Vtb_am_top

Swap in any other testbench name. The testbenches are:

* `tb_am_top` runs the full default-size design end to end. It fills both
  memories, then runs 200 back-to-back searches on each against reference
  models. It also counts, and requires, each mechanism: back-to-back
  pipelined searches, partial and full bank deactivation, equal-distance
  ties across banks, winner read-out, Hamming ties and a disabled Hamming
  memory.
* `tb_vq_codebook` quantizes a synthetic 64x64 5-bit image against a
  1024-entry codebook (8 x 128). It is slower to build.

The unit-level testbenches check, respectively: the subtract/abs unit
(exhaustive), the sums, the amplifier and winner-take-all models, the
tournament (4 and 8 banks), the storage field, and a single bank.

## Files

`rtl/`: `am_pkg`, `unit_comparator`, `bit_comparator`, `word_comparator`,
`storage_field`, `wla`, `wta`, `priority_encoder`, `tree_adder`, `am_bank`,
`dist_comp_sel`, `global_winner_select`, `bank_am_system`, `hamming_am`,
`am_top`. `tb/`: one `tb_<module>` per module, plus `tb_vq_codebook`.
