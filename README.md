# Self-checking SAD engines for motion estimation

Block-matching motion estimation spends most of its time computing the sum of
absolute differences (SAD) between a block of the current frame and candidate
blocks of a reference frame:

    SAD = sum over the block of |c(i,j) - r(i,j)|

This repository holds synthesizable SystemVerilog for two SAD engines:

1. **A self-detecting, self-correcting SAD array** (`meca_bisdc`). Sixteen
   processing elements (PEs) each compute the SAD of one candidate for a 4x4
   block of 8-bit pixels. A built-in checker recomputes a cheap *biresidue
   code* of one PE's SAD from the same pixels: the SAD modulo 7 and modulo 15.
   A mismatch flags the PE output as wrong. If exactly one bit of the 12-bit
   SAD is wrong, the checker finds that bit and inverts it. The PE under test
   changes every block, so all 16 PEs are checked once every 16 blocks while
   the array keeps running. Because residues can miss or misread errors in
   several bits, a second checker recomputes the tested PE's whole SAD with
   the on-line adder of part 2 whenever it is free, and flags any difference.
2. **An on-line minimum-SAD processor** (`min_sad_processor`). It computes
   SADs most-significant digit first, in redundant signed-digit arithmetic. It
   compares each SAD with the best one so far while the digits arrive, and it
   drops a candidate as soon as the leading digits show it cannot win.

The two engines share only clock and reset. `sad_bist_top` instantiates both
side by side. The array's ports carry the prefix `me_` and the on-line
processor's ports carry `ol_`.

## Part 1: the self-checking array

### Data path

```
              cur_pix (broadcast)      ref_pix[0..15]
                     |                      |
        +------------+----------+-----------+-------------+
        |                       |                         |
   meca_array (16 x pe)     tcg: mux(TC2) -> coder mod 7 -> X
        | sad_dash[16]                     -> coder mod 15 -> Y
        |                                  |
        +--> detector (mux DC1): residues of SAD' vs X, Y -> err
        +--> selector (mux SC1, strobe SC2) -> error-free path
                                           -> syndrome_decoder -> corrector
```

* `pe`: an 8-bit subtract-and-negate forms |cur - ref|, and a 12-bit adder
  accumulates 16 of them (at most 16 x 255 = 4080, so 12 bits are enough).
  The first pair of a block loads the accumulator, so blocks can follow each
  other with no gap.
* `tcg`, the test code generator: two `coder`s see the current pixel and the
  reference stream of the PE under test. Each coder reduces every |c - r|
  modulo 2^a - 1 and adds the results modulo 2^a - 1. The residue of a sum
  equals the residue of the sum of residues, so this yields X = SAD mod 7 and
  Y = SAD mod 15 without a full SAD adder. The reduction uses end-around-carry
  folding of a-bit chunks.
* `detector`: computes |SAD' - X| mod 7 and |SAD' - Y| mod 15. These are the
  residues of the error e = SAD' - SAD. It flags an error when either residue
  is non-zero.
* `selector`: passes the PE value on as error-free, or sends it to the
  syndrome analysis and correction stage.
* `syndrome_decoder` and `corrector`: together they form the syndrome analysis
  and correction stage. The syndrome pair (S7, S15) addresses a table of the
  24 possible single-bit errors. Twelve 2:1 multiplexers then pass each SAD
  bit straight or inverted.
* `bisdc_controller`: counts pixel pairs, picks the PE under test
  (round robin) and drives the control lines TC1, TC2, DC1, SC1 and SC2.

### Why moduli 7 and 15 locate a single bad bit

If bit k of the SAD flips from 0 to 1, then e = +2^k. If it flips from 1 to 0,
then e = -2^k. The syndrome is the pair (e mod 7, e mod 15):

| bit k | e = +2^k | e = -2^k |
|------:|:--------:|:--------:|
| 0  | (1, 1) | (6, 14) |
| 1  | (2, 2) | (5, 13) |
| 2  | (4, 4) | (3, 11) |
| 3  | (1, 8) | (6, 7)  |
| 4  | (2, 1) | (5, 14) |
| 5  | (4, 2) | (3, 13) |
| 6  | (1, 4) | (6, 11) |
| 7  | (2, 8) | (5, 7)  |
| 8  | (4, 1) | (3, 14) |
| 9  | (1, 2) | (6, 13) |
| 10 | (2, 4) | (5, 11) |
| 11 | (4, 8) | (3, 7)  |

Powers of two repeat with period 3 modulo 7 and with period 4 modulo 15. The
exponents 3 and 4 are coprime, so the pair repeats only every 12 bits. All 24
entries are therefore distinct, and the sign of the error is visible as well.
The corrector computes this table at elaboration from these formulas.

The code has limits that follow from the arithmetic:

* An error that is a multiple of 105 (= 7 x 15) leaves both residues unchanged
  and is not detected.
* A multi-bit error whose syndrome happens to equal a table entry is
  "corrected" to a wrong value. One whose syndrome matches no entry raises
  `err_uncorrectable`, and the value passes through unchanged.
* Only one PE is checked per block. A fault in another PE shows up when the
  round robin reaches that PE.

The multi-bit checker below covers the first two cases on the blocks it
checks.

### Fault injection

Each PE has a `pe_fault_t` input: `create_error`, `site`, `line` and
`stuck_val`. While `create_error` is high, one line is held at `stuck_val`:

* `FAULT_SAD_BUS`: bit `line` (0..11) of the PE's SAD output bus. This gives a
  single-bit SAD error, which is always corrected.
* `FAULT_ABSDIFF`: bit `line` (0..7) of the internal |c - r| bus. The fault is
  accumulated over the block and usually gives a multi-bit error, which is
  detected, and is either uncorrectable or miscorrected.

If the line already has the stuck value, the output is still correct, and no
error is reported.

### Timing of the array

* One pixel pair per PE per cycle while `pix_valid` is high. A block is 16
  pairs. Blocks can run back to back, and idle cycles may occur anywhere.
* The edge that takes the 16th pair completes all SADs and both residues. The
  checks run combinationally in the next cycle (`sc2`). On the following edge
  the results are registered and `out_valid` pulses. The latency is therefore
  2 cycles after a block's last pair, and the throughput is one block per 16
  cycles.
* The PE under test for block b (counted from reset) is b mod 16. It is
  reported on `tested_pe`.
* `sad_out` returns all 16 SADs. The tested PE's entry holds the checked value
  (error-free or corrected). The other 15 entries hold the raw PE outputs.

### Multi-bit checker (`multibit_checker`)

The residue check is cheap but blind to some errors in several bits. The
multi-bit checker instead recomputes the exact SAD of the tested PE and
compares it with the PE's output (SAD'). Any difference raises `mb_err`,
whatever the number of wrong bits. The recomputed SAD, `mb_sad`, is then
the corrected value. It arrives 20 cycles after the array has already output
that block's result, and the array does not revise that earlier output. The
residue path still corrects single-bit errors in time.

To recompute the SAD it uses a different kind of adder from the PEs: the
on-line signed-digit SAD unit of part 2 (`online_sad`, 16 absolute-value
units and the adder tree). A fault in a PE's binary adder therefore cannot
hide itself by also corrupting the reference value.

How it is scheduled:

* While idle, it stores the 16 pixel pairs of the next block that starts:
  the broadcast current pixel, and the reference pixel of the PE under test.
  The test code generator uses the same two pixels.
* In the check cycle of that block, it latches the PE's SAD' and the PE
  number. It then takes 1 load cycle and 20 digit cycles to produce the SAD.
* `mb_valid` pulses for one cycle 22 cycles after the block's last pair. It
  comes with `mb_pe`, `mb_sad` (the recomputed SAD) and `mb_err`.
* Blocks that start while it is busy are not checked by it. With blocks back
  to back, it checks every third block. The PE under test advances by one
  per block, and 3 and 16 share no factor, so every PE is still reached.

The array's ports show these as `mb_valid`, `mb_pe`, `mb_sad` and `mb_err`;
the top adds the `me_` prefix.

## Part 2: the on-line minimum-SAD processor

### Signed digits

Each digit is two bits, (neg, pos), with value pos - neg. So `01` = +1,
`10` = -1, and `00` and `11` are both 0. Take the bit of the candidate pixel c
as pos and the bit of the reference pixel r as neg. The bit planes of the two
pixels, MSB first, then *are* the digits of c - r, so forming the difference
costs no logic.

### Absolute value on the fly (`sd_abs`)

The sign of a signed-digit number is the sign of its first non-zero digit.
Zero digits pass unchanged. If the first non-zero digit is `01`, it and all
later digits pass unchanged. If it is `10`, it and all later digits leave with
their bits swapped, which negates them. The output digit belongs to the same
cycle as the input bits.

### On-line adder (`online_adder`)

The adder uses two full-adder levels and has no carry chain:

* Level 1 (plus-plus-minus): x.pos + y.pos - x.neg = 2*c1 - n1. This is a full
  adder with x.neg inverted at its input. n1 is the inverted sum.
* Level 2 (plus-minus-minus): c1(from the position below) - n1 - y.neg
  = p2 - 2*m2. This is a full adder with both negative inputs inverted and its
  carry inverted.
* The output digit of a position is (m2 from the position below, p2).

The level-2 cell of a position needs the carry c1 of the next lower position.
That carry arrives one cycle later, so n1 and y.neg are registered once and p2
once more, and the output digit is registered. The result is an on-line delay
of 3: output digit j leaves in the cycle in which input digits j+3 enter. The
sum has one more leading digit than the inputs. After `clr`, input digit
k = 1..n enters in cycle k-1 and output digit j = 0..n leaves in cycle j+2.

### SAD and tree timing (`online_sad`, `online_adder_tree`)

Sixteen `sd_abs` units feed a 4-level binary tree of on-line adders. Each level
adds one leading digit and 2 cycles. With 8-bit pixels the SAD comes out as 20
digits in cycles 0..19 after `clr`. The first 8 digits are always zero and
the last 12 carry the SAD. Pixel bits enter in cycles 0..7 and zeros follow.

### Early termination (`online_comparator`)

The comparator keeps the running value v = 2v + digit. With `rem` digits still
to come, each in {-1, 0, 1}, the final SAD is at least v*2^rem - (2^rem - 1).
As soon as this bound exceeds SAD_r (the best SAD so far), the candidate is
abandoned. At the last digit the bound equals the SAD, so a candidate whose
SAD is above SAD_r is always abandoned, at the latest on its last digit. A
candidate that reaches the end without being abandoned has SAD <= SAD_r. If its
SAD is strictly less, it replaces SAD_r, and its index becomes the motion
vector. On a tie the earlier candidate is kept.

### Interface and timing of the processor

* Candidates use a valid/ready handshake. `cand_pix[16]` and `ref_pix[16]`
  are whole blocks. `cand_first` starts a search: SAD_r is forgotten and the
  index restarts at 0. `cand_last` ends the search.
* `cand_ready` is high only while the processor is idle. A candidate takes
  1 load cycle plus up to 20 digit cycles, so 21 clock edges from acceptance
  to `cand_done` when it runs to the end, and fewer when it is abandoned.
* After each candidate, `cand_done` pulses. `cand_early` tells whether the
  candidate was abandoned. If it was not, `cand_sad` holds its SAD.
* After the last candidate, `result_valid` pulses with `min_sad` and `mv`.
  `mv` is the index of the best candidate within the search. Mapping the
  index to a displacement is left to the host.

## Files

| file | contents |
|------|----------|
| `rtl/sad_bist_pkg.sv` | widths, `sd_digit_t`, `pe_fault_t`, `bisdc_ctrl_t`, residue functions |
| `rtl/sad_bist_top.sv` | both engines side by side |
| `rtl/meca_bisdc.sv` | array with self-detection and self-correction |
| `rtl/meca_array.sv`, `rtl/pe.sv` | the 16 PEs |
| `rtl/tcg.sv`, `rtl/coder.sv` | test code generator |
| `rtl/detector.sv`, `rtl/selector.sv` | detection and routing |
| `rtl/syndrome_decoder.sv`, `rtl/corrector.sv` | syndrome analysis and correction |
| `rtl/bisdc_controller.sv` | block sequencing and PE selection |
| `rtl/multibit_checker.sv` | multi-bit check by on-line recomputation |
| `rtl/min_sad_processor.sv` | on-line minimum-SAD search |
| `rtl/online_sad.sv`, `rtl/sd_abs.sv` | on-line SAD and absolute value |
| `rtl/online_adder_tree.sv`, `rtl/online_adder.sv` | on-line addition |
| `rtl/online_comparator.sv` | digit-serial comparison with early stop |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters default to the sizes above: 16 PEs, 16 pixels per block, 8-bit
pixels and 12-bit SADs. The syndrome table is unique only for the default
12-bit SAD with moduli 7 and 15.

## Simulating

Every testbench checks the module against a reference model of its own. Each
prints `TB_RESULT checks=N failures=M` and stops itself, or a watchdog stops
it. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sad_bist_pkg.sv \
          tb/tb_sad_bist_top.sv --top-module tb_sad_bist_top -o sim
./obj_dir/sim
```

Replace `sad_bist_top` with any other module name to run its testbench.

`tb_sad_bist_top` runs the whole design at its default sizes. It drives 64
blocks through the array, most of them back to back, with both kinds of
injected fault. It also runs 20 searches of 8 candidates through the on-line
processor. It counts and requires each of these: an error-free check, a
detection, a correction, an uncorrectable error, a clean and a failing
multi-bit check, every PE tested, back-to-back
blocks, an early stop, a replacement of SAD_r, a full-length candidate and a
search result. The array's testbenches check the 2-cycle result latency and
the 22-cycle multi-bit check latency. The
processor's testbench checks the 21-cycle candidate time. The tests use
`$urandom` stimulus together with fixed corner cases such as all-255
differences, zero SADs and ties.

All testbenches pass, and each one fails when its module is deliberately
broken in one place.

## Design choices not fixed by the underlying description

The description this RTL follows gives the blocks, the coding rules and the
adder structure. It leaves the following open, and they were chosen here:

* **Moduli.** The rule is only 2^a - 1 and 2^b - 1 with gcd(a, b) = 1. This
  design uses a = 3 and b = 4, the smallest pair that locates all 24
  single-bit errors of a 12-bit SAD. It matches 4-bit residue and syndrome
  ports, and it agrees with a published simulation example in which an
  error of -2 gives the syndromes 5 and 13.
* **Reference data movement in the array.** The original array moves
  reference pixels through the PEs from two input multiplexers. Here every PE
  has its own reference pixel input instead, and the current pixel is
  broadcast.
* **Test schedule and control encoding.** One PE is tested per block, round
  robin. TC1 is the pixel strobe of the coders, TC2 selects the coded PE,
  DC1 and SC1 select the checked PE, and SC2 is the delivery strobe.
* **Result ports.** The error-free and corrected outputs are merged into
  `checked_sad`, with flags for detected, corrected and uncorrectable errors.
* **Fault-injection controls.** The `site`, `line` and `stuck_val` fields are
  additions. Only a single error-enable input is given.
* **Multi-bit detection.** Only the idea is given: compare the result of an
  efficient adder with the PE's result. The efficient adder is taken to be
  the on-line adder tree. Buffering, the one-block-in-three schedule and the
  timing are this design's choices.
* **On-line comparator.** Only its function is specified. The bound test above
  is the simplest circuit that provides it.
* **Processor interface.** Parallel blocks with valid/ready, internal bit
  serialisation, and a motion vector given as the candidate index.
* **Block size of the on-line processor.** Not stated. It is taken as 4x4, as
  for the array.
* **Reset.** Every register has an asynchronous active-low reset, `rst_n`.
  The on-line units also have a synchronous `clr` between numbers.

Not built: the host processor that dispatches candidate blocks. The
testbenches play its role.
