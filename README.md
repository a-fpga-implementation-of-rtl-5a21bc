# Partly parallel decoder for a rate-1/2, 8088-bit irregular LDPC code

This is synthesizable SystemVerilog for a belief-propagation decoder of an
irregular low-density parity-check (LDPC) code with 8088-bit codewords and 4044
information bits. The code is built by the *irregular partitioned permutation*
(IPP) method. A small 12 x 24 block matrix H' is expanded into the parity check
matrix H: each non-zero entry becomes a 337 x 337 circularly shifted identity.
The decoder works on P = 24 consecutive rows of H per clock cycle. All memories
are 24 values wide, and a few shifters and multiplexers realise the graph
connectivity, with no large crossbar. One iteration takes 183 clock cycles. A
frame stops after 25 iterations, or earlier once every parity check holds.

## The code

* m = 337 (prime), H' has J = 12 block rows and K = 24 block columns, so
  N = 337 x 24 = 8088 and the rate is 1/2.
* Entry (s, t) of H' is the identity shifted by `offset = b^s * a^t mod 337`.
  Here a = 54 has multiplicative order 24 and b = 72 has order 12 modulo 337.
  Row r of block row s meets column `(r + offset) mod 337` of block column t.
* The 24 block columns form **9 column sections**. A block row has at most one
  non-zero entry per section. Each block row has 7 or 8 entries, so the maximum
  row weight is 8.
* The exact H' (`ldpc_pkg.sv`) is this design's own. Its column sections are
  4, 4, 4, 2, 2, 2, 2, 2 and 2 block columns wide. Every block row uses
  sections 0..2. Block row s leaves out section `3 + s mod 6`. Block rows 6..11
  also leave out section `3 + (s+3) mod 6`. Inside section k, block row s uses
  the block column at position `(s + k) mod width`. Rows have weight 8 (block
  rows 0..5) or 7 (6..11). Columns have weight 3, 4 or 5. To use a different
  H', change the functions `conn`, `slot_of`, `sec_width` and `sec_base` (and
  the generators). Every other module takes its tables from them.

## Data layout: words, offsets and the gap

A block column of 337 values is stored as 15 words of 24 lanes. Word `w`,
lane `l` holds column `24w + l`. Since 337 = 14 x 24 + 1, **word 14 holds a
single value** (column 336). Its other 23 lanes are dummies. Row groups have
the same shape: group 14 of a block row is row 336 alone.

Split a circulant offset into `A = offset / 24` (the *address offset*) and
`d = offset mod 24` (the *data offset*). Row group g then needs columns
`24g + d + 24A ...`. For a block row this is a run of 24 values that starts in
lane d of some word and continues into the next word. This "rotation by d
across a word boundary" is the whole alignment problem. It has one
complication: the run of columns wraps from 336 to 0. At that point the
one-value word 14 sits between two full words. After the wrap the effective
data offset changes by one lane. Handling this is called *gap closing* below.

## Datapath, one group per cycle

```
            +-------------------- 9 x CSB (one per column section) ---------------------+
 received ->| rx memory | column sum mem A/B (ping-pong) | rev_align | align | adder   |
            +----------------------------|---------------------^------------------------+
                              Lq (7 b, row order)       R (6 b, row order)
                                         v                     |
                                    rev_router (9 -> 8)     router (8 -> 9)
                                         v                     ^
                         24 x PAB: q = sat(Lq - R_old), parity check
                                         v                     |
                         24 x PCUB: check node update ---------+----> R memory (R_old)
```

In each cycle the controller names one row group (block row s, group g).
Every **column sum block** (`csb`) whose section block row s uses delivers 24
values Lq_j = A_j + received_j in row order. A_j is the sum of the R messages
of the previous iteration, and Lq_j is saturated to 7 bits. The **reverse
router** hands the eight (or seven) section words to the eight edge slots. The
multiplexers depend only on the block number, so they change every 15 cycles.
Each of the 24 **PABs** forms `Lq_j - R_mj(old)`, with R_mj(old) read from the
**R memory**. A PAB also XORs the hard decisions of its row for the parity
check. Each of the 24 **PCUBs** computes the new R_mj, which is written back
to the R memory. The **router** returns the new R_mj to the sections, where
the **alignment** block puts them back in column order. They are then
accumulated into memory B. At the end of the iteration memories A and B swap
roles (ping-pong). This lets the next iteration start at once, without copying
memories.

This path, from the reverse alignment registers through PAB, PCUB and router
to the memory write, is combinational. No pipeline registers surround the PCUB.

### PCUB arithmetic

Messages are two's complement with 2 fractional bits: 6 bits for received
values and R, 7 bits for column sums and Lq. A positive value means bit 0. The
PCUB converts each input to sign and magnitude, so one 32-entry, 5-bit table
serves the symmetric function Psi(x) = -ln(tanh(x/2)). The table holds
`round(4 * Psi(i/4))`. The PCUB sums the eight table outputs. For each edge it
subtracts the edge's own term, clips the result to 31 and applies the table a
second time (Psi is its own inverse). The sign of an output is the product of
the other edges' signs. A PCUB has 16 tables of 32 x 5 bits.

Entry 0 of the table stands for infinity, and it holds **12 (3.0) rather than
31**. With 31, a check whose other inputs are all certain returns the largest
message, and the 6-bit decoder then locks onto wrong decisions. With 12 it
converges: at Eb/N0 = 2.5 dB in 9 iterations, and at 2.0 dB in 18 (see the
testbench). This value is a tuning choice of this design.

## Column sum block (the hard part)

Each `csb` holds, for the block columns of its section:

* `rx_mem`: the received values, 15 x width words of 24 x 6 bits;
* `mem0` / `mem1`: the column sums of R, 15 x width words of 24 x 7 bits.
  `sel` decides which is A (read) and which is B (accumulated);
* `dec_mem`: the decoded data, 15 x width words of 24 hard decisions.

Memories read asynchronously, like distributed RAM, and write on the clock
edge. A block (one block row) takes 15 cycles in every section.

**Read side (`rev_align`).** The words of the block are read one per cycle in
the order A, A+1, ..., 14, 0, ..., A-1 (read index 0..14). The module keeps
three registers: P1 and P2 hold the previous two words, and H holds the first
word of the block. Group g leaves two cycles after read g. Each group is built
from two 24-lane words X and Y: a per-lane multiplexer takes lanes >= s from X
and lanes < s from Y, then a circular shifter rotates by s. Before the wrap,
X and Y are P2 and P1 and the shift is d. In the group whose second word is
word 14, that word's single value is merged in front of the next word.
Once word 14 has passed, the shift becomes d-1 on the next pair of words.
Group 13 uses the head register H in place of a new read. Group 14 (row 336)
is one lane, captured in register E a cycle earlier. This frees the registers
for the next block, whose reads have already begun.

**Write side (`align`).** This is the mirror image. Groups 0..14 arrive one per
cycle, and word index i (i >= 1) is complete when group i arrives. It is built
from the current group and the previous one, or from the two groups before that
once word 14 has passed. Shift values are `24 - d` before the wrap and
`25 - d` after it, the complement of the read side's. Word A (index 0) needs
group 0, group 13 and group 14. Group 0 is kept in register G0, and word A is
built and written **in the first cycle of the next block**, the only cycle in
which no other word is written. The adder writes the aligned word alone if
this block row is the first one connected to that block column (no read is
needed). Otherwise it adds the word to B with 7-bit saturation. Dummy lanes of
word 14 are written as 0. Address generation is `slot*15 + (A + index) mod 15`,
the same on both sides. The write side lags the read side by two cycles.

**Decoded data.** Each word read on the read side also writes the sign bits of
its Lq into `dec_mem` at the same address. Every column is read at least once
per pass, so after the last pass `dec_mem` holds exactly the decisions whose
parity was checked in that pass. That is the converged codeword after an early
stop, and the input of the 25th pass otherwise. `q_slot` and `q_word` read it
on a port of its own (`q_hard`). Loading the next frame into `rx_mem` does not
disturb it.

## Schedule and stopping

`ldpc_ctrl` counts c = 0..182 in each pass:

| c        | what happens                                                  |
|----------|---------------------------------------------------------------|
| 0..179   | reads: block c/15, read index c mod 15                        |
| 2..181   | groups: block (c-2)/15, group (c-2) mod 15; R memory read one cycle ahead |
| 182      | deferred write of the last word of block 11                   |

The parity checks of a pass test the Lq values read in that pass. If all 4044
hold, decoding stops **without swapping**, and the checked values remain
readable (`converged = 1`). Otherwise A and B swap. The next pass starts in the
following cycle unless 25 passes have run (`converged = 0`). In the first pass
A and the R memory count as zero (`a_vld = 0`), so they need no clearing.
A frame takes `iters x 183 + 1` cycles from `start` to `done`.

## Top-level interface (`ldpc_decoder`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `ld_en`, `ld_col`, `ld_word`, `ld_data` | in | 1, 5, 4, 24x6 | write received word `ld_word` of block column `ld_col` (code bits 337t + 24w + l); only while idle |
| `start` | in | 1 | one-cycle start, while `busy = 0` |
| `busy`, `done`, `converged`, `iters` | out | 1, 1, 1, 5 | status; `done` pulses once |
| `q_col`, `q_word`, `q_hard` | in, in, out | 5, 4, 24 | hard decisions of one word, combinational; valid from `done` to the next `start`, also while the next frame loads |

Parameter: `MAX_ITER` (default 25). The code constants (m, P, J, K, word
widths) live in `ldpc_pkg`. The address and shift logic assumes
m mod P = 1, which is true for 337 and 24.

## How it compares with the described design

* **Cycles per iteration:** 183 here, against 15 x 12 + 2 = 182. Writing the
  last word of a block in the next block's first cycle leaves one extra cycle
  after the last block. Throughput at the quoted 44 MHz estimate:
  44e6 x 4044 / (183 x 25) = 38.9 Mbit/s, against about 40.
* **H' and generators** are this design's own (see above). Every structural
  property the architecture relies on is kept.
* **Column sum memories** hold sums of R only. The received value is added on
  the read side.
* **Decoded data memory:** the document only names it. Writing it from the
  read side, so that it holds the decisions of the last checked pass, is this
  design's choice.
* **Word lengths:** 6-bit R and alignment, 7-bit column sums and reverse
  alignment, and 32 x 5 tables, as described. The PCUB's internal 8-bit sum,
  the saturation points and the 2 fractional bits are this design's choices.
* **Timing and resources:** not measured. The FPGA figures (LUT counts, 44 MHz)
  belong to a different implementation.
* The input buffer takes a new frame only while the decoder is idle. It is not
  double-buffered.

## Files and simulation

`rtl/`: `ldpc_pkg` (constants, types, H' tables, Psi table), `circ_shifter`,
`rev_align`, `align`, `csb`, `rev_router`, `router`, `pab`, `pcub`, `r_mem`,
`ldpc_ctrl`, `ldpc_decoder` (top).

`tb/`: one self-checking testbench per module. Each prints
`TB_RESULT checks=N failures=M`:

* `tb_ldpc_decoder` runs the full-size decoder at its default parameters. It
  contains a reference decoder that works directly on the expanded H and uses
  the same fixed-point rules. The RTL must match it bit for bit on every
  decoded bit, on the number of iterations, on convergence and on cycle count.
  The test frames are a noiseless frame, AWGN frames at 2.5 and 2.0 dB (early
  stop) and one at -1 dB (stops at 25 iterations). It also counts
  gap-closing groups, deferred writes, first-in-column and accumulating
  writes, swaps and weight-7 rows. While each frame loads, it reads the
  previous frame's result back and checks it again.
* `tb_rev_align`, `tb_align` run 40 back-to-back blocks with random and corner
  offsets (0, 1, 2, 23, 24, 335, 336).
* `tb_csb` runs two passes of one section against a column-wise model.

Example:

```
verilator --binary -Wall -Wno-fatal --top-module tb_ldpc_decoder \
    rtl/ldpc_pkg.sv -Irtl tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

The full-size test takes well under a minute to build and less than a second
to run.
