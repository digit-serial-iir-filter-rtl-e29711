# Digit-serial first-order IIR filter with a pipelined feedback loop

A recursive (IIR) filter is hard to pipeline: every output needs the previous
output, so the loop through multiplier and adder must close within one sample
time. This design processes words **digit-serially** — one N-bit digit per
clock, least significant digit first — and that changes the picture. A sample
occupies 2M clock cycles, the output is produced digit by digit, and only the M
most significant digits of each output are fed back. Those digits are ready M
cycles before they are needed, so the feedback loop holds M cycles of slack
that can be spent on pipeline registers inside the adder and multiplier.
Inside the multipliers, every carry is either carry-saved or moved forward one
cycle to the next digit, so no carry ripples across a whole word.

The filter computes, on unsigned words of `N*M` bits (16 bits by default:
M = 4 digits of N = 4 bits):

    y_k  = (a0*x_k + a1*x_{k-1} + b1*yhat_{k-1})  mod 2^(2NM)
    yhat = y >> (N*M)        (the M most significant digits of y)

`yhat` has the same weight as the input, which is how the word length is kept
fixed: the low half of each output is a gain in precision that is not fed
back.

The same structure extends to any order K (`ds_iirk`). Its default, K = 2,
is the second-order form the architecture was first drawn in.
Besides the filters, the RTL contains the 16 x 16 bit digit-serial multiplier
as a standalone unit, with two small test systems around it (input and output
shift registers; a reduced version with a fixed multiplicand sized for a small
FPGA).

## Word format and timing

One sample = 2M cycles ("a frame"). Cycle `i` of a frame carries digit `i`.

| signal | cycles 0..M-1 | cycles M..2M-1 |
|---|---|---|
| input `x` | digits 0..M-1 of x_k | zeros (forced inside the filter) |
| output `y` | digits 0..M-1 of y_k (LSDs) | digits M..2M-1 of y_k (MSDs) |
| truncated `yt` | zero | same as `y` |
| feedback into the b1 multiplier | MSDs of y_{k-1} | zeros |

The M zero digits at the end of each input word give a multiplier the time to
emit the upper half of its 2M-digit product.

* A 2M-state counter starts at 0 when `clr` is released; `x_first` is high in
  the cycle in which digit 0 of a word must be on `x`.
* `y`/`yt` carry digit `i` of `y_k` two enabled clocks after digit `i` of
  `x_k` was applied (four with `PIPE = 1`). `y_first` marks digit 0.
* `ce` low freezes every register (a stall). `clr` clears every register
  asynchronously.
* Coefficients `a0`, `a1`, `b1` are parallel words and must be stable.

## How the loop closes in M cycles

The MSD with index `M+j` of `y_{k-1}` leaves the adder at frame cycle `M+j+2`.
It must enter the b1 multiplier as digit `j` of `yhat_{k-1}`, at cycle `j` of the
next frame, 2M cycles after the frame start. The difference is `M-2` cycles.
The feedback path is therefore:

    y --AND(cnt)--> yt --(M-2 registers)--> b1 multiplier

The `AND` with the truncation control `cnt` (0 for the LSD half, 1 for the MSD
half) does double duty. It removes the LSDs from the fed-back word. After the
`M-2` delays, those removed LSDs also arrive in exactly the cycles where the b1
multiplier needs zeros. The two adder pipeline stages plus the `M-2` registers
add up to the M cycles of slack. So M must be at least 2. The multipliers and
the CSA array add no latency of their own: their registers sit between digits
of different weight, not in the path from a digit to the output digit of the
same weight.

## The digit-serial multiplier (`ds_mult_cell`, `ds_mult`)

The multiplicand `b` is held in parallel as M digits. Cell `j` owns digit
`b_j`. The serial digit `y_t` goes to all cells at once. Cell `j` at cycle `t`
works on significance `t+j+1` and adds:

* the high digit (MSD) of `b_j * y_t`,
* the low digit (LSD) of `b_{j+1} * y_t` from the cell on its left (same
  cycle, no register),
* three partial-result digits `s1..s3` that the left cell produced in the
  previous cycle (cell `j+1` at `t-1` also worked on significance `t+j+1`),
* its own carries from the previous cycle (significance `t+j`, carry into
  `t+j+1`).

The `N x N` product comes from a carry-save array of AND-gated full adders.
The low N bits leave the array's right side fully resolved, and the high N bits
leave as a sum vector and a carry vector. Three carry save adders then fold in
the incoming LSD and the three partial digits. Shifting a CSA's carry vector
left frees its bit 0 and pushes its top bit to the next significance. The cell
handles that next significance in the next cycle, so the top bit is registered
and re-enters the freed bit 0 one cycle later. Carries stay local to the cell,
and the critical path is the array plus three full adders, whatever the word
length.

Cell 0 delivers, each cycle, one product digit in redundant form:
`lsd + s1 + s2 + s3`. A product of two M-digit words fits in 2M digits, so the
cells hold nothing when the next word starts. Words can follow back to back.

Two consumers turn the redundant form into something usable:

* `ds_reduce` uses two CSAs, with delayed top carries, to bring the four digits
  down to a sum/carry pair. The filter uses this form.
* `ds_adder` is `ds_reduce` followed by a carry ripple adder whose carry-out
  is delayed one cycle into its own carry-in, then a 4-bit output register.
  Together with `ds_mult` it forms `ds_mult_adder`, the plain 16 x 16
  multiplier. Its product digits appear one cycle after the matching input
  digit, and a product takes 2M = 8 cycles.

## Accumulation and the pipelined adder (`csa_array`, `bl_ds_adder`)

`csa_array` adds three sum/carry pairs into one pair with four CSAs. The pairs
are the a0 product (nonrecursive), the b1 product (recursive) and the a1
product from the second cell. CSA A adds the a0 pair and the a1 sum. CSA B
adds the b1 pair and the a1 carry. CSA C adds A's pair and B's sum. CSA D
adds C's pair and B's carry. Again, each top carry is delayed one cycle into
the next significance.

`bl_ds_adder` resolves the pair into a binary digit without a carry loop
through an adder:

1. CRA 1 computes `D = s + c` and carry `c1` (no carry-in). This result is
   registered.
2. The carry into the current digit is `k`. The output is `O = D + k`. The
   carry into the next digit is `c1 | (k & (D == 2^N-1))`, where an AND tree
   detects the all-ones digit. `c1` and an all-ones `D` never occur together.
3. `O` and `T = O & cnt` are registered.

The only feedback loop is one AND, one OR and one flip-flop. On the first digit
of a word, the carry-in is the `ci` input (0 in the filter) instead of the
carry left over from the previous word. `csa_array` likewise drops its delayed
carries on the first digit. Together these make the output modulo
`2^(2NM)`: an overflow of the 2M-digit sum does not spill into the next sample.

### Sub-digit pipelined CSA array (`PIPE = 1`)

With long words the loop has more slack than the adder needs. `csa_array`
and `ds_iir1` take a parameter `PIPE`, which spends two of those cycles
inside the array:

* A row of registers sits after the first two CSAs (A and B).
* A second row sits after the third CSA (C). B's carry digit passes
  through both rows.
* C and D clear their fed-back carries on copies of `first` delayed by 1 and
  2 cycles.
* In `ds_iir1` the adder's `first` and truncation control are delayed by 2
  as well. The plain feedback delay shrinks to `M-4`, and `y` follows `x`
  by 4 cycles instead of 2.

`PIPE = 1` needs `M >= 4`. `ds_iirk` and the top use the unpipelined array.

## Filter structure (`ds_iir1`)

    x ──► [a0 multiplier + ds_reduce] ──────────────────────────┐
    x ──► M regs ──► [a1 multiplier + ds_reduce] ──► M regs ────┤ csa_array ──► bl_ds_adder ──► y
    yhat ─► [b1 multiplier + ds_reduce] ────────────────────────┘                      │
      ▲                                                                                ▼ AND cnt
      └──────────────────────────── M-2 regs ◄──────────────────────────────────────── yt

The a1 term of `x_{k-1}` is delayed by M cycles before and M cycles after its
multiplier. It therefore reaches the CSA array together with the a0 term of
`x_k`. All three multipliers are identical `ds_mult` instances.

## Higher orders (`ds_iirk`)

    y_k = sum_{l=0..K} a_l*x_{k-l} + sum_{l=1..K} b_l*yhat_{k-l}   (mod 2^(2NM))

The order-K filter repeats the a1/b1 multiplier pair K times. Each older
term must deliver its product digits in the frame of the a0 product of
`x_k`, so tap `l` needs `2lM` cycles of delay in total:

* `a_l` multiplies x after `(2l-1)M` cycles on a shared input delay line. It
  then passes `M` more cycles as a sum/carry pair, as the a1 tap of the
  first-order filter does.
* `b_1` multiplies `yhat` directly, so the loop is exactly the first-order
  loop.
* `b_l` (l >= 2) multiplies `yhat` after `(2l-3)M` cycles on a shared delay
  line, then passes `M` cycles as a pair.

The 2K+1 pairs are summed by a chain of K CSA arrays. Each adds one a-product
and one b-product to the running pair. The CSA arrays have no latency, so the
loop timing does not depend on K. The price is a combinational path through
K CSA arrays in front of the pipelined adder. Coefficients come as packed
arrays, `a[l] = a_l` and `b[l] = b_l`.

## Module map

| module | role |
|---|---|
| `iir_top` | top: `ds_iir1`, `ds_iirk` (K = 2), `ds_mult_sr` and `ds_mult_fpga` side by side, sharing clk/ce/clr |
| `ds_iir1` | the first-order filter |
| `ds_iirk` | the filter of order K |
| `ds_mult`, `ds_mult_cell` | digit-serial/parallel multiplier, M cells |
| `ds_reduce` | 4 digits → sum/carry pair (2 CSAs, delayed carries) |
| `ds_adder`, `ds_mult_adder` | digit-serial adder for the multiplier; multiplier + adder |
| `csa_array` | 3 pairs → 1 pair (4 CSAs) |
| `bl_ds_adder` | bit-level pipelined digit-serial adder with truncation output |
| `piso` | parallel word → digits then zeros, from a 2M-state counter |
| `sipo` | 2M-digit shift register, newest digit in the most significant place |
| `ds_mult_sr` | piso → multiplier → sipo: `o = b*yy` 2M+1 clocks after clear |
| `ds_mult_fpga` | piso → multiplier with constant multiplicand 45123, digit output |
| `csa`, `cra`, `full_adder`, `half_adder`, `and_gated_fa` | arithmetic primitives (the adders are NAND-level) |
| `reg4` | register with clock enable and asynchronous clear, width `W` (default 4) |

## Departures and open points

* **Unsigned arithmetic.** The filter architecture is meant for two's
  complement numbers, but this implementation and all its checks are unsigned.
  Signed coefficients or data need sign handling that is not here.
* **Multiplier cell internals.** The cell follows the dataflow of the reference
  cell: array product, LSD passed right, partial digits S1..S3 passed right
  through registers, carries fed back locally. The bit-level placement of the
  reference cell is not reproduced. That cell folds the incoming LSD into free
  array positions and needs two CSAs; here the LSD gets a third CSA of its own,
  and S3 is a full 4-bit digit.
* **Adder of the multiplier.** The reference adder uses three CSAs because it
  receives the LSD as five loose bits. Here the LSD is one digit and two CSAs
  do.
* **CSA array pairing.** The assignment of the six input digits to the four
  CSAs is this design's own.
* **Word-boundary clears.** The clearing of the delayed carries at a word
  boundary (`first`) is this design's own.
* **Filter control.** The 2M-state counter inside the filter, `x_first` /
  `y_first`, and the zeroing of the input's second half are this design's
  own. The reference drives the truncation control and the zero digits from
  outside.
* **Pipelining.** By default the M-cycle slack of the loop is used only by
  the two stages of the pipelined adder. `PIPE = 1` also cuts the CSA array
  into three stages, as the source architecture proposes for 32-digit
  words. It is off by default because the 16-bit build has no such
  registers. Bit-level pipelining of the multipliers needs
  `n <= 4(M-4)/5`, which the default M = 4 cannot meet. It is not done,
  since no register placement for it is given.
* **Order and size.** The first-order filter is the reference design.
  The higher-order filter follows the stated rule of replicating the
  multiplier pair. How its delays are split, the shared delay lines and
  the order of the CSA chain are this design's own. The
  default word is 16 bits (M = 4). A configuration with 32 digits (M = 32, 128-bit
  words) is also described for this architecture. It is reachable by
  parameter and was simulated, but it is not the default.
* **Not modelled.** FPGA I/O buffers, pads and board switches are not
  modelled.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<n>`:

* The primitives are tested exhaustively. The cell, reducer and adders are
  checked by value conservation over random digit streams. The multipliers are
  checked against `b*y` for random and all-ones words, including
  45123 × 57000 = 0x994DC5F8.
* `tb_ds_iir1` runs the filter against a word-level model, with and
  without the pipelined CSA array (side by side). It uses the example
  a0 = b1 = 45123, a1 = 0, x_0 = 57000, then zeros, which gives
  y = 0x994DC5F8, 0x698D0F27, 0x48AC8FE7. It also uses random coefficients
  and the all-ones worst case.
* `tb_iir_top` runs the whole top at its default size with random `ce`
  stalls and garbage on `x` in the zero half of each frame. It checks all
  subsystems, including the second-order filter on the same input. It
  counts, and requires, these events: stalls, recursion, truncation, use of the a1 path, word overflow, carries forwarded across
  all-ones digits, input zeroing, clears, and contributions of the
  second-order taps.
* `tb_ds_iirk` runs filters of order 1, 2 and 3 side by side against the
  order-K model. The order-1 filter also runs the worked example. The same
  test passed at M = 2 and 8.
* The first-order filter was also simulated at M = 2, 8 and 32 with the same
  model. The pipelined variant was simulated at M = 4, 8 and 32.
* `tb_csa_array` checks both forms of the array by value conservation.
  The pipelined form's digits are taken 2 cycles later.

Simulate a testbench with plain Verilator, e.g.:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_iir_top tb/tb_iir_top.sv
    ./obj_dir/Vtb_iir_top

All run in well under a second.

## Changing the design

`N` (digit size) and `M` (digits per word) are parameters throughout. `N >= 2`
is required by the carry-vector shifts. `M >= 2` is required by the feedback
delay of `M-2`. A wider word raises the number of cycles per sample (2M) but
not the clock period, since no carry path spans the word. `K` (order of
`ds_iirk`, and of the top's second filter) must be at least 1. `PIPE` on
`ds_iir1` selects the pipelined CSA array (needs `M >= 4`).

The testbenches use local parameters. To test another size, change `N`/`M` at
the top of the testbench. For the filter, also replace the fixed-width
example constants.
