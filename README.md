# A 2-D QMF filter bank from one switchable shift-and-add filter

One level of a 2-D discrete wavelet transform (DWT) splits an image into four
subbands. The rows are filtered with a low-pass (L) and a high-pass (H) filter,
then the columns, which gives LL, HL, LH and HH, and the result is decimated by
two in each direction. This RTL computes those four subband samples for one
L x L window of pixels, as used in automotive vision (for example, finding lane
boundaries in the HH subband).

The design rests on two ideas:

* **One filter, four subbands.** With symmetric masks, the high-pass filter is
  the low-pass filter with every odd coefficient negated. So there is one 2-D
  filter with two sign bits, `B_H` for the rows and `B_V` for the columns.
  Stepping `{B_V, B_H}` through 00, 01, 10, 11 turns it into the LL, HL, LH and
  HH filter in turn. A new subband comes out every clock, so a window takes
  four cycles.
* **No multipliers.** The masks are binomial ("flat frequency response"):
  `[1 1]`, `[1 2 1]`, `[1 3 3 1]`, `[1 4 6 4 1]`, `[1 6 15 20 15 6 1]`. Each
  coefficient is a short sum of powers of two. Multiplication is therefore
  shifted wiring into multi-bit full adders (MBFAs). Negation is an inverter
  block plus the adder's carry-in. The coefficients of a mask sum to a power of
  two, so normalisation is a right shift.

The default build uses the 7x7 mask. The 2x2 (Haar), 3x3, 4x4 and 5x5 masks
are build-time options of the same RTL (parameter `L`).

## The masks

The 1-D low-pass mask of length L is the binomial row C(L-1, k). The high-pass
mask negates the odd taps:

| L | low pass             | high pass                  | sum = 2^(L-1) |
|---|----------------------|----------------------------|---------------|
| 2 | 1 1                  | 1 -1                       | 2             |
| 3 | 1 2 1                | 1 -2 1                     | 4             |
| 4 | 1 3 3 1              | 1 -3 3 -1                  | 8             |
| 5 | 1 4 6 4 1            | 1 -4 6 -4 1                | 16            |
| 7 | 1 6 15 20 15 6 1     | 1 -6 15 -20 15 -6 1        | 64            |

Each 2-D mask is the outer product of a column mask and a row mask. For
example, the 3x3 HL mask (high pass along the rows) is

    1 -2  1
    2 -4  2
    1 -2  1

and the 7x7 LL mask has 400 at its centre. The subband encoding is in
`qmf_pkg::subband_e`: `{B_V, B_H}` = 00 LL, 01 HL, 10 LH, 11 HH.

## The 1-D filter: shift-and-add trees (`fir1d`)

This is the heart of the design. Write β = +1 for low pass (`b = 0`) and
β = -1 for high pass (`b = 1`), and x1..xL for the inputs. The symmetry of the
masks lets every filter first add the mirrored pairs. The β terms are then
grouped so that one negation serves all the odd taps:

    L=2: x1 + β·x2                                                     1 MBFA
    L=3: (x1 + x3) + β·(2·x2)                                          2 MBFAs
    L=4: (x1 + β·x4) + (1+2)·(x3 + β·x2)                               4 MBFAs
    L=5: (x1 + x5) + 2·((1+2)·x3) + β·4·(x2 + x4)                      5 MBFAs
    L=7: (x1 + x7) + (16-1)·(x3 + x5) + β·2·[(2+1)·(x2 + x6) + 2·(4+1)·x4]
                                                                       9 MBFAs

How each operation maps to hardware:

* **`k·v` for k a power of two** is `v << log2(k)` on the wire into an adder.
  It costs nothing.
* **`(1+2)·v`, `(4+1)·v`** take one MBFA, adding `v` and `v` shifted.
* **`(16-1)·v`** is one MBFA that adds `v << 4` and `~v` with carry-in 1.
* **`a + β·v`** is one MBFA. Its second operand comes through a negation
  block `neg_block` that inverts every bit when `b = 1`, and `b` is also the
  MBFA's carry-in. When `b = 1` this gives `a + ~v + 1 = a - v`. When `v` is a
  shifted value, the inverter sits after the shift. Its zero low bits are then
  inverted too, and the identity stays exact.

All sums are DATA_W + L - 1 bits wide. This is the smallest width that holds
every possible result exactly: |sum| ≤ 2^(L-1) · 2^(DATA_W-1), and the positive
extreme is never reached. Intermediate values may wrap; two's complement
arithmetic makes the final sum exact anyway. The output is the sum shifted
right arithmetically by L-1, which divides by the sum of the coefficient
magnitudes, truncated back to DATA_W bits. The shift rounds towards minus
infinity.

For L = 7 the tree is four MBFAs deep: pair sums, then ×3/×5/×15, then two
partial sums, then the final β addition. An `L` with no scheme (6, or anything
above 7) stops elaboration with an error.

## The 2-D filter (`filter2d`) and the bank (`qmf_bank`)

`filter2d` is separable and made of identical 1-D filters:

* L row filters share `B_H`, one per window row.
* Their L normalised outputs form a column, which a single column filter
  reduces using `B_V`.

Because the row outputs are already normalised back to DATA_W bits, the column
filter is the same module at the same width. The 7x7 filter has 8 x 9 = 72
MBFAs, and its longest path is 4 + 4 = 8 MBFAs. The whole 2-D filter is
combinational.

`qmf_bank` wraps `filter2d` in registers and a small sequencer (`qmf_ctrl`):

    in_win ──► window reg ──► filter2d ──► LL/HL/LH holding regs ──► out regs
                    ▲          ▲ B_H,B_V        ▲ cap, sb               ▲ done
                    └── load ──┴────────── qmf_ctrl ────────────────────┘

* **Accepting a window.** A window is taken when `in_valid && in_ready`. It is
  registered, so the source only needs to hold it until it is accepted.
* **The four passes.** In the four cycles after the accepting edge, the
  controller drives `{B_V,B_H}` = 00, 01, 10, 11. Each cycle's filter output
  is latched as LL, HL or LH.
* **Publishing the result.** In the HH cycle (`done`) the three held results
  and the live HH result are copied together into the output registers, and
  `out_valid` pulses for one cycle. The outputs then hold until the next
  result. There is no output back-pressure.
* **Back-to-back windows.** `in_ready` is high when idle and in the HH cycle.
  Windows offered back to back are therefore taken one every four clocks.

Timing: a window accepted at clock edge t0 produces `out_valid` in the cycle
after edge t0+4. Reset is synchronous and active low.

### Ports of `qmf_bank`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | window handshake |
| `in_win[L][L]` | in | DATA_W signed | window, `[row][column]`, row 0 on top |
| `out_valid` | out | 1 | one-cycle pulse: new LL/HL/LH/HH on the outputs |
| `out_ll`, `out_hl`, `out_lh`, `out_hh` | out | DATA_W signed | subband samples |

| parameter | default | meaning |
|-----------|---------|---------|
| `L` | 7 | mask length: 2, 3, 4, 5 or 7 |
| `DATA_W` | 9 | sample width; 9 holds an 8-bit pixel as a signed number |

## What this RTL does not do

* **Window source.** The bank expects a whole window at its input. The line
  buffers that cut windows from a pixel stream are not part of this RTL. Neither
  are the step of two pixels (the DWT decimation, so one output per four input
  pixels) and the cascade of DWT levels. The testbenches do this in software:
  they cut windows from an image in steps of two pixels and feed level 2 with
  the LL output of level 1.
* **Asynchronous operation.** The original circuit is meant as a
  transistor-level asynchronous datapath that settles within a few
  nanoseconds per pixel in a 180 nm process. Here the datapath is synchronous
  logic with one clock per subband. Nothing here checks the nanosecond figure;
  your clock period is set by the 8-MBFA ripple path.
* **Borders.** Border handling (padding at the image edge) is not defined.

## Choices made here, beyond the published design

* DATA_W = 9, the internal width DATA_W + L - 1, and rounding towards minus
  infinity in each normalisation.
* The order of the passes, LL, HL, LH, HH, reads the published sign-bit
  sequence 00, 01, 10, 11 as `{B_V, B_H}`. HL means high pass along the rows.
* The valid/ready input, the window register, the holding and output
  registers, and accepting the next window during the HH cycle.
* The 2x2 Haar filter as `x1 + β·x2`. No scheme for it was published beyond
  its masks.
* Two of the published computing schemes contain evident slips, fixed here to
  match their masks. The 3-tap scheme is built as `(x1 + x3) + β·2·x2`. The
  5-tap β term is built as `4·(x2 + x4)`.
* The published MBFA count for the whole 3x3 filter (10) does not match its
  own per-filter count (2 per 1-D filter, 4 filters = 8). This RTL has 8. The
  4x4, 5x5 and 7x7 totals (20, 30, 72) match the RTL.
* One published 4-tap high-pass mask is printed as `[1 -3 -3 1]`. The
  alternating-sign rule and the printed 4x4 HH mask give `[1 -3 3 -1]`, which
  is used here.

## Files

| file | contents |
|------|----------|
| `rtl/qmf_pkg.sv` | subband enum, sign-bit mapping, normalisation shift and width |
| `rtl/full_adder.sv` | 1-bit full adder cell |
| `rtl/mbfa.sv` | multi-bit ripple-carry adder with carry-in |
| `rtl/neg_block.sv` | conditional bitwise inverter (N block) |
| `rtl/fir1d.sv` | 1-D binomial filter, shift-and-add trees for L = 2, 3, 4, 5, 7 |
| `rtl/filter2d.sv` | L row filters + 1 column filter |
| `rtl/qmf_ctrl.sv` | four-pass sequencer |
| `rtl/qmf_bank.sv` | top: registers, controller, 2-D filter |
| `tb/tb_ref_pkg.sv` | reference model (coefficient tables, plain multiplication) and synthetic road image |
| `tb/tb_dwt_stim.sv` | window driver and result checker for a two-level DWT |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_dwt_masks` |

## Verification

Every testbench compares against a reference that shares nothing with the
shift-and-add trees. The reference multiplies by coefficient tables and
rounds the same way. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_full_adder`, `tb_neg_block`: exhaustive.
* `tb_mbfa`: exhaustive at 4 bits. At 16 bits it uses random operands,
  including subtraction via `~x` and carry-in 1.
* `tb_fir1d`: all five mask lengths, both sign states, random samples with
  the extremes -256 and 255 mixed in.
* `tb_filter2d`: two parts.
  * All mask lengths and all four sign states on random windows.
  * The full 2-D masks as published (3x3 LL/HL/LH/HH, 4x4 LL/HH, 5x5 HH,
    7x7 LL). These are checked on 16-bit windows whose samples are multiples
    of 2^(2(L-1)), so no rounding occurs and the output must equal the mask
    applied directly.
* `tb_qmf_ctrl`: a cycle-level model of the sequencer under random requests.
* `tb_qmf_bank`: the default build (7x7, 9 bits) end to end. It runs a
  two-level DWT of a 160x120 synthetic road image: 5325 windows, every subband
  sample checked. It also checks that `out_valid` rises exactly four clock edges
  after the edge that accepted the window, and that windows are never taken
  closer than 4 cycles apart. It requires that these all occurred: back-to-back
  windows, source stalls, idle cycles and negative HL/LH/HH results (the
  subtracting path).
* `tb_dwt_masks`: the same two-level DWT with banks built for 2x2, 3x3, 4x4
  and 5x5 masks, side by side.

Each testbench was also run against a deliberately broken copy of its module
(for example, a carry-in tied to 0, or the column filter driven by the wrong
sign bit), and each one failed.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/qmf_pkg.sv tb/tb_ref_pkg.sv tb/tb_qmf_bank.sv \
        --top-module tb_qmf_bank -o sim
    ./obj_dir/sim

Replace `tb_qmf_bank` with any other testbench name. Each one runs in well
under a second. To lint a module alone:
`verilator --lint-only -Wall -Irtl rtl/qmf_pkg.sv rtl/qmf_bank.sv`.

## Changing it

* **Mask size.** Set `L` on `qmf_bank`. Only 2, 3, 4, 5 and 7 have trees. A
  new length needs a new branch in `fir1d` with its own tree. The internal
  width and the shift follow from `qmf_pkg`.
* **Sample width.** Set `DATA_W`. All internal widths follow from it.
* **Timing.** For a higher clock rate, a register can be placed between the
  row filters and the column filter. That adds one cycle of latency, and the
  controller's capture must be delayed to match.
