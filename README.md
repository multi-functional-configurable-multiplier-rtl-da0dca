# Multi-functional configurable multiplier

A multiplier for DSP and multimedia datapaths that spends energy only on the
part of a product that matters. One 16-bit signed Booth multiplier can be
configured, per operation, to deliver

* one 16x16 product, one 8x8 product, or two independent 8x8 products, and
* either the full product or only its upper half (truncated, with an error
  compensation term),

and, while it runs, it watches the operands: pieces of the multiplier that a
given pair of operands cannot influence are held still, and an operation with
a zero operand is not computed at all. Next to it sits a small unsigned
multiplier in the Vedic ("vertically and crosswise") style, configurable in
the same way one size down.

All RTL is synthesizable SystemVerilog-2017 in `rtl/`; every module has a
self-checking testbench in `tb/`.

## The configuration word CM[2:0]

| CM[2:1] | operation | full (CM[0]=1) | truncated (CM[0]=0) |
|---|---|---|---|
| 11 | A x B, signed 16x16 | `p = A*B` (32 bits) | `p[31:16]` = upper half + compensation, `p[15:0] = 0` |
| 10 | A[7:0] x B[7:0], signed | `p[15:0]` = product, `p[31:16]` = sign bit SB | `p[15:8]` = upper byte + compensation, `p[7:0] = 0`, `p[31:16]` = its sign |
| 00 | twin: A[15:8]xB[15:8] and A[7:0]xB[7:0], signed | `p[31:16]` = high product, `p[15:0]` = low product | `p[31:24]`, `p[15:8]` = upper bytes + compensation, rest 0 |
| 01 | not defined by the architecture; behaves as 00 | | |

Truncated results are left at the bit positions they have in the full
product, with the omitted bits zero, so the same output word can be read as a
(scaled) number in either case.

## How the 16-bit product is cut into four byte products

Everything is built from four byte-level radix-4 Booth multipliers, named by
the bytes they take: LL = A[7:0]·B[7:0], LH = A[7:0]·B[15:8],
HL = A[15:8]·B[7:0], HH = A[15:8]·B[15:8]. For a signed 16-bit operand the high
byte is signed and the low byte is an *unsigned* number, so

    A*B = HH*2^16 + (LH + HL)*2^8 + LL

needs signed x signed, signed x unsigned and unsigned x unsigned byte
products. Each sub-multiplier therefore extends its bytes to 9 bits, with the
sign bit or with 0 as the detector tells it (`a_sgn`, `b_sgn`), and recodes a
9-bit multiplier into 5 radix-4 digits, giving an 18-bit signed sub-product.
In the 8-bit and twin modes every byte is a signed number of its own, LL (and
HH) are used alone, and LH and HL are idle.

## Dynamic-range detection (`cbm_drd`)

The detector looks at CM and the registered operands and hands each
sub-multiplier a control word `{a_sgn, b_sgn, sw, sd, tr}`:

* **Shutdown, `sd`.** A shut-down sub-multiplier gets all-zero operands, so no
  partial product, carry or sum bit inside it toggles. Shutdown comes from the
  mode (unused sub-multipliers; LL in truncated 16-bit mode, because its whole
  product lies below the kept half) and from the operand range: in 16-bit
  mode, an operand whose bits [15:7] are all equal fits in a signed byte. Its
  low byte is then treated as a signed byte and the two sub-multipliers on its
  high byte are shut down. One short operand leaves two of the four working,
  two short operands leave only LL.
* **Sign-bit guarding, `guard`.** When both operands are short the product
  fits in 16 bits; its upper half is then not added at all but filled with the
  sign bit SB from the sign bit generator.
* **Operand exchange, `sw`** (`cbm_switch_logic`, one per sub-multiplier). A
  radix-4 Booth group `{x[2k+1], x[2k], x[2k-1]}` of three equal bits encodes
  the digit 0, whose partial product is zero. The switching logic compares
  every group of both operands, counts the zero groups, and exchanges the
  operands when the default multiplicand has strictly more, so that the
  operand producing more zero rows is the one that is Booth-encoded. The
  product is unchanged; only the switching activity drops.
* **Truncation, `tr`**, on the sub-multipliers whose low bits fall below the
  kept half: LH and HL in 16-bit mode, LL (and HH in twin mode) in the 8-bit
  modes.

## Truncation and error compensation (`cbm_booth8`, `cbm_err_comp`)

A truncating sub-multiplier simply does not form partial-product bits, nor the
`+1` negation bits of negative digits, in columns 0..7. This always
under-estimates the product. To correct it on average, a compensation value
is added at column 8: each of the four lowest rows (the only ones with bits
below column 8) loses about half a unit of column 8 when its Booth digit is
non-zero, and nothing when it is zero, so the compensation is
`round(N/2) = (N+1) >> 1`, N being the number of those rows with a non-zero
digit. N comes for free from the digit recoder.

Measured in the testbenches with random operands: for a single byte product
the mean error is about +0.23 units of the kept LSB, against about -0.49 for
plain truncation, and never beyond 5 units; for truncated 16-bit products the
mean error was +0.16 and the largest error 1.96 units of 2^16.

## Operand-zero shutdown and timing (`cbm_core`, `cbm_sbg`)

`cbm_core` has one input register stage and one output register stage:
an operation presented with `in_valid` appears on `p` with `out_valid` two
rising edges later; one operation can start every cycle and there is no
back-pressure. Reset (`rst_n`) is asynchronous and active low.

The operand registers are split into a low-byte lane and a high-byte lane.
The sign bit generator looks at the incoming operands and reports, per lane,
whether the lane's product is zero (`lz`, `hz`: an operand is zero; in 16-bit
mode both flags cover the whole operands; in single 8-bit mode the high lane
is idle and `hz = 1`). A flagged lane does not load its operand registers (the
enable stands for a clock gate) and its half of the output register is loaded
with zero directly, so nothing downstream of it switches. SB, the product's
sign (0 for a zero product), is registered alongside for the sign-bit
guarding.

## Vedic multiplier (`vedic_2x2`, `vedic_4x4`, `vedic_mult8`)

An unsigned multiplier built bottom-up: the 2x2 cell is four AND gates and two
half adders; four 2x2 cells and an adder for the two crosswise products make a
4x4; four 4x4 blocks make the 8x8, `p = q0 + (q1+q2)·16 + q3·256`. Its 2-bit
mode has the meaning of CM[2:1]: `11` one 8x8 product, `10` one 4x4 product of
the low nibbles, `00`/`01` two 4x4 products side by side. The 4x4 blocks a
mode does not use get zero inputs. `vedic_mult8` is combinational; the top
registers its result (one cycle, `v_out_valid` follows `v_in_valid`).

## Top level (`mfcm_top`)

The Booth multiplier (`in_valid, cm, a, b -> out_valid, p`) and the Vedic
multiplier (`v_in_valid, v_mode, v_a, v_b -> v_out_valid, v_p`) stand side
by side with their own ports and a shared clock and reset.

## Where this RTL makes its own choices

The architecture fixes the mode set, the CM encoding, the DRD/SBG/switching
structure, byte-level Booth sub-multipliers, truncation with compensation, and
the unsigned Vedic build-up. The following are choices of this
implementation and are the first places to look when adapting it:

* radix-4 recoding with 9-bit extended bytes;
* the short-operand test (bits [15:7] equal) that drives range shutdown, and
  treating CM[2:1] = 01 as twin mode;
* the compensation function `round(N/2)`; another data-dependent or constant
  estimate can replace `cbm_err_comp` without touching anything else;
* exchange only on a strictly larger zero-group count;
* the register stages, the valid handshake and the reset behaviour;
* the output layout of each mode, including using the truncated value's own
  sign (not SB) above a truncated 8-bit product, since a small negative
  product can round to zero;
* the reading of LZ/HZ as per-lane zero flags;
* the Vedic multiplier's mode set.

The full-adder cell styles that a transistor-level Vedic implementation would
choose between are not modelled: in RTL they are ordinary adders.

## Files

| file | content |
|---|---|
| `rtl/cbm_pkg.sv` | widths, mode enum, sub-multiplier index, control struct, Booth digit encoder |
| `rtl/cbm_core.sv` | registered 16-bit configurable Booth multiplier |
| `rtl/cbm_sbg.sv` | sign bit and lane zero flags |
| `rtl/cbm_drd.sv` | dynamic-range detector: per-sub-multiplier control, guard |
| `rtl/cbm_switch_logic.sv` | zero-group comparators and exchange decision |
| `rtl/cbm_booth8.sv` | byte-level radix-4 Booth sub-multiplier |
| `rtl/cbm_err_comp.sv` | truncation error compensation |
| `rtl/cbm_combine.sv` | adds and formats the sub-products per mode |
| `rtl/vedic_2x2.sv`, `rtl/vedic_4x4.sv`, `rtl/vedic_mult8.sv` | Vedic multiplier |
| `rtl/mfcm_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_cbm_ref_pkg.sv` | integer reference model of the Booth multiplier |

## Verification and simulation

Each testbench drives its module, compares with values computed by integer
arithmetic in the testbench, has a cycle watchdog, and ends with a line
`TB_RESULT checks=N failures=M`. The Vedic blocks are checked exhaustively;
the Booth blocks with random and directed operands (all-ones, -128·-128,
unsigned 255·255, zero bytes, short operands). `tb_cbm_core` also checks the
two-cycle latency and that a zero lane keeps its operand registers.
`tb_mfcm_top` runs the whole design at its default sizes and fails unless
every mode, operand exchange, range shutdown (two and three of four
sub-multipliers off), sign-bit guarding, zero gating of each lane and a
non-zero compensation all occurred. `cbm_core` also carries an assertion that
a shut-down sub-multiplier shows no non-zero digit and a zero product.

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/cbm_pkg.sv tb/tb_cbm_ref_pkg.sv tb/tb_mfcm_top.sv \
        --top-module tb_mfcm_top -o sim
    ./obj_dir/sim

Replace `tb_mfcm_top` by any other testbench name; the testbenches for the
Vedic modules need neither package. Every test runs in a few seconds.
