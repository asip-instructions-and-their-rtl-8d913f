# Packed-ALU instructions for H.264/AVC: horizontal add and 1-D integer transform

Many of the inner loops of an H.264/AVC codec combine the bytes *inside* one
32-bit register rather than the bytes of two registers. The deblocking filter
forms sums such as `p2 + p1 + p0` or `p2 + 2*p1 + 2*p0` from pixels packed in
one register. The 4x4 intra predictors form taps such as `A + 2B + C`. CAVLC
counts the flags a packed compare left in a register. A conventional SIMD ALU
only offers lane-wise operations between two registers, so each of these sums
costs several shifts, masks and adds.

This design adds two kinds of instructions to a four-lane packed ALU, and the
hardware added for them is small:

* **hadd**: a *horizontal add* of the four lanes of one register. Each lane can
  be left out, or doubled, and the result is saturated to 8 bits.
* **fTRAN / iTRAN**: the 1-D forward and inverse 4-point integer transform of
  H.264 applied to the four lanes of one register, in one cycle. Four row
  instructions and four column instructions perform a complete 4x4 transform.

Both reuse the four lane adders that the ALU already has for packed add and
subtract. What is added is operand switching around those adders, plus a
second ALU chained behind the first for the transform.

## Lanes and masks

A register holds four lanes. **Lane 0 is the most significant byte.** In the
RTL the packed arrays are declared `[0:3]` so that index 0 is the leftmost
element. Verilator's `-Wall` reports these ascending ranges (ASCRANGE). They
are deliberate.

The 4-bit hadd masks use the same order: `mask[0]`, the leftmost bit of a
literal such as `4'b1010`, belongs to lane 0.

The lane width is the parameter `LANE_W`. It defaults to 8, which gives 32-bit
registers. See "Range" below for why 16 is also useful.

## The hadd instruction

    dst.lane[L] = min(255, sum over k of  mask1[k] * (mask2[k] ? 2 : 1) * src.lane[k])

It has three forms:

| form                     | mask1  | mask2  | example use                    |
|--------------------------|--------|--------|--------------------------------|
| `hadd(src)`              | `1111` | `0000` | CAVLC count of non-zero flags  |
| `hadd(src:mask)`         | `1111` | mask   | `2a0 + a1 + 2a2 + a3` (mask 1010) |
| `hadd(src:mask1.mask2)`  | any    | any    | `a1 + a2 + 2a3` (0111 / 1001)  |

Some example mask settings:

* With the deblocking register `p = {p0, p1, p2, p3}`:
  * `p2 + p1 + p0` uses masks `1110` / `0000`.
  * `p2 + 2p1 + 2p0` uses masks `1110` / `1100`.
  * `2p1 + p0` uses masks `1100` / `0100`.
* The intra tap `A + 2B + C` on `{A, B, C, D}` uses masks `1110` / `0100`.

The lanes are treated as unsigned pixels. The sum is computed exactly and then
clipped to 0..255. The `sat` / `sat_o` outputs flag a clipped result.

The result is written into **one lane** of the destination register, chosen by
the instruction. The other three lanes keep their values. Four hadds can
therefore pack four results into one register.

## How the ALU does it (`asip_alu`)

The ALU has three parts:

1. **Switching Logic 1** (`sw_logic1`) sits in front of four lane adders
   (`lane_adder`). For each operation it selects each adder's two operands and
   whether the adder adds or subtracts. It also applies the one-bit shifts:
   doubling for hadd and the forward transform, halving for the inverse
   transform. It is the only place where operands are selected or shifted.
2. **Four lane adders** (`lane_adder`) do all of the arithmetic.
3. **Switching Logic 2 and 3** (`sw_logic_fb`) sit behind adders 0 and 3. Each
   is a 1-to-2 demultiplexer. It sends its adder's sum either to the ALU output
   or back up into Switching Logic 1.

For an hadd, data flows in two levels through the same adders:

* Adder 0 adds the masked and doubled lanes 0 and 1.
* Adder 3 adds the masked and doubled lanes 2 and 3.
* Both sums are fed back, and adder 1 adds them.
* Adder 2 is idle.

Each adder's operands are computed in a separate `always_comb` block. As a
result, the path adder 0/3 → feedback → adder 1 is an ordinary two-level
combinational path and not a loop.

The adders are `LANE_W + 3` bits wide. The three guard bits hold the largest
hadd sum, 4 × 2 × 255, before saturation. For every other operation the ALU
output is truncated to the lane width.

ALU operations (`alu_op_e` in `asip_pkg`):

| op          | adder 0 | adder 1 | adder 2 | adder 3 |
|-------------|---------|---------|---------|---------|
| `ALU_PADD/PSUB` | a0±b0 | a1±b1 | a2±b2 | a3±b3 |
| `ALU_HADD`  | m0+m1 → fb | fb0+fb3 → result | – | m2+m3 → fb |
| `ALU_FT1`   | x0+x3   | x1+x2   | x1−x2   | x0−x3   |
| `ALU_FT2`   | s0+s1   | 2·s3+s2 | s0−s1   | s3−2·s2 |
| `ALU_IT1`   | X0+X2   | X0−X2   | (X1>>1)−X3 | X1+(X3>>1) |
| `ALU_IT2`   | e0+e3   | e1+e2   | e1−e2   | e0−e3   |

Adder k produces output lane k. So FT1 then FT2 gives lanes X0, X1, X2, X3 in
natural order, and IT1 then IT2 gives x0..x3. The `>>1` is an arithmetic shift,
as in the H.264 inverse transform.

## The transform: two ALUs in one cycle (`alu_pair`)

A 4-point transform is two butterfly stages, and each stage is four
additions. `alu_pair` chains two `asip_alu`s:

* For fTRAN, the first ALU runs `FT1` and the second runs `FT2` on its output.
  For iTRAN they run `IT1` and `IT2`.
* The whole instruction is combinational and completes in one clock cycle of
  the execution unit.
* hadd, packed add and packed subtract use only the first ALU.

## The execution unit (`asip_h264_eu`, top)

The top holds two register files, RF0 and RF1, each of four registers
(`regfile4`), around the `alu_pair`.

**Timing.** One decoded instruction (`instr_t`) can be issued per cycle with
`instr_valid`:

* Its sources are read combinationally from `instr.src_rf`.
* It executes in the same cycle.
* Its result is written into `instr.dst_rf` at the next rising edge.
* `res_o` / `sat_o` / `res_valid_o` show the same result one cycle after issue.
* There are no stalls and no multi-cycle instructions.

**Write-back modes.**

| mode        | instructions | effect |
|-------------|--------------|--------|
| word        | PADD4, PSUB4, FTRAN, ITRAN with `transpose = 0` | `dst <= result` |
| lane        | HADD | `dst.lane[dst_lane] <= result`; the other lanes are kept |
| transposed  | word instructions with `transpose = 1` | `reg[k].lane[dst] <= result.lane[k]` for k = 0..3 |

**A 2-D 4x4 transform in eight instructions.** The transposed write is what
makes this work:

1. Load the four rows into RF0 (host port).
2. Row pass: for r = 0..3, `FTRAN src_rf=0 src1=r  dst_rf=1 transpose=1 dst=r`.
   Afterwards RF1 register c holds column c of the row-transformed block.
3. Column pass: for c = 0..3, `FTRAN src_rf=1 src1=c  dst_rf=0 transpose=1 dst=c`.
   Afterwards RF0 register r holds row r of the result `C·X·Cᵀ`.

This takes eight back-to-back cycles. The inverse transform is the same
program with ITRAN.

**Host port.** The surrounding processor is not part of this design. It loads
and reads registers through the `host_*` port:

* A write replaces a whole register at the next edge.
* A read is combinational.
* A host write must not target the register file an issuing instruction writes
  in the same cycle. An assertion checks this, and another checks that only
  defined opcodes are issued.

Reset (`rst_n`, asynchronous, active low) clears both register files and the
result outputs.

### Instruction fields (`asip_pkg::instr_t`)

| field       | bits | meaning |
|-------------|------|---------|
| `op`        | 3 | `OP_NOP`, `OP_PADD4`, `OP_PSUB4`, `OP_HADD`, `OP_FTRAN`, `OP_ITRAN` |
| `src_rf`    | 1 | register file the sources come from |
| `src1`, `src2` | 2 each | source registers (`src2` only for PADD4/PSUB4) |
| `dst_rf`    | 1 | register file written |
| `dst`       | 2 | destination register; for transposed writes, the lane written |
| `dst_lane`  | 2 | lane receiving an hadd result |
| `transpose` | 1 | transposed write-back for word results |
| `mask1`, `mask2` | 4 each | hadd masks (lane 0 = leftmost bit) |

The encoding is this design's own. It is meant to sit behind a host
processor's decoder.

## Range: what 8-bit lanes can and cannot hold

The default is 8-bit lanes in 32-bit registers, with hadd saturating to 8
bits. This has consequences:

* **Transform.** H.264 residuals span −255..255, and forward coefficients
  reach ±9180. With `LANE_W = 8` the transform results are correct only modulo
  256. With `LANE_W = 16` (64-bit registers) all of them are exact.
  `tb/asip_h264_eu_w16_tb.sv` tests that configuration.
* **Filter and intra sums.** Sums such as `p2 + 2p1 + 2p0` or `A + 2B + C`
  exceed 255 for bright pixels and are then clipped. They are exact only for
  small values.
* **CAVLC counts** (at most 4) are always exact.
* **Operations hadd cannot do:**
  * `2p3 + 3p2 + p1 + p0` needs a ×3, which is left to a packed multiply of the
    host.
  * `(p0 + q0 + 1) >> 1` combines lanes of two registers and rounds.

  Neither maps to a single hadd here.

## What follows the source and what is this design's choice

Taken from the architecture this RTL implements:

* The three hadd forms, their masks and the 8-bit saturation.
* The four-adder ALU, with Switching Logic 1 in front and the two
  demultiplexers behind adders 0 and 3 feeding back.
* Doubling and halving done by operand selection.
* The 1-D forward and inverse flow graphs.
* fTRAN/iTRAN as two consecutive ALU operations completing in one cycle.
* Source and result register files of four 32-bit registers each.

Chosen here:

* Which adder does what in the hadd tree. The final sum is formed in adder 1.
* The adder guard bits.
* Signedness: hadd lanes are unsigned, all other lanes are two's complement.
* The inverse transform's `−X3` in its third adder. This comes from the H.264
  standard; the flow graph only marks the halving.
* The lane order of transform results.
* The result lane of an hadd being an instruction field.
* The transposed write-back.
* The register-file ports, reset and host port.
* The instruction format.

The routing in Switching Logic 1 is written as a case statement per adder. It
is not hand-reduced to a minimal multiplexer count.

The source quotes 12 cycles per 4x4 transform in one place and 24 per block in
another. This design needs 8 instruction cycles per 2-D transform, plus the
host's loads and stores.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference arithmetic in
`tb/asip_ref_pkg.sv` is written from the definitions:

* the forward transform as the matrix `C = [1 1 1 1; 2 1 −1 −2; 1 −1 −1 1; 1 −2 2 −1]`;
* the inverse as the H.264 formula;
* hadd as a clipped weighted sum.

What each testbench covers:

* `lane_adder_tb`, `sw_logic_fb_tb`, `sw_logic1_tb`, `regfile4_tb`: the
  building blocks, with random stimulus.
* `asip_alu_tb`: every ALU operation. It includes the two mask examples above
  and saturating sums.
* `alu_pair_tb`: fTRAN/iTRAN on 8-bit lanes (modulo 256) and on 16-bit lanes
  (exact), hadd, and packed add/subtract. It includes a worked row
  (5, −3, 7, 1) → (10, −2, 2, 24).
* `asip_h264_eu_tb`: the top at default sizes. It covers:
  * 2-D forward and inverse transforms, timed at eight cycles;
  * the deblocking, intra and CAVLC hadd cases, with the other lanes checked to
    be preserved;
  * saturation, packed add and subtract, plain and transposed write-back.

  It counts each mechanism and fails if one never occurs.
* `asip_h264_eu_w16_tb`: 400 exact 2-D transforms of real-range residuals and
  coefficients with 16-bit lanes.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/asip_pkg.sv tb/asip_ref_pkg.sv tb/asip_h264_eu_tb.sv --top-module asip_h264_eu_tb
    ./obj_dir/Vasip_h264_eu_tb

`-Irtl` lets Verilator find the other modules by file name. Add
`-Wno-ASCRANGE` to hide the lane-order warnings described above.

## Files

| file | contents |
|------|----------|
| `rtl/asip_pkg.sv` | lane/register counts, ALU and instruction opcodes, `instr_t` |
| `rtl/lane_adder.sv` | one add/subtract lane adder |
| `rtl/sw_logic1.sv` | Switching Logic 1: operand routing, masking, shifts, feedback inputs |
| `rtl/sw_logic_fb.sv` | Switching Logic 2/3: output/feedback demultiplexer |
| `rtl/asip_alu.sv` | the four-lane ALU with hadd and transform stages |
| `rtl/alu_pair.sv` | two chained ALUs: one-cycle fTRAN/iTRAN |
| `rtl/regfile4.sv` | four-register file with per-lane write enables |
| `rtl/asip_h264_eu.sv` | top: execution unit with two register files and write-back |
| `tb/*.sv` | testbenches and the reference package |
