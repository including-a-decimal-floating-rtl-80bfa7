# Decimal floating point in a SPARC floating-point/graphics unit

Financial and commercial software computes in decimal, and binary floating
point cannot hold a value as simple as 0.1 exactly. This design adds IEEE
754-2008 **Decimal64** arithmetic (16 significant decimal digits) to the
floating-point and graphics unit (FGU) of an UltraSPARC T2-style
multithreaded core. It does not add a separate coprocessor. The decimal
unit (DFPU) is one more pipeline inside the FGU, beside the binary
add/multiply, divide and graphics pipelines. It shares their register
file, their register write port and the floating-point status register
(FSR) flags.

A single Decimal64 **fused multiply-add** datapath executes all five new
instructions:

| instruction | computes       | encoding (SPARC format 3/4)                 |
|-------------|----------------|---------------------------------------------|
| `DFADDd`    | rs1 + rs2      | op=10, op3=110110 (IMPDEP1), opf=0x092      |
| `DFSUBd`    | rs1 − rs2      | op=10, op3=110110, opf=0x096                |
| `DFMULd`    | rs1 × rs2      | op=10, op3=110110, opf=0x09A                |
| `DFMADDd`   | rs1 × rs2 + rs3 | op=10, op3=110111 (IMPDEP2), op5=0x3 (bits 8:5) |
| `DFMSUBd`   | rs1 × rs2 − rs3 | op=10, op3=110111, op5=0x7                  |

For example, `dfaddd %f2,%f8,%f2` is the word `0x85b09248`.

The integration rests on one observation. Every FGU instruction has the
same fixed latency, and only one FGU instruction issues per cycle. The
decimal pipeline is built to the same latency, so its results take the
FB (format/bypass) stage and the register write port W1 in exactly the
slot a binary result would have used. W1 therefore needs no arbiter.
The cost is that a decimal and a binary instruction can never start in
the same cycle.

## The pieces and how they connect

```
 L2 return ──► gkt_dfp_opcode_check   (decimal opcodes become valid instructions)
 pick (P)  ──► pku_dfp_predecode ×2   (decimal = FGU class; two-cycle detection)
 decode (D)──► dec_dfp_hazard         (FGU-FGU favor bit, DFMA block, rs3 hold,
               fac_dfp_decoder         FRF read addresses; 3-bit decimal op code)
 FX1..FX5  ──► dfpu = dfpu_buffers + dfp_fma + dfsr
 FB        ──► fgu_fb_mux             (DFPU result joins the output multiplexer)
 FW/W1     ──► register write         (FRF port W1)
 FPC       ──► fpc_fsr_update         (decimal flags into FSR cexc/aexc/ftt, trap)
```

`fgu_dfp_top` wires these together. The parts of the core that the
extension does not change are outside it and are reached through ports:
the register file (FRF), the binary pipelines, the rest of the pick and
decode logic, the TLU, and so on.

## Decimal64 in brief

A Decimal64 word has a sign bit, a 5-bit combination field, 8 exponent
continuation bits and five 10-bit *declets*.

* **Combination field.** It carries the two most significant bits of the
  10-bit biased exponent and the leading digit. If its top two bits are
  `11`, the leading digit is 8 or 9 and the exponent bits are the next
  two. `11110` is infinity and `11111` is NaN; for a NaN, the bit after
  it separates signalling from quiet.
* **Declets.** Each one is a Densely Packed Decimal (DPD) encoding of
  three digits. `dfp_pkg` holds the declet↔BCD translation tables
  (`dpd_to_bcd3`, `bcd3_to_dpd`).
* **Value.** The value is (−1)^s × C × 10^q. C is a 16-digit integer.
  q = E − 398 runs from −398 to 369.

The same value can have several encodings (a *cohort*): 1.00 and 1.0
differ only in q. The standard says which member an operation returns. An
exact result takes the *preferred exponent*, here min(q(A)+q(B), q(C)),
or the exponent closest to it. An inexact result keeps all 16 digits.
Results whose exponent would exceed 369 are *clamped*: the coefficient is
padded with zeros, as long as it still fits, before overflow is declared.

The rounding direction comes from the DFSR and can take seven values:

| code | mode |
|------|------|
| 000 | nearest, ties to even |
| 001 | away from zero |
| 010 | toward +∞ |
| 011 | toward −∞ |
| 100 | toward zero |
| 101 | nearest, ties away from zero |
| 110 | nearest, ties toward zero |

## The fused multiply-add (`dfp_fma`)

This is the largest and least obvious part of the design.

### One datapath for five operations

* **FMA and FMS** compute A×B ± C with one rounding at the end.
* **ADD and SUB** replace B by +1E0 inside the unit, so they compute A ± C
  with B unused.
* **MUL** replaces C by a zero with the product's sign and exponent. It
  then adds nothing and still picks the product's exponent as the
  preferred one.

The unit works on 16-digit BCD significands (4 bits per digit).

### Pipeline

The latency is 4 clocks, and one operation can start every clock. Every
register advances only while `en` is 1.

1. **Input registers.** They hold the operands, the operation code, the
   rounding mode and a tag.
2. **Stage 1: decode, multiply, addend preparation.**
   * The three operands are unpacked (`dfp_decode`).
   * The BCD multiplier forms the 32-digit product. It builds the
     multiples 1×A…9×A by repeated BCD addition, then adds one multiple
     per digit of B, shifted into place.
   * In parallel, the operand with the larger exponent is chosen as the
     *left* operand, and the exponent difference d becomes two shifts:
     * a left shift k = min(d, 34) for the left operand;
     * a right shift of min(d − k, 33) for the other one.
     A zero operand is always placed so that the result keeps the
     preferred exponent.
   * The special cases are settled here:
     * NaN propagation;
     * invalid operation for a signalling NaN, for 0×∞ (also when C is a
       quiet NaN), and for ∞ − ∞;
     * infinite results.
3. **Stage 2: align and add.** Both operands go into a 68-digit window.
   * The left operand is shifted left by k+1 digits.
   * The right operand is shifted right. Whatever falls off its end
     collapses into one *sticky* digit at the bottom of the window, so no
     information needed for rounding is lost.
   * The window is added, or, for an effective subtraction, subtracted
     both ways. Both L−R and R−L are formed with nine's-complement
     addition, and the one without a borrow is kept, which also gives the
     sign.
   * The number of significant digits is counted, and the right shift
     that reduces the result to 16 digits is worked out. The shift is at
     least 1, to drop the sticky digit. It grows further when the
     exponent would fall below −398 (gradual underflow).
4. **Stage 3: round and pack.**
   * The window is shifted right. The last digit shifted out is the round
     digit, and everything below it forms the sticky bit.
   * The increment is decided from the mode, the round digit, the sticky
     bit, the sign and the last kept digit.
   * The incremented coefficient can carry out to 10^16. It then becomes
     1000000000000000 and the exponent goes up by one.
   * The exponent is checked:
     * clamping above 369, or else overflow to ∞ or to ±9999999999999999E369,
       depending on the mode and sign;
     * underflow, raised only when the result is both tiny (below 1E−383
       before rounding) and inexact.
   * An exact zero takes the preferred exponent. Its sign is negative only
     under round-toward-−∞ for x − x.
   * The result is packed with `dfp_encode`.

Flags leave as `{dz, nx, nv, of, uf}`. `dz` is always 0, because there is
no division.

The three-stage split matches the organisation this unit is modelled on:

| stage | original organisation | this implementation |
|-------|-----------------------|---------------------|
| 1 | multiplier tree, addend prepared in parallel | BCD multiplier array, addend shifts |
| 2 | alignment and leading-zero logic | 68-digit alignment, exact digit count |
| 3 | combined add/round | right shift, rounding, exponent checks |

The arithmetic inside each stage is a plain BCD ripple design. It is not
the decimal carry-save tree with a leading-zero *anticipator* that a
fast implementation uses. Results are bit-exact, but the logic depth per
stage is much larger than a real 1.x GHz pipeline could accept. For a
faster clock, replace `bcd_mul16`, `bcd_add` and `bcd_ndigits` in
`dfp_pkg`/`dfp_fma` by carry-save or anticipating structures; the stage
boundaries can stay where they are.

## The DFPU (`dfpu`, `dfpu_buffers`, `dfsr`)

**Operand buffers.** The FRF has two read ports, so the three-source
DFMADDd/DFMSUBd read rs1 and rs2 in their first cycle, and rs3 on the
second read path one cycle later.

* For these two instructions, `dfpu_buffers` holds rs1, rs2 and the
  operation code for that cycle. The FMA then starts with A and B from
  the buffer and C straight from the read port.
* ADD, SUB and MUL bypass the buffer and start the cycle their operands
  arrive. Buffering them would only cost a cycle.
* An assertion checks that no FGU instruction arrives in the cycle after
  a three-source one. Decode guarantees this.

**DFSR.** An 8-bit register: `round[7:5]` and `flags[4:0] = {dz, nx, nv,
of, uf}`.

* Decimal rounding has its own field, separate from the binary `FSR.rd`.
  The flags, by contrast, are forwarded to the shared FSR.
* The flags are written when a result leaves the FMA. They leave the DFPU
  as `dflags`/`dflags_valid` one cycle later.
* Reset gives round-to-nearest-even with clear flags.
* Software writes the whole register through `dfsr_wr_en`/`dfsr_wr_data`.
  Code 111 is not a mode and falls back to nearest-even.

`main_clken` freezes the whole DFPU.

## Getting instructions into the unit

**Gasket (`gkt_dfp_opcode_check`).** Instruction words returned from the
L2 are partially decoded, and only valid opcodes are passed on. The five
decimal opcodes are added to the valid set. `legacy_valid` carries the
existing verdict for everything else.

**Pick (`pku_dfp_predecode`, one per thread group).**
* Decimal instructions are detected and joined to the FGU class.
* Two-cycle instructions are flagged: DFMADDd, DFMSUBd, PDIST (the
  three-source instructions) and the alternate-space accesses LDFA, STFA
  and CASA.
* A two-cycle instruction is not picked while an integer load is in
  decode (`pick_ok` = 0), because the core does not check dependencies on
  the second cycle of a two-cycle instruction.

**Decode (`dec_dfp_hazard`, `fac_dfp_decoder`).**
* **FGU-FGU hazard.** Only one FGU instruction, binary or decimal, may
  decode per cycle. When both thread groups hold one, a *favor bit* picks
  the winner and flips, so the groups alternate. The loser stalls in its
  decode register.
* **DFMA block.** In the cycle after a three-source instruction decodes,
  no FGU instruction from either group decodes. Decode holds that
  instruction's rs3 address and drives it onto read port 2 in that cycle.
* **FRF addressing.** Read addresses are `{tid, r[0], r[4:1]}`: 32 double
  registers per thread, 8 threads, 256 entries.
* **Operation code.** `fac_dfp_decoder` turns the issuing instruction into
  `decimal_op` and the 3-bit operation code for the DFPU: FMA 000,
  FMS 001, MUL 100, ADD 110, SUB 111. The original table writes FMA and
  FMS as `0X0`/`0X1` and MUL as `10X`; X is driven as 0.
* **Binary instructions** leave through `bfp_issue_*` to the binary
  pipelines outside.

## Results and flags

**FB and W1.** `fgu_fb_mux` is the FB-stage output-format multiplexer.
Its inputs are:

| selection | source | placement |
|-----------|--------|-----------|
| FGX DP | graphics result | full 64 bits |
| FGX odd | graphics result | low 32 bits |
| integer/constant | stage-5 result | full 64 bits |
| FPX SP odd | binary single | low half |
| FPX SP even | binary single | high half |
| FPX DP | binary double | full 64 bits |
| FPDU | the new decimal result | full 64 bits |

The FW register after it drives W1. An assertion in the top checks that a
binary and a decimal result never reach FB together.

**FSR (`fpc_fsr_update`).** When decimal flags arrive, they are reordered
into the FSR's `nv, of, uf, dz, nx` order and handled like binary ones:

* `cexc` receives all flags of the operation.
* A flag whose trap-enable bit `tem` is set raises `ieee_trap` and sets
  `ftt` = 1 (IEEE_754_exception).
* A flag whose `tem` bit is clear accumulates into `aexc`.
* A decimal completion without a trap clears `ftt`.
* Decimal and binary flags arriving in the same cycle are ORed.
* A load-FSR takes priority.

`ver` (bits 19:17) is a parameter, `FPU_VER` = 0.

## Timing

All numbers are with `main_clken` = 1.

| cycle | ADD/SUB/MUL decoded in cycle t | DFMADDd/DFMSUBd decoded in cycle t |
|-------|---------------------------------|------------------------------------|
| t     | D: grant, rs1/rs2 addresses to the FRF | same; rs3 address held |
| t+1   | FX1: sources arrive, buffers bypassed | FX1: rs1/rs2 buffered; read port 2 reads rs3; **no FGU decode** |
| t+2   | FMA input registers | FX1': rs3 arrives, FMA starts |
| t+5   | FX5: result in FB multiplexer | — |
| t+6   | W1 write (end of cycle); flags into DFSR → FSR | FB |
| t+7   | — | W1 write; flags |

This is the six-cycle execution latency of the other FGU instructions.
The three-source instructions take one cycle more, and the block hazard
keeps that cycle free of FGU issue.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `P_DIGITS`, `EXP_BIAS`, `Q_MIN`, `Q_MAX`, `E_MIN` | 16, 398, −398, 369, −383 | `dfp_pkg` | Decimal64 format |
| `WIN`, `ALIGN_MAX` | 68, 34 | `dfp_pkg` | FMA window (2p + 34 + 2 digits), largest left shift |
| `TAG_W` | 8 | `dfp_fma`, `dfpu`, `dfpu_buffers` | tag carried with an operation (destination FRF entry) |
| `N_GKT` / `N_INSTR` | 4 | `fgu_dfp_top` / `gkt_dfp_opcode_check` | instruction words checked per gasket return |
| `FPU_VER` | 0 | `fpc_fsr_update` | FSR.ver |

`WIN` and `ALIGN_MAX` must stay consistent with each other; the
datapath is written for Decimal64 only.

## How far to trust it, and where it departs

These parts follow the original design:

* the instruction encodings;
* the split into gasket, pick, decode, FAC, DFPU, FB and FPC changes;
* the DFSR layout and rounding codes;
* the buffer scheme and the DFMA block hazard;
* the shared, unarbitrated W1 port;
* the FSR update rules.

These are this design's own choices:

* **FMA internals.** They are my own (see above). The six-stage FMA
  variant, which can read the addend one cycle later without buffers, is
  not built.
* **Interfaces to the rest of the core.** They are reduced to what the
  decimal extension touches:
  * the FRF is outside, with read data arriving the cycle after the
    address;
  * the binary pipelines are outside, with their FB result and flags as
    inputs.
* **Not modelled at all:**
  * flushes from the TLU/IFU;
  * FRF ECC;
  * the early trap-prediction signal;
  * scan and memory BIST pins;
  * register dependency checking between FGU instructions.
* **DFSR access from software.** The `dfsr_wr_*` port is an assumption,
  because no instruction for it is defined.
* **Telling the FSR logic about a decimal completion.** This uses the
  valid bit that travels with the operation (`dflags_valid`), not a
  separate `decimal_op` signal from the FAC.
* **Reserved opcodes.** The decimal opcodes defined only for later use
  (DFDIVd and the negated fused forms) are not decoded.
* **Binary inputs of the FB multiplexer.** The odd/even placement of
  single results is the usual SPARC pairing.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`.

* **`tb_dfp_fma`** streams 136 reference vectors from
  `tb/dfp_fma_vectors.hex`, with a clock-enable hole every 17 issues. It checks
  every result, its flags and that it appears exactly 4 enabled clocks
  later.
  * The vectors were computed with an independent software model of
    IEEE 754-2008 decimal64 arithmetic: 16 digits, exponents −383…384,
    clamping on.
  * They cover all five operations and all seven rounding modes: exact
    and inexact results, ties, cancellation, carry-out, overflow in each
    mode, subnormals, clamping, infinities, quiet and signalling NaNs,
    and invalid operations.
  * The first three vectors are the add, subtract and multiply of the
    original test programs. For example, 7.11992786024902E+174 +
    (−4.97314301769378E+174) = 2.14678484255524E+174, word
    0x40B914DE24A556A4.
  * File format: one vector per line in hex, `op(1) rnd(1) A(16) B(16)
    C(16) result(16) flags(2)`, counted in hex digits. The low four bits
    of the flags byte are {nx, nv, of, uf}.
* **`tb_dfpu`** sends the same vectors through the buffers the way the
  FGU delivers them. It sets the rounding mode by writing the DFSR, and
  checks results, latencies (4 and 5 cycles), flag timing and buffer use.
* **`tb_dfp_decode`, `tb_dfp_encode`** check 24 independent encodings,
  including extreme exponents and leading digits 8 and 9, plus
  infinities and NaNs.
* **`tb_fgu_dfp_top`** is the end-to-end test, at the default
  parameters.
  * **Setup.** It provides a 256×64 register file model and a model of
    the binary pipelines (random results, formats and flags). Two
    thread-group instruction streams mix decimal, binary and integer
    instructions, with random integer-load-in-decode events.
  * **Phase 1** runs at nearest-even with no traps enabled.
  * **Phase 2** writes the DFSR to round toward −∞, enables the invalid
    trap in the FSR, and runs those vectors plus the invalid-operation
    ones.
  * **Checks.** Every register write (address, data, exactly 6 or 7
    cycles after decode), the final register contents, the binary issue
    port, gasket validity, `aexc`, `ftt` and the trap count.
  * **Coverage.** It counts each mechanism and fails if one never
    happened: FGU-FGU conflict, DFMA block stalling decode, two-cycle
    pick hold, buffered launch, direct launch, binary FB write, IEEE
    trap, aexc accumulation, gasket detection, DFSR rounding change.
* The small control blocks have directed tests:
  * decoder: all five opcodes, the three program words, near-miss
    opcodes;
  * hazard: favor alternation, back-to-back three-source instructions,
    rs3 steering;
  * FSR: trap vs accumulate, load-FSR priority, merged binary and
    decimal flags;
  * pick, gasket, FB multiplexer and DFSR.

### Running a test with Verilator

```
verilator --binary --timing --timescale 1ns/1ps \
  rtl/dfp_pkg.sv rtl/fgu_fb_pkg.sv -y rtl tb/tb_fgu_dfp_top.sv \
  --top-module tb_fgu_dfp_top -o sim
./obj_dir/sim
```

* Run from the directory that holds `rtl/` and `tb/`. The testbenches read
  `tb/dfp_fma_vectors.hex` by that relative path.
* The two packages are named first so that they are compiled before their
  users. `-y rtl` finds every module by its file name.
* For another block, put its testbench (`tb/tb_<module>.sv`) and top
  module name in the command instead.
* With Verilator 5.050, every testbench builds without warnings and prints
  `failures=0`.
