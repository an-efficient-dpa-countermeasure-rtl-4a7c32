# DF-ECC: a dual-field elliptic-curve processor with randomized Montgomery arithmetic

This is synthesizable SystemVerilog for an elliptic-curve scalar-multiplication
processor. It works over prime fields GF(p) and binary fields GF(2^m) with field
lengths up to 521 bits. It protects itself against differential power analysis
(DPA) by randomizing the arithmetic, not the circuit.

Every field element is held in a *randomized Montgomery domain*,
`A = a * 2^lambda mod p`, where `lambda` is the Hamming weight of a random value
`r`. The processor draws a fresh `r` from an on-chip random bit generator before
each scalar multiplication. Every intermediate value therefore differs from run
to run, even for the same key and point. A power model built from chosen inputs
no longer matches the measured traces.

The cost is small for two reasons:

- The multiplication and the division consume one bit of `r` per iteration.
  They take the same number of iterations as their fixed-domain versions.
- The division does the conversion into the domain itself, and the
  multiplication does the conversion out of it. No precomputed constants are
  needed.

The architecture follows a published design: a 521-bit dual-field processor
with an AHB interface, a 36 x 132-bit register file, a combined arithmetic unit
(GFAU) and a random-domain generator. The algorithms and the block structure
come from that design. The bus map, instruction format, operand-transfer
sequencing and several details of the arithmetic unit are choices made here.
The section "Where this RTL departs from the published design" lists them.

## 1. The two randomized operations

Let `m` be the field length and `r = r[m-1:0]` the domain value. Bits of `r` at
and above `m` are zero, so `lambda = HW(r) <= m`.

### Randomized Montgomery multiplication (RMM)

`RMM(X, Y) = X * Y * 2^-lambda mod p`. It takes `m` iterations, one per cycle:

```
V = X, R = 0, S = Y
for i = 0 .. m-1:
    R = R + V[0]*S (mod p);  V = V/2
    if r_i:  R = R/2 (mod p)     -- the domain drops by one
    else:    S = 2S  (mod p)     -- the domain is kept
```

In GF(2^m), "+" is XOR. `/2` and `2*` become division and multiplication by `x`
modulo the field polynomial.

### Randomized Montgomery division (RMD)

`RMD(X, Y) = X * Y^-1 * 2^lambda mod p`. It is a binary-gcd loop on `(U, V)`
that drives a modular update of `(R, S)`. It starts from
`(U, V, R, S) = (p, Y, 0, X)`, and each iteration takes one of four cases:

| UV case        | UV update       | r_i = 1                       | r_i = 0              |
|----------------|-----------------|-------------------------------|----------------------|
| U even         | U = U/2         | S = 2S                        | R = R/2              |
| V even         | V = V/2         | R = 2R                        | S = S/2              |
| U > V          | U = (U-V)/2     | R = R-S, S = 2S               | R = (R-S)/2          |
| otherwise      | V = (V-U)/2     | S = S-R, R = 2R               | S = (S-R)/2          |

The loop keeps two invariants: `R*Y = X*U*2^k` and `S*Y = X*V*2^k`, where `k`
counts the bits of `r` used so far. When `V` reaches 0, `U` is 1 and `R` is the
result. The loop runs at most about `2m` iterations, the same as Kaliski's
Montgomery inverse. It needs no extra multiplications and no final correction.

**Detail that matters:** for some operands the gcd finishes in fewer than `m`
iterations. The result would then carry only part of `r`'s weight. This RTL
therefore keeps iterating while `V != 0` **or** `i < m`. With `V = 0`, the extra
iterations fall into the "V even" case: `R` doubles when `r_i = 1` and is kept
otherwise. The result is always in the domain `2^HW(r)`.

### Domain conversion

- Into the domain: `RMD(a, 1) = a * 2^lambda`.
- Out of the domain: `RMM(a * 2^lambda, 1) = a`.

A scalar multiplication converts `x`, `y` and the curve coefficient `a` in
(three RMD). It converts the result's `x` and `y` out (two RMM).

Inside the domain the ordinary affine formulas apply unchanged:

- `RMM(a2^l, b2^l) = ab * 2^l`
- `RMD(a2^l, b2^l) = (a/b) * 2^l`
- addition and subtraction keep the domain

## 2. The GFAU (`gfau`, `gfau_rs_unit`)

The GFAU performs one operation at a time over either field.

| funcsel | operation       | cycles from `start` to `done`        |
|---------|-----------------|--------------------------------------|
| 0       | X + Y mod p     | 2                                    |
| 1       | X - Y mod p     | 2                                    |
| 2       | RMM(X, Y)       | m + 1                                |
| 3       | RMD(X, Y)       | iterations + 2 (at most 2m + 2)      |

**Operand I/O.** Operands arrive word by word on two 132-bit buses, `in1` for X
and `in2` for Y, addressed by `widx`. The result is read back on `out` through
the same word index.

**Two-stage division.** The division is split into a UV datapath and an RS
datapath with a pipeline register between them:

- In cycle `t`, the UV datapath decides the case. `U > V` is found by one
  subtraction in both fields. The UV datapath updates `U`/`V` and registers the
  case, its group and the domain flag `r_i`.
- In cycle `t+1`, the RS datapath applies the matching update to `R` and `S`.
  Meanwhile the UV datapath decides the next case.

The RS update does not depend on the new U/V, so the critical path is cut in
two for one extra cycle per division.

**One unit for R and S (swap logic).** The four RS updates fall into two
symmetric groups:

- group 0 (U even, U > V): primary operand R, secondary operand S
- group 1 (V even, U <= V): primary operand S, secondary operand R

One combinational unit (`gfau_rs_unit`) computes, modulo p:

```
A' = (A [+|-] B) [/2]
B' = B [*2]
```

R and S sit in two physical registers, P and Q, and an orientation bit records
which one holds R. The operands are crossed over whenever a step's group
differs from the orientation, and the results are written straight back. This
is the swap logic, and it avoids duplicating the unit.

The multiplication uses the same unit:

- r_i = 1: `A' = (A + V0*B)/2`
- r_i = 0: `A' = A + V0*B` and `B' = 2B`

V doubles as the shifting multiplier.

**Domain flag.** The GFAU reads `r_i` on `dflag` and pulses `dshift` when it
consumes a bit. That happens exactly `m` times per RMM and per RMD, so the
domain register is back at `r_0` for the next operation.

**Field restriction.** In GF(2^m) the field polynomial, including its `x^m`
term, is held in the N-bit modulus register. Binary fields therefore need
`m < N`. With N = 521 that covers every standard binary field up to 409 bits.
A build meant for GF(2^163) alone must use `N = 164`, not 163.

## 3. The random domain (`dpa_countermeasure`)

The random domain is produced in three parts:

- **Entropy source.** Two free-running ring oscillators, a Fibonacci ring and a
  Galois ring, are XORed. They are analog in behaviour and are not part of this
  RTL. Their output enters the processor on `ro_in`.
  `tb/ro_pair_model.sv` is a behavioural stand-in with random period jitter.
- **`rng_postproc`.** It samples `ro_in` with the system clock, which is slower
  than the oscillators. The sample is XORed with the feedback of a 19-stage LFSR
  with polynomial `x^19 + x^18 + x^17 + x^14 + 1`. The XOR result is the random
  bit, and it is also shifted back into the LFSR. The output is one bit per
  clock.
- **`domain_shift_reg`.** An N-bit register. Only bits `m-1..0` are live; the
  rest stay zero. On `refresh` it shifts in a random bit at position `m-1`. On
  `shift` it rotates `r[m-1:0]` right. `dflag = r[0]`.

The controller holds `refresh` for `m` cycles before each scalar
multiplication.

## 4. Scalar multiplication (`ecc_control`, `ecc_microcode`)

The register file holds nine field elements of four 132-bit words each
(4 x 132 = 528 bits). Word address = `4*slot + word`.

| slot | 0 | 1, 2  | 3, 4          | 5, 6          | 7, 8       |
|------|---|-------|---------------|---------------|------------|
| use  | a | Q0 = P| Q1 = P1/result| Q2 = P2       | temporaries|

An ECSM instruction computes `Q1 = K * Q0` with the double-and-add-always
ladder. Each key bit costs one point addition and one doubling, whatever its
value.

1. Refresh the domain (m cycles).
2. Skip the leading zero bits of `K[m-1:0]` and consume the top one bit. An
   all-zero key sets the error flag.
3. **Pre-process:** `Q0 = (RMD(x,1), RMD(y,1))`, `a = RMD(a,1)`, `Q1 = Q2 = Q0`,
   then `Q2 = 2*Q2`.
4. For each remaining key bit:
   - `K_i = 1`: `Q1 = Q1 + Q2`, then `Q2 = 2*Q2`
   - `K_i = 0`: `Q2 = Q1 + Q2`, then `Q1 = 2*Q1`
5. **Post-process:** `Q1 = (RMM(x,1), RMM(y,1))`.

Each point operation is a fixed list of 10 to 13 field operations kept in
`ecc_microcode`. It uses the textbook affine formulas:

- `y^2 = x^3 + ax + b` over GF(p)
- `y^2 + xy = x^3 + ax^2 + b` over GF(2^m)

Each point operation needs one RMD. `b` is never used. Symbolic slots
"destination point" and "other point" are resolved from the key bit.

The controller runs each field operation in four phases:

| phase      | cycles                                          |
|------------|-------------------------------------------------|
| load       | 8 (X and Y from the single-port register file)  |
| start      | 1                                               |
| compute    | the GFAU operation                              |
| write-back | 4                                               |

The constants 0 and 1 are generated by the controller, not stored.

The ladder keeps `P2 - P1 = P`. So the affine formulas never meet the point at
infinity unless P has a tiny order, and no infinity handling is built.

## 5. Host interface (`ahb_wrapper`, `addr_decoder`, `config_regs`, `key_shift_reg`, `instr_decoder`)

The host interface is a 32-bit AHB slave with zero wait states. Responses are
always OKAY.

Byte address map:

| address              | register                                                |
|----------------------|---------------------------------------------------------|
| `0x0000`             | write: instruction; read: status                        |
| `0x0004`             | FieldLen: `m` in bits 9:0, field type in bit 16 (1 = GF(2^m)) |
| `0x0100 + 4k`        | modulus word k (prime, or field polynomial with its `x^m` term) |
| `0x0200 + 4k`        | key word k (write only)                                 |
| `0x1000 + 32e + 4s`  | register-file word e (0..35), 32-bit sub-word s (0..4)  |

Register-file words are 132 bits wide. They are written in five sub-words, and
the write of sub-word 4 stores the whole word. While the processor is busy,
host register-file accesses are dropped and read as zero.

Status bits:

| bit | meaning                                       |
|-----|-----------------------------------------------|
| 0   | busy                                          |
| 1   | done                                          |
| 2   | error (zero key)                              |
| 3   | last instruction rejected (bad format or busy)|

Instruction word:

| bits  | field                                          |
|-------|------------------------------------------------|
| 1:0   | opcode: 1 = ECSM, 2 = FIELD                    |
| 3:2   | FIELD only: function (0 add, 1 sub, 2 RMM, 3 RMD) |
| 7:4   | FIELD only: source slot 1                      |
| 11:8  | FIELD only: source slot 2 (13 = zero, 14 = one)|
| 15:12 | FIELD only: destination slot                   |

FIELD operations work in whatever domain the register currently holds.

A scalar multiplication, step by step:

1. Write FieldLen and the modulus.
2. Write the key, `a` into slot 0, and `P` into slots 1 and 2.
3. Write `0x1` to `0x0000`.
4. Poll `0x0000` until bit 0 clears.
5. Read the result from slots 3 and 4.

The key is shifted out, and `a` and `Q0` are left in the randomized domain.
Write them again before the next scalar multiplication.

## 6. Performance

Cycle counts were measured in simulation for full-length random keys. They are
compared with the published results: operation time multiplied by the published
clock frequency.

| field       | this RTL (cycles) | published (approx. cycles) |
|-------------|-------------------|----------------------------|
| GF(p521)    | 2,304,684         | 2.02 M (8.08 ms @ 250 MHz) |
| GF(2^409)   | 1,534,554         | 1.22 M (4.65 ms @ 263 MHz) |
| GF(2^283)   | 764,982           | 0.51 M (1.95 ms @ 263 MHz) |
| GF(p256)    | 601,056           | 0.48 M (1.89 ms @ 256 MHz) |
| GF(p160)    | 255,672           | 0.19 M (0.74 ms @ 256 MHz) |

The same RTL built with `N = 256` (two register-file words per element) takes
565,726 cycles over GF(p256) and 255,460 over GF(2^163). The published figures
for the smaller builds are 0.48 M and 0.17 M cycles (0.63 ms @ 270 MHz for
GF(2^163)).

This RTL is 14 to 50 % slower. The difference is mostly the word-serial operand
transfer of about 14 cycles per field operation, and the affine formulas chosen
here. The GFAU itself meets the published iteration counts:

- `m` cycles per multiplication
- at most `2m` iterations plus one cycle per division

No clock frequency or area is claimed for this RTL.

## 7. Where this RTL departs from the published design, and how far to trust it

**Follows the published design:**

- the randomized RMM and RMD algorithms
- domain conversion by RMD(a,1) and RMM(a,1), with three RMD and two RMM per
  scalar multiplication
- the double-and-add-always ladder in affine coordinates
- one GFAU iteration per cycle, the pipeline stage between the UV and RS
  datapaths, the R/S swap logic and the shared registers for both algorithms
- the 36 x 132-bit register file with its nine elements
- the 132-bit GFAU and register-file buses and the 2-bit function select
- the Prime/Poly, FieldLen and key registers
- the LFSR polynomial of the random bit generator
- refreshing the domain before every scalar multiplication

**Choices made here:**

- **Division loop.** The division continues until all `m` domain bits are used
  (section 1). The published loop condition alone leaves the result in the
  wrong domain for some operands.
- **Adders.** The carry-save adder arrangement is written as plain word-level
  adders.
- **`U > V` in GF(2^m).** It is found by integer subtraction, as in GF(p). No
  polynomial-degree logic is built.
- **Random bit generator.** How the sampled bit and the LFSR combine (XOR, then
  feed back) is a choice made here.
- **Domain register length.** The ring length follows `m`.
- **Bus side.** The AHB protocol details, the address map, the instruction set,
  the status word and the blocking of host access while busy are all our own.
- **Controller.** The word-serial operand-transfer sequencing, the
  leading-zero skip and the zero-key error flag are our own.
- **Point formulas.** Their order and the use of the two temporaries are our
  own.

**Not in the RTL:**

- The ring oscillators. Their output is the `ro_in` input.
- The unprotected fixed-domain baseline.
- The FPGA power-measurement set-up.

**Verification:** every module has a self-checking testbench. Each testbench
was also shown to fail on a deliberately broken copy of its module.

- The GFAU is checked against independent bit-serial modular arithmetic:
  - over GF(2^521-1), GF(2^255-19), GF(2^409) and GF(2^163)
  - with random domains, including `lambda = 0` and `Y = 1`
  - including the iteration counts
- The micro-sequences are checked by interpreting them in a random domain
  against textbook point formulas.
- Whole-processor tests drive only the AHB port and compare scalar
  multiplications with an independent double-and-add model over:
  - GF(2^521-1), GF(2^409), GF(2^283), GF(2^163)
  - GF(p256), GF(p160), GF(2^127-1)

  A second build with `N = 256` runs GF(p256) and GF(2^163).
  The tests also check that the same scalar multiplication repeated gives the
  same result in a different domain. Every mechanism is counted and must occur:
  refresh, pre- and post-process, both key-bit paths, swaps, both domain-flag
  values, dropped host writes.

Curves in the tests use random `a` and base points, which is valid because `b`
is never used. No standard curve test vectors were run, and no gate-level or
timing analysis was done.

## 8. Files and simulation

| file                                | content                                   |
|-------------------------------------|-------------------------------------------|
| `rtl/dfecc_pkg.sv`                  | shared types: function codes, slots, micro-ops, instructions, bus targets |
| `rtl/dfecc_top.sv`                  | processor top (parameters `N = 521`, `WORD = 132`) |
| `rtl/gfau.sv`, `rtl/gfau_rs_unit.sv`| arithmetic unit and its shared modular unit |
| `rtl/dpa_countermeasure.sv`, `rtl/rng_postproc.sv`, `rtl/domain_shift_reg.sv` | random domain generation |
| `rtl/ecc_control.sv`, `rtl/ecc_microcode.sv`, `rtl/instr_decoder.sv` | controller |
| `rtl/register_file.sv`, `rtl/config_regs.sv`, `rtl/key_shift_reg.sv` | storage |
| `rtl/ahb_wrapper.sv`, `rtl/addr_decoder.sv` | bus interface                   |
| `tb/tb_<module>.sv`                 | unit testbenches                          |
| `tb/tb_dfecc_top.sv`                | end-to-end test (about 2 s)               |
| `tb/tb_dfecc_full.sv`               | full 521-bit and 409-bit scalar multiplications (about 12 s) |
| `tb/tb_dfecc_workloads.sv`          | 160-, 256- and 283-bit fields (about 5 s) |
| `tb/tb_dfecc_n256.sv`               | the processor built with `N = 256`: GF(p256) and GF(2^163) (about 2 s) |
| `tb/dfecc_tb_harness.sv`, `tb/tb_ecc_ref_pkg.sv`, `tb/ro_pair_model.sv` | AHB master, reference model, oscillator model |

Every testbench prints `TB_RESULT checks=N failures=F`. To build and run one:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb -Irtl -Itb \
    rtl/dfecc_pkg.sv tb/tb_ecc_ref_pkg.sv tb/tb_dfecc_top.sv --top-module tb_dfecc_top
./obj_dir/Vtb_dfecc_top
```

Testbenches that do not use the reference package can leave out
`tb/tb_ecc_ref_pkg.sv`. Tests that use the harness read internal signals by
hierarchical name to count mechanisms.
