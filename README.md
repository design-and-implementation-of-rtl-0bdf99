# Compact optimal-normal-basis arithmetic unit for GF(2^m)

This is a small field arithmetic unit for binary fields GF(2^m), the fields under
binary elliptic-curve cryptography. It computes AND, XOR (field addition),
squaring, square root, multiplication and inversion. The main idea is that a
bit-serial Massey-Omura multiplier and an Itoh-Tsujii inverter need almost the
same hardware: a few m-bit cyclic shift registers and one AND/XOR network. The
unit therefore has **three m-bit registers in total**, shared by every
operation. A design that gave each operation its own registers would need
about eight. The default size is m = 173. The same RTL also runs at
m = 233, 350 and 515, and at any other m that has an optimal normal basis.

## Elements in a normal basis

An element is stored as m bits `a[m-1:0]` over the normal basis
(β, β², β⁴, …, β^(2^(m-1))). Bit `i` is the coefficient of β^(2^i). This choice
makes the cheap operations very cheap:

| operation   | in this representation                                   |
|-------------|----------------------------------------------------------|
| A + B       | `a ^ b`                                                  |
| A²          | rotate left by one: `{a[m-2:0], a[m-1]}`                 |
| √A          | rotate right by one                                      |
| A^(2^k)     | rotate left by k                                         |
| 1           | all ones                                                 |

An *optimal* normal basis (ONB) is one whose multiplication matrix λ has the
fewest possible ones, 2m−1. There are two kinds:

* **Type I** exists when m+1 is prime and 2 generates all non-zero residues
  mod m+1. Then λ(0)_ij = 1 iff 2^i + 2^j ≡ 1 or 0 (mod m+1).
* **Type II** exists when p = 2m+1 is prime, and either 2 generates all
  non-zero residues mod p, or p ≡ 3 (mod 4) and 2 generates the quadratic
  residues. Then λ(0)_ij = 1 iff 2^i ± 2^j ≡ ±1 (mod 2m+1).

All four sizes the unit targets (173, 233, 350, 515) have a Type II basis and
no Type I basis, so the default is `ONB_TYPE = 2`. Some sizes have no ONB at
all, for example m = 8. For those the unit cannot be built: elaboration stops
with an error.

## Multiplication: one AND/XOR network, one bit per clock

Product bit k is c_k = Σ_ij λ_ij · a_(i+k) · b_(j+k), with indices mod m. The
same λ serves every bit, so one network computing c₀ = a·λ·bᵀ
(`mo_and_xor`) gives every bit if it is fed rotated operands. It has one AND
per non-zero λ entry (2m−1 ANDs) and a 2m−2-gate XOR tree. For each clock of a
multiplication:

1. the network computes one bit from REG1 and REG2;
2. that bit is written into bit 0 of REG3;
3. REG1, REG2 and REG3 all rotate left.

Rotating both operands left squares them, so each clock produces the bit
for the next lower index. Because REG3 rotates in step, every bit reaches its
own position after m clocks. REG1 and REG2 have also turned a full circle, so
they again hold A and B. A multiplication takes m clocks plus one to load.

`mo_and_xor` builds λ(0) at elaboration from the congruences above. It
tabulates the discrete logarithm of 2 mod p once. For each row i it then looks
up the one or two columns j that satisfy the congruence, so the work grows
linearly in m. There is no stored matrix and no table file.

## Inversion on the same registers (Itoh-Tsujii)

a⁻¹ = a^(2^m − 2) = (a^(2^(m−1) − 1))². Let L = ⌊log₂(m−1)⌋ and keep
p = a^(2^r − 1). The unit starts with r = 1 (p = a). At each step it moves one
bit further down the binary form of m−1:

```
REG1 <- A                                    (p = a, r = 1)
for s = L-1 downto 0:
    r = (m-1) >> s
    Q   : REG2 <- REG1 rotated left by floor(r/2)     barrel shifter, 1 clock
    M1  : REG3 <- REG1 * REG2                          m clocks
    if r is odd:
      SQ: REG2 <- REG3 rotated left by 1, REG1 <- A    1 clock
      M2: REG3 <- REG2 * REG1                          m clocks
    COPY: REG1 <- REG3                                 1 clock
REG1 <- REG1 rotated left by 1                         result a^-1 in REG1
```

Each step doubles r, and adds 1 to it when the step is odd:
p · p^(2^(r/2)) = a^(2^r − 1), and squaring that and multiplying by a gives
a^(2^(r+1) − 1). The number of multiplications is L plus the number of ones
of m−1 below its leading one. For m = 173 (m−1 = 10101100₂) that is 7 + 3 = 10.
The rotation amounts are 1, 2, 5, 10, 21, 43 and 86.

**Operand A must stay unchanged on its port for the whole inversion.** The
odd steps multiply by a. REG1 has been overwritten by then, and there is no
fourth register to hold a copy, so the unit reloads a from port A. An
assertion in `onb_fau` checks that A stays stable. Inverting 0 returns 0.

## Interface and timing

`onb_fau #(M = 173, ONB_TYPE = 2)`

| port    | dir | width | meaning                                               |
|---------|-----|-------|-------------------------------------------------------|
| clk     | in  | 1     | clock, rising edge                                    |
| rst_n   | in  | 1     | asynchronous active-low reset                         |
| start   | in  | 1     | begin operation `op`; ignored while `busy`            |
| op      | in  | 3     | `fau_pkg::fau_op_e`: AND, XOR, SQR, SQRT, MUL, INV    |
| a, b    | in  | M     | operands                                              |
| y       | out | M     | A&B, A^B, A², √A, A·B or A⁻¹                          |
| y2      | out | M     | B² or √B: the second result of SQR or SQRT            |
| busy    | out | 1     | an operation is in progress                           |
| done    | out | 1     | one-cycle pulse: y and y2 valid until the next start  |

Latency is counted from the clock edge that samples `start` to the first edge
at which `done` is high:

| op        | clocks                                      | m = 173 |
|-----------|---------------------------------------------|---------|
| AND, XOR  | 1                                           | 1       |
| SQR, SQRT | 2                                           | 2       |
| MUL       | m + 1                                       | 174     |
| INV       | 2 + L(m+2) + (ones(m−1) − 1)(m+1)           | 1749    |

For m = 233, 350 and 515 an inversion takes 2,349, 4,573 and 5,171 clocks.

## Structure

```
onb_fau
├── fau_controller        FSM: loads, rotations, multiplication and inversion schedule
│   └── down_counter ×2   m-cycle bit counter; iteration index s
├── cyclic_shift_register ×3   REG1, REG2, REG3 (hold / load / rotl / rotr / serial-in rotl)
├── barrel_rotator        REG1 rotated left by floor(r/2), into REG2
├── mo_and_xor            Massey-Omura AND plane and XOR tree, c0 = a·λ·bᵀ
└── fau_out_mux           m ANDs, m XORs, result selection
fau_pkg                   operation codes, register modes, control word
```

The REG1 input multiplexer selects A or REG3. The REG2 input multiplexer
selects B, the barrel shifter output, or REG3 rotated by one. The controller
drives the whole datapath through one packed struct, `fau_pkg::fau_ctl_t`.
Each file begins with a comment on its function, interface and timing.

## Where this design makes its own choices

The operation set, the three shared registers, the bit-serial Massey-Omura
loop, the ONB λ matrix and the Itoh-Tsujii recursion come from the source
design. The points below are this implementation's own. Check them against
your own requirements.

* **Multiplying by a in the odd inversion step.** A register-level reading of
  the inversion could suggest multiplying the squared partial result by REG1,
  which at that point holds p rather than a. That does not give a⁻¹, because
  the exponent would no longer have the form 2^r − 1. This design multiplies
  by a, reloaded from port A.
* **Latency.** The figures above are this schedule's own. Figures of 179
  clocks for multiplication and 2,516 for inversion at m = 173 have been
  reported for an earlier implementation whose schedule is not known. This
  RTL uses a single-clock barrel rotation and does not move data between
  registers in separate steps.
* **Second output.** `y2` brings out REG2 so that B² and √B are visible at the
  same time as A² and √A.
* **Multiplexers.** The REG2 input mux has three inputs (B, barrel output,
  REG3²), not two. The rotate-by-one of REG3 before it is wiring only.
* **AND/XOR.** These results are taken from gates on REG1 and REG2, so `y` is
  combinational from the registers for these two operations.
* **Handshake, encodings and reset.** start/busy/done, the operation codes and
  the asynchronous reset that clears all state are not taken from any source.
* **Scope.** Only the shared unit exists here. The "standard" unit it was
  compared with, which has separate registers per operation, is not
  implemented.

Area, for orientation: synthesised at m = 173 the unit has 537 flip-flops.
That is 3 × 173 data bits plus 18 bits of state and counters. The
multiplier network is 345 two-input ANDs and a 346-input XOR reduction.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=F`. The reference arithmetic in
`tb/onb_ref_pkg.sv` does not use λ. It maps each basis element to
γ^(2^i) (Type I) or γ^(2^i) + γ^(−2^i) (Type II), where γ is a root of
unity of order p. It then multiplies by cyclic convolution mod x^p − 1 and
reads the coefficients back; the constant term is folded in as "all ones".
Inverses are checked two ways: against a^(2^m−2) computed with the reference
multiplier, and by a · a⁻¹ = 1.

| testbench                 | what it covers                                                         |
|---------------------------|------------------------------------------------------------------------|
| tb_mo_and_xor             | every product bit, m = 5 and 4 exhaustively, m = 10 (Type I) and 173   |
| tb_cyclic_shift_register  | random modes on 173- and 7-bit registers                               |
| tb_barrel_rotator         | every rotation amount, m = 173 and 5                                   |
| tb_down_counter           | load, decrement, zero flag, wrap                                       |
| tb_fau_out_mux            | result selection for every op                                          |
| tb_fau_controller         | control sequence and latency of every op at m = 173, start while busy  |
| tb_onb_fau                | end to end at m = 5, 9, 10 (Type I), 173; counts each mechanism        |
| tb_onb_fau_full           | the unit at its default parameters (m = 173), all operations           |
| tb_onb_fau_workloads      | m = 233, 350, 515, all operations                                      |

`tb_onb_fau` fails if any of these never happens: one of the six operations,
an odd inversion step, an even inversion step, a barrel rotation by more than
one bit, or a start ignored while busy. `tb/fau_driver.sv` is the shared
stimulus and checking module.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fau_pkg.sv tb/onb_ref_pkg.sv rtl/*.sv tb/fau_driver.sv tb/tb_onb_fau.sv \
    --top-module tb_onb_fau -Mdir obj_tb
./obj_tb/Vtb_onb_fau
```

Use the same command for any other testbench: change the last file and
`--top-module`. The 515-bit run takes a few seconds, mostly in the reference
model.

## Changing the design

* **Field size.** Set `M` and `ONB_TYPE` on `onb_fau`. `mo_and_xor` checks
  at elaboration that the basis exists. m must be below 4096, the width of
  `fau_pkg::ROT_W`.
