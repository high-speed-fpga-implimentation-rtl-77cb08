# RSD modular arithmetic processor for the NIST P-256 field

This is the arithmetic core of an elliptic-curve processor over the 256-bit NIST prime
field P-256. Inside, numbers are kept in **redundant signed digit (RSD)** form, so most
additions and subtractions have no carry chain. The processor does one field
operation per start: addition, subtraction, multiplication or division.

The published design it follows is an FPGA processor built only from LUTs (no DSP
blocks or embedded multipliers). That design's stated goal is a short critical path;
it reports 160 MHz on a Virtex-5 and a P-256 point multiplication in 2.26 ms. The
main parts of that design, all built here:

* a pipelined, recursive **Karatsuba-Ofman multiplier**. It splits operands down to
  8 bits and uses **Urdhva-Tiryagbhyam** multipliers at the leaves;
* a **NIST P-256 fast reduction** of the product;
* a **modular adder/subtractor** and a **binary-GCD modular divider**, both built on
  carry-free RSD adders;
* a memory, an operand bus, a result bus, an external bus and a controller FSM.

The point-level layer (point addition and doubling, and scalar multiplication) is
**not** included; see "What is not here".

## RSD numbers as two binary vectors

Every RSD number of N digits is a pair of N-bit vectors, `p` (plus) and `n` (minus).
Its digit i is `p[i] - n[i]`, which is in {-1, 0, +1}, and its value is `p - n`.
This encoding has three consequences that the whole design relies on:

* **Binary to RSD costs nothing.** The binary word becomes `p`, and `n` is zero.
  `result_bus` does this for external data.
* **Negation costs nothing.** Swapping `p` and `n` negates the number.
  `rsd_inverter` does this swap under a control bit.
* **RSD to binary is one subtraction.** `rsd2bin` computes `p - n`. This is the only
  carry-propagating step, and it sits only at the edges of the units.

### The carry-free adder (`rsd_add`)

Adding x and y means summing `x_p + y_p - x_n - y_n`. This takes two rows of full
adders, with no carry passed along a row:

1. Level 1 adds `x_p[i] + y_p[i] - x_n[i]`. The result is in {-1..2} and is written as
   `2*t[i+1] - u[i]`: a positive transfer into the next digit and a negative local
   digit. One full adder on `(x_p, y_p, ~x_n)` gives exactly this:
   t is its carry and u is its inverted sum.
2. Level 2 forms `t[i] - u[i] - y_n[i]` as `zp[i] - 2*zn[i+1]`. This is one full
   adder on `(u, y_n, ~t)`.

The delay is two full-adder cells for any width. The exact sum needs N+2 digits, and
the parameter `FOLD` chooses how N digits are returned:

* `FOLD = 0` drops the top digits. The result is then right only modulo 2^N.
* `FOLD = 1` folds the three top digits into digit N-1. This is exact whenever
  |x + y| < 2^(N-1). The reason: the lower digits are worth less than 2^(N-1) in
  magnitude, so the top part can only be -1, 0 or +1 times 2^(N-1).

Every adder in this design uses `FOLD = 1` and is sized so that this bound holds:

* modular add/subtract and the divider: W+3 digits;
* Karatsuba combination: 2W+2 digits;
* P-256 reduction: 261 digits.

So every intermediate RSD value is **exact**, not only correct modulo a power of two.
Exactness matters because the next point needs the true sign of a value.

### Signs without two's complement (`rsd_sign`)

Zero has only one RSD form: all digits zero. The sign of a nonzero number is the sign
of its most significant nonzero digit. The leading nonzero digit is negative exactly
when `n > p` as unsigned numbers. So the detector is one magnitude comparison of the
two vectors, plus an equality test for zero. The modular adder and the divider use it
to choose a corrected result without forming a two's-complement difference.

## Arithmetic units

### Karatsuba multiplier (`karatsuba_mul`, leaves `ut_mul`)

For W-bit operands with halves of H = W/2 bits:

```
sa = low H bits of aH+aL,  ca = its carry     (same for b: sb, cb)
z0 = aL*bL    z2 = aH*bH    zm = sa*sb         (three children, in parallel)
a*b = z0 + z2*2^W + (zm - z0 - z2)*2^H + (ca*sb + cb*sa)*2^W + ca*cb*2^(W+H)
```

The usual middle product (aH+aL)(bH+bL) needs H+1-bit operands. Here its carries are
moved into correction terms instead. This keeps all three children the same width and
the same pipeline depth, so W must be 8 times a power of two. The eight terms (two of
them negated by swapping vectors) pass through a three-level tree of RSD adders, and a
register ends each recursion level.

Timing:

* The multiplier is fully pipelined and accepts one operand pair per clock.
* Latency is `ecc_pkg::klat(W, 8)`, which is 6 cycles for 256 bits.
* The carries and half sums wait in a delay line while the children work.
* The product leaves as an exact (2W+2)-digit RSD number.

The 8-bit leaf is an Urdhva-Tiryagbhyam ("vertically and crosswise") multiplier.
Column k adds every bit product `a[i]&b[j]` with i+j = k, and the column sums are then
added with their weights.

### P-256 reduction (`modp256_rsd`)

The 512-bit product is cut into sixteen 32-bit words and reduced with the standard
P-256 identity:

```
c = s1 + 2s2 + 2s3 + s4 + s5 - s6 - s7 - s8 - s9 (mod p)
```

Each subtracted term rides in the minus vector of an added term. This gives five RSD
operands: (s1,s6), (2s2,s7), (2s3,s8), (s4,s9) and (s5,0). A tree of RSD adders sums
them, and the result lies in (-4*2^256, 7*2^256). The reducer converts it to binary,
then picks the one of `t - k*p` (k = -5..7, all computed in parallel) that lies in
[0, p). It has two pipeline stages.

### Modular add/subtract (`mod_addsub_rsd`)

The operands must already be reduced (x, y < m). The unit forms three values:

* `t1 = x ± y`
* `t2 = t1 - m`
* `t3 = t1 + m`

It returns t3 if t1 < 0, else t2 if t2 ≥ 0, else t1. It is purely combinational, and
any modulus below 2^W works.

### Modular divider (`div_rsd`)

The divider computes `a / b mod m` by binary extended GCD, one step per clock:

| condition | update |
|---|---|
| u even | u = u/2, x1 = x1/2 mod m |
| else v even | v = v/2, x2 = x2/2 mod m |
| else u ≥ v | u = u - v, x1 = x1 - x2 mod m |
| else | v = v - u, x2 = x2 - x1 mod m |

The loop starts from u = b, v = m, x1 = a, x2 = 0, and stops when u = 1 (result x1) or
v = 1 (result x2).

The x values are RSD numbers kept in (-m, m). Halving looks only at the least
significant digit: if that digit is nonzero, the value is odd, so m is added, and then
the digits shift right. Three RSD adders form t1 = xa - xb, t1 - m and t1 + m; the
third adder also forms x + m for halving. A last cycle adds m to a negative result.

Timing:

* At most about 4W + 3 cycles. The longest seen in the testbenches was 552 for
  256 bits.
* m must be odd, and b must be invertible mod m.
* b = 0 ends at once with result 0.

### Unit wrappers (`wr_add`, `wr_mul`, `wr_div`)

Memory holds W-digit RSD words. Their value is only defined modulo 2^W, so each
wrapper first converts its operands to binary (`rsd2bin`) and registers them. Unit
latencies, from start to done:

| unit | latency |
|---|---|
| `wr_add` | 2 cycles |
| `wr_mul` | 9 cycles: conversion 1, Karatsuba 6, reduction 2. Fully pipelined. |
| `wr_div` | 1 cycle plus the divider's run time |

## The processor (`processor_design`)

```
 a,b,m --> external bus --> result bus --> memory (8 words) --> operand bus --+--> wr_add
                               ^                                              +--> wr_mul
                               +------------- unit results <------------------+--> wr_div
                                        controller FSM sequences all of it
```

| port | width | meaning |
|---|---|---|
| clk, reset | 1 | clock; synchronous active-high reset |
| start | 1 | one-cycle pulse starting an operation; ignored while busy |
| a, b, m | 256 | operands and modulus, binary; hold them until done |
| sel | 2 | 0: (a+b) mod m; 1: (a-b) mod m; 2: (a·b) mod p256; 3: (a/b) mod m |
| result | 256 | binary result, valid from done until the next done |
| done | 1 | one-cycle pulse |

The controller runs each operation in this order:

1. It writes a, b and m into memory words 0, 1 and 2, one per cycle.
2. It starts the selected unit with those words on the operand bus.
3. In the cycle the unit reports done, it writes the result into word 3.
4. It reads word 3 back through `rsd2bin` into `result` and pulses `done`.

`done` rises 5 + L clock edges after the edge that samples `start`, where L is the unit
latency: 7 for add/sub, 14 for multiply, and at most about 1,033 for divide.

**Multiplication always reduces by the P-256 prime.** Addition, subtraction and
division use the `m` port. For a consistent field, m must be the P-256 prime; other
moduli work for +, − and ÷ only.

## Where this departs from the published design, and how far to trust it

These parts follow the published description:

* the block structure: units inside wrappers, memory, two RSD buses, external bus,
  FSM controller;
* the 256-digit width, the top-level port list and the P-256 field;
* carry-free RSD addition and subtraction, and binary-to-RSD conversion by zero
  filling;
* the Karatsuba recursion down to 8 bits with Urdhva-Tiryagbhyam leaves, three
  children in parallel, and pipelining;
* NIST reduction, and a binary-GCD divider with three adders and shifts.

These are choices made here, because the description gives no detail on them:

* the RSD adder cell and the folding rule;
* the carry-correction form of Karatsuba, and one register per recursion level;
* the pairing of P-256 reduction terms and its parallel final correction;
* the modular adder's selection by sign detection. The original says it checks only
  the least significant digits of the operands, but does not say how; this design
  compares the full vectors instead.
* the divider's step schedule, with u and v kept in binary;
* the memory depth (8 words) and its three read ports;
* the `sel` encoding, the reset polarity, the handshake and the controller states.

Things a user should know:

* **Carry chains remain at the edges.** Each wrapper converts its operands to binary
  first. The multiplier's product is converted to binary before reduction. The sign
  detector is a magnitude comparator. So this RTL shows the RSD datapath working
  correctly, but it is not tuned for the published clock rate. No timing closure has
  been done.
* **The published 8-bit test instance** of the processor symbol (8-bit a, b, m and
  output) is not reproduced. Because multiplication uses the P-256 reduction, the top
  level is fixed at 256 bits. The sub-units are parameterized and are tested at 16, 32
  and 64 bits.

## What is not here

* **Point-level control.** The original adds "sub-control units" to the controller
  that sequence point addition and doubling in a chosen coordinate system (affine for
  the reported 2.26 ms). Their formulae and schedules are not given, so scalar point
  multiplication is not implemented. The field operations it would be built from are.
* A floating-point multiplier, mentioned in passing in the original. Nothing about its
  format or role is given.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module against an
independent reference, usually wide-integer arithmetic in the testbench, and ends with
`TB_RESULT checks=N failures=F`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rsd_add` | 16 digits. Wrap mode checked modulo 2^16; fold mode checked against exact signed sums, with operands chosen to push transfers into the top digits. |
| `tb_rsd_inverter`, `tb_rsd2bin`, `tb_rsd_sign` | Digit-by-digit value references, including several encodings of zero. |
| `tb_ut_mul` | Exhaustive 8×8. |
| `tb_karatsuba_mul` | 64 bits, one pair per cycle, exact product after exactly 4 cycles. Includes all-ones halves to exercise the carry corrections. |
| `tb_modp256_rsd` | Random and extreme 512-bit inputs against `c % p`, with 2-cycle latency. |
| `tb_mod_addsub_rsd` | 16 bits with random moduli, and 256 bits with P-256. Counts all three correction outcomes. |
| `tb_div_rsd` | 16 bits (two primes) and 256 bits (P-256). Checks r·b ≡ a, the cycle bound and division by zero. |
| `tb_wr_add`, `tb_wr_div`, `tb_wr_mul` | Operands in random redundant encodings. Check exact latencies; `wr_mul` is checked back-to-back at full size. |
| `tb_ecc_memory`, `tb_result_bus`, `tb_controller` | Storage and read ports; bus sources; the FSM sequence, write-back, ignored starts and cycle counts. |
| `tb_processor_design` | Full size, default parameters. A mix of all four operations over P-256 and over other moduli. Checks results and start-to-done cycle counts, and requires each of these to happen at least once: add with and without the −m correction, subtract with and without the +m correction, multiply, divide, a non-P-256 modulus, and an ignored start. |

To simulate one testbench with Verilator (the package goes first):

```
verilator --binary --timing --assert --top-module tb_processor_design \
    rtl/ecc_pkg.sv rtl/*.sv tb/tb_processor_design.sv
./obj_dir/Vtb_processor_design
```

The full-size build is the slow part: a few minutes, most of it C++ compilation of the
256-bit Karatsuba tree. The simulation itself takes seconds. For linting, use
`verilator --lint-only -Wall rtl/ecc_pkg.sv rtl/<module>.sv`; it finds submodules with
`-y rtl`.

## Changing it

* **Field width.** The sub-units take `W` (and `LEAF` for the multiplier). The top
  level uses `ecc_pkg::FIELD_W` and the P-256 reduction. A different prime needs a
  different reduction block in `wr_mul`.
* **Pipeline depth.** Latencies come from `ecc_pkg::klat`, and `wr_mul` derives its
  valid pipeline from it. If you move a register, the latency constants follow.
