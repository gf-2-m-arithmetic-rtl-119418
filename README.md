# Affine scalar multiplier for binary elliptic curves

This is a hardware unit that computes the elliptic-curve scalar product
R = kP. P is a point on a binary curve y² + xy = x³ + ax² + b over GF(2^m),
and k is an m-bit integer. kP is the costly step in ECC key agreement and
signatures. The unit is built to keep its arithmetic modules separate and
swappable: field multiplier, field divider and field squarer. The multiplier
can be the smallest bit-serial one or a digit-serial one with any digit size.

The default build targets m = 163 with an 8-bit digit multiplier. On the
NIST/SEC B-163 curve one kP takes about 49,000 clocks. The same RTL
runs m = 233 and m = 283, and any other field, by changing parameters.

## How kP is computed

The scalar is scanned from bit 0 upward (the right-to-left binary method):

    R = O (point at infinity), S = P
    for i = 0 .. m-1:
        if k_i = 1:  R = R + S
        S = 2S

In one step, R + S and 2S both use only the old R and S. So the design has
**two independent point units**: one for addition (`ecc_add`) and one for
doubling (`ecc_double`). The control unit (`kp_ctrl`) starts both in the same
clock. A step therefore costs the longer of the two operations, not their sum.

Points are held in **affine coordinates**. Each point operation needs one field
division, one multiplication and one or two squarings:

| unit | formulas |
|---|---|
| ecc_add | λ = (y1+y2)/(x1+x2); x3 = λ²+λ+x1+x2+a; y3 = λ(x1+x3)+x3+y1 |
| ecc_double | λ = x1 + y1/x1; x3 = λ²+λ+a; y3 = x1²+λ·x3+x3 |

Each unit owns a divider, a multiplier and a combinational squarer. It runs
them in the order DIV → SQR (1 clock, forms x3 and starts the multiply) → MUL.
The doubling unit has only one squarer. It computes x1² while the divider is
busy, and λ² afterwards.

### Special cases of the group law

The affine formulas do not cover every case. `kp_ctrl` sorts each step into
one of five rules before it starts the addition unit:

| rule | condition | new R |
|---|---|---|
| `ADD_SKIP` | k_i = 0, or S is infinity | unchanged |
| `ADD_COPY` | R is infinity | S |
| `ADD_DBL` | R = S | the doubling unit's result (2S = R + S) |
| `ADD_INF` | R = −S (same x, other y) | infinity |
| `ADD_UNIT` | otherwise | output of `ecc_add` |

The point at infinity is coded as **(0,0)**. That pair is never on a curve
with b ≠ 0. The doubling unit returns (0,0) for any input with x = 0. That
covers infinity itself and points of order two. All m bits are always scanned,
so the time of a kP hardly depends on k. The only variation comes from the
divider's data-dependent loop count.

## Field arithmetic (polynomial basis)

Element bit i is the coefficient of x^i. The reduction polynomial F(x) is a
parameter. `gf_pkg::field_poly(m)` supplies the NIST polynomials for m = 163,
233, 283, 409 and 571:

- 163: x^163 + x^7 + x^6 + x^3 + 1
- 233: x^233 + x^74 + 1
- 283: x^283 + x^12 + x^7 + x^5 + 1

### Multipliers

- **`gf_mul_serial`** works MSB-first, one bit of B per clock:
  C ← C·x + b_i·A + c_{m−1}·F. It takes m clocks, plus one capture clock.
- **`gf_mul_digit`** takes D bits of B per clock:
  C ← (x^D·C + B_i·A) mod F. It takes ⌈m/D⌉ clocks, plus one capture clock.
  - In one clock, the D partial products and the shifted accumulator are
    summed into m+D bits.
  - The top D coefficients are then folded back with F, highest first.
  - A larger D means fewer clocks but a longer combinational path.
- **`gf_mul`** is the multiplier slot used by the point units. DIGIT = 1
  selects the serial multiplier; any other value selects the digit-serial
  one with D = DIGIT.

### Squarer

`gf_sqr` is purely combinational. It moves a_i to position 2i and reduces the
(2m−1)-bit result modulo F. F is a constant, so this is only an XOR network.

### Divider — the most intricate part

`gf_div` computes Y/X directly, without an inverse followed by a multiply. It
uses a binary extended-Euclid loop over four registers:

    A = X, B = F, U = Y, V = 0          invariant: U·X = Y·A, V·X = Y·B (mod F)
    until A = B:
      A even          : A = A/x,          U = U/x mod F
      else B even     : B = B/x,          V = V/x mod F
      else deg A > deg B : A = (A+B)/x,   U = (U+V)/x mod F
      else            : B = (A+B)/x,      V = (U+V)/x mod F
    result U

Here W/x mod F means W >> 1 when W is even, and (W ⊕ F) >> 1 when W is odd.

- F is irreducible, so the loop ends with A = B = 1, and then U = Y/X.
- deg A + deg B drops by at least one each iteration, so there are at most
  2m−1 iterations.
- The hardware performs one iteration per clock. The degree comparison uses
  two leading-one detectors.
- `done` comes at most 2m+1 clocks after `start`. At m = 163 that is at most
  327 clocks, about 275 on average.
- X = 0 is not a legal request. The divider then stops at once with 0, and a
  simulation assertion reports it.

## Host interface

The core is loaded and read over a 32-bit word bus with 8-bit word addresses.
Operands are little-endian by word: word 0 holds bits 31..0.

| address | write (`host_in_if`) | read (`host_out_if`, data one clock after `host_rd`) |
|---|---|---|
| `0_00_wwwww` | word w of k | word w of Rx |
| `0_01_wwwww` | word w of Px | word w of Ry |
| `0_10_wwwww` | word w of Py | 0 |
| `0_11_wwwww` | word w of a | 0 |
| `0x80` | bit 0 = 1 starts kP | status: bit 0 busy, bit 1 result ready |

- Operand writes are ignored while the core is busy.
- The result is copied into an output buffer when the core finishes, so it can
  be read while the next kP runs.
- `result_ready` (also status bit 1) stays set until the next start.
- `kp_done` pulses once per result.

A typical host sequence:
1. Write ⌈m/32⌉ words each of k, Px, Py and a.
2. Write 1 to 0x80.
3. Poll 0x80 until bit 1 is set.
4. Read Rx and Ry.

## Timing

A kP step costs 2 control clocks plus the slower of the two point operations.
A point operation costs a division (≤ 2m+1 clocks), one clock for the squarer
and x3, a multiplication (⌈m/D⌉+1 clocks) and one clock to write back.

The table below gives measured clocks per kP at m = 163 on B-163, next to the
counts published for this architecture:

| multiplier | measured | published |
|---|---|---|
| serial | 72,150 | 72,527 |
| D = 4 | 52,264 | 52,620 |
| D = 8 (default) | 48,828 – 49,000 | 49,360 |
| D = 16 | 47,374 | 47,730 |
| D = 32 | 46,559 | 46,915 |

The measured counts are consistently about 360 clocks lower. This implies the same
per-bit structure: one division plus one multiplication per key bit. Some
per-operation overhead clocks were evidently counted differently. The digit
size also changes the achievable clock period; at D = 8 it gave the best
overall time on an FPGA.

At m = 233 one kP takes about 99,400 clocks. At m = 283 it takes about 146,000.

## Parameters

The core modules (`kp_top`, `kp_ctrl`, the point units and the field
modules) take these parameters; the digit-serial multiplier calls its digit
`D`, and the host interfaces take only `M`:

| parameter | default | meaning |
|---|---|---|
| `M` | 163 | field degree m |
| `DIGIT` | 8 | multiplier digit; 1 selects the bit-serial multiplier |
| `F` | `gf_pkg::field_poly(M)` | reduction polynomial, including the x^m term |

The host interface allows up to 32 words per operand (m ≤ 1024). Override `F`
for a field that has no entry in `field_poly`.

## Files

| file | content |
|---|---|
| `rtl/gf_pkg.sv` | field polynomials, host word count |
| `rtl/gf_mul_serial.sv`, `rtl/gf_mul_digit.sv`, `rtl/gf_mul.sv` | multipliers and the selecting wrapper |
| `rtl/gf_sqr.sv` | squarer |
| `rtl/gf_div.sv` | divider |
| `rtl/ecc_add.sv`, `rtl/ecc_double.sv` | point units |
| `rtl/kp_ctrl.sv` | binary-method control unit with both point units |
| `rtl/host_in_if.sv`, `rtl/host_out_if.sv` | 32-bit host interfaces |
| `rtl/kp_top.sv` | top level |
| `tb/gf_ref_pkg.sv` | independent reference arithmetic (see below) |
| `tb/kp_host_bfm.svh` | host bus tasks |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench prints `TB_RESULT checks=N failures=F` and stops itself with
a watchdog. The reference package `gf_ref_pkg` deliberately uses different
algorithms from the RTL:
- LSB-first multiplication;
- inversion by Fermat's theorem, a^(2^m−2);
- a left-to-right double-and-add with an explicit infinity flag.

| testbench | what it shows |
|---|---|
| `tb_gf_mul_serial`, `tb_gf_mul_digit` | random and corner products at m = 163; exact latency; D = 5 (D does not divide m) as well |
| `tb_gf_sqr` | squares at m = 163 and 283 |
| `tb_gf_div` | 206 quotients checked by q·X = Y; latency ≤ 2m+1 |
| `tb_ecc_double`, `tb_ecc_add` | B-163 point operations against the reference, results on the curve, infinity and order-2 inputs |
| `tb_kp_ctrl` | kP for small k on B-163, kP cycle count within 10 % of the published count |
| `tb_host_in_if`, `tb_host_out_if` | address map, ignored writes while busy, start pulse, buffering, status word |
| `tb_kp_top` | end to end over the host bus on a 120-point curve over GF(2^7): five base points of order 120, 2, 3, 4 and 5, all 128 scalars, serial and digit-3 instances. Checks that every control rule, a doubling to infinity, a busy status and an ignored busy write each occur. |
| `tb_kp_top_full` | default parameters, B-163: (n−1)G = −G, nG = O, and a 163-bit k against a precomputed point; cycle count |
| `tb_kp_digits` | serial, D = 4, 16 and 32 at m = 163: result and cycle counts against the published counts |
| `tb_kp_fields` | m = 233 (B-233) and m = 283 (B-283): (n−1)G and a random k |

To run one, for example the full-size test, use plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_kp_top_full rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/tb_kp_top_full.sv
    ./obj_dir/Vtb_kp_top_full

Each test runs in seconds, apart from `tb_kp_ctrl`, which takes about a
minute because its reference works at 163 bits.

## Design choices and limits

These points are choices made in this implementation. The underlying
architecture leaves them open.

- **Handshake.** Every arithmetic module and point unit uses a one-clock
  `start` pulse (operands captured), `busy`, and a one-clock `done` pulse
  with the result held until the next start. Reset is synchronous and
  active-low.
- **Arithmetic modules.** Each point unit has private arithmetic modules.
  This costs two dividers and two multipliers, and in exchange the two units
  work concurrently.
- **Squarer.** The combinational squarer is the plain bit-spread plus
  reduction network. No particular published squarer circuit is reproduced.
- **Control-unit rules.** The rules for infinity, R = S and R = −S are
  additions. The bare binary method with affine formulas leaves these cases
  undefined.
- **Curve coefficient.** The host loads the coefficient a. The coefficient b
  is never needed by the formulas.
- **Field changes.** Changing the field means rebuilding with other
  parameters. Switching fields at run time (dynamic reconfiguration) is a
  stated goal of the architecture but is not designed here.
- **Side channels.** Nothing here protects against side-channel attacks. The
  cycle count depends slightly on the data through the divider, and `ADD_SKIP`
  steps leave the addition unit idle.
- **Timing.** Only cycle counts are checked; no FPGA timing or area
  comparison is made. Alternatives that were only compared against (Fermat
  and almost-inverse inversion, projective coordinates) are not included.
