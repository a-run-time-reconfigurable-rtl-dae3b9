# Elliptic-curve scalar multiplication co-processor over GF(2^m)

This is a hardware accelerator for the operation that dominates elliptic-curve
cryptography: the scalar multiplication R = kP of a curve point P by an
m-bit integer k. It works on binary curves

    y^2 + xy = x^3 + a x^2 + b      over GF(2^m), polynomial basis

in affine coordinates. It also performs a single point addition R = P + Q,
which signature verification needs.

The design is built around one idea: the security level is chosen by the
field size m. The whole design is written for any m and any field polynomial
F. One build holds one field. Moving to another security level means loading
a different build into the same place in the system. In the system this
architecture was designed for, that is run-time partial reconfiguration of an
FPGA region. Here it is the two parameters `M` and `F`.

The default build is m = 163 with F = x^163 + x^7 + x^6 + x^3 + 1, the SECG
field for the 163-bit level. Builds for m = 113 (x^113 + x^9 + 1) and
m = 131 (x^131 + x^8 + x^3 + x^2 + 1) are simulated as well.

## Point arithmetic

The co-processor uses the binary method, scanning k from its least
significant bit:

    R <- O (point at infinity),  S <- P
    for i = 0 .. m-1:
        if k_i = 1:  R <- R + S        (ECC-ADD)
        S <- 2S                        (ECC-Double)

This takes m doublings and, on average, m/2 additions. The loop runs over all
m bits, including the last doubling, whose result is never used.

Both point operations use the affine formulas. Each one needs exactly one
division, one multiplication and a few squarings and additions (XORs):

| operation | slope lambda | new x | new y |
|---|---|---|---|
| ECC-ADD (x1,y1)+(x2,y2) | (y1+y2)/(x1+x2) | lambda^2+lambda+x1+x2+a | lambda(x1+x3)+x3+y1 |
| ECC-Double 2(x1,y1) | x1 + y1/x1 | lambda^2+lambda+a | x1^2+lambda x3+x3 |

The coefficient b never appears in these formulas, so the hardware does not
need it.

Addition and doubling could run in parallel, but they run one after the
other. They share one divider, one multiplier and one squarer. That costs
time and saves area.

### Special cases

An affine point cannot represent O, and some sums divide by zero. The
controller handles these cases itself, without using the arithmetic units:

* **R = O.** R holds a flag for the point at infinity. At the first set bit
  of k, S is simply copied into R.
* **x(R) = x(S) with y(R) != y(S).** The points are opposite, so R becomes O.
* **R = S.** The addition is replaced by a doubling of R. If x = 0, the
  doubled point has order two and R becomes O.

Inside the binary method, only the first of these arises for ordinary
scalars. The other two matter for the single ECC-ADD operation. Doubling S
never meets x = 0 for points of odd order. If it did, the divider would
return 0 instead of hanging, and the result would be meaningless.

## Datapath (`ecc_datapath`)

The datapath has these registers, each M bits wide:

* R = (X1, Y1), with the O flag
* S = (X2, Y2)
* T, the new x coordinate
* the scalar shift register, whose bit 0 is the current k_i

Operand multiplexers feed three arithmetic units:

* `gf2m_divider`: y/x, at most 2M clocks
* `gf2m_serial_mult`: one multiplier bit per clock, M+1 clocks
* `gf2m_squarer`: combinational

The controller runs every point operation as three steps. The operation is
one of add (R <- R+S), double S, or double R.

1. **DIV**: start the divider. For an addition it gets (Y1+Y2)/(X1+X2); for a
   doubling it gets Y/X.
2. **MUL**, once the divider is done:
   * Form lambda. It is the quotient for an addition, and quotient + X for a
     doubling.
   * Compute the new x = lambda^2 + lambda + a (+ X1 + X2 for an addition) and
     store it in T.
   * Start the multiplier on lambda * (X1 + T) for an addition, or on
     lambda * T for a doubling.
3. **WB**, once the multiplier is done: write back.
   * Addition: Y1 <- product + T + Y1, then X1 <- T.
   * Doubling: Y <- X^2 + product + T, then X <- T.

The squarer takes lambda during MUL and the old X during WB. One squarer
therefore serves both squarings. Assertions check that neither the divider
nor the multiplier is started while it is busy.

## The divider (`gf2m_divider`)

Division is the costliest step and the least obvious one. It uses a binary
extended Euclidean algorithm that runs one step per clock. It keeps four
registers:

* A and B, M+1 bits each, starting as A = x and B = F
* U and V, M bits each, starting as U = y and V = 0

The invariants are U·x ≡ A·y and V·x ≡ B·y (mod F). Each clock does the first
of these that applies:

| condition | action |
|---|---|
| A even | A <- A/x, U <- U/x mod F |
| B even | B <- B/x, V <- V/x mod F |
| A = 1 | done, q = U |
| B = 1 | done, q = V |
| A > B (as integers) | A <- (A+B)/x, U <- (U+V)/x mod F |
| otherwise | B <- (A+B)/x, V <- (U+V)/x mod F |

"/x mod F" on an odd value first adds F, which has constant term 1, and then
shifts right. An integer comparison is enough: when A > B, deg(A) ≥ deg(B),
so (A+B)/x has a lower degree than A.

Every step lowers deg(A) + deg(B) by at least one. The sum starts at no more
than 2M-1, so a division takes at most 2M clocks. At m = 163, random operands
take 268 clocks on average, about 1.64·M. A divisor of 0 has no quotient; the
unit then returns 0 after one clock.

## Multiplier and squarer

`gf2m_serial_mult` uses Horner's rule, most significant multiplier bit first:
acc <- acc·x mod F + b_i·a. Reducing acc·x costs one conditional XOR with F.
A product takes one load clock and M steps.

`gf2m_squarer` spreads bit i of the operand to bit 2i. It then clears bits
2M-2 down to M by XORing in shifted copies of F. The loop works for any F.
For a fixed F, synthesis turns it into a plain XOR network.

## Controller (`ecc_ctrl`)

| state | action |
|---|---|
| IDLE | On start, initialise R, S and k (for kP), or R = P and S = Q (for ECC-ADD). |
| BIT | Test k_i. If R = O, copy S into R. |
| ADD | Handle the special cases, or issue DIV for R+S (or for 2R). |
| DBL | Issue DIV for 2S. |
| DIV_WAIT | Wait for the divider, then issue MUL. |
| MUL_WAIT | Wait for the multiplier, then issue WB. |
| NEXT | Shift k and count the bit. After bit M-1, go to DONE. |
| DONE | Pulse done for one clock. |

The controller sends the datapath one `dp_ctrl_t` per clock: a step and the
point operation it belongs to. The datapath returns a `dp_status_t`: the
current k bit, the O flag, the x/y comparisons of R and S, and the done
pulses of the two units. Both types are defined in `ecc_pkg`.

## Timing

Let D be the divider's clock count (at most 2M) and w the number of set bits
in k. From the clock that starts an operation to the done clock, kP takes

    2 + M·(3 + D + (M+1)) + (w-1)·(1 + D + (M+1))   clocks

A single ECC-ADD takes 3 + D + (M+1) clocks.

Simulated clock counts for scalars with about m/2 set bits, next to the
figures published for this architecture (no data transfer included; 100 MHz
clock in the original system):

| m | simulated | published |
|---|---|---|
| 113 | 50,017 – 50,356 | 51,730 |
| 131 | 67,321 – 67,886 | 68,887 |
| 163 | 104,890 – 107,357 | 107,043 |

The published figures come from a different divider and multiplier whose
internals are not known. The close match means the costs of the units agree
on the whole, not that their internals are the same.

## Host port (`ecc_io_regs`)

All operands cross a 32-bit port, one word at a time. An address is
`{SEL[2:0], IDX[4:0]}`. Word IDX of an operand holds bits 32·IDX+31 down to
32·IDX. Bits above M are dropped, and writes to word indices past the operand
are ignored. At m = 163 an operand is 6 words.

| SEL | write | read |
|---|---|---|
| 0 | k | result x |
| 1 | P.x | result y |
| 2 | P.y | – |
| 3 | Q.x (ECC-ADD only) | – |
| 4 | Q.y (ECC-ADD only) | – |
| 5 | curve coefficient a | – |
| 6 | control: bit 0 start, bit 1 operation (0 kP, 1 ECC-ADD) | – |
| 7 | – | status: bit 0 done, bit 1 busy, bit 2 result is O |

To run an operation:

1. Write a, P, k (and Q for ECC-ADD).
2. Write the control word.
3. Wait for the `done` output, or poll the status word.
4. Read the result x and y words.

`done` stays high until the next start. A start written while the core is
busy is ignored. Operands stay in their registers, so a new k alone can be
written before the next kP. Reads are combinational. There is one clock
domain, and every register has an asynchronous active-low reset (`rst_n`).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 163 | field size m, up to 1024 with the 5-bit word index |
| `F` | x^163+x^7+x^6+x^3+1 | field polynomial, M+1 bits; bit M and bit 0 must be 1, and it must be irreducible |

The top `ecc_coprocessor` and every arithmetic block take both parameters.
`F`'s default expression is written for m = 163, so a build for another m
must give `F` as well, for example:

    ecc_coprocessor #(.M(113), .F((114'd1 << 113) | (114'd1 << 9) | 114'd1)) u_ecc (...);

At the default size, synthesis reports about 3,300 flip-flop bits. These
include the operand registers of the host port and the Q point. For
comparison, the published FPGA co-processor at m = 163 used 2,519 flip-flops
and 5,272 LUTs.

## How this differs from the original system

* **Bus interface.** The original co-processor sat on a processor's
  peripheral bus, behind a vendor bus-interface core and routing macros at the
  edge of the reconfigurable region. Here the top exposes a plain 32-bit
  write/read port instead. The processor, buses, bridge, UART and memories of
  that system are not part of this RTL.
* **Reconfiguration.** Run-time reconfiguration is a property of the FPGA
  flow, not of the logic. Here a security level is a build with its own `M`
  and `F`.
* **Unit internals.** The divider algorithm, the multiplier's bit order, the
  register set and the step sequence are this design's choices. The units'
  functions, their sharing and the serial ADD/Double schedule follow the
  original architecture.
* **Register map.** The address map, the control and status words, the
  separate Q operand and loading a through the port are this design's
  choices.
* **Special cases.** Handling O and R = ±S explicitly is an addition that
  makes every scalar and every pair of points give the right answer.
* **Field polynomials.** The field polynomials are the standard SECG ones;
  the original design does not state them.

## Files

| file | content |
|---|---|
| `rtl/ecc_pkg.sv` | address map, operation, step and status types |
| `rtl/ecc_coprocessor.sv` | top: host port, controller, datapath |
| `rtl/ecc_io_regs.sv` | 32-bit host port and operand registers |
| `rtl/ecc_ctrl.sv` | binary-method state machine |
| `rtl/ecc_datapath.sv` | point registers, multiplexers, arithmetic units |
| `rtl/gf2m_divider.sv` | GF(2^m) divider |
| `rtl/gf2m_serial_mult.sv` | bit-serial GF(2^m) multiplier |
| `rtl/gf2m_squarer.sv` | combinational GF(2^m) squarer |
| `tb/gf_ref_pkg.sv` | reference field and point arithmetic for the testbenches |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench checks against `gf_ref_pkg`. That package is written
independently of the RTL:

* multiplication: full product, then reduction
* inversion: Fermat's theorem
* kP: double-and-add from the most significant bit

Test points are random points on random curves: x, y and a are random, and b
is chosen so that the point lies on the curve. Each result is also checked to
lie on that curve. Each testbench ends with a `TB_RESULT checks=N failures=F`
line and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_gf2m_serial_mult` | 206 products at m = 163, including 0, 1 and all-ones; exactly M+1 clocks each |
| `tb_gf2m_squarer` | 300 squares each at m = 113, 131 and 163 |
| `tb_gf2m_divider` | 300 quotients checked by multiplying back, inverses against Fermat, x = 0, at most 2M clocks |
| `tb_ecc_io_regs` | word loading, dropped bits, start/op decoding, start ignored while busy, done flag, result and status reads |
| `tb_ecc_ctrl` | at M = 16 with a behavioural datapath: the exact step sequence and clock count for 12 scalars, and the four ECC-ADD cases |
| `tb_ecc_datapath` | ECC-ADD, doubling of R and of S against the reference, scalar shift register and flags |
| `tb_ecc_coprocessor` | end to end at the defaults (see below) |
| `tb_ecc_sec_levels` | m = 113 and m = 131 builds side by side: kP against the reference, clock counts within 10 % of the published figures |

`tb_ecc_coprocessor` runs the default m = 163 build through the host port
only. It checks:

* kP for three random scalars of weight about m/2, against the reference and
  within 10 % of 107,043 clocks
* kP for k = 0, 1, 2 and 2^162
* single ECC-ADD for P+Q, P+P and P+(−P)
* k1P + k2P = (k1+k2)P, using the co-processor's own results
* a start written while busy, which must be ignored

It also counts each controller mechanism: the copy into R = O, ECC-ADD,
ECC-Double, an addition turned into a doubling, an addition giving O, and the
ignored start. A mechanism that never happened counts as a failure. The run
takes about 8 s.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`
(packages first):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ecc_coprocessor \
        rtl/ecc_pkg.sv tb/gf_ref_pkg.sv rtl/gf2m_*.sv rtl/ecc_[cdi]*.sv tb/tb_ecc_coprocessor.sv
    ./obj_dir/Vtb_ecc_coprocessor

To run another testbench, change the top module and the last file.
Simulation uses two-state logic, so every register that is read is reset.
