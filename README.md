# Digit-serial GF(2^m) multiplier

Elliptic-curve cryptography over binary fields spends most of its time
multiplying elements of GF(2^m): polynomials of grade below m with one-bit
coefficients, multiplied and then reduced modulo an irreducible polynomial
F(x) of grade m. A bit-serial multiplier takes m clocks per product and is
tiny; a fully parallel one takes one clock and is huge. This design sits in
between: it consumes the operand B(x) in *digits* of D bits, one digit per
clock, so a product takes

    S = ceil(M / D) clocks

and the digit size D is the knob that trades area for speed. Everything is
parameterised by the field order M, the digit size D and the reduction
polynomial, so the same RTL covers the NIST binary fields (m = 163, 233,
283, 409, 571) and others.

The default build is M = 233 (F(x) = x^233 + x^74 + 1) with D = 32: 8 clocks
per product.

## The algorithm

Write B(x) as S digits, most significant first:

    B(x) = x^((S-1)D) B_{S-1}(x) + ... + x^D B_1(x) + B_0(x)

where each B_k has D bits, except the top one, which has M mod D bits (it is
zero-extended to D bits in the hardware). By Horner's rule

    C <- B_{S-1}(x) A(x) mod F                    initialisation
    C <- x^D C(x) + B_k(x) A(x) mod F             for k = S-2 down to 0

and C = A(x)B(x) mod F(x) at the end. The hardware executes the
initialisation in the clock the operation starts and one loop iteration in
each following clock.

## One clock of the loop

Each iteration needs two products, both done combinationally.

**B_k(x)A(x) mod F — the parallel digit multiplier** (`gf2m_parallel_mult`).
For a D-bit digit U(x),

    U(x)A(x) mod F = sum over i of u_i * (x^i A(x) mod F)

and x^i A mod F is x^(i-1) A mod F shifted left by one place, XOR-ed with
g(x) if the bit shifted out was 1 (F(x) = x^M + g(x), so x^M = g(x) mod F).
The module is a chain of D such shift-and-reduce stages; each stage's output
is gated by its digit bit and the D gated values are XOR-ed together. Its
cost grows linearly with D, which is where the area of the multiplier goes.

**x^D C(x) mod F — shift plus a small product** (`gf2m_xd_reduce`). Split C
at bit M-D:

- the low M-D coefficients, moved up D places (Q2), stay below x^M and need
  no reduction: this is pure wiring, a shift left by D;
- the top D coefficients would land on x^M .. x^(M+D-1). Since x^M = g(x),
  their contribution is Q1 = g(x) * (c_{M-1} x^(D-1) + ... + c_{M-D}) mod F.
  It is produced by a second instance of the parallel multiplier, with g(x)
  as its M-bit operand and the top D bits of C as its digit.

For the polynomials used here, grade(g) + D - 1 is far below M, so the
reduction stages inside that second multiplier never fire; they only matter
(and keep the result correct) if a polynomial with a high-grade g(x) or a
very large D is used.

**Accumulate.** C_next = Q1 xor Q2 xor B_k A: a 3M-input XOR in front of
the M-bit C register. In the initialisation clock Q1 and Q2 are left out.

## Blocks

| Module | Role |
| --- | --- |
| `gf2m_pkg` | reduction polynomials g(x) per field order, digit count, I/O word width |
| `gf2m_parallel_mult` | combinational U(x)A(x) mod F(x), D-bit U, M-bit A |
| `gf2m_xd_reduce` | x^D C(x) mod F(x) as the two parts Q1, Q2 |
| `gf2m_ds_fsm` | controller: init clock, S-1 iteration clocks, done pulse |
| `gf2m_ds_mult` | the multiplier: controller, B digit shift register, C register, digit multiplier, x^D unit, 3M-input XOR |
| `gf2m_io_if` | 32-bit word interface: collects A and B, starts the multiplier, returns C |
| `gf2m_top` | `gf2m_io_if` + `gf2m_ds_mult` |

### gf2m_ds_mult interface and timing

| Port | Dir | Width | |
| --- | --- | --- | --- |
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | start a product; taken when `busy` is low |
| `a`, `b` | in | M | operands |
| `busy` | out | 1 | high for the S-1 iteration clocks |
| `done` | out | 1 | one-clock pulse, S clocks after `start` |
| `c` | out | M | product; holds until the next `start` |

`b` is captured at `start` (its digits go into a shift register), but `a` is
read in every clock of the operation and must stay stable until `done`; an
assertion flags a change. A new `start` may be given in the clock `done` is
high, so products can run back to back at one per S clocks.

### gf2m_top word interface

The multiplier's M-bit buses are carried over 32-bit streams with a
valid/ready handshake (a word moves in a clock where both are high).

1. Send NW = ceil(M/32) words of A, then NW words of B, least significant
   word first. Bits above M-1 in the top word are ignored. `in_ready` is high
   only while operands are being loaded.
2. The interface starts the multiplier one clock after the last word;
   `busy` is high while it iterates.
3. NW result words follow on `out_data`/`out_valid`, least significant
   first, zero above bit M-1. A word that is offered is held until
   `out_ready` takes it.

The first result word appears S + 2 clocks after the clock in which the last
operand word is taken. For the default build one operation is 16 words in, 10 clocks,
8 words out.

## Parameters

| Parameter | Default | Meaning |
| --- | --- | --- |
| `M` | 233 | field order |
| `D` | 32 | digit size, 1 <= D < M |
| `G` | `gf2m_pkg::reduction_g(M)` | g(x) of F(x) = x^M + g(x), as an M-bit vector |

`reduction_g` knows the NIST polynomials

| m | F(x) |
| --- | --- |
| 163 | x^163 + x^7 + x^6 + x^3 + 1 |
| 233 | x^233 + x^74 + 1 |
| 283 | x^283 + x^12 + x^7 + x^5 + 1 |
| 409 | x^409 + x^87 + 1 |
| 571 | x^571 + x^10 + x^5 + x^2 + 1 |

and, for m = 277, the pentanomial x^277 + x^12 + x^6 + x^3 + 1, which is
irreducible but not taken from any standard. For other field orders pass
`G` explicitly; elaboration stops with an error if neither applies.

Clocks per product, S = ceil(M/D):

| m | d=1 | d=4 | d=8 | d=16 | d=32 |
| --- | --- | --- | --- | --- | --- |
| 163 | 163 | 41 | 21 | 11 | 6 |
| 233 | 233 | 59 | 30 | 15 | 8 |
| 277 | 277 | 70 | 35 | 18 | 9 |
| 283 | 283 | 71 | 36 | 18 | 9 |
| 409 | 409 | 103 | 52 | 26 | 13 |
| 571 | 571 | 143 | 72 | 36 | 18 |

Going from d = 16 to d = 32 roughly halves the clock count again but doubles
the digit multipliers, and the longer XOR chain lowers the clock rate, so
the time per product gains little for a large rise in area. Published FPGA
results for this architecture at m = 233 (Virtex-II, without the word
interface) range from about 250 slices at d = 1 to about 4500 slices at
d = 32, with clock rates of roughly 190 to 230 MHz.

## Where the design makes its own choices

The datapath (Horner's rule over digits, the shift-and-reduce digit
multiplier, the Q1/Q2 split, the 3M-input XOR) follows the published
architecture. The following are this implementation's own:

- the controller's states, the start/done/busy handshake, and running the
  initialisation step in the start clock (which gives exactly S clocks per
  product);
- the two registers of the multiplier being C and a shift register for the
  remaining digits of B, with A held by the caller;
- the word interface's order (A before B, least significant word first),
  its valid/ready handshake, and reading the result straight from the C
  register rather than from a separate output buffer;
- asynchronous active-low reset everywhere;
- the reduction polynomial for m = 277.

The elliptic-curve scalar-multiplication processor in which such a
multiplier is meant to be used is not part of this RTL.

## Verification

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=F`. Expected values come from `gf2m_ref_pkg`, a
bit-by-bit schoolbook product followed by long division by F(x), which shares
nothing with the digit-serial datapath.

| Testbench | What it covers |
| --- | --- |
| `tb_gf2m_parallel_mult` | digit multiplier, M=233/D=32 and M=163/D=4, corner and random operands |
| `tb_gf2m_xd_reduce` | Q2 wiring and Q1 xor Q2 = x^D C mod F, M=233/D=32 and M=571/D=16 |
| `tb_gf2m_ds_fsm` | init/iter/busy/done cycle by cycle, S=8 and S=2, start while busy ignored |
| `tb_gf2m_ds_mult` | products and exact latency for 233/32, 163/1, 283/8, 571/16, back-to-back starts |
| `tb_gf2m_io_if` | word assembly and return against a stand-in multiplier, input gaps, output back-pressure |
| `tb_gf2m_top` | end to end at the default parameters: 40 products, latency S+2, and counts of Q1 reductions, partial top digits, gaps, stalls and back-to-back operations |
| `tb_gf2m_workloads` | all 30 combinations of m in {163, 233, 277, 283, 409, 571} and d in {1, 4, 8, 16, 32}, values and clock counts |

Running one with Verilator, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/gf2m_pkg.sv tb/gf2m_ref_pkg.sv rtl/gf2m_top.sv tb/tb_gf2m_top.sv \
        --top-module tb_gf2m_top -Mdir obj_top
    obj_top/Vtb_gf2m_top

The other testbenches build the same way with their own module files
(`-y rtl -y tb` lets Verilator find the submodules). `tb_gf2m_workloads`
elaborates thirty multipliers of up to 571 bits and takes a few minutes to
compile; it simulates in well under a second.

Not verified: timing and area on any target, and fields or polynomials
other than the six listed above.
