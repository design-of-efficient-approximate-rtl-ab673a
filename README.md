# Approximate hybrid adder with a reverse carry propagate lower half

An N-bit adder for error-tolerant DSP datapaths. It trades exactness in the
low-order bits for a short, energy-cheap carry path. The operands are split
in two halves:

* the **upper N-K bits** are added exactly by a Kogge-Stone parallel-prefix
  adder;
* the **lower K bits** are added approximately by a *reverse carry
  propagate adder* (RCPA). In the RCPA the carry travels from the most
  significant bit of the half down to bit 0. That is the opposite of a
  ripple-carry adder.

The default build is the 32-bit adder (N = 32, K = 16). The same RTL gives
the 16-bit adder with `N = 16` (K = 8).

```
            a[31:16] b[31:16]                 a[15:0] b[15:0]
                 |      |                          |     |
           +-----v------v-----+   F[16]    +-------v-----v-------+
  s[32] <--| Kogge-Stone (16) |<----+------| RCPA (16 x RCPFA)   |
           |  exact           |     |      |  carries: bit 15 -> 0
           +--------+---------+     +----->|  C[16] = F[16]      |<-- F[0] = 0
                    |               joint  +----------+----------+
                s[31:16]                              |
                                                  s[15:0], c[15:0], f[15:0]
```

## Why run the carry backwards

In a hybrid adder with an approximate lower part, a wrong guess about the
carry into the exact upper part costs 2^K. In the RCPA every bit *first*
decides which carry it hands upward. Then the carry each bit *needs* from
below is worked out, moving downward. When a need cannot be met, the error
lands at the bit where that happens. Errors found further down the chain
weigh less. Seen from the exact part, the joining carry is known
immediately: it is a plain operand bit. So the upper half never waits for
the lower half.

## The reverse carry propagate full adder (`rcpfa`)

A normal full adder satisfies

    2*C[i+1] + S[i] = A[i] + B[i] + C[i]

with C[i] as input and C[i+1] as output. The RCPFA turns this around.
C[i+1] is an **input**: the carry the bit above has already counted on. C[i]
is an **output**: the carry this bit needs from the bit below. The cell also
has a **forecast** pair. F[i] comes up from the bit below. F[i+1] goes to the
bit above and is this bit's guess of the carry it will produce.

| signal | direction | meaning |
|--------|-----------|---------|
| `a`, `b` | in | A[i], B[i] |
| `c_hi` | in | C[i+1], required by the bit above |
| `f_lo` | in | F[i], forecast from the bit below |
| `s` | out | S[i] |
| `c_lo` | out | C[i], required from the bit below |
| `f_hi` | out | F[i+1], forecast to the bit above |

The cell equations are:

    F[i+1] = A[i]
    C[i]   = (A[i] != B[i]) ? C[i+1] : F[i]
    S[i]   = A[i] ^ B[i] ^ C[i]

How to read them:

* **A[i] != B[i] (propagate).** The bit can meet either value of C[i+1], but
  only if the bit below supplies the same carry. So C[i+1] is passed down
  unchanged. This pass-down is the reverse carry chain.
* **A[i] == B[i] == C[i+1].** The carry the bit above counted on is right
  whatever arrives from below. So the bit is free to ask for its lower
  neighbour's own forecast, F[i] = A[i-1]. The chain stops here.
* **A[i] == B[i] != C[i+1] (conflict).** The bit above counted on a carry
  that this bit cannot produce (A = B = 0), or counted on none when this bit
  must produce one (A = B = 1). The equation cannot hold. The cell behaves as
  in the previous case, so the result is off by +2^(i+1) or -2^(i+1).

The forecast F[i+1] = A[i] is always right when A[i] == B[i]. When the
operand bits differ it is a guess.

## The RCPA chain (`rcpa`) and the joining point

Bit i of the lower half is one RCPFA. Forecasts run upward; F[0] is tied to
0 in the hybrid adder. The top forecast F[K] = A[K-1] does two jobs:

* it is the carry into the exact Kogge-Stone part;
* it is fed back as C[K], the carry the top RCPFA must account for.

From C[K] the required carries ripple down through the propagating bits. The
longest path runs from F[K] through all K selections to S[0]. A run of
propagating bits stops at the first bit whose operand bits are equal. C[0]
is what the lowest bit would need from a carry-in the adder does not have,
and it is dropped.

Error model. Let the sum be read as the N+1-bit value `s`. Then

    s - (a + b) = C[0] + sum over conflict bits i of (+2^(i+1) if A[i]=B[i]=0,
                                                      -2^(i+1) if A[i]=B[i]=1)

Conflicts occur only in the lower K bits, so |s - (a + b)| < 2^(K+1). The
exact part always adds its operands exactly, plus the carry F[K].

Measured on 50,000 uniformly random operand pairs:

| configuration | inexact results | mean abs error |
|---------------|-----------------|----------------|
| N = 32, K = 16 | 93 % | about 7,656 (0.12 * 2^16) |
| N = 16, K = 8 | 76 % | about 30.5 (0.12 * 2^8) |

### Worked example (32-bit)

`a = 0xAAAAAAAA`, `b = 0x55555555`. All 16 low bits propagate. F[16] =
A[15] = 1, so the exact part computes 0xAAAA + 0x5555 + 1 = 0x10000. The
reverse chain passes C = 1 all the way down, so c = 0xFFFF and every low sum
bit is 0. The result is s = 0x1_0000_0000 (4294967296) against the exact
0xFFFFFFFF. Here f = 0xAAAA (the low half of `a`).

`a = 0xAAAAAAAA`, `b = 0xCCCCCCCC`. Every nibble reads G, P, P, K (MSB
first). The chain stops at each G and K. The result is c = 0x1110 and
f = 0xAAAA. The low half is 0x7776 and the sum 0x1_7777_7776 is exact.

## The exact part: Kogge-Stone adder (`ks_adder`)

The exact part has three stages:

1. `ks_preprocess`: p = a ^ b and g = a & b for each bit.
2. `ks_carry_tree`: log2(W) prefix levels. At level l, bit i combines its
   group with the group ending 2^l bits below it. The cell used depends on
   the result:
   * a **black cell** (`ks_black_cell`: G = Ghi | Phi&Glo, P = Phi&Plo) where
     the combined group still stops short of bit 0;
   * a **gray cell** (`ks_gray_cell`: G only) where the group reaches bit 0,
     so its G is a final carry;
   * a plain wire (a buffer in a schematic) for bits whose carry is already
     final.

   Before the tree, one extra gray cell merges the carry-in (the joint
   forecast) into bit 0. The carry-in therefore costs one cell delay and no
   extra level.
3. `ks_postprocess`: sum = p ^ carry-in of each bit.

For W = 16 this is 4 levels: 34 black cells and 15 gray cells, plus 1 gray cell for
the carry-in.

## Module hierarchy and parameters

```
rcpa_hybrid_adder  #(N = 32, K = N/2)   ports a, b, s[N:0], c[K-1:0], f[K-1:0]
├── rcpa           #(W = K)
│   └── rcpfa      x W
└── ks_adder       #(W = N-K)
    ├── ks_preprocess
    ├── ks_carry_tree ── ks_gray_cell, ks_black_cell
    └── ks_postprocess
```

The whole design is combinational. It has no clock, no reset and no
registers. Register the ports outside if a pipelined adder is wanted. `K`
can be set apart from `N` for other splits; both halves must be at least
1 bit wide. The `f` outputs equal `a[K-1:0]`. They are brought out, with `c`,
for observing the reverse chain.

## What is established and what is a design choice

Fixed by the design as published:

* the split into an exact upper half and an approximate lower half, N = 32
  and N = 16 with halves of n/2;
* a Kogge-Stone adder for the exact half, built from black and gray cells,
  with XOR sum generation;
* the RCPFA's four inputs and three outputs, and the reverse direction of
  its carry;
* the joint link C[K] = F[K];
* the port set `a, b, s, c, f`;
* the values of `c` and `f` for the two operand pairs above.

Choices made here:

* The RCPFA equations. They are the simplest cell that reproduces every
  published `c` and `f` value. Where the full-adder equation can be met,
  they meet it.
* The handling of the conflict case.
* F[0] = 0.
* Folding the carry-in into bit 0 of the prefix tree.
* Purely combinational timing.

The published work describes **three** RCPFA variants with different delay,
energy and accuracy, but it does not specify how they differ. Only the
variant above is provided. For the second operand pair, the published
output shows a sum 2^18 above the exact one. That bit lies in the exact
upper half. This RTL returns the exact sum there.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>`. The reference models shared by the
adder testbenches are in `tb/rcpa_ref_pkg.sv`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rcpa_hybrid_adder tb/rcpa_ref_pkg.sv tb/tb_rcpa_hybrid_adder.sv
./obj_dir/Vtb_rcpa_hybrid_adder
```

| testbench | covers |
|-----------|--------|
| `tb_rcpa_hybrid_adder` | 32-bit default build: the published operand pairs, directed corners and 50k random pairs. Each result gets a bit-exact reference check, an error-identity check and an error-bound check. Fails if any mechanism never occurs: joint carry 0/1, a full-length reverse chain, conflicts of both signs, C[0] = 1, exact and inexact results. |
| `tb_rcpa_hybrid_adder16` | the same checks for the 16-bit configuration |
| `tb_rcpa` | RCPA chain at 16 and 7 bits, including the published low-half values |
| `tb_rcpfa` | all 16 input combinations of the cell |
| `tb_ks_adder`, `tb_ks_carry_tree` | exact addition and every carry, at several widths |
| `tb_ks_preprocess`, `tb_ks_postprocess`, `tb_ks_black_cell`, `tb_ks_gray_cell` | the Kogge-Stone stages and cells |

Verilator's `-Wall` lint reports one unused-signal warning. It is for the
last level of the prefix tree's group-propagate array, which no cell reads.
