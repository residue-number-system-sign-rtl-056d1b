# Sign detection in RNS {2^2n, 2^n-1, 2^n+1, 2^(n+1)-1} by dynamic-range partitioning

In a residue number system (RNS) a number X is held only as its remainders
modulo a set of coprime moduli. Addition and multiplication are then
carry-free across channels, but the sign of a number is hard to find: in the
usual signed RNS the lower half of the dynamic range M is positive and the
upper half negative, so finding the sign means comparing X with M/2, which
needs (partial) reverse conversion of all residues.

This design uses a different assignment of signs to the range. For the
four-moduli set

| modulus | value        | residue | width |
|---------|--------------|---------|-------|
| m1      | 2^2n         | x1      | 2n    |
| m2      | 2^n - 1      | x2      | n     |
| m3      | 2^n + 1      | x3      | n+1   |
| m4      | 2^(n+1) - 1  | x4      | n+1   |

the range M = m1 m2 m3 m4 is cut into m4 blocks of S = m1 m2 m3 = 2^2n (2^2n - 1)
values each. Within every block the lower half is positive and the upper half
negative. Writing X = Rx * S + Qx with 0 <= Qx < S, the sign depends only on
Qx:

    sign = 1 (negative)  when  Qx >= S/2
    sign = 0 (positive)  when  Qx <  S/2

Qx = X mod S is the reverse conversion of x1, x2, x3 alone. The fourth residue
x4 only decides the block number Rx, which the sign does not need, so the
detector has no x4 input and no modulo 2^(n+1) - 1 arithmetic at all.

S is even because m1 is, so each block splits into two equal halves of
S/2 = 2^(4n-1) - 2^(2n-1) values.

## Interface and timing

`rns_sign_detector #(N)` (N = n, default 4, at least 2):

| port   | dir | width | meaning                                      |
|--------|-----|-------|----------------------------------------------|
| `x1`   | in  | 2N    | X mod 2^2n                                   |
| `x2`   | in  | N     | X mod 2^n - 1 (0 .. 2^n - 2)                 |
| `x3`   | in  | N+1   | X mod 2^n + 1 (0 .. 2^n)                     |
| `qx`   | out | 4N    | Qx = X mod S, 0 .. S-1                       |
| `sign` | out | 1     | 1 = negative                                 |

The detector is purely combinational. It has no clock, reset, register or
handshake, and the outputs settle one logic delay after the inputs. To
pipeline it, register `f`/`g` between the Px and Qx stages, or `qx` before the
sign unit.

The design does not fix how a signed integer is mapped onto a block and an
offset. The rule above only says which codes are negative. As an illustration,
at n = 2 (S = 240, M = 1680) the value -300 is held as X = 660 = 2 * 240 + 180.
Its Qx = 180 is at least 120, so it is negative. An encoder from two's
complement to this representation, and addition under it, are outside this
RTL.

## Datapath

```
 x2 ─┐   ┌────────────┐ f ┌─────────┐   ┌───────────┐ Z  ┌──────────┐
 x3 ─┴──►│ rns_px_gen │──►│ csa_eac │──►│ mod_adder │───►│ {Z, x1}  │──► qx ──► rns_sign_unit ──► sign
         │  (n MFAs)  │ g │ (2n bit)│   │ mod 2^2n-1│    └──────────┘
         └────────────┘──►│         │   └───────────┘         ▲
 x1 ──────────── ~x1 ────►│         │                          │
 x1 ───────────────────────────────────────────────────────────┘
```

### 1. Px: the pair (2^n-1, 2^n+1) as one residue modulo 2^2n-1

`rns_px_gen` is the least obvious part. Since (2^n-1)(2^n+1) = 2^2n-1, the CRT
on the two residues gives Px = X mod (2^2n - 1):

    Px = | 2^(n-1)(2^n+1) x2 + 2^(n-1)(2^n-1) x3 |   mod 2^2n-1

Here 2^(n-1) is the inverse of each modulus modulo the other. Expanding gives
K1 = 2^(2n-1) x2 + 2^(n-1) x2 and K2 = 2^(2n-1) x3 - 2^(n-1) x3. Modulo 2^2n-1,
multiplying by 2^k is a k-bit rotation of a 2n-bit word and negating is a bit
inversion. So each term is a rewired copy of an input:

| vector | bits, MSB first                               | meaning                   |
|--------|-----------------------------------------------|---------------------------|
| A      | `x2[0], 0 x n, x2[n-1:1]`                     | 2^(2n-1) x2 (rotate right 1) |
| B      | `0, x2[n-1:0], 0 x (n-1)`                     | 2^(n-1) x2                |
| K3     | `x3[0], ~x3[n-1:0] & ~x3[n], x3[n-1:1]`       | K2 without its constant   |
| L      | `1, 0 x n, 1 x (n-1)`                         | 2^(2n-1) + 2^(n-1) - 1    |

K1 = A + B, and K2 = K3 + L in both cases of x3:

- For x3 < 2^n (x3[n] = 0), the ones that the complement brings in, together
  with the wrapped bit, add up to the constant L.
- For x3 = 2^n (x3[n] = 1, all other bits 0), K2 equals L by itself. The
  `& ~x3[n]` gating forces K3 to zero in that case.

This turns the two-case formula into one four-vector sum.

No column of A + B + K3 + L has more than three ones, and one of the three is
always a constant 1 from L. So n **modified full adders** (`rns_mfa`) reduce
the sum to two vectors. MFA i holds two cells:

- **MHA1** adds `x2[i] + x3[i] + 1`: sum = XNOR, carry = OR. It sits in column
  i-1, or in column 2n-1 for i = 0.
- **MHA2** adds `x2[i] + (~x3[i] & ~x3[n])`: an ordinary half adder in column
  n-1+i.

The sum bits form `f`. The carry bits, moved up one column, form `g`. The
carry out of column 2n-1 weighs 2^2n ≡ 1 and is wired to `g[0]`, an end-around
carry. Then f + g ≡ X (mod 2^2n - 1). f + g may equal 2^2n - 1, the second code
of zero, and the next stage accepts that.

### 2. Qx: one CRT-II step with a free multiplication

Combining (Px, x1) over (2^2n - 1, 2^2n), where 2^2n ≡ 1 modulo 2^2n - 1, gives

    Qx = x1 + 2^2n * Z,    Z = | f + g - x1 |  mod 2^2n-1,   -x1 ≡ ~x1

`rns_qx_gen` builds this from three parts:

- `csa_eac`, a 2n-bit carry-save adder whose top carry wraps to bit 0. It
  reduces f, g and ~x1 to two vectors.
- `mod_adder`, which adds those two modulo 2^2n - 1.
- A concatenation `qx = {Z, x1}`: multiplying by 2^2n needs no hardware.

The modular adder must return Z in 0 .. 2^2n - 2. The code Z = 2^2n - 1 would
put Qx at or above S. So after its end-around carry it folds all ones to zero.

### 3. Sign

`rns_sign_unit` implements Qx >= S/2 exactly. S/2 is a 0 followed by ones in
bits 4n-2 .. 2n-1 and zeros below, so the comparison reduces to

    sign = qx[4n-1] | &qx[4n-2 : 2n-1]

The top bit of Qx alone is not enough. The 2^(2n-1) codes in
[S/2, 2^(4n-1)) are negative but have qx[4n-1] = 0: 128 of the 65280 codes
at n = 4.

## Worked example (n = 2)

The moduli are 16, 3, 5, 7, so S = 240. X = 660 has residues x1 = 4 = 0100,
x2 = 0 and x3 = 0.

| step           | value                                            |
|----------------|--------------------------------------------------|
| Px generator   | f = 1111, g = 0000                               |
| CSA inputs     | f, g and ~x1 = 1011                              |
| CSA outputs    | sum = 0100, carry = 0111                         |
| modular adder  | Z = 1011 = 11                                    |
| concatenation  | Qx = 1011_0100 = 180                             |
| sign           | 180 >= 120, so negative                          |

`tb_rns_px_gen`, `tb_rns_qx_gen` and `tb_rns_workloads` check these values.

## Sizes

The method was evaluated at n = 4, 8, 10, 12, 16 and 20. The RTL default is
n = 4, and every module takes any n >= 2 through `N`.

| n  | x1+x2+x3 bits | Qx bits | dynamic range M       |
|----|---------------|---------|-----------------------|
| 4  | 17            | 16      | ~2^21                 |
| 8  | 33            | 32      | ~2^41                 |
| 10 | 41            | 40      | ~2^51                 |
| 12 | 49            | 48      | ~2^61                 |
| 16 | 65            | 64      | ~2^81                 |
| 20 | 81            | 80      | ~2^101                |

The logic consists of n MFAs, one 2n-bit CSA row, one 2n-bit end-around
adder, and a 2n-input AND with a 2-input OR for the sign. The modular adder is
the only carry-propagate adder, so it sets the critical path.

## Files

| file                    | contents                                              |
|-------------------------|-------------------------------------------------------|
| `rtl/rns_sd_pkg.sv`     | default n (`N_DEFAULT`)                               |
| `rtl/rns_mfa.sv`        | modified full adder (MHA1 + MHA2)                     |
| `rtl/rns_px_gen.sv`     | n MFAs and bit rewiring, gives f, g                   |
| `rtl/csa_eac.sv`        | carry-save adder with end-around carry                |
| `rtl/mod_adder.sv`      | canonical modulo 2^W - 1 adder                        |
| `rtl/rns_qx_gen.sv`     | Z and Qx = {Z, x1}                                    |
| `rtl/rns_sign_unit.sv`  | Qx >= S/2                                             |
| `rtl/rns_sign_detector.sv` | top level                                          |
| `tb/tb_rns_ref_pkg.sv`  | integer reference model (residues, Qx, sign)          |
| `tb/tb_*.sv`            | one self-checking testbench per module, plus `tb_rns_workloads` (with helper `tb_rns_sd_size`) |

## Verification

Each testbench compares against plain integer arithmetic (`%`, `>=` on up to
128-bit values). None of them uses the rotations or constants of the design.
Each prints `TB_RESULT checks=N failures=M`.

- `tb_rns_mfa` checks all 8 input patterns.
- `tb_mod_adder` checks all operand pairs at W = 8, plus random pairs at W = 40.
- `tb_csa_eac` uses random operands at W = 8 and W = 40.
- `tb_rns_px_gen` is exhaustive over X mod (2^2n - 1) at n = 2, 4 and 8,
  including x3 = 2^n and the second zero code x2 = 2^n - 1.
- `tb_rns_qx_gen` uses random f, g, x1 and the zero-fold corners at n = 4,
  plus the worked example with its CSA outputs.
- `tb_rns_sign_unit` checks every Qx at n = 4 and n = 2.
- `tb_rns_sign_detector` runs at the default size. It visits every Qx in
  [0, S), each in a random block of the range. It also counts how often each
  mechanism fired and fails if one never did:
  - the x3 = 2^n case
  - the end-around carries of the MFA array, the CSA and the modular adder
  - the zero fold
  - positive and negative results
  - negatives whose Qx top bit is 0
- `tb_rns_workloads` runs n = 2, 4, 8, 10, 12, 16 and 20 side by side. It
  applies random X over the whole range M and the block-edge values
  Q = 0, S/2-1, S/2, 2^(4n-1)-1, 2^(4n-1) and S-1. At n = 2 it replays the
  example.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rns_sd_pkg.sv tb/tb_rns_ref_pkg.sv tb/tb_rns_sign_detector.sv \
    --top-module tb_rns_sign_detector -o sim && obj_dir/sim
```

Replace the testbench file and top name for the others. Every testbench
finishes in well under a second.

## Choices made in this implementation

- **Exact sign rule.** The sign unit implements Qx >= S/2 rather than only
  the top bit of Qx, which misclassifies 2^(2n-1) codes per block (see above).
- **Column wiring.** The bit layout of A, B, K3 and L, and where each MHA sits,
  are derived from the Px equation.
- **Gate-level cells.** MHA1 is taken as XNOR/OR and MHA2 as a half adder on
  the gated complement. The CSA is a plain full-adder row. The modular adder
  is one adder with end-around carry and an all-ones fold. Any adder with the
  same modular function can replace them.
- **f and g.** `f` is the sum vector and `g` the carry vector. Since only
  f + g is used, swapping the names changes nothing.
- **CSA values in the example.** The example's CSA outputs are sum = 0100,
  carry = 0111, adding to 11 (mod 15). The published walk-through of this
  example lists (1011, 0100) for this step. That pair adds to 0 (mod 15) and
  cannot give Z = 11. The final Z = 1011 and Qx = 180 agree with it.
- **No clock.** There are no registers, matching a purely combinational
  critical-path evaluation.
- **Default n = 4.** This is the smallest evaluated size, chosen because it
  can be simulated exhaustively. The other published sizes need `N` set and
  are simulated by `tb_rns_workloads`.
- **Input validity.** x2 = 2^n - 1 (the second zero code) is handled correctly
  because the math is linear. Values of x3 above 2^n are not valid residues
  and give undefined results.
