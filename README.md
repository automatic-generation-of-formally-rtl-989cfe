# Masked GF(2^m) multiplier (Generalized Masking Scheme, order d)

This is a multiplier over the binary field GF(2^m) that never handles its
operands in the clear. Each operand is split into random **shares** whose XOR
is the real value. The circuit computes shares of the product. The share
construction follows the Generalized Masking Scheme (GMS), a generalisation of
threshold implementations. A d-th order instance is meant to resist
differential power analysis up to order d, including leakage caused by
glitches. It gets this from its structure at register-transfer level, not from
a special layout or cell library.

The default configuration is fifth order (d = 5) over GF(2^256). Every size is
a parameter: `M` (extension degree), `D` (masking order) and `IP` (irreducible
polynomial).

## Shares and share counts

A value `a` in GF(2^m) is carried as `a = a_0 + a_1 + ... + a_{s-1}`, where
`+` is bitwise XOR. Multiplication has algebraic degree 2, so a d-th order
masking needs

* `s = 2d + 1` input shares per operand, and
* `s' = C(s,2) = d(2d + 1)` intermediate output shares, which are compressed
  back to `s` shares at the output.

| d | s (shares per operand) | s' (fresh masks, registers) | sub-multipliers s^2 | input bits for m = 256 |
|---|---|---|---|---|
| 1 | 3  | 3  | 9   | 256 x 9  |
| 2 | 5  | 10 | 25  | 256 x 20 |
| 3 | 7  | 21 | 49  | 256 x 35 |
| 4 | 9  | 36 | 81  | 256 x 54 |
| 5 | 11 | 55 | 121 | 256 x 77 |

The input bits are the `2s` operand shares plus the `s'` fresh masks.

## The security properties the structure provides

* **Correctness.** The XOR of the output shares equals `a*b`.
* **d-th order noncompleteness.** Any `d` of the registered intermediate
  shares are, together, independent of at least one share index. An attacker
  who combines d probes therefore still misses one share of each operand.
* **Uniformity.** Fresh masks re-randomise the intermediate shares, so that
  their distribution does not depend on the secret.

The RTL builds these properties in by construction. The testbenches check
correctness and the dependence structure by simulation. No formal proof or
leakage measurement is part of this package.

## Datapath

```
 a_sh[s] --+
           +--> N: s^2 multipliers --> L: s' XOR sums --> R: + masks --> [reg] --> C: s XOR sums --> c_sh[s]
 b_sh[s] --+     p_ij = a_i b_j        l_k (2 indices)     r_k             r_q        c_i
                                                           ^
 z[s'] ----------------------------------------------------+
```

| Layer | Module | What it computes |
|---|---|---|
| N, nonlinear | `gms_nonlinear_layer` | `p[i][j] = a_i * b_j` for all i, j: s^2 Mastrovito multipliers |
| L, linear | `gms_linear_layer` | `s'` XOR sums `l_k`, each over the products of only two share indices |
| R, refreshing | `gms_refresh_layer` | `r_k = l_k + z_{(k+1) mod s'} + z_{(k+2) mod s'}` |
| register | `gms_share_reg` | stores all `r_k`: the glitch barrier |
| C, compression | `gms_compression_layer` | `c_i = r_{i*d} + ... + r_{i*d+d-1}` |

### Linear layer: the noncomplete grouping

This layer decides the security of the whole design. The `s^2` products are
grouped so that every output `l_k` uses one cross pair of share indices
`{x, y}`:

* `L1(x,y) = a_x b_y + a_y b_x`, and
* for `s` of the outputs, `L0(x,y) = a_x b_y + a_y b_x + a_x b_x`, which also
  takes one diagonal product.

There are exactly `C(s,2) = s'` cross pairs, so each pair is used once. Each
diagonal `a_x b_x` lands in exactly one `L0` adder. Every `l_k` therefore
depends on exactly two share indices of `a` and two of `b`. Any `d` outputs
reach at most `2d < s` indices.

The adders are produced in this order, with t counting from 0:

1. for `i = 1 .. s-2`: `L0(i,0)`, then `L1(i,j)` for `j = 1 .. i-1`;
2. `L0(0,s-1)`, then `L0(s-1,1)`;
3. `L1(s-1,j)` for `j = 2 .. s-2`.

Adder `t` drives `l_{s'-1-t}`. This reversed numbering gives the usual
first-order equations. The function `gms_pkg::l_term(d, k)` evaluates the
grouping at elaboration time.

d = 1:

| output | indices | sum |
|---|---|---|
| l_0 | 2,1 | a2b1 + a1b2 + a2b2 |
| l_1 | 0,2 | a0b2 + a2b0 + a0b0 |
| l_2 | 1,0 | a1b0 + a0b1 + a1b1 |

d = 2 (s = 5, s' = 10):

| output | indices | sum |
|---|---|---|
| l_0 | 4,3 | a4b3 + a3b4 |
| l_1 | 4,2 | a4b2 + a2b4 |
| l_2 | 4,1 | a4b1 + a1b4 + a4b4 |
| l_3 | 0,4 | a0b4 + a4b0 + a0b0 |
| l_4 | 3,2 | a3b2 + a2b3 |
| l_5 | 3,1 | a3b1 + a1b3 |
| l_6 | 3,0 | a3b0 + a0b3 + a3b3 |
| l_7 | 2,1 | a2b1 + a1b2 |
| l_8 | 2,0 | a2b0 + a0b2 + a2b2 |
| l_9 | 1,0 | a1b0 + a0b1 + a1b1 |

The numbering of the `l_k` has no effect on correctness or noncompleteness. It
only decides which outputs the compression layer adds together. That happens
after the register, so it is harmless.

### Refresh ring

A multiplier with two inputs has no sharing that is uniform on its own, so
fresh masks are always added, even for d = 1. Each mask `z_q` enters exactly
two outputs, `r_{q-1}` and `r_{q-2}`, so all masks cancel in the total. A
consequence to keep in mind: masks must be independent and fresh for every
multiplication. Inverting all masks together, for example, leaves every
`r_k` unchanged.

### Register and compression

Combinational logic glitches, and a glitch can briefly combine any signals in
its fan-in cone. The register after R makes sure that only the noncomplete
`r_k` reach the compression adders. Compression then sums `d` consecutive
registered shares. For d = 1, `s' = s` and the layer is just wiring.

If you synthesise this design, keep the hierarchy, or at least the register
boundary. Synthesis must not move XORs of the L, R or C layers across the
register or merge them between shares.

## Sub-multiplier: Mastrovito

Each `a_i * b_j` is an ordinary bit-parallel Mastrovito multiplier:

* `mastrovito_matrix_gen` forms the matrix columns `g_i = a * beta^i` by
  repeated multiplication by beta. Each step is a one-bit left shift, plus an
  XOR of the low terms of `IP` when the bit shifted out is 1.
* `mastrovito_matrix_op` computes `c = XOR_i (g_i AND b_i)`.

Any other GF(2^m) multiplier with the same ports could replace it. The masking
does not depend on how the sub-multiplier works inside.

## Interface and timing (`gms_mult`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_ni` | in | 1 | asynchronous, active-low reset; clears the share register and `out_valid` |
| `in_valid` | in | 1 | inputs are valid this cycle |
| `a_sh` | in | `[S-1:0][M-1:0]` | shares of a |
| `b_sh` | in | `[S-1:0][M-1:0]` | shares of b |
| `z` | in | `[SP-1:0][M-1:0]` | fresh uniformly random masks |
| `out_valid` | out | 1 | `in_valid` delayed by one cycle |
| `c_sh` | out | `[S-1:0][M-1:0]` | shares of c = a*b |

`S = 2D+1` and `SP = D(2D+1)` are derived local parameters. The latency is one
clock, and a new multiplication can start every cycle. The valid flag is only
carried along; nothing stalls. Field elements are packed so that bit `i` is the
coefficient of `beta^i`.

Parameters:

* `M` (default 256): the extension degree.
* `D` (default 5): the masking order, from 1 to 5. `gms_pkg::l_term` supports
  up to s = 255.
* `IP`: the irreducible polynomial without its `x^M` term. The default comes
  from `gms_pkg::default_ip(M)`:

| M | polynomial |
|---|---|
| 2 | x^2+x+1 |
| 4 | x^4+x+1 |
| 8 | x^8+x^4+x^3+x+1 |
| 16 | x^16+x^5+x^3+x+1 |
| 32 | x^32+x^7+x^3+x^2+1 |
| 64 | x^64+x^4+x^3+x+1 |
| 128 | x^128+x^7+x^2+x+1 |
| 256 | x^256+x^10+x^5+x^2+1 |

For any other `M` you must pass `IP` explicitly, for example for the elliptic
curve fields m = 233 or 283. `IP` must be irreducible; nothing checks that.
The GF(2^128) polynomial is the one used by GCM. GCM's reflected bit order is
not applied.

Size at the defaults:

* 121 multipliers of 256 x 256 bits: about 7.9 M two-input ANDs and as many
  XORs.
* 55 x 256 + 1 = 14,081 flip-flops.

## Where the design makes its own choices

The layer structure, the share counts, the adder grouping of the linear layer,
the ring refresh, the register position and the compression formula follow
the GMS construction described above. The following are this design's own
choices:

* The clocking, reset and valid flag.
* The default irreducible polynomials.
* The Mastrovito multiplier as the sub-multiplier.
* The numbering of the linear-layer outputs. It is reconstructed so that
  d = 1 gives the equations shown above.

No random number generator is included. The masks are a port, and they must
come from a good source, such as a TRNG-seeded PRNG, at `s' * M` bits per
multiplication.

The tool flow that derives such multipliers from a specification and proves
them correct is software. It is not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=F`.

| Testbench | What it checks |
|---|---|
| `tb_mastrovito_mult` | Exhaustive GF(2^2) and GF(2^8) (AES: 0x57*0x83 = 0xc1), random GF(2^256), against a reference that reduces the full carry-less product (`gf_ref_pkg`) |
| `tb_mastrovito_matrix_gen` | `g_i = a * x^i` for all columns |
| `tb_mastrovito_matrix_op` | Each output bit equals the parity of the matrix row masked by b |
| `tb_gms_nonlinear_layer` | Every `p[i][j]` for d = 1 (GF(2^8)) and d = 2 (GF(2^16)) |
| `tb_gms_linear_layer` | The exact d = 1 equations, plus for d = 1..5 (helper `tb_linear_dep_check`): sum preserved, each output depends on exactly two indices (same for a and b), each index pair used once |
| `tb_gms_refresh_layer` | Ring formula, masks cancel in the sum, each mask reaches exactly two outputs |
| `tb_gms_share_reg` | Reset, one-cycle delay, valid |
| `tb_gms_compression_layer` | d = 1 wiring, d = 2 pair sums, sum preserved |
| `tb_gms_mult` | End to end: d = 1..5 over GF(2^8), d = 2 over GF(2^16), d = 1 over GF(2^128). Checks the product after unmasking and the one-cycle latency. Inputs are changed right after each clock edge, so a missing register is caught. For d = 1 it also checks each output share against its equation. It also runs the refresh experiment: same shares with new masks must give different shares with the same product. It requires back-to-back results, idle cycles, refresh and d > 1 compression to each occur. |
| `tb_gms_mult_full` | The default size (d = 5, GF(2^256)): 20 back-to-back multiplications, latency, refresh |

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/gms_pkg.sv tb/gf_ref_pkg.sv tb/tb_gms_mult.sv --top-module tb_gms_mult
./obj_dir/Vtb_gms_mult
```

To build a different configuration, override the parameters of `gms_mult`,
for example `gms_mult #(.M(128), .D(2)) u (...)`.

The full-size model builds in about 20 seconds and simulates in well under a
second. Logic synthesis of the full-size design is large: about 16 M gates
before optimisation.
