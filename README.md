# Masked pipelined circuits from HPC gadgets

Boolean masking protects a circuit against power and EM side channels. Each secret bit
`x` is split into `D` random shares whose XOR is `x`, and every gate is replaced by a
*gadget* that works on shares. In hardware, glitches can recombine shares inside
combinational logic. The HPC ("hardware private circuits") gadgets therefore put
registers in chosen places. These registers stop glitches, and they make a masked
non-linear circuit sequential: an AND gadget has a latency of one or two cycles.

This repository holds the building blocks of masked *pipelines*. A masked pipeline is a
chain of combinational stages separated by registers. It accepts one operation per
cycle and has no control logic. The repository contains:

* The gadget library: sharewise gates, pipeline registers, the HPC2 and HPC3 AND
  gadgets, their split "cross-domain" parts, and the optimised Toffoli gadgets HPC2o
  and HPC3o, which compute `w ^ (x & y)` with fewer registers.
* A field version of HPC3o, `hpc3o_gf_mult`, which computes `w + x * y` in GF(2^K) on
  shares that are K-bit field elements.
* An extended Toffoli gadget, `ext_toffoli`. It computes `(x & y) ^ w_0 ^ ... ^ w_{K-1}`
  and accepts each `w_k` in the pipeline stage where that operand becomes available.
* Six pipelines composed from those gadgets:
  * a 32-bit masked ripple-carry adder with latency 31;
  * a 32-bit masked Kogge-Stone adder with latency 6;
  * a minimum-latency 3-input AND;
  * a small example of sharing pipeline registers between split gadgets;
  * an extended Toffoli whose XOR operands arrive over four stages;
  * a GF(16) multiply-accumulate.
* An unrolled Trivium PRNG that supplies all gadget randomness, fresh every cycle.
* A top level, `compress_top`, that places the pipelines side by side on one PRNG.

All modules are parameterised by the number of shares `D` (default 2, i.e. first-order
security; any `D >= 2` elaborates). At `D = 3` and above, the top level also needs a
wider PRNG (`UNROLL`), because the Kogge-Stone adder alone then uses 1122 random bits
per cycle.

## Sharings, randomness and timing conventions

* A sharing is a `logic [D-1:0]`. Share `i` is bit `i`, and the value is the XOR of all
  bits. A word of `N` bits is `logic [N-1:0][D-1:0]`, bit `k` at `[k]`.
* In the field gadget, each share is a K-bit field element: `logic [D-1:0][K-1:0]`, with
  share `i` at `[i]` and the value the XOR of all shares.
* Gadgets that need one random bit per pair of shares (`r_ij = r_ji`) take a packed
  vector of `npairs(D) = D(D-1)/2` bits. The pair `{i, j}` with `i < j` is at index
  `masked_pkg::pair_idx(D, i, j)`, in row-major order. HPC3 and HPC3o need a second
  vector `rp` of the same size.
* Latency is counted in register layers. If an input has latency `L`, it is sampled in
  cycle `t` and the output is valid in cycle `t+L`. Gadget outputs are XORs of register
  outputs, so they are valid from the clock edge on and need no register after them.
* Randomness must be fresh in every cycle. A gadget samples its randomness together with
  its latency-2 input (HPC2 family) or with all its inputs (HPC3 family).
* No gadget or pipeline has a reset. Only `trivium_prng` has one, and so do the valid
  delay lines in the top.

| Gadget | Computes | Latency x / y / w | Random bits per cycle |
|---|---|---|---|
| `sw_gate` | `x op y` share by share (XOR, AND, XNOR) | 0 | 0 |
| `masked_reg` | delay by `LAT` cycles | `LAT` | 0 |
| `hpc2_and` | `x & y` | 1 / 2 / - | D(D-1)/2 |
| `hpc3_and` | `x & y` | 1 / 1 / - | D(D-1) |
| `hpc2o_toffoli` | `w ^ (x & y)` | 1 / 2 / 1 | D(D-1)/2 |
| `hpc3o_toffoli` | `w ^ (x & y)` | 1 / 1 / 1 | D(D-1) |
| `hpc3_cross`, `hpc2_cross` | cross-domain terms only | as HPC3 / HPC2 | as HPC3 / HPC2 |
| `hpc3_sep_and`, `hpc2_sep_and` | `x & y` from the parts | as HPC3 / HPC2 | as HPC3 / HPC2 |
| `hpc3o_gf_mult` | `w + x * y` in GF(2^K) | 1 / 1 / 1 | K·D(D-1) |
| `ext_toffoli` | `(x & y) ^ w_0 ^ ... ^ w_{K-1}` | set by `POS`, `OUT_LAT` | as HPC3o or HPC2o |

## How the AND gadgets work

Write `R()` for a register that stops glitches and is needed for security. Write `PR()`
for a register that only keeps the pipeline aligned. For every pair `i != j`, both HPC
gadgets compute a cross-domain term that masks `x_i & y_j` with a random `r_ij`. The
term `x_i & y_i` stays within share `i`.

**HPC2** (`hpc2_and`):
`p_ij = R(~x_i & PR(r_ij)) ^ R(x_i & R(y_j ^ r_ij))` and `p_ii = PR(x_i & PR(y_i))`.
The result is `z_i = XOR_j p_ij`. The operand `y` passes through two register layers and
`x` through one, which gives the asymmetric latency 2 / 1.

**HPC3** (`hpc3_and`):
`p_ij = R((~x_i & r_ij) ^ r'_ij) ^ (PR(x_i) & R(y_j ^ r_ij))` and `p_ii = PR(x_i & y_i)`.
Both inputs have latency 1, at the price of a second random bit per pair.

### Taking registers out of the gadgets (register de-duplication)

When two gadgets register the same sharing, or a gadget registers a value that the
pipeline also forwards, the flip-flops are duplicated. The split gadgets move those
registers out:

* `hpc3_cross` is HPC3 without the `p_ii` terms. It receives the delayed copy of `x`
  (`x_d`) from outside instead of holding `PR(x_i)` itself.
* `hpc3_sep_and` = `hpc3_cross` XOR sharewise-AND(`x_d`, `y_d`). Both delayed copies are
  inputs, and the inner-domain products are formed after the registers. For the same
  inputs and randomness, the output is bit-identical to `hpc3_and`, and the testbench
  checks this.
* `hpc2_cross` and `hpc2_sep_and` do the same for HPC2. The inner-domain product is
  formed at the output stage from `x` delayed once and `y` delayed twice.

In `compress_top`, the "sep" pipeline shows the effect:

* Two split HPC3 gadgets, computing `x&y` and `x&v`, share one register for `x`.
* A split HPC2 gadget then computes `(x&y)&v`. It reuses the registered copy of `v` that
  the second HPC3 gadget also uses.

### HPC2o and HPC3o: merging the inner-domain term

Instead of keeping `x_i & y_i` in a register of its own, the optimised gadgets add it
(and a share `w_i` of a third operand) into the cross-domain term of one partner share
`j_i`, with `j_0 = 1` and `j_i = 0` for `i > 0`. That term already involves share `i`, so
no new share combination appears. The gadget saves `D` registers and becomes a Toffoli
gate, `z = w ^ (x & y)`:

* `hpc2o_toffoli`:
  * for `j = j_i`: `p_ij = R(w_i ^ (x_i & PR(y_i)) ^ (~x_i & PR(r_ij))) ^ R(x_i & R(y_j ^ r_ij))`;
  * for the other `j`, the two registered terms are never both 1, so they are combined
    with an OR gate, which is cheaper than XOR.
* `hpc3o_toffoli`:
  * drops the inversion of `x_i`: `(x_i & r_ij) ^ r'_ij` still gives a correct gadget;
  * for `j = j_i`, it computes `w_i ^ (x_i & (y_i ^ r_ij)) ^ r'_ij`, which saves one AND
    gate as well.

With `w = 0` either gadget is a plain AND. These two gadgets are the ones the adder uses.

### HPC3o over larger fields (`hpc3o_gf_mult`)

HPC2 needs the inversion `~x_i`, which has no counterpart in a larger field. HPC3o has
no inversion, so it carries over to any field of characteristic 2 unchanged:
* every share, every `r_ij` and every `r'_ij` becomes a K-bit field element;
* every AND becomes a field product;
* XOR stays XOR, since it is field addition.

The `x_i * r_ij` terms still cancel inside each `p_ij`, so the output is a sharing of
`w + x * y`. Tower-field AES S-boxes need exactly such products in GF(4) and GF(16).

The field is given in polynomial basis by `K` and the reduction polynomial `POLY`
(default GF(16), `x^4 + x + 1`). A tower-field S-box often uses a normal basis. In that
case, convert the operands, or replace the `gmul` function in the module, which is
where the product is defined.

### Extended Toffoli (`ext_toffoli`)

A value such as `(x & y) ^ u ^ v` often has XOR operands that become ready in different
cycles. Forwarding them all to the AND gadget costs registers. `ext_toffoli` instead
carries the gadget's result forward and adds each operand where it is ready:

* The base gadget is HPC3o (`USE_HPC3O = 1`) or HPC2o (`USE_HPC3O = 0`).
* Operands with position 0 are XORed together (sharewise) and drive the gadget's `w`
  input.
* The gadget output passes through `OUT_LAT` masked registers. Position 1 adds an
  operand at the gadget's output stage. Position `p >= 2` adds it after register `p-1`.
  The last position is `OUT_LAT + 1`.
* `POS[4k +: 4]` holds the position of operand `k`, with up to 8 operands. Out-of-range
  settings stop elaboration.

Let `G` be the gadget's output stage: 1 for HPC3o and 2 for HPC2o. An operand at position
`p >= 1` is sampled `G + p - 1` cycles after `y`, and `z` is valid `G + OUT_LAT` cycles
after `y`. The default (HPC3o, `K = 3`, `OUT_LAT = 2`, `POS = 'h310`) is the one used in
the top level. It takes `w_0` with `x` and `y`, `w_1` one cycle later and `w_2` three
cycles later, and gives `z` after 3 cycles.

## The pipelines

### Minimum-latency AND3 (`and3_pipeline`)

`a & b & c` has AND depth 2, so latency 2 is the least possible. An HPC3 gadget computes
`a & b` in one cycle. That result feeds the latency-1 input `x` of an HPC2 gadget, while
`c` goes directly to the HPC2 gadget's latency-2 input `y`. The pipeline needs no extra
register and uses 3 random bits per cycle at `D = 2`. The alternatives cost more:

* HPC3 only: a second HPC3 gadget needs 2 random bits instead of 1, and `c` needs a
  pipeline register.
* HPC2 only: latency 3.

### 32-bit masked ripple-carry adder (`masked_rc_adder`)

Each carry costs exactly one AND, through the majority form:

```
c_1     = a_0 & b_0
c_{k+1} = b_k ^ ((a_k ^ b_k) & (c_k ^ b_k))
s_k     = a_k ^ b_k ^ c_k
```

The carry chain sets the latency at `N-1 = 31`.

* `c_1` uses an HPC3o gadget (`w = 0`), because both of its operands are available at
  stage 0.
* Every later carry uses an HPC2o Toffoli gadget:
  * `x = c_k ^ b_k` and `w = b_k` lie on the carry path and go to the latency-1 inputs;
  * the propagate bit `p_k = a_k ^ b_k` does not depend on the carry, so it is forwarded
    only to stage `k-1` and enters at the latency-2 input `y`.

This needs `hpc3_rnd(D) + (N-2) * hpc2_rnd(D)` random bits per cycle: 32 at `D = 2` and
96 at `D = 3`.

Setting `LOW_RND = 1` computes `c_1` with an HPC2o gadget as well. It takes `b_0` at
stage 0 and `a_0` one cycle later. This saves one gadget's worth of randomness (31 bits at
`D = 2`, 93 at `D = 3`), but the whole chain shifts by one stage and the latency becomes
`N = 32`.

Pipeline registers (`masked_reg`) bring `b_k` and `p_k` to the stage where they are used.
They also forward each sum bit `s_k` from stage `k` to the output stage. The placement is
simple and is **not** area-optimised. Choosing in which stage each value is computed, and
whether to recompute a cheap value rather than register it, reduces the register count
considerably. This repository does not do that optimisation.

### 32-bit masked Kogge-Stone adder (`masked_ks_adder`)

The ripple-carry adder is small but slow. A parallel-prefix adder computes the carries in
a tree of `L = clog2(N-1)` levels (5 for 32 bits):

```
p_i     = a_i ^ b_i,   g_i = a_i & b_i                       (bit level)
G^l_i   = G^(l-1)_i ^ (P^(l-1)_i & G^(l-1)_(i-s))            (s = 2^(l-1), i >= s)
P^l_i   = P^(l-1)_i & P^(l-1)_(i-s)                          (only where a later level needs it)
s_i     = p_i ^ G^L_(i-1)
```

The masking follows the same idea as in the ripple-carry adder:

* Each group generate `G^l_i` is an AND whose result is XORed into `G^(l-1)_i`. This is
  exactly an HPC2o Toffoli gadget.
* The two generate operands lie on the critical path. They go to the latency-1 inputs
  `x` and `w`.
* The propagate tree does not depend on the generates. It uses HPC3 gadgets (latency 1)
  and so runs one stage ahead of the generate tree. Its output meets the generate
  gadget's latency-2 input `y` in time.
* The bit generates `g_i` are HPC3 gadgets.

Stage by stage: `g` is ready at stage 1, `P^l` at stage `l`, `G^l` at stage `l+1`. The
sum is therefore ready at stage `L+1 = 6`. Groups already complete at a level (`i < s`)
and the `p_i` used by the final XOR travel through pipeline registers.

| 32-bit adder | Latency | HPC3 | HPC2o | Random bits, D=2 / D=3 |
|---|---|---|---|---|
| ripple-carry | 31 | 0 (+1 HPC3o) | 30 | 32 / 96 |
| ripple-carry, `LOW_RND` | 32 | 0 | 31 | 31 / 93 |
| Kogge-Stone | 6 | 125 | 124 | 374 / 1122 |

The randomness layout and counts are computed by the `ks_*` functions in `masked_pkg`.
A solver-scheduled design with the same gadget counts is reported to reach latency 5.
The schedule here is the straightforward one and takes one more cycle.

### Randomness: `trivium_prng`

The PRNG runs `UNROLL` (default 512) Trivium rounds per cycle and outputs the `UNROLL`
keystream bits of that cycle:

* `seed` loads an 80-bit key and IV.
* After `ceil(1152 / UNROLL)` warm-up cycles, `ready` rises and `rnd` changes every
  cycle.

Because the warm-up is rounded up to whole cycles (1536 rounds at the default), the
stream is a Trivium keystream taken at a different offset from the standard one. It
suits the purpose here, a wide source of fresh bits, but it is not a conformant Trivium
implementation. `compress_top` slices the PRNG bus in a fixed order: ripple-carry
adder, AND3, sep, Toffoli, Kogge-Stone adder, GF(16). At `D = 2` it uses 424 of the 512
bits. At
`D = 3` the pipelines need more than 512 bits, so `UNROLL` must be raised as well. Synthesis removes the logic behind the unused
bits. The top refuses to elaborate if a larger `D` needs more bits than `UNROLL`.

## Top level: `compress_top`

Parameters: `D = 2`, `N = 32`, `UNROLL = 512`.

1. Reset with `rst_n` low.
2. Pulse `seed` with `key`/`iv`.
3. Wait for `prng_ready`. An assertion flags any operation issued before it.
4. Each pipeline then takes operations through `*_valid_i` and its operand sharings.

`*_valid_o` marks the cycle of each result:

| Pipeline | Result | Cycles after issue |
|---|---|---|
| adder | sum (ripple-carry) | 31 |
| ks | sum (Kogge-Stone) | 6 |
| and3 | `a & b & c` | 2 |
| sep | `x&y&v` and `x&v` | 2 |
| gfm | `w + x * y` in GF(16) | 1 |
| tof | `(x&y) ^ w0 ^ w1 ^ w2` | 3 (`tof_w[1]` is due 1 cycle after issue, `tof_w[2]` 3 cycles after) |

The valid delay lines are bookkeeping for the user. The data path does not use them.

## Files

* `rtl/masked_pkg.sv`: share and randomness helpers (`npairs`, `pair_idx`, `merge_idx`,
  `hpc2_rnd`, `hpc3_rnd`) and the sharewise operation enum.
* `rtl/`: one module per file, named as above, plus `valid_pipe.sv`.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

Each testbench is a top of its own. For example:

```
verilator --binary --timing --assert -Irtl rtl/masked_pkg.sv tb/tb_compress_top.sv \
          --top-module tb_compress_top -Mdir obj_top
./obj_top/Vtb_compress_top
```

To run another test, swap in another `tb/tb_*.sv` file and its module name. Every
testbench finishes in well under a second.

What the testbenches check:

* **Gadgets** run at 3 shares with a new random operation every cycle. Operations
  overlap as they do in a pipeline, and outputs are sampled while the next operation's
  inputs are applied. Each test checks:
  * the unmasked result;
  * that share 0 alone does not reveal it;
  * that the split gadgets give exactly the same shares as the monolithic ones.
* **Adders**: include full-length carry chains. Second instances with 3 shares add the
  same operands. The Kogge-Stone test also runs a 9-bit instance (3 levels) and checks
  the randomness widths.
* **Field gadget**: GF(16) with 3 shares, and GF(4) and GF(256) with 2 shares, against
  a reference that multiplies and reduces in a different way.
* **Extended Toffoli**: two configurations (HPC3o and HPC2o bases, different operand
  positions), with late operands driven in the cycle they are due.
* **PRNG**: compared with a bit-serial Trivium model.
* **`tb_compress_top`**: runs all pipelines at the default parameters, with a mid-stream
  re-seed and idle gaps. It checks every result and its cycle.

The tests check function and timing only. Glitch-robust probing security cannot be
checked by simulation. The gadget equations follow the published HPC2, HPC3, HPC2o and
HPC3o algorithms, but this RTL has not been formally verified. The gadgets rely on
synthesis keeping their structure, as all masked RTL does: do not let the synthesis tool
retime registers across gadgets or share logic between them.

## Departures and limits

* **Register placement.** No scheduling optimiser is included. In `ext_toffoli` the
  operand stages and chain length are fixed parameters rather than chosen by an optimiser. The adder's pipeline
  registers are placed by hand, so its area is above what an optimised schedule would
  give. Latency and randomness per cycle match the minimum-latency design: 31 cycles, and
  32 bits at first order.
* **Adder structures.** Ripple-carry and Kogge-Stone are built. The Kogge-Stone adder
  takes 6 cycles; a tighter schedule with the same randomness is known to reach 5. The
  Sklansky and Brent-Kung prefix adders are not included.
* **Other pipelines.** No masked AES or Skinny S-box pipeline is included, and no AES
  cipher architecture, because their gate-level circuits are not part of this design.
  The gadgets those S-boxes need (HPC2o, HPC3o, its field version, pipeline registers)
  are here.
* **Fields.** HPC3o exists for GF(2) and, as `hpc3o_gf_mult`, for GF(2^K) in polynomial
  basis. The HPC1 multiplier, the other common gadget for field products, is not
  included.
* **Split-gadget register timing.** Two placements in the split gadgets are this
  design's reading:
  * `hpc3_cross` receives `x` delayed by one cycle from an outside register.
  * The inner-domain products of the split gadgets are formed after the outside
    registers.
* **Integration choices.** The PRNG seeding, warm-up and ready handshake are this
  design's choice, as are the valid delay lines and the reset in the top.
