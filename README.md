# Montgomery modular multiplier with one carry-save adder level

This is a sequential hardware multiplier that computes

    P = A · B · 2^-(K+2)  mod N

for a K-bit odd modulus N. That product is the core operation of RSA and
Diffie–Hellman. Those schemes run long chains of modular multiplications,
so operands are kept in Montgomery form (x·R mod N, here R = 2^(K+2)). That
way no multiplication ever has to divide by N.

The circuit handles one bit of A per clock. Its main feature is that one
clock is only one carry-save adder level. The running sum is never turned
into an ordinary binary number inside the loop, so no carry ripples along
the word, and the clock period does not depend on K. Three measures make
this work:

1. **Carry-save accumulator.** The partial sum S is held as two vectors, SS
   (sum) and SC (carry), with S = SS + SC.
2. **One addend per iteration.** Montgomery's step adds `A_i·B + q_i·N`.
   That is normally two additions. Here a multiplexer picks one of
   0, N, B or the precomputed D = B + N, so each iteration adds three vectors
   (SS, SC and that one), which is exactly one level of full adders.
3. **Deferred halving.** Each iteration ends by dividing by two. Instead of
   shifting at the adder output (on the critical path), the registers store
   the unshifted sum. The multiplexers in front of the adder apply the right
   shift on the next clock.

The same adder also builds D = B + N before the loop. After the loop it
turns the carry-save result back into binary. In both cases it repeats
`(SS, SC) ← SS + SC + 0` until SC is zero. For these passes the adder is
configured as two half adders in series per bit, so each clock moves carries
two places instead of one. A final conditional subtraction of N brings the
result into [0, N).

## Datapath

```
        A ──(A_i, LSB; shifts right each iteration)───────────┐
        N ─────┬──────────────────────────────┐               │
        B ─────┼──────┬───────────────┐       │               │
               │      │               │       │    Q_L ── q_i─┤
 SC>>1, SC, N ─┴► M1  │  SS>>1, SS, B ┴► M2   │               ▼
               │      │                │      └─► M3: 0 / N / B / D
               ▼      │                ▼                 │
             ┌────────┴────────────────────────────────────┐
             │ CSA   (full adder per bit, or 2 half adders)│
             └────────────────┬───────────────────┬────────┘
                              ▼ sc                ▼ ss ───► D (during precomputation)
                             SC                  SS ──► final_sub ──► result
                              └──► Zero_D (SC == 0) ──► controller
```

| Block | Module | Job |
|---|---|---|
| A, N, B, D, SS, SC registers | `mmm_reg` | load-enable registers with synchronous clear |
| M1, M2 | `m12_mux` | feed the adder with SC/SS shifted right by one, unshifted, or N/B |
| M3 | `m3_mux` | third adder input: 0, N, B or D from (A_i, q_i) |
| Q_L | `q_logic` | quotient bit `q_i = ss_lsb ^ sc_lsb ^ (A_i & B_0)` |
| CSA | `csa` (with `full_adder`, `half_adder`) | configurable one-level carry-save adder |
| Zero_D | `zero_d` | flags SC == 0 |
| controller | `mmm_ctrl` | phase sequencer, drives all selects and enables |
| final subtraction | `final_sub` | `S ≥ N ? S − N : S` |
| top | `mmm` | wires the above together |

Shared enums (adder configuration, M1/M2 select, controller state) are in
`mmm_pkg`.

### Why the quotient bit needs only three LSBs

An iteration computes `S' = (S + A_i·B + q_i·N) / 2`. q_i must make the sum
even. N is odd, so q_i is the parity of `S + A_i·B`. The adder sees SS>>1
and SC>>1, the previous sum already halved, so the parity of S is the XOR of
the LSBs of the M1 and M2 outputs. The path from register to register is:
register → M1/M2 → Q_L (two XORs and an AND) → M3 → one full adder.

### Why the deferred shift is exact

SC is always stored already shifted to its weight, so SC[0] = 0. With an odd
N the sum at the end of each iteration is even, so SS[0] = 0 too. Halving SS
and SC separately is therefore the same as halving their sum. Assertions in
`mmm` check both facts on every cycle.

### The two adder configurations

- `CSA_FA`: one full adder per bit, `ss + sc = a + b + c`. Used in the loop.
- `CSA_HA2`: per bit, a half adder on (a, b), then a second half adder on
  that sum bit and the first half adder's carry from the bit below. This
  gives `ss + sc = a + b`, with the carry chain shortened by two positions per
  clock. c is ignored; it is zero in every phase that uses this mode.

The carry out of the top bit is dropped in both modes. SS and SC are K+3 bits
wide, and every value they carry stays below 2^(K+2), so that carry is always
zero. The loop's unshifted sum is below 2(B+N) < 2^(K+2). Conversion
operands are below 2^(K+1).

## Sequence and timing

| Phase | Cycles | What happens |
|---|---|---|
| IDLE | – | `start` loads A, B, N and clears SS/SC |
| PRE_ADD | 1 | (SS, SC) = N + B through M1/M2, half-adder mode; D follows SS |
| PRE_CONV | c1 + 1 | (SS, SC) = SS + SC until SC = 0; D then holds B+N; SS/SC cleared |
| MUL | K + 2 | full-adder iterations, A shifts right each clock |
| POST_SHIFT | 1 | applies the last deferred halving |
| POST_CONV | c2 + 1 | (SS, SC) = SS + SC until SC = 0; `done` pulses |

`done` is high exactly **K + 6 + c1 + c2** clocks after the clock that takes
`start`. c1 and c2 are data-dependent, between 0 and about (K+3)/2 each. In
simulation, K = 4 took 10 to 13 clocks (all operand combinations). K = 128
took 136 to 144 clocks (random operands), so the conversions add only a few
clocks in practice.
`result` stays valid until the next `start`.

## Using it

Ports of `mmm` (parameter `K`, default 4):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | taken only when idle; `a`, `b`, `n` are sampled on that clock |
| `a`, `b` | in | K | operands, any K-bit values |
| `n` | in | K | modulus: **odd, top bit set** |
| `busy` | out | 1 | a multiplication is running |
| `done` | out | 1 | one-clock pulse; `result` valid |
| `result` | out | K | A·B·2^-(K+2) mod N, fully reduced |
| `ss_o`, `sc_o` | out | K+3 | the carry-save registers (`sc_o` = 0 at `done`) |

Requirements on the modulus:

- N must be odd, as Montgomery reduction requires.
- The top bit of N must be set, so that K-bit operands are below 2N. A
  modulus whose top bit is clear has to be scaled up (normalised) outside
  this block.

To use the block in an exponentiation with R = 2^(K+2):

- Convert x into Montgomery form with `mmm(x, R² mod N)`.
- Chain multiplications on Montgomery-form values.
- Convert back with `mmm(y, 1)`.

## How it relates to the published design

The following come from the source design:

- The register, multiplexer, Q_L, CSA and Zero_D structure.
- The K+2 iteration count.
- The deferred shift.
- The D = B + N precomputation.
- Conversion "until SC = 0".
- The configurable full-adder / two-half-adder adder.
- The 4-bit default size.

These are this implementation's own choices:

- **Final subtraction.** The published datapath drawing has no subtractor,
  but its printed 4-bit results are fully reduced. Examples: A=0xF, B=6,
  N=9 gives 0 (the loop alone gives 9); A=8, B=9, N=0xC gives 8. `final_sub`
  reproduces both. Remove it if an output in [0, 2N) is wanted, for example
  to chain multiplications without the compare; `result` must then be
  K+1 bits wide.
- **Controller.** The phase encoding is this implementation's own, as are the
  explicit SS/SC clear before the loop, the extra POST_SHIFT clock, the
  start/busy/done handshake, the reset style and the K+3 register width.
- **Half-adder configuration.** The exact wiring of the two half adders, and
  their use in both precomputation and conversion, is one reading of
  "one full adder or two serial half adders".
- **Not included.** The source also mentions a faster variant with lookahead
  of two quotient bits and skipping of iterations, finishing in about k+4 or
  k+5 clocks. It is not described fully enough to build and is not included.
  Modulus normalisation is also left outside the block, as is sharing one
  precomputed constant among several multipliers working in parallel.

The published area, delay and power figures come from a vendor synthesis flow
and are not reproduced here.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_mmm` runs the default K = 4 design. It covers the two printed
  example vectors and all A, B for every odd normalised N, which is 1794
  multiplications. Results are checked against integer arithmetic. It also
  checks:
  - the K+2 loop length and the exact latency formula;
  - SC = 0 and SS < 2N at `done`;
  - that each mechanism occurred: conversion passes before and after the
    loop, every M3 choice, and final subtraction taken and not taken.
- `tb_mmm_wide` runs K = 128. It does 200 random multiplications and a chain
  of 20 dependent squarings, against a wide-integer reference.
- `tb_csa`, `tb_m12_mux`, `tb_m3_mux`, `tb_q_logic`, `tb_zero_d`,
  `tb_mmm_reg`, `tb_mmm_ctrl` and `tb_final_sub` test the blocks alone.
  `tb_mmm_ctrl` uses a modelled Zero_D to sweep the conversion lengths and
  check the phase outputs and latency.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/mmm_pkg.sv tb/tb_mmm.sv --top-module tb_mmm
./obj_dir/Vtb_mmm
```

Replace `tb_mmm` with any other testbench name. Lint with
`verilator --lint-only -Wall -Irtl rtl/mmm_pkg.sv rtl/mmm.sv`. The remaining
warnings are the intentionally unused top carry bits in `csa`, and `rst_n`
appearing both in the asynchronous reset and in the assertions'
`disable iff`.
