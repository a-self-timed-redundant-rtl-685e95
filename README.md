# Self-timed redundant-binary to two's-complement converter

Arithmetic units built on redundant-binary digits (each digit is -1, 0 or +1)
add without carry propagation, but their results must eventually be turned
back into ordinary two's-complement binary. That conversion has a carry-like
dependency of its own. This RTL implements a converter whose conversion time
is set by the data rather than by the word length. It converts an N-digit
redundant-binary number into an (N+1)-bit two's-complement number, and it
raises a `done` signal as soon as the result is valid.

The main idea: only runs of **zero digits** carry information from right to
left. Every non-zero digit starts a fresh chain, so all runs of zeros resolve
in parallel. The conversion is finished once the longest run has been crossed.
For random 64-digit inputs the longest run of zeros is about 3.4 digits on
average, against 64 for a plain ripple chain. A two-rail flag per stage and a
completion NOR turn this into a self-timed circuit.

The default size is 64 digits (`N = 64`).

## Digit code

Each digit travels on two wires, a sign bit `s` and a magnitude bit `a`:

| digit | (s, a) |
|-------|--------|
| 0     | (0, 0) |
| +1    | (0, 1) |
| -1    | (1, 1) |

The code (1,0) is never a legal digit. `rb2b_pkg` defines the struct
`rb_digit_t` and the constants `RB_ZERO`, `RB_POS` and `RB_NEG`. The value of
`D = d[N-1] … d[0]` is `Σ d_i·2^i`. This ranges from -(2^N - 1) to 2^N - 1,
which is why the result needs N+1 bits.

## The conversion rule

Scan from digit 0 upwards with a flag bit `g`, starting with `g_0 = 0`:

| digit d_i | result bit b_i | next flag g_{i+1} |
|-----------|----------------|-------------------|
| 0         | g_i            | g_i               |
| +1        | NOT g_i        | 0                 |
| -1        | NOT g_i        | 1                 |

Then `b_N = g_N` is the sign bit. In gates, this is `b_i = g_i XOR a_i` and
`g_{i+1} = s_i OR (NOT a_i AND g_i)`.

Why this works: first append a +1 digit below the least significant digit and
shift left, which doubles the value and adds 1. Then rewrite each pattern
`x 0 0 … 0 ±1` (read right to left) into digits that are all ±1. A number
whose digits are all ±1 maps onto binary by reading -1 as 0. The flag is the
bit that this rewriting predicts for the next position.

Worked example: digits d6…d0 = (-1, 0, -1, 0, 0, +1, 0), which is
-64 - 16 + 2 = -78. The result b7…b0 is `1011_0010`, which is -78 in 8 bits.
The flags g7…g0 are 1 1 1 1 0 0 0 0.

A flag changes only at non-zero digits. So the only long-range dependency is a
flag crossing a run of zeros. All runs are crossed at the same time.

## Two-rail flags and the inhibit line

A self-timed circuit must know when every flag is final. A single wire cannot
tell "flag = 0" from "not computed yet". Each stage therefore carries its flag
on two rails, `(g, gs)`:

| (g, gs) | meaning                          |
|---------|----------------------------------|
| (0, 0)  | position not resolved yet        |
| (0, 1)  | resolved, flag bit 0             |
| (1, 0)  | resolved, flag bit 1             |

The flag generator (`fg_cell`) computes:

```
g_out  = s·H  + ¬a·g_in
gs_out = ¬s·a·H + ¬a·gs_in
```

`H` is the inhibit line.

- While `H = 0`, the generate terms are off, and the flags fall back to
  (0,0).
- When `H` rises, each non-zero digit immediately produces a resolved flag:
  (0,1) for +1 and (1,0) for -1.
- A zero digit copies whatever resolved flag arrives from its right.
- The initial flag entering stage 0 is `g_0 = 0`, `gs_0 = H`. This is
  "resolved, 0" while converting and "unresolved" while inhibited.

The cell is built from two inverters and six NAND gates, three per rail: a
generate NAND, a pass NAND and an output NAND.

Each rail only rises during a conversion, so the flags move monotonically
from (0,0) to their final code. Because of this, the completion signal
rises once and never glitches.

Clearing is **not** instant. With `H = 0`, a zero digit still passes its
incoming flag. A run of zeros therefore clears one stage after another, at
the same 2 gate delays per stage as when it was set. This is why `gs_0` must
follow `H`: if it were tied to 1, a run of zeros starting at digit 0 would
never clear. The environment must hold `H` low long enough;
`2·TG·(N+2)` covers any input.

## Stages and completion

Each `stc_stage` contains three parts:

- an FG cell;
- a 2-input NOR of its output rails, `pending`, which is 1 while the stage is
  unresolved;
- a 2-input XNOR that forms `b_i = XNOR(g_i, ¬a_i)`.

`rb2b_selftimed_converter` chains N stages. `completion_nor` is one wide NOR
that raises `done` when no watched stage is pending. There are three
exceptions at the ends:

- `b[0] = a_0` directly, because the flag entering stage 0 is always 0.
  Stage 0's XNOR is unused.
- `b[N] = g_N`, the "1" rail leaving the last stage.
- Stage N-1's `pending` is not watched. Its flag resolves at most 2 gate
  delays after stage N-2's flag. Stage N-2's NOR and the completion NOR also
  take 2 gate delays before `done` rises, so the last stage is never later
  than `done`. The completion NOR therefore has N-1 inputs.

### Timing

Every gate has the delay `TG`, which defaults to 100 ps. Assume the digits
are applied while `H = 0` and `H` then rises:

- a non-zero digit's flag is valid 2·TG after `H`;
- each zero digit adds 2·TG;
- a run of zeros that starts at digit 0 is fed by `gs_0 = H` itself, so it
  starts 2·TG earlier;
- `pending` adds one TG and the completion NOR adds another.

So:

```
t_done = 2·TG·(k + 2)
```

Here `k` is the longest flag passing over stages 0…N-2. A run of zeros that
ends at a non-zero digit counts its length. A run that starts at digit 0
counts one less.

- Best case (no zeros): `4·TG`.
- Worst case (all zeros): `2·TG·N`.

`b[N]` and `b[N-1]` settle no later than `done`. Sample `b` just after `done`
rises (the testbenches wait 1 ps).

Measured with random digits over 10,000 samples, average `k`:

| N  | average k | bound log3 N |
|----|-----------|--------------|
| 8  | ≈1.43     | 1.89         |
| 16 | ≈2.11     | 2.52         |
| 32 | ≈2.79     | 3.15         |
| 64 | ≈3.43     | 3.79         |

For 64 digits, the average completion time is about 11 gate delays. A ripple
chain with one 2-gate cell per digit takes 129.

## Using it

```
rb2b_selftimed_converter #(.N(64), .TG(100)) u_conv (
  .d   (digits),   // rb_digit_t [N-1:0], d[0] least significant
  .h   (h),        // 0: clear, 1: convert
  .b   (result),   // [N:0], two's complement, b[N] = sign
  .done(done)
);
```

The converter uses a four-phase, bundled-data handshake:

1. Lower `h` and apply the new digits.
2. Wait at least `2·TG·(N+2)` so that every flag has cleared.
3. Raise `h`.
4. Wait for `done`, then read `b`.
5. Lower `h` again for the next conversion.

Keep `d` stable while `h = 1`. When `h` rises, an assertion reports any digit
that uses the illegal code (1,0).

## Files

| file | contents |
|------|----------|
| `rtl/rb2b_pkg.sv` | digit struct, digit constants, default gate delay, `rb_valid()` |
| `rtl/fg_cell.sv` | two-rail flag generator |
| `rtl/stc_stage.sv` | FG cell + pending NOR + result XNOR |
| `rtl/completion_nor.sv` | wide completion NOR |
| `rtl/rb2b_selftimed_converter.sv` | top level: N stages, end cells, completion |
| `tb/tb_fg_cell.sv` | exhaustive rule table of the FG cell; pass and generate delays |
| `tb/tb_stc_stage.sv` | exhaustive stage check; XNOR and NOR timing |
| `tb/tb_completion_nor.sv` | completion NOR levels and delay |
| `tb/tb_rb2b_selftimed_converter.sv` | 64-digit end-to-end test, default parameters |
| `tb/tb_rb2b_exhaustive7.sv` | all 3^7 inputs of a 7-digit converter, worked example included |
| `tb/tb_rb2b_flag_statistics.sv` | average completion time for 8/16/32/64 digits over 10,000 random inputs |

The end-to-end test runs in the following order:

- edge cases: all zeros, all +1, all -1, alternating digits, a small number
  under a long run of zeros, and a lone -1 at the top;
- 3000 random inputs.

For each input it checks four things:

- clearing;
- that `done` rises exactly at `2·TG·(k+2)`, and only once;
- the value against `D+ − D−`, where the +1 digits and the -1 digits are read
  as two plain binary numbers;
- that the result holds.

It counts how often each mechanism occurs and fails if any of them never
does. Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

The gate delays matter, so use Verilator's timing mode. List the package
first:

```
verilator --binary --timing --assert \
  rtl/rb2b_pkg.sv rtl/fg_cell.sv rtl/stc_stage.sv rtl/completion_nor.sv \
  rtl/rb2b_selftimed_converter.sv tb/tb_rb2b_selftimed_converter.sv \
  --top-module tb_rb2b_selftimed_converter -o sim
./obj_dir/sim
```

Run times:

- the 64-digit end-to-end test: about 2 s;
- the statistics test: about 30 s;
- every other test: under a second.

## Synthesis and how far to trust the timing

The logic is plain continuous assignments and synthesizes as expected.
Synthesis drops the `#` delays. The self-timed behaviour, however, depends
on properties that synthesis and layout must preserve:

- **Monotonic, hazard-free flag logic.** The two-rail equations are
  monotonic in `H` and in the flags, but a synthesis tool may restructure
  them. A real implementation should map each cell to fixed gates, or
  constrain it.
- **Relative delays.** The unwatched last stage, and sampling `b[N]` at
  `done`, both rely on one stage being no slower than one stage NOR plus the
  completion NOR. The model gives every gate the same delay. A real
  63-input NOR is a tree and is slower, which only adds margin. A slower
  last stage would not.
- **Bundled data.** The digits must be settled before `H` rises. If the
  digits and `H` arrive together, flag generation takes one extra gate delay
  (the digit inverters).

The gate-level timing model is useful for checking the logic and the
data-dependent completion. It does not predict silicon timing.

## Relation to the published design

These parts follow the published circuit:

- the conversion rule;
- the digit code;
- the two-rail flag with its three states and the inhibit line;
- the FG cell equations, with two inverters and six NANDs;
- one NOR and one XNOR per stage;
- the end cells (`b_0` wired to `a_0`, `b_N = g_N`, no NOR on the last stage);
- the wide completion NOR;
- the 64-digit size.

The published design also includes a full-custom 64-digit layout of about
303 × 171 µm²; the RTL does not reproduce it.

These are this design's own choices:

- **`gs_0` follows `H`.** The description gives the initial flag only as
  `g_0 = 0, gs_0 = 1` during conversion. Driving `gs_0` from `H` is needed for
  the flags to clear.
- **The completion NOR has N-1 inputs.** The description both calls it an
  N-input gate and omits the last stage's NOR. The omission is followed.
- **The arity of each NAND in the FG cell.** The g rail's generate NAND has
  2 inputs and the gs rail's has 3.
- **The gate delay value**, 100 ps.
- **The clearing time and setup rule** of the handshake.
- **One gate delay for the wide NOR.**
- **How completion time is counted.** The published delay estimate,
  `2·⌈L⌉·Δg + Δg` plus the completion NOR, counts differently: it includes
  the digit inverters and leaves out the per-stage NOR. The formula above is
  the exact figure for this RTL's gate model. Its average `k` matches the
  published averages of the longest run of zeros to within 0.03 for 16, 32
  and 64 digits, and to within 0.07 for 8 digits.
