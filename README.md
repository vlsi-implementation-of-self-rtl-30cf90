# PASTA: a parallel adder that adds by repeated half-addition

A ripple-carry adder is small, but it always waits for the worst-case carry
chain. This adder is just as regular and just as small. It waits only as long
as the longest carry chain that actually occurs in the operands at hand. For
random operands that chain is about log2(n) bits long, not n.

The idea is to build the adder from half adders only, one per bit plus one for
the carry-out. Each half adder adds the carry from its neighbour to its own sum
bit, and all of them do so at the same time. Every carry chain in the operands
therefore moves forward by one bit per step. Independent chains move in
parallel. The addition is finished when no carry is left anywhere. A
completion detector spots that moment and signals it with `term`.

This is the parallel self-timed adder (PASTA) architecture. In its original
form it is asynchronous, and the iterations are separated only by gate delays.
This RTL keeps the structure and the arithmetic unchanged but separates the
iterations with a clock edge (see *Iterations and the clock*).

## The recursion

Take n-bit operands `a`, `b` and a carry-in. Bit slice `i` (0 ≤ i ≤ n) holds a
sum bit `S_i` and the carry `C_{i+1}` it sends to slice `i+1`.

Initial step (j = 0), a half-addition of the operand bits:

    S_i  = a_i xor b_i          (slice n: a_n = b_n = 0)
    C_i+1 = a_i and b_i
    C_0  = cin

Iteration j ≥ 1, all slices at once:

    S_i'   = S_i xor C_i
    C_i+1' = S_i and C_i
    C_0'   = 0

The recursion stops when every carry `C_0 .. C_{n+1}` is zero. At that point
`{S_n, S_{n-1} .. S_0}` equals `a + b + cin`, and `S_n` is the carry-out.

**Why it is correct.** The weighted value `sum(S_i·2^i) + sum(C_i·2^i)` does
not change from one iteration to the next. A slice that turns `S_i = 1` and
`C_i = 1` into `S_i' = 0` and `C_{i+1}' = 1` keeps the same weight. So once all
carries are zero, the sum bits alone hold the result.

**Why it ends.** A carry that enters slice `i` either stops there (`S_i` was 0)
or moves on to slice `i+1` (`S_i` was 1). It never stays put and never
multiplies. Let `k` be the number of iterations. Then `k` is the length of the
longest chain: at most n without a carry-in, and at most n+1 with one
(`a = 2^n-1, b = 0, cin = 1` needs all n+1). If no operand bit pair generates
a carry and `cin = 0`, then `k = 0`. For random 16-bit operands the test
measures an average of about 3.4 iterations.

## A bit slice and its states

```
      a_i ──┐                      ┌── b_i     (slice n: both 0)
            │ sel                  │ sel
     S_i ─[MUX]──── x       y ───[MUX]─ C_i  (carry from slice i-1, or C_0)
                    │       │
                   ┌┴───────┴┐
                   │  HA_i   │  S_i = x^y, C_i+1 = x&y
                   └┬───────┬┘
                    │       │
                [ (C_i+1, S_i) register ] ──► S_i back to own MUX, C_i+1 to slice i+1
                                              and to the completion detector
```

The pair `(C_{i+1}, S_i)` is the state of the slice (`pasta_pkg::ha_state_t`).
A half adder can never output `(1,1)`, so there are only three states:

| state now | incoming carry C_i = 0 | incoming carry C_i = 1 |
|-----------|------------------------|------------------------|
| 00        | 00                     | 01                     |
| 01        | 01                     | 10 (carry passed on)   |
| 10        | 00 (carry delivered)   | 01                     |

In the initial phase the slice sees the operand bits instead: `a_i b_i = 00`
gives 00, 01 or 10 gives 01, and 11 gives 10. An assertion in `pasta` checks
that no slice ever holds `(1,1)`. The end-to-end test records every transition
of the table above and checks it against the half-adder rule.

## Handshake: SEL and TERM

`sel` plays the role of the request signal. Per addition it makes a single
0→1 transition, and both multiplexers of every slice switch on it:

1. With `sel = 0` (initial phase) the slices take in the operands. Hold `a`,
   `b` and `cin` stable across at least one rising edge of `clk`.
2. Raise `sel` and keep it high. From now on the operand inputs are ignored
   and may change.
3. `term` rises after exactly `k` rising edges. If `k = 0`, it rises in the
   same cycle as `sel`, combinationally. `s` and `cout` are then valid and stay
   unchanged as long as `sel` stays high. An assertion checks this.
4. Drop `sel` to start the next addition. `term` falls with it.

`term` is the acknowledge. The latency is data-dependent, between 0 and N+1
clock cycles, so a user waits for `term` and not for a fixed count.

## Completion detection

`pasta_cdu` is a wide NOR over all carries `C_0 .. C_{N+1}`, ANDed with `sel`.
In a transistor implementation this is the one high fan-in gate of the design
(parallel pull-down transistors). Compared with the textbook termination
condition, which lists only `C_1 .. C_n`, it adds two inputs:

- `C_{n+1}`, the carry out of the top slice. It is always 0 for legal
  operation, but keeps the detector honest.
- `C_0`, a carry-in that has not been added yet. Without it, `0 + 0 + 1` would
  report completion before the carry-in was added.

The `sel` qualification keeps `term` low until the iterative phase has
started.

## Iterations and the clock

In the self-timed original, a slice's half-adder output is fed straight back
through the multiplexers. Successive iterations are kept apart only by
propagation and inertial delays, a form of wave pipelining. The recursion above
is exact only if all slices advance in lock step. Here, that lock step is
enforced with one flip-flop pair per slice (35 flip-flops at N = 16) and one
clock edge per iteration. This makes the design ordinary synchronous logic:
it synthesizes, has no combinational loop, and a timing analysis applies. The
price is that one iteration costs one clock period rather than one half-adder
delay.

## Where this RTL departs from the original description

- **Clocked iterations** (above). The original is clockless. It reports delays
  of 21.227 ns for itself against 38.665 ns for a reference adder. Those
  figures belong to that implementation and say nothing about this RTL, whose
  delay is `k × T_clk`.
- **Carry-in.** The original drawing feeds `cin` into the multiplexer of bit 0,
  but its equations have no carry-in. If `cin` stayed applied to bit 0 for the
  whole iterative phase, it would be added again in every iteration. Here it
  is captured into `C_0` in the initial phase, added once, and then cleared.
- **Reset.** The original has none. This RTL adds an asynchronous active-low
  `rst_n` that clears every slice to state 00.
- **Completion detector inputs** `C_0` and `C_{n+1}` and the `sel`
  qualification, as described above.
- **Width.** The default N = 16 follows the 16-bit configuration of the
  original. The recursion itself holds for any N ≥ 1.

## Modules

| file | what it is |
|------|------------|
| `rtl/pasta_pkg.sv`  | `PASTA_WIDTH = 16` and the slice state type `ha_state_t` |
| `rtl/pasta_mux2.sv` | 1-bit 2:1 multiplexer; `sel = 0` takes the operand, `sel = 1` the feedback |
| `rtl/pasta_ha.sv`   | half adder, output as a `(c, s)` state pair |
| `rtl/pasta_cdu.sv`  | completion detector, parameter `N` |
| `rtl/pasta.sv`      | the adder (top): N+1 slices, their state registers, the carry-in register and the detector |

Ports of `pasta #(N)`: `clk`, `rst_n`, `sel`, `a[N-1:0]`, `b[N-1:0]`, `cin`
in; `s[N-1:0]`, `cout`, `term` out.

Synthesized at N = 16 this comes to about 107 word-level cells and 35
flip-flops. Area grows linearly with N, and there is no fan-out beyond the two
multiplexers per slice and the detector.

## Verification

Each testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line.

- `tb/tb_pasta_mux2.sv`: all 8 input combinations.
- `tb/tb_pasta_ha.sv`: all 4 inputs, plus the absence of state (1,1).
- `tb/tb_pasta_cdu.sv`: all-zero, walking-one and random carry vectors,
  each with `sel` at 0 and at 1.
- `tb/tb_pasta.sv`: the whole adder at its default width of 16. It runs
  directed cases and 3000 random additions. A word-level model of the
  recursion predicts the sum and the iteration count `k`. The testbench checks
  that `term` appears after exactly `k` edges and that `{cout, s}` equals
  `a + b + cin` and holds. It also checks that the average `k` over random
  operands stays below log2(N) + 2. It counts how often each mechanism occurs
  and fails if one never does:
  - completion with `k = 0`
  - completion after iterations
  - a full-width chain
  - a consumed carry-in
  - a carry-out
  - reset
  - each of the six state transitions

- `tb/tb_pasta_scaling.sv`: four adders of width 8, 16, 32 and 64 bits, each
  running 1000 random additions. It checks every sum and measures the mean
  iteration count. The measured means are 2.5, 3.4, 4.4 and 5.3: about one
  more iteration per doubling of the width, as expected for logarithmic
  growth. The test fails if a mean exceeds log2(N) + 2, or if one doubling
  adds more than 2.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/pasta_pkg.sv rtl/pasta_mux2.sv rtl/pasta_ha.sv rtl/pasta_cdu.sv rtl/pasta.sv \
    tb/tb_pasta.sv --top-module tb_pasta
./obj_dir/Vtb_pasta
```

For the leaf testbenches, list only the package, the module under test and the
testbench. To try a different width, change `PASTA_WIDTH` in `pasta_pkg`.
It is the default `N` of `pasta` and `pasta_cdu`, and the testbenches size
themselves from it. A single instance can also be given `#(.N(...))`.
