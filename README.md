# One test architecture per die, at any test bandwidth: bandwidth adapters for 3D stacks

A die in a 3D stack is tested several times. It is tested first on its own (pre-bond), where a tester
can reach it only through a few probe pads. It may be tested again in partial stacks as the stack is
built, and a last time in the finished stack (post-bond). In those later tests its data comes up
through test-elevator TSVs, and the die gets whatever share of the stack's tester pins it is
allotted. So one die sees a different number of test data lanes in each phase.

The RTL here follows the approach of Y.-W. Lee and N. A. Touba, *Unified 3D Test Architecture for
Variable Test Data Bandwidth Across Pre-Bond, Partial Stack, and Post-Bond Test*. It does not build
a separate test access mechanism (TAM) for each bandwidth. The die gets **one** TAM of `n` lanes,
where `n` is the largest bandwidth the die will ever get. A small **bandwidth adapter** sits between
the pins and that TAM. In a phase that delivers only `k < n` lanes, the input adapter packs the
`k`-bit beats into `n`-bit TAM words. Each time a word is ready, it fires one TAM shift. An output
adapter splits the `n`-bit response words back into `k`-bit beats. The TAM and the core wrappers
never change. Only the shift phase of the test gets longer, by `n/k`.

```
 probe pads / TSVs          layer_test_wrapper
 lanes 0..k-1      +----------------+   +-----------+   +-----------------+
 ---- test_in ---->| bw_in_adapter  |-->| layer_tam |-->| bw_out_adapter  |---- test_out --->
                   | 2n-1 bit ring  | n |  n scan   | n | 2n-1 bit ring   |  lanes 0..k-1
                   +----------------+   |  paths    |   +-----------------+
                        | layer_test_clock (shift)  |         ^
                        +------------+--------------+---------+
                                     |  core_stim / core_resp
                                     v
                                die logic (not part of this RTL)
```

## The input adapter: a 2n-1 bit ring with two pointers

`bw_in_adapter` holds a circular buffer of `2n-1` bits, a write pointer (`in_ptr`) and a read
pointer (`out_ptr`).

- **Write side.** An accepted beat writes its `k` low lanes at `in_ptr`, wrapping past the end of
  the ring. `in_ptr` then moves on by `k` modulo `2n-1`.
- **Read side.** Once `n` or more bits are held, the `n` bits starting at `out_ptr` are the TAM word
  (`tam_data`). When the TAM takes the word, `layer_test_clock` is high for that one clock and
  `out_ptr` moves on by `n` modulo `2n-1`.
- **Fill counter.** A separate counter `fill` (0 to `2n-1`) keeps the pointer difference. It tells
  an empty ring from a full one.

**Why `2n-1` bits are enough.** A word leaves whenever `n` or more bits are held, so after a read
at most `n-1` bits remain. Adding the next beat of at most `n` bits gives at most `2n-1`. As long
as the TAM keeps shifting, the tester never has to wait. `in_ready` takes the word leaving in the
same clock into account, so it stays high in that case.

**Word boundaries.** `k` does not have to divide `n`, and a TAM word may be made of pieces of two or
more beats. Take `n = 5` and `k = 3`: the beats hold bits 0-2, 3-5, 6-8, and so on. The first TAM
word is bits 0-4 and the second is bits 5-9. The bit order on the lanes is kept exactly: lane `i`
of a beat is bit `i` of the stream, and bit `j` of a TAM word goes to TAM lane `j`.

**Rate.** With input and TAM never stalled, the `T` clocks after the first beat carry exactly
`floor(T*k/n)` shifts. That is `k/n` words per clock, with one clock of latency.

`layer_test_clock` is an enable in the single `clk` domain, not a separately gated clock. The TAM
flops shift on `clk` when it is high. If the die needs a real pulsed clock, derive it from this
enable with a clock-gating cell.

## The output adapter: the same ring, run backwards

`bw_out_adapter` uses the same `2n-1` bit ring.

- **Write side.** Each `layer_test_clock` writes the `n` bits that leave the TAM in that shift.
- **Read side.** Whenever at least `k` bits are held, it drives `k` of them on `test_out` for one
  clock.
- **No back-pressure.** The tester side never pushes back: a valid beat is taken in the clock it is
  shown.

Two details were added so that the response stream can always be returned completely:

- **`flush`.** A test returns `(patterns + 1) * SCAN_LEN * n` response bits, and that need not be a
  multiple of `k`. At the end of the test, `flush` lets out the last, shorter beat. `test_out_bits`
  says how many lanes are valid, and the lanes above it are 0.
- **`in_ready` and `overflow`.** `in_ready` says that a TAM word fits this clock. The wrapper does
  not shift the TAM unless it is high. If a word arrives anyway, it is dropped and the sticky
  `overflow` flag is set. When the input and output adapters of a die run at the same `k`, words
  arrive at exactly `k/n` per clock and `in_ready` stays high.

## The die wrapper and the test sequence

`layer_test_wrapper` (the top) wires the input adapter, the TAM and the output adapter together. The
TAM shifts when three things hold at once:

- the input adapter has a full word;
- the output adapter has room for the word that leaves the TAM in the same shift;
- `capture` is low.

One shift strobe therefore loads a stimulus word into every scan path and unloads a response word
from every path, as in ordinary scan test.

`layer_tam` is the simplest TAM that does the job: `n` equal scan paths of `SCAN_LEN` cells.

- **`shift`.** Each path moves one place. `tam_in[c]` enters cell 0, and `tam_out[c]` is the bit
  leaving the last cell.
- **`capture`.** Every cell loads the die's response `core_resp`. `core_stim` always shows the cell
  contents. Capture wins over shift.

A real die would have the TAM that a TAM-design tool makes for width `n`: wrapped cores,
daisy-chained scan chains and so on. The adapters do not depend on it. They see only an `n`-bit
word bus and a shift strobe.

A test of `P` patterns in one phase goes like this:

1. Reset, and set `k` for this phase. Then stream `(P + 1) * SCAN_LEN * n` stimulus bits, `k` per
   clock, while `test_in_ready` is high. The last pattern is a dummy that only unloads the previous
   response. The last beat may be padded.
2. After each real pattern's `SCAN_LEN` shifts, which you can count on `layer_test_clock`, raise
   `capture` for one clock. In that clock the TAM does not shift. The input adapter keeps taking
   beats while there is room, and otherwise lowers `test_in_ready`.
3. Collect `test_out` whenever `test_out_valid` is high. The first `SCAN_LEN * n` bits are the
   reset contents of the scan paths (zeros). After the last shift, raise `flush` until the rest has
   come out.

**Test time.** Let `t(n)` be the clocks of a test at full bandwidth: shifts plus `P` capture
clocks. At bandwidth `k` only the shift part stretches:

    t(k) = (t(n) - P) * n / k + P

The capture clocks often cost nothing at `k < n`, because the input adapter keeps filling during
them. Measured at the default size (`n = 64`, `SCAN_LEN = 32`, `P = 3`), from the first beat to the
last shift:

| k  | clocks | bound from the formula (rounded up) |
|----|--------|-------------------------------------|
| 64 | 132    | 131                                 |
| 48 | 174    | 174                                 |
| 32 | 257    | 259                                 |
| 8  | 1025   | 1027                                |
| 5  | 1640   | 1642                                |
| 1  | 8193   | 8195                                |

At `k = 64`, one clock of pipeline latency comes on top of the formula.

## Choosing n and k

The RTL takes `n` as a parameter and `k` as an input. The published approach chooses them at
design time:

- **`k` in pre-bond test** follows from the number of probe pads on the die.
- **`k` in each partial stack and in the final stack** is the die's share of the stack's test pins.
  A dynamic program splits the pins among the dies so that the slowest die finishes as early as
  possible. The stacks are handled in order of size, smallest first, because smaller stacks give
  each die more lanes.
- **`n` for a die** is the largest `k` it receives in any phase. The die's TAM is then optimised
  for that `n`, and the adapters handle every other phase.

Here is an example of the allocation. Four dies get 6 lanes in all, with these per-die test
lengths:

| lanes | D0 | D1 | D2 | D3 |
|-------|----|----|----|----|
| 1     | 40 | 8  | 20 | 5  |
| 2     | 30 | 7  | 20 | 5  |
| 3     | 20 | 6  | 10 | 5  |
| 4     | 10 | 5  | 10 | 5  |

The best split is {3, 1, 1, 1}, which gives a stack test time of 20.

That procedure is software and is not part of this RTL. The default `N = 64` covers every
allocation in an experiment where the bottom die offers up to 64 pins and non-bottom dies are
probed with 8 lanes: no die can then receive more than 64.

## Interface of `layer_test_wrapper`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | test clock; asynchronous active-low reset |
| `k` | in | `$clog2(N+1)` | lanes used in this phase, 1..N. Change it only while in reset. |
| `test_in_valid` / `test_in_ready` | in / out | 1 | stimulus beat handshake (`test_in_ready` depends combinationally on `capture`) |
| `test_in` | in | N | stimulus lanes; lanes `k..N-1` are ignored |
| `flush` | in | 1 | release a final response beat of fewer than `k` bits |
| `test_out_valid` | out | 1 | response beat present; must be taken in the same clock |
| `test_out_bits` | out | `$clog2(N+1)` | valid response lanes (`k`, or fewer on flush) |
| `test_out` | out | N | response lanes, unused lanes 0 |
| `capture` | in | 1 | one capture clock per pattern |
| `layer_test_clock` | out | 1 | TAM shift strobe |
| `overflow` | out | 1 | sticky: a response word was lost (never set in correct use) |
| `core_stim` | out | N x SCAN_LEN | scan cell contents applied to the die logic |
| `core_resp` | in | N x SCAN_LEN | die logic response, loaded on capture |

Parameters: `N` (TAM width `n`, default 64) and `SCAN_LEN` (cells per scan path, default 32).
Everything else is derived from them. The ring is `2N-1` bits, and each adapter costs roughly
150 flip-flops at `N = 64`.

Probe pads and TSVs are plain wires into the lane bus. In pre-bond test the pads drive the low
lanes. In stacked tests the TSVs drive the lanes allotted to the die.

## What follows the published scheme, and what is this design's own

These follow the published scheme:

- the single `n`-bit TAM per die, sized for the largest bandwidth the die receives;
- the input adapter's `2n-1` bit buffer, its two pointers with modulo-`(2n-1)` advances, the
  "at least `n` bits ready" condition and the shift pulse per word;
- an output adapter that does the inverse;
- test time that scales only in its shift part.

These are choices made here:

- `layer_test_clock` as a clock enable;
- the separate fill counter;
- the valid/ready handshake on the stimulus side, and the hold of the TAM during capture and when
  the output adapter is full;
- `flush`, `test_out_bits` and `overflow`;
- asynchronous reset;
- `k` changed only between phases, after reset;
- the uniform scan-path TAM with its default of 32 cells;
- the default `N = 64`;
- `capture` coming from the tester.

These are not included:

- the die's own logic, which is left as the `core_stim`/`core_resp` ports;
- the tool-optimised TAM and core wrappers of a real die;
- the test control (scan enable, capture timing) that a tester or an on-die controller would drive;
- the physical pads and TSVs;
- the bandwidth-allocation procedure;
- any routing between dies in a stack. The stack testbench only shows how separate dies share a
  pin budget.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<m>`. Each also has a
watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_bw_in_adapter` | `n` = 8 and 5, every `k` from 1 to `n`, random stalls on both sides. Checks every TAM word bit for bit against a queue model, and `out_valid`/`in_ready` each clock. Also checks the `floor(T*k/n)` shift rate. |
| `tb_bw_out_adapter` | `n` = 8 and 5, every `k`. Checks every beat, `out_bits`, unused lanes, `in_ready` and `overflow` against a queue model, plus random flushes. Also checks the output rate and a forced overflow. |
| `tb_layer_tam` | random shift/capture. Checks scan-out order, capture priority and `core_stim`. |
| `tb_layer_test_wrapper` | the top at its default size: six phases with `k` = 8, 48, 32, 64, 5 and 1, three patterns each. Checks the stimulus in the scan cells at every capture and every response bit. Also checks the test time against the formula above, and that each of these happened: conversion, `k` not dividing `n`, `k = n`, capture, tester stall, flush, bandwidth change. |
| `tb_stack_phases` | four dies with TAM widths 32/12/8/8 taken through pre-bond (8 probe-pad lanes for the upper dies), two partial-stack tests and the final test on a 32-pin budget, with an example lane allocation. Checks every bit per die, that each stacked phase fits the budget, and that the phase time is that of the slowest die. |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/bw_adapter_pkg.sv tb/tb_layer_test_wrapper.sv --top-module tb_layer_test_wrapper
    ./obj_dir/Vtb_layer_test_wrapper

The adapters also carry assertions: the fill count never exceeds `2n-1`, and `k` is between 1 and
`n` whenever a beat is offered.

## Files

- `rtl/bw_adapter_pkg.sv`: ring size and modulo pointer helpers
- `rtl/bw_in_adapter.sv`, `rtl/bw_out_adapter.sv`: the two adapters
- `rtl/layer_tam.sv`: the scan-path TAM
- `rtl/layer_test_wrapper.sv`: the per-die top
- `tb/`: the testbenches above, plus `in_harness.sv`, `out_harness.sv` and `die_tester.sv`, which
  drive one instance each
