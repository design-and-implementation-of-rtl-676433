# LFSR-based built-in self-test for three benchmark circuits

A built-in self-test (BIST) lets a chip check its own logic without an external
tester. A linear feedback shift register (LFSR) on the chip produces a stream
of pseudo-random input patterns. The patterns drive the circuit under test
(CUT). An output response analyser compares every response with the response
a fault-free circuit gives to the same pattern. A small controller starts the
test, counts the patterns and reports *accept* or *reject*.

This RTL builds that self-test three times, once for each of three classic
benchmark circuits:

| circuit | kind | inputs | outputs | what it is |
|---|---|---|---|---|
| c432 | combinational | 36 | 7 | 27-channel interrupt controller (ISCAS-85) |
| s27  | sequential    | 4  | 1 | 3 flip-flops and 10 gates (ISCAS-89) |
| c17  | combinational | 5  | 2 | 6 NAND gates (ISCAS-85) |

Each circuit model has a fault-injection port. You can therefore run a test
on a good copy and on copies with any single stuck-at fault, and see which
faults the pattern set catches.

## One self-test, end to end

```
                     +-----------------+
   bist_on --------->| BIST controller |----> done, accept
                     +-----------------+
                       |  init, run,  ^
                       |  pattern_idx | fail
                       v              |
 +------+   +-------+  pattern  +-----------+  response  +-----+
 | LFSR |-->| phase |---------->| CUT       |----------->| ORA |<---- expected response:
 +------+   | shift |           | (fault    |     |      +-----+      response ROM (addressed
            +-------+           |  port)    |     |                   by pattern_idx), or a
                                +-----------+     v                   fault-free CUT copy
                                                 MISR ----> signature
```

`bist_c432`, `bist_s27` and `bist_c17` each hold one such chain.
`lfsr_bist_top` places the three side by side. They share only the clock and
the reset. Each has its own `*_bist_on`, `*_fault` and result ports.

**Sequencing** (`bist_controller`). This is a four-state machine:

1. IDLE: wait for `bist_on`.
2. INIT: lasts one clock. The LFSR loads its seed (all ones). The s27 flip-flops, the analyser and the MISR clear.
3. RUN: lasts `TEST_LEN` clocks and applies one pattern per clock. `pattern_idx` counts 0 to `TEST_LEN-1`.
4. DONE: `done` stays high. `accept = !fail`.

The machine stays in DONE while `bist_on` is high. When `bist_on` falls it
returns to IDLE, so holding `bist_on` high never restarts the test.

Say `bist_on` is first sampled high at clock edge 0. Then `done` rises at edge
`TEST_LEN + 2`. With the default lengths that is 4098 clocks for c432, 32 for
s27 and 33 for c17.

**Timing inside a RUN clock.** The LFSR register holds pattern *k*. The phase
shifter and both CUT copies are combinational, so both responses settle within
the same clock. At the clock edge three things happen:

- the analyser registers the comparison;
- the MISR folds in the CUT response;
- the s27 flip-flops load their next state.

After that edge the LFSR holds pattern *k+1*.

## Where the expected responses come from

The analyser needs the fault-free response to each pattern. There are two
sources, chosen by the `STORED_RESPONSES` parameter of each `bist_*` module.

- **Response memory (default, `STORED_RESPONSES = 1`).** `response_rom` holds one word per pattern and is read with the pattern number. Its contents are worked out at elaboration by a constant function, `expected_responses()`, in each `bist_*` module. The function steps the LFSR from its seed through the phase-shifter map, with `bist_pkg::lfsr_step` and `phase_map`, and applies the fault-free function of the circuit. s27 is simulated clock by clock from the cleared state. So the memory always matches the seed, polynomial and test length in use, and no data file is needed. Sizes: 4096 x 7 bits for c432, 30 x 1 for s27 and 31 x 2 for c17.
- **Reference copy (`STORED_RESPONSES = 0`).** A second, never-faulty copy of the CUT runs on the same pattern. This costs logic rather than memory, and the test length can then grow without a larger table.

The testbenches run both variants side by side and require identical results.

The analyser XORs the CUT response with the expected one and ORs the bits
together (`mismatch`). Any mismatch sets `fail`, which stays set until the next
test. For diagnosis the analyser also keeps:

- `fail_count`: the number of failing patterns (it saturates);
- `first_fail`: the number of the first failing pattern.

The 16-bit MISR compacts the CUT's responses into `signature`. The verdict does
not use the signature. It is an output for a tester that knows the good
signature. The testbenches compute the good signature independently and check
it.

If you change the CUT function, change the matching `expected_responses()`
too. If they disagree, the fault-free self-test rejects, and `tb_bist_*`
catches it.

## The pattern generator

`lfsr` is a Fibonacci LFSR. It shifts towards its top bit, and its new bit 0 is
the XOR of the tap stages. The taps come from `bist_pkg::lfsr_taps(width)` and
are primitive polynomials:

| width | polynomial | used by |
|---|---|---|
| 4  | x^4 + x^3 + 1 | s27 |
| 5  | x^5 + x^3 + 1 | c17 |
| 16 | x^16 + x^15 + x^13 + x^4 + 1 | MISR |
| 36 | x^36 + x^25 + 1 | c432 |

So every register runs through all 2^W − 1 non-zero states. Each LFSR has as
many stages as its CUT has inputs.

In a Fibonacci LFSR, consecutive patterns are shifted copies of each other.
`phase_shifter` breaks this by XORing each stage with its upper neighbour:
`out[i] = in[i] ^ in[i+1]`, and the top bit passes through. The map is upper
triangular with a unit diagonal, so it is invertible. As a result, c17's 31
patterns are still all 31 non-zero input combinations, and the 4-bit s27
sequence still covers all 15.

Default test lengths:

- c17: 31 patterns, which is the full period (exhaustive except for input 00000).
- s27: 30 patterns, which is two periods.
- c432: 4096 patterns. Exhaustive testing of 36 inputs is impossible. In simulation, 4096 patterns detect all 140 modelled faults, and the last fault is first caught at pattern 914.

## The c432 interrupt controller

This circuit is the least obvious part of the design. It takes 27 interrupt
requests on three 9-bit buses, A, B and C. A 9-bit enable bus E masks channel
*i* on all three buses at once. It has seven outputs:

- PA, PB, PC: which bus holds the winning request (at most one is high);
- Chan[3:0]: the channel number of the winning request on that bus.

Arbitration order:

- Bus A beats bus B, and bus B beats bus C.
- Inside a bus, the lowest channel number wins.
- With no enabled request, all of PA, PB, PC are low and Chan is 4'hF.

The logic is split into the five sub-modules of the classic description of
this benchmark:

| module | inputs | outputs | does |
|---|---|---|---|
| `c432_m1` | E, A | PA, X1 | X1 = E & A, PA = \|X1 |
| `c432_m2` | X1, E, B | PB, X2 | X2 = E & B, PB = \|X2 & ~\|X1 |
| `c432_m3` | X2, X1, E, C | PC | PC = \|(E & C) & ~\|X1 & ~\|X2 |
| `c432_m4` | PA, PB, PC, E, A, B, C | sel | enabled requests of the winning bus |
| `c432_m5` | sel | Chan | priority encoder |

The port names, widths and connections are the published block structure. The
standard c432 is a 160-gate netlist, and its gates are **not** reproduced here.
The sub-modules are written at register-transfer level from the function
above. Two choices are this design's reading of "priority by bit position":
which bit wins inside a bus, and the idle code of Chan. Because of this, the
c432 here has the same interface and job as the benchmark, but it is not
guaranteed to be gate-for-gate or output-for-output identical.

## s27 and c17

Both are written gate by gate from the standard netlists. The header of
`rtl/s27.sv` and of `rtl/c17.sv` gives the equations.

s27 has three D flip-flops: q5 loads g10, q6 loads g11 and q7 loads g13. Its
output is `~g11`. The flip-flops have three controls that this design adds:

- an asynchronous reset;
- a synchronous `clear`, which the controller pulses at test start;
- an `en` input, so the state advances only on pattern clocks.

Both copies start from state 000. A stuck-at fault that corrupts the state
therefore shows up in later responses.

## Fault injection

Every CUT has an input `fault` of type `bist_pkg::fault_t`, with three fields:
`enable`, `site` (a net number) and `value`. While `enable` is high, the net
numbered `site` is forced to `value`. Faults on input nets are stem faults.
Each module header lists its net numbering:

- c17: 11 nets (22 faults);
- s27: 17 nets (34 faults);
- c432: 70 nets on the connections between M1 to M5 (140 faults). Because PA and PB come from inside M1 and M2, a fault on the X1 or X2 branch does not reach them.

When a reference copy is used, it is tied to `bist_pkg::NO_FAULT`.

Coverage measured in simulation with the default test lengths:

| circuit | patterns | faults detected |
|---|---|---|
| c432 | 4096 | 140 of 140 |
| s27  | 30   | 26 of 34 |
| c17  | 31   | 22 of 22 |

s27 stays at 26 of 34 even with 150 patterns. From the all-zero start state,
the LFSR sequence does not expose the other eight faults.

## Departures and limits

- **Expected responses.** The memory contents are computed at elaboration, not loaded.
- **Phase shifter and MISR.** They are taken from the general self-test architecture. In a minimal version the LFSR would drive the CUT directly, and the comparator alone would give the verdict.
- **Not built: scan chains.** The general architecture places scan chains between phase shifter and MISR, but their number and length are unknown, and none of the three circuits here is tested through them. Patterns go to the CUT inputs in parallel.
- **Not built: the low-power LFSR variant** (one enabled stage per shift).
- **Unspecified by the source and chosen here:** LFSR polynomials and seeds, test lengths, the MISR width, the controller's states, the diagnostic counters, the reset style, and the fault-injection mechanism.
- **Size.** With the fault-injection logic, the response memories, the MISRs and the counters, the three tests together use 180 flip-flop bits (c432 96, s27 43, c17 41) and 28,764 ROM bits. That is well above a bare LFSR-plus-CUT implementation, which would use about 5 flip-flops for c17.
- **Not reproduced:** FPGA timing and power figures.

## Files

- `rtl/bist_pkg.sv`: the fault type, `fault_net()`, the LFSR tap table and the controller state type.
- `rtl/lfsr_bist_top.sv`: the top level.
- `rtl/bist_c432.sv`, `rtl/bist_s27.sv`, `rtl/bist_c17.sv`: one self-test each.
- `rtl/lfsr.sv`, `rtl/phase_shifter.sv`, `rtl/response_rom.sv`, `rtl/misr.sv`, `rtl/ora.sv`, `rtl/bist_controller.sv`: the self-test parts.
- `rtl/c432.sv` with `rtl/c432_m1.sv` to `rtl/c432_m5.sv`, `rtl/s27.sv`, `rtl/c17.sv`: the circuits under test.
- `tb/bist_model_pkg.sv`: reference models. They are written independently, in a different style, with the same fault numbering.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`.

`tb_lfsr_bist_top` runs all three tests at the default sizes. The three tests
first run fault free and concurrently. Then they run with faults: 50 faults
spread over c432's nets, and every fault of s27 and c17. Each run is checked
against the models: clock count, verdict, failing-pattern count, first failing
pattern and signature. `tb_bist_c432` runs all 140 c432 faults.

## Simulating

Verilator 5 is enough. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bist_pkg.sv tb/bist_model_pkg.sv tb/tb_lfsr_bist_top.sv --top-module tb_lfsr_bist_top
./obj_dir/Vtb_lfsr_bist_top
```

Replace `tb_lfsr_bist_top` with any other testbench name to run it. Every run
takes seconds. To lint a module: `verilator --lint-only -Wall -Irtl -y rtl rtl/bist_pkg.sv rtl/<module>.sv`.

To change the design:

- The test lengths are parameters of `lfsr_bist_top` (`C432_TEST_LEN`, `S27_TEST_LEN`, `C17_TEST_LEN`) and of the `bist_*` modules. The counter widths follow from them.
- To use another polynomial, pass `TAPS` to `lfsr` or `misr`, or extend `bist_pkg::lfsr_taps`.
- The testbenches hard-code the default lengths (`N`, `N432`, ...) and the counter widths. Change them together with the RTL.
