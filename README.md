# Dual-configuration BIST for arrays of embedded FPGA hard blocks

Modern FPGAs carry hundreds of identical hard blocks (DSP slices, multipliers,
block RAMs). When a device fails, failure analysis needs to know *which* block
is defective, not only that one is. This design locates faulty blocks using
nothing but the device's own logic and two test configurations:

1. Every block under test receives the same stimulus.
2. The blocks are grouped in pairs, and the two outputs of each pair are
   compared. A mismatch sets a sticky per-pair error flag, so a failing pair
   holds at least one faulty block.
3. The run is repeated with a second, different pairing. No two blocks are
   paired together in both configurations.
4. A block whose pair failed in **both** runs is reported as faulty.

The self-test logic goes into the FPGA's general-purpose logic, which is
assumed to be already tested and working. It is only needed during the test,
so its area does not matter. This RTL holds that logic plus the post-processing
that turns the two serial result streams into a list of faulty blocks. The
blocks under test are outside the RTL: `bist_top` drives their common input bus
and reads their outputs through ports.

## The two pairings

Blocks sit on a grid of `ROWS` x `COLS` sites. Columns are C1..C4 from the left
and rows R1..R4 from the bottom. A block's physical index is
`b = col*ROWS + row`, counting from zero, so C1R1 is 0 and C3R3 is 10 on a
4 x 4 grid. Each configuration puts the blocks in a chain order; positions
`2k` and `2k+1` of that order form pair `k`, which is compared by detector `k`.

**Meander pairing (default, `MAP_ALGO = MAP_MEANDER`).**
- Configuration 0 follows a vertical meander: up C1, down C2, up C3, and so on.
- Configuration 1 follows a horizontal meander: right along R1, left along R2,
  and so on.

The grids below give each block's position in the chain:

```
configuration 0 (vertical)        configuration 1 (horizontal)
      C1  C2  C3  C4                    C1  C2  C3  C4
R4     3   4  11  12              R4    15  14  13  12
R3     2   5  10  13              R3     8   9  10  11
R2     1   6   9  14              R2     7   6   5   4
R1     0   7   8  15              R1     0   1   2   3
```

Take a fault in C3R3 as an example:
- Configuration 0: C3R3 is at position 10, so pair 5 fails. Pair 5 is C3R3 with C3R4.
- Configuration 1: C3R3 is again at position 10, so pair 5 fails. This time
  pair 5 is C3R3 with C4R3.
- C3R3 is the only block in both failing pairs, so it is the one reported.

With an even number of rows and columns, the first configuration pairs only
vertical neighbours and the second only horizontal ones. A faulty block
therefore always ends up with a different partner in each run.

**Partition pairing (`MAP_ALGO = MAP_PARTITION`).** Blocks are labelled
`0..n-1` by their physical index.
- Configuration 0 uses pairs `(i, i+1)` with `i` even.
- Configuration 1 uses pairs `(q, (q+1) mod n)` with `q` odd. This includes the
  wrap-around pair `(n-1, 0)`.

Both pairings need an even number of blocks; an assertion rejects an odd count.
All pairing arithmetic is in the constant functions `pos_of`, `pair_of` and
`member_of` of `bist_pkg`. The rest of the design uses only these functions, so
another mapping can be added there.

On a real FPGA the two configurations are two bitstreams with different
placements. In the RTL both wirings exist side by side in `pair_router`. The
`cfg_sel` input, sampled when a run starts, picks one of them, which stands in
for reloading the device.

## One test run

```
go  ─┐
     └ clear flags, latch cfg_sel
START  high for TEST_LEN = NUM_OPS * PATS_PER_OP cycles   (default 4*64 = 256)
       flush: 1 + CORE_LAT cycles, until the last outputs are compared
DONE   high for CHAIN_LEN = N/2 * CELL_W cycles            (default 8*3 = 24)
finished  high until the next go
```

A run takes `TEST_LEN + 1 + CORE_LAT + CHAIN_LEN` cycles from the cycle after
`go` until `finished` (282 with the defaults).

- **Stimulus (`pattern_generator`).** While START is high, one vector is
  registered onto the broadcast bus every cycle.
  - The operand part `core_din` comes from a maximal-length Fibonacci LFSR:
    x^36 + x^25 + 1 at the default 36 bits.
  - The control part `core_op` comes from a small state machine. It holds
    operation 0 for `PATS_PER_OP` vectors, then operation 1, and so on.
  - While START is low the LFSR and the state machine return to their start
    state. Both configurations therefore apply exactly the same sequence.
- **Compare window.** `cmp_en` is START delayed by `1 + CORE_LAT` cycles: one
  cycle for the pattern register and `CORE_LAT` for the blocks. The window
  therefore covers exactly the outputs produced by test vectors. The blocks must
  answer `CORE_LAT` cycles after a vector appears on the bus.
- **Result shift.** During DONE the error registers form one shift register,
  and its last bit drives `scan_out`, the serial result pin.

## Error detector and scan chain

Each pair has one `error_detector`: a wide comparator, a mode multiplexer and a
small register. The register holds `CELL_W` bits:
- bit 0 is the error flag;
- with `CAPTURE_OP = 1` (default), bits `CELL_W-1:1` hold the operation that
  produced the first mismatching output. This is the failure mode.

| done | clear | behaviour |
|------|-------|-----------|
| x    | 1     | register cleared (one cycle after `go`) |
| 0    | 0     | on the first mismatch while `cmp_en` is high: `{op, 1}` is stored; after that, further mismatches change nothing (sticky) |
| 1    | 0     | shift: takes `scan_in` into bit 0 and passes its top bit to `scan_out` |

The operation stored is the bus operation delayed by `CORE_LAT`, so it is the
operation that actually produced the compared output.

`detector_array` chains the detectors. Detector 0's `scan_in` is tied to 0,
and the last detector drives the pin. The stream therefore carries the last
detector's `{op, flag}` first, MSB first, and detector 0's last. After
`CHAIN_LEN` shifts the chain image sits in the receiving shift register with
detector `k` in bits `k*CELL_W +: CELL_W`. The chain is empty again at that
point.

## Diagnosis

`result_collector` listens only to DONE and `scan_out`, as an external tester
would. It deserialises each run's stream and stores it under the run's
configuration. A stream whose length is not exactly `CHAIN_LEN` is discarded.

`fault_locator` is purely combinational. Once both results are present
(`diag_valid`), it computes:
- `suspect[b] = fail0[pair_of(0,b)] & fail1[pair_of(1,b)]` for every block;
- `n_suspect`, the number of blocks reported as faulty;
- `n_fail0` and `n_fail1`, the number of failing pairs in each run;
- `suspect_op0` and `suspect_op1`, the operation recorded by each block's pair
  in each run.

A reset clears both stored results and starts a new diagnosis session.

**Limits of the intersection.**
- A single faulty block is always isolated exactly.
- Two or more faults can add false suspects. For example, if two faulty blocks
  are paired with the same healthy block, once in each configuration, that
  healthy block is reported too.
- Every faulty block whose fault shows up in both runs is in the suspect
  list. A fault is missed if the stimulus never exercises it, or if its partner
  has an identical fault, which the comparison cannot see.

## Interface of `bist_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `go` | in | 1 | start a run (accepted when idle or finished) |
| `cfg_sel` | in | 1 | configuration of the run being started |
| `start`, `done`, `finished` | out | 1 | START, DONE, run complete |
| `scan_out` | out | 1 | serial result pin |
| `core_din` | out | `DIN_W` | operand bus to every block under test |
| `core_op` | out | `OP_W` | operation bus to every block under test |
| `core_dout` | in | `N x DOUT_W` | block outputs, indexed by physical index |
| `pair_flags`, `pair_ops` | out | `N/2`, `N/2 x OP_W` | live detector contents (valid until DONE shifts them out) |
| `result_valid` | out | 2 | result of configuration 0 / 1 stored |
| `diag_valid` | out | 1 | both results stored |
| `suspect` | out | `N` | blocks reported as faulty |
| `suspect_op0/1` | out | `N x OP_W` | failure mode of each block, per configuration |
| `n_suspect`, `n_fail0`, `n_fail1` | out | counts | |

Parameters, with their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS`, `COLS` | 4, 4 | grid size; the 4 x 4 grid of the worked example |
| `DIN_W`, `DOUT_W` | 36, 48 | operand bus and block output widths (this design's choice) |
| `OP_W`, `NUM_OPS` | 2, 4 | operation code width and number of operations exercised |
| `PATS_PER_OP` | 64 | vectors per operation |
| `CORE_LAT` | 1 | block output latency in cycles; must be at least 1 |
| `CAPTURE_OP` | 1 | record the failing operation next to each flag |
| `MAP_ALGO` | `MAP_MEANDER` | pairing algorithm |
| `SEED` | `64'h9E3779B97F4A7C15` | LFSR seed, truncated to `DIN_W` |

Supported LFSR widths are 8, 16, 18, 24, 32, 36, 48 and 64 bits. They are
tabulated in `bist_pkg::lfsr_taps`. Any other width gets a two-tap polynomial
that is not guaranteed to be maximal length.

Device-scale arrays fit by overriding `ROWS` and `COLS`. The cost is one
comparator and `CELL_W` flip-flops per pair. DONE stays high for `N/2 * CELL_W`
cycles. Two examples:
- 512 DSP slices as 8 x 64: 256 detectors and a 768-cycle shift.
- 320 block RAMs as 8 x 40: 160 detectors and a 480-cycle shift.

## Files

| file | contents |
|------|----------|
| `rtl/bist_pkg.sv` | pairing enum, mapping functions, LFSR tap table |
| `rtl/pattern_generator.sv` | LFSR operands and operation-sequencing FSM |
| `rtl/test_controller.sv` | START / flush / DONE sequencing |
| `rtl/error_detector.sv` | comparator, sticky flag, operation record, scan stage |
| `rtl/pair_router.sv` | pair selection for both configurations |
| `rtl/detector_array.sv` | router, replicated detectors, scan chain, operation delay line |
| `rtl/result_collector.sv` | deserialiser, one result per configuration |
| `rtl/fault_locator.sv` | intersection of the two results |
| `rtl/bist_top.sv` | top level |
| `tb/core_model.sv` | behavioural DSP-like block under test with stuck-at fault injection |
| `tb/bist_harness.sv` | end-to-end driver and checker for one `bist_top` |
| `tb/tb_*.sv` | self-checking testbenches |

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends a run that
hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/bist_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

Replace `tb_bist_top` with any other testbench name.

- **`tb_bist_top`** runs `bist_top` at its default parameters with sixteen
  block models and twelve diagnosis sessions:
  - a fault-free device;
  - a fault at C3R3;
  - a fault exercised by only one operation;
  - sessions with two or three random faults.

  For each session it works out independently which pairs must fail and which
  blocks must be reported. It checks the live flags, the serial stream, the
  counts, the suspects, the recorded operations and the cycle counts of START,
  DONE and the whole run. It also counts each mechanism: both configurations,
  START, DONE shifting, mismatch detection, single-fault isolation, multi-fault
  sessions, operation recording and clean passes. A mechanism that never
  happened counts as a failure.
- **`tb_bist_workloads`** does the same with 512 blocks (8 x 64), with 320
  blocks (8 x 40), with the partition pairing on 4 x 4, and with one-bit
  detectors (`CAPTURE_OP = 0`) on 4 x 4.
- **Unit testbenches** `tb_pattern_generator`, `tb_test_controller`,
  `tb_error_detector`, `tb_pair_router`, `tb_detector_array`,
  `tb_result_collector` and `tb_fault_locator`:
  - check LFSR maximality at 8 bits;
  - check the exact START/`cmp_en`/DONE waveform;
  - compare detector behaviour against a reference model;
  - check the pairings against meanders walked step by step, plus the C3R3
    example;
  - check the stream format and the intersection.

The block model in `tb/core_model.sv` registers one of four operations:
- 0: `a*b`
- 1: `p + a*b`
- 2: pass-through
- 3: `p + din`

A fault forces one output bit to 1 during a chosen set of operations. The model
exists only to give the BIST something to compare. The BIST does not depend on
what the blocks compute, only on identical blocks giving identical outputs for
identical inputs.

## Design choices and departures

These follow the method: broadcast stimulus, pairwise comparison with a sticky
flag, DONE turning the flags into a serial scan chain whose length sets how
long DONE stays high, recording the active operation at a failure, the two
pairing algorithms, and the intersection rule.

These are this design's own choices:
- all bus widths, the operation set, the test length and the LFSR polynomial;
- the go/finished handshake, the flush delay and the clear pulse;
- the chain order and the `{op, flag}` cell layout;
- column-major indexing with C1R1 at index 0.

The method also allows other choices that are **not** built:
- vectors stored in block RAM, or stimulus from an on-chip processor;
- a MISR signature register next to the comparators, to reduce the chance that
  identical faults in both blocks of a pair mask each other;
- the follow-up cycle-by-cycle screening of the located blocks against expected
  values;
- reconfiguring the device to avoid the located blocks.

Departures from a literal FPGA flow:
- **Configuration switch.** The two configurations are one netlist with a
  configuration select, not two placements.
- **Post-processing in logic.** Collecting and intersecting the two results is
  done in logic, not by software on a host.
- **Trusted BIST logic.** Like the method, the design assumes that the
  general-purpose logic and routing carrying the BIST are already known good.
  Nothing checks the BIST logic itself.

The assertions in `bist_top` use `rst_n` synchronously in `disable iff`, while
the flip-flops use it asynchronously. Verilator notes this as a mixed
synchronous/asynchronous reset; it is harmless.
