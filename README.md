# Path delay testing of routed LUT-based FPGA designs

An FPGA that will run one specific design only needs to be fast enough on the
paths that design actually uses. This RTL implements on-chip test circuitry for
such design-specific path delay tests. Each target path (flip-flop to
flip-flop) stays where the router put it. Its LUTs are rewritten so that the
path only passes a transition through, with a controllable inversion at every
binate LUT. A small test circuit then sends rising and falling transitions down
the path at the rated clock. It does this for **every combination of
inversions**, and flags an error if any transition fails to reach the
destination flip-flop within one clock period.

A LUT's delay does not depend on the function it holds. So the rewritten path
has the same delay as the original. Trying all inversion combinations
guarantees that the slowest one is among them, without anyone having to work
out which side-input values make the path slowest. The price is pessimism: a
combination that never occurs in normal operation can still fail the test.

Two configurations are provided, side by side in `pdt_top`:

* **Single path**: one target path with its own test circuit.
* **Multi-phase**: several target paths share one configuration. In each
  *phase*, one path to every destination is selected and all selected paths are
  tested in parallel. The instance built here is the first test session of a
  12-LUT example circuit: 8 paths, 2 destinations, 4 phases.

The same test circuit, without a path selector, also implements the
**single-phase** method, which tests disjoint paths in parallel
(`tb/tb_single_phase.sv`).

The method, its rewrite rules, the test schedule and the example circuit are
published work. The RTL, the session control around it and every choice listed
under "Departures and choices" are this implementation's own.

## Terms

| term | meaning |
|---|---|
| target path | a flip-flop-to-flip-flop path whose delay must be below the clock period T |
| test | one transition (rising or falling) applied at the path sources and checked at the destinations |
| phase | all tests, both directions and every inversion combination, for one set of simultaneously tested paths: 2 x 2^K tests |
| session | all phases of one configuration |
| binate / unate | a LUT is positive (negative) unate in an input if raising that input can only raise (lower) the output; otherwise it is binate |
| 1-path / 2-path LUT | a LUT with one or two target paths entering it |
| main path / side path | in the multi-phase method each destination has one main path; each side path joins the main path at a 2-path LUT and then follows it |

## How a LUT is rewritten (`test_lut`, `pdt_pkg`)

The new truth table is computed at elaboration from the LUT's original
contents (`ORIG_INIT`) and the original pin(s) of its on-path input(s):

| original function in on-path input a | rewritten LUT (1-path) |
|---|---|
| positive unate | f = a |
| negative unate | f = ~a |
| binate | f = a ^ p |

For a 2-path LUT, a lies on the main path and b on the side path:
f = ~s·(term for a) + s·(term for b). Each term is formed by the same table, so
two binate inputs give f = s ? b^p : a^p.

`p` is the LUT's inversion-control input and `s` its path-select input. Both
are wired to LUT inputs that carry no target path. In the rewritten LUT the
pins are ordered a, b, p, s (pins 0 to 3). `lut4` is the LUT itself:
o = INIT[i].

## Test schedule (`sequence_generator`, `test_controller`)

This is the core of the design. The sequence generator is a three-flip-flop
ring with an inverter in the loop. After a clear it steps through these states
(y1 y2 y3), repeating with period 6:

```
edge after start :  0    1    2    3    4    5    6    7    8    9   ...
y1 y2 y3         : 000  100  110  111  011  001  000  100  110  111
s (= y3)         :  0    0    0    1    1    1    0    0    0    1
```

The source flip-flops of all target paths load `s_next`, so they always hold
the same value as y3. For one inversion combination:

| edge | event |
|---|---|
| 3 | s rises: rising test starts; the destination has been stable since edge 1 |
| 4 | destination captures the result, which must already have arrived |
| 5 | response analyzers judge the rising test (`sample` is 1 in state 011) |
| 6 | s falls: falling test starts; counter enable E is 1 in state 000 |
| 7 | destination captures the falling result; the inversion counter steps |
| 8 | response analyzers judge the falling test (`sample` in state 100) |
| 9 | next rising test, with the new inversion combination |

The counter steps at edge 7. The new inversions then have one period to
settle in the counter and one more period to reach the destinations before the
transition at edge 9. This is why s changes only every three periods: one
period for the test, one for the counter to change, one for the change to
propagate. Counter-to-destination paths must therefore be faster than 2T.
The path under test must be faster than T.

Session control (own design): a one-cycle `start` clears everything and
starts the ring in state 000. `sample` and E are held off until the first
rising transition has gone out, since the first state-100 sample of a session
would judge a test that never ran. When E coincides with the last inversion
combination of the last phase, the following sample is the session's last.
`done` is then set and the ring stops. For a session of N = 2^K x phases
combinations, **`done` rises 6N + 2 clock edges after the start edge**. That
is 26 edges for the single-path instance (K = 2) and 386 for the multi-phase
instance (K = 4, 4 phases).

## Inversion counter (`inversion_counter`)

The counter is a de Bruijn counter: a K-bit Fibonacci LFSR whose feedback is
complemented when all bits except the MSB are zero. This splices the all-0
state into the maximal-length cycle, so 2^K steps visit every combination
exactly once and return to 0. `last` marks the state before the wrap. Taps
come from a standard maximal-length table for K = 2..16; K = 1 is a toggle.

Counter bits are assigned by LUT level. In the multi-phase network, all
control inputs at the same level share one counter bit. A LUT's level is one
more than the highest level among its inputs, so no two LUTs on a path share a
bit. In `path_under_test` the binate LUTs use p[0], p[1], ... in path order.

## Path selection in the multi-phase method (`path_selector`, `example_session1_paths`)

The selector is a shift register whose serial input is the NOR of all its
bits. It produces 000, 100, 010, 001 (sel[0] written first) and steps together
with the counter's wrap. All zeros selects the main paths. A single 1 in
position i selects side path i+1 **of every destination at once**. A side path
is selected simply by switching the 2-path LUT where it joins its main path.
Transitions are applied to all sources in every phase, but in the unselected
paths they stop at the first 2-path LUT. The selected paths to different
destinations are disjoint, so they cannot interfere. Every destination has the
same number of paths, so every test produces a transition at every destination.

The example network (session 1):

| phase | sel | path to y | joins at | path to z | joins at |
|---|---|---|---|---|---|
| 0 | 000 | d A E J L y (main) | | h C G K M z (main) | |
| 1 | 100 | e A E J L y | A | j C G K M z | C |
| 2 | 010 | c E J L y | E | n D G K M z | G |
| 3 | 001 | f B F J L y | J | q H K M z | K |

* 2-path LUTs: A, C (sel[0]); E, G (sel[1]); J, K (sel[2]).
* 1-path LUTs: B, D, F, H, L, M.
* Levels (counter bit): A B C D H → p[0]; E F G → p[1]; J K → p[2]; L M → p[3].
* By default every LUT is binate (XOR4). `ORIG_INIT` lets you give other
  original functions, and the rewrite rules adapt.

## Response analysis (`response_analyzer`, `test_circuit`)

Each destination has a response analyzer. FF-A copies the destination
flip-flop every cycle, so in the cycle after a capture it holds the value from
before. When `sample` is 1, the error flip-flop is set if FF-A equals the
destination, meaning no transition arrived in time. The error flip-flop is
cleared only when a session starts. The per-destination flags (`err_dest`) are
ORed into `err`.

`test_circuit` groups the sequence generator, counter, selector, controller
and analyzers for one configuration:

* `NSEL = 0`, `NDEST = 1`: single path.
* `NSEL = 0`, `NDEST > 1`: single-phase method.
* `NSEL > 0`: multi-phase method.

## Top level (`pdt_top`)

| port | dir | meaning |
|---|---|---|
| clk, rst_n | in | clock (period T, rising edge); asynchronous reset, active low |
| sp_start / mp_start | in | one-cycle pulse: start a session |
| sp_busy, sp_done / mp_busy, mp_done | out | session running / finished (done held until the next start) |
| sp_error / mp_error | out | 1 if any test of the last session failed |
| mp_err_dest | out | per-destination error, [0] = y, [1] = z |
| mp_sel | out | current phase (path selector) |

Parameters and their sources:

| parameter | default | source |
|---|---|---|
| `test_circuit.K` | 4 | the example's four-bit counter |
| `test_circuit.NSEL` | 3 | the example's three side paths per destination |
| `test_circuit.NDEST` | 2 | the example's destinations y and z |
| `inversion_counter.WIDTH` | 4 | the example's four-bit counter |
| `path_selector.WIDTH` | 3 | the example's three side paths per destination |
| `path_under_test` (NLUT, ORIG_INIT, ON_PIN) | XOR, AND, NAND, XOR path | own choice; exercises all three rewrite rules, 2 binate LUTs |

## Departures and choices

* All flip-flops use the rising clock edge. The published single-path circuit
  is drawn for a negative-edge design and is converted by replacing every
  negative-edge part with a positive-edge one; that is the variant built here.
* The error flip-flop is sampled with a clock enable, not a gated clock.
* start/busy/done, the suppression of the first sample, and stopping the ring
  after the last test are additions.
* The selector steps at the counter's wrap. This gives the new selection the
  same 2T settling time as a new inversion combination.
* Error flags come out in parallel (`err_dest`) and as an OR. The alternative
  of chaining per-path error flip-flops into a scan chain is not built.
* Reconfiguring the FPGA is outside the RTL: a configuration here is fixed by
  parameters at elaboration. So is choosing and partitioning the target paths
  (timing analysis and the path-selection procedures).
* Only the first test session of the example circuit is built as a path
  network. Later sessions would reuse `test_circuit` with smaller `NSEL`, but
  need their own rewritten networks.
* In RTL simulation every combinational path has zero delay, so a fault-free
  run never fails. The testbenches model a delay fault by forcing a
  destination flip-flop to load the path output of one cycle earlier.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_sequence_generator`: state sequence, s period 6, rise at edge 3 and fall at edge 6, hold.
* `tb_inversion_counter`: all 2^W states visited once for W = 1, 2, 3, 4, 8, 12; `last`; hold.
* `tb_path_selector`: 000/100/010/001 sequence for widths 1, 3 and 5.
* `tb_test_controller`: E and sample on exactly the scheduled edges; done at 6N + 2.
* `tb_response_analyzer`: random transitions, samples and clears against a reference.
* `tb_test_lut`: rewrite rules on functions of known unateness, all 16 patterns.
* `tb_path_under_test`, `tb_example_session1_paths`: destination values against
  per-path inversion parity, for every phase.
* `tb_test_circuit`: complete sessions on behavioural paths. Checks the latency
  and that every combination is applied in every phase. Faults in one
  combination, one direction and one phase set the flag of the right
  destination only.
* `tb_single_phase`: three disjoint paths tested in parallel.
* `tb_pdt_top`: both configurations at their default sizes, clean and faulty
  sessions, destination values checked against the selected path. It counts
  rising and falling tests, counter steps and wraps, samples per phase, error
  detections and completed sessions.

To simulate with Verilator, for example the top level:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/pdt_pkg.sv tb/tb_pdt_top.sv --top-module tb_pdt_top -o sim
./obj_dir/sim
```

Replace `tb_pdt_top` with any other testbench name. Every run finishes in well
under a second.

## Changing the design

* **Another single path.** Set `path_under_test`'s `NLUT` (up to 16),
  `ORIG_INIT` (16 bits per LUT, LUT 0 in the low bits) and `ON_PIN` (2 bits per
  LUT). Size the test circuit's `K` to the number of binate LUTs.
* **Another multi-phase session.** Write a network like
  `example_session1_paths` from `test_lut` instances, then instantiate
  `test_circuit` with `K` = the number of LUT levels (which covers the largest
  number of binate LUTs on any target path), `NSEL` = side paths per
  destination and `NDEST` = the number of destinations.
* `K` above 16 needs more entries in `pdt_pkg::lfsr_taps`.
