# Single-event-upset test structure: unmitigated, DMR + SET filter, and full TMR shift registers

When an energetic particle strikes a flip-flop in an SRAM FPGA it can flip the stored bit
(a single event upset, SEU). This design is a radiation test structure that measures how well
two mitigation schemes suppress such upsets compared with no mitigation at all. It places
three kinds of long serial shift-register strings side by side in one device:

1. **Unmitigated** — a plain chain of D flip-flops.
2. **DMR + SET filter** — every stage is duplicated, and the two copies are merged by an
   AND-OR filter that refuses to change its output while the copies disagree.
3. **Full TMR** — the whole string, including its clock, reset and input, is triplicated,
   with majority voters between every stage.

Each kind is built twice (two identical replicas fed with the same serial data). A monitor
XORs the outputs of the two replicas of each kind; any difference means an upset reached one
replica's output. A counter per kind counts those events. Under a particle beam, or under
fault injection in simulation, the three counts show directly how many upsets each scheme
let through.

Shift registers are used rather than a realistic application circuit because they avoid
*logic masking*: every flipped bit travels unchanged to the output, so each upset that is not
mitigated is observed exactly once.

The structure follows a proton-beam experiment on a Xilinx Artix-7 (XC7A50T) in which the
three implementations were compared. The mitigation schemes, the XOR monitor and the
count-per-detection logging follow that experiment; string length, replica count, the exact
placement of the filter, timing of the filter feedback, reset and the counter details are
choices made here and are listed below.

## Block structure

```
seu_test_system                       (top: device under test + monitor + counters)
├── seu_test_structure  u_dut         (REPLICAS copies of each implementation)
│   ├── unmitigated_shift_register    implementation 1
│   ├── dmr_filter_shift_register     implementation 2
│   │   └── set_filter                one AND-OR filter per stage (vectorised)
│   └── tmr_shift_register            implementation 3
│       └── tmr_voter                 one voter per stage (vectorised)
├── xor_comparator   ×3               replica 0 vs replica 1, latched
└── upset_counter    ×3               counts rising edges of the latched mismatch
seu_pkg                               defaults, impl_e index, maj3()
```

Default sizes: `DEPTH = 301` stages per string, `REPLICAS = 2`, `COUNT_W = 32`. With these
defaults the strings hold 602 (unmitigated), 1806 (DMR + filter) and 1806 (TMR) flip-flops,
which matches the 602 / 1790 / 1802 flip-flops the original Artix-7 implementations used. The
whole top synthesizes to about 4.3 k flip-flop bits.

Output and count vectors of the top are indexed by `seu_pkg::impl_e`:
0 = unmitigated, 1 = DMR filter, 2 = TMR.

## The DMR + SET filter stage (the least obvious part)

Plain DMR only detects a disagreement between two copies; it cannot tell which copy is right.
The filter turns the pair into something that *holds* instead of passing a disagreement:

```
y = (a AND b)  if the held output q is 0
y = (a OR  b)  if the held output q is 1
  = a&b | q&(a|b)  = majority(a, b, q)
```

If both copies agree, `y` takes their value. If they disagree, `y` keeps `q`, the value it had
last cycle. In the original circuit the output is fed back asynchronously through a
multiplexer (later simplified to AND/OR gates); here `q` is a flip-flop clocked with the
string, so the stage has three flip-flops (`a`, `b`, `q`) and no combinational loop. The
filtered bit of stage *i* feeds both copies of stage *i+1*.

What this means for an upset of one copy of stage *i*:

| data at stage *i*                          | result                                               |
|--------------------------------------------|------------------------------------------------------|
| new bit equals the previous bit            | masked — the held value is already correct           |
| new bit differs from the previous bit      | stage repeats the previous bit once; one wrong bit reaches the output |
| upset hits the filter state `q`            | always masked — `a` and `b` agree and override `q`   |

So the scheme is a *transient filter*, not a full corrector: its protection depends on how
often the data toggles. This is consistent with the measurements that motivated the design,
where DMR + filter removed roughly 93 % of upsets and TMR roughly 97 %.

## Full TMR string

`tmr_shift_register` takes three clocks, three resets and three input copies. Copy *k* of
stage *i* loads the majority of the three copies of stage *i−1* on `clk[k]`. A single upset
is outvoted at the next stage and overwritten in its own copy on the next edge, so it never
reaches `dout`. Two copies of the same stage upset in the same cycle defeat the vote and one
wrong bit comes out. One reset copy asserted alone is also outvoted. The three clocks must be
copies of one clock (same frequency and phase); in the top they are separate ports so that
they can be driven from separate clock pins as in a fully triplicated FPGA design.

## Monitor and counting

`xor_comparator` registers `a ^ b` (one edge of latency). `upset_counter` keeps the previous
flag and adds one on each rising edge, so a mismatch lasting several cycles counts once;
`clear` zeroes the count and wins over a simultaneous edge; the count saturates rather than
wrapping. An assertion checks that the count only holds, steps by one or returns to zero. In the original experiment the counting was done in host software reading the
monitor through a data-acquisition unit; here it is in hardware so that the whole chain can be
simulated.

Consequences worth knowing:

- An identical upset in both replicas at the same stage and cycle produces no mismatch and
  is not counted (the testbench checks this).
- Two errors arriving at the comparator in adjacent cycles merge into one count.

## Timing

All strings have a latency of `DEPTH` clock edges from `din` to `dout` (the filter and the
output voter are combinational). For an upset that lands in stage *i* at clock edge *E*:

| signal                 | changes at edge      |
|------------------------|----------------------|
| `dout` of that replica | *E* + `DEPTH` − 1 − *i* |
| `mismatch`             | *E* + `DEPTH` − *i*     |
| `upset_count`          | *E* + `DEPTH` − *i* + 1 |

All resets are synchronous and active-low and clear every flip-flop to 0.

## Fault injection

Every string has an `upset` input with one bit per flip-flop. A bit high at a clock edge
inverts the value that flip-flop captures at that edge, which models a particle strike just
after the edge. Layouts:

- `unmitigated_shift_register.upset[DEPTH-1:0]` — stage *i* is bit *i*.
- `dmr_filter_shift_register.upset[2:0][DEPTH-1:0]` — `[0]` copy a, `[1]` copy b, `[2]` filter state.
- `tmr_shift_register.upset[2:0][DEPTH-1:0]` — `[k]` is copy *k*.
- The top brings these out per replica: `upset_unmit[r]`, `upset_dmr[r]`, `upset_tmr[r]`.

In hardware these inputs are tied to zero. They are an addition to the original structure,
made so that the mitigation can be exercised without a particle beam.

## Choices made here (departures and gaps)

- **String length and replicas.** Only flip-flop totals are known for the original; 2 × 301
  reproduces the unmitigated total exactly. The original replicated the strings with a
  generator program up to an unknown count.
- **What the monitor compares.** Two identical replicas of each implementation are compared;
  the original says only that replicated circuit outputs were XORed.
- **Filter placement and feedback.** One filter per stage, feedback through a flip-flop. The
  flip-flop count this gives (3 per stage) agrees with the original's roughly threefold
  flip-flop count for this implementation.
- **TMR voting granularity.** Voters between every pair of stages, voted input, single voted
  output. The original's resource report shows a single global clock buffer for the
  whole device even though its TMR is described as covering the clocks; here the TMR string
  has three clock inputs, which may all be driven from one clock.
- **Voter.** A true two-of-three majority; a single OR or XNOR gate, sometimes called a voter,
  cannot outvote a wrong copy.
- **Data source.** `din` is a top-level input; the test data pattern of the original is not
  known.
- **Single clock for DUT and monitor.** The original had the monitor on a second FPGA joined by
  a ribbon cable; here both run on `clk`.
- **Not modelled:** the evaluation boards, the data-acquisition hardware and the beam
  instrumentation, none of which has logic of its own in this structure.

## Testbenches

Each testbench checks its block against values computed independently inside the testbench
and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_tmr_voter` | all one-bit cases and random vectors against a population count |
| `tb_set_filter` | random copy pairs and state upsets against the "agree → pass, disagree → hold" rule |
| `tb_xor_comparator` | XOR truth table, one edge of latency |
| `tb_upset_counter` | edge counting, clear priority, saturation |
| `tb_unmitigated_shift_register` | latency `DEPTH`, every upset reaches the output, random upsets vs a bit model |
| `tb_dmr_filter_shift_register` | latency, masking in a constant stream and of the state, loss at a transition, random upsets vs a bit model |
| `tb_tmr_shift_register` | single upsets never visible, double upsets visible, lone reset copy outvoted |
| `tb_seu_test_structure` | all replicas equal the delayed input without upsets; which implementations show a transition upset |
| `tb_seu_test_system` | end to end at default size: count latency, every masking/counting case, common-mode upset, clear; fails if any case never happened |
| `tb_seu_beam_runs` | default size: replays the upset counts of six beam runs (5–20 nA, 7.8–56.9 MeV) and checks that the counters hold exactly those counts |

The last two run the top with all parameters at their defaults and finish in well under a
second.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_seu_test_system \
    -y rtl -y tb +libext+.sv rtl/seu_pkg.sv tb/tb_seu_test_system.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench. To change sizes, override `DEPTH`,
`REPLICAS` and `COUNT_W` on `seu_test_system` or change the defaults in `rtl/seu_pkg.sv`.
`REPLICAS` must be at least 2 (an elaboration-time assertion in the top checks this).
