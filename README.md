# DARTS: fault-tolerant distributed clock generation without a clock tree

A large chip normally distributes one crystal-derived clock to every corner
through a carefully balanced tree. This design replaces that tree. Each
functional unit of a system-on-chip gets a small **TS-Alg** (tick
synchronisation) unit that makes its clock locally, from asynchronous logic
only. The N units are joined by the **TS-Net**: one wire per unit, broadcast to
all the others. The units exchange nothing but clock edges, yet they keep
their clocks within a bounded number of ticks of one another. They do so even
if up to F units fail in any way (crash, stuck output, or inconsistent
spurious edges), provided N >= 3F + 2. The default system has N = 5 and F = 1.

The scheme is a hardware form of the Srikanth–Toueg clock synchronisation
algorithm. Each unit follows two rules:

* **progress (GEQ, 2F+1):** send tick k+1 once at least 2F+1 other units have
  sent tick k. At least F+1 of them are correct, so every correct unit will
  follow soon;
* **catch-up (GR, F+1):** send the next tick once at least F+1 other units
  are *ahead*. At least one of them is correct, so catching up is safe.

The RTL follows the DARTS design described in the master's thesis
"Fault-Tolerant Distributed Clock Generation in VLSI Systems-on-Chip"
(Vienna University of Technology, 2006), called "the original design"
below; the last section lists where it fills gaps or departs from it.

The clock runs as fast as the wires and gates allow. There is no frequency
setting: the period follows temperature, voltage and layout.

## Ticks as transitions

Hardware cannot keep an ever-growing tick number, so the number is never
stored. Each tick is a single **transition** on the unit's wire: odd ticks
are rising edges and even ticks falling edges. Tick 0 is the low level
present after reset. A wire is therefore a *zero-bit message channel*: it
carries only when an event happened, and its events alternate.

For each other unit q, unit p keeps a pair of FIFOs of transitions
(`pm_counter`, the "+/- counter"):

* the **remote pipe** queues q's ticks as they arrive on q's wire;
* the **local pipe** queues p's own ticks, fed back through a short local
  wire;
* a **Diff-Gate** deletes a tick once both pipes hold it, so only the
  *difference* between q's and p's tick counts is stored. The difference
  is bounded, so pipelines of S stages suffice.

The **PCSG** (pipe compare signal generator) turns a pipe pair into four
level signals. It raises them only while the local pipe holds exactly one
tick (p's latest, already matched):

| signal | meaning (r = ticks received, p's latest tick has the stated parity) |
|---|---|
| `geq_o` / `geq_e` | q has sent at least p's latest tick, which is odd / even |
| `gr_o` / `gr_e`   | q has sent more than p's latest tick, which is odd / even |

Once the local pipe holds one tick, the remote pipe can never be behind.
"q is ahead" then simply means "a remote transition is waiting". The
parity of p's latest tick is the local pipe's output level. So the PCSG is
four AND gates (`rtl/pcsg.sv`).

### Why odd and even are kept apart

The logic has no clock to say "this GEQ belongs to tick k". A status signal
still high from tick k-1 must not release tick k+1. The status is
therefore split by parity, and each parity feeds its own pair of threshold
gates. The odd gates release falling edges (even ticks) and the even gates
release rising edges (odd ticks). The tick stage (`tick_broadcast`) sends
the next tick only when a gate of the current parity has fired *and* both
gates of the previous parity have dropped again. It is a C-element whose
inputs are the AND of the two low-active odd gates and the OR of the two
high-active even gates:

* it rises when an even gate is active and no odd gate is;
* it falls when an odd gate is active and no even gate is;
* otherwise it holds.

### Remote-first deletion

The Diff-Gate always acknowledges the remote pipe before the local one.
Consider a matching pair being deleted. If the local tick went first, the
PCSG would for a moment see "local pipe holds one tick" together with a
remote transition still waiting, and would raise GR by mistake. Deleting
the remote tick first rules this glitch out. In `rtl/diff_gate.sv`, the
remote acknowledge is a C-element of both pipe outputs, and the local
acknowledge is a C-element of the local output and the remote acknowledge.
An immediate assertion in the same file checks the order at the end of
every time step: the local acknowledge may differ from the remote one only
while the local pipe is offering the matching transition. With `--assert`,
a gate that lets the local side run ahead stops the simulation.

## Hierarchy

```
darts_top                 N units + N(N-1) TS-Net wires + N local wires
├── zb_channel            wire with transport delay (behavioural model)
└── ts_alg                one unit
    ├── pm_counter  x N-1 one per other unit
    │   ├── elastic_pipeline x2   remote and local pipe, S C-element stages
    │   ├── diff_gate             2 C-elements, remote first
    │   └── pcsg                  4 AND gates
    ├── threshold_rom x4  GEQ odd/even (>= 2F+1), GR odd/even (>= F+1)
    └── tick_broadcast    AND / OR / C-element
c_element                 basic cell of pipelines, Diff-Gate, tick stage
darts_pkg                 pcsg_t, ROM-content and wire-delay functions
```

* **`elastic_pipeline`** is a micropipeline without data latches. Stage
  i is a C-element of stage i-1 and the inverted stage i+1. A stage holds a
  transition while it differs from its successor. The consumer end uses a
  two-phase request/acknowledge pair: a transition waits while
  `data_out != ack_in`. Up to S transitions fit. There is no backpressure to
  the sender (`ack_out` is left open), because a clock wire cannot wait.
* **`threshold_rom`** is a 2^(N-1) x 1 ROM addressed by the status vector.
  Entry a is 1 when a has at least K ones. The contents are computed during
  elaboration, so there is no table file. `ACTIVE_LOW` inverts the output
  for the odd gates.
* **`c_element`** copies its inputs to its output when they agree and
  holds otherwise. It is written as a latch enabled by `a == b`, with an
  asynchronous reset.

## Timing model and how to simulate it

All logic inside a unit is modelled **without delay**. The clock period comes
entirely from the wires (`zb_channel`). Each wire delivers every transition
after `D_PS` picoseconds, in order and with none lost (a transport delay).
Transitions closer together than the delay still all arrive. Wire delays
in `darts_top`:

* unit q to unit p:
  `D_REM_MIN_PS + D_REM_STEP_PS * ((3q + 5p + qp) mod 7)`, plus `D_FAR_PS`
  on the wires from units 2..N-2 to unit N-1, which models a unit placed
  far from most of the others;
* each unit's own feedback: `D_LOC_PS`.

With the defaults the wires take 8 to 40 ns and a tick comes every 18 ns,
i.e. a clock of about 28 MHz. The units stay within 2 ticks of each other;
the same tick leaves the five units at most 24 ns apart, most of it due to
the deliberately distant unit 4.

Hold `rst` longer than the longest wire delay, so that no transition from
before the reset is still in flight when it drops. Right after reset every
unit sends tick 1 (a rising edge), because the reset state already
satisfies the even progress rule.

Simulation needs Verilator 5 with timing support. From the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/darts_pkg.sv \
          tb/tb_darts_top.sv --top-module tb_darts_top -o sim
./obj_dir/sim
```

Lint reports the loops of C-elements as combinational loops (`UNOPTFLAT`).
They are the handshakes of the asynchronous logic and are intended. Verilator
settles them by iteration; `-Wno-fatal` keeps these warnings from
stopping the build. Any testbench in `tb/` builds the same way. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.

| testbench | what it establishes |
|---|---|
| `tb_darts_top` | full system at default parameters for 20 us. Checks: tick 1 at once; tick counts per unit within the wire-delay bounds; no gap over 60 ns; precision of 2 ticks at every tick. Also counts GEQ-released ticks, GR-released (catch-up) ticks, Diff-Gate removals and pipes holding two ticks, and checks that no pipe ever fills all S stages (at most 3 seen) |
| `tb_darts_fault` | 4 correct units and 1 faulty unit: crashed, stuck high, or Byzantine (different random edges to each receiver). The correct units keep ticking within 2 ticks of each other |
| `tb_darts_sweep` | four instances of `darts_top` with different wire-delay patterns (uniform 10 ns, 2..8 ns, 4..34 ns, a far unit with +30 ns): all keep running, within 2 ticks |
| `tb_darts_boot` | units leave reset at random times within the shortest wire delay (8 trials): all start and stay within 2 ticks |
| `tb_ts_alg` | one unit with scripted remote ticks: 2 remotes do not release a tick but 3 do; 1 remote ahead does not release one but 2 do (catch-up); the tick follows the third remote's edge within 0.1 ns |
| `tb_pm_counter` | random tick streams against a reference built from tick counts |
| `tb_elastic_pipeline`, `tb_diff_gate`, `tb_pcsg`, `tb_threshold_rom`, `tb_tick_broadcast`, `tb_c_element`, `tb_zb_channel` | each block against an independent reference model |

## Parameters

| parameter | default | where it lives | notes |
|---|---|---|---|
| `N` | 5 | `darts_top`, `ts_alg` | number of units; the published FPGA prototype used 5 |
| `F` | 1 | `darts_top`, `ts_alg` | tolerated faulty units; an assertion requires N >= 3F+2 |
| `S` | 4 | all pipeline levels | pipeline depth, see below |
| `D_LOC_PS`, `D_REM_MIN_PS`, `D_REM_STEP_PS`, `D_FAR_PS` | 2000, 8000, 2000, 20000 | `darts_top` | wire delays; this design's own values |

**Choosing S.** A correct pair of pipes never needs more than
S = floor((T_sim + max wire delay + Diff-Gate delay) / T_first) + 1
stages. Here T_sim is the largest spread between correct units sending the
same tick, and T_first the shortest time between two consecutive ticks of
the fastest unit. S depends only on the ratio of the slowest to the
fastest delays, not on the technology. For the default delays (40 ns
longest wire, about 18 ns per tick, spread about 20 ns) the formula gives
4. If you make the wires more uneven, recompute S; the end-to-end test
fails if any pipe fills up. The threshold ROMs support up to 13 units
(12 address bits).

## Synthesis and use in silicon

Apart from `zb_channel`, all modules are synthesizable, but they describe
**asynchronous** logic:

* C-elements appear as latches, and the pipelines and Diff-Gates as loops
  through them. A synthesis flow must keep the C-elements intact and
  hazard-free. Don't let it re-map them as ordinary latches with glitchy
  enables.
* The original design demands properties this zero-delay RTL cannot guarantee:
  - the PCSG and the threshold gates must be glitch-free;
  - transitions entering a pipeline must be spaced by more than a stage's
    internal loop delay;
  - the interlocking constraint must hold: the path from a tick, through
    the local pipe, the PCSG and a threshold gate, back to the tick stage
    must not be faster than the path that disables the previous parity's
    threshold.

  They are layout and timing constraints. Check them after place and
  route.
* `zb_channel` stands for a wire. In a netlist, replace it with a plain
  connection. Yosys' synthesis front end rejects its `fork`, and parsing
  and elaboration are unaffected.
* The threshold gates are ROMs, as in the original prototype, and grow as
  2^(N-1). For larger N a counting or adder-tree threshold would do the
  same job.

## Where this RTL departs from the source design or fills gaps

* **Diff-Gate circuit.** This design's own two-C-element version. It keeps
  the required remote-first order. It deletes a pair whenever both pipes
  offer a transition, which coincides with the published condition
  (remote count >= local count, and the local pipe holds more than one
  tick) wherever the PCSG looks.
* **PCSG gates.** Derived here from the pipes' request/acknowledge levels,
  as described above.
* **Threshold inputs.** The gates count the N-1 *other* units: 4 address
  bits for N = 5, not N. The rules count remote units, and N >= 3F+2 is
  exactly what lets 2F+1 correct remote units exist among N-1.
* **Local feedback.** One local feedback wire feeds all N-1 local pipes of a
  unit.
* **Reset.** An active-high asynchronous reset on every C-element. Tick 0 is
  the low level after reset, and every pipe holds "one even tick".
* **Wire delays and timing.** Fixed delays per wire and zero-delay logic.
  The 24 MHz and 4 ns skew measured on the FPGA prototype cannot be
  reproduced without its delays. The simulated system gives about 28 MHz
  and at most 2 ticks of skew.
* **Not included.**
  - The functional units that consume the clocks: `clk[N-1:0]` is where they
    connect.
  - The clock divider the architecture suggests for synchronous
    communication between functional units. Its ratio and interface are not
    specified.
  - Transient-fault recovery and booting with widely different reset times.
    These are open problems for this scheme.
