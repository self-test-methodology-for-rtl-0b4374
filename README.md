# At-speed crosstalk self-test for on-chip buses

Long on-chip buses suffer from coupling between neighbouring wires. A wire
that should stay still can glitch when its neighbours switch, and a wire that
switches against its neighbours can arrive too late. These defects only show
at full clock speed, which external testers struggle to provide. This RTL puts
the test on the chip. Every bus interface that takes part gets a small test
generator or error detector. A global controller runs a schedule of bus
tests at the system clock and logs every error it sees.

The tests come from the **Maximal Aggressor (MA) fault model**. One line of
the bus is the *victim*, and every other line is an *aggressor* that switches
the same way at the same time. This is the worst case for coupling onto the
victim. Each victim has four faults:

| fault | victim | aggressors | error caught |
|---|---|---|---|
| positive glitch (GP) | stays 0 | rise | victim reads 1 |
| negative glitch (GN) | stays 1 | fall | victim reads 0 |
| rising delay (DR) | rises | fall | victim still 0 |
| falling delay (DF) | falls | rise | victim still 1 |

An N-line bus therefore has 4N faults. All of them are covered with 6N
vectors, one per clock.

## The 6-vector sequence

The four two-vector tests of one victim overlap into six vectors. Every
vector has only two distinct values: one on the victim line and one shared by
all the aggressor lines.

| state | victim | aggressors | transition tested (from the previous vector) |
|---|---|---|---|
| S1 | 0 | 0 | – |
| S2 | 0 | 1 | GP |
| S3 | 1 | 1 | – |
| S4 | 1 | 0 | GN |
| S5 | 0 | 1 | DF |
| S6 | 1 | 0 | DR |

Because only two values are needed, the generator is small. It has:

- a 7-state FSM (S0 idle, S1..S6) whose Moore outputs are the victim value
  and the aggressor value;
- a victim counter;
- a decoder that turns the counter into select lines `q[i]`;
- one 2:1 mux per line, `b[i] = q[i] ? victim : aggressor`.

On `T_enable` the FSM clears the counter and enters S1. At S6 it either
advances the counter and goes back to S1, or, once `q[N-1]` is set, returns
to S0. The full run takes exactly 6N clocks.

When a defect is present, the vector index `k` at which it shows gives the
diagnosis directly:

- victim line = `k / 6`
- fault = `k mod 6`: 1 = GP, 3 = GN, 4 = DF, 5 = DR

## Generator, detector and TG/ED

| module | what it is |
|---|---|
| `mafm_test_generator` | The generator described above, for the sending interface. |
| `mafm_error_detector` | The receiving interface. It holds a *local copy of the generator*. This copy starts on the same enable as the sender, so it shows in each cycle the vector that should be on the bus. An XOR per line and an OR across lines form the analyzer. The result is registered. |
| `mafm_tg_ed` | For a bidirectional interface: one shared generator, a `T_mode` mux that swaps the core output for the generator output, the analyzer, and a mode bit (`ctrl.gen`) that picks generate (drive the bus) or detect (compare). With `t_mode` low the core's data and driver enable pass straight through. |

**Timing is one launch/capture pair per vector.** The generator launches
vector *k* at a clock edge. The detector's analyzer sees it during the
following cycle and captures the comparison at the next edge. So `err_flag`
is high in cycle *c+1* for a corrupted vector that was on the bus in cycle
*c*. Sender and receiver are never told which vector is current. They stay
in step only because they start on the same clock.

The test structures sit on the core side of the bus drivers and receivers.
The drivers' strength and the receivers' loads are part of what is tested.

## Testing several buses together

Crosstalk during normal operation can come from lines of a *different*,
simultaneous transfer. For example, the three CMUDSP data buses run side by
side and are active together. To reproduce this, the generator and detector
have an `agg_only` input:

- All select lines are held at 0, so every line carries the aggressor value.
- The FSM cycles S1..S6 for as long as its enable is high.

In a multi-bus transaction, one bus walks its victims while the other buses
run with `agg_only`. Every line then sees all lines of all buses as
aggressors. The look-up table row of the transaction says which endpoints do
this. `agg_only` is a choice of this design. The method only requires that
the lines of the other transfer also act as aggressors.

## Global test controller

`global_test_controller` has the following parts:

- an FSM: Idle, Trans Rst / Vector Rst, Wait, Trans Inc / Vector Rst,
  Complete;
- a transaction counter and a last-transaction register, with a comparator;
- a vector counter, with a comparator against the count from the LUT;
- the look-up table (LUT);
- an OR of the detector flags;
- the error log (`test_log_buffer`).

Each LUT row gives two things: the number of vectors of the transaction
(`VEC_COUNT`), and the enable lines (`ENABLES`). The system maps the enable
lines onto each endpoint's `en`, `gen` and `agg_only` bits. The LUT is a
parameter, because the schedule is fixed when the test is planned.

Cycle by cycle, after `t_mode` rises:

| cycle | state | enables | vector counter | bus |
|---|---|---|---|---|
| 0 | Trans Rst | 0 | cleared | – |
| 1 | Wait | row t | 0 | – (generators enter S1) |
| 1+j | Wait | row t | j | vector j−1 |
| 1+C | Wait, counter = C → next | row t | C | vector C−1 (last) |
| 2+C | Trans Inc | 0 | cleared | – (generators back in S0) |

The next transaction's Wait follows. After the last row the FSM goes to
Complete and raises `test_complete`.

The flag for the last vector arrives during Trans Inc or Complete. The log
therefore takes the transaction and vector counters *of the previous cycle*,
and reduces the vector number by one. The logged number is then the 0-based
index of the failing vector in its transaction. The first error raises
`interrupt`. Both the log and the interrupt are cleared when a new test
starts. Dropping `t_mode` returns the controller to Idle from any state. All
enables then go low and the buses are back in the cores' hands.

A transaction of a W-line victim bus takes 6W + 1 clocks. The transactions
are separated by one clock, and two set-up clocks come first.

## The CMUDSP integration (`cmudsp_selftest`)

The top level applies the method to the buses of a DSP56002-class processor.
That processor has four units:

- ALU
- AGU (address generation)
- Bus Switch
- PCU (program control)

The units talk over 24-bit data buses and 16-bit address buses. Three of the
24-bit buses are tested: XDB, YDB and GDB. PDB is not.

| endpoint | unit | bus | structure | port index |
|---|---|---|---|---|
| ALU_XDB | ALU | XDB (24) | TG/ED | `d_*[0]` |
| ALU_YDB | ALU | YDB (24) | TG/ED | `d_*[1]` |
| BSW_XDB | Bus Switch | XDB | TG/ED | `d_*[2]` |
| BSW_YDB | Bus Switch | YDB | TG/ED | `d_*[3]` |
| BSW_GDB | Bus Switch | GDB (24) | TG/ED | `d_*[4]` |
| AGU_GDB | AGU | GDB | TG/ED | `d_*[5]` |
| AGU_AB | AGU | 16-bit link to PCU | TG/ED | `a_*[0]` |
| PCU_AB | PCU | same link | TG/ED | `a_*[1]` |
| AGU_TG | AGU | 16-bit one-way link | generator | `u_*` |
| PCU_DET | PCU | same link | detector | `pcu_det_bus_in` |

Schedule (`cmudsp_st_pkg`), 9 transactions:

| # | victim bus, direction | also switching (`agg_only`) | vectors |
|---|---|---|---|
| 0 | XDB ALU → Bus Switch | YDB, GDB | 144 |
| 1 | YDB ALU → Bus Switch | XDB, GDB | 144 |
| 2 | GDB AGU → Bus Switch | XDB, YDB | 144 |
| 3 | XDB Bus Switch → ALU | – | 144 |
| 4 | YDB Bus Switch → ALU | – | 144 |
| 5 | GDB Bus Switch → AGU | – | 144 |
| 6 | 16-bit link AGU → PCU | – | 96 |
| 7 | 16-bit link PCU → AGU | – | 96 |
| 8 | one-way link AGU → PCU detector | – | 96 |

A complete test takes 1171 clocks from `t_mode` rising to `test_complete`.

**The bus wires are not inside the module.** For every endpoint, the module
has these ports:

- core side: `*_core_out`, `*_core_oe`, `*_core_in`;
- bus side: `*_bus_out` and `*_bus_oe` to the tri-state driver, and
  `*_bus_in` from the receiver.

Connect the two ends of each bus outside the module: XDB is d0 ↔ d2, YDB is
d1 ↔ d3, GDB is d5 ↔ d4, the address link is a0 ↔ a1, and the one-way link
is `u_bus_out` → `pcu_det_bus_in`. This is where a wire model with injected
defects goes in simulation.

`core_in` is simply `bus_in` passed on. Those outputs are therefore wired
straight to inputs.

To read the log, step `log_rd_idx` through `0 .. log_count-1`. Each entry
gives `(log_rd_trans, log_rd_vec)`. The faulty line is line `log_rd_vec / 6`
of that transaction's victim bus (see the schedule).

## Where this follows the method and where it chooses

These parts follow the published method:

- the MA vector table and the generator structure (FSM, victim counter,
  decoder, per-line mux);
- the detector with a local generator and an XOR/OR analyzer;
- the TG/ED with its `T_mode` mux and mode bit;
- the controller FSM states, counters, comparators, LUT, flag OR, log and
  interrupt;
- testing both directions of bidirectional buses;
- testing XDB, YDB and GDB together towards the Bus Switch;
- the bus widths.

These are this design's own choices:

- `T_enable` is level-sensitive. Dropping it aborts a run.
- The `agg_only` mechanism for multi-bus tests.
- The registered, per-vector error flag.
- Enables low for one clock between transactions.
- The log is a 16-entry array. When full, further errors are dropped and
  `log_overflow` is set.
- The interrupt is cleared when a new test starts.
- All encodings, counter widths and the asynchronous active-low reset.
- The 9-row schedule.
- The exact pairing of the two 16-bit links between AGU and PCU. The
  processor's block diagram shows 16-bit paths and a detector in the PCU,
  but their routing is not clear. Treat this part of the integration as an
  example.

Not included:

- The DSP units themselves. Their bus signals are ports.
- An analog or electrical model of the wires.
- Dedicated hardware for the unused lines of reduced-width ("dynamic bus
  sizing") transactions. The method says those lines should be held as in
  normal operation: biased, floating or switching. Each structure drives
  and checks only its own N lines. Lines outside them keep whatever drives
  them. A schedule can make them switch by running their own endpoint with
  `agg_only`. Biasing them to a chosen value is not provided.
- Gate counts. The area of the structures has not been compared with any
  reference.

## Simulation

All files are SystemVerilog-2017. Packages `rtl/xt_pkg.sv` and
`rtl/cmudsp_st_pkg.sv` must be read first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/xt_pkg.sv rtl/cmudsp_st_pkg.sv tb/tb_cmudsp_selftest.sv \
    --top-module tb_cmudsp_selftest
./obj_dir/Vtb_cmudsp_selftest
```

Any testbench below runs the same way. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_mafm_test_generator` | Full sequence at N = 32 and N = 24 against an independent table, one vector per clock. Also: `done`, abort, restart, `agg_only`. |
| `tb_mafm_error_detector` | Flag exactly one clock after each corrupted vector, none while idle, `agg_only` checking. |
| `tb_mafm_tg_ed` | Normal-mode pass-through. Both roles over a modelled wire with injected errors. |
| `tb_test_log_buffer` | Order, count, overflow and clear of the log. |
| `tb_global_test_controller` | Cycle-exact enables and transaction lengths. Also: log entries for flags at chosen cycles, shortened schedule, abort. |
| `tb_table1_widths` | Generator → detector and TG/ED → TG/ED at 8, 16 and 32 lines, each with one injected error. |
| `tb_cmudsp_selftest` | The whole integration at its real sizes. Covers: normal mode; a fault-free test of exactly 1171 clocks; one defect of each kind on data, link and one-way lines, with the log checked entry by entry; a defect that is seen only when all three data buses switch together; log overflow; abort. |
| `tb_cmudsp_random_defects` | Eight self-tests, each with three random defects (random line, kind and coupling strength) present at once. The expected log is predicted from the defects. |

`tb/xt_crosstalk_model.sv` is the wire model used by the system testbenches.
It is digital and behavioural. A defect on line L of kind GP, GN, DR or DF
corrupts the received value of L in a cycle where L makes the matching
transition and at least `THRESH` other lines of the wire set switch against
it. `THRESH` = all other lines is the MA condition. Smaller values model
stronger coupling.

## Changing the design

- **Bus width of a structure:** parameter `N` of the generator, detector or
  TG/ED. Any N ≥ 2 works; it need not be a power of two.
- **A different system:** instantiate the endpoints and give
  `global_test_controller` its own `VEC_COUNT` and `ENABLES` rows, with
  `NUM_TRANS`, `EN_W` and `NUM_FLAGS` set to match. Set `VEC_COUNT` to 6 ×
  (lines of the victim bus).
- **CMUDSP widths:** `DW` and `AW` of `cmudsp_selftest`. The LUT counts
  follow from them.
