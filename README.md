# A programmable chemical-reaction engine for network dynamics

Many network control functions -- pacing a flow, capping a rate, dropping
packets before a queue overflows, sharing a link fairly -- can be written as a
small set of chemical reactions. Packets waiting in a queue are molecules of a
species; a reaction such as `S -> P` with rate coefficient `k` turns waiting
packets `S` into departing packets `P` at the rate `k * c_S` (law of mass
action), which is a pacer with an exponential low-pass response. Adding an
enzyme `E` that must bind a packet before it can leave (`S + E -> ES`,
`ES -> E + P`) caps the output rate at `k2 * c_E`; a second-order reaction
`2S -> S + D` drops packets in proportion to the square of the queue length.
The dynamics of such a network are known analytically, so the controller's
behaviour can be proven before it is deployed.

This RTL runs such reaction networks in hardware. A *chemical engine* stores a
network in registers (which species each reaction consumes and produces, the
rate coefficients and the current molecule counts) and executes it in real
time: it computes each reaction's propensity
`a_r = k_r * prod(c_s ^ alpha_s)`, schedules the reaction `1/a_r` seconds in
the future, fires it, updates the counts and reschedules. External events
(packet arrivals) add molecules to mapped species; when a mapped species has
collected enough molecules, an output event (a packet departure) is raised.
Everything can be reprogrammed over a serial line while the engine runs, so
the network can be swapped or tuned without stopping traffic.

## Platform: manager and engines

```
             uart_rxd  uart_txd       ext_in[e]   ext_out[e]
                 |        ^               |          ^
           +-----v--------+---------------v----------+------+
           |  manager                                       |
           |  command decoder, event maps, monitor reads    |
           +---+-----------------+----------------+---------+
               | cfg, events     | cfg, events    |
           +---v-----------+ +---v-----------+
           |  ac_module 0  | |  ac_module 1  |  ...  (N_AC engines)
           +---------------+ +---------------+
```

`ca_top` holds one `manager` and `N_AC` engines (`ac_module`, default 1).
The manager receives programming commands on an 8N1 serial line
(`uart_rx`, 9600 baud at 80 MHz by default), turns them into configuration
requests (`cfg_req_t`) for the addressed engine, keeps for each engine a map
from event wires to species, and answers concentration reads and sends
periodic concentration logs on `uart_tx`.

Each engine contains:

| part | module | contents |
|---|---|---|
| c-mem | `conc_mem` | 256 x 16-bit molecule counts; address 0 is fixed at 1 |
| alpha-mem, beta-mem | `stoich_mem` (x2) | reactant and product records, 8 reactions x 8 slots x 8 order positions, 8-bit species address each |
| k-mem | `k_mem` | 8 single-precision rate coefficients |
| execution logic | `react_exec` | applies a reaction to c-mem |
| propensity unit | `propensity_unit` | computes `a_r` with one multiplier |
| scheduler | `loma_scheduler` | next-reaction counters, firing, rescheduling |
| arithmetic | `fp32_mul`, `fp32_div`, `fp32_conv` | IEEE-754 single precision |

The sizes are the package constants in `ca_pkg`: `NR = 8` reactions,
`NPSI = 8` reactant/product slots per reaction, `NS = 255` species,
`CW = 16` count bits, `NALPHA = 8` maximum order per slot, `KW = 32` bits per
coefficient, `SAW = 8` species address bits, plus `N_IN = 4` input and
`N_OUT = 8` output event ports per engine.

## Describing a reaction: the stoichiometric records

A reaction has up to `NPSI` reactant slots and `NPSI` product slots. A slot
stands for one species with a multiplicity of up to `NALPHA`. It is stored as
`NALPHA` records (order positions), each holding a species address; the
multiplicity is the number of filled positions, and an empty position holds
address 0. For example, the reactant side `2 S3 + S2` of a reaction is

```
slot 0: order 0 = S3, order 1 = S3, order 2..7 = 0
slot 1: order 0 = S2,               order 1..7 = 0
slot 2..7: all 0
```

Because c-mem address 0 always reads 1, an empty record contributes a factor
1 to the propensity product and causes no update when the reaction fires, so
no separate "valid" bits or species count are needed. Unused species are
simply never referenced.

`stoich_mem` is one `NR x NPSI x NALPHA` array with one write port and two
row-read ports: a row is the `NPSI` records of one reaction at one order
position. Port A serves the execution logic, port B the propensity unit.

## Executing a reaction

`react_exec` walks the order positions with a down-counter from
`NALPHA-1` to 0. At each step it reads the reactant row and the product row,
and for every slot whose record is non-zero it asserts a decrement (reactant)
or increment (product) of one molecule for that species. `conc_mem` adds up
all updates to one species in a cycle and clamps to `0..65535`. A reaction
therefore takes `NALPHA` = 8 update cycles; `done` follows `NALPHA + 1`
cycles after `start`. The scheduler only fires a reaction whose propensity is
non-zero, i.e. all of whose reactants are present in sufficient number.

## Computing a propensity

`propensity_unit` evaluates `a_r = k_r * prod over filled records of c_s`
(each filled record is one factor, so a species of order 2 contributes
`c_s^2`). It reads `k_r`, and if it is zero it returns 0 after one cycle.
Otherwise it scans the `NALPHA` order positions of the reaction's reactant
records; a position whose records are all empty costs one cycle, and every
filled record costs one multiply cycle (integer-to-float conversion followed
by `fp32_mul`, accumulator initialised with `k_r`). The latency is
`NALPHA + filled records + 1` cycles, e.g. 10 cycles for `S -> P` and 11 for
`S + E -> ES`.

## The scheduler

The scheduler is the hardest part to follow, so it is described in full.

**State per reaction.** `rem[r]` (32-bit tick counter until the reaction is
due), `en[r]` (the reaction has a schedule), `a_q[r]` (the propensity the
schedule was computed with), `lag_q[r]` and `pend_q[r]` (see below). While
`run` is high, every enabled `rem` counts down once per clock. `tick_rate` is
the number of ticks per second as a float (reset value `80e6`, i.e. real time
at 80 MHz); programming a larger value slows the engine's time down, a
smaller one speeds it up.

**Firing.** When the core is idle and some enabled reaction has `rem = 0`,
the lowest-numbered due reaction is executed. Its schedule is consumed
(`en` and `a_q` cleared, `pend` set).

**Re-evaluation.** After every firing, and whenever c-mem was changed from
outside (input or output events, a programming write), the scheduler
recomputes the propensity of every reaction `r = 0 .. NR-1`:

* `a_new = 0`: the reaction is disabled.
* `a_new = a_q[r]` and a schedule exists: nothing changes.
* no schedule yet (just fired, or newly enabled): a fresh schedule
  `rem = tick_rate / a_new` (the reciprocal of the propensity in ticks).
* the propensity changed: the schedule is rescaled,
  `rem = rem * a_old / a_new`. The remaining fraction of the waiting time is
  preserved, so the progress a reaction made is not lost when another
  reaction or an event changes its inputs.

**Lag compensation.** Reactions fall due while the core is busy with another
reaction and then wait; the fired reaction's new schedule is also only known
after its division. The ticks spent overdue and waiting for the new schedule
are counted in `lag_q` and subtracted from the new schedule, so firing times
stay anchored to the moments the reactions were due and average rates are
exact as long as the core keeps up on average.

**Times are deterministic.** The waiting time is exactly `1/a` rather than an
exponentially distributed random draw. The engine therefore follows the mean
(fluid) behaviour of the reaction network, which is what a network controller
is designed against.

**Cost.** One firing costs the update (9 cycles), one propensity pass over
all reactions (one cycle per reaction with `k = 0`, otherwise
`NALPHA + records + 1`), and one 26-cycle division (`fp32_div`, one quotient
bit per cycle) for every reaction whose schedule changes. For `S -> P` this
is roughly 50-60 cycles per firing; for the two-reaction rate controller
roughly 80-90 cycles per re-evaluation and about 250 cycles per packet
(arrival, binding and release each trigger a pass). At 80 MHz that supports
several hundred thousand packets per second.

## Events

Input events: each engine has `N_IN` input wires. Every level change
(rising or falling) of a synchronised input is one event; it adds the mapped
number of molecules to the mapped species. Output events: output port `i`
is armed with a species and a batch size; whenever that species holds at
least a batch, the batch is removed and the output wire toggles. A host
counts departures by counting toggles. Events can follow one another every
few clock cycles. A port whose map has a zero batch size is off.

## Programming protocol

Every command is a header byte `{op[3:0], engine[3:0]}` followed by a fixed
payload, multi-byte values most significant byte first:

| op | command | payload |
|---|---|---|
| 1 | write concentration | species, value (2 bytes) |
| 2 | write rate coefficient | reaction, k (4 bytes, IEEE-754, 1/s) |
| 3 | write reactant record | reaction, `{slot[3:0], order[3:0]}`, species |
| 4 | write product record | same as op 3 |
| 5 | read concentration | species; reply: value (2 bytes) |
| 6 | map input port | port, species, molecules per event (2 bytes) |
| 7 | map output port | port, species, molecules per event (2 bytes) |
| 8 | set tick rate | ticks per second (4 bytes, IEEE-754) |
| 9 | run / stop | flag in bit 0 |
| A | periodic logging | species, period in ms (2 bytes); 0 stops it |

Other op codes are ignored. The host waits for the reply of a read before
sending the next read. Logging sends the chosen species of the addressed
engine every period, in the same two-byte format as a read reply (one
millisecond is `CLK_HZ/1000` cycles; at 9600 baud a value takes about 2 ms
on the line, so shorter periods send as fast as the line allows). A read
issued while a log value is being sent waits for it. Any write may be issued while the engine runs; to
replace a network safely, first set the coefficients of the reactions being
rewritten to 0, rewrite their records, then restore the coefficients.

Example, the rate controller `S + E -> ES` (k1 = 1), `ES -> E + P` (k2 = 20)
with species S = 1, P = 2, E = 3, ES = 4 and 25000 enzyme molecules, which
limits departures to `20 * 25000 = 500000` per second:

```
10 03 61 A8          c[E]  = 25000
30 00 00 01          alpha(r0) slot0/order0 = S
30 00 10 03          alpha(r0) slot1/order0 = E
40 00 00 04          beta(r0)  slot0/order0 = ES
30 01 00 04          alpha(r1) slot0/order0 = ES
40 01 00 03          beta(r1)  slot0/order0 = E
40 01 10 02          beta(r1)  slot1/order0 = P
20 00 3F 80 00 00    k0 = 1.0
20 01 41 A0 00 00    k1 = 20.0
60 00 01 00 01       input port 0 -> S, 1 molecule per event
70 00 02 00 01       output port 0 -> P, 1 molecule per event
90 01                run
```

## Arithmetic

All floating-point units are small and simple: normal numbers only,
truncation instead of rounding, saturation to the largest finite value on
overflow and flush to zero on underflow. `fp32_mul` is combinational,
`fp32_div` is a restoring divider with a 26-cycle latency, `fp32_conv`
converts unsigned integers to floats (truncating) and floats to saturated
unsigned integers (values below 1 give 0). A division by zero saturates; the
scheduler never divides by a zero propensity.

## Where this design departs from the reference architecture

* The vendor floating-point cores (two multipliers, two dividers) are
  replaced by the simple units above; one multiplier in the propensity unit
  and one multiplier and one divider in the scheduler are used, since only
  one schedule is computed at a time.
* Reaction times are deterministic `1/a`, not random draws; every reaction
  is re-evaluated after each change instead of tracking which reactions
  depend on which species; the lag compensation is an addition.
* Propensities use `c^n` for a species of order n (not `c(c-1)/2`).
* The identity value for empty records is 1, held in c-mem address 0.
* The species address is 8 bits wide (`log2(NS+1)`), so that address 0 can
  be reserved while 255 species remain usable.
* The serial command format, the toggle signalling of output events, the
  level-change signalling of input events, the number of event ports and all
  reset values are this design's own.
* The host link is reduced to event wires; a parallel-port interface, the
  host's queueing software and any switch integration are not included.
* Faster variants with one scheduler per reaction are not built: there is
  one scheduler per engine.
* Networks that need more than 8 reactions (e.g. a three-queue fair
  scheduler with an active-queue-management stage, about 12 reactions) need
  `NR` raised in `ca_pkg`; larger `NR` lengthens every propensity pass.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.
`tb/tb_fp_pkg.sv` holds reference float conversions shared by the
arithmetic testbenches.

| testbench | what it checks |
|---|---|
| `tb_fp32_mul`, `tb_fp32_div`, `tb_fp32_conv` | random and corner operands against real-number references; divider latency |
| `tb_conc_mem` | random update mixes against a model, reserved address, clamping, batch outputs |
| `tb_stoich_mem`, `tb_k_mem` | random writes and reads against a model |
| `tb_react_exec` | update sequence and latency for random records |
| `tb_propensity_unit` | random networks against a real-number mass-action model, latency |
| `tb_loma_scheduler` | fresh schedules, rescaling, disabling, waiting, firing intervals |
| `tb_ac_module` | pacer and rate controller: output rates against `k*c` and `k2*e0` |
| `tb_uart`, `tb_manager` | frames, every command, event maps, monitor replies, periodic logging and its period |
| `tb_ca_top` | two engines at a reduced clock: a pacer switched live into a rate controller, a rate-limited phase, a concentration write, draining, a dropper (`2S -> S + D`) on the second engine and periodic logging; counts every scheduler, event and monitoring mechanism |
| `tb_ca_top_full` | all defaults (80 MHz, 9600 baud, one engine): the rate controller with 25000 enzyme molecules under 20000 arrivals per second, checked against the fluid model `ES(t) = lambda/k2 * (1 - exp(-k2 t))`, conservation of molecules and a serial read |
| `tb_workload_rates` | one engine at 80 MHz: a 500-molecule pacer drain against `500 (1 - exp(-10 t))`, the pacer under 200000 arrivals per second and the rate controller under 100000 arrivals per second in real time, with bounded queues and conservation, and a live coefficient change on a loaded pacer (rate step, then a change that keeps the rate by doubling the queue) |

To run one with Verilator (example):

```
verilator --binary --timing -Wno-fatal --top-module tb_ca_top \
    rtl/ca_pkg.sv rtl/*.sv tb/tb_fp_pkg.sv tb/tb_ca_top.sv
./obj_dir/Vtb_ca_top
```

`ca_pkg.sv` must come first. `tb_ca_top_full` simulates 50 ms of real time
at 80 MHz and takes about half a minute.

## Limits and trust

* The engine follows the mean behaviour of a network; it is not a
  stochastic simulator.
* Counts saturate at 0 and 65535 without a flag.
* Arithmetic truncates, so very long chains of rescaling drift by a few
  units in the last place.
* The scheduler handles one reaction at a time; if reactions fall due faster
  than it can process them, they fire late (the lag is recovered only while
  the core has spare time).
* The serial manager answers one read at a time and logs one species at a
  time; replies carry no header, so a host mixing reads with logging must
  keep track of the order itself.
