# Latency-insensitive links: relay stations, shell-wrappers and fractional registers

On a large chip a wire between two IP blocks may need several clock cycles.
Latency-insensitive design keeps a synchronous specification correct anyway:
each block (a *pearl*) is only clocked when all its inputs have arrived, and
the long wires are cut into one-cycle sections. The values each block sees, and
their order, stay the same as in the zero-latency specification; only the
cycles in which they arrive change.

This repository gives synthesizable SystemVerilog for both ways of scheduling
such a system:

* **Dynamic scheduling.** Long links are lines of *relay stations*: two-slot
  buffers with a valid/stop handshake. Each pearl sits in a *shell-wrapper*
  that fires it when every input has a token and no output is congested.
* **Static scheduling.** With constant latencies, the firing pattern of every
  block ends up periodic. It can be computed in advance and replayed by a
  counter, so the handshake goes away. Links become plain register lines. The
  few places where a token must wait get a one-slot *fractional register* (FR),
  driven by a *hold generator*.

A three-node example network is built both ways side by side
(`lid_fig1_top`). Its test checks that the two versions produce the same
output stream, value for value. It also checks that both versions run at the
throughput the graph predicts, 3 outputs per 5 cycles.

## Tokens, firings and schedules

A computation node *fires* in a cycle. When it fires, it consumes one token
(a value) on each input link and produces one on each output link. A link of
latency L delivers a token L cycles after it was produced.

Around a cycle of the graph, the number of tokens never changes. A cycle that
holds T tokens over a total latency L can therefore fire at most T/L times per
clock. The slowest cycle sets the throughput of the whole graph.

A *schedule* is the firing sequence of one node, written as a binary word with
one letter per clock cycle (1 = fires). Under as-soon-as-possible firing with
constant latencies, every schedule ends up periodic. It has the form `u(v)*`:
an initial prefix `u` played once, then a period `v` repeated forever. For
example, `001101(01101)*` fires 3 times in every 5 cycles once it is periodic.

## Dynamic scheduling

### Relay station (`relay_station`)

The relay station is a buffer with two slots, **main** and **aux**, and four
states.

| state | holds | val_out | stop_in | next state |
|---|---|---|---|---|
| empty | nothing | 0 | 0 | half on val_in |
| half | 1 token in main | !stop_out | 0 | full on val_in & stop_out; empty on !val_in & !stop_out; else half |
| full | older token in aux, newer in main | !stop_out (sends aux) | 1 | half on !stop_out; error on val_in |
| error | - | 0 | 0 | stays until reset |

Why two slots: the station only warns its upstream neighbour through stop_in
one cycle after it is itself stopped. So a token that was already on its way
must still be caught, and aux catches it. A third slot is never needed,
because stop_in is raised as soon as the station is full.

Two rules follow, and assertions check them:

* An upstream sender must never assert val_in while stop_in is high.
* A station never asserts val_out while stop_out is high.

Timing:

* stop_in is a registered output: it is simply the state *full*.
* val_out depends combinationally on stop_out. Chains therefore have no
  combinational path in the backward direction. Forward, the only path is
  stop_out → val_out inside one station.
* A token received in cycle t is offered in cycle t+1.

Parameters:

* `W` is the data width.
* `INIT_VALID`/`INIT_DATA` start the station in *half* holding a token. This
  is how the initial tokens of a network are placed.

### Relay-station line (`rs_line`)

`rs_line` is a link of latency N: N relay stations in series.

* With no congestion, a token crosses the line in N cycles.
* A line can absorb 2N tokens before its stop_in rises.
* If stop_out was low in cycle t, stop_in is low in cycle t+N: free space
  travels backward one station per cycle.
* After a stall, the stored tokens leave in order, one per cycle, with no gap.

### Shell-wrapper (`shell_wrapper`, `sw_input`)

The wrapper produces the pearl's clock enable:

    pearl_clock = (every input has a token) & !(any stop_out)
    val_out[j]  = pearl_clock

Each input channel (`sw_input`) counts as having a token in two cases: one
arrives this cycle (val_in), or one was *parked* earlier. A token that arrives
while the pearl cannot fire is parked: a presence bit plus a data register.
The pearl is shown the parked value if there is one, else the arriving value.

stop_in of a channel is its presence bit. It stays high even in the cycle
where the parked token is consumed. This keeps stop_in registered and the
network free of combinational loops. The price is that the channel loses one
cycle of throughput after each park.

The wrapper is combinational from (val_in, stop_out) to (pearl_clock,
val_out). The pearl's output values do not pass through the wrapper. The
network wires them straight to the output links.

A token therefore goes from the relay station before a pearl, through the
wrapper and the pearl, into the relay station after it, all within one cycle.
This means **a pearl must compute its outputs combinationally from its inputs
and its state**. Its state changes only on pearl_clock (a *patient* block).

## Static scheduling

### Static link (`static_link`)

`static_link` is a line of N plain registers. Each token (a valid bit and a
value) advances one register per cycle, and there is no back-pressure. Every
firing instant is planned, so nothing can overflow except at a node that has
to wait.

### Fractional register (`fractional_register`)

The fractional register is one slot placed between a link and the node that
consumes it. When `hold` is high, the token present is kept in the slot. The
slot state `catch_q` is simply last cycle's hold.

    val_out  = ((val_in ^ catch_q) & !hold) | (val_in & catch_q & hold)
    data_out = catch_q ? slot : data_in

It works in three cases:

* **Pass-through.** A token arrives with hold low and goes straight through.
* **Hold.** A token is kept for one or more cycles while no new token arrives.
* **Chase.** A held token leaves in the very cycle the next token arrives, and
  the new token takes its place.

For this to work, the schedule must respect two rules, and assertions check
both:

* Hold is raised only when a token is present.
* An arriving token that meets a full slot must be held. Otherwise two tokens
  would leave in the same cycle.

A relay station behaves exactly like a plain register followed by a
fractional register, if hold is driven as follows:

    hold = stop_out & (token in the register or in the FR)
         | (FR occupied & register holds the next token)

The second term covers the step where the station leaves *full*: the older
token leaves and the newer one moves into the slot. This holds as long as
back-pressure never arrives while both slots are occupied.
`tb_rs_fr_equivalence` checks it cycle by cycle. Static scheduling relies on
this: the same register-plus-slot structure, with hold known in advance
instead of computed from stop signals.

### Hold generator (`hold_gen`)

`hold` must be high whenever more tokens have reached the FR's entry than the
target node has consumed. The two counts never differ by more than one, so
the whole state is one register, the previous hold:

    hold     = ((held | current) & !next) | (held & current)
    overflow = held & current & !next        (never happens in a valid schedule)

The inputs:

* `current` is high when a token reaches the entry. This is the source node's
  schedule, delayed by the link.
* `next` is the target node's schedule.

A target firing with no token present is ignored. This covers activity in the
initial phase that this source did not cause.

### Schedule generator (`schedule_gen`)

`schedule_gen` is a counter that plays `u(v)*`. The word is given MSB-first,
so `6'b001101` plays 0,0,1,1,0,1. Instant 0 is the first cycle after reset.
The `periodic` output rises when the period starts.

## The three-node example (`lid_fig1_top`)

```
            ext in
              |
   +------->  A  <--------------+
   | B->A     |  A->B           | C->A (latency 3)
   |          v                 |
   +-------   B                 |
              |  B->C           |
              v                 |
              C  ---------------+
              |
           ext out
```

The graph:

* Node A reads the external input and one token each from B and C. Its output
  goes to B.
* B feeds A (the left cycle) and C.
* C feeds A (the right cycle) and the external output.
* The links A->B, B->A, B->C and C->A each start with one token, with values
  1, 2, 3 and 4.

The original latencies are 1, 1, 1 and 3. The left cycle A->B->A therefore
has rate 2/2. The right cycle A->B->C->A has rate 3/5, and it sets the
throughput.

**Dynamic half (`dyn_*`).**

* The links are relay-station lines with the original latencies.
* The token of the 3-station C->A line starts in the station next to C.
* The external input enters A's wrapper directly, and `dyn_in_stop` is its
  back-pressure.
* The output goes through one relay station, which obeys `dyn_out_stop`.

**Static half (`st_*`).** The left link is *equalized* to latency 2. That
slows the left cycle to 2/3, still faster than 3/5, so fewer tokens wait. A
latency of 3 would give 2/4, slower than 3/5. The three nodes fire on their
ASAP periodic schedules:

| node | schedule |
|---|---|
| A | `001101(01101)*` |
| B | `100110(10110)*` |
| C | `110011(01011)*` |

B and C always fire exactly when their token arrives. Only A, where the two
cycles meet, sees tokens arrive early. So each of A's two inner inputs has a
fractional register with a hold generator:

* The FR on the right input (C->A) is used once, in the initial phase.
* The FR on the left input (B->A) holds a token in every period. Once, in
  the initial phase, a held token is chased out by the next one.

**Tuned start-up (`OPT_INIT = 1`).** The default follows plain ASAP firing
from reset. Setting `OPT_INIT` starts the right link's token one stage nearer
to A. The network is then periodic from the first cycle, with these
schedules:

| node | schedule |
|---|---|
| A | `(01011)*` |
| B | `(10101)*` |
| C | `(11010)*` |

The C->A fractional register disappears. Only the B->A register remains, and
it holds one token in every period without ever chasing. The output stream
is unchanged; only its timing moves.

A consumes the external input (`st_in_data`) in the cycles where `st_in_take`
(its schedule) is high. C's external output is registered (`st_out_val`,
`st_out_data`).

`st_error` is a sticky error flag. It rises if any of these ever happens:

* A node fires without its token.
* A token reaches a node that does not fire.
* A hold generator overflows.

**Pearls.** The computation inside each node is application logic and is not
part of the design. For every node and each half, the top brings out three
groups of signals:

* `*_fire` is the clock enable.
* `*_in_*` are the values consumed in that cycle.
* `*_out_*` are inputs. The pearl must drive them in the same cycle,
  combinationally.

The testbench attaches small arithmetic pearls with internal state.

**Changing the network.**

* Latencies and initial tokens are the `N`/`INIT_VALID` parameters of the link
  instances.
* Static schedules are the `PREFIX`/`PERIOD` parameters of the three
  `schedule_gen` instances.
* If you change the graph, recompute the schedules by simulating ASAP firing.
  Then put an FR with a hold generator on every input where a token can
  arrive before its node fires. `st_error` reports any inconsistency.

## Verification

Each testbench checks its block against an independent model and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_relay_station` | Random traffic against a two-slot FIFO model: val_out, stop_in and data order every cycle. Also that an initial token is offered at instant 0. |
| `tb_rs_line` | Latency N; exactly 2N tokens absorbed under stop; gap-free drain; stop_out-to-stop_in property over N cycles; no loss or reordering. |
| `tb_shell_wrapper` | Firing rule, stop_in, pearl values and per-input order, against a parking model under random traffic and stalls. |
| `tb_fractional_register` | Pass-through, hold and chase under random traffic consistent with a schedule. Tokens delivered exactly when the consumer fires, in order. |
| `tb_hold_gen` | The example's left-link arrivals against node A's schedule, then random traffic. Compared with a token counter. |
| `tb_schedule_gen` | Two words, letter by letter, plus the periodic flag and the firing rate. |
| `tb_rs_fr_equivalence` | A relay station against a plain register followed by a fractional register. Same traffic into both; outputs compared every cycle. Back-pressure is never applied while the station is full. |
| `tb_lid_fig1_opt_init` | The end-to-end test with `OPT_INIT = 1`. It also checks that the C->A path never holds. |
| `tb_lid_fig1_top` | The whole example at default parameters. Both halves are compared with a token-level reference (unbounded FIFOs, any firing order) over 150 outputs. Throughput 3/5 is checked on both halves. The static output must follow C's schedule. Random input gaps and output back-pressure are applied to the dynamic half. The test fails if any mechanism never occurs: relay station full, wrapper parking, wrapper stall, input back-pressure, FR hold, FR chase, the initial-phase C->A hold, the stationary phase. |

To run one test with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/lid_pkg.sv \
        tb/tb_lid_fig1_top.sv --top-module tb_lid_fig1_top -o sim
    obj_dir/sim

All tests finish in well under a second of simulation time.

## What is taken from the method, and what is chosen here

The following follow the latency-insensitive method as published:

* The relay station's state chart and datapath.
* The shell-wrapper's firing rule and input module.
* The fractional register's equations and datapath.
* The counting rule behind hold.
* The example graph with its latencies, tokens, equalization and schedules.

The following are this design's own choices:

* The data width, 16 bits.
* Synchronous active-low reset.
* The `INIT_VALID`/`INIT_DATA` mechanism for initial tokens, and the values of
  those tokens.
* The one-register form of the hold generator, and its overflow flag.
* The schedules of the tuned start-up.
* In the relay-station equivalence test, the term that shifts the register's
  token into the fractional register.
* The schedule generator.
* The external interfaces of the example. Its output link starts empty.
* Where an initial token sits inside a multi-stage link. By default it sits
  next to the producer.

The shell-wrapper's data register loads when a token arrives and the pearl
does not fire. This is the only enable under which the register is ever read.

Known limits:

* The relay station's *error* state cannot be reached in the tests without
  breaking the handshake assertion, so it is exercised only by the assertion
  itself.
* Only the three-node example is assembled as a network. Larger graphs, such
  as an MPEG2 or H.264 encoder block diagram, can be built from the same
  blocks. This needs their latencies and a schedule computed offline, and
  neither is provided here.

## Files

| file | content |
|---|---|
| `rtl/lid_pkg.sv` | relay-station state type |
| `rtl/relay_station.sv`, `rtl/rs_line.sv` | dynamic links |
| `rtl/sw_input.sv`, `rtl/shell_wrapper.sv` | dynamic firing logic |
| `rtl/static_link.sv`, `rtl/fractional_register.sv`, `rtl/hold_gen.sv`, `rtl/schedule_gen.sv` | static scheduling |
| `rtl/lid_fig1_top.sv` | the three-node example, both ways |
| `tb/tb_*.sv` | one self-checking testbench per block, the two end-to-end tests and the equivalence test |
