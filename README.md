# Elastic Esterel circuits in SystemVerilog

A synchronous circuit assumes that every wire carries a new value in every
clock cycle. An *elastic* circuit drops that assumption. Each wire becomes a
channel, and each channel carries a token only when the sender has one and
the receiver can take it. Producers may therefore insert bubbles and
consumers may apply back-pressure, and the circuit still computes the same
sequence of results. Only the timing of those results changes. This property
is called *latency equivalence*.

This repository turns circuits compiled from Esterel programs (a synchronous
reactive language) into elastic circuits by a fixed recipe:

1. Keep the combinational logic of the synchronous circuit as it is.
2. Replace every register with a pair of latches, `double_latch`.
3. Add a control layer, `elastic_control`, that decides cycle by cycle
   which latches may load.

It contains the building blocks, the control layer, four elasticized Esterel
programs and a pipelined multiplier used to study channel granularity.
`elastic_esterel_top` places all five designs side by side.

## The SELF handshake

Every channel has three parts:

- `data`, driven by the sender;
- `valid`, driven by the sender;
- `stop`, driven by the receiver.

Each cycle on a channel is one of three kinds:

| valid | stop | cycle    | meaning                                  |
|-------|------|----------|------------------------------------------|
| 1     | 0    | transfer | a token moves                            |
| 1     | 1    | retry    | the sender must offer the same token again next cycle (persistence) |
| 0     | –    | idle     | bubble                                   |

`eb_ctrl` contains assertions for persistence and for overflow.

In the designs, an Esterel signal with a value has two channels:

- a status channel, which carries present/absent (for example `In1`);
- a value channel, with the suffix `_data` (for example `In1_data`).

A value-only signal has only the `_data` channel. A pure signal has only the
status channel.

## Two tokens per register: the latch pair

`double_latch` is a rising-edge register built from two latches:

- an active-low master with enable `en1`;
- an active-high slave with enable `en2`.

With both enables high it behaves exactly like a flip-flop.

The control can also drop `en2` while keeping `en1`. The slave then keeps the
token that is waiting to leave, and the master takes in the next token. This
gives every register room for two tokens at no extra storage cost. This
capacity of two is what lets a stalled stage still accept a token while it
passes back a stop. Without it, a stall would need a combinational path back
through the whole pipeline.

`eb_ctrl` is the buffer controller. It is a three-state machine:

- `EMPTY`: the buffer holds no token;
- `HALF`: the buffer holds one token;
- `FULL`: the buffer holds two tokens, and it stops its input.

Its outputs:

- `valid_out` comes from the state register only;
- `stop_in` comes from the state register only;
- `en1` is high when an input token is transferred in this cycle;
- `en2` is low after a retry on the output.

Because `valid_out` and `stop_in` come from the state register only, the
forward latency is one cycle and the backward latency is one cycle, with no
combinational path from input to output.

`en2` is held by a small active-low latch, so it stays stable through the
phase in which the slave is open. A buffer whose register has a reset value
leaves reset in `HALF`. That reset value is its first token, just as the
register's reset value is the value of cycle 0 in the synchronous circuit.

`elastic_latch` is the single latch primitive used for both phases. Reset is
level-sensitive and synchronous in spirit: there is no asynchronous reset
option.

Verilator reports the following warnings for these latch structures. Each
one is explained in the opening comment of the module concerned:

- loops through register pairs (`UNOPTFLAT`), which are never transparent
  end to end;
- `NOLATCH` on the `en2` latch.

## The control layer

`elastic_control` is generic. It is configured by bit-matrix parameters over
*sources*: the inputs are numbered first, then the registers.

| parameter  | meaning                                  |
|------------|------------------------------------------|
| `REG_DEP[r][s]` | the next value of register `r` reads source `s` |
| `OUT_DEP[o][s]` | output `o` reads source `s`                |
| `REG_INIT[r]`   | register `r` starts holding its reset value as a token |

From these matrices it builds:

- **per source:** an eager fork (`elastic_fork_eager`) with one branch per
  reader;
- **per register:** a join (`elastic_join`) over the channels it reads,
  followed by an `eb_ctrl`. The `eb_ctrl`'s `en1` and `en2` drive that
  register's latches;
- **per output:** a join only. Its `valid` and `stop` are the output channel
  itself, so an output depends combinationally on the current tokens of its
  sources, like the combinational output logic it guards.

A register loads only when every source it reads offers its token. Each
register therefore sees its source values from the same reaction (clock
cycle of the original circuit). This is why latency equivalence holds.

### Eager forks versus lazy forks

The eager fork delivers a token to each reader as soon as that reader is
ready, and remembers which readers already have it. The lazy fork
(`elastic_fork_lazy`) waits until all readers are ready at once. The lazy
fork is included and tested, but it is not used. A join fed directly by a
lazy fork forms a combinational valid/stop loop, and the eager fork avoids
that loop.

### Dependency graphs

The dependency graph decides throughput, not results. For two designs the
graph is deliberately coarse: in `gcd_elastic` and `traffic_lights_elastic`,
every register reads every source. A compiler would extract a finer graph.
That finer graph would let more tokens flow independently, but it would not
change the output streams.

## The designs

Each design is the synchronous circuit of a small Esterel program:

- a `Boot` register, high only in the first reaction;
- the state registers of the program;
- the datapath equations, written out in the module's opening comment.

| module | program | interface |
|--------|---------|-----------|
| `pipe_elastic` | The pipeline has three stages: `Reg1`/`Reg2` sample `In1`/`In2` (0 when the input is absent), `F1 = Reg1 + Reg2`, `Out = F1 * 4`. Parameter `N` = 3 bits. | Output tokens: 0, 0, 0, then `4*(In1+In2)` of each reaction. |
| `parallel_emit_elastic` | Two threads each wait for their input and emit it, inside a loop that pauses after both finish. The pause register keeps the two input streams in step. | An input that arrives for a finished thread is ignored, as the program says. |
| `gcd_elastic` | Loads `a` and `b` and subtracts the smaller from the larger until they are equal. It then emits `d` with the result and waits for `restart`. A `restart` also aborts a running computation. Parameter `W` = 32. | `d` has a status channel and a value channel. |
| `traffic_lights_elastic` | Two roads. After a change, the controller waits 30 `second` ticks. It then changes roads on a request from the closed road, or after 60 ticks at the latest. On each change, the closing road shows yellow for 2 ticks, then both roads show red for 1 tick, then the opened road shows green. | The west road is opened first. |
| `mult_elastic` | 32x32 → 64-bit multiplier in four stages. Stage k adds `A * B[k-1]` shifted left by 8(k−1), where `B[k-1]` is byte k−1 of B. Byte k−1 of `B` travels through k registers before it is used, so each byte has a different pipeline depth. `N_CH` = 5, 2 or 1 sets how many SELF channels the five input values (`A`, four bytes of `B`) share. | `P` starts with four 0 tokens. |

The register equations of these programs are this design's own compilation
of the programs. They are checked against independent cycle models in the
testbenches.

## Granularity: what more channels cost

`tb_mult_elastic` measures the transfer rate of `P` (tokens per cycle) for
input valid rates 0.2–1.0 and output stop rates 0–0.8, 5000 tokens per
configuration. The table shows the
stop rate 0 column for each number of input channels:

| valid rate | 5 channels | 2 channels | 1 channel |
|------------|-----------|-----------|-----------|
| 0.2        | 0.13      | 0.14      | 0.20      |
| 0.4        | 0.28      | 0.29      | 0.40      |
| 0.6        | 0.45      | 0.47      | 0.60      |
| 0.8        | 0.66      | 0.68      | 0.80      |
| 1.0        | 1.00      | 1.00      | 1.00      |

Fewer channels means fewer joins waiting for unsynchronised inputs, so the
rate is higher. The differences vanish at both extremes:

- at valid rate 1.0, every input is always ready;
- under heavy back-pressure, the output stop dominates.

The consumer model decides `stop` independently in every cycle. With a stop
rate of s, the rate is therefore bounded by 1 − s (for example 0.20 at
s = 0.8).

## Where this departs from the original flow

- **Control generation.** The control layer is configured by dependency
  matrices written by hand in each design module. It is not generated from a
  netlist by a tool. The dependencies of `gcd_elastic` and
  `traffic_lights_elastic` are coarse (see *Dependency graphs*).
- **Two versions of the pipeline.** Two versions of the pipeline program
  exist. The one built here has no extra `F2` stage and multiplies by 4. The
  other version adds a stage `F2 = F1 * 3` and samples an input as 0 only
  when the other input is present.
- **Multiplier stages.** The stage structure of the multiplier is an
  interpretation: four byte stages with staggered byte delays.
- **Register state.** The encoding of the program state (the `Run`, `Idle`,
  `W1`/`W2` and phase/counter registers) is this design's own choice.
- **Falling-edge register.** Only the rising-edge latch pair is provided.
- **Buffer controller form.** The controller keeps its state in flip-flops.
  A form built only from latches is equally valid, but it is not provided.

## Simulating

Every testbench checks itself and prints
`TB_RESULT checks=<n> failures=<n>`. Each testbench has a watchdog. The
random test environment is in `tb/`:

- `elastic_producer` is a persistent random source;
- `elastic_consumer` applies random stops and checks persistence.

Example with plain Verilator (5.x):

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/elastic_pkg.sv rtl/traffic_pkg.sv tb/tb_elastic_esterel_top.sv \
  --top-module tb_elastic_esterel_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_elastic_latch`, `tb_double_latch` | Phase behaviour and two-token storage. |
| `tb_eb_ctrl` | Capacity of exactly two, order, full rate, one-cycle latency. |
| `tb_elastic_join`, `tb_elastic_fork_lazy` | Exhaustive truth tables. |
| `tb_elastic_fork_eager` | Random streams; counts partial (eager) deliveries. |
| `tb_elastic_control` | A small accumulator netlist against a reference. |
| `tb_pipe_elastic`, `tb_parallel_emit_elastic`, `tb_gcd_elastic`, `tb_traffic_lights_elastic` | Latency equivalence against a cycle model of the program: 5000 reactions (6000 for the traffic lights) under each of 25 valid/stop rate pairs (valid 0.2–1.0, stop 0–0.8), repeated with 5 random input sequences: 125 runs per design. `tb_pipe_elastic` also checks that the pipeline runs at one token per cycle without bubbles. |
| `tb_mult_elastic` | All three granularities; prints the full rate tables. |
| `tb_elastic_esterel_top` | The top at its default parameters. It drives all 19 input channels and 14 output channels at once and checks every stream. It counts stalls, retries, bubbles, channel skew, initial tokens, register buffers holding two tokens, partial deliveries by an eager fork, gcd results and restarts, traffic-light switches by request and by timeout, and inputs ignored by a finished parallel-emit thread. It fails if any of these never happens. |
