# Physical Broadcast Structure (PBS) — RTL

A PBS is an on-chip or on-wafer network in which a message sent by any one
processing node (PN) reaches every PN of its *broadcast domain*. It was
proposed (M. Rudnick and D. Hammerstrom) as the communication fabric of a
wafer-scale machine that emulates large neural networks. Each PN hosts
several simulated neurons. When a neuron's output changes, its PN sends one
short message, and every PN whose neurons listen to that neuron picks the
message up. Messages carry no destination, so nothing is routed. The only
hard problem is getting many senders onto one shared channel, and then
getting that channel to every receiver at a steady bit rate despite long
wires.

The structure is a **dual tree**:

```
          PN transmit ports                      PN receive ports
   |  |  |  |   ...   |  |  |  |          |  |  |  |   ...   |  |  |  |
   [C] [C] [C]  ...   [C] [C]             [B] [B] [B]  ...   [B] [B]   level 1
      \  |  /            \ |                  \  |  /           \ |
        [C]   ...        [C]                   [B]   ...        [B]    level 2
           \    ...     /                         \    ...     /
              [C root] ======== root link ======== [B root]            level h
        concentrate tree                        broadcast tree
```

- In the **concentrate tree**, each switch node (SN) takes one whole message
  at a time from one of its α children and passes it upwards. The root
  therefore carries a single stream that holds every message of the domain.
- In the **broadcast tree**, each SN copies what it receives to all α
  children. Every PN sees every message in the same cycle.

A domain of height h is called H_h and has α^h PNs. This RTL implements the
main configuration:

- branching ratio α = 4
- an H_5 domain, 1024 PNs
- 32-bit messages
- a "4-bit PBS": the bottom links are 4 bits wide
- a fat tree from the link between levels 3 and 4 upwards
- a duplicated concentrate root

Beside the domain sits a model of the **TBH test chip**. This small chip was
built to demonstrate the structure: 8 PNs, a binary tree of 7 switches, and
1-bit links.

## Link geometry and the fat-tree timing model

This is the part of the design that is least obvious.

Links higher in the tree are physically longer, so a flit takes longer to
cross them. If every link had the same width, the root link would limit the
whole domain. The fat-tree rule fixes this. Above a chosen level, each link
is r_m = 2 times wider than the one below it, and may take twice as long per
flit. Every level then carries the same number of bits per unit time.

Links are numbered by their lower end. Link l joins tree level l to level
l+1, and level 0 is the PN row. The formulas are:

- `link_width(l) = BASE_W` for `l < FAT_FROM`
- `link_width(l) = BASE_W * RM^(l - FAT_FROM + 1)` for `l >= FAT_FROM`
- `link_cycles(l) = link_width(l) / BASE_W`

`link_cycles` is the flit time in clock cycles. These functions are in
`pbs_pkg`. With the defaults (BASE_W = 4, RM = 2, FAT_FROM = 3, LEVELS = 5):

| link | joins levels | width | cycles per flit | bits per cycle |
|------|--------------|-------|-----------------|----------------|
| 0    | PN - 1       | 4     | 1               | 4              |
| 1    | 1 - 2        | 4     | 1               | 4              |
| 2    | 2 - 3        | 4     | 1               | 4              |
| 3    | 3 - 4        | 8     | 2               | 4              |
| 4    | 4 - 5        | 16    | 4               | 4              |
| root | C5 - B5      | 16    | 4               | 4              |

The root link between the two root SNs is treated like link h−1. The layout
places the two roots no farther apart than a level h−1 SN is from its root.

The whole design runs on one synchronous clock. One cycle is the time of
one bottom-level flit. Wire delay is modelled inside the SNs. An SN's
transmit buffer presents a newly loaded flit on its output link only after
`link_cycles − 1` further cycles. So a link of 4 cycles moves at most one
16-bit flit every 4 cycles.

A real wafer would need an asynchronous link protocol between SNs that have
independent clocks. That protocol is not modelled.

Throughput is BASE_W bits per cycle for the whole domain: one 32-bit message
per 8 cycles. The target was one message per 100 ns per domain, which needs
a clock period of 12.5 ns or less.

## Concentrate SN (`pbs_concentrate_sn`)

Each concentrate SN has three parts:

- **Receive buffer.** It takes `OUT_W/IN_W` consecutive flits of the granted
  child and builds one outgoing flit from them, first flit in the low bits.
- **Transmit buffer.** It holds that flit for the outgoing link's flit time.
- **Arbiter.** It grants one child for a whole message, `MSG_W/IN_W`
  incoming flits. It then moves on round robin:
  - The search runs downwards from the child just below the last winner.
  - After reset, the highest-numbered child has first call.
  - A child with nothing pending is skipped.
  - No child waits more than α−1 messages.

  For α = 2 this reduces to "one message from the high child, then one from
  the low child" when both have traffic.

The receive and transmit buffers work concurrently, so a non-fat SN passes
one flit per cycle.

The links use a `valid`/`ready` handshake: a flit moves in any cycle where
both are high. `in_ready` is one-hot and combinational from `in_valid`.

The `run` input gates only `out_valid`. It exists for the TBH chip's run
control. In a domain it is tied high.

Assertions check two rules:

- `in_ready` is never given to two children at once.
- A presented flit stays presented until it is taken.

## Broadcast SN (`pbs_broadcast_sn`)

A broadcast SN has a receive buffer and a transmit buffer. Each received
flit is sent down as `IN_W/OUT_W` narrower flits, low part first, each held
for the lower link's flit time. Every outgoing flit is copied to all α
children.

There is no flow control. Each level carries the same bit rate, so the
transmit buffer is always free in time for the next flit. An assertion
(`a_no_overrun`) catches a parameter set that breaks this balance.

## PN ports (`pbs_tx_port`, `pbs_rx_port`)

`pbs_tx_port` is the PN side of the concentrate tree:

- It holds a queue of `DEPTH` (4) messages.
- It sends each message as 8 four-bit flits, least significant first.
- `msg_ready` falls when the queue is full. This is how a PN learns that
  the domain is saturated.

`pbs_rx_port` reassembles the flits. It pulses `msg_valid` for one cycle,
the cycle after the last flit. All PNs of a domain pulse in the same cycle.

Choosing which messages a PN's neurons actually listen to is the PN's own
job, so the port delivers every message. The message's contents are up to
the PNs: the intended format is a neuron address and its new state.

## Duplicated root and initialisation (`pbs_redundant_select`)

The loss of a concentrate root SN silences the whole domain. So, with
`REDUNDANT_ROOT = 1`, the concentrate root is built twice. Both copies are
fed by the same level-4 SNs. The broadcast root takes its input through
`pbs_redundant_select`, which works like this:

1. Raising `cfg_init` starts a global initialisation. Every port is marked
   NOT OK.
2. While `cfg_init` is high, the PNs each send the test pattern message,
   `32'hC3A5_5A3C`. The selector drains both root copies and compares every
   complete message with the pattern.
3. A copy that delivers the pattern intact is marked OK (`root_ok`).
4. When `cfg_init` falls, the lowest-numbered OK copy is connected straight
   through, with no added latency. The other copy is drained.
5. If neither copy passed, `root_damaged` is raised and the domain stays
   silent.

During initialisation, a level-4 SN's flit counts as taken when either root
copy takes it. Afterwards the SN follows the ready of the copy in use. After
reset, with no initialisation, copy 0 is used.

Redundancy is applied only at the root. The selector module is generic
(NPORT copies), so it can be placed at other levels too.

## The TBH test chip (`tbh_chip` = `tbh_inmod` + `tbh_tmod` + `tbh_outmod`)

- **Transmit PNs (`tbh_inmod`).** Eight 7-bit registers. A message is a
  3-bit receive PN address in bits 2:0 and a 4-bit value in bits 6:3
  (`pbs_pkg::tbh_msg_t`). The address is sent first, bit 0 first.
  - Each PN shifts out one bit per `taken` and counts to seven.
  - The bit leaving position 0 re-enters at position 6, so after a full
    message the register holds its original contents again.
  - With `auto_mode` high, a PN resends its message forever. Otherwise it
    sends it once.
  - `write` loads a register through `wr_addr`/`wr_data`.
- **Switch tree (`tbh_tmod`).** Seven `pbs_concentrate_sn` instances with
  α = 2, 1-bit flits and 7-bit messages:
  - switches 0 to 3 serve PN pairs;
  - switches 4 and 5 serve switch pairs;
  - switch 6 is the root and drives the single global receive line.
  - Switch outputs are qualified by `run`. When run drops, each switch
    finishes the bit it holds and stops.
  - The valid, bit and taken line of each switch comes out as a monitor
    pin.
  - With all eight PNs loaded, the tree sends the messages of PNs
    7, 3, 5, 1, 6, 2, 4, 0 in that order: 56 bits in 56 cycles.
- **Receive PNs (`tbh_outmod`).**
  - The first three bits of each message shift into an address register
    (`adr_mon`).
  - The next four bits shift straight into receive register `rreg[addr]`.
  - A counter modulo 7 tracks the bit position.
  - `read`/`rd_addr` read a register. `rd_ready` says the register has
    received a complete message since reset.

The chip used a two-phase non-overlapping clock. Here each pair of phases is
one rising edge.

## Top level (`pbs_top`)

`pbs_top` puts one H_5 domain (`pbs_dual_tree`) and the TBH chip side by
side. Each has its own ports:

- domain: `tx_*`, `rx_*`, `cfg_init`, `root_ok`, `root_damaged`
- TBH chip: `tbh_*`

They share only the clock.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ALPHA` | 4 | branching ratio α |
| `LEVELS` | 5 | domain height h; α^h PNs |
| `BASE_W` | 4 | bottom link width (the "4-bit PBS") |
| `RM` | 2 | fat-tree multiplexing ratio |
| `FAT_FROM` | 3 | lowest fat link (link 3 joins levels 3 and 4) |
| `MSG_W` | 32 | message size in bits |
| `TXQ` | 4 | PN transmit queue depth |
| `REDUNDANT_ROOT` | 1 | duplicate the concentrate root |

Widths must divide evenly: `BASE_W` must divide every link width, and every
link width must divide `MSG_W`. Setting `FAT_FROM ≥ LEVELS` gives a non-fat
tree.

## Testbenches and simulation

Every module has a self-checking testbench in `tb/` with a watchdog. Each
prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_pbs_concentrate_sn` | a fat-link SN (4-bit in, 8-bit out, 2 cycles): messages whole and never interleaved, round-robin order 3,2,1,0,…, one flit per 2 cycles when saturated, random backpressure |
| `tb_pbs_broadcast_sn` | two fat-link SNs: low part first, all children in the same cycle, exact arrival cycles |
| `tb_pbs_tx_port`, `tb_pbs_rx_port` | flit order, queue full, message pulse |
| `tb_pbs_concentrate_tree` | a binary bit-serial H_3 with duplicated root and a 4-ary H_2: every message reaches the root intact |
| `tb_pbs_broadcast_tree` | every leaf gets every flit in the same cycle |
| `tb_pbs_dual_tree` | a 16-PN domain with duplicated root and initialisation, and an 8-PN bit-serial domain: delivery to all PNs in step, saturated rate |
| `tb_pbs_h4_domain` | a 256-PN H_4 domain (the size used to tile a 1024-PN wafer with overlapping domains) whose root copy 0 has its data lines stuck at zero: initialisation marks only copy 1 OK, then delivery to all PNs in step at the saturated rate through copy 1 |
| `tb_pbs_redundant_select` | OK marking, damaged detection, selection |
| `tb_tbh_inmod`, `tb_tbh_tmod`, `tb_tbh_outmod`, `tb_tbh_chip` | TBH bit order, tree order, 56 bits in 56 cycles, run stop, auto resend, reads |
| `tb_pbs_top` | the full-size design (no parameter overrides), described below |

`tb_pbs_top` runs the following sequence:

1. Redundancy initialisation.
2. Every one of the 1024 PNs sends two messages, and four "hot" PNs send
   seven each.
3. It checks that all 1024 PNs receive every message in step, in order per
   sender, and at one message per 8 cycles while saturated.
4. It drives the TBH chip through load, run, pause and auto-resend.

It counts each mechanism and fails if any of them never occurs:

- contention
- grant changes
- fat-link transfers
- full transmit queues
- rate-checked deliveries
- TBH stop
- TBH auto resend
- TBH reads

Building it with verilator takes a few minutes. The run takes seconds.

To run one testbench with plain verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pbs_pkg.sv \
    tb/tb_pbs_dual_tree.sv --top-module tb_pbs_dual_tree -o sim
./obj_dir/sim
```

Other modules are found through `-y rtl -y tb` or the `-I` paths, because
each file is named after its module.

## How this RTL departs from the original proposal

- **Clocking.** There is one synchronous clock. Wire delay is a per-level
  flit time in cycles, not an asynchronous handshake between independently
  clocked SNs.
- **Buffer sizes.** The PN transmit queue depth (4) is this design's
  choice.
- **Message packing.** Messages are not packed into wider flits. With the
  defaults the widest flit (16 bits) divides a message evenly.
- **Arbitration.** The arbitration is equal-priority round robin, one
  message per grant. Other priority schemes are possible but are not built.
- **Initialisation.** The test pattern value, the choice of the
  lowest-numbered OK copy, and "copy 0 after reset" are this design's
  choices. Redundancy is built only at the root.
- **TBH chip, one clock edge.** The chip's two-phase clock is modelled as
  one clock edge.
- **TBH chip, taken-line repair.** The fabricated chip had a repair to a
  timing problem on its taken line. That repair is not modelled.
- **TBH chip, run qualification.** The original description is not
  consistent about whether only the root switch or every switch obeys run.
  Here every switch output is qualified.
- **Not built.** The PN's computation, the point-to-point network that
  complements the broadcast domains, line drivers and repeaters (analog),
  and a PN's self-isolation in a damaged region.
