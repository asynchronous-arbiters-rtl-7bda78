# Request/acknowledge arbiters

When several independent requesters — processors, an I/O data channel, a
drum — share one functional unit such as a memory or a multiplier, some
logic must let them through one at a time. It must serve every request
exactly once. It must never invent a request. It must accept a new request
from any idle port at any moment, even while it is busy with another. This
repository is a synthesizable SystemVerilog arbiter family built for that
job. The parts are:

- an N-port arbiter built from a per-port *buffer* and *ACTIVE flip-flop*,
  a small *control section* (AWAIT flip-flop, DECIDE one-shot), and an
  exchangeable *priority network*;
- four priority networks: linear (fixed order), ring (round robin), mixed
  (one fixed-priority port, one medium, two that alternate) and a
  history-based 3:2:1 ratio rule;
- a two-input ring arbiter and two four-port *trees* built from it;
- a top level, `arbiters_top`, that instantiates one of each.

The organisation follows a classic asynchronous (self-timed) arbiter
design. This implementation is **clocked**: each cross-coupled latch of the
original gate-level circuit is a flip-flop, and the DECIDE one-shot
counts clock cycles. The section *Clocked rendition* below lists what that
changes.

## The handshake

Every port, on the client side and on the server side, uses the same
four-phase handshake on a request wire `R` and an acknowledge wire `A`:

```
        IDLE | ACTIVE | RESET REQ. | RESETTING | IDLE
R   ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________________
A   ________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__________
```

The client raises `R`. The arbiter gets the server to do the work and
raises `A`. The client lowers `R`. The arbiter lowers `A` once everything
behind it has reset. Only then may the client raise `R` again. The
server-side pair is called `R_0`/`A_0` (`r0`/`a0` in the RTL).

Port *j* of the description is bit *j−1* of every vector: `req[0]` is port 1.

## One service cycle, signal by signal

This is the part that needs care. Every internal signal has one job:

| signal | where | meaning |
|---|---|---|
| `R'_j` (`r_inner`) | buffer → ACTIVE logic | inner copy of the request; dropped as soon as the server answers |
| `A'_j` (`a_inner`) | ACTIVE logic → buffer | server acknowledge, steered to the one active port: `ACT_j & A_0` |
| `ACT_j` | ACTIVE flip-flop | port *j* is requesting or being served |
| `PRI_j` | priority network | clear `ACT_j`: a higher-priority port was chosen |
| `R''_j` (`r_dd`) | ACTIVE logic → control | `R'_j & ACT_j`: the server is working for *j*, and no reset has started yet |
| `AWAIT` | control | the arbiter is free to take new requests |
| `DECIDE` | control | the priority network is choosing |
| `ACK` | control → ports | `A_0`, passed through |

The sequence for one request:

1. **Capture.** `R_j` rises and `R'_j` follows at once. While `AWAIT` is
   true, `R'_j` sets `ACT_j`. Several ports may set their ACT flip-flops
   in the same clock.
2. **Freeze.** Any `ACT_j` true while `AWAIT` is true clears `AWAIT` and
   starts the DECIDE one-shot. With `AWAIT` false, no further port can
   become active. Requests that arrive now wait in their buffers.
3. **Decide.** During `DECIDE` the priority network raises `PRI` for every
   active port that loses, and those `ACT` flip-flops clear. DECIDE lasts
   long enough for exactly one `ACT` to remain.
4. **Request.** When DECIDE ends, `R_0 = OR(R''_j) & ~AWAIT & ~DECIDE`
   rises.
5. **Acknowledge.** The server raises `A_0`. It reaches only the active
   port as `A'_j`, and the buffer raises `A_j` to the client. In the same
   step the buffer drops `R'_j`, so `R''_j` and then `R_0` fall. The
   server's reset therefore starts at once, in parallel with the client's.
   `ACT_j` stays set, so that the falling `A_0` still has a port to go to.
6. **Reset.** The server lowers `A_0`, and `A'_j` falls. With both `R'_j`
   and `A'_j` low, `ACT_j` clears. Separately, the buffer keeps `A_j` high
   until the client has lowered `R_j` *and* `A'_j` is low. This is what
   keeps a client that is slow to drop its request from getting a second
   service out of one request.
7. **Re-arm.** With no `ACT` left and DECIDE over, `AWAIT` is set again.
   The next decision can start on the next clock. Nothing new starts
   before the previous port's server cycle has fully reset.

The buffer's two equations are `A_j = A'_j | (R_j & A_j)` (a hold loop,
here a flip-flop) and `R'_j = R_j & ~A_j`. The ACTIVE flip-flop is set by
`R'_j & AWAIT` and cleared by `PRI_j | (~R'_j & ~A'_j)`. When set and clear
coincide, clear wins.

### Clock-level timing (`DECIDE_CYCLES = 2`)

Inputs are taken as synchronous to `clk`. Call the clock edge that sees a
new request edge 0.

| edge | event |
|---|---|
| 0 | `ACT_j` set |
| 1 | `AWAIT` falls, `DECIDE` rises |
| 2 | losers' `ACT` cleared |
| 3 | `DECIDE` falls; `R_0` is high after this edge (latency `DECIDE_CYCLES + 2`) |
| t (`A_0` seen high) | `A'_j` high combinationally |
| t+1 | `A_j` rises; `R'_j`, `R''_j` and `R_0` fall |
| u (`A_0` seen low) | `A'_j` low |
| u+1 | `ACT_j` clears; `A_j` falls if `R_j` is already low |
| u+2 | `AWAIT` set; new requests are captured on the following edge |

`R_0` is combinational from `R_j` and arbiter state, and `A_j` is
registered. There is therefore no combinational path around a loop when
arbiters are chained into trees. With a server that takes 6 clocks for
each of its two transitions, a fully loaded arbiter completes one service
every 19 clocks.

## Priority networks

All networks map the vector `ACT` to `PRI`. The one chosen is selected by
the `RULE` parameter of `arbiter` (type `arb_pkg::prio_rule_e`).

- **Linear** (`prio_linear`, `PRIO_LINEAR`). `PRI_i = OR(ACT_j, j < i)`:
  port 1 always wins. It has no memory, so it need not wait for DECIDE. It
  acts whenever two ports are active. A port that keeps requesting starves
  everything below it.
- **Ring** (`prio_ring`, `PRIO_RING`). A binary register `CT` holds the
  last port served. For the next decision, the port after `CT` around the
  ring is highest and `CT` itself is lowest. Because the network has
  memory, `PRI` is gated by DECIDE: priority is resolved on the old `CT`,
  and `CT` takes the encoded winner at the end of DECIDE. Fully loaded,
  service goes 1, 2, …, N, 1, … and no port can lock out the others.
  After reset `CT = N−1`, so port 1 goes first.
- **Mixed** (`prio_mixed4`, `PRIO_MIXED`, N = 4). Port 1 beats all others,
  and port 2 beats 3 and 4; these two terms are not gated. Ports 3 and 4
  alternate through a one-bit flip-flop `last3`, which is loaded with
  `ACT_3` when DECIDE ends. The intended use is a memory shared by a drum
  (port 1, cannot wait), a data channel (port 2, other I/O multiplexed
  onto it) and two processors (ports 3 and 4, which may wait but must not
  starve each other). Because `last3` is loaded from `ACT_3`, port 3 is
  favoured over 4 after port 1 or port 2 has been served.
- **Ratio** (`prio_ratio3`, `PRIO_RATIO`, N = 3). This keeps the fully
  loaded service ratio of ports 1:2:3 at 3:2:1 (parameters `W1..W3`). It
  does so from a six-entry shift register of the ports served. At each
  decision it scores every port as `W_k −` (its count among the five
  newest entries, the ones that stay in the window), and the highest
  active score wins; lower port number wins a tie. Like the ring network
  it is gated by DECIDE and updated when DECIDE ends. Fully loaded, 60
  services split exactly 30:20:10.

## Arbiter trees

`arbiter2` is the two-input ring arbiter: the ring network with N = 2,
where `CT` is a single "port 2 was last" flip-flop. An arbiter's server
side (`r0`/`a0`) has the same handshake as a client port, so arbiters
nest.

- `arb_tree4` has two leaf arbiters (ports 1–2 and 3–4) feeding a root.
  Fully loaded, it serves 1, 3, 2, 4, 1, …. While one leaf's client is
  being served, the other leaf runs its DECIDE, so the root always finds a
  request waiting. If DECIDE is shorter than the server's busy time, the
  two-level tree runs at the same rate as a single four-port arbiter. The
  testbench measures 608 clocks for 32 services for both.
- `arb_tree_mixed4` is a chain: ports 3 and 4 go to a ring arbiter, its
  output and port 2 to the next arbiter, and that output and port 1 to the
  root. It approximates the mixed network. The two upper arbiters here use
  the linear rule, with the directly attached port preferred. It differs
  from the single mixed network because each level decides before it knows
  about requests at the levels above. For example, when port 1 and port 2
  arrive together with the root idle, port 1 wins only because its request
  reaches the root first.

## Top level

`arbiters_top` (parameters `N = 4`, `DECIDE_CYCLES = 2`) places the
following side by side, each with its own plain ports:

| prefix | instance | role |
|---|---|---|
| `mem_` | `arbiter`, N = 4, mixed | memory: 1 drum, 2 data channel, 3–4 processors |
| `mul_` | `arbiter2` | multiplier shared by the two processors |
| `ring_` | `arbiter`, N, ring | general round-robin arbiter |
| `lin_` | `arbiter`, N, linear | general fixed-priority arbiter |
| `tree_` | `arb_tree4` | four ports from two-input arbiters |
| `treem_` | `arb_tree_mixed4` | tree approximating the mixed rule |
| `rat_` | `arbiter`, N = 3, ratio | 3:2:1 service ratio |

The clients and the served units are not part of the RTL. The testbenches
model them as generic four-phase requesters (`tb/hs_client.sv`) and
responders (`tb/hs_server.sv`).

## Clocked rendition and other choices

These points depart from, or add to, the asynchronous original:

- **Clocked state.** Every latch is an `always_ff` flip-flop with an
  asynchronous active-low reset to the idle state: `AWAIT` true, no `ACT`,
  no acknowledge held. Each gate-level "immediately" becomes "at the next
  clock edge", wherever a feedback loop has been cut by a flip-flop.
- **DECIDE is a cycle count.** The original one-shot only has to outlast
  the settling of the priority network. `DECIDE_CYCLES = 2` gives one
  clock for the losers to clear and one in which a single winner is
  stable. The ring, mixed and ratio memories are loaded in the clock after
  DECIDE, when exactly one `ACT` is left. A longer DECIDE only adds
  latency; only the default is exercised by the testbenches.
- **No synchronizers.** `req` and `a0` must be synchronous to `clk`. If
  the clients run on other clocks, add two-flop synchronizers in front.
  Metastability is not handled inside.
- **When the server reset starts.** In step 5, the inner request `R'_j`
  is dropped when the server acknowledges. It is not dropped when the
  client lowers `R_j`. The client sees no difference. The server
  finishes sooner.
- **Sizes.** N = 4 is the size of the four-port examples. The general
  networks accept any N ≥ 2. Mixed requires N = 4 and ratio requires
  N = 3; other sizes stop elaboration with an error.
- **Mixed network polarity.** Which `last3` output gates which of ports
  3 and 4 is chosen so that they alternate.
- **Ratio network internals.** Only the goal is fixed: a 3:2:1 ratio from
  a six-cycle history. The scoring rule and the tie-break are this
  implementation's own.
- **Tree rules.** The use of the linear rule in the two upper arbiters of
  `arb_tree_mixed4` is this implementation's own choice.

## Assertions

`arbiter` checks two rules. Whenever `R_0` is high, exactly one `ACT` is
set. When DECIDE ends, exactly one `ACT` is set. `arb_control` checks that
`A_0` never rises without a request. They are concurrent assertions,
active with `--assert`.

## Files

`rtl/`: `arb_pkg` (rule enum), `port_buffer`, `active_ff`, `decide_oneshot`,
`arb_control`, `prio_linear`, `prio_ring`, `prio_mixed4`, `prio_ratio3`,
`arbiter`, `arbiter2`, `arb_tree4`, `arb_tree_mixed4`, `arbiters_top`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus the
client and server models. Each prints
`TB_RESULT checks=<n> failures=<m>`.

- The unit testbenches walk through the handshake, check each priority
  rule against an independent model, and check the DECIDE length and the
  request-to-`R_0` latency.
- `tb_arbiter` checks the service order of the linear, ring and mixed
  arbiters. It also runs random traffic and checks that each request gets
  exactly one acknowledge and one server cycle.
- `tb_arb_tree4` checks the 1, 3, 2, 4 order and compares the tree's rate
  with a single four-port arbiter.
- `tb_arbiters_top` runs the whole top at its default parameters:
  - the memory example (processor, then data channel, then the other
    processor), drum precedence and processor alternation;
  - multiplier alternation and the 3:2:1 ratio;
  - random traffic on all seven arbiters.

  It also counts each mechanism and fails if any never occurs: priority
  clears, requests arriving while busy, buffer holds, ring rotation, 3/4
  alternation, and a tree root finding a request waiting.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/arb_pkg.sv tb/tb_arbiters_top.sv --top-module tb_arbiters_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_arbiters_top` with any other testbench name. Each one runs in
well under a second.

## Trust and limits

- Every module lints cleanly apart from style warnings: the reset is used
  both as a flip-flop reset and in assertion `disable iff`, and a few
  ports are intentionally left open.
- Every module elaborates in a second SystemVerilog front end and
  synthesizes. The top is about 1000 word-level cells and 120 flip-flops.
- Each testbench has been checked to fail on a deliberately broken copy of
  its module.
- Not covered: the metastability behaviour of the original asynchronous
  circuit, and any gate-level or timing-accurate model of it. The RTL
  reproduces the protocol, the priority behaviour and the structure, not
  the self-timed implementation.
