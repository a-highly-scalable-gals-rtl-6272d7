# Token-ring GALS crossbar

A crossbar that joins blocks which each run on their own clock. Senders and
receivers are ordinary synchronous logic. The crossbar between them has no
clock: it is self-timed, moves four-phase dual-rail data, and talks to each
clock domain only through a metastability filter. This style is called GALS,
for globally asynchronous, locally synchronous.

Its main idea is the arbitration. A crossbar needs an arbiter per output port
to decide which input may use it. In a tree arbiter, every request has to
climb the tree and come back down before any data moves. Here each output
port instead owns a **token ring** with one stop per input port. A token
circulates round the ring. A request that finds the token at its stop, or
that waits for it, owns the output port with no further arbitration. Under
heavy load the token is usually already waiting, so arbitration costs little
or nothing. Each stop talks only to its two neighbours, so the ring grows by
one stop per port and has no high-fanout wires.

The default configuration is 4 input ports × 4 output ports with 4-bit words.
Its delays are set to a 180 nm process at 1.8 V: 150 ps per token hop, 550 ps
from a won request to data at the output port, and 160 ps through the output
port.

## Rows, columns and one transfer

```
 sender i ──► input port i ──row i (dual rail)──┬──────────┬── ...
  (clk_i)       │  Req_st[i][*]                 │ grid     │ grid
                │                               │ (i,0)    │ (i,1)
                ▼                               ▼          ▼
           stop i of ring 0, ring 1, ...     column 0   column 1
                                                │          │
                                          output port 0   output port 1 ──► receiver 1
                                          + token ring 0  + token ring 1     (clk_1)
```

Each input port drives one **row**. Each output port is fed by one
**column**. A **grid element** sits at each crossing. While the input
port's `Req_im` for that column is high, the grid element passes the row's
rails onto the column and passes the output port's completion (`Ackdat`)
back to the row. No other element drives the column at that time, because
the ring lets only one row win.

One word from input *i* to output *j* goes like this:

1. Sender *i* holds `syn_req` high, with the word and a one-hot destination.
   On the first rising edge of its clock at which the input port is free,
   the port takes them and raises `Req_st[i][j]`.
2. `Req_st` goes straight to stop *i* of ring *j*. The stop catches the
   token when it gets there and holds it.
3. `Req_im[i][j]` rises once the stop holds the token (`Req_ti`) and output
   port *j* is free (`Ackout[j]`). The row, converted to dual rail, appears
   on column *j*.
4. The output port detects a complete word and becomes **full**. This is
   the `Reqout` state. The port latches the word and drops `Ackout`. The
   completion, steered back through the grid element, clears `Req_st`.
5. Clearing `Req_st` does three things at once. It releases the token, so
   the token moves on *before* the receiver has the word. It returns the
   row to NULL. It lets the input port acknowledge sender *i*.
6. The output port asks receiver *j* for a transfer (`rcv_req`). On the
   receiver's clock edge where `rcv_ackr` is also high, the word moves into
   the receiver's register and `rcv_valid` pulses for one cycle. `Ackout`
   rises again once the column is back at NULL and that cycle has ended.

The token is released early (step 5), so the token's trip to the next
requester overlaps the receiver handshake of the previous word.

## The token ring

The token is a **transition**, not a level. Each stop is a transparent latch
from its input `tin` to its output `tout`, and a link of one hop delay leads
to the next stop. Stop *i* holds the token while `tin != tout`.

* A stop with no request keeps its latch open. An arriving transition passes
  straight through and reaches the next stop one hop later.
* A stop with a request closes its latch. An arriving transition stops
  there, so the stop holds the token and its request has **won**.
* When the request falls, the latch opens and the transition moves on
  immediately.

The link from the last stop back to stop 0 is inverted; this is the
**starter**. Reset clears every latch. Because of the inversion, stop 0 then
sees `tin != tout`, so exactly one token exists. With no requests the token
runs round the ring for ever, one round every N × 150 ps. This free-running
ring is deliberate: a lightly loaded system finds the token at most N−1 hops
away.

Three cases, which the original design calls modes:

* **Mode 1 (loaded):** the request is already up when the token arrives. The
  arrival fires `Req_im` directly.
* **Mode 2 (light):** the token is travelling when the request comes. It
  adds *h* hops of waiting, where *h* is its distance from the stop.
* **Mode 3:** the request and the token arrive at the same instant. The
  stop either catches the token or lets it pass and catches it on the next
  round. Either way there is only one token. In silicon, a MUTEX at the
  stop settles this race. In this RTL it reduces to the stop latch's
  choice, which has no metastability.

Each ring asserts that at most one of its stops holds the token, and each
request port asserts that at most one `Req_im` is high.

## Clock-domain edges: the metastability filter

There are two places where a self-timed signal must enter a clocked block:

* the acknowledge to the sender;
* the request to the receiver.

In both places the signal passes through a two-input MUTEX. The signal is
one input and the **inverted local clock** is the other. While the clock is
low, the clock side holds the MUTEX. A signal that arrives then waits, and
is granted only when the clock rises. A signal that arrives while the clock
is high is granted at once.

So `snd_ack` and `rcv_req` change only while their clock is high, or at most
the filter's resolution time (`MF_PS`, 20 ps) after it falls. They are
therefore settled about half a cycle before the next rising edge. No
synchroniser flops are needed, and nothing is added to the latency when the
signal arrives in the high phase.

`mutex_mf` is a **behavioural model**, not synthesizable logic:

* the first request to arrive wins, and request 1 wins a tie;
* a grant lasts as long as its request stays high;
* the resolution time is fixed.

Real metastability is not modelled. In silicon this part is an analog
cross-coupled latch with a filter.

## Output port: Reqout, Ackout and arming

The output port is the hardest part to follow, because three conditions
overlap:

* **full** (`Reqout`) is set when the completion detector sees a whole word
  on the column, after `OPORT_PS`. It stays set until the receiver has taken
  the word.
* **armed** says the port has seen the column return to NULL since the last
  word (including the delayed completion inside the port). A word that is
  still on the column when the receiver takes the previous copy therefore
  cannot be captured twice.
* **Ackout** = not full, armed, and not inside the receiver's transfer
  cycle. This is what `Req_im` waits for.

`full` and `armed` are latches that feed each other. Lint tools report this
as a combinational loop. It is the intended state-holding circuit, and each
affected file says so in its header.

## Latency budget

Forward latency is measured from a request that can go (token and `Ackout`
present, or the token *h* hops away) to the word being held at the output
port:

    latency = h × HOP_PS + GRID_PS + OPORT_PS

| supply | hop | request + steering | output port | h=0 | h=1 | h=2 | h=3 |
|--------|-----|--------------------|-------------|-----|-----|-----|-----|
| 1.5 V  | 170 | 675                | 200         | 875 | 1045 | 1215 | 1385 |
| 1.8 V  | 150 | 550                | 160         | 710 | 860  | 1010 | 1160 |
| 2.1 V  | 105 | 475                | 130         | 605 | 710  | 815  | 920  |

All values are in ps. The defaults are the 1.8 V row. The other rows come
from overriding `HOP_PS`, `GRID_PS` and `OPORT_PS`. On a 4-stop ring the
average distance is 2.5 hops, or 375 ps of token travel at 1.8 V. The
testbenches check these numbers exactly, to the picosecond.

## Delay annotations

The crossbar has no clock, so its timing lives in the delays. The RTL puts
them on a few continuous assignments:

* `#HOP_PS` on each ring link;
* `#GRID_PS` on the grid element's column drive;
* `#OPORT_PS` on the output port's completion path;
* `#MF_PS` in the filter.

Every other path has zero delay. Synthesis ignores the delays. A gate-level
implementation must instead meet the self-timed ordering the delays stand
for: the data must arrive on the column before its completion is seen, and
a latch must close before its input changes. The latch-based state elements
(the ring stops, `Req_im`, `full`, `armed`, the data latch) are written with
`always_latch` or as plain level-sensitive blocks. Expect lint warnings
about latches and loops. Each file's header says why they stand.

## Where this RTL departs from the published design

* **Stop circuit.** The original ring stop is built from C-elements and a
  MUTEX. Here it is a transparent latch carrying a transition-coded token.
  Its behaviour matches: it holds the token while it requests, passes it
  otherwise, has one hop of delay, and has a starter. The circuit does not
  match.
* **Req_im** is a set/reset latch. It is set by token-and-Ackout and
  cleared only when `Req_st` falls, so it still steers the completion back
  after the token has been released.
* **Receiver pulse.** The transfer pulse at the receiver is one receiver
  clock cycle wide (`taken`), and the design adds a `rcv_valid` strobe. In
  the original this pulse comes from a pulse generator.
* **Arming.** The `armed` condition on the output port is this design's own
  guard against capturing a word twice.
* **Polarity.** All control wires are active high. Several are active low
  in the original.
* **Reset.** One asynchronous active-high reset, `rst`, covers the whole
  design.
* **Sender interface.** The sender gives a one-hot destination, and the
  input port can take a new word every two sender cycles at best.
* **Filter delay.** `MF_PS = 20 ps` is an estimate. The original gives no
  figure for it.

The senders and receivers themselves are outside the design. The testbenches
model them.

## Files

| file | what it is |
|------|-----------|
| `rtl/xbar_pkg.sv` | sizes and delays shared by all modules |
| `rtl/gals_crossbar.sv` | top: input ports, grid, rings, output ports |
| `rtl/input_port.sv` | sender interface + data port + request port |
| `rtl/sender_if.sv` | clocked side of an input port, `Req_st`, acknowledge |
| `rtl/dual_rail_port.sv` | single rail to dual rail, NULL when idle |
| `rtl/input_request_port.sv` | `Req_im` per output port |
| `rtl/token_ring.sv` | one ring, N stops, starter |
| `rtl/grid_element.sv` | steering at one crossing |
| `rtl/completion_detector.sv` | valid / NULL detection of a dual-rail word |
| `rtl/output_port.sv` | Reqout, Ackout, arming, receiver interface |
| `rtl/mutex_mf.sv` | metastability filter (behavioural) |

Each module has a self-checking testbench `tb/tb_<module>.sv`. Two
testbenches cover the whole design:

* `tb/tb_gals_crossbar.sv` runs the 4×4 crossbar at its default
  parameters. Four senders and four receivers, all on unrelated clocks,
  exchange random traffic. The testbench checks:
  * every word arrives intact;
  * the latency of every transfer;
  * that only one row drives each column;
  * that the clock-domain signals change only in the high phase.

  It also counts each mechanism (mode 1, mode 2, tokens passing idle stops,
  early release, contention, a stop waiting for `Ackout`, receiver stalls,
  back-to-back requests) and fails if any of them never happened.
* `tb/tb_latency_table.sv` builds three 4×4 crossbars, one per supply row
  of the table, plus an 8×8 and a 16×16 crossbar at 1.8 V. On each it checks
  the latency for every hop distance from 0 to N−1. It also runs a bare
  8-stop ring and checks 150 ps per hop and 1200 ps per round.

## Simulating

With Verilator 5 (timing support is required, because the design relies on
its delays):

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/xbar_pkg.sv \
        tb/tb_gals_crossbar.sv --top-module tb_gals_crossbar -o sim
    ./obj_dir/sim +verilator+rand+reset+2 +verilator+seed+1

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
watchdog ends a hung run with a failure. Random initial values
(`+verilator+rand+reset+2`) are the intended way to run, since every state
element is reset or initialised.

To try another size, override `N_IN`, `N_OUT` and `DATA_W` on
`gals_crossbar`. The rings, grid and ports scale with them.
`tb_gals_crossbar` itself assumes the 4×4 defaults.

## How far to trust it

* The logic is checked functionally and against the latency budget above,
  in simulation only.
* The delays are the published figures for one process, not a timing
  analysis of this RTL.
* Metastability is not modelled.
* Larger configurations follow from the parameters. 8×8 and 16×16 are
  simulated, with directed transfers only. 32×32 also passes the same test,
  but building it takes several minutes, so it is not part of the
  testbench.
