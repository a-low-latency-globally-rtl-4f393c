# A low-latency stretchable-clock GALS interface

In a globally-asynchronous, locally-synchronous (GALS) system every module runs on
its own local clock. Modules talk to each other only through an asynchronous
four-phase REQ/ACK handshake. While a word crosses from one clock domain to the
other, the clocks of both modules are held still ("stretched"), so neither
module can sample a signal that is changing. No synchronizer flip-flops are
needed, and there is no metastability window. The cost is that a module does
no work while its clock is stopped. The time the interface needs for one
handshake is therefore lost throughput on both sides.

This RTL implements a port-controller pair that keeps that stop as short as
possible. Conventional controllers release the clocks only after the whole
four-phase handshake has finished (REQ+, ACK+, REQ-, ACK-). Here the rising
edge of ACK releases everything at once: it drops REQ, the sender's stretch and
the receiver's stretch in parallel. ACK+ is the earliest safe point. Before it,
the receiver may not yet have taken the word, and a sender whose clock started
again could overwrite it. The pair of controllers needs only two D flip-flops,
two AND gates and one inverter.

An optional Muller-pipeline FIFO can sit on the link. The sender is then
acknowledged by the FIFO as soon as there is room, rather than by the receiver,
so a slow receiver no longer stalls the sender.

## Structure

```
            sender wrapper (async_wrapper)                 receiver wrapper (async_wrapper)
  +----------------------------------------+          +----------------------------------------+
  | stretch_clock_gen --tx_clk--> LS module|          |LS module <--rx_clk-- stretch_clock_gen |
  |        ^ stretch1      |WR, tx_data    |          |   ^RD  ^ rx_data          ^ stretch2   |
  |        |               v               |          |   |    |                  |            |
  |   output_port_controller  --REQ------->|--[muller_fifo, optional]-->|input_port_controller    |
  |                           <--ACK-------|<---------------------------|        |ACK             |
  +----------------------------------------+          +--------|-------------------------------+
                         tx_data ---------------(FIFO)-------> ack_latch (loaded on ACK+) --> rx_data
```

| file | what it is |
|---|---|
| `rtl/gals_pkg.sv` | gate delays, default data width, ring length, FIFO depth |
| `rtl/c_element.sv` | Muller C-element with reset |
| `rtl/stretch_clock_gen.sv` | stretchable ring-oscillator clock (behavioural model, see below) |
| `rtl/output_port_controller.sv` | sender-side controller: WR -> stretch1, REQ |
| `rtl/input_port_controller.sv` | receiver-side controller: RD -> stretch2, ACK |
| `rtl/ack_latch.sv` | data storage element between the domains, loaded on ACK+ |
| `rtl/muller_fifo.sv` | four-phase bundled-data Muller pipeline FIFO |
| `rtl/async_wrapper.sv` | clock generator plus N output and M input port controllers of one LS module |
| `rtl/gals_top.sv` | one sender -> receiver link: two wrappers, optional FIFO, storage element |

The locally synchronous modules themselves are not part of the RTL. The top
brings out each module's clock, its enable and its data. The testbenches
contain example LS modules.

## The handshake, event by event

The LS sender puts a word on `tx_data` and raises `WR` on a rising edge of its
clock. The LS receiver raises `RD` on a rising edge of its own clock. Either may
come first.

1. **WR+ -> stretch1+** The sender's controller is a D flip-flop with D tied to
   1 and its clock input on WR. Its output, stretch1, stops the sender's clock.
2. **stretch1+ -> REQ+** REQ = stretch1 AND NOT ACK.
3. **RD+ -> stretch2+** The receiver's controller has the same kind of
   flip-flop, clocked by RD. Its output, stretch2, stops the receiver's clock.
4. **REQ+ and stretch2+ -> ACK+** ACK = REQ AND stretch2. ACK can only rise
   when a word is offered *and* wanted. The same edge loads the word into
   `ack_latch`.
5. **ACK+ -> REQ-, stretch1-, stretch2-, all in parallel** ACK asynchronously
   clears both flip-flops and, through the inverter, drops REQ. Both clocks
   start again.
6. **stretch2- (or REQ-) -> ACK-** ACK is thus a self-timed pulse lasting one
   flip-flop clear delay plus one AND delay.

The receiver samples `rx_data` on the first rising edge of its clock after the
release. The sender changes `tx_data` at its first edge after the release, which
is after the word was stored. Both LS modules see exactly one clock edge with
their enable still high: the edge at which the transfer is complete. They drop
WR/RD on that edge.

With the default delays (`gals_pkg`), WR and RD rising together lead to the
last stretch falling after 2·T_FF + 2·T_AND = 900 ps. `tb_gals_top` checks this
exactly. A conventional controller pair that waits for REQ-/ACK- before
releasing the clocks adds at least two more gate stages to this path.

### Timing rules the circuit relies on

The controllers are not delay-insensitive. They work when:

- **ACK pulse vs. clock restart.** The ACK pulse (T_FF + T_AND) ends before the
  first clock edge after the release. That edge comes at least T_FF + T_NOR +
  T_C after ACK+, and the LS module's own clock-to-output time follows it.
- **Storage.** The word at the storage element must be stable at ACK+. The
  sender holds it because its clock is stopped until T_FF after ACK+. A FIFO
  keeps its last stage closed until its request falls, which takes at least one
  inverter and one C-element delay after ACK+.
- **Stretch in time.** stretch must reach the clock generator before the next
  rising edge of that clock. That edge is half a period after the WR/RD edge at
  the earliest. If stretch comes later, the LS module sees an extra edge while
  its transfer is still pending.
- **No new enable during ACK.** WR (RD) must not rise again while ACK is still
  high. Otherwise the flip-flop clear would swallow the edge. An LS module whose
  clock has only just restarted cannot do this.

If a technology breaks the first two rules, the usual fix is to add an even
number of inverters on the path that is too fast.

## Stretchable clock generator

`stretch_clock_gen` is a ring oscillator closed through a C-element:
`clk = C( NOR(stretch, clk), NOT^N(clk) )` with N odd. With `clk` = 1 the NOR
output falls at once and the chain output falls after N inverter delays, so
`clk` falls. With `clk` = 0 both inputs rise, so `clk` rises. The period is
2·(N·T_INV + T_C), which gives 555 MHz with the defaults (15 inverters at
50 ps, a 150 ps C-element). While stretch = 1 the NOR output stays 0 and the
clock stays in its low phase. When stretch falls, the chain output is already
high, so the next rising edge follows after only T_NOR + T_C.

This is a **behavioural model**: its frequency exists only through simulated
gate delays, and synthesis turns it into a combinational loop. A real chip
needs a hand-placed ring, or a ring built from library cells with a
delay-matched chain. The port list and the behaviour at the pins are those of
such a circuit.

## Data storage element

One word sits between the two domains. It is stored on the rising edge of the
receiver-side ACK and held until the next ACK+. A level latch that is open for
the whole ACK pulse would be the smaller circuit. But with a FIFO on the link,
the FIFO's last stage releases its word while ACK is still high, and such a
latch would take the next word. The edge-triggered element avoids that; the
direct link works either way.

## Muller-pipeline FIFO

Each stage is one C-element, one inverter and a latch. The C-element of stage i
combines the request from the left with the inverted output of stage i+1. Its
output is both the request to the right and the acknowledge to the left. The
latch of a stage is open while its C-element output is 0 and closes when the
output rises. When the reader stops, a full pipeline alternates full and empty
stages, so it holds STAGES/2 words; STAGES must be even. `FIFO_STAGES` = 0 in
`gals_top` removes the FIFO and connects the controllers directly.

## Wrappers with several ports

`async_wrapper` serves one LS module with `N_OUT` output and `N_IN` input port
controllers. The stretch requests of all its ports are ORed into the clock
generator. The module's clock therefore stops while any of its ports is waiting,
and restarts once every pending port has been served. `gals_top` uses one
wrapper with a single output port and one with a single input port.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 8 | word width; the reference experiment uses an 8-bit multiplier and an 8-bit adder |
| `FIFO_STAGES` | 2 | Muller FIFO stages, even; 2 and 4 are the reference sizes; 0 = direct link |
| `TX_N_INV`, `RX_N_INV` | 15 | inverters in each clock ring (odd) |
| `TX_T_INV_PS`, `RX_T_INV_PS` | 50 | inverter delay per ring (sets the clock frequency) |
| `gals_pkg::T_FF_PS` / `T_AND_PS` / `T_INV_PS` / `T_NOR_PS` / `T_C_PS` | 300 / 150 / 50 / 100 / 150 | gate delays in ps |

The gate delays are estimates for a 0.13 µm standard-cell library, not
characterised values. The reference implementation reports 1260 ps for the
interface latency in such a library, and about 650 MHz as the fastest ring
clock. Both are outside what this RTL can show. Synthesis ignores all `#`
delays.

## How far to trust it, and where it departs

- The interface's published description gives the behaviour of the output
  controller step by step, the gate count of the pair and the order of events.
  The exact gate wiring of both controllers (REQ = stretch1 & ~ACK,
  ACK = REQ & stretch2, both flip-flops cleared by ACK) is reconstructed to fit
  those and is this design's own. It meets the gate count (2 flip-flops,
  2 AND gates, 1 inverter) exactly.
- The storage element is loaded on ACK+ instead of being a latch open during
  ACK (see above).
- Reset inputs on every state-holding element, the OR that merges several
  stretch requests, and all delay values are additions.
- The controllers' flip-flop has two asynchronous clear events (reset and ACK)
  so that it clears from any power-up state in simulation. In hardware it is
  one flip-flop with clear = rst | ACK. Some synthesis front ends reject the
  two-event form and need it rewritten that way.
- The alternative controllers this design was measured against (C-element
  based and standard-cell based), and the pausable-clock and gated-clock
  schemes, are not included.
- The Muller FIFO and the clock generator contain intended combinational loops;
  a linter flags them.

## Simulation

Every file starts with `timescale 1ps/1ps`. The testbenches need Verilator's
timing support:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gals_pkg.sv tb/tb_gals_top.sv --top-module tb_gals_top
obj_dir/Vtb_gals_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if the design hangs.

| testbench | what it shows |
|---|---|
| `tb_gals_top` | eleven links: sender/receiver at 555/133, 555/555 and 133/555 MHz with a counter; an 8-bit multiplier feeding an adder and the reverse at 300/400 and 400/300 MHz; all direct and through 2- and 4-stage FIFOs; a slow reader that fills the FIFO; both clocks at 646 MHz. Checks that no clock edge occurs while its clock is stretched. Checks every received result and the four-phase order on both sides. Counts sender stalls, receiver stalls, early FIFO acknowledges, full-FIFO stalls and parallel clock releases, and requires each to occur. Measures the 900 ps latency. |
| `tb_gals_top_full` | the top with all defaults (8 bits, 2-stage FIFO, 555 MHz): multiplier -> adder, 40 words |
| `tb_async_wrapper` | 2 output + 1 input port; clock held while any port is pending, released after the last |
| `tb_output_port_controller`, `tb_input_port_controller` | every event delay of the handshake, both arrival orders |
| `tb_stretch_clock_gen` | period at 555 and 133 MHz, stop in the same cycle, restart delay |
| `tb_muller_fifo` | ordering with random delays, STAGES/2 capacity, empty-FIFO latency |
| `tb_c_element`, `tb_ack_latch` | truth table and hold behaviour |

The simulator has two states. Start values are random unless reset, so every
testbench pulses reset from 0 to 1 before it starts. The controllers' flip-flops
react to the reset edge even when a random start value has left ACK high. With
the single clear input clr = rst | ACK, the reset edge could be lost in that
case; that is why the RTL keeps two clear events (see above).
