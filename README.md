# Two-phase handshaking wrappers for GALS systems

A globally asynchronous, locally synchronous (GALS) system lets every
synchronous block keep its own clock and moves data between blocks with
asynchronous handshakes instead of a shared clock. The hard part is the
boundary: a word arriving from another clock domain must never meet a clock
edge of the receiver while it is still changing. This design solves that by
**stopping the receiver's clock** for the length of each transfer. Every
synchronous block sits in an *asynchronous wrapper* whose local clock comes
from a ring oscillator that can be held in its low phase ("stretched"). The
wrapper's ports talk to the neighbours with a **two-phase** (transition
signalling, non-return-to-zero) request/acknowledge handshake. One
transfer costs two wire events instead of the four of a return-to-zero
handshake.

The RTL models a chain of two wrappers. Each wrapper holds a 10-bit
accumulator as its synchronous block, and the two local clocks are
independent.

```
          Ri/Ai              Ro1/Ao1 (two-phase)             Ro/Ao
  Din ---[store]--> LS1 -----------------------[store]--> LS2 ------[store]--> Dout
           |        acc1     (optional micropipeline FIFO)   |      acc2
       Input Port  Output Port                          Input Port  Output Port
            \         /                                       \       /
         stretch  stretch                                 stretch  stretch
              \     /                                          \    /
          stretchable clock 1 (Lclk1)                 stretchable clock 2 (Lclk2)

  [store] = DET-FF clocked by the request  ->  C-P latch (C = request, P = acknowledge)
```

## One transfer, step by step

Each wrapper runs the same cycle for every word. The order of events is the
key to the whole design:

1. **Falling edge of Lclk.** The LS module toggles `DEN`, its transition-signalled
   "data enable". Moving `DEN` on the falling edge, not the rising one,
   leaves a full low phase for the ports to react before the next rising edge.
2. **Both ports stretch the clock.** The Input Port raises `Stretch1` and the
   Output Port raises `Stretch2` (each is `DEN xor Ack` of its channel). While
   either is high, the clock generator keeps `Lclk` low.
3. **Output side.** `Ro` makes the same transition as `DEN`, offering the
   accumulator value. That value has been stable since the last rising edge.
   The receiving wrapper answers on `Ao` when its own `DEN` has moved, and
   `Stretch2` falls.
4. **Input side.** When the sender's `Ri` has made the matching transition,
   `Ai` follows (`Ai` is a C-element of `Ri` and `DEN`). `Stretch1` falls.
5. **Rising edge.** When both stretches are low, `Lclk` rises (after a small
   gate delay) and the accumulator adds the word it has just received.

If the request is already waiting when `DEN` moves, the acknowledge follows
at once. The stretch then lasts only a moment and the clock does not slow
down. A wrapper whose neighbours are slow runs at their pace. A wrapper
whose neighbours are fast runs at its own oscillator frequency.

Both ports must complete before the clock resumes. Each wrapper therefore
makes exactly one clock cycle per word.

## Why every channel ends in a DET-FF and a C-P latch

The receiver must see the new word only after it has stopped its clock,
which is the moment of its acknowledge. It must then see the word unchanged
until its next rising edge. In a two-phase channel each request transition,
rising or falling, announces a new word. So the storage is built from parts
that respond to events, not to levels:

* **C-P latch** (`cp_latch`): transparent while its controls C and P are equal,
  holding while they differ. With C = request and P = acknowledge it closes on
  each request and opens on each acknowledge. The controls step
  00 → 10 → 11 → 01 → 00.
* **DET-FF** (`det_ff`): on its own, the C-P latch is transparent whenever the
  channel is idle, so the sender's next word would flow into the receiver
  before any request. A double-edge-triggered flip-flop in front, clocked by
  the request, passes a word only at a request transition. It is built from
  one rising-edge and one falling-edge flip-flop and three XOR gates per bit.
  Each flop stores `din xor` the other flop, and the output is the xor of the
  two.

Result: a word enters the DET-FF on the request. It waits behind the closed
latch until the acknowledge, and it then stays on the receiver's input until
the next request has come *and* the receiver has acknowledged it. The
sender may send its next word early. The test benches count these early
words, and the old word keeps being used until the receiver is ready.

## The stretchable clock

`stretch_clock_gen` is a behavioural model of a ring oscillator closed
through a Muller C-element. One C-element input is the ring, which is `Lclk`
inverted and delayed by `HALF_PERIOD_PS`. The other input is
`NOR(Lclk, Stretch1 | Stretch2)`. With no stretch the loop oscillates with a
period of 2 × `HALF_PERIOD_PS`. A stretch never cuts a high phase short. It
holds a low phase until the last stretch input falls, and `Lclk` then rises
`GATE_DELAY_PS` later. The default of 2337 ps gives 213.95 MHz, the maximum
frequency of the reference implementation. The slower clock of 73.55 MHz,
used to show wrappers at unrelated frequencies, is 6798 ps. Both constants
are in `gals_pkg`.

## Reset and start-up

Reset (`rst_n`, active low, asynchronous) clears the accumulators, `DEN`,
the acknowledge C-elements and the DET-FFs. It holds both local clocks low.
Every C-P latch starts at {C,P} = {0,0}, which is transparent, and shows 0.

After reset each clock first rises once and adds that 0. On the first
falling edge both wrappers make their first `DEN` transition. Wrapper 1's
output and wrapper 2's input then complete a handshake immediately, passing
the initial 0, and wrapper 1 waits for the first word on `Ri`.

The data stream is as follows, with x1, x2, … the words on `Din` and all
sums taken modulo 1024:

* Wrapper 1 emits y = 0, x1, x1+x2, …
* `Dout` carries z = 0, 0, x1, 2·x1+x2, …, the running sum of the y's.
* Each `Dout` word is valid once the sink has toggled `Ao`.

## Optional FIFO between the wrappers

When wrapper 1 is faster than wrapper 2, a FIFO between them absorbs bursts.
`gals_2ph_top` inserts a two-phase micropipeline of `FIFO_STAGES` stages
(default 0, a direct connection). Each stage has:

* a C-element: request from behind, inverted pass-done from ahead;
* a C-P latch;
* capture-done and pass-done delays (`delay_line`, behavioural).

The delays order the events the way the matched delays of a real
micropipeline do. The FIFO holds up to `FIFO_STAGES` words.

## Files

| file | what it is |
|---|---|
| `rtl/gals_pkg.sv` | width and clock constants |
| `rtl/gals_2ph_top.sv` | two wrappers, the channels between them, output storage |
| `rtl/async_wrapper.sv` | input storage, ports, clock generator and LS module of one wrapper |
| `rtl/input_port_2ph.sv`, `rtl/output_port_2ph.sv` | two-phase port controllers |
| `rtl/channel_storage.sv` | DET-FF + C-P latch at the end of a channel |
| `rtl/det_ff.sv`, `rtl/cp_latch.sv`, `rtl/muller_c.sv` | storage and handshake primitives |
| `rtl/ls_accumulator.sv` | the 10-bit accumulator used as LS module |
| `rtl/stretch_clock_gen.sv` | behavioural stretchable ring-oscillator clock |
| `rtl/micropipeline.sv`, `rtl/delay_line.sv` | optional two-phase FIFO and its delay element |
| `tb/tb_*.sv` | self-checking test benches, one per module |
| `tb/gals_harness.sv` | source, sink and reference model used by `tb_gals_2ph_top` |

Top-level parameters: `WIDTH` (10), `HALF_PERIOD1_PS` and `HALF_PERIOD2_PS`
(2337 each), `FIFO_STAGES` (0).

## Simulating

Every test bench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/gals_pkg.sv \
    tb/tb_gals_2ph_top.sv --top-module tb_gals_2ph_top -Mdir obj
obj/Vtb_gals_2ph_top
```

* `tb_gals_2ph_top` runs four configurations side by side, 40 words each:
  * both clocks at 213.95 MHz;
  * 213.95 → 73.55 MHz;
  * 73.55 → 213.95 MHz;
  * 213.95 → 73.55 MHz with a 4-stage FIFO.

  It checks every `Dout` word against the model above. It also checks:
  * one local clock cycle per word in each wrapper;
  * a high phase of exactly the half period;
  * that stretched low phases, early words and (with the FIFO) at least two
    buffered words all occurred.
* `tb_gals_2ph_full` runs the top at its default parameters with 200 words.
* The unit benches cover the C-element truth table, both DET-FF edges, the
  four C-P latch states, blocking in the channel storage, both port
  handshake orders, the clock's phase lengths and stretch behaviour, the
  accumulator and the FIFO. The FIFO bench includes filling it to capacity.

The simulator must support timing (`--timing`): the clock generator and the
FIFO delays use `#` delays. All files use `timeunit 1ps`.

## How far to trust it, and where it departs from the reference

* **The ports are derived from their signal orderings, not copied from
  gate-level netlists.** The Input Port is `Ack = C(Req, DEN)`,
  `Stretch = DEN xor Ack`. The Output Port is `Req = DEN`,
  `Stretch = DEN xor Ack`. These produce the described event orders. The
  Output Port raises `Stretch` and `Req` together rather than one after the
  other. When a request arrives before `DEN`, the Input Port's stretch is
  only a glitch.
* **Zero-delay logic, behavioural clocks.** Apart from the clock model and
  the FIFO delay elements, everything is zero-delay RTL. Correctness relies
  on the ordering those models give. In the storage element, the request
  closes the latch before the DET-FF output changes. The clock rises
  `GATE_DELAY_PS` after the last stretch falls. In silicon these are
  bundled-data timing constraints (request delays matched to data, latch
  faster than flop). They must be met by the physical design. Metastability
  is not modelled.
* **C-elements and C-P latches are written as level latches**, with enables
  `a == b` and `C == P` respectively. This is functionally identical to the
  gate forms. Lint tools report the latches and the clock loop as circular
  logic, which is intended.
* **Choices made here:**
  * one word per LS clock cycle (`DEN` toggles on every falling edge);
  * storage placed at the receiving end of every channel, including an
    extra stage on `Dout`;
  * resets on the DET-FFs and clock generator;
  * accumulator wrap-around;
  * the lumped gate delay of 100 ps;
  * the FIFO structure and depth.
* **Not reproduced:** the gate-level results of the reference
  implementation. It reports a `Din`-to-`Dout` latency of about 18.05 ns
  (against 19.49 ns for a four-phase equivalent) and a larger storage
  area, the price of the DET-FFs. This RTL has no cell delays or areas, so
  those figures cannot be compared. The four-phase baseline itself is not
  included.
