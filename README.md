# One-bit FM0 / Manchester encoder with fully shared logic

Dedicated short-range communication (DSRC) links for vehicles use two
line codes on the downlink, depending on the region: FM0 (Europe, 500 kb/s)
and Manchester (Japan at 4 Mb/s, America at 27 Mb/s). Both give a
dc-balanced waveform by splitting every bit window into two halves. A
transmitter that must support both usually carries two separate encoders
and a multiplexer, and most of that hardware sits idle in either mode.

This encoder serves both codes with five components, every one of which
is on the signal path in both modes:

| component | role in FM0 | role in Manchester |
|---|---|---|
| MUX_2 (select `mode`) | passes B(t-1) | passes X |
| XNOR (X, B(t-1)) | forms ~B(t) | forms ~X (B(t-1) held at 0) |
| MUX_1 (select `clk`) | first half: MUX_2, second half: XNOR | same |
| inverter after MUX_1 | gives A(t) / B(t) | gives ~X / X |
| DFFB (cleared by `clr`) | stores B(t) at the end of each bit | held at 0 |

The same table read column-wise is the whole design: `rtl/sols_encoder.sv`.

## The two codes

With the bit clock high in the first half of a bit window and low in the
second:

* **Manchester**: `code = X xor CLK`. A 1 is sent as low-then-high, a 0 as
  high-then-low.
* **FM0** (bi-phase space): the level always changes at a bit boundary; a 0
  also changes in the middle of the bit, a 1 does not. As a state machine
  with state B:

      A(t) = ~B(t-1)          first half-bit
      B(t) = X xor B(t-1)     second half-bit
      code = CLK ? A(t) : B(t)

  FM0 has no fixed polarity: after a clear (B = 0) a 0 is sent as
  high-then-low, while the opposite start state would invert the whole
  waveform with the same meaning.

## How the sharing works

Two observations turn the two encoders into one.

**One state bit is enough.** A two-register FM0 encoder keeps A(t) and B(t)
in two flip-flops and selects between them with CLK. But A(t) is just
~B(t-1), so only B has to be stored. The single flip-flop (DFFB) is placed
after the half-bit multiplexer: at the rising edge that closes a bit window
the encoder output is B(t), so storing the output itself gives B(t-1) for the
next bit. This removes a flip-flop from the FM0 path.

**The two halves of both codes have the same shape.** In the first half FM0
sends an inversion of B(t-1) and Manchester an inversion of X: one inverter
with a multiplexer (MUX_2, controlled by `mode`) in front of it covers both.
In the second half FM0 sends X xor B(t-1) and Manchester sends X; if B(t-1)
is forced to 0 in Manchester mode, one XOR covers both. Forcing B(t-1) to 0
is what `clr` does: it is held high for as long as Manchester is selected.

**Balanced delay.** Left like that, the first-half path has a multiplexer
and an inverter while the second-half path has only an XOR, and the
difference shows as a glitch at MUX_1 when it switches. So the XOR is built
as an XNOR followed by an inverter, and that inverter is moved past MUX_1,
where it is the same inverter the first-half path needs. Both inputs of
MUX_1 now see one gate (MUX_2 or XNOR) and share the inverter behind it.

**Why `mode` and `clr` are separate.** `clr` would be `mode` inverted if it
only had to select Manchester, but it also initialises the encoder. The two
come as separate signals from the system controller; the only rule is that
`clr` must be high whenever `mode` selects Manchester (an assertion checks
it).

## Interface and timing

```
module sols_encoder (
  input  logic           clk,   // bit clock, also the MUX_1 select
  input  logic           clr,   // active-high, asynchronous clear of DFFB
  input  sols_pkg::mode_e mode, // MODE_FM0 = 0, MODE_MANCHESTER = 1
  input  logic           x,     // data bit
  output logic           code   // FM0 or Manchester code
);
```

* One data bit per `clk` cycle. The bit rate equals the clock frequency.
* `x`, `mode` and `clr` change shortly after a rising edge of `clk` and stay
  stable for the whole cycle.
* The code for a bit appears in the same cycle: its first half while `clk`
  is high, its second half while `clk` is low. There is no pipeline latency.
* `code` is combinational in `clk`, `x` and the state. It is meant to drive a
  modulator directly. Re-sampling it with `clk` would lose the half-bit
  information.
* To start FM0: hold `clr` high for at least one rising edge (or pulse it
  asynchronously), then drop it with `mode = MODE_FM0`. To run Manchester:
  `mode = MODE_MANCHESTER` and `clr = 1` together.
* Switching from Manchester to FM0 needs no extra cycle: the state is
  already 0, so the first FM0 bit starts from B(t-1) = 0.

## Files

| file | content |
|---|---|
| `rtl/sols_pkg.sv` | `mode_e` enum: the mode encoding the datapath uses |
| `rtl/sols_a_logic.sv` | MUX_2, the "A(t)/~X" operand select |
| `rtl/sols_b_logic.sv` | the XNOR, the "B(t)/X" logic |
| `rtl/sols_state_reg.sv` | DFFB, with asynchronous clear |
| `rtl/sols_encoder.sv` | top: MUX_1, shared inverter, the three blocks above |
| `tb/tb_sols_a_logic.sv`, `tb/tb_sols_b_logic.sv` | exhaustive checks of the two gates |
| `tb/tb_sols_state_reg.sv` | random data, asynchronous clears mid-cycle |
| `tb/tb_sols_encoder.sv` | end-to-end: reference model, coding rules, mode switches, clears |
| `tb/tb_dsrc_profiles.sv` | 512-bit frames at 500 kb/s FM0, 4 Mb/s and 27 Mb/s Manchester |

The encoder has no parameters: it is one bit wide by nature.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sols_pkg.sv tb/tb_sols_encoder.sv --top-module tb_sols_encoder
./obj_dir/Vtb_sols_encoder
```

`tb_sols_encoder` computes the expected code from an independent
two-register FM0 model (A and B registers, as in a textbook encoder) and
from `X xor CLK` for Manchester, and additionally checks the FM0 rules on
the waveform itself: a level change at every bit boundary, a mid-bit change
only for 0. It starts with the five-bit sequence 0, 1, 1, 0, 1 in both codes,
then runs 40 random phases that switch modes and re-initialise. It counts
FM0 and Manchester bits of both values, clear operations and switches in
both directions, and fails if any of them never happened. Every sample is
taken in the cycle the bit is applied, so zero latency is checked too.

`tb_dsrc_profiles` runs the clock at each DSRC bit rate and checks the
measured bit period and dc-balance: the running sum of the code stays
within two half-bits for FM0 and returns to zero after every Manchester bit.

## Where the RTL departs from a gate-level drawing

* **DFFB's input.** In the gate-level circuit the flip-flop's D pin is the
  shared inverter's output. On the rising edge, CLK also switches MUX_1 to
  the first-half input, but the MUX_1 plus inverter delay keeps the old
  (second-half) value at D for longer than the flop's hold time. Zero-delay
  RTL has no such delay: the edge and the select change happen in the same
  instant, and the flop could capture the new first-half value. The RTL
  therefore names the value D must capture, `b_next = ~b_pre` (the inverter
  output with CLK low), and feeds DFFB from it. Logically this is the same
  circuit, but synthesis turns the XNOR plus this inverter into an XOR
  beside the XNOR, so a synthesised netlist has one gate more than the five
  listed above. A hand-placed gate-level version would drop it.
* **CLR polarity and timing.** Active high and asynchronous is this
  design's own choice; so is the rising-edge state update. A flip-flop with an active-low clear
  only needs an inverter on `clr`.

## What is not here

* A Miller encoder. Miller coding is often named alongside FM0 and
  Manchester, but adding it to this datapath would bring back hardware
  that is idle in the other modes, so the shared architecture covers FM0
  and Manchester only.
* The rest of a DSRC transceiver: the controller that drives `mode` and
  `clr`, modulation, error correction, clock recovery, the RF front end and
  the antennas. `mode` and `clr` are top-level ports for that controller.
* The unshared two-encoder baseline (two flip-flops, separate XOR for
  Manchester, output multiplexer), used only as the comparison the sharing
  improves on; its equations are the reference model in `tb_sols_encoder`.
