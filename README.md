# Low-power bus techniques: pulse-width and time-domain signalling

Long on-chip buses spend most of their energy and area on wires and on the
repeaters that drive them. This design carries more than one bit per wire
in two different ways and puts both side by side:

* **PWM bus.** Each wire carries two data bits. A change of the two bits
  is sent as one pulse whose width says which bits changed. Pulses on
  neighbouring wires disturb each other through coupling capacitance.
  Before a pulse is sent, the sender works out how its neighbours will
  stretch or squeeze it and trims it the other way.
* **TDC bus.** An N-bit word is sent on a single wire as the *delay* of a
  clock edge. A second wire carries a reference edge that encodes the
  mid-scale value. The receiver runs a binary search between the two edges
  and recovers the word one bit per stage.

Both are written as synthesizable SystemVerilog. The long wires themselves
are analog, so they appear only as behavioural models.

## Time is a clock

Every part of both buses is built from delays: pulse widths, edge offsets,
inverter chains and wire flight time. In this RTL each delay is a whole
number of ticks of a fast **time-step clock**, and each delay element is a
shift register or a tap on that clock.

| bus | one tick | bus clock | unit step |
|-----|----------|-----------|-----------|
| PWM | 10 ps    | 100 ticks = 1 GHz | W1/W2/W3 = 13/23/33 ticks = 130/230/330 ps |
| TDC | 50 ps    | 200 ticks = 100 MHz | Tdel = K x 50 ps, K = 2, so 100 ps |

Working this way makes the design simulate in a plain two-state simulator
with no delays. It also keeps every timing relation exact and checkable. A
silicon version would replace each `tick_delay` and `variable_delay` with
an inverter chain of the same delay.

## The PWM bus (`pwm_bus`)

### Encoding

Lane *i* carries D0 = `d[2i]` and D1 = `d[2i+1]`. Only a change of a bit
sends anything, so the decoder works by toggling:

| D0 changed | D1 changed | pulse on the wire |
|---|---|---|
| no  | no  | none |
| yes | no  | W1 (130 ps) |
| no  | yes | W2 (230 ps) |
| yes | yes | W3 (330 ps) |

`pwm_encoder` builds the pulses from edge detectors. Each bit is XORed with
a delayed copy of itself, which gives a pulse W1 long for D0 and W2 long
for D1. When both bits change, a third pulse is ORed in. It is the AND of
the two switch pulses delayed by W3 − W2, so the result is W3 wide. The W1
and W2 delays are `variable_delay`s, and this is where crosstalk
correction acts.

### Crosstalk and its pre-correction

All pulses of a bus cycle rise in the same tick, so only their falling
edges differ. A neighbour whose pulse falls later pulls this wire's
falling edge later, and the pulse arrives too wide. A neighbour whose
pulse falls earlier makes it arrive too narrow. The correction works in
three steps:

1. **`crosstalk_aware`** compares this lane's pulse class with each
   neighbour's. It raises `cx1` when the neighbour is wider (this pulse
   will be lengthened) and `cx2` when it is narrower (this pulse will be
   shortened). Idle neighbours and neighbours of the same class raise
   nothing. It sees the neighbours' switch flags (`p1_ext`, `p2_ext`),
   which stay high long enough to cover the widest pulse.
2. **`xt_signal_adapter`** counts the flags. It takes the number of
   shortening neighbours minus the number of lengthening ones, and turns
   the result into a trim of 3 ticks (30 ps) per neighbour. A positive
   trim goes on `ctrl_cap` and lengthens the delay (more load). A negative
   one goes on `ctrl_inv` and shortens it (stronger inverters).
3. **`variable_delay`** applies the trim: delay = nominal − `ctrl_inv` +
   `ctrl_cap`.

So a W1 pulse between two W3 neighbours is sent 6 ticks short, and the
wire stretches it back to 13 ticks. The received widths are checked
exactly in the testbenches.

### Decoding

`pwm_decoder` measures each arriving pulse against two thresholds, TH1 =
18 ticks and TH2 = 28 ticks, which lie midway between the classes. It
does this with two delay stages in series and three set-only latches:
"pulse seen", "longer than TH1" and "longer than TH2". At the next bus
clock edge the latches decide the toggles:

* `toggle_bit0` = (seen and not past TH1) or past TH2, which covers W1
  and W3;
* `toggle_bit1` = past TH1, which covers W2 and W3.

Q0 and Q1 flip when their toggle is set. `pwm_reset_gen` then clears the
latches for the next pulse: it fires one tick after any Q output changes.

Timing: `d` is loaded at a bus clock edge (`bus_rise`). The pulse leaves
at once, crosses the wire in 50 ticks, and is at most 39 ticks wide. It is
decoded at the next edge, so **`q` equals the word loaded one bus period
earlier**. All registers reset to 0, and both ends must be reset together
because the decoder only tracks changes.

### The wire model (`xt_wire_bus`, behavioural)

This model stands in for 2 mm of repeated wire with coupling capacitors to
each neighbour. It delays each pulse by 50 ticks. For each neighbour that
started a pulse in the same tick, it moves the falling edge 3 ticks later
if the neighbour falls more than 8 ticks later, and 3 ticks earlier if the
neighbour falls more than 8 ticks earlier. The 8-tick window is needed
because two pulses of the same class can leave with different trims (up
to 6 ticks apart). They still switch together and do not disturb each
other, while pulses of different classes are always at least 10 ticks
apart. The delay, the shift and the window are this model's own numbers.
Change them together with `XT_TRIM` in the adapter.

## The TDC bus (`tdc_bus`)

### Encoding: a chain of delay cells

`dtc_cell` passes the rising edge of `tin` straight through when `din` = 0
and holds it back by its DELAY when `din` = 1. The falling edge is never
held back. Inside, `din AND NOT tin` goes through a delay line, and the
output is `tin AND NOT` that delayed signal. `dtc_encoder` chains N cells
with delays 2^(N−1)·K … 2·K, K ticks, MSB first. A rising edge on `tin`
therefore comes out `din`·K ticks late.

`tdc_bus` drives two encoders from its bus clock:

* the **data** encoder takes the registered word;
* the **reference** encoder takes the fixed word 0111…1 (2^(N−1) − 1),
  whose edge sits mid-range.

Both edges cross identical wires (`repeated_wire`, behavioural: a fixed
delay, inverting only for an odd number of repeaters; 30 repeaters here)
to the decoder.

### Decoding: binary search in time

`tdc_decoder` first delays the reference by half an LSB step, K/2 ticks,
so the two edges can never arrive in the same tick. Stage N−1 samples the
inverted data edge on the reference's rising edge. The result is 1 when
the data edge comes later, which is exactly the MSB.

Both edges then pass a pair of delay cells worth half the remaining range,
2^(i−1)·K ticks. If the bit was 1 the reference is delayed, otherwise the
data edge. This halves the gap, and the next stage samples the same way.
After N stages every bit is known, and `dout_valid` pulses for one tick.

Before each cell pair sits a wait delay of 2^(i−1)·K + 2^i·K + 2 ticks.
It gives the cells' data inputs time to settle after the stage register
changes. These sizes are this design's own choice.

### Timing and size limits

* `din` is loaded on the bus clock's **falling** edge (`din_taken` marks
  that tick). It is then steady for half a period before the rising edge
  that starts the encoding.
* The word appears on `dout` with `dout_valid` before the next rising
  edge, so the bus moves one word per clock.
* The whole code range must fit in the half period the clock is high:
  (2^N − 1)·K < PERIOD/2. An elaboration assertion checks this.

| configuration | range needed | half period | runs |
|---|---|---|---|
| 5 bits, 100 MHz (default) | 3.1 ns | 5 ns | yes |
| 4 bits, 200 MHz (N=4, PERIOD=100) | 1.5 ns | 2.5 ns | yes |
| 3 bits, 400 MHz (N=3, PERIOD=50) | 0.7 ns | 1.25 ns | yes |
| 5 bits, 400 MHz | 3.1 ns | 1.25 ns | no |

## Top level (`lp_bus_top`)

The two buses share nothing and each keeps its own ports: `pwm_*` with the
10 ps `pwm_clk`, and `tdc_*` with the 50 ps `tdc_clk`. The parameters are:

* `PWM_LANES` = 3, a 6-bit bus on 3 wires;
* `TDC_BITS` = 5;
* `TDC_STEP` = K = 2.

Shared constants and types are in `lp_bus_pkg`.

## Where this departs from the original circuit

* Delays are whole ticks of a time-step clock instead of inverter chains.
  The trim step of the variable delay is one tick.
* The variable-drive inverters and variable capacitors are analog and are
  not modelled at transistor level. Only their effect, a trimmed delay, is
  kept.
* Not given by the original and chosen here:
  * the meaning of `cx1` and `cx2`;
  * the adapter logic and its 30 ps step;
  * the decoder thresholds (midpoints);
  * the reset generator (clear on any Q change);
  * the extended switch flags (40 ticks);
  * the TDC wait-delay sizes;
  * loading the TDC input on the falling edge;
  * the `dout_valid` strobe;
  * both wire models' delay and crosstalk numbers.
* The register library cells' scan and enable pins are left out.
* No self-calibration of pulse widths is included.
* The time-domain arithmetic (minimum, summation, scaling), which the TDC
  scheme could support, is not built.
* Energy and power numbers belong to a transistor-level implementation
  and cannot be reproduced from this RTL.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb --top-module tb_lp_bus_top \
    rtl/lp_bus_pkg.sv tb/tb_lp_bus_top.sv
./obj_dir/Vtb_lp_bus_top
```

| testbench | what it shows |
|---|---|
| `tb_lp_bus_top` | both buses at the default sizes; 300 PWM words and 70 TDC words, each checked; fails if any pulse class, any pre-shortening or pre-lengthening, or either decision at any TDC stage never happened |
| `tb_pwm_bus` | 400 PWM words, including all 64 switch patterns so the middle wire meets every neighbour combination; exact sent and received widths and `q` |
| `tb_tdc_bus` | every 5-bit word, worst-case sequences, latency |
| `tb_pwm_workloads` | the PWM bus as a 4-bit (2-wire) and a 6-bit (3-wire) bus at 1 GHz |
| `tb_tdc_workloads` | the TDC bus at 3, 4 and 5 bits at 400, 200 and 100 MHz |
| `tb_<block>` | each block on its own, mostly exhaustive |

The testbenches use `timescale 1ns/1ps`, with the PWM tick as a 10 ns
clock period. Only ratios matter: 10 ps maps to 10 ns and 50 ps to 50 ns.
The simulator can start registers at random values (`+verilator+rand+reset+2`);
everything read is reset.
