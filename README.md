# TSL dewpoint / ambient temperature converter

A weather station's data system reads dewpoint and ambient temperature
as analog voltages on a fixed scale, V = (T + 45) / 21. That is 0 V at
-45 °C and 5 V at +60 °C. The sensor that originally supplied these
voltages was replaced by a TSL model 1063 dewpoint hygrometer. The TSL
sends its readings as serial data over a telephone pair. This design
decodes the TSL data and produces the two voltages the data system
expects, so the computer software sees no change.

The original was a wire-wrapped card of 74LS TTL chips, two DAC80 D/A
converters and an LM324. This RTL follows that card stage by stage. The
digital part is recast as synchronous logic on one clock. The D/A
converters and the op-amp scaling are behavioural models with real-valued
outputs.

## The line signal

The TSL sends data at 600 baud in a biphase-mark code:

* the line changes level at the start of every bit;
* for a 1 it changes once more, in the middle of the bit;
* for a 0 it does not.

Every 200 ms the TSL sends one 20-bit frame, followed by idle 1s. The
frames alternate between ambient (TA) and dewpoint (TD):

```
bit  1      2  3   4   5   6     7  8   9   10    11     12 13 14 .. 19  20
     START  B9 B10 B11 B12 SIGN  0  ER  TD  STOP  START  0  0  B3 .. B8  STOP
     (0)                                    (1)   (0)                    (1)
```

* The magnitude bits have weights from B3 = 0.1 °C up to B12 = 51.2 °C,
  doubling at each bit. Bits B1 and B2 (0.025 and 0.05 °C) are sent as 0.
* SIGN = 1 means minus.
* ER is the transmitter's error flag.
* TD = 1 marks a dewpoint reading and TD = 0 an ambient one.

## Recovering bits, clock and start (`transition_detect`, `biphase_recovery`)

This is the subtle part of the design. Nothing marks which transitions
fall on bit boundaries and which fall in mid-bit, so the receiver has to
tell them apart by timing alone.

The receiver clock `clk` is 9600 Hz, 16 times the bit rate.
`transition_detect` samples the line through two flip-flops and XORs
them. This gives a one-clock pulse at every transition.

`biphase_recovery` keeps a 4-bit counter of the clocks since the last
bit boundary. The counter stops at 12.

* A transition that arrives while the counter is stopped (12 clocks or
  more after the last boundary) is a **bit boundary**. It restarts the
  counter.
* A transition that arrives earlier is a **mid-bit** transition. Mid-bit
  transitions arrive about 8 clocks after the boundary. A mid-bit
  transition sets a flag.

At each boundary the flag becomes `DATA`, the value of the bit that just
ended, and the flag is cleared. Two clocks later, `CLOCK` (`bit_clk`) is
high for one clock. `START` is `CLOCK` while `DATA` is 0.

The window of 12 clocks lies between the mid-bit point (8) and the next
boundary (16). The receiver therefore works with the transmitter's bit
time off by 10 % either way. At 10 % off, mid-bit transitions come after
7.2 to 8.8 clocks and boundaries after 14.4 to 17.6 clocks.

Lock-in works as follows:

* After reset the counter is stopped, so the first transition is taken
  as a boundary.
* If the receiver locks onto the mid-bit phase of a run of idle 1s, the
  first 0 corrects it. That 0 is misread.
* Within a frame the lock does not slip, because mid-bit transitions
  always find the counter running.

## Framing (`frame_sequencer`, `frame_shift_reg`)

Any decoded 0 produces `START`. Only the first 0 after the idle 1s
matters. It sets a run flag, and zeros that arrive while the flag is set
change nothing.

While the flag is set, each `CLOCK` shifts `DATA` into a 24-stage shift
register and advances a counter. The `CLOCK` that sets the flag also
shifts, so the start bit is the first of the 24 bits shifted.

After 24 shifts:

1. the flag clears;
2. on the next clock, a one-clock `LOAD` pulse is issued;
3. `LOAD` clears the counter.

The 24 shifts cover the 20 frame bits and four idle bits. Each field then
sits at a fixed stage of the register; `tsl_pkg` names these stages and
`unpack_frame` collects them.

## Error gating, channel steering and the status LEDs (`latch_strobe`, `status_led_reg`)

On every `LOAD`, `status_led_reg` takes ER, TD, SIGN and B11. It drives
four LEDs through inverted, active-low outputs. `led_n[0]` to `led_n[3]`
are ERROR, TD, minus sign and the 25.6 °C bit.

`latch_strobe` passes `LOAD` on only if ER is 0:

* if TD = 1 it becomes `TDL`, the dewpoint latch strobe;
* if TD = 0 it becomes `TAL`, the ambient latch strobe.

A frame flagged in error updates the LEDs, but neither output. Each
output keeps its last good value until the next good frame of its own
channel, about 400 ms later.

## From sign-magnitude to volts (`sm_to_offset`, `code_latch`, `dac80_model`, `scaling_amp_model`)

The D/A converter needs an offset-binary code. `sm_to_offset` builds it
by XOR-ing each of B3..B11 with SIGN and inverting SIGN to form the MSB:

```
code = {~SIGN, B11..B3 ^ {9{SIGN}}}      +m -> 512 + m,  -m -> 511 - m
```

Two consequences follow:

* **B12 is dropped**, so the range is ±51.1 °C. A reading of 51.2 °C or
  more converts wrongly, and so does a reading of -51.2 °C or less. This
  includes the top of the 0 to 5 V scale, 51.2 to 60 °C.
* **Negative readings come out in ones' complement**, so they read one
  step (0.1 °C, 4.8 mV at the output) low. For example, -0.0 and +0.0
  give 511 and 512.

Both latches take the same code. `code_latch` holds it, one instance per
channel, and resets to mid-scale (0 °C).

The latched 10 bits drive D1..D10 of a 12-bit DAC80; D11 and D12 are
tied low. The DAC80 has complementary coding: all 0s gives +5 V and all
1s gives -5 V. A reading of T °C therefore gives -T/10.24 V.

`scaling_amp_model` is the ideal, trimmed transfer function of the two
op-amp stages:

```
vout = (45 - 10.24 * vin) / 21  =  (T + 45) / 21
```

At +50 °C this gives 4.524 V, at 0 °C 2.143 V, and at -50 °C -0.238 V.

## Top level (`tsl_vla_converter`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | 9600 Hz (16 × bit rate) |
| `rst_n` | in | asynchronous reset, active low |
| `rx` | in | line data at logic level (after isolation transformer and squaring stage) |
| `vtd`, `vta` | out, `real` | dewpoint and ambient voltage, (T + 45)/21 |
| `td_code`, `ta_code` | out, 10 bit | latched offset-binary codes |
| `led_n` | out, 4 bit | LED drive, active low: ERROR, TD, minus sign, 25.6 °C bit |
| `bit_clk`, `bit_data` | out | recovered CLOCK strobe and DATA |
| `load`, `tdl`, `tal` | out | end-of-frame load and latch strobes (one clock each) |
| `frame_active` | out | run flag: a frame is being shifted in |

**Timing.** A latch changes 3 clocks after the `CLOCK` strobe of the
frame's 24th bit. That is about 24 bit times (40 ms) plus a few clocks
after the start bit's leading edge, or four bit times after the frame's
last stop bit.

**Parameters.** All three parameters come from the original card and are
held in `tsl_pkg`:

* `CLK_PER_BIT = 16`;
* `SAT_COUNT = 12`;
* `FRAME_CLOCKS = 24`.

The bit-period counter is 4 bits wide, so `SAT_COUNT` must stay below
16. An elaboration-time assertion checks that it lies between half a bit
and a whole bit.

**Synthesis.** The digital modules are synthesizable. The top is not,
because of its real-valued outputs. For hardware, take the digital chain
and drive the latched codes `td_code` and `ta_code` into a real D/A.

## Where this differs from the original card

* **Synchronous logic.** The card uses ripple counters, gated clocks and
  asynchronous presets and clears. Here everything is clocked by `clk`
  and uses one-clock enables.
  * The latch strobes are active-high enables. On the card they are
    active-low pulses that latch on their rising edge.
  * Delays of a clock or two differ from the card. The decision points
    are the same: the 12-clock window, 24 shifts and the ER/TD gating.
* **Reset.** The card has none. Here reset does the following:
  * stops the bit counter;
  * presets the mid-bit flag, so the first boundary decodes as a 1 and
    not as a false start;
  * clears the shift register and the LED register;
  * sets both latches to mid-scale.
* **Analog parts are not RTL.** The 555 oscillator, the line transformer
  and transistor stage, the LEDs and the power wiring are outside the
  design. The DAC80s and op-amp stages are ideal models: they have no
  settling time, trim error or output limits.

## Files

* `rtl/tsl_pkg.sv`: constants, field stages, the `tsl_frame_t` struct and
  `unpack_frame`.
* `rtl/transition_detect.sv`, `rtl/biphase_recovery.sv`,
  `rtl/frame_sequencer.sv`, `rtl/frame_shift_reg.sv`,
  `rtl/sm_to_offset.sv`, `rtl/latch_strobe.sv`, `rtl/code_latch.sv`,
  `rtl/status_led_reg.sv`: the digital chain.
* `rtl/dac80_model.sv`, `rtl/scaling_amp_model.sv`: behavioural models.
* `rtl/tsl_vla_converter.sv`: the top.
* `tb/tsl_tx_model.sv`: the TSL transmitter, which builds frames and
  encodes them in biphase-mark. The bit time can be changed.
* `tb/tb_*.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/tsl_pkg.sv \
    tb/tb_tsl_vla_converter.sv --top-module tb_tsl_vla_converter
./obj_dir/Vtb_tsl_vla_converter
```

Replace the testbench name to run another one.

`tb_tsl_vla_converter` runs the top at its default parameters. It sends
40 frames, about 8 s of line time, and checks:

* both codes and both voltages after every frame, with a tolerance of
  one 0.1 °C step;
* that error frames are held;
* the LEDs;
* the load latency;
* 120 bit strobes per 200 ms frame.

It also requires each of these to happen at least once:

* a dewpoint and an ambient update;
* an error frame being held;
* a negative reading;
* a frame with B12 set;
* a 0 inside a frame that does not restart it;
* frames sent 10 % slow and 10 % fast.

The whole run takes well under a second.

`tb_temperature_sweep` sweeps the full data-system scale, -45 °C to
+60 °C in 0.5 °C steps, through both channels:

* up to +51.1 °C, every output must match (T + 45)/21 within 0.1 °C;
* above +51.1 °C, every output must equal the value with 51.2 °C
  removed, as described above.
