// tsl_vla_converter: digital and converter section of the card that turns
// the 600 baud biphase data of a TSL dewpoint hygrometer into the two
// analog voltages of the instrument it replaces (dewpoint VTD and ambient
// temperature VTA, both on the scale V = (T + 45) / 21).
//
// Data path: transition_detect marks every line transition;
// biphase_recovery separates bit-boundary from mid-bit transitions and
// produces DATA, a CLOCK strobe per bit and START (a decoded 0);
// frame_sequencer starts on the first 0 after the idle ones, lets 24 bits
// into frame_shift_reg and then gives a one-clock LOAD. LOAD always
// updates the LED register and, unless the frame's ER bit is set, becomes
// TDL or TAL according to the TD bit. sm_to_offset turns sign and
// magnitude (B3..B11, 0.1 C steps, +/-51.1 C) into a 10-bit offset-binary
// code, which the selected code_latch takes. Each latch drives a DAC80
// (two LSBs tied low) and a scaling stage (behavioural models with real
// outputs).
//
// Everything digital runs on clk, the 9600 Hz clock (16 x bit rate) of the
// card's 555 oscillator, which is not part of this module; neither is the
// line transformer and transistor in front of rx. The structure and all
// widths, counts and bit positions follow the original card; making the
// logic fully synchronous with a reset is this design's own choice.
//
// Timing: a latch updates 3 clocks after the CLOCK strobe of the 24th bit
// of a frame, i.e. about 4 bit times after the frame's last stop bit.
module tsl_vla_converter #(
  parameter int unsigned CLK_PER_BIT  = tsl_pkg::CLK_PER_BIT,
  parameter int unsigned SAT_COUNT    = tsl_pkg::SAT_COUNT,
  parameter int unsigned FRAME_CLOCKS = tsl_pkg::FRAME_CLOCKS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output real        vtd,
  output real        vta,
  output logic [9:0] td_code,
  output logic [9:0] ta_code,
  output logic [3:0] led_n,
  output logic       bit_clk,
  output logic       bit_data,
  output logic       load,
  output logic       tdl,
  output logic       tal,
  output logic       frame_active
);
  import tsl_pkg::*;

  // CLK_PER_BIT is fixed by the 4-bit bit-period counter's window; it is
  // carried here for documentation and checked.
  initial assert (CLK_PER_BIT > SAT_COUNT && SAT_COUNT > CLK_PER_BIT / 2)
    else $error("SAT_COUNT must lie between half a bit and a whole bit");

  logic       edge_pulse, start, shift_en;
  logic [FRAME_CLOCKS-1:0] frame_q;
  tsl_frame_t f;
  logic [CODE_BITS-1:0] code;
  real        vdac_td, vdac_ta;

  transition_detect u_edge (
    .clk, .rst_n, .rx, .edge_pulse
  );

  biphase_recovery #(.SAT_COUNT(SAT_COUNT)) u_cdr (
    .clk, .rst_n, .edge_pulse, .data(bit_data), .bit_clk, .start
  );

  frame_sequencer #(.FRAME_CLOCKS(FRAME_CLOCKS)) u_seq (
    .clk, .rst_n, .bit_clk, .start, .shift_en, .load, .running(frame_active)
  );

  frame_shift_reg #(.FRAME_CLOCKS(FRAME_CLOCKS)) u_sr (
    .clk, .rst_n, .shift_en, .din(bit_data), .q(frame_q)
  );

  // f.b12 (51.2 C) is decoded but, as on the card, not converted.
  assign f = unpack_frame(frame_q);

  status_led_reg u_leds (
    .clk, .rst_n, .load, .bits({f.mag[MAG_BITS-1], f.sign, f.td, f.er}), .led_n
  );

  latch_strobe u_strobe (
    .load, .er(f.er), .td(f.td), .tdl, .tal
  );

  sm_to_offset u_conv (
    .sign(f.sign), .mag(f.mag), .code
  );

  code_latch u_td_latch (
    .clk, .rst_n, .strobe(tdl), .d(code), .q(td_code)
  );

  code_latch u_ta_latch (
    .clk, .rst_n, .strobe(tal), .d(code), .q(ta_code)
  );

  dac80_model u_td_dac (.code({td_code, 2'b00}), .vout(vdac_td));
  dac80_model u_ta_dac (.code({ta_code, 2'b00}), .vout(vdac_ta));

  scaling_amp_model u_td_amp (.vin(vdac_td), .vout(vtd));
  scaling_amp_model u_ta_amp (.vin(vdac_ta), .vout(vta));
endmodule
