// scaling_amp_model: behavioural model of the two-op-amp output stage of one
// channel. Not synthesizable: input and output are real voltages.
//
// The stage gives the EG&G scale that the data system expects,
// V = (T + 45) / 21, i.e. 0 V at -45 C and 5 V at +60 C. With the D/A
// wiring of this card a temperature T (in C) arrives as
// vin = -T / 10.24 V (0.1 C per code step, 10/1024 V per code step), so
//   vout = (45 - 10.24 * vin) / 21.
// On the card this is an inverting stage and an inverting summing stage
// with an offset, trimmed with potentiometers; the model is the ideal,
// trimmed transfer function with no limits, noise or delay.
//
// Interface: vin (volts from the D/A), vout (volts to the data set).
module scaling_amp_model #(
  parameter real DEG_PER_VOLT = 10.24,
  parameter real T_OFFSET     = 45.0,
  parameter real DEG_PER_VOUT = 21.0
) (
  input  real vin,
  output real vout
);
  always_comb vout = (T_OFFSET - DEG_PER_VOLT * vin) / DEG_PER_VOUT;
endmodule
