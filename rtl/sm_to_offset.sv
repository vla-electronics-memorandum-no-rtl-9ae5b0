// sm_to_offset: sign-magnitude to offset-binary conversion for the D/A.
//
// The TSL sends a sign bit (1 = minus) and a magnitude. The D/A wants an
// offset-binary word, in which mid-scale is zero. Each magnitude bit is
// XORed with the sign and the sign is inverted to give the MSB:
//   code = {~sign, mag ^ {MAG_BITS{sign}}}
// A positive value m gives 512 + m; a negative value -m gives 511 - m (a
// ones'-complement offset code, so the two zeros are 512 and 511 and
// negative readings are one LSB, 0.1 C, low). Only B3..B11 enter, so the
// range is +/-51.1 C; the 51.2 C bit is dropped. This follows the card's
// ten XOR gates (one used as an inverter). Purely combinational.
module sm_to_offset #(
  parameter int unsigned MAG_BITS = tsl_pkg::MAG_BITS
) (
  input  logic                sign,
  input  logic [MAG_BITS-1:0] mag,
  output logic [MAG_BITS:0]   code
);
  always_comb code = {~sign, mag ^ {MAG_BITS{sign}}};
endmodule
