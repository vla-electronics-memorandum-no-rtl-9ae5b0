// dac80_model: behavioural model of a 12-bit DAC80 voltage-output D/A
// converter in its +/-5 V range. Not synthesizable: the output is a real
// voltage.
//
// The converter's input coding is complementary: all zeros gives +5 V and
// all ones gives -5 V (less one LSB), so
//   vout = 5 V - code * 10 V / 4096.
// The converter card feeds the 10-bit offset-binary code into D1..D10 and
// ties D11 and D12 low, so one code step of the card is 4 converter LSBs
// (9.77 mV). The model has no settling time.
//
// Interface: code[11:0] (code[11] = D1, the MSB), vout (volts).
module dac80_model #(
  parameter int unsigned BITS = tsl_pkg::DAC_BITS
) (
  input  logic [BITS-1:0] code,
  output real             vout
);
  localparam real VFS = 10.0;
  always_comb vout = 5.0 - real'(code) * VFS / real'(2.0 ** BITS);
endmodule
