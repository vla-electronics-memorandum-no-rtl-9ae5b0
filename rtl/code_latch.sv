// code_latch: holding register in front of one D/A converter.
//
// Loads the W-bit offset-binary code when its strobe (TDL or TAL) is high
// and holds it otherwise, so the D/A keeps the last good reading between
// frames of its channel and across frames flagged in error. This is a pair
// of 74LS174 on the card (10 of the 12 flip-flops used). Reset, which the
// card does not have, loads mid-scale (0 C).
//
// Interface: clk, rst_n, strobe (one-clock enable), d, q. q changes on the
// clock edge that samples the strobe.
module code_latch #(
  parameter int unsigned W = tsl_pkg::CODE_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         strobe,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      q <= {1'b1, {(W-1){1'b0}}};
    else if (strobe) q <= d;
endmodule
