// transition_detect: one-clock pulse at every transition of the biphase line.
//
// The squared-up line signal is clocked into two flip-flops in series on
// the 9600 Hz clock (the first also synchronises it); the XOR of the two
// is high for exactly one clock after every rising or falling edge. This
// is the circuit of the original card (two 74LS74 stages and one 74LS86
// gate). Reset, which the card does not have, clears both stages.
//
// Interface: clk, rst_n (async, active low), rx (line, logic level),
// edge_pulse (high for one clock, one to two clocks after the line changes).
module transition_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic rx,
  output logic edge_pulse
);
  logic s1, s2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= rx;
      s2 <= s1;
    end

  assign edge_pulse = s1 ^ s2;
endmodule
