// biphase_recovery: recovers DATA, the 600 Hz bit CLOCK and START from the
// transition pulses of a biphase-mark line.
//
// In the TSL line code the level changes at every bit boundary, and changes
// once more in mid-bit when the bit is a 1. A counter runs on the 9600 Hz
// clock (16 clocks per bit) from the last bit boundary and stops at
// SAT_COUNT (12). A transition that arrives while the counter is stopped is
// a bit boundary: it restarts the counter. One that arrives earlier is a
// mid-bit transition and sets the "mid" flag. At each boundary the flag is
// copied to DATA (the bit that just ended) and cleared. Two clocks after a
// boundary CLOCK is high for one clock, with DATA stable; START is CLOCK
// while DATA is 0. This follows the card: 74LS197 counter stopped by its
// QC and QD outputs, a 74LS74 pair for the mid flag and DATA, and a 74LS74
// pair that delays the boundary into the CLOCK pulse.
//
// This design's own choices: everything is synchronous to clk (the card
// clears the counter asynchronously and clocks the data flip-flops from
// the gated transition pulse), and there is a reset. Reset leaves the
// counter stopped, so the first transition after reset is taken as a bit
// boundary, and presets the mid flag, so that boundary decodes as an idle 1
// rather than a false START.
//
// Timing: a boundary transition detected at cycle t updates DATA at t+1
// and gives bit_clk at t+2. Tolerates a clock error of well over 10 %: a
// mid-bit transition comes 8 clocks after a boundary, the next boundary 16.
module biphase_recovery #(
  parameter int unsigned SAT_COUNT = tsl_pkg::SAT_COUNT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic edge_pulse,
  output logic data,
  output logic bit_clk,
  output logic start
);
  logic [3:0] cnt;
  logic       sat, boundary, mid, bnd_d1;

  assign sat      = (cnt >= 4'(SAT_COUNT));
  assign boundary = edge_pulse && sat;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= 4'(SAT_COUNT);
      mid     <= 1'b1;
      data    <= 1'b1;
      bnd_d1  <= 1'b0;
      bit_clk <= 1'b0;
    end else begin
      // Bit-period counter, stopped at SAT_COUNT, restarted by a boundary.
      if (boundary)  cnt <= '0;
      else if (!sat) cnt <= cnt + 4'd1;
      // Mid-bit flag and recovered data.
      if (boundary) begin
        data <= mid;
        mid  <= 1'b0;
      end else if (edge_pulse) begin
        mid  <= 1'b1;
      end
      // CLOCK strobe two cycles after the boundary.
      bnd_d1  <= boundary;
      bit_clk <= bnd_d1;
    end

  assign start = bit_clk && !data;
endmodule
