// frame_sequencer: frames the 24 bit clocks that follow a start bit and
// issues the end-of-frame load pulse.
//
// A run flag is set by START (any decoded 0 while idle; zeros inside a
// frame find the flag already set and change nothing). While the flag is
// set, or in the very CLOCK strobe that sets it, every CLOCK strobe gives a
// shift_en and advances a counter. When the counter reaches FRAME_CLOCKS
// (24) the run flag clears; on the next clock a one-clock LOAD pulse is
// issued, and LOAD clears the counter. The sequencer then waits for the
// next START. This is the card's 74LS74 run flip-flop, 74LS393 counter
// decoded at 16 + 8 by NAND gates, and the 74LS74 that turns the count
// into a one-clock load pulse.
//
// This design's own choices: synchronous logic on the 9600 Hz clock (the
// card presets the run flip-flop asynchronously and gates the clock), and
// a reset.
//
// Timing: shift_en coincides with the bit_clk that causes it; load comes
// two clocks after the 24th shift_en.
module frame_sequencer #(
  parameter int unsigned FRAME_CLOCKS = tsl_pkg::FRAME_CLOCKS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bit_clk,
  input  logic start,
  output logic shift_en,
  output logic load,
  output logic running
);
  localparam int unsigned CW = $clog2(FRAME_CLOCKS + 1);
  logic [CW-1:0] cnt;
  logic          full;

  assign full     = (cnt == CW'(FRAME_CLOCKS));
  assign shift_en = bit_clk && (running || start) && !full;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      running <= 1'b0;
      load    <= 1'b0;
    end else begin
      if (load)          cnt <= '0;
      else if (shift_en) cnt <= cnt + CW'(1);

      if (start)     running <= 1'b1;
      else if (full) running <= 1'b0;

      load <= full && !load;
    end
endmodule
