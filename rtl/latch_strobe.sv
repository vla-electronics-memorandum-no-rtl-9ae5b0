// latch_strobe: turns the end-of-frame load pulse into the latch strobe of
// one of the two channels.
//
// If the frame's ER bit is set the load pulse is blocked, so both D/A
// latches keep their last good value. Otherwise the TD bit steers it:
// TD = 1 gives TDL (dewpoint latch), TD = 0 gives TAL (ambient latch).
// This is the card's NOR gate and three NAND gates; the card's strobes are
// active-low pulses latched on their rising edge, here they are active-high
// one-clock enables. Purely combinational.
module latch_strobe (
  input  logic load,
  input  logic er,
  input  logic td,
  output logic tdl,
  output logic tal
);
  logic upd;
  always_comb begin
    upd = load && !er;
    tdl = upd && td;
    tal = upd && !td;
  end
endmodule
