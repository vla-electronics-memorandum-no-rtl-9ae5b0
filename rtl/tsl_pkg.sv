// tsl_pkg: constants and frame layout shared by the TSL biphase-to-voltage
// converter.
//
// The TSL hygrometer sends one 20-bit frame every 200 ms, alternating
// between ambient (TA) and dewpoint (TD) temperature, at 600 baud:
//   start(0) B9 B10 B11 B12 SIGN 0 ER TD stop(1) start(0) 0 0 B3..B8 stop(1)
// followed by idle ones. Bit weights: B3 = 0.1 C doubling up to
// B12 = 51.2 C; SIGN = 1 means minus. The receiver shifts 24 bits from the
// first start bit on, so after the 24th shift the first start bit sits at
// the far end of the 24-bit register. The tap positions below follow from
// that and match the shift-register outputs used on the original card.
// q[i] here is the register stage i (q[0] = most recently shifted bit).
package tsl_pkg;

  // 9600 Hz clock = 16 x 600 Hz bit rate.
  localparam int unsigned CLK_PER_BIT  = 16;
  // Bit-boundary window: a transition counts as a bit boundary only if at
  // least this many clocks have passed since the last boundary (74LS197
  // counter stopped when QC and QD are both high, i.e. at 12).
  localparam int unsigned SAT_COUNT    = 12;
  // Number of bit clocks shifted per frame.
  localparam int unsigned FRAME_CLOCKS = 24;
  // Magnitude bits converted (B3..B11); B12 (51.2 C) is dropped.
  localparam int unsigned MAG_BITS     = 9;
  localparam int unsigned CODE_BITS    = MAG_BITS + 1;
  // D/A resolution; the two LSB inputs are tied low.
  localparam int unsigned DAC_BITS     = 12;

  // Register stage of each field after 24 shifts (bit k of the frame,
  // k = 1 for the start bit, sits in stage 24 - k).
  localparam int unsigned POS_START1 = 23;
  localparam int unsigned POS_B9     = 22;
  localparam int unsigned POS_B10    = 21;
  localparam int unsigned POS_B11    = 20;
  localparam int unsigned POS_B12    = 19;
  localparam int unsigned POS_SIGN   = 18;
  localparam int unsigned POS_ER     = 16;
  localparam int unsigned POS_TD     = 15;
  localparam int unsigned POS_STOP1  = 14;
  localparam int unsigned POS_START2 = 13;
  localparam int unsigned POS_B3     = 10;
  localparam int unsigned POS_B4     = 9;
  localparam int unsigned POS_B5     = 8;
  localparam int unsigned POS_B6     = 7;
  localparam int unsigned POS_B7     = 6;
  localparam int unsigned POS_B8     = 5;
  localparam int unsigned POS_STOP2  = 4;

  // Decoded fields of one frame.
  typedef struct packed {
    logic                er;    // transmitter error flag
    logic                td;    // 1 = dewpoint, 0 = ambient
    logic                sign;  // 1 = minus
    logic                b12;   // 51.2 C bit (not converted)
    logic [MAG_BITS-1:0] mag;   // B11 (MSB) .. B3 (LSB), 0.1 C per LSB
  } tsl_frame_t;

  function automatic tsl_frame_t unpack_frame(input logic [FRAME_CLOCKS-1:0] q);
    tsl_frame_t f;
    f.er   = q[POS_ER];
    f.td   = q[POS_TD];
    f.sign = q[POS_SIGN];
    f.b12  = q[POS_B12];
    f.mag  = {q[POS_B11], q[POS_B10], q[POS_B9], q[POS_B8], q[POS_B7],
              q[POS_B6], q[POS_B5], q[POS_B4], q[POS_B3]};
    return f;
  endfunction

endpackage
