// tsl_tx_model: behavioural model of the TSL hygrometer's serial output, for
// simulation only.
//
// Produces the biphase-mark line signal: the level changes at the start of
// every bit, and once more in mid-bit when the bit is 1. A frame is
//   start(0) B9 B10 B11 B12 SIGN 0 ER TD stop(1) start(0) 0 0 B3..B8 stop(1)
// and is followed by idle ones up to 120 bits (200 ms at 600 baud). The
// bit time is a variable so that tests can run the transmitter fast or
// slow against the receiver clock.
module tsl_tx_model (
  output logic line
);
  realtime bit_time = 1666666.667ns;  // 600 baud
  int      frames_sent = 0;
  realtime frame_start_t = 0;  // time of the last frame's start-bit edge

  initial line = 1'b0;

  // Build the 20 bits of a frame, first bit in element 0.
  function automatic logic [19:0] frame_bits(input logic sign, input logic [9:0] b12_b3,
                                             input logic er, input logic td);
    // b12_b3[9] = B12 ... b12_b3[0] = B3
    logic [19:0] b;
    b[0]  = 1'b0;          // start
    b[1]  = b12_b3[6];     // B9
    b[2]  = b12_b3[7];     // B10
    b[3]  = b12_b3[8];     // B11
    b[4]  = b12_b3[9];     // B12
    b[5]  = sign;
    b[6]  = 1'b0;
    b[7]  = er;
    b[8]  = td;
    b[9]  = 1'b1;          // stop
    b[10] = 1'b0;          // start
    b[11] = 1'b0;
    b[12] = 1'b0;
    for (int i = 0; i < 6; i++) b[13+i] = b12_b3[i];  // B3..B8
    b[19] = 1'b1;          // stop
    return b;
  endfunction

  task automatic send_bit(input logic v);
    line = ~line;
    #(bit_time / 2);
    if (v) line = ~line;
    #(bit_time / 2);
  endtask

  task automatic send_idle(input int n);
    repeat (n) send_bit(1'b1);
  endtask

  // One 200 ms frame period: 20 frame bits and 100 idle ones.
  task automatic send_frame(input logic sign, input logic [9:0] b12_b3,
                            input logic er, input logic td);
    logic [19:0] b;
    b = frame_bits(sign, b12_b3, er, td);
    frame_start_t = $realtime;
    for (int i = 0; i < 20; i++) send_bit(b[i]);
    frames_sent++;
    send_idle(100);
  endtask
endmodule
