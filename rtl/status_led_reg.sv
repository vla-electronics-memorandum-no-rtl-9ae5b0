// status_led_reg: four-bit trouble-shooting register that drives the card's
// LEDs.
//
// Every end-of-frame load pulse, with or without the error flag, loads
// {B11, SIGN, TD, ER} of the frame. The outputs are inverted, as the LEDs
// hang from +5 V through resistors and are sunk by the register's
// inverted outputs: led_n[i] = 0 lights LED i (ERROR, TD, minus sign,
// 25.6 C bit). This is the card's 74LS175. Reset, which the card does not
// have, turns all LEDs off.
//
// Interface: clk, rst_n, load (one-clock enable), bits[3:0] = {B11, SIGN,
// TD, ER}, led_n[3:0].
module status_led_reg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [3:0] bits,
  output logic [3:0] led_n
);
  logic [3:0] q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    q <= '0;
    else if (load) q <= bits;
  assign led_n = ~q;
endmodule
