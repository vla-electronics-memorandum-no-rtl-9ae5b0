// tb_tsl_vla_converter: end-to-end test of the converter at its default
// parameters.
//
// A behavioural TSL transmitter sends 200 ms frames, alternating between
// dewpoint and ambient, with random signed temperatures. Some frames carry
// the error flag (the latches must hold), some have the 51.2 C bit set
// (which is not converted), and some are sent with the bit time 10 % long
// or short against the 9600 Hz receiver clock. After every frame the test
// checks both latched codes against sign-magnitude to offset-binary worked
// out here, both output voltages against (T + 45) / 21 within one code
// step, the LED drive, the load-pulse latency (24 bit times after the
// start bit plus a few clocks) and the number of bit strobes per frame
// (120, one per bit). Each mechanism must occur at least once.
module tb_tsl_vla_converter;
  localparam realtime CLK_HALF = 52083.333ns;  // 9600 Hz
  localparam int      N_FRAMES = 40;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       rx;
  real        vtd, vta;
  logic [9:0] td_code, ta_code;
  logic [3:0] led_n;
  logic       bit_clk, bit_data, load, tdl, tal, frame_active;

  int checks = 0, failures = 0;

  always #(CLK_HALF) clk = ~clk;

  tsl_tx_model u_tx (.line(rx));

  tsl_vla_converter u_dut (
    .clk, .rst_n, .rx, .vtd, .vta, .td_code, .ta_code, .led_n,
    .bit_clk, .bit_data, .load, .tdl, .tal, .frame_active
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters.
  int n_tdl = 0, n_tal = 0, n_err_held = 0, n_neg = 0, n_b12 = 0;
  int n_start_ignored = 0, n_slow = 0, n_fast = 0, n_load = 0;
  int bitclk_since_load = 0;
  realtime load_t = 0;

  always @(posedge clk) if (rst_n) begin
    if (tdl) n_tdl++;
    if (tal) n_tal++;
    if (bit_clk && !bit_data && frame_active) n_start_ignored++;
    if (bit_clk) bitclk_since_load++;
    if (load) begin
      n_load++;
      load_t = $realtime;
    end
  end

  // Reference: offset-binary code of a sign-magnitude reading (B3..B11).
  function automatic logic [9:0] ref_code(input logic sign, input logic [8:0] mag);
    int v;
    v = sign ? 511 - int'(mag) : 512 + int'(mag);
    return 10'(v);
  endfunction

  function automatic real ref_volt(input logic sign, input logic [8:0] mag);
    real t;
    t = (sign ? -1.0 : 1.0) * real'(mag) * 0.1;
    return (t + 45.0) / 21.0;
  endfunction

  logic [9:0] exp_td, exp_ta;
  real        expv_td, expv_ta;

  initial begin
    logic       sign, er, td, b12;
    logic [8:0] mag;
    real        scale;
    realtime    lat;
    int         bc;

    exp_td  = 10'd512;  exp_ta  = 10'd512;
    expv_td = 45.0 / 21.0; expv_ta = 45.0 / 21.0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    u_tx.send_idle(30);
    bitclk_since_load = 0;

    for (int i = 0; i < N_FRAMES; i++) begin
      td   = i[0];
      sign = 1'($urandom_range(0, 1));
      mag  = 9'($urandom_range(0, 511));
      if (i == 2) begin sign = 1'b1; mag = 9'd450; end    // -45.0 C
      if (i == 3) begin sign = 1'b0; mag = 9'd500; end    // +50.0 C
      if (i == 4) begin sign = 1'b0; mag = 9'd0;   end
      er   = (i % 7 == 5);
      b12  = (i % 9 == 8);
      // Frames 20..27 run 10 % slow, 28..35 run 10 % fast.
      scale = (i >= 20 && i < 28) ? 1.1 : (i >= 28 && i < 36) ? 0.9 : 1.0;
      u_tx.bit_time = 1666666.667ns * scale;
      bc = bitclk_since_load;

      u_tx.send_frame(sign, {b12, mag}, er, td);

      // Latency: load pulse 24 bit times after the start bit, plus the
      // synchroniser and strobe delays (at most 8 clocks).
      lat = load_t - u_tx.frame_start_t;
      check(lat >= 24.0 * u_tx.bit_time && lat <= 24.0 * u_tx.bit_time + 16.0 * CLK_HALF,
            $sformatf("frame %0d: load latency %0t", i, lat));

      if (!er) begin
        if (td) begin exp_td = ref_code(sign, mag); expv_td = ref_volt(sign, mag); end
        else    begin exp_ta = ref_code(sign, mag); expv_ta = ref_volt(sign, mag); end
        if (sign && mag != 0) n_neg++;
        if (b12) n_b12++;
      end else begin
        n_err_held++;
      end
      if (scale > 1.0) n_slow++;
      if (scale < 1.0) n_fast++;

      check(td_code == exp_td, $sformatf("frame %0d: td_code %0d exp %0d", i, td_code, exp_td));
      check(ta_code == exp_ta, $sformatf("frame %0d: ta_code %0d exp %0d", i, ta_code, exp_ta));
      check(vtd > expv_td - 0.0055 && vtd < expv_td + 0.0055,
            $sformatf("frame %0d: vtd %f exp %f", i, vtd, expv_td));
      check(vta > expv_ta - 0.0055 && vta < expv_ta + 0.0055,
            $sformatf("frame %0d: vta %f exp %f", i, vta, expv_ta));
      check(led_n == ~{mag[8], sign, td, er},
            $sformatf("frame %0d: led_n %b", i, led_n));
      // One bit strobe per bit: 120 bits per 200 ms frame period.
      if (i > 0)
        check(bitclk_since_load - bc == 120,
              $sformatf("frame %0d: %0d bit strobes", i, bitclk_since_load - bc));
    end

    check(n_load == N_FRAMES, $sformatf("%0d load pulses for %0d frames", n_load, N_FRAMES));
    check(n_tdl > 0, "no dewpoint latch strobe");
    check(n_tal > 0, "no ambient latch strobe");
    check(n_tdl + n_tal + n_err_held == N_FRAMES, "latch strobes do not add up");
    check(n_err_held > 0, "no error frame held");
    check(n_neg > 0, "no negative reading");
    check(n_b12 > 0, "no frame with the 51.2 C bit");
    check(n_start_ignored > 0, "no START inside a frame");
    check(n_slow > 0 && n_fast > 0, "no off-frequency frames");
    $display("mechanisms: tdl=%0d tal=%0d err_held=%0d neg=%0d b12=%0d start_ignored=%0d slow=%0d fast=%0d",
             n_tdl, n_tal, n_err_held, n_neg, n_b12, n_start_ignored, n_slow, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: 40 frames of 1920 clocks each take about 80 000 clocks.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
