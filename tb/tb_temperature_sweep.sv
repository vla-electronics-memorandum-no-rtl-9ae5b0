// tb_temperature_sweep: sweeps the whole 0 to 5 V scale of the data system,
// -45 C to +60 C in 0.5 C steps, through the converter, each temperature
// sent once as a dewpoint and once as an ambient frame.
//
// Up to +51.1 C each output must equal (T + 45) / 21 within one 0.1 C
// step. From +51.2 C on, the 51.2 C bit is not converted, so the output
// must equal the value for T - 51.2 C; the test counts these points to
// show where the converter's range ends.
module tb_temperature_sweep;
  localparam realtime CLK_HALF = 52083.333ns;  // 9600 Hz

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       rx;
  real        vtd, vta;
  logic [9:0] td_code, ta_code;
  logic [3:0] led_n;
  logic       bit_clk, bit_data, load, tdl, tal, frame_active;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;

  always #(CLK_HALF) clk = ~clk;

  tsl_tx_model u_tx (.line(rx));

  tsl_vla_converter u_dut (
    .clk, .rst_n, .rx, .vtd, .vta, .td_code, .ta_code, .led_n,
    .bit_clk, .bit_data, .load, .tdl, .tal, .frame_active
  );

  task automatic check_v(input real v, input real e, input string what);
    checks++;
    if (v < e - 0.0055 || v > e + 0.0055) begin
      failures++;
      $display("FAIL: %s: %f V, expected %f V", what, v, e);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    u_tx.send_idle(30);
    for (int t10 = -450; t10 <= 600; t10 += 5) begin
      logic       sign;
      logic [9:0] m;       // B12..B3, 0.1 C per step
      real        t, e;
      sign = (t10 < 0);
      m    = 10'(sign ? -t10 : t10);
      t    = real'(t10) / 10.0;
      // Expected: exact up to 51.1 C, B12 lost above.
      if (t10 <= 511) begin e = (t + 45.0) / 21.0; n_in++; end
      else            begin e = (t - 51.2 + 45.0) / 21.0; n_out++; end
      u_tx.send_frame(sign, m, 1'b0, 1'b1);
      check_v(vtd, e, $sformatf("dewpoint %0.1f C", t));
      u_tx.send_frame(sign, m, 1'b0, 1'b0);
      check_v(vta, e, $sformatf("ambient %0.1f C", t));
    end
    checks++;
    if (n_in == 0 || n_out == 0) begin failures++; $display("FAIL: range not covered"); end
    $display("in range: %0d points, beyond +51.1 C: %0d points", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
