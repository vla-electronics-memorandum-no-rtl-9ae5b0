// tb_dac80_model: complementary coding of the +/-5 V range: code 0 gives
// +5 V, all ones -5 V plus one LSB, mid-scale 0 V, and every code step is
// -10/4096 V.
module tb_dac80_model;
  logic [11:0] code;
  real vout;
  int checks = 0, failures = 0;

  dac80_model dut (.code, .vout);

  task automatic expect_v(input int c, input real v);
    code = 12'(c);
    #1;
    checks++;
    if (vout < v - 1e-6 || vout > v + 1e-6) begin
      failures++;
      $display("FAIL: code %0d gives %f V, expected %f V", c, vout, v);
    end
  endtask

  initial begin
    expect_v(0, 5.0);
    expect_v(4095, -5.0 + 10.0 / 4096.0);
    expect_v(2048, 0.0);
    expect_v(1024, 2.5);
    expect_v(3072, -2.5);
    for (int i = 0; i < 200; i++) begin
      int c;
      c = $urandom_range(0, 4095);
      expect_v(c, 5.0 - 10.0 * real'(c) / 4096.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
