// tb_scaling_amp_model: a temperature T arrives from the D/A as -T/10.24 V
// and must leave on the EG&G scale (T + 45) / 21: 0 V at -45 C, 5 V at
// +60 C, and the calibration points 4.524 V at +50 C, 2.143 V at 0 C and
// -0.238 V at -50 C.
module tb_scaling_amp_model;
  real vin, vout;
  int checks = 0, failures = 0;

  scaling_amp_model dut (.vin, .vout);

  task automatic expect_t(input real t, input real v, input real tol);
    vin = -t / 10.24;
    #1;
    checks++;
    if (vout < v - tol || vout > v + tol) begin
      failures++;
      $display("FAIL: T = %f C gives %f V, expected %f V", t, vout, v);
    end
  endtask

  initial begin
    expect_t(-45.0, 0.0, 1e-6);
    expect_t(60.0, 5.0, 1e-6);
    expect_t(50.0, 4.524, 0.0005);
    expect_t(0.0, 2.143, 0.0005);
    expect_t(-50.0, -0.238, 0.0005);
    for (int i = 0; i < 100; i++) begin
      real t;
      t = real'($urandom_range(0, 1022)) * 0.1 - 51.1;
      expect_t(t, (t + 45.0) / 21.0, 1e-6);
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
