// tb_sm_to_offset: all 1024 sign/magnitude inputs; a positive m must give
// 512 + m, a negative one 511 - m (offset binary, ones'-complement
// negatives).
module tb_sm_to_offset;
  logic sign;
  logic [8:0] mag;
  logic [9:0] code;
  int checks = 0, failures = 0;

  sm_to_offset dut (.sign, .mag, .code);

  initial begin
    int e;
    for (int s = 0; s < 2; s++)
      for (int m = 0; m < 512; m++) begin
        sign = 1'(s); mag = 9'(m);
        #1;
        e = s ? 511 - m : 512 + m;
        checks++;
        if (int'(code) != e) begin
          failures++;
          $display("FAIL: sign %0d mag %0d code %0d expected %0d", s, m, code, e);
        end
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
