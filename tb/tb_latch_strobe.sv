// tb_latch_strobe: all eight combinations of LOAD, ER and TD. A strobe may
// only come with LOAD and no error, TDL for dewpoint (TD = 1), TAL for
// ambient.
module tb_latch_strobe;
  logic load, er, td, tdl, tal;
  int checks = 0, failures = 0;

  latch_strobe dut (.load, .er, .td, .tdl, .tal);

  initial begin
    for (int i = 0; i < 8; i++) begin
      {load, er, td} = 3'(i);
      #1;
      checks++;
      if (tdl != (i == 5) || tal != (i == 4)) begin
        failures++;
        $display("FAIL: load=%b er=%b td=%b gives tdl=%b tal=%b", load, er, td, tdl, tal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
