// tb_code_latch: checks mid-scale after reset, then random data with a
// random strobe: the output must take d on a strobe and hold otherwise.
module tb_code_latch;
  logic clk = 1'b0, rst_n = 1'b0, strobe = 1'b0;
  logic [9:0] d = '0, q;
  int checks = 0, failures = 0, n_hold = 0, n_load = 0;

  always #5 clk = ~clk;
  code_latch dut (.clk, .rst_n, .strobe, .d, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [9:0] expv;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(q == 10'd512, $sformatf("reset value %0d", q));
    rst_n = 1'b1;
    expv = 10'd512;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d = 10'($urandom);
      strobe = ($urandom_range(0, 3) == 0);
      if (strobe) begin expv = d; n_load++; end else n_hold++;
      @(negedge clk);
      strobe = 1'b0;
      d = ~d;
      check(q == expv, $sformatf("q %0d expected %0d", q, expv));
    end
    check(n_hold > 0 && n_load > 0, "no hold or no load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
