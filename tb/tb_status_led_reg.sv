// tb_status_led_reg: after reset all LEDs are off (drive high); each load
// captures the four status bits and shows them inverted until the next
// load.
module tb_status_led_reg;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [3:0] bits = '0, led_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  status_led_reg dut (.clk, .rst_n, .load, .bits, .led_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] shown;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(led_n == 4'hF, "LEDs not off after reset");
    rst_n = 1'b1;
    shown = 4'h0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      bits = 4'($urandom);
      load = ($urandom_range(0, 2) == 0);
      if (load) shown = bits;
      @(negedge clk);
      load = 1'b0;
      bits = ~bits;
      check(led_n == ~shown, $sformatf("led_n %b expected %b", led_n, ~shown));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
