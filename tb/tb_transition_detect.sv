// tb_transition_detect: drives the line with random levels held for random
// numbers of clocks and checks that edge_pulse is high exactly in the cycle
// after each change has passed the two sampling stages, i.e. when the
// line values sampled one and two clocks earlier differ.
module tb_transition_detect;
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b0, edge_pulse;
  int checks = 0, failures = 0, n_edges = 0;
  logic h1 = 1'b0, h2 = 1'b0;   // line as sampled at the last two clocks

  always #5 clk = ~clk;
  transition_detect dut (.clk, .rst_n, .rx, .edge_pulse);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check_now();
      if ($urandom_range(0, 3) == 0) rx = ~rx;
      @(posedge clk);
      h2 = h1;
      h1 = rx;
    end
    if (n_edges < 100) begin failures++; $display("FAIL: too few edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic expv;
    expv = h1 ^ h2;
    checks++;
    if (expv) n_edges++;
    if (edge_pulse !== expv) begin
      failures++;
      $display("FAIL: edge_pulse %b expected %b at %0t", edge_pulse, expv, $time);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
