// tb_frame_sequencer: drives one CLOCK strobe every 16 clocks with a bit
// stream made of idle ones and frames, START being the strobe of a 0.
// Checks that exactly 24 shifts follow the first 0 (zeros inside the frame
// do not restart it), that no shift happens while idle, and that exactly
// one one-clock LOAD comes two clocks after the 24th shift.
module tb_frame_sequencer;
  logic clk = 1'b0, rst_n = 1'b0, bit_clk = 1'b0, start = 1'b0;
  logic shift_en, load, running;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  frame_sequencer dut (.clk, .rst_n, .bit_clk, .start, .shift_en, .load, .running);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference model of the frame counter.
  int ref_left = 0;         // shifts still expected in this frame
  int since_last = -1;      // clocks since the 24th shift
  int n_loads = 0, n_frames = 0, n_inner_zero = 0;

  always @(posedge clk) if (rst_n) begin
    logic exp_shift, exp_load;
    exp_load = (since_last == 2);
    if (since_last >= 0) since_last++;
    if (since_last > 3) since_last = -1;
    exp_shift = 1'b0;
    if (bit_clk) begin
      if (ref_left == 0 && start) begin ref_left = 24; n_frames++; end
      else if (ref_left > 0 && start) n_inner_zero++;
      if (ref_left > 0) begin
        exp_shift = 1'b1;
        ref_left--;
        if (ref_left == 0) since_last = 1;
      end
    end
    check(shift_en == exp_shift, $sformatf("shift_en %b expected %b at %0t", shift_en, exp_shift, $time));
    check(load == exp_load, $sformatf("load %b expected %b at %0t", load, exp_load, $time));
    if (load) n_loads++;
  end

  task automatic send_bit(input logic v);
    repeat (15) @(negedge clk);
    bit_clk = 1'b1; start = !v;
    @(negedge clk);
    bit_clk = 1'b0; start = 1'b0;
  endtask

  initial begin
    logic [19:0] fr;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) send_bit(1'b1);
    for (int f = 0; f < 12; f++) begin
      fr = 20'($urandom) & ~20'h00001 | 20'h80200;  // start 0, stops 1
      fr[10] = 1'b0; fr[11] = 1'b0; fr[12] = 1'b0;
      for (int i = 0; i < 20; i++) send_bit(fr[i]);
      repeat (8 + f) send_bit(1'b1);
    end
    repeat (4) @(negedge clk);
    check(n_frames == 12 && n_loads == 12, $sformatf("%0d frames %0d loads", n_frames, n_loads));
    check(n_inner_zero > 0, "no zero inside a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
