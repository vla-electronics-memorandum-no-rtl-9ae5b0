// tb_frame_shift_reg: shifts random bits in at random times and compares
// the parallel output with a queue of the last 24 bits shifted; also
// checks that a frame shifted in lands its fields on the stages that
// tsl_pkg assigns to them.
module tb_frame_shift_reg;
  import tsl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, din = 1'b0;
  logic [23:0] q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  frame_shift_reg dut (.clk, .rst_n, .shift_en, .din, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic hist[$];

  task automatic shift(input logic v);
    @(negedge clk) begin shift_en = 1'b1; din = v; end
    @(negedge clk) begin shift_en = 1'b0; din = ~v; end
    hist.push_front(v);
    if (hist.size() > 24) void'(hist.pop_back());
  endtask

  initial begin
    logic [23:0] expv;
    tsl_frame_t f;
    logic [19:0] fr;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 24; i++) hist.push_back(1'b0);
    for (int i = 0; i < 500; i++) begin
      shift(1'($urandom_range(0, 1)));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      for (int k = 0; k < 24; k++) expv[k] = hist[k];
      check(q == expv, $sformatf("q %h expected %h", q, expv));
    end
    // A frame: start, B9 B10 B11 B12 SIGN 0 ER TD stop start 0 0 B3..B8 stop,
    // then four idle ones. Values: B11..B3 = 1_0110_1001, B12 = 1, sign = 1,
    // ER = 0, TD = 1.
    fr = '0;
    fr[1] = 1'b1; fr[2] = 1'b0; fr[3] = 1'b1; fr[4] = 1'b1; fr[5] = 1'b1;
    fr[7] = 1'b0; fr[8] = 1'b1; fr[9] = 1'b1;
    fr[13] = 1'b1; fr[14] = 1'b0; fr[15] = 1'b0; fr[16] = 1'b1; fr[17] = 1'b0; fr[18] = 1'b1;
    fr[19] = 1'b1;
    for (int i = 0; i < 20; i++) shift(fr[i]);
    repeat (4) shift(1'b1);
    f = unpack_frame(q);
    check(f.mag == 9'b1_0110_1001, $sformatf("mag %b", f.mag));
    check(f.sign && f.b12 && f.td && !f.er, "flags misplaced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
