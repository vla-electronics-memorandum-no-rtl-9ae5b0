// tb_biphase_recovery: feeds the recovery logic with transition pulses of a
// biphase-mark stream (boundary pulse every bit, mid-bit pulse for a 1)
// and checks that every bit comes out on DATA with one CLOCK strobe, that
// START is the strobe of a 0, that strobes come one per bit period (16
// clocks at the nominal rate), and that decoding still works with the bit
// period 10 % long (18 clocks) or short (14 clocks). A second part resets
// the logic in the middle of a run of idle ones so that it locks onto the
// mid-bit transitions, and checks that the first 0 pulls it back into
// phase: every bit after that 0 must decode correctly.
module tb_biphase_recovery;
  logic clk = 1'b0, rst_n = 1'b0, edge_pulse = 1'b0;
  logic data, bit_clk, start;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  biphase_recovery dut (.clk, .rst_n, .edge_pulse, .data, .bit_clk, .start);

  logic sent[$];
  int   n_strobes = 0, last_strobe = -1, cyc = 0, period = 16, prev_period = 16, n_rate = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Monitor: each strobe must carry the oldest bit not yet seen. The first
  // strobe after reset closes no bit and is skipped.
  logic phase2 = 1'b0;
  logic got[$];

  always @(posedge clk) if (rst_n && phase2) begin
    if (bit_clk) got.push_back(data);
  end

  always @(posedge clk) if (rst_n && !phase2) begin
    cyc++;
    if (bit_clk) begin
      n_strobes++;
      check(start == !data, "START is not CLOCK with DATA = 0");
      if (n_strobes > 1) begin
        if (sent.size() == 0) check(0, "strobe with no bit sent");
        else begin
          logic e;
          e = sent.pop_front();
          check(data == e, $sformatf("bit %0d: data %b expected %b", n_strobes, data, e));
        end
        if (last_strobe >= 0 && period == 16 && prev_period == 16) begin
          check(cyc - last_strobe == 16, $sformatf("strobe spacing %0d", cyc - last_strobe));
          n_rate++;
        end
      end
      last_strobe = cyc;
    end else begin
      check(!start, "START without CLOCK");
    end
  end

  // Send one bit: boundary pulse, and a mid pulse for a 1.
  task automatic send_bit(input logic v);
    @(negedge clk) edge_pulse = 1'b1;
    @(negedge clk) edge_pulse = 1'b0;
    repeat (period / 2 - 2) @(negedge clk);
    if (v) edge_pulse = 1'b1;
    @(negedge clk) edge_pulse = 1'b0;
    repeat (period - period / 2 - 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      period = (k == 0) ? 16 : (k == 1) ? 18 : 14;
      for (int i = 0; i < 300; i++) begin
        logic v;
        v = 1'($urandom_range(0, 1));
        send_bit(v);
        sent.push_back(v);
        prev_period = period;
      end
    end
    period = 16;
    send_bit(1'b1);   // closing boundary for the last bit
    repeat (20) @(negedge clk);
    check(sent.size() == 0, $sformatf("%0d bits not decoded", sent.size()));
    check(n_rate > 100, "rate not checked");

    // Part 2: wrong-phase lock-in on idle ones, recovered by the first 0.
    phase2 = 1'b1;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    // A lone mid-bit transition of an idle 1 arrives first after reset.
    edge_pulse = 1'b1;
    @(negedge clk) edge_pulse = 1'b0;
    repeat (7) @(negedge clk);
    repeat (6) send_bit(1'b1);
    begin
      int n_wrong = 0;
      foreach (got[i]) if (got[i] != 1'b1) n_wrong++;
      check(got.size() >= 5 && n_wrong == 0, "idle ones not decoded as ones");
    end
    send_bit(1'b0);   // first 0: misread, but re-aligns the receiver
    got.delete();
    sent.delete();
    for (int i = 0; i < 64; i++) begin
      logic v;
      v = 1'($urandom_range(0, 1));
      send_bit(v);
      sent.push_back(v);
    end
    send_bit(1'b1);
    repeat (20) @(negedge clk);
    // got[0] closes the 0 bit (or its misread); got[1..] are the 64 bits.
    // The receiver was locked to the wrong phase, so the 0 reads as a 1.
    check(got.size() > 0 && got[0] == 1'b1, "receiver was not out of phase before the 0");
    check(got.size() == 65, $sformatf("%0d strobes after re-alignment", got.size()));
    for (int i = 0; i < 64 && i + 1 < got.size(); i++)
      check(got[i+1] == sent[i], $sformatf("after re-alignment bit %0d: %b expected %b", i, got[i+1], sent[i]));
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
