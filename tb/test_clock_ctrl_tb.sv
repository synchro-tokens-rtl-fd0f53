`timescale 1ns/1ps
// Self-checking test of test_clock_ctrl.
// Checks: in Independent Mode every TCK pulse reaches the Test SB whatever
// the enable does; in Interlocked Mode a pulse reaches it exactly when the
// enable was high at the end of the preceding TCK low phase, every pulse
// that passes is a full TCK pulse (the enable changing while TCK is high
// never cuts one short), and a restart happens on the first TCK rise after
// the enable returns.
module test_clock_ctrl_tb;
  logic tck = 1'b0, interlocked = 1'b0, clken = 1'b1, clk;

  test_clock_ctrl dut (.*);

  int checks = 0, failures = 0, passed = 0, suppressed = 0;
  logic en_at_rise;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // TCK: 10 ns period; the enable is sampled just before each rise
  always begin
    #5ns;
    en_at_rise = clken | ~interlocked;
    tck <= 1'b1;
    #1ps check(clk == en_at_rise, $sformatf("clk %b at TCK rise, expected %b", clk, en_at_rise));
    if (clk) passed++; else suppressed++;
    #2ns check(clk == en_at_rise, "pulse must not be cut short");
    #2999ps tck <= 1'b0;
    #1ps check(clk == 1'b0, "clk low while TCK low");
  end

  // the enable changes at random times, also while TCK is high
  initial begin
    for (int i = 0; i < 400; i++) begin
      #($urandom_range(9000, 500) * 1ps);
      clken <= ($urandom_range(2, 0) != 0);
      if (i == 100) interlocked <= 1'b1;
      if (i == 300) interlocked <= 1'b0;
    end
    check(suppressed > 10, "pulses suppressed in Interlocked Mode");
    check(passed > 100, "pulses passed");
    $display("passed=%0d suppressed=%0d", passed, suppressed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
