`timescale 1ns/1ps
// Self-checking test of the stoppable_clock model.
// Checks the period for several delay selections, that a stop request
// made in the high phase lets that pulse finish at full width and holds
// the clock low, that no edge occurs while stopped, and that the clock
// restarts RESTART_PS after the enable returns.
module stoppable_clock_tb;
  localparam int BASE = 5000, STEP = 500, RST = 100;

  logic       clken = 1'b1;
  logic [3:0] freq_sel = '0;
  logic       clk;

  stoppable_clock #(.BASE_HALF_PS(BASE), .STEP_HALF_PS(STEP), .RESTART_PS(RST)) dut (.*);

  int checks = 0, failures = 0;
  realtime t_rise, t_fall, t_prev;

  // times are compared to within half a picosecond
  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.5ps) && (b - a < 0.5ps);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    for (int sel = 0; sel < 16; sel += 5) begin
      freq_sel <= 4'(sel);
      @(posedge clk); @(posedge clk);
      t_prev = $realtime;
      @(negedge clk); t_fall = $realtime;
      @(posedge clk); t_rise = $realtime;
      check(near(t_rise - t_prev, 2 * (BASE + sel * STEP) * 1ps),
            $sformatf("sel %0d: period %0t", sel, t_rise - t_prev));
      check(near(t_fall - t_prev, (BASE + sel * STEP) * 1ps), $sformatf("sel %0d: high phase", sel));
    end
    // stop request shortly after a rising edge
    freq_sel <= 4'd0;
    @(posedge clk); t_rise = $realtime;
    #1ns clken <= 1'b0;
    @(negedge clk);
    check(near($realtime - t_rise, BASE * 1ps), "pulse under a stop request keeps full width");
    t_fall = $realtime;
    #50ns;
    check(clk == 1'b0 && near($realtime - t_fall, 50ns), "clock held low while stopped");
    clken <= 1'b1;
    t_prev = $realtime;
    @(posedge clk);
    check(near($realtime - t_prev, RST * 1ps), "asynchronous restart after the gate delay");
    @(negedge clk);
    check(near($realtime - t_prev, (RST + BASE) * 1ps), "first pulse after restart has full width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
