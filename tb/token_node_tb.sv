`timescale 1ns/1ps
// Self-checking test of token_node.
// The node runs on a clock that stops while its SBclken is low, like the
// real stoppable clock. A partner model returns the token a set number of
// nanoseconds after each pass: early returns (before the recycle count
// ends) and late returns (the clock must stop) are both exercised. Checks:
//   * Dclken stays high for exactly `hold` local cycles per visit;
//   * between visits Dclken is low for exactly recycle+1 local cycles,
//     whether the token came back early or late (the local schedule never
//     depends on the ring delay);
//   * the counters step hold..1 and recycle..0 as in the node waveforms;
//   * the clock stops only when the token is late;
//   * a register load changes both lengths.
module token_node_tb;
  import st_pkg::*;
  localparam int CW = 8;

  logic          clk = 1'b0, rst_n = 1'b1;
  logic          cfg_we = 1'b0;
  logic [CW-1:0] cfg_hold = '0, cfg_recycle = '0;
  logic [CW-1:0] hold_reg, recycle_reg, hold_cnt, recycle_cnt;
  logic          token_in = 1'b1, token_out, dclken, sbclken, token_passed;

  token_node #(.CNT_W(CW), .HOLD_RESET(4), .RECYCLE_RESET(6)) dut (.*);

  int checks = 0, failures = 0;
  int ret_ns = 15;          // partner's token return delay
  int exp_h = 4, exp_r = 6;
  int cyc = 0, run = 0, gap = 0, visits = 0, stops = 0, late_visits = 0;
  bit late = 1'b0;
  bit loaded = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // clock that stops while sbclken is low (low phase 5 ns, high phase 5 ns)
  always begin
    #5ns;
    if (!sbclken) wait (sbclken);
    clk <= 1'b1;
    #5ns;
    clk <= 1'b0;
  end

  always @(negedge sbclken) if (rst_n) begin
    stops++;
    check(late, "clock stopped although the token was early");
  end

  // partner: return the token ret_ns after each pass
  always @(token_out) begin
    automatic logic v = token_out;
    #(ret_ns * 1ns);
    token_in <= ~v;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dclken) begin
      check(hold_cnt == CW'(exp_h - run), $sformatf("hold counter %0d in hold cycle %0d", hold_cnt, run));
      check(recycle_cnt == 0, "recycle counter must be 0 while holding");
      run <= run + 1;
      if (run == 0 && visits > 0) begin
        check(gap == exp_r + 1, $sformatf("Dclken low for %0d cycles, expected %0d", gap, exp_r + 1));
      end
      gap <= 0;
    end else begin
      gap <= gap + 1;
      if (run != 0) begin
        check(run == exp_h, $sformatf("Dclken high for %0d cycles, expected %0d", run, exp_h));
        check(token_passed, "token_passed pulse after the hold");
        check(recycle_cnt == CW'(loaded ? 1 : 6), "recycle counter loads the recycle value at the pass");
        check(hold_cnt == CW'(loaded ? 2 : 4), "hold counter presets at the pass");
        // the values preset at this pass govern the next visit
        exp_r  = loaded ? 1 : 6;
        exp_h  = loaded ? 2 : 4;
        visits <= visits + 1;
        if (late) late_visits <= late_visits + 1;
      end else if (gap > 0 && gap <= exp_r) begin
        check(recycle_cnt == CW'(exp_r - gap), $sformatf("recycle counter %0d at gap %0d", recycle_cnt, gap));
      end
      run <= 0;
    end
  end

  initial begin
    rst_n <= 1'b0;  // reset with an edge
    #12ns rst_n <= 1'b1;
    // early tokens: 15 ns return, recycle phase is 70 ns
    wait (visits == 4);
    check(stops == 0, "no stop with early tokens");
    // late tokens: return after 150 ns
    @(posedge clk); ret_ns = 150; late = 1'b1;
    wait (visits == 8);
    check(stops >= 3, $sformatf("late tokens must stop the clock (stops=%0d)", stops));
    // load new hold/recycle values, early tokens again
    @(posedge clk); ret_ns = 5;
    cfg_hold <= 8'd2; cfg_recycle <= 8'd1; cfg_we <= 1'b1;
    @(posedge clk); cfg_we <= 1'b0;
    #1 check(hold_reg == 8'd2 && recycle_reg == 8'd1, "register load");
    loaded = 1'b1;
    wait (visits == 9);       // the token still out returns late once more
    late = 1'b0;
    wait (visits == 14);
    #1;
    $display("visits=%0d stops=%0d late_visits=%0d", visits, stops, late_visits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
