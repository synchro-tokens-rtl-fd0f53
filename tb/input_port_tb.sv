`timescale 1ns/1ps
// Self-checking test of input_port.
// A model of a FIFO head holds a queue of numbered words and presents them
// one at a time with a four-phase handshake, answering each transition a few
// hundred picoseconds later. Checks: a word is shown (empty low) only in
// the cycle after an enabled cycle; every word reaches the SB once and in
// order; with words waiting the port delivers one per enabled cycle, one
// cycle after it was taken; an empty channel shows empty.
module input_port_tb;
  localparam int W = 8;

  logic         clk = 1'b0, rst_n = 1'b1, dclken = 1'b0;
  logic         req = 1'b0, ack, empty;
  logic [W-1:0] req_data = '0, data;

  input_port #(.DATA_W(W)) dut (.*);

  int checks = 0, failures = 0;
  int queued = 0, sent = 0, rcvd = 0, enabled_cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always #5ns clk <= ~clk;

  // FIFO head model
  initial begin
    forever begin
      wait (sent < queued);
      #300ps;
      req_data <= W'(sent * 5 + 1);
      #100ps req <= 1'b1;
      wait (ack);
      #200ps req <= 1'b0;
      sent++;
      wait (!ack);
    end
  end

  logic dclken_q = 1'b0;
  always @(posedge clk) dclken_q <= dclken;

  always @(posedge clk) if (rst_n) begin
    if (!dclken_q) check(empty, "nothing shown unless enabled in the previous cycle");
    if (!empty) begin
      check(data == W'(rcvd * 5 + 1), $sformatf("word %0d: got %0d", rcvd, data));
      rcvd++;
    end
    if (dclken) enabled_cycles++;
  end

  initial begin
    rst_n <= 1'b0;  // reset with an edge
    #12ns rst_n <= 1'b1;
    queued = 12;
    repeat (6) @(posedge clk);
    check(rcvd == 0, "nothing received while disabled");
    @(negedge clk) dclken <= 1'b1;
    repeat (9) @(posedge clk);
    #1 check(rcvd == 8, $sformatf("one word per enabled cycle: %0d in 8 (+1 latency)", rcvd));
    repeat (6) @(posedge clk);
    #1 check(rcvd == 12 && empty, "channel drained, port empty");
    // random enables while words trickle in
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      dclken <= ($urandom_range(2, 0) != 0);
      if ($urandom_range(1, 0) != 0) queued++;
    end
    @(negedge clk) dclken <= 1'b1;
    repeat (3 + queued - rcvd) @(posedge clk);
    #1 check(rcvd == queued, $sformatf("all %0d words received (%0d)", queued, rcvd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
