`timescale 1ns/1ps
// Self-checking test of output_port.
// A model of a FIFO tail answers the four-phase handshake a few hundred
// picoseconds after each transition, and can be told to stop answering
// (channel full). The SB side offers a numbered word sequence. Checks:
// every accepted word arrives once and in order; full is high while dclken
// is low or a handshake is pending; with a fast channel and valid always
// high the port moves one word per clock cycle; nothing moves while the
// port is disabled.
module output_port_tb;
  localparam int W = 8;

  logic         clk = 1'b0, rst_n = 1'b1, dclken = 1'b0, valid = 1'b0;
  logic [W-1:0] data;
  logic         full, req, ack = 1'b0;
  logic [W-1:0] req_data;

  output_port #(.DATA_W(W)) dut (.*);

  int checks = 0, failures = 0;
  int offered = 0, got = 0, stalled_cycles = 0;
  bit channel_stuck = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always #5ns clk <= ~clk;

  // FIFO tail model
  always @(posedge req) begin
    if (channel_stuck) wait (!channel_stuck);
    #300ps;
    check(req_data == W'(got), $sformatf("channel got %0d, expected %0d", req_data, got));
    got++;
    ack <= 1'b1;
    wait (!req);
    #200ps ack <= 1'b0;
  end

  // SB side: offer the next word, advance when it is taken
  always @(posedge clk) begin
    if (rst_n) begin
      if (!dclken) check(full, "full while the port is disabled");
      if (valid && !full) offered <= offered + 1;
      if (dclken && req) begin
        check(full, "full while a handshake is pending");
        stalled_cycles <= stalled_cycles + 1;
      end
    end
  end
  assign data = W'(offered);

  initial begin
    rst_n <= 1'b0;  // reset with an edge
    #12ns rst_n <= 1'b1;
    valid <= 1'b1;
    repeat (5) @(posedge clk);
    check(got == 0 && !req, "no transfer while disabled");
    // enabled, fast channel: one word per cycle
    @(negedge clk) dclken <= 1'b1;
    repeat (10) @(posedge clk);
    #1 check(offered == 10, $sformatf("10 words in 10 enabled cycles, got %0d", offered));
    // stuck channel: port must report full and hold the word
    @(negedge clk) channel_stuck = 1'b1;
    repeat (6) @(posedge clk);
    #1 check(offered == 11 && full && req, "one word pending, then full");
    @(negedge clk) channel_stuck = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) dclken <= 1'b0;
    repeat (4) @(posedge clk);
    check(got == offered, $sformatf("all accepted words delivered (%0d of %0d)", got, offered));
    check(stalled_cycles >= 5, "stall seen");
    // random enables and valids
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      dclken <= ($urandom_range(3, 0) != 0);
      valid  <= ($urandom_range(1, 0) != 0);
    end
    @(negedge clk) dclken <= 1'b0;
    repeat (3) @(posedge clk);
    check(got == offered, "all words delivered after random traffic");
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
