`timescale 1ns/1ps
// Self-checking test of self_timed_fifo.
// A four-phase producer writes a numbered word sequence into the tail while
// the consumer at the head is stalled, so the FIFO must accept exactly DEPTH
// words and then hold off the producer. The consumer then drains with random
// handshake delays while the producer keeps writing; every word must come
// out once and in order.
module self_timed_fifo_tb;
  localparam int W = 8;
  localparam int D = 4;
  localparam int N = 40;

  logic         rst_n = 1'b0;
  logic         in_req = 1'b0, in_ack, out_req, out_ack = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0;
  bit consumer_on = 1'b0;

  self_timed_fifo #(.DATA_W(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // producer: bundled data is set up before req rises
  initial begin
    #5 rst_n <= 1'b1;
    for (int i = 0; i < N; i++) begin
      in_data <= W'(i * 7 + 3);
      #1 in_req <= 1'b1;
      wait (in_ack);
      #1 in_req <= 1'b0;
      wait (!in_ack);
      sent++;
      #1;
    end
  end

  // consumer
  initial begin
    wait (consumer_on);
    while (rcvd < N) begin
      wait (out_req);
      #($urandom_range(3, 0));
      check(out_data == W'(rcvd * 7 + 3), $sformatf("word %0d: got %0d", rcvd, out_data));
      rcvd++;
      out_ack <= 1'b1;
      wait (!out_req);
      #($urandom_range(2, 0));
      out_ack <= 1'b0;
    end
  end

  initial begin
    #200;
    // stalled consumer: the FIFO holds DEPTH words and blocks the producer
    check(sent == D, $sformatf("FIFO accepted %0d words while blocked, expected %0d", sent, D));
    check(in_req && !in_ack, "producer must be held off while the FIFO is full");
    consumer_on = 1'b1;
    wait (rcvd == N);
    #10;
    check(sent == N, "all words sent");
    check(!out_req, "FIFO empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
