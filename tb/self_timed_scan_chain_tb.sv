`timescale 1ns/1ps
// Testbench for self_timed_scan_chain.
//
// Shifts random TDI bits through a chain of LEN bits with TCK, with shift_en
// dropped on random cycles, and compares tdo after every edge with a plain
// LEN-bit shift register model that is cleared by reset and whose output is
// registered. It checks that tdo stays 0 for the first LEN shifts, that it
// then returns each bit exactly LEN shifts after it went in, and that tdo
// holds its value while shift_en is low. A second phase resets the chain in
// the middle of a pattern and checks that it starts empty again.
module self_timed_scan_chain_tb;
  localparam int LEN = 5, TAIL_EMPTY = 3, NSHIFT = 400;

  logic tck, rst_n = 1'b1, shift_en = 1'b0, tdi = 1'b0;
  logic tdo;

  self_timed_scan_chain #(.LEN(LEN), .TAIL_EMPTY(TAIL_EMPTY)) dut (.*);

  initial begin
    tck = 1'b0;
    forever #5 tck = ~tck;
  end

  int checks = 0, failures = 0;
  logic [LEN-1:0] model;
  logic           model_tdo;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  task automatic do_reset();
    rst_n <= 1'b0;
    shift_en <= 1'b0;
    model = '0;
    model_tdo = 1'b0;
    repeat (2) @(negedge tck);
    rst_n <= 1'b1;
    @(negedge tck);
  endtask

  // one TCK cycle: drive on the falling edge, update the model on the rising
  // edge, compare after it
  task automatic cycle(input bit en, input bit d);
    shift_en <= en;
    tdi <= d;
    @(posedge tck);
    if (en) begin
      model_tdo = model[LEN-1];
      model = {model[LEN-2:0], d};
    end
    @(negedge tck);
    check(tdo == model_tdo, $sformatf("tdo=%0b expected %0b", tdo, model_tdo));
  endtask

  int shifts = 0, ones_out = 0;

  initial begin
    do_reset();
    // the first LEN shifts of all ones must leave tdo at 0
    for (int i = 0; i < LEN; i++) cycle(1'b1, 1'b1);
    check(tdo == 1'b0, "tdo still 0 after LEN shifts");
    cycle(1'b1, 1'b0);
    check(tdo == 1'b1, "first bit out after LEN+1 shifts");
    for (int i = 0; i < NSHIFT; i++) begin
      automatic bit en = ($urandom_range(3, 0) != 0);
      cycle(en, 1'($urandom));
      if (en) shifts++;
      if (tdo) ones_out++;
    end
    // reset in the middle of a pattern: the chain must come back empty
    do_reset();
    for (int i = 0; i < LEN; i++) cycle(1'b1, 1'b1);
    check(tdo == 1'b0, "tdo 0 for LEN shifts after a reset");
    for (int i = 0; i < 3 * LEN; i++) cycle(1'b1, 1'($urandom));
    check(shifts > NSHIFT / 2 && ones_out > 0, "random phase exercised the chain");
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
