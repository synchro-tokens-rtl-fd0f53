`timescale 1ns/1ps
// test_clock_ctrl: clock of the Test SB, derived from the tester's TCK.
//
// The Test SB has no oscillator of its own; its clock is TCK. Two modes:
//   Interlocked (interlocked = 1): the wrapper's clock enable (the AND of
//     the Test SB nodes' SBclken) gates TCK, so a late token suppresses TCK
//     pulses exactly as it would stop a ring oscillator. Data exchange
//     between tester and mission logic is then deterministic.
//   Independent (interlocked = 0): TCK passes ungated; token flow and TCK
//     do not affect each other's timing, and the exchange with the mission
//     logic is no longer deterministic.
// The gate is a latch-based clock gate: the enable is captured while TCK is
// low and the output is TCK AND the captured enable, so a change of the
// enable never shortens a pulse. A restart therefore happens on the next
// TCK rising edge after the enable returns.
// Following the method: TCK as the Test SB clock and the two modes. This
// design's choices: the latch-based gate; the mode input should only change
// while TCK is low.
module test_clock_ctrl (
  input  logic tck,
  input  logic interlocked,  // 1: Interlocked Mode, 0: Independent Mode
  input  logic clken,        // AND of the Test SB nodes' SBclken
  output logic clk
);

  logic en_latched;

  always_latch begin
    if (!tck) en_latched = clken | ~interlocked;
  end

  assign clk = tck & en_latched;

endmodule
