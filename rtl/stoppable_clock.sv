`timescale 1ns/1ps
// stoppable_clock: behavioural model of an SB's stoppable ring oscillator.
//
// This is a simulation model, not synthesizable logic: the real part is a
// ring of inverters closed through a NAND gate whose other input is the
// clock enable (the AND of all node SBclken signals of the SB). Because the
// enable interrupts the ring rather than gating its output, the clock
// stops cleanly in its low phase and restarts with a full-width high pulse
// when the enable returns, with no runt pulses.
//
// Model behaviour: each period is a low phase followed by a high phase of
// the same length. At the end of a low phase the model waits for clken to
// be high, and after RESTART_PS of gate delay, rises. The enable is
// produced right after a rising edge, so a stop request always takes effect
// at the end of the following low phase ("synchronous stop"); a restart
// follows the enable asynchronously.
// Frequency control: the half period is BASE_HALF_PS + freq_sel*STEP_HALF_PS
// picoseconds, standing for a digitally selected delay of the inverters
// (the method allows variable-delay inverters or an output clock divider;
// the selectable delay and its encoding are this model's choice).
module stoppable_clock #(
  parameter int unsigned BASE_HALF_PS = 5000,
  parameter int unsigned STEP_HALF_PS = 500,
  parameter int unsigned RESTART_PS   = 100
) (
  input  logic       clken,     // stop request when low
  input  logic [3:0] freq_sel,  // inverter delay selection
  output logic       clk
);

  int unsigned half_ps;

  assign half_ps = BASE_HALF_PS + int'(freq_sel) * STEP_HALF_PS;

  initial clk = 1'b0;

  always begin
    #(half_ps * 1ps);
    if (!clken) begin
      wait (clken);
      #(RESTART_PS * 1ps);
    end
    clk <= 1'b1;
    #(half_ps * 1ps);
    clk <= 1'b0;
  end

endmodule
