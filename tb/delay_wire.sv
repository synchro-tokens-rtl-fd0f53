`timescale 1ns/1ps
// delay_wire: testbench transport delay for a bundle of wires. Every change
// of `a` appears on `y` delay_ps picoseconds later; the delay can be changed
// between runs. Used to give token rings and channel wires real delays.
module delay_wire #(
  parameter int W = 1
) (
  input  logic [W-1:0] a,
  input  int unsigned  delay_ps,
  output logic [W-1:0] y
);
  // start from the input's value once the time-zero updates have settled
  initial #1ns y <= a;
  always @(a) y <= #(delay_ps * 1ps) a;
endmodule
