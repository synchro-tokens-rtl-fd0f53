`timescale 1ns/1ps
// input_port: asynchronous-to-synchronous data port of a wrapper.
//
// The head of a self-timed FIFO presents a word with req (four-phase,
// bundled data). On each rising clock edge where the node holds the token
// (dclken high) and a new word is offered (req high, not yet acknowledged),
// the port registers the word and raises ack. The SB sees the registered
// word in the following cycle: empty low, data holding it. The SB must take
// every word shown with empty low (the port has only Empty and Data on its
// synchronous side, no read strobe). ack is cleared asynchronously when the
// channel drops req; the next word, if any, is then offered and taken on
// the next edge.
//
// Timing: one word per clock cycle when the channel completes a handshake
// within one cycle; a word taken on edge k is shown during cycle k+1. With
// dclken low the port takes nothing, so an asynchronous change of req is
// never sampled while the port is disabled; the token protocol guarantees
// the channel is quiet whenever the port is enabled. Both SB-side outputs
// come straight from flip-flops, which reset clears (empty high, data 0).
// Following the method: the Req/Ack/Data and Empty/Data interfaces and the
// gating by Dclken. This design's choices: the data register, the one-cycle
// latency, and the asynchronous clear of ack.
module input_port
  import st_pkg::*;
#(
  parameter int unsigned DATA_W = ST_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dclken,
  // asynchronous side
  input  logic              req,
  output logic              ack,
  input  logic [DATA_W-1:0] req_data,
  // synchronous side
  output logic              empty,
  output logic [DATA_W-1:0] data
);

  logic ack_clr;
  logic take;

  assign ack_clr = ~req | ~rst_n;
  assign take    = dclken & req & ~ack;

  always_ff @(posedge clk or posedge ack_clr) begin
    if (ack_clr) ack <= 1'b0;
    else if (dclken) ack <= 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      empty <= 1'b1;
      data  <= '0;
    end else begin
      empty <= ~take;
      if (take) data <= req_data;
    end
  end

endmodule
