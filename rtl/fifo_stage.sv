`timescale 1ns/1ps
// fifo_stage: one stage of a self-timed (clockless) FIFO.
//
// A bundled-data pipeline stage with four-phase handshakes on both sides and
// a fully decoupled controller, so that a chain of DEPTH stages holds DEPTH
// words. The controller has three state bits:
//   full    - the stage holds a word;
//   in_ack  - raised when a requested word is captured (only into an empty
//             stage), lowered once the request has been withdrawn;
//   out_req - raised when the stage is full and the previous output
//             handshake has finished (out_ack low), lowered when the next
//             stage acknowledges; the stage is empty again at that moment.
// The data latch is loaded at the capture and stays closed until the next
// capture, so the word is stable for the whole output handshake.
//
// All state is level-sensitive (latches), and the handshake wires of
// neighbouring stages form combinational loops: this is the intended
// asynchronous circuit, not an inference accident. The method requires a
// stage to complete a four-phase handshake within one local clock cycle of
// the SBs at either end.
// Following the method: a self-timed FIFO stage with four-phase handshakes.
// This design's choices: the decoupled controller and its state encoding.
module fifo_stage
  import st_pkg::*;
#(
  parameter int unsigned DATA_W = ST_DATA_W
) (
  input  logic              rst_n,
  input  logic              in_req,
  output logic              in_ack,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_req,
  input  logic              out_ack,
  output logic [DATA_W-1:0] out_data
);

  logic              full;
  logic [DATA_W-1:0] word;

  always_latch begin
    if (!rst_n) begin
      full    = 1'b0;
      in_ack  = 1'b0;
      out_req = 1'b0;
    end else begin
      // output side: the next stage has taken the word
      if (out_req && out_ack) begin
        out_req = 1'b0;
        full    = 1'b0;
      end
      // input side: capture into an empty stage
      if (in_req && !in_ack && !full) begin
        word   = in_data;
        full   = 1'b1;
        in_ack = 1'b1;
      end
      if (!in_req && in_ack) begin
        in_ack = 1'b0;
      end
      // offer a held word once the previous output handshake is over
      if (full && !out_req && !out_ack) begin
        out_req = 1'b1;
      end
    end
  end

  assign out_data = word;

endmodule
