`timescale 1ns/1ps
// output_port: synchronous-to-asynchronous data port of a wrapper.
//
// The SB offers a word with valid/data; the port launches it onto an
// asynchronous channel (the tail of a self-timed FIFO) with a four-phase
// bundled-data handshake: req rises with the data, the channel raises ack,
// req falls, the channel lowers ack. full tells the SB the port cannot take
// a word in this cycle: its node does not hold the token (dclken low) or the
// previous handshake has not completed (the channel is full or still busy).
//
// Timing: a word is taken on the rising clock edge where dclken & valid &
// !full; req and the data register change on that edge. req is cleared
// asynchronously by ack, so one word per cycle gets through when the
// channel completes its handshake within a clock cycle, as the method
// requires of every FIFO stage. Since the channel is only touched while
// the node holds the token, and the receiving port is then disabled, full
// is a deterministic function of the local cycle count.
// Following the method: the Valid/Full/Data and Req/Ack/Data interfaces
// and the gating by Dclken. This design's choices: four-phase signalling
// details, one register per data bit, and the asynchronous clear of req.
module output_port
  import st_pkg::*;
#(
  parameter int unsigned DATA_W = ST_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dclken,
  // synchronous side
  input  logic              valid,
  input  logic [DATA_W-1:0] data,
  output logic              full,
  // asynchronous side
  output logic              req,
  input  logic              ack,
  output logic [DATA_W-1:0] req_data
);

  logic req_clr;
  logic take;

  assign req_clr = ack | ~rst_n;
  assign full    = ~dclken | req | ack;
  assign take    = valid & ~full;

  always_ff @(posedge clk or posedge req_clr) begin
    if (req_clr) req <= 1'b0;
    else if (take) req <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (take) req_data <= data;
  end

endmodule
