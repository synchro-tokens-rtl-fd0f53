`timescale 1ns/1ps
// self_timed_fifo: asynchronous channel made of DEPTH fifo_stage instances.
//
// A word entering at the tail (in_req/in_ack/in_data) ripples forward
// through empty stages on its own, without any clock, and waits at the head
// (out_req/out_ack/out_data) until the receiving data port takes it. The
// FIFO holds up to DEPTH words. Both ends use four-phase bundled-data
// handshakes. The request/acknowledge wires between neighbouring stages
// form the asynchronous loops of the stage controllers, which a
// cycle-based simulator reports as circular logic (see fifo_stage).
// Following the method: self-timed FIFOs pipeline the channels between
// SBs. This design's choice: the default depth equals the default hold
// value, the relation used in the method's throughput comparison.
module self_timed_fifo
  import st_pkg::*;
#(
  parameter int unsigned DATA_W = ST_DATA_W,
  parameter int unsigned DEPTH  = ST_FIFO_DEPTH
) (
  input  logic              rst_n,
  input  logic              in_req,
  output logic              in_ack,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_req,
  input  logic              out_ack,
  output logic [DATA_W-1:0] out_data
);

  logic [DEPTH:0]             req;
  logic [DEPTH:0]             ack;
  logic [DEPTH:0][DATA_W-1:0] data;

  assign req[0]   = in_req;
  assign in_ack   = ack[0];
  assign data[0]  = in_data;
  assign out_req  = req[DEPTH];
  assign ack[DEPTH] = out_ack;
  assign out_data = data[DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_stage
    fifo_stage #(.DATA_W(DATA_W)) u_stage (
      .rst_n   (rst_n),
      .in_req  (req[i]),
      .in_ack  (ack[i]),
      .in_data (data[i]),
      .out_req (req[i+1]),
      .out_ack (ack[i+1]),
      .out_data(data[i+1])
    );
  end

endmodule
