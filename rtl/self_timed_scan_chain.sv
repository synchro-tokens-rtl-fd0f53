`timescale 1ns/1ps
// self_timed_scan_chain: self-timed shift register whose two ends are
// synchronized to the test clock TCK.
//
// The bits of the chain sit in a self-timed FIFO of LEN + TAIL_EMPTY
// one-bit stages. The tail is written by an output port and the head is
// read by an input port, both clocked by TCK and enabled by shift_en, so
// the chain is built only from the wrapper's own channel parts. After
// reset the chain holds no bits. The first LEN shifts only push TDI into
// the tail, while tdo stays 0. From then on, each shift pops one bit at the
// head and pushes one at the tail, so LEN bits stay inside and the
// TAIL_EMPTY empty stages always leave room at the tail.
//
// Seen from TCK it is a LEN-bit shift register, cleared by reset, with a
// registered output. After the k-th shift (k > LEN), tdo holds the TDI bit
// of shift k - LEN. Between shifts the bits ripple forward on their own,
// which must finish within one TCK period (stage delays times the chain
// length). The handshake loops between the cells are the self-timed
// stage controllers and are intended (see fifo_stage).
//
// Following the method: a self-timed shift register, with empty stages at
// the tail so that both ends can be clocked by TCK. This design's choices:
// the lengths, the fill-after-reset rule, the reuse of the data ports at
// the two ends, and that the chain has no capture or update taps into SB
// state (the cells that would tap the boundary, P1500 or internal state
// are not described).
module self_timed_scan_chain
  import st_pkg::*;
#(
  parameter int unsigned LEN        = ST_SCAN_LEN,
  parameter int unsigned TAIL_EMPTY = ST_SCAN_TAIL_EMPTY
) (
  input  logic tck,
  input  logic rst_n,
  input  logic shift_en,
  input  logic tdi,
  output logic tdo
);

  localparam int unsigned CNT_W = $clog2(LEN + 1);

  logic             t_req, t_ack, t_data, t_full;
  logic             h_req, h_ack, h_data;
  logic [CNT_W-1:0] fill;
  logic             primed;

  assign primed = (fill == CNT_W'(LEN));

  // number of bits inside the chain, up to LEN
  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) fill <= '0;
    else if (shift_en && !primed) fill <= fill + 1'b1;
  end

  output_port #(.DATA_W(1)) u_tail (
    .clk(tck), .rst_n, .dclken(shift_en),
    .valid(1'b1), .data(tdi), .full(t_full),
    .req(t_req), .ack(t_ack), .req_data(t_data));

  self_timed_fifo #(.DATA_W(1), .DEPTH(LEN + TAIL_EMPTY)) u_cells (
    .rst_n,
    .in_req(t_req), .in_ack(t_ack), .in_data(t_data),
    .out_req(h_req), .out_ack(h_ack), .out_data(h_data));

  input_port #(.DATA_W(1)) u_head (
    .clk(tck), .rst_n, .dclken(shift_en & primed),
    .req(h_req), .ack(h_ack), .req_data(h_data),
    .empty(), .data(tdo));

  // the tail must always accept a bit, and once the chain is full the head
  // must always have one: otherwise TCK outran the ripple through the cells
  a_tail_ready : assert property (@(posedge tck) disable iff (!rst_n)
    shift_en |-> !t_full);
  a_head_ready : assert property (@(posedge tck) disable iff (!rst_n)
    (shift_en && primed) |-> (h_req && !h_ack));

endmodule
