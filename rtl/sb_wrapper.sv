`timescale 1ns/1ps
// sb_wrapper: the synchro-tokens wrapper around one synchronous block (SB).
//
// It holds one token_node per token ring the SB takes part in, and for each
// node N_OUT output ports and N_IN input ports: the channels between this SB
// and the SB at the other end of that ring. All ports of a node share its
// Dclken, so they are enabled together while the node holds the token. The
// SBclken outputs of all nodes are ANDed into one clock enable, so a late
// token on any ring stops the whole SB, including nodes that are holding
// their own token. The SB clock comes from a stoppable ring oscillator
// (stoppable_clock) or, with EXT_CLK = 1, from outside: the Test SB takes
// its clock from TCK through test_clock_ctrl and feeds it back in on
// ext_clk, using the clken output as the gate request. The oscillator is a
// delay-based simulation model, so a synthesis tool sees no clock when
// EXT_CLK = 0 and removes the whole wrapper; for synthesis, set EXT_CLK = 1
// and bring the clock in from a real stoppable oscillator.
//
// Synchronous side (to the SB core, all on clk): per node and channel
// tx_valid / tx_data / tx_full and rx_empty / rx_data, indexed
// [node][channel]. Asynchronous side: per node the token ring pins, and per
// channel its Req/Ack/Data. cfg_we / cfg_hold
// / cfg_recycle load a node's hold and recycle registers (the path a scan
// chain or the tester would drive).
// Following the method: the composition of nodes, data ports and one
// stoppable clock, the AND of SBclken, and any number of channels per node
// in either direction. This design's choices: the same channel counts for
// every node of a wrapper (at least one each way; an unused output port
// has tx_valid tied low, an unused input port req tied low), one reset for
// the whole wrapper, and the same reset hold/recycle values for all nodes.
module sb_wrapper
  import st_pkg::*;
#(
  parameter int unsigned N_NODES       = 2,
  parameter int unsigned N_OUT         = 1,   // output channels per node
  parameter int unsigned N_IN          = 1,   // input channels per node
  parameter int unsigned DATA_W        = ST_DATA_W,
  parameter int unsigned CNT_W         = ST_CNT_W,
  parameter int unsigned HOLD_RESET    = ST_HOLD_DEFAULT,
  parameter int unsigned RECYCLE_RESET = ST_RECYCLE_DEFAULT,
  parameter bit          EXT_CLK       = 1'b0,
  parameter int unsigned BASE_HALF_PS  = 5000,
  parameter int unsigned STEP_HALF_PS  = 500
) (
  input  logic                            rst_n,
  // clocking
  input  logic [3:0]                      freq_sel,   // oscillator delay select
  input  logic                            ext_clk,    // used when EXT_CLK
  output logic                            clken,      // AND of all SBclken
  output logic                            clk,        // the SB clock
  // hold / recycle register load, per node
  input  logic [N_NODES-1:0]              cfg_we,
  input  logic [N_NODES-1:0][CNT_W-1:0]   cfg_hold,
  input  logic [N_NODES-1:0][CNT_W-1:0]   cfg_recycle,
  // token rings
  input  logic [N_NODES-1:0]              token_in,
  output logic [N_NODES-1:0]              token_out,
  // asynchronous output channels
  output logic [N_NODES-1:0][N_OUT-1:0]              out_req,
  input  logic [N_NODES-1:0][N_OUT-1:0]              out_ack,
  output logic [N_NODES-1:0][N_OUT-1:0][DATA_W-1:0]  out_data,
  // asynchronous input channels
  input  logic [N_NODES-1:0][N_IN-1:0]               in_req,
  output logic [N_NODES-1:0][N_IN-1:0]               in_ack,
  input  logic [N_NODES-1:0][N_IN-1:0][DATA_W-1:0]   in_data,
  // synchronous side to the SB core
  input  logic [N_NODES-1:0][N_OUT-1:0]              tx_valid,
  input  logic [N_NODES-1:0][N_OUT-1:0][DATA_W-1:0]  tx_data,
  output logic [N_NODES-1:0][N_OUT-1:0]              tx_full,
  output logic [N_NODES-1:0][N_IN-1:0]               rx_empty,
  output logic [N_NODES-1:0][N_IN-1:0][DATA_W-1:0]   rx_data,
  // observation
  output logic [N_NODES-1:0]              dclken,
  output logic [N_NODES-1:0]              sbclken,
  output logic [N_NODES-1:0]              token_passed
);

  assign clken = &sbclken;

  if (EXT_CLK) begin : g_ext_clk
    assign clk = ext_clk;
  end else begin : g_osc
    stoppable_clock #(
      .BASE_HALF_PS(BASE_HALF_PS),
      .STEP_HALF_PS(STEP_HALF_PS)
    ) u_clock (
      .clken   (clken),
      .freq_sel(freq_sel),
      .clk     (clk)
    );
  end

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    token_node #(
      .CNT_W        (CNT_W),
      .HOLD_RESET   (HOLD_RESET),
      .RECYCLE_RESET(RECYCLE_RESET)
    ) u_node (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg_we      (cfg_we[n]),
      .cfg_hold    (cfg_hold[n]),
      .cfg_recycle (cfg_recycle[n]),
      .hold_reg    (),
      .recycle_reg (),
      .token_in    (token_in[n]),
      .token_out   (token_out[n]),
      .dclken      (dclken[n]),
      .sbclken     (sbclken[n]),
      .hold_cnt    (),
      .recycle_cnt (),
      .token_passed(token_passed[n])
    );

    for (genvar c = 0; c < N_OUT; c++) begin : g_out
      output_port #(.DATA_W(DATA_W)) u_out (
        .clk     (clk),
        .rst_n   (rst_n),
        .dclken  (dclken[n]),
        .valid   (tx_valid[n][c]),
        .data    (tx_data[n][c]),
        .full    (tx_full[n][c]),
        .req     (out_req[n][c]),
        .ack     (out_ack[n][c]),
        .req_data(out_data[n][c])
      );
    end

    for (genvar c = 0; c < N_IN; c++) begin : g_in
      input_port #(.DATA_W(DATA_W)) u_in (
        .clk     (clk),
        .rst_n   (rst_n),
        .dclken  (dclken[n]),
        .req     (in_req[n][c]),
        .ack     (in_ack[n][c]),
        .req_data(in_data[n][c]),
        .empty   (rx_empty[n][c]),
        .data    (rx_data[n][c])
      );
    end
  end

endmodule
