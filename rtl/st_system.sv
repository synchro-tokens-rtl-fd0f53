`timescale 1ns/1ps
// st_system: a three-SB synchro-tokens system with six self-timed FIFOs.
//
// SB 0 and SB 1 are system SBs clocked by their own stoppable ring
// oscillators; SB 2 is the Test SB, clocked from TCK through
// test_clock_ctrl (Interlocked or Independent Mode). Every pair of SBs
// communicates, so there are three token rings and, on each ring, one
// self-timed FIFO in each direction:
//   ring 0: SB0 node 0 <-> SB1 node 0   FIFO 0: SB0->SB1, FIFO 1: SB1->SB0
//   ring 1: SB0 node 1 <-> SB2 node 0   FIFO 2: SB0->SB2, FIFO 3: SB2->SB0
//   ring 2: SB1 node 1 <-> SB2 node 1   FIFO 4: SB1->SB2, FIFO 5: SB2->SB1
// Each ring has one inverter, on the path from its first-named node to its
// second; after reset the second-named node sees the token.
//
// A self-timed scan chain, shifted by TCK from the Test SB side, is brought
// out on scan_en/scan_tdi/scan_tdo for a TAP controller to drive. It runs on
// TCK itself rather than on the gated Test SB clock, so it can still shift
// while the Test SB holds its tokens and the system clocks are stopped.
//
// The SB cores themselves (the mission logic, and the TAP controller of the
// Test SB) are outside this module: their synchronous
// interfaces are ports, indexed [SB][node], and each SB clock is an output
// so the core logic can run on it. The core must register every word shown
// on rx_data while rx_empty is low.
// Following the method: the wrapper architecture, FIFOs on the channels,
// one token ring per communicating pair, TCK-clocked Test SB with two
// clock modes, and a test case of three SBs and six FIFOs. This design's
// choices: the full pairwise topology, inverter placement, data width,
// counter width and the oscillator settings.
module st_system
  import st_pkg::*;
#(
  parameter int unsigned DATA_W        = ST_DATA_W,
  parameter int unsigned CNT_W         = ST_CNT_W,
  parameter int unsigned FIFO_DEPTH    = ST_FIFO_DEPTH,
  parameter int unsigned HOLD_RESET    = ST_HOLD_DEFAULT,
  parameter int unsigned RECYCLE_RESET = ST_RECYCLE_DEFAULT,
  parameter int unsigned BASE_HALF_PS  = 5000,
  parameter int unsigned STEP_HALF_PS  = 500,
  parameter int unsigned SCAN_LEN      = ST_SCAN_LEN,
  parameter int unsigned SCAN_EMPTY    = ST_SCAN_TAIL_EMPTY
) (
  input  logic                                 rst_n,
  // clocks
  input  logic                                 tck,          // tester clock
  input  logic                                 interlocked,  // Test SB clock mode
  // self-timed scan chain, shifted on TCK
  input  logic                                 scan_en,
  input  logic                                 scan_tdi,
  output logic                                 scan_tdo,
  input  logic [1:0][3:0]                      freq_sel,     // SB0, SB1 oscillators
  output logic [2:0]                           sb_clk,       // clock of each SB
  output logic [2:0]                           sb_clken,     // clock enable of each SB
  // hold / recycle register load [SB][node]
  input  logic [2:0][1:0]                      cfg_we,
  input  logic [2:0][1:0][CNT_W-1:0]           cfg_hold,
  input  logic [2:0][1:0][CNT_W-1:0]           cfg_recycle,
  // SB core interfaces [SB][node]
  input  logic [2:0][1:0]                      tx_valid,
  input  logic [2:0][1:0][DATA_W-1:0]          tx_data,
  output logic [2:0][1:0]                      tx_full,
  output logic [2:0][1:0]                      rx_empty,
  output logic [2:0][1:0][DATA_W-1:0]          rx_data,
  // observation [SB][node]
  output logic [2:0][1:0]                      dclken,
  output logic [2:0][1:0]                      sbclken,
  output logic [2:0][1:0]                      token_passed
);

  // ring endpoints: ring k joins (A_SB[k], A_ND[k]) and (B_SB[k], B_ND[k])
  localparam int A_SB [3] = '{0, 0, 1};
  localparam int A_ND [3] = '{0, 1, 1};
  localparam int B_SB [3] = '{1, 2, 2};
  localparam int B_ND [3] = '{0, 0, 1};

  logic [2:0][1:0]             token_in, token_out;
  logic [2:0][1:0]             out_req, out_ack, in_req, in_ack;
  logic [2:0][1:0][DATA_W-1:0] out_data, in_data;
  logic                        test_clk;

  for (genvar s = 0; s < 3; s++) begin : g_sb
    sb_wrapper #(
      .N_NODES      (2),
      .DATA_W       (DATA_W),
      .CNT_W        (CNT_W),
      .HOLD_RESET   (HOLD_RESET),
      .RECYCLE_RESET(RECYCLE_RESET),
      .EXT_CLK      (s == 2),
      .BASE_HALF_PS (BASE_HALF_PS),
      .STEP_HALF_PS (STEP_HALF_PS)
    ) u_wrapper (
      .rst_n       (rst_n),
      .freq_sel    ((s < 2) ? freq_sel[s % 2] : 4'd0),
      .ext_clk     (test_clk),
      .clken       (sb_clken[s]),
      .clk         (sb_clk[s]),
      .cfg_we      (cfg_we[s]),
      .cfg_hold    (cfg_hold[s]),
      .cfg_recycle (cfg_recycle[s]),
      .token_in    (token_in[s]),
      .token_out   (token_out[s]),
      .out_req     (out_req[s]),
      .out_ack     (out_ack[s]),
      .out_data    (out_data[s]),
      .in_req      (in_req[s]),
      .in_ack      (in_ack[s]),
      .in_data     (in_data[s]),
      .tx_valid    (tx_valid[s]),
      .tx_data     (tx_data[s]),
      .tx_full     (tx_full[s]),
      .rx_empty    (rx_empty[s]),
      .rx_data     (rx_data[s]),
      .dclken      (dclken[s]),
      .sbclken     (sbclken[s]),
      .token_passed(token_passed[s])
    );
  end

  test_clock_ctrl u_test_clock (
    .tck        (tck),
    .interlocked(interlocked),
    .clken      (sb_clken[2]),
    .clk        (test_clk)
  );

  self_timed_scan_chain #(.LEN(SCAN_LEN), .TAIL_EMPTY(SCAN_EMPTY)) u_scan (
    .tck     (tck),
    .rst_n   (rst_n),
    .shift_en(scan_en),
    .tdi     (scan_tdi),
    .tdo     (scan_tdo)
  );

  for (genvar k = 0; k < 3; k++) begin : g_ring
    // token ring: one inverter per ring
    assign token_in[B_SB[k]][B_ND[k]] = ~token_out[A_SB[k]][A_ND[k]];
    assign token_in[A_SB[k]][A_ND[k]] =  token_out[B_SB[k]][B_ND[k]];

    // FIFO 2k: A -> B
    self_timed_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo_ab (
      .rst_n   (rst_n),
      .in_req  (out_req[A_SB[k]][A_ND[k]]),
      .in_ack  (out_ack[A_SB[k]][A_ND[k]]),
      .in_data (out_data[A_SB[k]][A_ND[k]]),
      .out_req (in_req[B_SB[k]][B_ND[k]]),
      .out_ack (in_ack[B_SB[k]][B_ND[k]]),
      .out_data(in_data[B_SB[k]][B_ND[k]])
    );

    // FIFO 2k+1: B -> A
    self_timed_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo_ba (
      .rst_n   (rst_n),
      .in_req  (out_req[B_SB[k]][B_ND[k]]),
      .in_ack  (out_ack[B_SB[k]][B_ND[k]]),
      .in_data (out_data[B_SB[k]][B_ND[k]]),
      .out_req (in_req[A_SB[k]][A_ND[k]]),
      .out_ack (in_ack[A_SB[k]][A_ND[k]]),
      .out_data(in_data[A_SB[k]][A_ND[k]])
    );
  end

endmodule
