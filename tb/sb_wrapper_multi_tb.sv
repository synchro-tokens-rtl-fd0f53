`timescale 1ns/1ps
// Test of sb_wrapper with several channels on one node.
//
// Two one-node wrappers share one token ring. Wrapper A's node has two
// output channels and one input channel; wrapper B's node has one output
// and two input channels. So the ring carries three FIFOs: two from A to B
// and one from B to A, all enabled by the same Dclken of their node.
// A numbered word sequence runs on each channel, with a different on/off
// pattern per channel. The test checks that every word arrives once and in
// order on its own channel, and that all three channels carry traffic. It
// also checks that the per-channel signatures of the first NCYC local
// cycles are the same for three different pairs of clock frequencies.
module sb_wrapper_multi_tb;
  import st_pkg::*;
  localparam int W = ST_DATA_W, NCYC = 300, NRUN = 3;
  localparam int FA [NRUN] = '{0, 10, 3};
  localparam int FB [NRUN] = '{0, 2, 15};

  logic rst_n = 1'b1;
  logic [3:0] fa = '0, fb = '0;

  logic                   a_clk, a_clken, b_clk, b_clken;
  logic [0:0]             a_tin, a_tout, b_tin, b_tout;
  logic [0:0]             a_dcl, a_sbcl, a_pass, b_dcl, b_sbcl, b_pass;
  // A: two outputs, one input; B: one output, two inputs
  logic [0:0][1:0]        a_oreq, a_oack, a_txv, a_full, b_ireq, b_iack, b_empty;
  logic [0:0][1:0][W-1:0] a_odata, a_txd, b_idata, b_rxd;
  logic [0:0][0:0]        a_ireq, a_iack, a_empty, b_oreq, b_oack, b_txv, b_full;
  logic [0:0][0:0][W-1:0] a_idata, a_rxd, b_odata, b_txd;

  sb_wrapper #(.N_NODES(1), .N_OUT(2), .N_IN(1)) u_a (
    .rst_n, .freq_sel(fa), .ext_clk(1'b0), .clken(a_clken), .clk(a_clk),
    .cfg_we('0), .cfg_hold('0), .cfg_recycle('0),
    .token_in(a_tin), .token_out(a_tout),
    .out_req(a_oreq), .out_ack(a_oack), .out_data(a_odata),
    .in_req(a_ireq), .in_ack(a_iack), .in_data(a_idata),
    .tx_valid(a_txv), .tx_data(a_txd), .tx_full(a_full),
    .rx_empty(a_empty), .rx_data(a_rxd),
    .dclken(a_dcl), .sbclken(a_sbcl), .token_passed(a_pass));

  sb_wrapper #(.N_NODES(1), .N_OUT(1), .N_IN(2)) u_b (
    .rst_n, .freq_sel(fb), .ext_clk(1'b0), .clken(b_clken), .clk(b_clk),
    .cfg_we('0), .cfg_hold('0), .cfg_recycle('0),
    .token_in(b_tin), .token_out(b_tout),
    .out_req(b_oreq), .out_ack(b_oack), .out_data(b_odata),
    .in_req(b_ireq), .in_ack(b_iack), .in_data(b_idata),
    .tx_valid(b_txv), .tx_data(b_txd), .tx_full(b_full),
    .rx_empty(b_empty), .rx_data(b_rxd),
    .dclken(b_dcl), .sbclken(b_sbcl), .token_passed(b_pass));

  assign b_tin[0] = ~a_tout[0];
  assign a_tin[0] =  b_tout[0];

  for (genvar c = 0; c < 2; c++) begin : g_ab
    self_timed_fifo u_fifo (.rst_n,
      .in_req(a_oreq[0][c]), .in_ack(a_oack[0][c]), .in_data(a_odata[0][c]),
      .out_req(b_ireq[0][c]), .out_ack(b_iack[0][c]), .out_data(b_idata[0][c]));
  end
  self_timed_fifo u_ba (.rst_n,
    .in_req(b_oreq[0][0]), .in_ack(b_oack[0][0]), .in_data(b_odata[0][0]),
    .out_req(a_ireq[0][0]), .out_ack(a_iack[0][0]), .out_data(a_idata[0][0]));

  // one core model per channel end: index 0/1 = A->B channels, 2 = B->A.
  // Each model sends on one channel and receives on the paired one; models
  // with no paired channel see an empty input or a full output.
  int unsigned cyc [4], sig [4];
  int          nchk [4], nfail [4], nrx [4];
  logic dummy_txv;
  logic [W-1:0] dummy_txd;

  // A, channel 0 out + channel 0 in
  sb_core_model #(.SEED(1), .NCYC(NCYC)) m_a0 (.clk(a_clk), .rst_n,
    .tx_valid(a_txv[0][0]), .tx_data(a_txd[0][0]), .tx_full(a_full[0][0]),
    .rx_empty(a_empty[0][0]), .rx_data(a_rxd[0][0]),
    .cyc(cyc[0]), .sig(sig[0]), .n_checks(nchk[0]), .n_fail(nfail[0]), .n_rx(nrx[0]));
  // A, channel 1 out only
  sb_core_model #(.SEED(2), .NCYC(NCYC)) m_a1 (.clk(a_clk), .rst_n,
    .tx_valid(a_txv[0][1]), .tx_data(a_txd[0][1]), .tx_full(a_full[0][1]),
    .rx_empty(1'b1), .rx_data('0),
    .cyc(cyc[1]), .sig(sig[1]), .n_checks(nchk[1]), .n_fail(nfail[1]), .n_rx(nrx[1]));
  // B, channel 0 out + channel 0 in
  sb_core_model #(.SEED(3), .NCYC(NCYC)) m_b0 (.clk(b_clk), .rst_n,
    .tx_valid(b_txv[0][0]), .tx_data(b_txd[0][0]), .tx_full(b_full[0][0]),
    .rx_empty(b_empty[0][0]), .rx_data(b_rxd[0][0]),
    .cyc(cyc[2]), .sig(sig[2]), .n_checks(nchk[2]), .n_fail(nfail[2]), .n_rx(nrx[2]));
  // B, channel 1 in only
  sb_core_model #(.SEED(4), .NCYC(NCYC)) m_b1 (.clk(b_clk), .rst_n,
    .tx_valid(dummy_txv), .tx_data(dummy_txd), .tx_full(1'b1),
    .rx_empty(b_empty[0][1]), .rx_data(b_rxd[0][1]),
    .cyc(cyc[3]), .sig(sig[3]), .n_checks(nchk[3]), .n_fail(nfail[3]), .n_rx(nrx[3]));

  int checks = 0, failures = 0, both_in_one_cycle = 0;
  // both A->B channels delivering in the same cycle shows they share Dclken
  always @(posedge b_clk) if (rst_n && !b_empty[0][0] && !b_empty[0][1]) both_in_one_cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int unsigned ref_sig [4];

  initial begin
    for (int run = 0; run < NRUN; run++) begin
      rst_n <= 1'b0;
      fa <= 4'(FA[run]);
      fb <= 4'(FB[run]);
      #40ns rst_n <= 1'b1;
      wait (cyc[0] > NCYC && cyc[2] > NCYC);
      for (int i = 0; i < 4; i++) begin
        if (run == 0) ref_sig[i] = sig[i];
        else check(sig[i] == ref_sig[i], $sformatf("run %0d: channel model %0d trace differs", run, i));
      end
      check(nrx[0] > 20, $sformatf("B->A words received: %0d", nrx[0]));
      check(nrx[2] > 20, $sformatf("A->B channel 0 words received: %0d", nrx[2]));
      check(nrx[3] > 20, $sformatf("A->B channel 1 words received: %0d", nrx[3]));
      $display("run %0d: words B->A %0d, A->B %0d + %0d", run, nrx[0], nrx[2], nrx[3]);
    end
    check(both_in_one_cycle > 0, "both A->B channels deliver in the same cycle");
    for (int i = 0; i < 4; i++) begin
      checks += nchk[i];
      failures += nfail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
