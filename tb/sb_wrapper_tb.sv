`timescale 1ns/1ps
// Self-checking test of sb_wrapper.
// Wrapper A has two nodes; node 0 shares a token ring with the single node
// of wrapper B, node 1 one with the single node of wrapper C. Each ring
// carries two self-timed FIFOs, one per direction, and every wrapper runs
// on its own stoppable oscillator. Core models exchange numbered words.
// Checks: every word arrives once and in order; A's clock enable is the
// AND of its nodes' SBclken; A's clock is stopped at least once while its
// other node holds its token (a late token stops the whole SB); and the
// per-core signatures of the first NCYC local cycles are the same for two
// different sets of oscillator frequencies (deterministic behaviour).
module sb_wrapper_tb;
  import st_pkg::*;
  localparam int W = ST_DATA_W, CW = ST_CNT_W, NCYC = 300;

  logic rst_n = 1'b1;  // driven low at time 0 so that the reset has an edge
  // ring A1-C is loaded with hold 2 / recycle 8 right after reset (same
  // hold+recycle sum as the defaults 4/6), so the two nodes of A drift out
  // of step and one can hold its token while the other waits for a late one
  logic cfg_load = 1'b0;
  logic [3:0] fa = 4'd0, fb = 4'd2, fc = 4'd15;

  // wrapper A (2 nodes)
  logic                  a_clk, a_clken;
  logic [1:0]            a_tin, a_tout, a_oreq, a_oack, a_ireq, a_iack;
  logic [1:0][W-1:0]     a_odata, a_idata, a_txd, a_rxd;
  logic [1:0]            a_txv, a_full, a_empty, a_dclken, a_sbclken, a_pass;
  // wrappers B and C (1 node each)
  logic                  b_clk, b_clken, c_clk, c_clken;
  logic [0:0]            b_tin, b_tout, b_oreq, b_oack, b_ireq, b_iack;
  logic [0:0]            c_tin, c_tout, c_oreq, c_oack, c_ireq, c_iack;
  logic [0:0][W-1:0]     b_odata, b_idata, b_txd, b_rxd, c_odata, c_idata, c_txd, c_rxd;
  logic [0:0]            b_txv, b_full, b_empty, b_dclken, b_sbclken, b_pass;
  logic [0:0]            c_txv, c_full, c_empty, c_dclken, c_sbclken, c_pass;

  sb_wrapper #(.N_NODES(2)) u_a (
    .rst_n, .freq_sel(fa), .ext_clk(1'b0), .clken(a_clken), .clk(a_clk),
    .cfg_we({cfg_load, 1'b0}), .cfg_hold({8'd2, 8'd4}), .cfg_recycle({8'd8, 8'd6}),
    .token_in(a_tin), .token_out(a_tout),
    .out_req(a_oreq), .out_ack(a_oack), .out_data(a_odata),
    .in_req(a_ireq), .in_ack(a_iack), .in_data(a_idata),
    .tx_valid(a_txv), .tx_data(a_txd), .tx_full(a_full),
    .rx_empty(a_empty), .rx_data(a_rxd),
    .dclken(a_dclken), .sbclken(a_sbclken), .token_passed(a_pass));

  sb_wrapper #(.N_NODES(1)) u_b (
    .rst_n, .freq_sel(fb), .ext_clk(1'b0), .clken(b_clken), .clk(b_clk),
    .cfg_we('0), .cfg_hold('0), .cfg_recycle('0),
    .token_in(b_tin), .token_out(b_tout),
    .out_req(b_oreq), .out_ack(b_oack), .out_data(b_odata),
    .in_req(b_ireq), .in_ack(b_iack), .in_data(b_idata),
    .tx_valid(b_txv), .tx_data(b_txd), .tx_full(b_full),
    .rx_empty(b_empty), .rx_data(b_rxd),
    .dclken(b_dclken), .sbclken(b_sbclken), .token_passed(b_pass));

  sb_wrapper #(.N_NODES(1)) u_c (
    .rst_n, .freq_sel(fc), .ext_clk(1'b0), .clken(c_clken), .clk(c_clk),
    .cfg_we(cfg_load), .cfg_hold(8'd2), .cfg_recycle(8'd8),
    .token_in(c_tin), .token_out(c_tout),
    .out_req(c_oreq), .out_ack(c_oack), .out_data(c_odata),
    .in_req(c_ireq), .in_ack(c_iack), .in_data(c_idata),
    .tx_valid(c_txv), .tx_data(c_txd), .tx_full(c_full),
    .rx_empty(c_empty), .rx_data(c_rxd),
    .dclken(c_dclken), .sbclken(c_sbclken), .token_passed(c_pass));

  // token rings, one inverter each
  assign b_tin[0] = ~a_tout[0];
  assign a_tin[0] =  b_tout[0];
  assign c_tin[0] = ~a_tout[1];
  assign a_tin[1] =  c_tout[0];

  self_timed_fifo u_ab (.rst_n, .in_req(a_oreq[0]), .in_ack(a_oack[0]), .in_data(a_odata[0]),
                        .out_req(b_ireq[0]), .out_ack(b_iack[0]), .out_data(b_idata[0]));
  self_timed_fifo u_ba (.rst_n, .in_req(b_oreq[0]), .in_ack(b_oack[0]), .in_data(b_odata[0]),
                        .out_req(a_ireq[0]), .out_ack(a_iack[0]), .out_data(a_idata[0]));
  self_timed_fifo u_ac (.rst_n, .in_req(a_oreq[1]), .in_ack(a_oack[1]), .in_data(a_odata[1]),
                        .out_req(c_ireq[0]), .out_ack(c_iack[0]), .out_data(c_idata[0]));
  self_timed_fifo u_ca (.rst_n, .in_req(c_oreq[0]), .in_ack(c_oack[0]), .in_data(c_odata[0]),
                        .out_req(a_ireq[1]), .out_ack(a_iack[1]), .out_data(a_idata[1]));

  int unsigned cyc [4], sig [4];
  int          nchk [4], nfail [4], nrx [4];

  sb_core_model #(.SEED(1), .NCYC(NCYC)) m_a0 (.clk(a_clk), .rst_n, .tx_valid(a_txv[0]), .tx_data(a_txd[0]),
    .tx_full(a_full[0]), .rx_empty(a_empty[0]), .rx_data(a_rxd[0]),
    .cyc(cyc[0]), .sig(sig[0]), .n_checks(nchk[0]), .n_fail(nfail[0]), .n_rx(nrx[0]));
  sb_core_model #(.SEED(2), .NCYC(NCYC)) m_a1 (.clk(a_clk), .rst_n, .tx_valid(a_txv[1]), .tx_data(a_txd[1]),
    .tx_full(a_full[1]), .rx_empty(a_empty[1]), .rx_data(a_rxd[1]),
    .cyc(cyc[1]), .sig(sig[1]), .n_checks(nchk[1]), .n_fail(nfail[1]), .n_rx(nrx[1]));
  sb_core_model #(.SEED(3), .NCYC(NCYC)) m_b (.clk(b_clk), .rst_n, .tx_valid(b_txv[0]), .tx_data(b_txd[0]),
    .tx_full(b_full[0]), .rx_empty(b_empty[0]), .rx_data(b_rxd[0]),
    .cyc(cyc[2]), .sig(sig[2]), .n_checks(nchk[2]), .n_fail(nfail[2]), .n_rx(nrx[2]));
  sb_core_model #(.SEED(4), .NCYC(NCYC)) m_c (.clk(c_clk), .rst_n, .tx_valid(c_txv[0]), .tx_data(c_txd[0]),
    .tx_full(c_full[0]), .rx_empty(c_empty[0]), .rx_data(c_rxd[0]),
    .cyc(cyc[3]), .sig(sig[3]), .n_checks(nchk[3]), .n_fail(nfail[3]), .n_rx(nrx[3]));

  int checks = 0, failures = 0, stops_while_holding = 0, and_errors = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(negedge a_clken) if (rst_n && (a_dclken != 0)) stops_while_holding++;
  always @(a_clken or a_sbclken) #1ps if (a_clken != &a_sbclken) and_errors++;

  int unsigned ref_sig [4];

  initial begin
    for (int run = 0; run < 2; run++) begin
      rst_n <= 1'b0;
      if (run == 1) begin
        fa <= 4'd4; fb <= 4'd0; fc <= 4'd12;
      end
      #40ns rst_n <= 1'b1;
      cfg_load <= 1'b1;
      #45ns cfg_load <= 1'b0;
      wait (cyc[0] > NCYC && cyc[2] > NCYC && cyc[3] > NCYC);
      for (int i = 0; i < 4; i++) begin
        if (run == 0) ref_sig[i] = sig[i];
        else check(sig[i] == ref_sig[i], $sformatf("core %0d signature differs between runs", i));
        check(nrx[i] > 30, $sformatf("core %0d received %0d words", i, nrx[i]));
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks += nchk[i];
      failures += nfail[i];
    end
    check(and_errors == 0, "clken is the AND of the node SBclken signals");
    check(stops_while_holding > 0, "a late token stops the SB while another node holds its token");
    $display("stops_while_holding=%0d", stops_while_holding);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
