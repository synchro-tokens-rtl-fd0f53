`timescale 1ns/1ps
// Throughput of one synchro-tokens channel pair, swept over the recycle
// value.
//
// Two one-node wrappers with equal clock periods share one token ring and
// two self-timed FIFOs of depth H (the default hold value, equal to the
// default FIFO depth). Both cores always have a word to send and take
// every word shown. For each recycle value R from 0 to RMAX, both nodes
// load hold H and recycle R. After a settling time the test counts local
// cycles, elapsed time and words received over a whole number of token
// periods. Time lost to stopped clocks is the elapsed time minus cycles
// times the clock period T.
//
// Expected, worked out from the node's cycle rules: a node's period is
// always H + R + 1 local cycles (H holding, R counting down, one cycle at
// zero), and it sends exactly H words in each hold; a FIFO of depth H never
// fills during a hold. Once R is large enough that no time is lost, each
// direction carries H/(H+R+1) words per clock period, below the upper
// bound H/(H+R). For smaller R, late tokens stop the clocks and the period
// takes longer than H + R + 1 clock periods. The smallest R without lost
// time must be at most H + 2, since the partner holds H cycles and each
// side needs at most one cycle to see the token. A clock that stops and
// restarts at once (token back exactly when due) loses no time.
module st_throughput_tb;
  import st_pkg::*;
  localparam int W = ST_DATA_W, CW = ST_CNT_W;
  localparam int H = ST_HOLD_DEFAULT, RMAX = 9, NPER = 40;
  localparam real T_NS = 10.0;  // oscillator period at freq_sel 0

  logic rst_n = 1'b1;
  logic [1:0]         clk, clken, tin, tout, oreq, oack, ireq, iack, txv, full, empty, dcl, sbcl, pass;
  logic [1:0][W-1:0]  odata, idata, txd, rxd;
  logic [1:0]         cfg_we;
  logic [CW-1:0]      r_val = '0;

  for (genvar s = 0; s < 2; s++) begin : g_sb
    sb_wrapper #(.N_NODES(1)) u_w (
      .rst_n, .freq_sel(4'd0), .ext_clk(1'b0), .clken(clken[s]), .clk(clk[s]),
      .cfg_we(cfg_we[s]), .cfg_hold(CW'(H)), .cfg_recycle(r_val),
      .token_in(tin[s]), .token_out(tout[s]),
      .out_req(oreq[s]), .out_ack(oack[s]), .out_data(odata[s]),
      .in_req(ireq[s]), .in_ack(iack[s]), .in_data(idata[s]),
      .tx_valid(txv[s]), .tx_data(txd[s]), .tx_full(full[s]),
      .rx_empty(empty[s]), .rx_data(rxd[s]),
      .dclken(dcl[s]), .sbclken(sbcl[s]), .token_passed(pass[s]));

    // FIFO from SB s to SB 1-s
    self_timed_fifo #(.DEPTH(H)) u_fifo (
      .rst_n, .in_req(oreq[s]), .in_ack(oack[s]), .in_data(odata[s]),
      .out_req(ireq[1 - s]), .out_ack(iack[1 - s]), .out_data(idata[1 - s]));
  end

  // one inverter, between SB0's TokenOut and SB1's TokenIn
  assign tin[1] = ~tout[0];
  assign tin[0] =  tout[1];

  // cores: always offer the next word; count words taken and received
  int unsigned txseq [2], rxseq [2], cyc [2], n_full_en [2], bad [2];
  bit          measuring = 1'b0;

  for (genvar s = 0; s < 2; s++) begin : g_core
    assign txv[s] = 1'b1;
    assign txd[s] = W'(txseq[s]);
    always @(posedge clk[s] or negedge rst_n) begin
      if (!rst_n) begin
        txseq[s] <= 0;
        rxseq[s] <= 0;
        cyc[s]   <= 0;
      end else begin
        cyc[s] <= cyc[s] + 1;
        if (dcl[s] && !full[s]) txseq[s] <= txseq[s] + 1;
        if (!empty[s]) begin
          if (rxd[s] != W'(rxseq[s])) bad[s]++;
          rxseq[s] <= rxseq[s] + 1;
        end
        if (measuring && dcl[s] && full[s]) n_full_en[s]++;
      end
    end
  end

  // register load during the first cycles after reset
  always_comb for (int s = 0; s < 2; s++) cfg_we[s] = rst_n && cyc[s] < 2;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int r_min = -1;

  initial begin
    for (int r = 0; r <= RMAX; r++) begin
      automatic int unsigned c0, c1, w0, w1, per;
      automatic realtime     t0, lost;
      rst_n <= 1'b0;
      r_val <= CW'(r);
      n_full_en = '{0, 0};
      #50ns rst_n <= 1'b1;
      per = H + r + 1;
      // settle, then start the window at a token pass of SB0
      wait (cyc[0] >= 8 * per);
      @(posedge clk[0] iff pass[0]);
      measuring = 1'b1;
      t0 = $realtime;
      c0 = cyc[0]; w0 = rxseq[1];
      c1 = cyc[1]; w1 = rxseq[0];
      repeat (NPER) @(posedge clk[0] iff pass[0]);
      measuring = 1'b0;
      lost = $realtime - t0 - (cyc[0] - c0) * T_NS * 1ns;
      c0 = cyc[0] - c0; w0 = rxseq[1] - w0;
      c1 = cyc[1] - c1; w1 = rxseq[0] - w1;
      $display("R=%0d: SB0 %0d cycles, %0.1f ns lost to stops, SB0->SB1 %0d words (%0.3f per clock period, bound %0.3f)",
               r, c0, lost / 1ns, w0, real'(H * NPER) / (c0 + lost / (T_NS * 1ns)), real'(H) / (H + r));
      // words counted at the receiver may lag the window by one hold
      check(w0 <= H * NPER + H && w0 + H >= H * NPER, $sformatf("R=%0d: SB0->SB1 words %0d for %0d holds", r, w0, NPER));
      check(w1 <= H * NPER + H && w1 + H >= H * NPER, $sformatf("R=%0d: SB1->SB0 words %0d for %0d holds", r, w1, NPER));
      check(n_full_en[0] == 0 && n_full_en[1] == 0, $sformatf("R=%0d: port full while enabled", r));
      check(c0 == NPER * per, $sformatf("R=%0d: %0d cycles for %0d periods of %0d", r, c0, NPER, per));
      check(real'(H * NPER) / (c0 + lost / (T_NS * 1ns)) <= real'(H) / (H + r),
            $sformatf("R=%0d: throughput above H/(H+R)", r));
      if (lost < 0.5ns) begin
        if (r_min < 0) r_min = r;
        check(w0 == H * NPER && w1 == H * NPER,
              $sformatf("R=%0d: %0d/%0d words, expected H/(H+R+1) per period = %0d", r, w0, w1, H * NPER));
      end else begin
        check(r_min < 0, $sformatf("R=%0d: time lost although R=%0d lost none", r, r_min));
      end
    end
    check(r_min > 0 && r_min <= H + 2, $sformatf("smallest R without lost time %0d", r_min));
    check(bad[0] == 0 && bad[1] == 0, "words in order");
    $display("smallest recycle value without lost time: %0d (H=%0d)", r_min, H);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
