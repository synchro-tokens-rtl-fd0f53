`timescale 1ns/1ps
// Determinism experiment on a three-SB system with six FIFOs and real wire
// delays.
//
// Three wrappers (two nodes each) are joined pairwise by token rings, with
// one self-timed FIFO per direction on each ring. Every token wire and
// every channel wire (request, acknowledge and data at both FIFO ends) goes
// through a transport delay. A nominal run is followed by NRUN runs in which
// each of these delays is set independently to 50%, 75%, 100%, 150% or 200%
// of its nominal value, and each SB oscillator to 100%..200% of its nominal
// period. The words each SB sends and receives in its first NCYC local
// cycles, and the local cycle of each transfer, must be identical in every
// run. Data words carry a sequence number that the receiver checks.
//
// For contrast, NBYP further runs bypass the token control: every node's
// Dclken and SBclken are forced high, so the data ports are always enabled
// and the clocks never stop. The same delay changes must then alter the
// sequences in at least one run. Words must still arrive in order, since
// the FIFOs keep their order.
//
// Nominal delays respect the two timing rules of the method: a four-phase
// handshake across a channel end fits in one clock cycle, and a word sent
// just before the token leaves reaches the FIFO head before the token
// reaches the receiver (channel ends 500 ps, token wires 5 ns).
module st_determinism_tb;
  import st_pkg::*;
  localparam int W = ST_DATA_W, NCYC = 100, NRUN = 4000, NBYP = 20;
  localparam int CH_NOM = 500, TOK_NOM = 5000;
  localparam int PCT [5] = '{50, 75, 100, 150, 200};

  logic rst_n = 1'b1;
  logic [2:0][3:0] fsel = '0;

  logic [2:0]                  clk, clken;
  logic [2:0][1:0]             tin, tout, oreq, oack, ireq, iack, txv, full, empty, dcl, sbcl, pass;
  logic [2:0][1:0][W-1:0]      odata, idata, txd, rxd;

  for (genvar s = 0; s < 3; s++) begin : g_sb
    sb_wrapper #(.N_NODES(2)) u_w (
      .rst_n, .freq_sel(fsel[s]), .ext_clk(1'b0), .clken(clken[s]), .clk(clk[s]),
      .cfg_we('0), .cfg_hold('0), .cfg_recycle('0),
      .token_in(tin[s]), .token_out(tout[s]),
      .out_req(oreq[s]), .out_ack(oack[s]), .out_data(odata[s]),
      .in_req(ireq[s]), .in_ack(iack[s]), .in_data(idata[s]),
      .tx_valid(txv[s]), .tx_data(txd[s]), .tx_full(full[s]),
      .rx_empty(empty[s]), .rx_data(rxd[s]),
      .dclken(dcl[s]), .sbclken(sbcl[s]), .token_passed(pass[s]));
  end

  // ring k joins (A_SB, A_ND) and (B_SB, B_ND), as in st_system
  localparam int A_SB [3] = '{0, 0, 1};
  localparam int A_ND [3] = '{0, 1, 1};
  localparam int B_SB [3] = '{1, 2, 2};
  localparam int B_ND [3] = '{0, 0, 1};

  // delays: per ring [k][0] A->B token, [k][1] B->A token;
  // per channel c = 2k (A->B) or 2k+1 (B->A): [c][0] tail req/data,
  // [c][1] tail ack, [c][2] head req/data, [c][3] head ack
  int unsigned tok_d [3][2];
  int unsigned ch_d  [6][4];
  int unsigned ch_dh [6][4];   // data delay: half the request delay (bundling)

  for (genvar k = 0; k < 3; k++) begin : g_ring
    logic ab_tok, ba_tok;
    delay_wire u_tab (.a(~tout[A_SB[k]][A_ND[k]]), .delay_ps(tok_d[k][0]), .y(ab_tok));
    delay_wire u_tba (.a( tout[B_SB[k]][B_ND[k]]), .delay_ps(tok_d[k][1]), .y(ba_tok));
    assign tin[B_SB[k]][B_ND[k]] = ab_tok;
    assign tin[A_SB[k]][A_ND[k]] = ba_tok;

    for (genvar dir = 0; dir < 2; dir++) begin : g_ch
      localparam int TS = dir ? B_SB[k] : A_SB[k];
      localparam int TN = dir ? B_ND[k] : A_ND[k];
      localparam int RS = dir ? A_SB[k] : B_SB[k];
      localparam int RN = dir ? A_ND[k] : B_ND[k];
      localparam int C  = 2 * k + dir;
      logic         t_req, t_ack, h_req, h_ack;
      logic [W-1:0] t_data, h_data;

      delay_wire        u_treq (.a(oreq[TS][TN]),  .delay_ps(ch_d[C][0]),  .y(t_req));
      delay_wire #(W)   u_tdat (.a(odata[TS][TN]), .delay_ps(ch_dh[C][0]), .y(t_data));
      delay_wire        u_tack (.a(t_ack),         .delay_ps(ch_d[C][1]),  .y(oack[TS][TN]));
      self_timed_fifo u_fifo (.rst_n, .in_req(t_req), .in_ack(t_ack), .in_data(t_data),
                              .out_req(h_req), .out_ack(h_ack), .out_data(h_data));
      delay_wire        u_hreq (.a(h_req),         .delay_ps(ch_d[C][2]),  .y(ireq[RS][RN]));
      delay_wire #(W)   u_hdat (.a(h_data),        .delay_ps(ch_dh[C][2]), .y(idata[RS][RN]));
      delay_wire        u_hack (.a(iack[RS][RN]),  .delay_ps(ch_d[C][3]),  .y(h_ack));
    end
  end

  int unsigned cyc [6], sig [6];
  int          nchk [6], nfail [6], nrx [6];

  for (genvar s = 0; s < 3; s++) begin : g_core
    for (genvar n = 0; n < 2; n++) begin : g_node
      sb_core_model #(.SEED(2 * s + n), .NCYC(NCYC)) u_core (
        .clk(clk[s]), .rst_n, .tx_valid(txv[s][n]), .tx_data(txd[s][n]),
        .tx_full(full[s][n]), .rx_empty(empty[s][n]), .rx_data(rxd[s][n]),
        .cyc(cyc[2 * s + n]), .sig(sig[2 * s + n]), .n_checks(nchk[2 * s + n]),
        .n_fail(nfail[2 * s + n]), .n_rx(nrx[2 * s + n]));
    end
  end

  int checks = 0, failures = 0, stops = 0, mismatched_runs = 0, bypass_mismatched = 0;
  bit bypass = 1'b0;

  // bypass of the synchro-tokens control: ports always enabled, clocks free
  for (genvar s = 0; s < 3; s++) begin : g_bypass
    for (genvar n = 0; n < 2; n++) begin : g_node
      always @(bypass) begin
        if (bypass) begin
          force g_sb[s].u_w.g_node[n].u_node.dclken  = 1'b1;
          force g_sb[s].u_w.g_node[n].u_node.sbclken = 1'b1;
        end else begin
          release g_sb[s].u_w.g_node[n].u_node.dclken;
          release g_sb[s].u_w.g_node[n].u_node.sbclken;
        end
      end
    end
  end
  always @(negedge clken[0]) if (rst_n) stops++;
  always @(negedge clken[1]) if (rst_n) stops++;
  always @(negedge clken[2]) if (rst_n) stops++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned scale(int unsigned nom, bit nominal);
    return nominal ? nom : nom * PCT[$urandom_range(4, 0)] / 100;
  endfunction

  int unsigned ref_sig [6];

  initial begin
    for (int run = 0; run <= NRUN + 1 + NBYP; run++) begin
      automatic bit nominal = (run == 0 || run == NRUN + 1);
      if (run == NRUN + 1) begin
        // the node's own rules no longer hold once its outputs are forced
        $assertoff(0, g_sb);
        bypass = 1'b1;
      end
      rst_n <= 1'b0;
      for (int k = 0; k < 3; k++)
        for (int d = 0; d < 2; d++) tok_d[k][d] = scale(TOK_NOM, nominal);
      for (int c = 0; c < 6; c++)
        for (int d = 0; d < 4; d++) begin
          ch_d[c][d]  = scale(CH_NOM, nominal);
          ch_dh[c][d] = ch_d[c][d] / 2;
        end
      for (int s = 0; s < 3; s++) fsel[s] <= nominal ? 4'd0 : 4'($urandom_range(10, 0));
      #60ns rst_n <= 1'b1;
      wait (cyc[0] > NCYC && cyc[2] > NCYC && cyc[4] > NCYC);
      begin
        automatic bit same = 1'b1;
        for (int i = 0; i < 6; i++) begin
          if (nominal) ref_sig[i] = sig[i];
          else begin
            if (!bypass)
              check(sig[i] == ref_sig[i], $sformatf("run %0d: SB%0d node %0d sequence differs", run, i / 2, i % 2));
            if (sig[i] != ref_sig[i]) same = 1'b0;
          end
          check(nrx[i] > 10, $sformatf("run %0d: core %0d received only %0d words", run, i, nrx[i]));
        end
        if (!same && !bypass) mismatched_runs++;
        if (!same && bypass) bypass_mismatched++;
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks += nchk[i];
      failures += nfail[i];
    end
    check(stops > 0, "late tokens stopped a clock at least once");
    check(bypass_mismatched > 0, "bypassed control lets delays change the sequences");
    $display("runs=%0d mismatched=%0d clock stops=%0d; bypassed runs=%0d mismatched=%0d",
             NRUN, mismatched_runs, stops, NBYP, bypass_mismatched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
