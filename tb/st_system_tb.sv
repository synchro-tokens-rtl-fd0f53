`timescale 1ns/1ps
// End-to-end test of st_system at its default parameters.
//
// The testbench plays the three SB cores. On every local clock cycle each
// core offers the next word of a numbered sequence on each of its two
// output channels (with a fixed on/off pattern that depends only on the
// local cycle number) and registers every word its input ports show. Every
// received word must be the next one of its channel's sequence.
//
// Determinism: each core folds the local cycle numbers of all words it sent
// and received, and their values, into a signature over its first NCYC
// cycles. The system is run under several settings of the two oscillators
// and of the TCK period (the clock periods change by up to a factor of two
// and token delays with them); all signatures must equal those of the first
// run. A second group repeats this after loading other hold and recycle
// values into every node. A last run uses Independent Mode for the Test SB,
// where only ordering and integrity are checked.
// Mechanisms counted (each must occur): token passes, early tokens (token
// back while recycling), SB clock stops from late tokens, TCK pulses
// suppressed in Interlocked Mode, output port full while enabled, input
// port empty while enabled, hold/recycle register loads, Independent Mode,
// and a breakpoint: in one run TCK is stopped while the Test SB holds both
// its tokens, every system SB must then stop, and the traces must still
// match the reference after TCK resumes.
// Throughout all runs the scan chain is shifted on random TCK cycles with
// random data, and scan_tdo is compared after every TCK cycle with a plain
// ST_SCAN_LEN-bit shift register model; scan shifts are counted too.
// Single stepping: with hold 1 / recycle 1 loaded into every node and a
// slow TCK (1 us period), each TCK cycle lets the system SBs run a short
// burst, after which they stop again waiting for the Test SB. The number
// of system cycles in each TCK step must be the same for two oscillator
// settings, and both system clocks must be stopped before every TCK edge.
module st_system_tb;
  import st_pkg::*;

  localparam int W      = ST_DATA_W;
  localparam int CW     = ST_CNT_W;
  localparam int NCYC   = 400;
  localparam int NSCEN  = 9;

  // per scenario: SB0 sel, SB1 sel, TCK half period (ps), cfg group, interlocked
  localparam int SC_F0  [NSCEN] = '{0, 10, 0, 5, 10, 0, 10, 3, 4};
  localparam int SC_F1  [NSCEN] = '{0, 0, 10, 3, 10, 0, 2, 10, 6};
  localparam int SC_TCK [NSCEN] = '{5000, 5000, 2500, 10000, 7500, 5000, 9000, 3000, 4000};
  localparam int SC_CFG [NSCEN] = '{0, 0, 0, 0, 0, 1, 1, 1, 0};
  localparam int SC_IL  [NSCEN] = '{1, 1, 1, 1, 1, 1, 1, 1, 0};

  localparam logic [CW-1:0] CFG_HOLD    = 6;
  localparam logic [CW-1:0] CFG_RECYCLE = 3;
  localparam int            NSTEP       = 60;
  // values loaded into every node when use_cfg is set
  logic [CW-1:0] cfg_h = CFG_HOLD, cfg_r = CFG_RECYCLE;

  logic                       rst_n = 1'b1;  // driven low at time 0
  logic                       tck = 1'b0;
  logic                       interlocked = 1'b1;
  logic [1:0][3:0]            freq_sel = '0;
  logic [2:0]                 sb_clk, sb_clken;
  wire  [2:0][1:0]            cfg_we;
  logic [2:0][1:0][CW-1:0]    cfg_hold, cfg_recycle;
  wire  [2:0][1:0]            tx_valid;
  wire  [2:0][1:0][W-1:0]     tx_data;
  logic [2:0][1:0]            tx_full, rx_empty, dclken, sbclken, token_passed;
  logic [2:0][1:0][W-1:0]     rx_data;
  logic                       scan_en = 1'b0, scan_tdi = 1'b0;
  logic                       scan_tdo;

  st_system dut (.*);

  int  tck_half_ps = 5000;
  bit  use_cfg = 1'b0;
  int  checks = 0, failures = 0;

  // TCK; while tck_pause is set it stays low (the tester stops TCK)
  bit tck_pause = 1'b0;
  always begin
    #(tck_half_ps * 1ps);
    if (!tck_pause || tck) tck <= ~tck;
  end

  always_comb begin
    for (int s = 0; s < 3; s++)
      for (int n = 0; n < 2; n++) begin
        cfg_hold[s][n]    = cfg_h;
        cfg_recycle[s][n] = cfg_r;
      end
  end

  // ------------------------------------------------------------ SB cores
  for (genvar s = 0; s < 3; s++) begin : g_core
    int unsigned cyc;
    int unsigned sig;
    int unsigned txseq [2];
    int unsigned rxseq [2];
    int unsigned run   [2];
    int          n_checks, n_fail, n_full, n_empty, n_loads;
    logic [1:0]  valid_q;
    logic [1:0]  we_q;

    function automatic bit offer(int unsigned c, int nd);
      return ((c * 3 + s * 5 + nd) % 7) != 0;
    endfunction

    assign tx_valid[s]   = valid_q;
    assign tx_data[s][0] = W'(txseq[0]);
    assign tx_data[s][1] = W'(txseq[1]);
    assign cfg_we[s]     = we_q;

    always @(posedge sb_clk[s] or negedge rst_n) begin
      if (!rst_n) begin
        cyc     <= 0;
        sig     <= 0;
        txseq   <= '{0, 0};
        rxseq   <= '{0, 0};
        run     <= '{0, 0};
        valid_q <= {offer(0, 1), offer(0, 0)};
        we_q    <= '0;
      end else begin
        automatic int unsigned sg = sig;
        cyc     <= cyc + 1;
        valid_q <= {offer(cyc + 1, 1), offer(cyc + 1, 0)};
        we_q    <= (use_cfg && cyc == 0) ? 2'b11 : 2'b00;
        if (we_q != 0) n_loads <= n_loads + 1;
        for (int n = 0; n < 2; n++) begin
          if (valid_q[n] && !tx_full[s][n]) begin
            txseq[n] <= txseq[n] + 1;
            if (cyc < NCYC) sg = sg * 1000003 ^ ((cyc << 12) | 32'h800 | (n << 8));
          end
          if (dclken[s][n] && tx_full[s][n]) n_full <= n_full + 1;
          if (dclken[s][n] && rx_empty[s][n]) n_empty <= n_empty + 1;
          if (!rx_empty[s][n]) begin
            n_checks <= n_checks + 1;
            if (rx_data[s][n] != W'(rxseq[n])) begin
              n_fail <= n_fail + 1;
              $display("FAIL: SB%0d node %0d cycle %0d: got %0d expected %0d",
                       s, n, cyc, rx_data[s][n], W'(rxseq[n]));
            end
            rxseq[n] <= rxseq[n] + 1;
            if (cyc < NCYC) sg = sg * 1000003 ^ ((cyc << 12) | (n << 8) | 32'(rx_data[s][n]));
          end
          // length of each hold period, in local cycles
          if (dclken[s][n]) run[n] <= run[n] + 1;
          else if (run[n] != 0) begin
            run[n] <= 0;
            if (cyc > 30) begin
              n_checks <= n_checks + 1;
              if (run[n] != (use_cfg ? int'(cfg_h) : ST_HOLD_DEFAULT)) begin
                n_fail <= n_fail + 1;
                $display("FAIL: SB%0d node %0d held the token %0d cycles", s, n, run[n]);
              end
            end
          end
        end
        sig <= sg;
      end
    end

    initial begin
      n_checks = 0; n_fail = 0; n_full = 0; n_empty = 0; n_loads = 0;
    end
  end

  // ------------------------------------------------------ mechanism counts
  int n_pass = 0, n_early = 0, n_stop = 0, n_tck = 0, n_tclk = 0, n_indep = 0, n_brk = 0, n_step = 0;
  int n_edge0 = 0, n_edge1 = 0;

  always @(posedge sb_clk[0]) n_edge0++;
  always @(posedge sb_clk[1]) n_edge1++;

  always @(posedge sb_clk[0]) n_pass += $countones(token_passed[0]);
  always @(posedge sb_clk[1]) n_pass += $countones(token_passed[1]);
  always @(posedge sb_clk[2]) n_pass += $countones(token_passed[2]);
  always @(negedge sb_clken[0]) if (rst_n) n_stop++;
  always @(negedge sb_clken[1]) if (rst_n) n_stop++;
  always @(posedge tck) if (rst_n && interlocked) n_tck++;
  always @(posedge sb_clk[2]) if (rst_n && interlocked) n_tclk++;
  always @(posedge sb_clk[0])
    if (rst_n && dut.g_sb[0].u_wrapper.g_node[0].u_node.token_here
        && dut.g_sb[0].u_wrapper.g_node[0].u_node.recycle_cnt != 0) n_early++;

  // scan chain: random shifts on TCK, compared with a shift register model
  localparam int SL = ST_SCAN_LEN;
  logic [SL-1:0] scan_model;
  logic          scan_model_tdo;
  int            n_scan = 0;
  always @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      scan_model     <= '0;
      scan_model_tdo <= 1'b0;
    end else if (scan_en) begin
      scan_model_tdo <= scan_model[SL-1];
      scan_model     <= {scan_model[SL-2:0], scan_tdi};
      n_scan++;
    end
  end
  always @(negedge tck) begin
    if (rst_n)
      check(scan_tdo == scan_model_tdo,
            $sformatf("scan_tdo %0b, expected %0b", scan_tdo, scan_model_tdo));
    scan_en  <= ($urandom_range(3, 0) != 0);
    scan_tdi <= 1'($urandom);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ scenarios
  int unsigned ref_sig [2][3];

  initial begin
    for (int sc = 0; sc < NSCEN; sc++) begin
      rst_n       <= 1'b0;
      freq_sel[0] <= 4'(SC_F0[sc]);
      freq_sel[1] <= 4'(SC_F1[sc]);
      tck_half_ps =  SC_TCK[sc];
      use_cfg     =  SC_CFG[sc] != 0;
      interlocked <= SC_IL[sc] != 0;
      #50ns;
      rst_n <= 1'b1;
      if (sc == 3) begin
        // breakpoint: stop TCK while the Test SB holds its tokens; every
        // system SB must then stop once its recycle counters run out, and
        // the local traces must be unchanged when TCK resumes
        automatic int e0, e1;
        wait (g_core[2].cyc >= 100);
        do @(posedge sb_clk[2]); while (dclken[2] != 2'b11);
        tck_pause = 1'b1;
        #2us;
        e0 = n_edge0;
        e1 = n_edge1;
        #1us;
        check(n_edge0 == e0 && n_edge1 == e1 && sb_clken[1:0] == 2'b00,
              "system SB clocks stopped while the Test SB holds its tokens");
        if (n_edge0 == e0 && n_edge1 == e1) n_brk++;
        tck_pause = 1'b0;
      end
      wait (g_core[0].cyc >= NCYC + 2 && g_core[1].cyc >= NCYC + 2 && g_core[2].cyc >= NCYC + 2);
      if (SC_IL[sc] == 0) begin
        n_indep++;
      end else begin
        automatic int grp = SC_CFG[sc];
        automatic int unsigned got [3] = '{g_core[0].sig, g_core[1].sig, g_core[2].sig};
        if (sc == 0 || sc == 5) ref_sig[grp] = got;
        for (int s = 0; s < 3; s++)
          check(got[s] == ref_sig[grp][s],
                $sformatf("scenario %0d: SB%0d trace differs from reference (%h vs %h)",
                          sc, s, got[s], ref_sig[grp][s]));
      end
      $display("scenario %0d: sel %0d/%0d tck %0d ps cfg %0d mode %0d: words %0d/%0d/%0d",
               sc, SC_F0[sc], SC_F1[sc], SC_TCK[sc], SC_CFG[sc], SC_IL[sc],
               g_core[0].rxseq[0] + g_core[0].rxseq[1], g_core[1].rxseq[0] + g_core[1].rxseq[1],
               g_core[2].rxseq[0] + g_core[2].rxseq[1]);
    end
    // single stepping from the tester
    begin
      automatic int steps [2][NSTEP];
      automatic int stopped_before = 0, bursts = 0;
      for (int rep = 0; rep < 2; rep++) begin
        rst_n       <= 1'b0;
        freq_sel[0] <= rep ? 4'd7 : 4'd0;
        freq_sel[1] <= rep ? 4'd2 : 4'd9;
        interlocked <= 1'b1;
        cfg_h = 1;
        cfg_r = 1;
        use_cfg = 1'b1;
        tck_half_ps = 500000;
        #50ns;
        rst_n <= 1'b1;
        repeat (4) @(posedge tck);
        for (int k = 0; k < NSTEP; k++) begin
          automatic int e0 = n_edge0, e1 = n_edge1;
          @(posedge tck);
          if (sb_clken[1:0] == 2'b00) stopped_before++;
          steps[rep][k] = (n_edge0 - e0) * 1000 + (n_edge1 - e1);
          if (steps[rep][k] != 0) bursts++;
        end
      end
      for (int k = 0; k < NSTEP; k++)
        check(steps[0][k] == steps[1][k],
              $sformatf("step %0d: %0d/%0d system cycles vs %0d/%0d", k,
                        steps[0][k] / 1000, steps[0][k] % 1000, steps[1][k] / 1000, steps[1][k] % 1000));
      check(stopped_before == 2 * NSTEP, "system clocks stopped before every TCK step");
      check(bursts > NSTEP / 4, "system SBs ran between steps");
      n_step = bursts;
      begin
        automatic string pat = "";
        for (int k = 0; k < 12; k++) pat = {pat, $sformatf(" %0d/%0d", steps[0][k] / 1000, steps[0][k] % 1000)};
        $display("single stepping: %0d of %0d TCK steps ran system cycles; SB0/SB1 cycles per step:%s ...",
                 bursts / 2, NSTEP, pat);
      end
      cfg_h = CFG_HOLD;
      cfg_r = CFG_RECYCLE;
    end
    begin
      int sub_checks, sub_fail, full, empty, loads;
      sub_checks = g_core[0].n_checks + g_core[1].n_checks + g_core[2].n_checks;
      sub_fail   = g_core[0].n_fail + g_core[1].n_fail + g_core[2].n_fail;
      full       = g_core[0].n_full + g_core[1].n_full + g_core[2].n_full;
      empty      = g_core[0].n_empty + g_core[1].n_empty + g_core[2].n_empty;
      loads      = g_core[0].n_loads + g_core[1].n_loads + g_core[2].n_loads;
      checks   += sub_checks;
      failures += sub_fail;
      $display("mechanisms: passes=%0d early=%0d stops=%0d tck_suppressed=%0d full=%0d empty=%0d loads=%0d independent=%0d breakpoints=%0d scan_shifts=%0d single_steps=%0d",
               n_pass, n_early, n_stop, n_tck - n_tclk, full, empty, loads, n_indep, n_brk, n_scan, n_step);
      check(n_pass > 0, "token passes");
      check(n_early > 0, "early token");
      check(n_stop > 0, "clock stop on late token");
      check(n_tck > n_tclk, "TCK pulse suppressed in Interlocked Mode");
      check(full > 0, "output port full while enabled");
      check(empty > 0, "input port empty while enabled");
      check(loads > 0, "hold/recycle register load");
      check(n_indep > 0, "Independent Mode run");
      check(n_brk > 0, "breakpoint by holding tokens in the Test SB");
      check(n_scan > SL, "scan chain shifted past its length");
      check(n_step > 0, "single steps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog, cycles %0d %0d %0d", g_core[0].cyc, g_core[1].cyc, g_core[2].cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
