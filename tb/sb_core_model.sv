`timescale 1ns/1ps
// sb_core_model: testbench model of the part of an SB core that talks to
// one wrapper node. On each local clock cycle it offers the next word of a
// numbered sequence (on/off pattern fixed by the local cycle number and
// SEED), registers every word the input port shows, checks it is the next
// word of the partner's sequence, and folds the local cycle numbers and
// values of all transfers in its first NCYC cycles into a signature.
module sb_core_model #(
  parameter int W    = 8,
  parameter int SEED = 0,
  parameter int NCYC = 300
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         tx_valid,
  output logic [W-1:0] tx_data,
  input  logic         tx_full,
  input  logic         rx_empty,
  input  logic [W-1:0] rx_data,
  output int unsigned  cyc,
  output int unsigned  sig,
  output int           n_checks,
  output int           n_fail,
  output int           n_rx
);
  int unsigned txseq;

  function automatic bit offer(int unsigned c);
    return ((c * 3 + SEED) % 7) != 0;
  endfunction

  assign tx_data = W'(txseq);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc      <= 0;
      sig      <= 0;
      txseq    <= 0;
      n_rx     <= 0;
      tx_valid <= offer(0);
    end else begin
      automatic int unsigned sg = sig;
      cyc      <= cyc + 1;
      tx_valid <= offer(cyc + 1);
      if (tx_valid && !tx_full) begin
        txseq <= txseq + 1;
        if (cyc < NCYC) sg = sg * 1000003 ^ ((cyc << 12) | 32'h800);
      end
      if (!rx_empty) begin
        n_checks <= n_checks + 1;
        if (rx_data != W'(n_rx)) begin
          n_fail <= n_fail + 1;
          $display("FAIL: core %0d cycle %0d: got %0d expected %0d", SEED, cyc, rx_data, W'(n_rx));
        end
        n_rx <= n_rx + 1;
        if (cyc < NCYC) sg = sg * 1000003 ^ ((cyc << 12) | 32'(rx_data));
      end
      sig <= sg;
    end
  end

  initial begin
    n_checks = 0;
    n_fail   = 0;
  end
endmodule
