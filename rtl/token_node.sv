`timescale 1ns/1ps
// token_node: one node of a synchro-tokens token ring.
//
// Two nodes, one in the wrapper of each of two communicating SBs, share a
// token ring. The token is a transition: a node holds it while its TokenIn
// and TokenOut levels differ, and passes it by toggling TokenOut. An
// inverter somewhere on the ring makes exactly one of the two nodes see the
// token at any time.
//
// The node is a synchronous state machine on the SB's stoppable clock with
// two down-counters, each reloaded from a dedicated register:
//   * recycle phase: the recycle counter counts down one per cycle to zero.
//     At zero the node looks at the ring. If the token is there it enters
//     the hold phase at the next edge; if not, SBclken drops (combinationally,
//     right after the edge that made the counter zero) so the SB clock stops,
//     and it rises again as soon as the token arrives, restarting the clock.
//   * hold phase: Dclken is high for exactly `hold` cycles (the hold counter
//     shows hold, hold-1, ..., 1). On the edge that ends the last cycle the
//     hold counter presets, the token is passed and the recycle counter loads.
// A token that arrives early is not looked at until the recycle counter is
// zero, so the cycle in which the node reacts never depends on ring delay:
// this is what makes the SB deterministic.
//
// Timing: one cycle of hold phase per hold count, recycle phase of
// recycle+1 cycles when the token is back in time (recycle counts plus the
// cycle at zero in which the token is seen). A hold value of 0 acts as 1.
// The hold/recycle registers load from cfg_* when cfg_we is high (the path a
// scan chain or tester would use) and reset to HOLD_RESET/RECYCLE_RESET.
// At reset the recycle counter starts from the recycle register.
// Following the method: the counters, their registers, Dclken/SBclken
// behaviour and the early/late token rules. This design's choices: the
// token as a level difference, exact cycle alignment, widths and reset.
module token_node
  import st_pkg::*;
#(
  parameter int unsigned CNT_W         = ST_CNT_W,
  parameter int unsigned HOLD_RESET    = ST_HOLD_DEFAULT,
  parameter int unsigned RECYCLE_RESET = ST_RECYCLE_DEFAULT
) (
  input  logic             clk,          // SB stoppable clock
  input  logic             rst_n,        // asynchronous reset, active low
  // hold / recycle register load port
  input  logic             cfg_we,
  input  logic [CNT_W-1:0] cfg_hold,
  input  logic [CNT_W-1:0] cfg_recycle,
  output logic [CNT_W-1:0] hold_reg,
  output logic [CNT_W-1:0] recycle_reg,
  // token ring
  input  logic             token_in,     // asynchronous
  output logic             token_out,
  // enables
  output logic             dclken,       // data port clock enable
  output logic             sbclken,      // stoppable clock enable (ANDed per SB)
  // observation
  output logic [CNT_W-1:0] hold_cnt,
  output logic [CNT_W-1:0] recycle_cnt,
  output logic             token_passed  // one-cycle pulse after a pass
);

  node_phase_e phase;
  logic        token_here;

  assign token_here = token_in ^ token_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_reg    <= CNT_W'(HOLD_RESET);
      recycle_reg <= CNT_W'(RECYCLE_RESET);
    end else if (cfg_we) begin
      hold_reg    <= cfg_hold;
      recycle_reg <= cfg_recycle;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase        <= NODE_RECYCLE;
      hold_cnt     <= CNT_W'(HOLD_RESET);
      recycle_cnt  <= CNT_W'(RECYCLE_RESET);
      token_out    <= 1'b0;
      token_passed <= 1'b0;
    end else begin
      token_passed <= 1'b0;
      unique case (phase)
        NODE_RECYCLE: begin
          if (recycle_cnt != '0) begin
            recycle_cnt <= recycle_cnt - 1'b1;
          end else if (token_here) begin
            phase <= NODE_HOLD;
          end
        end
        NODE_HOLD: begin
          if (hold_cnt <= CNT_W'(1)) begin
            // hold counter reaches zero: preset, pass the token, disable ports
            hold_cnt     <= hold_reg;
            recycle_cnt  <= recycle_reg;
            token_out    <= ~token_out;
            token_passed <= 1'b1;
            phase        <= NODE_RECYCLE;
          end else begin
            hold_cnt <= hold_cnt - 1'b1;
          end
        end
        default: phase <= NODE_RECYCLE;
      endcase
    end
  end

  assign dclken  = (phase == NODE_HOLD);
  // The clock may only stop while recycling with the counter at zero and
  // the token still away; token arrival raises it again asynchronously.
  assign sbclken = (phase == NODE_HOLD) || (recycle_cnt != '0) || token_here;

  // The data ports are never enabled while the recycle counter runs.
  a_hold_after_recycle: assert property (@(posedge clk) disable iff (!rst_n)
    dclken |-> (recycle_cnt == '0));
  // The token is never passed unless it is held.
  a_pass_from_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (rst_n && !dclken) |=> $stable(token_out));

endmodule
