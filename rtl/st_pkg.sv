`timescale 1ns/1ps
// Shared types and default sizes of the synchro-tokens wrapper logic.
//
// A synchro-tokens system wraps every synchronous block (SB) in logic that
// makes inter-block communication deterministic: a token circulates on a ring
// between two wrapper "nodes", and a node only lets its data ports exchange
// words while it holds the token. The defaults below follow the example
// waveforms of the node (hold value 4, recycle value 6); the counter and data
// widths are this design's own choice, the method leaves them open.
package st_pkg;

  // Width of the hold and recycle counters and of their loadable registers.
  localparam int unsigned ST_CNT_W  = 8;
  // Width of one data word on an asynchronous channel.
  localparam int unsigned ST_DATA_W = 8;
  // Reset contents of the hold and recycle registers (the "ROM" value).
  localparam int unsigned ST_HOLD_DEFAULT    = 4;
  localparam int unsigned ST_RECYCLE_DEFAULT = 6;
  // Stages in one self-timed FIFO: equal to the hold value, as in the
  // throughput analysis of the method.
  localparam int unsigned ST_FIFO_DEPTH = 4;
  // Bits held by a self-timed scan chain, and the empty stages added at its
  // tail so that the tail can be written on every TCK edge (this design's
  // choice of sizes; the method only asks for "several" empty stages).
  localparam int unsigned ST_SCAN_LEN        = 16;
  localparam int unsigned ST_SCAN_TAIL_EMPTY = 3;

  // Phase of a token-ring node.
  typedef enum logic {
    NODE_RECYCLE = 1'b0,  // token passed on; counting down until it is due back
    NODE_HOLD    = 1'b1   // token held; data ports enabled
  } node_phase_e;

endpackage
