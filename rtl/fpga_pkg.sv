// fpga_pkg: types and helpers shared by the asynchronous FPGA fabric.
//
// A wire-set is the unit of routing: four wires that always travel together.
// Three of them run in the direction of the data (the two LEDR rails V and R
// and the wake-up / data-arrival wire) and are grouped in fwd_t; the fourth,
// the acknowledge, runs the other way and is carried as a separate logic bit.
//
// LEDR (level-encoded dual-rail) code: V carries the bit value itself and R is
// chosen so that the phase V ^ R alternates on every transfer. Phase 0 sends
// R = V, phase 1 sends R = ~V, so each transfer flips exactly one of the two
// wires and no return-to-spacer step is needed. The phase convention is this
// design's choice; the code itself (two code words per value, one per phase)
// is the one the architecture is built on.
package fpga_pkg;

  // Forward half of a wire-set.
  typedef struct packed {
    logic v;     // LEDR value rail
    logic r;     // LEDR repeat rail
    logic wake;  // data-arrival / wake-up request for the receiving block
  } fwd_t;

  // Power-gating mode of one logic block, as reported by its sleep controller.
  typedef enum logic [1:0] {
    PG_SLEEP   = 2'd0,  // power switch open, block cannot evaluate
    PG_WAKING  = 2'd1,  // power switch closed, supply still settling
    PG_STANDBY = 2'd2,  // powered, no data pending
    PG_ACTIVE  = 2'd3   // powered, data pending or output not yet acknowledged
  } pg_mode_e;

  // Sides of a switch block, also its source/destination indices 0..3.
  localparam int unsigned SIDE_W = 0;
  localparam int unsigned SIDE_N = 1;
  localparam int unsigned SIDE_E = 2;
  localparam int unsigned SIDE_S = 3;
  localparam int unsigned NSIDES = 4;

  // Phase of an LEDR code word.
  function automatic logic ledr_phase(input logic v, input logic r);
    return v ^ r;
  endfunction

  // R rail for value d sent in phase p.
  function automatic logic ledr_r(input logic d, input logic p);
    return d ^ p;
  endfunction

endpackage
