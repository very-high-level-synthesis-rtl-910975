// mavg_pkg: types and schedule constants shared by the moving-average engine.
//
// The controller drives the datapath with five control lines, one per
// action of the loop-body schedule:
//   s  - shift the input queue and take in one new array element
//   l1 - load register R1 with the sum of the three queue entries
//   d  - shift the divider right by one bit (divide by 4 takes two d cycles)
//   l2 - load register R2 with the quotient
//   r  - store R2 into the result memory
// One iteration issues them at fixed offsets from its own s: s at 0, l1 at 1,
// d at 2 and 3, l2 at 4, r at 5. With a period of two cycles between
// iterations, the schedule has latency d = 5 (s to l2), Q = 2 extra cycles
// to fill the three-entry queue, and period c = 2, which is set by the
// two-cycle divider, the slowest unit. These numbers follow the published
// control-signal chart of this example; the bit encoding is this design's.
package mavg_pkg;

  typedef struct packed {
    logic s;
    logic l1;
    logic d;
    logic l2;
    logic r;
  } ctrl_t;

  // Controller stages: prologue, steady state, epilogue.
  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,
    PH_PRO    = 2'd1,
    PH_STEADY = 2'd2,
    PH_EPI    = 2'd3
  } phase_t;

  // Schedule of the moving-average loop body.
  localparam int unsigned SCHED_D = 5;  // latency of one iteration (s .. l2)
  localparam int unsigned SCHED_Q = 2;  // extra cycles to fill the input queue
  localparam int unsigned SCHED_C = 2;  // steady-state period

  // Offsets of each action within one iteration: bit k set = active at
  // cycle k after the iteration's own s. Width SCHED_D+1 (offsets 0..5).
  localparam logic [SCHED_D:0] SLOT_S  = 6'b000001;
  localparam logic [SCHED_D:0] SLOT_L1 = 6'b000010;
  localparam logic [SCHED_D:0] SLOT_D  = 6'b001100;
  localparam logic [SCHED_D:0] SLOT_L2 = 6'b010000;
  localparam logic [SCHED_D:0] SLOT_R  = 6'b100000;

endpackage
