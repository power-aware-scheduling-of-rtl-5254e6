// cgl_pkg: types and constants shared by the clock-gating logic (CGL) and the
// processes it schedules.
//
// The CGL schedules a set of data-flow processes by inhibiting their clocks.
// Each process exposes an idleness predicate and a power estimate counted in
// potential register bit flips per clock tick; both are carried in the types
// below. The concurrency model (cooperation, periodic preemption, or both) is
// chosen at design time through concurrency_e.
package cgl_pkg;

  // Width of one process power estimate (bit flips per tick). The toy process
  // peaks at 35 flips, so 8 bits leave room for larger processes.
  localparam int unsigned PPW = 8;
  // Width of the summed power of all processes.
  localparam int unsigned PTW = 16;

  // Data width of the jobs exchanged through the FIFO channels.
  localparam int unsigned DW = 32;

  typedef logic [PPW-1:0] pwr_t;
  typedef logic [PTW-1:0] pwr_total_t;

  // Model of concurrency enforced by the scheduler.
  typedef enum logic [1:0] {
    CONC_COOP    = 2'd1,  // a terminating process hands over to a stalled one
    CONC_PREEMPT = 2'd2,  // slow_clk preempts the running process
    CONC_BOTH    = 2'd3
  } concurrency_e;

  // Topology of the process network.
  typedef enum logic {
    TOPO_CHAIN    = 1'b0,  // pipeline: process k feeds process k+1
    TOPO_PARALLEL = 1'b1   // independent processes, each with its own ports
  } topology_e;

  // One flag per conjunct of the safety objective; a set flag is a violation.
  typedef struct packed {
    logic progress;  // strict progress
    logic prios;     // priority list not sorted / not a permutation of q
    logic fairness;  // an activated process is not among the most inactive
    logic coop;      // cooperation rule broken
    logic preempt;   // preemption rule broken
    logic inhib;     // clock inhibited while not allowed
    logic pmax;      // summed power above the peak bound
  } phi_viol_t;

endpackage
