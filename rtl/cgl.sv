// cgl: power-aware clock-gating logic for N data-flow processes.
//
// Paired with the processes, the CGL decides on every tick which process
// clocks are inhibited. It holds the scheduler state - the suspension
// observers (suspend_observer) and the inactivity counters
// (inactivity_counters) - computes the priority list (prio_sort), lets the
// strategy (cgl_strategy) choose the controls c_p and inhibit_p, and watches
// the safety objective (phi_monitor). Inputs come from the processes' open
// outputs: idleness, job termination, emptiness of their input FIFOs and
// power estimates. inhibit is combinational from the CGL state and these
// inputs, and applies to the clock edge that ends the current tick; the state
// moves on that edge of the free-running clock.
//
// cfg_idle is the run-time switch between power-aware scheduling (0) and
// classical gating on idleness only (1). slow_clk is the periodic preemption
// request, used when CONC includes preemption. PMAX is the peak power bound
// in register bit flips per tick and P_WORST the largest estimate a single
// process can produce. The strategy runs at most MAX_RUN processes at a time
// (one by default), so it meets the bound when MAX_RUN * P_WORST <= PMAX;
// elaboration stops with an error otherwise. With MAX_RUN = 1 that is exactly
// the feasibility limit: no strategy exists for PMAX below P_WORST.
module cgl
  import cgl_pkg::*;
#(
  parameter  int unsigned  N       = 3,
  parameter  concurrency_e CONC    = CONC_COOP,
  parameter  int unsigned  PMAX    = 200,
  parameter  int unsigned  P_WORST = 35,
  parameter  int unsigned  MAX_RUN = 1,
  localparam int unsigned  QW      = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         idle,
  input  logic [N-1:0]         done,
  input  logic [N-1:0]         empty,
  input  pwr_t [N-1:0]         power,
  input  logic                 slow_clk,
  input  logic                 cfg_idle,
  output logic [N-1:0]         inhibit,
  output logic [N-1:0]         suspended,
  output logic [N-1:0]         activate,
  output logic [N-1:0][QW-1:0] q,
  output logic                 handover,
  output pwr_total_t           power_total,
  output phi_viol_t            viol
);

  if (P_WORST > PMAX) begin : g_infeasible
    $error("cgl: peak power bound PMAX=%0d is below one process's worst case %0d; no strategy exists",
           PMAX, P_WORST);
  end
  if (MAX_RUN < 1 || MAX_RUN * P_WORST > PMAX) begin : g_batch
    $error("cgl: MAX_RUN=%0d processes of worst case %0d exceed PMAX=%0d",
           MAX_RUN, P_WORST, PMAX);
  end

  logic [N-1:0]         c;
  logic [N-1:0][QW-1:0] prio;

  suspend_observer #(.N(N)) u_obs (
    .clk          (clk),
    .rst_n        (rst_n),
    .c            (c),
    .suspended    (suspended),
    .activate     (activate),
    .activate_any ()
  );

  inactivity_counters #(.N(N)) u_cnt (
    .clk      (clk),
    .rst_n    (rst_n),
    .activate (activate),
    .q        (q)
  );

  prio_sort #(.N(N)) u_sort (
    .q    (q),
    .prio (prio)
  );

  cgl_strategy #(.N(N), .CONC(CONC), .MAX_RUN(MAX_RUN)) u_strat (
    .suspended (suspended),
    .q         (q),
    .idle      (idle),
    .done      (done),
    .slow_clk  (slow_clk),
    .cfg_idle  (cfg_idle),
    .c         (c),
    .inhibit   (inhibit),
    .handover  (handover)
  );

  phi_monitor #(.N(N), .CONC(CONC), .PMAX(PMAX)) u_mon (
    .suspended   (suspended),
    .c           (c),
    .inhibit     (inhibit),
    .q           (q),
    .prio        (prio),
    .idle        (idle),
    .done        (done),
    .empty       (empty),
    .power       (power),
    .slow_clk    (slow_clk),
    .cfg_idle    (cfg_idle),
    .power_total (power_total),
    .viol        (viol)
  );

endmodule
