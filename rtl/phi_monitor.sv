// phi_monitor: checker of the scheduler's safety objective, one flag per rule.
//
// Evaluated every tick on the CGL's state and its chosen controls:
//  progress - no process is running while some FIFO holds a job;
//  prios    - prio is not decreasing, holds a value that is no counter, or its
//             sum differs from the counters' sum;
//  fairness - an activated process has a counter below p_k, k being the
//             number of processes activated on this tick;
//  coop     - a running process terminates (done or idle) while another is
//             stalled, and no other process is activated (if CONC has COOP);
//  preempt  - slow_clk holds while some process is stalled and none is
//             activated (if CONC has PREEMPT);
//  inhib    - a clock is inhibited although the process is not suspended (or,
//             with cfg_idle, not idle);
//  pmax     - the summed power estimate exceeds PMAX (not checked while
//             cfg_idle selects idleness-only gating).
// stalled_p is suspended_p & !idle_p and activate_p is suspended_p & c_p.
// The rules are the document's; the flags let simulation and hardware watch
// them. Purely combinational.
module phi_monitor
  import cgl_pkg::*;
#(
  parameter  int unsigned  N    = 3,
  parameter  concurrency_e CONC = CONC_COOP,
  parameter  int unsigned  PMAX = 200,
  localparam int unsigned  QW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]         suspended,
  input  logic [N-1:0]         c,
  input  logic [N-1:0]         inhibit,
  input  logic [N-1:0][QW-1:0] q,
  input  logic [N-1:0][QW-1:0] prio,
  input  logic [N-1:0]         idle,
  input  logic [N-1:0]         done,
  input  logic [N-1:0]         empty,
  input  pwr_t [N-1:0]         power,
  input  logic                 slow_clk,
  input  logic                 cfg_idle,
  output pwr_total_t           power_total,
  output phi_viol_t            viol
);

  logic [N-1:0] activate, stalled, others;
  int unsigned  k, sum_q, sum_p;
  logic         member, in_q;

  always_comb begin
    activate = suspended & c;
    stalled  = suspended & ~idle;
    viol     = '0;

    power_total = '0;
    for (int p = 0; p < N; p++) power_total = power_total + PTW'(power[p]);

    viol.progress = !((|(~suspended)) || (&empty));

    sum_q = 0;
    sum_p = 0;
    for (int i = 0; i < N; i++) begin
      sum_q += 32'(q[i]);
      sum_p += 32'(prio[i]);
      if (i + 1 < N && prio[i] < prio[i + 1]) viol.prios = 1'b1;
      in_q = 1'b0;
      for (int p = 0; p < N; p++) if (prio[i] == q[p]) in_q = 1'b1;
      if (!in_q) viol.prios = 1'b1;
    end
    if (sum_q != sum_p) viol.prios = 1'b1;

    k = 0;
    for (int p = 0; p < N; p++) if (activate[p]) k++;
    for (int p = 0; p < N; p++) begin
      member = 1'b0;
      for (int i = 0; i < N; i++) if (i < k && prio[i] == q[p]) member = 1'b1;
      if (activate[p] && !member) viol.fairness = 1'b1;
    end

    for (int p = 0; p < N; p++) begin
      others    = '1;
      others[p] = 1'b0;
      if (CONC[0] && !suspended[p] && (done[p] || idle[p])
          && (|(stalled & others)) && !(|(activate & others)))
        viol.coop = 1'b1;
      if (inhibit[p] && !(cfg_idle ? idle[p] : suspended[p]))
        viol.inhib = 1'b1;
    end

    viol.preempt = CONC[1] && slow_clk && (|stalled) && !(|activate);
    viol.pmax    = !cfg_idle && (32'(power_total) > PMAX);
  end

endmodule
