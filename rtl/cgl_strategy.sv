// cgl_strategy: the scheduling strategy of the clock-gating logic.
//
// Given the current state (suspended_p, q_p) and the non-controllable inputs
// (idle_p, done_p, slow_clk, cfg_idle) it chooses the controllable inputs c_p
// and inhibit_p for this tick. The strategy runs the processes in batches of
// at most MAX_RUN processes (one by default):
//  * a hand-over is due when a running process terminates (done or idle)
//    while another process is stalled (cooperation), or when slow_clk holds
//    while any process is stalled (preemption), depending on CONC;
//  * on a hand-over every running process is suspended and up to MAX_RUN
//    suspended processes are activated, those with the largest inactivity
//    counters first, ties broken in round-robin order after the lowest-index
//    running process;
//  * inhibit_p = suspended_p, or idle_p when cfg_idle selects plain
//    idleness-based gating.
// A batch is activated on one tick and nothing else is activated while it
// runs, so running processes keep counter 0 and every suspended counter is at
// least as large. The activated processes therefore hold the largest
// counters, which satisfies the fairness rule; a non-empty batch gives strict
// progress; and the summed power of a batch is at most MAX_RUN times one
// process's worst case, which the enclosing CGL checks against the peak bound.
// The document derives its strategy with a symbolic controller-synthesis tool
// and only states the objectives; this strategy, which meets the same safety
// objective, is this design's own. It does not minimise energy over a window
// beyond handing over only when a rule requires it. Purely combinational.
module cgl_strategy
  import cgl_pkg::*;
#(
  parameter  int unsigned  N    = 3,
  parameter  concurrency_e CONC = CONC_COOP,
  parameter  int unsigned  MAX_RUN = 1,
  localparam int unsigned  QW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]         suspended,
  input  logic [N-1:0][QW-1:0] q,
  input  logic [N-1:0]         idle,
  input  logic [N-1:0]         done,
  input  logic                 slow_clk,
  input  logic                 cfg_idle,
  output logic [N-1:0]         c,
  output logic [N-1:0]         inhibit,
  output logic                 handover   // a hand-over happens this tick
);

  logic [N-1:0]  running, stalled, chosen;
  logic          have_holder, term, need_coop, need_preempt;
  int unsigned   h, t, idx;
  logic          found;
  logic [QW-1:0] best_q;

  always_comb begin
    running = ~suspended;
    stalled = suspended & ~idle;

    // reference point for round-robin ties: lowest-index running process
    have_holder = 1'b0;
    h = N - 1;
    for (int p = N - 1; p >= 0; p--) begin
      if (running[p]) begin
        have_holder = 1'b1;
        h = p;
      end
    end

    term         = |(running & (done | idle));
    need_coop    = CONC[0] && term && (|stalled);
    need_preempt = CONC[1] && slow_clk && (|stalled);

    // next batch: up to MAX_RUN most inactive suspended processes
    chosen = '0;
    for (int b = 0; b < MAX_RUN; b++) begin
      found  = 1'b0;
      t      = 0;
      best_q = '0;
      for (int k = 1; k <= N; k++) begin
        idx = h + k;
        if (idx >= N) idx = idx - N;
        if (suspended[idx] && !chosen[idx] && (!found || q[idx] > best_q)) begin
          found  = 1'b1;
          t      = idx;
          best_q = q[idx];
        end
      end
      if (found) chosen[t] = 1'b1;
    end

    c        = '0;
    handover = 1'b0;
    if ((|chosen) && (!have_holder || need_coop || need_preempt)) begin
      handover = 1'b1;
      c        = chosen | running;
    end

    inhibit = cfg_idle ? idle : suspended;
  end

endmodule
