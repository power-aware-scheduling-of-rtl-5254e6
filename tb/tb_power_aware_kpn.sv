// tb_power_aware_kpn: end-to-end test of the gated pipeline at its default
// parameters (three processes, FIFOs of four, cooperation and preemption,
// PMAX 200).
//
// Three phases push the same number of random jobs through the pipeline and
// compare every result with x*8 computed here:
//   1. cfg_idle = 1: clocks gated on idleness only;
//   2. cfg_idle = 0: power-aware scheduling, hand-overs by cooperation only;
//   3. cfg_idle = 0 with periodic slow_clk pulses: hand-overs by preemption.
// The sink stalls now and then and the source sends bursts, so the FIFOs fill
// up and apply back-pressure. Every tick the safety-objective flags must be
// clear; with scheduling on, at most one process may run and the summed power
// must stay within one process's worst case (35 flips), and no process may
// receive a clock edge while its clock is inhibited. The scheduled phase
// must take over 1.5 times the cycles and less average power than the
// idleness-only phase.
// Each mechanism (cooperative hand-over, preemptive hand-over, idleness gating
// of a running process, back-pressure, sink stall, mode switch, overlap of
// several busy processes) is counted and must occur.
`timescale 1ns/1ps
module tb_power_aware_kpn;
  import cgl_pkg::*;

  localparam int NJOBS = 40;

  logic clk = 0, rst_n = 1, cfg_idle = 1, slow_clk = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [31:0] in_data = 0, out_data;
  // the chain uses job and result port 0 only
  logic [2:0] in_valid_v, in_ready_v, out_valid_v, out_ready_v;
  logic [2:0][31:0] in_data_v, out_data_v;
  assign in_valid_v  = {2'b00, in_valid};
  assign in_data_v   = {64'h0, in_data};
  assign out_ready_v = {2'b00, out_ready};
  assign in_ready    = in_ready_v[0];
  assign out_valid   = out_valid_v[0];
  assign out_data    = out_data_v[0];
  logic [2:0] inhibit, suspended, activate;
  logic [2:0][1:0] q;
  logic handover;
  pwr_total_t power_total;
  phi_viol_t viol;

  power_aware_kpn dut (
    .clk, .rst_n, .cfg_idle, .slow_clk,
    .in_valid (in_valid_v), .in_data (in_data_v), .in_ready (in_ready_v),
    .out_valid (out_valid_v), .out_data (out_data_v), .out_ready (out_ready_v),
    .inhibit, .suspended, .activate, .q, .handover, .power_total, .viol);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_coop = 0, n_preempt = 0, n_idlegate = 0, n_backpress = 0, n_stall = 0;
  int n_switch = 0, n_overlap = 0;
  logic [31:0] expq[$];
  int sent, got;
  longint cycles_phase, energy_phase;
  longint cyc_idle, cyc_sched, en_idle, en_sched;
  int phase_preempt;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // per-tick rule checks and mechanism counters
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (viol != '0) fail($sformatf("safety flags %b", viol));
    if (!cfg_idle) begin
      checks++;
      if ($countones(~suspended) != 1) fail("not exactly one running process");
      if (power_total > 35) fail($sformatf("power %0d above 35", power_total));
    end
    if (handover && !cfg_idle && !slow_clk) n_coop++;
    if (handover && slow_clk) n_preempt++;
    if (cfg_idle && |(inhibit & ~suspended)) n_idlegate++;
    if (in_valid && !in_ready) n_backpress++;
    if (out_valid && !out_ready) n_stall++;
    if (cfg_idle && power_total > 35) n_overlap++;
    cycles_phase++;
    energy_phase += longint'(power_total);
  end

  // an inhibited process must receive no clock pulse: the inhibit vector
  // seen just before each rising edge is compared with the gated clocks
  logic [2:0] inh_prev;
  int n_gated = 0;
  always @(negedge clk) inh_prev <= inhibit;
  for (genvar k = 0; k < 3; k++) begin : g_gclk
    always @(posedge dut.gclk[k]) if (rst_n) begin
      checks++;
      if (inh_prev[k]) fail($sformatf("process %0d clocked while inhibited", k));
    end
  end
  always @(posedge clk) if (rst_n) n_gated += $countones(inh_prev);

  // sink: compare results, stall pseudo-randomly
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) fail("unexpected output");
      else begin
        logic [31:0] e;
        e = expq.pop_front();
        if (out_data !== e) fail($sformatf("out %h exp %h", out_data, e));
      end
      got++;
    end
    out_ready <= ($urandom_range(0, 3) != 0);
    if (phase_preempt != 0) slow_clk <= ($urandom_range(0, 5) == 0);
    else slow_clk <= 1'b0;
  end

  task automatic run_phase(input logic idle_mode, input int preempt, output longint cyc, output longint en);
    if (cfg_idle != idle_mode) n_switch++;
    cfg_idle = idle_mode;
    phase_preempt = preempt;
    sent = 0; got = 0; cycles_phase = 0; energy_phase = 0;
    fork
      begin
        while (sent < NJOBS) begin
          @(negedge clk);
          if (in_valid && in_ready) begin sent++; end
          if (sent < NJOBS) begin
            if (!in_valid || in_ready) begin
              in_valid = 1;
              in_data  = $urandom;
            end
          end else in_valid = 0;
          // queue the expectation when the word is accepted at the next edge
        end
      end
    join_none
    while (got < NJOBS) @(posedge clk);
    cyc = cycles_phase; en = energy_phase;
  endtask

  // record the expected value of each accepted input word
  always @(posedge clk) if (rst_n && in_valid && in_ready) expq.push_back(in_data << 3);

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_phase(1'b1, 0, cyc_idle, en_idle);
    run_phase(1'b0, 0, cyc_sched, en_sched);
    begin longint c3, e3; run_phase(1'b0, 1, c3, e3); end
    $display("idle-only: %0d cycles, %0d flips; scheduled: %0d cycles, %0d flips",
             cyc_idle, en_idle, cyc_sched, en_sched);
    checks++;
    if (!(2 * cyc_sched > 3 * cyc_idle)) fail("scheduling did not slow the pipeline");
    checks++;
    if (!(en_sched * cyc_idle < en_idle * cyc_sched)) fail("average power not reduced");
    $display("mechanisms: coop=%0d preempt=%0d idlegate=%0d backpressure=%0d stall=%0d switch=%0d overlap=%0d",
             n_coop, n_preempt, n_idlegate, n_backpress, n_stall, n_switch, n_overlap);
    checks += 9;
    if (in_ready_v[2:1] != 0 || out_valid_v[2:1] != 0) fail("unused chain ports active");
    if (n_gated == 0)     fail("no gated clock edge");
    if (n_coop == 0)      fail("no cooperative hand-over");
    if (n_preempt == 0)   fail("no preemptive hand-over");
    if (n_idlegate == 0)  fail("no idleness gating");
    if (n_backpress == 0) fail("no back-pressure");
    if (n_stall == 0)     fail("no sink stall");
    if (n_switch == 0)    fail("no mode switch");
    if (n_overlap == 0)   fail("no overlap of busy processes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
