// par_harness: drives one power_aware_kpn in the parallel topology with N
// processes and PMAX = 70 and checks it. Used by tb_kpn_parallel.
//
// Every job port receives JOBS random words; every result must come back on
// the same port as twice the word, in order. Two phases run the same load:
// idleness-only gating (cfg_idle = 1) and power-aware scheduling. In the
// scheduled phase between one and MAX_RUN processes may run and the summed
// power estimate must stay within 35 per allowed process and within PMAX; in the
// idleness-only phase several processes must be seen busy at once, and the
// scheduled phase must take longer. finished rises when all checks are done.
`timescale 1ns/1ps
module par_harness #(
  parameter int N       = 2,
  parameter int MAX_RUN = 1,
  parameter int JOBS    = 12
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cyc_idle,
  output int   cyc_sched,
  output int   peak_idle,
  output int   peak_sched,
  output int   max_running
);
  import cgl_pkg::*;
  localparam int QW = (N > 1) ? $clog2(N) : 1;

  logic rst_n = 1, cfg_idle = 1;
  logic [N-1:0] in_valid = '0, in_ready, out_valid, out_ready = '0;
  logic [N-1:0][31:0] in_data = '0, out_data;
  logic [N-1:0] inhibit, suspended, activate;
  logic [N-1:0][QW-1:0] q;
  logic handover;
  pwr_total_t power_total;
  phi_viol_t viol;

  power_aware_kpn #(.NPROC(N), .TOPO(TOPO_PARALLEL), .PMAX(70), .MAX_RUN(MAX_RUN)) dut (
    .clk, .rst_n, .cfg_idle, .slow_clk (1'b0),
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .inhibit, .suspended, .activate, .q, .handover, .power_total, .viol);

  logic [31:0] expq [N][$];
  int sent [N], got [N];
  int cyc, peak;
  logic running = 0;

  task automatic fail(string s); failures++; if (failures < 10) $display("FAIL N=%0d t=%0t %s", N, $time, s); endtask

  always @(negedge clk) if (running) begin
    checks++;
    if (viol != '0) fail($sformatf("flags %b", viol));
    if (!cfg_idle) begin
      checks++;
      if ($countones(~suspended) < 1 || $countones(~suspended) > MAX_RUN) fail("running count");
      if (int'(power_total) > 35 * MAX_RUN) fail("power above MAX_RUN processes");
      if ($countones(~suspended) > max_running) max_running = $countones(~suspended);
    end
    cyc++;
    if (int'(power_total) > peak) peak = power_total;
  end

  always @(posedge clk) if (running) begin
    for (int k = 0; k < N; k++) begin
      if (in_valid[k] && in_ready[k]) begin expq[k].push_back(in_data[k] << 1); sent[k]++; end
      if (out_valid[k] && out_ready[k]) begin
        checks++;
        if (expq[k].size() == 0 || out_data[k] !== expq[k][0]) fail($sformatf("port %0d result %h", k, out_data[k]));
        else void'(expq[k].pop_front());
        got[k]++;
      end
    end
  end

  task automatic phase(input logic idle_mode, output int cycles, output int pk);
    logic all_done;
    cfg_idle = idle_mode;
    foreach (sent[k]) begin sent[k] = 0; got[k] = 0; end
    cyc = 0; peak = 0;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int k = 0; k < N; k++) begin
        if (in_valid[k] && in_ready[k] && sent[k] + 1 >= JOBS) in_valid[k] = 0;
        else if (sent[k] < JOBS && (!in_valid[k] || in_ready[k])) begin
          in_valid[k] = ($urandom_range(0, 3) != 0);
          in_data[k]  = $urandom;
        end
        out_ready[k] = ($urandom_range(0, 4) != 0);
        if (got[k] < JOBS) all_done = 0;
      end
    end while (!all_done);
    cycles = cyc; pk = peak;
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; max_running = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    running = 1;
    phase(1'b1, cyc_idle, peak_idle);
    phase(1'b0, cyc_sched, peak_sched);
    checks += 3;
    if (peak_idle <= 35)        fail("no overlap of busy processes in idleness-only mode");
    if (peak_sched > 70)        fail("peak power above PMAX");
    if (cyc_sched <= cyc_idle)  fail("scheduling did not slow the network");
    finished = 1;
  end
endmodule
