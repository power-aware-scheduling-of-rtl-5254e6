// cgl_env: closed-loop random environment for one cgl instance, used by
// tb_cgl. N processes report random idle/done/empty signals and a power
// estimate between 0 and 35 while their clock runs (0 while inhibited, as the
// process models do). Checked on every tick: the safety flags stay clear,
// between one and MAX_RUN processes run, the summed power stays within
// 35 * MAX_RUN and PMAX with scheduling on, the counters follow their update
// rule (model here), inhibit follows suspended or, with cfg_idle, idle; at the
// end every process must have been activated many times (no starvation).
`timescale 1ns/1ps
module cgl_env #(
  parameter int N       = 4,
  parameter int MAX_RUN = 1,
  parameter int PMAX    = 35,
  parameter int TICKS   = 5000
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   handovers,
  output int   max_running
);
  import cgl_pkg::*;
  localparam int QW = (N > 1) ? $clog2(N) : 1;
  logic rst_n = 1, slow_clk = 0, cfg_idle = 0, handover;
  logic [N-1:0] idle = '0, done = '0, empty = '0, inhibit, suspended, activate;
  pwr_t [N-1:0] power, raw;
  logic [N-1:0][QW-1:0] q;
  pwr_total_t power_total;
  phi_viol_t viol;
  cgl #(.N(N), .CONC(CONC_BOTH), .PMAX(PMAX), .P_WORST(35), .MAX_RUN(MAX_RUN)) dut (.*);
  always_comb for (int p = 0; p < N; p++) power[p] = inhibit[p] ? pwr_t'(0) : raw[p];

  int acts [N];
  int m [N];
  task automatic fail(string s); failures++; if (failures < 20) $display("FAIL N=%0d K=%0d t=%0t %s", N, MAX_RUN, $time, s); endtask

  initial begin
    int nr;
    finished = 0; checks = 0; failures = 0; handovers = 0; max_running = 0;
    #1 rst_n = 0;
    foreach (m[p]) begin m[p] = 0; acts[p] = 0; end
    @(negedge clk); rst_n = 1;
    repeat (TICKS) begin
      @(negedge clk);
      idle = N'($urandom); done = N'($urandom) & N'($urandom); empty = N'($urandom);
      for (int p = 0; p < N; p++) raw[p] = pwr_t'($urandom_range(0, 35));
      slow_clk = ($urandom_range(0, 7) == 0);
      if ($urandom_range(0, 199) == 0) cfg_idle = ~cfg_idle;
      #1;
      checks++;
      nr = $countones(~suspended);
      if (nr > max_running) max_running = nr;
      if (viol != '0) fail($sformatf("flags %b", viol));
      if (nr < 1 || nr > MAX_RUN) fail("running count");
      if (!cfg_idle && (int'(power_total) > 35 * MAX_RUN || int'(power_total) > PMAX)) fail("power above bound");
      if (inhibit !== (cfg_idle ? idle : suspended)) fail("inhibit");
      for (int p = 0; p < N; p++) if (int'(q[p]) != m[p]) fail($sformatf("q[%0d]", p));
      if (handover) handovers++;
      @(posedge clk);
      for (int p = 0; p < N; p++) begin
        if (activate[p]) begin m[p] = 0; acts[p]++; end
        else if (|activate && m[p] + 1 < N) m[p]++;
      end
    end
    for (int p = 0; p < N; p++) begin
      checks++;
      if (acts[p] < 10) fail($sformatf("process %0d starved (%0d activations)", p, acts[p]));
    end
    finished = 1;
  end
endmodule
