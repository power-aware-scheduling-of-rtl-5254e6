// tb_phi_monitor: random inputs for three processes with both concurrency
// rules. Each flag is recomputed here from the rule's plain statement (for
// fairness: an activated process must not have k or more other counters
// strictly above its own, k being the number of activations), the priority
// list is usually the sorted counters and sometimes corrupted (fairness is
// then judged against the list as given: q_p must be among its first k), and every flag
// must be seen both set and clear.
`timescale 1ns/1ps
module tb_phi_monitor;
  import cgl_pkg::*;
  localparam int N = 3, PMAX = 70;
  logic [N-1:0] suspended, c, inhibit, idle, done, empty;
  logic [N-1:0][1:0] q, prio;
  pwr_t [N-1:0] power;
  logic slow_clk, cfg_idle;
  pwr_total_t power_total;
  phi_viol_t viol, e;
  phi_monitor #(.N(N), .CONC(CONC_BOTH), .PMAX(PMAX)) dut (.*);
  int checks = 0, failures = 0;
  int set_cnt [7], clr_cnt [7];
  initial begin
    repeat (20000) begin
      int s[N]; logic [N-1:0] act, st; int k, tot;
      suspended = $urandom; c = $urandom; inhibit = $urandom; idle = $urandom;
      done = $urandom; empty = $urandom; slow_clk = $urandom; cfg_idle = $urandom;
      for (int p = 0; p < N; p++) begin q[p] = $urandom_range(0, 2); power[p] = $urandom_range(0, 35); end
      for (int p = 0; p < N; p++) s[p] = q[p];
      for (int a = 1; a < N; a++)
        for (int b = a; b > 0 && s[b] > s[b-1]; b--) begin int t; t = s[b]; s[b] = s[b-1]; s[b-1] = t; end
      for (int i = 0; i < N; i++) prio[i] = s[i];
      if ($urandom_range(0, 4) == 0) prio[$urandom_range(0, N - 1)] = $urandom;
      #1;
      act = suspended & c; st = suspended & ~idle;
      e = '0;
      e.progress = (suspended == '1) && (empty != '1);
      for (int i = 0; i < N; i++) if (int'(prio[i]) != s[i]) e.prios = 1;
      k = $countones(act);
      for (int p = 0; p < N; p++) if (act[p]) begin
        int above; above = 0;
        for (int r = 0; r < N; r++) if (q[r] > q[p]) above++;
        if (!e.prios && above >= k) e.fairness = 1;
        if (e.prios) begin
          logic mem; mem = 0;
          for (int i = 0; i < k; i++) if (prio[i] == q[p]) mem = 1;
          if (!mem) e.fairness = 1;
        end
      end
      for (int p = 0; p < N; p++) begin
        logic [N-1:0] o; o = '1; o[p] = 0;
        if (!suspended[p] && (done[p] || idle[p]) && (st & o) != 0 && (act & o) == 0) e.coop = 1;
        if (inhibit[p] && !(cfg_idle ? idle[p] : suspended[p])) e.inhib = 1;
      end
      e.preempt = slow_clk && st != 0 && act == 0;
      tot = 0; for (int p = 0; p < N; p++) tot += power[p];
      e.pmax = !cfg_idle && tot > PMAX;
      checks++;
      if (viol !== e || int'(power_total) != tot) begin
        failures++; $display("FAIL viol=%b exp=%b", viol, e);
      end
      for (int b = 0; b < 7; b++) if (e[b]) set_cnt[b]++; else clr_cnt[b]++;
    end
    for (int b = 0; b < 7; b++) begin
      checks++;
      if (set_cnt[b] == 0 || clr_cnt[b] == 0) begin failures++; $display("FAIL coverage bit %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
