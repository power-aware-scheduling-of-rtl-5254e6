// tb_cgl_strategy: random states and inputs for four processes with both
// concurrency rules enabled, for batches of one (MAX_RUN = 1) and of two
// (MAX_RUN = 2). The expected controls are worked out here: a hand-over is due
// when no process runs, when a running process is done or idle while some
// process is stalled, or when slow_clk holds while some process is stalled.
// The next batch is the MAX_RUN suspended processes that come first when
// ordered by decreasing counter and then by round-robin distance after the
// lowest-index running process; c marks the batch and every running process.
// inhibit must equal suspended, or idle when cfg_idle is set.
`timescale 1ns/1ps
module tb_cgl_strategy;
  import cgl_pkg::*;
  localparam int N = 4;
  logic [N-1:0] suspended, idle, done, c1, inhibit1, c2, inhibit2;
  logic [N-1:0][1:0] q;
  logic slow_clk, cfg_idle, handover1, handover2;
  cgl_strategy #(.N(N), .CONC(CONC_BOTH)) dut1 (
    .suspended, .q, .idle, .done, .slow_clk, .cfg_idle, .c (c1), .inhibit (inhibit1), .handover (handover1));
  cgl_strategy #(.N(N), .CONC(CONC_BOTH), .MAX_RUN(2)) dut2 (
    .suspended, .q, .idle, .done, .slow_clk, .cfg_idle, .c (c2), .inhibit (inhibit2), .handover (handover2));
  int checks = 0, failures = 0, n_coop = 0, n_pre = 0, n_tie = 0, n_two = 0;

  // expected controls for a batch size of k
  function automatic logic [N-1:0] expect_c(int k, output logic due);
    int h; logic have; logic [N-1:0] running, stalled, chosen; int key [N];
    running = ~suspended; stalled = suspended & ~idle;
    have = |running;
    h = N - 1;
    for (int p = 0; p < N; p++) if (running[p]) begin h = p; break; end
    due = !have || ((|(running & (done | idle))) && |stalled) || (slow_clk && |stalled);
    // key: larger is better = counter first, then closeness after h
    for (int p = 0; p < N; p++) key[p] = int'(q[p]) * 16 + (N - ((p - h + N) % N == 0 ? N : (p - h + N) % N));
    chosen = '0;
    for (int b = 0; b < k; b++) begin
      int best; best = -1;
      for (int p = 0; p < N; p++)
        if (suspended[p] && !chosen[p] && (best < 0 || key[p] > key[best])) best = p;
      if (best >= 0) chosen[best] = 1'b1;
    end
    if (chosen == '0) due = 1'b0;
    return due ? (chosen | running) : '0;
  endfunction

  initial begin
    repeat (20000) begin
      logic [N-1:0] e1, e2; logic d1, d2;
      suspended = N'($urandom);
      if ($urandom_range(0, 1) == 0) begin suspended = '1; suspended[$urandom_range(0, N - 1)] = 1'b0; end
      q = $urandom; idle = $urandom; done = $urandom;
      slow_clk = ($urandom_range(0, 3) == 0); cfg_idle = $urandom_range(0, 1);
      #1;
      e1 = expect_c(1, d1);
      e2 = expect_c(2, d2);
      checks += 2;
      if (c1 !== e1 || handover1 !== d1 || inhibit1 !== (cfg_idle ? idle : suspended)) begin
        failures++;
        $display("FAIL k=1 susp=%b q=%h idle=%b done=%b slow=%b c=%b exp %b", suspended, q, idle, done, slow_clk, c1, e1);
      end
      if (c2 !== e2 || handover2 !== d2 || inhibit2 !== (cfg_idle ? idle : suspended)) begin
        failures++;
        $display("FAIL k=2 susp=%b q=%h idle=%b done=%b slow=%b c=%b exp %b", suspended, q, idle, done, slow_clk, c2, e2);
      end
      if (d1 && |(~suspended) && !slow_clk) n_coop++;
      if (d1 && slow_clk && !(|(~suspended & (done | idle)))) n_pre++;
      if (d2 && $countones(e2 & suspended) == 2) n_two++;
      for (int a = 0; a < N; a++) for (int b = a + 1; b < N; b++)
        if (d1 && suspended[a] && suspended[b] && q[a] == q[b]) n_tie++;
    end
    checks++;
    if (n_coop == 0 || n_pre == 0 || n_tie == 0 || n_two == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
