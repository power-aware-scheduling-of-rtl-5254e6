// tb_cgl: the clock-gating logic in closed loop with random environments
// (cgl_env): four processes run one at a time under a bound of 35, and four
// processes run in batches of two under a bound of 70. Batches of two must
// actually occur in the second case.
`timescale 1ns/1ps
module tb_cgl;
  logic clk = 0;
  always #5 clk = ~clk;
  logic f1, f2;
  int c1, c2, e1, e2, h1, h2, r1, r2;
  cgl_env #(.N(4), .MAX_RUN(1), .PMAX(35)) env1 (.clk, .finished(f1), .checks(c1), .failures(e1), .handovers(h1), .max_running(r1));
  cgl_env #(.N(4), .MAX_RUN(2), .PMAX(70)) env2 (.clk, .finished(f2), .checks(c2), .failures(e2), .handovers(h2), .max_running(r2));
  int checks, failures;
  initial begin
    wait (f1 && f2);
    checks = c1 + c2 + 1; failures = e1 + e2;
    $display("hand-overs %0d / %0d, most running %0d / %0d", h1, h2, r1, r2);
    if (r2 != 2) begin failures++; $display("FAIL no batch of two"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
