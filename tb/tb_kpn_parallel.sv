// tb_kpn_parallel: networks of 2, 3 and 4 independent processes under a peak
// power bound of 70 bit flips, the sizes and bound of the document's parallel
// evaluation. With the example process (worst case 35 flips) the bound admits
// two processes at once, so each size runs with batches of two (MAX_RUN = 2);
// the four-process network also runs with one process at a time. Each network
// runs in par_harness with idleness-only gating and with power-aware
// scheduling. For three and four processes two processes must be seen running
// together. Prints cycles and peak power per network.
`timescale 1ns/1ps
module tb_kpn_parallel;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int H = 4;
  logic [H-1:0] fin;
  int chk [H], err [H], ci [H], cs [H], pi [H], ps [H], mr [H];
  par_harness #(.N(2), .MAX_RUN(2)) h0 (.clk, .finished(fin[0]), .checks(chk[0]), .failures(err[0]), .cyc_idle(ci[0]), .cyc_sched(cs[0]), .peak_idle(pi[0]), .peak_sched(ps[0]), .max_running(mr[0]));
  par_harness #(.N(3), .MAX_RUN(2)) h1 (.clk, .finished(fin[1]), .checks(chk[1]), .failures(err[1]), .cyc_idle(ci[1]), .cyc_sched(cs[1]), .peak_idle(pi[1]), .peak_sched(ps[1]), .max_running(mr[1]));
  par_harness #(.N(4), .MAX_RUN(2)) h2 (.clk, .finished(fin[2]), .checks(chk[2]), .failures(err[2]), .cyc_idle(ci[2]), .cyc_sched(cs[2]), .peak_idle(pi[2]), .peak_sched(ps[2]), .max_running(mr[2]));
  par_harness #(.N(4), .MAX_RUN(1)) h3 (.clk, .finished(fin[3]), .checks(chk[3]), .failures(err[3]), .cyc_idle(ci[3]), .cyc_sched(cs[3]), .peak_idle(pi[3]), .peak_sched(ps[3]), .max_running(mr[3]));
  int checks, failures;
  initial begin
    wait (&fin);
    checks = 0; failures = 0;
    for (int k = 0; k < H; k++) begin
      $display("network %0d: idle-only %0d cycles peak %0d | scheduled %0d cycles peak %0d, up to %0d running",
               k, ci[k], pi[k], cs[k], ps[k], mr[k]);
      checks += chk[k]; failures += err[k];
    end
    checks += 2;
    if (mr[1] != 2) begin failures++; $display("FAIL three processes: no batch of two"); end
    if (mr[2] != 2) begin failures++; $display("FAIL four processes: no batch of two"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
