// tb_inactivity_counters: random activation vectors for three processes. A
// model here applies the rule (clear on own activation, +1 on another's
// activation while below N-1, else hold); saturation at N-1 must be reached.
`timescale 1ns/1ps
module tb_inactivity_counters;
  localparam int N = 3;
  logic clk = 0, rst_n = 1;
  logic [N-1:0] activate = '0;
  logic [N-1:0][1:0] q;
  int m [N];
  inactivity_counters #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_sat = 0;
  initial begin
    #1 rst_n = 0;
    foreach (m[p]) m[p] = 0;
    @(negedge clk); rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        checks++;
        if (int'(q[p]) != m[p]) begin failures++; $display("FAIL q[%0d]=%0d exp %0d", p, q[p], m[p]); end
        if (m[p] == N - 1) n_sat++;
      end
      activate = ($urandom_range(0, 2) == 0) ? N'(1 << $urandom_range(0, N - 1)) : N'($urandom_range(0, 1) ? 0 : $urandom);
      @(posedge clk);
      for (int p = 0; p < N; p++)
        if (activate[p]) m[p] = 0;
        else if (|activate && m[p] + 1 < N) m[p]++;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
