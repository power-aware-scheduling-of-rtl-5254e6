// tb_suspend_observer: random c vectors; checks the reset state (process 0
// running, others suspended), the toggle rule for suspended_p, and the
// combinational activate_p / activate outputs against a model here.
`timescale 1ns/1ps
module tb_suspend_observer;
  localparam int N = 4;
  logic clk = 0, rst_n = 1, activate_any;
  logic [N-1:0] c = '0, suspended, activate, m;
  suspend_observer #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_act = 0, n_susp = 0;
  initial begin
    #1 rst_n = 0;
    #1 checks++;
    if (suspended !== 4'b1110) begin failures++; $display("FAIL reset %b", suspended); end
    m = 4'b1110;
    @(negedge clk); rst_n = 1;
    repeat (1000) begin
      @(negedge clk);
      c = N'($urandom);
      #1 checks++;
      if (suspended !== m || activate !== (m & c) || activate_any !== |(m & c)) begin
        failures++; $display("FAIL s=%b/%b act=%b", suspended, m, activate);
      end
      if (|(m & c)) n_act++;
      if (|(~m & c)) n_susp++;
      @(posedge clk);
      for (int p = 0; p < N; p++) m[p] = m[p] ? !c[p] : c[p];
    end
    checks++;
    if (n_act == 0 || n_susp == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
