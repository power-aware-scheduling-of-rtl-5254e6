// tb_prio_sort: all 4^4 inputs for four 2-bit counters; the output must equal
// the inputs sorted in decreasing order (reference: insertion sort here).
`timescale 1ns/1ps
module tb_prio_sort;
  localparam int N = 4;
  logic [N-1:0][1:0] q, prio;
  prio_sort #(.N(N)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int v = 0; v < 256; v++) begin
      int s [N];
      q = v[7:0];
      for (int p = 0; p < N; p++) s[p] = q[p];
      for (int a = 1; a < N; a++)
        for (int b = a; b > 0 && s[b] > s[b-1]; b--) begin int t; t = s[b]; s[b] = s[b-1]; s[b-1] = t; end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(prio[i]) != s[i]) begin failures++; $display("FAIL q=%h prio[%0d]=%0d exp %0d", q, i, prio[i], s[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
