// tb_sync_fifo: random push/pop traffic against a queue model. Checks data
// order, empty, full and count every cycle, and that both the full and the
// empty state were reached and pushes into a full FIFO were refused.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int D = 4;
  logic clk = 0, rst_n = 1, push = 0, pop = 0, empty, full;
  logic [31:0] wr_data = 0, rd_data;
  logic [2:0] count;
  sync_fifo #(.WIDTH(32), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [31:0] m[$];
  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      checks++;
      if (empty !== (m.size() == 0) || full !== (m.size() == D) || int'(count) != m.size()
          || (m.size() > 0 && rd_data !== m[0])) begin
        failures++; $display("FAIL t=%0t size=%0d count=%0d", $time, m.size(), count);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      push = ($urandom_range(0, 99) < 55); pop = ($urandom_range(0, 99) < 45);
      wr_data = $urandom;
      begin
        logic acc_push, acc_pop;
        acc_push = push && (m.size() < D);
        acc_pop  = pop && (m.size() > 0);
        @(posedge clk);
        if (acc_pop) void'(m.pop_front());
        if (acc_push) m.push_back(wr_data);
      end
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
