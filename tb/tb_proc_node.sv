// tb_proc_node: one process node between a job source and a result sink
// modelled here. The node's clock is inhibited at random; the test checks
// that every job word x returns as 2*x in order, with one pop and one push per
// job, that an uninhibited job takes four cycles from the job's arrival to its
// result, that nothing moves while the clock is inhibited (power 0, no pop or
// push), that the node reports idle only when its next clock edge changes
// nothing, and that a full output channel holds the next job back.
`timescale 1ns/1ps
module tb_proc_node;
  import cgl_pkg::*;
  logic clk = 0, rst_n = 1, inhibit = 0, en_q = 1, gclk;
  logic in_empty, in_pop, out_full, out_push, idle, done_p, empty_p;
  logic [31:0] in_data, out_data;
  pwr_t power;
  always #5 clk = ~clk;
  always_latch if (!clk) en_q = !inhibit;
  assign gclk = clk & en_q;

  proc_node dut (.gclk, .rst_n, .inhibit, .in_empty, .in_data, .in_pop,
                 .out_full, .out_push, .out_data, .idle, .power, .done_p, .empty_p);

  logic [31:0] src[$], exp_q[$];
  int n_out = 0, sink_cap = 100;
  assign in_empty = (src.size() == 0);
  assign in_data  = in_empty ? 32'h0 : src[0];
  assign out_full = (n_out >= sink_cap);

  int checks = 0, failures = 0, n_inh = 0, n_full = 0;
  task automatic fail(string m); failures++; $display("FAIL t=%0t %s", $time, m); endtask

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (empty_p !== in_empty) fail("empty_p");
    if (inhibit && (power != 0 || in_pop || out_push)) fail("activity while inhibited");
    if (in_pop !== out_push) fail("pop/push mismatch");
    if (inhibit) n_inh++;
    if (out_full && !in_empty) n_full++;
  end

  // idle: the state seen after the next enabled edge must be unchanged
  logic [31:0] snap_o; logic snap_done, was_idle;
  always @(posedge clk) if (rst_n) begin
    was_idle  <= idle && !inhibit;
    snap_o    <= out_data;
    snap_done <= done_p;
    if (out_push) begin
      checks++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) fail($sformatf("result %h", out_data));
      else void'(exp_q.pop_front());
      n_out++;
    end
    if (in_pop) void'(src.pop_front());
  end
  always @(negedge clk) if (rst_n && was_idle) begin
    checks++;
    if (out_data !== snap_o || done_p !== snap_done || in_pop) fail("change while idle");
  end

  task automatic add_job(logic [31:0] x); src.push_back(x); exp_q.push_back(x << 1); endtask

  initial begin
    int t0, lat;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency with the clock always running
    @(negedge clk); add_job(32'h0000_0015); t0 = 0;
    while (!out_push) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != 3) fail($sformatf("latency %0d", t0));   // result pushed on the 4th edge
    @(negedge clk);
    // random inhibition
    for (int k = 0; k < 200; k++) add_job($urandom);
    repeat (2000) begin
      @(negedge clk);
      inhibit = ($urandom_range(0, 2) == 0);
    end
    inhibit = 0;
    // back-pressure from a full sink
    sink_cap = n_out + 1;
    repeat (30) @(negedge clk);
    checks++;
    if (n_out != sink_cap) fail("full output channel not respected");
    sink_cap = 1 << 30;
    while (src.size() != 0) @(negedge clk);
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) fail("jobs lost");
    checks++;
    if (n_inh == 0 || n_full == 0) fail("coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
