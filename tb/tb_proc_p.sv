// tb_proc_p: checks the example process against a cycle-level reference.
// The reference model kept in this testbench tracks a job as a sequence of
// phases (idle, armed, first sample taken, done). Random start pulses and
// input words (often repeated, so both result branches occur) are applied,
// and all outputs, including the open oracle outputs, are compared on every
// cycle. A job with a held input must raise done on the third clock edge,
// counting the edge that takes start, with o = 2*i, and drop done on the next.
`timescale 1ns/1ps
module tb_proc_p;
  import cgl_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic [31:0] i = 0, o;
  logic done, r1_o, om_r2, om_eq;
  proc_p dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_eq = 0, n_ne = 0;
  // reference: the job as a phase sequence IDLE -> ARMED -> SAMPLED -> DONE
  typedef enum int {IDLE, ARMED, SAMPLED, DONE} phase_e;
  phase_e ph;
  logic m_r1, m_r2, m_done; logic [31:0] m_r3, m_o;
  assign m_r1   = (ph == ARMED) || (ph == SAMPLED);
  assign m_r2   = (ph == SAMPLED);
  assign m_done = (ph == DONE);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= IDLE; m_r3 <= 0; m_o <= 0;
    end else begin
      case (ph)
        IDLE:    if (start) ph <= ARMED;
        ARMED:   if (!start) begin ph <= SAMPLED; m_r3 <= i; end
        SAMPLED: if (!start) begin
                   ph <= DONE;
                   m_o <= (m_r3 == i) ? 2 * i : i;
                   if (m_r3 == i) n_eq++; else n_ne++;
                 end                     // start while sampled: no change
        DONE:    ph <= IDLE;             // start is ignored while done
      endcase
    end
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ({done, o, r1_o, om_r2, om_eq} !== {m_done, m_o, m_r1, m_r2, (i == m_r3)}) begin
      failures++;
      $display("FAIL t=%0t done=%b o=%h r1=%b r2=%b eq=%b", $time, done, o, r1_o, om_r2, om_eq);
    end
  end

  initial begin
    int lat;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // held-input job: latency and result
    @(negedge clk); start = 1; i = 32'h1234_5678;
    @(negedge clk); start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3 || o != 32'h2468_ACF0) begin
      failures++; $display("FAIL latency %0d o=%h", lat, o);
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    // random stimulus
    repeat (2000) begin
      @(negedge clk);
      start = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 1) == 0) i = $urandom_range(0, 3);
    end
    checks++;
    if (n_eq == 0 || n_ne == 0) begin failures++; $display("FAIL branch coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
