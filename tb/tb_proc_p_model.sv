// tb_proc_p_model: exhaustive check of the idleness predicate and power
// expression of the example process. All 64 combinations of the six inputs
// are applied and compared with values written out here by case analysis of
// the process's clocked assignments: which registers each branch assigns and
// their widths (r1 1 bit, r2 1, r3 32, o 32, done 1).
`timescale 1ns/1ps
module tb_proc_p_model;
  import cgl_pkg::*;
  logic inhibit, start, r1, done, om_r2, om_eq, idle;
  pwr_t power;
  proc_p_model dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int v = 0; v < 64; v++) begin
      int exp_p; logic exp_idle;
      {inhibit, start, r1, done, om_r2, om_eq} = v[5:0];
      #1;
      // branch taken by the process on a clock edge
      if (start && !done)      begin exp_p = 1;  exp_idle = 0; end           // r1
      else if (r1 && !done)    begin exp_p = om_r2 ? 32+1+1+1 : 1+32; exp_idle = 0; end
      else if (done)           begin exp_p = 1;  exp_idle = 0; end           // done
      else                     begin exp_p = 0;  exp_idle = 1; end
      if (inhibit) exp_p = 0;
      checks++;
      if (idle !== exp_idle || int'(power) != exp_p) begin
        failures++;
        $display("FAIL v=%b idle=%b/%b power=%0d/%0d", v[5:0], idle, exp_idle, power, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
