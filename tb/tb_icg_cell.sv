// tb_icg_cell: the gated clock must equal clk while the enable sampled in the
// preceding low phase is 1 and stay low otherwise. The enable is also toggled
// in the middle of high phases, which must neither cut nor create a pulse.
`timescale 1ns/1ps
module tb_icg_cell;
  logic clk = 0, en = 0, gclk;
  icg_cell dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, pulses = 0, exp_pulses = 0;
  logic en_low;
  always @(posedge gclk) pulses++;
  initial begin
    repeat (400) begin
      @(negedge clk);
      #2 en = $urandom_range(0, 1);
      #2 en_low = en;                 // value at the end of the low phase
      @(posedge clk);
      if (en_low) exp_pulses++;
      #1 checks++;
      if (gclk !== en_low) begin failures++; $display("FAIL t=%0t gclk=%b exp=%b", $time, gclk, en_low); end
      #1 en = ~en;                    // glitch attempt while clk is high
      #2 checks++;
      if (gclk !== en_low) begin failures++; $display("FAIL glitch t=%0t", $time); end
    end
    #1 checks++;
    if (pulses != exp_pulses) begin failures++; $display("FAIL pulses %0d exp %0d", pulses, exp_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
