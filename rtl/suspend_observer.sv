// suspend_observer: operational status of every scheduled process.
//
// One two-state machine per process p holds suspended_p. It toggles whenever
// the controllable input c_p holds: suspended_p := suspended_p ? !c_p : c_p.
// activate_p = suspended_p & c_p marks the tick on which p resumes, and
// activate is their OR. The update rule and the two derived signals follow the
// document; the reset state (process INIT_RUN running, all others suspended)
// is this design's choice so that strict progress holds from the first tick.
// Runs on the free-running clock; c is sampled at the rising edge.
module suspend_observer #(
  parameter int unsigned N        = 3,
  parameter int unsigned INIT_RUN = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] c,
  output logic [N-1:0] suspended,
  output logic [N-1:0] activate,
  output logic         activate_any
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      suspended           <= '1;
      suspended[INIT_RUN] <= 1'b0;
    end else begin
      suspended <= suspended ^ c;   // toggle where c_p holds
    end
  end

  assign activate     = suspended & c;
  assign activate_any = |activate;

endmodule
