// icg_cell: integrated clock gate, the element through which the clock-gating
// logic filters the clock of one process.
//
// The enable is captured by a latch that is transparent while clk is low, and
// the gated clock is clk AND the latched enable. A change of en while clk is
// high therefore cannot chop or create a clock pulse: the decision taken
// during the low phase holds for the whole following high phase. The latch is
// intended (it is the standard glitch-free gate) and tools will report it as
// one. The document asks for clock inhibition per process but gives no gate
// circuit; this latch-and-AND cell is the usual choice.
module icg_cell (
  input  logic clk,
  input  logic en,    // 1: let the next clock pulse through
  output logic gclk
);

  logic en_q;

  always_latch begin
    if (!clk) en_q = en;
  end

  assign gclk = clk & en_q;

endmodule
