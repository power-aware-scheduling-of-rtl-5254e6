// proc_p: small data-flow process used as the scheduled workload.
//
// A job starts with a one-cycle pulse on start (ignored while done is high).
// The process then samples i twice on consecutive clocked cycles: the first
// sample goes to r3; on the second, if it equals r3 the result is r3+i,
// otherwise it is the newest i. The result appears on o together with a
// one-cycle done pulse, and done clears on the next clocked cycle. With i held
// stable a job therefore yields o = 2*i, four clocked cycles after start
// (start, sample, result+done, clear).
//
// The next-state logic is written with the same three branch conditions the
// process model uses (start, step, clear), so the two can be compared.
//
// This is the "open" version of the process: besides its functional ports it
// brings out the values the CGL abstracts as oracles (r2 and i==r3) and its
// selected control variable r1, so that the CGL can evaluate the idleness and
// power expressions of the process.
//
// The behaviour follows the document's example process. Reset replaces the
// example's initial values (all registers zero) by an asynchronous active-low
// reset, because clk is a gated clock that may not tick during reset.
module proc_p
  import cgl_pkg::*;
(
  input  logic          clk,     // gated process clock
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] i,
  output logic          done,
  output logic [DW-1:0] o,
  // open outputs for the clock-gating logic
  output logic          r1_o,    // selected control register r1
  output logic          om_r2,   // oracle: register r2
  output logic          om_eq    // oracle: i - r3 == 0
);

  logic          r1, r2;
  logic [DW-1:0] r3;

  // branch conditions, in priority order
  logic take_start, take_step, take_clear;
  logic          r1_d, r2_d, done_d;
  logic [DW-1:0] r3_d, o_d;

  always_comb begin
    take_start = start & ~done;
    take_step  = ~take_start & r1 & ~done;
    take_clear = ~take_start & ~(r1 & ~done) & done;

    r1_d   = r1;
    r2_d   = r2;
    r3_d   = r3;
    o_d    = o;
    done_d = done;
    if (take_start) begin
      r1_d = 1'b1;
    end else if (take_step && !r2) begin
      // first sample
      r2_d = 1'b1;
      r3_d = i;
    end else if (take_step) begin
      // second sample: sum when both samples agree, else the newest one
      o_d    = (i == r3) ? i + r3 : i;
      done_d = 1'b1;
      r1_d   = 1'b0;
      r2_d   = 1'b0;
    end else if (take_clear) begin
      done_d = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1   <= 1'b0;
      r2   <= 1'b0;
      r3   <= '0;
      o    <= '0;
      done <= 1'b0;
    end else begin
      r1   <= r1_d;
      r2   <= r2_d;
      r3   <= r3_d;
      o    <= o_d;
      done <= done_d;
    end
  end

  assign r1_o  = r1;
  assign om_r2 = r2;
  assign om_eq = (i == r3);

endmodule
