// proc_p_model: abstract model of proc_p evaluated in hardware.
//
// From the process's selected variables (start, r1, done), its oracles (r2 and
// i==r3) and its clock-inhibition signal, this block computes
//   idle  - the idleness predicate: no guard of a clocked assignment holds, so
//           no register of the process can change on the next clock edge;
//   power - the power expression: the number of register bits that may flip on
//           the next edge (sum of the widths of the assigned registers), zero
//           when the clock is inhibited.
// Guard order and the flip counts (1, 35, 35, 33, 1, else 0) are those of the
// document's model of the example process: r1 alone is 1 bit, o+done+r1+r2 is
// 35, r2+r3 is 33 and done alone is 1. Purely combinational.
module proc_p_model
  import cgl_pkg::*;
(
  input  logic inhibit,
  input  logic start,
  input  logic r1,
  input  logic done,
  input  logic om_r2,
  input  logic om_eq,
  output logic idle,
  output pwr_t power
);

  logic g_start, g_run, g_clear;

  always_comb begin
    g_start = start && !done;               // start & ~done
    g_run   = !g_start && r1 && !done;      // r1 & ~done, start branch not taken
    g_clear = !g_start && !(r1 && !done) && done;

    idle = !g_start && !(r1 && !done) && !done;

    if (inhibit)                 power = pwr_t'(0);
    else if (g_start)            power = pwr_t'(1);
    else if (g_run && om_r2)     power = pwr_t'(35);  // both result branches
    else if (g_run && !om_r2)    power = pwr_t'(33);
    else if (g_clear)            power = pwr_t'(1);
    else                         power = pwr_t'(0);
  end

endmodule
