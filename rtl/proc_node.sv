// proc_node: one process of the data-flow network with its channel handshake.
//
// The node takes one job at a time from its input FIFO, runs proc_p on it and
// pushes the result into its output FIFO. A start pulse is issued when the node
// is not busy, its input FIFO holds a job, its output FIFO has room and done is
// low. The job word stays at the head of the input FIFO while the process
// works, which keeps i stable. On the clocked cycle where done is high the head
// is popped and o is pushed; the done edge also clears busy. With the clock
// never inhibited a job occupies the node for four cycles.
//
// Clock domains: the node's registers (busy and the process) run on gclk, the
// clock filtered by the CGL; the FIFO handshakes are qualified with !inhibit so
// that the free-running FIFOs see exactly one pop and one push per job.
//
// Outputs for the CGL: the idleness predicate and power estimate of the
// process (proc_p_model), its job-termination pulse done_p and the emptiness of
// the FIFO it feeds from. The busy register only changes when start or done
// hold, so the process's idleness predicate also covers it.
module proc_node
  import cgl_pkg::*;
(
  input  logic          gclk,
  input  logic          rst_n,
  input  logic          inhibit,
  // input channel (FIFO read side)
  input  logic          in_empty,
  input  logic [DW-1:0] in_data,
  output logic          in_pop,
  // output channel (FIFO write side)
  input  logic          out_full,
  output logic          out_push,
  output logic [DW-1:0] out_data,
  // to the clock-gating logic
  output logic          idle,
  output pwr_t          power,
  output logic          done_p,
  output logic          empty_p
);

  logic busy, start, done;
  logic r1, om_r2, om_eq;

  assign start = !busy && !in_empty && !out_full && !done;

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n)     busy <= 1'b0;
    else if (start) busy <= 1'b1;
    else if (done)  busy <= 1'b0;
  end

  proc_p u_proc (
    .clk   (gclk),
    .rst_n (rst_n),
    .start (start),
    .i     (in_data),
    .done  (done),
    .o     (out_data),
    .r1_o  (r1),
    .om_r2 (om_r2),
    .om_eq (om_eq)
  );

  proc_p_model u_model (
    .inhibit (inhibit),
    .start   (start),
    .r1      (r1),
    .done    (done),
    .om_r2   (om_r2),
    .om_eq   (om_eq),
    .idle    (idle),
    .power   (power)
  );

  assign in_pop   = done && !inhibit;
  assign out_push = done && !inhibit;
  assign done_p   = done;
  assign empty_p  = in_empty;

endmodule
