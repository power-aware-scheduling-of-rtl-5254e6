// power_aware_kpn: a data-flow network of NPROC processes whose clocks are
// filtered by the power-aware clock-gating logic.
//
// Two topologies, chosen by TOPO:
//  * TOPO_CHAIN (default): jobs (32-bit words) enter through job port 0 into
//    the first FIFO channel; process k takes jobs from channel k and writes
//    results to channel k+1; the last channel is drained by result port 0.
//    Every process doubles its job word, so a job x leaves as x * 2^NPROC
//    (modulo 2^32). Ports 1..NPROC-1 are unused (in_ready and out_valid low).
//  * TOPO_PARALLEL: process k has its own input channel fed by job port k and
//    its own output channel drained by result port k; a job x returns as 2x.
// Job ports are valid/ready; a result port shows data while out_valid is high
// and a result is taken when out_ready is high. Each process clock is clk
// filtered by an icg_cell whose enable is !inhibit_p from the CGL; the FIFOs
// and the CGL run on clk.
//
// With cfg_idle = 1 a process is gated only while it is idle, and the network
// runs as fast as without gating. With cfg_idle = 0 the CGL lets at most
// MAX_RUN processes (default one) run at a time, handing the clocks over
// according to the fairness and concurrency rules; throughput drops and the
// summed per-tick power estimate stays within MAX_RUN times one process's
// worst case and the bound PMAX.
//
// The chain mirrors the document's main evaluated design, a pipeline of three
// processes, and the parallel topology its designs of N processes side by
// side; the processes themselves are the document's small example process,
// since the coders of those designs are not part of it. FIFO depth, the ports
// and the reset are this design's choices.
module power_aware_kpn
  import cgl_pkg::*;
#(
  parameter  int unsigned  NPROC      = 3,
  parameter  topology_e    TOPO       = TOPO_CHAIN,
  parameter  int unsigned  FIFO_DEPTH = 4,
  parameter  concurrency_e CONC       = CONC_BOTH,
  parameter  int unsigned  PMAX       = 200,
  parameter  int unsigned  MAX_RUN    = 1,
  localparam int unsigned  QW         = (NPROC > 1) ? $clog2(NPROC) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_idle,
  input  logic                     slow_clk,
  // job ports (chain: port 0 only)
  input  logic [NPROC-1:0]         in_valid,
  input  logic [NPROC-1:0][DW-1:0] in_data,
  output logic [NPROC-1:0]         in_ready,
  // result ports (chain: port 0 only)
  output logic [NPROC-1:0]         out_valid,
  output logic [NPROC-1:0][DW-1:0] out_data,
  input  logic [NPROC-1:0]         out_ready,
  // scheduler status
  output logic [NPROC-1:0]         inhibit,
  output logic [NPROC-1:0]         suspended,
  output logic [NPROC-1:0]         activate,
  output logic [NPROC-1:0][QW-1:0] q,
  output logic                     handover,
  output pwr_total_t               power_total,
  output phi_viol_t                viol
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);
  // chain: channels 0..NPROC; parallel: inputs 0..NPROC-1, outputs NPROC..2*NPROC-1
  localparam int unsigned NCH = (TOPO == TOPO_CHAIN) ? NPROC + 1 : 2 * NPROC;

  logic [NCH-1:0]         ch_push, ch_pop, ch_empty, ch_full;
  logic [NCH-1:0][DW-1:0] ch_wdata, ch_rdata;
  logic [NCH-1:0][CW-1:0] ch_count;

  logic [NPROC-1:0] gclk, idle, done, empty;
  pwr_t [NPROC-1:0] power;

  for (genvar k = 0; k < NCH; k++) begin : g_ch
    sync_fifo #(.WIDTH(DW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk     (clk),
      .rst_n   (rst_n),
      .push    (ch_push[k]),
      .wr_data (ch_wdata[k]),
      .pop     (ch_pop[k]),
      .rd_data (ch_rdata[k]),
      .empty   (ch_empty[k]),
      .full    (ch_full[k]),
      .count   (ch_count[k])
    );
  end

  // channel indices of each process, and the channels facing the ports
  function automatic int unsigned in_ch(int unsigned k);
    return k;
  endfunction
  function automatic int unsigned out_ch(int unsigned k);
    return (TOPO == TOPO_CHAIN) ? k + 1 : NPROC + k;
  endfunction

  for (genvar k = 0; k < NPROC; k++) begin : g_port
    if (TOPO == TOPO_PARALLEL || k == 0) begin : g_in
      assign ch_push[k]  = in_valid[k] && !ch_full[k];
      assign ch_wdata[k] = in_data[k];
      assign in_ready[k] = !ch_full[k];
    end else begin : g_no_in
      assign in_ready[k] = 1'b0;
    end
    if (TOPO == TOPO_PARALLEL || k == 0) begin : g_out
      localparam int unsigned OC = (TOPO == TOPO_CHAIN) ? NPROC : NPROC + k;
      assign out_valid[k] = !ch_empty[OC];
      assign out_data[k]  = ch_rdata[OC];
      assign ch_pop[OC]   = out_ready[k] && !ch_empty[OC];
    end else begin : g_no_out
      assign out_valid[k] = 1'b0;
      assign out_data[k]  = '0;
    end
  end

  for (genvar k = 0; k < NPROC; k++) begin : g_proc
    icg_cell u_icg (
      .clk  (clk),
      .en   (!inhibit[k]),
      .gclk (gclk[k])
    );

    proc_node u_node (
      .gclk     (gclk[k]),
      .rst_n    (rst_n),
      .inhibit  (inhibit[k]),
      .in_empty (ch_empty[in_ch(k)]),
      .in_data  (ch_rdata[in_ch(k)]),
      .in_pop   (ch_pop[in_ch(k)]),
      .out_full (ch_full[out_ch(k)]),
      .out_push (ch_push[out_ch(k)]),
      .out_data (ch_wdata[out_ch(k)]),
      .idle     (idle[k]),
      .power    (power[k]),
      .done_p   (done[k]),
      .empty_p  (empty[k])
    );
  end

  cgl #(.N(NPROC), .CONC(CONC), .PMAX(PMAX), .MAX_RUN(MAX_RUN)) u_cgl (
    .clk         (clk),
    .rst_n       (rst_n),
    .idle        (idle),
    .done        (done),
    .empty       (empty),
    .power       (power),
    .slow_clk    (slow_clk),
    .cfg_idle    (cfg_idle),
    .inhibit     (inhibit),
    .suspended   (suspended),
    .activate    (activate),
    .q           (q),
    .handover    (handover),
    .power_total (power_total),
    .viol        (viol)
  );

endmodule
