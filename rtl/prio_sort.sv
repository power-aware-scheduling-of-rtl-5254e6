// prio_sort: the priority list p_1..p_N of the scheduler.
//
// Outputs the inactivity counters sorted in decreasing order, prio[0] being
// the largest (p_1). Each counter's rank is the number of counters that are
// larger, or equal with a lower index; the counter is then written at that
// rank. Ranks are distinct, so the output is a permutation of the inputs.
// The document leaves the computation of the list to the CGL; this rank
// sorter is the design's choice. Purely combinational.
module prio_sort #(
  parameter  int unsigned N  = 3,
  localparam int unsigned QW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][QW-1:0] q,
  output logic [N-1:0][QW-1:0] prio
);

  always_comb begin
    prio = '0;
    for (int p = 0; p < N; p++) begin
      int unsigned rank;
      rank = 0;
      for (int r = 0; r < N; r++) begin
        if ((q[r] > q[p]) || ((q[r] == q[p]) && (r < p))) rank++;
      end
      for (int k = 0; k < N; k++) begin
        if (rank == k) prio[k] = q[p];
      end
    end
  end

endmodule
