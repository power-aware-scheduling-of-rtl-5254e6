// inactivity_counters: one bounded inactivity counter q_p per process.
//
// q_p is cleared on a tick where p is activated, and incremented on a tick
// where some other process is activated but p is not, as long as q_p+1 stays
// below the number of processes N; otherwise it holds. q_p thus ranges over
// 0..N-1 and measures how many activations of others p has waited through.
// The rule is the document's; the reset value zero is this design's choice.
module inactivity_counters #(
  parameter  int unsigned N  = 3,
  localparam int unsigned QW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         activate,
  output logic [N-1:0][QW-1:0] q
);

  logic any;
  assign any = |activate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      for (int p = 0; p < N; p++) begin
        if (activate[p])
          q[p] <= '0;
        else if (any && (32'(q[p]) + 1 < N))
          q[p] <= q[p] + 1'b1;
      end
    end
  end

endmodule
