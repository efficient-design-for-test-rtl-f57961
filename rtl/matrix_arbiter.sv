// matrix_arbiter: N-input matrix arbiter with least-recently-granted priority.
//
// prio[i][j] = 1 means requester i wins over requester j. A requester is
// granted when no higher-priority requester is active. When `update` is high
// and a grant is given, the winner drops below every other requester. The
// grant is combinational; the priority matrix is updated on the clock edge.
// Reset gives the lower index the higher priority.
module matrix_arbiter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);
  // Full matrix; prio[j][i] is kept equal to !prio[i][j] (i != j).
  logic [N-1:0] prio [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      gnt[i] = req[i];
      for (int j = 0; j < N; j++)
        if (j != i && req[j] && prio[j][i]) gnt[i] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) prio[i][j] <= (i < j);
    end else if (update && |gnt) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (i != j) begin
            if (gnt[i]) prio[i][j] <= 1'b0;
            else if (gnt[j]) prio[i][j] <= 1'b1;
          end
    end
  end
endmodule
