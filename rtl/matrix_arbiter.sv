// matrix_arbiter: N-input matrix arbiter (least-recently-granted priority).
//
// A priority matrix holds, for every pair of requesters, which one currently wins.
// grant is one-hot among the requests (combinational, same cycle). When update is
// high the granted requester becomes the lowest priority of all, so every
// requester is served within N grants. After reset lower indices win. The arbiter
// type is the document's ("matrix-arbiter scheduler"); the rest is the standard
// construction.
module matrix_arbiter #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant
);

  // prio_q[i][j] = 1: i wins over j (only i < j entries stored as flops are
  // needed, but the full matrix keeps the code plain).
  logic [N-1:0] prio_q [N];

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      grant[i] = req[i];
      for (int j = 0; j < int'(N); j++) begin
        if (j != i && req[j] && prio_q[j][i]) grant[i] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++)
          prio_q[i][j] <= (i < j);
    end else if (update && (grant != '0)) begin
      for (int i = 0; i < int'(N); i++) begin
        if (grant[i]) begin
          for (int j = 0; j < int'(N); j++) begin
            if (j != i) begin
              prio_q[i][j] <= 1'b0;
              prio_q[j][i] <= 1'b1;
            end
          end
        end
      end
    end
  end

endmodule
