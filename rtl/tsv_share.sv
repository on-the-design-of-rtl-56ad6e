// tsv_share: TSV-cluster sharing arbitration for one set of vertical links between
// two layers (the S-UP or S-DOWN supporting module of the document).
//
// Each of the NX x NY routers of a layer owns one TSV cluster for this direction.
// A router whose cluster is faulty borrows the cluster of a neighbour in the same
// layer (north, east, south or west) when that cluster is healthy, has not already
// been lent, and its owner has a smaller weight than the borrower; among such
// candidates the one with the least weight is taken. Routers are resolved in index
// order (r = y*NX + x), so an earlier router gets a contested lender. A router with
// a faulty cluster and no candidate has its vertical link disabled (link_ok low),
// and the routing then treats that port as a faulty link. A lent cluster carries
// both routers' flits by time sharing: the lender may send while phase is 0 and the
// borrower while phase is 1; hold[r] is high in the cycles router r may not send.
// The weights are inputs (set at design time or by a managing module). use_cluster
// reports which cluster serves each router. The time sharing of a lent cluster and
// the resolution order are this design's choices. Combinational.
module tsv_share #(
  parameter int unsigned NX  = 3,
  parameter int unsigned NY  = 3,
  parameter int unsigned WW  = 4,
  localparam int unsigned NR = NX * NY,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic [NR-1:0]  cluster_fault,
  input  logic [WW-1:0]  weight [NR],
  input  logic           phase,
  output logic [NR-1:0]  link_ok,
  output logic [NR-1:0]  borrowing,
  output logic [NR-1:0]  lending,
  output logic [RW-1:0]  use_cluster [NR],
  output logic [NR-1:0]  hold
);

  always_comb begin
    logic [NR-1:0] lent;
    lent      = '0;
    borrowing = '0;
    link_ok   = '0;
    for (int r = 0; r < int'(NR); r++) begin
      use_cluster[r] = RW'(r);
      if (!cluster_fault[r]) begin
        link_ok[r] = 1'b1;
      end else begin
        int unsigned x, y;
        int          best;
        logic [WW-1:0] best_w;
        x = r % NX;
        y = r / NX;
        best   = -1;
        best_w = '1;
        for (int d = 0; d < 4; d++) begin
          int  n;
          logic ok;
          ok = 1'b0;
          n  = 0;
          unique case (d)
            0: if (y + 1 < NY) begin n = r + int'(NX); ok = 1'b1; end   // north
            1: if (x + 1 < NX) begin n = r + 1;        ok = 1'b1; end   // east
            2: if (y > 0)      begin n = r - int'(NX); ok = 1'b1; end   // south
            default: if (x > 0) begin n = r - 1;       ok = 1'b1; end   // west
          endcase
          if (ok && !cluster_fault[n] && !lent[n] && (weight[n] < weight[r]) &&
              (best < 0 || weight[n] < best_w)) begin
            best   = n;
            best_w = weight[n];
          end
        end
        if (best >= 0) begin
          lent[best]     = 1'b1;
          borrowing[r]   = 1'b1;
          link_ok[r]     = 1'b1;
          use_cluster[r] = RW'(best);
        end
      end
    end
    lending = lent;
    for (int r = 0; r < int'(NR); r++)
      hold[r] = (lending[r] && phase) || (borrowing[r] && !phase);
  end

endmodule
