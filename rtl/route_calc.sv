// route_calc: routing calculation stage of the multicast router, with the fault
// management of the fault-tolerant shortest-path K-means multicast routing
// (FTSP-KMCR).
//
// The routing trees are computed off-line; this block only holds their result. Two
// tables, indexed by the 9-bit source node address of a flit, give the output ports
// of the primary tree and of the backup branches at this router (7-bit port masks,
// bit 0 = local). The host writes them through cfg_we/cfg_backup/cfg_addr/cfg_data.
// NQ lookups are served in parallel, one per input port. For a flit on the primary
// tree (fault_flag 0), the ports of the primary entry whose link is healthy are
// used; if any primary port is faulty, the healthy ports of the backup entry are
// added and the copies sent there are marked with fault_flag 1 (bf mask). A flit
// already on a backup branch (fault_flag 1) follows the backup entry and stays
// marked. A copy that has no healthy port is dropped. Where a port is both a
// healthy primary port and a backup port, the primary copy wins; that rule and the
// table format are this design's choices. The tables have no reset and must be
// written before traffic uses them. Lookup is combinational.
module route_calc
  import nash_pkg::*;
#(
  parameter int unsigned NQ = NPORT
) (
  input  logic             clk,
  input  logic             cfg_we,
  input  logic             cfg_backup,
  input  node_addr_t       cfg_addr,
  input  logic [NPORT-1:0] cfg_data,
  input  logic [NPORT-1:0] port_fault,
  input  node_addr_t       q_src   [NQ],
  input  logic             q_ff    [NQ],
  output logic [NPORT-1:0] q_mask  [NQ],
  output logic [NPORT-1:0] q_bf    [NQ],
  output logic             q_rerouted [NQ]   // a primary port was faulty
);

  logic [NPORT-1:0] prim_q [512];
  logic [NPORT-1:0] back_q [512];

  always_ff @(posedge clk) begin
    if (cfg_we) begin
      if (cfg_backup) back_q[cfg_addr] <= cfg_data;
      else            prim_q[cfg_addr] <= cfg_data;
    end
  end

  always_comb begin
    for (int q = 0; q < int'(NQ); q++) begin
      logic [NPORT-1:0] p, b, ok;
      p  = prim_q[q_src[q]];
      b  = back_q[q_src[q]] & ~port_fault;
      ok = p & ~port_fault;
      q_rerouted[q] = 1'b0;
      if (q_ff[q]) begin
        q_mask[q] = b;
        q_bf[q]   = b;
      end else if ((p & port_fault) != '0) begin
        q_mask[q] = ok | b;
        q_bf[q]   = b & ~ok;
        q_rerouted[q] = 1'b1;
      end else begin
        q_mask[q] = ok;
        q_bf[q]   = '0;
      end
    end
  end

endmodule
