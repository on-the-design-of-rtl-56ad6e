// ftmc3dr: fault-tolerant multicast 3D router (seven ports: local, north, east,
// south, west, up, down).
//
// A flit passes four pipeline stages, one clock each: buffer writing into the
// random access buffer of its input port (BW), routing calculation from its source
// address through the primary/backup routing tables (RC), switch allocation by
// per-output matrix arbiters under stall/go flow control (SA), and crossbar
// traversal into the output register (CT). A flit that enters on in_link in cycle
// t leaves on out_link in cycle t+4 when nothing competes. Multicast copies to
// several outputs may leave in the same cycle or in different cycles. Faults are
// handled as the document describes: port_fault marks output links that must not
// be used (the routing tables then switch to the backup branch and set the
// fault_flag of the copy), xbar_fault marks crossbar paths that must be replaced by
// the bypass link (one transfer per cycle), and the buffers recover from a blocked
// head flit. out_hold keeps an output from being granted (used for a TSV time slot
// the port does not own). in_stall_o / out_stall_i are the stall/go signals of the
// links. The event outputs pulse once per reroute, bypass use or deadlock notice.
module ftmc3dr
  import nash_pkg::*;
#(
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned TIMEOUT = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  link_t            in_link     [NPORT],
  output logic [NPORT-1:0] in_stall_o,
  output link_t            out_link    [NPORT],
  input  logic [NPORT-1:0] out_stall_i,
  input  logic [NPORT-1:0] out_hold,
  input  logic [NPORT-1:0] port_fault,
  input  logic [NPORT-1:0] xbar_fault,
  // routing table write port
  input  logic             cfg_we,
  input  logic             cfg_backup,
  input  node_addr_t       cfg_addr,
  input  logic [NPORT-1:0] cfg_data,
  // events
  output logic [NPORT-1:0] ev_reroute,
  output logic [NPORT-1:0] ev_bypass,
  output logic [NPORT-1:0] ev_deadlock
);

  logic             rc_valid [NPORT];
  link_t            rc_link  [NPORT];
  node_addr_t       q_src    [NPORT];
  logic             q_ff     [NPORT];
  logic [NPORT-1:0] q_mask   [NPORT];
  logic [NPORT-1:0] q_bf     [NPORT];
  logic             q_rr     [NPORT];
  logic             sel_valid[NPORT];
  logic [NPORT-1:0] sel_req  [NPORT];
  logic [NPORT-1:0] sel_bf   [NPORT];
  link_t            sel_link [NPORT];
  logic [NPORT-1:0] sa_req   [NPORT];
  logic [NPORT-1:0] grant    [NPORT];
  logic [NPORT-1:0] byp_used;

  // ------------------------------------------------------------------ BW stage
  for (genvar i = 0; i < int'(NPORT); i++) begin : g_in
    rab_buffer #(.DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) u_rab (
      .clk, .rst_n,
      .in        (in_link[i]),
      .stall_o   (in_stall_o[i]),
      .rc_valid  (rc_valid[i]),
      .rc_link   (rc_link[i]),
      .rc_mask   (q_mask[i]),
      .rc_bf     (q_bf[i]),
      .sel_valid (sel_valid[i]),
      .sel_req   (sel_req[i]),
      .sel_bf    (sel_bf[i]),
      .sel_link  (sel_link[i]),
      .grant     (grant[i]),
      .deadlock_o(ev_deadlock[i])
    );
    assign q_src[i]  = rc_link[i].flit.src;
    assign q_ff[i]   = rc_link[i].fault_flag;
    assign sa_req[i] = sel_valid[i] ? sel_req[i] : '0;
    assign ev_reroute[i] = rc_valid[i] && q_rr[i];
  end

  // ------------------------------------------------------------------ RC stage
  route_calc #(.NQ(NPORT)) u_rc (
    .clk, .cfg_we, .cfg_backup, .cfg_addr, .cfg_data, .port_fault,
    .q_src, .q_ff, .q_mask, .q_bf, .q_rerouted(q_rr)
  );

  // ------------------------------------------------------------------ SA stage
  switch_allocator u_sa (
    .clk, .rst_n, .req(sa_req), .go(~out_stall_i & ~out_hold),
    .xbar_fault, .grant, .byp_used
  );

  link_t            sa_link_q [NPORT];
  logic [NPORT-1:0] sa_gnt_q  [NPORT];
  logic [NPORT-1:0] sa_bf_q   [NPORT];
  logic [NPORT-1:0] sa_byp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa_byp_q <= '0;
      for (int i = 0; i < int'(NPORT); i++) begin
        sa_link_q[i] <= LINK_IDLE;
        sa_gnt_q[i]  <= '0;
        sa_bf_q[i]   <= '0;
      end
    end else begin
      sa_byp_q <= byp_used;
      for (int i = 0; i < int'(NPORT); i++) begin
        sa_link_q[i] <= sel_link[i];
        sa_gnt_q[i]  <= grant[i];
        sa_bf_q[i]   <= sel_bf[i] & grant[i];
      end
    end
  end
  assign ev_bypass = sa_byp_q;

  // ------------------------------------------------------------------ CT stage
  // Crossbar: output o takes the input granted to it. The bypass link is a single
  // shared bus carrying the flit granted to the one faulty-crossbar output.
  link_t byp_bus;
  always_comb begin
    byp_bus = LINK_IDLE;
    for (int i = 0; i < int'(NPORT); i++)
      if ((sa_gnt_q[i] & sa_byp_q) != '0) byp_bus = sa_link_q[i];
  end

  link_t ct_link [NPORT];
  always_comb begin
    for (int o = 0; o < int'(NPORT); o++) begin
      ct_link[o] = LINK_IDLE;
      for (int i = 0; i < int'(NPORT); i++) begin
        if (sa_gnt_q[i][o]) begin
          ct_link[o]            = sa_byp_q[o] ? byp_bus : sa_link_q[i];
          ct_link[o].valid      = 1'b1;
          ct_link[o].fault_flag = sa_bf_q[i][o];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < int'(NPORT); o++) out_link[o] <= LINK_IDLE;
    end else begin
      for (int o = 0; o < int'(NPORT); o++) out_link[o] <= ct_link[o];
    end
  end

endmodule
