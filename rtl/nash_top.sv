// nash_top: the NASH system, an NX x NY x NZ 3D mesh of nodes (3 x 3 x 3 as
// evaluated in the document), each a spiking neuron processing core with its
// network interface and fault-tolerant multicast 3D router.
//
// Node (x, y, z) has index n = z*NX*NY + y*NX + x. Routers are joined to their four
// neighbours in a layer and, through TSV clusters, to the routers above and below.
// The vertical links of each pair of layers are managed by two TSV-sharing modules,
// one for the upward and one for the downward direction: a router whose cluster is
// faulty (tsv_fault_up / tsv_fault_dn) borrows a healthy neighbour's cluster and
// time-shares it, or loses the vertical port, which the routing then treats as a
// faulty link. A one-bit phase register alternates the time slots of shared
// clusters. Ports on the mesh boundary are marked faulty so no flit is sent there.
// link_fault and xbar_fault inject permanent link and crossbar-path faults per node
// and port. The host reaches every node through one configuration bus (cfg_node
// selects the node) and through per-node spike paths; per-node outputs give the
// output spikes and event flags. All timing is that of the nodes.
module nash_top
  import nash_pkg::*;
#(
  parameter int unsigned NX      = 3,
  parameter int unsigned NY      = 3,
  parameter int unsigned NZ      = 3,
  parameter int unsigned N       = 256,
  parameter int unsigned K       = 256,
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned TIMEOUT = 16,
  localparam int unsigned NL     = NX * NY,
  localparam int unsigned NN     = NX * NY * NZ
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host configuration
  input  logic                   cfg_we,
  input  logic             [7:0] cfg_node,
  input  cfg_target_e            cfg_target,
  input  logic            [10:0] cfg_addr,
  input  logic            [15:0] cfg_data,
  input  logic [N-1:0][WEIGHT_W-1:0] cfg_row,
  // host spike paths
  input  logic          [NN-1:0] ext_valid,
  input  logic           [K-1:0] ext_spk [NN],
  input  logic          [NN-1:0] inj_valid,
  input  logic           [N-1:0] inj_spk [NN],
  // fault injection
  input  logic       [NPORT-1:0] link_fault [NN],
  input  logic       [NPORT-1:0] xbar_fault [NN],
  input  logic          [NL-1:0] tsv_fault_up [NZ],
  input  logic          [NL-1:0] tsv_fault_dn [NZ],
  input  logic             [3:0] tsv_weight [NL],
  // results and events
  output logic           [N-1:0] o_spk [NN],
  output logic          [NN-1:0] o_spk_valid,
  output logic          [NN-1:0] ev_reroute,
  output logic          [NN-1:0] ev_bypass,
  output logic          [NN-1:0] ev_deadlock,
  output logic          [NN-1:0] ev_late,
  output logic          [NN-1:0] ev_learn,
  output logic          [NN-1:0] ev_refractory,
  output logic          [NN-1:0] ev_window,
  output logic          [NN-1:0] ev_tsv_borrow
);

  link_t            nb_in   [NN][NPORT];
  link_t            nb_out  [NN][NPORT];
  logic [NPORT-1:0] stall_o [NN];
  logic [NPORT-1:0] stall_i [NN];
  logic [NPORT-1:0] hold    [NN];
  logic [NPORT-1:0] pfault  [NN];

  logic phase_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= 1'b0;
    else        phase_q <= ~phase_q;
  end

  // ---------------------------------------------------------------- TSV sharing
  // up_ok[z][r]: router r of layer z can send up; dn_ok[z][r]: can send down.
  logic [NL-1:0] up_ok  [NZ];
  logic [NL-1:0] dn_ok  [NZ];
  logic [NL-1:0] up_hld [NZ];
  logic [NL-1:0] dn_hld [NZ];
  logic [NL-1:0] up_bor [NZ];
  logic [NL-1:0] dn_bor [NZ];

  for (genvar z = 0; z < int'(NZ); z++) begin : g_tsv
    localparam int unsigned RW = (NL > 1) ? $clog2(NL) : 1;
    logic [RW-1:0] use_up [NL];
    logic [RW-1:0] use_dn [NL];
    logic [NL-1:0] lend_up, lend_dn;
    tsv_share #(.NX(NX), .NY(NY), .WW(4)) u_s_up (
      .cluster_fault(tsv_fault_up[z]), .weight(tsv_weight), .phase(phase_q),
      .link_ok(up_ok[z]), .borrowing(up_bor[z]), .lending(lend_up),
      .use_cluster(use_up), .hold(up_hld[z])
    );
    tsv_share #(.NX(NX), .NY(NY), .WW(4)) u_s_dn (
      .cluster_fault(tsv_fault_dn[z]), .weight(tsv_weight), .phase(phase_q),
      .link_ok(dn_ok[z]), .borrowing(dn_bor[z]), .lending(lend_dn),
      .use_cluster(use_dn), .hold(dn_hld[z])
    );
  end

  // ---------------------------------------------------------------- nodes
  for (genvar n = 0; n < int'(NN); n++) begin : g_node
    localparam int unsigned X = n % NX;
    localparam int unsigned Y = (n / NX) % NY;
    localparam int unsigned Z = n / NL;
    localparam int unsigned R = n % NL;

    // neighbour index per port (valid only where the neighbour exists)
    localparam int NB_N = (Y + 1 < NY) ? n + int'(NX) : -1;
    localparam int NB_E = (X + 1 < NX) ? n + 1        : -1;
    localparam int NB_S = (Y > 0)      ? n - int'(NX) : -1;
    localparam int NB_W = (X > 0)      ? n - 1        : -1;
    localparam int NB_U = (Z + 1 < NZ) ? n + int'(NL) : -1;
    localparam int NB_D = (Z > 0)      ? n - int'(NL) : -1;
    localparam int NB [NPORT] = '{-1, NB_N, NB_E, NB_S, NB_W, NB_U, NB_D};
    // port of the neighbour that faces back to this node
    localparam int OPP [NPORT] = '{0, int'(P_SOUTH), int'(P_WEST), int'(P_NORTH),
                                   int'(P_EAST), int'(P_DOWN), int'(P_UP)};

    for (genvar p = 1; p < int'(NPORT); p++) begin : g_port
      if (NB[p] >= 0) begin : g_link
        assign nb_in[n][p]   = nb_out[NB[p]][OPP[p]];
        assign stall_i[n][p] = stall_o[NB[p]][OPP[p]];
      end else begin : g_edge
        assign nb_in[n][p]   = LINK_IDLE;
        assign stall_i[n][p] = 1'b1;
      end
    end
    assign nb_in[n][0]   = LINK_IDLE;
    assign stall_i[n][0] = 1'b0;

    always_comb begin
      pfault[n] = link_fault[n];
      hold[n]   = '0;
      for (int p = 1; p < int'(NPORT); p++) if (NB[p] < 0) pfault[n][p] = 1'b1;
      if (NB_U >= 0) begin
        if (!up_ok[Z][R]) pfault[n][P_UP] = 1'b1;
        hold[n][P_UP] = up_hld[Z][R];
      end
      if (NB_D >= 0) begin
        if (!dn_ok[Z][R]) pfault[n][P_DOWN] = 1'b1;
        hold[n][P_DOWN] = dn_hld[Z][R];
      end
    end

    logic [3:0]  step_unused;
    ctrl_state_e state_unused;
    logic        event_unused;

    nash_node #(.N(N), .K(K), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) u_node (
      .clk, .rst_n,
      .my_addr   ('{x: COORD_W'(X), y: COORD_W'(Y), z: COORD_W'(Z)}),
      .nb_in     (nb_in[n]),
      .nb_stall_o(stall_o[n]),
      .nb_out    (nb_out[n]),
      .nb_stall_i(stall_i[n]),
      .out_hold  (hold[n]),
      .port_fault(pfault[n]),
      .xbar_fault(xbar_fault[n]),
      .cfg_we    (cfg_we && (cfg_node == 8'(n))),
      .cfg_target, .cfg_addr, .cfg_data, .cfg_row,
      .ext_valid (ext_valid[n]),
      .ext_spk   (ext_spk[n]),
      .inj_valid (inj_valid[n]),
      .inj_spk   (inj_spk[n]),
      .o_spk     (o_spk[n]),
      .o_spk_valid(o_spk_valid[n]),
      .step      (step_unused),
      .core_state(state_unused),
      .ev_reroute(ev_reroute[n]),
      .ev_bypass (ev_bypass[n]),
      .ev_deadlock(ev_deadlock[n]),
      .ev_late   (ev_late[n]),
      .ev_learn  (ev_learn[n]),
      .ev_refractory(ev_refractory[n]),
      .ev_window (ev_window[n]),
      .ev_event  (event_unused)
    );

    assign ev_tsv_borrow[n] = ((NB_U >= 0) && up_bor[Z][R]) || ((NB_D >= 0) && dn_bor[Z][R]);
  end

endmodule
