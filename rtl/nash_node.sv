// nash_node: one node of the NASH 3D mesh: a spiking neuron processing core, its
// network interface (encoder and decoder) and a fault-tolerant multicast 3D router.
//
// Output spikes of the core are encoded into flits and injected into the router's
// local port; flits the router delivers to the local port are decoded, within the
// spike arrival window, into the core's next presynaptic vector. A decoded vector
// starts a time step of the core. Two host paths exist besides the network:
// ext_valid/ext_spk hands a presynaptic vector straight to the core, and
// inj_valid/inj_spk sends a vector into the network as this node's spikes without
// neural computation (the input layer of a mapped network). Each is held in a
// one-entry register until taken. An output vector the encoder cannot take at once
// is held likewise, and the core does not start a new step while one is held.
// Link arrays are indexed by port (nash_pkg::port_e); element 0 (local) of the
// neighbour link arrays is unused. The host configuration bus (cfg_*) writes the
// routing tables, the decoder map, synapse rows and the core parameters.
module nash_node
  import nash_pkg::*;
#(
  parameter int unsigned N       = 256,
  parameter int unsigned K       = 256,
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned TIMEOUT = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  node_addr_t             my_addr,
  // mesh links
  input  link_t                  nb_in      [NPORT],
  output logic       [NPORT-1:0] nb_stall_o,
  output link_t                  nb_out     [NPORT],
  input  logic       [NPORT-1:0] nb_stall_i,
  input  logic       [NPORT-1:0] out_hold,
  input  logic       [NPORT-1:0] port_fault,
  input  logic       [NPORT-1:0] xbar_fault,
  // host configuration
  input  logic                   cfg_we,
  input  cfg_target_e            cfg_target,
  input  logic            [10:0] cfg_addr,
  input  logic            [15:0] cfg_data,
  input  logic [N-1:0][WEIGHT_W-1:0] cfg_row,
  // host spike paths
  input  logic                   ext_valid,
  input  logic           [K-1:0] ext_spk,
  input  logic                   inj_valid,
  input  logic           [N-1:0] inj_spk,
  // results and events
  output logic           [N-1:0] o_spk,
  output logic                   o_spk_valid,
  output logic             [3:0] step,
  output ctrl_state_e            core_state,
  output logic                   ev_reroute,
  output logic                   ev_bypass,
  output logic                   ev_deadlock,
  output logic                   ev_late,
  output logic                   ev_learn,
  output logic                   ev_refractory,
  output logic                   ev_window,
  output logic                   ev_event
);

  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1;

  // ---------------------------------------------------------------- parameters
  logic [VMEM_W-1:0]   threshold_q, leak_q;
  logic [3:0]          ref_q;
  logic                learn_en_q;
  logic [WEIGHT_W-1:0] ltp_q, ltd_q;
  logic [15:0]         saw_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      threshold_q <= VMEM_W'(64);
      leak_q      <= '0;
      ref_q       <= '0;
      learn_en_q  <= 1'b0;
      ltp_q       <= WEIGHT_W'(1);
      ltd_q       <= WEIGHT_W'(1);
      saw_q       <= 16'd32;
    end else if (cfg_we && cfg_target == CFG_PARAM) begin
      unique case (cfg_addr)
        CP_THRESHOLD: threshold_q <= cfg_data[VMEM_W-1:0];
        CP_LEAK:      leak_q      <= cfg_data[VMEM_W-1:0];
        CP_REFRACT:   ref_q       <= cfg_data[3:0];
        CP_LEARN_EN:  learn_en_q  <= cfg_data[0];
        CP_LTP:       ltp_q       <= cfg_data[WEIGHT_W-1:0];
        CP_LTD:       ltd_q       <= cfg_data[WEIGHT_W-1:0];
        CP_SAW:       saw_q       <= cfg_data;
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- router
  link_t            r_in   [NPORT];
  link_t            r_out  [NPORT];
  logic [NPORT-1:0] r_stall_o, r_stall_i;
  link_t            enc_link;
  logic [NPORT-1:0] ev_rr, ev_bp, ev_dl;

  always_comb begin
    for (int p = 0; p < int'(NPORT); p++) begin
      r_in[p]   = (p == int'(P_LOCAL)) ? enc_link : nb_in[p];
      nb_out[p] = (p == int'(P_LOCAL)) ? LINK_IDLE : r_out[p];
    end
    r_stall_i          = nb_stall_i;
    r_stall_i[P_LOCAL] = 1'b0;          // the decoder always accepts
    nb_stall_o         = r_stall_o;
    nb_stall_o[P_LOCAL] = 1'b0;
  end

  ftmc3dr #(.DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) u_router (
    .clk, .rst_n,
    .in_link(r_in), .in_stall_o(r_stall_o),
    .out_link(r_out), .out_stall_i(r_stall_i),
    .out_hold, .port_fault, .xbar_fault,
    .cfg_we    (cfg_we && (cfg_target == CFG_ROUTE_PRI || cfg_target == CFG_ROUTE_BAK)),
    .cfg_backup(cfg_target == CFG_ROUTE_BAK),
    .cfg_addr  (node_addr_t'(cfg_addr[8:0])),
    .cfg_data  (cfg_data[NPORT-1:0]),
    .ev_reroute(ev_rr), .ev_bypass(ev_bp), .ev_deadlock(ev_dl)
  );

  assign ev_reroute  = |ev_rr;
  assign ev_bypass   = |ev_bp;
  assign ev_deadlock = |ev_dl;

  // ---------------------------------------------------------------- decoder
  logic         dec_valid, dec_pending, dec_window;
  logic [K-1:0] dec_spk;
  logic         core_ready;

  ni_decoder #(.K(K)) u_dec (
    .clk, .rst_n,
    .flit_i   (r_out[P_LOCAL]),
    .saw_len  (saw_q),
    .core_ready(core_ready),
    .out_valid(dec_valid),
    .out_spk  (dec_spk),
    .late_o   (ev_late),
    .window_o (dec_window),
    .pending_o(dec_pending),
    .cfg_we   (cfg_we && cfg_target == CFG_DEC_MAP),
    .cfg_idx  (cfg_addr),
    .cfg_entry(cfg_data[2:0])
  );

  // ---------------------------------------------------------------- core
  logic         ext_pend_q;
  logic [K-1:0] ext_spk_q;
  logic         up_pend_q;
  logic [N-1:0] up_vec_q;
  logic         inj_pend_q;
  logic [N-1:0] inj_vec_q;
  logic         core_start, core_valid, step_done, learning, have_event;
  logic [K-1:0] core_spk;
  logic [N-1:0] refractory;
  logic         enc_busy, enc_take;

  assign core_start = (core_state == CS_IDLE) && !up_pend_q && (ext_pend_q || dec_pending);
  assign core_ready = (core_state == CS_DWNLD) && !ext_pend_q;
  assign core_valid = (core_state == CS_DWNLD) && (ext_pend_q || dec_valid);
  assign core_spk   = ext_pend_q ? ext_spk_q : dec_spk;

  snpc #(.N(N), .K(K)) u_core (
    .clk, .rst_n,
    .start(core_start), .valid_spike(core_valid), .spk_in(core_spk),
    .o_spk, .o_spk_valid, .step_done, .state(core_state),
    .threshold(threshold_q), .leak_val(leak_q), .ref_period(ref_q),
    .learn_en(learn_en_q), .ltp_step(ltp_q), .ltd_step(ltd_q),
    .syn_we   (cfg_we && cfg_target == CFG_SYN_ROW),
    .syn_waddr(cfg_addr[AW-1:0]),
    .syn_wdata(cfg_row),
    .refractory, .learning, .have_event_o(have_event)
  );

  assign ev_learn      = learning;
  assign ev_refractory = |refractory;
  assign ev_window     = dec_window;
  assign ev_event      = have_event;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_pend_q <= 1'b0;
      ext_spk_q  <= '0;
      up_pend_q  <= 1'b0;
      up_vec_q   <= '0;
      inj_pend_q <= 1'b0;
      inj_vec_q  <= '0;
      step       <= '0;
    end else begin
      if (core_valid && ext_pend_q) ext_pend_q <= 1'b0;
      else if (ext_valid && !ext_pend_q) begin
        ext_pend_q <= 1'b1;
        ext_spk_q  <= ext_spk;
      end
      if (o_spk_valid) begin
        up_pend_q <= 1'b1;
        up_vec_q  <= o_spk;
      end else if (enc_take && up_pend_q) begin
        up_pend_q <= 1'b0;
      end
      if (enc_take && !up_pend_q && inj_pend_q) inj_pend_q <= 1'b0;
      else if (inj_valid && !inj_pend_q) begin
        inj_pend_q <= 1'b1;
        inj_vec_q  <= inj_spk;
      end
      if (step_done) step <= step + 1'b1;
    end
  end

  // ---------------------------------------------------------------- encoder
  assign enc_take = !enc_busy && (up_pend_q || inj_pend_q);

  ni_encoder #(.N(N)) u_enc (
    .clk, .rst_n, .my_addr, .step,
    .in_valid(enc_take),
    .in_spk  (up_pend_q ? up_vec_q : inj_vec_q),
    .busy    (enc_busy),
    .flit_o  (enc_link),
    .stall_i (r_stall_o[P_LOCAL])
  );

endmodule
