// tb_nash_node: one reduced node (64 neurons, fan-in 64). Synapses are set so that
// neuron i fires exactly when presynaptic input i spikes. The routing table sends
// the node's own spikes both back to its local port and out of its east port, and
// the decoder maps them onto the core's input, so a vector keeps circulating:
// core -> encoder -> router -> decoder -> core. Checks each round's output vector,
// the copy on the east link, a vector injected from the host into the network,
// and a flit from a neighbour that is decoded into the next step.
module tb_nash_node;
  import nash_pkg::*;
  localparam int N = 64, K = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  node_addr_t my_addr;
  link_t nb_in [7], nb_out [7];
  logic [6:0] stall_o, stall_i, hold, pfault, xfault;
  logic cfg_we;
  cfg_target_e cfg_target;
  logic [10:0] cfg_addr;
  logic [15:0] cfg_data;
  logic [N-1:0][7:0] cfg_row;
  logic ext_valid, inj_valid, o_spk_valid;
  logic [K-1:0] ext_spk;
  logic [N-1:0] inj_spk, o_spk;
  logic [3:0] step;
  ctrl_state_e core_state;
  logic ev_rr, ev_bp, ev_dl, ev_late, ev_learn, ev_refr, ev_win, ev_evt;

  nash_node #(.N(N), .K(K)) dut (.clk, .rst_n, .my_addr, .nb_in, .nb_stall_o(stall_o), .nb_out,
    .nb_stall_i(stall_i), .out_hold(hold), .port_fault(pfault), .xbar_fault(xfault),
    .cfg_we, .cfg_target, .cfg_addr, .cfg_data, .cfg_row, .ext_valid, .ext_spk, .inj_valid,
    .inj_spk, .o_spk, .o_spk_valid, .step, .core_state, .ev_reroute(ev_rr), .ev_bypass(ev_bp),
    .ev_deadlock(ev_dl), .ev_late, .ev_learn, .ev_refractory(ev_refr), .ev_window(ev_win),
    .ev_event(ev_evt));

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic cfg(cfg_target_e t, int a, int d);
    @(negedge clk); cfg_we = 1; cfg_target = t; cfg_addr = 11'(a); cfg_data = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  logic [N-1:0] outs [$];
  int east_flits = 0;
  logic [63:0] east_last;
  always @(posedge clk) begin
    if (o_spk_valid) outs.push_back(o_spk);
    if (nb_out[P_EAST].valid) begin east_flits++; east_last = nb_out[P_EAST].flit.spikes; end
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [N-1:0] v, v2;
    my_addr = '{x: 3'd1, y: 3'd0, z: 3'd0};
    for (int p = 0; p < 7; p++) nb_in[p] = LINK_IDLE;
    stall_i = 0; hold = 0; pfault = 0; xfault = 0;
    cfg_we = 0; cfg_target = CFG_PARAM; cfg_addr = 0; cfg_data = 0; cfg_row = '0;
    ext_valid = 0; inj_valid = 0; ext_spk = 0; inj_spk = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // synapses: identity
    for (int a = 0; a < K; a++) begin
      @(negedge clk); cfg_we = 1; cfg_target = CFG_SYN_ROW; cfg_addr = 11'(a);
      cfg_row = '0; cfg_row[a] = 8'd100;
    end
    @(negedge clk); cfg_we = 0;
    cfg(CFG_PARAM, CP_THRESHOLD, 64);
    cfg(CFG_PARAM, CP_SAW, 6);
    // own spikes (source 1,0,0) -> local + east; neighbour source (0,0,0) -> local
    cfg(CFG_ROUTE_PRI, {2'b00, 3'd1, 3'd0, 3'd0}, 7'b0000101);
    cfg(CFG_ROUTE_PRI, 0, 7'b0000001);
    cfg(CFG_DEC_MAP, {9'({3'd1, 3'd0, 3'd0}), 2'd0}, 3'b100);
    cfg(CFG_DEC_MAP, {9'd0, 2'd0}, 3'b100);
    // 1) host vector straight into the core; it then circulates
    v = {$urandom, $urandom};
    @(negedge clk); ext_valid = 1; ext_spk = v; @(negedge clk); ext_valid = 0;
    wait (outs.size() >= 4);
    foreach (outs[k]) if (k < 4) check(outs[k] == v, $sformatf("round %0d output", k));
    check(east_flits >= 3 && east_last == v, "copy on the east link");
    // 2) stop circulation by removing the map entry, let it settle
    cfg(CFG_DEC_MAP, {9'({3'd1, 3'd0, 3'd0}), 2'd0}, 3'b000);
    repeat (100) @(negedge clk);
    check(core_state == CS_IDLE, "idle after map removed");
    outs.delete();
    // 3) a neighbour flit from the west is decoded and processed
    v2 = {$urandom, $urandom};
    @(negedge clk);
    nb_in[P_WEST] = LINK_IDLE; nb_in[P_WEST].valid = 1; nb_in[P_WEST].flit.ftype = FT_SPIKE;
    nb_in[P_WEST].flit.spikes = v2;
    @(negedge clk); nb_in[P_WEST] = LINK_IDLE;
    wait (outs.size() >= 1);
    check(outs[0] == v2, "neighbour spikes processed");
    // 4) host injection into the network as this node's spikes (re-enable own map)
    cfg(CFG_DEC_MAP, {9'({3'd1, 3'd0, 3'd0}), 2'd0}, 3'b100);
    repeat (50) @(negedge clk);
    outs.delete();
    cfg(CFG_DEC_MAP, {9'({3'd1, 3'd0, 3'd0}), 2'd0}, 3'b000);
    repeat (100) @(negedge clk);
    cfg(CFG_DEC_MAP, {9'({3'd1, 3'd0, 3'd0}), 2'd0}, 3'b100);
    outs.delete();
    v = {$urandom, $urandom};
    @(negedge clk); inj_valid = 1; inj_spk = v; @(negedge clk); inj_valid = 0;
    wait (outs.size() >= 2);
    check(outs[0] == v && outs[1] == v, "injected vector reaches the core through the network");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
