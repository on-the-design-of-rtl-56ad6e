// tb_nash_full: the NASH system at its default size (3 x 3 x 3 nodes, 256 LIF
// neurons and a 256-wide fan-in per core, 8-flit router buffers) taken through one
// complete operation: routing tables, decoder maps, neuron parameters and all
// synapse rows are loaded over the host configuration bus, and then three time
// steps of a layer-by-layer network are run. The nine layer-0 nodes inject input
// spikes; every layer-1 node decodes the four segments of input node 0 into its
// 256 inputs and computes; every layer-2 node does the same with hidden node 0.
// Each hidden and output vector is compared with a LIF model of the same step.
// The top is instantiated with no parameter overrides. The stimulus and the model
// are those of tb_nash_top, which also runs the fault and learning phases.
module tb_nash_full;
  import nash_pkg::*;
  localparam int NX = 3, NY = 3, NZ = 3, N = 256, K = 256, STEPS = 3;
  localparam bit ALL_PHASES = 1'b0;
  localparam int NL = NX * NY, NN = NL * NZ;
  localparam int NSEG = (N + 63) / 64, KS = K / 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we;
  logic [7:0] cfg_node;
  cfg_target_e cfg_target;
  logic [10:0] cfg_addr;
  logic [15:0] cfg_data;
  logic [N-1:0][7:0] cfg_row;
  logic [NN-1:0] ext_valid, inj_valid, o_spk_valid;
  logic [K-1:0] ext_spk [NN];
  logic [N-1:0] inj_spk [NN], o_spk [NN];
  logic [6:0] link_fault [NN], xbar_fault [NN];
  logic [NL-1:0] tsv_fault_up [NZ], tsv_fault_dn [NZ];
  logic [3:0] tsv_weight [NL];
  logic [NN-1:0] ev_rr, ev_bp, ev_dl, ev_late, ev_learn, ev_refr, ev_win, ev_tsv;

  nash_top dut (.clk, .rst_n,
    .cfg_we, .cfg_node, .cfg_target, .cfg_addr, .cfg_data, .cfg_row, .ext_valid, .ext_spk,
    .inj_valid, .inj_spk, .link_fault, .xbar_fault, .tsv_fault_up, .tsv_fault_dn, .tsv_weight,
    .o_spk, .o_spk_valid, .ev_reroute(ev_rr), .ev_bypass(ev_bp), .ev_deadlock(ev_dl),
    .ev_late(ev_late), .ev_learn(ev_learn), .ev_refractory(ev_refr), .ev_window(ev_win),
    .ev_tsv_borrow(ev_tsv));

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // ------------------------------------------------------------ helpers
  function automatic int nx(int n); return n % NX; endfunction
  function automatic int ny(int n); return (n / NX) % NY; endfunction
  function automatic int nz(int n); return n / NL; endfunction
  function automatic logic [8:0] naddr(int n); return {3'(nx(n)), 3'(ny(n)), 3'(nz(n))}; endfunction

  // ports of node n in the tree that brings a flit from layer sz (entering the
  // next layer at column rx, ry) to every node of layer sz+1
  function automatic logic [6:0] tree_ports(int n, int sz, int rx, int ry);
    logic [6:0] m;
    int x, y, z;
    x = nx(n); y = ny(n); z = nz(n); m = 0;
    if (z == sz && x == rx && y == ry) m[P_UP] = 1;
    if (z == sz + 1) begin
      m[P_LOCAL] = 1;
      if (y == ry) begin
        if (x >= rx && x < NX - 1) m[P_EAST] = 1;
        if (x <= rx && x > 0)      m[P_WEST] = 1;
      end
      if (y >= ry && y < NY - 1) m[P_NORTH] = 1;
      if (y <= ry && y > 0)      m[P_SOUTH] = 1;
    end
    return m;
  endfunction

  task automatic cfg(int node, cfg_target_e t, int a, int d);
    @(negedge clk); cfg_we = 1; cfg_node = 8'(node); cfg_target = t; cfg_addr = 11'(a); cfg_data = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  // ------------------------------------------------------------ reference model
  int w [NN][K][N];
  int v [NN][N]; bit ovf [NN][N]; int rc [NN][N];
  logic [K-1:0] h_pre [NN][16];
  logic [N-1:0] h_post[NN][16];
  int nst [NN];
  bit learn_on [NN];
  int thr = 150, leak = 2, refp = 1, ltp = 2, ltd = 1;

  function automatic int sat(int x, int lo, int hi); return (x < lo) ? lo : (x > hi) ? hi : x; endfunction

  function automatic logic [N-1:0] model_step(int n, logic [K-1:0] x);
    logic [N-1:0] o;
    for (int j = 0; j < N; j++) begin
      if (rc[n][j] == 0) for (int a = 0; a < K; a++) if (x[a]) begin
        v[n][j] += w[n][a][j];
        if (v[n][j] < 0) v[n][j] = 0;
        if (v[n][j] > 8191) begin v[n][j] = 8191; ovf[n][j] = 1; end
      end
      v[n][j] = (v[n][j] > leak) ? v[n][j] - leak : 0;
      if (rc[n][j] > 0) rc[n][j]--;
      o[j] = ovf[n][j] || (v[n][j] > thr);
      if (o[j]) begin v[n][j] = 0; ovf[n][j] = 0; rc[n][j] = refp; end
    end
    h_pre[n][nst[n] % 16] = x; h_post[n][nst[n] % 16] = o; nst[n]++;
    if (learn_on[n]) begin
      int r; logic [K-1:0] bef, aft;
      r = (nst[n] - 9) & 15; bef = 0; aft = 0;
      for (int d = 0; d < 8; d++) begin bef |= h_pre[n][(r - d) & 15]; aft |= h_pre[n][(r + d + 1) & 15]; end
      if (h_post[n][r] != 0 && (bef | aft) != 0)
        for (int a = 0; a < K; a++) for (int j = 0; j < N; j++) if (h_post[n][r][j]) begin
          if (bef[a]) w[n][a][j] = sat(w[n][a][j] + ltp, -128, 127);
          if (aft[a]) w[n][a][j] = sat(w[n][a][j] - ltd, -128, 127);
        end
    end
    return o;
  endfunction

  // ------------------------------------------------------------ observation
  logic [N-1:0] outq [NN][$];
  int c_rr = 0, c_bp = 0, c_dl = 0, c_late = 0, c_learn = 0, c_refr = 0, c_tsv = 0, c_stall = 0, c_win = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) if (o_spk_valid[n]) outq[n].push_back(o_spk[n]);
    c_rr += $countones(ev_rr); c_bp += $countones(ev_bp); c_dl += $countones(ev_dl);
    c_late += $countones(ev_late); c_learn += $countones(ev_learn); c_refr += $countones(ev_refr);
    c_tsv += $countones(ev_tsv); c_win += $countones(ev_win);
    for (int n = 0; n < NN; n++) c_stall += $countones(dut.stall_o[n] & 7'b1111110);
  end

  initial begin
    #(64'd400000000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one time step of the mapped network: inject, wait, compare
  task automatic run_step(bit check_l2, string tag);
    logic [N-1:0] in0 [NL];
    logic [N-1:0] o1 [NL];
    logic [K-1:0] x;
    bit any1;
    int expect_cnt [NN];
    for (int n = 0; n < NN; n++) expect_cnt[n] = outq[n].size();
    for (int r = 0; r < NL; r++) begin
      for (int s = 0; s < NSEG; s++) in0[r][s*64 +: 64] = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      in0[r][0] = 1'b1;
    end
    // layer 1: every node sees all input nodes, source r in slot r
    x = '0;
    for (int r = 0; r < NL; r++) for (int g = 0; g < NSEG; g++)
      if (r * NSEG + g < KS) x[(r*NSEG + g)*64 +: 64] = in0[r][g*64 +: 64];
    any1 = 0;
    for (int r = 0; r < NL; r++) begin o1[r] = model_step(NL + r, x); if (o1[r] != 0) any1 = 1; expect_cnt[NL + r]++; end
    // layer 2
    x = '0;
    for (int r = 0; r < NL; r++) for (int g = 0; g < NSEG; g++)
      if (r * NSEG + g < KS) x[(r*NSEG + g)*64 +: 64] = o1[r][g*64 +: 64];
    // inject
    @(negedge clk);
    for (int r = 0; r < NL; r++) begin inj_valid[r] = 1; inj_spk[r] = in0[r]; end
    @(negedge clk); inj_valid = '0;
    begin
      logic [N-1:0] o2 [NL];
      if (any1) for (int r = 0; r < NL; r++) begin o2[r] = model_step(2*NL + r, x); expect_cnt[2*NL + r]++; end
      for (int c = 0; c < 20000; c++) begin
        bit all_in; all_in = 1;
        for (int n = NL; n < NN; n++) if (outq[n].size() < expect_cnt[n]) all_in = 0;
        if (all_in) break;
        @(negedge clk);
      end
      repeat (60) @(negedge clk);
      for (int r = 0; r < NL; r++) begin
        check(outq[NL + r].size() == expect_cnt[NL + r] && outq[NL + r][$] == o1[r],
              $sformatf("%s hidden node %0d output", tag, r));
        if (check_l2 && any1)
          check(outq[2*NL + r].size() == expect_cnt[2*NL + r] && outq[2*NL + r][$] == o2[r],
                $sformatf("%s output node %0d output", tag, r));
      end
    end
  endtask

  initial begin
    cfg_we = 0; cfg_node = 0; cfg_target = CFG_PARAM; cfg_addr = 0; cfg_data = 0; cfg_row = '0;
    ext_valid = 0; inj_valid = 0;
    for (int n = 0; n < NN; n++) begin
      ext_spk[n] = 0; inj_spk[n] = 0; link_fault[n] = 0; xbar_fault[n] = 0; nst[n] = 0; learn_on[n] = 0;
      for (int j = 0; j < N; j++) begin v[n][j] = 0; ovf[n][j] = 0; rc[n][j] = 0; end
      for (int i = 0; i < 16; i++) begin h_pre[n][i] = 0; h_post[n][i] = 0; end
    end
    for (int z = 0; z < NZ; z++) begin tsv_fault_up[z] = 0; tsv_fault_dn[z] = 0; end
    for (int r = 0; r < NL; r++) tsv_weight[r] = 4'(r + 1);
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // routing tables: for every router and every source node
    for (int n = 0; n < NN; n++) for (int s = 0; s < NN; s++) begin
      logic [6:0] p, b;
      int bx;
      p = 0; b = 0;
      if (nz(s) < NZ - 1) begin
        bx = (nx(s) < NX - 1) ? nx(s) + 1 : nx(s) - 1;
        if (n == s) begin
          p = tree_ports(n, nz(s), nx(s), ny(s));
          b = (bx > nx(s)) ? 7'(1 << P_EAST) : 7'(1 << P_WEST);
        end else begin
          p = tree_ports(n, nz(s), nx(s), ny(s));
          b = tree_ports(n, nz(s), bx, ny(s));
        end
      end
      cfg(n, CFG_ROUTE_PRI, int'(naddr(s)), p);
      cfg(n, CFG_ROUTE_BAK, int'(naddr(s)), b);
    end
    // decoder maps, parameters, weights for layers 1 and 2
    for (int n = NL; n < NN; n++) begin
      for (int r = 0; r < NL; r++) for (int g = 0; g < NSEG; g++) if (r * NSEG + g < KS)
        cfg(n, CFG_DEC_MAP, int'({naddr((nz(n) - 1) * NL + r), 2'(g)}), {1'b1, 2'(r * NSEG + g)});
      cfg(n, CFG_PARAM, CP_THRESHOLD, thr);
      cfg(n, CFG_PARAM, CP_LEAK, leak);
      cfg(n, CFG_PARAM, CP_REFRACT, refp);
      cfg(n, CFG_PARAM, CP_LTP, ltp);
      cfg(n, CFG_PARAM, CP_LTD, ltd);
      cfg(n, CFG_PARAM, CP_SAW, 40);
      for (int a = 0; a < K; a++) begin
        @(negedge clk); cfg_we = 1; cfg_node = 8'(n); cfg_target = CFG_SYN_ROW; cfg_addr = 11'(a);
        for (int j = 0; j < N; j++) begin w[n][a][j] = $urandom_range(0, 70) - 30; cfg_row[j] = 8'(w[n][a][j]); end
      end
      @(negedge clk); cfg_we = 0;
    end
    // phase A: fault free
    for (int s = 0; s < STEPS; s++) run_step(1, "fault-free");
    if (ALL_PHASES) begin
    // phase B: faulty vertical link, faulty TSV cluster, faulty crossbar paths
    link_fault[1][P_UP] = 1'b1;
    tsv_fault_up[0][3] = 1'b1;                       // router 3 borrows from a lighter neighbour
    for (int r = 0; r < NL; r++) begin xbar_fault[NL + r][P_LOCAL] = 1'b1; xbar_fault[NL + r][P_UP] = 1'b1; end
    for (int s = 0; s < STEPS; s++) run_step(1, "faulty");
    link_fault[1] = 0; tsv_fault_up[0] = 0;
    for (int r = 0; r < NL; r++) xbar_fault[NL + r] = 0;
    // phase C: on-chip learning in the output layer
    for (int r = 0; r < NL; r++) begin cfg(2*NL + r, CFG_PARAM, CP_LEARN_EN, 1); learn_on[2*NL + r] = 1; end
    for (int s = 0; s < STEPS + 10; s++) run_step(1, "learning");
    // phase D: a window too short for hidden node 0 (late flits; not compared)
    cfg(NL, CFG_PARAM, CP_SAW, 0);
    for (int s = 0; s < 2; s++) begin
      @(negedge clk);
      for (int r = 0; r < NL; r++) begin inj_valid[r] = 1; inj_spk[r] = '1; end
      @(negedge clk); inj_valid = '0;
      repeat (400) @(negedge clk);
    end
    $display("reroute=%0d bypass=%0d deadlock=%0d late=%0d learn=%0d refractory=%0d tsv_borrow=%0d stall=%0d window=%0d",
             c_rr, c_bp, c_dl, c_late, c_learn, c_refr, c_tsv, c_stall, c_win);
    end
    if (ALL_PHASES) begin
    check(c_rr > 0,    "reroute on backup branch happened");
    check(c_bp > 0,    "bypass link used");
    check(c_dl > 0,    "deadlock notice raised");
    check(c_late > 0,  "late flit dropped");
    check(c_learn > 0, "on-chip learning ran");
    check(c_refr > 0,  "refractory period entered");
    check(c_tsv > 0,   "TSV cluster borrowed");
    check(c_stall > 0, "stall/go flow control engaged");
    end
    check(c_win > 0,   "spike arrival window opened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
