// tb_snpc: runs a reduced core (32 neurons, fan-in 32) for many time steps with
// random weights and random input spikes, first without and then with on-chip
// learning, and compares every output spike vector with a reference model of the
// LIF neurons and the trace-based STDP written in the testbench. Also checks the
// latency of the output spikes (E+4 cycles after valid_spike for E input events).
module tb_snpc;
  import nash_pkg::*;
  localparam int N = 32, K = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, valid_spike, o_spk_valid, step_done, learn_en, syn_we, learning, have_event;
  logic [K-1:0] spk_in;
  logic [N-1:0] o_spk, refractory;
  ctrl_state_e state;
  logic [12:0] thr, leak;
  logic [3:0] refp;
  logic [7:0] ltp, ltd;
  logic [4:0] syn_waddr;
  logic [N-1:0][7:0] syn_wdata;

  snpc #(.N(N), .K(K)) dut (.clk, .rst_n, .start, .valid_spike, .spk_in, .o_spk, .o_spk_valid,
    .step_done, .state, .threshold(thr), .leak_val(leak), .ref_period(refp), .learn_en,
    .ltp_step(ltp), .ltd_step(ltd), .syn_we, .syn_waddr, .syn_wdata, .refractory, .learning,
    .have_event_o(have_event));

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // reference model
  int w [K][N];
  int v [N]; bit ovf [N]; int rc [N];
  logic [K-1:0] h_pre [16];
  logic [N-1:0] h_post[16];
  int nst = 0, learns = 0, spikes = 0, blocked = 0;

  function automatic int sat(int x, int lo, int hi);
    return (x < lo) ? lo : (x > hi) ? hi : x;
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; valid_spike = 0; spk_in = 0; learn_en = 0; syn_we = 0; syn_waddr = 0; syn_wdata = 0;
    thr = 13'd200; leak = 13'd4; refp = 4'd2; ltp = 8'd3; ltd = 8'd2;
    for (int n = 0; n < N; n++) begin v[n] = 0; ovf[n] = 0; rc[n] = 0; end
    for (int i = 0; i < 16; i++) begin h_pre[i] = 0; h_post[i] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int a = 0; a < K; a++) begin
      @(negedge clk); syn_we = 1; syn_waddr = 5'(a);
      for (int n = 0; n < N; n++) begin w[a][n] = $urandom_range(0, 120) - 30; syn_wdata[n] = 8'(w[a][n]); end
    end
    @(negedge clk); syn_we = 0;
    for (int s = 0; s < 160; s++) begin
      logic [K-1:0] x;
      logic [N-1:0] exp_spk;
      int e, lat;
      if (s == 60) learn_en = 1;
      x = K'($urandom) & K'($urandom);
      if (s == 7) x = '0;
      e = $countones(x);
      // model: integrate, leak, fire
      for (int n = 0; n < N; n++) begin
        if (rc[n] == 0) begin
          for (int a = 0; a < K; a++) if (x[a]) begin
            v[n] += w[a][n];
            if (v[n] < 0) v[n] = 0;
            if (v[n] > 8191) begin v[n] = 8191; ovf[n] = 1; end
          end
        end else if (e > 0) blocked++;
        v[n] = (v[n] > int'(leak)) ? v[n] - int'(leak) : 0;
        if (rc[n] > 0) rc[n]--;
        exp_spk[n] = ovf[n] || (v[n] > int'(thr));
        if (exp_spk[n]) begin v[n] = 0; ovf[n] = 0; rc[n] = refp; spikes++; end
      end
      // drive the core
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; valid_spike = 1; spk_in = x;
      @(negedge clk); valid_spike = 0; lat = 1;
      while (!o_spk_valid) begin @(negedge clk); lat++; end
      check(lat == e + 4, $sformatf("output latency %0d for %0d events", lat, e));
      check(o_spk == exp_spk, $sformatf("step %0d output spikes", s));
      // model: STDP
      h_pre[nst % 16] = x; h_post[nst % 16] = exp_spk; nst++;
      if (learn_en) begin
        int r;
        logic [K-1:0] bef, aft;
        r = (nst - 9) & 15; bef = 0; aft = 0;
        for (int d = 0; d < 8; d++) begin bef |= h_pre[(r - d) & 15]; aft |= h_pre[(r + d + 1) & 15]; end
        if (h_post[r] != 0 && (bef | aft) != 0) begin
          learns++;
          for (int a = 0; a < K; a++) for (int n = 0; n < N; n++) if (h_post[r][n]) begin
            if (bef[a]) w[a][n] = sat(w[a][n] + int'(ltp), -128, 127);
            if (aft[a]) w[a][n] = sat(w[a][n] - int'(ltd), -128, 127);
          end
        end
      end
      while (state != CS_IDLE) @(negedge clk);
    end
    check(spikes > 20 && learns > 5 && blocked > 5, "firing, refractory and learning exercised");
    $display("spikes=%0d learning steps=%0d refractory blocks=%0d", spikes, learns, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
