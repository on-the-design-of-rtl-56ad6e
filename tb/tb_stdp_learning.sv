// tb_stdp_learning: feeds random pre/post spike arrays into the STDP module for
// many time steps, keeps its own 16-step history and a memory model, and checks
// learn_valid, the Before/After weight changes with saturation, the write masks
// and the update time of two cycles per updated address.
module tb_stdp_learning;
  localparam int K = 16, N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic step_en, learn_en, learn_valid, start, busy, done, rd_en, wr_en;
  logic [K-1:0] pre_vec;
  logic [N-1:0] post_vec, wr_mask;
  logic [7:0] ltp, ltd;
  logic [3:0] rd_addr, wr_addr;
  logic [N-1:0][7:0] rd_data, wr_data;

  stdp_learning #(.K(K), .N(N)) dut (.clk, .rst_n, .step_en, .pre_vec, .post_vec, .learn_en,
    .ltp_step(ltp), .ltd_step(ltd), .learn_valid, .start, .busy, .done, .rd_en, .rd_addr,
    .rd_data, .wr_en, .wr_addr, .wr_mask, .wr_data);

  // memory model driven by the DUT, and an independent reference copy
  logic [N-1:0][7:0] mem [K];
  int ref_w [K][N];
  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) for (int b = 0; b < N; b++) if (wr_mask[b]) mem[wr_addr][b] <= wr_data[b];
  end

  logic [K-1:0] h_pre [16];
  logic [N-1:0] h_post[16];
  int nstored = 0, learns = 0, sats = 0;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int sat8(int v);
    if (v > 127) begin sats++; return 127; end
    if (v < -128) begin sats++; return -128; end
    return v;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    step_en = 0; learn_en = 1; start = 0; pre_vec = 0; post_vec = 0; ltp = 8'd20; ltd = 8'd9;
    for (int i = 0; i < 16; i++) begin h_pre[i] = '0; h_post[i] = '0; end
    for (int a = 0; a < K; a++) for (int b = 0; b < N; b++) begin
      ref_w[a][b] = int'($signed(8'($urandom))); mem[a][b] = 8'(ref_w[a][b]);
    end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int s = 0; s < 120; s++) begin
      int r, e, cyc;
      logic [K-1:0] bef, aft;
      logic [N-1:0] pm;
      @(negedge clk);
      pre_vec  = K'($urandom) & K'($urandom);
      post_vec = ($urandom_range(0, 2) == 0) ? N'($urandom) : '0;
      step_en = 1;
      h_pre[nstored % 16] = pre_vec; h_post[nstored % 16] = post_vec; nstored++;
      @(negedge clk); step_en = 0;
      r = (nstored - 9) & 15;
      bef = '0; aft = '0;
      for (int d = 0; d < 8; d++) begin bef |= h_pre[(r - d) & 15]; aft |= h_pre[(r + d + 1) & 15]; end
      pm = h_post[r];
      check(learn_valid == ((pm != 0) && ((bef | aft) != 0)), "learn_valid");
      if (!learn_valid) continue;
      learns++;
      e = $countones(bef) + $countones(aft);
      for (int a = 0; a < K; a++) if (bef[a]) for (int b = 0; b < N; b++) if (pm[b]) ref_w[a][b] = sat8(ref_w[a][b] + int'(ltp));
      for (int a = 0; a < K; a++) if (aft[a]) for (int b = 0; b < N; b++) if (pm[b]) ref_w[a][b] = sat8(ref_w[a][b] - int'(ltd));
      start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 2 * e + 2, $sformatf("update time %0d for %0d addresses", cyc, e));
      for (int a = 0; a < K; a++) for (int b = 0; b < N; b++)
        check(mem[a][b] == 8'(ref_w[a][b]), $sformatf("weight [%0d][%0d]", a, b));
    end
    check(learns > 10 && sats > 0, "learning and saturation exercised");
    $display("learning steps=%0d saturations=%0d", learns, sats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
