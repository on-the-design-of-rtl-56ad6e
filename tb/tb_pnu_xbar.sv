// tb_pnu_xbar: loads random presynaptic spike vectors into the crossbar, runs it
// and checks that every set bit is issued once, in ascending order, one per cycle,
// that syn_valid follows each read by one cycle, and that last_o comes after E+1
// cycles of run for E events (one cycle for an empty vector).
module tb_pnu_xbar;
  localparam int K = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, run, have_event, rd_en, syn_valid, last_o;
  logic [K-1:0] spk_in, pre_vec;
  logic [5:0] rd_addr;

  pnu_xbar #(.K(K)) dut (.clk, .rst_n, .load, .spk_in, .run, .have_event, .rd_en,
                         .rd_addr, .syn_valid, .last_o, .pre_vec);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; run = 0; spk_in = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      logic [K-1:0] v, seen;
      int e, cyc, last_idx, nvalid;
      bit prev_rd;
      v = {$urandom, $urandom};
      if (it % 4 == 1) v = v & {$urandom, $urandom} & {$urandom, $urandom};
      if (it == 3) v = '0;
      e = $countones(v);
      @(negedge clk); load = 1; spk_in = v;
      @(negedge clk); load = 0;
      check(pre_vec == v, "pre_vec stored");
      check(have_event == (v != '0), "have_event");
      run = 1; cyc = 0; seen = '0; last_idx = -1; nvalid = 0; prev_rd = 0;
      forever begin
        #1;
        cyc++;
        check(syn_valid == prev_rd, "syn_valid one cycle after read");
        if (syn_valid) nvalid++;
        if (last_o) break;
        check(rd_en, "read while events remain");
        check(v[rd_addr] && !seen[rd_addr] && int'(rd_addr) > last_idx, "ascending unique address");
        seen[rd_addr] = 1; last_idx = rd_addr;
        prev_rd = rd_en;
        @(negedge clk);
      end
      check(!rd_en, "no read with last");
      check(cyc == e + 1, $sformatf("cycle count %0d for %0d events", cyc, e));
      check(seen == v, "every event issued");
      check(nvalid == e, "one weight word per event");
      @(negedge clk); run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
