// tb_tsv_share: random TSV-cluster faults and router weights on a 3 x 3 layer.
// Checks against a reference of the borrowing rule (healthy neighbour, smaller
// weight, not yet lent, least weight, routers resolved in index order), plus the
// properties that a lent cluster is healthy and lent once, that link_ok matches
// own-or-borrowed, and that lender and borrower hold in opposite phases.
module tb_tsv_share;
  localparam int NX = 3, NY = 3, NR = 9;
  int checks = 0, failures = 0;

  logic [NR-1:0] fault, ok, bor, lend, hold;
  logic [3:0] w [NR];
  logic [3:0] use_c [NR];
  logic phase;

  tsv_share #(.NX(NX), .NY(NY), .WW(4)) dut (.cluster_fault(fault), .weight(w), .phase,
    .link_ok(ok), .borrowing(bor), .lending(lend), .use_cluster(use_c), .hold);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    int borrows = 0, disabled = 0;
    for (int it = 0; it < 3000; it++) begin
      int ref_use [NR]; bit ref_lent [NR];
      fault = NR'($urandom) & NR'($urandom);
      for (int r = 0; r < NR; r++) w[r] = 4'($urandom);
      phase = it[0];
      #1;
      for (int r = 0; r < NR; r++) begin ref_lent[r] = 0; ref_use[r] = fault[r] ? -1 : r; end
      for (int r = 0; r < NR; r++) if (fault[r]) begin
        int cand [4]; int best;
        int x, y;
        x = r % NX; y = r / NX;
        cand = '{ (y < NY-1) ? r + NX : -1, (x < NX-1) ? r + 1 : -1, (y > 0) ? r - NX : -1, (x > 0) ? r - 1 : -1 };
        best = -1;
        foreach (cand[k]) if (cand[k] >= 0) begin
          int n; n = cand[k];
          if (!fault[n] && !ref_lent[n] && w[n] < w[r] && (best < 0 || w[n] < w[best])) best = n;
        end
        if (best >= 0) begin ref_lent[best] = 1; ref_use[r] = best; end
      end
      for (int r = 0; r < NR; r++) begin
        check(ok[r] == (ref_use[r] >= 0), "link_ok");
        check(bor[r] == (fault[r] && ref_use[r] >= 0), "borrowing");
        check(lend[r] == ref_lent[r], "lending");
        if (ref_use[r] >= 0) check(int'(use_c[r]) == ref_use[r], "cluster used");
        if (lend[r]) check(!fault[r], "lent cluster healthy");
        check(hold[r] == ((lend[r] && phase) || (bor[r] && !phase)), "time slots");
        if (bor[r]) borrows++;
        if (!ok[r]) disabled++;
      end
    end
    check(borrows > 100 && disabled > 100, "borrowing and disabling exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
