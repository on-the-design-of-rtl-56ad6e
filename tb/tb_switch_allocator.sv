// tb_switch_allocator: random multicast requests, stall (go) and faulty crossbar
// paths. Checks that every grant was requested and allowed by go, that each output
// is granted to at most one input, that at most one faulty-crossbar output is
// granted per cycle (the single bypass link), that byp_used marks it, and that an
// output that is requested, free and healthy is always granted.
module tb_switch_allocator;
  import nash_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [6:0] req [7], grant [7];
  logic [6:0] go, xf, byp;

  switch_allocator dut (.clk, .rst_n, .req, .go, .xbar_fault(xf), .grant, .byp_used(byp));

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int bypasses = 0, stalls = 0, multi = 0;
    for (int i = 0; i < 7; i++) req[i] = 0;
    go = '1; xf = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      for (int i = 0; i < 7; i++) req[i] = 7'($urandom) & 7'($urandom);
      go = ($urandom_range(0, 2) == 0) ? 7'($urandom) : 7'h7f;
      xf = ($urandom_range(0, 2) == 0) ? 7'($urandom) & 7'($urandom) : 7'h0;
      #1;
      for (int o = 0; o < 7; o++) begin
        int ng; bit wanted;
        ng = 0; wanted = 0;
        for (int i = 0; i < 7; i++) begin
          if (grant[i][o]) begin
            ng++;
            check(req[i][o] && go[o], "grant only when requested and go");
          end
          if (req[i][o]) wanted = 1;
        end
        check(ng <= 1, "one input per output");
        if (wanted && !go[o]) stalls++;
        if (wanted && go[o] && !xf[o]) check(ng == 1, "work conserving on healthy output");
        if (xf[o] && ng == 1) begin check(byp[o], "bypass marks faulty output"); bypasses++; end
      end
      check($countones(byp) <= 1, "single bypass link");
      for (int i = 0; i < 7; i++) if ($countones(grant[i]) > 1) multi++;
    end
    check(bypasses > 100 && stalls > 100 && multi > 100, "bypass, stall and multicast exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
