// tb_matrix_arbiter: checks that grants are one-hot among requests, that a granted
// requester drops to lowest priority (least-recently-granted order, checked against
// a reference list), and that no requester waits more than N-1 grants.
module tb_matrix_arbiter;
  localparam int N = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [N-1:0] req, grant;
  logic update;

  matrix_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .update, .grant);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s req=%b grant=%b", m, req, grant); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int order [$];
    int wait_cnt [N];
    for (int i = 0; i < N; i++) begin order.push_back(i); wait_cnt[i] = 0; end
    req = 0; update = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int exp_g;
      @(negedge clk);
      req = N'($urandom); update = ($urandom_range(0, 4) != 0);
      #1;
      exp_g = -1;
      foreach (order[k]) if (req[order[k]]) begin exp_g = order[k]; break; end
      check((exp_g < 0) ? (grant == 0) : (grant == N'(1 << exp_g)), "grant follows priority order");
      if (update && exp_g >= 0) begin
        foreach (order[k]) if (order[k] == exp_g) begin order.delete(k); break; end
        order.push_back(exp_g);
        for (int i = 0; i < N; i++) if (req[i] && i != exp_g) wait_cnt[i]++; else wait_cnt[i] = 0;
        for (int i = 0; i < N; i++) check(wait_cnt[i] < N, "bounded wait");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
