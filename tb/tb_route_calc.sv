// tb_route_calc: fills the primary and backup routing tables with random port
// masks, then checks random lookups on all seven query ports against a reference:
// primary ports on a fault-free path, the backup branch added and flagged when a
// primary port is faulty, backup-only routing for flits already flagged, and
// faulty ports never used.
module tb_route_calc;
  import nash_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, cfg_backup;
  node_addr_t cfg_addr;
  logic [6:0] cfg_data, port_fault;
  node_addr_t q_src [7];
  logic q_ff [7], q_rr [7];
  logic [6:0] q_mask [7], q_bf [7];

  route_calc dut (.clk, .cfg_we, .cfg_backup, .cfg_addr, .cfg_data, .port_fault,
                  .q_src, .q_ff, .q_mask, .q_bf, .q_rerouted(q_rr));

  logic [6:0] pm [512], bm [512];

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int reroutes = 0, backups = 0;
    cfg_we = 0; cfg_backup = 0; cfg_addr = '0; cfg_data = 0; port_fault = 0;
    for (int q = 0; q < 7; q++) begin q_src[q] = '0; q_ff[q] = 0; end
    for (int a = 0; a < 512; a++) for (int b = 0; b < 2; b++) begin
      @(negedge clk); cfg_we = 1; cfg_backup = b[0]; cfg_addr = node_addr_t'(9'(a));
      cfg_data = 7'($urandom);
      if (b == 0) pm[a] = cfg_data; else bm[a] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int it = 0; it < 3000; it++) begin
      port_fault = ($urandom_range(0, 1) == 0) ? 7'd0 : 7'($urandom) & 7'($urandom);
      for (int q = 0; q < 7; q++) begin q_src[q] = node_addr_t'(9'($urandom)); q_ff[q] = ($urandom_range(0, 3) == 0); end
      #1;
      for (int q = 0; q < 7; q++) begin
        logic [6:0] p, b, em, ebf;
        p = pm[q_src[q]]; b = bm[q_src[q]] & ~port_fault;
        if (q_ff[q]) begin em = b; ebf = b; backups++; end
        else if ((p & port_fault) != 0) begin em = (p & ~port_fault) | b; ebf = b & ~(p & ~port_fault); reroutes++; end
        else begin em = p; ebf = 0; end
        check(q_mask[q] == em && q_bf[q] == ebf, "route result");
        check((q_mask[q] & port_fault) == 0, "never a faulty port");
        check(q_rr[q] == (!q_ff[q] && (p & port_fault) != 0), "reroute flag");
      end
      @(negedge clk);
    end
    check(reroutes > 100 && backups > 100, "fault cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
