// tb_ftmc3dr: loads random primary and backup routing tables into the router and
// sends random flits into all seven inputs under random downstream stall, faulty
// output links and faulty crossbar paths. A scoreboard checks that every flit
// leaves on exactly the ports the routing rule gives (primary, or backup with
// fault_flag set when a primary port is faulty), once each, with its content
// intact, that stall_o is honoured upstream, and that an uncontended flit takes
// four cycles (BW, RC, SA, CT) from input to output.
module tb_ftmc3dr;
  import nash_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  link_t in_link [7], out_link [7];
  logic [6:0] in_stall, out_stall, hold, pfault, xfault;
  logic cfg_we, cfg_backup;
  node_addr_t cfg_addr;
  logic [6:0] cfg_data, ev_rr, ev_bp, ev_dl;

  ftmc3dr #(.DEPTH(8), .TIMEOUT(8)) dut (.clk, .rst_n, .in_link, .in_stall_o(in_stall),
    .out_link, .out_stall_i(out_stall), .out_hold(hold), .port_fault(pfault), .xbar_fault(xfault),
    .cfg_we, .cfg_backup, .cfg_addr, .cfg_data, .ev_reroute(ev_rr), .ev_bypass(ev_bp),
    .ev_deadlock(ev_dl));

  logic [6:0] pm [512], bm [512];
  // scoreboard: id -> ports still expected, and expected flag per port
  logic [6:0] exp_ports [int];
  logic [6:0] exp_flag  [int];
  int sent = 0, recv = 0, n_rr = 0, n_bp = 0, n_dl = 0;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic link_t mk(int id, logic ff);
    link_t l;
    l = LINK_IDLE; l.valid = 1; l.fault_flag = ff; l.flit.ftype = FT_SPIKE;
    l.flit.src = node_addr_t'(9'($urandom_range(0, 26)));
    l.flit.spikes = {32'(id), 32'($urandom)};
    return l;
  endfunction

  // expected ports for a flit, with the faults in force at its RC stage
  task automatic expect_flit(link_t l, logic [6:0] pf);
    int id; logic [6:0] p, b, ok;
    id = int'(l.flit.spikes[63:32]);
    p = pm[l.flit.src]; b = bm[l.flit.src] & ~pf; ok = p & ~pf;
    if (l.fault_flag)          begin exp_ports[id] = b; exp_flag[id] = b; end
    else if ((p & pf) != 0)    begin exp_ports[id] = ok | b; exp_flag[id] = b & ~ok; end
    else                       begin exp_ports[id] = ok; exp_flag[id] = 0; end
    if (exp_ports[id] == 0) begin exp_ports.delete(id); exp_flag.delete(id); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 7; o++) if (out_link[o].valid) begin
      int id; id = int'(out_link[o].flit.spikes[63:32]);
      checks++;
      if (!exp_ports.exists(id) || !exp_ports[id][o] || out_link[o].fault_flag != exp_flag[id][o]) begin
        failures++; $display("FAIL unexpected copy id %0d port %0d", id, o);
      end else begin
        exp_ports[id][o] = 1'b0; recv++;
        if (exp_ports[id] == 0) begin exp_ports.delete(id); exp_flag.delete(id); end
      end
    end
    n_rr += $countones(ev_rr); n_bp += $countones(ev_bp); n_dl += $countones(ev_dl);
  end

  initial begin
    #4000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 7; i++) in_link[i] = LINK_IDLE;
    out_stall = 0; hold = 0; pfault = 0; xfault = 0; cfg_we = 0; cfg_backup = 0; cfg_addr = '0; cfg_data = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int a = 0; a < 27; a++) for (int b = 0; b < 2; b++) begin
      @(negedge clk); cfg_we = 1; cfg_backup = b[0]; cfg_addr = node_addr_t'(9'(a));
      cfg_data = 7'($urandom_range(1, 127));
      if (b == 0) pm[a] = cfg_data; else bm[a] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    // latency: one flit alone, no faults
    begin
      link_t l; int lat;
      @(negedge clk);
      l = mk(sent, 0); l.flit.src = node_addr_t'(9'd3); sent++;
      expect_flit(l, 0); in_link[2] = l;
      @(negedge clk); in_link[2] = LINK_IDLE; lat = 1;
      while (!out_link[$clog2(pm[3] & -pm[3])].valid && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 4, $sformatf("router latency %0d", lat));
      repeat (4) @(negedge clk);
    end
    // random traffic in phases: no faults, link faults, crossbar faults, stall
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int ph;
      @(negedge clk);
      ph = (cyc / 1000) % 4;
      pfault = (ph == 1 || ph == 3) ? 7'b0100100 : 7'b0;
      xfault = (ph >= 2) ? 7'b0010010 : 7'b0;
      out_stall = (ph == 3) ? 7'($urandom) & 7'($urandom) : 7'b0;
      if (cyc % 1000 > 900) begin
        for (int i = 0; i < 7; i++) in_link[i] = LINK_IDLE;   // drain before the fault set changes
      end else begin
        for (int i = 0; i < 7; i++) begin
          in_link[i] = LINK_IDLE;
          if (!in_stall[i] && $urandom_range(0, 5) == 0) begin
            link_t l;
            l = mk(sent, $urandom_range(0, 3) == 0); sent++;
            expect_flit(l, pfault);
            in_link[i] = l;
          end
        end
      end
    end
    for (int i = 0; i < 7; i++) in_link[i] = LINK_IDLE;
    out_stall = 0;
    repeat (200) @(negedge clk);
    check(exp_ports.num() == 0, $sformatf("all copies delivered (%0d flits outstanding)", exp_ports.num()));
    check(n_rr > 20 && n_bp > 20, "reroute and bypass exercised");
    $display("sent=%0d copies=%0d reroutes=%0d bypass=%0d deadlock=%0d", sent, recv, n_rr, n_bp, n_dl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
