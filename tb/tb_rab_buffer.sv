// tb_rab_buffer: writes flits into the random access buffer, answers its routing
// requests with a port mask taken from the flit, and grants its offered flit under
// a random or a blocking pattern. Checks that flits are offered oldest first, that
// every requested port of every flit is granted exactly once, that stall_o follows
// the free-slot count, and that a head flit blocked for TIMEOUT cycles raises the
// deadlock notice and lets a flit with a different request pass it.
module tb_rab_buffer;
  import nash_pkg::*;
  localparam int DEPTH = 8, TIMEOUT = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  link_t in, rc_link, sel_link;
  logic stall, rc_valid, sel_valid, dl;
  logic [6:0] rc_mask, rc_bf, sel_req, sel_bf, grant;

  rab_buffer #(.DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) dut (.clk, .rst_n, .in, .stall_o(stall),
    .rc_valid, .rc_link, .rc_mask, .rc_bf, .sel_valid, .sel_req, .sel_bf, .sel_link,
    .grant, .deadlock_o(dl));

  // routing answer: port mask from the low spike bits, bf from the next ones
  assign rc_mask = rc_link.flit.spikes[6:0];
  assign rc_bf   = rc_link.flit.spikes[13:7] & rc_mask;

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int sent = 0, occupancy = 0;
  logic [6:0] owed [int];     // id -> ports still owed
  int order [$];              // ids in arrival order (still buffered)

  initial begin
    #4000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int deadlocks = 0, passes = 0, stalls = 0;
  bit block_mode = 0;
  logic [6:0] blocked_mask = 0;

  initial begin
    in = LINK_IDLE; grant = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      block_mode = ((cyc / 400) % 2 == 1);
      // stall check from occupancy
      check(stall == ((DEPTH - occupancy) < 3), "stall follows free slots");
      if (stall) stalls++;
      // write
      in = LINK_IDLE;
      if (!stall && $urandom_range(0, 1) == 0) begin
        logic [6:0] m;
        m = 7'($urandom_range(1, 127));
        if (block_mode && ($urandom_range(0, 1) == 0)) m = 7'b0000001;
        in.valid = 1; in.flit.ftype = FT_SPIKE;
        in.flit.spikes = {32'(sent), 18'd0, 7'($urandom), m};
        owed[sent] = m; order.push_back(sent); sent++; occupancy++;
      end
      // grant
      grant = 0;
      #1;
      if (sel_valid) begin
        int id, oldest;
        id = int'(sel_link.flit.spikes[63:32]);
        check(owed.exists(id) && sel_req == owed[id], "offered flit and request");
        oldest = order[0];
        if (id != oldest) begin
          check(owed[id] != owed[oldest], "passes only with a different request");
          passes++;
        end
        check(sel_bf == (sel_link.flit.spikes[13:7] & sel_link.flit.spikes[6:0]), "fault-flag mask kept");
        if (block_mode) grant = sel_req & 7'b1111110 & 7'($urandom);   // port 0 never granted
        else            grant = sel_req & 7'($urandom);
        if (grant != 0) begin
          owed[id] &= ~grant;
          if (owed[id] == 0) begin
            owed.delete(id);
            foreach (order[k]) if (order[k] == id) begin order.delete(k); break; end
            occupancy--;
          end
        end
      end
      if (dl) deadlocks++;
      if (!block_mode && cyc % 400 == 399) begin
        // drain check point: nothing stuck forever
      end
    end
    // drain
    in = LINK_IDLE;
    for (int c = 0; c < 400 && occupancy > 0; c++) begin
      @(negedge clk); grant = 0; #1;
      if (sel_valid) begin
        int id; id = int'(sel_link.flit.spikes[63:32]);
        grant = sel_req; owed[id] &= ~grant;
        if (owed[id] == 0) begin owed.delete(id); foreach (order[k]) if (order[k] == id) begin order.delete(k); break; end occupancy--; end
      end
    end
    @(negedge clk); grant = 0;
    check(occupancy == 0 && owed.num() == 0 && !sel_valid, "all flits delivered");
    check(deadlocks > 5 && passes > 5 && stalls > 5, "deadlock recovery and stall exercised");
    $display("sent=%0d deadlocks=%0d passes=%0d stalls=%0d", sent, deadlocks, passes, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
