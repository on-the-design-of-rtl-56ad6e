// tb_ni_decoder: loads the decoder's mapping table through the host port and
// through configuration flits, then sends random spike flits from several sources
// and checks that flits inside the spike arrival window are ORed into the mapped
// slots, unmapped ones are ignored, late flits are dropped and flagged, and the
// vector is delivered when the window has run saw_len cycles and the core is ready.
module tb_ni_decoder;
  import nash_pkg::*;
  localparam int K = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  link_t flit;
  logic [15:0] saw;
  logic core_ready, out_valid, late, window, pending, cfg_we;
  logic [K-1:0] out_spk;
  logic [10:0] cfg_idx;
  logic [2:0] cfg_entry;

  ni_decoder #(.K(K)) dut (.clk, .rst_n, .flit_i(flit), .saw_len(saw), .core_ready, .out_valid,
    .out_spk, .late_o(late), .window_o(window), .pending_o(pending), .cfg_we, .cfg_idx, .cfg_entry);

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  // map model: entry per {src, seg}
  logic [2:0] mapm [2048];

  function automatic link_t mk(int src, int seg, logic [63:0] sp);
    link_t l;
    l = LINK_IDLE; l.valid = 1; l.flit.ftype = FT_SPIKE;
    l.flit.src = node_addr_t'(9'(src)); l.flit.tstamp.seg = 2'(seg); l.flit.spikes = sp;
    return l;
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lates = 0;
    flit = LINK_IDLE; saw = 16'd12; core_ready = 0; cfg_we = 0; cfg_idx = 0; cfg_entry = 0;
    for (int i = 0; i < 2048; i++) mapm[i] = 3'b000;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // sources 0..7, segments 0..3: host port for even sources, config flits for odd
    for (int src = 0; src < 8; src++) for (int seg = 0; seg < 4; seg++) begin
      logic [2:0] e;
      e = {1'($urandom_range(0, 3) != 0), 2'($urandom)};
      mapm[{9'(src), 2'(seg)}] = e;
      @(negedge clk);
      if (src % 2 == 0) begin cfg_we = 1; cfg_idx = {9'(src), 2'(seg)}; cfg_entry = e; end
      else begin
        flit = LINK_IDLE; flit.valid = 1; flit.flit.ftype = FT_CFG;
        flit.flit.spikes = 64'({e, 9'(src), 2'(seg)});
      end
      @(negedge clk); cfg_we = 0; flit = LINK_IDLE;
    end
    for (int it = 0; it < 60; it++) begin
      logic [K-1:0] expv;
      int cyc, nfl;
      expv = '0; cyc = 0;
      nfl = $urandom_range(1, 10);
      saw = 16'($urandom_range(4, 12));
      core_ready = 0;
      // flits spread over saw + 4 cycles
      for (int c = 0; c < int'(saw) + 4; c++) begin
        @(negedge clk);
        flit = LINK_IDLE;
        if ((c == 0) || ($urandom_range(0, 2) == 0)) begin
          int src, seg; logic [63:0] sp; logic [2:0] e;
          src = $urandom_range(0, 7); seg = $urandom_range(0, 3); sp = {$urandom, $urandom};
          flit = mk(src, seg, sp);
          e = mapm[{9'(src), 2'(seg)}];
          if (c <= int'(saw)) begin
            if (e[2]) expv[e[1:0]*64 +: 64] |= sp;
          end else lates++;
        end
        #1;
        if (c > 0) check(window == (c <= int'(saw)) && pending == (c > int'(saw)), "window timing");
      end
      @(negedge clk); flit = LINK_IDLE;
      check(pending && !out_valid, "waits for core");
      core_ready = 1; #1;
      check(out_valid && out_spk == expv, "decoded vector");
      @(negedge clk); core_ready = 0; #1;
      check(!pending && !window, "window reset");
    end
    check(lates > 5, "late flits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int late_seen = 0;
  always @(posedge clk) if (late) late_seen++;
  final $display("late flags=%0d", late_seen);
endmodule
