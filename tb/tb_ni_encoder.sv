// tb_ni_encoder: gives the encoder random 256-bit output vectors with random stall
// and checks the flits: type "11", source address, time step, segment number, the
// 64 spike bits, one flit per non-empty segment in ascending order, none while
// stalled, and one flit per cycle without stall.
module tb_ni_encoder;
  import nash_pkg::*;
  localparam int N = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  node_addr_t my_addr;
  logic [3:0] step;
  logic in_valid, busy, stall;
  logic [N-1:0] in_spk;
  link_t flit;

  ni_encoder #(.N(N)) dut (.clk, .rst_n, .my_addr, .step, .in_valid, .in_spk, .busy,
                           .flit_o(flit), .stall_i(stall));

  task automatic check(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int stalls = 0;
    my_addr = '{x: 3'd2, y: 3'd1, z: 3'd0}; step = 0; in_valid = 0; in_spk = 0; stall = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      logic [N-1:0] v;
      int expect_seg, cyc, nflit;
      bit stall_on;
      stall_on = (it % 3 == 0);
      for (int s = 0; s < 4; s++) v[s*64 +: 64] = ($urandom_range(0, 2) == 0) ? 64'(0) : {$urandom, $urandom};
      step = 4'(it);
      @(negedge clk); in_valid = 1; in_spk = v;
      @(negedge clk); in_valid = 0;
      expect_seg = 0; cyc = 0; nflit = 0;
      while (busy) begin
        stall = stall_on && ($urandom_range(0, 1) == 0);
        #1;
        if (stall) begin stalls++; check(!flit.valid, "no flit while stalled"); end
        else begin
          while (expect_seg < 4 && v[expect_seg*64 +: 64] == 0) expect_seg++;
          check(flit.valid && flit.flit.ftype == FT_SPIKE && flit.flit.src == my_addr &&
                flit.flit.tstamp.step == 4'(it) && flit.flit.tstamp.seg == 2'(expect_seg) &&
                flit.flit.spikes == v[expect_seg*64 +: 64], "flit content");
          expect_seg++; nflit++;
        end
        cyc++;
        @(negedge clk);
      end
      stall = 0;
      while (expect_seg < 4 && v[expect_seg*64 +: 64] == 0) expect_seg++;
      check(expect_seg == 4, "all non-empty segments sent");
      if (!stall_on) check(cyc == nflit, "one flit per cycle");
    end
    check(stalls > 10, "stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
