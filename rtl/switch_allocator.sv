// switch_allocator: switch allocation stage of the multicast router, with stall/go
// flow control and the bypass-link-on-demand (BLoD) restriction.
//
// Every input offers one flit with a mask of the output ports it still needs
// (req[i]); a multicast flit may be granted several outputs in the same cycle and
// the rest later. For each output a matrix arbiter chooses among the inputs that
// request it, provided the output may send (go[o], the inverted stall of the next
// router's input buffer, also used to hold a vertical port in a TSV time slot it
// does not own). An output whose crossbar path is marked faulty (xbar_fault[o]) can
// only be reached over the single bypass link, so at most one such output is
// granted per cycle, chosen by a further matrix arbiter. grant[i] is the set of
// outputs granted to input i; byp_used says which output, if any, takes the bypass
// link this cycle. Combinational, with arbiter state updated on each grant.
module switch_allocator
  import nash_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPORT-1:0] req        [NPORT],
  input  logic [NPORT-1:0] go,
  input  logic [NPORT-1:0] xbar_fault,
  output logic [NPORT-1:0] grant      [NPORT],
  output logic [NPORT-1:0] byp_used
);

  logic [NPORT-1:0] oreq  [NPORT];   // per output: requesting inputs
  logic [NPORT-1:0] ogrnt [NPORT];   // per output: arbiter choice
  logic [NPORT-1:0] ohas;            // per output: some input chosen
  logic [NPORT-1:0] byp_req;
  logic [NPORT-1:0] okeep;           // output grant is kept this cycle

  always_comb begin
    for (int o = 0; o < int'(NPORT); o++)
      for (int i = 0; i < int'(NPORT); i++)
        oreq[o][i] = req[i][o] && go[o];
  end

  for (genvar o = 0; o < int'(NPORT); o++) begin : g_out
    assign ohas[o] = (ogrnt[o] != '0);
    matrix_arbiter #(.N(NPORT)) u_arb (
      .clk, .rst_n, .req(oreq[o]), .update(okeep[o]), .grant(ogrnt[o])
    );
  end

  assign byp_req = ohas & xbar_fault;

  matrix_arbiter #(.N(NPORT)) u_byp (
    .clk, .rst_n, .req(byp_req), .update(1'b1), .grant(byp_used)
  );

  assign okeep = (ohas & ~xbar_fault) | byp_used;

  always_comb begin
    for (int i = 0; i < int'(NPORT); i++)
      for (int o = 0; o < int'(NPORT); o++)
        grant[i][o] = okeep[o] && ogrnt[o][i];
  end

endmodule
