// pnu_xbar: synapse crossbar front end implementing the parallel neuron update (PNU).
//
// load (with spk_in) stores the K-bit presynaptic spike vector. While run is high
// the crossbar works through the stored vector one spike event per cycle: the
// lowest set bit is isolated (the one-hot step), its index is issued as the read
// address of the synapse memory, and the bit is cleared from the pending vector.
// The memory returns the weights of all post-synaptic neurons for that presynaptic
// neuron one cycle later, marked by syn_valid. last_o is high while run is high and
// no event is left to issue; the final syn_valid falls in that same cycle, so a
// vector with E events takes E+1 cycles of run, and an empty vector takes one.
// have_event is the OR of the stored vector. pre_vec holds the stored vector for
// the learning module. Taking the lowest index first is this design's choice.
module pnu_xbar #(
  parameter int unsigned K  = 256,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic  [K-1:0] spk_in,
  input  logic          run,
  output logic          have_event,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          syn_valid,
  output logic          last_o,
  output logic  [K-1:0] pre_vec
);

  logic [K-1:0] pending_q;
  logic [K-1:0] onehot;

  assign onehot = pending_q & (~pending_q + 1'b1);

  always_comb begin
    rd_addr = '0;
    for (int i = 0; i < int'(K); i++) begin
      if (onehot[i]) rd_addr = AW'(i);
    end
  end

  assign rd_en      = run && (pending_q != '0);
  assign last_o     = run && (pending_q == '0);
  assign have_event = (pre_vec != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= '0;
      pre_vec   <= '0;
      syn_valid <= 1'b0;
    end else begin
      syn_valid <= rd_en;
      if (load) begin
        pending_q <= spk_in;
        pre_vec   <= spk_in;
      end else if (rd_en) begin
        pending_q <= pending_q & ~onehot;
      end
    end
  end

endmodule
