// ni_encoder: network-interface encoder between a core and its router.
//
// When in_valid is high and the encoder is idle it captures the N-bit output spike
// vector of the core (or, for an input-layer node, the externally supplied input
// spikes), with the current 4-bit time step. It then sends one 81-bit spike flit
// (type "11") for every 64-bit segment of the vector that holds a spike, lowest
// segment first, one flit per cycle, holding while the router's local input port
// asserts stall. Each flit carries the node's own X/Y/Z address as source address
// and {segment, time step} in its time field. Empty segments are not sent, which is
// this design's choice; a vector without spikes sends nothing. busy is high while
// flits remain; in_valid is ignored while busy.
module ni_encoder
  import nash_pkg::*;
#(
  parameter int unsigned N = 256,
  localparam int unsigned NSEG = (N + SEG_W - 1) / SEG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  node_addr_t   my_addr,
  input  logic   [3:0] step,
  input  logic         in_valid,
  input  logic [N-1:0] in_spk,
  output logic         busy,
  output link_t        flit_o,
  input  logic         stall_i
);

  logic [NSEG*SEG_W-1:0] vec_q;
  logic [NSEG-1:0]       seg_pend_q;
  logic [3:0]            step_q;
  logic [NSEG-1:0]       seg_onehot;
  logic [1:0]            seg_idx;
  logic [NSEG*SEG_W-1:0] in_ext;

  assign in_ext = (NSEG*SEG_W)'(in_spk);
  assign seg_onehot = seg_pend_q & (~seg_pend_q + 1'b1);

  always_comb begin
    seg_idx = '0;
    for (int s = 0; s < int'(NSEG); s++) if (seg_onehot[s]) seg_idx = 2'(s);
  end

  assign busy = (seg_pend_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec_q      <= '0;
      seg_pend_q <= '0;
      step_q     <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        vec_q  <= in_ext;
        step_q <= step;
        for (int s = 0; s < int'(NSEG); s++) seg_pend_q[s] <= (in_ext[s*SEG_W +: SEG_W] != '0);
      end
    end else if (!stall_i) begin
      seg_pend_q <= seg_pend_q & ~seg_onehot;
    end
  end

  always_comb begin
    flit_o              = LINK_IDLE;
    flit_o.valid        = busy && !stall_i;
    flit_o.fault_flag   = 1'b0;
    flit_o.flit.ftype   = FT_SPIKE;
    flit_o.flit.src     = my_addr;
    flit_o.flit.tstamp  = '{seg: seg_idx, step: step_q};
    flit_o.flit.spikes  = vec_q[seg_idx*SEG_W +: SEG_W];
  end

endmodule
