// lif_neuron: one digital leaky integrate-and-fire neuron of the spiking neuron
// processing core.
//
// The membrane is a 14-bit register: 13 bits of potential and one overflow bit, as
// the document describes. Each cycle with syn_valid high adds the signed 8-bit
// synapse weight to the potential (the integrator). A sum below zero is held at
// zero and a sum above 8191 is held at 8191 with the overflow bit set; this
// clamping is this design's choice. leak_en (one cycle per time step) subtracts
// the leak value, floored at zero, and counts the refractory counter down by one.
// fire_en (the cycle after the leak) compares: if the potential exceeds the
// threshold, or the overflow bit is set, spike_o goes high, the potential is reset
// to zero and the refractory counter is loaded with ref_period. While the counter
// is non-zero, weighted inputs are ignored. spike_o holds its value from one
// fire_en to the next.
module lif_neuron
  import nash_pkg::*;
#(
  parameter int unsigned W_W   = WEIGHT_W,
  parameter int unsigned V_W   = VMEM_W,
  parameter int unsigned REF_W = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  syn_valid,
  input  logic signed [W_W-1:0] weight,
  input  logic                  leak_en,
  input  logic                  fire_en,
  input  logic        [V_W-1:0] threshold,
  input  logic        [V_W-1:0] leak_val,
  input  logic      [REF_W-1:0] ref_period,
  output logic                  spike_o,
  output logic          [V_W:0] vmem_o,      // {overflow, potential}
  output logic                  refractory_o
);

  localparam logic [V_W-1:0] VMAX = '1;

  logic [V_W-1:0]   v_q;
  logic             ovf_q;
  logic [REF_W-1:0] ref_q;

  // Integrator: potential plus sign-extended weight, two bits wider than V_W.
  logic signed [V_W+1:0] sum;
  assign sum = $signed({2'b00, v_q}) + (V_W+2)'(weight);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q     <= '0;
      ovf_q   <= 1'b0;
      ref_q   <= '0;
      spike_o <= 1'b0;
    end else if (fire_en) begin
      if (ovf_q || (v_q > threshold)) begin
        spike_o <= 1'b1;
        v_q     <= '0;
        ovf_q   <= 1'b0;
        ref_q   <= ref_period;
      end else begin
        spike_o <= 1'b0;
      end
    end else if (leak_en) begin
      v_q <= (v_q > leak_val) ? v_q - leak_val : '0;
      if (ref_q != '0) ref_q <= ref_q - 1'b1;
    end else if (syn_valid && (ref_q == '0)) begin
      if (sum < 0) begin
        v_q <= '0;
      end else if (sum > $signed({2'b00, VMAX})) begin
        v_q   <= VMAX;
        ovf_q <= 1'b1;
      end else begin
        v_q <= sum[V_W-1:0];
      end
    end
  end

  assign vmem_o       = {ovf_q, v_q};
  assign refractory_o = (ref_q != '0);

endmodule
