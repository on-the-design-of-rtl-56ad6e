// synapse_mem: the synapse memory of one spiking neuron processing core.
//
// The document gives each of the core's N post-synaptic neurons its own K x 8-bit
// SRAM (256 neurons, fan-in 256, 65,536 synapses). All N SRAMs are addressed with
// the same presynaptic index, so here they are one array of K words, each word
// holding the N weights of one presynaptic neuron, with a write-enable per bank.
// Reading: rd_en with rd_addr returns all N weights on rd_data one cycle later
// (synchronous SRAM read). Writing: wr_en writes wr_data at wr_addr into each bank
// whose wr_mask bit is set. A read and a write to the same address in one cycle
// return the old data. There is no reset; the contents are loaded by writes.
module synapse_mem
  import nash_pkg::*;
#(
  parameter int unsigned N   = 256,        // banks = post-synaptic neurons
  parameter int unsigned K   = 256,        // words = presynaptic neurons
  parameter int unsigned W_W = WEIGHT_W,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                   clk,
  input  logic                   rd_en,
  input  logic          [AW-1:0] rd_addr,
  output logic [N-1:0][W_W-1:0]  rd_data,
  input  logic                   wr_en,
  input  logic          [AW-1:0] wr_addr,
  input  logic           [N-1:0] wr_mask,
  input  logic [N-1:0][W_W-1:0]  wr_data
);

  logic [N-1:0][W_W-1:0] mem [K];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < int'(N); b++) begin
        if (wr_mask[b]) mem[wr_addr][b] <= wr_data[b];
      end
    end
  end

endmodule
