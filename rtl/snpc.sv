// snpc: spiking neuron processing core.
//
// N physical LIF neurons (256 in the document), each with its own K-entry, 8-bit
// synapse memory bank (fan-in 256), a crossbar front end that applies the parallel
// neuron update, a trace-based STDP module with the parallel weight update, and the
// seven-state core controller. One time step: start, then valid_spike with spk_in
// (the presynaptic vector); the crossbar feeds one presynaptic event per cycle, and
// every neuron adds its own weight for that event in the same cycle; then leak,
// fire, upload (o_spk_valid high for one cycle with the output vector o_spk), and
// optional learning. With E input events, o_spk_valid comes E+4 cycles after the
// valid_spike cycle, and without learning step_done follows 2 cycles later. Neuron parameters (threshold, leak, refractory period) and
// the STDP steps are shared by all neurons of the core and come in as ports.
// Synapse weights are loaded through the host write port, one presynaptic row of N
// weights per cycle; learning writes take precedence over host writes.
module snpc
  import nash_pkg::*;
#(
  parameter int unsigned N     = 256,
  parameter int unsigned K     = 256,
  parameter int unsigned W_W   = WEIGHT_W,
  parameter int unsigned V_W   = VMEM_W,
  parameter int unsigned REF_W = 4,
  localparam int unsigned AW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // spike input
  input  logic                   start,
  input  logic                   valid_spike,
  input  logic           [K-1:0] spk_in,
  // spike output
  output logic           [N-1:0] o_spk,
  output logic                   o_spk_valid,
  output logic                   step_done,
  output ctrl_state_e            state,
  // configuration
  input  logic         [V_W-1:0] threshold,
  input  logic         [V_W-1:0] leak_val,
  input  logic       [REF_W-1:0] ref_period,
  input  logic                   learn_en,
  input  logic         [W_W-1:0] ltp_step,
  input  logic         [W_W-1:0] ltd_step,
  // host synapse write port
  input  logic                   syn_we,
  input  logic          [AW-1:0] syn_waddr,
  input  logic [N-1:0][W_W-1:0]  syn_wdata,
  // observation: refractory neurons, learning in progress, input had an event
  output logic           [N-1:0] refractory,
  output logic                   learning,
  output logic                   have_event_o
);

  logic load, run, leak_en, fire_en, upload, learn_start;
  logic have_event, x_rd_en, syn_valid, x_last;
  logic [AW-1:0] x_rd_addr;
  logic [K-1:0]  pre_vec;

  logic l_valid, l_busy, l_done, l_rd_en, l_wr_en;
  logic [AW-1:0] l_rd_addr, l_wr_addr;
  logic [N-1:0]  l_wr_mask;
  logic [N-1:0][W_W-1:0] l_wr_data, m_rd_data;

  logic                   m_rd_en, m_wr_en;
  logic [AW-1:0]          m_rd_addr, m_wr_addr;
  logic [N-1:0]           m_wr_mask;
  logic [N-1:0][W_W-1:0]  m_wr_data;

  core_controller u_ctrl (
    .clk, .rst_n, .start, .valid_spike,
    .xbar_last(x_last), .learn_valid(l_valid), .learn_done(l_done),
    .state, .load, .run, .leak_en, .fire_en, .upload, .learn_start, .step_done
  );

  pnu_xbar #(.K(K)) u_xbar (
    .clk, .rst_n, .load, .spk_in, .run,
    .have_event, .rd_en(x_rd_en), .rd_addr(x_rd_addr),
    .syn_valid, .last_o(x_last), .pre_vec
  );

  stdp_learning #(.K(K), .N(N), .W_W(W_W)) u_stdp (
    .clk, .rst_n, .step_en(upload), .pre_vec, .post_vec(o_spk),
    .learn_en, .ltp_step, .ltd_step, .learn_valid(l_valid),
    .start(learn_start), .busy(l_busy), .done(l_done),
    .rd_en(l_rd_en), .rd_addr(l_rd_addr), .rd_data(m_rd_data),
    .wr_en(l_wr_en), .wr_addr(l_wr_addr), .wr_mask(l_wr_mask), .wr_data(l_wr_data)
  );

  // One read port shared by crossbar and learning; one write port shared by
  // learning and the host.
  assign m_rd_en   = run ? x_rd_en   : l_rd_en;
  assign m_rd_addr = run ? x_rd_addr : l_rd_addr;
  assign m_wr_en   = l_wr_en | syn_we;
  assign m_wr_addr = l_wr_en ? l_wr_addr : syn_waddr;
  assign m_wr_mask = l_wr_en ? l_wr_mask : '1;
  assign m_wr_data = l_wr_en ? l_wr_data : syn_wdata;

  synapse_mem #(.N(N), .K(K), .W_W(W_W)) u_mem (
    .clk, .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_data(m_rd_data),
    .wr_en(m_wr_en), .wr_addr(m_wr_addr), .wr_mask(m_wr_mask), .wr_data(m_wr_data)
  );

  for (genvar n = 0; n < int'(N); n++) begin : g_neuron
    logic [V_W:0] vmem_unused;
    lif_neuron #(.W_W(W_W), .V_W(V_W), .REF_W(REF_W)) u_lif (
      .clk, .rst_n,
      .syn_valid (syn_valid),
      .weight    (m_rd_data[n]),
      .leak_en, .fire_en, .threshold, .leak_val, .ref_period,
      .spike_o   (o_spk[n]),
      .vmem_o    (vmem_unused),
      .refractory_o(refractory[n])
    );
  end

  assign o_spk_valid = upload;
  assign learning    = l_busy;
  assign have_event_o = have_event;

endmodule
