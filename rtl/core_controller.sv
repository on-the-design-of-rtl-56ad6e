// core_controller: the state machine that sequences one time step of the spiking
// neuron processing core.
//
// The seven states follow the document: IDLE waits for start; DWNLD waits for
// valid_spike and loads the presynaptic vector (load); COMP runs the crossbar until
// it signals xbar_last; LEAK applies the leak for one cycle; FIRE compares with the
// threshold for one cycle; UPLD hands the output spikes to the network interface for
// one cycle (upload) and stores the step's spike arrays for learning; LEARN starts
// the weight update when learn_valid holds (learn_start, one cycle) and waits for
// learn_done, otherwise returns to IDLE at once. step_done pulses when the core
// returns to IDLE. Waiting in LEARN for learn_done, rather than leaving after one
// cycle, is this design's choice, matching the prose that learning signals the
// controller when it has finished.
module core_controller
  import nash_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        valid_spike,
  input  logic        xbar_last,
  input  logic        learn_valid,
  input  logic        learn_done,
  output ctrl_state_e state,
  output logic        load,
  output logic        run,
  output logic        leak_en,
  output logic        fire_en,
  output logic        upload,
  output logic        learn_start,
  output logic        step_done
);

  ctrl_state_e nxt;
  logic        learn_first_q;

  always_comb begin
    nxt = state;
    unique case (state)
      CS_IDLE:  if (start)       nxt = CS_DWNLD;
      CS_DWNLD: if (valid_spike) nxt = CS_COMP;
      CS_COMP:  if (xbar_last)   nxt = CS_LEAK;
      CS_LEAK:                   nxt = CS_FIRE;
      CS_FIRE:                   nxt = CS_UPLD;
      CS_UPLD:                   nxt = CS_LEARN;
      CS_LEARN: if (!learn_valid && learn_first_q) nxt = CS_IDLE;
                else if (learn_done)               nxt = CS_IDLE;
      default:                   nxt = CS_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= CS_IDLE;
      learn_first_q <= 1'b0;
      step_done     <= 1'b0;
    end else begin
      state         <= nxt;
      learn_first_q <= (state == CS_UPLD);
      step_done     <= (state != CS_IDLE) && (nxt == CS_IDLE);
    end
  end

  assign load        = (state == CS_DWNLD) && valid_spike;
  assign run         = (state == CS_COMP);
  assign leak_en     = (state == CS_LEAK);
  assign fire_en     = (state == CS_FIRE);
  assign upload      = (state == CS_UPLD);
  assign learn_start = (state == CS_LEARN) && learn_first_q && learn_valid;

endmodule
