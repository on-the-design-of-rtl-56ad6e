// stdp_learning: trace-based STDP learning module with the parallel weight update
// (PWU).
//
// Every time step, step_en stores the core's presynaptic spike array (K bits) and
// postsynaptic spike array (N bits) into 16-entry circular memories addressed by a
// 4-bit time-step counter, as the document describes. The 16 stored presynaptic
// arrays are split into the 8 older ones ("Before") and the 8 newer ones ("After")
// relative to the postsynaptic array stored 8 steps ago, which is the newest step of
// the Before group; each group is ORed into one array. Choosing that reference step
// is this design's reading of the document's grouping. learn_valid is high when
// learning is enabled, that postsynaptic array has a spike and either group has one.
// start begins the update: the Before events and then the After events are taken one
// at a time by a one-hot step, and for each the synapse word at that presynaptic
// address is read (first cycle) and written back (second cycle), adding ltp_step to
// (Before) or subtracting ltd_step from (After) the weights of every postsynaptic
// neuron that spiked, in all banks at once, with saturation to the signed 8-bit
// range. done pulses for one cycle when no event is left; a start with nothing to do
// gives done in the next cycle. The memory has a one-cycle read latency.
module stdp_learning
  import nash_pkg::*;
#(
  parameter int unsigned K   = 256,
  parameter int unsigned N   = 256,
  parameter int unsigned W_W = WEIGHT_W,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   step_en,
  input  logic           [K-1:0] pre_vec,
  input  logic           [N-1:0] post_vec,
  input  logic                   learn_en,
  input  logic         [W_W-1:0] ltp_step,
  input  logic         [W_W-1:0] ltd_step,
  output logic                   learn_valid,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   rd_en,
  output logic          [AW-1:0] rd_addr,
  input  logic [N-1:0][W_W-1:0]  rd_data,
  output logic                   wr_en,
  output logic          [AW-1:0] wr_addr,
  output logic           [N-1:0] wr_mask,
  output logic [N-1:0][W_W-1:0]  wr_data
);

  localparam int unsigned DEPTH = 16;

  logic [K-1:0] pre_hist  [DEPTH];
  logic [N-1:0] post_hist [DEPTH];
  logic   [3:0] tcnt_q;               // next entry to write

  // After a store at index t = tcnt_q-1: Before = t-15 .. t-8, After = t-7 .. t.
  logic   [3:0] ref_idx;
  logic [K-1:0] before_or, after_or;
  logic [N-1:0] post_ref;

  assign ref_idx  = tcnt_q - 4'd9;     // t - 8
  assign post_ref = post_hist[ref_idx];

  always_comb begin
    before_or = '0;
    after_or  = '0;
    for (int d = 0; d < 8; d++) begin
      before_or |= pre_hist[4'(ref_idx - 4'(d))];
      after_or  |= pre_hist[4'(ref_idx + 4'(d) + 4'd1)];
    end
  end

  assign learn_valid = learn_en && (post_ref != '0) && ((before_or | after_or) != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) begin
        pre_hist[i]  <= '0;
        post_hist[i] <= '0;
      end
    end else if (step_en) begin
      pre_hist[tcnt_q]  <= pre_vec;
      post_hist[tcnt_q] <= post_vec;
      tcnt_q            <= tcnt_q + 1'b1;
    end
  end

  // ---------------------------------------------------------------- PWU engine
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} pwu_state_e;
  pwu_state_e   st_q;
  logic [K-1:0] bef_q, aft_q;
  logic [N-1:0] mask_q;
  logic         phase_aft;            // current address belongs to the After group
  logic [AW-1:0] addr_q;

  logic [K-1:0] cur_vec, onehot;
  logic [AW-1:0] idx;
  assign cur_vec = (bef_q != '0) ? bef_q : aft_q;
  assign onehot  = cur_vec & (~cur_vec + 1'b1);
  always_comb begin
    idx = '0;
    for (int i = 0; i < int'(K); i++) if (onehot[i]) idx = AW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      bef_q     <= '0;
      aft_q     <= '0;
      mask_q    <= '0;
      phase_aft <= 1'b0;
      addr_q    <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          bef_q  <= before_or;
          aft_q  <= after_or;
          mask_q <= post_ref;
          if (learn_valid) st_q <= S_READ;
          else             done <= 1'b1;
        end
        S_READ: begin
          if (cur_vec == '0) begin
            st_q <= S_IDLE;
            done <= 1'b1;
          end else begin
            addr_q    <= idx;
            phase_aft <= (bef_q == '0);
            if (bef_q != '0) bef_q <= bef_q & ~onehot;
            else             aft_q <= aft_q & ~onehot;
            st_q <= S_WRITE;
          end
        end
        S_WRITE: st_q <= S_READ;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy    = (st_q != S_IDLE);
  assign rd_en   = (st_q == S_READ) && (cur_vec != '0);
  assign rd_addr = idx;
  assign wr_en   = (st_q == S_WRITE);
  assign wr_addr = addr_q;
  assign wr_mask = mask_q;

  always_comb begin
    for (int b = 0; b < int'(N); b++) begin
      logic signed [W_W:0] s;
      if (phase_aft) s = $signed({rd_data[b][W_W-1], rd_data[b]}) - $signed({1'b0, ltd_step});
      else           s = $signed({rd_data[b][W_W-1], rd_data[b]}) + $signed({1'b0, ltp_step});
      if (s > $signed({2'b00, {(W_W-1){1'b1}}}))       wr_data[b] = {1'b0, {(W_W-1){1'b1}}};
      else if (s < $signed({2'b11, {(W_W-1){1'b0}}}))  wr_data[b] = {1'b1, {(W_W-1){1'b0}}};
      else                                             wr_data[b] = s[W_W-1:0];
    end
  end

endmodule
