// ni_decoder: network-interface decoder between a router's local output and the
// core.
//
// Spike flits (type "11") are decoded into the K-bit presynaptic spike vector of the
// core. Where a flit's 64 spikes land is set by a mapping table indexed by the
// flit's source address and segment number: each entry holds an enable bit and the
// 64-bit slot of the core's input vector the segment is ORed into. Decoding works in
// a spike arrival window (SAW): the first spike flit starts a countdown of saw_len
// cycles; it and the flits arriving in those saw_len cycles are decoded, flits
// arriving after the count reaches zero are dropped and flagged on late_o. When the count reaches zero and the core
// is ready (core_ready), the decoded vector is delivered with out_valid for one
// cycle and the window is reset. The enable bits are cleared at reset. Configuration flits (type "00") write the mapping
// table: spikes[10:0] give the entry index {src, seg} and spikes[13:11] the entry
// {enable, slot}. The host port cfg_we/cfg_idx/cfg_entry writes the same table.
// The table layout, the configuration flit payload and the window counted in clock
// cycles are this design's choices.
module ni_decoder
  import nash_pkg::*;
#(
  parameter int unsigned K = 256,
  localparam int unsigned NSLOT = (K + SEG_W - 1) / SEG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  link_t        flit_i,
  input  logic  [15:0] saw_len,
  input  logic         core_ready,
  output logic         out_valid,
  output logic [K-1:0] out_spk,
  output logic         late_o,       // a flit arrived after its window closed
  output logic         window_o,     // window open
  output logic         pending_o,    // window closed, vector waits for the core
  input  logic         cfg_we,
  input  logic  [10:0] cfg_idx,
  input  logic   [2:0] cfg_entry
);

  typedef enum logic [1:0] {D_IDLE, D_WINDOW, D_DELIVER} dec_state_e;

  logic [1:0]    map_slot_q [2048];   // no reset: only read where enabled
  logic [2047:0] map_en_q;            // cleared at reset
  dec_state_e st_q;
  logic [15:0] cnt_q;
  logic [NSLOT*SEG_W-1:0] acc_q;

  logic        is_spk, is_cfg;
  logic [10:0] idx;
  logic [2:0]  entry;
  assign is_spk = flit_i.valid && (flit_i.flit.ftype == FT_SPIKE);
  assign is_cfg = flit_i.valid && (flit_i.flit.ftype == FT_CFG);
  assign idx    = {flit_i.flit.src, flit_i.flit.tstamp.seg};
  assign entry  = {map_en_q[idx], map_slot_q[idx]};

  logic        tbl_we;
  logic [10:0] tbl_idx;
  logic [2:0]  tbl_entry;
  assign tbl_we    = is_cfg || cfg_we;
  assign tbl_idx   = is_cfg ? flit_i.flit.spikes[10:0]  : cfg_idx;
  assign tbl_entry = is_cfg ? flit_i.flit.spikes[13:11] : cfg_entry;

  always_ff @(posedge clk) begin
    if (tbl_we) map_slot_q[tbl_idx] <= tbl_entry[1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      map_en_q <= '0;
    else if (tbl_we) map_en_q[tbl_idx] <= tbl_entry[2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= D_IDLE;
      cnt_q  <= '0;
      acc_q  <= '0;
      late_o <= 1'b0;
    end else begin
      late_o <= 1'b0;
      unique case (st_q)
        D_IDLE: if (is_spk) begin
          if (entry[2]) acc_q[entry[1:0]*SEG_W +: SEG_W] <= flit_i.flit.spikes;
          cnt_q <= saw_len;
          st_q  <= (saw_len == 16'd0) ? D_DELIVER : D_WINDOW;
        end
        D_WINDOW: begin
          if (is_spk && entry[2])
            acc_q[entry[1:0]*SEG_W +: SEG_W] <= acc_q[entry[1:0]*SEG_W +: SEG_W] | flit_i.flit.spikes;
          if (cnt_q <= 16'd1) st_q <= D_DELIVER;
          cnt_q <= cnt_q - 1'b1;
        end
        D_DELIVER: begin
          if (is_spk) late_o <= 1'b1;
          if (core_ready) begin
            acc_q <= '0;
            st_q  <= D_IDLE;
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

  assign out_valid = (st_q == D_DELIVER) && core_ready;
  assign out_spk   = acc_q[K-1:0];
  assign window_o  = (st_q == D_WINDOW);
  assign pending_o = (st_q == D_DELIVER);

endmodule
