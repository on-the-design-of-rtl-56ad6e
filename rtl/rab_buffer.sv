// rab_buffer: random access input buffer (RAB) of one router input port, with its
// buffer controller.
//
// Incoming flits (in.valid) are written into any free slot (buffer-writing stage).
// In the next cycle the slot written last is offered to the routing calculation
// (rc_valid/rc_link) and its result, the output-port mask and the fault-flag mask,
// is stored with it. Routed slots are then offered to the switch allocator one at a
// time on sel_*: normally the oldest one. The controller times how long the offered
// slot has waited without any grant; after TIMEOUT cycles it declares the slot
// blocked and offers instead the oldest other slot whose requested ports differ, so
// that a blocked head flit cannot hold up the flits behind it. Each grant clears the
// granted ports from the slot's request; a slot with no port left is freed, which
// also restarts the timer so the blocked flit is tried again. stall_o (the stall/go
// flow control) is high while fewer than STALL_FREE slots are free, which covers the
// flits already in flight between an upstream grant and the write here.
// deadlock_o pulses when the offered flit is declared blocked. The buffer's own
// fault detection, which the document also gives the RAB, is not modelled.
module rab_buffer
  import nash_pkg::*;
#(
  parameter int unsigned DEPTH      = 8,
  parameter int unsigned TIMEOUT    = 16,
  parameter int unsigned STALL_FREE = 3,
  localparam int unsigned SW        = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  link_t            in,
  output logic             stall_o,
  // routing calculation
  output logic             rc_valid,
  output link_t            rc_link,
  input  logic [NPORT-1:0] rc_mask,
  input  logic [NPORT-1:0] rc_bf,
  // switch allocation
  output logic             sel_valid,
  output logic [NPORT-1:0] sel_req,
  output logic [NPORT-1:0] sel_bf,
  output link_t            sel_link,
  input  logic [NPORT-1:0] grant,
  output logic             deadlock_o
);

  link_t            data_q   [DEPTH];
  logic [DEPTH-1:0] used_q, routed_q;
  logic [NPORT-1:0] req_q    [DEPTH];
  logic [NPORT-1:0] bf_q     [DEPTH];
  logic [DEPTH-1:0] older_q  [DEPTH];   // older_q[i][j]: slot i written before slot j
  logic             rc_pend_q;
  logic [SW-1:0]    rc_slot_q;
  logic [$clog2(TIMEOUT+1)-1:0] timer_q;

  // free slot for writing: lowest free index
  logic [SW-1:0] wr_slot;
  logic          has_free;
  int unsigned   nfree;
  always_comb begin
    wr_slot  = '0;
    has_free = 1'b0;
    nfree    = 0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (!used_q[i]) begin
        wr_slot  = SW'(i);
        has_free = 1'b1;
        nfree++;
      end
    end
  end
  assign stall_o = (nfree < STALL_FREE);

  // oldest routed slot, and oldest routed slot with a different request
  logic [DEPTH-1:0] elig;
  logic [SW-1:0]    old_slot, alt_slot;
  logic             old_ok, alt_ok;
  assign elig = used_q & routed_q;
  always_comb begin
    old_slot = '0; old_ok = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      logic is_oldest;
      is_oldest = elig[i];
      for (int j = 0; j < int'(DEPTH); j++)
        if (j != i && elig[j] && older_q[j][i]) is_oldest = 1'b0;
      if (is_oldest) begin old_slot = SW'(i); old_ok = 1'b1; end
    end
    alt_slot = '0; alt_ok = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      logic cand;
      cand = elig[i] && old_ok && (SW'(i) != old_slot) && (req_q[i] != req_q[old_slot]);
      for (int j = 0; j < int'(DEPTH); j++)
        if (j != i && elig[j] && (SW'(j) != old_slot) && (req_q[j] != req_q[old_slot])
            && older_q[j][i]) cand = 1'b0;
      if (cand) begin alt_slot = SW'(i); alt_ok = 1'b1; end
    end
  end

  logic          blocked, use_alt;
  logic [SW-1:0] sel_slot;
  assign blocked  = (timer_q >= ($bits(timer_q))'(TIMEOUT));
  assign use_alt  = blocked && alt_ok;
  assign sel_slot = use_alt ? alt_slot : old_slot;

  assign sel_valid = old_ok;
  assign sel_req   = req_q[sel_slot];
  assign sel_bf    = bf_q[sel_slot];
  assign sel_link  = data_q[sel_slot];

  assign rc_valid  = rc_pend_q;
  assign rc_link   = data_q[rc_slot_q];

  logic gnt_any;
  assign gnt_any = sel_valid && ((grant & sel_req) != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q     <= '0;
      routed_q   <= '0;
      rc_pend_q  <= 1'b0;
      rc_slot_q  <= '0;
      timer_q    <= '0;
      deadlock_o <= 1'b0;
      for (int i = 0; i < int'(DEPTH); i++) begin
        older_q[i] <= '0;
        req_q[i]   <= '0;
        bf_q[i]    <= '0;
      end
    end else begin
      deadlock_o <= 1'b0;
      // buffer writing
      rc_pend_q <= in.valid && has_free;
      if (in.valid && has_free) begin
        data_q[wr_slot]   <= in;
        used_q[wr_slot]   <= 1'b1;
        routed_q[wr_slot] <= 1'b0;
        rc_slot_q         <= wr_slot;
        for (int j = 0; j < int'(DEPTH); j++) begin
          older_q[wr_slot][j] <= 1'b0;
          if (j != int'(wr_slot)) older_q[j][wr_slot] <= 1'b1;
        end
      end
      // routing calculation result
      if (rc_pend_q) begin
        req_q[rc_slot_q]    <= rc_mask;
        bf_q[rc_slot_q]     <= rc_bf;
        routed_q[rc_slot_q] <= 1'b1;
        if (rc_mask == '0) used_q[rc_slot_q] <= 1'b0;   // nowhere to go: dropped
      end
      // switch allocation result
      if (gnt_any) begin
        req_q[sel_slot] <= req_q[sel_slot] & ~grant;
        if ((req_q[sel_slot] & ~grant) == '0) begin
          used_q[sel_slot]   <= 1'b0;
          routed_q[sel_slot] <= 1'b0;
        end
      end
      // deadlock timer
      if (!old_ok || (gnt_any && (!use_alt || ((req_q[sel_slot] & ~grant) == '0))))
        timer_q <= '0;
      else if (!blocked) begin
        timer_q <= timer_q + 1'b1;
        if (timer_q == ($bits(timer_q))'(TIMEOUT - 1)) deadlock_o <= 1'b1;
      end
    end
  end

endmodule
