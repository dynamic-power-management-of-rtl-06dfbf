// flow_control_fsm: early-notification flow control of a router under a
// power budget.
//
// Four states. Begin: no restriction. Notify: entered when the window energy
// P reaches the notify threshold; the router tells its neighbours, accepts
// no new packets and starts no new packets, but finishes the packets already
// in flight so that no wormhole packet is left stretched across routers.
// Throttle: entered from Notify when P reaches the throttle threshold while
// BurstMode is set (late in the window); the router is clocked but moves no
// flit. Off: entered from Notify when P reaches the throttle threshold
// without BurstMode (early in the window), and from Throttle when BurstMode
// drops; everything except the buffers is power gated. Throttle and Off
// return to Begin at the end of the power window.
//
// Timing: one registered state, transitions on the clock edge after the
// condition is seen. Outputs are decoded from the state.
//
// Following the document: the four states and the transitions
// Begin->Notify (P >= Pnotify), Notify->Throttle (P >= Pth and BurstMode),
// Notify->Off (P >= Pth and not BurstMode), Throttle/Off->Begin at window
// end. This design's choices: Notify also returns to Begin at window end so
// a router that stays below Pth is not held in Notify; Throttle moves to Off
// when BurstMode is clear (the adaptive rule that a long remaining throttle
// is cheaper power gated).
module flow_control_fsm
  import noc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ENERGY_W-1:0] p_est,
  input  logic [ENERGY_W-1:0] p_notify,
  input  logic [ENERGY_W-1:0] p_th,
  input  logic                burst_mode,
  input  logic                window_end,
  output fc_state_e           state,
  output logic                accept_new,   // new packets may enter / leave
  output logic                move_flits,   // switch and links active
  output logic                notify,       // notify signal to neighbours
  output logic                gated         // power-gated (Off)
);
  fc_state_e nxt;

  always_comb begin
    nxt = state;
    unique case (state)
      FC_BEGIN:    if (p_est >= p_notify) nxt = FC_NOTIFY;
      FC_NOTIFY:   if (p_est >= p_th)     nxt = burst_mode ? FC_THROTTLE : FC_OFF;
                   else if (window_end)   nxt = FC_BEGIN;
      FC_THROTTLE: if (window_end)        nxt = FC_BEGIN;
                   else if (!burst_mode)  nxt = FC_OFF;
      FC_OFF:      if (window_end)        nxt = FC_BEGIN;
      default:                            nxt = FC_BEGIN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= FC_BEGIN;
    else        state <= nxt;

  assign accept_new = (state == FC_BEGIN);
  assign move_flits = (state == FC_BEGIN) || (state == FC_NOTIFY);
  assign notify     = (state != FC_BEGIN);
  assign gated      = (state == FC_OFF);

endmodule
