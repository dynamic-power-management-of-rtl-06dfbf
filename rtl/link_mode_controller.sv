// link_mode_controller: bandwidth-demand adaptive mode of one router-to-router
// link.
//
// A link has four modes built from two controls, driver swing and width:
//     S0 full swing, full width   S1 low swing, full width
//     S2 full swing, half width   S3 low swing, half width
// The mode word is {half_width, low_swing}. Modes are ordered S0 (most
// bandwidth, most power) to S3 (least). The controller sits at the upstream
// end of the link. A step up (towards S0) is requested by the upstream
// router when its own buffer is filling or it starts sending a burst on the
// link; a step down (towards S3) is requested by the downstream router when
// its buffer is filling, since a faster link would only feed a full buffer.
// Requests are sampled over a HOLD-cycle period and at most one step is
// taken per period; conflicting requests leave the mode unchanged.
//
// Interface: up_fill, up_burst (level/pulse inputs from the upstream
// router), down_fill (from the downstream router). mode, half_width and
// low_swing are registered; the link starts in S0.
//
// Following the document: the four modes and their encoding as a two-bit
// control word, up-steps initiated upstream and down-steps downstream, based
// on buffer filling and flow type. This design's choices: the ordering of
// S1 above S2, one step per period, HOLD and conflict handling. The low
// swing driver and receiver themselves are analog and not part of this RTL.
module link_mode_controller
  import noc_pkg::*;
#(
  parameter int unsigned HOLD = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       up_fill,
  input  logic       up_burst,
  input  logic       down_fill,
  output link_mode_e mode,
  output logic       half_width,
  output logic       low_swing,
  output logic       ev_up,
  output logic       ev_down
);
  logic [$clog2(HOLD)-1:0] cnt;
  logic up_seen, down_seen;
  logic period_end;
  assign period_end = (cnt == ($clog2(HOLD))'(HOLD - 1));

  logic up_r, down_r;
  assign up_r   = up_seen || up_fill || up_burst;
  assign down_r = down_seen || down_fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; up_seen <= 1'b0; down_seen <= 1'b0;
      mode <= LM_S0; ev_up <= 1'b0; ev_down <= 1'b0;
    end else begin
      ev_up   <= 1'b0;
      ev_down <= 1'b0;
      if (period_end) begin
        cnt <= '0; up_seen <= 1'b0; down_seen <= 1'b0;
        if (up_r && !down_r && mode != LM_S0) begin
          mode  <= link_mode_e'(mode - 2'd1);
          ev_up <= 1'b1;
        end else if (down_r && !up_r && mode != LM_S3) begin
          mode    <= link_mode_e'(mode + 2'd1);
          ev_down <= 1'b1;
        end
      end else begin
        cnt       <= cnt + 1'b1;
        up_seen   <= up_r;
        down_seen <= down_r;
      end
    end
  end

  assign low_swing  = mode[0];
  assign half_width = mode[1];

endmodule
