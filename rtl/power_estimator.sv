// power_estimator: event-based energy accounting of one router over a power
// window.
//
// Each cycle the router reports how many buffer writes, buffer reads, route
// computations and crossbar traversals happened and how many flits left on
// its links at full or at low swing. The estimator multiplies the counts by
// fixed per-event energies (the router energy table in noc_pkg, 0.01 pJ
// units) and adds a per-cycle static energy that depends on the flow-control
// state: normal, clock-gated throttle, or power-gated off (the off value
// comes in from the caller, because it depends on how many buffer blocks are
// still occupied). The energy accumulated so far in the window is the 'P'
// the flow-control thresholds are compared against; it restarts at zero
// after the last cycle of each window, when the total is kept as
// last_energy.
//
// Timing: win_pos counts 0..WINDOW-1; window_end is high during the last
// cycle; energy and last_energy are registered and include the events of
// the cycles before the current one.
//
// Following the document: event-based model, per-event energies, power
// window. This design's choices: the static energies per state, low-swing
// links costing half the full-swing bit energy, and counting every bit of
// the flit (header included) on the link.
module power_estimator
  import noc_pkg::*;
#(
  parameter int unsigned WINDOW            = 256,
  parameter int unsigned E_STATIC_ACTIVE   = 2000,
  parameter int unsigned E_STATIC_THROTTLE = 1000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          n_buf_wr,
  input  logic [2:0]          n_buf_rd,
  input  logic [2:0]          n_route,
  input  logic [2:0]          n_xbar,
  input  logic [2:0]          n_link_full,
  input  logic [2:0]          n_link_low,
  input  fc_state_e           fc_state,
  input  logic [15:0]         e_gated,       // static energy per cycle while off
  output logic [$clog2(WINDOW)-1:0] win_pos,
  output logic                window_end,
  output logic [ENERGY_W-1:0] energy,
  output logic [ENERGY_W-1:0] last_energy
);
  localparam int unsigned E_FLIT_LINK = FLIT_W * E_LINK_BIT;

  logic [ENERGY_W-1:0] cyc_e;

  always_comb begin
    cyc_e = ENERGY_W'(n_buf_wr) * ENERGY_W'(E_BUF_WRITE)
          + ENERGY_W'(n_buf_rd) * ENERGY_W'(E_BUF_READ)
          + ENERGY_W'(n_route)  * ENERGY_W'(E_ROUTE)
          + ENERGY_W'(n_xbar)   * ENERGY_W'(E_XBAR)
          + ENERGY_W'(n_link_full) * ENERGY_W'(E_FLIT_LINK)
          + ENERGY_W'(n_link_low)  * ENERGY_W'(E_FLIT_LINK / 2);
    unique case (fc_state)
      FC_THROTTLE: cyc_e = cyc_e + ENERGY_W'(E_STATIC_THROTTLE);
      FC_OFF:      cyc_e = cyc_e + ENERGY_W'(e_gated);
      default:     cyc_e = cyc_e + ENERGY_W'(E_STATIC_ACTIVE);
    endcase
  end

  assign window_end = (win_pos == ($clog2(WINDOW))'(WINDOW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_pos     <= '0;
      energy      <= '0;
      last_energy <= '0;
    end else if (window_end) begin
      win_pos     <= '0;
      energy      <= '0;
      last_energy <= energy + cyc_e;
    end else begin
      win_pos     <= win_pos + 1'b1;
      energy      <= energy + cyc_e;
    end
  end

endmodule
