// burst_mode_selector: decides between clock-gated throttle and power-gated
// off for a router that hits its throttle threshold.
//
// Power gating saves (P_throttle - P_gated) per cycle but costs a fixed
// wake-up energy E_pg, so it only pays when more than E_pg/(P_throttle -
// P_gated) cycles of the window remain. The break-even position is
//     T_threshold = WINDOW - E_pg / (P_throttle - P_gated)
// and BurstMode is set while the window position is beyond it: the router
// will be back soon, so a plain throttle is better. P_gated depends on the
// router state (here: how many buffer blocks still hold flits and stay
// powered), so both P_gated and T_threshold are tabulated per occupancy
// level at elaboration: P_gated(b) = E_OFF_BASE + b * E_OFF_PER_BLOCK.
//
// Interface: win_pos from the power estimator, occ_blocks = number of
// occupied buffer blocks. Outputs are combinational: burst_mode,
// t_threshold and the gated per-cycle energy e_gated (fed back to the power
// estimator).
//
// Following the document: the threshold formula, the timer comparison and
// the tabulated gated power. This design's choices: the occupancy measure
// and all energy values.
module burst_mode_selector
  import noc_pkg::*;
#(
  parameter int unsigned WINDOW            = 256,
  parameter int unsigned NUM_BLOCKS        = 4,
  parameter int unsigned E_PG_OVERHEAD     = 50000,
  parameter int unsigned E_STATIC_THROTTLE = 1000,
  parameter int unsigned E_OFF_BASE        = 200,
  parameter int unsigned E_OFF_PER_BLOCK   = 100
) (
  input  logic [$clog2(WINDOW)-1:0]     win_pos,
  input  logic [$clog2(NUM_BLOCKS+1)-1:0] occ_blocks,
  output logic                          burst_mode,
  output logic [$clog2(WINDOW)-1:0]     t_threshold,
  output logic [15:0]                   e_gated
);
  localparam int unsigned PW = $clog2(WINDOW);

  function automatic int unsigned gated_e(int unsigned b);
    return E_OFF_BASE + b * E_OFF_PER_BLOCK;
  endfunction

  // Break-even position; clamped to 0 when gating never pays in a window.
  function automatic int unsigned thr(int unsigned b);
    int unsigned diff, cyc;
    diff = (E_STATIC_THROTTLE > gated_e(b)) ? E_STATIC_THROTTLE - gated_e(b) : 0;
    cyc  = (diff == 0) ? WINDOW : (E_PG_OVERHEAD + diff - 1) / diff;
    return (cyc >= WINDOW) ? 0 : WINDOW - cyc;
  endfunction

  logic [PW-1:0] thr_tab [NUM_BLOCKS+1];
  logic [15:0]   eg_tab  [NUM_BLOCKS+1];

  always_comb begin
    for (int unsigned b = 0; b <= NUM_BLOCKS; b++) begin
      thr_tab[b] = PW'(thr(b));
      eg_tab[b]  = 16'(gated_e(b));
    end
  end

  logic [$clog2(NUM_BLOCKS+1)-1:0] occ_c;
  assign occ_c       = (occ_blocks > NUM_BLOCKS[$clog2(NUM_BLOCKS+1)-1:0]) ?
                       NUM_BLOCKS[$clog2(NUM_BLOCKS+1)-1:0] : occ_blocks;
  assign t_threshold = thr_tab[occ_c];
  assign e_gated     = eg_tab[occ_c];
  assign burst_mode  = (win_pos > t_threshold);

endmodule
