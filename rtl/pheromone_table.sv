// pheromone_table: per-link pheromone strengths that steer the ants of the
// distributed power-budget sharing scheme.
//
// Each router-to-router link i has two values: tau_p[i] (power pheromone,
// followed by power ants) and tau_b[i] (beggar pheromone, followed by beggar
// ants). Ants reinforce the pheromone of the other kind: a beggar ant that
// arrives on link i raises tau_p[i], so power ants later head to where the
// demand came from, and a power ant raises tau_b[i]. The reinforcement is
//     f = K * (1 - h/TTL)^2 * share / P_ALLOC
// where K stands for the product C*alpha*beta of the document's constants,
// h is the ant's hop count, TTL the ants' time to live and P_ALLOC the
// budget allocated to each router; information from far away counts less.
// Every DT cycles all values evaporate: tau <- tau*(1 - 2^-RHO_SHIFT).
// Evaporation and a reinforcement in the same cycle combine as
// tau*(1-rho) + f. Values saturate at all ones and start at zero.
//
// Link choice (combinational): best_p / best_b is the enabled link with the
// highest pheromone, lowest index on a tie; when every enabled link is at
// zero the choice is random, starting from input rnd, like an ant that has
// no trail to follow.
//
// Timing: the update is applied at the clock edge (one cycle, as the
// document states the add/update fits in the routing cycle).
//
// Following the document: two pheromones per link, cross reinforcement, the
// reinforcement and evaporation formulas, zero initial values, forwarding to
// the strongest link. This design's choices: fixed-point scaling, rho as a
// power of two, the evaporation period and the random tie-break at zero.
module pheromone_table
  import noc_pkg::*;
#(
  parameter int unsigned NL        = NLINKS,
  parameter int unsigned TAU_W     = 16,
  parameter int unsigned TTL       = 8,
  parameter int unsigned K_P       = 256,
  parameter int unsigned K_B       = 256,
  parameter longint unsigned P_ALLOC = 64'd26000000,
  parameter int unsigned RHO_SHIFT = 3,
  parameter int unsigned DT        = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 upd_valid,
  input  logic [LINK_W-1:0]    upd_link,
  input  ant_type_e            upd_kind,    // kind of the ant that arrived
  input  logic [HOP_W-1:0]     upd_hop,
  input  logic [SHARE_W-1:0]   upd_share,
  input  logic [NL-1:0]        link_mask,
  input  logic [LINK_W-1:0]    rnd,
  output logic [TAU_W-1:0]     tau_p [NL],
  output logic [TAU_W-1:0]     tau_b [NL],
  output logic [LINK_W-1:0]    best_p,
  output logic [LINK_W-1:0]    best_b,
  output logic                 evap_tick
);
  localparam longint unsigned TAU_MAX = (64'd1 << TAU_W) - 1;

  logic [$clog2(DT)-1:0] dt_cnt;
  assign evap_tick = (dt_cnt == ($clog2(DT))'(DT - 1));

  // reinforcement amount for the incoming ant
  logic [63:0] f;
  always_comb begin
    longint unsigned rem;
    rem = (upd_hop >= TTL) ? 0 : longint'(TTL - upd_hop);
    f   = (64'(K_P) * rem * rem * 64'(upd_share)) / (64'(TTL) * 64'(TTL) * P_ALLOC);
    if (upd_kind == ANT_POWER)
      f = (64'(K_B) * rem * rem * 64'(upd_share)) / (64'(TTL) * 64'(TTL) * P_ALLOC);
  end

  function automatic logic [TAU_W-1:0] next_tau(logic [TAU_W-1:0] cur, logic evap,
                                                logic add, logic [63:0] amount);
    logic [63:0] v;
    v = 64'(cur);
    if (evap) v = v - (v >> RHO_SHIFT);
    if (add)  v = v + amount;
    if (v > TAU_MAX) v = TAU_MAX;
    return v[TAU_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dt_cnt <= '0;
      for (int i = 0; i < NL; i++) begin
        tau_p[i] <= '0;
        tau_b[i] <= '0;
      end
    end else begin
      dt_cnt <= evap_tick ? '0 : dt_cnt + 1'b1;
      for (int i = 0; i < NL; i++) begin
        // a beggar ant on link i reinforces the power pheromone of link i
        tau_p[i] <= next_tau(tau_p[i], evap_tick,
                             upd_valid && upd_link == LINK_W'(i) && upd_kind == ANT_BEGGAR, f);
        // a power ant on link i reinforces the beggar pheromone of link i
        tau_b[i] <= next_tau(tau_b[i], evap_tick,
                             upd_valid && upd_link == LINK_W'(i) && upd_kind == ANT_POWER, f);
      end
    end
  end

  function automatic logic [LINK_W-1:0] pick(logic [TAU_W-1:0] t [NL], logic [NL-1:0] m,
                                             logic [LINK_W-1:0] r);
    logic [LINK_W-1:0] b;
    logic [TAU_W-1:0]  bv;
    logic              found;
    int                j;
    b = '0; bv = '0; found = 1'b0;
    for (int i = 0; i < NL; i++)
      if (m[i] && (!found || t[i] > bv)) begin
        b = LINK_W'(i); bv = t[i]; found = 1'b1;
      end
    if (found && bv == '0) begin
      // no trail: random enabled link, searching upward from r
      found = 1'b0;
      for (int k = 0; k < NL; k++) begin
        j = (int'(r) + k) % NL;
        if (!found && m[j]) begin
          b = LINK_W'(j); found = 1'b1;
        end
      end
    end
    return b;
  endfunction

  assign best_p = pick(tau_p, link_mask, rnd);
  assign best_b = pick(tau_b, link_mask, rnd);

endmodule
