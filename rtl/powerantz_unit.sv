// powerantz_unit: one router's share of the ant-based distributed power
// budget sharing scheme.
//
// The unit owns the router's power budget Pb (energy per power window). At
// the end of every window it looks at the energy Pa actually spent:
//  * if the router was throttled during the window it is starving: it sends
//    k beggar ants, each asking for delta- = Pb/(ETA*k), and records the
//    total demand;
//  * if Pa is below Pb by more than SURPLUS_MARGIN and a beggar ant has
//    reached it since its last donation, it sends k power ants, each giving
//    delta+ = (Pb-Pa)/k, and lowers its own budget by what it gave.
// k is random in 1..n, n being the number of links the router has.
// When an ant arrives (one per cycle, round robin over the links) its hop
// count is incremented and the pheromone of the other kind is reinforced for
// the arrival link. A power ant at a starving router raises Pb by as much of
// its share as is still demanded and travels on with the rest; a beggar ant
// at a router with surplus is consumed and marks the router to send power
// ants. Any other ant is forwarded, power ants on the link with the highest
// power pheromone and beggar ants on the link with the highest beggar
// pheromone, until its hop count reaches TTL.
//
// Interface: valid/ready ant channels per link (ant_t), window_end and
// last_energy from the power estimator, the flow-control state, and the
// budget output that sets the router's throttle thresholds. Outgoing ants
// wait in a 4-entry queue; one leaves per cycle. Event outputs pulse for
// one cycle for statistics.
//
// Following the document: two ant kinds, the generation rule (surplus with
// a received beggar ant, or throttled), delta+ and delta-, random k, hop
// increment and kill at the limit, cross pheromone update, consumption and
// forwarding rules. The consumption flowchart prints the beggar-ant branch
// with 'Surplus? NO' leading to 'Mark for Power Ant sending'; this design
// follows the text instead ('a power ant is generated if the router has
// surplus and it has received beggar ant'). This design's choices: ETA,
// TTL, SURPLUS_MARGIN, the queue size, dropping the share of a power ant
// that dies, and clearing the demand when a window ends unthrottled.
module powerantz_unit
  import noc_pkg::*;
#(
  parameter int unsigned    NL             = NLINKS,
  parameter int unsigned    TTL            = 8,
  parameter int unsigned    ETA            = 4,
  parameter longint unsigned P_ALLOC       = 64'd26000000,
  parameter int unsigned    SURPLUS_MARGIN = 2000000,
  parameter int unsigned    RHO_SHIFT      = 3,
  parameter int unsigned    DT             = 64,
  parameter logic [15:0]    SEED           = 16'hACE1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NL-1:0]       link_mask,
  input  logic                window_end,
  input  logic [ENERGY_W-1:0] last_energy,
  input  fc_state_e           fc_state,
  input  logic                ant_in_valid  [NL],
  input  ant_t                ant_in        [NL],
  output logic                ant_in_ready  [NL],
  output logic                ant_out_valid [NL],
  output ant_t                ant_out       [NL],
  input  logic                ant_out_ready [NL],
  output logic [ENERGY_W-1:0] budget,
  output logic [ENERGY_W-1:0] demand,
  output logic                ev_gen_power,
  output logic                ev_gen_beggar,
  output logic                ev_grant,
  output logic                ev_mark,
  output logic                ev_forward,
  output logic                ev_kill
);
  localparam int unsigned QD = 4;
  localparam int unsigned TAU_W = 16;

  // ---------------- random source ----------------
  logic [15:0] lfsr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= SEED;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  // ---------------- pheromones ----------------
  logic              upd_valid;
  logic [LINK_W-1:0] upd_link;
  ant_type_e         upd_kind;
  logic [HOP_W-1:0]  upd_hop;
  logic [SHARE_W-1:0] upd_share;
  logic [TAU_W-1:0]  tau_p [NL];
  logic [TAU_W-1:0]  tau_b [NL];
  logic [LINK_W-1:0] best_p, best_b;
  logic              evap_tick;

  pheromone_table #(.NL(NL), .TAU_W(TAU_W), .TTL(TTL), .P_ALLOC(P_ALLOC),
                    .RHO_SHIFT(RHO_SHIFT), .DT(DT)) u_pher (
    .clk, .rst_n, .upd_valid, .upd_link, .upd_kind, .upd_hop, .upd_share,
    .link_mask, .rnd(lfsr[LINK_W-1:0]), .tau_p, .tau_b, .best_p, .best_b, .evap_tick);

  // ---------------- output queue ----------------
  ant_t              q_ant  [QD];
  logic [LINK_W-1:0] q_link [QD];
  logic [$clog2(QD)-1:0] q_rd, q_wr;
  logic [$clog2(QD):0]   q_cnt;
  logic q_push, q_pop;
  ant_t              push_ant;
  logic [LINK_W-1:0] push_link;

  assign q_pop = (q_cnt != 0) && ant_out_ready[q_link[q_rd]];
  always_comb
    for (int i = 0; i < NL; i++) begin
      ant_out_valid[i] = (q_cnt != 0) && (q_link[q_rd] == LINK_W'(i));
      ant_out[i]       = q_ant[q_rd];
    end

  // ---------------- state ----------------
  logic             beggar_seen, throttled;
  logic [2:0]       gen_left;
  ant_type_e        gen_kind;
  logic [SHARE_W-1:0] gen_share;
  logic [LINK_W-1:0] rr;

  // surplus with respect to the last window
  logic surplus;
  assign surplus = (64'(last_energy) + 64'(SURPLUS_MARGIN) < 64'(budget));

  // ---------------- ant reception ----------------
  logic              acc;
  logic [LINK_W-1:0] sel;
  ant_t              a;
  logic [HOP_W-1:0]  hop1;
  logic [ENERGY_W-1:0] grant;
  logic              fwd;
  ant_t              fwd_ant;

  always_comb begin
    acc = 1'b0; sel = '0;
    for (int k = 0; k < NL; k++)
      if (!acc && ant_in_valid[(int'(rr) + k) % NL]) begin
        acc = 1'b1; sel = LINK_W'((int'(rr) + k) % NL);
      end
    // accept only when a forward could be queued
    if (q_cnt >= QD) acc = 1'b0;
    for (int i = 0; i < NL; i++) ant_in_ready[i] = acc && (sel == LINK_W'(i));

    a    = ant_in[sel];
    hop1 = (a.hop == '1) ? a.hop : a.hop + 1'b1;
    grant   = '0;
    fwd     = 1'b0;
    fwd_ant = a;
    fwd_ant.hop = hop1;
    if (a.kind == ANT_POWER) begin
      if (demand != 0) begin
        grant = (ENERGY_W'(a.share) < demand) ? ENERGY_W'(a.share) : demand;
        fwd_ant.share = a.share - SHARE_W'(grant);
        fwd = (fwd_ant.share != 0) && (hop1 < TTL);
      end else begin
        fwd = (hop1 < TTL);
      end
    end else begin
      fwd = !surplus && (hop1 < TTL);
    end

    upd_valid = acc;
    upd_link  = sel;
    upd_kind  = a.kind;
    upd_hop   = hop1;
    upd_share = a.share;
  end

  // ---------------- queue push: forwarding first, then generation -------
  logic gen_push;
  always_comb begin
    q_push    = 1'b0;
    gen_push  = 1'b0;
    push_ant  = fwd_ant;
    push_link = (fwd_ant.kind == ANT_POWER) ? best_p : best_b;
    if (acc && fwd) begin
      q_push = 1'b1;
    end else if (gen_left != 0 && q_cnt < QD) begin
      q_push    = 1'b1;
      gen_push  = 1'b1;
      push_ant  = '{kind: gen_kind, hop: '0, share: gen_share};
      push_link = (gen_kind == ANT_POWER) ? best_p : best_b;
    end
  end

  // ---------------- window-end generation decision ----------------
  logic [2:0] nlinks, kk;
  always_comb begin
    nlinks = '0;
    for (int i = 0; i < NL; i++) nlinks += 3'(link_mask[i]);
    kk = (nlinks == 0) ? 3'd1 : 3'(1 + (int'(lfsr[15:8]) % int'(nlinks)));
  end

  logic start_power, start_beggar;
  assign start_power  = window_end && !throttled && !(fc_state inside {FC_THROTTLE, FC_OFF})
                        && surplus && beggar_seen && gen_left == 0;
  assign start_beggar = window_end && (throttled || fc_state inside {FC_THROTTLE, FC_OFF})
                        && gen_left == 0;

  logic [ENERGY_W-1:0] give_each, ask_each;
  assign give_each = (budget - last_energy) / ENERGY_W'(kk);
  assign ask_each  = budget / (ENERGY_W'(ETA) * ENERGY_W'(kk));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      budget      <= ENERGY_W'(P_ALLOC);
      demand      <= '0;
      beggar_seen <= 1'b0;
      throttled   <= 1'b0;
      gen_left    <= '0;
      gen_kind    <= ANT_POWER;
      gen_share   <= '0;
      rr          <= '0;
      q_rd <= '0; q_wr <= '0; q_cnt <= '0;
      for (int i = 0; i < QD; i++) begin
        q_ant[i] <= '0; q_link[i] <= '0;
      end
    end else begin
      // queue
      if (q_push) begin
        q_ant[q_wr]  <= push_ant;
        q_link[q_wr] <= push_link;
        q_wr         <= q_wr + 1'b1;
      end
      if (q_pop) q_rd <= q_rd + 1'b1;
      q_cnt <= q_cnt + (q_push ? 1'b1 : 1'b0) - (q_pop ? 1'b1 : 1'b0);
      if (acc) rr <= sel + 1'b1;
      if (gen_push) gen_left <= gen_left - 1'b1;

      // throttled flag covers the whole window
      if (window_end) throttled <= 1'b0;
      else if (fc_state inside {FC_THROTTLE, FC_OFF}) throttled <= 1'b1;

      // beggar ant met while in surplus
      if (acc && a.kind == ANT_BEGGAR && surplus) beggar_seen <= 1'b1;

      // budget and demand
      begin
        logic [ENERGY_W-1:0] b, d;
        b = budget + grant;
        d = demand - grant;
        if (start_power) begin
          b = b - give_each * ENERGY_W'(kk);
          beggar_seen <= 1'b0;
          gen_left  <= kk;
          gen_kind  <= ANT_POWER;
          gen_share <= SHARE_W'(give_each);
        end else if (start_beggar) begin
          d = ask_each * ENERGY_W'(kk);
          gen_left  <= kk;
          gen_kind  <= ANT_BEGGAR;
          gen_share <= SHARE_W'(ask_each);
        end else if (window_end) begin
          d = '0;
        end
        budget <= b;
        demand <= d;
      end
    end
  end

  assign ev_gen_power  = gen_push && gen_kind == ANT_POWER;
  assign ev_gen_beggar = gen_push && gen_kind == ANT_BEGGAR;
  assign ev_grant      = acc && grant != 0;
  assign ev_mark       = acc && a.kind == ANT_BEGGAR && surplus;
  assign ev_forward    = acc && fwd;
  assign ev_kill       = acc && !fwd && !(a.kind == ANT_BEGGAR && surplus)
                         && !(a.kind == ANT_POWER && grant != 0 && fwd_ant.share == 0);

endmodule
