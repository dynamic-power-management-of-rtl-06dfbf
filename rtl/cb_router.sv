// cb_router: single-cycle mesh router with a centralized, power-managed
// buffer and router-level power budget control.
//
// Datapath. Five ports (N, E, S, W, local core). A flit accepted at an
// input is written into the shared central buffer and its slot number is
// queued in the input's virtual buffer. Each input keeps one pointer queue
// per output port (a 'set'), so a packet waiting for a busy output never
// blocks packets of the same input bound elsewhere. Routing is
// dimension-ordered XY on the destination coordinates, computed for the
// head flit and kept for the body. Each output picks an input round robin
// among the sets bound to it, then stays with that input until the tail
// (wormhole); it reads the flit straight from the central buffer, so a flit
// can leave in the cycle after it arrived.
//
// Power management, from the top down:
//  * powerantz_unit shares the power budget with other routers through
//    ants on a side channel per link, and sets this router's budget Pb.
//  * power_estimator adds up event energies over the power window; the
//    flow-control FSM compares them with Pnotify = Pb - Pb/2^NOTIFY_SHIFT
//    and Pth = Pb. In Notify the router takes and starts no new packet but
//    drains those in flight and raises notify_out, so neighbours hold new
//    packets for it; in Throttle or Off nothing moves. burst_mode_selector
//    chooses between Throttle and Off.
//  * block_power_manager powers buffer blocks on and off; the central
//    buffer packs flits into the fullest open block.
//  * flit_inversion_controller selects inverted storage for 1-dense
//    traffic.
//  * one link_mode_controller per output link picks the link mode; in a
//    half-width mode the output sends at most every other cycle (a flit
//    takes two beats on half the wires).
//
// Handshake: valid/ready on every data and ant channel; a transfer happens
// when both are high. in_ready and the output valids depend only on
// registered state, never combinationally on the other side's signals.
// Input p accepts a flit when the flow-control state allows it and it holds
// fewer flits than its quota: the open buffer slots divided evenly among the
// five inputs (at most IN_LIMIT, at least one). As a safety net an input also
// waits while fewer slots are free than inputs are under quota, which only
// happens just after a block was retired. Edge ports of a mesh are simply left unconnected.
//
// Lint note: a simulator that treats rd_slot and the port arrays as single
// signals may report a combinational loop between the output selection
// and the buffer read. The read slot is chosen from registered queue state
// and the read data feeds only the outputs, so no bit depends on itself.
//
// Following the document: centralized buffer with virtual buffers and sets
// per output, blocks with fullest-block allocation, the power management
// pieces listed above and how they act on the router. This design's
// choices: XY routing computed at the router itself (the document uses
// one-step look-ahead routing), no per-destination lines inside a set,
// single flit-wide buffer ports, IN_LIMIT, the notify threshold, FILL_HI,
// and rate-halving as the behaviour of a half-width link.
module cb_router
  import noc_pkg::*;
#(
  parameter int unsigned    X            = 0,
  parameter int unsigned    Y            = 0,
  parameter int unsigned    MESH_X       = 4,
  parameter int unsigned    MESH_Y       = 4,
  parameter int unsigned    NUM_BLOCKS   = 4,
  parameter int unsigned    BLOCK_SLOTS  = 8,
  parameter int unsigned    IN_LIMIT     = 8,
  parameter int unsigned    WINDOW       = 256,
  parameter longint unsigned P_ALLOC     = 64'd26000000,
  parameter int unsigned    NOTIFY_SHIFT = 5,
  parameter int unsigned    FILL_HI      = 24,
  parameter int unsigned    TTL          = 8,
  parameter int unsigned    BPM_TIMEOUT  = 128,
  parameter int unsigned    INV_T        = 64,
  parameter int unsigned    LINK_HOLD    = 16,
  parameter logic [15:0]    SEED         = 16'hACE1,
  localparam int unsigned   NSLOTS       = NUM_BLOCKS * BLOCK_SLOTS,
  localparam int unsigned   SW           = $clog2(NSLOTS),
  localparam int unsigned   QW           = $clog2(IN_LIMIT)
) (
  input  logic                clk,
  input  logic                rst_n,
  // flits
  input  logic                in_valid  [NPORTS],
  input  flit_t               in_flit   [NPORTS],
  output logic                in_ready  [NPORTS],
  output logic                out_valid [NPORTS],
  output flit_t               out_flit  [NPORTS],
  input  logic                out_ready [NPORTS],
  // neighbour status
  input  logic                notify_in [NLINKS],
  output logic                notify_out,
  input  logic                fill_in   [NLINKS],
  output logic                fill_out,
  // ants
  input  logic                ant_in_valid  [NLINKS],
  input  ant_t                ant_in        [NLINKS],
  output logic                ant_in_ready  [NLINKS],
  output logic                ant_out_valid [NLINKS],
  output ant_t                ant_out       [NLINKS],
  input  logic                ant_out_ready [NLINKS],
  // status
  output fc_state_e           fc_state,
  output logic [ENERGY_W-1:0] budget,
  output logic [ENERGY_W-1:0] window_energy,
  output logic [NUM_BLOCKS-1:0] blk_on,
  output logic                flip,
  output link_mode_e          link_mode [NLINKS],
  output logic [SW:0]         occupancy,
  output router_ev_t          ev
);
  // ---------------- mesh position ----------------
  localparam logic [NLINKS-1:0] LINK_MASK = {(X > 0), (Y < MESH_Y - 1), (X < MESH_X - 1), (Y > 0)};

  function automatic port_e xy_route(flit_t f);
    if (int'(f.dst_x) > X) return P_E;
    if (int'(f.dst_x) < X) return P_W;
    if (int'(f.dst_y) > Y) return P_S;
    if (int'(f.dst_y) < Y) return P_N;
    return P_L;
  endfunction

  // ---------------- power control signals ----------------
  logic accept_new, move_flits, fc_notify, fc_gated;
  logic burst_mode;
  logic [15:0] e_gated;
  logic [$clog2(WINDOW)-1:0] win_pos, t_threshold;
  logic window_end;
  logic [ENERGY_W-1:0] last_energy, demand;
  logic [NUM_BLOCKS-1:0] blk_open;
  logic [$clog2(NUM_BLOCKS+1)-1:0] occ_blocks, bpm_target, bpm_nopen;
  logic [SW:0] free_open;
  logic [$clog2(BLOCK_SLOTS+1)-1:0] blk_used [NUM_BLOCKS];
  logic half_width [NLINKS];
  logic low_swing  [NLINKS];

  // ---------------- input side ----------------
  logic        in_mid   [NPORTS];
  port_e       in_route [NPORTS];
  logic [QW:0] in_cnt   [NPORTS];
  logic        wr_req   [NPORTS];
  logic        wr_ok    [NPORTS];
  logic [SW-1:0] wr_slot [NPORTS];
  port_e       cur_route [NPORTS];

  // Per-input quota: the open blocks are shared out evenly, so every input
  // owns a reservation no other input can take. This keeps the shared buffer
  // from coupling the links' dependencies (which could otherwise deadlock).
  logic [QW:0] quota;
  logic [2:0]  n_under;
  always_comb begin
    int q;
    q = (int'(bpm_nopen) * BLOCK_SLOTS) / NPORTS;
    if (q > IN_LIMIT) q = IN_LIMIT;
    if (q < 1)        q = 1;
    quota   = (QW+1)'(q);
    n_under = '0;
    for (int p = 0; p < NPORTS; p++) n_under += 3'(in_cnt[p] < quota);
  end

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      in_ready[p]  = move_flits && (free_open >= (SW+1)'(n_under)) &&
                     (in_cnt[p] < quota) && (in_mid[p] || accept_new);
      wr_req[p]    = in_valid[p] && in_ready[p];
      cur_route[p] = in_flit[p].head ? xy_route(in_flit[p]) : in_route[p];
    end

  // virtual buffers: pointer queue per (input, output)
  logic [SW-1:0] vq_mem [NPORTS][NPORTS][IN_LIMIT];
  logic [QW-1:0] vq_rd  [NPORTS][NPORTS];
  logic [QW-1:0] vq_wr  [NPORTS][NPORTS];
  logic [QW:0]   vq_cnt [NPORTS][NPORTS];

  // ---------------- output side ----------------
  logic          own_v   [NPORTS];
  logic [2:0]    own_in  [NPORTS];
  logic [2:0]    rr      [NPORTS];
  logic          sel_v   [NPORTS];
  logic [2:0]    sel_in  [NPORTS];
  logic          sent_last [NPORTS];
  logic          pace_ok [NPORTS];
  logic          xfer    [NPORTS];
  logic          rd_en   [NPORTS];
  logic [SW-1:0] rd_slot [NPORTS];
  flit_t         rd_flit [NPORTS];

  always_comb begin
    logic may_start;
    int   i;
    may_start = 1'b0;
    i = 0;
    for (int o = 0; o < NPORTS; o++) begin
      may_start = accept_new && (o == int'(P_L) || !notify_in[o % NLINKS]);
      sel_v[o]  = 1'b0;
      sel_in[o] = '0;
      if (own_v[o]) begin
        sel_v[o]  = (vq_cnt[own_in[o]][o] != 0);
        sel_in[o] = own_in[o];
      end else if (may_start) begin
        for (int k = 0; k < NPORTS; k++) begin
          i = (int'(rr[o]) + k) % NPORTS;
          if (!sel_v[o] && vq_cnt[i][o] != 0) begin
            sel_v[o] = 1'b1; sel_in[o] = 3'(i);
          end
        end
      end
      pace_ok[o]   = !(o != int'(P_L) && half_width[o % NLINKS] && sent_last[o]);
      rd_slot[o]   = vq_mem[sel_in[o]][o][vq_rd[sel_in[o]][o]];
      out_valid[o] = move_flits && sel_v[o] && pace_ok[o];
      out_flit[o]  = rd_flit[o];
      xfer[o]      = out_valid[o] && out_ready[o];
      rd_en[o]     = xfer[o];
    end
  end

  // ---------------- central buffer ----------------
  central_buffer #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_SLOTS(BLOCK_SLOTS)) u_buf (
    .clk, .rst_n, .blk_open, .flip,
    .wr_req, .wr_flit(in_flit), .wr_ok, .wr_slot,
    .rd_en, .rd_slot, .rd_flit,
    .blk_used, .occ_blocks, .free_open, .occupancy);

  // ---------------- state updates ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        in_mid[p] <= 1'b0; in_route[p] <= P_L; in_cnt[p] <= '0;
        own_v[p] <= 1'b0; own_in[p] <= '0; rr[p] <= '0; sent_last[p] <= 1'b0;
        for (int o = 0; o < NPORTS; o++) begin
          vq_rd[p][o] <= '0; vq_wr[p][o] <= '0; vq_cnt[p][o] <= '0;
        end
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        // input p
        logic [QW:0] cnt;
        cnt = in_cnt[p];
        if (wr_req[p]) begin
          in_route[p] <= cur_route[p];
          in_mid[p]   <= !in_flit[p].tail;
          vq_mem[p][cur_route[p]][vq_wr[p][cur_route[p]]] <= wr_slot[p];
          vq_wr[p][cur_route[p]] <= vq_wr[p][cur_route[p]] + 1'b1;
          cnt = cnt + 1'b1;
        end
        for (int o = 0; o < NPORTS; o++)
          if (xfer[o] && int'(sel_in[o]) == p) begin
            vq_rd[p][o] <= vq_rd[p][o] + 1'b1;
            cnt = cnt - 1'b1;
          end
        in_cnt[p] <= cnt;
        for (int o = 0; o < NPORTS; o++)
          vq_cnt[p][o] <= vq_cnt[p][o]
                          + ((wr_req[p] && cur_route[p] == port_e'(o)) ? 1'b1 : 1'b0)
                          - ((xfer[o] && int'(sel_in[o]) == p) ? 1'b1 : 1'b0);
        // output p
        sent_last[p] <= xfer[p];
        if (xfer[p]) begin
          if (rd_flit[p].tail) begin
            own_v[p] <= 1'b0;
            rr[p]    <= 3'((int'(sel_in[p]) + 1) % NPORTS);
          end else begin
            own_v[p]  <= 1'b1;
            own_in[p] <= sel_in[p];
          end
        end
      end
    end
  end

  // ---------------- event counts for the energy model ----------------
  logic [2:0] n_wr, n_rd, n_head, n_dense, n_bhead, n_rhead, n_lfull, n_llow;
  always_comb begin
    n_wr = '0; n_rd = '0; n_head = '0; n_dense = '0; n_bhead = '0; n_rhead = '0;
    n_lfull = '0; n_llow = '0;
    for (int p = 0; p < NPORTS; p++) begin
      if (wr_req[p]) begin
        n_wr += 1'b1;
        if (in_flit[p].one_dense) n_dense += 1'b1;
        if (in_flit[p].head) begin
          n_head += 1'b1;
          if (in_flit[p].burst == BURST_RANDOM) n_rhead += 1'b1;
          else if (in_flit[p].burst inside {BURST_START, BURST_END}) n_bhead += 1'b1;
        end
      end
      if (xfer[p]) begin
        n_rd += 1'b1;
        if (p != int'(P_L)) begin
          if (low_swing[p % NLINKS]) n_llow += 1'b1;
          else                       n_lfull += 1'b1;
        end
      end
    end
  end

  // ---------------- power management blocks ----------------
  power_estimator #(.WINDOW(WINDOW)) u_pe (
    .clk, .rst_n, .n_buf_wr(n_wr), .n_buf_rd(n_rd), .n_route(n_head), .n_xbar(n_rd),
    .n_link_full(n_lfull), .n_link_low(n_llow), .fc_state, .e_gated,
    .win_pos, .window_end, .energy(window_energy), .last_energy);

  burst_mode_selector #(.WINDOW(WINDOW), .NUM_BLOCKS(NUM_BLOCKS)) u_bms (
    .win_pos, .occ_blocks, .burst_mode, .t_threshold, .e_gated);

  flow_control_fsm u_fc (
    .clk, .rst_n, .p_est(window_energy), .p_notify(budget - (budget >> NOTIFY_SHIFT)),
    .p_th(budget), .burst_mode, .window_end, .state(fc_state),
    .accept_new, .move_flits, .notify(fc_notify), .gated(fc_gated));

  assign notify_out = fc_notify;
  assign fill_out   = (occupancy >= (SW+1)'(FILL_HI));

  logic ev_gp, ev_gb, ev_gr, ev_mk, ev_fw, ev_kl;
  powerantz_unit #(.TTL(TTL), .P_ALLOC(P_ALLOC), .SEED(SEED)) u_ants (
    .clk, .rst_n, .link_mask(LINK_MASK), .window_end, .last_energy, .fc_state,
    .ant_in_valid, .ant_in, .ant_in_ready, .ant_out_valid, .ant_out, .ant_out_ready,
    .budget, .demand,
    .ev_gen_power(ev_gp), .ev_gen_beggar(ev_gb), .ev_grant(ev_gr), .ev_mark(ev_mk),
    .ev_forward(ev_fw), .ev_kill(ev_kl));

  logic ev_rs, ev_bon, ev_boff;
  block_power_manager #(.NUM_BLOCKS(NUM_BLOCKS), .BLOCK_SLOTS(BLOCK_SLOTS),
                        .TIMEOUT(BPM_TIMEOUT)) u_bpm (
    .clk, .rst_n, .n_arrive(n_wr), .n_burst_heads(n_bhead), .n_random_heads(n_rhead),
    .occupancy, .blk_used, .blk_on, .blk_open, .target(bpm_target), .n_open(bpm_nopen),
    .ev_resize(ev_rs), .ev_on(ev_bon), .ev_off(ev_boff));

  logic [7:0] inv_ones, inv_zeros;
  flit_inversion_controller #(.T_INT(INV_T)) u_inv (
    .clk, .rst_n, .n_wr, .n_wr_dense(n_dense), .flip, .est_ones(inv_ones), .est_zeros(inv_zeros));

  logic lm_up [NLINKS];
  logic lm_dn [NLINKS];
  for (genvar l = 0; l < NLINKS; l++) begin : g_link
    link_mode_controller #(.HOLD(LINK_HOLD)) u_lm (
      .clk, .rst_n, .up_fill(fill_out),
      .up_burst(xfer[l] && rd_flit[l].head && rd_flit[l].burst == BURST_START),
      .down_fill(fill_in[l]), .mode(link_mode[l]), .half_width(half_width[l]),
      .low_swing(low_swing[l]), .ev_up(lm_up[l]), .ev_down(lm_dn[l]));
  end

  // ---------------- statistics ----------------
  fc_state_e fc_prev;
  logic      flip_prev;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin fc_prev <= FC_BEGIN; flip_prev <= 1'b0; end
    else        begin fc_prev <= fc_state; flip_prev <= flip; end

  always_comb begin
    ev = '0;
    ev.notify_entry   = (fc_state == FC_NOTIFY)   && (fc_prev != FC_NOTIFY);
    ev.throttle_entry = (fc_state == FC_THROTTLE) && (fc_prev != FC_THROTTLE);
    ev.off_entry      = (fc_state == FC_OFF)      && (fc_prev != FC_OFF);
    for (int p = 0; p < NPORTS; p++)
      if (in_valid[p] && !in_mid[p] && fc_state == FC_NOTIFY) ev.head_held = 1'b1;
    ev.gen_power  = ev_gp;
    ev.gen_beggar = ev_gb;
    ev.grant      = ev_gr;
    ev.mark       = ev_mk;
    ev.ant_fwd    = ev_fw;
    ev.ant_kill   = ev_kl;
    ev.resize     = ev_rs;
    ev.blk_on     = ev_bon;
    ev.blk_off    = ev_boff;
    ev.flip_on    = flip && !flip_prev;
    for (int l = 0; l < NLINKS; l++) begin
      if (lm_up[l]) ev.link_up   = 1'b1;
      if (lm_dn[l]) ev.link_down = 1'b1;
      if (sel_v[l] && move_flits && !pace_ok[l]) ev.half_wait = 1'b1;
    end
  end

  // ---------------- protocol checks ----------------
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    // a full buffer never takes a flit
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                    wr_req[p] |-> wr_ok[p])
      else $error("central buffer allocation failed");
    // nothing moves while throttled or off
    a_quiet: assert property (@(posedge clk) disable iff (!rst_n)
                              !move_flits |-> !(out_valid[p] || in_ready[p]))
      else $error("flit moved while throttled");
  end

endmodule
