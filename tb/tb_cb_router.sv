// tb_cb_router: checks one router in the middle of a 4x4 mesh (all four
// links present) with random traffic on all five inputs.
//  dut  - default parameters. Random packets of 1..4 flits with random
//         destinations and random output back-pressure. Every flit must
//         leave on the XY output, packets of one input to one output in
//         order, and each packet contiguous on its output (wormhole). An
//         idle router passes a flit in one cycle. While the east neighbour
//         raises notify no new packet starts on the east output.
//  dut2 - a small power budget, so the flow-control states appear: the
//         router reaches Notify and then Throttle or Off; while there nothing
//         enters or leaves, notify_out is raised, a beggar ant is sent, and
//         every flit is still delivered once the windows reopen.
module tb_cb_router;
  import noc_pkg::*;
  localparam int X = 1, Y = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s (t=%0t)", m, $time); end
  endtask

  initial begin
    #4000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy(int dx, int dy);
    if (dx > X) return P_E;
    if (dx < X) return P_W;
    if (dy > Y) return P_S;
    if (dy < Y) return P_N;
    return P_L;
  endfunction

  // ---------------- two routers, same harness ----------------
  logic  iv [2][NPORTS]; flit_t ifl [2][NPORTS]; logic ir [2][NPORTS];
  logic  ov [2][NPORTS]; flit_t ofl [2][NPORTS]; logic orr [2][NPORTS];
  logic  nin [2][NLINKS]; logic nout [2];
  logic  fin [2][NLINKS]; logic fout [2];
  logic  aiv [2][NLINKS]; ant_t ain [2][NLINKS]; logic air [2][NLINKS];
  logic  aov [2][NLINKS]; ant_t aout [2][NLINKS]; logic aor [2][NLINKS];
  fc_state_e st [2]; logic [31:0] bud [2], we [2]; logic [3:0] bon [2]; logic flp [2];
  link_mode_e lm [2][NLINKS]; logic [5:0] occ [2]; router_ev_t ev [2];

  cb_router #(.X(X), .Y(Y)) dut (
    .clk, .rst_n, .in_valid(iv[0]), .in_flit(ifl[0]), .in_ready(ir[0]),
    .out_valid(ov[0]), .out_flit(ofl[0]), .out_ready(orr[0]),
    .notify_in(nin[0]), .notify_out(nout[0]), .fill_in(fin[0]), .fill_out(fout[0]),
    .ant_in_valid(aiv[0]), .ant_in(ain[0]), .ant_in_ready(air[0]),
    .ant_out_valid(aov[0]), .ant_out(aout[0]), .ant_out_ready(aor[0]),
    .fc_state(st[0]), .budget(bud[0]), .window_energy(we[0]), .blk_on(bon[0]),
    .flip(flp[0]), .link_mode(lm[0]), .occupancy(occ[0]), .ev(ev[0]));

  cb_router #(.X(X), .Y(Y), .P_ALLOC(64'd3000000)) dut2 (
    .clk, .rst_n, .in_valid(iv[1]), .in_flit(ifl[1]), .in_ready(ir[1]),
    .out_valid(ov[1]), .out_flit(ofl[1]), .out_ready(orr[1]),
    .notify_in(nin[1]), .notify_out(nout[1]), .fill_in(fin[1]), .fill_out(fout[1]),
    .ant_in_valid(aiv[1]), .ant_in(ain[1]), .ant_in_ready(air[1]),
    .ant_out_valid(aov[1]), .ant_out(aout[1]), .ant_out_ready(aor[1]),
    .fc_state(st[1]), .budget(bud[1]), .window_energy(we[1]), .blk_on(bon[1]),
    .flip(flp[1]), .link_mode(lm[1]), .occupancy(occ[1]), .ev(ev[1]));

  // ---------------- stimulus state ----------------
  int  rate   [2];          // injection percent per input
  int  oready [2];          // output ready percent
  int  to_send[2][NPORTS];  // packets still to start
  int  left   [2][NPORTS];  // flits left in the current packet
  int  seq    [2][NPORTS];
  int  pdx    [2][NPORTS], pdy [2][NPORTS];
  logic [63:0] exp_q [2][NPORTS][NPORTS][$];
  int  out_owner [2][NPORTS];   // input owning an output mid-packet, -1 none
  int  sent [2], recv [2];
  bit  seen_notify [2], seen_quiet [2], seen_beggar [2], quiet_bad [2];

  function automatic flit_t mk(int d, int p, bit head, bit tail);
    flit_t f;
    f.head = head; f.tail = tail;
    f.burst = burst_e'($urandom_range(3));
    f.one_dense = $urandom_range(1);
    f.dst_x = 4'(pdx[d][p]); f.dst_y = 4'(pdy[d][p]);
    f.data = {8'(p), 24'(seq[d][p]), $urandom};
    return f;
  endfunction

  // drive on the falling edge
  always @(negedge clk) if (rst_n)
    for (int d = 0; d < 2; d++) begin
      for (int p = 0; p < NPORTS; p++) begin
        if (!iv[d][p]) begin
          if (left[d][p] == 0 && to_send[d][p] > 0 && $urandom_range(99) < rate[d]) begin
            to_send[d][p]--;
            left[d][p] = 1 + $urandom_range(3);
            pdx[d][p] = $urandom_range(3); pdy[d][p] = $urandom_range(3);
            iv[d][p] = 1; ifl[d][p] = mk(d, p, 1'b1, left[d][p] == 1);
          end else if (left[d][p] > 0 && $urandom_range(99) < rate[d]) begin
            iv[d][p] = 1; ifl[d][p] = mk(d, p, 1'b0, left[d][p] == 1);
          end
        end
      end
      for (int o = 0; o < NPORTS; o++) orr[d][o] = ($urandom_range(99) < oready[d]);
    end

  // sample on the rising edge
  always @(posedge clk) if (rst_n)
    for (int d = 0; d < 2; d++) begin
      bit quiet;
      quiet = 1;
      for (int p = 0; p < NPORTS; p++) begin
        if (ir[d][p]) quiet = 0;
        if (iv[d][p] && ir[d][p]) begin
          exp_q[d][p][xy(pdx[d][p], pdy[d][p])].push_back(ifl[d][p].data);
          seq[d][p]++; left[d][p]--; sent[d]++;
          iv[d][p] <= 0;
        end
      end
      for (int o = 0; o < NPORTS; o++) begin
        if (ov[d][o]) quiet = 0;
        if (ov[d][o] && orr[d][o]) begin
          int src; logic [63:0] dat;
          dat = ofl[d][o].data;
          src = int'(dat[63:56]);
          recv[d]++;
          if (src >= NPORTS) check(0, "corrupt source field");
          else begin
            check(exp_q[d][src][o].size() > 0 && exp_q[d][src][o][0] == dat,
                  $sformatf("router %0d output %0d: flit out of order or misrouted", d, o));
            if (exp_q[d][src][o].size() > 0) void'(exp_q[d][src][o].pop_front());
            if (out_owner[d][o] >= 0)
              check(out_owner[d][o] == src, "packets interleaved on an output");
            out_owner[d][o] = ofl[d][o].tail ? -1 : src;
            if (d == 0 && o == P_E && ofl[d][o].head)
              check(!nin[0][P_E], "new packet started toward a notifying neighbour");
          end
        end
      end
      if (st[d] == FC_NOTIFY) seen_notify[d] = 1;
      if (st[d] inside {FC_THROTTLE, FC_OFF}) begin
        seen_quiet[d] = 1;
        if (!quiet) quiet_bad[d] = 1;
      end
      if (st[d] != FC_BEGIN && !nout[d]) quiet_bad[d] = 1;
      for (int l = 0; l < NLINKS; l++)
        if (aov[d][l] && aout[d][l].kind == ANT_BEGGAR) seen_beggar[d] = 1;
    end

  function automatic int pending(int d);
    int n = 0;
    for (int p = 0; p < NPORTS; p++) for (int o = 0; o < NPORTS; o++) n += exp_q[d][p][o].size();
    return n;
  endfunction

  function automatic int unsent();
    int n = 0;
    for (int d = 0; d < 2; d++) for (int p = 0; p < NPORTS; p++) n += to_send[d][p] + left[d][p];
    return n;
  endfunction

  initial begin
    int t0;
    for (int d = 0; d < 2; d++) begin
      for (int p = 0; p < NPORTS; p++) begin
        iv[d][p] = 0; ifl[d][p] = '0; left[d][p] = 0; seq[d][p] = 0; to_send[d][p] = 0;
        orr[d][p] = 1; out_owner[d][p] = -1;
      end
      for (int l = 0; l < NLINKS; l++) begin
        nin[d][l] = 0; fin[d][l] = 0; aiv[d][l] = 0; ain[d][l] = '0; aor[d][l] = 1;
      end
      rate[d] = 0; oready[d] = 100; sent[d] = 0; recv[d] = 0;
      seen_notify[d] = 0; seen_quiet[d] = 0; seen_beggar[d] = 0; quiet_bad[d] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // one-cycle latency through an idle router: local -> east
    iv[0][P_L] = 1; pdx[0][P_L] = 3; pdy[0][P_L] = 1; left[0][P_L] = 1;
    ifl[0][P_L] = mk(0, P_L, 1'b1, 1'b1);
    @(posedge clk); #1;
    check(ov[0][P_E] && ofl[0][P_E].data[63:56] == 8'(P_L), "one-cycle pass through an idle router");
    repeat (5) @(negedge clk);

    // random traffic, both routers
    for (int d = 0; d < 2; d++) begin
      rate[d] = 60; oready[d] = 70;
      for (int p = 0; p < NPORTS; p++) to_send[d][p] = 300;
    end
    // east neighbour notifies for a while
    repeat (2000) @(negedge clk);
    nin[0][P_E] = 1;
    repeat (300) @(negedge clk);
    nin[0][P_E] = 0;
    t0 = 0;
    while (t0 < 200000 && (pending(0) + pending(1) + unsent() > 0)) begin
      @(negedge clk); t0++;
    end
    repeat (20) @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      check(pending(d) == 0, $sformatf("router %0d: %0d flits never delivered", d, pending(d)));
      check(sent[d] == recv[d] && sent[d] > 1000, $sformatf("router %0d: sent %0d received %0d", d, sent[d], recv[d]));
    end
    check(seen_notify[1], "small budget: Notify reached");
    check(seen_quiet[1], "small budget: Throttle or Off reached");
    check(!quiet_bad[0] && !quiet_bad[1], "nothing moves while throttled, notify raised outside Begin");
    check(seen_beggar[1], "small budget: beggar ant sent");
    check(!seen_quiet[0], "default budget: a lone router at 60% load is not throttled");
    $display("router 0: %0d flits, router 1: %0d flits", sent[0], sent[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
