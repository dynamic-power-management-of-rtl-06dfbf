// tb_mesh_harness: end-to-end traffic harness for the power-managed mesh.
//
// Every node runs a traffic source and a sink. Sources send packets of one
// to four flits to random destinations; each flit's data holds its source
// node and a per-source sequence number, so the sink can check that every
// flit arrives at the right node, exactly once, and that the flits of one
// source to one destination arrive in order (XY routing keeps them on one
// path). The run has three phases:
//   1. quiet  - every node at the cold rate (10%): buffers shrink;
//   2. loaded - two hot nodes in the middle inject at 100% in bursts of
//               1-dense data, the six nodes around them are neutral (40%) and
//               the other eight cold (10%); a quarter of all packets go to
//               one hot-spot node whose core takes flits only half the time
//               (HOT_SPOT; without it destinations are uniform);
//   3. drain  - sources stop and the network must empty.
// Each cycle the harness adds up the routers' event pulses. With
// CHECK_ALL set, every mechanism must have happened at least once.
// FULL selects the mesh with no parameter override at all.
module tb_mesh_harness
  import noc_pkg::*;
#(
  parameter bit              FULL      = 1'b1,
  parameter longint unsigned P_ALLOC   = 64'd26000000,
  parameter bit              CHECK_ALL = 1'b0,
  parameter bit              HOT_SPOT  = 1'b1,
  parameter int              QUIET_CYC = 3000,
  parameter int              LOAD_CYC  = 12000,
  parameter int              MAX_CYC   = 200000
) ();
  localparam int MX = 4, MY = 4, N = MX * MY;
  localparam int HOTSPOT = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (MAX_CYC + 20000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic  inj_valid [N]; flit_t inj_flit [N]; logic inj_ready [N];
  logic  ej_valid  [N]; flit_t ej_flit  [N]; logic ej_ready  [N];
  fc_state_e fc_state [N];
  logic [31:0] budget [N], window_energy [N];
  logic [3:0] blk_on [N];
  logic flip [N];
  link_mode_e link_mode [N][NLINKS];
  logic [5:0] occupancy [N];
  router_ev_t ev [N];

  if (FULL) begin : g_full
    pm_noc_mesh dut (.*);
  end else begin : g_red
    pm_noc_mesh #(.P_ALLOC(P_ALLOC)) dut (.*);
  end

  // ---------------- traffic ----------------
  typedef enum int { PH_QUIET, PH_LOAD, PH_DRAIN } phase_e;
  phase_e phase;
  int  rate [N];
  int  left [N], seq [N], pdst [N], burst_left [N];
  bit  dense [N];
  logic [63:0] exp_q [N][N][$];
  int  sent, recv, pend;
  int  ej_pct [N];

  function automatic int node_rate(int n, phase_e ph);
    int x, y;
    x = n % MX; y = n / MX;
    if (ph == PH_QUIET) return 10;
    if (ph == PH_DRAIN) return 0;
    if (y == 1 && (x == 1 || x == 2)) return 100;               // 2 hot
    if (y == 0 && (x == 1 || x == 2)) return 40;                // 6 neutral
    if (y == 1 || (y == 2 && (x == 1 || x == 2))) return 40;
    return 10;                                                  // 8 cold
  endfunction

  function automatic flit_t mk(int n, bit head, bit tail, burst_e b);
    flit_t f;
    f.head = head; f.tail = tail; f.burst = b;
    f.one_dense = dense[n];
    f.dst_x = 4'(pdst[n] % MX); f.dst_y = 4'(pdst[n] / MX);
    f.data = {8'(n), 24'(seq[n]), dense[n] ? ~32'($urandom_range(255)) : $urandom};
    return f;
  endfunction

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (!inj_valid[n]) begin
        if (left[n] == 0 && phase != PH_DRAIN && $urandom_range(99) < node_rate(n, phase)) begin
          burst_e b;
          bit hot;
          hot = (phase == PH_LOAD && node_rate(n, phase) == 100);
          pdst[n] = (HOT_SPOT && $urandom_range(3) == 0 && phase == PH_LOAD) ? HOTSPOT : $urandom_range(N - 1);
          left[n] = 1 + $urandom_range(3);
          dense[n] = hot;
          if (!hot) b = BURST_RANDOM;
          else if (burst_left[n] == 0) begin b = BURST_START; burst_left[n] = 4 + $urandom_range(4); end
          else if (burst_left[n] == 1) begin b = BURST_END; burst_left[n] = 0; end
          else begin b = BURST_CONT; burst_left[n]--; end
          inj_valid[n] = 1; inj_flit[n] = mk(n, 1'b1, left[n] == 1, b);
        end else if (left[n] > 0 && $urandom_range(99) < 100 - (100 - node_rate(n, PH_LOAD)) / 2) begin
          inj_valid[n] = 1; inj_flit[n] = mk(n, 1'b0, left[n] == 1, inj_flit[n].burst);
        end
      end
      ej_ready[n] = ($urandom_range(99) < ej_pct[n]);
    end
  end

  // ---------------- mechanism counters ----------------
  localparam int NM = 17;
  int mcount [NM];
  string mname [NM] = '{"notify", "throttle", "off", "head held by notify", "power ant generated",
                        "beggar ant generated", "budget granted", "beggar marked at surplus",
                        "ant forwarded", "ant killed at TTL", "buffer resize", "block power on",
                        "block power off", "inverted storage on", "link step up",
                        "link step down", "half-width link wait"};

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      logic [NM-1:0] e;
      if (inj_valid[n] && inj_ready[n]) begin
        exp_q[n][pdst[n]].push_back(inj_flit[n].data);
        seq[n]++; left[n]--; sent++;
        inj_valid[n] <= 0;
      end
      if (ej_valid[n] && ej_ready[n]) begin
        int s; logic [63:0] d;
        d = ej_flit[n].data; s = int'(d[63:56]);
        recv++;
        if (s >= N) check(0, "corrupt source field");
        else begin
          check(exp_q[s][n].size() > 0 && exp_q[s][n][0] == d,
                $sformatf("node %0d: flit from %0d missing, duplicated or out of order", n, s));
          if (exp_q[s][n].size() > 0) void'(exp_q[s][n].pop_front());
          check(int'(ej_flit[n].dst_x) == n % MX && int'(ej_flit[n].dst_y) == n / MX,
                "flit ejected at the wrong node");
        end
      end
      e = ev[n];
      for (int m = 0; m < NM; m++) if (e[NM - 1 - m]) mcount[m]++;
    end
  end

  function automatic int pending();
    int c = 0;
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) c += exp_q[s][d].size();
    for (int s = 0; s < N; s++) c += left[s];
    return c;
  endfunction

  int max_fc [4];
  always @(posedge clk) if (rst_n) for (int n = 0; n < N; n++) max_fc[int'(fc_state[n])]++;

  initial begin
    int t;
    phase = PH_QUIET; sent = 0; recv = 0;
    for (int m = 0; m < NM; m++) mcount[m] = 0;
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 0; inj_flit[n] = '0; ej_ready[n] = 1; ej_pct[n] = 100;
      left[n] = 0; seq[n] = 0; pdst[n] = 0; burst_left[n] = 0; dense[n] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (QUIET_CYC) @(negedge clk);
    phase = PH_LOAD;
    if (HOT_SPOT) ej_pct[HOTSPOT] = 50;
    repeat (LOAD_CYC) @(negedge clk);
    phase = PH_DRAIN;
    ej_pct[HOTSPOT] = 100;
    t = 0;
    while (pending() > 0 && t < MAX_CYC) begin @(negedge clk); t++; end
    repeat (10) @(negedge clk);
    pend = pending();
    check(pend == 0, $sformatf("%0d flits not delivered after the drain", pend));
    check(sent == recv && sent > 0, $sformatf("sent %0d flits, received %0d", sent, recv));
    $display("flits sent %0d received %0d, drain took %0d cycles", sent, recv, t);
    for (int m = 0; m < NM; m++) begin
      $display("  mechanism %-28s %0d", mname[m], mcount[m]);
      if (CHECK_ALL) check(mcount[m] > 0, $sformatf("mechanism never happened: %s", mname[m]));
    end
    $display("  router-cycles in Begin %0d, Notify %0d, Throttle %0d, Off %0d",
             max_fc[0], max_fc[1], max_fc[2], max_fc[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
