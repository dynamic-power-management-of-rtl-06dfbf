// tb_pheromone_table: random ants arrive on random links; a reference model
// applies tau <- tau*(1 - 1/8) every DT cycles plus the reinforcement
// floor(K*(TTL-h)^2*share/(TTL^2*P)), with beggar ants raising the power
// pheromone of their arrival link and power ants the beggar pheromone.
// Checks all values every cycle, the arg-max link choice (restricted to the
// link mask) and that an all-zero table picks an enabled link.
module tb_pheromone_table;
  import noc_pkg::*;
  localparam int NL = 4, TTL = 8, K = 256, DT = 16;
  localparam longint PA = 1000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic uv; logic [1:0] ul; ant_type_e uk; logic [3:0] uh; logic [31:0] us;
  logic [3:0] mask; logic [1:0] rnd;
  logic [15:0] tp [NL];
  logic [15:0] tbv [NL];
  logic [1:0] bp, bb; logic tick;

  pheromone_table #(.NL(NL), .TAU_W(16), .TTL(TTL), .K_P(K), .K_B(K), .P_ALLOC(PA),
                    .RHO_SHIFT(3), .DT(DT)) dut (
    .clk, .rst_n, .upd_valid(uv), .upd_link(ul), .upd_kind(uk), .upd_hop(uh), .upd_share(us),
    .link_mask(mask), .rnd, .tau_p(tp), .tau_b(tbv), .best_p(bp), .best_b(bb), .evap_tick(tick));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint mp [NL], mb [NL];
  function automatic int argmax(longint t [NL], logic [3:0] m);
    int b; longint v; b = -1; v = -1;
    for (int i = 0; i < NL; i++) if (m[i] && t[i] > v) begin b = i; v = t[i]; end
    return b;
  endfunction

  int cyc;
  initial begin
    uv = 0; ul = 0; uk = ANT_POWER; uh = 0; us = 0; mask = 4'hF; rnd = 0;
    foreach (mp[i]) begin mp[i] = 0; mb[i] = 0; end
    cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // all zero: random but enabled choice
    for (int r = 0; r < 4; r++) begin
      mask = 4'b0110; rnd = 2'(r); #1;
      check(mask[bp] && mask[bb], "zero table picks an enabled link");
    end
    mask = 4'hF;
    for (int c = 0; c < 400; c++) begin
      longint f; int h;
      uv = ($urandom_range(0, 2) == 0);
      ul = 2'($urandom_range(0, 3));
      uk = ant_type_e'($urandom_range(0, 1));
      uh = 4'($urandom_range(0, 9));
      us = $urandom_range(0, 400);
      mask = ($urandom_range(0, 3) == 0) ? 4'($urandom_range(1, 15)) : 4'hF;
      #1;
      if (argmax(mp, mask) >= 0 && mp[argmax(mp, mask)] > 0)
        check(int'(bp) == argmax(mp, mask), $sformatf("best power link %0d exp %0d", bp, argmax(mp, mask)));
      if (argmax(mb, mask) >= 0 && mb[argmax(mb, mask)] > 0)
        check(int'(bb) == argmax(mb, mask), "best beggar link");
      // model of the coming clock edge
      h = (uh >= TTL) ? 0 : TTL - uh;
      f = (longint'(K) * h * h * longint'(us)) / (TTL * TTL * PA);
      for (int i = 0; i < NL; i++) begin
        if (cyc % DT == DT - 1) begin mp[i] -= mp[i] >>> 3; mb[i] -= mb[i] >>> 3; end
        if (uv && int'(ul) == i && uk == ANT_BEGGAR) mp[i] += f;
        if (uv && int'(ul) == i && uk == ANT_POWER)  mb[i] += f;
        if (mp[i] > 65535) mp[i] = 65535;
        if (mb[i] > 65535) mb[i] = 65535;
      end
      check(tick == (cyc % DT == DT - 1), "evaporation tick");
      @(negedge clk);
      cyc++;
      for (int i = 0; i < NL; i++) begin
        check(longint'(tp[i]) == mp[i], $sformatf("tau_p[%0d] %0d exp %0d", i, tp[i], mp[i]));
        check(longint'(tbv[i]) == mb[i], $sformatf("tau_b[%0d] %0d exp %0d", i, tbv[i], mb[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
