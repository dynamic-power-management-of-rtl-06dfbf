// tb_powerantz_unit: exercises one router's budget-sharing unit through the
// ant life cycle with all four links present.
//  1. A throttled window: k beggar ants (1 <= k <= 4) leave with hop 0 and
//     delta- = Pb/(4k); the demand becomes k*delta-.
//  2. A power ant arrives while starving: Pb rises by min(share, demand),
//     and the remaining share is forwarded with the hop count incremented,
//     on the link the beggar pheromone now favours.
//  3. A beggar ant reaches the router while it has surplus: it is consumed;
//     at the next window end k power ants leave with delta+ = (Pb-Pa)/k and
//     Pb drops by k*delta+.
//  4. An ant one hop from its limit is killed, not forwarded.
//  5. Without surplus a beggar ant is forwarded towards where power came
//     from (the link a power ant arrived on).
module tb_powerantz_unit;
  import noc_pkg::*;
  localparam int NL = 4;
  localparam longint PA = 1000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wend; logic [31:0] le; fc_state_e st;
  logic iv [NL]; ant_t ia [NL]; logic ir [NL];
  logic ov [NL]; ant_t oa [NL]; logic orr [NL];
  logic [31:0] bud, dem;
  logic egp, egb, egr, emk, efw, ekl;

  powerantz_unit #(.NL(NL), .TTL(4), .ETA(4), .P_ALLOC(PA), .SURPLUS_MARGIN(100), .DT(1024)) dut (
    .clk, .rst_n, .link_mask(4'hF), .window_end(wend), .last_energy(le), .fc_state(st),
    .ant_in_valid(iv), .ant_in(ia), .ant_in_ready(ir), .ant_out_valid(ov), .ant_out(oa),
    .ant_out_ready(orr), .budget(bud), .demand(dem), .ev_gen_power(egp), .ev_gen_beggar(egb),
    .ev_grant(egr), .ev_mark(emk), .ev_forward(efw), .ev_kill(ekl));

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

  // collect everything that leaves
  ant_t got [$];
  int   got_link [$];
  always @(posedge clk) if (rst_n)
    for (int l = 0; l < NL; l++) if (ov[l] && orr[l]) begin got.push_back(oa[l]); got_link.push_back(l); end

  task automatic end_window(int energy, fc_state_e s);
    @(negedge clk); le = energy; st = s; wend = 1;
    @(negedge clk); wend = 0; st = FC_BEGIN;
    repeat (10) @(negedge clk);
  endtask

  task automatic send(int l, ant_type_e k, int hop, int share);
    @(negedge clk);
    iv[l] = 1; ia[l] = '{kind: k, hop: 4'(hop), share: 32'(share)};
    @(posedge clk);
    check(ir[l] == 1'b1, "ant accepted");
    #1 iv[l] = 0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    int k; longint b0, d0;
    wend = 0; le = 0; st = FC_BEGIN;
    for (int l = 0; l < NL; l++) begin iv[l] = 0; ia[l] = '0; orr[l] = 1; end
    repeat (2) @(negedge clk); rst_n = 1;
    check(bud == 32'(PA) && dem == 0, "reset budget");

    // 1. throttled window
    got.delete(); got_link.delete();
    end_window(1000, FC_THROTTLE);
    k = got.size();
    check(k >= 1 && k <= 4, $sformatf("beggar ant count %0d", k));
    foreach (got[i]) begin
      check(got[i].kind == ANT_BEGGAR && got[i].hop == 0, "beggar ant fields");
      check(longint'(got[i].share) == PA / (4 * k), "delta- = Pb/(eta k)");
    end
    check(longint'(dem) == (PA / (4 * k)) * k, "demand recorded");

    // 2. a power ant larger than the demand, arriving on link 2
    b0 = bud; d0 = dem;
    got.delete(); got_link.delete();
    send(2, ANT_POWER, 1, 400);
    check(longint'(bud) == b0 + d0, "budget raised by the demand");
    check(dem == 0, "demand met");
    check(got.size() == 1, "rest of the share forwarded");
    if (got.size() == 1) begin
      check(got[0].kind == ANT_POWER && got[0].hop == 2, "forwarded power ant hop incremented");
      check(longint'(got[0].share) == 400 - d0, "forwarded share is the remainder");
    end

    // 5. no surplus (Pa high): beggar forwarded toward link 2 (beggar pheromone)
    end_window(2000, FC_BEGIN);
    got.delete(); got_link.delete();
    send(0, ANT_BEGGAR, 0, 50);
    check(got.size() == 1 && got_link[0] == 2, "beggar ant follows the beggar pheromone");

    // 4. an ant at its hop limit dies
    got.delete(); got_link.delete();
    send(1, ANT_BEGGAR, 3, 50);
    check(got.size() == 0, "ant killed at the hop limit");

    // 3. surplus: beggar consumed, power ants generated at window end
    end_window(100, FC_BEGIN);
    got.delete(); got_link.delete();
    send(3, ANT_BEGGAR, 0, 500);   // strongest demand trail now on link 3
    check(got.size() == 0, "beggar ant consumed at a surplus router");
    b0 = bud;
    end_window(100, FC_BEGIN);
    k = got.size();
    check(k >= 1 && k <= 4, $sformatf("power ant count %0d", k));
    foreach (got[i]) begin
      check(got[i].kind == ANT_POWER && got[i].hop == 0, "power ant fields");
      check(longint'(got[i].share) == (b0 - 100) / k, "delta+ = (Pb-Pa)/k");
      check(got_link[i] == 3, "power ant follows the power pheromone");
    end
    check(longint'(bud) == b0 - ((b0 - 100) / k) * k, "donor budget lowered");
    // no beggar since: no more power ants
    got.delete(); got_link.delete();
    end_window(100, FC_BEGIN);
    check(got.size() == 0, "power ants only after a beggar ant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
