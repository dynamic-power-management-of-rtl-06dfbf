// tb_burst_mode_selector: for every occupancy level the break-even position
// WINDOW - ceil(E_pg / (P_throttle - P_gated)) is worked out here and the
// comparator is checked just below, at and above it, together with the
// tabulated gated energy.
module tb_burst_mode_selector;
  int checks = 0, failures = 0;
  localparam int W = 256;
  logic [7:0] pos, thr;
  logic [2:0] occ;
  logic bm;
  logic [15:0] eg;

  burst_mode_selector #(.WINDOW(W), .NUM_BLOCKS(4), .E_PG_OVERHEAD(50000),
                        .E_STATIC_THROTTLE(1000), .E_OFF_BASE(200), .E_OFF_PER_BLOCK(100))
    dut (.win_pos(pos), .occ_blocks(occ), .burst_mode(bm), .t_threshold(thr), .e_gated(eg));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b <= 4; b++) begin
      real gated, cyc;
      int exp_thr;
      gated   = 200.0 + 100.0 * b;
      cyc     = 50000.0 / (1000.0 - gated);
      exp_thr = W - int'($ceil(cyc));
      occ = 3'(b);
      foreach (pos[i]) ;
      for (int d = -1; d <= 1; d++) begin
        pos = 8'(exp_thr + d);
        #1;
        check(int'(thr) == exp_thr, $sformatf("threshold occ %0d: %0d exp %0d", b, thr, exp_thr));
        check(bm == (d > 0), $sformatf("burst mode occ %0d pos %0d", b, pos));
        check(int'(eg) == int'(gated), "gated energy");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
