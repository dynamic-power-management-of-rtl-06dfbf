// tb_flit_inversion_controller: feeds intervals with different shares of
// 1-dense flits. At each interval end the expected decision is computed from
// the SRAM cost weights (ones 164.5 nW, zeros 106.0 nW per bit over write,
// read and hold): invert when storing inverted is cheaper. Checks the
// decision, that it holds for a whole interval, and the estimator counts.
module tb_flit_inversion_controller;
  localparam int T = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] nw, nd;
  logic flip;
  logic [7:0] e1, e0;

  flit_inversion_controller #(.T_INT(T), .CNT_W(8), .COST_ONE(1645), .COST_ZERO(1060))
    dut (.clk, .rst_n, .n_wr(nw), .n_wr_dense(nd), .flip, .est_ones(e1), .est_zeros(e0));

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

  initial begin
    bit exp_flip;
    nw = 0; nd = 0; exp_flip = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 24; iv++) begin
      int n1, n0, pct;
      real c0, c1;
      n1 = 0; n0 = 0;
      pct = (iv % 4 == 0) ? 90 : (iv % 4 == 1) ? 10 : (iv % 4 == 2) ? 55 : 45;
      for (int c = 0; c < T; c++) begin
        check(flip == exp_flip, $sformatf("flip held during interval %0d", iv));
        check(int'(e1) == (n1 > 255 ? 255 : n1) && int'(e0) == (n0 > 255 ? 255 : n0), "estimator counts");
        nw = 3'($urandom_range(0, 5));
        nd = 0;
        for (int k = 0; k < nw; k++) if ($urandom_range(0, 99) < pct) nd++;
        n1 += nd; n0 += nw - nd;
        @(negedge clk);
      end
      if (n1 > 255) n1 = 255;
      if (n0 > 255) n0 = 255;
      c0 = n1 * 164.5 + n0 * 106.0;
      c1 = n1 * 106.0 + n0 * 164.5;
      exp_flip = (c1 < c0);
      check(flip == exp_flip, $sformatf("decision after interval %0d (n1 %0d n0 %0d)", iv, n1, n0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
