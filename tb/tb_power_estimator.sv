// tb_power_estimator: random event counts each cycle; a reference model
// built from the router energy table (76.41/76.62/310/83 pJ per buffer
// read/write, route, crossbar and 5.52 pJ per link bit) predicts the window
// energy every cycle, the window-end pulse and the energy kept for the last
// window. Static energies per flow-control state are checked too.
module tb_power_estimator;
  import noc_pkg::*;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] n_wr, n_rd, n_rt, n_xb, n_lf, n_ll;
  fc_state_e st;
  logic [15:0] eg;
  logic [$clog2(W)-1:0] pos;
  logic wend;
  logic [ENERGY_W-1:0] e, le;

  power_estimator #(.WINDOW(W), .E_STATIC_ACTIVE(2000), .E_STATIC_THROTTLE(1000)) dut (
    .clk, .rst_n, .n_buf_wr(n_wr), .n_buf_rd(n_rd), .n_route(n_rt), .n_xbar(n_xb),
    .n_link_full(n_lf), .n_link_low(n_ll), .fc_state(st), .e_gated(eg),
    .win_pos(pos), .window_end(wend), .energy(e), .last_energy(le));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_e, m_le, cyc;
  int m_pos;
  real link_pj;
  initial begin
    n_wr = 0; n_rd = 0; n_rt = 0; n_xb = 0; n_lf = 0; n_ll = 0; st = FC_BEGIN; eg = 300;
    m_e = 0; m_le = 0; m_pos = 0;
    link_pj = 5.52 * $bits(flit_t);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      check(e == m_e, $sformatf("energy %0d exp %0d", e, m_e));
      check(le == m_le, $sformatf("last energy %0d exp %0d", le, m_le));
      check(int'(pos) == m_pos, "window position");
      check(wend == (m_pos == W - 1), "window end pulse");
      n_wr = 3'($urandom_range(0, 5)); n_rd = 3'($urandom_range(0, 5));
      n_rt = 3'($urandom_range(0, 2)); n_xb = 3'($urandom_range(0, 5));
      n_lf = 3'($urandom_range(0, 4)); n_ll = 3'($urandom_range(0, 4));
      st   = fc_state_e'($urandom_range(0, 3));
      // energies in pJ, converted to 0.01 pJ
      cyc = longint'($rtoi(100.0 * (n_wr * 76.62 + n_rd * 76.41 + n_rt * 310.0 + n_xb * 83.0
                           + n_lf * link_pj) + 0.5))
          + longint'(n_ll) * longint'($rtoi(100.0 * link_pj + 0.5) / 2);
      cyc += (st == FC_THROTTLE) ? 1000 : (st == FC_OFF) ? 300 : 2000;
      if (m_pos == W - 1) begin m_le = m_e + cyc; m_e = 0; m_pos = 0; end
      else begin m_e += cyc; m_pos++; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
