// tb_flow_control_fsm: walks the early-notification state machine through
// every transition: Begin->Notify at the notify threshold, Notify->Throttle
// at the throttle threshold in burst mode, Notify->Off without burst mode,
// Throttle->Off when burst mode drops, returns to Begin at window end, and
// checks the decoded controls in each state.
module tb_flow_control_fsm;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ENERGY_W-1:0] p;
  logic bm, wend;
  fc_state_e st;
  logic acc, mv, nt, gt;

  flow_control_fsm dut (.clk, .rst_n, .p_est(p), .p_notify(32'd700), .p_th(32'd800),
                        .burst_mode(bm), .window_end(wend), .state(st), .accept_new(acc),
                        .move_flits(mv), .notify(nt), .gated(gt));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (state %s)", m, st.name()); end
  endtask

  task automatic step(int pv, bit b, bit we);
    @(negedge clk); p = pv; bm = b; wend = we;
    @(negedge clk); wend = 0;
  endtask

  task automatic expect_state(fc_state_e s);
    check(st == s, $sformatf("expected %s", s.name()));
    check(acc == (s == FC_BEGIN), "accept_new decode");
    check(mv == (s inside {FC_BEGIN, FC_NOTIFY}), "move_flits decode");
    check(nt == (s != FC_BEGIN), "notify decode");
    check(gt == (s == FC_OFF), "gated decode");
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = 0; bm = 0; wend = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    step(100, 0, 0);  expect_state(FC_BEGIN);
    step(699, 1, 0);  expect_state(FC_BEGIN);
    step(700, 1, 0);  expect_state(FC_NOTIFY);
    step(750, 1, 0);  expect_state(FC_NOTIFY);
    step(800, 1, 0);  expect_state(FC_THROTTLE);
    step(900, 1, 0);  expect_state(FC_THROTTLE);
    step(900, 1, 1);  expect_state(FC_BEGIN);
    step(720, 0, 0);  expect_state(FC_NOTIFY);
    step(810, 0, 0);  expect_state(FC_OFF);
    step(810, 1, 0);  expect_state(FC_OFF);
    step(0,   0, 1);  expect_state(FC_BEGIN);
    step(705, 0, 0);  expect_state(FC_NOTIFY);
    step(0,   0, 1);  expect_state(FC_BEGIN);
    step(705, 1, 0);  expect_state(FC_NOTIFY);
    step(805, 1, 0);  expect_state(FC_THROTTLE);
    step(805, 0, 0);  expect_state(FC_OFF);
    step(0,   0, 1);  expect_state(FC_BEGIN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
