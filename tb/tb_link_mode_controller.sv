// tb_link_mode_controller: a filling downstream buffer walks the link from
// S0 down to S3 one step per HOLD period; a filling upstream buffer or a
// burst start walks it back up; conflicting requests hold the mode. Checks
// the swing and width controls against the link-mode table.
module tb_link_mode_controller;
  import noc_pkg::*;
  localparam int H = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic uf, ub, df, hw, ls, eu, ed;
  link_mode_e m;

  link_mode_controller #(.HOLD(H)) dut (.clk, .rst_n, .up_fill(uf), .up_burst(ub), .down_fill(df),
                                        .mode(m), .half_width(hw), .low_swing(ls), .ev_up(eu), .ev_down(ed));

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (mode %0d)", msg, m); end
  endtask

  // swing (1 = low) and width (1 = half) of S0..S3
  function automatic bit [1:0] table9(int s);
    case (s) 0: return 2'b00; 1: return 2'b01; 2: return 2'b10; default: return 2'b11; endcase
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic period(bit u, bit b, bit d, int exp);
    for (int c = 0; c < H; c++) begin
      uf = u; ub = (c == 1) ? b : 1'b0; df = d;
      @(negedge clk);
    end
    check(int'(m) == exp, $sformatf("expected S%0d", exp));
    check({hw, ls} == table9(exp), "swing/width decode");
  endtask

  initial begin
    uf = 0; ub = 0; df = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // align to a period boundary
    while (dut.cnt != 0) @(negedge clk);
    check(m == LM_S0, "starts at S0");
    period(0, 0, 1, 1);
    period(0, 0, 1, 2);
    period(0, 0, 1, 3);
    period(0, 0, 1, 3);
    period(1, 0, 1, 3);
    period(1, 0, 0, 2);
    period(0, 1, 0, 1);
    period(0, 0, 0, 1);
    period(1, 0, 0, 0);
    period(1, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
