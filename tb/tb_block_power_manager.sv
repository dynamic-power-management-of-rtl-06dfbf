// tb_block_power_manager: drives the controller through a quiet phase
// (it must shrink the powered buffer to one block, retiring the highest
// block first and never switching off a block that still holds flits), a
// heavy phase (it must grow back to all blocks, one block per STEP cycles)
// and a phase of random-marked traffic with a one-block change (the
// unsure threshold must suppress it). The fill counts come from a small
// model of a buffer that stores only in open blocks.
module tb_block_power_manager;
  localparam int NB = 4, BS = 8, TO = 32, ST = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] na, nbh, nrh;
  logic [5:0] occ;
  logic [3:0] used [NB];
  logic [NB-1:0] on, opn;
  logic [2:0] tgt, nop;
  logic ers, eon, eoff;

  block_power_manager #(.NUM_BLOCKS(NB), .BLOCK_SLOTS(BS), .TIMEOUT(TO), .STEP(ST),
                        .RATE_SHIFT(4)) dut (
    .clk, .rst_n, .n_arrive(na), .n_burst_heads(nbh), .n_random_heads(nrh), .occupancy(occ),
    .blk_used(used), .blk_on(on), .blk_open(opn), .target(tgt), .n_open(nop),
    .ev_resize(ers), .ev_on(eon), .ev_off(eoff));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_change, ons, offs;
  int stuck3;   // flits held in block 3 regardless of where new flits go
  logic [NB-1:0] on_prev;
  // monitor: block changes are spaced, a block only goes dark when empty
  always @(negedge clk) if (rst_n) begin
    for (int b = 0; b < NB; b++)
      if (on_prev[b] && !on[b]) begin
        check(used[b] == 0, "block switched off while holding flits");
        offs++;
      end
    for (int b = 0; b < NB; b++) if (!on_prev[b] && on[b]) ons++;
    on_prev = on;
  end

  task automatic run(int cycles, int occ_level, int arr, bit burst);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      na  = 3'(arr);
      nbh = burst ? 3'($urandom_range(0, 1)) : 3'd0;
      nrh = burst ? 3'd0 : 3'($urandom_range(0, 1));
      occ = 6'(occ_level);
      // the flits sit in the lowest open blocks
      for (int b = 0; b < NB; b++) used[b] = 0;
      begin
        int left; left = occ_level;
        for (int b = 0; b < NB; b++) if (on[b] && left > 0) begin
          used[b] = 4'((left > BS) ? BS : left); left -= int'(used[b]);
        end
      end
      if (stuck3 > 0) begin used[3] = 4'(stuck3); occ = 6'(occ_level + stuck3); end
    end
  endtask

  initial begin
    na = 0; nbh = 0; nrh = 0; occ = 0;
    for (int b = 0; b < NB; b++) used[b] = 0;
    ons = 0; offs = 0; on_prev = '1; stuck3 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    check(on == 4'b1111 && tgt == 4, "all blocks on after reset");
    // quiet, bursty traffic: target 1 block
    run(3 * TO, 2, 0, 1);
    check(tgt == 1, $sformatf("quiet target %0d", tgt));
    run(4 * ST * NB, 2, 0, 1);
    check(on == 4'b0001, $sformatf("shrunk to block 0 (%b)", on));
    check(offs == 3, "three blocks switched off");
    // heavy: occupancy near full and a high arrival rate
    run(2 * TO, 7, 5, 1);
    run(2 * TO, 30, 5, 1);
    check(tgt == 4, $sformatf("heavy target %0d", tgt));
    run(4 * ST * NB, 30, 5, 1);
    check(on == 4'b1111, $sformatf("grown to all blocks (%b)", on));
    // random-marked traffic: a one-block change is not acted on
    run(4 * TO, 22, 0, 0);
    check(tgt == 4, $sformatf("unsure prediction keeps target (%0d)", tgt));
    check(ons == 3, "three blocks switched on");
    // a retired block that still holds flits stays powered until it empties
    stuck3 = 2;
    run(3 * TO + 4 * ST * NB, 0, 0, 1);
    check(on[3] && !opn[3], $sformatf("block 3 retired but kept on while holding flits (%b/%b)", on, opn));
    check(on[2:1] == 2'b00, $sformatf("empty blocks switched off (%b)", on));
    stuck3 = 0;
    run(2 * ST, 0, 0, 1);
    check(!on[3], "block 3 off once empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
