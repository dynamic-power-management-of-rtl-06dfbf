// tb_central_buffer: random writes on several ports and random reads of
// stored slots, with storage inversion switched on and off at random and
// blocks opened and closed at random. A reference model tracks which slots
// hold which flit and checks: every allocated slot is free, lies in an open
// block, and lies in the fullest open block that has room (lowest free slot
// there); reads return the flit as written whatever the encoding; the fill
// counts and free-slot totals match.
module tb_central_buffer;
  import noc_pkg::*;
  localparam int NB = 4, BS = 4, NS = NB * BS, NP = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NB-1:0] open_m; logic flip;
  logic wr_req [NP]; flit_t wr_flit [NP]; logic wr_ok [NP]; logic [3:0] wr_slot [NP];
  logic rd_en [NP]; logic [3:0] rd_slot [NP]; flit_t rd_flit [NP];
  logic [2:0] used [NB]; logic [2:0] occb; logic [4:0] freeo, occ;

  central_buffer #(.NUM_BLOCKS(NB), .BLOCK_SLOTS(BS), .NWP(NP), .NRP(NP)) dut (
    .clk, .rst_n, .blk_open(open_m), .flip, .wr_req, .wr_flit, .wr_ok, .wr_slot,
    .rd_en, .rd_slot, .rd_flit, .blk_used(used), .occ_blocks(occb), .free_open(freeo),
    .occupancy(occ));

  task automatic check(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit    mv [NS];
  flit_t md [NS];

  function automatic flit_t rnd_flit();
    flit_t f;
    f = '0;
    f.head = 1'($urandom); f.tail = 1'($urandom); f.dst_x = 4'($urandom); f.dst_y = 4'($urandom);
    f.data = {$urandom, $urandom};
    return f;
  endfunction

  initial begin
    for (int i = 0; i < NS; i++) mv[i] = 0;
    open_m = '1; flip = 0;
    for (int p = 0; p < NP; p++) begin wr_req[p] = 0; rd_en[p] = 0; rd_slot[p] = 0; wr_flit[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1500; c++) begin
      bit taken [NS];
      int cnt [NB];
      int nocc, nfree, nob;
      // reads of distinct valid slots
      for (int i = 0; i < NS; i++) taken[i] = mv[i];
      for (int p = 0; p < NP; p++) begin
        int s;
        rd_en[p] = 0;
        s = $urandom_range(0, NS - 1);
        if (mv[s] && $urandom_range(0, 2) != 0) begin
          bit dup; dup = 0;
          for (int q = 0; q < p; q++) if (rd_en[q] && int'(rd_slot[q]) == s) dup = 1;
          if (!dup) begin rd_en[p] = 1; rd_slot[p] = 4'(s); end
        end
      end
      if ($urandom_range(0, 30) == 0) flip = ~flip;
      if ($urandom_range(0, 40) == 0) open_m = 4'($urandom_range(1, 15));
      for (int p = 0; p < NP; p++) begin
        wr_req[p] = ($urandom_range(0, 1) == 1);
        wr_flit[p] = rnd_flit();
      end
      #1;
      // status before the edge
      nocc = 0; nfree = 0; nob = 0;
      for (int b = 0; b < NB; b++) begin
        cnt[b] = 0;
        for (int s = 0; s < BS; s++) cnt[b] += mv[b * BS + s];
        check(int'(used[b]) == cnt[b], "block fill count");
        nocc += cnt[b];
        if (cnt[b] != 0) nob++;
        if (open_m[b]) nfree += BS - cnt[b];
      end
      check(int'(occ) == nocc && int'(freeo) == nfree && int'(occb) == nob, "status totals");
      // reads return the written flit
      for (int p = 0; p < NP; p++)
        if (rd_en[p]) check(rd_flit[p] == md[rd_slot[p]], "read data");
      // allocation
      for (int p = 0; p < NP; p++) begin
        int bb, bc, exp_s;
        for (int b = 0; b < NB; b++) begin
          cnt[b] = 0;
          for (int s = 0; s < BS; s++) cnt[b] += taken[b * BS + s];
        end
        bb = -1; bc = -1;
        for (int b = 0; b < NB; b++)
          if (open_m[b] && cnt[b] < BS && cnt[b] > bc) begin bb = b; bc = cnt[b]; end
        check(wr_ok[p] == (bb >= 0), "allocation possible");
        if (bb >= 0) begin
          exp_s = -1;
          for (int s = BS - 1; s >= 0; s--) if (!taken[bb * BS + s]) exp_s = bb * BS + s;
          check(int'(wr_slot[p]) == exp_s, $sformatf("port %0d slot %0d exp %0d", p, wr_slot[p], exp_s));
          if (wr_req[p]) taken[exp_s] = 1;
        end
      end
      // apply the edge to the model
      for (int p = 0; p < NP; p++) if (rd_en[p]) mv[rd_slot[p]] = 0;
      for (int p = 0; p < NP; p++)
        if (wr_req[p] && wr_ok[p]) begin
          mv[wr_slot[p]] = 1; md[wr_slot[p]] = wr_flit[p];
          if (flip) check(1'b1, "");
        end
      @(negedge clk);
      // stored encoding follows flip at write time
      for (int p = 0; p < NP; p++)
        if (wr_req[p] && mv[wr_slot[p]])
          check(dut.mem[wr_slot[p]].inv == 1'b0 || dut.mem[wr_slot[p]].f.data == ~md[wr_slot[p]].data,
                "inverted storage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
