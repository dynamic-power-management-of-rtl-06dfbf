// flit_inversion_controller: adaptive choice of positive or negative logic
// for storing flits in the router buffer.
//
// Nanoscale SRAM cells spend different power holding, writing and reading a
// 1 than a 0. Every flit carries a '1-dense' header bit set by its source.
// The estimator counts, with saturating counters, how many of the flits
// written during an interval of T cycles were 1-dense (n1) and how many were
// not (n0). At the end of each interval it prices both encodings:
//     C0 = n1*COST_ONE  + n0*COST_ZERO   (store as is)
//     C1 = n1*COST_ZERO + n0*COST_ONE    (store inverted)
// and sets flip for the next interval when C1 < C0. The counters restart
// every interval.
//
// COST_ONE / COST_ZERO are the per-bit write+read+hold totals of the SRAM
// power table (gate leakage + subthreshold leakage + dynamic, in 0.1 nW):
// ones 98.6+39.5+26.4 = 164.5 nW, zeros 34.8+36.8+34.4 = 106.0 nW.
//
// Interface: n_wr / n_wr_dense = flits written this cycle and how many of
// them were 1-dense. flip is registered and changes only on the cycle after
// an interval ends.
//
// Following the document: the 1-dense header bit, the saturating-counter
// estimator, the every-T re-evaluation and a decision held for T. The
// flowchart prints 'C0 < C1 -> Yes -> Flip = 1'; the text says the flit is
// inverted when the estimate of 1-density is above the threshold. This
// design inverts when inversion is cheaper (C1 < C0), which matches the
// text. This design's choices: T, counter width and the cost weights.
module flit_inversion_controller #(
  parameter int unsigned T_INT     = 64,
  parameter int unsigned CNT_W     = 8,
  parameter int unsigned COST_ONE  = 1645,
  parameter int unsigned COST_ZERO = 1060
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] n_wr,
  input  logic [2:0] n_wr_dense,
  output logic       flip,
  output logic [CNT_W-1:0] est_ones,
  output logic [CNT_W-1:0] est_zeros
);
  logic [$clog2(T_INT)-1:0] t;
  logic interval_end;
  assign interval_end = (t == ($clog2(T_INT))'(T_INT - 1));

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] c, logic [2:0] inc);
    logic [CNT_W:0] s;
    s = {1'b0, c} + (CNT_W+1)'(inc);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  logic [CNT_W-1:0] n1_nxt, n0_nxt;
  logic [CNT_W+15:0] c0, c1;
  assign n1_nxt = sat_add(est_ones, n_wr_dense);
  assign n0_nxt = sat_add(est_zeros, n_wr - n_wr_dense);
  assign c0 = (CNT_W+16)'(n1_nxt) * (CNT_W+16)'(COST_ONE)  + (CNT_W+16)'(n0_nxt) * (CNT_W+16)'(COST_ZERO);
  assign c1 = (CNT_W+16)'(n1_nxt) * (CNT_W+16)'(COST_ZERO) + (CNT_W+16)'(n0_nxt) * (CNT_W+16)'(COST_ONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t <= '0; flip <= 1'b0; est_ones <= '0; est_zeros <= '0;
    end else if (interval_end) begin
      t         <= '0;
      flip      <= (c1 < c0);
      est_ones  <= '0;
      est_zeros <= '0;
    end else begin
      t         <= t + 1'b1;
      est_ones  <= n1_nxt;
      est_zeros <= n0_nxt;
    end
  end

endmodule
