// block_power_manager: feedback control of how many central-buffer blocks
// are powered.
//
// Flow prediction: every cycle the controller adds the flits that entered
// the buffer to a flow-density count and tracks the peak occupancy. Packet
// burst markings steer a saturating confidence counter: heads marked start
// or end of burst raise it, heads marked random lower it. At each timeout
// (TIMEOUT cycles) it estimates the requirement
//     demand   = peak occupancy + flow density / 2^RATE_SHIFT
//     required = ceil(demand / BLOCK_SLOTS), kept within MIN_BLOCKS..NUM_BLOCKS
// and starts a resize when |required - target| exceeds the update threshold:
// THR_CONFIDENT when the burst prediction is trusted, THR_UNSURE otherwise.
// Then the counters restart.
//
// Power controller: resizing is slow so it causes no supply surge. Every
// STEP cycles at most one block changes: below target, a block that is
// being retired is reopened, or else the lowest-numbered off block is
// powered on; above target, the highest-numbered open block is retired
// (closed to new flits). A retired block is powered off as soon as it is
// empty, so no stored flit is lost.
//
// Interface: n_arrive (flits written this cycle), n_burst_heads / n_random_heads
// (heads with burst / random marking this cycle), occupancy and per-block
// fill counts from the central buffer. Outputs: blk_on (power-gate enables),
// blk_open (blocks that may take new flits), target, and one-cycle event
// pulses. All outputs are registered; at reset every block is on.
//
// Following the document: update flow density, timeout, estimate the
// requirement, resize when the change exceeds a threshold, burst/random
// markings adjusting the threshold through a confidence, one block at a
// time. This design's choices: the estimate formula, all constants, and
// retiring a block before switching it off.
module block_power_manager #(
  parameter int unsigned NUM_BLOCKS    = 4,
  parameter int unsigned BLOCK_SLOTS   = 8,
  parameter int unsigned TIMEOUT       = 128,
  parameter int unsigned STEP          = 8,
  parameter int unsigned MIN_BLOCKS    = 1,
  parameter int unsigned RATE_SHIFT    = 4,
  parameter int unsigned CONF_MAX      = 7,
  parameter int unsigned CONF_HI       = 4,
  parameter int unsigned THR_CONFIDENT = 0,
  parameter int unsigned THR_UNSURE    = 1,
  localparam int unsigned NSLOTS       = NUM_BLOCKS * BLOCK_SLOTS,
  localparam int unsigned BCW          = $clog2(BLOCK_SLOTS + 1),
  localparam int unsigned NBW          = $clog2(NUM_BLOCKS + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2:0]             n_arrive,
  input  logic [2:0]             n_burst_heads,
  input  logic [2:0]             n_random_heads,
  input  logic [$clog2(NSLOTS):0] occupancy,
  input  logic [BCW-1:0]         blk_used [NUM_BLOCKS],
  output logic [NUM_BLOCKS-1:0]  blk_on,
  output logic [NUM_BLOCKS-1:0]  blk_open,
  output logic [NBW-1:0]         target,
  output logic [NBW-1:0]         n_open,
  output logic                   ev_resize,
  output logic                   ev_on,
  output logic                   ev_off
);
  logic [15:0] flow_density;
  logic [$clog2(NSLOTS):0] peak_occ;
  logic [$clog2(CONF_MAX+1)-1:0] conf;
  logic [$clog2(TIMEOUT)-1:0] tcnt;
  logic [$clog2(STEP)-1:0]    scnt;
  logic [NUM_BLOCKS-1:0]      retiring;

  logic timeout;
  assign timeout = (tcnt == ($clog2(TIMEOUT))'(TIMEOUT - 1));

  // requirement estimate
  logic [NBW-1:0] required;
  logic [NBW-1:0] diff;
  logic           do_resize;
  always_comb begin
    int unsigned dem, req;
    dem = int'(peak_occ) + (int'(flow_density) >> RATE_SHIFT);
    req = (dem + BLOCK_SLOTS - 1) / BLOCK_SLOTS;
    if (req < MIN_BLOCKS) req = MIN_BLOCKS;
    if (req > NUM_BLOCKS) req = NUM_BLOCKS;
    required  = NBW'(req);
    diff      = (required > target) ? required - target : target - required;
    do_resize = timeout && (int'(diff) > ((int'(conf) >= CONF_HI) ? THR_CONFIDENT : THR_UNSURE));
  end

  always_comb begin
    n_open = '0;
    for (int b = 0; b < NUM_BLOCKS; b++) n_open += NBW'(blk_open[b]);
  end
  assign blk_open = blk_on & ~retiring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flow_density <= '0;
      peak_occ     <= '0;
      conf         <= '0;
      tcnt         <= '0;
      scnt         <= '0;
      target       <= NBW'(NUM_BLOCKS);
      blk_on       <= '1;
      retiring     <= '0;
      ev_resize    <= 1'b0;
      ev_on        <= 1'b0;
      ev_off       <= 1'b0;
    end else begin
      ev_resize <= 1'b0;
      ev_on     <= 1'b0;
      ev_off    <= 1'b0;

      // confidence of the burst prediction
      begin
        int c;
        c = int'(conf) + int'(n_burst_heads) - int'(n_random_heads);
        if (c < 0) c = 0;
        if (c > CONF_MAX) c = CONF_MAX;
        conf <= ($clog2(CONF_MAX+1))'(c);
      end

      // flow density and peak occupancy over the timeout window
      if (timeout) begin
        tcnt         <= '0;
        flow_density <= '0;
        peak_occ     <= '0;
        if (do_resize) begin
          target    <= required;
          ev_resize <= 1'b1;
        end
      end else begin
        tcnt         <= tcnt + 1'b1;
        flow_density <= (flow_density > 16'hFFF0) ? flow_density : flow_density + 16'(n_arrive);
        if (occupancy > peak_occ) peak_occ <= occupancy;
      end

      // slow power controller, one block per STEP cycles
      scnt <= (scnt == ($clog2(STEP))'(STEP - 1)) ? '0 : scnt + 1'b1;
      if (scnt == ($clog2(STEP))'(STEP - 1)) begin
        if (n_open < target) begin
          if (retiring != '0) begin
            for (int b = 0; b < NUM_BLOCKS; b++)
              if (retiring[b]) retiring[b] <= 1'b0;
          end else begin
            logic done;
            done = 1'b0;
            for (int b = 0; b < NUM_BLOCKS; b++)
              if (!done && !blk_on[b]) begin
                blk_on[b] <= 1'b1; done = 1'b1; ev_on <= 1'b1;
              end
          end
        end else if (n_open > target && n_open > NBW'(MIN_BLOCKS)) begin
          logic done;
          done = 1'b0;
          for (int b = NUM_BLOCKS - 1; b >= 0; b--)
            if (!done && blk_open[b]) begin
              retiring[b] <= 1'b1; done = 1'b1;
            end
        end
      end

      // a retired block goes dark once it holds no flit
      for (int b = 0; b < NUM_BLOCKS; b++)
        if (retiring[b] && blk_used[b] == '0) begin
          blk_on[b]   <= 1'b0;
          retiring[b] <= 1'b0;
          ev_off      <= 1'b1;
        end
    end
  end

endmodule
