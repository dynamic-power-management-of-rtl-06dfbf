// central_buffer: the router's shared physical flit buffer, organised in
// power-gated blocks.
//
// All input ports store their flits in one array of NUM_BLOCKS blocks of
// BLOCK_SLOTS slots each. A block is the unit of power gating, so the
// allocator packs flits into as few blocks as possible: each write takes the
// lowest free slot of the fullest block that still has room and is open for
// allocation. Blocks therefore fill one by one and empty blocks can be
// switched off. Several ports may write in one cycle; they are served in
// port order, each seeing the slots taken by the ports before it.
//
// Flits are stored inverted while 'flip' is set (negative-logic storage);
// a per-slot flag records the encoding so a read always returns the
// original flit, whatever the current setting.
//
// Interface: wr_req/wr_flit per write port give wr_ok/wr_slot in the same
// cycle (combinational allocation); the write happens on the clock edge when
// wr_req && wr_ok. rd_en/rd_slot per read port return rd_flit
// combinationally and free the slot at the clock edge. Status: per-block
// fill counts, number of non-empty blocks and free slots in open blocks.
// A powered-off block must be empty; the block power manager guarantees it.
//
// Following the document: a central buffer in power-gated blocks, free
// element selection from the fullest non-full block (a priority-encoder
// style choice), inverted storage with a wrapper that hides it. This
// design's choices: block count and size, the per-slot encoding flag and
// inverting only the 64 data bits.
module central_buffer
  import noc_pkg::*;
#(
  parameter int unsigned NUM_BLOCKS  = 4,
  parameter int unsigned BLOCK_SLOTS = 8,
  parameter int unsigned NWP         = NPORTS,
  parameter int unsigned NRP         = NPORTS,
  localparam int unsigned NSLOTS     = NUM_BLOCKS * BLOCK_SLOTS,
  localparam int unsigned SW         = $clog2(NSLOTS),
  localparam int unsigned BCW        = $clog2(BLOCK_SLOTS + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM_BLOCKS-1:0]    blk_open,    // powered and accepting new flits
  input  logic                     flip,
  input  logic                     wr_req  [NWP],
  input  flit_t                    wr_flit [NWP],
  output logic                     wr_ok   [NWP],
  output logic [SW-1:0]            wr_slot [NWP],
  input  logic                     rd_en   [NRP],
  input  logic [SW-1:0]            rd_slot [NRP],
  output flit_t                    rd_flit [NRP],
  output logic [BCW-1:0]           blk_used [NUM_BLOCKS],
  output logic [$clog2(NUM_BLOCKS+1)-1:0] occ_blocks,
  output logic [SW:0]              free_open,
  output logic [SW:0]              occupancy
);
  typedef struct packed {
    logic  inv;
    flit_t f;
  } slot_t;

  slot_t            mem   [NSLOTS];
  logic [NSLOTS-1:0] valid;

  // ---------------- allocation ----------------
  always_comb begin
    logic [NSLOTS-1:0] taken;
    logic [BCW-1:0]    cnt [NUM_BLOCKS];
    logic              got;
    taken = valid;
    got   = 1'b0;
    for (int p = 0; p < NWP; p++) begin
      int  bb;
      logic [BCW-1:0] bc;
      logic found;
      for (int b = 0; b < NUM_BLOCKS; b++) begin
        cnt[b] = '0;
        for (int s = 0; s < BLOCK_SLOTS; s++) cnt[b] += BCW'(taken[b*BLOCK_SLOTS+s]);
      end
      bb = 0; bc = '0; found = 1'b0;
      for (int b = 0; b < NUM_BLOCKS; b++)
        if (blk_open[b] && cnt[b] < BCW'(BLOCK_SLOTS) && (!found || cnt[b] > bc)) begin
          bb = b; bc = cnt[b]; found = 1'b1;
        end
      wr_ok[p]   = found;
      wr_slot[p] = '0;
      if (found) begin
        got = 1'b0;
        for (int s = 0; s < BLOCK_SLOTS; s++)
          if (!got && !taken[bb*BLOCK_SLOTS+s]) begin
            got = 1'b1;
            wr_slot[p] = SW'(bb*BLOCK_SLOTS+s);
          end
        if (wr_req[p]) taken[wr_slot[p]] = 1'b1;
      end
    end
  end

  // ---------------- read with decoding ----------------
  always_comb
    for (int r = 0; r < NRP; r++) begin
      rd_flit[r] = mem[rd_slot[r]].f;
      if (mem[rd_slot[r]].inv) rd_flit[r].data = ~mem[rd_slot[r]].f.data;
    end

  // ---------------- storage ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      for (int r = 0; r < NRP; r++)
        if (rd_en[r]) valid[rd_slot[r]] <= 1'b0;
      for (int p = 0; p < NWP; p++)
        if (wr_req[p] && wr_ok[p]) valid[wr_slot[p]] <= 1'b1;
    end
  end

  always_ff @(posedge clk)
    for (int p = 0; p < NWP; p++)
      if (wr_req[p] && wr_ok[p]) begin
        mem[wr_slot[p]].inv <= flip;
        mem[wr_slot[p]].f   <= wr_flit[p];
        if (flip) mem[wr_slot[p]].f.data <= ~wr_flit[p].data;
      end

  // ---------------- status ----------------
  always_comb begin
    occ_blocks = '0;
    free_open  = '0;
    occupancy  = '0;
    for (int b = 0; b < NUM_BLOCKS; b++) begin
      blk_used[b] = '0;
      for (int s = 0; s < BLOCK_SLOTS; s++) blk_used[b] += BCW'(valid[b*BLOCK_SLOTS+s]);
      if (blk_used[b] != 0) occ_blocks += 1'b1;
      if (blk_open[b]) free_open += (SW+1)'(BLOCK_SLOTS) - (SW+1)'(blk_used[b]);
      occupancy += (SW+1)'(blk_used[b]);
    end
  end

  // a slot is never read while empty
  for (genvar r = 0; r < NRP; r++) begin : g_rd_chk
    a_rd_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 rd_en[r] |-> valid[rd_slot[r]])
      else $error("read of an empty buffer slot");
  end

endmodule
