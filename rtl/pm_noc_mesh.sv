// pm_noc_mesh: a MESH_X x MESH_Y mesh network-on-chip whose routers manage
// their own power at three levels.
//
// Each tile holds one cb_router. Neighbouring routers are joined by a flit
// link in each direction (valid/ready), an ant side channel in each
// direction, and two status wires: notify (the neighbour is about to
// throttle and accepts no new packet) and fill (the neighbour's buffer is
// filling, which asks the link towards it to step down). Port 4 of every
// router is the core side; cores and their network interfaces are outside
// this design, so their flit interfaces are the top-level inj_* / ej_*
// ports, indexed by node number n = y*MESH_X + x. Links at the mesh edge are
// tied off: nothing arrives on them and XY routing never uses them.
//
// Every router starts with the same power budget P_ALLOC per WINDOW-cycle
// power window; budget sharing moves budget from routers with surplus to
// throttled ones. The status outputs expose each router's flow-control
// state, budget, powered buffer blocks, storage inversion, link modes and
// one-cycle event pulses.
//
// Lint note: a simulator that treats each link array as one signal may
// report a combinational loop through r_in_* / r_out_*. There is none:
// every router drives out_valid, out_flit and in_ready from its own
// registered state only, never from the neighbour's signals.
//
// Following the document: tiles of core, interface and router joined in a
// 2D mesh; the power-management mechanisms of the routers. This design's
// choices: side channels for ants and status, and the parameter values
// listed in cb_router.
module pm_noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned     MESH_X      = 4,
  parameter int unsigned     MESH_Y      = 4,
  parameter int unsigned     WINDOW      = 256,
  parameter longint unsigned P_ALLOC     = 64'd26000000,
  parameter int unsigned     NUM_BLOCKS  = 4,
  parameter int unsigned     BLOCK_SLOTS = 8,
  localparam int unsigned    NODES       = MESH_X * MESH_Y,
  localparam int unsigned    SW          = $clog2(NUM_BLOCKS * BLOCK_SLOTS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  inj_valid [NODES],
  input  flit_t                 inj_flit  [NODES],
  output logic                  inj_ready [NODES],
  output logic                  ej_valid  [NODES],
  output flit_t                 ej_flit   [NODES],
  input  logic                  ej_ready  [NODES],
  output fc_state_e             fc_state  [NODES],
  output logic [ENERGY_W-1:0]   budget    [NODES],
  output logic [ENERGY_W-1:0]   window_energy [NODES],
  output logic [NUM_BLOCKS-1:0] blk_on    [NODES],
  output logic                  flip      [NODES],
  output link_mode_e            link_mode [NODES][NLINKS],
  output logic [SW:0]           occupancy [NODES],
  output router_ev_t            ev        [NODES]
);
  logic  r_in_valid  [NODES][NPORTS];
  flit_t r_in_flit   [NODES][NPORTS];
  logic  r_in_ready  [NODES][NPORTS];
  logic  r_out_valid [NODES][NPORTS];
  flit_t r_out_flit  [NODES][NPORTS];
  logic  r_out_ready [NODES][NPORTS];
  logic  r_notify_in [NODES][NLINKS];
  logic  r_notify    [NODES];
  logic  r_fill_in   [NODES][NLINKS];
  logic  r_fill      [NODES];
  logic  a_in_valid  [NODES][NLINKS];
  ant_t  a_in        [NODES][NLINKS];
  logic  a_in_ready  [NODES][NLINKS];
  logic  a_out_valid [NODES][NLINKS];
  ant_t  a_out       [NODES][NLINKS];
  logic  a_out_ready [NODES][NLINKS];

  // neighbour of node n through link l (N, E, S, W); -1 at the edge
  function automatic int nb(int n, int l);
    int x, y;
    x = n % MESH_X;
    y = n / MESH_X;
    case (l)
      0:       return (y > 0)          ? n - MESH_X : -1;
      1:       return (x < MESH_X - 1) ? n + 1      : -1;
      2:       return (y < MESH_Y - 1) ? n + MESH_X : -1;
      default: return (x > 0)          ? n - 1      : -1;
    endcase
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    for (genvar l = 0; l < NLINKS; l++) begin : g_l
      localparam int M = nb(n, l);
      localparam int R = (l + 2) % 4;       // the neighbour's port facing us
      if (M >= 0) begin : g_conn
        assign r_in_valid[n][l]  = r_out_valid[M][R];
        assign r_in_flit[n][l]   = r_out_flit[M][R];
        assign r_out_ready[n][l] = r_in_ready[M][R];
        assign r_notify_in[n][l] = r_notify[M];
        assign r_fill_in[n][l]   = r_fill[M];
        assign a_in_valid[n][l]  = a_out_valid[M][R];
        assign a_in[n][l]        = a_out[M][R];
        assign a_out_ready[n][l] = a_in_ready[M][R];
      end else begin : g_edge
        assign r_in_valid[n][l]  = 1'b0;
        assign r_in_flit[n][l]   = '0;
        assign r_out_ready[n][l] = 1'b0;
        assign r_notify_in[n][l] = 1'b0;
        assign r_fill_in[n][l]   = 1'b0;
        assign a_in_valid[n][l]  = 1'b0;
        assign a_in[n][l]        = '0;
        assign a_out_ready[n][l] = 1'b0;
      end
    end

    assign r_in_valid[n][P_L]  = inj_valid[n];
    assign r_in_flit[n][P_L]   = inj_flit[n];
    assign inj_ready[n]        = r_in_ready[n][P_L];
    assign ej_valid[n]         = r_out_valid[n][P_L];
    assign ej_flit[n]          = r_out_flit[n][P_L];
    assign r_out_ready[n][P_L] = ej_ready[n];

    cb_router #(
      .X(n % MESH_X), .Y(n / MESH_X), .MESH_X(MESH_X), .MESH_Y(MESH_Y),
      .NUM_BLOCKS(NUM_BLOCKS), .BLOCK_SLOTS(BLOCK_SLOTS),
      .WINDOW(WINDOW), .P_ALLOC(P_ALLOC),
      .SEED(16'hACE1 ^ 16'(n * 16'h1F3B))
    ) u_router (
      .clk, .rst_n,
      .in_valid(r_in_valid[n]), .in_flit(r_in_flit[n]), .in_ready(r_in_ready[n]),
      .out_valid(r_out_valid[n]), .out_flit(r_out_flit[n]), .out_ready(r_out_ready[n]),
      .notify_in(r_notify_in[n]), .notify_out(r_notify[n]),
      .fill_in(r_fill_in[n]), .fill_out(r_fill[n]),
      .ant_in_valid(a_in_valid[n]), .ant_in(a_in[n]), .ant_in_ready(a_in_ready[n]),
      .ant_out_valid(a_out_valid[n]), .ant_out(a_out[n]), .ant_out_ready(a_out_ready[n]),
      .fc_state(fc_state[n]), .budget(budget[n]), .window_energy(window_energy[n]),
      .blk_on(blk_on[n]), .flip(flip[n]), .link_mode(link_mode[n]),
      .occupancy(occupancy[n]), .ev(ev[n]));
  end

endmodule
