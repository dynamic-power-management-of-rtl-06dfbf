// noc_pkg: types and constants shared by the power-managed network-on-chip.
//
// A flit carries 64 data bits plus a small header (head/tail, destination,
// burst marking and the '1-dense' hint bit). Ants of the budget-sharing
// scheme are single control flits holding a type, a hop count and the power
// share or demand they carry; in this design they travel on a side channel
// next to each data link. Energies are the per-event router energies of the
// router power model, stored in units of 0.01 pJ so they stay integers.
// Port numbering, coordinate widths, the burst encoding and all energy units
// are this design's own choices.
package noc_pkg;

  // ---------------- router ports ----------------
  localparam int unsigned NPORTS = 5;           // N, E, S, W, local core
  localparam int unsigned NLINKS = 4;           // router-to-router links
  typedef enum logic [2:0] {
    P_N = 3'd0, P_E = 3'd1, P_S = 3'd2, P_W = 3'd3, P_L = 3'd4
  } port_e;

  // ---------------- flits ----------------
  localparam int unsigned FLIT_DATA_W = 64;     // 64-bit flits
  localparam int unsigned COORD_W     = 4;      // up to a 16 x 16 mesh

  // Burst marking attached to every packet by the system (start / end of a
  // burst or random traffic); CONT marks packets inside a burst.
  typedef enum logic [1:0] {
    BURST_RANDOM = 2'd0, BURST_START = 2'd1, BURST_CONT = 2'd2, BURST_END = 2'd3
  } burst_e;

  typedef struct packed {
    logic                   head;
    logic                   tail;
    burst_e                 burst;
    logic                   one_dense;          // set by the source when most data bits are 1
    logic [COORD_W-1:0]     dst_x;
    logic [COORD_W-1:0]     dst_y;
    logic [FLIT_DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // ---------------- ants ----------------
  localparam int unsigned HOP_W   = 4;
  localparam int unsigned SHARE_W = 32;         // energy per window, 0.01 pJ units
  localparam int unsigned LINK_W  = 2;          // index of a router-to-router link

  typedef enum logic { ANT_POWER = 1'b0, ANT_BEGGAR = 1'b1 } ant_type_e;

  typedef struct packed {
    ant_type_e           kind;
    logic [HOP_W-1:0]    hop;
    logic [SHARE_W-1:0]  share;                 // delta+ (power ant) or delta- (beggar ant)
  } ant_t;

  // ---------------- energy model (0.01 pJ per event) ----------------
  localparam int unsigned E_BUF_READ   = 7641;  // 76.41 pJ
  localparam int unsigned E_BUF_WRITE  = 7662;  // 76.62 pJ
  localparam int unsigned E_ROUTE      = 31000; // 310.00 pJ
  localparam int unsigned E_XBAR       = 8300;  // 83.00 pJ
  localparam int unsigned E_LINK_BIT   = 552;   // 5.52 pJ per bit

  localparam int unsigned ENERGY_W = 32;

  // ---------------- flow-control states ----------------
  typedef enum logic [1:0] {
    FC_BEGIN = 2'd0, FC_NOTIFY = 2'd1, FC_THROTTLE = 2'd2, FC_OFF = 2'd3
  } fc_state_e;

  // ---------------- link modes ----------------
  // bit 0: low swing, bit 1: half width.  S0 full/full .. S3 low/half.
  typedef enum logic [1:0] {
    LM_S0 = 2'd0, LM_S1 = 2'd1, LM_S2 = 2'd2, LM_S3 = 2'd3
  } link_mode_e;

  // ---------------- per-router event pulses (statistics) ----------------
  typedef struct packed {
    logic notify_entry;     // Begin -> Notify
    logic throttle_entry;   // -> Throttle
    logic off_entry;        // -> Off
    logic head_held;        // a new packet held at an input by Notify
    logic gen_power;        // power ant generated
    logic gen_beggar;       // beggar ant generated
    logic grant;            // budget raised by a power ant
    logic mark;             // beggar ant consumed at a surplus router
    logic ant_fwd;          // ant forwarded
    logic ant_kill;         // ant reached its hop limit
    logic resize;           // buffer resize started
    logic blk_on;           // buffer block powered on
    logic blk_off;          // buffer block powered off
    logic flip_on;          // inverted storage switched on
    logic link_up;          // a link stepped up
    logic link_down;        // a link stepped down
    logic half_wait;        // a flit waited for a half-width link
  } router_ev_t;

endpackage
