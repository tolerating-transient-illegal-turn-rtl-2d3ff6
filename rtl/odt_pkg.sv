// odt_pkg: shared types and constants of the ODT (online fault detection and
// tolerance) network-on-chip router.
//
// Every router has seven channels: East, West, North on virtual channel 1 and 2,
// South on virtual channel 1 and 2, and Local.  A channel is named by the side of
// the router it sits on, for inputs and outputs alike: a flit sent out on N1
// arrives at the north neighbour's S1 input.  Channel numbers fit in three bits,
// and the same three-bit code travels in the head flit as the "upstream input"
// field that the next router uses for fault detection.  North is +y, east is +x.
// The seven channels map onto five physical links; N1/N2 and S1/S2 share one
// link each, told apart by a virtual-channel bit.
//
// Coordinates are three bits wide, enough for the 8x8 mesh the design targets.
// The payload width is this design's own choice.
package odt_pkg;

  localparam int NCH     = 7;   // logical channels per router
  localparam int NLINK   = 5;   // physical links per router
  localparam int COORD_W = 3;   // bits per mesh coordinate (8x8 mesh)
  localparam int DATA_W  = 32;  // payload bits per flit (own choice)

  typedef enum logic [2:0] {
    CH_E  = 3'd0,
    CH_W  = 3'd1,
    CH_N1 = 3'd2,
    CH_N2 = 3'd3,
    CH_S1 = 3'd4,
    CH_S2 = 3'd5,
    CH_L  = 3'd6
  } ch_e;

  typedef enum logic [2:0] {
    LK_E = 3'd0,
    LK_W = 3'd1,
    LK_N = 3'd2,
    LK_S = 3'd3,
    LK_L = 3'd4
  } link_e;

  // Position of the destination relative to a node ("Pos").
  typedef enum logic [3:0] {
    POS_L  = 4'd0,
    POS_E  = 4'd1,
    POS_W  = 4'd2,
    POS_N  = 4'd3,
    POS_S  = 4'd4,
    POS_NE = 4'd5,
    POS_NW = 4'd6,
    POS_SE = 4'd7,
    POS_SW = 4'd8
  } pos_e;

  // How the routing computation reached its decision.
  typedef enum logic [1:0] {
    RM_NORMAL = 2'd0,  // minimal adaptive selection (fault-free behaviour)
    RM_SPP    = 2'd1,  // shortest path priority
    RM_SPARE  = 2'd2,  // spare routing
    RM_FAULT  = 2'd3   // decision overridden by an injected control-path fault
  } rmode_e;

  typedef logic [NCH-1:0] chmask_t;   // one bit per ch_e value

  typedef struct packed {
    logic               head;
    logic               tail;
    ch_e                up_in;   // input channel the flit used in the previous router
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [DATA_W-1:0]  data;
  } flit_t;

  // Per-router event flags, one bit per input channel, for observing the
  // mechanisms at work.
  typedef struct packed {
    chmask_t rt_normal;    // head routed by the minimal selection
    chmask_t rt_spp;       // head routed by shortest path priority
    chmask_t rt_spare;     // head routed by spare routing
    chmask_t rt_fault;     // head misrouted by an injected fault
    chmask_t ignorable;    // upstream turn judged ignorable fault
    chmask_t severe;       // upstream turn judged severe fault
    chmask_t va_wait;      // head waiting for its output channel
    chmask_t sa_wait;      // flit waiting for link or credit
    chmask_t blocked;      // input blocked after spare routing
  } events_t;

  // Physical link a channel belongs to.
  function automatic link_e ch2link(ch_e c);
    case (c)
      CH_E:         return LK_E;
      CH_W:         return LK_W;
      CH_N1, CH_N2: return LK_N;
      CH_S1, CH_S2: return LK_S;
      default:      return LK_L;
    endcase
  endfunction

  function automatic chmask_t chbit(ch_e c);
    return chmask_t'(1) << c;
  endfunction

endpackage
