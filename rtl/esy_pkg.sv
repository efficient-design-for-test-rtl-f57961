// esy_pkg: types, constants and helper functions shared by the DfT NoC.
//
// Flits carry a 34-bit data word (the data path width, equal to the width of
// one data path test vector) plus a flit type and a TEST bit. A head flit
// holds the destination and source coordinates and, for test packets, the
// index of the first test vector it carries. Ports are numbered L, N, S, E, W.
// North and south ports have two virtual channels (VC 0 = subnetwork A, VC 1
// = subnetwork B); local, east and west have one. Y grows from north (top)
// to south (bottom), X from west to east.
//
// The test vector set, head flit layout and numeric encodings other than the
// two-bit TestPhase code are choices of this design.
package esy_pkg;

  localparam int DATA_W = 34;   // data path width
  localparam int CW     = 4;    // coordinate field width in a head flit
  localparam int IDXW   = 6;    // test vector index width
  localparam int NPORT  = 5;
  localparam int NIVC   = 7;    // L, N1, N2, S1, S2, E, W

  localparam int P_L = 0;
  localparam int P_N = 1;
  localparam int P_S = 2;
  localparam int P_E = 3;
  localparam int P_W = 4;

  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_HEAD   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic                test;   // TEST bit, meaningful in the head flit
    logic [DATA_W-1:0]   data;
  } flit_t;

  // One direction of a router-to-router link.
  typedef struct packed {
    logic  valid;
    logic  vc;
    flit_t flit;
  } link_t;

  // Credits returned upstream: number of buffer slots freed this cycle, per VC.
  typedef struct packed {
    logic [1:0][1:0] cnt;   // cnt[vc]
  } credit_t;

  // Two-bit TestPhase (TP) code sent to the neighbours.
  typedef enum logic [1:0] {
    TP_NORMAL = 2'b00,
    TP_FREE   = 2'b01,
    TP_BLOCK  = 2'b11,
    TP_CTRL   = 2'b10
  } tp_e;

  // Synchronous test signals sent from a router to one neighbour.
  typedef struct packed {
    tp_e  tp;        // TestPhase of the sender
    logic er;        // EmptyRequest from a router under test
    logic ea;        // EmptyAck to a router under test
    logic dns;       // DirectNeighborStatus: sender is an FC-RUT
    logic ins;       // IndirectNeighborStatus: forwarded status of a corner router
    logic tr_pkt;    // TPA: one test packet checked
    logic tr_err;    // TPA: that test packet held an error
    logic tpg_done;  // TPG of the sender has injected all its test packets
  } sync_t;

  function automatic int ivc_port(input int i);
    case (i)
      0: return P_L;
      1, 2: return P_N;
      3, 4: return P_S;
      5: return P_E;
      default: return P_W;
    endcase
  endfunction

  function automatic logic ivc_vc(input int i);
    return (i == 2 || i == 4);
  endfunction

  function automatic int ivc_index(input int port, input logic vc);
    case (port)
      P_L: return 0;
      P_N: return vc ? 2 : 1;
      P_S: return vc ? 4 : 3;
      P_E: return 5;
      default: return 6;
    endcase
  endfunction

  // Head flit layout: [33:30] dst x, [29:26] dst y, [25:22] src x,
  // [21:18] src y, [17:12] test vector index, [11:0] free payload.
  function automatic logic [DATA_W-1:0] make_head(
      input logic [CW-1:0] dx, input logic [CW-1:0] dy,
      input logic [CW-1:0] sx, input logic [CW-1:0] sy,
      input logic [IDXW-1:0] idx, input logic [11:0] payload);
    return {dx, dy, sx, sy, idx, payload};
  endfunction

  function automatic logic [CW-1:0] hd_dx(input logic [DATA_W-1:0] d);
    return d[33:30];
  endfunction
  function automatic logic [CW-1:0] hd_dy(input logic [DATA_W-1:0] d);
    return d[29:26];
  endfunction
  function automatic logic [CW-1:0] hd_sx(input logic [DATA_W-1:0] d);
    return d[25:22];
  endfunction
  function automatic logic [CW-1:0] hd_sy(input logic [DATA_W-1:0] d);
    return d[21:18];
  endfunction
  function automatic logic [IDXW-1:0] hd_idx(input logic [DATA_W-1:0] d);
    return d[17:12];
  endfunction

  function automatic logic is_head(input ftype_e t);
    return t == FT_HEAD || t == FT_SINGLE;
  endfunction
  function automatic logic is_tail(input ftype_e t);
    return t == FT_TAIL || t == FT_SINGLE;
  endfunction

  // Data path test vector i: walking one for even i, walking zero for odd i,
  // so that every bit line is seen at 0 and at 1 and next to its opposite.
  function automatic logic [DATA_W-1:0] test_vector(input int i);
    logic [DATA_W-1:0] w;
    w = '0;
    w[i % DATA_W] = 1'b1;
    return (i % 2 == 0) ? w : ~w;
  endfunction

  // Four-group test sequence: group of a router and size of each group's
  // subnetwork (x_g by y_g).
  function automatic int tgroup(input int x, input int y);
    return (x % 2) + 2 * (y % 2);
  endfunction

  function automatic int group_xg(input int g, input int xdim);
    if (xdim % 2 == 0) return xdim / 2;
    return (g == 0 || g == 2) ? (xdim + 1) / 2 : (xdim - 1) / 2;
  endfunction

  function automatic int group_yg(input int g, input int ydim);
    if (ydim % 2 == 0) return ydim / 2;
    return (g == 0 || g == 1) ? (ydim + 1) / 2 : (ydim - 1) / 2;
  endfunction

  // Position of router (x, y) in the test sequence: groups 0..3 in turn,
  // top-left to bottom-right inside each group.
  function automatic int test_order(input int x, input int y, input int xdim, input int ydim);
    int g, base;
    g = tgroup(x, y);
    base = 0;
    for (int h = 0; h < 4; h++)
      if (h < g) base += group_xg(h, xdim) * group_yg(h, ydim);
    return base + (y / 2) * group_xg(g, xdim) + (x / 2);
  endfunction

  // Initial value of the test interval timer (cycles to the first test).
  function automatic longint test_tiv(input int x, input int y, input int xdim, input int ydim,
                                      input longint tit);
    return (longint'(test_order(x, y, xdim, ydim)) * tit) / longint'(xdim * ydim);
  endfunction

endpackage
