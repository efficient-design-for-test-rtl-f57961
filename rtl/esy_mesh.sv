// esy_mesh: XDIM x YDIM mesh of EsyTest routers (default 10 x 8).
//
// Every router is wired to its four neighbours with a data link and a credit
// return in each direction, plus the synchronous test signals (TestPhase,
// EmptyRequest/EmptyAck, DNS/INS status, test results, TPG done). Ports at
// the mesh border are tied off. Each router's test interval timer is
// initialised from the four-group test sequence: routers are taken group by
// group (group = x mod 2 + 2 * (y mod 2)), top-left to bottom-right within a
// group, and router number k in that order first starts its test after
// k * TIT / (XDIM * YDIM) cycles. With TIT at or above the lower bound
// (T_FREE + T_BLOCK + T_TEST) * N_R / min(x_g * y_g - 1), routers tested at
// the same time are at least two hops apart.
//
// The local port of each router (index x + XDIM * y) is brought out to the
// network interface, together with its ER/EA handshake, and so are the hooks
// of the control path BIST units and each router's test status.
//
// Lint may report circular logic through the flattened credit and status
// arrays between routers. The loops are not real: status signals leave each
// router from registers, and in fixed mode a credit is forwarded across at
// most one router under test, whose neighbours are never under test at the
// same time, so no combinational path closes on itself.
module esy_mesh
  import esy_pkg::*;
#(
  parameter int          XDIM        = 10,
  parameter int          YDIM        = 8,
  parameter int          DEPTH       = 12,
  parameter int unsigned TIT         = 20000,
  parameter int unsigned T_FREE      = 1000,
  parameter int unsigned T_BLOCK     = 1000,
  parameter int unsigned T_TEST      = 2000,
  parameter int          NUM_VEC     = 34,
  parameter int          VEC_PER_PKT = 1,
  localparam int         NR          = XDIM * YDIM
) (
  input  logic       clk,
  input  logic       rst_n,
  // network interface side of each local port
  input  link_t      ni_in_link   [NR],   // NI -> router
  output credit_t    ni_in_credit [NR],   // router -> NI
  output link_t      ni_out_link  [NR],   // router -> NI
  input  credit_t    ni_out_credit[NR],   // NI -> router
  output logic       ni_er        [NR],   // EmptyRequest to the NI
  input  logic       ni_ea        [NR],   // EmptyAck from the NI
  // control path BIST units
  output logic       cp_bist_en   [NR],
  input  logic       cp_bist_fail [NR],
  // test status
  output tp_e        tp           [NR],
  output logic [2:0] phase        [NR],
  output logic       fixed_mode   [NR],
  output logic [4:0] dp_fault     [NR],
  output logic [4:0] dp_incomplete[NR],
  output logic       cp_fault     [NR],
  output logic [15:0] n_tests     [NR],
  output logic [15:0] n_tr_pkt    [NR],
  output logic [15:0] n_tpa_pkt   [NR],
  output logic [15:0] n_tpa_err   [NR]
);
  link_t   r_in_link   [NR][NPORT];
  credit_t r_in_credit [NR][NPORT];
  link_t   r_out_link  [NR][NPORT];
  credit_t r_out_credit[NR][NPORT];
  sync_t   r_sync_in   [NR][NPORT];
  sync_t   r_sync_out  [NR][NPORT];

  for (genvar y = 0; y < YDIM; y++) begin : g_y
    for (genvar x = 0; x < XDIM; x++) begin : g_x
      localparam int ID = x + XDIM * y;
      localparam int unsigned TIV = int'(test_tiv(x, y, XDIM, YDIM, longint'(TIT)));

      // local port
      assign r_in_link[ID][P_L]    = ni_in_link[ID];
      assign ni_in_credit[ID]      = r_in_credit[ID][P_L];
      assign ni_out_link[ID]       = r_out_link[ID][P_L];
      assign r_out_credit[ID][P_L] = ni_out_credit[ID];
      assign ni_er[ID]             = r_sync_out[ID][P_L].er;
      always_comb begin
        r_sync_in[ID][P_L]    = '0;
        r_sync_in[ID][P_L].ea = ni_ea[ID];
      end

      // north
      if (y > 0) begin : g_n
        assign r_in_link[ID][P_N]    = r_out_link[ID - XDIM][P_S];
        assign r_out_credit[ID][P_N] = r_in_credit[ID - XDIM][P_S];
        assign r_sync_in[ID][P_N]    = r_sync_out[ID - XDIM][P_S];
      end else begin : g_n0
        assign r_in_link[ID][P_N]    = '0;
        assign r_out_credit[ID][P_N] = '0;
        assign r_sync_in[ID][P_N]    = '0;
      end
      // south
      if (y < YDIM - 1) begin : g_s
        assign r_in_link[ID][P_S]    = r_out_link[ID + XDIM][P_N];
        assign r_out_credit[ID][P_S] = r_in_credit[ID + XDIM][P_N];
        assign r_sync_in[ID][P_S]    = r_sync_out[ID + XDIM][P_N];
      end else begin : g_s0
        assign r_in_link[ID][P_S]    = '0;
        assign r_out_credit[ID][P_S] = '0;
        assign r_sync_in[ID][P_S]    = '0;
      end
      // east
      if (x < XDIM - 1) begin : g_e
        assign r_in_link[ID][P_E]    = r_out_link[ID + 1][P_W];
        assign r_out_credit[ID][P_E] = r_in_credit[ID + 1][P_W];
        assign r_sync_in[ID][P_E]    = r_sync_out[ID + 1][P_W];
      end else begin : g_e0
        assign r_in_link[ID][P_E]    = '0;
        assign r_out_credit[ID][P_E] = '0;
        assign r_sync_in[ID][P_E]    = '0;
      end
      // west
      if (x > 0) begin : g_w
        assign r_in_link[ID][P_W]    = r_out_link[ID - 1][P_E];
        assign r_out_credit[ID][P_W] = r_in_credit[ID - 1][P_E];
        assign r_sync_in[ID][P_W]    = r_sync_out[ID - 1][P_E];
      end else begin : g_w0
        assign r_in_link[ID][P_W]    = '0;
        assign r_out_credit[ID][P_W] = '0;
        assign r_sync_in[ID][P_W]    = '0;
      end

      esy_router #(
        .XDIM(XDIM), .YDIM(YDIM), .MY_X(x), .MY_Y(y), .DEPTH(DEPTH),
        .TIT(TIT), .TIV(TIV), .T_FREE(T_FREE), .T_BLOCK(T_BLOCK), .T_TEST(T_TEST),
        .NUM_VEC(NUM_VEC), .VEC_PER_PKT(VEC_PER_PKT)
      ) u_r (
        .clk(clk), .rst_n(rst_n),
        .in_link(r_in_link[ID]), .in_credit(r_in_credit[ID]),
        .out_link(r_out_link[ID]), .out_credit(r_out_credit[ID]),
        .sync_in(r_sync_in[ID]), .sync_out(r_sync_out[ID]),
        .cp_bist_fail(cp_bist_fail[ID]), .cp_bist_en(cp_bist_en[ID]),
        .tp(tp[ID]), .phase(phase[ID]), .fixed_mode(fixed_mode[ID]),
        .dp_fault(dp_fault[ID]), .dp_incomplete(dp_incomplete[ID]),
        .cp_fault(cp_fault[ID]), .n_tests(n_tests[ID]),
        .n_tr_pkt(n_tr_pkt[ID]), .n_tpa_pkt(n_tpa_pkt[ID]), .n_tpa_err(n_tpa_err[ID])
      );
    end
  end
endmodule
