// esy_router: five-port wormhole router with the EsyTest test wrappers.
//
// Data path: one input buffer per virtual channel (L, N1, N2, S1, S2, E, W;
// DEPTH flits each), a 7x5 crossbar and one output register per port.
// Control path: per input VC a route unit and a small state machine, output
// VC ownership (virtual channel allocation), one switch allocator per output
// and credit counters for the downstream buffers.
//
// Pipeline (normal mode): a flit written into the buffer in cycle t is seen
// at the buffer head in t+1, where a head flit is routed and claims its
// output VC; in t+2 it competes in switch allocation and traverses the
// crossbar into the output register; it is on the outgoing link in t+3 --
// three cycles per hop. Body flits follow one per cycle.
//
// Test support:
//  - tcu runs this router's own test procedure and drives TestPhase (TP),
//    EmptyRequest (ER) and the DirectNeighborStatus (DNS, "I am an FC-RUT").
//  - Each mesh output port has a TPG that injects test packets into the
//    neighbour while that neighbour is in its data path test; the switch
//    allocator ranks them below data in Free-Slot and above data in Block.
//  - Each mesh input port has a TPA; test packets addressed to this router
//    are demultiplexed to it by the TEST bit instead of into the buffer.
//  - While ER of a neighbour is high, no new packet is started towards it;
//    EmptyAck (EA) is returned when that output has no open packet and all
//    of its credits are back.
//  - Under control path test the cp_wrapper fixes the crossbar and the
//    buffers become one-flit pipes, so a flit crosses in one cycle.
//  - IndirectNeighborStatus (INS): the status received from the east
//    neighbour is forwarded north, north to west, west to south and south to
//    east, so every router learns the status of its four corner routers.
// Local port 0 connects to the network interface, which receives ER/EA on
// sync_*[0]. The control path BIST itself is external: cp_bist_en enables
// it during the Testing phase and cp_bist_fail reports its verdict.
//
// Lint may report a combinational loop through the crossbar select array.
// It comes from flattening the array: each output select depends only on
// allocator state and the fixed-mode flag, never on another select.
module esy_router
  import esy_pkg::*;
#(
  parameter int          XDIM        = 10,
  parameter int          YDIM        = 8,
  parameter int          MY_X        = 0,
  parameter int          MY_Y        = 0,
  parameter int          DEPTH       = 12,
  parameter int unsigned TIT         = 20000,
  parameter int unsigned TIV         = 0,
  parameter int unsigned T_FREE      = 1000,
  parameter int unsigned T_BLOCK     = 1000,
  parameter int unsigned T_TEST      = 2000,
  parameter int          NUM_VEC     = 34,
  parameter int          VEC_PER_PKT = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  link_t   in_link    [NPORT],
  output credit_t in_credit  [NPORT],
  output link_t   out_link   [NPORT],
  input  credit_t out_credit [NPORT],
  input  sync_t   sync_in    [NPORT],
  output sync_t   sync_out   [NPORT],
  input  logic    cp_bist_fail,
  output logic    cp_bist_en,
  output tp_e     tp,
  output logic [2:0] phase,
  output logic    fixed_mode,
  output logic [4:0] dp_fault,
  output logic [4:0] dp_incomplete,
  output logic    cp_fault,
  output logic [15:0] n_tests,
  output logic [15:0] n_tr_pkt,
  output logic [15:0] n_tpa_pkt,
  output logic [15:0] n_tpa_err
);
  localparam int CRW = $clog2(DEPTH + 1);
  localparam logic EAST_BORDER = (MY_X == XDIM - 1);

  logic [4:0] exists;
  always_comb begin
    exists      = '0;
    exists[P_L] = 1'b1;
    exists[P_N] = (MY_Y != 0);
    exists[P_S] = (MY_Y != YDIM - 1);
    exists[P_E] = (MY_X != XDIM - 1);
    exists[P_W] = (MY_X != 0);
  end

  // ---------------------------------------------------------------- TCU
  logic       er, fixed, drained, nbr_busy;
  logic [4:0] ea_in, tr_pkt, tr_err, tpg_done_in;

  always_comb begin
    nbr_busy = 1'b0;
    for (int p = 1; p < NPORT; p++) begin
      ea_in[p]       = sync_in[p].ea;
      tr_pkt[p]      = sync_in[p].tr_pkt;
      tr_err[p]      = sync_in[p].tr_err;
      tpg_done_in[p] = sync_in[p].tpg_done;
      if (exists[p] && (sync_in[p].tp != TP_NORMAL || sync_in[p].ins)) nbr_busy = 1'b1;
    end
    ea_in[0] = sync_in[0].ea;
    tr_pkt[0] = 1'b0; tr_err[0] = 1'b0; tpg_done_in[0] = 1'b0;
  end

  tcu #(.TIT(TIT), .TIV(TIV), .T_FREE(T_FREE), .T_BLOCK(T_BLOCK), .T_TEST(T_TEST)) u_tcu (
    .clk(clk), .rst_n(rst_n), .port_exists(exists), .nbr_busy(nbr_busy),
    .ea_in(ea_in), .tr_pkt(tr_pkt), .tr_err(tr_err), .tpg_done(tpg_done_in),
    .drained(drained), .cp_bist_fail(cp_bist_fail),
    .tp(tp), .er(er), .fixed(fixed), .cp_bist_en(cp_bist_en), .phase(phase),
    .dp_fault(dp_fault), .dp_incomplete(dp_incomplete), .cp_fault(cp_fault),
    .n_tests(n_tests), .n_tr_pkt(n_tr_pkt)
  );
  assign fixed_mode = fixed;

  // ---------------------------------------------------- input demux / TPA
  logic [NIVC-1:0] wr;
  logic [NIVC-1:0] tpa_pkt;           // VC currently carries a test packet for the TPA
  logic [NPORT-1:0] to_tpa;
  logic [NPORT-1:0] tpa_done, tpa_err;
  logic [15:0]      tpa_np [NPORT];
  logic [15:0]      tpa_ne [NPORT];

  always_comb begin
    int iv;
    wr = '0;
    to_tpa = '0;
    for (int p = 0; p < NPORT; p++) begin
      iv = ivc_index(p, in_link[p].vc);
      if (in_link[p].valid && exists[p]) begin
        if (p != P_L && !fixed &&
            ((is_head(in_link[p].flit.ftype) && in_link[p].flit.test &&
              hd_dx(in_link[p].flit.data) == CW'(MY_X) && hd_dy(in_link[p].flit.data) == CW'(MY_Y)) ||
             (!is_head(in_link[p].flit.ftype) && tpa_pkt[iv])))
          to_tpa[p] = 1'b1;
        else
          wr[iv] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tpa_pkt <= '0;
    else
      for (int p = 1; p < NPORT; p++)
        if (to_tpa[p]) tpa_pkt[ivc_index(p, in_link[p].vc)] <= !is_tail(in_link[p].flit.ftype);
  end

  assign tpa_done[0] = 1'b0;
  assign tpa_err[0]  = 1'b0;
  assign tpa_np[0]   = '0;
  assign tpa_ne[0]   = '0;
  for (genvar p = 1; p < NPORT; p++) begin : g_tpa
    tpa #(.NVC((p == P_N || p == P_S) ? 2 : 1), .VEC_PER_PKT(VEC_PER_PKT)) u_tpa (
      .clk(clk), .rst_n(rst_n), .in_valid(to_tpa[p]), .in_vc(in_link[p].vc),
      .in_flit(in_link[p].flit), .pkt_done(tpa_done[p]), .pkt_err(tpa_err[p]),
      .n_pkt(tpa_np[p]), .n_err(tpa_ne[p])
    );
  end

  always_comb begin
    n_tpa_pkt = '0;
    n_tpa_err = '0;
    for (int p = 1; p < NPORT; p++) begin
      n_tpa_pkt = n_tpa_pkt + tpa_np[p];
      n_tpa_err = n_tpa_err + tpa_ne[p];
    end
  end

  // --------------------------------------------------------- input buffers
  logic [NIVC-1:0] rd, hv, bempty;
  flit_t           hf [NIVC];
  flit_t           wf [NIVC];

  for (genvar i = 0; i < NIVC; i++) begin : g_buf
    assign wf[i] = in_link[ivc_port(i)].flit;
    input_buffer #(.DEPTH(DEPTH)) u_buf (
      .clk(clk), .rst_n(rst_n), .fixed(fixed), .wr(wr[i]), .wr_flit(wf[i]),
      .rd(rd[i]), .head_valid(hv[i]), .head(hf[i]), .empty(bempty[i]), .count()
    );
  end

  // ------------------------------------------------------- credit counters
  logic [CRW-1:0] cred [NIVC];        // per output VC
  logic [3:0]     free4 [NIVC];
  logic [NIVC-1:0] sent;              // output VC sent a flit this cycle

  always_comb
    for (int i = 0; i < NIVC; i++) free4[i] = (int'(cred[i]) > 15) ? 4'd15 : 4'(cred[i]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NIVC; i++) cred[i] <= CRW'(DEPTH);
    end else if (!fixed) begin
      for (int i = 0; i < NIVC; i++)
        cred[i] <= cred[i] - CRW'(sent[i])
                   + CRW'(out_credit[ivc_port(i)].cnt[ivc_vc(i)]);
    end
  end

  // ------------------------------------------ routing and VC allocation
  logic [2:0]      rport [NIVC];
  logic            rvc   [NIVC];
  logic [2:0]      oport [NIVC];      // allocated output port
  logic [2:0]      oivc  [NIVC];      // allocated output VC index
  logic [NIVC-1:0] active;
  logic [NIVC-1:0] own;               // output VC owned by a packet
  logic [NIVC-1:0] own_tpg;           // ... by the TPG of its port
  logic [NIVC-1:0] va_win;            // input VC wins its output VC this cycle
  logic [NIVC-1:0] va_claim;          // output VC claimed this cycle
  logic [4:0]      fc_dir;
  logic [3:0]      fc_cor;
  logic [NPORT-1:0] paused;
  logic [2:0]      rr;

  always_comb begin
    fc_dir = '0;
    for (int p = 1; p < NPORT; p++) fc_dir[p] = exists[p] && sync_in[p].dns;
    fc_cor[0] = exists[P_E] && sync_in[P_E].ins;   // NE
    fc_cor[1] = exists[P_N] && sync_in[P_N].ins;   // NW
    fc_cor[2] = exists[P_S] && sync_in[P_S].ins;   // SE
    fc_cor[3] = exists[P_W] && sync_in[P_W].ins;   // SW
    paused = '0;
    for (int p = 1; p < NPORT; p++) paused[p] = exists[p] && sync_in[p].er;
  end

  for (genvar i = 0; i < NIVC; i++) begin : g_rt
    route_unit #(.XDIM(XDIM), .YDIM(YDIM)) u_rt (
      .cur_x(CW'(MY_X)), .cur_y(CW'(MY_Y)), .src_x(hd_sx(hf[i].data)),
      .dst_x(hd_dx(hf[i].data)), .dst_y(hd_dy(hf[i].data)),
      .in_port(3'(ivc_port(i))), .fc_dir(fc_dir), .fc_cor(fc_cor),
      .free_cred(free4), .out_port(rport[i]), .out_vc(rvc[i])
    );
  end

  always_comb begin
    va_win   = '0;
    va_claim = '0;
    for (int k = 0; k < NIVC; k++) begin
      int i, ov;
      i  = (k + int'(rr)) % NIVC;
      ov = ivc_index(int'(rport[i]), rvc[i]);
      if (!fixed && !active[i] && hv[i] && is_head(hf[i].ftype) &&
          !paused[rport[i]] && !own[ov] && !va_claim[ov]) begin
        va_win[i]    = 1'b1;
        va_claim[ov] = 1'b1;
      end
    end
  end

  // ---------------------------------------------------- switch allocation
  logic [NIVC-1:0]  sa_req   [NPORT];
  logic [NIVC-1:0]  sa_gnt   [NPORT];
  logic [NPORT-1:0] tpg_valid, tpg_req, tpg_gnt, tpg_open, tpg_done;
  flit_t            tpg_flit [NPORT];
  logic [1:0]       tpg_mode [NPORT];

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      sa_req[o] = '0;
      for (int i = 0; i < NIVC; i++)
        if (!fixed && active[i] && hv[i] && oport[i] == 3'(o) && cred[oivc[i]] != 0)
          sa_req[o][i] = 1'b1;
    end
    for (int o = 0; o < NPORT; o++) begin
      int ov;
      ov = ivc_index(o, 1'b0);
      tpg_req[o] = !fixed && tpg_valid[o] && cred[ov] != 0 &&
                   (is_head(tpg_flit[o].ftype) ? (!own[ov] && !va_claim[ov])
                                               : (own[ov] && own_tpg[ov]));
      if (tpg_open[o])                       tpg_mode[o] = 2'd2;
      else if (sync_in[o].tp == TP_FREE)     tpg_mode[o] = 2'd1;
      else if (sync_in[o].tp == TP_BLOCK)    tpg_mode[o] = 2'd2;
      else                                   tpg_mode[o] = 2'd0;
    end
  end

  assign tpg_valid[0] = 1'b0;
  assign tpg_open[0]  = 1'b0;
  assign tpg_done[0]  = 1'b0;
  assign tpg_flit[0]  = '0;
  for (genvar o = 1; o < NPORT; o++) begin : g_tpg
    tpg #(.XDIM(XDIM), .YDIM(YDIM), .MY_X(MY_X), .MY_Y(MY_Y), .DIR(o),
          .NUM_VEC(NUM_VEC), .VEC_PER_PKT(VEC_PER_PKT)) u_tpg (
      .clk(clk), .rst_n(rst_n), .rut_tp(exists[o] ? sync_in[o].tp : TP_NORMAL),
      .gnt(tpg_gnt[o]), .valid(tpg_valid[o]), .flit(tpg_flit[o]),
      .pkt_open(tpg_open[o]), .done(tpg_done[o])
    );
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_sa
    switch_allocator #(.NIN(NIVC)) u_sa (
      .clk(clk), .rst_n(rst_n), .req(sa_req[o]), .tpg_req(tpg_req[o]),
      .tpg_mode(tpg_mode[o]), .tpg_pkt_open(tpg_open[o]),
      .gnt(sa_gnt[o]), .tpg_gnt(tpg_gnt[o])
    );
  end

  // ------------------------------------------------ wrapper and crossbar
  logic [NIVC-1:0]  xsel [NPORT];
  logic             xvc  [NPORT];
  credit_t          norm_credit [NPORT];
  flit_t            xflit [NPORT];
  logic [NPORT-1:0] xvalid;

  always_comb begin
    for (int p = 0; p < NPORT; p++) norm_credit[p] = '0;
    for (int i = 0; i < NIVC; i++)
      if (rd[i]) norm_credit[ivc_port(i)].cnt[ivc_vc(i)] = 2'd1;
    for (int p = 1; p < NPORT; p++)
      if (to_tpa[p])
        norm_credit[p].cnt[in_link[p].vc] = norm_credit[p].cnt[in_link[p].vc] + 2'd1;
  end

  cp_wrapper u_wrap (
    .fixed(fixed), .east_border(EAST_BORDER), .ivc_valid(hv), .norm_sel(sa_gnt),
    .norm_credit(norm_credit), .out_credit(out_credit),
    .sel(xsel), .sel_vc(xvc), .in_credit(in_credit)
  );

  crossbar #(.NIN(NIVC), .NOUT(NPORT)) u_xbar (
    .in_flit(hf), .in_valid(hv), .sel(xsel), .out_flit(xflit), .out_valid(xvalid)
  );

  // buffer reads: a switch grant in normal mode, always in fixed mode
  always_comb begin
    rd   = '0;
    sent = '0;
    for (int o = 0; o < NPORT; o++)
      for (int i = 0; i < NIVC; i++)
        if (sa_gnt[o][i]) begin
          rd[i] = 1'b1;
          sent[oivc[i]] = 1'b1;
        end
    for (int o = 1; o < NPORT; o++)
      if (tpg_gnt[o]) sent[ivc_index(o, 1'b0)] = 1'b1;
  end

  // -------------------------------------------- VC state and ownership
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0; own <= '0; own_tpg <= '0; rr <= '0;
      for (int i = 0; i < NIVC; i++) begin oport[i] <= '0; oivc[i] <= '0; end
    end else begin
      rr <= (rr == 3'(NIVC - 1)) ? '0 : rr + 1'b1;
      for (int i = 0; i < NIVC; i++) begin
        if (va_win[i]) begin
          active[i] <= 1'b1;
          oport[i]  <= rport[i];
          oivc[i]   <= 3'(ivc_index(int'(rport[i]), rvc[i]));
          own[ivc_index(int'(rport[i]), rvc[i])] <= 1'b1;
        end else if (rd[i] && active[i] && is_tail(hf[i].ftype)) begin
          active[i] <= 1'b0;
          own[oivc[i]] <= 1'b0;
        end
      end
      for (int o = 1; o < NPORT; o++)
        if (tpg_gnt[o]) begin
          if (is_head(tpg_flit[o].ftype)) begin
            own[ivc_index(o, 1'b0)]     <= 1'b1;
            own_tpg[ivc_index(o, 1'b0)] <= 1'b1;
          end
          if (is_tail(tpg_flit[o].ftype)) begin
            own[ivc_index(o, 1'b0)]     <= 1'b0;
            own_tpg[ivc_index(o, 1'b0)] <= 1'b0;
          end
        end
    end
  end

  // ------------------------------------------------------ output stage
  link_t out_q [NPORT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) out_q[o] <= '0;
    end else begin
      for (int o = 0; o < NPORT; o++) begin
        out_q[o].valid <= 1'b0;
        if (!fixed && tpg_gnt[o]) begin
          out_q[o].valid <= 1'b1;
          out_q[o].vc    <= 1'b0;
          out_q[o].flit  <= tpg_flit[o];
        end else if (!fixed && |sa_gnt[o]) begin
          out_q[o].valid <= 1'b1;
          out_q[o].flit  <= xflit[o];
          for (int i = 0; i < NIVC; i++)
            if (sa_gnt[o][i]) out_q[o].vc <= ivc_vc(int'(oivc[i]));
        end
      end
    end
  end

  always_comb
    for (int o = 0; o < NPORT; o++) begin
      if (fixed) begin
        out_link[o].valid = xvalid[o];
        out_link[o].vc    = xvc[o];
        out_link[o].flit  = xflit[o];
      end else begin
        out_link[o] = out_q[o];
      end
    end

  // -------------------------------------------------- drain and EA
  logic creds_full;
  logic outs_idle;
  always_comb begin
    creds_full = 1'b1;
    for (int i = 0; i < NIVC; i++)
      if (exists[ivc_port(i)] && cred[i] != CRW'(DEPTH)) creds_full = 1'b0;
    outs_idle = 1'b1;
    for (int o = 0; o < NPORT; o++) if (out_q[o].valid) outs_idle = 1'b0;
    drained = (&bempty) && (fixed || (active == '0 && own == '0 && creds_full && outs_idle));
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      logic port_idle;
      port_idle = 1'b1;
      for (int i = 0; i < NIVC; i++)
        if (ivc_port(i) == p && (own[i] || cred[i] != CRW'(DEPTH))) port_idle = 1'b0;
      if (out_q[p].valid) port_idle = 1'b0;
      sync_out[p].tp       = tp;
      sync_out[p].er       = er;
      sync_out[p].ea       = (p != P_L) && sync_in[p].er && port_idle;
      sync_out[p].dns      = (tp == TP_CTRL);
      sync_out[p].ins      = 1'b0;
      sync_out[p].tr_pkt   = tpa_done[p];
      sync_out[p].tr_err   = tpa_err[p];
      sync_out[p].tpg_done = tpg_done[p];
    end
    sync_out[P_N].ins = exists[P_E] && sync_in[P_E].dns;
    sync_out[P_W].ins = exists[P_N] && sync_in[P_N].dns;
    sync_out[P_S].ins = exists[P_W] && sync_in[P_W].dns;
    sync_out[P_E].ins = exists[P_S] && sync_in[P_S].dns;
  end

  // Flow control rule: never send on an output VC without a credit.
  for (genvar i = 0; i < NIVC; i++) begin : g_chk
    credit_ok: assert property (@(posedge clk) disable iff (!rst_n)
      sent[i] |-> cred[i] != 0);
  end
endmodule
