// tb_esy_router: one router at (1,1) of a 3 x 3 mesh with behavioural
// neighbours that take every flit and return its credit at once.
// Checked: the three-cycle hop latency and flit order of a data packet,
// output port and VC choice, credit return, test packets for this router
// consumed by its TPA, test packets injected by its TPG while a neighbour
// is in data path test, EmptyAck and INS forwarding, and the router's own
// test procedure: the one-cycle fixed shortcuts N->S and L->E / E->L with
// credits handed straight back, and the return to normal routing.
`include "tb_check.svh"
module tb_esy_router;
  import esy_pkg::*;
  logic clk = 0, rst_n = 0;
  link_t   in_link [5], out_link [5];
  credit_t in_credit [5], out_credit [5];
  sync_t   sync_in [5], sync_out [5];
  logic    cp_bist_en, fixed_mode, cp_fault;
  tp_e     tp;
  logic [2:0] phase;
  logic [4:0] dp_fault, dp_incomplete;
  logic [15:0] n_tests, n_tr_pkt, n_tpa_pkt, n_tpa_err;
  int checks = 0, failures = 0, cyc = 0;
  int cred_back [5];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  esy_router #(.XDIM(3), .YDIM(3), .MY_X(1), .MY_Y(1), .TIT(100000), .TIV(600),
               .T_FREE(20), .T_BLOCK(20), .T_TEST(60)) dut (
    .clk, .rst_n, .in_link, .in_credit, .out_link, .out_credit, .sync_in, .sync_out,
    .cp_bist_fail(1'b0), .cp_bist_en, .tp, .phase, .fixed_mode, .dp_fault, .dp_incomplete,
    .cp_fault, .n_tests, .n_tr_pkt, .n_tpa_pkt, .n_tpa_err);

  // downstream: return a credit for every flit, except in fixed mode (see below)
  logic auto_credit = 1;
  credit_t extra_cred [5];
  always_comb
    for (int p = 0; p < 5; p++) begin
      out_credit[p] = extra_cred[p];
      if (auto_credit && out_link[p].valid) out_credit[p].cnt[out_link[p].vc] = 2'd1;
    end
  always @(posedge clk)
    for (int p = 0; p < 5; p++) cred_back[p] <= cred_back[p] + in_credit[p].cnt[0] + in_credit[p].cnt[1];

  function automatic flit_t fl(ftype_e t, logic test, logic [DATA_W-1:0] d);
    flit_t f; f.ftype = t; f.test = test; f.data = d; return f;
  endfunction

  // wait for a flit on output port p, return cycles waited
  task automatic expect_out(input int p, input flit_t f, input logic vc, input int lat, input string msg);
    int n = 0;
    while (!out_link[p].valid && n < 50) begin @(negedge clk); n++; end
    `CHECK(out_link[p].valid && out_link[p].flit == f && out_link[p].vc == vc && (lat < 0 || n == lat),
           $sformatf("%s (waited %0d)", msg, n))
  endtask

  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [DATA_W-1:0] h;
    int nt, c0;
    for (int p = 0; p < 5; p++) begin in_link[p] = '0; sync_in[p] = '0; cred_back[p] = 0; extra_cred[p] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. W -> E data packet, 4 flits back to back
    h = make_head(4'd2, 4'd1, 4'd0, 4'd1, '0, 12'h0);
    c0 = cred_back[P_W];
    in_link[P_W] = '{valid: 1, vc: 0, flit: fl(FT_HEAD, 0, h)}; @(negedge clk);
    in_link[P_W].flit = fl(FT_BODY, 0, 34'h1); @(negedge clk);
    in_link[P_W].flit = fl(FT_BODY, 0, 34'h2); @(negedge clk);
    in_link[P_W].flit = fl(FT_TAIL, 0, 34'h3);
    // head was driven 3 cycles ago; it must be on the link now
    `CHECK(out_link[P_E].valid && out_link[P_E].flit == fl(FT_HEAD, 0, h), "head after three cycles")
    @(negedge clk); in_link[P_W] = '0;
    expect_out(P_E, fl(FT_BODY, 0, 34'h1), 0, 0, "body 1 follows");
    @(negedge clk); expect_out(P_E, fl(FT_BODY, 0, 34'h2), 0, 0, "body 2 follows");
    @(negedge clk); expect_out(P_E, fl(FT_TAIL, 0, 34'h3), 0, 0, "tail follows");
    @(negedge clk); @(negedge clk);
    `CHECK(cred_back[P_W] - c0 == 4, "four credits returned upstream")

    // 2. local -> north, west-or-same column bound: subnetwork B (VC 1)
    h = make_head(4'd1, 4'd0, 4'd1, 4'd1, '0, 12'h0);
    in_link[P_L] = '{valid: 1, vc: 0, flit: fl(FT_SINGLE, 0, h)}; @(negedge clk); in_link[P_L] = '0;
    expect_out(P_N, fl(FT_SINGLE, 0, h), 1, 2, "local to north on VC 1");
    @(negedge clk);
    // 3. north VC 1 -> south, east-bound source: subnetwork A (VC 0)
    h = make_head(4'd1, 4'd2, 4'd0, 4'd0, '0, 12'h0);
    in_link[P_N] = '{valid: 1, vc: 1, flit: fl(FT_SINGLE, 0, h)}; @(negedge clk); in_link[P_N] = '0;
    expect_out(P_S, fl(FT_SINGLE, 0, h), 1'b0, 2, "north to south, east-bound on VC 0");
    @(negedge clk);

    // 4. test packet addressed here goes to the TPA
    c0 = cred_back[P_E];
    h = make_head(4'd1, 4'd1, 4'd1, 4'd0, 6'd4, 12'h0);
    in_link[P_E] = '{valid: 1, vc: 0, flit: fl(FT_HEAD, 1, h)}; @(negedge clk);
    in_link[P_E].flit = fl(FT_BODY, 0, test_vector(4)); @(negedge clk);
    in_link[P_E].flit = fl(FT_TAIL, 0, h); @(negedge clk); in_link[P_E] = '0;
    repeat (3) @(negedge clk);
    `CHECK(n_tpa_pkt == 1 && n_tpa_err == 0, "TPA checked one good test packet")
    `CHECK(cred_back[P_E] - c0 == 3, "TPA flits credited at once")
    `CHECK(!out_link[P_L].valid && !out_link[P_W].valid, "test packet not forwarded")

    // 5. neighbour east in data path test: TPG sends 34 x 3 flits east
    nt = 0;
    sync_in[P_E].tp = TP_FREE;
    for (int c = 0; c < 400 && !sync_out[P_E].tpg_done; c++) begin
      @(negedge clk);
      if (out_link[P_E].valid) begin
        nt++;
        if (is_head(out_link[P_E].flit.ftype))
          `CHECK(out_link[P_E].flit.test, "TPG head carries the TEST bit")
      end
    end
    `CHECK(nt == 102 && sync_out[P_E].tpg_done, $sformatf("TPG injected 102 test flits (%0d)", nt))
    sync_in[P_E].tp = TP_NORMAL; @(negedge clk);

    // 6. EmptyAck for an idle port and INS forwarding
    sync_in[P_S].er = 1; @(negedge clk);
    `CHECK(sync_out[P_S].ea, "EmptyAck from an idle port")
    sync_in[P_S].er = 0;
    sync_in[P_E].dns = 1; #1;
    `CHECK(sync_out[P_N].ins && !sync_out[P_W].ins, "east status forwarded north")
    sync_in[P_E].dns = 0;

    // 7. own test procedure; neighbours acknowledge every EmptyRequest
    fork
      forever begin
        @(negedge clk);
        for (int p = 0; p < 5; p++) sync_in[p].ea = sync_out[p].er;
      end
    join_none
    while (tp != TP_FREE) @(negedge clk);
    `CHECK(sync_out[P_N].tp == TP_FREE, "TestPhase Free-Slot sent to neighbours")
    while (!fixed_mode) @(negedge clk);
    `CHECK(sync_out[P_W].dns && tp == TP_CTRL, "DNS set under control path test")
    @(negedge clk);
    auto_credit = 0;
    in_link[P_N] = '{valid: 1, vc: 1, flit: fl(FT_SINGLE, 0, 34'h123)}; @(negedge clk); in_link[P_N] = '0;
    `CHECK(out_link[P_S].valid && out_link[P_S].vc == 1 && out_link[P_S].flit.data == 34'h123,
           "fixed N->S shortcut in one cycle")
    extra_cred[P_S].cnt[1] = 2'd1; #1;
    `CHECK(in_credit[P_N].cnt[1] == 2'd1, "credit handed from S output to N input")
    @(negedge clk); extra_cred[P_S] = '0;
    in_link[P_L] = '{valid: 1, vc: 0, flit: fl(FT_SINGLE, 0, 34'h77)}; @(negedge clk); in_link[P_L] = '0;
    `CHECK(out_link[P_E].valid && out_link[P_E].flit.data == 34'h77, "fixed L->E shortcut")
    in_link[P_E] = '{valid: 1, vc: 0, flit: fl(FT_SINGLE, 0, 34'h88)}; @(negedge clk); in_link[P_E] = '0;
    `CHECK(out_link[P_L].valid && out_link[P_L].flit.data == 34'h88, "fixed E->L shortcut")
    `CHECK(!out_link[P_W].valid, "west output idle in fixed mode")
    auto_credit = 1;
    while (tp != TP_NORMAL) @(negedge clk);
    `CHECK(n_tests == 1 && !fixed_mode, "test procedure completed")
    // normal routing again
    h = make_head(4'd0, 4'd1, 4'd2, 4'd1, '0, 12'h0);
    in_link[P_E] = '{valid: 1, vc: 0, flit: fl(FT_SINGLE, 0, h)}; @(negedge clk); in_link[P_E] = '0;
    expect_out(P_W, fl(FT_SINGLE, 0, h), 0, 2, "normal routing restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
