// tb_esy_mesh: end-to-end test of the EsyTest mesh at reduced size (4 x 4, short test phases).
//
// Every router's local port gets a behavioural network interface that sends
// random 5-flit packets. The test runs until every router has finished
// at least one complete test procedure (Free-Slot, Block, Emptying, Testing,
// Recovery), then stops new traffic and lets the network drain. Checked:
//  - every data packet arrives intact at its destination and none is lost;
//  - after each finished test procedure, the router under test has received
//    a good test result for every test packet of every neighbour's TPG
//    (neighbours x NUM_VEC / VEC_PER_PKT) and no data path fault is flagged;
//  - the control path BIST verdict of one router, forced to "fail", is
//    recorded as a control path fault, and no other router reports one;
//  - each test mechanism occurred: test flits injected in free slots and in
//    the Block phase, neighbours paused by EmptyRequest, flits crossing a
//    router on its fixed shortcut, flits delivered to the local core of a
//    router under control path test, and routes chosen around an FC-RUT.
module tb_esy_mesh;
  import esy_pkg::*;

  localparam int XDIM = 4;
  localparam int YDIM = 4;
  localparam int NR   = XDIM * YDIM;
  localparam int NPKT = 34;     // test packets per TPG (34 vectors, one per packet)
  localparam int FAIL_ID = 5;
  localparam int MAXCYC = 40000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b1;
  always #5 clk = ~clk;

  link_t   ni_in_link   [NR];
  credit_t ni_in_credit [NR];
  link_t   ni_out_link  [NR];
  credit_t ni_out_credit[NR];
  logic    ni_er [NR], ni_ea [NR];
  logic    cp_bist_en [NR], cp_bist_fail [NR];
  tp_e     tp [NR];
  logic [2:0] phase [NR];
  logic    fixed_mode [NR];
  logic [4:0] dp_fault [NR], dp_incomplete [NR];
  logic    cp_fault [NR];
  logic [15:0] n_tests [NR], n_tr_pkt [NR], n_tpa_pkt [NR], n_tpa_err [NR];
  int      n_sent [NR], n_recv [NR], n_err [NR], n_pause [NR];

  esy_mesh #(.XDIM(4), .YDIM(4), .TIT(4000), .T_FREE(100), .T_BLOCK(400), .T_TEST(200)) dut (
    .clk(clk), .rst_n(rst_n),
    .ni_in_link(ni_in_link), .ni_in_credit(ni_in_credit),
    .ni_out_link(ni_out_link), .ni_out_credit(ni_out_credit),
    .ni_er(ni_er), .ni_ea(ni_ea), .cp_bist_en(cp_bist_en), .cp_bist_fail(cp_bist_fail),
    .tp(tp), .phase(phase), .fixed_mode(fixed_mode), .dp_fault(dp_fault),
    .dp_incomplete(dp_incomplete), .cp_fault(cp_fault), .n_tests(n_tests),
    .n_tr_pkt(n_tr_pkt), .n_tpa_pkt(n_tpa_pkt), .n_tpa_err(n_tpa_err)
  );

  int checks = 0, failures = 0;
  int ev_free [NR], ev_block [NR], ev_fixed [NR], ev_ladder [NR], ev_around [NR];

  for (genvar r = 0; r < NR; r++) begin : g_ni
    localparam int X = r % XDIM, Y = r / XDIM;
    localparam int NB = (X > 0) + (X < XDIM - 1) + (Y > 0) + (Y < YDIM - 1);
    tb_ni #(.XDIM(XDIM), .YDIM(YDIM), .ID(r), .RATE(30)) u_ni (
      .clk(clk), .rst_n(rst_n), .enable(enable),
      .tx(ni_in_link[r]), .tx_credit(ni_in_credit[r]),
      .rx(ni_out_link[r]), .rx_credit(ni_out_credit[r]),
      .er(ni_er[r]), .ea(ni_ea[r]),
      .n_sent(n_sent[r]), .n_recv(n_recv[r]), .n_err(n_err[r]), .n_pause(n_pause[r])
    );
    assign cp_bist_fail[r] = (r == FAIL_ID) && cp_bist_en[r];

    // mechanism counters, read from inside the router
    logic [15:0] tests_q;
    initial begin ev_free[r] = 0; ev_block[r] = 0; ev_fixed[r] = 0; ev_ladder[r] = 0; ev_around[r] = 0; end
    always @(posedge clk) if (rst_n) begin
      for (int p = 1; p < 5; p++)
        if (dut.g_y[Y].g_x[X].u_r.tpg_gnt[p]) begin
          if (dut.g_y[Y].g_x[X].u_r.sync_in[p].tp == TP_FREE)  ev_free[r]  <= ev_free[r] + 1;
          if (dut.g_y[Y].g_x[X].u_r.sync_in[p].tp == TP_BLOCK) ev_block[r] <= ev_block[r] + 1;
        end
      if (fixed_mode[r]) begin
        for (int p = 1; p < 5; p++)
          if (dut.g_y[Y].g_x[X].u_r.out_link[p].valid) ev_fixed[r] <= ev_fixed[r] + 1;
        if (ni_out_link[r].valid) ev_ladder[r] <= ev_ladder[r] + 1;
      end
      if (dut.g_y[Y].g_x[X].u_r.fc_dir != 0 && dut.g_y[Y].g_x[X].u_r.va_win != 0)
        ev_around[r] <= ev_around[r] + 1;
      // at the end of each test procedure check the test results
      tests_q <= n_tests[r];
      if (n_tests[r] != tests_q) begin
        checks++;
        if (n_tr_pkt[r] != 16'(NB * NPKT) || dp_fault[r] != 0 || dp_incomplete[r] != 0) begin
          failures++;
          $display("FAIL router %0d test: tr_pkt=%0d (exp %0d) dp_fault=%b incomplete=%b",
                   r, n_tr_pkt[r], NB * NPKT, dp_fault[r], dp_incomplete[r]);
        end
        checks++;
        if (cp_fault[r] != (r == FAIL_ID)) begin
          failures++;
          $display("FAIL router %0d cp_fault=%0d", r, cp_fault[r]);
        end
      end
    end
  end

  function automatic bit all_tested();
    for (int r = 0; r < NR; r++) if (n_tests[r] == 0) return 0;
    return 1;
  endfunction

  function automatic int sum(input int a [NR]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end else $display("mechanism %-28s %0d", name, n);
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot_sent, tot_recv, tot_err, tot_pause, tot_tests;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    while (!all_tested()) @(posedge clk);
    $display("all routers tested at cycle %0d", cyc);
    enable = 1'b0;
    repeat (2000) @(posedge clk);
    tot_sent = sum(n_sent); tot_recv = sum(n_recv); tot_err = sum(n_err);
    tot_pause = sum(n_pause);
    tot_tests = 0;
    for (int r = 0; r < NR; r++) tot_tests += int'(n_tests[r]);
    $display("packets sent %0d received %0d, tests %0d", tot_sent, tot_recv, tot_tests);
    checks++;
    if (tot_sent != tot_recv || tot_sent == 0) begin
      failures++; $display("FAIL packets sent %0d received %0d", tot_sent, tot_recv);
    end
    checks++;
    if (tot_err != 0) begin failures++; $display("FAIL %0d corrupted data flits", tot_err); end
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (n_tpa_err[r] != 0) begin failures++; $display("FAIL TPA errors at %0d", r); end
    end
    checks++;
    if (cp_fault[FAIL_ID] != 1'b1) begin failures++; $display("FAIL forced BIST fault not seen"); end
    mech("free-slot test injection", sum(ev_free));
    mech("block-phase test injection", sum(ev_block));
    mech("emptying pause at NI", tot_pause);
    mech("fixed shortcut traversal", sum(ev_fixed));
    mech("delivery to FC-RUT core", sum(ev_ladder));
    mech("route decision near FC-RUT", sum(ev_around));
    mech("complete test procedures", tot_tests);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
