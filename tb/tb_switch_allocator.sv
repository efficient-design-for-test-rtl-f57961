// tb_switch_allocator: one-hot grants, least-recently-granted fairness among
// input VCs, and the TPG priority rules of the Free-Slot (only when idle),
// Block (always first) and Normal (never) phases, plus an open test packet.
`include "tb_check.svh"
module tb_switch_allocator;
  logic clk = 0, rst_n = 0;
  logic [6:0] req, gnt;
  logic tpg_req, tpg_gnt, tpg_open;
  logic [1:0] tpg_mode;
  int checks = 0, failures = 0;
  int wins [7];
  always #5 clk = ~clk;
  switch_allocator #(.NIN(7)) dut (.clk, .rst_n, .req, .tpg_req, .tpg_mode,
                                   .tpg_pkt_open(tpg_open), .gnt, .tpg_gnt);
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    req = 0; tpg_req = 0; tpg_mode = 0; tpg_open = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // fairness: all request, each wins once in 7 cycles
    req = 7'h7f;
    for (int i = 0; i < 7; i++) wins[i] = 0;
    for (int c = 0; c < 70; c++) begin
      @(negedge clk);
      `CHECK($countones(gnt) == 1 && !tpg_gnt, "one grant")
      for (int i = 0; i < 7; i++) if (gnt[i]) wins[i]++;
    end
    for (int i = 0; i < 7; i++) `CHECK(wins[i] == 10, $sformatf("fair share %0d", i))
    // Normal phase: TPG never granted
    tpg_req = 1; tpg_mode = 0; req = 0; @(negedge clk);
    `CHECK(!tpg_gnt, "TPG off in normal phase")
    // Free-Slot: TPG only without data requests
    tpg_mode = 1; req = 7'h04; @(negedge clk);
    `CHECK(!tpg_gnt && gnt == 7'h04, "TPG yields in free slot")
    for (int c = 0; c < 20; c++) begin
      req = 7'($urandom) | 7'h01; @(negedge clk);
      `CHECK(!tpg_gnt && $countones(gnt) == 1, "TPG waits while data requests")
    end
    req = 0; @(negedge clk);
    `CHECK(tpg_gnt && gnt == 0, "TPG uses a free slot")
    // open test packet keeps going in free slot
    tpg_open = 1; req = 7'h11; @(negedge clk);
    `CHECK(tpg_gnt && gnt == 0, "open test packet completes first")
    tpg_open = 0;
    // Block: TPG first
    tpg_mode = 2; req = 7'h7f;
    for (int c = 0; c < 5; c++) begin
      @(negedge clk);
      `CHECK(tpg_gnt && gnt == 0, "TPG wins in block phase")
    end
    tpg_req = 0; @(negedge clk);
    `CHECK(!tpg_gnt && $countones(gnt) == 1, "data served when TPG idle")
    // random: grant only to requesters, at most one
    for (int c = 0; c < 300; c++) begin
      req = 7'($urandom); tpg_req = $urandom % 2; tpg_mode = 2'($urandom % 3);
      tpg_open = ($urandom % 4) == 0;
      @(negedge clk);
      `CHECK(($countones({gnt, tpg_gnt}) <= 1) && ((gnt & ~req) == 0) &&
             ((req != 0 || (tpg_req && tpg_mode != 0)) == ({gnt, tpg_gnt} != 0)),
             "random grant legal")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
