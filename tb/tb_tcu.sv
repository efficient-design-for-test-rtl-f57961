// tb_tcu: phase sequence and durations of one test procedure (Free-Slot
// T_FREE, Block T_BLOCK, Emptying until all EmptyAcks and drained, Testing
// T_TEST, Recovery until all EmptyAcks), the TIV/TIT start times, deferral
// while a neighbour is under test, and fault recording.
`include "tb_check.svh"
module tb_tcu;
  import esy_pkg::*;
  localparam int TIV = 20, TIT = 400, TF = 10, TB = 20, TT = 30;
  logic clk = 0, rst_n = 0;
  logic [4:0] port_exists = 5'b11111, ea_in = 0, tr_pkt = 0, tr_err = 0, tpg_done = 0;
  logic nbr_busy = 0, drained = 1, cp_bist_fail = 0;
  tp_e tp;
  logic er, fixed, cp_bist_en, cp_fault;
  logic [2:0] phase;
  logic [4:0] dp_fault, dp_incomplete;
  logic [15:0] n_tests, n_tr_pkt;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;
  tcu #(.TIT(TIT), .TIV(TIV), .T_FREE(TF), .T_BLOCK(TB), .T_TEST(TT)) dut (.*);

  task automatic wait_tp(input tp_e t, output int at);
    while (tp != t) @(negedge clk);
    at = cyc;
  endtask

  initial begin repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int t_free, t_block, t_ctrl, t_test, t_norm, t_free2;
    repeat (2) @(posedge clk); rst_n = 1;
    wait_tp(TP_FREE, t_free);
    `CHECK(t_free == TIV + 1, $sformatf("first test starts at TIV (%0d)", t_free))
    // two good test results and one faulty, from ports N and E
    @(negedge clk); tr_pkt = 5'b00010; @(negedge clk); tr_pkt = 5'b01000; tr_err = 5'b01000;
    @(negedge clk); tr_pkt = 0; tr_err = 0; tpg_done = 5'b11110;
    wait_tp(TP_BLOCK, t_block);
    `CHECK(t_block - t_free == TF, "Free-Slot lasts T_FREE")
    wait_tp(TP_CTRL, t_ctrl);
    `CHECK(t_ctrl - t_block == TB, "Block lasts T_BLOCK")
    `CHECK(n_tr_pkt == 2 && dp_fault == 5'b01000 && dp_incomplete == 0, "test results recorded")
    `CHECK(er && !fixed, "EmptyRequest in Emptying")
    repeat (15) @(negedge clk);
    `CHECK(er && !fixed, "Emptying waits for all EmptyAcks")
    ea_in = 5'b01111; repeat (3) @(negedge clk);
    `CHECK(!fixed, "one missing EmptyAck holds Emptying")
    ea_in = 5'b11111; drained = 0; repeat (3) @(negedge clk);
    `CHECK(!fixed, "Emptying waits for the router to drain")
    drained = 1; t_test = cyc; @(negedge clk); ea_in = 0;
    `CHECK(fixed && cp_bist_en && !er && tp == TP_CTRL, "Testing: fixed data path, BIST enabled")
    cp_bist_fail = 1; @(negedge clk); cp_bist_fail = 0;
    while (!er) @(negedge clk);
    `CHECK(cyc - t_test == TT + 1, $sformatf("Testing lasts T_TEST (%0d)", cyc - t_test))
    `CHECK(fixed && !cp_bist_en, "Recovery keeps the fixed data path")
    repeat (5) @(negedge clk);
    `CHECK(tp == TP_CTRL, "Recovery waits for EmptyAcks")
    ea_in = 5'b11111;
    wait_tp(TP_NORMAL, t_norm); ea_in = 0;
    `CHECK(n_tests == 1 && cp_fault && !fixed && !er, "back to normal, one test, BIST fault kept")
    // second test at TIV + TIT, deferred while a neighbour is busy
    nbr_busy = 1;
    while (cyc < TIV + TIT + 10) @(negedge clk);
    `CHECK(tp == TP_NORMAL, "start deferred while a neighbour is under test")
    nbr_busy = 0;
    wait_tp(TP_FREE, t_free2);
    `CHECK(t_free2 == TIV + TIT + 11, $sformatf("deferred test starts when free (%0d)", t_free2))
    `CHECK(dp_fault == 0 && !cp_fault, "faults cleared at the start of a test")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
