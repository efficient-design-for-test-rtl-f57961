// tb_tpg: a TPG at (1,1) facing east towards a RUT at (2,1) of a 4 x 3 mesh.
// Nothing is sent in Normal phase; in Free-Slot/Block it sends 34 packets of
// head, one test vector and tail, addressed in turn to the RUT's other
// neighbours (2,0), (2,2), (3,1); each is checked flit by flit, with a
// random grant pattern. `done` must rise after the last tail.
`include "tb_check.svh"
module tb_tpg;
  import esy_pkg::*;
  logic clk = 0, rst_n = 0, gnt, valid, pkt_open, done;
  tp_e rut_tp;
  flit_t flit;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tpg #(.XDIM(4), .YDIM(3), .MY_X(1), .MY_Y(1), .DIR(P_E), .NUM_VEC(34), .VEC_PER_PKT(1)) dut (.*);
  initial begin repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int dx [3] = '{2, 2, 3};
    int dy [3] = '{0, 2, 1};
    int pkt = 0, pos = 0;
    logic [DATA_W-1:0] hw;
    rut_tp = TP_NORMAL; gnt = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5) begin @(negedge clk); `CHECK(!valid, "idle in normal phase") end
    rut_tp = TP_FREE;
    while (pkt < 34) begin
      @(negedge clk);
      if (pkt == 20) rut_tp = TP_BLOCK;
      gnt = ($urandom % 3) != 0;
      #1;
      if (gnt) begin
        `CHECK(valid, "flit available")
        if (pos == 0) begin
          hw = make_head(CW'(dx[pkt % 3]), CW'(dy[pkt % 3]), 4'd1, 4'd1, IDXW'(pkt), 12'h0);
          `CHECK(flit.ftype == FT_HEAD && flit.test && flit.data == hw, $sformatf("head %0d", pkt))
        end else if (pos == 1)
          `CHECK(flit.ftype == FT_BODY && flit.data == test_vector(pkt), $sformatf("vector %0d", pkt))
        else
          `CHECK(flit.ftype == FT_TAIL && flit.data == hw, $sformatf("tail %0d", pkt))
        `CHECK(pkt_open == (pos != 0), "pkt_open")
        if (pos == 2) begin pos = 0; pkt++; end else pos++;
      end
      @(posedge clk); #1 gnt = 0;
    end
    @(negedge clk);
    `CHECK(done && !valid, "done after 34 packets")
    rut_tp = TP_CTRL; repeat (3) @(negedge clk);
    `CHECK(!valid, "nothing sent in control path test")
    rut_tp = TP_NORMAL; @(negedge clk);
    `CHECK(!done, "done cleared when RUT back to normal")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
