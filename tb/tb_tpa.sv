// tb_tpa: good test packets of 1 and of 3 vectors are accepted; a flipped
// bit, a missing body flit or a wrong tail is reported as a faulty packet.
// Two VCs interleave packets.
`include "tb_check.svh"
module tb_tpa;
  import esy_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_vc = 0, pkt_done, pkt_err;
  flit_t in_flit;
  logic [15:0] n_pkt, n_err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tpa #(.NVC(2), .VEC_PER_PKT(3)) dut (.*);
  task automatic send(input logic vc, input ftype_e t, input logic [DATA_W-1:0] d);
    @(negedge clk); in_valid = 1; in_vc = vc; in_flit.ftype = t; in_flit.test = 1; in_flit.data = d;
    @(negedge clk); in_valid = 0;
  endtask
  task automatic packet(input logic vc, input int idx, input int flip, input int drop, input logic badtail,
                        input logic exp_err);
    logic [DATA_W-1:0] hw;
    hw = make_head(4'd2, 4'd1, 4'd1, 4'd1, IDXW'(idx), 12'h5);
    send(vc, FT_HEAD, hw);
    for (int k = 0; k < 3; k++)
      if (k != drop) send(vc, FT_BODY, test_vector(idx + k) ^ ((k == flip) ? 34'h1_0000_0000 : 34'h0));
    @(negedge clk); in_valid = 1; in_vc = vc; in_flit.ftype = FT_TAIL; in_flit.data = badtail ? ~hw : hw;
    @(posedge clk); #1;
    `CHECK(pkt_done && pkt_err == exp_err, $sformatf("packet idx %0d err=%0d", idx, pkt_err))
    @(negedge clk); in_valid = 0;
  endtask
  initial begin repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    in_flit = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    packet(0, 0, -1, -1, 0, 0);
    packet(1, 3, -1, -1, 0, 0);
    packet(0, 6, 1, -1, 0, 1);
    packet(1, 9, -1, 2, 0, 1);
    packet(0, 12, -1, -1, 1, 1);
    packet(1, 15, -1, -1, 0, 0);
    @(negedge clk);
    `CHECK(n_pkt == 6 && n_err == 3, "counters")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
