// tb_cp_wrapper: pass-through in normal mode; in fixed mode the N<->S and
// local<->east (west on the eastern border) shortcuts and credit hand-back.
`include "tb_check.svh"
module tb_cp_wrapper;
  import esy_pkg::*;
  logic fixed, east_border;
  logic [6:0] ivc_valid;
  logic [6:0] norm_sel [5], sel [5];
  credit_t norm_credit [5], out_credit [5], in_credit [5];
  logic sel_vc [5];
  int checks = 0, failures = 0;
  cp_wrapper dut (.*);
  initial begin
    for (int t = 0; t < 100; t++) begin
      fixed = 0; east_border = $urandom % 2; ivc_valid = 7'($urandom);
      for (int p = 0; p < 5; p++) begin
        norm_sel[p] = 7'($urandom); norm_credit[p] = credit_t'(4'($urandom));
        out_credit[p] = credit_t'(4'($urandom));
      end
      #1;
      for (int p = 0; p < 5; p++)
        `CHECK(sel[p] == norm_sel[p] && in_credit[p] == norm_credit[p], "normal pass-through")
      fixed = 1; #1;
      // N1/N2 -> S, S1/S2 -> N
      `CHECK(sel[P_S] == (ivc_valid[1] ? 7'h02 : ivc_valid[2] ? 7'h04 : 7'h00), "N to S select")
      `CHECK(sel[P_N] == (ivc_valid[3] ? 7'h08 : ivc_valid[4] ? 7'h10 : 7'h00), "S to N select")
      if (ivc_valid[1]) `CHECK(sel_vc[P_S] == 0, "N1 keeps VC 0") else if (ivc_valid[2]) `CHECK(sel_vc[P_S] == 1, "N2 keeps VC 1")
      `CHECK(in_credit[P_N] == out_credit[P_S] && in_credit[P_S] == out_credit[P_N], "N/S credits handed back")
      if (!east_border) begin
        `CHECK(sel[P_E] == {6'b0, ivc_valid[0]} && sel[P_L] == {1'b0, ivc_valid[5], 5'b0}, "L<->E shortcut")
        `CHECK(in_credit[P_L] == out_credit[P_E] && in_credit[P_E] == out_credit[P_L], "L/E credits")
        `CHECK(sel[P_W] == 0 && in_credit[P_W] == '0, "W unused")
      end else begin
        `CHECK(sel[P_W] == {6'b0, ivc_valid[0]} && sel[P_L] == {ivc_valid[6], 6'b0}, "L<->W shortcut")
        `CHECK(in_credit[P_L] == out_credit[P_W] && in_credit[P_W] == out_credit[P_L], "L/W credits")
        `CHECK(sel[P_E] == 0 && in_credit[P_E] == '0, "E unused")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
