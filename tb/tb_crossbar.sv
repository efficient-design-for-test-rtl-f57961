// tb_crossbar: random one-hot selections, every output must carry the flit
// and valid of its selected input; unselected outputs stay idle.
`include "tb_check.svh"
module tb_crossbar;
  import esy_pkg::*;
  flit_t in_flit [7];
  logic [6:0] in_valid;
  logic [6:0] sel [5];
  flit_t out_flit [5];
  logic [4:0] out_valid;
  int checks = 0, failures = 0;
  crossbar #(.NIN(7), .NOUT(5)) dut (.*);
  initial begin
    for (int t = 0; t < 200; t++) begin
      int s [5];
      for (int i = 0; i < 7; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom});
        in_valid[i] = $urandom % 2;
      end
      for (int o = 0; o < 5; o++) begin
        s[o] = $urandom % 8;   // 7 = none
        sel[o] = (s[o] == 7) ? '0 : 7'(1 << s[o]);
      end
      #1;
      for (int o = 0; o < 5; o++)
        if (s[o] == 7) `CHECK(!out_valid[o] && out_flit[o] == '0, "idle output")
        else `CHECK(out_valid[o] == in_valid[s[o]] && out_flit[o] == in_flit[s[o]], "selected flit")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
