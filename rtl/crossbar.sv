// crossbar: NIN-input, NOUT-output flit switch.
//
// Each output takes the flit of the input selected by its one-hot `sel`
// vector; `out_valid` is high when some input is selected and that input
// holds a flit. Purely combinational. The select vectors come from the
// switch allocator in normal operation and are fixed by the control path
// test wrapper while the router is under control path test.
module crossbar
  import esy_pkg::*;
#(
  parameter int NIN  = 7,
  parameter int NOUT = 5
) (
  input  flit_t            in_flit  [NIN],
  input  logic  [NIN-1:0]  in_valid,
  input  logic  [NIN-1:0]  sel      [NOUT],
  output flit_t            out_flit [NOUT],
  output logic  [NOUT-1:0] out_valid
);
  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out_flit[o]  = '0;
      out_valid[o] = 1'b0;
      for (int i = 0; i < NIN; i++)
        if (sel[o][i]) begin
          out_flit[o]  = out_flit[o] | in_flit[i];
          out_valid[o] = out_valid[o] | in_valid[i];
        end
    end
  end
endmodule
