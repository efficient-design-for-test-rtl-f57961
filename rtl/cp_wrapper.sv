// cp_wrapper: test wrapper between the control path and the data path.
//
// In normal operation the crossbar selects come from the switch allocator
// and each input port returns the credits of its own buffer pops; the wrapper
// passes both through. While the router is under control path test (`fixed`
// high) the wrapper cuts the control path off and drives the data path with
// constant connections, turning the router into two shortcuts:
//   north in -> south out and south in -> north out (both VCs kept),
//   local in -> east out and east in -> local out
//   (west instead of east for a router on the eastern border).
// The credits arriving at each output are handed straight back to the input
// that feeds it, so the neighbours' flow control spans the shortcut.
// Combinational. The port mapping follows the document; which of two VCs of
// a port drives the shortcut in a cycle is decided by which one holds a flit
// (they share one physical link, so at most one does).
//
// In fixed mode credits pass straight through this block from an output to
// the input feeding it; lint may see a loop across the credit arrays, but
// each credit only reaches the other side of the router and never returns.
module cp_wrapper
  import esy_pkg::*;
(
  input  logic              fixed,
  input  logic              east_border,
  input  logic [NIVC-1:0]   ivc_valid,
  input  logic [NIVC-1:0]   norm_sel   [NPORT],
  input  credit_t           norm_credit[NPORT],
  input  credit_t           out_credit [NPORT],
  output logic [NIVC-1:0]   sel        [NPORT],
  output logic              sel_vc     [NPORT],
  output credit_t           in_credit  [NPORT]
);
  logic [2:0] lp;   // port that the local port is shortcut to
  always_comb begin
    lp = east_border ? 3'(P_W) : 3'(P_E);
    for (int o = 0; o < NPORT; o++) begin
      sel[o]       = fixed ? '0 : norm_sel[o];
      sel_vc[o]    = 1'b0;
      in_credit[o] = fixed ? '0 : norm_credit[o];
    end
    if (fixed) begin
      // north <-> south
      sel[P_S][1]  = ivc_valid[1];
      sel[P_S][2]  = !ivc_valid[1] && ivc_valid[2];
      sel_vc[P_S]  = !ivc_valid[1];
      sel[P_N][3]  = ivc_valid[3];
      sel[P_N][4]  = !ivc_valid[3] && ivc_valid[4];
      sel_vc[P_N]  = !ivc_valid[3];
      in_credit[P_N] = out_credit[P_S];
      in_credit[P_S] = out_credit[P_N];
      // local <-> ladder side
      sel[lp][0]   = ivc_valid[0];
      sel[P_L][ivc_index(int'(lp), 1'b0)] = ivc_valid[ivc_index(int'(lp), 1'b0)];
      in_credit[P_L] = out_credit[lp];
      in_credit[lp]  = out_credit[P_L];
    end
  end
endmodule
