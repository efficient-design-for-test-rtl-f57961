// switch_allocator: arbitration for one output port among the input VCs and
// the test packet generator (TPG) of that port.
//
// Requests 0..NIN-1 come from input VCs, request NIN from the TPG. The TPG's
// priority follows the TestPhase of the router behind this port:
//   tpg_mode = TPG_OFF  : the TPG is never granted;
//   tpg_mode = TPG_LOW  : (Free-Slot phase) the TPG is granted only when no
//                         input VC requests this output;
//   tpg_mode = TPG_HIGH : (Block phase) the TPG wins over every input VC.
// Within the remaining requesters a matrix arbiter picks the winner and is
// updated on every grant. `tpg_pkt_open` marks a test packet already begun;
// its remaining flits are treated like Block phase requests, so a test packet
// is injected completely before new data packets are served (a choice of
// this design to meet that rule). One-hot grant, combinational.
module switch_allocator #(
  parameter int NIN = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [NIN-1:0] req,
  input  logic         tpg_req,
  input  logic [1:0]   tpg_mode,
  input  logic         tpg_pkt_open,
  output logic [NIN-1:0] gnt,
  output logic         tpg_gnt
);
  localparam logic [1:0] TPG_OFF  = 2'd0;
  localparam logic [1:0] TPG_LOW  = 2'd1;
  localparam logic [1:0] TPG_HIGH = 2'd2;

  logic [NIN:0] mreq, mgnt;
  logic         tpg_ok, tpg_first;

  always_comb begin
    tpg_ok    = tpg_req && (tpg_mode != TPG_OFF) &&
                (tpg_mode == TPG_HIGH || tpg_pkt_open || req == '0);
    tpg_first = tpg_ok && (tpg_mode == TPG_HIGH || tpg_pkt_open);
    if (tpg_first) mreq = {1'b1, {NIN{1'b0}}};
    else           mreq = {tpg_ok, req};
  end

  matrix_arbiter #(.N(NIN + 1)) u_arb (
    .clk(clk), .rst_n(rst_n), .req(mreq), .update(1'b1), .gnt(mgnt)
  );

  assign gnt     = mgnt[NIN-1:0];
  assign tpg_gnt = mgnt[NIN];
endmodule
