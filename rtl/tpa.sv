// tpa: Test Packet Analyzer in one input port of a router.
//
// The input demultiplexer steers test packets addressed to this router here
// instead of into the input buffer (head flit with TEST bit set and this
// router as destination; the rest of the packet follows on the same VC).
// For each VC the analyzer checks that the body flits carry the test vectors
// named by the head's vector index in order, that there are VEC_PER_PKT of
// them, and that the tail repeats the head word. At each tail it pulses
// `pkt_done`, with `pkt_err` set if anything in that packet was wrong; these
// are the test results (TR) sent back to the router under test. Flits are
// consumed in the cycle they arrive, so the router returns their credits at
// once. Counters of checked and failed packets are kept for observation.
module tpa
  import esy_pkg::*;
#(
  parameter int NVC         = 2,
  parameter int VEC_PER_PKT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_vc,
  input  flit_t        in_flit,
  output logic         pkt_done,
  output logic         pkt_err,
  output logic [15:0]  n_pkt,
  output logic [15:0]  n_err
);
  logic [DATA_W-1:0] hword [NVC];
  int unsigned       pos   [NVC];
  logic [NVC-1:0]    bad;

  int  v;
  logic exp_ok;

  always_comb begin
    v = (NVC > 1) ? int'(in_vc) : 0;
    exp_ok = 1'b1;
    if (is_head(in_flit.ftype))
      exp_ok = in_flit.test;
    else if (in_flit.ftype == FT_BODY)
      exp_ok = (pos[v] >= 1) && (pos[v] <= VEC_PER_PKT) &&
               (in_flit.data == test_vector(int'(hd_idx(hword[v])) + int'(pos[v]) - 1));
    else
      exp_ok = (pos[v] == VEC_PER_PKT + 1) && (in_flit.data == hword[v]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NVC; k++) begin
        pos[k] <= 0; hword[k] <= '0;
      end
      bad <= '0; pkt_done <= 1'b0; pkt_err <= 1'b0; n_pkt <= '0; n_err <= '0;
    end else begin
      pkt_done <= 1'b0;
      pkt_err  <= 1'b0;
      if (in_valid) begin
        if (is_head(in_flit.ftype)) begin
          hword[v] <= in_flit.data;
          pos[v]   <= 1;
          bad[v]   <= !exp_ok;
        end else if (in_flit.ftype == FT_BODY) begin
          pos[v] <= pos[v] + 1;
          if (!exp_ok) bad[v] <= 1'b1;
        end else begin
          pos[v]   <= 0;
          pkt_done <= 1'b1;
          pkt_err  <= bad[v] || !exp_ok;
          n_pkt    <= n_pkt + 1'b1;
          if (bad[v] || !exp_ok) n_err <= n_err + 1'b1;
        end
      end
    end
  end
endmodule
