// route_unit: EsyTest fully adaptive minimal routing that tolerates one
// router with a fixed crossbar (FC-RUT) in the 3x3 region around it.
//
// Purely combinational. From the current, source and destination
// coordinates, the FC-RUT status of the four direct neighbours (DNS) and four
// corner routers (INS), and the free credits of the candidate output VCs, it
// selects the output port and, for north/south outputs, the virtual channel.
// The rule set follows the published routing pseudo-code:
//   RULE 1  shortest paths, VC 0 (subnetwork A: E, N1, S1) for packets whose
//           destination lies east of their source, VC 1 (subnetwork B: W, N2,
//           S2) otherwise; among minimal directions the one with more free
//           credits wins.
//   RULE 2  avoid directions that lead into an FC-RUT, go round it on the
//           north or south side; north/south traffic may cross it straight.
//   RULE 3  a packet for an FC-RUT goes to its ladder router (east neighbour)
//           and enters through the fixed east-to-local shortcut.
//   RULE 4  at a corner of an FC-RUT the X direction is taken first.
//   RULE 5  destinations on the eastern border are reached from their west
//           neighbour; an FC-RUT on the eastern border has its ladder router
//           on the west.
// This design's own choices: ties in congestion go to the X direction (or to
// north for a north/south turn-around); a packet whose destination is an
// FC-RUT is kept on VC 0 (subnetwork A) for its north/south hops; a turn-around
// does not go back out of the input port when the other side is usable.
module route_unit
  import esy_pkg::*;
#(
  parameter int XDIM = 10,
  parameter int YDIM = 8
) (
  input  logic [CW-1:0] cur_x, cur_y,
  input  logic [CW-1:0] src_x,
  input  logic [CW-1:0] dst_x, dst_y,
  input  logic [2:0]    in_port,
  input  logic [4:0]    fc_dir,    // FC-RUT status of neighbour on port N,S,E,W (index 1..4)
  input  logic [3:0]    fc_cor,    // FC-RUT status of corner NE, NW, SE, SW
  input  logic [3:0]    free_cred [NIVC], // free credits per output VC
  output logic [2:0]    out_port,
  output logic          out_vc
);
  localparam int C_NE = 0, C_NW = 1, C_SE = 2, C_SW = 3;

  logic [2:0] dir_x, dir_y;
  logic       vc;
  logic       east_b_dst;
  logic [4:0] exists, avail, is_dst;
  int         ddx, ddy;
  logic       fc_pos;    // corner router in the direction of the destination is an FC-RUT
  logic       dst_fc;    // destination is a direct or corner FC-RUT

  function automatic logic [3:0] cred_of(input logic [2:0] p, input logic v,
                                         input logic [3:0] fc [NIVC]);
    return fc[ivc_index(int'(p), v)];
  endfunction

  always_comb begin
    ddx = int'(dst_x) - int'(cur_x);
    ddy = int'(dst_y) - int'(cur_y);
    dir_x = (dst_x > cur_x) ? 3'(P_E) : 3'(P_W);
    dir_y = (dst_y > cur_y) ? 3'(P_S) : 3'(P_N);
    east_b_dst = (int'(dst_x) == XDIM - 1);

    exists       = '0;
    exists[P_L]  = 1'b1;
    exists[P_N]  = (cur_y != 0);
    exists[P_S]  = (int'(cur_y) != YDIM - 1);
    exists[P_E]  = (int'(cur_x) != XDIM - 1);
    exists[P_W]  = (cur_x != 0);
    avail        = exists & ~fc_dir;
    is_dst       = '0;
    is_dst[P_N]  = (ddx == 0 && ddy == -1);
    is_dst[P_S]  = (ddx == 0 && ddy == 1);
    is_dst[P_E]  = (ddx == 1 && ddy == 0);
    is_dst[P_W]  = (ddx == -1 && ddy == 0);

    if (ddx > 0 && ddy < 0)      fc_pos = fc_cor[C_NE];
    else if (ddx < 0 && ddy < 0) fc_pos = fc_cor[C_NW];
    else if (ddx > 0 && ddy > 0) fc_pos = fc_cor[C_SE];
    else if (ddx < 0 && ddy > 0) fc_pos = fc_cor[C_SW];
    else                         fc_pos = 1'b0;

    dst_fc = (|(is_dst & fc_dir)) ||
             (fc_pos && (ddx == 1 || ddx == -1) && (ddy == 1 || ddy == -1));

    // RULE 1 VC choice; RULE 3 keeps packets bound for an FC-RUT in subnetwork A.
    vc = (dst_x > src_x) ? 1'b0 : 1'b1;
    if (dst_fc && !east_b_dst) vc = 1'b0;

    out_port = 3'(P_L);
    out_vc   = 1'b0;

    if (ddx == 0 && ddy == 0) begin
      out_port = 3'(P_L);
    end else if (ddy == 0) begin
      // destination straight east or west
      if (avail[dir_x]) begin
        out_port = dir_x;                                   // RULE 2
      end else if (is_dst[P_W]) begin
        out_port = 3'(P_W);                                 // RULE 3: ladder enters FC-RUT
      end else if (is_dst[P_E] && east_b_dst) begin
        out_port = 3'(P_E);                                 // RULE 5
      end else begin
        // RULE 2: turn round the FC-RUT on the north or south side
        if (!avail[P_N] || (avail[P_S] && in_port == 3'(P_N)))
          out_port = 3'(P_S);
        else if (!avail[P_S] || in_port == 3'(P_S))
          out_port = 3'(P_N);
        else
          out_port = (cred_of(3'(P_S), vc, free_cred) > cred_of(3'(P_N), vc, free_cred))
                     ? 3'(P_S) : 3'(P_N);
        out_vc = vc;
      end
    end else if (ddx == 0) begin
      // destination straight north or south
      if (fc_dir[dir_y] && is_dst[dir_y]) begin
        if (east_b_dst) out_port = 3'(P_W);                 // RULE 5
        else            out_port = 3'(P_E);                 // RULE 3
      end else begin
        out_port = dir_y;                                   // RULE 2: may cross an FC-RUT
        out_vc   = vc;
      end
    end else begin
      // destination in one of the four quadrants
      if ((ddx == 1 || ddx == -1) && (ddy == 1 || ddy == -1) && fc_pos) begin
        if (ddx < 0) begin
          out_port = dir_y; out_vc = vc;                    // RULE 3
        end else if (east_b_dst) begin
          out_port = dir_y; out_vc = vc;                    // RULE 5
        end else begin
          out_port = dir_x;                                 // RULE 3
        end
      end else if (ddx == 1 && east_b_dst) begin
        if (avail[dir_y]) begin
          out_port = dir_y; out_vc = vc;                    // RULE 5
        end else begin
          out_port = dir_x;
        end
      end else if ((ddy == 1 || ddy == -1) && fc_pos) begin
        out_port = dir_x;                                   // RULE 4
      end else begin
        // RULE 2: adaptive choice between the two minimal directions
        if (!avail[dir_y]) begin
          out_port = dir_x;
        end else if (!avail[dir_x]) begin
          out_port = dir_y; out_vc = vc;
        end else if (cred_of(dir_y, vc, free_cred) > cred_of(dir_x, 1'b0, free_cred)) begin
          out_port = dir_y; out_vc = vc;
        end else begin
          out_port = dir_x;
        end
      end
    end
  end
endmodule
