// tb_route_unit: hand-worked routing cases in a 10 x 8 mesh, one per rule
// of the EsyTest routing algorithm, each against the expected port and VC.
`include "tb_check.svh"
module tb_route_unit;
  import esy_pkg::*;
  logic [CW-1:0] cur_x, cur_y, src_x, dst_x, dst_y;
  logic [2:0] in_port, out_port;
  logic [4:0] fc_dir;
  logic [3:0] fc_cor;
  logic [3:0] free_cred [NIVC];
  logic out_vc;
  int checks = 0, failures = 0;
  route_unit #(.XDIM(10), .YDIM(8)) dut (.*);

  task automatic tc(input string name, input int cx, cy, sx, dx, dy, input logic [4:0] fd,
                    input logic [3:0] fcc, input int ep, input int ev);
    cur_x = CW'(cx); cur_y = CW'(cy); src_x = CW'(sx); dst_x = CW'(dx); dst_y = CW'(dy);
    fc_dir = fd; fc_cor = fcc; #1;
    `CHECK(int'(out_port) == ep && (ev < 0 || int'(out_vc) == ev),
           $sformatf("%s: port %0d vc %0d, expected %0d/%0d", name, out_port, out_vc, ep, ev))
  endtask

  initial begin
    in_port = 3'(P_L);
    for (int i = 0; i < NIVC; i++) free_cred[i] = 4'd8;
    tc("local", 4, 3, 4, 4, 3, 0, 0, P_L, -1);
    tc("east", 4, 3, 4, 7, 3, 0, 0, P_E, -1);
    tc("west", 4, 3, 4, 1, 3, 0, 0, P_W, -1);
    tc("north, subnet B", 4, 3, 4, 4, 1, 0, 0, P_N, 1);
    tc("south, east-bound subnet A", 4, 3, 2, 4, 6, 0, 0, P_S, 0);
    free_cred[ivc_index(P_N, 0)] = 4'd10; free_cred[ivc_index(P_E, 0)] = 4'd3;
    tc("NE adaptive, N less congested", 4, 3, 2, 6, 1, 0, 0, P_N, 0);
    free_cred[ivc_index(P_N, 0)] = 4'd2;
    tc("NE adaptive, E less congested", 4, 3, 2, 6, 1, 0, 0, P_E, -1);
    for (int i = 0; i < NIVC; i++) free_cred[i] = 4'd8;
    free_cred[ivc_index(P_S, 0)] = 4'd11;
    tc("RULE 2 turn round FC-RUT east via S", 4, 3, 2, 7, 3, 5'b01000, 0, P_S, 0);
    tc("RULE 2 FC-RUT in X of quadrant", 4, 3, 2, 7, 1, 5'b01000, 0, P_N, 0);
    tc("RULE 3 ladder enters FC-RUT west", 4, 3, 6, 3, 3, 5'b10000, 0, P_W, -1);
    tc("RULE 3 N neighbour of FC-RUT goes E", 4, 3, 4, 4, 4, 5'b00100, 0, P_E, -1);
    tc("RULE 5 FC-RUT on east border south", 9, 3, 9, 9, 4, 5'b00100, 0, P_W, -1);
    tc("RULE 5 ladder west of east-border FC-RUT", 8, 3, 2, 9, 3, 5'b01000, 0, P_E, -1);
    tc("RULE 3 corner SE FC-RUT dest -> E", 4, 3, 1, 5, 4, 0, 4'b0100, P_E, -1);
    tc("RULE 3 corner SW FC-RUT dest -> S in A", 4, 3, 6, 3, 4, 0, 4'b1000, P_S, 0);
    tc("RULE 5 corner SE FC-RUT on east border", 8, 3, 1, 9, 4, 0, 4'b0100, P_S, -1);
    tc("RULE 2 cross FC-RUT north-south", 4, 3, 4, 4, 0, 5'b00010, 0, P_N, 1);
    tc("RULE 4 corner NE FC-RUT, dy=1", 4, 3, 4, 7, 2, 0, 4'b0001, P_E, -1);
    tc("RULE 5 east-border dest from dx=1", 8, 3, 2, 9, 1, 0, 0, P_N, 0);
    tc("RULE 5 east-border dest, N is FC-RUT", 8, 3, 2, 9, 1, 5'b00010, 0, P_E, -1);
    tc("north border turn-around", 4, 0, 2, 7, 0, 5'b01000, 0, P_S, 0);
    in_port = 3'(P_S);
    tc("no U-turn on turn-around", 4, 3, 6, 1, 3, 5'b10000, 0, P_N, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
