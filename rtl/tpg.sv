// tpg: Test Packet Generator in one output port of a router.
//
// When the router behind this port (the router under test, RUT) enters the
// data path test (TestPhase Free-Slot or Block), the generator produces
// NUM_VEC / VEC_PER_PKT test packets. Each packet is a head flit with the TEST
// bit set, VEC_PER_PKT body flits carrying consecutive data path test
// vectors, and a tail flit repeating the head word so that the receiver can
// check the packet's framing. The packets are addressed in turn to the other
// direct neighbours of the RUT, so that they cross the RUT's input buffer,
// crossbar and both global links, and are checked by the TPA there.
//
// Interface: `valid`/`flit` show the next flit, `gnt` takes it (one flit per
// cycle). `pkt_open` is high between an injected head and its tail. `done`
// rises when all packets are injected and stays until the RUT leaves the
// data path test. A new test begins on each change from Normal to Free-Slot.
// The vector set and the round-robin addressing are choices of this design;
// the number and size of test packets follow the document (34 vectors; one or
// all vectors per packet).
module tpg
  import esy_pkg::*;
#(
  parameter int XDIM        = 10,
  parameter int YDIM        = 8,
  parameter int MY_X        = 0,
  parameter int MY_Y        = 0,
  parameter int DIR         = P_E,   // port towards the RUT
  parameter int NUM_VEC     = 34,
  parameter int VEC_PER_PKT = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  tp_e   rut_tp,
  input  logic  gnt,
  output logic  valid,
  output flit_t flit,
  output logic  pkt_open,
  output logic  done
);
  localparam int NPKT = NUM_VEC / VEC_PER_PKT;
  localparam int RX = MY_X + ((DIR == P_E) ? 1 : (DIR == P_W) ? -1 : 0);
  localparam int RY = MY_Y + ((DIR == P_S) ? 1 : (DIR == P_N) ? -1 : 0);

  // Destinations: the RUT's existing neighbours other than this router.
  typedef struct packed {
    logic [3:0]    ok;
    logic [3:0][CW-1:0] x;
    logic [3:0][CW-1:0] y;
  } dlist_t;

  function automatic dlist_t dests();
    dlist_t d;
    int xs [4], ys [4];
    xs = '{RX, RX, RX + 1, RX - 1};
    ys = '{RY - 1, RY + 1, RY, RY};
    for (int k = 0; k < 4; k++) begin
      d.ok[k] = (xs[k] >= 0 && xs[k] < XDIM && ys[k] >= 0 && ys[k] < YDIM &&
                 !(xs[k] == MY_X && ys[k] == MY_Y));
      d.x[k]  = CW'(xs[k]);
      d.y[k]  = CW'(ys[k]);
    end
    return d;
  endfunction

  localparam dlist_t DL = dests();

  tp_e            tp_q;
  logic           active;
  int unsigned    pkt;     // packet being sent
  int unsigned    pos;     // flit position in the packet: 0 head, 1..V body, V+1 tail
  logic [1:0]     dsel;    // destination slot of the current packet
  logic [DATA_W-1:0] hword;

  // first usable destination slot at or after s
  function automatic logic [1:0] next_ok(input logic [1:0] s);
    logic [1:0] r;
    r = s;
    for (int k = 3; k >= 0; k--)
      if (DL.ok[(int'(s) + k) % 4]) r = 2'((int'(s) + k) % 4);
    return r;
  endfunction

  always_comb begin
    hword = make_head(DL.x[dsel], DL.y[dsel], CW'(MY_X), CW'(MY_Y),
                      IDXW'(pkt * VEC_PER_PKT), 12'h0);
    flit.test = 1'b1;
    if (pos == 0) begin
      flit.ftype = FT_HEAD;
      flit.data  = hword;
    end else if (pos <= VEC_PER_PKT) begin
      flit.ftype = FT_BODY;
      flit.data  = test_vector(int'(pkt * VEC_PER_PKT + pos - 1));
    end else begin
      flit.ftype = FT_TAIL;
      flit.data  = hword;
    end
    valid = active && (pkt < NPKT) &&
            ((rut_tp == TP_FREE || rut_tp == TP_BLOCK) || pos != 0);
  end

  assign pkt_open = active && (pos != 0);
  assign done     = active && (pkt >= NPKT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tp_q <= TP_NORMAL; active <= 1'b0; pkt <= 0; pos <= 0; dsel <= next_ok(2'd0);
    end else begin
      tp_q <= rut_tp;
      if (tp_q == TP_NORMAL && rut_tp == TP_FREE) begin
        active <= 1'b1; pkt <= 0; pos <= 0; dsel <= next_ok(2'd0);
      end else begin
        if (rut_tp == TP_NORMAL && pos == 0) active <= 1'b0;
        if (valid && gnt) begin
          if (pos == VEC_PER_PKT + 1) begin
            pos  <= 0;
            pkt  <= pkt + 1;
            dsel <= next_ok(dsel + 2'd1);
          end else begin
            pos <= pos + 1;
          end
        end
      end
    end
  end
endmodule
