// tb_ni: behavioural network interface used by the mesh testbenches.
//
// Source: with probability RATE/1000 per cycle starts a packet of PKT_LEN
// flits to a random other router (single-flit packets are not used). Body
// flits carry {source id, sequence number, flit position} so that the sink
// can check them. It uses credits towards the router's local input buffer.
// On EmptyRequest it finishes the packet in progress, starts no new one and
// answers EmptyAck once all its credits are back. `enable` low stops new
// packets (used to drain the network at the end of a test).
// Sink: accepts every flit, returns its credit in the same cycle, and checks
// that each packet is for this router and arrives complete and in order.
module tb_ni
  import esy_pkg::*;
#(
  parameter int XDIM    = 4,
  parameter int YDIM    = 4,
  parameter int ID      = 0,
  parameter int RATE    = 20,
  parameter int PKT_LEN = 5,
  parameter int DEPTH   = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  output link_t   tx,
  input  credit_t tx_credit,
  input  link_t   rx,
  output credit_t rx_credit,
  input  logic    er,
  output logic    ea,
  output int      n_sent,
  output int      n_recv,
  output int      n_err,
  output int      n_pause   // cycles spent paused by ER
);
  localparam int MX = ID % XDIM;
  localparam int MY = ID / XDIM;

  int   cred, pos, seq, dst;
  int   rx_pos;
  logic [CW-1:0] rx_sx, rx_sy;

  always_comb begin
    rx_credit = '0;
    rx_credit.cnt[0] = {1'b0, rx.valid};
    ea = er && (pos == 0) && (cred == DEPTH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx <= '0; cred <= DEPTH; pos <= 0; seq <= 0; dst <= 0;
      n_sent <= 0; n_pause <= 0;
    end else begin
      automatic int c = cred + int'(tx_credit.cnt[0]);
      tx.valid <= 1'b0;
      if (er) n_pause <= n_pause + 1;
      if (pos == 0) begin
        if (enable && !er && c > 0 && ($urandom % 1000) < RATE) begin
          automatic int d = $urandom % (XDIM * YDIM - 1);
          if (d >= ID) d = d + 1;
          dst <= d;
          tx.valid <= 1'b1; tx.vc <= 1'b0;
          tx.flit.ftype <= FT_HEAD; tx.flit.test <= 1'b0;
          tx.flit.data <= make_head(CW'(d % XDIM), CW'(d / XDIM), CW'(MX), CW'(MY),
                                    '0, 12'(seq));
          c = c - 1;
          pos <= 1;
        end
      end else if (c > 0) begin
        tx.valid <= 1'b1; tx.vc <= 1'b0; tx.flit.test <= 1'b0;
        tx.flit.ftype <= (pos == PKT_LEN - 1) ? FT_TAIL : FT_BODY;
        tx.flit.data <= {8'(ID), 16'(seq), 10'(pos)};
        c = c - 1;
        if (pos == PKT_LEN - 1) begin
          pos <= 0; seq <= seq + 1; n_sent <= n_sent + 1;
        end else pos <= pos + 1;
      end
      cred <= c;
    end
  end

  // sink
  logic [7:0]  rx_src;
  logic [15:0] rx_seq;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_pos <= 0; n_recv <= 0; n_err <= 0; rx_sx <= '0; rx_sy <= '0;
      rx_src <= '0; rx_seq <= '0;
    end else if (rx.valid) begin
      if (is_head(rx.flit.ftype)) begin
        if (rx_pos != 0 || hd_dx(rx.flit.data) != CW'(MX) || hd_dy(rx.flit.data) != CW'(MY)
            || rx.flit.test)
          n_err <= n_err + 1;
        rx_src <= 8'(int'(hd_sx(rx.flit.data)) + XDIM * int'(hd_sy(rx.flit.data)));
        rx_seq <= 16'(rx.flit.data[11:0]);
        rx_pos <= 1;
      end else begin
        if (rx_pos == 0 || rx.flit.data[33:26] != rx_src || rx.flit.data[21:10] != rx_seq[11:0]
            || int'(rx.flit.data[9:0]) != rx_pos)
          n_err <= n_err + 1;
        if (is_tail(rx.flit.ftype)) begin
          if (rx_pos != PKT_LEN - 1) n_err <= n_err + 1;
          rx_pos <= 0;
          n_recv <= n_recv + 1;
        end else rx_pos <= rx_pos + 1;
      end
    end
  end
endmodule
