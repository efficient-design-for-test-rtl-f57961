// input_buffer: one virtual channel's input FIFO (default 12 flits).
//
// Normal mode: a circular FIFO. A write stores the flit at the tail; `rd`
// pops the head flit shown on `head`/`head_valid` in the same cycle, and each
// pop is a freed slot the router returns upstream as a credit. Writes into a
// full buffer are a flow control violation (asserted).
//
// Fixed mode (control path test, `fixed` high): the pointers stay constant and
// write and read are always enabled, so the buffer degenerates into a one-flit
// pipe register: a flit written in one cycle is presented on `head` in the
// next, whether or not it is read. Entering or leaving fixed mode restarts
// the buffer empty (keeping a flit written in that very cycle); the router
// only switches modes when the buffer is already drained.
module input_buffer
  import esy_pkg::*;
#(
  parameter int DEPTH = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fixed,
  input  logic  wr,
  input  flit_t wr_flit,
  input  logic  rd,
  output logic  head_valid,
  output flit_t head,
  output logic  empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t           mem [DEPTH];
  logic [AW-1:0]   wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic            fixed_q;
  flit_t           pipe_q;
  logic            pipe_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0; fixed_q <= 1'b0; pipe_v <= 1'b0;
    end else begin
      fixed_q <= fixed;
      if (fixed != fixed_q) begin
        // mode change: restart empty, keeping a flit written in this cycle
        rp <= '0;
        wp <= (!fixed && wr) ? AW'(1) : '0;
        cnt <= $bits(cnt)'(!fixed && wr);
        pipe_v <= fixed && wr;
      end else if (fixed) begin
        pipe_v <= wr;
      end else begin
        if (wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
        if (rd && cnt != 0) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
        cnt <= cnt + $bits(cnt)'(wr) - $bits(cnt)'(rd && cnt != 0);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fixed) pipe_q <= wr_flit;
    else if (wr) mem[fixed_q ? '0 : wp] <= wr_flit;
  end

  always_comb begin
    if (fixed_q) begin
      head_valid = pipe_v;
      head       = pipe_q;
    end else begin
      head_valid = (cnt != 0);
      head       = mem[rp];
    end
  end

  assign empty = fixed_q ? !pipe_v : (cnt == 0);
  assign count = cnt;

  no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (!fixed && !fixed_q && wr) |-> (int'(cnt) < DEPTH || rd));
endmodule
