// tb_input_buffer: FIFO order, full count, simultaneous read/write, and the
// one-flit pipe behaviour (one cycle, every cycle) in fixed mode.
`include "tb_check.svh"
module tb_input_buffer;
  import esy_pkg::*;
  logic clk = 0, rst_n = 0, fixed = 0, wr = 0, rd = 0;
  flit_t wf, head;
  logic hv, empty;
  logic [3:0] count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  input_buffer #(.DEPTH(12)) dut (.clk, .rst_n, .fixed, .wr, .wr_flit(wf), .rd,
                                  .head_valid(hv), .head, .empty, .count);
  function automatic flit_t mk(int i);
    flit_t f; f.ftype = FT_BODY; f.test = 0; f.data = 34'(i * 7 + 3); return f;
  endfunction
  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    wf = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    `CHECK(empty && !hv, "empty after reset")
    for (int i = 0; i < 12; i++) begin
      @(negedge clk); wr = 1; wf = mk(i);
    end
    @(negedge clk); wr = 0;
    `CHECK(count == 12, "holds 12 flits")
    for (int i = 0; i < 12; i++) begin
      `CHECK(hv && head == mk(i), $sformatf("order %0d", i))
      rd = 1; @(negedge clk); rd = 0;
    end
    `CHECK(empty, "empty after 12 reads")
    // simultaneous read and write keeps the count
    wr = 1; wf = mk(50); @(negedge clk); wr = 0;
    wr = 1; wf = mk(51); rd = 1; @(negedge clk); wr = 0; rd = 0;
    `CHECK(count == 1 && head == mk(51), "read+write keeps one flit")
    rd = 1; @(negedge clk); rd = 0;
    // fixed mode: one-flit pipe, one cycle latency, no read needed
    fixed = 1; @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      wr = 1; wf = mk(100 + i); @(negedge clk);
      `CHECK(hv && head == mk(100 + i), $sformatf("pipe flit %0d after one cycle", i))
    end
    wr = 0; @(negedge clk);
    `CHECK(!hv && empty, "pipe empties when nothing written")
    fixed = 0; @(negedge clk); @(negedge clk);
    `CHECK(empty && count == 0, "FIFO empty after leaving fixed mode")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
