// Testbench for async_fifo: writer and reader on unrelated clocks push and
// pop at random; every word must come out once, in order, and no overflow may
// be flagged while the writer respects `full`. Then the FIFO is filled to
// check `full` and the overflow flag.
`include "tb_check.svh"
module tb_async_fifo;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  logic push, pop, full, empty, overflow; logic [31:0] wdata, rdata; logic [4:0] rlevel;
  async_fifo #(.WIDTH(32), .DEPTH(16)) dut (.wclk, .wrst, .push, .wdata, .full, .overflow,
    .rclk, .rrst, .pop, .rdata, .empty, .rlevel);
  int nw = 0, nr = 0; logic wdone = 0;
  initial begin
    repeat (20000) @(posedge wclk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; wdata = 0;
    repeat (3) @(posedge wclk); wrst = 0;
    while (nw < 600) begin
      @(negedge wclk);
      push = ($urandom % 3 != 0) && !full; wdata = nw;
      @(posedge wclk); if (push) nw++;
    end
    @(negedge wclk); push = 0; wdone = 1;
  end
  initial begin
    pop = 0;
    repeat (4) @(posedge rclk); rrst = 0;
    while (nr < 600) begin
      @(negedge rclk);
      pop = ($urandom % 3 != 0) && !empty;
      if (pop) `CHECK(rdata, 32'(nr), "order")
      if (!empty) `CHECK(rlevel != 0, 1'b1, "level")
      @(posedge rclk); if (pop) nr++;
    end
    @(negedge rclk); pop = 0;
    wait (wdone);
    `CHECK(overflow, 1'b0, "no overflow")
    // fill it
    repeat (20) begin @(negedge wclk); push = 1; wdata = 32'hABCD; end
    @(negedge wclk); push = 0;
    `CHECK(full, 1'b1, "full")
    `CHECK(overflow, 1'b1, "overflow flagged")
    repeat (4) @(posedge rclk); #1;
    `CHECK(int'(rlevel), 16, "read level full")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
