// Testbench for sync_fifo: random pushes and pops against a queue model;
// checks data order, empty/full/level and the error flag on misuse.
`include "tb_check.svh"
module tb_sync_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic push, pop, empty, full, error; logic [15:0] wdata, rdata; logic [3:0] level;
  sync_fifo #(.WIDTH(16), .DEPTH(8)) dut (.clk, .rst, .push, .wdata, .pop, .rdata, .empty, .full, .level, .error);
  logic [15:0] q [$];
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      `CHECK(empty, q.size() == 0, "empty")
      `CHECK(full, q.size() == 8, "full")
      `CHECK(int'(level), q.size(), "level")
      if (q.size() > 0) `CHECK(rdata, q[0], "data")
      push = ($urandom % 2) && q.size() < 8; pop = ($urandom % 2) && q.size() > 0;
      if (n > 500) push = ($urandom % 4) != 0 && q.size() < 8;
      wdata = 16'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    `CHECK(error, 1'b0, "no error")
    @(negedge clk); while (q.size() < 8) begin push = 1; wdata = 16'($urandom); q.push_back(wdata); pop = 0; @(negedge clk); end
    push = 1; @(negedge clk); push = 0; #1;
    `CHECK(error, 1'b1, "overflow flagged")
    `CHECK(full, 1'b1, "still full")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
