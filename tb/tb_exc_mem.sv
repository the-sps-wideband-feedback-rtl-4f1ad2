// Testbench for exc_mem (small depth): writes random waveform entries and
// reads them back with the one-clock read latency, interleaving reads and
// writes.
`include "tb_check.svh"
module tb_exc_mem;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [7:0] waddr, raddr; slice_vec_t wdata, rdata;
  exc_mem #(.DEPTH(256)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  slice_vec_t model [256];
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a);
      for (int i = 0; i < NSLICE; i++) wdata[i] = sample_t'($urandom);
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      raddr = 8'($urandom);
      we = $urandom % 2; waddr = 8'($urandom);
      if (waddr == raddr) we = 0;
      for (int i = 0; i < NSLICE; i++) wdata[i] = sample_t'($urandom);
      @(posedge clk); #1;
      `CHECK(rdata, model[raddr], "read")
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
