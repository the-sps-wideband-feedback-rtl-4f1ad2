// Testbench for shift_sat: random 20-bit values and shifts; checks the
// arithmetic shift, saturation to +127/-128 and the one-clock latency.
`include "tb_check.svh"
module tb_shift_sat;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [3:0] shift; logic in_valid, out_valid; acc_vec_t in_vec; slice_vec_t out_vec; sideband_t in_sb, out_sb;
  shift_sat dut (.clk, .rst, .shift, .in_valid, .in_vec, .in_sb, .out_valid, .out_vec, .out_sb);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int e [NSLICE]; int sat_hi = 0, sat_lo = 0;
    shift = 0; in_valid = 0; in_vec = '0; in_sb = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      shift = 4'($urandom); in_valid = 1; in_sb = sideband_t'($urandom);
      for (int i = 0; i < NSLICE; i++) begin
        int v;
        v = (n % 2) ? int'($urandom % 524288) - 262144 : int'($urandom % 1024) - 512;
        in_vec[i] = acc_t'(v);
        e[i] = v >>> shift;
        if (e[i] > 127) begin e[i] = 127; sat_hi++; end
        if (e[i] < -128) begin e[i] = -128; sat_lo++; end
      end
      @(posedge clk); #1;
      `CHECK(out_valid, 1'b1, "valid")
      `CHECK(out_sb, in_sb, "sideband")
      for (int i = 0; i < NSLICE; i++) `CHECK(out_vec[i], sample_t'(e[i]), "shift/sat")
    end
    `CHECK(sat_hi > 0 && sat_lo > 0, 1'b1, "both saturations exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
