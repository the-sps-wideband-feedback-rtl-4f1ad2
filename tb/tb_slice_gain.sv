// Testbench for slice_gain: random 20-bit inputs and gains in -128..+128;
// checks (x*g)>>>7 when enabled, pass-through when disabled, one-clock latency.
`include "tb_check.svh"
module tb_slice_gain;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic enable, in_valid, out_valid; logic signed [8:0] gain [NSLICE];
  acc_vec_t in_vec, out_vec; sideband_t in_sb, out_sb;
  slice_gain dut (.clk, .rst, .enable, .gain, .in_valid, .in_vec, .in_sb, .out_valid, .out_vec, .out_sb);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint e [NSLICE];
    enable = 0; in_valid = 0; in_vec = '0; in_sb = '0;
    for (int i = 0; i < NSLICE; i++) gain[i] = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      enable = (n % 4) != 0; in_valid = 1; in_sb = sideband_t'($urandom);
      for (int i = 0; i < NSLICE; i++) begin
        gain[i] = (n == 1) ? 9'sd128 : (n == 2) ? -9'sd128 : 9'(int'($urandom % 257) - 128);
        in_vec[i] = acc_t'(int'($urandom % 524288) - 262144);
        e[i] = enable ? ((longint'(in_vec[i]) * longint'(gain[i])) >>> 7) : longint'(in_vec[i]);
      end
      @(posedge clk); #1;
      `CHECK(out_valid, 1'b1, "valid")
      `CHECK(out_sb, in_sb, "sideband")
      for (int i = 0; i < NSLICE; i++) `CHECK(out_vec[i], acc_t'(e[i]), "gain")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
