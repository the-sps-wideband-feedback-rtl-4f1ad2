// Testbench for slice_gather: streams words whose samples encode their own
// position, fires at random window ends and checks that slice i of each
// vector is the sample (window end - 15 + i), one clock after `fire`.
`include "tb_check.svh"
module tb_slice_gather;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  word_t word; logic word_valid, fire, vec_valid; sideband_t sb_in, sb_out; slice_vec_t vec;
  slice_gather dut (.clk, .rst, .word, .word_valid, .fire, .sb_in, .vec, .vec_valid, .sb_out);
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int exp_end; logic exp_v; sideband_t exp_sb;
    word = '0; word_valid = 0; fire = 0; sb_in = '0; exp_v = 0; exp_end = 0; exp_sb = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int w = 0; w < 500; w++) begin
      @(negedge clk);
      `CHECK(vec_valid, exp_v, "valid after one clock")
      if (exp_v) begin
        for (int i = 0; i < NSLICE; i++) `CHECK(vec[i], sample_t'(exp_end - 15 + i), "slice")
        `CHECK(sb_out, exp_sb, "sideband")
      end
      word_valid = 1;
      for (int l = 0; l < LANES; l++) word[l] = sample_t'(8*w + l);
      fire = (w >= 2) && ($urandom % 3 == 0);
      sb_in = sideband_t'($urandom);
      exp_v = fire; exp_end = 8*w + int'(sb_in.lend); exp_sb = sb_in;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
