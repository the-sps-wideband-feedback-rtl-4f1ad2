// Testbench for dac_formatter: sends vectors at random lanes with every amble
// mode and random carrier patterns, builds the expected output sample stream
// independently (window at stream offset 17+lend, amble = sat((mean*p)>>>7)
// before/after), and compares every output word.
`include "tb_check.svh"
module tb_dac_formatter;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic adv, in_valid, out_valid, amble_used; amble_mode_t amble_mode; sample_t pattern [NSLICE];
  slice_vec_t in_vec; sideband_t in_sb; word_t out_word;
  dac_formatter dut (.clk, .rst, .adv, .amble_mode, .pattern, .in_valid, .in_vec, .in_sb, .out_word, .out_valid, .amble_used);
  int expo [int];     // expected sample at absolute output sample index
  int cyc = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int sat(int v); return v > 127 ? 127 : (v < -128 ? -128 : v); endfunction
  // output word emitted after the edge ending cycle c covers samples 8c..8c+7
  always @(negedge clk) if (!rst) begin
    for (int l = 0; l < LANES; l++) begin
      int idx; idx = 8*(cyc-1) + l;
      `CHECK(out_word[l], sample_t'(expo.exists(idx) ? expo[idx] : 0), "output sample")
    end
  end
  always @(posedge clk) if (!rst) cyc++;
  initial begin
    int ambles = 0;
    adv = 1; in_valid = 0; in_vec = '0; in_sb = '0; amble_mode = AM_NONE;
    for (int i = 0; i < NSLICE; i++) pattern[i] = '0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 60; n++) begin
      int base, tot, mean; int amb [NSLICE];
      @(negedge clk);
      amble_mode = amble_mode_t'(n % 4);
      for (int i = 0; i < NSLICE; i++) pattern[i] = sample_t'($urandom);
      in_valid = 1; in_sb = sideband_t'($urandom); in_sb.first = $urandom % 2; in_sb.last = $urandom % 2;
      tot = 0;
      for (int i = 0; i < NSLICE; i++) begin in_vec[i] = sample_t'($urandom); tot += int'(in_vec[i]); end
      mean = tot >>> 4;
      for (int i = 0; i < NSLICE; i++) amb[i] = sat((mean * int'(pattern[i])) >>> 7);
      // buffer index j leaves in the word emitted at the edge ending cycle cyc + j/8 + 1
      base = 8*(cyc + 1);
      for (int i = 0; i < NSLICE; i++) expo[base + 17 + int'(in_sb.lend) + i] = int'(in_vec[i]);
      if (in_sb.first && amble_mode == AM_PRE)   for (int i = 0; i < 16; i++) expo[base + 1 + int'(in_sb.lend) + i] = amb[i];
      if (in_sb.first && amble_mode == AM_SPLIT) for (int i = 0; i < 8; i++)  expo[base + 9 + int'(in_sb.lend) + i] = amb[i];
      if (in_sb.last && amble_mode == AM_POST)   for (int i = 0; i < 16; i++) expo[base + 33 + int'(in_sb.lend) + i] = amb[i];
      if (in_sb.last && amble_mode == AM_SPLIT)  for (int i = 0; i < 8; i++)  expo[base + 33 + int'(in_sb.lend) + i] = amb[8+i];
      if (amble_mode != AM_NONE && (in_sb.first || in_sb.last)) ambles++;
      @(posedge clk);
      @(negedge clk); in_valid = 0;
      repeat (6 + $urandom % 3) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    `CHECK(ambles > 20, 1'b1, "ambles exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
