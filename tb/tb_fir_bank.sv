// Testbench for fir_bank: loads two random coefficient sets, then for 24
// turns presents a random 16-slice vector for each of several channels in an
// arbitrary order, choosing the coefficient set at random, and compares every
// result with y(n) = sum h(k) x(n-k) computed from the testbench's own sample
// history. Checks the two-clock latency and the sideband.
`include "tb_check.svh"
module tb_fir_bank;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic coef_we, coef_set, in_valid, coef_sel, out_valid; logic [3:0] coef_tap;
  logic signed [7:0] coef_wdata; slice_vec_t in_vec; sideband_t in_sb, out_sb; acc_vec_t out_vec;
  fir_bank dut (.clk, .rst, .coef_we, .coef_set, .coef_tap, .coef_wdata, .in_valid, .in_vec, .in_sb,
                .coef_sel, .out_valid, .out_vec, .out_sb);
  int h [2][NTAPS];
  int hist [NCHAN][NSLICE][$];   // newest first
  acc_vec_t exp_q [$]; sideband_t exp_sb [$]; int exp_t [$];
  int cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // output checker
  always @(negedge clk) if (!rst && out_valid) begin
    acc_vec_t e;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      e = exp_q.pop_front();
      `CHECK(cyc - exp_t.pop_front(), 2, "latency")
      `CHECK(out_sb, exp_sb.pop_front(), "sideband")
      for (int l = 0; l < NSLICE; l++) `CHECK(out_vec[l], e[l], "fir sum")
    end
  end
  initial begin
    int chans [6] = '{0, 63, 5, 17, 42, 30};
    coef_we = 0; coef_set = 0; coef_tap = 0; coef_wdata = 0; in_valid = 0; in_vec = '0; in_sb = '0; coef_sel = 0;
    repeat (2) @(posedge clk); rst = 0;
    for (int s = 0; s < 2; s++) for (int k = 0; k < NTAPS; k++) begin
      @(negedge clk); coef_we = 1; coef_set = s[0]; coef_tap = k[3:0];
      h[s][k] = (k == 0 && s == 0) ? -128 : $signed(8'($urandom)); coef_wdata = 8'(h[s][k]);
      @(posedge clk);
    end
    @(negedge clk); coef_we = 0;
    for (int n = 0; n < 24; n++) begin
      chans.shuffle();
      foreach (chans[c]) begin
        int ch; int acc; acc_vec_t e;
        ch = chans[c];
        @(negedge clk);
        in_valid = 1; coef_sel = $urandom % 2; in_sb = sideband_t'($urandom); in_sb.chan = 6'(ch);
        for (int l = 0; l < NSLICE; l++) begin
          in_vec[l] = (n < 2 && l == 0) ? sample_t'(-128) : sample_t'($urandom);
          hist[ch][l].push_front(int'(in_vec[l]));
          acc = 0;
          for (int k = 0; k < NTAPS; k++) if (k < hist[ch][l].size()) acc += h[coef_sel][k] * hist[ch][l][k];
          e[l] = acc_t'(acc);
        end
        exp_q.push_back(e); exp_sb.push_back(in_sb); exp_t.push_back(cyc);
        @(posedge clk);
        @(negedge clk); in_valid = 0;   // idle clock between vectors
      end
    end
    repeat (5) @(posedge clk);
    `CHECK(exp_q.size(), 0, "all outputs seen")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
