// Testbench for out_mixer: random vectors, modes, bunch masks and excitation
// settings; checks feedback-only, excitation-only, FEC (saturated sum) and off,
// the run gating, and the one-clock latency.
`include "tb_check.svh"
module tb_out_mixer;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  out_mode_t mode; logic run, exc_active, in_valid, out_valid, fb_used, exc_used;
  logic [63:0] bunch_en; logic [5:0] exc_chan; slice_vec_t exc_vec, in_vec, out_vec; sideband_t in_sb, out_sb;
  out_mixer dut (.clk, .rst, .mode, .run, .bunch_en, .exc_active, .exc_chan, .exc_vec, .in_valid,
                 .in_vec, .in_sb, .out_valid, .out_vec, .out_sb, .fb_used, .exc_used);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int fec_sat = 0;
    mode = OM_OFF; run = 0; exc_active = 0; in_valid = 0; bunch_en = '0; exc_chan = 0; exc_vec = '0; in_vec = '0; in_sb = '0;
    repeat (2) @(posedge clk); rst = 0;
    for (int n = 0; n < 800; n++) begin
      logic fb_on, ex_on; int e [NSLICE];
      @(negedge clk);
      mode = out_mode_t'(n % 4); run = ($urandom % 8) != 0; exc_active = $urandom % 2;
      bunch_en = {$urandom, $urandom}; in_valid = 1; in_sb = sideband_t'($urandom);
      exc_chan = ($urandom % 2) ? in_sb.chan : 6'($urandom);
      for (int i = 0; i < NSLICE; i++) begin in_vec[i] = sample_t'($urandom); exc_vec[i] = sample_t'($urandom); end
      fb_on = run && bunch_en[in_sb.bunch] && (mode == OM_FEEDBACK || mode == OM_FEC);
      ex_on = run && exc_active && exc_chan == in_sb.chan && (mode == OM_EXCITATION || mode == OM_FEC);
      for (int i = 0; i < NSLICE; i++) begin
        e[i] = (fb_on ? int'(in_vec[i]) : 0) + (ex_on ? int'(exc_vec[i]) : 0);
        if (e[i] > 127) begin e[i] = 127; fec_sat++; end
        if (e[i] < -128) begin e[i] = -128; fec_sat++; end
      end
      @(posedge clk); #1;
      `CHECK(out_valid, 1'b1, "valid")
      `CHECK(out_sb, in_sb, "sideband")
      `CHECK(fb_used, fb_on, "fb flag")
      `CHECK(exc_used, ex_on, "exc flag")
      for (int i = 0; i < NSLICE; i++) `CHECK(out_vec[i], sample_t'(e[i]), "mix")
    end
    `CHECK(fec_sat > 0, 1'b1, "saturated sum exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
