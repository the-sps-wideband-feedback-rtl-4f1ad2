// Testbench for adc_dsp_ctrl: streams turns of words with a fiducial word
// at the start of each and checks every `fire` against the windows computed
// from first_offset, spacing and n_bunch, in single-bunch and doublet mode
// (lend, bunch, channel, first/last), and that no windows fire before the
// first fiducial or when not acquiring.
`include "tb_check.svh"
module tb_adc_dsp_ctrl;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic acquire, doublet, word_valid, word_fid, fire, turn_start; logic [6:0] n_bunch;
  logic [19:0] first_offset, spacing; sideband_t sb;
  adc_dsp_ctrl dut (.clk, .rst, .acquire, .doublet, .n_bunch, .first_offset, .spacing, .word_valid,
                    .word_fid, .fire, .sb, .turn_start);
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run_turns(input int nturns, input int turn_words, input logic dbl, input int nb,
                           input int off, input int sp, input logic acq);
    for (int t = 0; t < nturns; t++) begin
      int exp_end [$]; sideband_t exp_sb [$]; int nfire = 0;
      for (int b = 0; b < nb; b++) for (int h = 0; h < (dbl ? 2 : 1); h++) begin
        sideband_t s;
        exp_end.push_back(off + b*sp + 16*h + 15);
        s.bunch = 6'(b); s.chan = dbl ? 6'(2*b + h) : 6'(b); s.lend = 3'((off + b*sp + 16*h + 15) % 8);
        s.first = !dbl || h == 0; s.last = !dbl || h == 1;
        exp_sb.push_back(s);
      end
      for (int w = 0; w < turn_words; w++) begin
        @(negedge clk);
        word_valid = 1; word_fid = (w == 0);
        #1;
        if (fire) begin
          nfire++;
          if (exp_end.size() == 0) begin failures++; $display("FAIL extra fire"); end
          else begin
            `CHECK(w, exp_end[0] / 8, "fire word")
            `CHECK(sb, exp_sb[0], "sideband")
            void'(exp_end.pop_front()); void'(exp_sb.pop_front());
          end
        end
      end
      `CHECK(nfire, acq ? (dbl ? 2*nb : nb) : 0, "windows per turn")
    end
  endtask
  initial begin
    acquire = 0; doublet = 0; word_valid = 0; word_fid = 0; n_bunch = 4; first_offset = 20; spacing = 100;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // not acquiring: nothing
    run_turns(1, 120, 0, 4, 20, 100, 0);
    acquire = 1;
    @(negedge clk); word_valid = 1; word_fid = 0;   // words before the first fiducial
    repeat (5) begin @(negedge clk); #1 `CHECK(fire, 1'b0, "no fire before fiducial") end
    run_turns(3, 120, 0, 4, 20, 100, 1);
    n_bunch = 64; first_offset = 3; spacing = 100;
    run_turns(2, 820, 0, 64, 3, 100, 1);
    doublet = 1; n_bunch = 32; first_offset = 7; spacing = 150;
    run_turns(2, 620, 1, 32, 7, 150, 1);
    doublet = 0; n_bunch = 1; first_offset = 0; spacing = 100;
    run_turns(2, 50, 0, 1, 0, 100, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
