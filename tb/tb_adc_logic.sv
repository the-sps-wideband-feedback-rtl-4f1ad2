// Testbench for adc_logic: drives random offset-binary codes on both ADCs and
// checks the merged two's-complement word (ADC1/ADC2 alternating, lane 0
// first), the valid and fiducial flags, and the one-clock latency.
`include "tb_check.svh"
module tb_adc_logic;
  import wbfb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] a1 [4], a2 [4];
  logic in_valid, fid_in, word_valid, word_fid;
  word_t word;
  adc_logic dut (.clk, .rst, .adc1_data(a1), .adc2_data(a2), .in_valid, .fid_in, .word, .word_valid, .word_fid);
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] e1 [4], e2 [4]; logic ev, ef;
    for (int i = 0; i < 4; i++) begin a1[i] = 0; a2[i] = 0; end
    in_valid = 0; fid_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin a1[i] = 8'($urandom); a2[i] = 8'($urandom); e1[i] = a1[i]; e2[i] = a2[i]; end
      if (n == 0) begin a1[0] = 8'h80; a1[1] = 8'h00; a1[2] = 8'hFF; e1 = a1; end
      in_valid = ($urandom % 8) != 0; fid_in = ($urandom % 5) == 0; ev = in_valid; ef = fid_in && in_valid;
      @(posedge clk); #1;
      `CHECK(word_valid, ev, "valid")
      `CHECK(word_fid, ef, "fid")
      for (int i = 0; i < 4; i++) begin
        `CHECK(word[2*i],   sample_t'(int'(e1[i]) - 128), "adc1 lane")
        `CHECK(word[2*i+1], sample_t'(int'(e2[i]) - 128), "adc2 lane")
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
