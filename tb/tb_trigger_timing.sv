// Testbench for trigger_timing: level inputs of random length must give exactly
// one one-clock pulse each, two clocks after the edge that samples the rise.
`include "tb_check.svh"
module tb_trigger_timing;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic inj_trig, bunch1_marker, inj_pulse, fid_pulse;
  trigger_timing dut (.clk, .rst, .inj_trig, .bunch1_marker, .inj_pulse, .fid_pulse);
  int cyc = 0, fid_rise [$], inj_rise [$], nfid = 0, ninj = 0;
  always @(posedge clk) begin
    cyc++;
    if (fid_pulse) begin nfid++; `CHECK(fid_rise.size() > 0 ? cyc - fid_rise.pop_front() : -1, 2, "fid latency") end
    if (inj_pulse) begin ninj++; `CHECK(inj_rise.size() > 0 ? cyc - inj_rise.pop_front() : -1, 2, "inj latency") end
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    inj_trig = 0; bunch1_marker = 0;
    repeat (3) @(posedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 50; n++) begin
      repeat (2 + $urandom % 5) @(negedge clk);
      bunch1_marker = 1; fid_rise.push_back(cyc + 1);
      if (n % 5 == 0) begin inj_trig = 1; inj_rise.push_back(cyc + 1); end
      repeat (1 + $urandom % 6) @(negedge clk);
      bunch1_marker = 0; inj_trig = 0;
    end
    repeat (6) @(posedge clk);
    `CHECK(nfid, 50, "fid pulses")
    `CHECK(ninj, 10, "inj pulses")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
