// Testbench for timing_diag. Fiducials arrive with random gaps: mostly near a
// nominal turn, sometimes dropped (gaps of several timeouts), with an
// occasional clear. A reference model kept in the testbench follows the rules
// (turn length = clocks between consecutive fiducials, one miss per timeout
// without a fiducial after the first one, clear resets all) and every output
// is compared on every clock. A fixed opening sequence checks the basic cases
// by value: regular turns, one dropped fiducial, clear.
`include "tb_check.svh"
module tb_timing_diag;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic clear, fid_pulse, missing; logic [31:0] timeout, turn_len, fid_count; logic [15:0] miss_count;
  timing_diag dut (.clk, .rst, .clear, .fid_pulse, .timeout, .missing, .miss_count, .turn_len, .fid_count);

  // reference model state
  int m_gap = 0, m_len = 0, m_fids = 0, m_miss = 0;
  bit m_seen = 0, m_missing = 0;
  bit compare = 0;
  int n_miss_events = 0, n_clears = 0;

  always @(posedge clk) begin
    if (compare) begin
      `CHECK(missing, m_missing, "missing flag")
      `CHECK(miss_count, 16'(m_miss), "miss count")
      `CHECK(turn_len, 32'(m_len), "turn length")
      `CHECK(fid_count, 32'(m_fids), "fiducial count")
    end
    if (rst || clear) begin
      m_gap = 0; m_seen = 0; m_missing = 0; m_miss = 0; m_len = 0; m_fids = 0;
    end else if (fid_pulse) begin
      if (m_seen) m_len = m_gap + 1;
      m_gap = 0; m_seen = 1; m_fids++;
    end else if (m_seen) begin
      if (m_gap + 1 > int'(timeout)) begin m_missing = 1; m_miss++; m_gap = 0; n_miss_events++; end
      else m_gap++;
    end
    compare = !rst;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fid_after(input int gap);
    repeat (gap - 1) @(negedge clk);
    fid_pulse = 1; @(negedge clk); fid_pulse = 0;
  endtask

  initial begin
    clear = 0; fid_pulse = 0; timeout = 60;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // fixed opening: 10 regular turns of 50 clocks
    fid_pulse = 1; @(negedge clk); fid_pulse = 0;
    repeat (9) fid_after(50);
    `CHECK(turn_len, 32'd50, "turn length by value")
    `CHECK(fid_count, 32'd10, "fiducials by value")
    `CHECK(missing, 1'b0, "no miss by value")
    fid_after(100);                       // one fiducial dropped
    `CHECK(missing, 1'b1, "miss flagged by value")
    `CHECK(miss_count, 16'd1, "one miss by value")
    `CHECK(turn_len, 32'd39, "gap restarted at the miss")
    clear = 1; @(negedge clk); clear = 0;
    `CHECK(missing, 1'b0, "cleared by value")
    `CHECK(fid_count, 32'd0, "count cleared by value")
    // random traffic
    for (int i = 0; i < 600; i++) begin
      int r; r = $urandom % 100;
      if (r < 80)      fid_after(45 + $urandom % 15);          // normal turn, under the timeout
      else if (r < 95) fid_after(61 + $urandom % 200);         // one or more dropped fiducials
      else begin clear = 1; @(negedge clk); clear = 0; n_clears++; end
      if (i == 300) timeout = 90;
    end
    repeat (5) @(negedge clk);
    $display("timing_diag: miss events=%0d clears=%0d", n_miss_events, n_clears);
    `CHECK(n_miss_events > 20, 1'b1, "misses exercised")
    `CHECK(n_clears > 5, 1'b1, "clears exercised")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
