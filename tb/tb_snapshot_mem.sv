// Testbench for snapshot_mem (small depth). Vectors of several channels pass
// each "turn". Several recordings are made with different selected channels,
// start turns and lengths (zero, partial, the full depth), and one is re-armed
// halfway through. After arming, the selected channel must be recorded from
// the start turn on, for exactly `length` turns; `count`, `recording` and
// `done` are checked after every vector; turns after `done` must not touch
// the memory; the contents are read back in order (one-clock read).
`include "tb_check.svh"
module tb_snapshot_mem;
  import wbfb_pkg::*;
  localparam int DEPTH = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic arm, in_valid, recording, done; logic [5:0] sel_chan; logic [31:0] turn, start_turn;
  logic [6:0] length, count; slice_vec_t in_vec, rdata; sideband_t in_sb; logic [5:0] raddr;
  snapshot_mem #(.DEPTH(DEPTH)) dut (.clk, .rst, .arm, .sel_chan, .turn, .start_turn, .length, .in_valid,
    .in_vec, .in_sb, .raddr, .rdata, .recording, .done, .count);
  slice_vec_t model [$];
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_arm();
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
    model.delete();
  endtask

  // one pass of `nturns` turns with 12 channels each; `stop_after` (>= 0)
  // returns early once that many vectors of the selected channel were recorded
  task automatic run_turns(input int t0, input int nturns, input int stop_after = -1);
    for (int t = t0; t < t0 + nturns; t++) begin
      turn = t;
      for (int c = 0; c < 12; c++) begin
        bit rec;
        @(negedge clk);
        in_valid = 1; in_sb = sideband_t'($urandom); in_sb.chan = 6'(c);
        for (int i = 0; i < NSLICE; i++) in_vec[i] = sample_t'($urandom);
        rec = (c == int'(sel_chan)) && t >= int'(start_turn) && model.size() < int'(length);
        if (rec) model.push_back(in_vec);
        @(negedge clk); in_valid = 0;
        `CHECK(int'(count), model.size(), "count")
        `CHECK(recording, model.size() < int'(length), "recording")
        `CHECK(done, model.size() == int'(length), "done")
        if (stop_after >= 0 && model.size() == stop_after) return;
      end
    end
  endtask

  task automatic read_back(input int n);
    for (int a = 0; a < n; a++) begin
      @(negedge clk); raddr = 6'(a); @(posedge clk); #1;
      `CHECK(rdata, model[a], "recorded vector")
    end
  endtask

  initial begin
    arm = 0; in_valid = 0; sel_chan = 6'd9; turn = 0; start_turn = 5; length = 7'd40; in_vec = '0; in_sb = '0; raddr = 0;
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    // 1: 40 turns of channel 9 from turn 5, then 15 more turns that must not be recorded
    do_arm();
    `CHECK(recording, 1'b1, "recording after arm")
    run_turns(0, 60);
    `CHECK(int'(count), 40, "count at the end")
    read_back(40);
    // 2: length zero finishes at once
    length = 7'd0; do_arm();
    `CHECK(done, 1'b1, "zero length done at arm")
    `CHECK(recording, 1'b0, "zero length not recording")
    run_turns(0, 3);
    // 3: full depth, channel 0, start turn 0
    sel_chan = 6'd0; start_turn = 0; length = 7'(DEPTH); do_arm();
    run_turns(0, DEPTH + 4);
    read_back(DEPTH);
    // 4: re-arm halfway through a recording, channel 11 from turn 100
    sel_chan = 6'd11; start_turn = 100; length = 7'd20; do_arm();
    run_turns(95, 30, 10);
    do_arm();
    `CHECK(int'(count), 0, "count restarts on re-arm")
    run_turns(130, 25);
    read_back(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
